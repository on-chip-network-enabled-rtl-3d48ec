// antilog_converter: two-stage antilogarithmic converter of the computation core.
//
// Input is a log-domain word {zero, sign, L} with L = log2|v| in signed Q8.26.
// Stage 4 splits L into an integer part k and a fraction f and approximates 2^f
// in [1,2) piecewise-linearly over SEGS equal segments (knots computed at
// elaboration, plain logic). Stage 5 shifts 2^f by k into the Q11.52 data format,
// applies the sign, flushes results below 2^-52 to zero and saturates results of
// 2^11 or more. The segment count and the saturation are this design's choices.
//
// Interface: y is sampled every clock; x appears two clocks later.
module antilog_converter
  import phylo_pkg::*;
#(
  parameter int unsigned SEGS = 32
) (
  input  logic  clk,
  input  log_t  y,
  output data_t x
);
  localparam int unsigned SB = $clog2(SEGS);

  logic [31:0] knot [SEGS+1];
  for (genvar k = 0; k <= SEGS; k++) begin : g_knot
    localparam logic [31:0] KN = exp2_knot(k, SEGS);
    assign knot[k] = KN;
  end

  // ---------------- stage 4: fraction lookup ----------------
  logic signed [LOG_W-LOG_F-1:0] k_int;
  logic [LOG_F-1:0]              f;
  logic [SB-1:0]                 seg;
  logic [LOG_F-SB-1:0]           df;
  logic [31:0]                   p0, p1;
  logic [63:0]                   interp;

  always_comb begin
    k_int  = y.lg[LOG_W-1:LOG_F];
    f      = y.lg[LOG_F-1:0];
    seg    = f[LOG_F-1 -: SB];
    df     = f[LOG_F-SB-1:0];
    p0     = knot[{1'b0, seg}];
    p1     = knot[(SB+1)'(seg) + 1'b1];
    interp = (64'(p1 - p0) * 64'(df)) >> (LOG_F - SB);
  end

  logic                          s4_zero, s4_sign;
  logic signed [LOG_W-LOG_F-1:0] s4_k;
  logic [31:0]                   s4_p;      // 2^f, Q1.30

  always_ff @(posedge clk) begin
    s4_zero <= y.zero;
    s4_sign <= y.sign;
    s4_k    <= k_int;
    s4_p    <= p0 + interp[31:0];
  end

  // ---------------- stage 5: shift and normalisation ----------------
  int          sh;
  logic [62:0] mag;

  always_comb begin
    sh = int'(s4_k) + int'(FRAC_W) - 30;
    if (s4_zero)                          mag = '0;
    else if (s4_k > 8'sd10)               mag = {63{1'b1}};
    else if (sh >= 0)                     mag = 63'(s4_p) << sh;
    else if (sh < -31)                    mag = '0;
    else                                  mag = 63'(s4_p >> (-sh));
  end

  always_ff @(posedge clk) begin
    x <= s4_sign ? -data_t'({1'b0, mag}) : data_t'({1'b0, mag});
  end

endmodule
