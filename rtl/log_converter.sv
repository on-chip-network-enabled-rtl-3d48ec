// log_converter: two-stage logarithmic converter of the computation core.
//
// Stage 1 (leading-one detector) takes the magnitude of a Q11.52 data word, finds
// its leading one and so the characteristic (integer part of log2), and normalises
// the bits below the leading one into a 30-bit mantissa m in [0,1). Stage 2 turns
// the mantissa into the fraction of the logarithm with a piecewise-linear
// approximation of log2(1+m) over SEGS equal segments. The knots are constants
// computed at elaboration, so the table is plain logic, not a ROM, as in the
// published core. The number of segments is this design's choice.
//
// Interface: x is sampled every clock; y = {zero, sign, log2|x|} appears two clocks
// later (one pipeline register after each stage). There is no valid or enable: the
// enclosing pipeline tracks which slots are occupied.
module log_converter
  import phylo_pkg::*;
#(
  parameter int unsigned SEGS = 32
) (
  input  logic  clk,
  input  data_t x,
  output log_t  y
);
  localparam int unsigned SB = $clog2(SEGS);

  logic [31:0] knot [SEGS+1];
  for (genvar k = 0; k <= SEGS; k++) begin : g_knot
    localparam logic [31:0] KN = log2_knot(k, SEGS);
    assign knot[k] = KN;
  end

  // ---------------- stage 1: leading-one detector ----------------
  logic [62:0] mag;
  logic [5:0]  lead;
  logic [62:0] norm;

  always_comb begin
    if (x[63]) mag = (x == {1'b1, 63'd0}) ? {63{1'b1}} : 63'(-x);
    else       mag = x[62:0];
    lead = '0;
    for (int i = 0; i < 63; i++) if (mag[i]) lead = 6'(i);
    norm = mag << (6'd62 - lead);
  end

  logic              s1_zero, s1_sign;
  logic signed [7:0] s1_char;
  logic [29:0]       s1_mant;

  always_ff @(posedge clk) begin
    s1_zero <= (mag == '0);
    s1_sign <= x[63];
    s1_char <= 8'(signed'({2'b00, lead}) - 8'sd52);
    s1_mant <= norm[61:32];
  end

  // ---------------- stage 2: piecewise-linear mantissa ----------------
  logic [SB-1:0]    seg;
  logic [29-SB:0]   dm;
  logic [31:0]      y0, y1;
  logic [63:0]      interp;
  logic [31:0]      frac;      // log2(1+m), Q1.30

  always_comb begin
    seg    = s1_mant[29 -: SB];
    dm     = s1_mant[29-SB:0];
    y0     = knot[{1'b0, seg}];
    y1     = knot[(SB+1)'(seg) + 1'b1];
    interp = (64'(y1 - y0) * 64'(dm)) >> (30 - SB);
    frac   = y0 + interp[31:0];
  end

  always_ff @(posedge clk) begin
    y.zero <= s1_zero;
    y.sign <= s1_sign;
    y.lg   <= (LOG_W'(s1_char) <<< LOG_F) + LOG_W'(frac >> (30 - LOG_F));
  end

endmodule
