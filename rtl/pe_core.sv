// pe_core: six-stage pipelined computation core (sum of four products, logarithm,
// antilogarithm).
//
// Eight logarithmic converters (stages 1-2) map a1..a4, b1..b4 into the log domain;
// stage 3 adds the pairs, giving log2|ai*bi|; four antilogarithmic converters
// (stages 4-5) bring the products back to the linear domain; stage 6 adds the four
// products. The same pipeline serves two single operations, as in the published
// core: a logarithm leaves after stage 2 (eight results, log2 of each |ai| and |bi|
// as a Q11.52 word), and an antilogarithm enters at stage 4 and leaves after
// stage 5 (four results 2^ai, where ai is read as a Q11.52 exponent).
//
// Interface: one operation is accepted per clock when in_valid and in_ready are
// high; in_tag travels with it and comes back with its result. Latencies: LOG 2,
// ALOG 2, SOP 6 clocks from acceptance to the result valid. An ALOG and an SOP
// cannot both use stage 4 in the same clock: an ALOG is held off (in_ready low)
// while an SOP sits in stage 3. This structural stall, the tags and the saturating
// final adder are this design's own choices.
module pe_core
  import phylo_pkg::*;
#(
  parameter int unsigned TAG_W = 16,
  parameter int unsigned SEGS  = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  core_op_e         in_op,
  input  data_t            in_a [4],
  input  data_t            in_b [4],
  input  logic [TAG_W-1:0] in_tag,

  output logic             log_valid,
  output logic [TAG_W-1:0] log_tag,
  output data_t            log_out [8],   // log2|a1..a4|, log2|b1..b4|
  output logic             alog_valid,
  output logic [TAG_W-1:0] alog_tag,
  output data_t            alog_out [4],
  output logic             sop_valid,
  output logic [TAG_W-1:0] sop_tag,
  output data_t            sop_out
);

  typedef struct packed {
    logic             valid;
    core_op_e         op;
    logic [TAG_W-1:0] tag;
  } slot_t;

  slot_t s1, s2, s3, s4, s5, s6;

  // An ALOG would collide in stage 4 with an SOP leaving stage 3.
  assign in_ready = !(in_op == CORE_ALOG && s3.valid);

  logic accept;
  assign accept = in_valid && in_ready;

  // ---------------- stages 1-2: logarithmic converters ----------------
  log_t lg_a [4];
  log_t lg_b [4];
  for (genvar i = 0; i < 4; i++) begin : g_log
    log_converter #(.SEGS(SEGS)) u_la (.clk(clk), .x(in_a[i]), .y(lg_a[i]));
    log_converter #(.SEGS(SEGS)) u_lb (.clk(clk), .x(in_b[i]), .y(lg_b[i]));
  end

  // Log results as data words; log of zero is the most negative word.
  function automatic data_t log_word(log_t v);
    if (v.zero) return {1'b1, 63'd0};
    return data_t'(v.lg) <<< (FRAC_W - LOG_F);
  endfunction

  for (genvar i = 0; i < 4; i++) begin : g_logout
    assign log_out[i]   = log_word(lg_a[i]);
    assign log_out[i+4] = log_word(lg_b[i]);
  end

  // ---------------- stage 3: log-domain adders ----------------
  log_t s3_prod [4];
  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      s3_prod[i].zero <= lg_a[i].zero | lg_b[i].zero;
      s3_prod[i].sign <= lg_a[i].sign ^ lg_b[i].sign;
      s3_prod[i].lg   <= lg_a[i].lg + lg_b[i].lg;
    end
  end

  // ALOG operands enter at stage 4 in place of the stage-3 products.
  function automatic log_t exp_operand(data_t e);
    log_t r;
    logic signed [DATA_W-1:0] t;
    t      = e >>> (FRAC_W - LOG_F);
    r.zero = 1'b0;
    r.sign = 1'b0;
    if (t > data_t'({1'b0, {(LOG_W-1){1'b1}}}))      r.lg = {1'b0, {(LOG_W-1){1'b1}}};
    else if (t < -data_t'({1'b0, {(LOG_W-1){1'b1}}})) r.lg = {1'b1, {(LOG_W-1){1'b0}}};
    else                                             r.lg = t[LOG_W-1:0];
    return r;
  endfunction

  logic alog_in;
  assign alog_in = accept && in_op == CORE_ALOG;

  log_t s4_in [4];
  always_comb begin
    for (int i = 0; i < 4; i++)
      s4_in[i] = alog_in ? exp_operand(in_a[i]) : s3_prod[i];
  end

  // ---------------- stages 4-5: antilogarithmic converters ----------------
  data_t lin [4];
  for (genvar i = 0; i < 4; i++) begin : g_alog
    antilog_converter #(.SEGS(SEGS)) u_al (.clk(clk), .y(s4_in[i]), .x(lin[i]));
  end
  assign alog_out = lin;

  // ---------------- stage 6: adder tree ----------------
  logic signed [DATA_W+1:0] sum;
  always_comb begin
    sum = (DATA_W+2)'(lin[0]) + (DATA_W+2)'(lin[1]) + (DATA_W+2)'(lin[2]) + (DATA_W+2)'(lin[3]);
  end

  localparam logic signed [DATA_W+1:0] SUM_MAX = (DATA_W+2)'(signed'({1'b0, {(DATA_W-1){1'b1}}}));

  always_ff @(posedge clk) begin
    if (sum > SUM_MAX)       sop_out <= data_t'(SUM_MAX);
    else if (sum < -SUM_MAX) sop_out <= data_t'(-SUM_MAX);
    else                     sop_out <= sum[DATA_W-1:0];
  end

  // ---------------- slot tracking ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0; s4 <= '0; s5 <= '0; s6 <= '0;
    end else begin
      s1 <= '{valid: accept && in_op != CORE_ALOG, op: in_op, tag: in_tag};
      s2 <= s1;
      s3 <= '{valid: s2.valid && s2.op == CORE_SOP, op: s2.op, tag: s2.tag};
      s4 <= alog_in ? '{valid: 1'b1, op: CORE_ALOG, tag: in_tag} : s3;
      s5 <= s4;
      s6 <= '{valid: s5.valid && s5.op == CORE_SOP, op: s5.op, tag: s5.tag};
    end
  end

  assign log_valid  = s2.valid && s2.op == CORE_LOG;
  assign log_tag    = s2.tag;
  assign alog_valid = s5.valid && s5.op == CORE_ALOG;
  assign alog_tag   = s5.tag;
  assign sop_valid  = s6.valid;
  assign sop_tag    = s6.tag;

endmodule
