// tb_pe_core: drives the six-stage core with a random mix of sum-of-four-products,
// logarithm and antilogarithm operations and compares every result with real
// arithmetic. It checks the latencies (SOP 6, LOG 2, ALOG 2 clocks), that every
// result carries its tag, and that an ALOG is held off while an SOP is in stage 3.
module tb_pe_core;
  import phylo_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0;
  logic     in_valid, in_ready;
  core_op_e in_op;
  data_t    in_a [4], in_b [4];
  logic [15:0] in_tag;
  logic     log_valid, alog_valid, sop_valid;
  logic [15:0] log_tag, alog_tag, sop_tag;
  data_t    log_out [8], alog_out [4], sop_out;

  int checks = 0, failures = 0, stalls = 0, n_sop = 0, n_log = 0, n_alog = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  pe_core dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r(data_t v); return $itor(v) / (2.0 ** 52); endfunction
  function automatic data_t w(real v); return data_t'(longint'(v * (2.0 ** 40))) <<< 12; endfunction

  // Expected results by tag.
  real      exp_v [65536][8];
  core_op_e exp_op [65536];
  int       exp_cyc [65536];

  function automatic logic near(real got, real expv, real tol);
    real d = got - expv;
    if (d < 0) d = -d;
    return d <= tol;
  endfunction

  // Result checker.
  always @(negedge clk) if (rst_n) begin
    if (log_valid) begin
      checks++;
      if (exp_op[log_tag] != CORE_LOG || cycle - exp_cyc[log_tag] != 2) begin
        failures++; $display("FAIL log tag/latency %0d", cycle - exp_cyc[log_tag]);
      end
      for (int i = 0; i < 8; i++)
        if (!near(r(log_out[i]), exp_v[log_tag][i], 3e-4)) begin
          failures++; $display("FAIL log %0d exp %f got %f", i, exp_v[log_tag][i], r(log_out[i]));
        end
      exp_op[log_tag] = core_op_e'(3);
    end
    if (alog_valid) begin
      checks++;
      if (exp_op[alog_tag] != CORE_ALOG || cycle - exp_cyc[alog_tag] != 2) begin
        failures++; $display("FAIL alog tag/latency %0d", cycle - exp_cyc[alog_tag]);
      end
      for (int i = 0; i < 4; i++)
        if (!near(r(alog_out[i]), exp_v[alog_tag][i], 3e-4 * exp_v[alog_tag][i] + 1e-12)) begin
          failures++; $display("FAIL alog %0d exp %f got %f", i, exp_v[alog_tag][i], r(alog_out[i]));
        end
      exp_op[alog_tag] = core_op_e'(3);
    end
    if (sop_valid) begin
      checks++;
      if (exp_op[sop_tag] != CORE_SOP || cycle - exp_cyc[sop_tag] != 6) begin
        failures++; $display("FAIL sop tag/latency %0d", cycle - exp_cyc[sop_tag]);
      end
      if (!near(r(sop_out), exp_v[sop_tag][0], 1e-3 * exp_v[sop_tag][1] + 1e-12)) begin
        failures++; $display("FAIL sop exp %f got %f", exp_v[sop_tag][0], r(sop_out));
      end
      exp_op[sop_tag] = core_op_e'(3);
    end
  end

  initial begin
    in_valid = 1'b0; in_op = CORE_SOP; in_tag = '0;
    for (int i = 0; i < 4; i++) begin in_a[i] = '0; in_b[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 4) != 0;
      // Force the stall case regularly: SOP now, ALOG three clocks later.
      case (t % 40)
        0: in_op = CORE_SOP;
        3: in_op = CORE_ALOG;
        default: in_op = core_op_e'($urandom_range(0, 2));
      endcase
      if (t % 40 == 0 || t % 40 == 3) in_valid = 1'b1;
      in_tag = 16'(t);
      for (int i = 0; i < 4; i++) begin
        in_a[i] = w(($itor($urandom_range(0, 20000)) - 10000.0) / 2500.0);
        in_b[i] = w(($itor($urandom_range(0, 20000)) - 10000.0) / 2500.0);
        if ($urandom_range(0, 15) == 0) in_b[i] = '0;
      end
      #1;
      if (in_valid && !in_ready) begin
        stalls++;
        checks++;
        if (in_op != CORE_ALOG) begin failures++; $display("FAIL non-ALOG stalled"); end
      end
      if (in_valid && in_ready) begin
        automatic real s = 0.0, sa = 0.0;
        exp_op[in_tag]  = in_op;
        exp_cyc[in_tag] = cycle;
        unique case (in_op)
          CORE_SOP: begin
            for (int i = 0; i < 4; i++) begin
              s  += r(in_a[i]) * r(in_b[i]);
              sa += (r(in_a[i]) * r(in_b[i]) < 0) ? -r(in_a[i]) * r(in_b[i]) : r(in_a[i]) * r(in_b[i]);
            end
            exp_v[in_tag][0] = s; exp_v[in_tag][1] = sa;
            n_sop++;
          end
          CORE_LOG: begin
            for (int i = 0; i < 4; i++) begin
              exp_v[in_tag][i]   = (in_a[i] == 0) ? -2048.0 : $ln((r(in_a[i]) < 0 ? -r(in_a[i]) : r(in_a[i]))) / $ln(2.0);
              exp_v[in_tag][i+4] = (in_b[i] == 0) ? -2048.0 : $ln((r(in_b[i]) < 0 ? -r(in_b[i]) : r(in_b[i]))) / $ln(2.0);
            end
            n_log++;
          end
          default: begin
            for (int i = 0; i < 4; i++) exp_v[in_tag][i] = $pow(2.0, r(in_a[i]));
            n_alog++;
          end
        endcase
      end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (stalls == 0 || n_sop == 0 || n_log == 0 || n_alog == 0) begin
      failures++; $display("FAIL coverage stalls=%0d sop=%0d log=%0d alog=%0d", stalls, n_sop, n_log, n_alog);
    end
    $display("ops sop=%0d log=%0d alog=%0d stalls=%0d", n_sop, n_log, n_alog, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
