// tb_antilog_converter: checks the two-stage antilogarithmic converter against
// 2^L computed in real arithmetic for random L in [-45, 10.9], both signs, and
// checks zero, saturation above the Q11.52 range, underflow and the two-clock
// latency.
module tb_antilog_converter;
  import phylo_pkg::*;

  logic  clk = 1'b0;
  log_t  y;
  data_t x;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  antilog_converter dut (.clk(clk), .y(y), .x(x));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  log_t hist [3];

  initial begin
    y = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      hist[2] = hist[1];
      hist[1] = hist[0];
      if (t >= 2) begin
        automatic log_t v = hist[2];
        automatic real L = $itor(v.lg) / (2.0 ** 26);
        automatic real got = $itor(x) / (2.0 ** 52);
        automatic real expv;
        checks++;
        if (v.zero) begin
          if (x != 0) begin failures++; $display("FAIL zero"); end
        end else if (L >= 11.0) begin
          if (x != (v.sign ? -data_t'(64'h7fff_ffff_ffff_ffff) : data_t'(64'h7fff_ffff_ffff_ffff))) begin
            failures++; $display("FAIL saturation L=%f x=%h", L, x);
          end
        end else if (L < -60.0) begin
          if (x != 0) begin failures++; $display("FAIL underflow L=%f x=%h", L, x); end
        end else begin
          expv = $pow(2.0, L);
          if (v.sign) expv = -expv;
          if ((got - expv) > 2.5e-4 * (expv < 0 ? -expv : expv) + 1.0e-15 ||
              (expv - got) > 2.5e-4 * (expv < 0 ? -expv : expv) + 1.0e-15) begin
            failures++;
            if (failures < 10) $display("FAIL L=%f exp %e got %e", L, expv, got);
          end
        end
      end
      y.zero = (t % 101 == 7);
      y.sign = $urandom_range(0, 1) == 1;
      if (t % 89 == 3)       y.lg = LOG_W'(64'sd12 <<< 26);
      else if (t % 83 == 4)  y.lg = -LOG_W'(64'sd70 <<< 26);
      else                   y.lg = LOG_W'(longint'($urandom_range(0, 56 * 1024 * 1024)) * 64
                                          - (longint'(45) <<< 26));
      hist[0] = y;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
