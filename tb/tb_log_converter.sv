// tb_log_converter: checks the two-stage logarithmic converter against log2
// computed in real arithmetic, for random magnitudes over the whole Q11.52 range,
// negative inputs and zero, and checks the two-clock latency.
module tb_log_converter;
  import phylo_pkg::*;

  logic  clk = 1'b0;
  data_t x;
  log_t  y;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  log_converter dut (.clk(clk), .x(x), .y(y));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  data_t hist [3];

  function automatic data_t rand_word();
    int unsigned sh;
    logic [63:0] r;
    r  = {$urandom, $urandom};
    sh = $urandom_range(1, 62);
    r  = r >> sh;
    if ($urandom_range(0, 3) == 0) r = -r;
    return data_t'(r);
  endfunction

  initial begin
    x = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      hist[2] = hist[1];
      hist[1] = hist[0];
      if (t >= 2) begin
        // Output now belongs to the input applied two clocks ago.
        automatic data_t v = hist[2];
        checks++;
        if (v == 0) begin
          if (!y.zero) begin
            failures++;
            $display("FAIL zero flag for 0");
          end
        end else begin
          automatic real mag = (v < 0) ? -$itor(v) : $itor(v);
          automatic real exp_lg = $ln(mag / (2.0 ** 52)) / $ln(2.0);
          automatic real got    = $itor(y.lg) / (2.0 ** 26);
          if (y.zero || y.sign != v[63] || (got - exp_lg) > 2.5e-4 || (exp_lg - got) > 2.5e-4) begin
            failures++;
            if (failures < 10) $display("FAIL x=%h log2 exp %f got %f", v, exp_lg, got);
          end
        end
      end
      x = (t % 97 == 5) ? '0 : rand_word();
      hist[0] = x;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
