// tb_pe: loads a short program and its operands into one PE through the host
// port, runs it and reads the results back. The program covers SOP, a dependent
// SOP (held by the scoreboard for exactly the six clocks the first one needs, and the SEND of its result for four more),
// LOG, ALOG, SEND (message fields checked), WAIT (held until two words arrive on
// the receive port) and HALT. Expected values come from real arithmetic.
module tb_pe;
  import phylo_pkg::*;

  localparam int unsigned MW = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, running, hazard_stall;
  logic host_we, host_imem;
  logic [ADDR_W-1:0] host_addr, host_raddr;
  data_t host_wdata, host_rdata;
  logic rx_valid;
  logic [ADDR_W-1:0] rx_addr;
  data_t rx_data;
  logic tx_valid, tx_ready;
  msg_t tx_msg;

  int checks = 0, failures = 0, stall_cycles = 0, sent = 0;

  always #5 clk = ~clk;

  pe #(.MEM_WORDS(MW), .IMEM_DEPTH(64)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r(data_t v); return $itor(v) / (2.0 ** 52); endfunction
  function automatic data_t w(real v); return data_t'(longint'(v * (2.0 ** 40))) <<< 12; endfunction

  task automatic hw(logic im, int a, logic [63:0] d);
    @(negedge clk);
    host_we = 1'b1; host_imem = im; host_addr = ADDR_W'(a); host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic hr(int a, output data_t d);
    @(negedge clk);
    host_raddr = ADDR_W'(a);
    @(negedge clk);
    d = host_rdata;
  endtask

  function automatic logic [63:0] ins(opcode_e op, int dst, int a, int b,
                                      int node = 0, int p = 0, logic bc = 1'b0);
    instr_t i;
    i = '{op: op, dst: ADDR_W'(dst), srca: ADDR_W'(a), srcb: ADDR_W'(b),
          node: NODE_W'(node), pe: 2'(p), bcast: bc, rsvd: '0};
    return i;
  endfunction

  task automatic check(string what, real got, real expv, real tol);
    checks++;
    if ((got - expv) > tol || (expv - got) > tol) begin
      failures++;
      $display("FAIL %s exp %f got %f", what, expv, got);
    end
  endtask

  real a [4] = '{1.5, -0.75, 2.25, 0.5};
  real b [4] = '{0.5, 1.25, -1.0, 3.0};
  real c [4] = '{0.25, 1.0, -2.0, 3.5};
  real rxv [2] = '{1.75, -0.5};

  // Count clocks in which the scoreboard holds an instruction.
  always @(posedge clk) if (hazard_stall) stall_cycles++;

  // Receive side: once the PE has sent its message, deliver two words.
  initial begin
    rx_valid = 1'b0; rx_addr = '0; rx_data = '0;
    tx_ready = 1'b1;
    wait (sent == 1);
    repeat (5) @(negedge clk);
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      rx_valid = 1'b1; rx_addr = ADDR_W'(300 + k); rx_data = w(rxv[k]);
    end
    @(negedge clk);
    rx_valid = 1'b0;
  end

  always @(posedge clk) if (tx_valid && tx_ready) begin
    sent++;
    checks++;
    if (tx_msg.dst_node != 6'd9 || tx_msg.dst_pe != 2'd2 || tx_msg.addr != 16'd200 || tx_msg.bcast) begin
      failures++; $display("FAIL tx header %p", tx_msg);
    end
  end

  initial begin
    data_t d;
    real s, s2, s3;
    start = 1'b0; host_we = 1'b0; host_imem = 1'b0; host_addr = '0; host_wdata = '0; host_raddr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4; i++) begin
      hw(1'b0, i, w(a[i])); hw(1'b0, 4 + i, w(b[i])); hw(1'b0, 8 + i, w(c[i]));
    end
    for (int i = 17; i < 20; i++) hw(1'b0, i, '0);
    hw(1'b0, 302, '0); hw(1'b0, 303, '0);
    hw(1'b1, 0, ins(OP_SOP, 16, 0, 4));
    hw(1'b1, 1, ins(OP_SOP, 20, 16, 8));
    hw(1'b1, 2, ins(OP_LOG, 24, 0, 4));
    hw(1'b1, 3, ins(OP_ALOG, 32, 8, 0));
    hw(1'b1, 4, ins(OP_SEND, 200, 20, 0, 9, 2));
    hw(1'b1, 5, ins(OP_WAIT, 0, 2, 0));
    hw(1'b1, 6, ins(OP_SOP, 40, 300, 4));
    hw(1'b1, 7, ins(OP_HALT, 0, 0, 0));
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    checks++;
    if (!running) begin failures++; $display("FAIL not running"); end
    wait (!running);
    repeat (10) @(negedge clk);

    s = 0.0; for (int i = 0; i < 4; i++) s += a[i] * b[i];
    hr(16, d); check("sop", r(d), s, 2e-3);
    s2 = s * c[0];
    hr(20, d); check("dependent sop", r(d), s2, 2e-3);
    for (int i = 0; i < 4; i++) begin
      hr(24 + i, d); check("log a", r(d), $ln(a[i] < 0 ? -a[i] : a[i]) / $ln(2.0), 3e-4);
      hr(28 + i, d); check("log b", r(d), $ln(b[i] < 0 ? -b[i] : b[i]) / $ln(2.0), 3e-4);
      hr(32 + i, d); check("alog", r(d), $pow(2.0, c[i]), 3e-3);
    end
    s3 = rxv[0] * b[0] + rxv[1] * b[1];
    hr(40, d); check("sop after wait", r(d), s3, 2e-3);
    checks++;
    if (stall_cycles != 10 || sent != 1) begin
      failures++; $display("FAIL stall cycles %0d sent %0d", stall_cycles, sent);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
