// tb_noc_node: one node (switch, network interface, crossbar, four PEs) at the
// torus origin. Programs loaded through the host port exercise the three kinds of
// subnet traffic: PE0 sends a computed word to PE1, PE2 broadcasts a word to the
// other three PEs, PE3 forwards the broadcast word to node 1 (it must leave on the
// X+ link as head, body and tail flits), and a packet injected on the X- link is
// delivered to PE0, which waits for it. The busy flag must rise on allocation,
// stay up while the PEs run and drop when all have halted.
module tb_noc_node;
  import phylo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic nin_valid [6], nin_ready [6], nout_valid [6], nout_ready [6];
  flit_t nin_flit [6], nout_flit [6];
  logic host_sel, host_we, host_imem;
  logic [1:0] host_pe;
  logic [ADDR_W-1:0] host_addr, host_raddr;
  data_t host_wdata, host_rdata;
  logic alloc, start, busy;

  int checks = 0, failures = 0, out_flits = 0;

  always #5 clk = ~clk;

  logic [NODE_W-1:0] my_node = '0;

  noc_node #(.MEM_WORDS(512), .IMEM_DEPTH(16)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t w(real v); return data_t'(longint'(v * (2.0 ** 40))) <<< 12; endfunction
  function automatic real r(data_t v); return $itor(v) / (2.0 ** 52); endfunction

  function automatic logic [63:0] ins(opcode_e op, int dst, int a, int b,
                                      int node = 0, int p = 0, logic bc = 1'b0);
    instr_t i;
    i = '{op: op, dst: ADDR_W'(dst), srca: ADDR_W'(a), srcb: ADDR_W'(b),
          node: NODE_W'(node), pe: 2'(p), bcast: bc, rsvd: '0};
    return i;
  endfunction

  task automatic hw(int p, logic im, int a, logic [63:0] d);
    @(negedge clk);
    host_sel = 1'b1; host_pe = 2'(p); host_we = 1'b1; host_imem = im;
    host_addr = ADDR_W'(a); host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic hr(int p, int a, output data_t d);
    @(negedge clk);
    host_pe = 2'(p); host_raddr = ADDR_W'(a);
    @(negedge clk);
    d = host_rdata;
  endtask

  task automatic expect_eq(string what, data_t got, data_t expv);
    checks++;
    if (got !== expv) begin failures++; $display("FAIL %s exp %h got %h", what, expv, got); end
  endtask

  localparam data_t BW = 64'h0123_4567_89ab_cdef;
  localparam data_t NW = 64'h0fed_cba9_8765_4321;
  localparam head_t HD300 = '{dst_node: 6'd0, dst_pe: 2'd0, bcast: 1'b0, addr: 16'd300, rsvd: '0};

  // Flits leaving on X+ (direction 0).
  always @(posedge clk) if (rst_n && nout_valid[0] && nout_ready[0]) begin
    automatic head_t h = head_t'(nout_flit[0].payload);
    checks++;
    unique case (out_flits)
      0: if (nout_flit[0].ftype != FLIT_HEAD || h.dst_node != 6'd1 || h.dst_pe != 2'd3 || h.addr != 16'd400) begin
           failures++; $display("FAIL head flit %p", nout_flit[0]); end
      1: if (nout_flit[0].ftype != FLIT_BODY || nout_flit[0].payload != BW) begin
           failures++; $display("FAIL body flit %p", nout_flit[0]); end
      default: if (nout_flit[0].ftype != FLIT_TAIL) begin failures++; $display("FAIL tail flit"); end
    endcase
    out_flits++;
  end

  initial begin
    data_t d;
    real s;
    for (int i = 0; i < 6; i++) begin nin_valid[i] = 1'b0; nin_flit[i] = '0; nout_ready[i] = 1'b1; end
    host_sel = 1'b0; host_we = 1'b0; host_imem = 1'b0; host_pe = '0; host_addr = '0;
    host_wdata = '0; host_raddr = '0; alloc = 1'b0; start = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++; if (busy) begin failures++; $display("FAIL busy after reset"); end
    // PE0 operands and programs.
    for (int i = 0; i < 4; i++) begin hw(0, 1'b0, i, w(0.5 * (i + 1))); hw(0, 1'b0, 4 + i, w(1.0 - 0.25 * i)); end
    hw(2, 1'b0, 8, BW);
    hw(0, 1'b1, 0, ins(OP_SOP, 16, 0, 4));
    hw(0, 1'b1, 1, ins(OP_SEND, 100, 16, 0, 0, 1));
    hw(0, 1'b1, 2, ins(OP_WAIT, 0, 2, 0));
    hw(0, 1'b1, 3, ins(OP_HALT, 0, 0, 0));
    hw(1, 1'b1, 0, ins(OP_WAIT, 0, 2, 0));
    hw(1, 1'b1, 1, ins(OP_HALT, 0, 0, 0));
    hw(2, 1'b1, 0, ins(OP_SEND, 200, 8, 0, 0, 2, 1'b1));
    hw(2, 1'b1, 1, ins(OP_HALT, 0, 0, 0));
    hw(3, 1'b1, 0, ins(OP_WAIT, 0, 1, 0));
    hw(3, 1'b1, 1, ins(OP_SEND, 400, 200, 0, 1, 3));
    hw(3, 1'b1, 2, ins(OP_HALT, 0, 0, 0));
    host_sel = 1'b0;
    @(negedge clk); alloc = 1'b1;
    @(negedge clk); alloc = 1'b0;
    checks++; if (!busy) begin failures++; $display("FAIL not busy after alloc"); end
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    // Packet from the X- neighbour for PE0, word 300.
    for (int f = 0; f < 3; f++) begin
      nin_valid[1] = 1'b1;
      nin_flit[1]  = (f == 0) ? '{ftype: FLIT_HEAD, payload: HD300} :
                     (f == 1) ? '{ftype: FLIT_BODY, payload: NW} : '{ftype: FLIT_TAIL, payload: '0};
      @(posedge clk);
      while (!nin_ready[1]) @(posedge clk);
      @(negedge clk);
    end
    nin_valid[1] = 1'b0;
    checks++; if (!busy) begin failures++; $display("FAIL not busy while running"); end
    wait (!busy);
    repeat (3) @(negedge clk);
    s = 0.0; for (int i = 0; i < 4; i++) s += 0.5 * (i + 1) * (1.0 - 0.25 * i);
    hr(1, 100, d);
    checks++; if (r(d) - s > 2e-3 || s - r(d) > 2e-3) begin failures++; $display("FAIL PE1 word %f exp %f", r(d), s); end
    hr(0, 200, d); expect_eq("PE0 broadcast", d, BW);
    hr(1, 200, d); expect_eq("PE1 broadcast", d, BW);
    hr(3, 200, d); expect_eq("PE3 broadcast", d, BW);
    hr(0, 300, d); expect_eq("PE0 network word", d, NW);
    checks++; if (out_flits != 3) begin failures++; $display("FAIL %0d flits left on X+", out_flits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
