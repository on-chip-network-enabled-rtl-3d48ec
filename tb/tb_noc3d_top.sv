// tb_noc3d_top: end-to-end run of the whole accelerator, reduced to one layer of
// the torus (4x4x1 = 16 nodes, 64 PEs) with 1024-word data memories and 16-word
// instruction memories so that the simulation builds and runs in minutes. The
// routing, allocation and node logic are the same as at the full 4x4x4 size.
//
// The host asks the MasterController for three partitions - 2 nodes (the
// newviewGTRCAT shape), 3 nodes (coreGTRCAT) and 6 nodes (newviewGTRGAMMA) - and
// checks that the granted node lists are distinct, in range and free. It then loads
// a program into every PE of the three partitions and starts them together:
//  * 2 nodes: every PE of node A forms a sum of four products and sends it to its
//    twin PE in node B, which multiplies it with its own sum and broadcasts the
//    product to all four PEs of node A; each PE of A then forms one output of
//    the eigenvector stage (a sum of four products over the four broadcasts).
//  * 3 nodes: the first two nodes send their sums to the third, which also sends
//    its own sum to itself (loopback); there PE0 adds the three and broadcasts
//    the total inside its node, takes the logarithm of the words and, three clocks
//    after an SOP, an antilogarithm (which the core must hold for one clock).
//  * 6 nodes: node k sends its sum to node k+3 of the partition; some of these
//    routes wrap round the Z ring of the torus.
// While they run, more 6-node partitions are requested until one must wait; it
// is granted once the 2-node partition finishes. All results are read back
// through the host port and compared with real arithmetic. The bench counts
// allocation waits, column moves of the allocator, crossbar broadcasts, scoreboard
// stalls, ALOG stalls in a core, router output back-pressure, torus wrap-round
// hops and packets, and fails if any of them never happened.
module tb_noc3d_top;
  import phylo_pkg::*;
  localparam int NZ = 1, NN = 16 * NZ;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NODE_W-1:0] host_node;
  logic [1:0] host_pe;
  logic host_we, host_imem;
  logic [ADDR_W-1:0] host_addr, host_raddr;
  data_t host_wdata, host_rdata;
  logic [NN-1:0] start_mask, node_busy;
  logic req_valid, req_ready, grant_valid, alloc_waiting;
  logic [2:0] req_count, grant_count;
  logic [NODE_W-1:0] grant_nodes [6];

  int checks = 0, failures = 0;
  int n_wait = 0, n_colmove = 0, n_bcast = 0, n_hazard = 0, n_alog_stall = 0;
  int n_backpressure = 0, n_wrap = 0, n_packets = 0;

  always #5 clk = ~clk;

  noc3d_top #(.NZ(NZ), .MEM_WORDS(1024), .IMEM_DEPTH(16)) dut (.*);

  string phase = "reset";

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog in phase %s, busy nodes %b", phase, node_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  always @(posedge clk) if (rst_n) begin
    if (alloc_waiting) n_wait++;
    if (dut.u_mc.st == 1'b1 && !alloc_waiting && !dut.u_mc.col_left) n_colmove++;
  end

  for (genvar n = 0; n < NN; n++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      for (int d = 0; d < 6; d++) begin
        if (dut.nout_valid[n][d] && !dut.nout_ready[n][d]) n_backpressure++;
        if (dut.nout_valid[n][d] && dut.nout_ready[n][d]) begin
          automatic int x = n % 4, y = (n / 4) % 4, z = n / 16;
          if ((d == 0 && x == 3) || (d == 1 && x == 0) || (d == 2 && y == 3) ||
              (d == 3 && y == 0) || (d == 4 && z == NZ - 1) || (d == 5 && z == 0)) n_wrap++;
        end
      end
      for (int i = 0; i < 4; i++)
        if (dut.g_node[n].u_node.xb_in_valid[i] && dut.g_node[n].u_node.xb_in_ready[i] &&
            dut.g_node[n].u_node.xb_in_msg[i].bcast &&
            dut.g_node[n].u_node.xb_in_msg[i].dst_node == 6'(n)) n_bcast++;
      if (dut.g_node[n].u_node.xb_in_valid[4] && dut.g_node[n].u_node.xb_in_ready[4]) n_packets++;
      for (int p = 0; p < 4; p++) if (dut.g_node[n].u_node.pe_stall[p]) n_hazard++;
    end
    for (genvar p = 0; p < 4; p++) begin : g_pe
      always @(posedge clk) if (rst_n && dut.g_node[n].u_node.g_pe[p].u_pe.core_valid &&
                                !dut.g_node[n].u_node.g_pe[p].u_pe.core_ready) n_alog_stall++;
    end
  end

  // A node that finished may be handed to the waiting request at once, so the
  // drain below waits on the first fall of busy after the start, not on busy.
  logic [NN-1:0] freed = '0;
  logic started = 1'b0;
  always @(posedge clk) if (started) freed <= freed | ~node_busy;

  // ---------------- helpers ----------------
  function automatic data_t w(real v); return data_t'(longint'(v * (2.0 ** 40))) <<< 12; endfunction
  function automatic real r(data_t v); return $itor(v) / (2.0 ** 52); endfunction

  function automatic logic [63:0] ins(opcode_e op, int dst, int a, int b,
                                      int node = 0, int p = 0, logic bc = 1'b0);
    instr_t i;
    i = '{op: op, dst: ADDR_W'(dst), srca: ADDR_W'(a), srcb: ADDR_W'(b),
          node: NODE_W'(node), pe: 2'(p), bcast: bc, rsvd: '0};
    return i;
  endfunction

  task automatic hw(int n, int p, logic im, int a, logic [63:0] d);
    @(negedge clk);
    host_node = NODE_W'(n); host_pe = 2'(p); host_we = 1'b1; host_imem = im;
    host_addr = ADDR_W'(a); host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic hr(int n, int p, int a, output real v);
    @(negedge clk);
    host_node = NODE_W'(n); host_pe = 2'(p); host_raddr = ADDR_W'(a);
    @(negedge clk);
    v = r(host_rdata);
  endtask

  task automatic check(string what, real got, real expv, real tol);
    checks++;
    if ((got - expv) > tol || (expv - got) > tol) begin
      failures++;
      $display("FAIL %s: exp %f got %f", what, expv, got);
    end
  endtask

  task automatic request(int cnt, output int nodes [6]);
    @(negedge clk);
    req_valid = 1'b1; req_count = 3'(cnt);
    @(negedge clk);
    req_valid = 1'b0;
    while (!grant_valid) @(negedge clk);
    for (int i = 0; i < 6; i++) nodes[i] = int'(grant_nodes[i]);
  endtask

  // Operand vectors: A(n,p)[i] at words 0..3, B(n,p)[i] at words 4..7.
  function automatic real opa(int n, int p, int i); return 0.25 * ((n + 2 * p + i) % 7) - 0.5; endfunction
  function automatic real opb(int n, int p, int i); return 0.125 * ((3 * n + p + 2 * i) % 9) + 0.25; endfunction
  function automatic real ev(int p, int i); return 0.5 * ((p + 3 * i) % 5) - 1.0; endfunction

  function automatic real sop_ab(int n, int p);
    real s = 0.0;
    for (int i = 0; i < 4; i++) s += opa(n, p, i) * opb(n, p, i);
    return s;
  endfunction

  task automatic load_operands(int n);
    for (int p = 0; p < 4; p++) begin
      for (int i = 0; i < 4; i++) begin
        hw(n, p, 1'b0, i, w(opa(n, p, i)));
        hw(n, p, 1'b0, 4 + i, w(opb(n, p, i)));
        hw(n, p, 1'b0, 8 + i, w(ev(p, i)));
        hw(n, p, 1'b0, 12 + i, w(i == 0 ? 1.0 : 0.0));
      end
      for (int i = 17; i < 24; i++) if (i != 20) hw(n, p, 1'b0, i, '0);
      for (int i = 603; i < 614; i++) hw(n, p, 1'b0, i, '0);
    end
  endtask

  int P2 [6], P3 [6], P6 [6], PX [6];

  initial begin
    real v, s, t;
    host_node = '0; host_pe = '0; host_we = 1'b0; host_imem = 1'b0; host_addr = '0;
    host_wdata = '0; host_raddr = '0; start_mask = '0; req_valid = 1'b0; req_count = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // ---------------- allocation ----------------
    request(2, P2);
    request(3, P3);
    request(6, P6);
    begin
      logic [NN-1:0] used = '0;
      checks++;
      $display("partitions: f2 %p  f3 %p  f6 %p", P2, P3, P6);
      for (int i = 0; i < 2; i++) begin if (used[P2[i]]) failures++; used[P2[i]] = 1'b1; end
      for (int i = 0; i < 3; i++) begin if (used[P3[i]]) failures++; used[P3[i]] = 1'b1; end
      for (int i = 0; i < 6; i++) begin if (used[P6[i]]) failures++; used[P6[i]] = 1'b1; end
      if ($countones(used) != 11) begin failures++; $display("FAIL partitions overlap"); end
      // The first partition starts at the head of the Hilbert order.
      checks++;
      if (P2[0] != 0) begin failures++; $display("FAIL f2 does not start at node 0"); end
    end

    // ---------------- programs ----------------
    phase = "load";
    for (int k = 0; k < 2; k++) load_operands(P2[k]);
    for (int k = 0; k < 3; k++) load_operands(P3[k]);
    for (int k = 0; k < 6; k++) load_operands(P6[k]);
    for (int p = 0; p < 4; p++) begin
      // f2, node A
      hw(P2[0], p, 1'b1, 0, ins(OP_SOP, 16, 0, 4));
      hw(P2[0], p, 1'b1, 1, ins(OP_SEND, 20, 16, 0, P2[1], p));
      hw(P2[0], p, 1'b1, 2, ins(OP_WAIT, 0, 4, 0));
      hw(P2[0], p, 1'b1, 3, ins(OP_SOP, 40, 500, 8));
      hw(P2[0], p, 1'b1, 4, ins(OP_HALT, 0, 0, 0));
      // f2, node B
      hw(P2[1], p, 1'b1, 0, ins(OP_SOP, 16, 0, 4));
      hw(P2[1], p, 1'b1, 1, ins(OP_WAIT, 0, 1, 0));
      hw(P2[1], p, 1'b1, 2, ins(OP_SOP, 24, 16, 20));
      hw(P2[1], p, 1'b1, 3, ins(OP_SEND, 500 + p, 24, 0, P2[0], 0, 1'b1));
      hw(P2[1], p, 1'b1, 4, ins(OP_HALT, 0, 0, 0));
      // f3, first two nodes
      for (int k = 0; k < 2; k++) begin
        hw(P3[k], p, 1'b1, 0, ins(OP_SOP, 16, 0, 4));
        hw(P3[k], p, 1'b1, 1, ins(OP_SEND, 600 + k, 16, 0, P3[2], p));
        hw(P3[k], p, 1'b1, 2, ins(OP_HALT, 0, 0, 0));
      end
      // f3, collecting node
      hw(P3[2], p, 1'b1, 0, ins(OP_SOP, 16, 0, 4));
      hw(P3[2], p, 1'b1, 1, ins(OP_SEND, 602, 16, 0, P3[2], p));
      if (p == 0) begin
        hw(P3[2], p, 1'b1, 2, ins(OP_WAIT, 0, 3, 0));
        hw(P3[2], p, 1'b1, 3, ins(OP_SOP, 40, 600, 12));   // placeholder, replaced below
      end else begin
        hw(P3[2], p, 1'b1, 2, ins(OP_WAIT, 0, 4, 0));
        hw(P3[2], p, 1'b1, 3, ins(OP_NOP, 0, 0, 0));
      end
      // f6: node k sends to node k+3
      for (int k = 0; k < 6; k++) begin
        hw(P6[k], p, 1'b1, 0, ins(OP_SOP, 16, 0, 4));
        hw(P6[k], p, 1'b1, 1, ins(OP_SEND, 610, 16, 0, P6[(k + 3) % 6], p));
        hw(P6[k], p, 1'b1, 2, ins(OP_WAIT, 0, 1, 0));
        hw(P6[k], p, 1'b1, 3, ins(OP_SOP, 40, 610, 12));
        hw(P6[k], p, 1'b1, 4, ins(OP_HALT, 0, 0, 0));
      end
    end
    // f3 collecting node: sum of the three words = SOP of [600..603] with all-ones.
    for (int p = 0; p < 4; p++) for (int i = 0; i < 4; i++) hw(P3[2], p, 1'b0, 700 + i, w(1.0));
    hw(P3[2], 0, 1'b1, 3, ins(OP_SOP, 40, 600, 700));
    hw(P3[2], 0, 1'b1, 4, ins(OP_SEND, 800, 40, 0, P3[2], 0, 1'b1));
    hw(P3[2], 0, 1'b1, 5, ins(OP_NOP, 0, 0, 0));
    hw(P3[2], 0, 1'b1, 6, ins(OP_NOP, 0, 0, 0));
    hw(P3[2], 0, 1'b1, 7, ins(OP_LOG, 900, 0, 4));
    hw(P3[2], 0, 1'b1, 8, ins(OP_SOP, 48, 0, 4));
    hw(P3[2], 0, 1'b1, 9, ins(OP_NOP, 0, 0, 0));
    hw(P3[2], 0, 1'b1, 10, ins(OP_NOP, 0, 0, 0));
    hw(P3[2], 0, 1'b1, 11, ins(OP_ALOG, 920, 8, 0));
    hw(P3[2], 0, 1'b1, 12, ins(OP_HALT, 0, 0, 0));
    for (int p = 1; p < 4; p++) begin
      hw(P3[2], p, 1'b1, 4, ins(OP_HALT, 0, 0, 0));
    end

    // ---------------- run ----------------
    phase = "run";
    @(negedge clk);
    for (int k = 0; k < 2; k++) start_mask[P2[k]] = 1'b1;
    for (int k = 0; k < 3; k++) start_mask[P3[k]] = 1'b1;
    for (int k = 0; k < 6; k++) start_mask[P6[k]] = 1'b1;
    @(negedge clk);
    start_mask = '0;
    started = 1'b1;

    // Fill the machine until a request has to wait.
    for (int j = 0; j < (NN - 11) / 6 + 1; j++) request(6, PX);
    checks++;
    if (n_wait == 0) begin failures++; $display("FAIL last request did not wait"); end

    phase = "drain";
    for (int k = 0; k < 2; k++) wait (freed[P2[k]]);
    for (int k = 0; k < 3; k++) wait (freed[P3[k]]);
    for (int k = 0; k < 6; k++) wait (freed[P6[k]]);
    repeat (5) @(negedge clk);

    // ---------------- results ----------------
    phase = "results";
    for (int p = 0; p < 4; p++) begin
      s = 0.0;
      for (int q = 0; q < 4; q++) s += sop_ab(P2[0], q) * sop_ab(P2[1], q) * ev(p, q);
      hr(P2[0], p, 40, v); check($sformatf("f2 output %0d", p), v, s, 1e-2);
    end
    t = 0.0;
    for (int k = 0; k < 3; k++) t += sop_ab(P3[k], 0);
    hr(P3[2], 0, 40, v); check("f3 total", v, t, 5e-3);
    for (int p = 1; p < 4; p++) begin
      hr(P3[2], p, 800, v); check($sformatf("f3 broadcast to PE%0d", p), v, t, 5e-3);
      for (int k = 0; k < 3; k++) begin
        hr(P3[2], p, 600 + k, v); check("f3 gathered word", v, sop_ab(P3[k], p), 2e-3);
      end
    end
    for (int i = 0; i < 4; i++) begin
      automatic real a = opa(P3[2], 0, i);
      if (a != 0.0) begin
        hr(P3[2], 0, 900 + i, v); check("f3 log", v, $ln(a < 0 ? -a : a) / $ln(2.0), 1e-3);
      end
      hr(P3[2], 0, 920 + i, v); check("f3 alog", v, $pow(2.0, ev(0, i)), 2e-3);
    end
    for (int k = 0; k < 6; k++) for (int p = 0; p < 4; p++) begin
      hr(P6[k], p, 40, v); check("f6 exchange", v, sop_ab(P6[(k + 3) % 6], p), 2e-3);
    end

    $display("allocation waits=%0d column moves=%0d broadcasts=%0d hazard stalls=%0d alog stalls=%0d",
             n_wait, n_colmove, n_bcast, n_hazard, n_alog_stall);
    $display("link back-pressure=%0d wrap-round hops=%0d packets=%0d", n_backpressure, n_wrap, n_packets);
    checks++;
    if (n_wait == 0 || n_colmove == 0 || n_bcast == 0 || n_hazard == 0 || n_alog_stall == 0 ||
        n_backpressure == 0 || n_wrap == 0 || n_packets == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
