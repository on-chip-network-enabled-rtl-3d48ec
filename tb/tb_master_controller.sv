// tb_master_controller: issues a long random sequence of partition requests (2, 3
// and 6 nodes) to the MasterController while the bench plays the 64 nodes: a node
// turns busy the clock after it is allocated and is released at random later.
// An independent model of the 3D_torus policy (16-point Hilbert head over the
// 4x4 layer, one column per clock, vertical direction flipping from column to
// column, head kept on a column that still has free nodes) predicts every grant:
// node list, count and latency (grant_valid 1 + columns-scanned clocks after the
// request clock). Requests that find too few
// free nodes must raise waiting and complete after nodes are released.
module tb_master_controller;
  import phylo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [63:0] node_busy, alloc_mask;
  logic req_valid, req_ready, grant_valid, waiting;
  logic [2:0] req_count, grant_count;
  logic [NODE_W-1:0] grant_nodes [6];

  int checks = 0, failures = 0, n_wait = 0, n_flip = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  master_controller dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Nodes: busy from the clock after allocation.
  logic [63:0] busy_q;
  assign node_busy = busy_q;
  logic [63:0] release_now;
  always @(posedge clk) busy_q <= rst_n ? ((busy_q | alloc_mask) & ~release_now) : '0;

  int hil [16] = '{0, 4, 5, 1, 2, 3, 7, 6, 10, 11, 15, 14, 13, 9, 8, 12};
  int m_head = 0;
  bit m_up = 0;

  // Model: returns node list and number of columns scanned.
  task automatic model(logic [63:0] busy, int need, output int nodes [6], output int cols);
    int got = 0;
    cols = 0;
    while (got < need) begin
      bit left = 0;
      cols++;
      for (int k = 0; k < 4; k++) begin
        automatic int l  = m_up ? 3 - k : k;
        automatic int id = l * 16 + hil[m_head];
        if (!busy[id]) begin
          if (got < need) begin nodes[got] = id; got++; busy[id] = 1'b1; end
          else left = 1;
        end
      end
      if (!left) begin m_head = (m_head + 1) % 16; m_up = !m_up; n_flip++; end
    end
  endtask

  initial begin
    int exp_nodes [6];
    int cols, need, t0, free;
    bit waited;
    req_valid = 1'b0; req_count = '0; release_now = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int r = 0; r < 400; r++) begin
      case ($urandom_range(0, 2)) 0: need = 2; 1: need = 3; default: need = 6; endcase
      free = 64 - $countones(busy_q);
      waited = 0;
      req_valid = 1'b1; req_count = 3'(need);
      t0 = cyc;
      if (free >= need) model(busy_q, need, exp_nodes, cols);
      @(negedge clk);
      req_valid = 1'b0;
      if (free < need) begin
        // Must wait; then release every busy node of two random columns.
        repeat (4) @(negedge clk);
        checks++;
        if (!waiting) begin failures++; $display("FAIL waiting not raised"); end
        n_wait++;
        waited = 1;
        for (int c = 0; c < 4; c++) for (int l = 0; l < 4; l++)
          release_now[l * 16 + ((r + c * 5) % 16)] = 1'b1;
        @(negedge clk);
        release_now = '0;
        model(busy_q, need, exp_nodes, cols);
      end
      while (!grant_valid) @(negedge clk);
      checks++;
      if (grant_count != 3'(need)) begin failures++; $display("FAIL count %0d", grant_count); end
      for (int i = 0; i < need; i++) if (int'(grant_nodes[i]) != exp_nodes[i]) begin
        failures++; $display("FAIL req %0d node %0d: exp %0d got %0d", r, i, exp_nodes[i], grant_nodes[i]);
      end
      if (!waited && cyc - t0 != 1 + cols) begin
        failures++; $display("FAIL latency %0d for %0d columns", cyc - t0, cols);
      end
      if ($countones(alloc_mask) != need) begin failures++; $display("FAIL alloc_mask"); end
      @(negedge clk);
      // Random releases while idle.
      for (int i = 0; i < 64; i++) if (busy_q[i] && $urandom_range(0, 14) == 0) release_now[i] = 1'b1;
      @(negedge clk);
      release_now = '0;
      @(negedge clk);
    end
    checks++;
    if (n_wait == 0 || n_flip == 0) begin failures++; $display("FAIL coverage"); end
    $display("waits=%0d column moves=%0d", n_wait, n_flip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
