// tb_noc_router: one switch at (1,2,3) of the 4x4x4 torus. All seven inputs send
// three-flit packets to random nodes while the outputs are randomly
// back-pressured. The bench models each input buffer itself and checks that every
// flit leaves on the dimension-order output (X, then Y, then Z, short way round,
// + on a tie), that packets are not interleaved on an output, that flits keep
// their order, that a free output goes to the competing head with the most
// remaining hops (lower input on a tie), and that every packet comes out.
module tb_noc_router;
  import phylo_pkg::*;

  localparam int X = 1, Y = 2, Z = 3, NPK = 150;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid [N_PORTS], in_ready [N_PORTS], out_valid [N_PORTS], out_ready [N_PORTS];
  flit_t in_flit [N_PORTS], out_flit [N_PORTS];

  int checks = 0, failures = 0, contended = 0, received = 0;

  always #5 clk = ~clk;

  logic [NODE_W-1:0] my_node = NODE_W'(Z * 16 + Y * 4 + X);

  noc_router dut (.*);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_port(int id);
    int dx = id % 4, dy = (id / 4) % 4, dz = id / 16;
    if (dx != X) return ((dx - X + 4) % 4 <= 2) ? 1 : 2;
    if (dy != Y) return ((dy - Y + 4) % 4 <= 2) ? 3 : 4;
    if (dz != Z) return ((dz - Z + 4) % 4 <= 2) ? 5 : 6;
    return 0;
  endfunction

  function automatic int rdist(int a, int b);
    int d = (b - a + 4) % 4;
    return d <= 2 ? d : 4 - d;
  endfunction

  function automatic int hopcount(int id);
    return rdist(X, id % 4) + rdist(Y, (id / 4) % 4) + rdist(Z, id / 16);
  endfunction

  flit_t q [N_PORTS][$];         // model of each input buffer
  int    owner [N_PORTS];        // input whose packet holds each output, -1 if none

  // Stimulus: per input, NPK packets of head/body/tail.
  for (genvar i = 0; i < N_PORTS; i++) begin : g_src
    initial begin
      in_valid[i] = 1'b0; in_flit[i] = '0;
      wait (rst_n);
      for (int k = 0; k < NPK; k++) begin
        automatic int dst = $urandom_range(0, 63);
        automatic head_t h = '{dst_node: 6'(dst), dst_pe: 2'(i % 4), bcast: 1'b0,
                               addr: 16'(i * 4096 + k), rsvd: '0};
        for (int f = 0; f < 3; f++) begin
          @(negedge clk);
          while ($urandom_range(0, 2) == 0) @(negedge clk);
          in_valid[i] = 1'b1;
          in_flit[i]  = (f == 0) ? '{ftype: FLIT_HEAD, payload: h} :
                        (f == 1) ? '{ftype: FLIT_BODY, payload: 64'(i * 4096 + k)} :
                                   '{ftype: FLIT_TAIL, payload: '0};
          @(posedge clk);
          while (!acc[i]) @(posedge clk);
          #1 in_valid[i] = 1'b0;
        end
      end
    end
  end

  logic acc [N_PORTS], fv [N_PORTS], busy0 [N_PORTS];
  flit_t fr [N_PORTS];

  initial begin
    for (int o = 0; o < N_PORTS; o++) begin owner[o] = -1; out_ready[o] = 1'b0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (received < N_PORTS * NPK) begin
      @(negedge clk);
      for (int o = 0; o < N_PORTS; o++) out_ready[o] = $urandom_range(0, 3) != 0;
      #3;
      for (int i = 0; i < N_PORTS; i++) begin
        acc[i]   = in_valid[i] && in_ready[i];
        fv[i]    = q[i].size() > 0;
        if (fv[i]) fr[i] = q[i][0];
        busy0[i] = holds(i);
      end
      for (int o = 0; o < N_PORTS; o++) if (out_valid[o] && out_ready[o]) begin
        automatic int src = -1;
        checks++;
        if (owner[o] >= 0) src = owner[o];
        else begin
          // New packet: find the input it came from by its tag.
          for (int i = 0; i < N_PORTS; i++)
            if (q[i].size() > 0 && q[i][0] == out_flit[o]) src = i;
        end
        if (src < 0 || q[src].size() == 0 || q[src][0] != out_flit[o]) begin
          failures++; $display("FAIL output %0d flit not the front of any input", o);
        end else begin
          if (out_flit[o].ftype == FLIT_HEAD) begin
            automatic head_t h = head_t'(out_flit[o].payload);
            automatic int hc = hopcount(int'(h.dst_node));
            automatic int rivals = 0;
            if (exp_port(int'(h.dst_node)) != o) begin
              failures++; $display("FAIL dst %0d left on port %0d", h.dst_node, o);
            end
            for (int j = 0; j < N_PORTS; j++) if (j != src && fv[j] &&
                fr[j].ftype == FLIT_HEAD && !busy0[j] &&
                exp_port(fdst(fr[j])) == o) begin
              automatic int hj = hopcount(fdst(fr[j]));
              rivals++;
              if (hj > hc || (hj == hc && j < src)) begin
                failures++; $display("FAIL arbitration on port %0d: input %0d (%0d hops) beat %0d (%0d hops)", o, src, hc, j, hj);
              end
            end
            if (rivals > 0) contended++;
            owner[o] = src;
          end
          if (out_flit[o].ftype == FLIT_TAIL) begin
            owner[o] = -1;
            received++;
          end
          void'(q[src].pop_front());
        end
      end
      @(posedge clk);
      for (int i = 0; i < N_PORTS; i++) if (acc[i]) q[i].push_back(in_flit[i]);
    end
    checks++;
    if (contended == 0) begin failures++; $display("FAIL no contention seen"); end
    $display("packets=%0d contended arbitrations=%0d", received, contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fdst(flit_t f);
    head_t h = head_t'(f.payload);
    return int'(h.dst_node);
  endfunction

  function automatic logic holds(int i);
    for (int o = 0; o < N_PORTS; o++) if (owner[o] == i) return 1'b1;
    return 1'b0;
  endfunction
endmodule
