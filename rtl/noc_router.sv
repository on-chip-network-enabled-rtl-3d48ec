// noc_router: seven-port wormhole network switch of the 3-D folded torus.
//
// Ports: 0 local (subnet), 1 X+, 2 X-, 3 Y+, 4 Y-, 5 Z+, 6 Z-. Each input has a
// two-flit buffer (the depth the document chose) and signals ready while it has a
// free slot. A head flit is routed in dimension order (X, then Y, then Z) the short
// way round each ring of the torus; on a tie (two hops in a ring of four) it goes
// the + way. An output is held by one packet from its head to its tail flit.
//
// When several head flits compete for a free output, the one with the largest
// remaining hop count to its destination wins, as the document prescribes; equal
// counts go to the lower-numbered input (this design's tie rule; the document's
// A-type/B-type tie rule applies only to its 2-D variants). A head can win and
// move in the same clock; while the output is stalled the choice is made afresh
// each clock, so the output is held only once the head has left. The switch has
// no virtual channels.
//
// The switch's own coordinates come in on my_node (strapped by the top), so all
// switches of the torus are one and the same design.
//
// Timing: a flit can leave the clock after it entered the input buffer, so a
// packet advances one hop per clock when nothing blocks it.
module noc_router
  import phylo_pkg::*;
#(
  parameter int unsigned NX = 4,
  parameter int unsigned NY = 4,
  parameter int unsigned NZ = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic [NODE_W-1:0] my_node,   // this switch's node number z*NX*NY + y*NX + x
  input  logic  in_valid  [N_PORTS],
  input  flit_t in_flit   [N_PORTS],
  output logic  in_ready  [N_PORTS],
  output logic  out_valid [N_PORTS],
  output flit_t out_flit  [N_PORTS],
  input  logic  out_ready [N_PORTS]
);

  // ---------------- input buffers ----------------
  flit_t      buf_q [N_PORTS][2];
  logic [1:0] cnt   [N_PORTS];
  logic       pop   [N_PORTS];
  flit_t      hd    [N_PORTS];

  always_comb begin
    for (int i = 0; i < N_PORTS; i++) begin
      in_ready[i] = cnt[i] != 2'd2;
      hd[i]       = buf_q[i][0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_PORTS; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < N_PORTS; i++)
        cnt[i] <= cnt[i] + 2'(in_valid[i] && in_ready[i]) - 2'(pop[i]);
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N_PORTS; i++) begin
      if (pop[i]) buf_q[i][0] <= buf_q[i][1];
      if (in_valid[i] && in_ready[i]) begin
        if (cnt[i] == 2'd0 || (cnt[i] == 2'd1 && pop[i])) buf_q[i][0] <= in_flit[i];
        else                                               buf_q[i][1] <= in_flit[i];
      end
    end
  end

  // ---------------- route computation ----------------
  int unsigned X, Y, Z;
  assign X = int'(my_node) % NX;
  assign Y = (int'(my_node) / NX) % NY;
  assign Z = int'(my_node) / (NX * NY);

  function automatic int unsigned route(head_t h);
    int unsigned id, dx, dy, dz;
    id = int'(h.dst_node);
    dx = id % NX;
    dy = (id / NX) % NY;
    dz = id / (NX * NY);
    if (dx != X) return ((dx + NX - X) % NX <= NX / 2) ? P_XP : P_XM;
    if (dy != Y) return ((dy + NY - Y) % NY <= NY / 2) ? P_YP : P_YM;
    if (dz != Z) return ((dz + NZ - Z) % NZ <= NZ / 2) ? P_ZP : P_ZM;
    return P_LOCAL;
  endfunction

  function automatic int unsigned hops(head_t h);
    int unsigned id;
    id = int'(h.dst_node);
    return ring_dist(X, id % NX, NX) + ring_dist(Y, (id / NX) % NY, NY) +
           ring_dist(Z, id / (NX * NY), NZ);
  endfunction

  // ---------------- switch allocation ----------------
  logic       locked [N_PORTS];
  logic [2:0] owner  [N_PORTS];      // input holding each output
  logic       in_busy[N_PORTS];      // input currently owns some output
  logic [2:0] cur    [N_PORTS];      // input driving each output this clock
  logic       cur_ok [N_PORTS];
  logic       win    [N_PORTS];      // a new head won this output this clock

  always_comb begin
    for (int i = 0; i < N_PORTS; i++) begin
      in_busy[i] = 1'b0;
      for (int o = 0; o < N_PORTS; o++)
        if (locked[o] && owner[o] == 3'(i)) in_busy[i] = 1'b1;
    end
    for (int o = 0; o < N_PORTS; o++) begin
      automatic int best_h = -1;
      cur[o]    = owner[o];
      cur_ok[o] = locked[o];
      win[o]    = 1'b0;
      if (!locked[o]) begin
        for (int i = 0; i < N_PORTS; i++) begin
          if (cnt[i] != 0 && !in_busy[i] && hd[i].ftype == FLIT_HEAD &&
              route(head_t'(hd[i].payload)) == o &&
              int'(hops(head_t'(hd[i].payload))) > best_h) begin
            best_h    = int'(hops(head_t'(hd[i].payload)));
            cur[o]    = 3'(i);
            cur_ok[o] = 1'b1;
            win[o]    = 1'b1;
          end
        end
      end
    end
    for (int i = 0; i < N_PORTS; i++) pop[i] = 1'b0;
    for (int o = 0; o < N_PORTS; o++) begin
      out_valid[o] = cur_ok[o] && cnt[cur[o]] != 0;
      out_flit[o]  = hd[cur[o]];
      if (out_valid[o] && out_ready[o]) pop[cur[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < N_PORTS; o++) begin
        locked[o] <= 1'b0;
        owner[o]  <= '0;
      end
    end else begin
      for (int o = 0; o < N_PORTS; o++) begin
        if (out_valid[o] && out_ready[o] && out_flit[o].ftype == FLIT_TAIL) begin
          locked[o] <= 1'b0;
        end else if (win[o] && out_ready[o]) begin
          locked[o] <= 1'b1;
          owner[o]  <= cur[o];
        end
      end
    end
  end

endmodule
