// subnet_crossbar: crossbar joining the four PEs of a node and the network switch.
//
// It carries the three kinds of traffic of a subnet: a word from PEx back to PEx,
// a word from one PE to all three other PEs (bcast), and words to and from other
// nodes through the network interface. Inputs 0-3 are the PEs' message outputs,
// input 4 is the message reassembled from the network. Outputs are the four PE
// write ports (always accepted) and the message towards the network.
//
// Every clock the inputs are served in round-robin order; an input is granted
// when all outputs it needs are still free (a broadcast needs three PE ports at
// once), so several transfers proceed in the same clock when they do not collide.
// Transfers are combinational: a granted message is written into the target PE
// memory at the next clock edge. The round-robin policy and the single-clock
// transfer are this design's own; the document gives only the traffic kinds.
module subnet_crossbar
  import phylo_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] my_node,

  input  logic              in_valid [5],
  input  msg_t              in_msg   [5],
  output logic              in_ready [5],

  output logic              pe_valid [4],
  output logic [ADDR_W-1:0] pe_addr  [4],
  output data_t             pe_data  [4],

  output logic              net_valid,
  output msg_t              net_msg,
  input  logic              net_ready
);

  logic [2:0] rr;

  // Outputs needed by each input: bits 0-3 PE ports, bit 4 network.
  function automatic logic [4:0] needs(int unsigned src, msg_t m, logic [NODE_W-1:0] here);
    logic [4:0] n;
    n = '0;
    if (src < 4 && m.dst_node != here) n[4] = 1'b1;
    else if (m.bcast) begin
      n[3:0] = 4'hf;
      if (src < 4) n[src] = 1'b0;
    end else n[m.dst_pe] = 1'b1;
    return n;
  endfunction

  logic [4:0] grant;
  logic [2:0] owner [5];     // input that drives each output
  logic [4:0] taken;
  logic [2:0] first;
  logic       any;

  always_comb begin
    taken = '0;
    grant = '0;
    first = '0;
    any   = 1'b0;
    for (int o = 0; o < 5; o++) owner[o] = '0;
    for (int k = 0; k < 5; k++) begin
      automatic int unsigned i = (int'(rr) + k) % 5;
      automatic logic [4:0]  n = needs(i, in_msg[i], my_node);
      if (in_valid[i] && (n & taken) == '0 && (!n[4] || net_ready)) begin
        grant[i] = 1'b1;
        taken    = taken | n;
        for (int o = 0; o < 5; o++) if (n[o]) owner[o] = 3'(i);
        if (!any) first = 3'(i);
        any = 1'b1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 5; i++) in_ready[i] = grant[i];
    for (int j = 0; j < 4; j++) begin
      pe_valid[j] = taken[j];
      pe_addr[j]  = in_msg[owner[j]].addr;
      pe_data[j]  = in_msg[owner[j]].data;
    end
    net_valid = taken[4];
    net_msg   = in_msg[owner[4]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   rr <= '0;
    else if (any) rr <= (first == 3'd4) ? 3'd0 : first + 3'd1;
  end

endmodule
