// noc_node: one node of the network - a network switch above a subnet of four
// PEs joined by a crossbar (the two-level node of the document).
//
// The network interface turns crossbar messages into three-flit packets for the
// switch's local port and back. The node reports busy to the MasterController
// from the clock after it is allocated until all four PEs have run their
// programs to HALT after a start; otherwise it is available. The
// allocated/running/idle bookkeeping is this design's own reading of "a node is
// busy when the PEs within its subnet are collectively executing a function".
//
// Interface: the six network directions (index 0 = X+, 1 = X-, 2 = Y+, 3 = Y-,
// 4 = Z+, 5 = Z-) are flit valid/ready links. The host port writes and reads the
// memories of the PE selected by host_pe when host_sel is high (read data one
// clock after host_raddr). alloc marks the node allocated; start runs all four
// PE programs from address 0.
module noc_node
  import phylo_pkg::*;
#(
  parameter int unsigned NX = 4,
  parameter int unsigned NY = 4,
  parameter int unsigned NZ = 4,
  parameter int unsigned MEM_WORDS  = 65536,
  parameter int unsigned IMEM_DEPTH = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] my_node,     // node number z*NX*NY + y*NX + x, strapped

  input  logic              nin_valid  [6],
  input  flit_t             nin_flit   [6],
  output logic              nin_ready  [6],
  output logic              nout_valid [6],
  output flit_t             nout_flit  [6],
  input  logic              nout_ready [6],

  input  logic              host_sel,
  input  logic [1:0]        host_pe,
  input  logic              host_we,
  input  logic              host_imem,
  input  logic [ADDR_W-1:0] host_addr,
  input  data_t             host_wdata,
  input  logic [ADDR_W-1:0] host_raddr,
  output data_t             host_rdata,

  input  logic              alloc,
  input  logic              start,
  output logic              busy
);

  // ---------------- network switch ----------------
  logic  r_in_valid  [N_PORTS];
  flit_t r_in_flit   [N_PORTS];
  logic  r_in_ready  [N_PORTS];
  logic  r_out_valid [N_PORTS];
  flit_t r_out_flit  [N_PORTS];
  logic  r_out_ready [N_PORTS];

  for (genvar d = 0; d < 6; d++) begin : g_dir
    assign r_in_valid[d+1]  = nin_valid[d];
    assign r_in_flit[d+1]   = nin_flit[d];
    assign nin_ready[d]     = r_in_ready[d+1];
    assign nout_valid[d]    = r_out_valid[d+1];
    assign nout_flit[d]     = r_out_flit[d+1];
    assign r_out_ready[d+1] = nout_ready[d];
  end

  noc_router #(.NX(NX), .NY(NY), .NZ(NZ)) u_router (
    .clk, .rst_n, .my_node,
    .in_valid(r_in_valid), .in_flit(r_in_flit), .in_ready(r_in_ready),
    .out_valid(r_out_valid), .out_flit(r_out_flit), .out_ready(r_out_ready)
  );

  // ---------------- network interface ----------------
  logic xb_in_valid [5];
  msg_t xb_in_msg   [5];
  logic xb_in_ready [5];
  logic xb_net_valid, xb_net_ready;
  msg_t xb_net_msg;

  net_interface u_ni (
    .clk, .rst_n,
    .msg_in_valid(xb_net_valid), .msg_in_ready(xb_net_ready), .msg_in(xb_net_msg),
    .flit_out_valid(r_in_valid[P_LOCAL]), .flit_out_ready(r_in_ready[P_LOCAL]),
    .flit_out(r_in_flit[P_LOCAL]),
    .flit_in_valid(r_out_valid[P_LOCAL]), .flit_in_ready(r_out_ready[P_LOCAL]),
    .flit_in(r_out_flit[P_LOCAL]),
    .msg_out_valid(xb_in_valid[4]), .msg_out_ready(xb_in_ready[4]), .msg_out(xb_in_msg[4])
  );

  // ---------------- crossbar and PEs ----------------
  logic              pe_rx_valid [4];
  logic [ADDR_W-1:0] pe_rx_addr  [4];
  data_t             pe_rx_data  [4];
  logic              pe_running  [4];
  logic              pe_stall    [4];
  data_t             pe_rdata    [4];

  subnet_crossbar u_xbar (
    .clk, .rst_n, .my_node(my_node),
    .in_valid(xb_in_valid), .in_msg(xb_in_msg), .in_ready(xb_in_ready),
    .pe_valid(pe_rx_valid), .pe_addr(pe_rx_addr), .pe_data(pe_rx_data),
    .net_valid(xb_net_valid), .net_msg(xb_net_msg), .net_ready(xb_net_ready)
  );

  for (genvar p = 0; p < 4; p++) begin : g_pe
    pe #(.MEM_WORDS(MEM_WORDS), .IMEM_DEPTH(IMEM_DEPTH)) u_pe (
      .clk, .rst_n,
      .start(start), .running(pe_running[p]), .hazard_stall(pe_stall[p]),
      .host_we(host_we && host_sel && host_pe == 2'(p)), .host_imem(host_imem),
      .host_addr(host_addr), .host_wdata(host_wdata),
      .host_raddr(host_raddr), .host_rdata(pe_rdata[p]),
      .rx_valid(pe_rx_valid[p]), .rx_addr(pe_rx_addr[p]), .rx_data(pe_rx_data[p]),
      .tx_valid(xb_in_valid[p]), .tx_ready(xb_in_ready[p]), .tx_msg(xb_in_msg[p])
    );
  end

  logic [1:0] rpe_q;
  always_ff @(posedge clk) rpe_q <= host_pe;
  assign host_rdata = pe_rdata[rpe_q];

  // ---------------- busy / available ----------------
  typedef enum logic [1:0] {N_IDLE, N_ALLOCATED, N_RUNNING} nstate_e;
  nstate_e st;
  logic    any_running;

  always_comb begin
    any_running = 1'b0;
    for (int p = 0; p < 4; p++) any_running |= pe_running[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st <= N_IDLE;
    else if (start)                        st <= N_RUNNING;
    else if (alloc && st == N_IDLE)        st <= N_ALLOCATED;
    else if (st == N_RUNNING && !any_running) st <= N_IDLE;
  end

  assign busy = st != N_IDLE;

endmodule
