// noc3d_top: the accelerator - 64 nodes in a 4x4x4 3-D folded torus, each node a
// network switch over a crossbar-connected subnet of four PEs (256 PEs), plus
// the MasterController that allocates partitions of nodes to kernel invocations.
//
// Node id = z*16 + y*4 + x; layer z is one 4x4 folded torus, and the Z links
// close each column into a ring of four layers (the layer 0 - layer 3 loopback).
// Folding only changes the layout, so logically every ring wraps from the last
// node to the first.
//
// The host link of the document is a PCI Express 2.0 core that is not part of
// this RTL; in its place the top has a plain host port: write a word into the
// instruction or data memory of one PE, read a data word back one clock later
// (host_rdata), start the PEs of the nodes in start_mask, and hand allocation
// requests to the MasterController. A typical kernel invocation: request a
// partition (2, 3 or 6 nodes), load programs and operands into the granted
// nodes, start them, wait for their busy flags to drop, read the results.
module noc3d_top
  import phylo_pkg::*;
#(
  parameter int unsigned NZ         = 4,
  parameter int unsigned MEM_WORDS  = 65536,
  parameter int unsigned IMEM_DEPTH = 1024
) (
  input  logic              clk,
  input  logic              rst_n,

  input  logic [NODE_W-1:0] host_node,
  input  logic [1:0]        host_pe,
  input  logic              host_we,
  input  logic              host_imem,
  input  logic [ADDR_W-1:0] host_addr,
  input  data_t             host_wdata,
  input  logic [ADDR_W-1:0] host_raddr,
  output data_t             host_rdata,

  input  logic [16*NZ-1:0]  start_mask,

  input  logic              req_valid,
  output logic              req_ready,
  input  logic [2:0]        req_count,
  output logic              grant_valid,
  output logic [NODE_W-1:0] grant_nodes [6],
  output logic [2:0]        grant_count,
  output logic              alloc_waiting,
  output logic [16*NZ-1:0]  node_busy
);
  localparam int unsigned NX = 4, NY = 4, N = NX * NY * NZ;

  logic  nin_valid  [N][6];
  flit_t nin_flit   [N][6];
  logic  nin_ready  [N][6];
  logic  nout_valid [N][6];
  flit_t nout_flit  [N][6];
  logic  nout_ready [N][6];
  data_t node_rdata [N];
  logic [N-1:0] alloc_mask;

  function automatic int unsigned neighbour(int unsigned n, int unsigned d);
    int unsigned x, y, z;
    x = n % NX; y = (n / NX) % NY; z = n / (NX * NY);
    unique case (d)
      0: x = (x + 1) % NX;
      1: x = (x + NX - 1) % NX;
      2: y = (y + 1) % NY;
      3: y = (y + NY - 1) % NY;
      4: z = (z + 1) % NZ;
      default: z = (z + NZ - 1) % NZ;
    endcase
    return z * NX * NY + y * NX + x;
  endfunction

  for (genvar n = 0; n < N; n++) begin : g_node
    for (genvar d = 0; d < 6; d++) begin : g_link
      localparam int unsigned NB = neighbour(n, d);
      assign nin_valid[n][d]  = nout_valid[NB][d ^ 1];
      assign nin_flit[n][d]   = nout_flit[NB][d ^ 1];
      assign nout_ready[n][d] = nin_ready[NB][d ^ 1];
    end

    noc_node #(
      .NX(NX), .NY(NY), .NZ(NZ),
      .MEM_WORDS(MEM_WORDS), .IMEM_DEPTH(IMEM_DEPTH)
    ) u_node (
      .clk, .rst_n, .my_node(NODE_W'(n)),
      .nin_valid(nin_valid[n]), .nin_flit(nin_flit[n]), .nin_ready(nin_ready[n]),
      .nout_valid(nout_valid[n]), .nout_flit(nout_flit[n]), .nout_ready(nout_ready[n]),
      .host_sel(host_node == NODE_W'(n)), .host_pe(host_pe), .host_we(host_we),
      .host_imem(host_imem), .host_addr(host_addr), .host_wdata(host_wdata),
      .host_raddr(host_raddr), .host_rdata(node_rdata[n]),
      .alloc(alloc_mask[n]), .start(start_mask[n]), .busy(node_busy[n])
    );
  end

  logic [NODE_W-1:0] rnode_q;
  always_ff @(posedge clk) rnode_q <= host_node;
  assign host_rdata = node_rdata[rnode_q];

  master_controller #(.NZ(NZ), .MAX_REQ(6)) u_mc (
    .clk, .rst_n, .node_busy(node_busy),
    .req_valid, .req_ready, .req_count,
    .grant_valid, .grant_nodes, .grant_count,
    .alloc_mask, .waiting(alloc_waiting)
  );

endmodule
