// master_controller: dynamic node allocation for the 3-D folded torus (3D_torus
// policy).
//
// Nodes report busy/available continuously. A request asks for a partition of
// COUNT nodes (2, 3 or 6 for the three kernels). A fixed 16-point Hilbert curve is
// laid over the 4x4 layer; its position is the scan head. Each clock the
// controller takes the column (one node per layer) under the head and allocates
// its available nodes, walking the layers downwards or upwards, until the
// request is satisfied. When a column is used up the head moves to the next
// Hilbert position and the vertical direction flips, so the walk snakes down one
// column and up the next; a column that still has free nodes keeps the head for
// the next request. If fewer nodes are available than requested the request
// waits. The Hilbert order is the one printed for the 16-node torus.
//
// Interface: req_valid/req_ready hand over a request; grant_valid pulses one
// clock after the last column was scanned, with the node ids in grant_nodes (in
// allocation order), their number and a one-hot mask alloc_mask for the nodes.
// Allocated nodes stay claimed until they report busy.
// Timing: the request is taken in its clock, each following clock scans one
// column, and grant_valid is high in the clock after the last column scanned.
module master_controller
  import phylo_pkg::*;
#(
  parameter int unsigned NZ        = 4,      // layers; each layer is 4x4
  parameter int unsigned MAX_REQ   = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [16*NZ-1:0]    node_busy,

  input  logic                req_valid,
  output logic                req_ready,
  input  logic [2:0]          req_count,

  output logic                grant_valid,
  output logic [NODE_W-1:0]   grant_nodes [MAX_REQ],
  output logic [2:0]          grant_count,
  output logic [16*NZ-1:0]    alloc_mask,
  output logic                waiting       // request held: too few nodes free
);
  localparam int unsigned N = 16 * NZ;

  // Hilbert curve position -> torus column (node id within a layer).
  function automatic logic [3:0] hilbert_col(logic [3:0] h);
    unique case (h)
      4'd0:  return 4'd0;   4'd1:  return 4'd4;   4'd2:  return 4'd5;   4'd3:  return 4'd1;
      4'd4:  return 4'd2;   4'd5:  return 4'd3;   4'd6:  return 4'd7;   4'd7:  return 4'd6;
      4'd8:  return 4'd10;  4'd9:  return 4'd11;  4'd10: return 4'd15;  4'd11: return 4'd14;
      4'd12: return 4'd13;  4'd13: return 4'd9;   4'd14: return 4'd8;   default: return 4'd12;
    endcase
  endfunction

  typedef enum logic {S_IDLE, S_SCAN} state_e;
  state_e st;

  logic [3:0]          head;
  logic                dir_up;       // 0: layer 0 -> NZ-1, 1: NZ-1 -> 0
  logic [2:0]          need, got;
  logic [N-1:0]        mask, claimed;
  logic [NODE_W-1:0]   list [MAX_REQ];

  logic [N-1:0]        avail;
  int unsigned         n_avail;
  logic [2:0]          got_n;
  logic [N-1:0]        mask_n;
  logic [NODE_W-1:0]   list_n [MAX_REQ];
  logic                col_left;

  always_comb begin
    avail   = ~node_busy & ~claimed & ~mask;
    n_avail = 0;
    for (int i = 0; i < N; i++) n_avail += 32'(avail[i]);

    got_n    = got;
    mask_n   = mask;
    list_n   = list;
    col_left = 1'b0;
    for (int k = 0; k < NZ; k++) begin
      automatic int unsigned l  = dir_up ? NZ - 1 - k : k;
      automatic int unsigned id = l * 16 + int'(hilbert_col(head));
      if (avail[id]) begin
        if (got_n < need) begin
          list_n[got_n] = NODE_W'(id);
          mask_n[id]    = 1'b1;
          got_n         = got_n + 3'd1;
        end else begin
          col_left = 1'b1;
        end
      end
    end
  end

  assign req_ready = st == S_IDLE;
  assign waiting   = st == S_SCAN && n_avail < 32'(need - got);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      head        <= '0;
      dir_up      <= 1'b0;
      need        <= '0;
      got         <= '0;
      mask        <= '0;
      claimed     <= '0;
      grant_valid <= 1'b0;
      grant_count <= '0;
      alloc_mask  <= '0;
      for (int i = 0; i < MAX_REQ; i++) begin
        list[i]        <= '0;
        grant_nodes[i] <= '0;
      end
    end else begin
      grant_valid <= 1'b0;
      alloc_mask  <= '0;
      claimed     <= (claimed & ~node_busy) | alloc_mask;
      unique case (st)
        S_IDLE: if (req_valid) begin
          need <= (req_count > 3'(MAX_REQ)) ? 3'(MAX_REQ) : req_count;
          got  <= '0;
          mask <= '0;
          st   <= S_SCAN;
        end
        S_SCAN: if (!waiting) begin
          got  <= got_n;
          mask <= mask_n;
          list <= list_n;
          if (!col_left) begin
            head   <= head + 4'd1;
            dir_up <= !dir_up;
          end
          if (got_n == need) begin
            grant_valid <= 1'b1;
            grant_nodes <= list_n;
            grant_count <= got_n;
            alloc_mask  <= mask_n;
            st          <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
