// net_interface: packs crossbar messages into flits for the network switch and
// unpacks arriving flits into messages for the crossbar.
//
// A message leaves as three 64-bit flits, as the document describes: a head
// flit (destination node, PE, broadcast flag and word address), a body flit (the
// 64-bit data word) and a tail flit (carrying nothing). The head layout is this
// design's own. On the receive side, head and body are held until the tail
// arrives; the whole message is then offered to the crossbar and no further
// flit is accepted until it is taken. Both directions are valid/ready.
module net_interface
  import phylo_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,

  input  logic  msg_in_valid,     // from the crossbar, to the network
  output logic  msg_in_ready,
  input  msg_t  msg_in,
  output logic  flit_out_valid,
  input  logic  flit_out_ready,
  output flit_t flit_out,

  input  logic  flit_in_valid,    // from the network, to the crossbar
  output logic  flit_in_ready,
  input  flit_t flit_in,
  output logic  msg_out_valid,
  input  logic  msg_out_ready,
  output msg_t  msg_out
);

  // ---------------- transmit ----------------
  logic [1:0] tx_phase;   // 0 idle/head, 1 body, 2 tail
  msg_t       tx_hold;
  head_t      hd;

  assign msg_in_ready = (tx_phase == 2'd0) && flit_out_ready;

  always_comb begin
    hd = '{dst_node: msg_in.dst_node, dst_pe: msg_in.dst_pe, bcast: msg_in.bcast,
           addr: msg_in.addr, rsvd: '0};
    unique case (tx_phase)
      2'd0:    begin flit_out_valid = msg_in_valid; flit_out = '{ftype: FLIT_HEAD, payload: hd}; end
      2'd1:    begin flit_out_valid = 1'b1; flit_out = '{ftype: FLIT_BODY, payload: tx_hold.data}; end
      default: begin flit_out_valid = 1'b1; flit_out = '{ftype: FLIT_TAIL, payload: '0}; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_phase <= '0;
    end else if (flit_out_valid && flit_out_ready) begin
      tx_phase <= (tx_phase == 2'd2) ? 2'd0 : tx_phase + 2'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (tx_phase == 2'd0 && msg_in_valid && msg_in_ready) tx_hold <= msg_in;
  end

  // ---------------- receive ----------------
  logic  rx_full;
  head_t rx_head;
  data_t rx_data;

  assign flit_in_ready = !rx_full;
  assign msg_out_valid = rx_full;
  assign msg_out.dst_node = rx_head.dst_node;
  assign msg_out.dst_pe   = rx_head.dst_pe;
  assign msg_out.bcast    = rx_head.bcast;
  assign msg_out.addr     = rx_head.addr;
  assign msg_out.data     = rx_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_full <= 1'b0;
    end else begin
      if (flit_in_valid && flit_in_ready && flit_in.ftype == FLIT_TAIL) rx_full <= 1'b1;
      else if (msg_out_valid && msg_out_ready)                          rx_full <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (flit_in_valid && flit_in_ready) begin
      if (flit_in.ftype == FLIT_HEAD) rx_head <= head_t'(flit_in.payload);
      if (flit_in.ftype == FLIT_BODY) rx_data <= flit_in.payload;
    end
  end

endmodule
