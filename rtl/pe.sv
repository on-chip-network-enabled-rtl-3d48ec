// pe: processing element - the computation core inside its instruction wrapper.
//
// The wrapper fetches one instruction per clock from a local instruction memory,
// reads its operands from the PE's register-bank data memory (combinational read
// ports, as a register bank allows), issues it to pe_core and writes results back
// when they leave the core. SEND turns a memory word into a message for the node
// crossbar; WAIT blocks until a given number of messages from other PEs have been
// written into the memory; HALT ends the program. The instruction set and its
// encoding (phylo_pkg::instr_t) are this design's own; the published PE only says
// that the wrapper decodes instructions, fetches data and writes results back.
//
// Results arrive out of order (LOG/ALOG after 2 clocks, SOP after 6), so the
// wrapper keeps a scoreboard of destination ranges still in flight and holds an
// instruction whose sources or destination overlap one of them (hazard_stall).
//
// Interface: the host writes instruction or data memory through host_we; host_raddr
// gives host_rdata one clock later. start sets pc to 0 and runs the program;
// running stays high until HALT. rx_* writes an arriving word (always accepted);
// tx_* is a valid/ready message output.
module pe
  import phylo_pkg::*;
#(
  parameter int unsigned MEM_WORDS  = 65536,   // 0.5 MB of 64-bit words
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned SEGS       = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              running,
  output logic              hazard_stall,

  input  logic              host_we,
  input  logic              host_imem,
  input  logic [ADDR_W-1:0] host_addr,
  input  data_t             host_wdata,
  input  logic [ADDR_W-1:0] host_raddr,
  output data_t             host_rdata,

  input  logic              rx_valid,
  input  logic [ADDR_W-1:0] rx_addr,
  input  data_t             rx_data,

  output logic              tx_valid,
  input  logic              tx_ready,
  output msg_t              tx_msg
);
  localparam int unsigned PC_W = $clog2(IMEM_DEPTH);
  localparam int unsigned MA_W = $clog2(MEM_WORDS);

  data_t       mem  [MEM_WORDS];
  logic [63:0] imem [IMEM_DEPTH];

  logic [PC_W-1:0] pc;
  logic [15:0]     rx_cnt;
  instr_t          ins;

  assign ins = instr_t'(imem[pc]);

  function automatic logic [MA_W-1:0] ma(logic [ADDR_W-1:0] a, int unsigned off);
    return MA_W'(a + ADDR_W'(off));
  endfunction

  // ---------------- operand fetch ----------------
  data_t opa [4], opb [4];
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      opa[i] = mem[ma(ins.srca, i)];
      opb[i] = mem[ma(ins.srcb, i)];
    end
  end

  // ---------------- scoreboard ----------------
  typedef struct packed {
    logic              valid;
    logic [ADDR_W-1:0] dst;
    logic [3:0]        len;
    logic [2:0]        cnt;
  } pend_t;

  pend_t     pend [8];
  logic [2:0] wp;

  function automatic logic overlap(logic [ADDR_W-1:0] a, int unsigned alen,
                                   logic [ADDR_W-1:0] d, logic [3:0] dlen);
    return (32'(a) < 32'(d) + 32'(dlen)) && (32'(d) < 32'(a) + alen);
  endfunction

  int unsigned len_a, len_b, len_d;
  always_comb begin
    len_a = 0; len_b = 0; len_d = 0;
    unique case (ins.op)
      OP_SOP:  begin len_a = 4; len_b = 4; len_d = 1; end
      OP_LOG:  begin len_a = 4; len_b = 4; len_d = 8; end
      OP_ALOG: begin len_a = 4;            len_d = 4; end
      OP_SEND: begin len_a = 1;                       end
      default: ;
    endcase
  end

  logic hazard;
  always_comb begin
    hazard = 1'b0;
    for (int i = 0; i < 8; i++)
      if (pend[i].valid &&
          ((len_a != 0 && overlap(ins.srca, len_a, pend[i].dst, pend[i].len)) ||
           (len_b != 0 && overlap(ins.srcb, len_b, pend[i].dst, pend[i].len)) ||
           (len_d != 0 && overlap(ins.dst,  len_d, pend[i].dst, pend[i].len))))
        hazard = 1'b1;
  end

  // ---------------- issue ----------------
  logic     is_core;
  core_op_e cop;
  logic     core_valid, core_ready, core_acc;
  logic     advance, wait_done;

  always_comb begin
    is_core = running && (ins.op == OP_SOP || ins.op == OP_LOG || ins.op == OP_ALOG);
    unique case (ins.op)
      OP_LOG:  cop = CORE_LOG;
      OP_ALOG: cop = CORE_ALOG;
      default: cop = CORE_SOP;
    endcase
  end

  assign core_valid   = is_core && !hazard;
  assign core_acc     = core_valid && core_ready;
  assign tx_valid     = running && ins.op == OP_SEND && !hazard;
  assign tx_msg       = '{dst_node: ins.node, dst_pe: ins.pe, bcast: ins.bcast,
                          addr: ins.dst, data: opa[0]};
  assign wait_done    = running && ins.op == OP_WAIT && rx_cnt >= ins.srca;
  assign hazard_stall = running && hazard && (is_core || ins.op == OP_SEND);

  always_comb begin
    advance = 1'b0;
    if (running) begin
      unique case (ins.op)
        OP_SOP, OP_LOG, OP_ALOG: advance = core_acc;
        OP_SEND:                 advance = tx_valid && tx_ready;
        OP_WAIT:                 advance = wait_done;
        OP_HALT:                 advance = 1'b0;
        default:                 advance = 1'b1;
      endcase
    end
  end

  // ---------------- core ----------------
  logic              log_valid, alog_valid, sop_valid;
  logic [ADDR_W-1:0] log_tag, alog_tag, sop_tag;
  data_t             log_out [8];
  data_t             alog_out [4];
  data_t             sop_out;

  pe_core #(.TAG_W(ADDR_W), .SEGS(SEGS)) u_core (
    .clk, .rst_n,
    .in_valid(core_valid), .in_ready(core_ready), .in_op(cop),
    .in_a(opa), .in_b(opb), .in_tag(ins.dst),
    .log_valid, .log_tag, .log_out,
    .alog_valid, .alog_tag, .alog_out,
    .sop_valid, .sop_tag, .sop_out
  );

  // ---------------- control state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      running <= 1'b0;
      rx_cnt  <= '0;
      wp      <= '0;
      for (int i = 0; i < 8; i++) pend[i] <= '0;
    end else begin
      if (start) begin
        pc      <= '0;
        running <= 1'b1;
      end else if (running && ins.op == OP_HALT) begin
        running <= 1'b0;
      end else if (advance) begin
        pc <= pc + 1'b1;
      end

      rx_cnt <= rx_cnt + 16'(rx_valid) - (wait_done ? ins.srca : 16'd0);

      for (int i = 0; i < 8; i++)
        if (pend[i].cnt != 0) pend[i].cnt <= pend[i].cnt - 1'b1;
        else                  pend[i].valid <= 1'b0;
      if (core_acc) begin
        pend[wp] <= '{valid: 1'b1, dst: ins.dst, len: 4'(len_d),
                      cnt: (cop == CORE_SOP) ? 3'd5 : 3'd1};
        wp <= wp + 1'b1;
      end
    end
  end

  // ---------------- memories ----------------
  always_ff @(posedge clk) begin
    if (host_we && host_imem)  imem[PC_W'(host_addr)] <= host_wdata;
    if (host_we && !host_imem) mem[MA_W'(host_addr)] <= host_wdata;
    if (rx_valid)              mem[MA_W'(rx_addr)] <= rx_data;
    if (log_valid)  for (int i = 0; i < 8; i++) mem[ma(log_tag, i)]  <= log_out[i];
    if (alog_valid) for (int i = 0; i < 4; i++) mem[ma(alog_tag, i)] <= alog_out[i];
    if (sop_valid)  mem[MA_W'(sop_tag)] <= sop_out;
    host_rdata <= mem[MA_W'(host_raddr)];
  end

endmodule
