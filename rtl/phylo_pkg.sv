// phylo_pkg: types and constants shared by the phylogenetic-kernel NoC accelerator.
//
// Number formats. A data word is a 64-bit two's-complement fixed-point number with
// 52 fraction bits (Q11.52), giving the 2^-52 resolution of the 64-bit datapath.
// Inside the computation core a value travels in the log domain as a log_t: a zero
// flag, the sign of the linear value and log2 of its magnitude as a signed Q8.26
// number. The split of the 64 bits and the log-domain width are this design's own
// choice; the published core uses a fixed-point hybrid number system that is only
// named, not specified.
//
// Network. Nodes exchange one-word messages (msg_t). On the network a message is
// three 66-bit flits (head, body, tail) of 64 payload bits each. Node ids are
// z*16 + y*4 + x in the 4x4x4 torus.
//
// Instructions (instr_t, 64 bits) drive the PE wrapper; the encoding is this
// design's own.
package phylo_pkg;

  localparam int unsigned DATA_W   = 64;
  localparam int unsigned FRAC_W   = 52;   // fraction bits of a data word
  localparam int unsigned LOG_W    = 34;   // log2 magnitude, signed Q8.26
  localparam int unsigned LOG_F    = 26;
  localparam int unsigned ADDR_W   = 16;   // word address in a PE memory
  localparam int unsigned NODE_W   = 6;    // up to 64 nodes
  localparam int unsigned PE_PER_NODE = 4;

  typedef logic signed [DATA_W-1:0] data_t;

  typedef struct packed {
    logic                    zero;   // linear value is zero (log is -infinity)
    logic                    sign;   // sign of the linear value
    logic signed [LOG_W-1:0] lg;     // log2 |value|, Q8.26
  } log_t;

  typedef enum logic [1:0] {
    CORE_SOP  = 2'd0,   // sum of four products, stages 1-6
    CORE_LOG  = 2'd1,   // logarithm, stages 1-2
    CORE_ALOG = 2'd2    // antilogarithm, stages 4-5
  } core_op_e;

  typedef struct packed {
    logic [NODE_W-1:0] dst_node;
    logic [1:0]        dst_pe;
    logic              bcast;   // deliver to every PE of dst_node except the sender
    logic [ADDR_W-1:0] addr;    // word address in the receiving PE memory
    data_t             data;
  } msg_t;

  typedef enum logic [1:0] {
    FLIT_IDLE = 2'd0,
    FLIT_HEAD = 2'd1,
    FLIT_BODY = 2'd2,
    FLIT_TAIL = 2'd3
  } flit_type_e;

  typedef struct packed {
    flit_type_e        ftype;
    logic [DATA_W-1:0] payload;
  } flit_t;

  // Head-flit payload layout.
  typedef struct packed {
    logic [NODE_W-1:0] dst_node;
    logic [1:0]        dst_pe;
    logic              bcast;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-NODE_W-3-ADDR_W-1:0] rsvd;
  } head_t;

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_SOP  = 4'd1,  // mem[dst] = sum_i mem[srca+i]*mem[srcb+i], i=0..3
    OP_LOG  = 4'd2,  // mem[dst+i] = log2|mem[srca+i]|, mem[dst+4+i] = log2|mem[srcb+i]|
    OP_ALOG = 4'd3,  // mem[dst+i] = 2^mem[srca+i], i=0..3
    OP_SEND = 4'd4,  // message {node,pe,bcast,addr=dst,data=mem[srca]}
    OP_WAIT = 4'd5,  // wait until srca messages have arrived, then consume them
    OP_HALT = 4'd6
  } opcode_e;

  typedef struct packed {
    opcode_e           op;
    logic [ADDR_W-1:0] dst;
    logic [ADDR_W-1:0] srca;
    logic [ADDR_W-1:0] srcb;
    logic [NODE_W-1:0] node;
    logic [1:0]        pe;
    logic              bcast;
    logic [2:0]        rsvd;
  } instr_t;

  // Router port numbering.
  localparam int unsigned P_LOCAL = 0, P_XP = 1, P_XM = 2, P_YP = 3, P_YM = 4,
                          P_ZP = 5, P_ZM = 6, N_PORTS = 7;

  // Knot k of a K-segment piecewise-linear table for log2(1+k/K), as Q1.30.
  // Evaluated at elaboration: log2 by repeated squaring.
  function automatic logic [31:0] log2_knot(int k, int K);
    logic [63:0] x;
    logic [31:0] y;
    x = 64'((64'(K + k) << 30) / 64'(K));   // 1+k/K in Q1.30
    y = '0;
    if (k >= K) return 32'h4000_0000;
    for (int i = 29; i >= 0; i--) begin
      x = (x * x) >> 30;
      if (x >= (64'd2 << 30)) begin
        x = x >> 1;
        y[i] = 1'b1;
      end
    end
    return y;
  endfunction

  // Integer square root of a 64-bit number.
  function automatic logic [63:0] isqrt64(logic [63:0] v);
    logic [63:0] r, b;
    r = '0;
    b = 64'd1 << 62;
    while (b > v) b = b >> 2;
    while (b != 0) begin
      if (v >= r + b) begin
        v = v - (r + b);
        r = (r >> 1) + b;
      end else begin
        r = r >> 1;
      end
      b = b >> 2;
    end
    return r;
  endfunction

  // Knot k of a K-segment (K a power of two, at most 64) table for 2^(k/K), as Q1.30.
  // Evaluated at elaboration: 2^(1/2^j) by repeated square roots.
  function automatic logic [31:0] exp2_knot(int k, int K);
    logic [63:0] acc, root;
    int          bits;
    if (k >= K) return 32'h8000_0000;
    bits = $clog2(K);
    acc  = 64'd1 << 30;
    root = 64'd2 << 30;                      // 2^(1/2^0) in Q1.30
    for (int j = 1; j <= bits; j++) begin
      root = isqrt64(root << 30);            // 2^(1/2^j)
      if (((k >> (bits - j)) & 1) != 0) acc = (acc * root) >> 30;
    end
    return acc[31:0];
  endfunction

  // Torus distance along one ring of size n.
  function automatic int unsigned ring_dist(int unsigned from, int unsigned to, int unsigned n);
    int unsigned d;
    d = (to + n - from) % n;
    return (d <= n - d) ? d : n - d;
  endfunction

endpackage
