// tb_subnet_crossbar: five random sources (four PEs and the network interface)
// offer messages under valid/ready; the network output is randomly back-pressured.
// Every clock, each PE write and the network output must match exactly the set of
// granted messages (a local word to its PE, a broadcast to the three other PEs,
// a remote word to the network), no output may be claimed twice, and every
// message must eventually be granted. Broadcasts and contention are counted.
module tb_subnet_crossbar;
  import phylo_pkg::*;

  localparam logic [NODE_W-1:0] ME = 6'd21;
  localparam int NMSG = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid [5], in_ready [5];
  msg_t in_msg [5];
  logic pe_valid [4];
  logic [ADDR_W-1:0] pe_addr [4];
  data_t pe_data [4];
  logic net_valid, net_ready;
  msg_t net_msg;

  int checks = 0, failures = 0, n_bcast = 0, n_remote = 0, n_loop = 0, n_blocked = 0;
  int sent [5];
  logic done [5];

  always #5 clk = ~clk;

  subnet_crossbar dut (.clk, .rst_n, .my_node(ME), .in_valid, .in_msg, .in_ready,
                       .pe_valid, .pe_addr, .pe_data, .net_valid, .net_msg, .net_ready);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic msg_t rand_msg(int src, int k);
    msg_t m;
    m.addr  = ADDR_W'(src * 1000 + k);
    m.data  = data_t'({$urandom, $urandom});
    m.bcast = 1'b0;
    m.dst_pe = 2'($urandom_range(0, 3));
    m.dst_node = ME;
    if (src < 4) begin
      automatic int sel = $urandom_range(0, 3);
      case (sel)
        0: m.dst_node = 6'($urandom_range(0, 63) == 21 ? 5 : $urandom_range(0, 63));
        1: m.bcast = 1'b1;
        2: m.dst_pe = 2'(src);
        default: ;
      endcase
    end else if ($urandom_range(0, 3) == 0) m.bcast = 1'b1;
    return m;
  endfunction

  // Sources.
  initial begin
    for (int i = 0; i < 5; i++) begin in_valid[i] = 1'b0; in_msg[i] = '0; sent[i] = 0; end
    net_ready = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (sent[0] + sent[1] + sent[2] + sent[3] + sent[4] < 5 * NMSG) begin
      for (int i = 0; i < 5; i++)
        if (!in_valid[i] && sent[i] < NMSG && $urandom_range(0, 2) != 0) begin
          in_valid[i] = 1'b1;
          in_msg[i]   = rand_msg(i, sent[i]);
        end
      net_ready = $urandom_range(0, 3) != 0;
      #1;
      // Check this clock's transfers against the grants.
      begin
        logic [4:0] need [5];
        logic [4:0] used;
        used = '0;
        for (int i = 0; i < 5; i++) begin
          need[i] = '0;
          if (i < 4 && in_msg[i].dst_node != ME) need[i][4] = 1'b1;
          else if (in_msg[i].bcast) begin need[i][3:0] = 4'hf; if (i < 4) need[i][i] = 1'b0; end
          else need[i][in_msg[i].dst_pe] = 1'b1;
          if (in_valid[i] && !in_ready[i]) n_blocked++;
          if (in_valid[i] && in_ready[i]) begin
            checks++;
            if ((used & need[i]) != 0) begin failures++; $display("FAIL output claimed twice"); end
            used |= need[i];
            for (int j = 0; j < 4; j++) if (need[i][j] &&
                (!pe_valid[j] || pe_addr[j] != in_msg[i].addr || pe_data[j] != in_msg[i].data)) begin
              failures++; $display("FAIL PE%0d write for source %0d", j, i);
            end
            if (need[i][4] && (!net_valid || !net_ready || net_msg != in_msg[i])) begin
              failures++; $display("FAIL network output for source %0d", i);
            end
            if (in_msg[i].bcast && !need[i][4]) n_bcast++;
            if (need[i][4]) n_remote++;
            if (i < 4 && need[i] == 5'(1 << i)) n_loop++;
          end
        end
        for (int j = 0; j < 4; j++) if (pe_valid[j] && !used[j]) begin
          failures++; $display("FAIL spurious write to PE%0d", j);
        end
        if (net_valid && !used[4]) begin failures++; $display("FAIL spurious network message"); end
        for (int i = 0; i < 5; i++) done[i] = in_valid[i] && in_ready[i];
      end
      @(negedge clk);
      for (int i = 0; i < 5; i++) if (done[i]) begin
        in_valid[i] = 1'b0;
        sent[i]++;
      end
    end
    checks++;
    if (n_bcast == 0 || n_remote == 0 || n_loop == 0 || n_blocked == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("bcast=%0d remote=%0d loopback=%0d blocked=%0d", n_bcast, n_remote, n_loop, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
