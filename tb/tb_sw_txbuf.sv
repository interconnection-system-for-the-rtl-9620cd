// Self-checking testbench for sw_txbuf at its default size (512 words of
// 64 bits). The testbench plays the internal bus (DMA write packets into the
// buffer), the DMA processor (SEND_PKT messages, several queued back to
// back) and the network interface (random stalls). Every SEND_PKT must give
// exactly one network packet with the written words and the message's
// flags, followed by an ACK carrying the offset, in message order. Last, a
// 64-word packet must reach the network at one word per cycle.
module tb_sw_txbuf;
  import nc_pkg::*;
  localparam int DW = 64, W = DW + 2;
  logic clk = 0, rst = 1;
  logic [DW-1:0] ib_in_data, net_out_data;
  logic ib_in_sop, ib_in_eop, ib_in_src_rdy, ib_in_dst_rdy;
  logic net_out_sop, net_out_eop, net_out_src_rdy, net_out_dst_rdy;
  logic [15:0] net_out_flags;
  cb_word_t cb_rx, cb_tx;
  logic cb_rx_src_rdy, cb_rx_dst_rdy, cb_tx_src_rdy, cb_tx_dst_rdy;
  int checks = 0, failures = 0;

  sw_txbuf dut (.*);
  logic [W-1:0] idd, nd;
  assign {ib_in_data, ib_in_sop, ib_in_eop} = idd;
  assign nd = {net_out_data, net_out_sop, net_out_eop};
  fl_stream_src  #(.W(W)) ib  (.clk, .rst, .d(idd), .src_rdy(ib_in_src_rdy), .dst_rdy(ib_in_dst_rdy));
  fl_stream_sink #(.W(W)) net (.clk, .rst, .d(nd), .src_rdy(net_out_src_rdy), .dst_rdy(net_out_dst_rdy));
  cb_stream_src  msrc (.clk, .rst, .d(cb_rx), .src_rdy(cb_rx_src_rdy), .dst_rdy(cb_rx_dst_rdy));
  cb_stream_sink msnk (.clk, .rst, .d(cb_tx), .src_rdy(cb_tx_src_rdy), .dst_rdy(cb_tx_dst_rdy));
  always #4 clk = ~clk;

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // flags seen with each network packet's first word
  logic [15:0] flags_seen [$];
  always @(posedge clk) if (net_out_src_rdy && net_out_dst_rdy && net_out_sop) flags_seen.push_back(net_out_flags);

  // rate monitor on the network side while tp_on is set
  bit tp_on = 0;
  int cyc = 0, tp_first = -1, tp_last = 0, tp_n = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tp_on && net_out_src_rdy && net_out_dst_rdy) begin
      if (tp_first < 0) tp_first = cyc;
      tp_last = cyc; tp_n++;
    end
  end

  initial begin
    int offs [8], lens [8];
    logic [15:0] flg [8];
    logic [DW-1:0] body [8][$];
    repeat (3) @(posedge clk);
    rst = 0;
    for (int r = 0; r < 3; r++) begin
      // DMA writes of eight packets at separate offsets
      for (int p = 0; p < 8; p++) begin
        offs[p] = p * 64 + $urandom_range(0, 20);
        lens[p] = $urandom_range(1, 40);
        flg[p]  = 16'($urandom);
        body[p].delete();
        ib.q.push_back({DW'(offs[p]), 1'b1, 1'b0});
        for (int i = 0; i < lens[p]; i++) begin
          logic [DW-1:0] d;
          d = {32'($urandom), 32'($urandom)};
          body[p].push_back(d);
          ib.q.push_back({d, 1'b0, (i == lens[p] - 1)});
        end
      end
      wait (ib.q.size() == 0);
      repeat (5) @(posedge clk);
      // all eight sends queued at once, in a shuffled order
      for (int p = 0; p < 8; p++) begin
        int k;
        k = (p * 3 + r) % 8;
        msrc.q.push_back('{data: {MSG_SEND_PKT, 12'h000}, sop: 1, eop: 0});
        msrc.q.push_back('{data: 16'(offs[k]), sop: 0, eop: 0});
        msrc.q.push_back('{data: 16'(lens[k]), sop: 0, eop: 0});
        msrc.q.push_back('{data: flg[k], sop: 0, eop: 1});
      end
      wait (msrc.q.size() == 0);
      repeat (400) @(posedge clk);
      begin
        int idx;
        idx = 0;
        check(msnk.q.size() == 16, $sformatf("eight ACKs, %0d words", msnk.q.size()));
        check(flags_seen.size() == 8, "eight network packets");
        for (int p = 0; p < 8; p++) begin
          int k;
          k = (p * 3 + r) % 8;
          if (2 * p + 1 < msnk.q.size())
            check(msnk.q[2*p].data[15:12] == MSG_ACK && msnk.q[2*p+1].data == 16'(offs[k]), "ACK offset");
          if (p < flags_seen.size()) check(flags_seen[p] == flg[k], "flags");
          for (int i = 0; i < lens[k]; i++) begin
            if (idx < net.q.size())
              check(net.q[idx] == {body[k][i], (i == 0), (i == lens[k] - 1)}, $sformatf("packet %0d word %0d", k, i));
            else check(0, "network word missing");
            idx++;
          end
        end
        check(idx == net.q.size(), "no extra network words");
      end
      net.q.delete(); msnk.q.delete(); flags_seen.delete();
    end
    // rate: a 64-word packet leaves at one word per cycle when the network
    // side never stalls
    net.steady = 1;
    ib.q.push_back({DW'(100), 1'b1, 1'b0});
    for (int i = 0; i < 64; i++) ib.q.push_back({DW'(i), 1'b0, (i == 63)});
    wait (ib.q.size() == 0);
    repeat (5) @(posedge clk);
    tp_on = 1;
    msrc.q.push_back('{data: {MSG_SEND_PKT, 12'h000}, sop: 1, eop: 0});
    msrc.q.push_back('{data: 16'd100, sop: 0, eop: 0});
    msrc.q.push_back('{data: 16'd64, sop: 0, eop: 0});
    msrc.q.push_back('{data: 16'h0, sop: 0, eop: 1});
    repeat (200) @(posedge clk);
    tp_on = 0;
    check(tp_n == 64 && tp_last - tp_first == 63,
          $sformatf("network rate: %0d words in %0d cycles", tp_n, tp_last - tp_first + 1));
    for (int i = 0; i < 64 && i < net.q.size(); i++)
      check(net.q[i] == {DW'(i), (i == 0), (i == 63)}, "rate packet data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
