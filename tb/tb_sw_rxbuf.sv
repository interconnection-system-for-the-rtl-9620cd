// Self-checking testbench for sw_rxbuf at its default size (512 words of
// 64 bits). The testbench plays the network (packets with flags), the DMA
// processor (control bus messages) and the internal bus (random stalls).
// Phase 1: six packets arrive; each NEW_PKT message must give the right
// offset, length and flags; for each the processor sends SEND_PKT and must
// see one internal bus packet (header = host address, then the packet's
// words) and then an ACK with the offset, after which it sends RELEASE.
// Phase 2: ten 60-word packets overfill the buffer; the network side must
// stall after eight, and the rest must arrive once packets are released.
// Last, one 64-word packet must go in and out at one word per cycle.
module tb_sw_rxbuf;
  import nc_pkg::*;
  localparam int DW = 64, W = DW + 2;
  logic clk = 0, rst = 1;
  logic [DW-1:0] net_in_data, ib_out_data;
  logic net_in_sop, net_in_eop, net_in_src_rdy, net_in_dst_rdy;
  logic [15:0] net_in_flags;
  logic ib_out_sop, ib_out_eop, ib_out_src_rdy, ib_out_dst_rdy;
  cb_word_t cb_rx, cb_tx;
  logic cb_rx_src_rdy, cb_rx_dst_rdy, cb_tx_src_rdy, cb_tx_dst_rdy;
  int checks = 0, failures = 0;

  sw_rxbuf dut (.*);
  logic [W-1:0] nd, id;
  assign {net_in_data, net_in_sop, net_in_eop} = nd;
  assign net_in_flags = net_in_data[15:0] ^ 16'hA5A5;
  assign id = {ib_out_data, ib_out_sop, ib_out_eop};
  fl_stream_src  #(.W(W)) net (.clk, .rst, .d(nd), .src_rdy(net_in_src_rdy), .dst_rdy(net_in_dst_rdy));
  fl_stream_sink #(.W(W)) ib  (.clk, .rst, .d(id), .src_rdy(ib_out_src_rdy), .dst_rdy(ib_out_dst_rdy));
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

  int stall_cycles = 0;
  always @(posedge clk) if (net_in_src_rdy && !net_in_dst_rdy) stall_cycles++;

  // rate monitors on the network input and the internal bus output while
  // tp_on is set: first and last transfer cycle and word count
  bit tp_on = 0;
  int cyc = 0;
  int tn_first = -1, tn_last = 0, tn_n = 0, ti_first = -1, ti_last = 0, ti_n = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tp_on && net_in_src_rdy && net_in_dst_rdy) begin
      if (tn_first < 0) tn_first = cyc;
      tn_last = cyc; tn_n++;
    end
    if (tp_on && ib_out_src_rdy && ib_out_dst_rdy) begin
      if (ti_first < 0) ti_first = cyc;
      ti_last = cyc; ti_n++;
    end
  end

  logic [DW-1:0] pkts [$][$];   // words of every packet sent, in order
  int exp_off = 0, n_done = 0;

  task automatic net_send(input int len);
    logic [DW-1:0] body [$];
    for (int i = 0; i < len; i++) begin
      logic [DW-1:0] d;
      d = {32'($urandom), 32'($urandom)};
      body.push_back(d);
      net.q.push_back({d, (i == 0), (i == len - 1)});
    end
    pkts.push_back(body);
  endtask

  task automatic send_msg(input cb_msg_t t, input logic [15:0] p [$]);
    msrc.q.push_back('{data: {t, 12'h000}, sop: 1'b1, eop: (p.size() == 0)});
    foreach (p[i]) msrc.q.push_back('{data: p[i], sop: 1'b0, eop: (i == p.size() - 1)});
  endtask

  // take the oldest whole message of type t out of the sink (waits for it)
  task automatic get_msg(input cb_msg_t t, output cb_word_t m [$]);
    int s0, n;
    m.delete();
    forever begin
      s0 = -1; n = -1;
      foreach (msnk.q[k]) begin
        if (msnk.q[k].sop && s0 < 0 && n < 0 && msnk.q[k].data[15:12] == t) s0 = k;
        if (s0 >= 0 && n < 0 && msnk.q[k].eop) n = k;
      end
      if (n >= 0) break;
      @(posedge clk);
    end
    for (int k = s0; k <= n; k++) m.push_back(msnk.q[k]);
    for (int k = s0; k <= n; k++) msnk.q.delete(s0);
  endtask

  // handle the oldest packet: check NEW_PKT, DMA it, check ACK, release it
  task automatic handle_one();
    cb_word_t m [$];
    logic [DW-1:0] body [$];
    logic [31:0] haddr;
    int len;
    body = pkts.pop_front();
    len = body.size();
    get_msg(MSG_NEW_PKT, m);
    check(m.size() == 4 && m[0].data[15:12] == MSG_NEW_PKT, "NEW_PKT message");
    if (m.size() == 4) begin
      check(m[1].data == 16'(exp_off % 512), $sformatf("offset %0d want %0d", m[1].data, exp_off % 512));
      check(m[2].data == 16'(len), "length");
      check(m[3].data == (body[len-1][15:0] ^ 16'hA5A5), "flags");
    end
    haddr = 32'h8000_0000 | 32'($urandom_range(0, 1 << 20));
    send_msg(MSG_SEND_PKT, '{16'(exp_off % 512), haddr[31:16], haddr[15:0], 16'(len)});
    get_msg(MSG_ACK, m);
    check(m.size() == 2 && m[0].data[15:12] == MSG_ACK && m[1].data == 16'(exp_off % 512), "ACK with offset");
    check(ib.q.size() == len + 1, $sformatf("internal bus words %0d want %0d", ib.q.size(), len + 1));
    if (ib.q.size() == len + 1) begin
      check(ib.q[0] == {DW'(haddr), 1'b1, 1'b0}, "internal bus header");
      for (int i = 0; i < len; i++)
        check(ib.q[i+1] == {body[i], 1'b0, (i == len - 1)}, $sformatf("DMA word %0d", i));
    end
    ib.q.delete();
    send_msg(MSG_RELEASE, '{16'(len)});
    exp_off += len;
    n_done++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    // phase 1
    for (int p = 0; p < 6; p++) net_send($urandom_range(1, 20));
    for (int p = 0; p < 6; p++) handle_one();
    // phase 2: overfill
    repeat (50) @(posedge clk);
    stall_cycles = 0;
    for (int p = 0; p < 10; p++) net_send(60);
    repeat (2000) @(posedge clk);
    begin
      int n_new;
      n_new = 0;
      foreach (msnk.q[k]) if (msnk.q[k].sop) n_new++;
      check(n_new == 8, $sformatf("%0d packets announced while full, want 8", n_new));
    end
    check(stall_cycles > 100, "network input stalled while the buffer was full");
    for (int p = 0; p < 10; p++) handle_one();
    check(n_done == 16, "all packets handled");
    // rate: with no gaps and no stalls a 64-word packet is taken from the
    // network, and written to the internal bus (header and data), at one
    // word per cycle
    net.steady = 1; ib.steady = 1;
    tp_on = 1;
    net_send(64);
    handle_one();
    tp_on = 0;
    check(tn_n == 64 && tn_last - tn_first == 63,
          $sformatf("network input rate: %0d words in %0d cycles", tn_n, tn_last - tn_first + 1));
    check(ti_n == 65 && ti_last - ti_first == 64,
          $sformatf("internal bus rate: %0d words in %0d cycles", ti_n, ti_last - ti_first + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
