// End-to-end testbench of netcope_ics_top at its default parameters.
//
// The testbench plays the PCI bridge (internal bus upstream link), a second
// internal bus component (downstream port 1), the network (both packet
// buffers' outer sides), the local bus bridge (the local bus root's request
// port), the DMA processor (the control bus root's memories and registers)
// and the user components of control bus endpoints 0 and 1.
//  * Reception: packets from the network are announced by the receive
//    buffer in RX queue 3; the processor answers through TX queue 3 with a
//    SEND_PKT; the packet must come out of the internal bus upstream link
//    at the host address; the ACK must come back and the packet is released.
//  * Transmission: the host writes packets into the transmit buffer over
//    the internal bus (two of them from the other branch, across the
//    switch);
//    the processor sends SEND_PKT through TX queue 2; the packet and flags
//    must leave on the network side and the ACK reach RX queue 2.
//  * Internal bus traffic between the upstream link and port 1, including
//    dropped packets; local bus writes and reads to both endpoints; control
//    bus packets to and from endpoints 0 and 1, with endpoint 1 overfilling
//    its RX queue.
// Each mechanism is counted and must occur at least once.
module tb_netcope_ics_top;
  import nc_pkg::*;
  localparam int DW = 64, W = DW + 2;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  // ---------------- DUT signals ----------------
  logic [DW-1:0] ib_up_in_data, ib_up_out_data, ib_p1_in_data, ib_p1_out_data;
  logic ib_up_in_sop, ib_up_in_eop, ib_up_in_src_rdy, ib_up_in_dst_rdy;
  logic ib_up_out_sop, ib_up_out_eop, ib_up_out_src_rdy, ib_up_out_dst_rdy;
  logic ib_p1_in_sop, ib_p1_in_eop, ib_p1_in_src_rdy, ib_p1_in_dst_rdy;
  logic ib_p1_out_sop, ib_p1_out_eop, ib_p1_out_src_rdy, ib_p1_out_dst_rdy;
  logic [DW-1:0] net_rx_data, net_tx_data;
  logic net_rx_sop, net_rx_eop, net_rx_src_rdy, net_rx_dst_rdy;
  logic net_tx_sop, net_tx_eop, net_tx_src_rdy, net_tx_dst_rdy;
  logic [15:0] net_rx_flags, net_tx_flags;
  logic lb_req_valid, lb_req_ready, lb_req_wr, lb_wdata_take, lb_rdata_vld, lb_done;
  logic [31:0] lb_req_addr;
  logic [8:0] lb_req_len;
  logic [15:0] lb_wdata, lb_rdata;
  logic [7:0] lbe_addr [2];
  logic [15:0] lbe_wdata [2], lbe_rdata [2];
  logic lbe_we [2], lbe_re [2];
  logic [9:0] cbr_rxm_addr, cbr_txm_addr;
  logic [15:0] cbr_rxm_rdata, cbr_txm_wdata;
  logic cbr_txm_we, cbr_reg_we;
  logic [5:0] cbr_reg_addr;
  logic [31:0] cbr_reg_wdata, cbr_reg_rdata;
  cb_word_t cbe_rx [2], cbe_tx [2];
  logic cbe_rx_src_rdy [2], cbe_rx_dst_rdy [2], cbe_tx_src_rdy [2], cbe_tx_dst_rdy [2];

  netcope_ics_top dut (.*);
  always #4 clk = ~clk;   // 125 MHz

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ================= stream drivers =================
  logic [W-1:0] up_s, up_k, p1_s, p1_k, nrx_s, ntx_k;
  assign {ib_up_in_data, ib_up_in_sop, ib_up_in_eop} = up_s;
  assign up_k = {ib_up_out_data, ib_up_out_sop, ib_up_out_eop};
  assign {ib_p1_in_data, ib_p1_in_sop, ib_p1_in_eop} = p1_s;
  assign p1_k = {ib_p1_out_data, ib_p1_out_sop, ib_p1_out_eop};
  assign {net_rx_data, net_rx_sop, net_rx_eop} = nrx_s;
  assign net_rx_flags = net_rx_data[15:0] ^ 16'h1234;
  assign ntx_k = {net_tx_data, net_tx_sop, net_tx_eop};
  fl_stream_src  #(.W(W)) up_src (.clk, .rst, .d(up_s), .src_rdy(ib_up_in_src_rdy), .dst_rdy(ib_up_in_dst_rdy));
  fl_stream_sink #(.W(W)) up_snk (.clk, .rst, .d(up_k), .src_rdy(ib_up_out_src_rdy), .dst_rdy(ib_up_out_dst_rdy));
  fl_stream_src  #(.W(W)) p1_src (.clk, .rst, .d(p1_s), .src_rdy(ib_p1_in_src_rdy), .dst_rdy(ib_p1_in_dst_rdy));
  fl_stream_sink #(.W(W)) p1_snk (.clk, .rst, .d(p1_k), .src_rdy(ib_p1_out_src_rdy), .dst_rdy(ib_p1_out_dst_rdy));
  fl_stream_src  #(.W(W)) nrx    (.clk, .rst, .d(nrx_s), .src_rdy(net_rx_src_rdy), .dst_rdy(net_rx_dst_rdy));
  fl_stream_sink #(.W(W)) ntx    (.clk, .rst, .d(ntx_k), .src_rdy(net_tx_src_rdy), .dst_rdy(net_tx_dst_rdy));
  for (genvar e = 0; e < 2; e++) begin : ge
    cb_stream_sink snk (.clk, .rst, .d(cbe_rx[e]), .src_rdy(cbe_rx_src_rdy[e]), .dst_rdy(cbe_rx_dst_rdy[e]));
    cb_stream_src  src (.clk, .rst, .d(cbe_tx[e]), .src_rdy(cbe_tx_src_rdy[e]), .dst_rdy(cbe_tx_dst_rdy[e]));
  end
  logic [15:0] ntx_flags [$];
  always @(posedge clk) if (net_tx_src_rdy && net_tx_dst_rdy && net_tx_sop) ntx_flags.push_back(net_tx_flags);

  // ================= local bus user memories =================
  logic [15:0] lmem [2][256];
  for (genvar e = 0; e < 2; e++) begin : g_lmem
    always_ff @(posedge clk) begin
      if (lbe_we[e]) lmem[e][lbe_addr[e]] <= lbe_wdata[e];
      if (lbe_re[e]) lbe_rdata[e] <= lmem[e][lbe_addr[e]];
    end
  end
  logic [15:0] lb_wq [$], lb_rq [$];
  always @(posedge clk) if (!rst) begin
    if (lb_wdata_take) void'(lb_wq.pop_front());
    if (lb_rdata_vld) lb_rq.push_back(lb_rdata);
  end
  always @(negedge clk) lb_wdata = (lb_wq.size() != 0) ? lb_wq[0] : 16'h0;

  // ================= mechanism counters =================
  int m_ib_cross = 0, m_ib_up = 0, m_ib_down = 0, m_ib_drop = 0, m_ib_stall = 0;
  int m_lb_write = 0, m_lb_read = 0;
  int m_cb_filtered = 0, m_cb_merge = 0, m_cb_full = 0, m_cb_rr = 0;
  int m_rx_flow = 0, m_tx_flow = 0, m_rxbuf_stall = 0;
  always @(posedge clk) if (!rst) begin
    if (ib_up_in_src_rdy && !ib_up_in_dst_rdy || ib_p1_in_src_rdy && !ib_p1_in_dst_rdy) m_ib_stall++;
    if (lbe_we[0] || lbe_we[1]) m_lb_write++;
    if (lbe_re[0] || lbe_re[1]) m_lb_read++;
    if (dut.u_cbe0.r_v && dut.u_cbe0.r_take && dut.u_cbe0.r_word.sop && !dut.u_cbe0.mine) m_cb_filtered++;
    if ($countones({dut.u_cb_sw1.m_v}) > 1) m_cb_merge++;
    if (dut.u_cb_root.r_v && !dut.u_cb_root.room) m_cb_full++;
    if ($countones(dut.u_cb_root.tx_busy) > 1) m_cb_rr++;
    if (net_rx_src_rdy && !net_rx_dst_rdy) m_rxbuf_stall++;
  end

  // ================= control bus root user tasks (the DMA processor) =================
  task automatic reg_rd(input logic [1:0] sel, input int q, output logic [31:0] v);
    @(negedge clk); cbr_reg_addr = {sel, 4'(q)};
    @(posedge clk); #1 v = cbr_reg_rdata;
  endtask
  task automatic reg_wr(input logic [1:0] sel, input int q, input logic [31:0] v);
    @(negedge clk); cbr_reg_addr = {sel, 4'(q)}; cbr_reg_wdata = v; cbr_reg_we = 1;
    @(negedge clk); cbr_reg_we = 0;
  endtask
  task automatic mem_rd(input int q, input int ofs, output logic [15:0] v);
    @(negedge clk); cbr_rxm_addr = {4'(q), 6'(ofs)};
    @(posedge clk); #1 v = cbr_rxm_rdata;
  endtask
  task automatic mem_wr(input int q, input int ofs, input logic [15:0] v);
    @(negedge clk); cbr_txm_addr = {4'(q), 6'(ofs)}; cbr_txm_wdata = v; cbr_txm_we = 1;
    @(negedge clk); cbr_txm_we = 0;
  endtask

  // processor access is shared by the concurrent scenarios
  semaphore cpu = new(1);

  // send a packet of words from the root to endpoint q
  task automatic cpu_send(input int q, input logic [15:0] w [$]);
    logic [31:0] ptrs, st;
    cpu.get(1);
    forever begin
      reg_rd(2'd3, q, st);
      if (!st[31]) break;
      repeat (4) @(posedge clk);
    end
    reg_rd(2'd2, q, ptrs);
    foreach (w[i]) mem_wr(q, int'(ptrs[15:0]) + i, w[i]);
    reg_wr(2'd1, q, w.size());
    cpu.put(1);
  endtask

  // take n items from RX queue q (waits until they are there)
  task automatic cpu_recv(input int q, input int n, output logic [15:0] w [$]);
    logic [31:0] cnt, ptrs;
    logic [15:0] d;
    w.delete();
    for (int t = 0; ; t++) begin
      cpu.get(1);
      reg_rd(2'd1, q, cnt);
      if (cnt >= n) break;
      cpu.put(1);
      if (t == 5000) begin
        // a message that never comes: report it, hand back zeros and go on
        check(0, $sformatf("RX queue %0d never held %0d items", q, n));
        repeat (n) w.push_back(16'h0);
        return;
      end
      repeat (8) @(posedge clk);
    end
    reg_rd(2'd0, q, ptrs);
    for (int i = 0; i < n; i++) begin
      mem_rd(q, int'(ptrs[31:16]) + i, d);
      w.push_back(d);
    end
    reg_wr(2'd0, q, n);
    cpu.put(1);
  endtask

  // messages read from a queue but not yet asked for (the buffers interleave
  // announcements and acknowledgements in the same queue)
  logic [15:0] pend [16][$][$];

  function automatic int msg_len(input logic [15:0] h);
    case (h[15:12])
      MSG_NEW_PKT:  return 4;
      MSG_SEND_PKT: return 5;
      MSG_ACK:      return 2;
      default:      return 2;
    endcase
  endfunction

  // oldest message of the given type from queue q
  task automatic get_msg(input int q, input logic [3:0] t, output logic [15:0] m [$]);
    forever begin
      foreach (pend[q][k]) if (pend[q][k][0][15:12] == t) begin
        m = pend[q][k];
        pend[q].delete(k);
        return;
      end
      begin
        logic [15:0] h [$], r [$];
        cpu_recv(q, 1, h);
        cpu_recv(q, msg_len(h[0]) - 1, r);
        pend[q].push_back({h, r});
      end
    end
  endtask

  // ================= reception (network -> host) =================
  task automatic rx_flow();
    logic [DW-1:0] pk [$][$];
    int off;
    off = 0;
    for (int p = 0; p < 12; p++) begin
      logic [DW-1:0] b [$];
      int len;
      len = (p < 2) ? 64 : $urandom_range(1, 24);
      for (int i = 0; i < len; i++) begin
        logic [DW-1:0] d;
        d = {32'($urandom), 32'($urandom)};
        b.push_back(d);
        nrx.q.push_back({d, (i == 0), (i == len - 1)});
      end
      pk.push_back(b);
    end
    for (int p = 0; p < 12; p++) begin
      logic [15:0] m [$];
      logic [DW-1:0] b [$];
      logic [31:0] haddr;
      b = pk[p];
      get_msg(3, MSG_NEW_PKT, m);
      check(m[0][15:12] == MSG_NEW_PKT && m[0][3:0] == 4'd3, "NEW_PKT from endpoint 3");
      check(m[1] == 16'(off % 512) && m[2] == 16'(b.size()), $sformatf("NEW_PKT offset/length %0d/%0d", m[1], m[2]));
      check(m[3] == (b[b.size()-1][15:0] ^ 16'h1234), "NEW_PKT flags");
      haddr = {4'h8, 28'($urandom)};
      cpu_send(3, '{{MSG_SEND_PKT, 12'h0}, m[1], haddr[31:16], haddr[15:0], 16'(b.size())});
      get_msg(3, MSG_ACK, m);
      check(m[0][15:12] == MSG_ACK && m[1] == 16'(off % 512), "ACK from the receive buffer");
      // the DMA packet on the upstream link
      wait (up_snk.q.size() >= b.size() + 1);
      begin
        int s0;
        s0 = -1;
        foreach (up_snk.q[k]) if (s0 < 0 && up_snk.q[k][1] && up_snk.q[k][33:2] == haddr) s0 = k;
        check(s0 >= 0, "DMA packet reached the host side");
        if (s0 >= 0) begin
          for (int i = 0; i < b.size(); i++)
            check(up_snk.q[s0+1+i] == {b[i], 1'b0, (i == b.size() - 1)}, "DMA data");
          for (int i = 0; i <= b.size(); i++) up_snk.q.delete(s0);
        end
      end
      cpu_send(3, '{{MSG_RELEASE, 12'h0}, 16'(b.size())});
      off += b.size();
      m_rx_flow++;
    end
  endtask

  // ================= transmission (host -> network) =================
  task automatic tx_flow();
    for (int p = 0; p < 8; p++) begin
      logic [15:0] m [$];
      logic [DW-1:0] b [$];
      int len, off;
      logic [15:0] flg;
      len = $urandom_range(1, 30);
      off = p * 32;
      flg = 16'($urandom);
      // host writes into the transmit buffer; every fourth packet comes from
      // the component on the other branch, across the switch
      for (int i = 0; i <= len; i++) begin
        logic [W-1:0] w;
        logic [DW-1:0] d;
        d = {32'($urandom), 32'($urandom)};
        if (i > 0) b.push_back(d);
        w = (i == 0) ? {DW'(off), 1'b1, 1'b0} : {d, 1'b0, (i == len)};
        if (p % 4 == 3) p1_src.q.push_back(w); else up_src.q.push_back(w);
      end
      if (p % 4 == 3) m_ib_cross++; else m_ib_down++;
      wait (up_src.q.size() == 0 && p1_src.q.size() == 0);
      repeat (10) @(posedge clk);
      cpu_send(2, '{{MSG_SEND_PKT, 12'h0}, 16'(off), 16'(len), flg});
      cpu_recv(2, 2, m);
      check(m[0][15:12] == MSG_ACK && m[0][3:0] == 4'd2 && m[1] == 16'(off), "ACK from the transmit buffer");
      check(ntx.q.size() == len, $sformatf("network packet length %0d want %0d", ntx.q.size(), len));
      for (int i = 0; i < len && i < ntx.q.size(); i++)
        check(ntx.q[i] == {b[i], (i == 0), (i == len - 1)}, "network packet data");
      check(ntx_flags.size() == 1 && ntx_flags[0] == flg, "network packet flags");
      ntx.q.delete(); ntx_flags.delete();
      m_tx_flow++;
    end
  endtask

  // ================= internal bus: upstream link <-> port 1 =================
  task automatic ib_flow();
    logic [W-1:0] to_p1 [$], to_up [$];
    for (int p = 0; p < 30; p++) begin
      int len;
      bit from_up, drop;
      from_up = $urandom_range(0, 1);
      drop = from_up && ($urandom_range(0, 3) == 0);
      len = $urandom_range(1, 8);
      for (int i = 0; i <= len; i++) begin
        logic [W-1:0] w;
        logic [DW-1:0] d;
        d = {8'hC0, 8'(p), 16'($urandom), 32'($urandom)};
        if (i == 0) d[31:0] = drop ? {4'h9, 28'($urandom)} : (from_up ? {4'h1, 28'($urandom)} : {4'hA, 28'($urandom)});
        w = {d, (i == 0), (i == len)};
        if (from_up) begin
          up_src.q.push_back(w);
          if (!drop) to_p1.push_back(w);
        end else begin
          p1_src.q.push_back(w);
          to_up.push_back(w);
        end
      end
      if (drop) m_ib_drop++; else if (from_up) m_ib_down++; else m_ib_up++;
    end
    wait (up_src.q.size() == 0 && p1_src.q.size() == 0);
    repeat (50) @(posedge clk);
    check(p1_snk.q.size() == to_p1.size(), "port 1 received its packets");
    for (int i = 0; i < to_p1.size() && i < p1_snk.q.size(); i++) check(p1_snk.q[i] == to_p1[i], "port 1 data");
    begin
      logic [W-1:0] got [$];
      foreach (up_snk.q[k]) if (up_snk.q[k][W-1 -: 8] == 8'hC0) got.push_back(up_snk.q[k]);
      check(got.size() == to_up.size(), "upstream link received port 1's packets");
      for (int i = 0; i < to_up.size() && i < got.size(); i++) check(got[i] == to_up[i], "upstream data");
    end
  endtask

  // ================= local bus =================
  task automatic lb_xfer(input bit wr, input logic [31:0] a, input int len);
    @(negedge clk);
    wait (lb_req_ready);
    @(negedge clk);
    lb_req_valid = 1; lb_req_wr = wr; lb_req_addr = a; lb_req_len = 9'(len);
    @(negedge clk);
    lb_req_valid = 0;
    @(posedge lb_done);
  endtask

  task automatic lb_flow();
    logic [15:0] shadow [256];
    for (int e = 0; e < 2; e++) begin
      int base, len;
      base = $urandom_range(0, 200);
      len = $urandom_range(8, 40);
      for (int i = 0; i < len; i++) begin
        shadow[i] = 16'($urandom);
        lb_wq.push_back(shadow[i]);
      end
      lb_xfer(1, 32'(e * 256 + base), len);
      lb_rq.delete();
      lb_xfer(0, 32'(e * 256 + base), len);
      @(negedge clk);
      check(lb_rq.size() == len, $sformatf("LB read length, endpoint %0d", e));
      for (int i = 0; i < len && i < lb_rq.size(); i++)
        check(lb_rq[i] == shadow[i], $sformatf("LB endpoint %0d word %0d", e, i));
      for (int i = 0; i < len; i++)
        check(lmem[e][base + i] == shadow[i], "LB user memory written");
    end
  endtask

  // ================= control bus endpoints 0 and 1 =================
  task automatic cb_flow();
    logic [15:0] w [$];
    cb_word_t exp0 [$], exp1 [$];
    logic [15:0] up0 [$], up1 [$];
    // to the endpoints: both sends are posted back to back so that they are
    // pending together
    begin
      logic [15:0] pk [2][$];
      logic [31:0] ptrs;
      for (int e = 0; e < 2; e++) begin
        int len;
        len = $urandom_range(8, 12);
        for (int i = 0; i < len; i++) begin
          cb_word_t x;
          pk[e].push_back(16'($urandom));
          x.data = pk[e][i];
          if (i == 0) x.data[3:0] = 4'(e);
          x.sop = (i == 0); x.eop = (i == len - 1);
          if (e == 0) exp0.push_back(x); else exp1.push_back(x);
        end
      end
      cpu.get(1);
      for (int e = 0; e < 2; e++) begin
        reg_rd(2'd2, e, ptrs);
        foreach (pk[e][i]) mem_wr(e, int'(ptrs[15:0]) + i, pk[e][i]);
      end
      reg_wr(2'd1, 0, pk[0].size());
      reg_wr(2'd1, 1, pk[1].size());
      cpu.put(1);
    end
    // from the endpoints; endpoint 1 sends more than its RX queue holds
    for (int k = 0; k < 4; k++) begin
      int len;
      len = $urandom_range(1, 6);
      for (int i = 0; i < len; i++) begin
        logic [15:0] d;
        d = 16'($urandom);
        ge[0].src.q.push_back('{data: d, sop: (i == 0), eop: (i == len - 1)});
        up0.push_back((i == 0) ? {d[15:4], 4'd0} : d);
      end
    end
    for (int k = 0; k < 10; k++)
      for (int i = 0; i < 8; i++) begin
        logic [15:0] d;
        d = 16'($urandom);
        ge[1].src.q.push_back('{data: d, sop: (i == 0), eop: (i == 7)});
        up1.push_back((i == 0) ? {d[15:4], 4'd1} : d);
      end
    repeat (600) @(posedge clk);
    cpu_recv(0, up0.size(), w);
    foreach (up0[i]) check(w[i] == up0[i], "RX queue 0 contents");
    for (int k = 0; k < 5; k++) begin
      cpu_recv(1, 16, w);
      for (int i = 0; i < 16; i++) check(w[i] == up1[k*16 + i], "RX queue 1 contents");
    end
    check(ge[0].snk.q.size() == exp0.size() && ge[1].snk.q.size() == exp1.size(),
          "endpoints got only their own packets");
    foreach (exp0[i]) if (i < ge[0].snk.q.size()) check(ge[0].snk.q[i] == exp0[i], "endpoint 0 data");
    foreach (exp1[i]) if (i < ge[1].snk.q.size()) check(ge[1].snk.q[i] == exp1[i], "endpoint 1 data");
  endtask

  // ================= main =================
  initial begin
    lb_req_valid = 0; lb_req_wr = 0; lb_req_addr = 0; lb_req_len = 0;
    cbr_rxm_addr = 0; cbr_txm_addr = 0; cbr_txm_we = 0; cbr_txm_wdata = 0;
    cbr_reg_addr = 0; cbr_reg_we = 0; cbr_reg_wdata = 0;
    for (int e = 0; e < 2; e++) for (int i = 0; i < 256; i++) lmem[e][i] = 16'h0;
    repeat (4) @(posedge clk);
    rst = 0;
    fork
      lb_flow();
      cb_flow();
      rx_flow();
    join
    // the internal bus checks need the links to themselves
    tx_flow();
    ib_flow();

    check(m_ib_cross > 0, "IB cross-branch packets");
    check(m_ib_up > 0, "IB upstream packets");
    check(m_ib_down > 0, "IB downstream packets");
    check(m_ib_drop > 0, "IB dropped packets");
    check(m_ib_stall > 0, "IB input stalls");
    check(m_lb_write > 0, "LB writes");
    check(m_lb_read > 0, "LB reads");
    check(m_cb_filtered > 0, "CB endpoint filtering");
    check(m_cb_merge > 0, "CB switch merging");
    check(m_cb_full > 0, "CB full RX queue stall");
    check(m_cb_rr > 0, "CB several sends pending");
    check(m_rxbuf_stall > 0, "network input held back by the receive buffer");
    check(m_rx_flow == 12, "receive flows");
    check(m_tx_flow == 8, "transmit flows");
    $display("mechanisms: ib cross=%0d up=%0d down=%0d drop=%0d stall=%0d lb wr=%0d rd=%0d cb filt=%0d merge=%0d full=%0d rr=%0d rx=%0d tx=%0d rxbuf_stall=%0d",
             m_ib_cross, m_ib_up, m_ib_down, m_ib_drop, m_ib_stall, m_lb_write, m_lb_read,
             m_cb_filtered, m_cb_merge, m_cb_full, m_cb_rr, m_rx_flow, m_tx_flow, m_rxbuf_stall);
    $display("simulated time %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
