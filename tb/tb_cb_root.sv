// Self-checking testbench for cb_root at its default size (16 queues of 64
// items). It plays the control bus tree on one side and the DMA processor on
// the other:
//  * receive: packets from random sources are sorted into RX queues; item
//    counts, start/end pointers and the stored words are checked through the
//    registers and the RX memory port, then freed through the control
//    register;
//  * full queue: more than 64 items for one queue stall the bus until the
//    user frees room, and nothing is lost;
//  * transmit: packets written into three TX queues and released together
//    leave round robin, with the queue number in the header; many packets
//    through one queue make its pointers wrap;
//  * rate: a 40-word packet leaves and another arrives at one word per
//    cycle when nothing stalls.
module tb_cb_root;
  import nc_pkg::*;
  localparam int NQ = 16, QAW = 6, DEPTH = 64;
  logic clk = 0, rst = 1;
  cb_word_t cb_in, cb_out;
  logic cb_in_src_rdy, cb_in_dst_rdy, cb_out_src_rdy, cb_out_dst_rdy;
  logic [9:0] rxm_addr, txm_addr;
  logic [15:0] rxm_rdata, txm_wdata;
  logic txm_we, reg_we;
  logic [5:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  int checks = 0, failures = 0;

  cb_root dut (.*);
  cb_stream_src  src (.clk, .rst, .d(cb_in),  .src_rdy(cb_in_src_rdy),  .dst_rdy(cb_in_dst_rdy));
  cb_stream_sink snk (.clk, .rst, .d(cb_out), .src_rdy(cb_out_src_rdy), .dst_rdy(cb_out_dst_rdy));
  always #5 clk = ~clk;

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic reg_rd(input logic [1:0] sel, input int q, output logic [31:0] v);
    @(negedge clk); reg_addr = {sel, 4'(q)};
    @(posedge clk); #1 v = reg_rdata;
  endtask
  task automatic reg_wr(input logic [1:0] sel, input int q, input logic [31:0] v);
    @(negedge clk); reg_addr = {sel, 4'(q)}; reg_wdata = v; reg_we = 1;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic mem_rd(input int q, input int ofs, output logic [15:0] v);
    @(negedge clk); rxm_addr = {4'(q), 6'(ofs)};
    @(posedge clk); #1 v = rxm_rdata;
  endtask
  task automatic mem_wr(input int q, input int ofs, input logic [15:0] v);
    @(negedge clk); txm_addr = {4'(q), 6'(ofs)}; txm_wdata = v; txm_we = 1;
    @(negedge clk); txm_we = 0;
  endtask

  cb_word_t rx_exp [NQ][$];

  task automatic send_pkt(input int q, input int len);
    for (int i = 0; i < len; i++) begin
      cb_word_t w;
      w.data = 16'($urandom);
      if (i == 0) w.data[3:0] = 4'(q);
      w.sop = (i == 0); w.eop = (i == len - 1);
      src.q.push_back(w);
      rx_exp[q].push_back(w);
    end
  endtask

  // drain queue q: check count, pointers and contents, then free n items
  task automatic check_rx(input int q, input int n_free, input int held = 0);
    logic [31:0] v, cnt, ptrs;
    logic [15:0] d;
    reg_rd(2'd1, q, cnt);
    check(cnt == rx_exp[q].size() - held, $sformatf("queue %0d count %0d want %0d", q, cnt, rx_exp[q].size() - held));
    reg_rd(2'd0, q, ptrs);
    check(6'(ptrs[15:0] - ptrs[31:16]) == 6'(cnt) , $sformatf("queue %0d start - end = count", q));
    for (int i = 0; i < n_free && i < rx_exp[q].size(); i++) begin
      mem_rd(q, int'(ptrs[31:16]) + i, d);
      check(d == rx_exp[q][i].data, $sformatf("queue %0d item %0d got %h want %h", q, i, d, rx_exp[q][i].data));
    end
    reg_wr(2'd0, q, n_free);
    for (int i = 0; i < n_free; i++) void'(rx_exp[q].pop_front());
    reg_rd(2'd1, q, v);
    check(v == rx_exp[q].size() - held, "count after free");
    reg_rd(2'd0, q, v);
    check(v[31:16] == 16'(6'(ptrs[31:16] + n_free)), "end pointer moved by the freed items");
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int stall_cycles = 0;
  always @(posedge clk) if (cb_in_src_rdy && !cb_in_dst_rdy) stall_cycles++;

  // rate monitors on both links while tp_on is set
  bit tp_on = 0;
  int cyc = 0, to_first = -1, to_last = 0, to_n = 0, ti_first = -1, ti_last = 0, ti_n = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tp_on && cb_out_src_rdy && cb_out_dst_rdy) begin
      if (to_first < 0) to_first = cyc;
      to_last = cyc; to_n++;
    end
    if (tp_on && cb_in_src_rdy && cb_in_dst_rdy) begin
      if (ti_first < 0) ti_first = cyc;
      ti_last = cyc; ti_n++;
    end
  end

  initial begin
    logic [31:0] v;
    reg_addr = 0; reg_we = 0; reg_wdata = 0; rxm_addr = 0; txm_addr = 0; txm_we = 0; txm_wdata = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // ---------- receive from many sources ----------
    for (int p = 0; p < 40; p++) send_pkt($urandom_range(0, NQ - 1), $urandom_range(1, 6));
    wait (src.q.size() == 0);
    repeat (10) @(posedge clk);
    for (int q = 0; q < NQ; q++) check_rx(q, rx_exp[q].size());
    // ---------- full queue stalls the bus ----------
    stall_cycles = 0;
    for (int p = 0; p < 10; p++) send_pkt(7, 8);
    repeat (300) @(posedge clk);
    // 16 words held back: two in the root's input register slice, 14 at the source
    check(src.q.size() == 14, $sformatf("two packets held back, %0d words left", src.q.size()));
    reg_rd(2'd1, 7, v);
    check(v == DEPTH, "queue full");
    check(stall_cycles > 100, "bus stalled while the queue was full");
    // the held packets are not yet visible: free 16 items and let them in
    check_rx(7, 16, 16);
    wait (src.q.size() == 0);
    repeat (10) @(posedge clk);
    check_rx(7, 64);
    // ---------- transmit from three queues at once ----------
    begin
      int qs [3] = '{2, 9, 15};
      int lens [3];
      logic [15:0] body [3][$];
      for (int k = 0; k < 3; k++) begin
        logic [31:0] ptrs;
        lens[k] = $urandom_range(2, 12);
        reg_rd(2'd2, qs[k], ptrs);
        for (int i = 0; i < lens[k]; i++) begin
          logic [15:0] d;
          d = 16'($urandom);
          body[k].push_back(d);
          mem_wr(qs[k], int'(ptrs[15:0]) + i, d);
        end
      end
      for (int k = 0; k < 3; k++) reg_wr(2'd1, qs[k], lens[k]);
      repeat (100) @(posedge clk);
      check(snk.q.size() == lens[0] + lens[1] + lens[2], "all TX words sent");
      begin
        int idx;
        idx = 0;
        for (int k = 0; k < 3; k++)
          for (int i = 0; i < lens[k]; i++) begin
            logic [15:0] want;
            want = body[k][i];
            if (i == 0) want[3:0] = 4'(qs[k]);
            if (idx < snk.q.size()) begin
              check(snk.q[idx].data == want, $sformatf("tx q%0d word %0d got %h want %h", qs[k], i, snk.q[idx].data, want));
              check(snk.q[idx].sop == (i == 0) && snk.q[idx].eop == (i == lens[k] - 1), "tx framing");
            end
            idx++;
          end
      end
      for (int k = 0; k < 3; k++) begin
        reg_rd(2'd3, qs[k], v);
        check(v == DEPTH, "tx queue free and idle after send");
        reg_rd(2'd2, qs[k], v);
        check(v[31:16] == v[15:0], "tx end pointer caught up");
      end
      snk.q.delete();
    end
    // ---------- many packets through one TX queue: pointers wrap ----------
    for (int n = 0; n < 20; n++) begin
      logic [31:0] ptrs;
      int len;
      logic [15:0] body [$];
      len = $urandom_range(1, 10);
      reg_rd(2'd2, 4, ptrs);
      for (int i = 0; i < len; i++) begin
        body.push_back(16'($urandom));
        mem_wr(4, int'(ptrs[15:0]) + i, body[i]);
      end
      reg_wr(2'd1, 4, len);
      reg_wr(2'd1, 4, 3);   // ignored: a send is already pending
      repeat (40) @(posedge clk);
      check(snk.q.size() == len, $sformatf("wrap pkt %0d size", n));
      for (int i = 1; i < len && i < snk.q.size(); i++)
        check(snk.q[i].data == body[i], "wrap pkt data");
      if (snk.q.size() != 0) check(snk.q[0].data == {body[0][15:4], 4'd4}, "wrap pkt header");
      snk.q.delete();
    end
    // ---------- rate: one word per cycle in each direction ----------
    begin
      logic [31:0] ptrs;
      snk.steady = 1; src.steady = 1;
      reg_rd(2'd2, 9, ptrs);
      for (int i = 0; i < 40; i++) mem_wr(9, int'(ptrs[15:0]) + i, 16'(i));
      tp_on = 1;
      reg_wr(2'd1, 9, 40);
      send_pkt(5, 40);
      repeat (100) @(posedge clk);
      tp_on = 0;
      check(to_n == 40 && to_last - to_first == 39,
            $sformatf("send rate: %0d words in %0d cycles", to_n, to_last - to_first + 1));
      check(ti_n == 40 && ti_last - ti_first == 39,
            $sformatf("receive rate: %0d words in %0d cycles", ti_n, ti_last - ti_first + 1));
      check_rx(5, 40);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
