// Self-checking testbench for cb_switch with three downstream ports.
// Downward: every packet the root sends must reach all three ports, in order,
// even though each port stalls at random. Upward: the three ports send
// packets at the same time; the root side must see every packet whole (no
// interleaving), each port's packets in their own order, and more than one
// port winning the arbitration. The two-cycle pass-through latency is
// checked on an idle switch, and one word per cycle in both directions
// when nothing stalls.
module tb_cb_switch;
  import nc_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst = 1;
  cb_word_t up_in, up_out;
  logic up_in_src_rdy, up_in_dst_rdy, up_out_src_rdy, up_out_dst_rdy;
  cb_word_t dn_out [N], dn_in [N];
  logic dn_out_src_rdy [N], dn_out_dst_rdy [N], dn_in_src_rdy [N], dn_in_dst_rdy [N];
  int checks = 0, failures = 0, cyc = 0;

  cb_switch #(.N(N)) dut (.*);
  cb_stream_src  root_src (.clk, .rst, .d(up_in),  .src_rdy(up_in_src_rdy),  .dst_rdy(up_in_dst_rdy));
  cb_stream_sink root_snk (.clk, .rst, .d(up_out), .src_rdy(up_out_src_rdy), .dst_rdy(up_out_dst_rdy));
  for (genvar i = 0; i < N; i++) begin : g
    cb_stream_sink snk (.clk, .rst, .d(dn_out[i]), .src_rdy(dn_out_src_rdy[i]), .dst_rdy(dn_out_dst_rdy[i]));
    cb_stream_src  src (.clk, .rst, .d(dn_in[i]),  .src_rdy(dn_in_src_rdy[i]),  .dst_rdy(dn_in_dst_rdy[i]));
  end
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  cb_word_t down_exp [$];
  cb_word_t up_exp [N][$];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rate monitor: first and last transfer cycle and word count on the root
  // side output and on downstream port 0 while tp_on is set
  bit tp_on = 0;
  int tp_dn_first = -1, tp_dn_last = 0, tp_dn_n = 0;
  int tp_up_first = -1, tp_up_last = 0, tp_up_n = 0;
  always @(posedge clk) if (tp_on) begin
    if (dn_out_src_rdy[0] && dn_out_dst_rdy[0]) begin
      if (tp_dn_first < 0) tp_dn_first = cyc;
      tp_dn_last = cyc; tp_dn_n++;
    end
    if (up_out_src_rdy && up_out_dst_rdy) begin
      if (tp_up_first < 0) tp_up_first = cyc;
      tp_up_last = cyc; tp_up_n++;
    end
  end

  initial begin
    int t0, winners, lat;
    int n_from [N];
    int prev_src;
    repeat (3) @(posedge clk);
    rst = 0;
    // latency on an idle switch: a word taken at edge t is offered on a port
    // and can be taken there at edge t+2
    @(negedge clk);
    force up_in = '{data: 16'h1234, sop: 1, eop: 1};
    force up_in_src_rdy = 1;
    @(posedge clk); t0 = cyc;
    @(negedge clk);
    release up_in; release up_in_src_rdy;
    lat = -1;
    for (int k = 0; k < 6 && lat < 0; k++) begin
      @(posedge clk);
      if (dn_out_src_rdy[0] && lat < 0) lat = cyc - t0;
    end
    check(lat == 2, $sformatf("pass-through latency %0d want 2", lat));
    repeat (5) @(posedge clk);
    check(g[0].snk.q.size() == 1 && g[1].snk.q.size() == 1 && g[2].snk.q.size() == 1,
          "latency word reached every port");
    g[0].snk.q.delete(); g[1].snk.q.delete(); g[2].snk.q.delete();
    // traffic in both directions
    for (int p = 0; p < 40; p++) begin
      int len;
      len = $urandom_range(1, 7);
      for (int i = 0; i < len; i++) begin
        cb_word_t w;
        w.data = 16'($urandom); w.sop = (i == 0); w.eop = (i == len - 1);
        root_src.q.push_back(w);
        down_exp.push_back(w);
      end
      for (int s = 0; s < N; s++) begin
        len = $urandom_range(1, 5);
        for (int i = 0; i < len; i++) begin
          cb_word_t w;
          w.data = {4'(s), 8'(p), 4'(i)}; w.sop = (i == 0); w.eop = (i == len - 1);
          up_exp[s].push_back(w);
          case (s)
            0: g[0].src.q.push_back(w);
            1: g[1].src.q.push_back(w);
            default: g[2].src.q.push_back(w);
          endcase
        end
      end
    end
    wait (root_src.q.size() == 0 && g[0].src.q.size() == 0 &&
          g[1].src.q.size() == 0 && g[2].src.q.size() == 0);
    repeat (30) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      cb_word_t got [$];
      case (i)
        0: got = g[0].snk.q;
        1: got = g[1].snk.q;
        default: got = g[2].snk.q;
      endcase
      check(got.size() == down_exp.size(), $sformatf("port %0d word count", i));
      for (int k = 0; k < down_exp.size() && k < got.size(); k++)
        check(got[k] == down_exp[k], $sformatf("port %0d word %0d", i, k));
    end
    // upward: split by source tag, check no interleaving inside a packet
    for (int s = 0; s < N; s++) n_from[s] = 0;
    prev_src = -1; winners = 0;
    begin
      int cur;
      bit in_pkt;
      in_pkt = 0; cur = 0;
      foreach (root_snk.q[k]) begin
        cb_word_t w;
        int s;
        w = root_snk.q[k];
        s = int'(w.data[15:12]);
        if (w.sop) begin
          check(!in_pkt, "sop inside a packet");
          in_pkt = 1; cur = s;
          if (s != prev_src) winners++;
          prev_src = s;
        end else check(in_pkt && s == cur, "packets not interleaved");
        if (s < N && up_exp[s].size() != 0) begin
          check(w == up_exp[s][0], $sformatf("upward word from %0d", s));
          void'(up_exp[s].pop_front());
        end else check(0, "unexpected upward word");
        if (w.eop) in_pkt = 0;
      end
    end
    for (int s = 0; s < N; s++) check(up_exp[s].size() == 0, "all upward words arrived");
    check(winners > N, "arbitration changed between ports");
    // rate: with no gaps and no stalls a 32-word packet passes at one word
    // per cycle in each direction, both directions at once
    root_src.steady = 1; root_snk.steady = 1;
    g[0].src.steady = 1; g[0].snk.steady = 1; g[1].snk.steady = 1; g[2].snk.steady = 1;
    g[0].snk.q.delete(); g[1].snk.q.delete(); g[2].snk.q.delete(); root_snk.q.delete();
    repeat (3) @(posedge clk);
    tp_on = 1;
    for (int i = 0; i < 32; i++) begin
      root_src.q.push_back('{data: 16'(i), sop: (i == 0), eop: (i == 31)});
      g[0].src.q.push_back('{data: 16'(i + 100), sop: (i == 0), eop: (i == 31)});
    end
    repeat (50) @(posedge clk);
    tp_on = 0;
    check(tp_dn_n == 32 && tp_dn_last - tp_dn_first == 31,
          $sformatf("downward rate: %0d words in %0d cycles", tp_dn_n, tp_dn_last - tp_dn_first + 1));
    check(tp_up_n == 32 && tp_up_last - tp_up_first == 31,
          $sformatf("upward rate: %0d words in %0d cycles", tp_up_n, tp_up_last - tp_up_first + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
