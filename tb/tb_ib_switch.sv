// Self-checking testbench for ib_switch at its default 64-bit width.
// All three inputs send packets at once, each to a random destination:
// from upstream to port 0, port 1 or an unmapped address (dropped); from a
// branch to the other branch (passed across), to its own branch or to an
// unmapped address (both sent upstream). Every word carries its source and
// sequence number, so the checker can rebuild, for each output, the order of
// each source's packets and catch interleaving, loss, misrouting and
// corruption. All outputs stall at random. Finally a long packet with no
// stalls must pass at one word per cycle.
module tb_ib_switch;
  localparam int DW = 64, W = DW + 2;
  logic clk = 0, rst = 1;
  logic [DW-1:0] up_in_data, up_out_data;
  logic up_in_sop, up_in_eop, up_in_src_rdy, up_in_dst_rdy;
  logic up_out_sop, up_out_eop, up_out_src_rdy, up_out_dst_rdy;
  logic [DW-1:0] dn_in_data [2], dn_out_data [2];
  logic dn_in_sop [2], dn_in_eop [2], dn_in_src_rdy [2], dn_in_dst_rdy [2];
  logic dn_out_sop [2], dn_out_eop [2], dn_out_src_rdy [2], dn_out_dst_rdy [2];
  int checks = 0, failures = 0;

  ib_switch dut (.*);

  logic [W-1:0] s_d [3], k_d [3];
  logic s_v [3], s_r [3], k_v [3], k_r [3];
  assign {up_in_data, up_in_sop, up_in_eop} = s_d[0];
  assign up_in_src_rdy = s_v[0];
  assign s_r[0] = up_in_dst_rdy;
  assign k_d[0] = {up_out_data, up_out_sop, up_out_eop};
  assign k_v[0] = up_out_src_rdy;
  assign up_out_dst_rdy = k_r[0];
  for (genvar p = 0; p < 2; p++) begin : g_map
    assign {dn_in_data[p], dn_in_sop[p], dn_in_eop[p]} = s_d[p+1];
    assign dn_in_src_rdy[p] = s_v[p+1];
    assign s_r[p+1] = dn_in_dst_rdy[p];
    assign k_d[p+1] = {dn_out_data[p], dn_out_sop[p], dn_out_eop[p]};
    assign k_v[p+1] = dn_out_src_rdy[p];
    assign dn_out_dst_rdy[p] = k_r[p+1];
  end
  for (genvar i = 0; i < 3; i++) begin : g
    fl_stream_src  #(.W(W)) src (.clk, .rst, .d(s_d[i]), .src_rdy(s_v[i]), .dst_rdy(s_r[i]));
    fl_stream_sink #(.W(W)) snk (.clk, .rst, .d(k_d[i]), .src_rdy(k_v[i]), .dst_rdy(k_r[i]));
  end
  always #5 clk = ~clk;

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // expected words per (output, source)
  logic [W-1:0] exp_q [3][3][$];
  int cyc = 0, tp_first = -1, tp_last = -1, tp_n = 0;
  bit tp_on = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tp_on && dn_out_src_rdy[0] && dn_out_dst_rdy[0]) begin
      if (tp_first < 0) tp_first = cyc;
      tp_n++;
      tp_last = cyc;
    end
  end
  int n_cross = 0, n_drop = 0, n_up = 0, n_down = 0;

  function automatic logic [31:0] addr_for(input int o);
    // o: 0 = upstream / unmapped, 1 = port 0, 2 = port 1
    logic [27:0] low;
    low = 28'($urandom);
    case (o)
      1:       return {4'h0, low};
      2:       return {4'h1, low};
      default: return {4'h2 + 4'($urandom_range(0, 13)), low};
    endcase
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int p = 0; p < 60; p++) begin
      for (int s = 0; s < 3; s++) begin
        int tgt, len, outp;
        logic [31:0] a;
        tgt = $urandom_range(0, 2);
        a = addr_for(tgt);
        // where the packet must come out (-1: dropped)
        if (s == 0) outp = (tgt == 0) ? -1 : tgt;
        else if (s == 1) outp = (tgt == 2) ? 2 : 0;
        else outp = (tgt == 1) ? 1 : 0;
        if (outp < 0) n_drop++;
        else if (s != 0 && outp != 0) n_cross++;
        else if (outp == 0) n_up++;
        else n_down++;
        len = $urandom_range(1, 6);
        for (int i = 0; i < len; i++) begin
          logic [W-1:0] w;
          logic [DW-1:0] dat;
          dat = {8'(s), 8'(p), 8'(i), 8'($urandom), 32'($urandom)};
          if (i == 0) dat[31:0] = a;
          w = {dat, (i == 0), (i == len - 1)};
          case (s)
            0: g[0].src.q.push_back(w);
            1: g[1].src.q.push_back(w);
            default: g[2].src.q.push_back(w);
          endcase
          if (outp >= 0) exp_q[outp][s].push_back(w);
        end
      end
    end
    wait (g[0].src.q.size() == 0 && g[1].src.q.size() == 0 && g[2].src.q.size() == 0);
    repeat (40) @(posedge clk);
    for (int o = 0; o < 3; o++) begin
      logic [W-1:0] got [$];
      int cur;
      bit in_pkt;
      case (o)
        0: got = g[0].snk.q;
        1: got = g[1].snk.q;
        default: got = g[2].snk.q;
      endcase
      in_pkt = 0; cur = -1;
      foreach (got[k]) begin
        int s;
        s = int'(got[k][W-1 -: 8]);
        if (got[k][1]) begin
          check(!in_pkt, "sop inside a packet");
          in_pkt = 1; cur = s;
        end else check(in_pkt && cur == s, $sformatf("output %0d: packets interleaved", o));
        if (s < 3 && exp_q[o][s].size() != 0) begin
          check(got[k] == exp_q[o][s][0], $sformatf("output %0d word from %0d", o, s));
          void'(exp_q[o][s].pop_front());
        end else check(0, $sformatf("output %0d: unexpected word from %0d", o, s));
        if (got[k][0]) in_pkt = 0;
      end
      for (int s = 0; s < 3; s++)
        check(exp_q[o][s].size() == 0, $sformatf("output %0d: words from %0d missing", o, s));
    end
    check(n_cross > 0 && n_drop > 0 && n_up > 0 && n_down > 0, "every route used");
    check(g[0].snk.stalls > 0 && g[1].snk.stalls > 0 && g[2].snk.stalls > 0, "outputs stalled");
    // throughput: a 64-word packet from upstream to port 0 with the sink
    // always ready must pass at one word per cycle (64 bits at 125 MHz)
    begin
      int t_first, t_last, n;
      n = 0; t_first = -1; t_last = -1;
      g[1].snk.q.delete();
      tp_on = 1;
      force k_r[1] = 1'b1;
      @(negedge clk);
      for (int i = 0; i < 64; i++) begin
        force up_in_data = (i == 0) ? 64'h0000_0000_0000_0040 : 64'(i);
        force up_in_sop = (i == 0);
        force up_in_eop = (i == 63);
        force up_in_src_rdy = 1'b1;
        @(posedge clk);
        check(up_in_dst_rdy, "upstream input never stalls");
        @(negedge clk);
      end
      release up_in_data; release up_in_sop; release up_in_eop; release up_in_src_rdy;
      repeat (10) @(posedge clk);
      release k_r[1];
      n = tp_n;
      t_first = tp_first; t_last = tp_last;
      check(n == 64 && t_last - t_first == 63,
            $sformatf("64 words in %0d cycles, want 64 in 64", t_last - t_first + 1));
    end
    $display("routes: cross=%0d drop=%0d up=%0d down=%0d", n_cross, n_drop, n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
