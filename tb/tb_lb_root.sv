// Self-checking testbench for lb_root. The testbench plays a local bus slave
// with a random answer latency (as a chain of switches or an FPGA boundary
// would add): it decodes the two ADS half-addresses, records every WR word
// and answers every WR or RD word with RDY, read data being a function of
// the word address. Checks: address halves, word count and write data on the
// link, read data and their order at rdata, done once per request and only
// after the last RDY, and the link being busy exactly 2 + len cycles.
module tb_lb_root;
  import nc_pkg::*;
  localparam int MAXLEN = 32;
  logic clk = 0, rst = 1;
  logic req_valid, req_ready, req_wr, wdata_take, rdata_vld, done;
  logic [31:0] req_addr;
  logic [$clog2(MAXLEN+1)-1:0] req_len;
  logic [15:0] wdata, rdata;
  lb_dn_t lb_dn;
  lb_up_t lb_up;
  int checks = 0, failures = 0, cyc = 0;

  lb_root #(.MAXLEN(MAXLEN)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [15:0] rd_fn(input logic [31:0] a);
    return a[15:0] ^ 16'h5A3C ^ {a[23:16], a[31:24]};
  endfunction

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- slave model ----------------
  logic [31:0] s_addr;
  int          s_ads = 0, s_words = 0, s_busy = 0;
  logic [15:0] s_wr_seen [$];
  int          ans_time  [$];
  logic [15:0] ans_data  [$];
  int          last_ans = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (lb_dn.ads) begin
        if (s_ads % 2 == 0) s_addr[15:0] = lb_dn.dwr; else s_addr[31:16] = lb_dn.dwr;
        s_ads++;
      end
      if (lb_dn.ads || lb_dn.wr || lb_dn.rd) s_busy++;
      if (lb_dn.wr || lb_dn.rd) begin
        int t;
        if (lb_dn.wr) s_wr_seen.push_back(lb_dn.dwr);
        t = cyc + $urandom_range(1, 6);
        if (t <= last_ans) t = last_ans + 1;
        last_ans = t;
        ans_time.push_back(t);
        ans_data.push_back(lb_dn.rd ? rd_fn(s_addr) : 16'h0);
        s_addr = s_addr + 1;
        s_words++;
      end
    end
  end

  always @(negedge clk) begin
    lb_up = LB_UP_IDLE;
    if (ans_time.size() != 0 && ans_time[0] <= cyc) begin
      void'(ans_time.pop_front());
      lb_up.rdy = 1'b1;
      lb_up.drd = ans_data.pop_front();
    end
  end

  // ---------------- request side ----------------
  logic [15:0] wq [$];
  logic [15:0] rgot [$];
  int dones = 0, last_rdy_cyc = 0, done_cyc = 0;
  always @(posedge clk) if (!rst) begin
    if (wdata_take) begin void'(wq.pop_front()); end
    if (rdata_vld) rgot.push_back(rdata);
    if (lb_up.rdy) last_rdy_cyc = cyc;
    if (done) begin dones++; done_cyc = cyc; end
  end
  always @(negedge clk) wdata = (wq.size() != 0) ? wq[0] : 16'hDEAD;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = 0; req_wr = 0; req_addr = 0; req_len = 0; lb_up = LB_UP_IDLE;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 40; n++) begin
      logic [31:0] a;
      int len, d0, w0, b0;
      logic [15:0] wexp [$];
      bit wr;
      wr  = n[0];
      a   = $urandom;
      len = $urandom_range(1, MAXLEN);
      wexp.delete();
      if (wr) for (int i = 0; i < len; i++) begin
        logic [15:0] d;
        d = 16'($urandom);
        wq.push_back(d);
        wexp.push_back(d);
      end
      s_wr_seen.delete();
      rgot.delete();
      d0 = dones; w0 = s_words; b0 = s_busy;
      @(negedge clk);
      check(req_ready, "ready before request");
      req_valid = 1; req_wr = wr; req_addr = a; req_len = len[$clog2(MAXLEN+1)-1:0];
      @(negedge clk);
      req_valid = 0;
      wait (dones != d0);
      @(negedge clk);
      check(dones == d0 + 1, "one done per request");
      check(done_cyc == last_rdy_cyc + 1, "done one cycle after the last RDY");
      check(s_words - w0 == len, $sformatf("word count %0d want %0d", s_words - w0, len));
      check(s_busy - b0 == len + 2, "address and data cycles back to back");
      check(s_addr == a + len, "address sent as two halves");
      if (wr) begin
        check(s_wr_seen.size() == len, "write words seen");
        for (int i = 0; i < len && i < s_wr_seen.size(); i++)
          check(s_wr_seen[i] == wexp[i], $sformatf("write word %0d", i));
      end else begin
        check(rgot.size() == len, "read words returned");
        for (int i = 0; i < len && i < rgot.size(); i++)
          check(rgot[i] == rd_fn(a + i), $sformatf("read word %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
