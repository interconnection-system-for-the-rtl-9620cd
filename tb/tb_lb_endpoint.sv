// Self-checking testbench for lb_endpoint. The testbench plays the local bus
// root (ADS, ADS, then WR or RD words) and the user memory (one cycle read
// latency). It writes bursts in_win and outside the window, reads them back
// and checks the data, the number of RDY answers, their timing (RDY two
// cycles after the WR/RD word) and silence outside the window.
module tb_lb_endpoint;
  import nc_pkg::*;
  localparam logic [31:0] BASE = 32'h0000_0200;
  localparam int AW = 6;
  logic clk = 0, rst = 1;
  lb_dn_t lb_dn;
  lb_up_t lb_up;
  logic [AW-1:0] u_addr;
  logic [15:0] u_wdata, u_rdata;
  logic u_we, u_re;
  logic [15:0] umem [2**AW];
  logic [15:0] shadow [2**AW];
  int checks = 0, failures = 0;
  int cyc = 0, rdy_cnt = 0;
  int word_cyc [$];
  logic [15:0] rd_got [$];

  lb_endpoint #(.BASE(BASE), .AW(AW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // user memory: one cycle read latency
  always_ff @(posedge clk) begin
    if (u_we) umem[u_addr] <= u_wdata;
    if (u_re) u_rdata <= umem[u_addr];
  end

  // answer monitor: RDY must come exactly two cycles after each word
  always @(posedge clk) if (!rst && lb_up.rdy) begin
    int t;
    rdy_cnt++;
    rd_got.push_back(lb_up.drd);
    checks++;
    if (word_cyc.size() == 0) begin
      failures++;
      $display("RDY without a request");
    end else begin
      t = word_cyc.pop_front();
      if (cyc - t != 2) begin
        failures++;
        $display("RDY latency %0d, want 2", cyc - t);
      end
    end
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic send_addr(input logic [31:0] a);
    @(negedge clk); lb_dn = '{dwr: a[15:0],  ads: 1, wr: 0, rd: 0};
    @(negedge clk); lb_dn = '{dwr: a[31:16], ads: 1, wr: 0, rd: 0};
  endtask

  task automatic burst(input bit wr, input logic [31:0] a, input int len, input bit in_win);
    send_addr(a);
    for (int i = 0; i < len; i++) begin
      logic [15:0] d;
      d = 16'($urandom);
      @(negedge clk);
      lb_dn = '{dwr: wr ? d : 16'h0, ads: 0, wr: wr, rd: !wr};
      if (in_win) word_cyc.push_back(cyc);
      if (wr && in_win) shadow[(a + i) % (2**AW)] = d;
    end
    @(negedge clk); lb_dn = LB_DN_IDLE;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0;
    for (int i = 0; i < 2**AW; i++) begin umem[i] = 16'h0; shadow[i] = 16'h0; end
    u_rdata = '0;
    lb_dn = LB_DN_IDLE;
    repeat (3) @(posedge clk);
    rst = 0;
    // writes in_win the window
    for (int k = 0; k < 8; k++) begin
      int off, len;
      off = $urandom_range(0, 2**AW - 9);
      len = $urandom_range(1, 8);
      n0 = rdy_cnt;
      burst(1, BASE + off, len, 1);
      check(rdy_cnt - n0 == len, "one RDY per written word");
    end
    // writes outside the window: no answer, no change
    n0 = rdy_cnt;
    burst(1, BASE + 32'h1000, 4, 0);
    burst(1, 32'h0000_0000, 4, 0);
    check(rdy_cnt == n0, "silent outside the window");
    for (int i = 0; i < 2**AW; i++) check(umem[i] == shadow[i], $sformatf("memory word %0d", i));
    // read the whole window back in bursts of 16
    rd_got.delete();
    for (int b = 0; b < 2**AW; b += 16) begin
      burst(0, BASE + b, 16, 1);
    end
    check(rd_got.size() == 2**AW, "read word count");
    for (int i = 0; i < 2**AW && i < rd_got.size(); i++)
      check(rd_got[i] == shadow[i], $sformatf("read word %0d got %h want %h", i, rd_got[i], shadow[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
