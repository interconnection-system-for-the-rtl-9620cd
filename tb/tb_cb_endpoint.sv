// Self-checking testbench for cb_endpoint (ID 5). Packets for random
// endpoints arrive from the bus; only those whose header names ID 5 must
// reach the user, whole and in order, and the others must be consumed.
// Packets from the user must leave with ID 5 in header bits [3:0] and every
// other bit unchanged. Both sides see random gaps and stalls.
module tb_cb_endpoint;
  import nc_pkg::*;
  localparam cb_id_t ID = 4'd5;
  logic clk = 0, rst = 1;
  cb_word_t cb_in, cb_out, u_rx, u_tx;
  logic cb_in_src_rdy, cb_in_dst_rdy, cb_out_src_rdy, cb_out_dst_rdy;
  logic u_rx_src_rdy, u_rx_dst_rdy, u_tx_src_rdy, u_tx_dst_rdy;
  int checks = 0, failures = 0;

  cb_endpoint #(.ID(ID)) dut (.*);
  cb_stream_src  bus_src (.clk, .rst, .d(cb_in),  .src_rdy(cb_in_src_rdy),  .dst_rdy(cb_in_dst_rdy));
  cb_stream_sink usr_snk (.clk, .rst, .d(u_rx),   .src_rdy(u_rx_src_rdy),   .dst_rdy(u_rx_dst_rdy));
  cb_stream_src  usr_src (.clk, .rst, .d(u_tx),   .src_rdy(u_tx_src_rdy),   .dst_rdy(u_tx_dst_rdy));
  cb_stream_sink bus_snk (.clk, .rst, .d(cb_out), .src_rdy(cb_out_src_rdy), .dst_rdy(cb_out_dst_rdy));
  always #5 clk = ~clk;

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  cb_word_t exp_rx [$], exp_tx [$];

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_total;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int p = 0; p < 60; p++) begin
      int len;
      cb_id_t dst;
      len = $urandom_range(1, 6);
      dst = (p % 3 == 0) ? ID : cb_id_t'($urandom);
      for (int i = 0; i < len; i++) begin
        cb_word_t w, wu;
        w.data = 16'($urandom);
        if (i == 0) w.data[3:0] = dst;
        w.sop = (i == 0);
        w.eop = (i == len - 1);
        bus_src.q.push_back(w);
        if (dst == ID) exp_rx.push_back(w);
        wu.data = 16'($urandom);
        wu.sop = (i == 0);
        wu.eop = (i == len - 1);
        usr_src.q.push_back(wu);
        if (i == 0) wu.data[3:0] = ID;
        exp_tx.push_back(wu);
      end
    end
    n_total = bus_src.q.size();
    wait (bus_src.q.size() == 0 && usr_src.q.size() == 0);
    repeat (20) @(posedge clk);
    check(bus_src.sent == n_total, "every bus word consumed");
    check(usr_snk.q.size() == exp_rx.size(), $sformatf("rx words %0d want %0d", usr_snk.q.size(), exp_rx.size()));
    for (int i = 0; i < exp_rx.size() && i < usr_snk.q.size(); i++)
      check(usr_snk.q[i] == exp_rx[i], $sformatf("rx word %0d", i));
    check(bus_snk.q.size() == exp_tx.size(), "tx word count");
    for (int i = 0; i < exp_tx.size() && i < bus_snk.q.size(); i++)
      check(bus_snk.q[i] == exp_tx[i], $sformatf("tx word %0d got %h want %h", i, bus_snk.q[i], exp_tx[i]));
    check(usr_snk.stalls > 0 && bus_snk.stalls > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
