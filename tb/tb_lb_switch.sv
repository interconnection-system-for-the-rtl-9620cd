// Self-checking testbench for lb_switch: random link traffic; every
// downstream port must show the root's word one cycle later, and the root
// must see the OR of the endpoints' answers one cycle later.
module tb_lb_switch;
  import nc_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst = 1;
  lb_dn_t up_dn;
  lb_up_t up_up;
  lb_dn_t dn_dn [N];
  lb_up_t dn_up [N];
  int checks = 0, failures = 0;

  lb_switch #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lb_dn_t prev_dn;
    lb_up_t prev_or;
    up_dn = '0;
    for (int i = 0; i < N; i++) dn_up[i] = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      up_dn = lb_dn_t'($urandom);
      prev_or = '0;
      for (int i = 0; i < N; i++) begin
        // usually a single endpoint answers, sometimes none
        dn_up[i] = ($urandom_range(0, N) == i) ? lb_up_t'($urandom) : '0;
        prev_or |= dn_up[i];
      end
      prev_dn = up_dn;
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (dn_dn[i] !== prev_dn) begin
          failures++;
          $display("port %0d: got %h want %h", i, dn_dn[i], prev_dn);
        end
      end
      checks++;
      if (up_up !== prev_or) begin
        failures++;
        $display("up: got %h want %h", up_up, prev_or);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
