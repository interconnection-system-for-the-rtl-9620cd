// Self-checking testbench for dp_ram: random writes and reads against a
// reference array, checking the one-cycle read latency and that a read of
// the address being written returns the old word.
module tb_dp_ram;
  localparam int AW = 6, DW = 16;
  logic clk = 0, we;
  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  dp_ram #(.AW(AW), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] expect_d;
    for (int i = 0; i < 2**AW; i++) ref_mem[i] = '0;
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      we    = $urandom_range(0, 1);
      waddr = AW'($urandom);
      wdata = DW'($urandom);
      raddr = (n % 7 == 0) ? waddr : AW'($urandom);
      expect_d = ref_mem[raddr];           // old word, even when raddr == waddr
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_d) begin
        failures++;
        $display("read %0d: got %h want %h", raddr, rdata, expect_d);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
