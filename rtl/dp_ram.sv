// Two-port memory: one write port and one read port on the same clock.
//
// Models the two-port embedded BlockRAM in which the control bus root keeps
// its RX and TX queues: one side stores words, the other side reads them.
// Reads are synchronous: rdata shows the word at raddr one cycle after raddr
// is presented. A read of the address being written in the same cycle returns
// the old word. Contents start at zero. Sizes are parameters; 1024 x 16 is
// one 18 Kbit BlockRAM.
module dp_ram #(
  parameter int unsigned AW = 10,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
