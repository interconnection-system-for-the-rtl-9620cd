// Local bus endpoint (slave).
//
// Watches the local bus for transactions in its window of 2**AW 16-bit words
// starting at word address BASE. A transaction starts with two ADS cycles
// carrying the 32-bit word address, low half first; each following WR cycle
// writes one 16-bit word and each RD cycle asks for one, the address going
// up by one per word. Inside the window the endpoint drives a simple memory
// port to its user component and answers every word with RDY; with a read
// the data come on DRD in the same cycle. Outside the window it stays silent
// and drives zero, so a switch can OR the answers of its endpoints.
//
// Timing: a WR or RD seen at cycle t becomes u_we / u_re at t+1; the user
// returns u_rdata at t+2 (one cycle read latency) and RDY is high at t+2.
// The link signals are the bus's own; the window, the word addressing and the
// fixed latency are this design's choices.
module lb_endpoint
  import nc_pkg::*;
#(
  parameter logic [31:0] BASE = 32'h0,
  parameter int unsigned AW   = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  lb_dn_t        lb_dn,
  output lb_up_t        lb_up,
  // user component memory port
  output logic [AW-1:0] u_addr,
  output logic [15:0]   u_wdata,
  output logic          u_we,
  output logic          u_re,
  input  logic [15:0]   u_rdata
);
  logic [31:0] addr_q;
  logic        ads_hi_q;   // next ADS word is the high half
  logic        hit;
  logic        we_d, re_d;

  assign hit = (addr_q[31:AW] == BASE[31:AW]);

  always_ff @(posedge clk) begin
    if (rst) begin
      addr_q   <= '0;
      ads_hi_q <= 1'b0;
      u_addr   <= '0;
      u_wdata  <= '0;
      u_we     <= 1'b0;
      u_re     <= 1'b0;
      we_d     <= 1'b0;
      re_d     <= 1'b0;
    end else begin
      u_we <= 1'b0;
      u_re <= 1'b0;
      we_d <= u_we;
      re_d <= u_re;
      if (lb_dn.ads) begin
        ads_hi_q <= !ads_hi_q;
        if (ads_hi_q) addr_q[31:16] <= lb_dn.dwr;
        else          addr_q[15:0]  <= lb_dn.dwr;
      end else if (lb_dn.wr || lb_dn.rd) begin
        ads_hi_q <= 1'b0;
        addr_q   <= addr_q + 32'd1;
        u_addr   <= addr_q[AW-1:0];
        u_wdata  <= lb_dn.dwr;
        u_we     <= lb_dn.wr && hit;
        u_re     <= lb_dn.rd && hit;
      end
    end
  end

  assign lb_up.rdy = we_d || re_d;
  assign lb_up.drd = re_d ? u_rdata : '0;
endmodule
