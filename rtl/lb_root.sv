// Local bus root (master).
//
// The root is the only initiator on the local bus. It takes a request of
// req_len 16-bit words at 32-bit word address req_addr, sends the address as
// two ADS cycles (low half first), then one WR or RD cycle per word, and
// counts the RDY answers. Write data are pulled one word per cycle:
// wdata_take is high in the cycle the root takes wdata, and the next word
// must be on wdata in the following cycle. Read words come out on rdata with
// rdata_vld in the order they were asked for. done pulses once all req_len
// RDYs have come back; req_ready is high when a new request can start.
// Words are sent back to back; the read latency of the tree (switch
// stages, inter-FPGA registers) only delays the RDYs.
// The ADS/WR/RD/RDY sequence follows the bus's timing diagram; the request
// interface, which stands for the internal bus side of the bridge, is this
// design's own.
module lb_root
  import nc_pkg::*;
#(
  parameter int unsigned MAXLEN = 256
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        req_valid,
  output logic                        req_ready,
  input  logic                        req_wr,
  input  logic [31:0]                 req_addr,
  input  logic [$clog2(MAXLEN+1)-1:0] req_len,
  input  logic [15:0]                 wdata,
  output logic                        wdata_take,
  output logic [15:0]                 rdata,
  output logic                        rdata_vld,
  output logic                        done,
  output lb_dn_t                      lb_dn,
  input  lb_up_t                      lb_up
);
  localparam int unsigned LW = $clog2(MAXLEN+1);

  typedef enum logic [2:0] {S_IDLE, S_ADL, S_ADH, S_DATA, S_WAIT} state_t;
  state_t      st_q;
  logic        wr_q;
  logic [31:0] addr_q;
  logic [LW-1:0] len_q, sent_q, rdy_q;

  assign req_ready  = (st_q == S_IDLE);
  assign wdata_take = (st_q == S_DATA) && wr_q;
  assign rdata      = lb_up.drd;
  assign rdata_vld  = lb_up.rdy && !wr_q && (st_q != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q   <= S_IDLE;
      wr_q   <= 1'b0;
      addr_q <= '0;
      len_q  <= '0;
      sent_q <= '0;
      rdy_q  <= '0;
      lb_dn  <= LB_DN_IDLE;
      done   <= 1'b0;
    end else begin
      lb_dn <= LB_DN_IDLE;
      done  <= 1'b0;
      if (st_q != S_IDLE && lb_up.rdy) rdy_q <= rdy_q + 1'b1;
      case (st_q)
        S_IDLE: if (req_valid && req_len != '0) begin
          st_q   <= S_ADL;
          wr_q   <= req_wr;
          addr_q <= req_addr;
          len_q  <= (req_len > LW'(MAXLEN)) ? LW'(MAXLEN) : req_len;
          sent_q <= '0;
          rdy_q  <= '0;
        end
        S_ADL: begin
          lb_dn.dwr <= addr_q[15:0];
          lb_dn.ads <= 1'b1;
          st_q      <= S_ADH;
        end
        S_ADH: begin
          lb_dn.dwr <= addr_q[31:16];
          lb_dn.ads <= 1'b1;
          st_q      <= S_DATA;
        end
        S_DATA: begin
          lb_dn.dwr <= wr_q ? wdata : '0;
          lb_dn.wr  <= wr_q;
          lb_dn.rd  <= !wr_q;
          sent_q    <= sent_q + 1'b1;
          if (sent_q + 1'b1 == len_q) st_q <= S_WAIT;
        end
        S_WAIT: if ((rdy_q + LW'(lb_up.rdy)) == len_q) begin
          st_q <= S_IDLE;
          done <= 1'b1;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end
endmodule
