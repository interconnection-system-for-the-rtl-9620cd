// Streams a run of words out of a synchronous-read memory.
//
// On start (while idle) it latches a start address and a length (at least
// one), issues the first read in the same cycle, and reads the words at start, start+1, ... (wrapping), pushing each
// onto an output packet stream with sop on the first and eop on the last.
// Because the memory answers one cycle after the address, a three-entry
// buffer holds words already read while the output is stalled. A new read
// is issued only when the buffer has room for it counting the read still in
// flight; with three entries that leaves room for one read every cycle, so
// the stream runs at one word per cycle when the receiver keeps up, and
// out_dst_rdy reaches no memory address. done pulses with the last word.
module buf_reader #(
  parameter int unsigned AW = 9,
  parameter int unsigned DW = 64
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [AW-1:0] start_addr,
  input  logic [AW:0]   len,
  output logic          busy,
  output logic          done,
  // memory read port
  output logic [AW-1:0] raddr,
  input  logic [DW-1:0] rdata,
  // output stream
  output logic [DW-1:0] out_data,
  output logic          out_sop,
  output logic          out_eop,
  output logic          out_src_rdy,
  input  logic          out_dst_rdy
);
  logic [AW-1:0] base_q;
  logic [AW:0]   len_q, iss_q, outn_q;
  logic          inflight_q;
  logic [DW-1:0] f_data [3];
  logic [1:0]    f_wp, f_rp;
  logic [1:0]    f_cnt;
  logic          issue, fire;

  logic go;
  // the first read is issued in the start cycle itself
  assign go          = !busy && start && len != '0;
  assign issue       = go || (busy && (iss_q < len_q) && ((f_cnt + {1'b0, inflight_q}) < 2'd3));
  assign raddr       = go ? start_addr : base_q + AW'(iss_q);
  assign out_src_rdy = (f_cnt != 2'd0);
  assign out_data    = f_data[f_rp];
  assign out_sop     = (outn_q == '0);
  assign out_eop     = (outn_q + 1'b1 == len_q);
  assign fire        = out_src_rdy && out_dst_rdy;
  assign done        = fire && out_eop;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      base_q     <= '0;
      len_q      <= '0;
      iss_q      <= '0;
      outn_q     <= '0;
      inflight_q <= 1'b0;
      f_wp       <= '0;
      f_rp       <= '0;
      f_cnt      <= '0;
      f_data[0]  <= '0;
      f_data[1]  <= '0;
      f_data[2]  <= '0;
    end else begin
      inflight_q <= issue;
      if (issue) iss_q <= iss_q + 1'b1;
      if (inflight_q) begin
        f_data[f_wp] <= rdata;
        f_wp         <= (f_wp == 2'd2) ? 2'd0 : f_wp + 2'd1;
      end
      if (fire) begin
        f_rp   <= (f_rp == 2'd2) ? 2'd0 : f_rp + 2'd1;
        outn_q <= outn_q + 1'b1;
      end
      f_cnt <= f_cnt + {1'b0, inflight_q} - {1'b0, fire};
      if (done) busy <= 1'b0;
      if (go) begin
        busy   <= 1'b1;
        base_q <= start_addr;
        len_q  <= len;
        iss_q  <= (AW+1)'(1);
        outn_q <= '0;
      end
    end
  end
endmodule
