// Software transmit buffer.
//
// Holds packets that a DMA transfer has brought from host RAM until the DMA
// processor tells the buffer to send them to the network.
//
//  1. The DMA transfer arrives on the internal bus as write packets: a
//     header word whose bits [BAW-1:0] give the buffer offset, then data
//     words stored at offset, offset+1, ... The buffer always accepts them.
//  2. A SEND_PKT message (offset, length, flags) makes the buffer stream
//     length words from offset to the network interface on net_out, with
//     the flags alongside.
//  3. When the last word has gone, the buffer sends an ACK message with the
//     packet's offset on the control bus.
// Messages are handled one at a time: a second SEND_PKT waits (stalling the
// control bus link) until the previous packet and its ACK are out.
// The steps and message contents follow the platform's packet transmission
// example; the buffer organisation, the message encoding and the internal
// bus write format are this design's own. Offsets and lengths count DW-bit
// words of the 2**BAW-word buffer.
module sw_txbuf
  import nc_pkg::*;
#(
  parameter int unsigned DW  = 64,
  parameter int unsigned BAW = 9
) (
  input  logic          clk,
  input  logic          rst,
  // from the internal bus (DMA writes from host RAM)
  input  logic [DW-1:0] ib_in_data,
  input  logic          ib_in_sop,
  input  logic          ib_in_eop,
  input  logic          ib_in_src_rdy,
  output logic          ib_in_dst_rdy,
  // to the network interface
  output logic [DW-1:0] net_out_data,
  output logic          net_out_sop,
  output logic          net_out_eop,
  output logic [15:0]   net_out_flags,
  output logic          net_out_src_rdy,
  input  logic          net_out_dst_rdy,
  // control bus endpoint user side
  input  cb_word_t      cb_rx,
  input  logic          cb_rx_src_rdy,
  output logic          cb_rx_dst_rdy,
  output cb_word_t      cb_tx,
  output logic          cb_tx_src_rdy,
  input  logic          cb_tx_dst_rdy
);
  typedef logic [BAW-1:0] ptr_t;

  // ---------------- DMA writes into the buffer ----------------
  ptr_t wofs_q;
  logic we;
  assign ib_in_dst_rdy = 1'b1;
  assign we = ib_in_src_rdy && !ib_in_sop;

  always_ff @(posedge clk) begin
    if (rst)                          wofs_q <= '0;
    else if (ib_in_src_rdy && ib_in_sop) wofs_q <= ib_in_data[BAW-1:0];
    else if (we)                      wofs_q <= wofs_q + 1'b1;
  end

  logic [BAW-1:0] mem_raddr;
  logic [DW-1:0]  mem_rdata;
  dp_ram #(.AW(BAW), .DW(DW)) u_mem (
    .clk, .we(we), .waddr(wofs_q), .wdata(ib_in_data),
    .raddr(mem_raddr), .rdata(mem_rdata)
  );

  // ---------------- control messages ----------------
  logic        m_valid, m_take;
  cb_msg_t     m_type;
  logic [15:0] m_p [4];

  cb_msg_rx u_mrx (
    .clk, .rst, .in(cb_rx), .in_src_rdy(cb_rx_src_rdy), .in_dst_rdy(cb_rx_dst_rdy),
    .msg_valid(m_valid), .msg_type(m_type), .msg_p(m_p), .msg_take(m_take)
  );

  logic        ack_pend_q, t_busy, r_busy, r_done;
  logic [15:0] off_q;

  assign m_take = m_valid && (m_type != MSG_SEND_PKT || (!r_busy && !ack_pend_q));

  buf_reader #(.AW(BAW), .DW(DW)) u_rd (
    .clk, .rst,
    .start(m_valid && m_type == MSG_SEND_PKT && !r_busy && !ack_pend_q),
    .start_addr(ptr_t'(m_p[0])), .len((BAW+1)'(m_p[1])),
    .busy(r_busy), .done(r_done), .raddr(mem_raddr), .rdata(mem_rdata),
    .out_data(net_out_data), .out_sop(net_out_sop), .out_eop(net_out_eop),
    .out_src_rdy(net_out_src_rdy), .out_dst_rdy(net_out_dst_rdy)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ack_pend_q    <= 1'b0;
      off_q         <= '0;
      net_out_flags <= '0;
    end else begin
      if (m_take && m_type == MSG_SEND_PKT) begin
        off_q         <= m_p[0];
        net_out_flags <= m_p[2];
      end
      if (r_done) ack_pend_q <= 1'b1;
      else if (ack_pend_q && !t_busy) ack_pend_q <= 1'b0;
    end
  end

  cb_msg_tx u_mtx (
    .clk, .rst, .req(ack_pend_q && !t_busy), .req_type(MSG_ACK), .req_n(3'd1),
    .req_p('{off_q, 16'h0, 16'h0, 16'h0}),
    .busy(t_busy), .out(cb_tx), .out_src_rdy(cb_tx_src_rdy), .out_dst_rdy(cb_tx_dst_rdy)
  );
endmodule
