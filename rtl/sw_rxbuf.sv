// Software receive buffer.
//
// Holds packets arriving from the network until the DMA processor has had
// them copied to host RAM. The packet memory is a circular buffer of
// 2**BAW words of DW bits; offsets and lengths count these words.
//
//  1. A packet arrives on net_in and is written at the buffer's write
//     pointer. When its last word is stored the buffer sends a NEW_PKT
//     message (offset, length, flags; flags are sampled with the eop word)
//     on the control bus. If the buffer is full, or a NEW_PKT message is
//     still waiting to go out, net_in is stalled.
//  2. A SEND_PKT message (offset, address high, address low, length) makes
//     the buffer's DMA engine send the packet on the internal bus: one header
//     word with the host address in bits [31:0], then the data words.
//  3. When the last word has gone, the buffer sends an ACK message with the
//     packet's offset.
//  4. A RELEASE message (length) frees the oldest length words of the
//     buffer, so packets must be released in the order they arrived.
// ACK messages go out before NEW_PKT messages when both wait.
// The four steps and the message contents follow the platform's packet
// reception example; the buffer organisation, the message encoding and the
// internal bus write format are this design's own.
module sw_rxbuf
  import nc_pkg::*;
#(
  parameter int unsigned DW  = 64,
  parameter int unsigned BAW = 9
) (
  input  logic          clk,
  input  logic          rst,
  // from the network interface
  input  logic [DW-1:0] net_in_data,
  input  logic          net_in_sop,
  input  logic          net_in_eop,
  input  logic [15:0]   net_in_flags,
  input  logic          net_in_src_rdy,
  output logic          net_in_dst_rdy,
  // to the internal bus (DMA writes towards host RAM)
  output logic [DW-1:0] ib_out_data,
  output logic          ib_out_sop,
  output logic          ib_out_eop,
  output logic          ib_out_src_rdy,
  input  logic          ib_out_dst_rdy,
  // control bus endpoint user side
  input  cb_word_t      cb_rx,
  input  logic          cb_rx_src_rdy,
  output logic          cb_rx_dst_rdy,
  output cb_word_t      cb_tx,
  output logic          cb_tx_src_rdy,
  input  logic          cb_tx_dst_rdy
);
  localparam int unsigned DEPTH = 2**BAW;
  typedef logic [BAW-1:0] ptr_t;
  typedef logic [BAW:0]   cnt_t;

  // ---------------- packet store ----------------
  ptr_t wp_q;            // first word of the packet being received
  cnt_t cur_q;           // words of that packet stored so far
  cnt_t used_q;          // committed words not yet released
  logic new_pend_q;
  logic [15:0] new_p [4];
  logic acc;

  assign acc = net_in_src_rdy && (used_q + cur_q < cnt_t'(DEPTH)) &&
               !(net_in_eop && new_pend_q);
  assign net_in_dst_rdy = acc;

  logic [BAW-1:0] mem_raddr;
  logic [DW-1:0]  mem_rdata;
  dp_ram #(.AW(BAW), .DW(DW)) u_mem (
    .clk, .we(acc), .waddr(wp_q + ptr_t'(cur_q)), .wdata(net_in_data),
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

  logic        ack_pend_q;
  logic [15:0] ack_off_q;
  logic        t_busy, t_req;
  cb_msg_t     t_type;
  logic [2:0]  t_n;
  logic [15:0] t_p [4];

  always_comb begin
    t_req  = !t_busy && (ack_pend_q || new_pend_q);
    t_type = ack_pend_q ? MSG_ACK : MSG_NEW_PKT;
    t_n    = ack_pend_q ? 3'd1 : 3'd3;
    t_p    = ack_pend_q ? '{ack_off_q, 16'h0, 16'h0, 16'h0} : new_p;
  end

  cb_msg_tx u_mtx (
    .clk, .rst, .req(t_req), .req_type(t_type), .req_n(t_n), .req_p(t_p),
    .busy(t_busy), .out(cb_tx), .out_src_rdy(cb_tx_src_rdy), .out_dst_rdy(cb_tx_dst_rdy)
  );

  // ---------------- DMA engine ----------------
  typedef enum logic [1:0] {D_IDLE, D_HDR, D_DATA} dma_t;
  dma_t        d_q;
  logic [31:0] d_addr_q;
  logic [15:0] d_off_q;
  logic        r_start, r_busy, r_done;
  logic [DW-1:0] r_data;
  logic        r_sop, r_eop, r_v, r_rdy;

  logic rel_now;
  assign rel_now = m_valid && m_type == MSG_RELEASE;
  assign m_take  = m_valid && (m_type != MSG_SEND_PKT || (d_q == D_IDLE && !ack_pend_q));
  // the reader starts together with the header, so its first words are
  // fetched while the header waits and follow it without a gap
  assign r_start = (d_q == D_IDLE) && m_valid && m_type == MSG_SEND_PKT && !ack_pend_q &&
                   (m_p[3] != '0);

  buf_reader #(.AW(BAW), .DW(DW)) u_rd (
    .clk, .rst, .start(r_start), .start_addr(ptr_t'(m_p[0])), .len(cnt_t'(m_p[3])),
    .busy(r_busy), .done(r_done), .raddr(mem_raddr), .rdata(mem_rdata),
    .out_data(r_data), .out_sop(r_sop), .out_eop(r_eop), .out_src_rdy(r_v), .out_dst_rdy(r_rdy)
  );

  always_comb begin
    ib_out_data    = r_data;
    ib_out_sop     = 1'b0;
    ib_out_eop     = r_eop;
    ib_out_src_rdy = (d_q == D_DATA) && r_v;
    r_rdy          = (d_q == D_DATA) && ib_out_dst_rdy;
    if (d_q == D_HDR) begin
      ib_out_data    = DW'(d_addr_q);
      ib_out_sop     = 1'b1;
      ib_out_eop     = 1'b0;
      ib_out_src_rdy = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp_q       <= '0;
      cur_q      <= '0;
      used_q     <= '0;
      new_pend_q <= 1'b0;
      for (int i = 0; i < 4; i++) new_p[i] <= '0;
      ack_pend_q <= 1'b0;
      ack_off_q  <= '0;
      d_q        <= D_IDLE;
      d_addr_q   <= '0;
      d_off_q    <= '0;
    end else begin
      cnt_t add, sub;
      add = '0;
      sub = '0;
      // receive
      if (acc) begin
        if (net_in_eop) begin
          add        = cur_q + 1'b1;
          wp_q       <= wp_q + ptr_t'(cur_q + 1'b1);
          cur_q      <= '0;
          new_pend_q <= 1'b1;
          new_p      <= '{16'(wp_q), 16'(cur_q + 1'b1), net_in_flags, 16'h0};
        end else begin
          cur_q <= cur_q + 1'b1;
        end
      end
      if (t_req && !ack_pend_q) new_pend_q <= 1'b0;
      if (t_req && ack_pend_q)  ack_pend_q <= 1'b0;
      // release
      if (rel_now) sub = (cnt_t'(m_p[0]) > used_q) ? used_q : cnt_t'(m_p[0]);
      used_q <= used_q + add - sub;
      // DMA
      case (d_q)
        D_IDLE: if (m_valid && m_type == MSG_SEND_PKT && !ack_pend_q) begin
          if (m_p[3] != '0) begin
            d_q      <= D_HDR;
            d_off_q  <= m_p[0];
            d_addr_q <= {m_p[1], m_p[2]};
          end
        end
        D_HDR:  if (ib_out_dst_rdy) d_q <= D_DATA;
        D_DATA: if (r_done) begin
          d_q        <= D_IDLE;
          ack_pend_q <= 1'b1;
          ack_off_q  <= d_off_q;
        end
        default: d_q <= D_IDLE;
      endcase
    end
  end
endmodule
