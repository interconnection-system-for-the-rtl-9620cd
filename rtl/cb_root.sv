// Control bus root.
//
// The root is the control bus's end inside the DMA controller. It keeps NQ
// receive and NQ transmit queues, one of each per endpoint, in two two-port
// memories of NQ * 2**QAW 16-bit items (1024 x 16 by default, one BlockRAM
// each), plus per-queue status and control registers.
//
// Receive: a packet from the bus is written into the RX queue named by header
// bits [3:0] (the source endpoint), at the queue's start pointer. When its
// last word is stored, the queue's start pointer and item count move by the
// packet length, so the user only ever sees whole packets. If the queue is
// full the root holds cb_in_dst_rdy low until the user frees room. The user
// reads items directly through rxm_addr = {queue, offset} (data one cycle
// later) and then writes the number it read to the queue's RX control
// register, which moves the end pointer and lowers the count.
//
// Transmit: the user reads the TX start pointer, writes a packet into the TX
// memory through txm_* at {queue, start pointer ...}, and writes its length
// to the queue's TX control register. The start pointer moves and a send is
// queued (one per queue; a second write while busy is ignored). The
// controller serves queued sends round robin: it reads the items from the TX
// memory, stamps the queue number into header bits [3:0] so the packet
// reaches that endpoint, sends them as one packet and, after the last word,
// moves the TX end pointer and clears busy.
//
// Registers, reg_addr = {sel[1:0], queue}, read data one cycle after the
// address:
//   read  sel 0: {RX end pointer, RX start pointer}   (16 bits each)
//   read  sel 1: RX item count
//   read  sel 2: {TX end pointer, TX start pointer}
//   read  sel 3: {busy (bit 31), TX free items}
//   write sel 0: number of RX items read
//   write sel 1: number of TX items to send
// The queues, their memories, the pointers and the two control registers
// follow the description of the root; the sizes, the register map, the full-
// queue stall and the one-send-per-queue rule are this design's choices.
module cb_root
  import nc_pkg::*;
#(
  parameter int unsigned NQ  = CB_NQ,
  parameter int unsigned QAW = 6
) (
  input  logic                          clk,
  input  logic                          rst,
  // control bus link (upstream port of the first switch)
  input  cb_word_t                      cb_in,
  input  logic                          cb_in_src_rdy,
  output logic                          cb_in_dst_rdy,
  output cb_word_t                      cb_out,
  output logic                          cb_out_src_rdy,
  input  logic                          cb_out_dst_rdy,
  // RX queue memory, user read port
  input  logic [$clog2(NQ)+QAW-1:0]     rxm_addr,
  output logic [CB_DW-1:0]              rxm_rdata,
  // TX queue memory, user write port
  input  logic                          txm_we,
  input  logic [$clog2(NQ)+QAW-1:0]     txm_addr,
  input  logic [CB_DW-1:0]              txm_wdata,
  // status / control registers
  input  logic [$clog2(NQ)+1:0]         reg_addr,
  input  logic                          reg_we,
  input  logic [31:0]                   reg_wdata,
  output logic [31:0]                   reg_rdata
);
  localparam int unsigned QIW   = $clog2(NQ);
  localparam int unsigned MAW   = QIW + QAW;
  localparam int unsigned DEPTH = 2**QAW;
  localparam int unsigned W     = $bits(cb_word_t);

  typedef logic [QAW-1:0] ptr_t;
  typedef logic [QAW:0]   cnt_t;

  // ------------------------------------------------------------------
  // register write decode
  // ------------------------------------------------------------------
  logic [1:0]     reg_sel;
  logic [QIW-1:0] reg_q;
  assign reg_sel = reg_addr[QIW+1:QIW];
  assign reg_q   = reg_addr[QIW-1:0];

  cnt_t wr_n;
  assign wr_n = (reg_wdata > DEPTH) ? cnt_t'(DEPTH) : cnt_t'(reg_wdata);

  // ------------------------------------------------------------------
  // receive path
  // ------------------------------------------------------------------
  ptr_t rx_start [NQ];
  ptr_t rx_end   [NQ];
  cnt_t rx_cnt   [NQ];

  logic [W-1:0]   r_data;
  cb_word_t       r_word;
  logic           r_v, r_take;
  logic [QIW-1:0] cur_q, cur_q_q;
  cnt_t           wofs_q;
  logic           room;

  fl_reg #(.W(W)) u_rx_in (
    .clk, .rst,
    .in_data(cb_in), .in_src_rdy(cb_in_src_rdy), .in_dst_rdy(cb_in_dst_rdy),
    .out_data(r_data), .out_src_rdy(r_v), .out_dst_rdy(r_take)
  );
  assign r_word = cb_word_t'(r_data);
  assign cur_q  = r_word.sop ? r_word.data[QIW-1:0] : cur_q_q;
  assign room   = (rx_cnt[cur_q] + (r_word.sop ? cnt_t'(0) : wofs_q)) < cnt_t'(DEPTH);
  assign r_take = r_v && room;

  logic     rx_we;
  logic [MAW-1:0] rx_waddr;
  assign rx_we    = r_take;
  assign rx_waddr = {cur_q, rx_start[cur_q] + ptr_t'(r_word.sop ? cnt_t'(0) : wofs_q)};

  dp_ram #(.AW(MAW), .DW(CB_DW)) u_rx_mem (
    .clk, .we(rx_we), .waddr(rx_waddr), .wdata(r_word.data),
    .raddr(rxm_addr), .rdata(rxm_rdata)
  );

  // packet length committed this cycle (0 if none)
  cnt_t rx_commit;
  assign rx_commit = (r_take && r_word.eop) ? ((r_word.sop ? cnt_t'(0) : wofs_q) + 1'b1) : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      wofs_q  <= '0;
      cur_q_q <= '0;
    end else if (r_take) begin
      cur_q_q <= cur_q;
      wofs_q  <= r_word.eop ? cnt_t'(0) : ((r_word.sop ? cnt_t'(0) : wofs_q) + 1'b1);
    end
  end

  always_ff @(posedge clk) begin
    for (int q = 0; q < NQ; q++) begin
      if (rst) begin
        rx_start[q] <= '0;
        rx_end[q]   <= '0;
        rx_cnt[q]   <= '0;
      end else begin
        cnt_t add, sub;
        add = (QIW'(q) == cur_q) ? rx_commit : cnt_t'(0);
        sub = '0;
        if (reg_we && reg_sel == 2'd0 && QIW'(q) == reg_q)
          sub = (wr_n > rx_cnt[q]) ? rx_cnt[q] : wr_n;
        rx_start[q] <= rx_start[q] + ptr_t'(add);
        rx_end[q]   <= rx_end[q]   + ptr_t'(sub);
        rx_cnt[q]   <= rx_cnt[q] + add - sub;
      end
    end
  end

  // ------------------------------------------------------------------
  // transmit path
  // ------------------------------------------------------------------
  ptr_t         tx_start [NQ];
  ptr_t         tx_end   [NQ];
  cnt_t         tx_used  [NQ];
  cnt_t         tx_len   [NQ];
  logic [NQ-1:0] tx_busy;

  typedef enum logic {TX_IDLE, TX_SEND} tx_state_t;
  tx_state_t      st_q;
  logic [QIW-1:0] cq_q, rr_q, pick;
  logic           pick_v;
  cnt_t           iss_q, outn_q;     // items read from memory / items sent
  logic           inflight_q;
  // three entries: room for one memory read per cycle, counting the read
  // still in flight, so a packet leaves at one word per cycle
  logic [CB_DW-1:0] f_data [3];
  logic [1:0]     f_wp, f_rp;
  logic [1:0]     f_cnt;
  logic [CB_DW-1:0] tx_rdata;
  logic           issue, t_v, t_rdy, t_fire, t_last;
  logic [W-1:0]   t_payload;
  cb_word_t       t_word;

  // round-robin choice of a queue with a pending send
  always_comb begin
    pick   = '0;
    pick_v = 1'b0;
    for (int k = NQ - 1; k >= 0; k--) begin
      logic [QIW-1:0] idx;
      idx = rr_q + QIW'(k);
      if (tx_busy[idx]) begin
        pick   = idx;
        pick_v = 1'b1;
      end
    end
  end

  assign issue = (st_q == TX_SEND) && (iss_q < tx_len[cq_q]) &&
                 ((f_cnt + {1'b0, inflight_q}) < 2'd3);

  dp_ram #(.AW(MAW), .DW(CB_DW)) u_tx_mem (
    .clk, .we(txm_we), .waddr(txm_addr), .wdata(txm_wdata),
    .raddr({cq_q, tx_end[cq_q] + ptr_t'(iss_q)}), .rdata(tx_rdata)
  );

  assign t_v    = (f_cnt != 2'd0);
  assign t_last = (outn_q + 1'b1) == tx_len[cq_q];
  always_comb begin
    t_word.data = f_data[f_rp];
    t_word.sop  = (outn_q == '0);
    t_word.eop  = t_last;
    if (outn_q == '0) t_word.data[QIW-1:0] = cq_q;
  end
  assign t_payload = t_word;
  assign t_fire    = t_v && t_rdy;

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q       <= TX_IDLE;
      cq_q       <= '0;
      rr_q       <= '0;
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
        f_data[f_wp] <= tx_rdata;
        f_wp         <= (f_wp == 2'd2) ? 2'd0 : f_wp + 2'd1;
      end
      if (t_fire) f_rp <= (f_rp == 2'd2) ? 2'd0 : f_rp + 2'd1;
      f_cnt <= f_cnt + {1'b0, inflight_q} - {1'b0, t_fire};
      case (st_q)
        TX_IDLE: if (pick_v) begin
          st_q   <= TX_SEND;
          cq_q   <= pick;
          iss_q  <= '0;
          outn_q <= '0;
        end
        TX_SEND: if (t_fire) begin
          outn_q <= outn_q + 1'b1;
          if (t_last) begin
            st_q <= TX_IDLE;
            rr_q <= cq_q + 1'b1;
          end
        end
        default: st_q <= TX_IDLE;
      endcase
    end
  end

  logic done_now;
  assign done_now = (st_q == TX_SEND) && t_fire && t_last;

  always_ff @(posedge clk) begin
    for (int q = 0; q < NQ; q++) begin
      if (rst) begin
        tx_start[q] <= '0;
        tx_end[q]   <= '0;
        tx_used[q]  <= '0;
        tx_len[q]   <= '0;
        tx_busy[q]  <= 1'b0;
      end else begin
        cnt_t add, sub;
        add = '0;
        sub = '0;
        if (done_now && cq_q == QIW'(q)) begin
          sub        = tx_len[q];
          tx_busy[q] <= 1'b0;
        end
        if (reg_we && reg_sel == 2'd1 && reg_q == QIW'(q) && !tx_busy[q] &&
            wr_n != '0 && wr_n <= cnt_t'(DEPTH) - tx_used[q]) begin
          add        = wr_n;
          tx_len[q]  <= wr_n;
          tx_busy[q] <= 1'b1;
        end
        tx_start[q] <= tx_start[q] + ptr_t'(add);
        tx_end[q]   <= tx_end[q]   + ptr_t'(sub);
        tx_used[q]  <= tx_used[q] + add - sub;
      end
    end
  end

  logic [W-1:0] co;
  fl_reg #(.W(W)) u_tx_out (
    .clk, .rst,
    .in_data(t_payload), .in_src_rdy(t_v), .in_dst_rdy(t_rdy),
    .out_data(co), .out_src_rdy(cb_out_src_rdy), .out_dst_rdy(cb_out_dst_rdy)
  );
  assign cb_out = cb_word_t'(co);

  // ------------------------------------------------------------------
  // status register read
  // ------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) reg_rdata <= '0;
    else begin
      case (reg_sel)
        2'd0: reg_rdata <= {16'(rx_end[reg_q]), 16'(rx_start[reg_q])};
        2'd1: reg_rdata <= 32'(rx_cnt[reg_q]);
        2'd2: reg_rdata <= {16'(tx_end[reg_q]), 16'(tx_start[reg_q])};
        default: reg_rdata <= {tx_busy[reg_q], 31'(cnt_t'(DEPTH) - tx_used[reg_q])};
      endcase
    end
  end
endmodule
