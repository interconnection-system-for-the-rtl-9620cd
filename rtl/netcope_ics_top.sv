// NetCOPE interconnection system.
//
// The three buses of the platform, each a tree of register-sliced switches:
//  * internal bus: one ib_switch (64-bit full duplex packet links). Its
//    upstream link, towards the PCI bridge, is brought out. Downstream port 0
//    serves the packet buffers (writes addressed to 0x0xxxxxxx land in the
//    transmit buffer, the receive buffer's DMA writes go upstream), and
//    downstream port 1 (0x1xxxxxxx) is brought out for another
//    high-throughput component;
//  * local bus: an lb_root (the initiator inside the internal-to-local bus
//    bridge) driving an lb_switch with two lb_endpoint slaves, windows of
//    256 words at word addresses 0x0000 and 0x0100; the root's request port
//    and the endpoints' user memory ports are brought out;
//  * control bus: a cb_root with its sixteen RX and TX queues, its user side
//    (memories and registers, used by the DMA processor) brought out, and
//    two switches in the arrangement of the DMA connection example: the first
//    switch feeds endpoint 0 (the DMA controller's own endpoint) and a second
//    switch, which feeds endpoints 1, 2 and 3 (the bus master of the packet
//    buffers, the transmit buffer and the receive buffer). Endpoints 2 and 3
//    are wired to sw_txbuf and sw_rxbuf; the user streams of endpoints 0 and
//    1 are brought out;
//  * packet buffers: sw_rxbuf takes packets from the network (net_rx_*),
//    sw_txbuf delivers packets to the network (net_tx_*).
// A packet therefore travels network -> sw_rxbuf -> internal bus -> host
// under control of messages through the control bus root, and back from the
// host -> internal bus -> sw_txbuf -> network.
// All share the 125 MHz clock and the reset. The PCI bridge, the bridge
// from the internal bus to the local bus and the DMA processor are outside
// this design; their sides are ports.
module netcope_ics_top
  import nc_pkg::*;
#(
  parameter int unsigned IB_DW = 64
) (
  input  logic             clk,
  input  logic             rst,
  // ---------------- internal bus ----------------
  input  logic [IB_DW-1:0] ib_up_in_data,
  input  logic             ib_up_in_sop,
  input  logic             ib_up_in_eop,
  input  logic             ib_up_in_src_rdy,
  output logic             ib_up_in_dst_rdy,
  output logic [IB_DW-1:0] ib_up_out_data,
  output logic             ib_up_out_sop,
  output logic             ib_up_out_eop,
  output logic             ib_up_out_src_rdy,
  input  logic             ib_up_out_dst_rdy,
  input  logic [IB_DW-1:0] ib_p1_in_data,
  input  logic             ib_p1_in_sop,
  input  logic             ib_p1_in_eop,
  input  logic             ib_p1_in_src_rdy,
  output logic             ib_p1_in_dst_rdy,
  output logic [IB_DW-1:0] ib_p1_out_data,
  output logic             ib_p1_out_sop,
  output logic             ib_p1_out_eop,
  output logic             ib_p1_out_src_rdy,
  input  logic             ib_p1_out_dst_rdy,
  // ---------------- network side of the packet buffers ----------------
  input  logic [IB_DW-1:0] net_rx_data,
  input  logic             net_rx_sop,
  input  logic             net_rx_eop,
  input  logic [15:0]      net_rx_flags,
  input  logic             net_rx_src_rdy,
  output logic             net_rx_dst_rdy,
  output logic [IB_DW-1:0] net_tx_data,
  output logic             net_tx_sop,
  output logic             net_tx_eop,
  output logic [15:0]      net_tx_flags,
  output logic             net_tx_src_rdy,
  input  logic             net_tx_dst_rdy,
  // ---------------- local bus ----------------
  input  logic             lb_req_valid,
  output logic             lb_req_ready,
  input  logic             lb_req_wr,
  input  logic [31:0]      lb_req_addr,
  input  logic [8:0]       lb_req_len,
  input  logic [15:0]      lb_wdata,
  output logic             lb_wdata_take,
  output logic [15:0]      lb_rdata,
  output logic             lb_rdata_vld,
  output logic             lb_done,
  output logic [7:0]       lbe_addr  [2],
  output logic [15:0]      lbe_wdata [2],
  output logic             lbe_we    [2],
  output logic             lbe_re    [2],
  input  logic [15:0]      lbe_rdata [2],
  // ---------------- control bus: root user side ----------------
  input  logic [9:0]       cbr_rxm_addr,
  output logic [15:0]      cbr_rxm_rdata,
  input  logic             cbr_txm_we,
  input  logic [9:0]       cbr_txm_addr,
  input  logic [15:0]      cbr_txm_wdata,
  input  logic [5:0]       cbr_reg_addr,
  input  logic             cbr_reg_we,
  input  logic [31:0]      cbr_reg_wdata,
  output logic [31:0]      cbr_reg_rdata,
  // ---------------- control bus: user sides of endpoints 0 and 1 ----------------
  output cb_word_t         cbe_rx         [2],
  output logic             cbe_rx_src_rdy [2],
  input  logic             cbe_rx_dst_rdy [2],
  input  cb_word_t         cbe_tx         [2],
  input  logic             cbe_tx_src_rdy [2],
  output logic             cbe_tx_dst_rdy [2]
);
  // ================= internal bus =================
  logic [IB_DW-1:0] ib_dn_in_data [2], ib_dn_out_data [2];
  logic ib_dn_in_sop [2], ib_dn_in_eop [2], ib_dn_in_src_rdy [2], ib_dn_in_dst_rdy [2];
  logic ib_dn_out_sop [2], ib_dn_out_eop [2], ib_dn_out_src_rdy [2], ib_dn_out_dst_rdy [2];

  assign ib_dn_in_data[1]    = ib_p1_in_data;
  assign ib_dn_in_sop[1]     = ib_p1_in_sop;
  assign ib_dn_in_eop[1]     = ib_p1_in_eop;
  assign ib_dn_in_src_rdy[1] = ib_p1_in_src_rdy;
  assign ib_p1_in_dst_rdy    = ib_dn_in_dst_rdy[1];
  assign ib_p1_out_data      = ib_dn_out_data[1];
  assign ib_p1_out_sop       = ib_dn_out_sop[1];
  assign ib_p1_out_eop       = ib_dn_out_eop[1];
  assign ib_p1_out_src_rdy   = ib_dn_out_src_rdy[1];
  assign ib_dn_out_dst_rdy[1] = ib_p1_out_dst_rdy;

  ib_switch #(.DW(IB_DW)) u_ib_sw (
    .clk, .rst,
    .up_in_data(ib_up_in_data), .up_in_sop(ib_up_in_sop), .up_in_eop(ib_up_in_eop),
    .up_in_src_rdy(ib_up_in_src_rdy), .up_in_dst_rdy(ib_up_in_dst_rdy),
    .up_out_data(ib_up_out_data), .up_out_sop(ib_up_out_sop), .up_out_eop(ib_up_out_eop),
    .up_out_src_rdy(ib_up_out_src_rdy), .up_out_dst_rdy(ib_up_out_dst_rdy),
    .dn_in_data(ib_dn_in_data), .dn_in_sop(ib_dn_in_sop), .dn_in_eop(ib_dn_in_eop),
    .dn_in_src_rdy(ib_dn_in_src_rdy), .dn_in_dst_rdy(ib_dn_in_dst_rdy),
    .dn_out_data(ib_dn_out_data), .dn_out_sop(ib_dn_out_sop), .dn_out_eop(ib_dn_out_eop),
    .dn_out_src_rdy(ib_dn_out_src_rdy), .dn_out_dst_rdy(ib_dn_out_dst_rdy)
  );

  // ================= local bus =================
  lb_dn_t root_dn;
  lb_up_t root_up;
  lb_dn_t ep_dn [2];
  lb_up_t ep_up [2];

  lb_root #(.MAXLEN(256)) u_lb_root (
    .clk, .rst,
    .req_valid(lb_req_valid), .req_ready(lb_req_ready), .req_wr(lb_req_wr),
    .req_addr(lb_req_addr), .req_len(lb_req_len),
    .wdata(lb_wdata), .wdata_take(lb_wdata_take),
    .rdata(lb_rdata), .rdata_vld(lb_rdata_vld), .done(lb_done),
    .lb_dn(root_dn), .lb_up(root_up)
  );

  lb_switch #(.N(2)) u_lb_sw (
    .clk, .rst, .up_dn(root_dn), .up_up(root_up), .dn_dn(ep_dn), .dn_up(ep_up)
  );

  for (genvar e = 0; e < 2; e++) begin : g_lbe
    lb_endpoint #(.BASE(32'h100 * e), .AW(8)) u_lbe (
      .clk, .rst, .lb_dn(ep_dn[e]), .lb_up(ep_up[e]),
      .u_addr(lbe_addr[e]), .u_wdata(lbe_wdata[e]), .u_we(lbe_we[e]),
      .u_re(lbe_re[e]), .u_rdata(lbe_rdata[e])
    );
  end

  // ================= control bus =================
  cb_word_t r_dn, r_up;
  logic     r_dn_v, r_dn_r, r_up_v, r_up_r;

  cb_root #(.NQ(16), .QAW(6)) u_cb_root (
    .clk, .rst,
    .cb_in(r_up), .cb_in_src_rdy(r_up_v), .cb_in_dst_rdy(r_up_r),
    .cb_out(r_dn), .cb_out_src_rdy(r_dn_v), .cb_out_dst_rdy(r_dn_r),
    .rxm_addr(cbr_rxm_addr), .rxm_rdata(cbr_rxm_rdata),
    .txm_we(cbr_txm_we), .txm_addr(cbr_txm_addr), .txm_wdata(cbr_txm_wdata),
    .reg_addr(cbr_reg_addr), .reg_we(cbr_reg_we), .reg_wdata(cbr_reg_wdata),
    .reg_rdata(cbr_reg_rdata)
  );

  // first switch: port 0 -> endpoint 0, port 1 -> second switch
  cb_word_t s0_do [2], s0_di [2];
  logic     s0_do_v [2], s0_do_r [2], s0_di_v [2], s0_di_r [2];

  cb_switch #(.N(2)) u_cb_sw0 (
    .clk, .rst,
    .up_in(r_dn), .up_in_src_rdy(r_dn_v), .up_in_dst_rdy(r_dn_r),
    .up_out(r_up), .up_out_src_rdy(r_up_v), .up_out_dst_rdy(r_up_r),
    .dn_out(s0_do), .dn_out_src_rdy(s0_do_v), .dn_out_dst_rdy(s0_do_r),
    .dn_in(s0_di), .dn_in_src_rdy(s0_di_v), .dn_in_dst_rdy(s0_di_r)
  );

  cb_word_t s1_do [3], s1_di [3];
  logic     s1_do_v [3], s1_do_r [3], s1_di_v [3], s1_di_r [3];

  cb_switch #(.N(3)) u_cb_sw1 (
    .clk, .rst,
    .up_in(s0_do[1]), .up_in_src_rdy(s0_do_v[1]), .up_in_dst_rdy(s0_do_r[1]),
    .up_out(s0_di[1]), .up_out_src_rdy(s0_di_v[1]), .up_out_dst_rdy(s0_di_r[1]),
    .dn_out(s1_do), .dn_out_src_rdy(s1_do_v), .dn_out_dst_rdy(s1_do_r),
    .dn_in(s1_di), .dn_in_src_rdy(s1_di_v), .dn_in_dst_rdy(s1_di_r)
  );

  cb_endpoint #(.ID(4'd0)) u_cbe0 (
    .clk, .rst,
    .cb_in(s0_do[0]), .cb_in_src_rdy(s0_do_v[0]), .cb_in_dst_rdy(s0_do_r[0]),
    .cb_out(s0_di[0]), .cb_out_src_rdy(s0_di_v[0]), .cb_out_dst_rdy(s0_di_r[0]),
    .u_rx(cbe_rx[0]), .u_rx_src_rdy(cbe_rx_src_rdy[0]), .u_rx_dst_rdy(cbe_rx_dst_rdy[0]),
    .u_tx(cbe_tx[0]), .u_tx_src_rdy(cbe_tx_src_rdy[0]), .u_tx_dst_rdy(cbe_tx_dst_rdy[0])
  );

  cb_endpoint #(.ID(4'd1)) u_cbe1 (
    .clk, .rst,
    .cb_in(s1_do[0]), .cb_in_src_rdy(s1_do_v[0]), .cb_in_dst_rdy(s1_do_r[0]),
    .cb_out(s1_di[0]), .cb_out_src_rdy(s1_di_v[0]), .cb_out_dst_rdy(s1_di_r[0]),
    .u_rx(cbe_rx[1]), .u_rx_src_rdy(cbe_rx_src_rdy[1]), .u_rx_dst_rdy(cbe_rx_dst_rdy[1]),
    .u_tx(cbe_tx[1]), .u_tx_src_rdy(cbe_tx_src_rdy[1]), .u_tx_dst_rdy(cbe_tx_dst_rdy[1])
  );

  // endpoints 2 (transmit buffer) and 3 (receive buffer)
  cb_word_t b_rx [2], b_tx [2];
  logic     b_rx_v [2], b_rx_r [2], b_tx_v [2], b_tx_r [2];

  for (genvar e = 2; e < 4; e++) begin : g_cbe
    cb_endpoint #(.ID(cb_id_t'(e))) u_cbe (
      .clk, .rst,
      .cb_in(s1_do[e-1]), .cb_in_src_rdy(s1_do_v[e-1]), .cb_in_dst_rdy(s1_do_r[e-1]),
      .cb_out(s1_di[e-1]), .cb_out_src_rdy(s1_di_v[e-1]), .cb_out_dst_rdy(s1_di_r[e-1]),
      .u_rx(b_rx[e-2]), .u_rx_src_rdy(b_rx_v[e-2]), .u_rx_dst_rdy(b_rx_r[e-2]),
      .u_tx(b_tx[e-2]), .u_tx_src_rdy(b_tx_v[e-2]), .u_tx_dst_rdy(b_tx_r[e-2])
    );
  end

  // ================= packet buffers =================
  sw_txbuf #(.DW(IB_DW), .BAW(9)) u_txbuf (
    .clk, .rst,
    .ib_in_data(ib_dn_out_data[0]), .ib_in_sop(ib_dn_out_sop[0]), .ib_in_eop(ib_dn_out_eop[0]),
    .ib_in_src_rdy(ib_dn_out_src_rdy[0]), .ib_in_dst_rdy(ib_dn_out_dst_rdy[0]),
    .net_out_data(net_tx_data), .net_out_sop(net_tx_sop), .net_out_eop(net_tx_eop),
    .net_out_flags(net_tx_flags), .net_out_src_rdy(net_tx_src_rdy), .net_out_dst_rdy(net_tx_dst_rdy),
    .cb_rx(b_rx[0]), .cb_rx_src_rdy(b_rx_v[0]), .cb_rx_dst_rdy(b_rx_r[0]),
    .cb_tx(b_tx[0]), .cb_tx_src_rdy(b_tx_v[0]), .cb_tx_dst_rdy(b_tx_r[0])
  );

  sw_rxbuf #(.DW(IB_DW), .BAW(9)) u_rxbuf (
    .clk, .rst,
    .net_in_data(net_rx_data), .net_in_sop(net_rx_sop), .net_in_eop(net_rx_eop),
    .net_in_flags(net_rx_flags), .net_in_src_rdy(net_rx_src_rdy), .net_in_dst_rdy(net_rx_dst_rdy),
    .ib_out_data(ib_dn_in_data[0]), .ib_out_sop(ib_dn_in_sop[0]), .ib_out_eop(ib_dn_in_eop[0]),
    .ib_out_src_rdy(ib_dn_in_src_rdy[0]), .ib_out_dst_rdy(ib_dn_in_dst_rdy[0]),
    .cb_rx(b_rx[1]), .cb_rx_src_rdy(b_rx_v[1]), .cb_rx_dst_rdy(b_rx_r[1]),
    .cb_tx(b_tx[1]), .cb_tx_src_rdy(b_tx_v[1]), .cb_tx_dst_rdy(b_tx_r[1])
  );
endmodule
