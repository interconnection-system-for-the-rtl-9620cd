// Control bus endpoint.
//
// Joins one user component to the control bus. From the bus it passes on only
// the packets whose header (first word) carries this endpoint's ID in bits
// [3:0]; packets for other endpoints are taken and dropped. Towards the bus
// it writes ID into bits [3:0] of the header of every packet the user sends,
// so the root can sort arriving packets by source. Both directions go
// through a register slice (two cycles without stalls). The filtering by
// identification follows the bus's description; the header field and the
// dropping of foreign packets are this design's choice.
module cb_endpoint
  import nc_pkg::*;
#(
  parameter cb_id_t ID = '0
) (
  input  logic     clk,
  input  logic     rst,
  // link to the switch
  input  cb_word_t cb_in,
  input  logic     cb_in_src_rdy,
  output logic     cb_in_dst_rdy,
  output cb_word_t cb_out,
  output logic     cb_out_src_rdy,
  input  logic     cb_out_dst_rdy,
  // user side
  output cb_word_t u_rx,
  output logic     u_rx_src_rdy,
  input  logic     u_rx_dst_rdy,
  input  cb_word_t u_tx,
  input  logic     u_tx_src_rdy,
  output logic     u_tx_dst_rdy
);
  localparam int unsigned W = $bits(cb_word_t);

  // ---------------- receive: filter ----------------
  logic [W-1:0] r_data;
  logic         r_v, r_take, mine_q, mine;
  cb_word_t     r_word;
  logic         rx_rdy;

  fl_reg #(.W(W)) u_rx_in (
    .clk, .rst,
    .in_data(cb_in), .in_src_rdy(cb_in_src_rdy), .in_dst_rdy(cb_in_dst_rdy),
    .out_data(r_data), .out_src_rdy(r_v), .out_dst_rdy(r_take)
  );
  assign r_word = cb_word_t'(r_data);
  assign mine   = r_word.sop ? (r_word.data[CB_IDW-1:0] == ID) : mine_q;
  assign r_take = r_v && (mine ? rx_rdy : 1'b1);

  always_ff @(posedge clk) begin
    if (rst)                         mine_q <= 1'b0;
    else if (r_v && r_take)          mine_q <= mine;
  end

  logic [W-1:0] ur;
  fl_reg #(.W(W)) u_rx_out (
    .clk, .rst,
    .in_data(r_data), .in_src_rdy(r_v && mine), .in_dst_rdy(rx_rdy),
    .out_data(ur), .out_src_rdy(u_rx_src_rdy), .out_dst_rdy(u_rx_dst_rdy)
  );
  assign u_rx = cb_word_t'(ur);

  // ---------------- transmit: stamp source ----------------
  cb_word_t t_word;
  always_comb begin
    t_word = u_tx;
    if (u_tx.sop) t_word.data[CB_IDW-1:0] = ID;
  end

  logic [W-1:0] uo;
  fl_reg #(.W(W)) u_tx_reg (
    .clk, .rst,
    .in_data(t_word), .in_src_rdy(u_tx_src_rdy), .in_dst_rdy(u_tx_dst_rdy),
    .out_data(uo), .out_src_rdy(cb_out_src_rdy), .out_dst_rdy(cb_out_dst_rdy)
  );
  assign cb_out = cb_word_t'(uo);
endmodule
