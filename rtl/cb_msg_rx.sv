// Control bus message receiver.
//
// Collects one control bus packet into a message: the message type from
// header bits [15:12] and up to four 16-bit parameter words (words beyond the
// fourth are discarded, missing ones read as zero). When the last word has
// arrived the message is held on msg_* with msg_valid until the user pulses
// msg_take; meanwhile the stream is stalled, so messages are handled one at a
// time and none is lost. A message is ready one cycle after its eop word.
module cb_msg_rx
  import nc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  cb_word_t    in,
  input  logic        in_src_rdy,
  output logic        in_dst_rdy,
  output logic        msg_valid,
  output cb_msg_t     msg_type,
  output logic [15:0] msg_p [4],
  input  logic        msg_take
);
  logic [2:0] n_q;

  assign in_dst_rdy = !msg_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      msg_valid <= 1'b0;
      msg_type  <= cb_msg_t'(4'd0);
      n_q       <= '0;
      for (int i = 0; i < 4; i++) msg_p[i] <= '0;
    end else begin
      if (msg_valid && msg_take) msg_valid <= 1'b0;
      if (in_src_rdy && in_dst_rdy) begin
        if (in.sop) begin
          msg_type <= cb_msg_t'(in.data[15:12]);
          for (int i = 0; i < 4; i++) msg_p[i] <= '0;
          n_q <= '0;
        end else if (n_q < 3'd4) begin
          msg_p[n_q[1:0]] <= in.data;
          n_q <= n_q + 1'b1;
        end
        if (in.eop) msg_valid <= 1'b1;
      end
    end
  end
endmodule
