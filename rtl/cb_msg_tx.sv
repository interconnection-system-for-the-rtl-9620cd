// Control bus message sender.
//
// On req (while idle) it latches a message type and 1..4 parameter words and
// sends them as one control bus packet: a header word with the type in bits
// [15:12] (the endpoint fills in bits [3:0]) followed by the parameters, one
// word per cycle while the receiver is ready. busy is high from the cycle
// after req until the last word has been taken.
module cb_msg_tx
  import nc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        req,
  input  cb_msg_t     req_type,
  input  logic [2:0]  req_n,
  input  logic [15:0] req_p [4],
  output logic        busy,
  output cb_word_t    out,
  output logic        out_src_rdy,
  input  logic        out_dst_rdy
);
  cb_msg_t     type_q;
  logic [2:0]  n_q, idx_q;
  logic [15:0] p_q [4];

  assign out_src_rdy = busy;
  always_comb begin
    out.sop  = (idx_q == '0);
    out.eop  = (idx_q == n_q);
    out.data = (idx_q == '0) ? {type_q, 12'h000} : p_q[2'(idx_q - 1'b1)];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      type_q <= cb_msg_t'(4'd0);
      n_q    <= '0;
      idx_q  <= '0;
      for (int i = 0; i < 4; i++) p_q[i] <= '0;
    end else if (busy) begin
      if (out_dst_rdy) begin
        idx_q <= idx_q + 1'b1;
        if (idx_q == n_q) busy <= 1'b0;
      end
    end else if (req) begin
      busy   <= 1'b1;
      type_q <= req_type;
      n_q    <= (req_n > 3'd4) ? 3'd4 : req_n;
      idx_q  <= '0;
      p_q    <= req_p;
    end
  end
endmodule
