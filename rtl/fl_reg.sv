// Register slice for a packet stream (src_rdy/dst_rdy handshake).
//
// A two-entry buffer: every output, including in_dst_rdy, comes from a
// flip-flop, so the slice cuts all combinational paths between the two sides
// while still passing one word per cycle. This is what makes the switches of
// the buses pipeline stages. Payload W bits (data, sop and eop packed
// together by the user). A word entering in cycle t can leave in cycle t+1.
module fl_reg #(
  parameter int unsigned W = 18
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in_data,
  input  logic         in_src_rdy,
  output logic         in_dst_rdy,
  output logic [W-1:0] out_data,
  output logic         out_src_rdy,
  input  logic         out_dst_rdy
);
  logic [W-1:0] main_q, skid_q;
  logic         main_v, skid_v;

  assign out_data    = main_q;
  assign out_src_rdy = main_v;
  assign in_dst_rdy  = !skid_v;

  always_ff @(posedge clk) begin
    if (rst) begin
      main_v <= 1'b0;
      skid_v <= 1'b0;
      main_q <= '0;
      skid_q <= '0;
    end else begin
      if (!main_v || out_dst_rdy) begin
        // main slot is free or drains this cycle
        if (skid_v) begin
          main_q <= skid_q;
          main_v <= 1'b1;
          skid_v <= 1'b0;
        end else begin
          main_q <= in_data;
          main_v <= in_src_rdy;
        end
      end else if (in_src_rdy && !skid_v) begin
        // main is stalled: park the incoming word
        skid_q <= in_data;
        skid_v <= 1'b1;
      end
    end
  end

  // stream rule: a word offered and not taken stays offered, unchanged
  a_hold: assert property (@(posedge clk) disable iff (rst)
    (out_src_rdy && !out_dst_rdy) |=> (out_src_rdy && $stable(out_data)));
endmodule
