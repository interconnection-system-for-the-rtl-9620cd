// Packet arbiter: merges N packet streams into one, a whole packet at a time.
//
// Payload words are packed as {data, sop, eop}, so bit 0 is eop. When the
// output is free the arbiter grants the first requesting input at or after
// its round-robin pointer, in the same cycle, and keeps that grant until the
// granted input's eop word has passed; the pointer then moves past the winner.
// in_req[i] says input i has a word for this output; in_ack[i] is high in the
// cycle input i's word is taken. Purely combinational from request to
// output apart from the grant state, so it is meant to sit between register
// slices.
module fl_arb #(
  parameter int unsigned N = 2,
  parameter int unsigned W = 18
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in_data [N],
  input  logic [N-1:0] in_req,
  output logic [N-1:0] in_ack,
  output logic [W-1:0] out_data,
  output logic         out_src_rdy,
  input  logic         out_dst_rdy
);
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;

  logic          locked_q;
  logic [SW-1:0] grant_q, rr_q, pick, sel;
  logic          pick_v;

  // round-robin choice among the requesting inputs
  always_comb begin
    pick   = '0;
    pick_v = 1'b0;
    for (int k = N - 1; k >= 0; k--) begin
      int unsigned idx;
      idx = (int'(rr_q) + k) % N;
      if (in_req[idx]) begin
        pick   = SW'(idx);
        pick_v = 1'b1;
      end
    end
  end

  assign sel         = locked_q ? grant_q : pick;
  assign out_src_rdy = locked_q ? in_req[grant_q] : pick_v;
  assign out_data    = in_data[sel];

  always_comb begin
    in_ack = '0;
    if (out_src_rdy && out_dst_rdy) in_ack[sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      locked_q <= 1'b0;
      grant_q  <= '0;
      rr_q     <= '0;
    end else if (out_src_rdy && out_dst_rdy) begin
      if (out_data[0]) begin
        locked_q <= 1'b0;
        rr_q     <= (int'(sel) == N - 1) ? '0 : sel + 1'b1;
      end else begin
        locked_q <= 1'b1;
        grant_q  <= sel;
      end
    end
  end
endmodule
