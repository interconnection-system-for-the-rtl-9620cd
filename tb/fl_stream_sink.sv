// Testbench helper: collects a packet stream of W-bit words into the queue
// q, holding dst_rdy low at random when STALL is set. stalls counts cycles
// with a word offered and not taken.
module fl_stream_sink #(
  parameter int unsigned W     = 66,
  parameter bit          STALL = 1'b1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  input  logic         src_rdy,
  output logic         dst_rdy
);
  logic [W-1:0] q [$];
  int got = 0, stalls = 0;

  bit steady = 0;   // set to take every word without stalls
  initial dst_rdy = 0;
  always @(posedge clk) begin
    if (!rst && src_rdy && dst_rdy) begin
      q.push_back(d);
      got++;
    end
    if (!rst && src_rdy && !dst_rdy) stalls++;
  end
  always @(negedge clk) dst_rdy = !rst && !(STALL && !steady && $urandom_range(0, 2) == 0);
endmodule
