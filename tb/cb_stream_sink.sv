// Testbench helper: takes a control bus packet stream into a queue of words,
// holding dst_rdy low at random when STALL is set (or while pause is set).
// stalls counts cycles in which a word was offered but not taken.
module cb_stream_sink
  import nc_pkg::*;
#(
  parameter bit STALL = 1'b1
) (
  input  logic     clk,
  input  logic     rst,
  input  cb_word_t d,
  input  logic     src_rdy,
  output logic     dst_rdy
);
  cb_word_t q [$];
  int got = 0, stalls = 0;
  bit pause = 0;
  bit steady = 0;   // set to take every word without stalls

  initial dst_rdy = 0;
  always @(posedge clk) begin
    if (!rst && src_rdy && dst_rdy) begin
      q.push_back(d);
      got++;
    end
    if (!rst && src_rdy && !dst_rdy) stalls++;
  end
  always @(negedge clk)
    dst_rdy = !rst && !pause && !(STALL && !steady && $urandom_range(0, 2) == 0);
endmodule
