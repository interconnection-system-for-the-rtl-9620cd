// Testbench helper: drives a control bus packet stream from a queue of words,
// with random idle cycles when GAPS is set. Words are pushed into q by the
// testbench; sent counts the words that were taken.
module cb_stream_src
  import nc_pkg::*;
#(
  parameter bit GAPS = 1'b1
) (
  input  logic     clk,
  input  logic     rst,
  output cb_word_t d,
  output logic     src_rdy,
  input  logic     dst_rdy
);
  cb_word_t q [$];
  int sent = 0;
  bit hold = 0;
  bit steady = 0;   // set to offer every word without gaps

  initial begin d = '0; src_rdy = 0; end
  always @(posedge clk) begin
    if (!rst && src_rdy && dst_rdy) begin
      void'(q.pop_front());
      sent++;
    end
  end
  always @(negedge clk) begin
    // once offered, a word stays offered until it is taken
    if (!(src_rdy && !dst_rdy)) hold = GAPS && !steady && ($urandom_range(0, 3) == 0);
    if (src_rdy && !dst_rdy) hold = 0;
    src_rdy = !rst && (q.size() != 0) && !hold;
    d       = (q.size() != 0) ? q[0] : '0;
  end
endmodule
