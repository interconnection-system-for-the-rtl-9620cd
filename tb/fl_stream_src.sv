// Testbench helper: drives a packet stream of W-bit words {data, sop, eop}
// from the queue q, with random idle cycles when GAPS is set.
module fl_stream_src #(
  parameter int unsigned W    = 66,
  parameter bit          GAPS = 1'b1
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] d,
  output logic         src_rdy,
  input  logic         dst_rdy
);
  logic [W-1:0] q [$];
  int sent = 0;
  bit hold = 0;
  bit steady = 0;   // set to offer every word without gaps

  initial begin d = '0; src_rdy = 0; end
  always @(posedge clk)
    if (!rst && src_rdy && dst_rdy) begin
      void'(q.pop_front());
      sent++;
    end
  always @(negedge clk) begin
    // once offered, a word stays offered until it is taken
    hold    = !(src_rdy && !dst_rdy) && GAPS && !steady && ($urandom_range(0, 3) == 0);
    src_rdy = !rst && (q.size() != 0) && !hold;
    d       = (q.size() != 0) ? q[0] : '0;
  end
endmodule
