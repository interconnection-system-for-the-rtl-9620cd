// Local bus switch.
//
// The local bus has no routing: the switch registers what the root sends
// (DWR, ADS, WR, RD) and copies it to all N downstream ports, and registers
// the OR of the N answers (DRD, RDY) back towards the root. Only the
// addressed endpoint answers, the others drive zero, so the OR is the answer.
// Each direction costs one cycle, which makes the switch a pipeline stage.
// Broadcast and pipelining follow the bus's description; merging the answers
// by OR is this design's choice.
module lb_switch
  import nc_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic   clk,
  input  logic   rst,
  input  lb_dn_t up_dn,
  output lb_up_t up_up,
  output lb_dn_t dn_dn [N],
  input  lb_up_t dn_up [N]
);
  lb_up_t merged;

  always_comb begin
    merged = LB_UP_IDLE;
    for (int i = 0; i < N; i++) merged = merged | dn_up[i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      up_up <= LB_UP_IDLE;
      for (int i = 0; i < N; i++) dn_dn[i] <= LB_DN_IDLE;
    end else begin
      up_up <= merged;
      for (int i = 0; i < N; i++) dn_dn[i] <= up_dn;
    end
  end
endmodule
