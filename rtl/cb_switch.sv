// Control bus switch.
//
// One upstream link (towards the root) and N downstream links, each a full
// duplex 16-bit packet stream. Downstream, every packet is copied to all N
// ports without any routing; the endpoints pick out their own packets. A word
// leaves the input slice once every port has taken it, so a port that is not
// ready holds the others back. Upstream, the packets of the N ports are merged
// whole, one packet per grant, round robin. Every input and output passes
// through a register slice, so the switch is a pipeline stage: a word
// crosses it in two cycles when nothing stalls.
// The broadcast and the pipeline stage follow the bus's description; the
// arbitration order and the stall rule are this design's choice.
module cb_switch
  import nc_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic     clk,
  input  logic     rst,
  // upstream link: from the root (downward traffic) and to the root
  input  cb_word_t up_in,
  input  logic     up_in_src_rdy,
  output logic     up_in_dst_rdy,
  output cb_word_t up_out,
  output logic     up_out_src_rdy,
  input  logic     up_out_dst_rdy,
  // downstream links
  output cb_word_t dn_out         [N],
  output logic     dn_out_src_rdy [N],
  input  logic     dn_out_dst_rdy [N],
  input  cb_word_t dn_in          [N],
  input  logic     dn_in_src_rdy  [N],
  output logic     dn_in_dst_rdy  [N]
);
  localparam int unsigned W = $bits(cb_word_t);

  // ---------------- downward: broadcast ----------------
  logic [W-1:0] bc_data;
  logic         bc_v, bc_take;
  logic [N-1:0] taken_q, port_acc, port_rdy;

  fl_reg #(.W(W)) u_in_dn (
    .clk, .rst,
    .in_data(up_in), .in_src_rdy(up_in_src_rdy), .in_dst_rdy(up_in_dst_rdy),
    .out_data(bc_data), .out_src_rdy(bc_v), .out_dst_rdy(bc_take)
  );

  assign port_acc = port_rdy & {N{bc_v}} & ~taken_q;
  assign bc_take  = bc_v && ((taken_q | port_acc) == {N{1'b1}});

  always_ff @(posedge clk) begin
    if (rst || bc_take) taken_q <= '0;
    else                taken_q <= taken_q | port_acc;
  end

  for (genvar i = 0; i < N; i++) begin : g_dn
    logic [W-1:0] od;
    fl_reg #(.W(W)) u_out_dn (
      .clk, .rst,
      .in_data(bc_data), .in_src_rdy(bc_v && !taken_q[i]), .in_dst_rdy(port_rdy[i]),
      .out_data(od), .out_src_rdy(dn_out_src_rdy[i]), .out_dst_rdy(dn_out_dst_rdy[i])
    );
    assign dn_out[i] = cb_word_t'(od);
  end

  // ---------------- upward: merge ----------------
  logic [W-1:0] m_data [N];
  logic [N-1:0] m_v, m_ack;
  logic [W-1:0] a_data;
  logic         a_v, a_rdy;

  for (genvar i = 0; i < N; i++) begin : g_up
    fl_reg #(.W(W)) u_in_up (
      .clk, .rst,
      .in_data(dn_in[i]), .in_src_rdy(dn_in_src_rdy[i]), .in_dst_rdy(dn_in_dst_rdy[i]),
      .out_data(m_data[i]), .out_src_rdy(m_v[i]), .out_dst_rdy(m_ack[i])
    );
  end

  fl_arb #(.N(N), .W(W)) u_arb (
    .clk, .rst,
    .in_data(m_data), .in_req(m_v), .in_ack(m_ack),
    .out_data(a_data), .out_src_rdy(a_v), .out_dst_rdy(a_rdy)
  );

  logic [W-1:0] uo;
  fl_reg #(.W(W)) u_out_up (
    .clk, .rst,
    .in_data(a_data), .in_src_rdy(a_v), .in_dst_rdy(a_rdy),
    .out_data(uo), .out_src_rdy(up_out_src_rdy), .out_dst_rdy(up_out_dst_rdy)
  );
  assign up_out = cb_word_t'(uo);
endmodule
