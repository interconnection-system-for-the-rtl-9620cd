// Internal bus switch.
//
// A node of the internal bus tree: one upstream link towards the root (the
// PCI bridge) and two downstream links, each a full duplex DW-bit packet
// stream. The first word of a packet is its header; its bits [31:0] are the
// destination address. A packet from upstream goes to downstream port i when
// (address & Pi_MASK) == Pi_BASE and is dropped if it matches neither port.
// A packet from one branch that is addressed to the other branch is passed
// across directly, so the two branches can talk without loading the
// upstream link; every other packet from a branch goes upstream. Each output
// takes one whole packet at a time, round robin between the inputs that want
// it. All three inputs and outputs pass through register slices, so the
// switch is a pipeline stage of the long bus: a word crosses it in two
// cycles, and each output moves one word per cycle.
// The tree, the full duplex links, the packet framing and the pipelining
// follow the bus's description; the header layout, the address decoding and
// the arbitration are this design's choices.
module ib_switch #(
  parameter int unsigned DW      = 64,
  parameter logic [31:0] P0_BASE = 32'h0000_0000,
  parameter logic [31:0] P0_MASK = 32'hF000_0000,
  parameter logic [31:0] P1_BASE = 32'h1000_0000,
  parameter logic [31:0] P1_MASK = 32'hF000_0000
) (
  input  logic          clk,
  input  logic          rst,
  // upstream link
  input  logic [DW-1:0] up_in_data,
  input  logic          up_in_sop,
  input  logic          up_in_eop,
  input  logic          up_in_src_rdy,
  output logic          up_in_dst_rdy,
  output logic [DW-1:0] up_out_data,
  output logic          up_out_sop,
  output logic          up_out_eop,
  output logic          up_out_src_rdy,
  input  logic          up_out_dst_rdy,
  // downstream links 0 and 1
  input  logic [DW-1:0] dn_in_data    [2],
  input  logic          dn_in_sop     [2],
  input  logic          dn_in_eop     [2],
  input  logic          dn_in_src_rdy [2],
  output logic          dn_in_dst_rdy [2],
  output logic [DW-1:0] dn_out_data    [2],
  output logic          dn_out_sop     [2],
  output logic          dn_out_eop     [2],
  output logic          dn_out_src_rdy [2],
  input  logic          dn_out_dst_rdy [2]
);
  localparam int unsigned W = DW + 2;   // {data, sop, eop}

  // route codes: 0 = upstream, 1 = port 0, 2 = port 1, 3 = drop
  typedef logic [1:0] route_t;
  localparam route_t R_UP = 2'd0, R_P0 = 2'd1, R_P1 = 2'd2, R_DROP = 2'd3;

  function automatic route_t decode(input int unsigned src, input logic [31:0] a);
    logic m0, m1;
    m0 = (a & P0_MASK) == P0_BASE;
    m1 = (a & P1_MASK) == P1_BASE;
    case (src)
      0:       decode = m0 ? R_P0 : (m1 ? R_P1 : R_DROP);
      1:       decode = (m1 && !m0) ? R_P1 : R_UP;
      default: decode = (m0 && !m1) ? R_P0 : R_UP;
    endcase
  endfunction

  // inputs: 0 = upstream, 1 = port 0, 2 = port 1
  logic [W-1:0] i_pay  [3];
  logic         i_srdy [3];
  logic         i_drdy [3];
  logic [W-1:0] h_data [3];
  logic         h_v    [3];
  logic         h_take [3];
  route_t       r_cur  [3];
  route_t       r_q    [3];

  assign i_pay[0]  = {up_in_data, up_in_sop, up_in_eop};
  assign i_srdy[0] = up_in_src_rdy;
  assign up_in_dst_rdy = i_drdy[0];
  for (genvar p = 0; p < 2; p++) begin : g_inmap
    assign i_pay[p+1]  = {dn_in_data[p], dn_in_sop[p], dn_in_eop[p]};
    assign i_srdy[p+1] = dn_in_src_rdy[p];
    assign dn_in_dst_rdy[p] = i_drdy[p+1];
  end

  // per output: request and grant vectors over the three inputs
  logic [2:0]   o_req [3];
  logic [2:0]   o_ack [3];
  logic [W-1:0] a_data [3];
  logic         a_v    [3];
  logic         a_rdy  [3];
  logic [W-1:0] o_pay  [3];
  logic         o_srdy [3];
  logic         o_drdy [3];

  for (genvar i = 0; i < 3; i++) begin : g_in
    fl_reg #(.W(W)) u_in (
      .clk, .rst,
      .in_data(i_pay[i]), .in_src_rdy(i_srdy[i]), .in_dst_rdy(i_drdy[i]),
      .out_data(h_data[i]), .out_src_rdy(h_v[i]), .out_dst_rdy(h_take[i])
    );
    // header word carries the address in data bits [31:0] = payload [33:2]
    assign r_cur[i] = h_data[i][1] ? decode(i, h_data[i][33:2]) : r_q[i];
    always_ff @(posedge clk) begin
      if (rst)                      r_q[i] <= R_DROP;
      else if (h_v[i] && h_take[i]) r_q[i] <= r_cur[i];
    end
    assign h_take[i] = h_v[i] &&
      ((r_cur[i] == R_DROP) || o_ack[0][i] || o_ack[1][i] || o_ack[2][i]);
  end

  for (genvar o = 0; o < 3; o++) begin : g_out
    for (genvar i = 0; i < 3; i++) begin : g_req
      assign o_req[o][i] = h_v[i] && (r_cur[i] == route_t'(o));
    end
    fl_arb #(.N(3), .W(W)) u_arb (
      .clk, .rst,
      .in_data(h_data), .in_req(o_req[o]), .in_ack(o_ack[o]),
      .out_data(a_data[o]), .out_src_rdy(a_v[o]), .out_dst_rdy(a_rdy[o])
    );
    fl_reg #(.W(W)) u_out (
      .clk, .rst,
      .in_data(a_data[o]), .in_src_rdy(a_v[o]), .in_dst_rdy(a_rdy[o]),
      .out_data(o_pay[o]), .out_src_rdy(o_srdy[o]), .out_dst_rdy(o_drdy[o])
    );
  end

  assign {up_out_data, up_out_sop, up_out_eop} = o_pay[0];
  assign up_out_src_rdy = o_srdy[0];
  assign o_drdy[0]      = up_out_dst_rdy;
  for (genvar p = 0; p < 2; p++) begin : g_outmap
    assign {dn_out_data[p], dn_out_sop[p], dn_out_eop[p]} = o_pay[p+1];
    assign dn_out_src_rdy[p] = o_srdy[p+1];
    assign o_drdy[p+1]       = dn_out_dst_rdy[p];
  end
endmodule
