// router_plane: the router of one plane (request or response) of a node.
//
// Five port interfaces (index order Local, North, East, South, West) share
// two switches, Switch 0 for VC 0 and Switch 1 for VC 1. A flit received on
// a port goes into that port's input buffer in the switch of its VC; the
// switch routes it to an output port, where the interface merges both
// switches' streams onto the outgoing link under end-to-end credit control.
// VCs are kept apart inside the router and share only the links.
//
// Interface, per port p: incoming link in_req/in_ack/in_data and in_credit
// (two-phase credit returns to the upstream router, one wire per VC);
// outgoing link out_req/out_ack/out_data and out_credit (returns from the
// downstream router). my_x/my_y place the node in the mesh for XY routing.
//
// Timing: with idle ports a flit takes 3 cycles from the toggle of in_req to
// the toggle of out_req (buffer write, OPM latch, link latch).
//
// The replicated-switch structure and the five interfaces follow the router;
// only two VCs are supported, as in the router's main configuration.
module router_plane
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH        = BUF_DEPTH,
  parameter int unsigned TIMER_PERIOD = noc_pkg::TIMER_PERIOD
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [COORD_W-1:0]         my_x,
  input  logic [COORD_W-1:0]         my_y,
  input  logic       [NUM_PORTS-1:0] in_req,
  output logic       [NUM_PORTS-1:0] in_ack,
  input  link_flit_t [NUM_PORTS-1:0] in_data,
  output logic [NUM_PORTS-1:0][1:0]  in_credit,
  output logic       [NUM_PORTS-1:0] out_req,
  input  logic       [NUM_PORTS-1:0] out_ack,
  output link_flit_t [NUM_PORTS-1:0] out_data,
  input  logic [NUM_PORTS-1:0][1:0]  out_credit
);
  localparam int unsigned NP = NUM_PORTS;

  // [vc][port] bundles between the interfaces and the switches
  logic  [1:0][NP-1:0] push, pop_evt, sw_req, sw_ack;
  flit_t [NP-1:0]      buf_flit;
  flit_t [1:0][NP-1:0] sw_data;

  for (genvar v = 0; v < 2; v++) begin : g_switch
    switch_vc #(.NP(NP), .DEPTH(DEPTH)) u_switch (
      .clk, .rst_n, .my_x, .my_y,
      .push      (push[v]),
      .push_flit (buf_flit),
      .pop_evt   (pop_evt[v]),
      .out_req   (sw_req[v]),
      .out_ack   (sw_ack[v]),
      .out_data  (sw_data[v])
    );
  end

  for (genvar p = 0; p < NP; p++) begin : g_port
    port_if #(.DEPTH(DEPTH), .TIMER_PERIOD(TIMER_PERIOD)) u_if (
      .clk, .rst_n,
      .in_req     (in_req[p]),
      .in_ack     (in_ack[p]),
      .in_data    (in_data[p]),
      .in_credit  (in_credit[p]),
      .out_req    (out_req[p]),
      .out_ack    (out_ack[p]),
      .out_data   (out_data[p]),
      .out_credit (out_credit[p]),
      .buf_push   ({push[1][p], push[0][p]}),
      .buf_flit   (buf_flit[p]),
      .buf_pop    ({pop_evt[1][p], pop_evt[0][p]}),
      .sw_req     ({sw_req[1][p], sw_req[0][p]}),
      .sw_ack     ({sw_ack[1][p], sw_ack[0][p]}),
      .sw_data    ({sw_data[1][p], sw_data[0][p]})
    );
  end

endmodule
