// router_node: one node of the double-plane asynchronous NoC, top level.
//
// A node holds two identical and independent routers: the request plane
// carries request packets and the response plane carries responses, each on
// its own 2D-mesh links, so a response can never be blocked behind a
// request. Each plane is a 5-port router (Local, North, East, South, West)
// with two virtual channels, one replicated switch per VC, 7-slot circular
// input buffers and end-to-end credit flow control with lazy credit update.
//
// Interface: for each plane (req_ / rsp_ prefix) and each port p, an
// incoming link (in_req, in_data carrying a flit and its VC, in_ack, and
// in_credit with one two-phase credit-return wire per VC) and an outgoing
// link (out_req, out_data, out_ack, out_credit). All handshakes are
// two-phase: a transition of req announces a flit, a transition of ack
// accepts it, a transition of a credit wire returns one buffer slot. The
// local ports connect to the node's terminal.
//
// The asynchronous control is written as its clocked equivalent on clk, an
// implementation choice of this design; the plane structure, port count,
// VC count and buffer depth follow the router as described.
module router_node
  import noc_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [COORD_W-1:0]         my_x,
  input  logic [COORD_W-1:0]         my_y,
  // request plane
  input  logic       [NUM_PORTS-1:0] req_in_req,
  output logic       [NUM_PORTS-1:0] req_in_ack,
  input  link_flit_t [NUM_PORTS-1:0] req_in_data,
  output logic [NUM_PORTS-1:0][1:0]  req_in_credit,
  output logic       [NUM_PORTS-1:0] req_out_req,
  input  logic       [NUM_PORTS-1:0] req_out_ack,
  output link_flit_t [NUM_PORTS-1:0] req_out_data,
  input  logic [NUM_PORTS-1:0][1:0]  req_out_credit,
  // response plane
  input  logic       [NUM_PORTS-1:0] rsp_in_req,
  output logic       [NUM_PORTS-1:0] rsp_in_ack,
  input  link_flit_t [NUM_PORTS-1:0] rsp_in_data,
  output logic [NUM_PORTS-1:0][1:0]  rsp_in_credit,
  output logic       [NUM_PORTS-1:0] rsp_out_req,
  input  logic       [NUM_PORTS-1:0] rsp_out_ack,
  output link_flit_t [NUM_PORTS-1:0] rsp_out_data,
  input  logic [NUM_PORTS-1:0][1:0]  rsp_out_credit
);

  router_plane u_req_plane (
    .clk, .rst_n, .my_x, .my_y,
    .in_req     (req_in_req),
    .in_ack     (req_in_ack),
    .in_data    (req_in_data),
    .in_credit  (req_in_credit),
    .out_req    (req_out_req),
    .out_ack    (req_out_ack),
    .out_data   (req_out_data),
    .out_credit (req_out_credit)
  );

  router_plane u_rsp_plane (
    .clk, .rst_n, .my_x, .my_y,
    .in_req     (rsp_in_req),
    .in_ack     (rsp_in_ack),
    .in_data    (rsp_in_data),
    .in_credit  (rsp_in_credit),
    .out_req    (rsp_out_req),
    .out_ack    (rsp_out_ack),
    .out_data   (rsp_out_data),
    .out_credit (rsp_out_credit)
  );

endmodule
