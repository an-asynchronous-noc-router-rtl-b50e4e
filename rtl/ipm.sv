// ipm: Input Port Module of one switch.
//
// The IPM sits behind one circular input buffer. For a head flit it computes
// the output port with XY routing and requests that Output Port Module (OPM)
// alone, while the flit itself is broadcast to all OPMs through the crossbar.
// The route is held from the head flit to the tail flit, so body and tail
// flits follow the head (wormhole switching). A flit leaves the buffer in the
// cycle its OPM grants it.
//
// Interface: in_valid/in_flit are the buffer head, in_pop removes it; req is
// one-hot toward the OPMs (zero when nothing is waiting); gnt[j] is the
// grant of OPM j for this IPM. Purely combinational from buffer to request;
// the only state is the held route.
//
// Computing a route and requesting only the designated OPM while broadcasting
// the flit follows the router's description; XY routing, the header layout
// and wormhole holding are this design's own choices.
module ipm
  import noc_pkg::*;
#(
  parameter int unsigned NP = NUM_PORTS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  logic               in_valid,
  input  flit_t              in_flit,
  output logic               in_pop,
  output logic [NP-1:0]      req,
  output flit_t              out_flit,
  input  logic [NP-1:0]      gnt
);
  logic [2:0] route_q, route;

  always_comb begin
    route = in_flit.head ? 3'(xy_route(my_x, my_y, in_flit)) : route_q;
    req   = '0;
    if (in_valid) req[route] = 1'b1;
  end

  assign out_flit = in_flit;
  assign in_pop   = |(gnt & req);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       route_q <= '0;
    else if (in_pop && in_flit.head)  route_q <= route;
  end

  a_gnt_only_when_req: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);

endmodule
