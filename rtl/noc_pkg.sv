// noc_pkg: types and constants shared by the double-plane NoC router.
//
// The router is a 5-port, 2-VC mesh router whose asynchronous two-phase,
// bundled-data control is written here as its clocked equivalent: every
// handshake keeps its transition (toggle) encoding, so a channel holds a new
// item whenever req differs from ack, but both ends sample those wires on clk.
// The port count, VC count and buffer depth are those of the router's main
// configuration; the flit width, the header layout and the timer period are
// this design's own choices.
package noc_pkg;

  localparam int unsigned NUM_PORTS    = 5;   // Local, North, East, South, West
  localparam int unsigned NUM_VCS      = 2;   // one switch per VC
  localparam int unsigned BUF_DEPTH    = 7;   // input buffer slots per VC and port
  localparam int unsigned DATA_W       = 32;  // flit payload bits (own choice)
  localparam int unsigned COORD_W      = 4;   // bits per mesh coordinate (own choice)
  localparam int unsigned TIMER_PERIOD = 4;   // cycles between forced credit checks (own choice)

  // Port numbering used by every array indexed by port.
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  // One flit inside a switch. A head flit carries {dst_y, dst_x} in
  // payload[2*COORD_W-1:0]; a single-flit packet has head and tail set.
  typedef struct packed {
    logic              head;
    logic              tail;
    logic [DATA_W-1:0] payload;
  } flit_t;

  // One flit on an inter-router link: the flit plus the VC it belongs to.
  typedef struct packed {
    logic  vc;
    flit_t flit;
  } link_flit_t;

  // Dimension-ordered XY routing: correct X first, then Y. East is +x,
  // north is +y; a packet at its destination leaves on the local port.
  function automatic port_e xy_route(input logic [COORD_W-1:0] my_x,
                                     input logic [COORD_W-1:0] my_y,
                                     input flit_t              f);
    logic [COORD_W-1:0] dx, dy;
    dx = f.payload[COORD_W-1:0];
    dy = f.payload[2*COORD_W-1:COORD_W];
    if (dx > my_x)      return P_EAST;
    else if (dx < my_x) return P_WEST;
    else if (dy > my_y) return P_NORTH;
    else if (dy < my_y) return P_SOUTH;
    else                return P_LOCAL;
  endfunction

endpackage
