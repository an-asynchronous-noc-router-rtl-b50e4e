// switch_vc: one switch of a router plane; there is one such switch per VC.
//
// Five circular input buffers (one per port) feed five Input Port Modules.
// Each IPM routes its packet and requests one Output Port Module through the
// crossbar; each OPM arbitrates and sends flits on a two-phase channel to
// the interface of its port. Every flit leaving an input buffer frees a slot
// and raises pop_evt for that port, from which the interface returns a credit
// to the upstream router.
//
// Interface: push[p]/push_flit[p] write into the buffer of port p (the
// upstream credit count guarantees room); pop_evt[p] is a one-cycle pulse per
// freed slot; out_req/out_ack/out_data[p] is the two-phase output channel of
// the OPM of port p. A flit can go from buffer to output channel in the
// cycle after it was written.
//
// Five IPMs, a crossbar, five OPMs and an added circular input buffer per
// port follow the router's switch; how far each block's insides are this
// design's own choice is noted in its own file.
module switch_vc
  import noc_pkg::*;
#(
  parameter int unsigned NP    = NUM_PORTS,
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  logic  [NP-1:0]     push,
  input  flit_t [NP-1:0]     push_flit,
  output logic  [NP-1:0]     pop_evt,
  output logic  [NP-1:0]     out_req,
  input  logic  [NP-1:0]     out_ack,
  output flit_t [NP-1:0]     out_data
);
  logic  [NP-1:0]         buf_empty, pop;
  flit_t [NP-1:0]         buf_head;
  logic  [NP-1:0][NP-1:0] ipm_req, opm_req, opm_gnt;
  flit_t [NP-1:0]         ipm_flit, opm_flit;
  logic  [NP-1:0][NP-1:0] ipm_gnt;

  for (genvar p = 0; p < NP; p++) begin : g_port
    circ_fifo #(.DEPTH(DEPTH), .T(flit_t)) u_buf (
      .clk, .rst_n,
      .push  (push[p]),
      .din   (push_flit[p]),
      .pop   (pop[p]),
      .dout  (buf_head[p]),
      .empty (buf_empty[p]),
      .full  (),
      .count ()
    );

    ipm #(.NP(NP)) u_ipm (
      .clk, .rst_n, .my_x, .my_y,
      .in_valid (!buf_empty[p]),
      .in_flit  (buf_head[p]),
      .in_pop   (pop[p]),
      .req      (ipm_req[p]),
      .out_flit (ipm_flit[p]),
      .gnt      (ipm_gnt[p])
    );

    opm #(.NP(NP)) u_opm (
      .clk, .rst_n,
      .req      (opm_req[p]),
      .gnt      (opm_gnt[p]),
      .in_flit  (opm_flit[p]),
      .out_req  (out_req[p]),
      .out_ack  (out_ack[p]),
      .out_data (out_data[p])
    );
  end

  crossbar #(.NP(NP)) u_xbar (
    .ipm_req, .ipm_flit, .ipm_gnt,
    .opm_req, .opm_gnt, .opm_flit
  );

  assign pop_evt = pop;

endmodule
