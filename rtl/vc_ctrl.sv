// vc_ctrl: VC flow control of one output channel interface.
//
// Two input streams, one per VC (Reqin/Ackout/Datain from the OPM of Switch 0
// and of Switch 1), are merged flit by flit onto one two-phase link
// (Reqout/Ackin/Dataout). Each VC has a full detector holding its end-to-end
// credit and a timer that releases a blocked VC. A VC enters the mutex only
// when it has a flit waiting (Reqin differs from Ackout), its full detector
// reports credit, and the link is idle (Reqout equals Ackin). The winner's
// flit is latched through the data multiplexer together with its VC number,
// Reqout toggles, the winner's Ackout toggles and its full detector counts
// the send. Credit_increment0/1 from the downstream router are two-phase: one
// transition per slot freed there.
//
// Timing: a flit is taken in the cycle it wins; the link carries at most one
// flit per round trip, i.e. every second cycle against a receiver that
// acknowledges one cycle after it sees a new request.
//
// The structure (mutex, two full detectors, two timers, data multiplexer,
// signal names) follows the router's output channel interface; its latches
// and delay elements are replaced by registers of one clock, which is this
// design's own choice.
module vc_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH        = BUF_DEPTH,
  parameter int unsigned TIMER_PERIOD = noc_pkg::TIMER_PERIOD
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   reqin,
  output logic [1:0]   ackout,
  input  flit_t [1:0]  datain,
  input  logic [1:0]   credit_increment,
  output logic         reqout,
  input  logic         ackin,
  output link_flit_t   dataout
);
  logic [1:0] cinc_seen;   // last seen level of each Credit_increment wire
  logic [1:0] cinc_pulse;
  logic [1:0] valid, forced, send, pending, mreq, mgnt;
  logic       link_idle;

  assign cinc_pulse = credit_increment ^ cinc_seen;
  assign link_idle  = (reqout == ackin);
  assign pending    = reqin ^ ackout;
  assign mreq       = pending & valid & {2{link_idle}};
  assign send       = mgnt;

  for (genvar v = 0; v < 2; v++) begin : g_vc
    full_detector #(.DEPTH(DEPTH)) u_fd (
      .clk, .rst_n,
      .credit_inc (cinc_pulse[v]),
      .send       (send[v]),
      .check      (forced[v]),
      .valid      (valid[v]),
      .credit     (),
      .queued     ()
    );
    vc_timer #(.PERIOD(TIMER_PERIOD)) u_timer (
      .clk, .rst_n,
      .active (!valid[v]),
      .fire   (forced[v])
    );
  end

  mutex2 u_mutex (.clk, .rst_n, .r(mreq), .g(mgnt), .taken(|mgnt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cinc_seen <= '0;
      ackout    <= '0;
      reqout    <= 1'b0;
      dataout   <= '0;
    end else begin
      cinc_seen <= credit_increment;
      if (|mgnt) begin
        dataout.vc   <= mgnt[1];
        dataout.flit <= mgnt[1] ? datain[1] : datain[0];
        reqout       <= ~reqout;
        ackout       <= ackout ^ mgnt;
      end
    end
  end

  a_link_protocol: assert property (@(posedge clk) disable iff (!rst_n)
                                    (!link_idle && $stable(reqout)) |-> $stable(dataout));

endmodule
