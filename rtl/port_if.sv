// port_if: one port interface of a router plane (North, East, South, West or
// Local).
//
// Receive side: a flit arriving on the incoming two-phase link (in_req
// differs from in_ack) is written straight into the input buffer of its VC in
// the switch of that VC, and in_ack toggles at the same clock edge. The
// sender's credits guarantee a free slot, so the receiver never stalls. Each
// slot freed in one of those buffers (buf_pop) toggles that VC's in_credit
// wire back to the upstream router.
// Send side: vc_ctrl merges the output channels of this port's OPM in Switch
// 0 and Switch 1 onto the outgoing link, under the end-to-end credits that
// the downstream router returns on out_credit.
//
// Timing: a received flit is in the buffer one cycle after in_req toggles.
//
// The split into VC flow control on the sending side and VC buffers in the
// switches follows the router; the receive-side logic is not drawn there and
// is this design's simplest reading of it.
module port_if
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH        = BUF_DEPTH,
  parameter int unsigned TIMER_PERIOD = noc_pkg::TIMER_PERIOD
) (
  input  logic        clk,
  input  logic        rst_n,
  // incoming link
  input  logic        in_req,
  output logic        in_ack,
  input  link_flit_t  in_data,
  output logic [1:0]  in_credit,
  // outgoing link
  output logic        out_req,
  input  logic        out_ack,
  output link_flit_t  out_data,
  input  logic [1:0]  out_credit,
  // to the input buffers of this port in Switch 0 / Switch 1
  output logic [1:0]  buf_push,
  output flit_t       buf_flit,
  input  logic [1:0]  buf_pop,
  // from the OPMs of this port in Switch 0 / Switch 1
  input  logic [1:0]  sw_req,
  output logic [1:0]  sw_ack,
  input  flit_t [1:0] sw_data
);
  logic arrived;

  assign arrived  = (in_req != in_ack);
  assign buf_flit = in_data.flit;
  assign buf_push = arrived ? (in_data.vc ? 2'b10 : 2'b01) : 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_ack    <= 1'b0;
      in_credit <= '0;
    end else begin
      if (arrived) in_ack <= ~in_ack;
      in_credit <= in_credit ^ buf_pop;
    end
  end

  vc_ctrl #(.DEPTH(DEPTH), .TIMER_PERIOD(TIMER_PERIOD)) u_vc_ctrl (
    .clk, .rst_n,
    .reqin            (sw_req),
    .ackout           (sw_ack),
    .datain           (sw_data),
    .credit_increment (out_credit),
    .reqout           (out_req),
    .ackin            (out_ack),
    .dataout          (out_data)
  );

endmodule
