// full_detector: end-to-end credit counter of one VC, with lazy update.
//
// credit counts free slots in the downstream input buffer of this VC and
// starts at DEPTH. Credit returns from downstream do not touch it: they are
// only queued. The counter is updated once per flit sent, and that update
// folds in all queued returns together with the decrement:
// credit <= credit + queued (+ a return arriving now) - 1. A return can
// therefore never hold up a flit. When credit is zero the VC is blocked
// (valid low); a timer then pulses check at a fixed rate, and a check finding
// queued returns moves them into credit, which releases the block.
//
// Interface: credit_inc is one pulse per freed downstream slot, send one
// pulse per flit that leaves on this VC (allowed only while valid), check
// the timer's forced update. All update at the clock edge.
//
// The lazy update, the blocking and the timer release follow the router's
// VC flow control; the counter widths and the initial value of DEPTH are
// this design's own choices.
module full_detector #(
  parameter int unsigned DEPTH = noc_pkg::BUF_DEPTH
) (
  input  logic clk,
  input  logic rst_n,
  input  logic credit_inc,
  input  logic send,
  input  logic check,
  output logic valid,
  output logic [$clog2(DEPTH+1)-1:0] credit,
  output logic [$clog2(DEPTH+1)-1:0] queued
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  assign valid = (credit != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credit <= CW'(DEPTH);
      queued <= '0;
    end else if (send) begin
      credit <= credit + queued + CW'(credit_inc) - 1'b1;
      queued <= '0;
    end else if (check && !valid && (queued != '0 || credit_inc)) begin
      credit <= queued + CW'(credit_inc);
      queued <= '0;
    end else if (credit_inc) begin
      queued <= queued + 1'b1;
    end
  end

  a_send_needs_credit: assert property (@(posedge clk) disable iff (!rst_n) send |-> valid);
  a_bounded: assert property (@(posedge clk) disable iff (!rst_n)
                              (32'(credit) + 32'(queued)) <= DEPTH);

endmodule
