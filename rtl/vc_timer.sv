// vc_timer: fixed-rate forced-check timer of one blocked VC.
//
// While active (its VC has no credit) the timer counts cycles and pulses fire
// for one cycle every PERIOD cycles; each pulse makes the full detector look
// for queued credit returns. When the VC is no longer blocked the count is
// cleared, so the first check comes PERIOD cycles after blocking starts.
//
// Interface: active level input; fire one-cycle pulse.
//
// A timer that checks at a fixed rate while the VC is blocked follows the
// router's VC flow control; the rate itself (PERIOD) is this design's choice.
module vc_timer #(
  parameter int unsigned PERIOD = noc_pkg::TIMER_PERIOD
) (
  input  logic clk,
  input  logic rst_n,
  input  logic active,
  output logic fire
);
  localparam int unsigned TW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [TW-1:0] cnt;

  assign fire = active && (cnt == TW'(PERIOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cnt <= '0;
    else if (!active) cnt <= '0;
    else if (fire)    cnt <= '0;
    else              cnt <= cnt + 1'b1;
  end

endmodule
