// tb_vc_timer: self-checking test of the forced-check timer.
//
// active is held for random stretches. While active, fire must pulse exactly
// on cycles PERIOD, 2*PERIOD, ... counted from the start of the stretch, and
// it must never pulse while inactive.
module tb_vc_timer;
  localparam int unsigned PERIOD = noc_pkg::TIMER_PERIOD;
  logic clk = 0, rst_n = 0;
  logic active, fire;
  int checks = 0, failures = 0;
  int run = 0;  // cycles active so far, including this one
  int fires = 0;

  vc_timer #(.PERIOD(PERIOD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    active = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int seg = 0; seg < 60; seg++) begin
      int len;
      len = $urandom_range(1, 5 * PERIOD);
      for (int c = 0; c < len; c++) begin
        @(negedge clk);
        active = seg[0];
        run = active ? run + 1 : 0;
        #1;
        checks++;
        if (fire !== (active && (run % PERIOD == 0))) begin
          failures++;
          $display("FAIL fire=%b active=%b run=%0d", fire, active, run);
        end
        if (fire) fires++;
      end
    end
    checks++;
    if (fires == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
