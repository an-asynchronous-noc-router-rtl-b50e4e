// tb_mutex2: self-checking test of the two-way mutex.
//
// All four request patterns are applied with random use of the grant. A lone
// request must be granted, a grant must be one-hot and only for a requester,
// and on a tie the winner must alternate, which is checked against a
// reference priority bit kept by the testbench.
module tb_mutex2;
  logic clk = 0, rst_n = 0;
  logic [1:0] r, g;
  logic taken;
  int checks = 0, failures = 0;
  logic prio_ref;
  int ties = 0;

  mutex2 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t r=%b g=%b", what, $time, r, g);
    end
  endtask

  initial begin
    r = 0; taken = 0; prio_ref = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      r = 2'($urandom);
      taken = $urandom_range(0, 3) != 0;
      #1;
      check((g & ~r) == 0, "grant without request");
      check(g != 2'b11, "both granted");
      if (r == 2'b01) check(g == 2'b01, "lone r0");
      if (r == 2'b10) check(g == 2'b10, "lone r1");
      if (r == 2'b00) check(g == 2'b00, "no request");
      if (r == 2'b11) begin
        ties++;
        check(g == (prio_ref ? 2'b10 : 2'b01), "tie alternation");
      end
      @(posedge clk);
      if (taken && g[0]) prio_ref = 1;
      else if (taken && g[1]) prio_ref = 0;
    end
    check(ties > 0, "ties seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
