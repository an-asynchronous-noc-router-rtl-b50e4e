// tb_circ_fifo: self-checking test of the circular input buffer.
//
// Random pushes and pops (never out of an empty buffer, and into a full one
// only together with a pop) run against a SystemVerilog queue as reference;
// every cycle the head value, empty, full and count are compared. The
// pointers wrap many times at the default depth of 7, not a power of two.
module tb_circ_fifo;
  import noc_pkg::*;
  localparam int unsigned DEPTH = BUF_DEPTH;

  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  flit_t din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  flit_t model[$];
  int n_full = 0, n_full_pp = 0;

  circ_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(dout == model[0], "head data");
      if (full) n_full++;
      // bias toward filling in the first half, draining in the second
      pop  = !empty && ($urandom_range(0, 99) < ((cyc % 400) < 200 ? 35 : 70));
      push = (!full || pop) && ($urandom_range(0, 99) < ((cyc % 400) < 200 ? 70 : 35));
      if (full && push && pop) n_full_pp++;
      din  = flit_t'({$urandom, $urandom});
      @(posedge clk);
      #1;
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
    end
    check(n_full > 0, "buffer reached full at least once");
    check(n_full_pp > 0, "push and pop together on a full buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
