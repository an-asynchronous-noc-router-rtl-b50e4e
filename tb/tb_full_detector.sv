// tb_full_detector: self-checking test of the lazy-update credit counter.
//
// Random credit returns, sends (only while valid) and forced checks run
// against a reference written independently here: returns only queue, a
// send folds all queued returns in with its decrement, and a check while
// blocked moves the queue into the credit. credit, queued and valid are
// compared every cycle. The test also confirms that the counter blocks,
// that a check releases it, and that a send folds queued returns in.
module tb_full_detector;
  localparam int unsigned DEPTH = noc_pkg::BUF_DEPTH;
  logic clk = 0, rst_n = 0;
  logic credit_inc, send, check, valid;
  logic [$clog2(DEPTH+1)-1:0] credit, queued;
  int checks = 0, failures = 0;
  int c_ref, q_ref, outstanding;
  int n_block = 0, n_release = 0, n_fold = 0;

  full_detector #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t credit=%0d/%0d queued=%0d/%0d", what, $time, credit, c_ref, queued, q_ref);
    end
  endtask

  initial begin
    credit_inc = 0; send = 0; check = 0;
    c_ref = DEPTH; q_ref = 0; outstanding = 0;  // slots filled downstream
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      chk(int'(credit) == c_ref, "credit");
      chk(int'(queued) == q_ref, "queued");
      chk(valid == (c_ref > 0), "valid");
      if (c_ref == 0) n_block++;
      send       = valid && ($urandom_range(0, 99) < 60);
      credit_inc = (outstanding > 0) && ($urandom_range(0, 99) < 40);
      check      = $urandom_range(0, 3) == 0;
      @(posedge clk);
      if (send) begin
        if (q_ref > 0) n_fold++;
        c_ref = c_ref + q_ref + int'(credit_inc) - 1;
        q_ref = 0;
      end else if (check && c_ref == 0 && (q_ref > 0 || credit_inc)) begin
        n_release++;
        c_ref = q_ref + int'(credit_inc);
        q_ref = 0;
      end else if (credit_inc) begin
        q_ref++;
      end
      outstanding = outstanding + int'(send) - int'(credit_inc);
    end
    chk(n_block > 0, "blocked at least once");
    chk(n_release > 0, "timer check released a block");
    chk(n_fold > 0, "send folded queued returns");
    $display("blocked=%0d released=%0d folded=%0d", n_block, n_release, n_fold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
