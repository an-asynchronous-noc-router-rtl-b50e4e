// tb_vc_ctrl: self-checking test of the output channel VC flow control.
//
// Two two-phase sources stand for the OPMs of Switch 0 and Switch 1. A link
// receiver model holds a 7-slot buffer per VC, drains it at a random, often
// slow rate and returns one Credit_increment transition per freed slot.
// Checked: flits of each VC arrive in order with the right VC bit; the
// downstream buffer never overflows (the credits are exact); nothing is lost.
// Phase 1 sends a burst on VC 0 into an empty downstream buffer and checks
// the link rate (one flit every 2 cycles against a receiver that acknowledges
// in the next cycle) and the 1-cycle delay from Reqin to Reqout. Phase 2
// counts that both VCs contended for the mutex, that a VC blocked for lack of
// credit, and that its timer released it.
module tb_vc_ctrl;
  import noc_pkg::*;
  localparam int DEPTH = BUF_DEPTH;
  logic clk = 0, rst_n = 0;
  logic [1:0] reqin, ackout, credit_increment;
  flit_t [1:0] datain;
  logic reqout, ackin;
  link_flit_t dataout;
  int checks = 0, failures = 0;
  flit_t srcq[2][$];
  flit_t dsbuf[2][$];
  int next_seq[2] = '{default: 0};
  int sent_total = 0, got_total = 0;
  int cycle = 0;
  int drain_pct = 100;
  int n_contend = 0, n_block = 0, n_release = 0;
  int last_out = -1, n_gap_ok = 0, n_gap_bad = 0;
  bit measure = 1;

  vc_ctrl #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  task automatic load(input int v, input int n);
    for (int i = 0; i < n; i++) begin
      flit_t fl;
      fl.head = 1'b1;
      fl.tail = 1'b1;
      fl.payload = {16'(sent_total), 15'd0, 1'(v)};
      sent_total++;
      srcq[v].push_back(fl);
    end
  endtask

  // sources: offer the next flit whenever their channel is idle
  initial begin
    reqin = '0; datain = '0;
    forever begin
      @(negedge clk);
      for (int v = 0; v < 2; v++)
        if (rst_n && reqin[v] == ackout[v] && srcq[v].size() > 0 && (measure || $urandom_range(0, 3) != 0)) begin
          datain[v] = srcq[v].pop_front();
          reqin[v]  = ~reqin[v];
        end
    end
  end

  // link receiver and downstream buffers
  initial begin
    ackin = 0; credit_increment = '0;
    forever begin
      @(posedge clk);
      if (rst_n && reqout != ackin) begin
        int v;
        v = int'(dataout.vc);
        chk(dsbuf[v].size() < DEPTH, "downstream buffer overflow");
        chk(int'(dataout.flit.payload[0]) == v, "VC bit matches stream");
        dsbuf[v].push_back(dataout.flit);
        got_total++;
        ackin <= ~ackin;
      end
      for (int v = 0; v < 2; v++)
        if (dsbuf[v].size() > 0 && $urandom_range(0, 99) < drain_pct) begin
          flit_t f;
          f = dsbuf[v].pop_front();
          chk(int'(f.payload[31:16]) >= next_seq[v], "per-VC order");
          next_seq[v] = int'(f.payload[31:16]) + 1;
          credit_increment[v] <= ~credit_increment[v];
        end
    end
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (dut.mreq == 2'b11) n_contend++;
    for (int v = 0; v < 2; v++) begin
      if (!dut.valid[v]) n_block++;
    end
    if (dut.forced[0] && dut.g_vc[0].u_fd.queued != 0) n_release++;
    if (dut.forced[1] && dut.g_vc[1].u_fd.queued != 0) n_release++;
  end

  // link rate: cycles between successive Reqout transitions in phase 1
  always @(reqout) if (rst_n && measure) begin
    if (last_out >= 0) begin
      if (cycle - last_out == 2) n_gap_ok++;
      else n_gap_bad++;
    end
    last_out = cycle;
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: 7 flits on VC 0, fast drain
    load(0, DEPTH);
    @(posedge clk);
    t0 = cycle;
    wait (reqout == 1'b1);
    chk(cycle - t0 <= 2, "Reqin to Reqout delay");
    wait (got_total == DEPTH);
    repeat (5) @(posedge clk);
    chk(n_gap_ok == DEPTH - 1 && n_gap_bad == 0, "one flit every 2 cycles");
    $display("phase 1: gaps ok=%0d bad=%0d", n_gap_ok, n_gap_bad);
    // phase 2: both VCs, slow and bursty drain
    measure = 0;
    load(0, 150);
    load(1, 150);
    while (got_total < sent_total || dsbuf[0].size() + dsbuf[1].size() > 0) begin
      @(negedge clk);
      drain_pct = ((cycle / 200) % 2 == 0) ? 5 : 60;
    end
    repeat (5) @(posedge clk);
    chk(got_total == sent_total, "all flits delivered");
    chk(n_contend > 0, "mutex contention");
    chk(n_block > 0, "VC blocked for lack of credit");
    chk(n_release > 0, "timer released a blocked VC");
    $display("contend=%0d blocked=%0d released=%0d", n_contend, n_block, n_release);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
