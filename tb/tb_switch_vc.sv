// tb_switch_vc: self-checking test of one switch (one VC).
//
// Each of the five input buffers is filled with random packets of 2 to 6
// flits, never beyond the 7 free slots the testbench counts (one slot back
// per pop_evt pulse). The five OPM channels are acknowledged after random
// delays. Checked: every flit leaves on its XY-routed port, packets arrive
// contiguous and complete, each exactly once, pop_evt pulses match the flits
// that left, and a flit written into an empty switch appears on its OPM
// channel one cycle later. Output contention and full buffers are counted
// and must both occur.
module tb_switch_vc;
  import noc_pkg::*;
  localparam int NP = NUM_PORTS;
  localparam int DEPTH = BUF_DEPTH;
  localparam int NPKT = 40;
  logic clk = 0, rst_n = 0;
  logic  [NP-1:0] push, pop_evt, out_req, out_ack;
  flit_t [NP-1:0] push_flit, out_data;
  int checks = 0, failures = 0;
  int cycle = 0;
  flit_t srcq[NP][$];
  int free_slots[NP];
  int cur_src[NP];
  int total = 0, got = 0, pops = 0, pkts = 0;
  int n_contend = 0, n_full = 0;
  int first_push = -1, first_out = -1;

  switch_vc dut (.clk, .rst_n, .my_x(4'd2), .my_y(4'd2), .push, .push_flit,
                 .pop_evt, .out_req, .out_ack, .out_data);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (30000) @(posedge clk);
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

  function automatic int ref_route(input int dx, input int dy);
    if (dx > 2) return 2;
    if (dx < 2) return 4;
    if (dy > 2) return 1;
    if (dy < 2) return 3;
    return 0;
  endfunction

  initial begin
    for (int p = 0; p < NP; p++) begin
      free_slots[p] = DEPTH;
      cur_src[p] = -1;
      for (int k = 0; k < NPKT; k++) begin
        int len, dx, dy;
        len = $urandom_range(2, 6);
        dx = $urandom_range(0, 4);
        dy = $urandom_range(0, 4);
        for (int f = 0; f < len; f++) begin
          flit_t fl;
          fl.head = (f == 0);
          fl.tail = (f == len - 1);
          fl.payload = {16'(k), 1'b0, 3'(f), 1'b0, 3'(p), 4'(dy), 4'(dx)};
          srcq[p].push_back(fl);
          total++;
        end
      end
    end
  end

  // writers into the input buffers
  initial begin
    push = '0; push_flit = '0;
    wait (rst_n);
    // one flit into the empty switch to time the path
    @(negedge clk);
    push[0] = 1'b1;
    push_flit[0] = srcq[0].pop_front();
    free_slots[0]--;
    first_push = cycle;
    @(negedge clk);
    push[0] = 1'b0;
    while (got == 0) begin
      @(negedge clk);
      if (pop_evt[0]) free_slots[0]++;
    end
    forever begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        if (pop_evt[p]) free_slots[p]++;
      end
      for (int p = 0; p < NP; p++) begin
        push[p] = rst_n && srcq[p].size() > 0 && free_slots[p] > 0 &&
                  $urandom_range(0, 99) < 70;
        if (push[p]) begin
          push_flit[p] = srcq[p].pop_front();
          free_slots[p]--;
        end
      end
    end
  end

  int contend_p[NP] = '{default: 0};
  for (genvar p = 0; p < NP; p++) begin : g_mon
    always @(posedge clk) if (rst_n && $countones(dut.g_port[p].u_opm.req) > 1) contend_p[p]++;
  end

  // OPM channel sinks
  initial begin
    out_ack = '0;
    forever begin
      @(posedge clk);
      if (rst_n) begin
        for (int p = 0; p < NP; p++) if (pop_evt[p]) pops++;
        for (int p = 0; p < NP; p++) begin
          if (free_slots[p] == 0) n_full++;
        end
        for (int o = 0; o < NP; o++)
          if (out_req[o] != out_ack[o] && (first_out < 0 || $urandom_range(0, 2) == 0)) begin
            flit_t f;
            int s;
            f = out_data[o];
            s = int'(f.payload[10:8]);
            if (first_out < 0) first_out = cycle;
            chk(o == ref_route(int'(f.payload[3:0]), int'(f.payload[7:4])), "XY route");
            if (cur_src[o] < 0) chk(f.head, "packet starts with head");
            else chk(!f.head && s == cur_src[o], "packet contiguous");
            cur_src[o] = f.tail ? -1 : s;
            if (f.tail) pkts++;
            got++;
            out_ack[o] <= ~out_ack[o];
          end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got == total);
    repeat (3) @(posedge clk);
    // pushed before edge n+1 (buffer write), latched by the OPM at edge n+2
    chk(first_out - first_push == 2, "buffer write to OPM channel in 1 cycle");
    chk(pkts == NP * NPKT, "all packets");
    foreach (contend_p[p]) n_contend += contend_p[p];
    chk(pops == total, "one pop_evt per flit");
    chk(n_contend > 0, "output contention");
    chk(n_full > 0, "input buffer full");
    $display("flits=%0d contend=%0d full=%0d first=%0d", got, n_contend, n_full, first_out - first_push);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
