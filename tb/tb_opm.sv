// tb_opm: self-checking test of the Output Port Module.
//
// Five IPM models each hold a stream of packets (1 to 6 flits) aimed at this
// OPM and raise requests at random; a receiver on the two-phase output
// channel acknowledges after a random delay. Checked: grants are one-hot,
// only to requesters and only while the channel is idle; packets never
// interleave (the lock holds from head to tail); each source's flits arrive
// complete and in order; and a free OPM hands the grant on in round-robin
// order, compared with a reference pointer kept here.
module tb_opm;
  import noc_pkg::*;
  localparam int NP = NUM_PORTS;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] req, gnt;
  flit_t in_flit, out_data;
  logic out_req, out_ack;
  int checks = 0, failures = 0;
  flit_t src_q[NP][$];
  int rr_ref = 0;
  int cur_src = -1;
  int next_seq[NP] = '{default: 0};
  int got = 0, total = 0;
  int contended = 0;

  opm #(.NP(NP)) dut (.*);

  always #5 clk = ~clk;

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
      $display("FAIL %s at %0t req=%b gnt=%b", what, $time, req, gnt);
    end
  endtask

  // flit payload: [31:16] sequence within source, [10:8] source
  initial begin
    for (int s = 0; s < NP; s++) begin
      int seq;
      seq = 0;
      for (int p = 0; p < 40; p++) begin
        int len;
        len = $urandom_range(1, 6);
        for (int f = 0; f < len; f++) begin
          flit_t fl;
          fl.head = (f == 0);
          fl.tail = (f == len - 1);
          fl.payload = {16'(seq), 5'd0, 3'(s), 8'hA5};
          seq++;
          src_q[s].push_back(fl);
          total++;
        end
      end
    end
  end

  // receiver: random acknowledge delay, checks order and packet integrity
  initial begin
    out_ack = 0;
    forever begin
      @(posedge clk);
      if (rst_n && out_req != out_ack && $urandom_range(0, 2) == 0) begin
        int s;
        s = int'(out_data.payload[10:8]);
        chk(int'(out_data.payload[31:16]) == next_seq[s], "in-order per source");
        if (int'(out_data.payload[31:16]) != next_seq[s]) $display("src %0d got %0d exp %0d", s, out_data.payload[31:16], next_seq[s]);
        next_seq[s]++;
        if (cur_src < 0) chk(out_data.head, "first flit of a packet is a head");
        else             chk(s == cur_src && !out_data.head, "no interleaving");
        cur_src = out_data.tail ? -1 : s;
        got++;
        out_ack <= ~out_ack;
      end
    end
  end

  initial begin
    int locked_to;
    req = '0; in_flit = '0; locked_to = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (got < total) begin
      @(negedge clk);
      for (int s = 0; s < NP; s++)
        req[s] = (src_q[s].size() > 0) && ($urandom_range(0, 3) != 0);
      #1;
      if ($countones(req) > 1) contended++;
      in_flit = '0;
      for (int s = 0; s < NP; s++) if (gnt[s]) in_flit = src_q[s][0];
      chk($countones(gnt) <= 1, "one-hot grant");
      chk((gnt & ~req) == '0, "grant only to requester");
      if (out_req != out_ack) chk(gnt == '0, "no grant while channel busy");
      if (out_req == out_ack && req != '0) begin
        int exp_s;
        if (locked_to >= 0) exp_s = locked_to;
        else begin
          exp_s = -1;
          for (int k = 0; k < NP; k++)
            if (exp_s < 0 && req[(rr_ref + k) % NP]) exp_s = (rr_ref + k) % NP;
        end
        if (locked_to < 0 || req[locked_to]) chk(gnt == NP'(1 << exp_s), "round-robin / lock");
      end
      @(posedge clk);
      for (int s = 0; s < NP; s++) if (gnt[s]) begin
        if (in_flit.tail) begin
          locked_to = -1;
          rr_ref = (s + 1) % NP;
        end else locked_to = s;
        void'(src_q[s].pop_front());
      end
    end
    repeat (5) @(posedge clk);
    chk(contended > 0, "contention happened");
    chk(got == total, "all flits delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
