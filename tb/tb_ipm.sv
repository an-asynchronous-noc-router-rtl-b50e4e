// tb_ipm: self-checking test of the Input Port Module.
//
// Packets of 1 to 6 flits with random destinations around node (2,2) are
// offered from a model of the input buffer. The request must be one-hot on
// the XY-routed port (reference computed here: X first, east is +x, north is
// +y), held for every flit of the packet; the flit must be broadcast
// unchanged, and a flit must leave only in a cycle its OPM grants it.
module tb_ipm;
  import noc_pkg::*;
  localparam int NP = NUM_PORTS;
  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] my_x = 2, my_y = 2;
  logic in_valid, in_pop;
  flit_t in_flit, out_flit;
  logic [NP-1:0] req, gnt;
  int checks = 0, failures = 0;
  flit_t q[$];
  int exp_port;
  int seen[NP] = '{default: 0};

  ipm #(.NP(NP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_route(input int dx, input int dy);
    if (dx > 2) return 2;       // east
    if (dx < 2) return 4;       // west
    if (dy > 2) return 1;       // north
    if (dy < 2) return 3;       // south
    return 0;                   // local
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t req=%b", what, $time, req);
    end
  endtask

  initial begin
    in_valid = 0; in_flit = '0; gnt = '0; exp_port = 0;
    for (int p = 0; p < 300; p++) begin
      int len, dx, dy;
      len = $urandom_range(1, 6);
      dx = $urandom_range(0, 4);
      dy = $urandom_range(0, 4);
      for (int f = 0; f < len; f++) begin
        flit_t fl;
        fl.head = (f == 0);
        fl.tail = (f == len - 1);
        fl.payload = {$urandom_range(0, 65535), 8'(f), 4'(dy), 4'(dx)};
        if (f != 0) fl.payload[7:0] = 8'($urandom);  // body bits are not a header
        q.push_back(fl);
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (q.size() > 0) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 4) != 0;
      in_flit  = in_valid ? q[0] : flit_t'({$urandom, $urandom});
      if (in_valid && in_flit.head)
        exp_port = ref_route(int'(in_flit.payload[3:0]), int'(in_flit.payload[7:4]));
      #1;
      gnt = ($urandom_range(0, 2) != 0) ? req : '0;
      #1;
      if (in_valid) begin
        chk(req == NP'(1 << exp_port), "route");
        chk(out_flit == in_flit, "broadcast");
      end else begin
        chk(req == '0, "no request when empty");
      end
      chk(in_pop == (in_valid && gnt != '0), "pop on grant");
      @(posedge clk);
      if (in_valid && gnt != '0) begin
        seen[exp_port]++;
        void'(q.pop_front());
      end
    end
    for (int p = 0; p < NP; p++) chk(seen[p] > 0, "every direction routed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
