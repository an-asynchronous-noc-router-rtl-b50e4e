// tb_router_node: end-to-end test of a double-plane router node at its
// default size (5 ports, 2 VCs, 7-slot buffers per VC and port).
//
// Each plane gets its own plane_traffic model: random packets of 2 to 6
// flits, random VC, destinations spread evenly over a 5x5 mesh around the
// node at (2,2), injected on all five ports of both planes at once. Output
// drain alternates between full speed and a slow trickle so that credits run
// out. Every flit is checked for route, VC, packet integrity, buffer
// overflow and delivery; the first flit crosses an idle node in exactly 3
// cycles and no flit is faster.
//
// The mechanisms of the router are counted and each must occur: OPM
// arbitration between competing IPMs, an OPM held by a packet whose next flit
// is not there yet (wormhole lock), both VCs competing for a link (mutex), a
// VC blocked for lack of credit, a timer check releasing a blocked VC, a send
// folding queued credit returns into the count (lazy update), a full input
// buffer, and traffic in both planes at the same time.
module tb_router_node;
  import noc_pkg::*;
  localparam int NP = NUM_PORTS;
  localparam int NPKT = 60;

  logic clk = 0, rst_n = 0;
  logic       [NP-1:0] q_in_req, q_in_ack, q_out_req, q_out_ack;
  link_flit_t [NP-1:0] q_in_data, q_out_data;
  logic [NP-1:0][1:0]  q_in_credit, q_out_credit;
  logic       [NP-1:0] s_in_req, s_in_ack, s_out_req, s_out_ack;
  link_flit_t [NP-1:0] s_in_data, s_out_data;
  logic [NP-1:0][1:0]  s_in_credit, s_out_credit;
  int drain_pct = 100, src_pct = 0;
  int q_checks, q_fail, q_sent, q_got, q_pkts, q_min, q_max;
  int s_checks, s_fail, s_sent, s_got, s_pkts, s_min, s_max;
  logic q_done, s_done;
  int cycle = 0;

  router_node dut (
    .clk, .rst_n, .my_x(4'd2), .my_y(4'd2),
    .req_in_req(q_in_req), .req_in_ack(q_in_ack), .req_in_data(q_in_data), .req_in_credit(q_in_credit),
    .req_out_req(q_out_req), .req_out_ack(q_out_ack), .req_out_data(q_out_data), .req_out_credit(q_out_credit),
    .rsp_in_req(s_in_req), .rsp_in_ack(s_in_ack), .rsp_in_data(s_in_data), .rsp_in_credit(s_in_credit),
    .rsp_out_req(s_out_req), .rsp_out_ack(s_out_ack), .rsp_out_data(s_out_data), .rsp_out_credit(s_out_credit)
  );

  plane_traffic #(.NPKT(NPKT)) u_req_tr (
    .clk, .rst_n, .drain_pct, .src_pct,
    .in_req(q_in_req), .in_ack(q_in_ack), .in_data(q_in_data), .in_credit(q_in_credit),
    .out_req(q_out_req), .out_ack(q_out_ack), .out_data(q_out_data), .out_credit(q_out_credit),
    .checks(q_checks), .failures(q_fail), .flits_sent(q_sent), .flits_got(q_got), .pkts_got(q_pkts),
    .min_lat(q_min), .max_lat(q_max), .done(q_done));

  plane_traffic #(.NPKT(NPKT)) u_rsp_tr (
    .clk, .rst_n, .drain_pct, .src_pct,
    .in_req(s_in_req), .in_ack(s_in_ack), .in_data(s_in_data), .in_credit(s_in_credit),
    .out_req(s_out_req), .out_ack(s_out_ack), .out_data(s_out_data), .out_credit(s_out_credit),
    .checks(s_checks), .failures(s_fail), .flits_sent(s_sent), .flits_got(s_got), .pkts_got(s_pkts),
    .min_lat(s_min), .max_lat(s_max), .done(s_done));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- mechanism counters ----------------
  localparam int M_ARB = 0, M_LOCK = 1, M_MUTEX = 2, M_BLOCK = 3, M_TIMER = 4,
                 M_LAZY = 5, M_FULL = 6, M_BOTH = 7, M_N = 8;
  int mech[M_N] = '{default: 0};
  int m_arb[2][2][NP] = '{default: 0};
  int m_lock[2][2][NP] = '{default: 0};
  int m_full[2][2][NP] = '{default: 0};
  int m_mutex[2][NP] = '{default: 0};
  int m_block[2][NP] = '{default: 0};
  int m_timer[2][NP] = '{default: 0};
  int m_lazy[2][NP] = '{default: 0};
  string mech_name[M_N] = '{"OPM arbitration", "wormhole lock stall", "VC mutex contention",
                            "credit block", "timer release", "lazy credit fold",
                            "input buffer full", "both planes busy"};

  for (genvar v = 0; v < 2; v++) begin : g_mv
    for (genvar p = 0; p < NP; p++) begin : g_mp
      always @(posedge clk) if (rst_n) begin
        if ($countones(dut.u_req_plane.g_switch[v].u_switch.g_port[p].u_opm.req) > 1) m_arb[0][v][p]++;
        if ($countones(dut.u_rsp_plane.g_switch[v].u_switch.g_port[p].u_opm.req) > 1) m_arb[1][v][p]++;
        if (dut.u_req_plane.g_switch[v].u_switch.g_port[p].u_opm.locked &&
            !dut.u_req_plane.g_switch[v].u_switch.g_port[p].u_opm.found) m_lock[0][v][p]++;
        if (dut.u_rsp_plane.g_switch[v].u_switch.g_port[p].u_opm.locked &&
            !dut.u_rsp_plane.g_switch[v].u_switch.g_port[p].u_opm.found) m_lock[1][v][p]++;
        if (dut.u_req_plane.g_switch[v].u_switch.g_port[p].u_buf.full) m_full[0][v][p]++;
        if (dut.u_rsp_plane.g_switch[v].u_switch.g_port[p].u_buf.full) m_full[1][v][p]++;
      end
    end
  end
  for (genvar p = 0; p < NP; p++) begin : g_mc
    always @(posedge clk) if (rst_n) begin
      if (dut.u_req_plane.g_port[p].u_if.u_vc_ctrl.mreq == 2'b11) m_mutex[0][p]++;
      if (dut.u_rsp_plane.g_port[p].u_if.u_vc_ctrl.mreq == 2'b11) m_mutex[1][p]++;
      if ((dut.u_req_plane.g_port[p].u_if.u_vc_ctrl.pending & ~dut.u_req_plane.g_port[p].u_if.u_vc_ctrl.valid) != 0) m_block[0][p]++;
      if ((dut.u_rsp_plane.g_port[p].u_if.u_vc_ctrl.pending & ~dut.u_rsp_plane.g_port[p].u_if.u_vc_ctrl.valid) != 0) m_block[1][p]++;
      if ((dut.u_req_plane.g_port[p].u_if.u_vc_ctrl.forced[0] && dut.u_req_plane.g_port[p].u_if.u_vc_ctrl.g_vc[0].u_fd.queued != 0) ||
          (dut.u_req_plane.g_port[p].u_if.u_vc_ctrl.forced[1] && dut.u_req_plane.g_port[p].u_if.u_vc_ctrl.g_vc[1].u_fd.queued != 0)) m_timer[0][p]++;
      if ((dut.u_rsp_plane.g_port[p].u_if.u_vc_ctrl.forced[0] && dut.u_rsp_plane.g_port[p].u_if.u_vc_ctrl.g_vc[0].u_fd.queued != 0) ||
          (dut.u_rsp_plane.g_port[p].u_if.u_vc_ctrl.forced[1] && dut.u_rsp_plane.g_port[p].u_if.u_vc_ctrl.g_vc[1].u_fd.queued != 0)) m_timer[1][p]++;
      if ((dut.u_req_plane.g_port[p].u_if.u_vc_ctrl.send[0] && dut.u_req_plane.g_port[p].u_if.u_vc_ctrl.g_vc[0].u_fd.queued != 0) ||
          (dut.u_req_plane.g_port[p].u_if.u_vc_ctrl.send[1] && dut.u_req_plane.g_port[p].u_if.u_vc_ctrl.g_vc[1].u_fd.queued != 0)) m_lazy[0][p]++;
      if ((dut.u_rsp_plane.g_port[p].u_if.u_vc_ctrl.send[0] && dut.u_rsp_plane.g_port[p].u_if.u_vc_ctrl.g_vc[0].u_fd.queued != 0) ||
          (dut.u_rsp_plane.g_port[p].u_if.u_vc_ctrl.send[1] && dut.u_rsp_plane.g_port[p].u_if.u_vc_ctrl.g_vc[1].u_fd.queued != 0)) m_lazy[1][p]++;
    end
  end
  always @(posedge clk) if (rst_n && (q_out_req != q_out_ack) && (s_out_req != s_out_ack)) mech[M_BOTH]++;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", q_checks + s_checks, q_fail + s_fail + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    bit first_ok;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // one flit per port into the idle node, to time the path
    src_pct = 100;
    wait (q_sent > 0);
    src_pct = 0;
    wait (q_got > 0 && s_got > 0);
    first_ok = (q_min == 3) && (s_min == 3);
    src_pct = 70;
    while (!(q_done && s_done)) begin
      @(negedge clk);
      drain_pct = ((cycle / 400) % 2 == 0) ? 100 : 6;
    end
    repeat (3) @(posedge clk);
    for (int pl = 0; pl < 2; pl++)
      for (int p = 0; p < NP; p++) begin
        for (int v = 0; v < 2; v++) begin
          mech[M_ARB]  += m_arb[pl][v][p];
          mech[M_LOCK] += m_lock[pl][v][p];
          mech[M_FULL] += m_full[pl][v][p];
        end
        mech[M_MUTEX] += m_mutex[pl][p];
        mech[M_BLOCK] += m_block[pl][p];
        mech[M_TIMER] += m_timer[pl][p];
        mech[M_LAZY]  += m_lazy[pl][p];
      end
    checks = q_checks + s_checks;
    failures = q_fail + s_fail;
    for (int m = 0; m < M_N; m++) begin
      checks++;
      $display("%-22s %0d", mech_name[m], mech[m]);
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism never happened: %s", mech_name[m]);
      end
    end
    checks += 2;
    if (!first_ok) begin
      failures++;
      $display("FAIL first flit latency %0d/%0d, expected 3", q_min, s_min);
    end
    if (q_min < 3 || s_min < 3) begin
      failures++;
      $display("FAIL a flit crossed faster than 3 cycles");
    end
    $display("request plane:  %0d flits, %0d packets, latency %0d..%0d", q_got, q_pkts, q_min, q_max);
    $display("response plane: %0d flits, %0d packets, latency %0d..%0d", s_got, s_pkts, s_min, s_max);
    $display("cycles: %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
