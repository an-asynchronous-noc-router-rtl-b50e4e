// tb_router_plane: self-checking test of one router plane.
//
// plane_traffic drives all five ports with random packets and sinks all five
// outputs; every flit is checked for route, VC, packet integrity and buffer
// overflow. The first flit is sent into an idle router and must leave after
// exactly 3 cycles (buffer write, OPM, link register); later phases drain the
// outputs slowly so that credits run out.
module tb_router_plane;
  import noc_pkg::*;
  localparam int NP = NUM_PORTS;
  logic clk = 0, rst_n = 0;
  logic       [NP-1:0] in_req, in_ack, out_req, out_ack;
  link_flit_t [NP-1:0] in_data, out_data;
  logic [NP-1:0][1:0]  in_credit, out_credit;
  int drain_pct = 100, src_pct = 0;
  int checks, failures, flits_sent, flits_got, pkts_got, min_lat, max_lat;
  logic done;
  int cycle = 0;

  router_plane dut (.clk, .rst_n, .my_x(4'd2), .my_y(4'd2),
                    .in_req, .in_ack, .in_data, .in_credit,
                    .out_req, .out_ack, .out_data, .out_credit);

  plane_traffic #(.NPKT(30)) u_tr (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit first_ok;
    repeat (3) @(posedge clk);
    rst_n = 1;
    src_pct = 100;
    wait (flits_sent > 0);
    src_pct = 0;
    wait (flits_got > 0);
    first_ok = (min_lat == 3);
    src_pct = 60;
    while (!done) begin
      @(negedge clk);
      drain_pct = ((cycle / 300) % 2 == 0) ? 100 : 8;
    end
    repeat (3) @(posedge clk);
    $display("flits=%0d packets=%0d latency min=%0d max=%0d", flits_got, pkts_got, min_lat, max_lat);
    if (!first_ok) $display("FAIL first flit latency");
    if (min_lat < 3) $display("FAIL a flit faster than 3 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 2,
             failures + (first_ok ? 0 : 1) + (min_lat < 3 ? 1 : 0));
    $finish;
  end
endmodule
