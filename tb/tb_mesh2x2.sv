// tb_mesh2x2: four router nodes in a 2x2 mesh, both planes, end to end.
//
// Nodes sit at (x,y) with index y*2+x and are joined by their North/East/
// South/West links on each plane; links at the mesh edge are tied idle and
// must stay idle. A mesh_terminal on every local port sends requests to the
// other nodes on the request plane and answers each request it receives
// with a response on the response plane. This exercises what a single node
// test cannot: credits returned by a real downstream router, multi-hop XY
// routes, and the two planes carrying the two traffic classes. The test
// passes when every request has been answered exactly once with all flit
// checks clean.
module tb_mesh2x2;
  import noc_pkg::*;
  localparam int NP = NUM_PORTS;
  localparam int NN = 4;
  localparam int NREQ = 25;

  logic clk = 0, rst_n = 0;
  // [plane][node], plane 0 = request, 1 = response
  logic       [NP-1:0] i_req [2][NN], i_ack [2][NN], o_req [2][NN], o_ack [2][NN];
  link_flit_t [NP-1:0] i_dat [2][NN], o_dat [2][NN];
  logic [NP-1:0][1:0]  i_crd [2][NN], o_crd [2][NN];
  int t_checks[NN], t_fail[NN], t_reqs[NN], t_rsps[NN];
  logic [NN-1:0] t_done;
  int checks = 0, failures = 0;
  int edge_toggles = 0;

  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // neighbour of node n through port p, or -1 at the mesh edge
  function automatic int nbr(input int n, input int p);
    int x, y;
    x = n % 2;
    y = n / 2;
    case (p)
      1: return (y == 0) ? n + 2 : -1;   // north
      2: return (x == 0) ? n + 1 : -1;   // east
      3: return (y == 1) ? n - 2 : -1;   // south
      4: return (x == 1) ? n - 1 : -1;   // west
      default: return -1;
    endcase
  endfunction

  function automatic int opposite(input int p);
    return (p == 1) ? 3 : (p == 3) ? 1 : (p == 2) ? 4 : 2;
  endfunction

  for (genvar pl = 0; pl < 2; pl++) begin : g_pl
    for (genvar n = 0; n < NN; n++) begin : g_n
      for (genvar p = 1; p < NP; p++) begin : g_p
        localparam int M = nbr(n, p);
        localparam int OP = opposite(p);
        if (M >= 0) begin : g_link
          assign i_req[pl][M][OP] = o_req[pl][n][p];
          assign i_dat[pl][M][OP] = o_dat[pl][n][p];
          assign o_ack[pl][n][p]  = i_ack[pl][M][OP];
          assign o_crd[pl][n][p]  = i_crd[pl][M][OP];
        end else begin : g_edge
          assign i_req[pl][n][p] = 1'b0;
          assign i_dat[pl][n][p] = '0;
          assign o_ack[pl][n][p] = 1'b0;
          assign o_crd[pl][n][p] = '0;
          always @(posedge clk) if (rst_n && o_req[pl][n][p]) edge_toggles++;
        end
      end
    end
  end

  for (genvar n = 0; n < NN; n++) begin : g_node
    router_node u_node (
      .clk, .rst_n, .my_x(4'(n % 2)), .my_y(4'(n / 2)),
      .req_in_req(i_req[0][n]), .req_in_ack(i_ack[0][n]), .req_in_data(i_dat[0][n]), .req_in_credit(i_crd[0][n]),
      .req_out_req(o_req[0][n]), .req_out_ack(o_ack[0][n]), .req_out_data(o_dat[0][n]), .req_out_credit(o_crd[0][n]),
      .rsp_in_req(i_req[1][n]), .rsp_in_ack(i_ack[1][n]), .rsp_in_data(i_dat[1][n]), .rsp_in_credit(i_crd[1][n]),
      .rsp_out_req(o_req[1][n]), .rsp_out_ack(o_ack[1][n]), .rsp_out_data(o_dat[1][n]), .rsp_out_credit(o_crd[1][n])
    );

    mesh_terminal #(.NODE(n), .NREQ(NREQ)) u_term (
      .clk, .rst_n,
      .q_tx_req(i_req[0][n][0]), .q_tx_ack(i_ack[0][n][0]), .q_tx_data(i_dat[0][n][0]), .q_tx_credit(i_crd[0][n][0]),
      .q_rx_req(o_req[0][n][0]), .q_rx_ack(o_ack[0][n][0]), .q_rx_data(o_dat[0][n][0]), .q_rx_credit(o_crd[0][n][0]),
      .s_tx_req(i_req[1][n][0]), .s_tx_ack(i_ack[1][n][0]), .s_tx_data(i_dat[1][n][0]), .s_tx_credit(i_crd[1][n][0]),
      .s_rx_req(o_req[1][n][0]), .s_rx_ack(o_ack[1][n][0]), .s_rx_data(o_dat[1][n][0]), .s_rx_credit(o_crd[1][n][0]),
      .checks(t_checks[n]), .failures(t_fail[n]), .reqs_got(t_reqs[n]), .rsps_got(t_rsps[n]), .done(t_done[n])
    );
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int reqs;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&t_done);
    repeat (3) @(posedge clk);
    reqs = 0;
    for (int n = 0; n < NN; n++) begin
      checks += t_checks[n];
      failures += t_fail[n];
      reqs += t_reqs[n];
    end
    checks += 2;
    if (reqs != NN * NREQ) begin
      failures++;
      $display("FAIL requests received %0d, expected %0d", reqs, NN * NREQ);
    end
    if (edge_toggles != 0) begin
      failures++;
      $display("FAIL traffic left the mesh edge");
    end
    $display("requests %0d answered, %0d cycles", reqs, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
