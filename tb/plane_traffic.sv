// plane_traffic: traffic source, link sink and scoreboard for one router
// plane (testbench model, not synthesizable).
//
// It plays the five neighbours of the plane. Each incoming link gets NPKT
// packets of 2 to 6 flits on a random VC with a random destination in a 5x5
// mesh around the node, sent only while the model holds credit for that VC
// (7 per VC at start, one back per in_credit transition). Each outgoing link
// ends in a 7-slot buffer per VC that drains at a random rate set by
// drain_pct and returns one out_credit transition per freed slot.
// Checked for every flit: it leaves on the XY-routed port, with the VC it
// came in on, never overflowing the downstream buffer; the flits of a packet
// arrive contiguous per output VC and in order; every packet arrives exactly
// once. The delay from an in_req transition to the out_req transition of the
// same flit is recorded (min_lat, max_lat).
//
// Payload layout: [7:0] {dst_y, dst_x}, [10:8] source port, [11] VC,
// [14:12] flit index, [31:16] packet number of that source.
module plane_traffic
  import noc_pkg::*;
#(
  parameter int NPKT  = 40,
  parameter int DEPTH = BUF_DEPTH,
  parameter int MY_X  = 2,
  parameter int MY_Y  = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  int                         drain_pct,
  input  int                         src_pct,
  output logic       [NUM_PORTS-1:0] in_req,
  input  logic       [NUM_PORTS-1:0] in_ack,
  output link_flit_t [NUM_PORTS-1:0] in_data,
  input  logic [NUM_PORTS-1:0][1:0]  in_credit,
  input  logic       [NUM_PORTS-1:0] out_req,
  output logic       [NUM_PORTS-1:0] out_ack,
  input  link_flit_t [NUM_PORTS-1:0] out_data,
  output logic [NUM_PORTS-1:0][1:0]  out_credit,
  output int                         checks,
  output int                         failures,
  output int                         flits_sent,
  output int                         flits_got,
  output int                         pkts_got,
  output int                         min_lat,
  output int                         max_lat,
  output logic                       done
);
  localparam int NP = NUM_PORTS;

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- sources ----------------
  link_flit_t srcq[NP][$];
  int  credit[NP][2];
  logic [NP-1:0][1:0] credit_prev;
  int  sent_cycle[int];           // key {src, pkt, idx}
  bit  delivered[int];            // key {src, pkt}
  int  total_flits = 0;

  function automatic int ref_route(input int dx, input int dy);
    if (dx > MY_X) return int'(P_EAST);
    if (dx < MY_X) return int'(P_WEST);
    if (dy > MY_Y) return int'(P_NORTH);
    if (dy < MY_Y) return int'(P_SOUTH);
    return int'(P_LOCAL);
  endfunction

  function automatic int fkey(input int src, input int pkt, input int idx);
    return (src << 24) | (pkt << 4) | idx;
  endfunction

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s at cycle %0d", what, cycle);
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) fail(what);
  endtask

  initial begin
    checks = 0; failures = 0; flits_sent = 0; flits_got = 0; pkts_got = 0;
    min_lat = 1 << 30; max_lat = 0; done = 0;
    for (int p = 0; p < NP; p++) begin
      credit[p][0] = DEPTH;
      credit[p][1] = DEPTH;
      for (int k = 0; k < NPKT; k++) begin
        int len, dx, dy, vc;
        len = $urandom_range(2, 6);
        dx  = $urandom_range(MY_X - 2, MY_X + 2);
        dy  = $urandom_range(MY_Y - 2, MY_Y + 2);
        vc  = $urandom_range(0, 1);
        for (int f = 0; f < len; f++) begin
          link_flit_t lf;
          lf.vc = 1'(vc);
          lf.flit.head = (f == 0);
          lf.flit.tail = (f == len - 1);
          lf.flit.payload = {16'(k), 1'b0, 3'(f), 1'(vc), 3'(p), 4'(dy), 4'(dx)};
          srcq[p].push_back(lf);
          total_flits++;
        end
      end
    end
  end

  initial begin
    in_req = '0;
    in_data = '0;
    credit_prev = '0;
    forever begin
      @(negedge clk);
      if (rst_n) begin
        for (int p = 0; p < NP; p++) begin
          for (int v = 0; v < 2; v++)
            if (in_credit[p][v] != credit_prev[p][v]) credit[p][v]++;
          credit_prev[p] = in_credit[p];
          if (in_req[p] == in_ack[p] && srcq[p].size() > 0 &&
              credit[p][srcq[p][0].vc] > 0 && $urandom_range(0, 99) < src_pct) begin
            link_flit_t lf;
            lf = srcq[p].pop_front();
            credit[p][lf.vc]--;
            in_data[p] = lf;
            in_req[p]  = ~in_req[p];
            // latency counts the rising edges from this in_req transition
            // to the edge that makes the out_req transition
            sent_cycle[fkey(p, int'(lf.flit.payload[31:16]), int'(lf.flit.payload[14:12]))] = cycle;
            flits_sent++;
          end
        end
      end
    end
  end

  // ---------------- sinks ----------------
  int dsn[NP][2];          // occupancy of the downstream buffers
  int cur_src[NP][2];      // packet currently open on an output VC, -1 if none
  int cur_idx[NP][2];
  int last_pkt[NP][NP][2]; // last packet number per (output, source, VC)

  initial begin
    for (int o = 0; o < NP; o++)
      for (int v = 0; v < 2; v++) begin
        dsn[o][v] = 0;
        cur_src[o][v] = -1;
        cur_idx[o][v] = 0;
        for (int s = 0; s < NP; s++) last_pkt[o][s][v] = -1;
      end
    out_ack = '0;
    out_credit = '0;
    forever begin
      @(posedge clk);
      if (rst_n) begin
        for (int o = 0; o < NP; o++) begin
          if (out_req[o] != out_ack[o]) begin
            link_flit_t lf;
            int s, k, f, v, key, lat;
            lf = out_data[o];
            v = int'(lf.vc);
            s = int'(lf.flit.payload[10:8]);
            f = int'(lf.flit.payload[14:12]);
            k = int'(lf.flit.payload[31:16]);
            chk(o == ref_route(int'(lf.flit.payload[3:0]), int'(lf.flit.payload[7:4])), "XY output port");
            chk(v == int'(lf.flit.payload[11]), "VC kept");
            chk(dsn[o][v] < DEPTH, "downstream buffer overflow");
            dsn[o][v]++;
            if (cur_src[o][v] < 0) begin
              chk(lf.flit.head && f == 0, "packet starts with its head");
              chk(k > last_pkt[o][s][v], "packet order per source");
              last_pkt[o][s][v] = k;
            end else begin
              chk(s == cur_src[o][v] && f == cur_idx[o][v] + 1 && !lf.flit.head, "packet contiguous");
            end
            cur_src[o][v] = lf.flit.tail ? -1 : s;
            cur_idx[o][v] = f;
            key = fkey(s, k, f);
            if (sent_cycle.exists(key)) begin
              lat = cycle - sent_cycle[key];
              if (lat < min_lat) min_lat = lat;
              if (lat > max_lat) max_lat = lat;
              sent_cycle.delete(key);
            end else fail("flit never sent or duplicated");
            if (lf.flit.tail) begin
              chk(!delivered.exists(fkey(s, k, 0)), "packet delivered once");
              delivered[fkey(s, k, 0)] = 1;
              pkts_got++;
            end
            flits_got++;
            out_ack[o] <= ~out_ack[o];
          end
          for (int v = 0; v < 2; v++)
            if (dsn[o][v] > 0 && $urandom_range(0, 99) < drain_pct) begin
              dsn[o][v]--;
              out_credit[o][v] <= ~out_credit[o][v];
            end
        end
        if (flits_got == total_flits && !done) begin
          chk(pkts_got == NP * NPKT, "all packets delivered");
          chk(sent_cycle.num() == 0, "no flit left in flight");
          done <= 1;
        end
      end
    end
  end
endmodule
