// mesh_terminal: request/response terminal on the local ports of one node
// (testbench model, not synthesizable).
//
// It sends NREQ request packets (2 to 6 flits, random VC) to random other
// nodes of a 2x2 mesh on the request plane, respecting 7 credits per VC.
// Every request it receives is answered by a 2-flit response packet sent
// back to the requester on the response plane. Received flits are checked:
// they must be addressed to this node, arrive on the right plane, and form
// contiguous packets per VC. Responses received are counted per request.
//
// Payload layout: [7:0] {dst_y, dst_x}, [9:8] source node, [10] 0 = request
// / 1 = response, [11] VC, [14:12] flit index, [31:16] request number.
module mesh_terminal
  import noc_pkg::*;
#(
  parameter int NODE  = 0,
  parameter int NREQ  = 20,
  parameter int DEPTH = BUF_DEPTH
) (
  input  logic       clk,
  input  logic       rst_n,
  // request plane local port
  output logic       q_tx_req,
  input  logic       q_tx_ack,
  output link_flit_t q_tx_data,
  input  logic [1:0] q_tx_credit,
  input  logic       q_rx_req,
  output logic       q_rx_ack,
  input  link_flit_t q_rx_data,
  output logic [1:0] q_rx_credit,
  // response plane local port
  output logic       s_tx_req,
  input  logic       s_tx_ack,
  output link_flit_t s_tx_data,
  input  logic [1:0] s_tx_credit,
  input  logic       s_rx_req,
  output logic       s_rx_ack,
  input  link_flit_t s_rx_data,
  output logic [1:0] s_rx_credit,
  output int         checks,
  output int         failures,
  output int         reqs_got,
  output int         rsps_got,
  output logic       done
);
  localparam int MY_X = NODE % 2, MY_Y = NODE / 2;

  link_flit_t qq[$], sq[$];
  int qcred[2], scred[2];
  logic [1:0] qcp, scp;
  int cur_q[2], cur_s[2];
  int qbuf[2], sbuf[2];   // flits held in this terminal's receive buffers
  bit answered[int];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL node %0d: %s at %0t", NODE, what, $time);
    end
  endtask

  function automatic link_flit_t mk(input int dst, input int kind, input int vc,
                                    input int f, input int len, input int num);
    link_flit_t lf;
    lf.vc = 1'(vc);
    lf.flit.head = (f == 0);
    lf.flit.tail = (f == len - 1);
    lf.flit.payload = {16'(num), 1'b0, 3'(f), 1'(vc), 1'(kind), 2'(NODE), 4'(dst / 2), 4'(dst % 2)};
    return lf;
  endfunction

  initial begin
    checks = 0; failures = 0; reqs_got = 0; rsps_got = 0; done = 0;
    qcred = '{DEPTH, DEPTH};
    scred = '{DEPTH, DEPTH};
    cur_q = '{-1, -1};
    cur_s = '{-1, -1};
    qbuf = '{0, 0};
    sbuf = '{0, 0};
    for (int k = 0; k < NREQ; k++) begin
      int dst, len, vc;
      dst = (NODE + $urandom_range(1, 3)) % 4;
      len = $urandom_range(2, 6);
      vc  = $urandom_range(0, 1);
      for (int f = 0; f < len; f++) qq.push_back(mk(dst, 0, vc, f, len, k));
    end
  end

  // senders on both planes
  initial begin
    q_tx_req = 0; q_tx_data = '0; s_tx_req = 0; s_tx_data = '0;
    qcp = '0; scp = '0;
    forever begin
      @(negedge clk);
      if (rst_n) begin
        for (int v = 0; v < 2; v++) begin
          if (q_tx_credit[v] != qcp[v]) qcred[v]++;
          if (s_tx_credit[v] != scp[v]) scred[v]++;
        end
        qcp = q_tx_credit;
        scp = s_tx_credit;
        if (q_tx_req == q_tx_ack && qq.size() > 0 && qcred[qq[0].vc] > 0 && $urandom_range(0, 2) != 0) begin
          q_tx_data = qq.pop_front();
          qcred[q_tx_data.vc]--;
          q_tx_req = ~q_tx_req;
        end
        if (s_tx_req == s_tx_ack && sq.size() > 0 && scred[sq[0].vc] > 0) begin
          s_tx_data = sq.pop_front();
          scred[s_tx_data.vc]--;
          s_tx_req = ~s_tx_req;
        end
      end
    end
  end

  // receivers: accept, check, free the slot a few cycles later
  initial begin
    q_rx_ack = 0; q_rx_credit = '0; s_rx_ack = 0; s_rx_credit = '0;
    forever begin
      @(posedge clk);
      if (rst_n) begin
        if (q_rx_req != q_rx_ack) begin
          link_flit_t lf;
          int v, src;
          lf = q_rx_data;
          v = int'(lf.vc);
          src = int'(lf.flit.payload[9:8]);
          chk(lf.flit.payload[3:0] == 4'(MY_X) && lf.flit.payload[7:4] == 4'(MY_Y), "request reached its destination");
          chk(lf.flit.payload[10] == 1'b0, "only requests on the request plane");
          chk(qbuf[v] < DEPTH, "request receive buffer overflow");
          qbuf[v]++;
          if (cur_q[v] < 0) chk(lf.flit.head, "request packet starts with head");
          else chk(src == cur_q[v] && !lf.flit.head, "request packet contiguous");
          cur_q[v] = lf.flit.tail ? -1 : src;
          if (lf.flit.tail) begin
            int num;
            num = int'(lf.flit.payload[31:16]);
            reqs_got++;
            // answer on the response plane, on the VC of the request
            sq.push_back(mk(src, 1, v, 0, 2, num));
            sq.push_back(mk(src, 1, v, 1, 2, num));
          end
          q_rx_ack <= ~q_rx_ack;
        end
        if (s_rx_req != s_rx_ack) begin
          link_flit_t lf;
          int v, src, num;
          lf = s_rx_data;
          v = int'(lf.vc);
          src = int'(lf.flit.payload[9:8]);
          num = int'(lf.flit.payload[31:16]);
          chk(lf.flit.payload[3:0] == 4'(MY_X) && lf.flit.payload[7:4] == 4'(MY_Y), "response reached its destination");
          chk(lf.flit.payload[10] == 1'b1, "only responses on the response plane");
          chk(sbuf[v] < DEPTH, "response receive buffer overflow");
          sbuf[v]++;
          if (cur_s[v] < 0) chk(lf.flit.head, "response packet starts with head");
          else chk(src == cur_s[v] && !lf.flit.head, "response packet contiguous");
          cur_s[v] = lf.flit.tail ? -1 : src;
          if (lf.flit.tail) begin
            chk(!answered.exists(num), "one response per request");
            answered[num] = 1;
            rsps_got++;
          end
          s_rx_ack <= ~s_rx_ack;
        end
        for (int v = 0; v < 2; v++) begin
          if (qbuf[v] > 0 && $urandom_range(0, 2) == 0) begin
            qbuf[v]--;
            q_rx_credit[v] <= ~q_rx_credit[v];
          end
          if (sbuf[v] > 0 && $urandom_range(0, 2) == 0) begin
            sbuf[v]--;
            s_rx_credit[v] <= ~s_rx_credit[v];
          end
        end
        if (rsps_got == NREQ && !done) begin
          chk(answered.num() == NREQ, "every request answered");
          done <= 1;
        end
      end
    end
  end
endmodule
