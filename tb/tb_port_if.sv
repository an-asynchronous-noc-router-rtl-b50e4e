// tb_port_if: self-checking test of one port interface.
//
// Receive side: flits with random VC arrive on the incoming two-phase link
// at random times; each must be written into the buffer of its VC (and only
// that one) exactly once, in the cycle after in_req toggles, and in_ack must
// follow. Random buffer pops must come back as one in_credit transition each
// on the right VC. Send side: two OPM models send flits that must appear on
// the outgoing link, per VC in order, under credits returned by a link sink.
module tb_port_if;
  import noc_pkg::*;
  localparam int DEPTH = BUF_DEPTH;
  logic clk = 0, rst_n = 0;
  logic in_req, in_ack, out_req, out_ack;
  link_flit_t in_data, out_data;
  logic [1:0] in_credit, out_credit, buf_push, buf_pop, sw_req, sw_ack;
  flit_t buf_flit;
  flit_t [1:0] sw_data;
  int checks = 0, failures = 0;
  int cycle = 0;
  link_flit_t rx_exp[$];
  int pops_sent[2] = '{default: 0}, credits_seen[2] = '{default: 0};
  logic [1:0] credit_prev = '0;
  flit_t swq[2][$];
  int sw_next[2] = '{default: 0};
  int sink_cnt[2] = '{default: 0};
  int tx_got = 0, rx_got = 0;
  bit pop_en = 1;

  port_if #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

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
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // incoming link driver and buffer-write checker
  initial begin
    in_req = 0; in_data = '0;
    wait (rst_n);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      while (in_req != in_ack) @(negedge clk);
      repeat ($urandom_range(0, 2)) @(negedge clk);
      in_data = link_flit_t'({$urandom, $urandom, $urandom});
      rx_exp.push_back(in_data);
      in_req = ~in_req;
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (buf_push != 2'b00) begin
      link_flit_t e;
      chk(rx_exp.size() > 0, "unexpected buffer write");
      if (rx_exp.size() > 0) begin
        e = rx_exp.pop_front();
        chk(buf_push == (e.vc ? 2'b10 : 2'b01), "write goes to the flit's VC");
        chk(buf_flit == e.flit, "written flit");
        rx_got++;
      end
    end
    // credit returns for random pops
    for (int v = 0; v < 2; v++) begin
      if (in_credit[v] != credit_prev[v]) credits_seen[v]++;
      if (buf_pop[v]) pops_sent[v]++;
    end
    credit_prev <= in_credit;
  end
  initial begin
    buf_pop = '0;
    forever begin
      @(negedge clk);
      buf_pop = 2'($urandom) & {2{rst_n && pop_en}};
    end
  end

  // OPM models and outgoing link sink
  initial begin
    sw_req = '0; sw_data = '0;
    for (int v = 0; v < 2; v++)
      for (int i = 0; i < 60; i++) begin
        flit_t f;
        f = '{head: 1'b1, tail: 1'b1, payload: {16'(i), 15'd0, 1'(v)}};
        swq[v].push_back(f);
      end
    forever begin
      @(negedge clk);
      for (int v = 0; v < 2; v++)
        if (rst_n && sw_req[v] == sw_ack[v] && swq[v].size() > 0) begin
          sw_data[v] = swq[v].pop_front();
          sw_req[v] = ~sw_req[v];
        end
    end
  end
  initial begin
    out_ack = 0; out_credit = '0;
    forever begin
      @(posedge clk);
      if (rst_n && out_req != out_ack) begin
        int v;
        v = int'(out_data.vc);
        chk(int'(out_data.flit.payload[0]) == v, "link VC bit");
        chk(int'(out_data.flit.payload[31:16]) == sw_next[v], "link order per VC");
        sw_next[v]++;
        sink_cnt[v]++;
        chk(sink_cnt[v] <= DEPTH, "credit respected");
        tx_got++;
        out_ack <= ~out_ack;
      end
      for (int v = 0; v < 2; v++)
        if (sink_cnt[v] > 0 && $urandom_range(0, 3) == 0) begin
          sink_cnt[v]--;
          out_credit[v] <= ~out_credit[v];
        end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (rx_got == 300 && tx_got == 120);
    @(negedge clk);
    pop_en = 0;
    repeat (4) @(posedge clk);
    for (int v = 0; v < 2; v++) chk(credits_seen[v] == pops_sent[v], "one credit per pop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
