// opm: Output Port Module of one switch.
//
// The OPM looks at the request bit of every IPM, arbitrates round-robin
// between competing IPMs and sends the winner's flits on a two-phase,
// bundled-data channel toward the port interface. Once a head flit wins, the
// OPM stays locked to that IPM until its tail flit has passed, so packets
// never interleave inside one VC.
//
// Output channel: out_data is stable while out_req differs from out_ack; a
// new flit is latched, and out_req toggled, only when the channel is idle
// (out_req == out_ack). The receiver toggles out_ack when it has taken the
// flit. gnt is one-hot and valid in the cycle the flit is latched; in_flit is
// the granted IPM's flit, returned by the crossbar in the same cycle.
//
// Picking up valid requests and arbitrating between them follows the
// router's description; round-robin order, the packet lock and the clocked
// handshake are this design's own choices.
module opm
  import noc_pkg::*;
#(
  parameter int unsigned NP = NUM_PORTS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NP-1:0] req,
  output logic [NP-1:0] gnt,
  input  flit_t         in_flit,
  output logic          out_req,
  input  logic          out_ack,
  output flit_t         out_data
);
  localparam int unsigned IW = (NP > 1) ? $clog2(NP) : 1;

  logic          locked;
  logic [IW-1:0] owner;     // IPM holding the lock
  logic [IW-1:0] rr_next;   // first IPM to look at when unlocked
  logic          idle;
  logic          found;
  logic [IW-1:0] sel;

  assign idle = (out_req == out_ack);

  function automatic logic [IW-1:0] wrap_idx(input int k);
    int unsigned s;
    s = int'(rr_next) + k;
    if (s >= NP) s = s - NP;
    return IW'(s);
  endfunction

  always_comb begin
    found = 1'b0;
    sel   = '0;
    if (locked) begin
      found = req[owner];
      sel   = owner;
    end else begin
      for (int k = NP - 1; k >= 0; k--) begin
        // scan from rr_next upward, wrapping; the last hit in this
        // descending loop is the first one in round-robin order
        if (req[wrap_idx(k)]) begin
          found = 1'b1;
          sel   = wrap_idx(k);
        end
      end
    end
    gnt = '0;
    if (idle && found) gnt[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked   <= 1'b0;
      owner    <= '0;
      rr_next  <= '0;
      out_req  <= 1'b0;
      out_data <= '0;
    end else if (|gnt) begin
      out_data <= in_flit;
      out_req  <= ~out_req;
      if (in_flit.tail) begin
        locked  <= 1'b0;
        rr_next <= (sel == IW'(NP - 1)) ? '0 : sel + 1'b1;
      end else begin
        locked  <= 1'b1;
        owner   <= sel;
      end
    end
  end

  a_onehot_gnt: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_stable_data: assert property (@(posedge clk) disable iff (!rst_n)
                                  (!idle && $stable(out_req)) |-> $stable(out_data));

endmodule
