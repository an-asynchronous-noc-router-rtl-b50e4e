// mutex2: two-way mutual exclusion between the two VCs of an output link.
//
// In the asynchronous router this is a mutex element; in the clocked
// equivalent it is a two-input arbiter. A lone request is granted at once;
// when both request in the same cycle the VC that did not win last time is
// granted, so neither VC can starve the other.
//
// Interface: r[1:0] requests, g[1:0] one-hot grant (combinational from r);
// taken tells the arbiter that the grant was used this cycle, which moves the
// priority to the other VC.
//
// The mutex between the two VCs follows the router's output channel
// interface; the alternating tie-break is this design's own choice.
module mutex2 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] r,
  output logic [1:0] g,
  input  logic       taken
);
  logic prio;  // VC that wins a tie

  always_comb begin
    g = 2'b00;
    if (r[0] && (!r[1] || prio == 1'b0)) g[0] = 1'b1;
    else if (r[1])                       g[1] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                prio <= 1'b0;
    else if (taken && g[0])    prio <= 1'b1;
    else if (taken && g[1])    prio <= 1'b0;
  end

  a_mutex: assert property (@(posedge clk) disable iff (!rst_n) !(g[0] && g[1]));

endmodule
