// circ_fifo: circular FIFO used as the input buffer of every switch port.
//
// DEPTH entries are kept in a register array addressed by a write pointer and
// a read pointer that both wrap from DEPTH-1 back to 0, so no data ever moves
// inside the buffer; an occupancy counter tells full from empty. DEPTH need
// not be a power of two (the router uses 7).
//
// Interface: push writes din at the end of the cycle; dout shows the oldest
// entry whenever empty is low and pop removes it at the end of the cycle.
// Push and pop may happen in the same cycle, even when the buffer is full.
// Pushing into a full buffer without a pop, or popping an empty one, is a
// protocol error, checked by assertions: the
// credit flow control upstream never lets it happen.
//
// The depth of 7 is the router's; the pointer-and-counter structure is this
// design's own, as the buffer's insides are not specified.
module circ_fifo #(
  parameter int unsigned DEPTH = noc_pkg::BUF_DEPTH,
  parameter type         T     = noc_pkg::flit_t
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     din,
  input  logic pop,
  output T     dout,
  output logic empty,
  output logic full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [PW-1:0]   wr_ptr, rd_ptr;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == '0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  // Storage needs no reset: an entry is read only after it was written.
  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
