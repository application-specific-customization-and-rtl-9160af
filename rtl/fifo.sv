// fifo: unidirectional circular FIFO joining a producer processor to a
// consumer processor.
//
// A circular buffer of DEPTH words with a read pointer, a write pointer and an
// occupancy count. The head word is presented combinationally on rdata so the
// consumer can take it in the same cycle as it checks `empty`; likewise the
// producer sees `full` in the cycle it writes. A push and a pop may happen in
// the same cycle, also on a full FIFO (the pop frees the slot the push fills).
// A push while full or a pop while empty is ignored; the processor side never
// issues one, it retries instead.
//
// Interface: push/wdata/full on the producer side, pop/rdata/empty on the
// consumer side, one clock, synchronous active-high reset that empties it.
// Timing: a word pushed in cycle t can be popped from cycle t+1 on.
//
// The default depth of four 32-bit words (128 memory bits) is the FIFO size
// the design reports; the pointer/count organisation is this design's own.
module fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rptr, wptr;
  logic [AW:0]      count;
  logic             do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign rdata   = mem[rptr];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rptr  <= '0;
      wptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= incr(wptr);
      if (do_pop)  rptr <= incr(rptr);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata;
  end

  // The processor interface retries instead of over- or under-running.
  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(pop && empty));
endmodule
