// sync_fifo: single-clock first-in first-out buffer.
//
// Every FIFO of the design is one of these: the A and B automaton FIFOs, the
// permutation FIFO, and the search and delete FIFOs of each search unit.
// Storage is a DEPTH x WIDTH array addressed by a read and a write pointer;
// a counter gives the fill level.  Dout always shows the oldest entry
// (first-word fall-through), so a consumer looks at Dout and pulses pop to
// take it; push writes Din at the clock edge.  Push and pop may be high in
// the same cycle.  A push while FULL (unless a pop frees the slot in the same cycle) or a
// pop while EMPTY is ignored, and an
// assertion reports it.  rst empties the buffer in one cycle.
// The push/pop/Din/Dout/EMPTY interface follows the document; the
// fall-through read and the FULL and count outputs are this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       push,
  input  logic                       pop,
  input  logic [WIDTH-1:0]           Din,
  output logic [WIDTH-1:0]           Dout,
  output logic                       EMPTY,
  output logic                       FULL,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;

  logic do_push, do_pop;
  assign do_push = push && (!FULL || pop);
  assign do_pop  = pop && !EMPTY;

  assign EMPTY = (count == 0);
  assign FULL  = (count == CW'(DEPTH));
  assign Dout  = mem[rd_ptr];

  function automatic logic [AW-1:0] inc_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= Din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= inc_ptr(rd_ptr);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) push |-> !FULL || pop)
    else $error("sync_fifo: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) pop |-> !EMPTY)
    else $error("sync_fifo: pop while empty");
endmodule
