// get_mac_uart: collects received bytes into unary automata and buffers
// them in A_FIFO and B_FIFO.
//
// An automaton travels as BYTES bytes, least significant first; its packed
// form holds n next-state entries of $clog2(n) bits, entry q in the lowest
// bits for q = 0.  The host sends A, then B, then the next A, and so on.
// The collecting state machine is the document's:
//   idle      : wait for valid; take the first byte          -> initial
//   initial   : switch = 0 -> sendA, switch = 1 -> sendB
//   sendA/B   : take bytes until all BYTES are in (length)    -> pushFifoA/B
//   pushFifoA/B: push the automaton, complement switch        -> idle
// Both FIFOs are popped by the same pop, so a pair leaves together; empty is
// the B FIFO's empty flag, as B is the later half of a pair.  macA/macB show
// the oldest pair.  A byte is taken only in idle and sendA/sendB, so bytes
// must be at least 4 clocks apart; a UART byte lasts 10 bit times.
// The state machine and FIFO arrangement follow the document (where its text
// and figure disagree on the switch value for sendA, the figure's 0 is
// used); the byte order, the FIFO depth and the use of B's empty flag are
// this design's choices.
module get_mac_uart #(
  parameter int unsigned N        = cerny_pkg::N_STATES,
  parameter int unsigned AB_DEPTH = 1024
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [7:0]                  inByte,
  input  logic                        valid,
  input  logic                        pop,
  output logic [N-1:0][$clog2(N)-1:0] macA,
  output logic [N-1:0][$clog2(N)-1:0] macB,
  output logic                        empty
);
  localparam int unsigned AW    = N * $clog2(N);
  localparam int unsigned BYTES = cerny_pkg::automaton_bytes(N);
  localparam int unsigned CW    = $clog2(BYTES + 1);

  typedef enum logic [2:0] {
    G_IDLE, G_INITIAL, G_SENDA, G_SENDB, G_PUSHA, G_PUSHB
  } gstate_e;

  gstate_e             state;
  logic [BYTES*8-1:0]  shreg;
  logic [CW-1:0]       nbytes;
  logic                switch_q;
  logic                length;
  logic                pushA, pushB, a_empty, a_full, b_full;
  logic [AW-1:0]       machine;

  // New byte enters at the top; after BYTES bytes the first one is lowest.
  function automatic logic [BYTES*8-1:0] take_byte(logic [BYTES*8-1:0] sr, logic [7:0] b);
    return (BYTES*8)'({b, sr} >> 8);
  endfunction

  assign length  = (nbytes == CW'(BYTES));
  assign machine = shreg[AW-1:0];
  assign pushA   = (state == G_PUSHA);
  assign pushB   = (state == G_PUSHB);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= G_IDLE;
      shreg    <= '0;
      nbytes   <= '0;
      switch_q <= 1'b0;
    end else begin
      unique case (state)
        G_IDLE: begin
          if (valid) begin
            shreg  <= take_byte(shreg, inByte);
            nbytes <= CW'(1);
            state  <= G_INITIAL;
          end
        end
        G_INITIAL: state <= switch_q ? G_SENDB : G_SENDA;
        G_SENDA, G_SENDB: begin
          if (length) begin
            state <= (state == G_SENDA) ? G_PUSHA : G_PUSHB;
          end else if (valid) begin
            shreg  <= take_byte(shreg, inByte);
            nbytes <= nbytes + 1'b1;
          end
        end
        G_PUSHA, G_PUSHB: begin
          switch_q <= !switch_q;
          state    <= G_IDLE;
        end
        default: state <= G_IDLE;
      endcase
    end
  end

  sync_fifo #(.WIDTH(AW), .DEPTH(AB_DEPTH)) A_FIFO (
    .clk, .rst, .push(pushA), .pop(pop && !empty), .Din(machine), .Dout(macA),
    .EMPTY(a_empty), .FULL(a_full), .count()
  );

  sync_fifo #(.WIDTH(AW), .DEPTH(AB_DEPTH)) B_FIFO (
    .clk, .rst, .push(pushB), .pop(pop && !empty), .Din(machine), .Dout(macB),
    .EMPTY(empty), .FULL(b_full), .count()
  );

  a_pair_order: assert property (@(posedge clk) disable iff (rst) !empty |-> !a_empty)
    else $error("get_mac_uart: B present without A");
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) !(pushA && a_full) && !(pushB && b_full))
    else $error("get_mac_uart: automaton FIFO overflow");
endmodule
