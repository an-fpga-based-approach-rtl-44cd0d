// topmodule: tests one unary automaton pair (A, B) against the Cerny bound.
//
// restart loads machineA and machineB, empties permFIFO and starts the
// permutation generator.  Each ordering is applied to B by the permuter and
// the renamed B is pushed into permFIFO, one per clock while there is room.
// Whenever permFIFO holds an entry, the lowest-numbered incSearch unit that
// is ready takes it (startCerny) and permFIFO pops it; at most one unit is
// started per clock.  All units share the same A.  When every ordering has
// been generated, permFIFO is empty and no unit is busy, finish rises and the
// pair is done; lastStatus then tells whether any of the n! binary automata
// has a shortest reset word longer than the Cerny bound, and cexA/cexB hold
// the first such automaton.  halt stops generation and dispatch (running
// searches finish), after which finish rises as well.
//
// Interface: pulse restart for one cycle while finish is high; finish falls
// on the next cycle and rises again when the pair is done.  finish is also
// high after reset.
// The submodules, their names and connections follow the document's block
// diagram of topmodule; the lowest-number-first dispatch mirrors the rule the
// document gives for topmodules, and the permFIFO depth (one 36 Kb FIFO as
// 512 entries) and the stall on a full permFIFO are this design's choices.
module topmodule
  import cerny_pkg::*;
#(
  parameter int unsigned N           = N_STATES,
  parameter int unsigned NUM_INC     = cerny_pkg::DEF_NUM_INC,
  parameter int unsigned PERM_DEPTH  = 512,
  parameter int unsigned CERNY_BOUND = cerny_bound(N),
  parameter bit          F1_EN       = 1'b1,
  parameter bit          F2_EN       = 1'b0,
  parameter int unsigned F2_DEPTH    = filter2_depth(N),
  parameter bit          F3_EN       = 1'b1,
  parameter int unsigned F3_DEPTH    = filter3_depth(N)
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        restart,
  input  logic [N-1:0][$clog2(N)-1:0] machineA,
  input  logic [N-1:0][$clog2(N)-1:0] machineB,
  input  logic                        halt,
  output logic                        finish,
  output logic                        lastStatus,
  output logic [N-1:0][$clog2(N)-1:0] cexA,
  output logic [N-1:0][$clog2(N)-1:0] cexB
);
  typedef logic [N-1:0][$clog2(N)-1:0] automaton_t;

  automaton_t A_q, B_q, perm, permutedB, pf_dout;
  logic       running, perm_valid;
  logic       pf_push, pf_pop, pf_empty, pf_full;

  logic [NUM_INC-1:0] inc_ready, inc_done, inc_busy, inc_status, startCerny;
  automaton_t         inc_B [NUM_INC];

  always_ff @(posedge clk) begin
    if (rst) begin
      A_q <= '0;
      B_q <= '0;
    end else if (restart) begin
      A_q <= machineA;
      B_q <= machineB;
    end
  end

  permutation #(.N(N)) u_permutation (
    .clk, .rst, .startperm(restart), .advance(pf_push), .out(perm),
    .valid(perm_valid), .last()
  );

  permuter #(.N(N)) u_permuter (
    .perm, .fixedB(B_q), .permutedB
  );

  assign pf_push = perm_valid && !pf_full && !halt;

  sync_fifo #(.WIDTH($bits(automaton_t)), .DEPTH(PERM_DEPTH)) permFIFO (
    .clk, .rst(rst || restart), .push(pf_push), .pop(pf_pop), .Din(permutedB),
    .Dout(pf_dout), .EMPTY(pf_empty), .FULL(pf_full), .count()
  );

  // Lowest-numbered ready unit gets the head of permFIFO.
  always_comb begin
    startCerny = '0;
    if (!pf_empty && !halt && running) begin
      for (int i = NUM_INC - 1; i >= 0; i--) begin
        if (inc_ready[i]) startCerny = (NUM_INC)'(1) << i;
      end
    end
  end
  assign pf_pop = |startCerny;

  for (genvar i = 0; i < NUM_INC; i++) begin : g_inc
    inc_search #(
      .N(N), .CERNY_BOUND(CERNY_BOUND), .F1_EN(F1_EN), .F2_EN(F2_EN),
      .F2_DEPTH(F2_DEPTH), .F3_EN(F3_EN), .F3_DEPTH(F3_DEPTH)
    ) incSearch (
      .clk, .rst, .startCerny(startCerny[i]), .macA(A_q), .macB(pf_dout),
      .ready(inc_ready[i]), .searchdone(inc_done[i]), .busy(inc_busy[i]),
      .status(inc_status[i]), .reason(), .macB_q(inc_B[i])
    );
  end

  // Result collection: first counterexample (lowest unit on a tie) is kept.
  always_ff @(posedge clk) begin
    if (rst || restart) begin
      lastStatus <= 1'b0;
      cexA       <= '0;
      cexB       <= '0;
    end else begin
      for (int i = NUM_INC - 1; i >= 0; i--) begin
        if (inc_done[i] && inc_status[i] && !lastStatus) begin
          cexA <= A_q;
          cexB <= inc_B[i];
        end
      end
      if (|(inc_done & inc_status)) lastStatus <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
    end else if (restart) begin
      running <= 1'b1;
    end else if ((!perm_valid || halt) && (pf_empty || halt) && !(|inc_busy) && !(|startCerny)) begin
      running <= 1'b0;
    end
  end
  assign finish = !running;

  a_restart_when_idle: assert property (@(posedge clk) disable iff (rst) restart |-> finish)
    else $error("topmodule: restart while busy");
endmodule
