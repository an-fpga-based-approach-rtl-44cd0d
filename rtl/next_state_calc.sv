// next_state_calc: image of a node of the power automaton under one letter.
//
// processingState is a set of states (bit q set when state q is present).
// With select = 1 the letter a is applied, using automaton A; with select = 0
// the letter b, using automaton B.  outState has bit t set when some present
// state q has successor t, so it is the OR of one-hot decodes of the
// successors of all present states.  Purely combinational.  The function and
// the select encoding follow the document; the combinational form is this
// design's choice.
module next_state_calc #(
  parameter int unsigned N = cerny_pkg::N_STATES
) (
  input  logic [N-1:0][$clog2(N)-1:0] machineA,
  input  logic [N-1:0][$clog2(N)-1:0] machineB,
  input  logic [N-1:0]                processingState,
  input  logic                        select,
  output logic [N-1:0]                outState
);
  always_comb begin
    outState = '0;
    for (int q = 0; q < N; q++) begin
      if (processingState[q]) begin
        outState[select ? machineA[q] : machineB[q]] = 1'b1;
      end
    end
  end
endmodule
