// permuter: renames the states of a unary automaton by an ordering.
//
// perm[q] is the new name of state q.  Renaming every state of B gives an
// automaton whose transition from perm[q] goes to perm[B[q]]:
// permutedB[perm[q]] = perm[fixedB[q]].  Combined with an unchanged A, each of
// the n! orderings gives one binary automaton to test.  Purely
// combinational.  That each ordering is applied to B follows the document;
// reading "applying" as this renaming is this design's interpretation.
module permuter #(
  parameter int unsigned N = cerny_pkg::N_STATES
) (
  input  logic [N-1:0][$clog2(N)-1:0] perm,
  input  logic [N-1:0][$clog2(N)-1:0] fixedB,
  output logic [N-1:0][$clog2(N)-1:0] permutedB
);
  always_comb begin
    permutedB = '0;
    for (int q = 0; q < N; q++) begin
      permutedB[perm[q]] = perm[fixedB[q]];
    end
  end
endmodule
