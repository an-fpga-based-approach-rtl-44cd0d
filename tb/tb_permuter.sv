// tb_permuter: random orderings and automata.  The renamed automaton is
// checked through the inverse ordering: the successor of new state s must be
// the new name of the old successor of the state that s renames.
module tb_permuter;
  localparam int N = 12, SW = 4;
  int checks = 0, failures = 0;
  logic [N-1:0][SW-1:0] perm, b, pb;

  permuter #(.N(N)) dut (.perm, .fixedB(b), .permutedB(pb));

  initial begin
    int p[N], inv[N];
    for (int t = 0; t < 2000; t++) begin
      for (int q = 0; q < N; q++) p[q] = q;
      for (int q = N - 1; q > 0; q--) begin   // Fisher-Yates shuffle
        int j, tmp;
        j = $urandom_range(q); tmp = p[q]; p[q] = p[j]; p[j] = tmp;
      end
      for (int q = 0; q < N; q++) begin inv[p[q]] = q; perm[q] = SW'(p[q]); b[q] = SW'($urandom_range(N - 1)); end
      #1;
      for (int s = 0; s < N; s++) begin
        checks++;
        if (int'(pb[s]) != p[b[inv[s]]]) begin
          failures++;
          $display("FAIL: state %0d -> %0d, expected %0d", s, pb[s], p[b[inv[s]]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
