// tb_cerny_pu: self-checking test of the breadth-first search unit.
//
// Three units run side by side on 5- and 4-state automata:
//   u_plain  - N=5, no filters: every search ends on a singleton or an empty
//              queue, and the length must equal the reference shortest
//              reset-word length;
//   u_filt   - N=5, Filters 1, 2 and 3 on: the reason must match the
//              reference model that applies the same filters;
//   u_low    - N=4 with the Cerny bound lowered to 8, so the 4-state Cerny
//              automaton (shortest reset word 9) must be reported as a
//              counterexample, as in the document's bound test.
// Each search's cycle count is compared with the reference count.  Searches
// are issued back to back, so the alternation of the two visited RAMs and
// the clearing from deleteFifo are exercised; a wrong clear shows up as a
// wrong result in a later search.
module tb_cerny_pu;
  import cerny_pkg::*;
  import cerny_ref_pkg::*;

  localparam int N  = 5;
  localparam int SW = $clog2(N);
  localparam int NL = 4;
  localparam int SWL = $clog2(NL);
  localparam int F2D = 6;   // (5-1)^2 - 5*4/2
  localparam int F3D = 1;   // floor((25 - 25 + 6) / 4)

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seen_reason [8];

  logic [N-1:0][SW-1:0] mA, mB;
  logic start_p, start_f;
  logic ready_p, busy_p, done_p, status_p;
  logic ready_f, busy_f, done_f, status_f;
  end_reason_e reason_p, reason_f;
  logic [N-1:0] len_p, len_f;

  cerny_pu #(.N(N), .F1_EN(1'b0), .F2_EN(1'b0), .F3_EN(1'b0)) u_plain (
    .clk, .rst, .startsearch(start_p), .machineA(mA), .machineB(mB),
    .ready(ready_p), .busy(busy_p), .done(done_p), .status(status_p),
    .reason(reason_p), .length(len_p));

  cerny_pu #(.N(N), .F1_EN(1'b1), .F2_EN(1'b1), .F2_DEPTH(F2D), .F3_EN(1'b1), .F3_DEPTH(F3D)) u_filt (
    .clk, .rst, .startsearch(start_f), .machineA(mA), .machineB(mB),
    .ready(ready_f), .busy(busy_f), .done(done_f), .status(status_f),
    .reason(reason_f), .length(len_f));

  logic [NL-1:0][SWL-1:0] lA, lB;
  logic start_l, ready_l, busy_l, done_l, status_l;
  end_reason_e reason_l;
  logic [NL-1:0] len_l;

  cerny_pu #(.N(NL), .CERNY_BOUND(8), .F1_EN(1'b0), .F2_EN(1'b0), .F3_EN(1'b0)) u_low (
    .clk, .rst, .startsearch(start_l), .machineA(lA), .machineB(lB),
    .ready(ready_l), .busy(busy_l), .done(done_l), .status(status_l),
    .reason(reason_l), .length(len_l));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run one automaton through u_plain and u_filt together.
  task automatic run_pair(input int A[], input int B[]);
    int r0, l0, c0, r1, l1, c1, cyc_p, cyc_f;
    bit dp, df;
    for (int q = 0; q < N; q++) begin mA[q] = SW'(A[q]); mB[q] = SW'(B[q]); end
    ref_bfs(N, A, B, 0, 0, 0, 0, 0, r0, l0, c0);
    ref_bfs(N, A, B, 1, 1, F2D, 1, F3D, r1, l1, c1);
    @(negedge clk);
    while (!(ready_p && ready_f)) @(negedge clk);
    start_p = 1; start_f = 1;
    @(negedge clk);
    start_p = 0; start_f = 0;
    cyc_p = 1; cyc_f = 1; dp = 0; df = 0;
    while (!(dp && df)) begin
      if (!dp && done_p) dp = 1; else if (!dp) cyc_p++;
      if (!df && done_f) df = 1; else if (!df) cyc_f++;
      if (!(dp && df)) @(negedge clk);
    end
    check(int'(reason_p) == r0, $sformatf("plain reason %0d exp %0d", reason_p, r0));
    if (r0 == R_SINGLETON) check(int'(len_p) == l0, $sformatf("length %0d exp %0d", len_p, l0));
    check(status_p == (r0 == R_SINGLETON && l0 > 16), "plain status");
    check(cyc_p == c0, $sformatf("plain cycles %0d exp %0d", cyc_p, c0));
    check(int'(reason_f) == r1, $sformatf("filtered reason %0d exp %0d", reason_f, r1));
    if (r1 == R_SINGLETON) check(int'(len_f) == l1, "filtered length");
    check(cyc_f == c1, $sformatf("filtered cycles %0d exp %0d", cyc_f, c1));
    seen_reason[r0]++;
    seen_reason[r1]++;
  endtask

  initial begin
    int A[], B[];
    start_p = 0; start_f = 0; start_l = 0;
    mA = '0; mB = '0; lA = '0; lB = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    // Cerny automaton with 5 states: shortest reset word (5-1)^2 = 16.
    A = new[N]; B = new[N];
    for (int q = 0; q < N; q++) begin A[q] = (q == 0) ? 1 : q; B[q] = (q + 1) % N; end
    run_pair(A, B);
    check(len_p == 16, "Cerny automaton n=5 has a reset word of length 16");

    // Permutations only: never synchronizing.
    for (int q = 0; q < N; q++) begin A[q] = (q + 1) % N; B[q] = (q + 2) % N; end
    run_pair(A, B);

    // Random automata.
    for (int t = 0; t < 300; t++) begin
      for (int q = 0; q < N; q++) begin A[q] = $urandom_range(N - 1); B[q] = $urandom_range(N - 1); end
      run_pair(A, B);
    end
    // Near-permutations, which tend to give long searches.
    for (int t = 0; t < 100; t++) begin
      for (int q = 0; q < N; q++) begin A[q] = (q + 1) % N; B[q] = q; end
      A[$urandom_range(N - 1)] = $urandom_range(N - 1);
      B[$urandom_range(N - 1)] = $urandom_range(N - 1);
      B[$urandom_range(N - 1)] = $urandom_range(N - 1);
      run_pair(A, B);
    end

    // Lowered bound on the 4-state Cerny automaton: length 9 > 8.
    for (int q = 0; q < NL; q++) begin lA[q] = SWL'((q == 0) ? 1 : q); lB[q] = SWL'((q + 1) % NL); end
    @(negedge clk);
    while (!ready_l) @(negedge clk);
    start_l = 1; @(negedge clk); start_l = 0;
    while (!done_l) @(negedge clk);
    check(reason_l == END_SINGLETON && len_l == 9, "Cerny n=4 length 9");
    check(status_l == 1'b1, "length 9 above lowered bound 8 flags a counterexample");

    for (int r = 1; r <= 5; r++)
      check(seen_reason[r] > 0, $sformatf("finishing reason %0d never occurred", r));
    $display("reasons: singleton=%0d nosync=%0d f1=%0d f2=%0d f3=%0d",
             seen_reason[1], seen_reason[2], seen_reason[3], seen_reason[4], seen_reason[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
