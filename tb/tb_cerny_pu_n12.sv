// tb_cerny_pu_n12: the breadth-first search unit at its full size, 12
// states, with default parameters (Cerny bound 121, Filters 1 and 3 on).
//
// u_def has no parameter overrides.  It must find the 12-state Cerny
// automaton's shortest reset word of exactly 121 = (12-1)^2 letters without
// flagging it, and give the reference reason, length and cycle count for
// random and near-permutation 12-state automata, searched back to back so
// both visited RAMs and the clearing from deleteFifo are used at full size.
// u_low is the same unit with the bound lowered to 120: the Cerny automaton
// must then be reported as a counterexample.  u_nof has the filters off and
// runs every search to its end, checked against the unfiltered reference.  The 4096-clock reset sweep of
// the visited RAMs is timed as well.
module tb_cerny_pu_n12;
  import cerny_pkg::*;
  import cerny_ref_pkg::*;

  localparam int N  = 12;
  localparam int SW = 4;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int seen_reason [8];

  logic [N-1:0][SW-1:0] mA, mB;
  logic start_d, ready_d, busy_d, done_d, status_d;
  logic start_l, ready_l, busy_l, done_l, status_l;
  end_reason_e reason_d, reason_l;
  logic [N-1:0] len_d, len_l;

  cerny_pu u_def (
    .clk, .rst, .startsearch(start_d), .machineA(mA), .machineB(mB),
    .ready(ready_d), .busy(busy_d), .done(done_d), .status(status_d),
    .reason(reason_d), .length(len_d));

  logic start_n, ready_n, busy_n, done_n, status_n;
  end_reason_e reason_n;
  logic [N-1:0] len_n;
  int long_n = 0;

  cerny_pu #(.F1_EN(1'b0), .F3_EN(1'b0)) u_nof (
    .clk, .rst, .startsearch(start_n), .machineA(mA), .machineB(mB),
    .ready(ready_n), .busy(busy_n), .done(done_n), .status(status_n),
    .reason(reason_n), .length(len_n));

  cerny_pu #(.CERNY_BOUND(120)) u_low (
    .clk, .rst, .startsearch(start_l), .machineA(mA), .machineB(mB),
    .ready(ready_l), .busy(busy_l), .done(done_l), .status(status_l),
    .reason(reason_l), .length(len_l));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Search A/B on u_def and compare with the reference model.
  task automatic run_def(input int A[], input int B[]);
    int r, l, c, cyc, r0, l0, c0, cyc0;
    bit dd, dn;
    for (int q = 0; q < N; q++) begin mA[q] = SW'(A[q]); mB[q] = SW'(B[q]); end
    ref_bfs(N, A, B, 1, 0, 0, 1, filter3_depth(N), r, l, c);
    ref_bfs(N, A, B, 0, 0, 0, 0, 0, r0, l0, c0);
    @(negedge clk);
    while (!(ready_d && ready_n)) @(negedge clk);
    start_d = 1; start_n = 1; @(negedge clk); start_d = 0; start_n = 0;
    cyc = 1; cyc0 = 1; dd = 0; dn = 0;
    while (!(dd && dn)) begin
      if (!dd && done_d) dd = 1; else if (!dd) cyc++;
      if (!dn && done_n) dn = 1; else if (!dn) cyc0++;
      if (!(dd && dn)) @(negedge clk);
    end
    check(int'(reason_n) == r0, $sformatf("unfiltered reason %0d expected %0d", reason_n, r0));
    if (r0 == R_SINGLETON) check(int'(len_n) == l0, $sformatf("unfiltered length %0d expected %0d", len_n, l0));
    check(cyc0 == c0, $sformatf("unfiltered cycles %0d expected %0d", cyc0, c0));
    if (r0 == R_SINGLETON && l0 > 30) long_n++;
    seen_reason[r0]++;
    check(int'(reason_d) == r, $sformatf("reason %0d expected %0d", reason_d, r));
    if (r == R_SINGLETON) check(int'(len_d) == l, $sformatf("length %0d expected %0d", len_d, l));
    check(status_d == (r == R_SINGLETON && l > 121), "status");
    check(cyc == c, $sformatf("cycles %0d expected %0d", cyc, c));
    seen_reason[r]++;
  endtask

  initial begin
    int A[], B[], t0;
    A = new[N]; B = new[N];
    start_d = 0; start_l = 0; start_n = 0; mA = '0; mB = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    // Reset sweep: 2^12 clocks before the first search can start.
    t0 = 0;
    while (!ready_d) begin @(negedge clk); t0++; end
    check(t0 >= 4096 && t0 <= 4100, $sformatf("reset sweep took %0d clocks", t0));

    // Cerny automaton C12: a merges state 0 into 1, b is the 12-cycle.
    for (int q = 0; q < N; q++) begin A[q] = (q == 0) ? 1 : q; B[q] = (q + 1) % N; end
    run_def(A, B);
    check(reason_d == END_SINGLETON && len_d == 121 && !status_d,
          "C12 reset word is 121 letters and meets the bound");
    while (!ready_l) @(negedge clk);
    start_l = 1; @(negedge clk); start_l = 0;
    while (!done_l) @(negedge clk);
    check(reason_l == END_SINGLETON && len_l == 121 && status_l,
          "C12 against a bound of 120 is a counterexample");

    for (int k = 0; k < 40; k++) begin
      for (int q = 0; q < N; q++) begin A[q] = $urandom_range(N - 1); B[q] = $urandom_range(N - 1); end
      run_def(A, B);
    end
    for (int k = 0; k < 40; k++) begin
      for (int q = 0; q < N; q++) begin A[q] = (q + 1) % N; B[q] = (q + 1 + $urandom_range(N - 2)) % N; end
      A[$urandom_range(N - 1)] = $urandom_range(N - 1);
      run_def(A, B);
    end
    $display("reasons: singleton=%0d nosync=%0d f1=%0d f3=%0d, unfiltered resets longer than 30: %0d",
             seen_reason[R_SINGLETON], seen_reason[R_NOSYNC], seen_reason[R_F1], seen_reason[R_F3], long_n);
    check(seen_reason[R_SINGLETON] > 0 && seen_reason[R_F1] > 0 && seen_reason[R_F3] > 0,
          "singleton, Filter 1 and Filter 3 endings all occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
