// tb_topmodule: one topmodule with 4-state automata, 3 search units and a
// 4-entry permFIFO.  For each pair, all 24 renamings must be tested (counted
// at the unit starts), lastStatus must equal the reference answer over all
// renamings, and a reported counterexample must really exceed the bound.
// The permFIFO must fill (generation stalls) and several units must work
// at once.  A halt mid-pair must still end in finish.
module tb_topmodule;
  import cerny_pkg::*;
  import cerny_ref_pkg::*;
  localparam int N = 4, SW = 2, NI = 3, BOUND = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic restart, halt, finish, lstat;
  logic [N-1:0][SW-1:0] mA, mB, cA, cB;
  int n_starts = 0, n_full = 0, max_busy = 0;

  topmodule #(.N(N), .NUM_INC(NI), .PERM_DEPTH(4), .CERNY_BOUND(BOUND)) dut (
    .clk, .rst, .restart, .machineA(mA), .machineB(mB), .halt, .finish,
    .lastStatus(lstat), .cexA(cA), .cexB(cB));

  always @(posedge clk) begin
    int nb;
    n_starts += $countones(dut.startCerny);
    if (dut.pf_full) n_full++;
    nb = $countones(dut.inc_busy);
    if (nb > max_busy) max_busy = nb;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int A[], B[], CA[], CB[];
    bit fals;
    int np, r, l, c, n_true = 0, n_false = 0;
    A = new[N]; B = new[N]; CA = new[N]; CB = new[N];
    restart = 0; halt = 0; mA = '0; mB = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    while (!dut.u_permutation.valid && !finish) @(negedge clk);
    for (int t = 0; t < 40; t++) begin
      for (int q = 0; q < N; q++) begin
        A[q] = (t % 2 == 0) ? ((q == 0) ? 1 : q) : $urandom_range(N - 1);
        B[q] = (t % 2 == 0) ? ((q + 1 + $urandom_range(1)) % N) : $urandom_range(N - 1);
        mA[q] = SW'(A[q]); mB[q] = SW'(B[q]);
      end
      ref_pair(N, A, B, BOUND, 1, 0, 0, 1, filter3_depth(N), fals, np);
      while (!finish) @(negedge clk);
      n_starts = 0;
      restart = 1; @(negedge clk); restart = 0;
      mA = '0; mB = '0;
      check(!finish, "finish falls after restart");
      while (!finish) @(negedge clk);
      check(n_starts == np, $sformatf("%0d searches started, %0d renamings", n_starts, np));
      check(lstat == fals, $sformatf("pair %0d: lastStatus %0d expected %0d", t, lstat, fals));
      if (lstat) begin
        for (int q = 0; q < N; q++) begin CA[q] = int'(cA[q]); CB[q] = int'(cB[q]); end
        ref_bfs(N, CA, CB, 1, 0, 0, 1, filter3_depth(N), r, l, c);
        check(r == R_SINGLETON && l > BOUND, "counterexample exceeds the bound");
        n_true++;
      end else n_false++;
    end
    // halt in the middle of a pair
    for (int q = 0; q < N; q++) begin mA[q] = SW'(q); mB[q] = SW'((q + 1) % N); end
    restart = 1; @(negedge clk); restart = 0;
    repeat (10) @(negedge clk);
    halt = 1;
    repeat (200) @(negedge clk);
    check(finish, "finish after halt");
    halt = 0;
    check(n_true > 0 && n_false > 0, "both outcomes occurred");
    check(n_full > 0, "permFIFO filled up");
    check(max_busy == NI, "all search units busy at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
