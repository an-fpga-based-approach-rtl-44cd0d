// tb_inc_search: one execution unit on 5-state automata.  After each start
// the inputs are scrambled, so a result that matches the reference model
// shows that the unit works on its captured copy; ready, busy and the
// searchdone strobe are checked around every search.
module tb_inc_search;
  import cerny_pkg::*;
  import cerny_ref_pkg::*;
  localparam int N = 5, SW = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, ready, sdone, busy, status;
  end_reason_e reason;
  logic [N-1:0][SW-1:0] mA, mB, bq;

  inc_search #(.N(N), .CERNY_BOUND(10)) dut (.clk, .rst, .startCerny(start), .macA(mA), .macB(mB),
    .ready, .searchdone(sdone), .busy, .status, .reason, .macB_q(bq));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int A[], B[];
    int r, l, c, n_stat = 0;
    logic [N-1:0][SW-1:0] b_sent;
    A = new[N]; B = new[N];
    start = 0; mA = '0; mB = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 300; t++) begin
      for (int q = 0; q < N; q++) begin
        A[q] = (t % 3 == 0) ? ((q == 0) ? 1 : q) : $urandom_range(N - 1);
        B[q] = (t % 3 == 0) ? (q + 1 + $urandom_range(1)) % N : $urandom_range(N - 1);
        mA[q] = SW'(A[q]); mB[q] = SW'(B[q]);
      end
      b_sent = mB;
      ref_bfs(N, A, B, 1, 0, 0, 1, filter3_depth(N), r, l, c);
      while (!ready) @(negedge clk);
      start = 1; @(negedge clk); start = 0;
      mA = '1; mB = '1;                      // inputs change after the start
      check(busy && !ready, "busy and not ready after start");
      check(bq == b_sent, "macB_q holds the automaton under test");
      while (!sdone) @(negedge clk);
      check(int'(reason) == r, $sformatf("reason %0d expected %0d", reason, r));
      check(status == (r == R_SINGLETON && l > 10), "status against bound 10");
      if (status) n_stat++;
    end
    check(n_stat > 0, "some automaton exceeded the lowered bound");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
