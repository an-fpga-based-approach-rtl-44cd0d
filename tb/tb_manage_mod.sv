// tb_manage_mod: two manage_mod instances with 4-state automata, two
// topmodules of two search units each, fed the same bytes.  u_hi keeps the
// true bound (9): nothing may be reported, searchDone must rise after each
// group, and timecounter must equal the clocks measured from the first pair
// to searchDone.  u_lo has the bound lowered to 5: finalstatus must match
// the reference over all pairs, the counterexample must really exceed 5,
// and after it no further pair may be handed out.  The first pair must go to
// topmodule 0 and both topmodules must be used.
module tb_manage_mod;
  import cerny_pkg::*;
  import cerny_ref_pkg::*;
  localparam int N = 4, SW = 2, NT = 2, NI = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] ib;
  logic v;
  logic [31:0] tc_hi, tc_lo;
  logic sd_hi, fs_hi, sd_lo, fs_lo;
  logic [N-1:0][SW-1:0] cA_hi, cB_hi, cA_lo, cB_lo;

  manage_mod #(.N(N), .NUM_TOP(NT), .NUM_INC(NI), .AB_DEPTH(32), .PERM_DEPTH(4), .TIME_W(32)) u_hi (
    .clk, .rst, .inByte(ib), .valid(v), .timecounter(tc_hi), .searchDone(sd_hi),
    .finalstatus(fs_hi), .cexA(cA_hi), .cexB(cB_hi));
  manage_mod #(.N(N), .NUM_TOP(NT), .NUM_INC(NI), .AB_DEPTH(32), .PERM_DEPTH(4), .TIME_W(32),
               .CERNY_BOUND(5)) u_lo (
    .clk, .rst, .inByte(ib), .valid(v), .timecounter(tc_lo), .searchDone(sd_lo),
    .finalstatus(fs_lo), .cexA(cA_lo), .cexB(cB_lo));

  int pops_hi [NT];
  int first_top = -1, pops_lo_after = 0, busy_cycles = 0;
  bit started = 0;
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < NT; i++) if (u_hi.restart[i]) begin
      pops_hi[i]++;
      if (first_top < 0) first_top = i;
    end
    if (u_hi.pop) started = 1;
    if ((started || u_hi.pop) && !sd_hi) busy_cycles++;
    if (fs_lo && u_lo.pop) pops_lo_after++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_byte(input logic [7:0] b);
    ib = b; v = 1; @(negedge clk); v = 0;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    int A[], B[], CA[], CB[];
    bit fals, any_fals;
    int np, r, l, c;
    A = new[N]; B = new[N]; CA = new[N]; CB = new[N];
    ib = '0; v = 0; any_fals = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (20) @(negedge clk);
    for (int g = 0; g < 2; g++) begin
      for (int p = 0; p < 5; p++) begin
        logic [7:0] ba, bb;
        for (int q = 0; q < N; q++) begin
          A[q] = (p == 2) ? ((q == 0) ? 1 : q) : $urandom_range(N - 1);
          B[q] = (p == 2) ? ((q + 1) % N) : $urandom_range(N - 1);
          ba[2*q +: 2] = 2'(A[q]); bb[2*q +: 2] = 2'(B[q]);
        end
        ref_pair(N, A, B, 5, 1, 0, 0, 1, filter3_depth(N), fals, np);
        if (fals) any_fals = 1;
        send_byte(ba);
        send_byte(bb);
      end
      while (!sd_hi) @(negedge clk);
      check(!fs_hi, "no counterexample with the true bound");
      check(int'(tc_hi) == busy_cycles, $sformatf("timecounter %0d, measured %0d", tc_hi, busy_cycles));
      repeat (5) @(negedge clk);
      check(sd_hi && int'(tc_hi) == busy_cycles, "timecounter stops while searchDone is high");
    end
    while (!sd_lo) @(negedge clk);
    check(fs_lo == any_fals, $sformatf("finalstatus %0d expected %0d", fs_lo, any_fals));
    if (fs_lo) begin
      for (int q = 0; q < N; q++) begin CA[q] = int'(cA_lo[q]); CB[q] = int'(cB_lo[q]); end
      ref_bfs(N, CA, CB, 1, 0, 0, 1, filter3_depth(N), r, l, c);
      check(r == R_SINGLETON && l > 5, "reported counterexample exceeds the bound");
    end
    check(pops_lo_after == 0, "no pair handed out after a counterexample");
    check(first_top == 0, "first pair goes to topmodule 0");
    check(pops_hi[0] > 0 && pops_hi[1] > 0, "both topmodules used");
    check(pops_hi[0] + pops_hi[1] == 10, "every pair handed out once");
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
