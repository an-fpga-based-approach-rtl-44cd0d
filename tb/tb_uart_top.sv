// tb_uart_top: end-to-end test of the whole engine through its serial pins.
//
// Two engines with 5-state automata, 2 topmodules of 3 search units each,
// a 4-entry permFIFO, 8 clocks per UART bit and Filter 2 switched on (so
// every finishing reason can occur) share one serial input.  u_ok keeps the
// true bound 16, u_lo has it lowered to 8.  The testbench sends groups of
// (A, B) pairs, decodes the result message each engine sends when searchDone
// rises (timecounter bytes, finalstatus, then the saved counterexample) and
// checks it against the engine's own counter and against the reference
// answer over all 120 renamings of every pair; a reported counterexample
// must really need a reset word longer than the lowered bound.  It also counts the mechanisms of the design and
// fails if one never happened: every finishing reason, permFIFO full (the
// permutation generator stalls), both topmodules busy at once, a visited-RAM
// clear running during a search, a search held back until its RAM was
// cleared, a counterexample halting u_lo, and searchDone falling again when a
// new group arrives.
module tb_uart_top;
  import cerny_pkg::*;
  import cerny_ref_pkg::*;
  localparam int N = 5, SW = 3, NT = 2, NI = 3, CPB = 8, LOW = 8;
  localparam int TW = 48, ABY = 2, MSG = TW / 8 + 1 + 2 * ABY;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic line;
  logic tx_ok, sd_ok, fs_ok, tx_lo, sd_lo, fs_lo;

  uart_top #(.N(N), .NUM_TOP(NT), .NUM_INC(NI), .CLKS_PER_BIT(CPB), .AB_DEPTH(64),
             .PERM_DEPTH(4), .F2_EN(1'b1)) u_ok (
    .clk, .rst, .Usb_uart_rx(line), .Usb_uart_tx(tx_ok), .searchDone(sd_ok), .finalstatus(fs_ok));
  uart_top #(.N(N), .NUM_TOP(NT), .NUM_INC(NI), .CLKS_PER_BIT(CPB), .AB_DEPTH(64),
             .PERM_DEPTH(4), .F2_EN(1'b1), .CERNY_BOUND(LOW)) u_lo (
    .clk, .rst, .Usb_uart_rx(line), .Usb_uart_tx(tx_lo), .searchDone(sd_lo), .finalstatus(fs_lo));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------- mechanism counters
  int n_reason [8];
  int n_pf_full = 0, n_both_tops = 0, n_clear_during = 0, n_wait_clear = 0, n_halt = 0, n_sd_fall = 0;
  logic sd_ok_q = 0;

  for (genvar i = 0; i < NT; i++) begin : g_mon_t
    for (genvar j = 0; j < NI; j++) begin : g_mon_i
      always @(posedge clk) if (!rst) begin
        if (u_ok.manageMod.g_top[i].u_topmodule.g_inc[j].incSearch.u_cerny_pu.done)
          n_reason[int'(u_ok.manageMod.g_top[i].u_topmodule.g_inc[j].incSearch.u_cerny_pu.reason)]++;
        if (u_ok.manageMod.g_top[i].u_topmodule.g_inc[j].incSearch.u_cerny_pu.df_pop &&
            u_ok.manageMod.g_top[i].u_topmodule.g_inc[j].incSearch.u_cerny_pu.active)
          n_clear_during++;
        if (u_ok.manageMod.g_top[i].u_topmodule.g_inc[j].incSearch.u_cerny_pu.state == 0 &&
            !u_ok.manageMod.g_top[i].u_topmodule.g_inc[j].incSearch.u_cerny_pu.sweeping &&
            !u_ok.manageMod.g_top[i].u_topmodule.g_inc[j].incSearch.u_cerny_pu.ready)
          n_wait_clear++;
      end
    end
    always @(posedge clk) if (!rst && u_ok.manageMod.g_top[i].u_topmodule.pf_full) n_pf_full++;
  end
  always @(posedge clk) if (!rst) begin
    if (u_ok.manageMod.finish == '0) n_both_tops++;
    if (u_lo.manageMod.finalstatus && !u_lo.manageMod.searchDone &&
        u_lo.manageMod.g_top[0].u_topmodule.halt) n_halt++;
    if (sd_ok_q && !sd_ok) n_sd_fall++;
    sd_ok_q <= sd_ok;
  end

  // ------------------------------------------------------------ serial I/O
  task automatic send_byte(input logic [7:0] b);
    line = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin line = b[i]; repeat (CPB) @(negedge clk); end
    line = 1; repeat (CPB + 2) @(negedge clk);
  endtask

  logic [7:0] msg_ok [$], msg_lo [$];
  task automatic rx_monitor(ref logic txl, ref logic [7:0] q [$]);
    logic [7:0] b;
    forever begin
      @(negedge clk);
      if (!txl && !rst) begin
        repeat (CPB / 2) @(negedge clk);
        for (int i = 0; i < 8; i++) begin repeat (CPB) @(negedge clk); b[i] = txl; end
        repeat (CPB) @(negedge clk);
        q.push_back(b);
      end
    end
  endtask
  initial rx_monitor(tx_ok, msg_ok);
  initial rx_monitor(tx_lo, msg_lo);

  // Wait for a full result message and check it.
  task automatic check_msg(ref logic [7:0] q [$], input logic [TW-1:0] tc, input bit fs, input string who);
    logic [TW-1:0] t;
    logic [8*ABY-1:0] ca, cb;
    int A[], B[], r, l, c;
    int waited = 0;
    while (q.size() < MSG && waited < 20 * MSG * CPB) begin @(negedge clk); waited++; end
    while (q.size() > MSG) void'(q.pop_front());   // keep only the latest message
    check(q.size() == MSG, $sformatf("%s: result message of %0d bytes", who, q.size()));
    if (q.size() == MSG) begin
      t = '0;
      for (int k = 0; k < TW / 8; k++) t[8*k +: 8] = q[k];
      check(t == tc && tc > 0, $sformatf("%s: timecounter %0d sent as %0d", who, tc, t));
      check(q[TW/8] == {7'd0, fs}, $sformatf("%s: finalstatus byte", who));
      for (int k = 0; k < ABY; k++) begin ca[8*k +: 8] = q[TW/8 + 1 + k]; cb[8*k +: 8] = q[TW/8 + 1 + ABY + k]; end
      if (!fs) begin
        check(ca == '0 && cb == '0, $sformatf("%s: no counterexample bytes", who));
      end else begin
        A = new[N]; B = new[N];
        for (int s = 0; s < N; s++) begin A[s] = int'(ca[SW*s +: SW]); B[s] = int'(cb[SW*s +: SW]); end
        ref_bfs(N, A, B, 0, 0, 0, 0, 0, r, l, c);
        check(r == R_SINGLETON && l > LOW, $sformatf("%s: counterexample has reset length %0d", who, l));
      end
    end
    q.delete();
  endtask

  initial begin
    int A[], B[];
    bit fals, lo_expected;
    int np;
    A = new[N]; B = new[N];
    line = 1; lo_expected = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (40) @(negedge clk);
    for (int g = 0; g < 2; g++) begin
      for (int p = 0; p < 4; p++) begin
        logic [15:0] wa, wb;
        for (int q = 0; q < N; q++) begin
          if (g == 1 && p == 3) begin           // Cerny automaton: reset word 16
            A[q] = (q == 0) ? 1 : q; B[q] = (q + 1) % N;
          end else if (p % 2 == 0) begin        // near-permutations: long searches
            A[q] = (q + 1) % N; B[q] = q;
          end else begin
            A[q] = $urandom_range(N - 1); B[q] = $urandom_range(N - 1);
          end
        end
        if (p % 2 == 0 && !(g == 1 && p == 3)) begin
          A[$urandom_range(N - 1)] = $urandom_range(N - 1);
          B[$urandom_range(N - 1)] = $urandom_range(N - 1);
        end
        wa = '0; wb = '0;
        for (int q = 0; q < N; q++) begin wa[SW*q +: SW] = SW'(A[q]); wb[SW*q +: SW] = SW'(B[q]); end
        ref_pair(N, A, B, 16, 1, 1, filter2_depth(N), 1, filter3_depth(N), fals, np);
        check(!fals, "reference: no 5-state counterexample");
        ref_pair(N, A, B, LOW, 1, 1, filter2_depth(N), 1, filter3_depth(N), fals, np);
        if (fals) lo_expected = 1;
        send_byte(wa[7:0]); send_byte(wa[15:8]);
        send_byte(wb[7:0]); send_byte(wb[15:8]);
      end
      while (!sd_ok) @(negedge clk);
      check(!fs_ok, "u_ok: no counterexample");
      check_msg(msg_ok, u_ok.manageMod.timecounter, 1'b0, "u_ok");
    end
    while (!sd_lo) @(negedge clk);
    check(fs_lo == lo_expected, $sformatf("u_lo: finalstatus %0d expected %0d", fs_lo, lo_expected));
    check(lo_expected, "lowered bound produced a counterexample");
    check_msg(msg_lo, u_lo.manageMod.timecounter, 1'b1, "u_lo");

    $display("reasons: singleton=%0d nosync=%0d f1=%0d f2=%0d f3=%0d",
             n_reason[1], n_reason[2], n_reason[3], n_reason[4], n_reason[5]);
    $display("permFIFO full=%0d both tops busy=%0d clear during search=%0d wait for clear=%0d halt=%0d searchDone falls=%0d",
             n_pf_full, n_both_tops, n_clear_during, n_wait_clear, n_halt, n_sd_fall);
    for (int r = 1; r <= 5; r++) check(n_reason[r] > 0, $sformatf("finishing reason %0d happened", r));
    check(n_reason[1] + n_reason[2] + n_reason[3] + n_reason[4] + n_reason[5] == 8 * 120,
          "every pair gave 120 searches");
    check(n_pf_full > 0, "permFIFO full");
    check(n_both_tops > 0, "both topmodules busy at once");
    check(n_clear_during > 0, "visited RAM cleared during a search");
    check(n_wait_clear > 0, "search held back until its RAM was cleared");
    check(n_halt > 0, "counterexample halted the engine");
    check(n_sd_fall > 0, "searchDone fell when a new group arrived");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
