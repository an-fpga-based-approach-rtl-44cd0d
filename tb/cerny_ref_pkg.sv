// cerny_ref_pkg: reference model of the breadth-first reset-word search,
// written independently of the RTL for the testbenches.  It visits nodes in
// the same order as the hardware (a-image before b-image, first in first
// out), so the finishing reason and the depth agree exactly, and it counts
// the cycles the hardware controller spends: 2 to start, 3 per expanded
// node, 1 per newly queued node and 1 for the final read.
package cerny_ref_pkg;

  // Reasons, numbered as in cerny_pkg::end_reason_e.
  localparam int R_SINGLETON = 1, R_NOSYNC = 2, R_F1 = 3, R_F2 = 4, R_F3 = 5;

  function automatic int ref_popcount(int v);
    int c = 0;
    for (int i = 0; i < 32; i++) c += (v >> i) & 1;
    return c;
  endfunction

  function automatic int ref_image(int n, int node, int m[]);
    int r = 0;
    for (int q = 0; q < n; q++) if (((node >> q) & 1) != 0) r |= 1 << m[q];
    return r;
  endfunction

  task automatic ref_bfs(input int n, input int A[], input int B[],
                         input bit f1, input bit f2, input int f2d,
                         input bit f3, input int f3d,
                         output int reason, output int len, output int cycles);
    int  qn[$], qd[$];
    bit  seen[int];
    int  node, d, na, nb, pc;
    reason = 0; len = 0; cycles = 2;
    qn.push_back((1 << n) - 1); qd.push_back(0); seen[(1 << n) - 1] = 1;
    forever begin
      cycles++;                                   // read
      if (qn.size() == 0) begin reason = R_NOSYNC; return; end
      node = qn.pop_front(); d = qd.pop_front(); pc = ref_popcount(node);
      if (pc == 1) begin reason = R_SINGLETON; len = d; return; end
      if (f2 && pc == 2 && d <= f2d) begin reason = R_F2; return; end
      if (f3 && pc <= 3 && d <= f3d) begin reason = R_F3; return; end
      na = ref_image(n, node, A);
      nb = ref_image(n, node, B);
      cycles++;                                   // writeA
      if (f1 && d == 0 && (na | nb) != (1 << n) - 1) begin reason = R_F1; return; end
      cycles++;                                   // writeB
      if (!seen.exists(na)) begin seen[na] = 1; qn.push_back(na); qd.push_back(d + 1); cycles++; end
      if (!seen.exists(nb)) begin seen[nb] = 1; qn.push_back(nb); qd.push_back(d + 1); cycles++; end
    end
  endtask

  // All renamings of B (each bijection p: B'[p[q]] = p[B[q]]) combined with
  // A: is any of them above the bound?  Also returns how many were tried and
  // how often each finishing reason occurred.
  task automatic ref_pair(input int n, input int A[], input int B[], input int bound,
                          input bit f1, input bit f2, input int f2d,
                          input bit f3, input int f3d,
                          output bit falsified, output int nperm);
    int p[], pb[], total, code, r, l, c, mask;
    p = new[n]; pb = new[n];
    falsified = 0; nperm = 0;
    total = 1;
    for (int i = 0; i < n; i++) total *= n;
    for (code = 0; code < total; code++) begin
      int x = code;
      mask = 0;
      for (int i = 0; i < n; i++) begin p[i] = x % n; x /= n; mask |= 1 << p[i]; end
      if (mask != (1 << n) - 1) continue;
      for (int q = 0; q < n; q++) pb[p[q]] = p[B[q]];
      ref_bfs(n, A, pb, f1, f2, f2d, f3, f3d, r, l, c);
      nperm++;
      if (r == R_SINGLETON && l > bound) falsified = 1;
    end
  endtask
endpackage
