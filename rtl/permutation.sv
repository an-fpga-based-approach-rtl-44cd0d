// permutation: generates every ordering of the n state names, one per clock.
//
// The ordering is held as n entries; entry p is the state name at position
// p, and the initial ordering is the identity <n-1, ..., 1, 0>.  Step i
// (i = 1, 2, ...) reverses positions 0..k-1, where k is the largest value
// with (k-1)! dividing i: positions 0 and 1 are exchanged on odd steps,
// positions 0 and 2 on the other even steps, positions 0..3 are reversed
// (0<->3, 1<->2) every 6th step, positions 0..4 every 24th step, and so on.
// k comes from a mixed-radix step counter whose digit m counts modulo m: the
// lowest digit that is non-zero after the increment gives k.  After n!
// steps the identity comes back; the ordering before that one is flagged
// last, so n! orderings are delivered.
//
// Interface: startperm (re)starts at the identity with valid high.  While
// valid is high, out holds an ordering; advance consumes it and steps to the
// next on the same edge, so with advance held high one ordering is produced
// per clock.  valid falls after the last ordering is consumed.
// The exchange rule and the rate of one ordering per clock follow the
// document; the advance handshake (used to stall when the buffer behind is
// full) and the counter that finds k are this design's own.
module permutation #(
  parameter int unsigned N = cerny_pkg::N_STATES
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        startperm,
  input  logic                        advance,
  output logic [N-1:0][$clog2(N)-1:0] out,
  output logic                        valid,
  output logic                        last
);
  localparam int unsigned SW = $clog2(N);
  localparam int unsigned DW = $clog2(N + 1);

  // digit[m] counts modulo m, for m = 2..N (entries 0 and 1 unused).
  logic [N:0][DW-1:0] digit, digit_nx;
  logic [N-1:0][SW-1:0] perm_nx;
  int unsigned k;

  always_comb begin
    logic carry;
    digit_nx = digit;
    carry    = 1'b1;
    for (int m = 2; m <= N; m++) begin
      if (carry) begin
        if (digit[m] == DW'(m - 1)) begin
          digit_nx[m] = '0;
        end else begin
          digit_nx[m] = digit[m] + 1'b1;
          carry       = 1'b0;
        end
      end
    end
    // k = index of the lowest non-zero digit after the step (N on wrap-around)
    k = N;
    for (int m = N; m >= 2; m--) begin
      if (digit_nx[m] != '0) k = m;
    end
    perm_nx = out;
    for (int p = 0; p < N; p++) begin
      if (p < k) perm_nx[p] = out[k - 1 - p];
    end
  end

  // The N!-th ordering: every digit at its maximum.
  always_comb begin
    last = valid;
    for (int m = 2; m <= N; m++) begin
      if (digit[m] != DW'(m - 1)) last = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid <= 1'b0;
      digit <= '0;
      for (int p = 0; p < N; p++) out[p] <= SW'(p);
    end else if (startperm) begin
      valid <= 1'b1;
      digit <= '0;
      for (int p = 0; p < N; p++) out[p] <= SW'(p);
    end else if (advance && valid) begin
      digit <= digit_nx;
      out   <= perm_nx;
      if (last) valid <= 1'b0;
    end
  end
endmodule
