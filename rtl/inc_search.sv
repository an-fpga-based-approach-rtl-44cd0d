// inc_search: one execution unit of a topmodule.
//
// On startCerny it captures the automaton pair offered on macA/macB (the
// buffer in front of it moves on in the same cycle) and starts its cerny_pu
// search unit on the captured copy.  ready is high when the unit can take a
// start; searchdone is a one-cycle strobe when the search ends, and status
// then tells whether the automaton exceeds the Cerny bound.  macB_q shows the
// automaton under test, so a counterexample can be recorded.
// The unit and its signal names follow the document; the capture register
// is this design's own.
module inc_search
  import cerny_pkg::*;
#(
  parameter int unsigned N           = N_STATES,
  parameter int unsigned CERNY_BOUND = cerny_bound(N),
  parameter bit          F1_EN       = 1'b1,
  parameter bit          F2_EN       = 1'b0,
  parameter int unsigned F2_DEPTH    = filter2_depth(N),
  parameter bit          F3_EN       = 1'b1,
  parameter int unsigned F3_DEPTH    = filter3_depth(N)
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        startCerny,
  input  logic [N-1:0][$clog2(N)-1:0] macA,
  input  logic [N-1:0][$clog2(N)-1:0] macB,
  output logic                        ready,
  output logic                        searchdone,
  output logic                        busy,
  output logic                        status,
  output end_reason_e                 reason,
  output logic [N-1:0][$clog2(N)-1:0] macB_q
);
  logic [N-1:0][$clog2(N)-1:0] macA_q;
  logic                        start_q;
  logic                        pu_ready, pu_busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      macA_q  <= '0;
      macB_q  <= '0;
      start_q <= 1'b0;
    end else begin
      start_q <= startCerny && ready;
      if (startCerny && ready) begin
        macA_q <= macA;
        macB_q <= macB;
      end
    end
  end

  assign ready = pu_ready && !start_q;
  assign busy  = pu_busy || start_q;

  cerny_pu #(
    .N(N), .CERNY_BOUND(CERNY_BOUND), .F1_EN(F1_EN), .F2_EN(F2_EN),
    .F2_DEPTH(F2_DEPTH), .F3_EN(F3_EN), .F3_DEPTH(F3_DEPTH)
  ) u_cerny_pu (
    .clk, .rst, .startsearch(start_q), .machineA(macA_q), .machineB(macB_q),
    .ready(pu_ready), .busy(pu_busy), .done(searchdone), .status,
    .reason, .length()
  );
endmodule
