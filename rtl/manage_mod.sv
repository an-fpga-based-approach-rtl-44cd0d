// manage_mod: distributes automaton pairs over the topmodule instances and
// gathers their results.
//
// get_mac_uart turns the received bytes into (A, B) pairs.  Whenever a pair
// is waiting, the lowest-numbered topmodule whose finish is high gets it: its
// restart is pulsed with the pair on machineA/machineB and the pair is
// popped, one pair per clock at most.  finalstatus is the OR of every
// lastStatus seen; once it is set no further pairs are handed out and every
// topmodule is halted, and the first counterexample (A and the renamed B) is
// kept on cexA/cexB.  searchDone is high once a pair has been taken, no pair
// is waiting (or finalstatus is set), every topmodule has finished and none is
// being started; it falls again when new pairs arrive.  timecounter starts
// with the first pair and counts every clock in which searchDone is low, so it
// holds the analysis time in clocks whenever searchDone is high.
// The structure, the priority rule, the OR into finalstatus, the stop on a
// counterexample and the timecounter start/stop points follow the document;
// the halting of running topmodules and the counterexample outputs are this
// design's choices.
module manage_mod
  import cerny_pkg::*;
#(
  parameter int unsigned N           = N_STATES,
  parameter int unsigned NUM_TOP     = cerny_pkg::DEF_NUM_TOP,
  parameter int unsigned NUM_INC     = cerny_pkg::DEF_NUM_INC,
  parameter int unsigned AB_DEPTH    = 1024,
  parameter int unsigned PERM_DEPTH  = 512,
  parameter int unsigned TIME_W      = 48,
  parameter int unsigned CERNY_BOUND = cerny_bound(N),
  parameter bit          F1_EN       = 1'b1,
  parameter bit          F2_EN       = 1'b0,
  parameter int unsigned F2_DEPTH    = filter2_depth(N),
  parameter bit          F3_EN       = 1'b1,
  parameter int unsigned F3_DEPTH    = filter3_depth(N)
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [7:0]                  inByte,
  input  logic                        valid,
  output logic [TIME_W-1:0]           timecounter,
  output logic                        searchDone,
  output logic                        finalstatus,
  output logic [N-1:0][$clog2(N)-1:0] cexA,
  output logic [N-1:0][$clog2(N)-1:0] cexB
);
  typedef logic [N-1:0][$clog2(N)-1:0] automaton_t;

  automaton_t macA, macB;
  logic       empty, pop, started;
  logic [NUM_TOP-1:0] restart, finish, lastStatus;
  automaton_t t_cexA [NUM_TOP];
  automaton_t t_cexB [NUM_TOP];

  get_mac_uart #(.N(N), .AB_DEPTH(AB_DEPTH)) getMacUart (
    .clk, .rst, .inByte, .valid, .pop, .macA, .macB, .empty
  );

  always_comb begin
    restart = '0;
    if (!empty && !finalstatus) begin
      for (int i = NUM_TOP - 1; i >= 0; i--) begin
        if (finish[i]) restart = (NUM_TOP)'(1) << i;
      end
    end
  end
  assign pop = |restart;

  for (genvar i = 0; i < NUM_TOP; i++) begin : g_top
    topmodule #(
      .N(N), .NUM_INC(NUM_INC), .PERM_DEPTH(PERM_DEPTH), .CERNY_BOUND(CERNY_BOUND),
      .F1_EN(F1_EN), .F2_EN(F2_EN), .F2_DEPTH(F2_DEPTH), .F3_EN(F3_EN), .F3_DEPTH(F3_DEPTH)
    ) u_topmodule (
      .clk, .rst, .restart(restart[i]), .machineA(macA), .machineB(macB),
      .halt(finalstatus), .finish(finish[i]), .lastStatus(lastStatus[i]),
      .cexA(t_cexA[i]), .cexB(t_cexB[i])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      started     <= 1'b0;
      searchDone  <= 1'b0;
      finalstatus <= 1'b0;
      timecounter <= '0;
      cexA        <= '0;
      cexB        <= '0;
    end else begin
      if (pop) started <= 1'b1;
      searchDone <= (started || pop) && (empty || finalstatus) && (&finish) && !pop;
      if ((started || pop) && !searchDone) timecounter <= timecounter + 1'b1;
      if (!finalstatus) begin
        for (int i = NUM_TOP - 1; i >= 0; i--) begin
          if (lastStatus[i]) begin
            cexA <= t_cexA[i];
            cexB <= t_cexB[i];
          end
        end
      end
      if (|lastStatus) finalstatus <= 1'b1;
    end
  end
endmodule
