// cerny_pu: breadth-first search for the shortest reset word of one binary
// automaton.
//
// The binary automaton has letter a given by machineA and letter b given by
// machineB.  The search runs over the power automaton: a node is a set of
// states (n bits), the root is the set of all states, and the children of a
// node are its images under a and under b.  Nodes wait in searchFifo together
// with their depth; a visited table (one bit per node, in a simple dual-port
// RAM) makes sure each node is queued once.  The controller follows the
// document's state diagram:
//
//   idle    -> initial on startsearch
//   initial : queue the root, mark it visited                     -> read
//   read    : pop a node; end the search if a finishing condition
//             holds, else start the visited-RAM read of its a-image -> writeA
//   writeA  : exist = visited bit of the a-image; start the read of the
//             b-image; not existing -> write (waitForB = 1), else -> writeB
//   write   : queue the new node and mark it visited;
//             waitForB ? writeB : read
//   writeB  : exist = visited bit of the b-image; not existing -> write
//             (waitForB = 0), else -> read
//
// Finishing conditions, checked on the popped node: a singleton (the search
// is over and its depth is the shortest reset-word length; the conjecture is
// falsified when it exceeds CERNY_BOUND), an empty queue (not synchronizing),
// and the optional early exits Filter 2 (two states at depth <= F2_DEPTH) and
// Filter 3 (at most three states at depth <= F3_DEPTH).  Filter 1 (some state
// has no incoming transition) is checked in writeA of the root, where both
// images of the full set are at hand.  A search costs 3 cycles per expanded
// node plus 1 per newly queued node, plus about 3.
//
// Two visited RAMs alternate between searches.  Every node queued is also
// written, tagged with its RAM, to deleteFifo; while one RAM serves the
// running search the other is cleared word by word from deleteFifo, so no
// cycles are spent on clearing between searches.  ready is low until the RAM
// the next search will use has no pending clear entries.  After reset both
// RAMs are swept to zero (2^n cycles, ready low).
//
// Interface: pulse startsearch while ready is high, holding machineA and
// machineB stable until done.  done is a one-cycle strobe; status, reason and
// length are valid from done until the next start.
// From the document: the state diagram, the node encoding, the visited RAM,
// the two alternating RAMs with a delete FIFO, the filters and their depths.
// This design's own: depth stored beside each queued node, the one-cycle RAM
// read pipelined across read/writeA/writeB with a bypass, Filter 1 placed in
// writeA, the RAM tag in deleteFifo, the reset sweep and the FIFO depths
// (2^n and 2^(n+1), deep enough never to overflow).
module cerny_pu
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
  input  logic                        startsearch,
  input  logic [N-1:0][$clog2(N)-1:0] machineA,
  input  logic [N-1:0][$clog2(N)-1:0] machineB,
  output logic                        ready,
  output logic                        busy,
  output logic                        done,
  output logic                        status,
  output end_reason_e                 reason,
  output logic [N-1:0]                length
);
  localparam int unsigned SF_DEPTH = 2**N;
  localparam int unsigned DF_DEPTH = 2**(N+1);
  localparam int unsigned PW       = N + 2;  // pending-clear counter width

  typedef logic [N-1:0] node_t;
  typedef logic [N-1:0] depth_t;
  typedef struct packed {
    depth_t depth;
    node_t  node;
  } sf_entry_t;
  typedef struct packed {
    logic  sel;
    node_t node;
  } df_entry_t;

  typedef enum logic [2:0] {
    S_IDLE, S_INITIAL, S_READ, S_WRITEA, S_WRITE, S_WRITEB
  } state_e;

  state_e  state;
  node_t   cur_node, nA_q, nB_q, new_node;
  depth_t  cur_depth;
  logic    waitForB, a_written;
  logic    selectRam, last_sel;
  logic [PW-1:0] pending [2];
  logic    sweeping;
  node_t   sweep_addr;

  // ---------------------------------------------------------------- FIFOs
  sf_entry_t sf_din, sf_dout;
  logic      sf_push, sf_pop, sf_empty, sf_full, sf_rst;
  df_entry_t df_din, df_dout;
  logic      df_push, df_pop, df_empty, df_full;

  sync_fifo #(.WIDTH($bits(sf_entry_t)), .DEPTH(SF_DEPTH)) searchFifo (
    .clk, .rst(sf_rst), .push(sf_push), .pop(sf_pop), .Din(sf_din),
    .Dout(sf_dout), .EMPTY(sf_empty), .FULL(sf_full), .count()
  );

  sync_fifo #(.WIDTH($bits(df_entry_t)), .DEPTH(DF_DEPTH)) deleteFifo (
    .clk, .rst, .push(df_push), .pop(df_pop), .Din(df_din),
    .Dout(df_dout), .EMPTY(df_empty), .FULL(df_full), .count()
  );

  // ------------------------------------------------------- next-state unit
  node_t nsc_in, nsc_out;
  logic  nsc_sel;

  next_state_calc #(.N(N)) nextStateCalc (
    .machineA, .machineB, .processingState(nsc_in), .select(nsc_sel),
    .outState(nsc_out)
  );

  // ------------------------------------------------------------ visited RAMs
  logic  ram_we   [2];
  node_t ram_wa   [2];
  logic  ram_din  [2];
  logic  ram_re   [2];
  node_t ram_ra;
  logic  ram_dout [2];

  for (genvar r = 0; r < 2; r++) begin : g_ram
    ram_dual #(.AW(N), .DW(1)) RAM_dual (
      .clk, .write(ram_we[r]), .write_addr(ram_wa[r]), .Din(ram_din[r]),
      .read(ram_re[r]), .read_addr(ram_ra), .Dout(ram_dout[r])
    );
  end

  function automatic int unsigned popcount(node_t v);
    int unsigned c = 0;
    for (int b = 0; b < N; b++) c += 32'(v[b]);
    return c;
  endfunction

  // --------------------------------------------------- finishing conditions
  sf_entry_t   head;
  int unsigned head_pop;
  logic        active, search_wr, exist, is_root, f1_hit;
  logic        end_now;
  end_reason_e end_reason;

  assign head     = sf_dout;
  assign head_pop = popcount(head.node);
  assign active   = (state != S_IDLE);
  assign search_wr = (state == S_INITIAL) || (state == S_WRITE);
  assign is_root  = (cur_depth == '0);

  always_comb begin
    end_now    = 1'b0;
    end_reason = END_NONE;
    if (state == S_READ) begin
      if (sf_empty) begin
        end_now = 1'b1; end_reason = END_NOSYNC;
      end else if (head_pop == 1) begin
        end_now = 1'b1; end_reason = END_SINGLETON;
      end else if (F2_EN && head_pop == 2 && head.depth <= depth_t'(F2_DEPTH)) begin
        end_now = 1'b1; end_reason = END_FILTER2;
      end else if (F3_EN && head_pop <= 3 && head.depth <= depth_t'(F3_DEPTH)) begin
        end_now = 1'b1; end_reason = END_FILTER3;
      end
    end else if (state == S_WRITEA && f1_hit) begin
      end_now = 1'b1; end_reason = END_FILTER1;
    end
  end

  // ---------------------------------------------------- datapath controls
  assign nsc_in  = (state == S_READ) ? head.node : cur_node;
  assign nsc_sel = (state == S_READ);
  assign f1_hit  = F1_EN && is_root && ((nA_q | nsc_out) != '1);

  // exist: visited bit of the image under test; in writeB, a b-image equal
  // to the a-image written in the previous cycle counts as visited.
  assign exist = ram_dout[selectRam] || (state == S_WRITEB && a_written && nA_q == nB_q);

  assign sf_rst  = rst || end_now;
  assign sf_pop  = (state == S_READ) && !sf_empty;
  assign sf_push = search_wr;
  assign sf_din  = (state == S_INITIAL) ? '{depth: '0, node: '1}
                                        : '{depth: cur_depth + 1'b1, node: new_node};
  assign df_push = search_wr;
  assign df_din  = '{sel: selectRam, node: sf_din.node};
  assign df_pop  = !sweeping && !df_empty && (!active || df_dout.sel != selectRam);

  assign ram_ra = nsc_out;
  always_comb begin
    for (int r = 0; r < 2; r++) begin
      ram_re[r]  = (selectRam == r[0]) && !end_now &&
                   ((state == S_READ) || (state == S_WRITEA));
      ram_we[r]  = 1'b0;
      ram_wa[r]  = df_dout.node;
      ram_din[r] = 1'b0;
      if (sweeping) begin
        ram_we[r] = 1'b1;
        ram_wa[r] = sweep_addr;
      end else if (search_wr && selectRam == r[0]) begin
        ram_we[r]  = 1'b1;
        ram_wa[r]  = sf_din.node;
        ram_din[r] = 1'b1;
      end else if (df_pop && df_dout.sel == r[0]) begin
        ram_we[r] = 1'b1;
      end
    end
  end

  assign ready = (state == S_IDLE) && !sweeping && (pending[!last_sel] == '0);
  assign busy  = active;

  // ------------------------------------------------------------ controller
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      status     <= 1'b0;
      reason     <= END_NONE;
      length     <= '0;
      waitForB   <= 1'b0;
      a_written  <= 1'b0;
      selectRam  <= 1'b0;
      last_sel   <= 1'b0;
      cur_node   <= '0;
      cur_depth  <= '0;
      nA_q       <= '0;
      nB_q       <= '0;
      new_node   <= '0;
      sweeping   <= 1'b1;
      sweep_addr <= '0;
    end else begin
      done <= 1'b0;
      if (sweeping) begin
        sweep_addr <= sweep_addr + 1'b1;
        if (sweep_addr == '1) sweeping <= 1'b0;
      end
      unique case (state)
        S_IDLE: begin
          if (startsearch && ready) begin
            selectRam <= !last_sel;
            status    <= 1'b0;
            reason    <= END_NONE;
            length    <= '0;
            state     <= S_INITIAL;
          end
        end
        S_INITIAL: begin
          cur_depth <= '0;
          state     <= S_READ;
        end
        S_READ: begin
          if (!end_now) begin
            cur_node  <= head.node;
            cur_depth <= head.depth;
            nA_q      <= nsc_out;
            state     <= S_WRITEA;
          end
        end
        S_WRITEA: begin
          nB_q <= nsc_out;
          if (!end_now) begin
            if (!exist) begin
              new_node  <= nA_q;
              waitForB  <= 1'b1;
              a_written <= 1'b1;
              state     <= S_WRITE;
            end else begin
              a_written <= 1'b0;
              state     <= S_WRITEB;
            end
          end
        end
        S_WRITE: begin
          state <= waitForB ? S_WRITEB : S_READ;
        end
        S_WRITEB: begin
          if (!exist) begin
            new_node <= nB_q;
            waitForB <= 1'b0;
            state    <= S_WRITE;
          end else begin
            state <= S_READ;
          end
        end
        default: state <= S_IDLE;
      endcase
      if (end_now) begin
        state    <= S_IDLE;
        done     <= 1'b1;
        reason   <= end_reason;
        last_sel <= selectRam;
        if (end_reason == END_SINGLETON) begin
          length <= head.depth;
          status <= (head.depth > depth_t'(CERNY_BOUND));
        end
      end
    end
  end

  // Pending-clear bookkeeping: one count per RAM of deleteFifo entries that
  // still have to be cleared.
  always_ff @(posedge clk) begin
    if (rst) begin
      pending[0] <= '0;
      pending[1] <= '0;
    end else begin
      for (int r = 0; r < 2; r++) begin
        pending[r] <= pending[r]
                    + ((df_push && selectRam == r[0]) ? PW'(1) : PW'(0))
                    - ((df_pop && df_dout.sel == r[0]) ? PW'(1) : PW'(0));
      end
    end
  end

  a_search_fifo_room: assert property (@(posedge clk) disable iff (rst) sf_push |-> !sf_full)
    else $error("cerny_pu: searchFifo overflow");
  a_delete_fifo_room: assert property (@(posedge clk) disable iff (rst) df_push |-> !df_full)
    else $error("cerny_pu: deleteFifo overflow");
endmodule
