// cerny_pkg: constants and types shared by the automaton-search datapath.
//
// An n-state unary automaton is stored as n next-state entries of
// $clog2(n) bits, entry q being the successor of state q.  A node of the
// power automaton (a set of states) is an n-bit vector, bit q set when state
// q is in the set.  The defaults below are the main configuration: 12-state
// automata, 8 pair-level units with 60 search units each, and Filters 1 and
// 3 enabled, which is the fastest filter combination measured for it.
package cerny_pkg;

  localparam int unsigned N_STATES = 12;  // states per automaton
  localparam int unsigned DEF_NUM_TOP = 8;   // topmodule instances
  localparam int unsigned DEF_NUM_INC = 60;  // incSearch units per topmodule

  // Why a breadth-first search ended.
  typedef enum logic [2:0] {
    END_NONE      = 3'd0,  // no search finished yet
    END_SINGLETON = 3'd1,  // a singleton node was popped: shortest reset word found
    END_NOSYNC    = 3'd2,  // queue ran empty: the automaton is not synchronizing
    END_FILTER1   = 3'd3,  // some state has no incoming transition
    END_FILTER2   = 3'd4,  // a 2-state node reached early enough
    END_FILTER3   = 3'd5   // a node of at most 3 states reached early enough
  } end_reason_e;

  // Cerny bound (n-1)^2.
  function automatic int unsigned cerny_bound(int unsigned n);
    return (n - 1) * (n - 1);
  endfunction

  // Filter 2 depth: (n-1)^2 - n(n-1)/2.
  function automatic int unsigned filter2_depth(int unsigned n);
    return (n - 1) * (n - 1) - n * (n - 1) / 2;
  endfunction

  // Filter 3 depth: floor((n^2 - 5n + 6) / 4).
  function automatic int unsigned filter3_depth(int unsigned n);
    return (n * n + 6 - 5 * n) / 4;
  endfunction

  // Bytes needed to send one unary automaton over the UART.
  function automatic int unsigned automaton_bytes(int unsigned n);
    return (n * $clog2(n) + 7) / 8;
  endfunction

endpackage
