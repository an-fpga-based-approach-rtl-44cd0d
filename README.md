# Černý conjecture search engine on an FPGA

A word that sends every state of a finite automaton to one single state is a
*reset word*. The Černý conjecture says that an n-state automaton with a reset
word always has one of length at most (n-1)². One counterexample would refute
it. This design looks for one among all binary automata with n = 12 states.

Each binary automaton is built from two unary automata:

- letter **a** is a fixed unary automaton A;
- letter **b** is a unary automaton B whose state names are renamed.

A host computer sends (A, B) pairs over a serial line. The engine renames B in
all n! ways. For every renaming it runs a breadth-first search (BFS) for the
shortest reset word. It reports whether any word was longer than (n-1)², and
how many clock cycles the work took.

All of this is massively parallel. With the defaults (8 `topmodule` × 60
`incSearch`), 480 BFS units work at once. Each unit has its own queues and
visited-node memories.

## Structure

```
uart_top
├── rx_serial            serial bytes in (8N1)
├── manage_mod           pairs → topmodules, results, timecounter
│   ├── get_mac_uart     bytes → automata → A_FIFO / B_FIFO (sync_fifo)
│   └── topmodule × NUM_TOP
│       ├── permutation  one ordering of the n state names per clock
│       ├── permuter     renames B with the ordering
│       ├── permFIFO     renamed Bs waiting for a search unit (sync_fifo)
│       └── inc_search × NUM_INC
│           └── cerny_pu BFS for one binary automaton
│               ├── searchFifo, deleteFifo (sync_fifo)
│               ├── two visited RAMs (ram_dual)
│               └── next_state_calc
└── tx_serial            result message out
```

`cerny_pkg` holds the defaults, the `end_reason_e` enum and these formulas:

- the Černý bound (n-1)²;
- the filter depths;
- the number of bytes per automaton.

Each file starts with a comment that gives:

- the interface and timing of its module;
- which parts follow the original design and which are choices made here.

## Encodings

- **Automaton.** `N` entries of `$clog2(N)` bits each. Entry q is the
  successor of state q, and entry 0 sits in the lowest bits. For n = 12 that
  is 48 bits, sent as 6 bytes with the least significant byte first.
- **Node of the power automaton.** An `N`-bit set in which bit q means
  "state q is present". The root is all ones. A singleton is a node with one
  bit set. The empty set cannot be reached.
- **Renaming.** An ordering `perm` maps old state q to new state `perm[q]`.
  The renamed automaton is `B'[perm[q]] = perm[B[q]]`. This is a true
  relabelling, so B' is isomorphic to B.

## The BFS unit (`cerny_pu`)

This is the heart of the design and the most subtle part.

### The walk

The search walks the power automaton:

1. The root (all states) goes into `searchFifo` at depth 0 and is marked in a
   visited RAM.
2. Each popped node is expanded twice, by a and by b. `next_state_calc` forms
   the image of a set by OR-ing one-hot successors.
3. An image that is not yet marked is marked and queued at depth+1.

Because the queue is FIFO, the first singleton popped is at the depth of the
shortest reset word.

### The controller

The controller has six states:

| State | What happens |
|---|---|
| `idle` | Wait for `startsearch`. |
| `initial` | Queue and mark the root. |
| `read` | Pop a node and check the finishing conditions. If none holds, start the visited-RAM read of its a-image. |
| `writeA` | The read result arrives (`exist`). Start the read of the b-image. If the a-image is new, go to `write` with `waitForB = 1`; otherwise go to `writeB`. |
| `write` | Queue and mark the new node. Go to `writeB` if `waitForB` is set, otherwise to `read`. |
| `writeB` | The b-image read arrives. If the b-image is new, go to `write` with `waitForB = 0`; otherwise go to `read`. |

The RAM has a one-cycle read latency, so each read is issued one state before
its result is used. There is one hazard. The b-image read is issued in
`writeA`, before `write` marks the a-image. If the two images are the same
node, that read returns "not visited". `writeB` therefore also treats the node
as existing when the a-image was just written and equals the b-image (a
bypass).

Cost of a search, in clocks:

- 3 per expanded node;
- plus 1 per newly queued node;
- plus about 3.

The testbenches check this count exactly against a software model.

### Finishing conditions

The popped node is checked in `read`. `reason` reports which condition ended
the search.

| reason | condition | result |
|---|---|---|
| `END_SINGLETON` | popped node has one state | `length` = its depth; `status` = depth > `CERNY_BOUND` |
| `END_NOSYNC` | `searchFifo` empty | automaton has no reset word |
| `END_FILTER1` | root: a-image ∪ b-image ≠ all states | some state has no incoming edge, so the automaton is not strongly connected. A counterexample can be assumed strongly connected. |
| `END_FILTER2` | 2 states at depth ≤ `F2_DEPTH` (55 for n=12; 60 for the stricter variant) | any pair can be merged in n(n-1)/2 letters, so the bound is met |
| `END_FILTER3` | ≤ 3 states at depth ≤ `F3_DEPTH` (⌊(n²-5n+6)/4⌋ = 22) | by Pin's bound plus the pair bound, the bound is met |

Filter 1 is evaluated in `writeA` of the root. That is where both images of
the full set are available.

The defaults turn on Filters 1 and 3. This was the fastest combination in the
original measurements.

### Two visited RAMs and `deleteFifo`

Clearing a 2^n-entry visited RAM after each search would cost 4096 clocks. A
search is often much shorter than that. So:

- There are two visited RAMs. `selectRam` alternates between them from one
  search to the next.
- Every node that is queued is also pushed into `deleteFifo`, tagged with the
  RAM it was marked in.
- At the end of a search `searchFifo` is reset, but `deleteFifo` is kept.
- While a search uses one RAM, entries of the *other* RAM are popped from
  `deleteFifo` (one per clock) and their addresses are written back to 0.

`ready` is low until the RAM the next search will use has no clear entries
pending. Usually the clear finishes inside the next search, so no cycles are
lost. The RAM tag is what makes this safe when a search is shorter than the
clear it overlaps.

After reset, both RAMs are swept to zero over 2^n clocks. The RAM itself has
no reset.

### Queue sizes

- `searchFifo` holds node and depth, 2^n × 2n bits. Each node is queued at
  most once per search.
- `deleteFifo` holds RAM tag and node, 2^(n+1) × (n+1) bits. It holds at most
  two searches' worth of nodes.

Neither queue can overflow for any automaton. The cost is memory: about
208 Kb per unit. 480 units need about 97.5 Mb, almost twice the 52.9 Mb of
block RAM in the XC7VX690T on a VC709 board. The original design used 18 Kb
and 36+18 Kb FIFOs per unit and did fit. To build the design for that device:

- lower `NUM_TOP`/`NUM_INC` to about 250 units in total; or
- shrink the queues, accepting that a very wide BFS level could overflow.

## Generating the n! renamings (`permutation`)

One ordering of the state names is produced per clock, by prefix reversals.
Step i reverses positions 0..k-1, where k is the largest value such that
(k-1)! divides i:

- odd steps swap positions 0 and 1;
- the remaining even steps swap positions 0 and 2;
- every 6th step reverses positions 0..3;
- every 24th step reverses positions 0..4;
- and so on.

k is not found by division. A mixed-radix counter has one digit per m = 2..n,
and digit m counts modulo m. After each increment, the lowest non-zero digit
gives k. All n! orderings appear exactly once, and the start ordering returns
after n! steps. The generator flags the last ordering and then stops.

The `advance` input stalls the generator when `permFIFO` is full. With
`advance` held high, one ordering is produced per clock.

## `topmodule` and `manage_mod`: distributing the work

**`topmodule`** tests one pair:

- `restart` loads A and B and starts the generator.
- The renamed Bs flow through `permFIFO`. The lowest-numbered ready `incSearch`
  takes the head entry, one start per clock. `incSearch` latches A and the
  renamed B for the length of its search.
- `finish` rises when all n! orderings have been generated, `permFIFO` is
  empty and no unit is busy.
- `lastStatus` is set if any search went over the bound. `cexA`/`cexB` keep
  the first such automaton.

**`manage_mod`**:

- Gives the next waiting pair to the lowest-numbered `topmodule` whose
  `finish` is high.
- ORs the `lastStatus` results into `finalstatus`. Once `finalstatus` is set,
  no more pairs are handed out. All `topmodule`s are halted: they start no new
  searches, but running ones finish.
- Counts `timecounter`. It starts when the first pair is popped and counts
  every clock while `searchDone` is low.
- Raises `searchDone` when a pair has been taken, no pair is waiting (or a
  counterexample was found), and every `topmodule` has finished.

A new group of pairs sent later drops `searchDone` again, and `timecounter`
continues. So `timecounter` is the total analysis time of all groups.

## Serial protocol (`uart_top`, `get_mac_uart`, `rx_serial`, `tx_serial`)

- **Line:** 8N1, least significant bit first. At 100 MHz and 921,600 baud,
  `CLKS_PER_BIT` is 109 (108.5 rounded).
- **Host → engine:** automata back to back: A₀, B₀, A₁, B₁, …, each
  `ceil(n·⌈log₂n⌉/8)` bytes.
  - `get_mac_uart` alternates between A and B with a `switch` flag that starts
    at 0 (A first).
  - It pushes each completed automaton into `A_FIFO` or `B_FIFO`, 1024
    entries each, so a group of 1020 pairs fits.
  - There is no flow control. Do not send more than 1024 pairs ahead of the
    engine.
  - Bytes must be at least 4 clocks apart, which a UART always satisfies.
- **Engine → host:** sent each time `searchDone` rises, least significant byte
  first:
  1. 6 bytes of `timecounter` (clock cycles);
  2. 1 byte with `finalstatus` in bit 0;
  3. the counterexample A, then its renamed B, in the input format (all zeros
     when there is none).

  For n = 12 the message is 19 bytes.
- `searchDone` and `finalstatus` are also output pins, for LEDs.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 12 | states per automaton |
| `NUM_TOP` | 8 | `topmodule` instances |
| `NUM_INC` | 60 | `incSearch` units per `topmodule` |
| `CERNY_BOUND` | (N-1)² = 121 | a singleton deeper than this is a counterexample |
| `F1_EN`, `F2_EN`, `F3_EN` | 1, 0, 1 | filter enables |
| `F2_DEPTH`, `F3_DEPTH` | 55, 22 | filter depths (set `F2_DEPTH` = 60 for the stricter Filter 2 variant) |
| `CLKS_PER_BIT` | 109 | UART bit time in clocks |
| `AB_DEPTH` | 1024 | pairs buffered in `A_FIFO`/`B_FIFO` |
| `PERM_DEPTH` | 512 | `permFIFO` entries |
| `TIME_W` | 48 | `timecounter` width (2.8·10⁶ s at 100 MHz) |

The other configurations that were measured are `NUM_TOP`×`NUM_INC` settings:

- for n = 12: 9×50 and 10×40;
- for n = 9: 10×40, 11×40, 10×45 and 12×35.

Running 9-state automata needs `N = 9`.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.
`tb/cerny_ref_pkg.sv` is an independent software model:

- BFS with the same filters and the same cycle-cost model;
- enumeration of all renamings of a pair.

With plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_uart_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/cerny_pkg.sv tb/cerny_ref_pkg.sv \
  tb/tb_uart_top.sv -o sim && obj_dir/sim
```

Replace `tb_uart_top` with any testbench name.

| Testbench | What it covers |
|---|---|
| `tb_cerny_pu` | 400 random and near-permutation automata with n = 5, with and without filters. Checks the reason, length, status and exact cycle count against the model. Runs back-to-back searches, so RAM alternation and clearing are exercised. Also checks the 4-state Černý automaton (reset word 9) against a bound lowered to 8. |
| `tb_cerny_pu_n12` | The BFS unit at full size with default parameters (n = 12, bound 121, Filters 1 and 3). The 12-state Černý automaton must need exactly 121 letters and must not be flagged. It must be flagged against a bound of 120. 80 random 12-state automata are checked against the model, with and without filters, including cycle counts. The 4096-clock reset sweep is checked too. |
| `tb_permutation` | n = 3 and 4 against the exchange rule. For n = 5, with random stalls, all 120 orderings are distinct. For n = 7, 5040 orderings in 5040 clocks. |
| `tb_topmodule`, `tb_manage_mod` | Complete pairs against the model's enumeration of all renamings. |
| `tb_uart_top` | End to end, through the serial pins. |

`tb_uart_top` settings:

- two engines, each with n = 5, 2 `topmodule`s × 3 units, and Filter 2 also
  on; one engine keeps the true bound and one has it lowered to 8;
- 8 pairs, sent in two groups;
- the 5-state Černý automaton is among them.

`tb_uart_top` checks:

- the result messages;
- the returned counterexample, which must really need more than 8 letters.

It also counts these mechanisms and fails if one never happens:

- every finishing reason;
- `permFIFO` full (generator stall);
- both `topmodule`s busy at once;
- RAM clearing during a search;
- a search held back until its RAM was clear;
- a halt on a counterexample;
- `searchDone` falling when a new group arrives.

**Simulated sizes.** The largest configuration simulated end to end is the
one above: n = 5, 2 × 3 units. The blocks were also run at n = 4, 5 and 7.
At n = 12 the single BFS unit is simulated with its defaults (`tb_cerny_pu_n12`), but the whole engine has not been run through a pair. One
pair needs 12! ≈ 4.8·10⁸ searches, at least 4.8·10⁸ clocks even with perfect
parallelism. The full-size RTL is only lint- and elaboration-checked.

## Departures from the original design, and limits

- **Queue depths and depth tags.** `searchFifo` and `deleteFifo` are deeper
  than the original 18 Kb and 36+18 Kb FIFOs. Each queue entry carries its
  BFS depth. As a result, the default build does not fit the block RAM of the
  original device (see *Queue sizes*).
- **Memory style.** The visited RAMs have a registered read. The FIFOs are
  first-word fall-through, written as plain arrays. Mapping them onto vendor
  block-RAM FIFOs may need a read-latency change in `cerny_pu`.
- **Conflicting rule on `switch`.** The original describes the `switch`
  condition in two ways. Here `switch = 0` selects A, and the first automaton
  after reset is A.
- **Result report.** The original reports a counterexample but gives no
  format. The message format above is this design's own, as is the halt of
  running `topmodule`s when a counterexample appears.
- **Not built:**
  - the verification mode that streams state transitions and reset paths back
    to the host;
  - the host software (generation and ordering of non-isomorphic unary
    automata);
  - the board's USB-UART bridge, JTAG and clocking.
