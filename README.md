# Accelerated propagation-delay shortest-path processor

This is synthesizable SystemVerilog for hardware that solves the single-source
shortest-path problem with non-negative edge weights. The hardware returns a
shortest-path tree as a list of predecessors (PREV).

The method treats the graph as a network that a signal spreads through. The
signal starts at the source node. Each edge delays it by the edge's weight. The
first signal to reach a node arrives along a shortest path, and the node records
where it came from. A plain clocked version moves the signal one weight unit per
clock, so it needs as many clocks as the largest distance. The accelerated
version jumps time forward instead. On every clock, a comparator tree finds the
smallest remaining wait among all edges still in flight. Every edge then
subtracts that amount at once. At least one new node is reached per clock, so a
run takes at most n-1 time steps for n nodes. It often takes fewer, because
several nodes can be reached on the same clock. The hardware needs O(m) storage
for m edges.

Two architectures are provided, and `apd_top` puts them side by side:

* **Static solver** (`apd_static_solver`). The hardware mirrors one graph: one
  node module per vertex and one edge module per directed edge. The topology is
  fixed by parameters. The weights are loaded at the start of each run. A serial
  link (`prev_uart_reporter`) sends each finished tree to a host.
* **Reconfigurable solver** (`dyn_solver`). A fixed array of N fully
  interconnected nodes. Each node keeps its outgoing edges in a small queue
  sorted by weight. Any graph of up to N nodes can be loaded at run time.

## The time step and when an arrival happens

This timing rule matters most for correctness, and both solvers follow it.

* An element is *counting* when it still has a signal in flight:
  * in the static solver, an edge whose origin is reached and whose target is
    not;
  * in the reconfigurable solver, a reached node that still has queued edges.
* The time-advance minimizer (`time_advance_minimizer`) is a combinational
  binary tree. It returns the smallest waiting value among the counting
  elements. This value is the step.
* Every counting element subtracts the step at the next clock edge.
* An element whose waiting value *equals* the step fires in that same clock.
  Its target's ACTIVE register is set at the same clock edge that brings the
  wait to zero.
  * If the target became active one clock later instead, the next step would
    be computed without the new node's outgoing edges. Time could then jump
    past an earlier arrival.
  * With this rule, every clock starts with all reached nodes already taking
    part in the minimum.
* Edges of weight 0 are allowed. A counting edge with wait 0 makes the step 0.
  That clock delivers the edge without moving time forward.
* An edge whose target is reached through another edge stops counting. It takes
  no further part in the run.

Worked example: the default static graph has 5 nodes and 6 undirected edges,
each built as a pair of directed edges:

* A–B 2, A–C 3, B–D 4, C–D 3, C–E 3, D–E 1.

From A, a run takes three steps:

1. Step 2 reaches B.
2. Step 1 reaches C (time 3).
3. Step 3 reaches D and E together (time 6).

D is reached over B–D and C–D on the same clock. The edge D–E never fires
because E is reached on that clock too. The naive algorithm, which subtracts 1
on every clock, needs 6 clocks for the same run.

Critical path: counting-edge waits → comparator tree (depth log2 of the input
count) → equality compare → ACTIVE register D input. In the static solver the
tree covers all m edges. In the reconfigurable solver it covers only the n
nodes.

## Choosing PREV when several signals arrive together

When several signals reach a node on the same clock, any one of them gives a
correct tree. `prev_finder` is a small state machine in each node. On the
activation clock it records which inputs delivered the signal: incoming edges
in the static solver, ACTIVATE bus lines in the reconfigurable one. It then
checks one candidate per clock, starting at index 0, and stops at the first
one set.

* The search runs in parallel with the time advance and never stalls it.
* `done` waits for every search to finish, which takes at most the node's input
  count in clocks.
* Recording the candidates at activation is required, not optional. A
  weight-0 edge from a node reached later would otherwise look like an arrival
  too, and would give a wrong PREV.

## Static solver

| module | role |
|---|---|
| `apd_edge` | Holds the wait w(e). Loaded with the weight on `start`. Subtracts the step while origin active and target inactive. Outputs `fire` (combinational), `arrived` (sticky) and the origin's identifier. |
| `apd_node` | Holds ACTIVE and PREV. ACTIVE is set on `start` if the node is the source, otherwise on the first clock where an incoming edge fires. PREV is the identifier carried by the edge that `prev_finder` picks. The source's PREV is its own number. |
| `time_advance_minimizer` | Finds the minimum over all M edges, with a valid bit for each edge. |
| `apd_static_solver` | Wires nodes and edges from `EDGE_SRC[]` / `EDGE_DST[]`. Each node's list of incoming edges is built at elaboration by constant functions. |

Interface of `apd_static_solver`:

* Pulse `start_i` for one clock with `source_i` and `weight_i[M]` valid.
* `busy_o` is high until `done_o` rises.
* After that, the following outputs stay valid until the next start:
  * `reached_o[v]`;
  * `prev_o[v]` (meaningful where `reached_o[v]` is set);
  * `tree_edge_o[e]`, the edges that delivered a signal;
  * `step_count_o`, the number of clocks in which time advanced.
* Nodes that cannot be reached from the source keep `reached_o` low.

The parameter `ACCEL` selects the algorithm:

* `ACCEL = 1` (the default, and what `apd_top` uses) runs the accelerated
  algorithm described above.
* `ACCEL = 0` runs the naive algorithm. Every counting edge subtracts 1 per
  clock, so a run takes as many clocks as the largest distance. The step is 0
  instead of 1 while a weight-0 edge is waiting.
* The hardware is the same in both modes. Only the step that is fed back to
  the edges differs.

## Reconfigurable solver

`dyn_node` holds the following parts:

* **Edge queue (`dyn_edge_queue`).** A list of entries sorted by weight. Each
  entry is one weight (the key) and a bit set of destination nodes, so all
  edges of one weight share an entry. Loading inserts one edge per clock: it
  either adds a destination bit to an existing key, or shifts the larger keys
  back by one place. Reads and pops happen at the head.
* **Local time accumulator.** Cleared when the node is reached. Adds the global
  step (TIME_IN) on every clock while the node has queued edges.
* **Subtractor.** TIME_OUT = head weight − accumulator. This is the node's
  nearest remaining wait, and it goes to the global minimizer.
* **State machine.** Three states: IDLE, ACTIVE and DRAINED. When TIME_OUT
  equals the step, the node pops the head. In the same clock it drives the
  head's destination set on ACT_NODES.
* **`prev_finder`.** Runs over the ACTIVATE bus, whose bit x means that node x
  reached this node.

`dyn_solver` wires the nodes and the minimizer:

* Bit y of node x's ACT_NODES drives bit x of node y's ACTIVATE, so the
  crossbar is a transpose.
* The minimizer compares only the N TIME_OUT values.

Use of `dyn_solver`:

1. Pulse `clear_i` to empty all queues.
2. Give one clock of `cfg_i` per directed edge (`cfg_src_i`, `cfg_dst_i`,
   `cfg_weight_i`).
3. Pulse `start_i` with `source_i`.
4. `done_o` rises when every node is reached, or when nothing is left in
   flight, and every PREV search has ended.

A run consumes the queues, so reload the graph before the next run.
`overflow_o` is sticky until `clear_i`. It means a node was given more distinct
weights than its queue holds, and the extra edges were dropped.

Queue depth can differ per node. `NODE_DEPTH[v]` (default: `DEPTH` for every
node) sets how many distinct weights node v can hold. Sparse graphs rarely need
a queue of length N at every node, so shorter queues save resources where a
node is known to have few outgoing edges.

One difference from the static solver:

* Queue entries whose destinations are all reached already are not skipped.
  Each one still comes due and costs one step (the testbenches count these).
* The step count is therefore the number of distinct times dist(u) + l(e), over
  all queued edges, up to the last arrival. It is not the number of distinct
  distances.
* On Random4-n-style graphs with n = 64, this gives a mean of 92 steps. The
  static solver needs about 0.73·n = 47 on graphs of that kind. The n-1 bound
  on steps therefore does not hold for this solver: its bound is the number of
  edges.

## Serial result report

`prev_uart_reporter` sends the PREV list over an RS-232-style line:

* Node 0 first. Each entry is ceil(IDW/8) bytes, low byte first.
* Each byte is an 8N1 frame, sent LSB first.
* `CLKS_PER_BIT` sets the bit time. The default of 434 gives 115200 baud from a
  50 MHz clock.

`apd_top` starts a report on each rising edge of the static solver's `done`. A
report lasts N · bytes · 10 · `CLKS_PER_BIT` clocks. Level shifting to RS-232
voltages is outside this logic.

## What is this design's own choice

The structure follows the published architecture:

* edge modules with a wait register, decremented under ORIGIN_ACTIVE && !TARGET_ACTIVE;
* node modules with ACTIVE and PREV;
* a sequential PREV search;
* a comparator-tree minimizer;
* nodes with a weight-ordered queue, a time accumulator, a subtractor, and
  ACT_NODES / ACTIVATE buses;
* a full interconnect between nodes;
* results sent out over RS-232.

The following are choices made here:

* Firing on the clock that brings the wait to zero, and weight-0 edges taking
  part in the minimum (see the timing section above).
* A 16-bit weight width (`apd_pkg::WEIGHT_W_DEF`). A weight can be at most
  65535.
* An active-low asynchronous reset, the start/done handshake, the step
  counters, the `tree_edge_o` output, and the queue's clear and overflow
  signals.
* The default graphs:
  * static solver: 5 nodes, 12 directed edges, as in the worked example above;
  * reconfigurable solver: 4 nodes with a queue depth of 4.
* The queue's internal structure: a sorted register list with shift-on-insert.
* The serial framing and bit rate.
* The PREV search scans candidates lowest index first.

Not built:

* the plain, non-accelerated version of the algorithm;
* the subset-sum network mentioned as an extension (too little is specified);
* the host program that receives the serial report;
* anything specific to one FPGA device.

## Sizes and resources

* **Static solver.** One edge module per directed edge (a W-bit register plus a
  comparator). One node module per vertex. An M-input comparator tree.
* **Reconfigurable solver.** N nodes. Each node has DEPTH × (W + N) bits of
  queue. The crossbar has N² wires. The comparator tree has N inputs.

Default sizes after generic synthesis:

| | cells | flip-flop bits |
|---|---|---|
| whole top | about 1400 | about 830 |
| static solver | about 560 | about 280 |
| reconfigurable solver | about 760 | about 490 |

The published benchmark uses random graphs with m = 4n and arc lengths in
[0, n], for n = 1024 to 131072. That is far beyond the default sizes here:

* The static solver can be elaborated for such a graph by passing its edge
  list as parameters. Verilator takes about 30 s to build it at n = 128.
* At n = 1024, a Verilator build ran out of a practical memory budget: over
  7 GB, unfinished after 10 minutes. That was with one uniquely parameterised
  module per node and per edge.
* For lengths up to n = 131072, set `W` to 18 bits.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F`.

| testbench | what it checks |
|---|---|
| `time_advance_minimizer_tb` | 8- and 5-input trees against a linear search, including no valid input and a single valid input |
| `prev_finder_tb` | lowest set index found exactly index+1 clocks after the trigger, inputs changed after capture, empty masks |
| `apd_edge_tb` | reference model of w(e), counting, fire and arrival under random activity and steps |
| `apd_node_tb` | activation on the first firing clock only, PREV from the lowest firing edge, later arrivals ignored, the source |
| `apd_static_solver_tb` | default graph (including the worked example: 3 steps accelerated, 6 naive) and a 16-node, 48-edge graph, each in both modes; results against Bellman-Ford; step count equal to the number of distinct distances (accelerated) or the largest distance (naive) |
| `prev_uart_reporter_tb` | receiver model: start, data and stop bits, byte order, report length |
| `dyn_edge_queue_tb` | sorted insertion, merged keys, pop order, overflow, clear, against a reference list |
| `dyn_node_tb` | TIME_OUT, ACT_NODES timing and PREV under random steps and activation patterns |
| `dyn_solver_tb` | 4- and 12-node arrays, and a 6-node array with queue depths 6/2/6/1/6/3, reloaded with random graphs; results against Bellman-Ford, exact step count |
| `apd_top_tb` | the whole top at default parameters, including the serial report decoded at 434 clocks per bit (details below) |
| `random4n_workload_tb` | static solver on a Random4-n-style graph (n = 256, m = 1024, lengths in [0, n], ten random sources); prints the mean step count |
| `random4n_dyn_workload_tb` | reconfigurable solver, n = 64, m = 256, queue depth 16, ten freshly loaded graphs; prints the mean step count |

`apd_top_tb` also counts how often each mechanism occurred, and fails if any
never did:

* time skips;
* zero steps;
* simultaneous arrivals;
* deactivated edges;
* multi-clock PREV searches;
* serial reports;
* merged queue keys;
* stale queue heads;
* reloads;
* overflow.

The Random4-n-style runs need about 0.73·n time steps on average: a mean of 93
at n = 128 and 188 at n = 256. This is in line with the published figure of
about 750 clocks at n = 1024 (0.73·n). Those graphs are of the same kind, but
not the same graphs. The n = 256 testbench takes about three minutes to build
with Verilator.

Not verified:

* timing closure on any device;
* graphs larger than the sizes above;
* behaviour when `cfg_i` and a run overlap. This is not supported: load only
  while idle.

## Simulating

Each testbench is a top-level module. Files are found by module name in `rtl/`
and `tb/`. For example:

```
verilator --binary --timing --assert --top-module apd_top_tb \
    -y rtl -y tb +libext+.sv rtl/apd_pkg.sv tb/apd_top_tb.sv
./obj_dir/Vapd_top_tb
```

To change the static graph, override `EDGE_SRC`/`EDGE_DST` (and `N`, `M`) on
`apd_static_solver`, or `S_*` on `apd_top`. `tb/apd_static_solver_tb.sv` shows
how to compute an edge list at elaboration with a constant function. To change
the reconfigurable array, set `D_N`, `D_DEPTH` and `D_NODE_DEPTH` (or `N`,
`DEPTH` and `NODE_DEPTH` on `dyn_solver`).
