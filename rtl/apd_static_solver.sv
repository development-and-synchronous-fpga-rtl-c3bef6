// apd_static_solver: static architecture of the accelerated propagation-
// delay shortest-path solver.
//
// The hardware is isomorphic to one graph: a node module (apd_node) per
// vertex and an edge module (apd_edge) per directed edge, wired as given by
// the parameter arrays EDGE_SRC/EDGE_DST. An undirected edge is a pair of
// directed edges. A comparator tree (time_advance_minimizer) looks at the
// waiting values w(e) of every counting edge and returns the smallest; every
// counting edge subtracts it on the next clock, so each clock jumps straight
// to the next arrival and at least one new node is reached per clock. The
// run therefore takes at most n-1 step clocks, fewer when several nodes are
// reached at the same time.
//
// Interface: start_i (one clock) loads the weights weight_i[] into the edges
// and makes node source_i active. The solver then advances one arrival per
// clock. done_o rises when no edge is counting any more and every PREV
// search has ended; prev_o[v] is then the predecessor of v in a shortest-
// path tree (the source points to itself) for every node with reached_o[v]
// set. tree_edge_o[e] marks the edges that delivered the signal to their
// target (a superset of the chosen PREV edges when several arrive at once).
// step_count_o counts the clocks in which time advanced.
//
// ACCEL selects the algorithm. With ACCEL = 1 (the default) it is the
// accelerated algorithm above. With ACCEL = 0 it is the document's naive
// algorithm: every counting edge is decremented by 1 per clock, so a run
// takes as many clocks as the largest distance, as in the document's
// 6-tick walk through the example. In this design the naive step is 0
// instead of 1 while a zero-weight edge is waiting, so zero weights work in
// both modes.
//
// The default graph is a 5-node undirected example in the spirit of the
// document's worked example; its topology and weights are this design's own,
// as are the start/done handshake and the step counter.
module apd_static_solver #(
  parameter int unsigned N = 5,                        // nodes
  parameter int unsigned M = 12,                       // directed edges
  parameter int unsigned W = apd_pkg::WEIGHT_W_DEF,    // weight width
  parameter bit          ACCEL = 1'b1,                 // 1: accelerated, 0: naive
  parameter int unsigned EDGE_SRC [M] = '{0, 1, 0, 2, 1, 3, 2, 3, 2, 4, 3, 4},
  parameter int unsigned EDGE_DST [M] = '{1, 0, 2, 0, 3, 1, 3, 2, 4, 2, 4, 3}
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start_i,
  input  logic [apd_pkg::id_width(N)-1:0] source_i,
  input  logic [W-1:0]                    weight_i [M],
  output logic                            busy_o,
  output logic                            done_o,
  output logic [N-1:0]                    reached_o,
  output logic [M-1:0]                    tree_edge_o,   // edges that delivered the signal
  output logic [apd_pkg::id_width(N)-1:0] prev_o [N],
  output logic [31:0]                     step_count_o
);

  localparam int unsigned IDW = apd_pkg::id_width(N);

  // Number of edges entering node v.
  function automatic int unsigned in_deg(input int unsigned v);
    int unsigned c = 0;
    for (int unsigned e = 0; e < M; e++) if (EDGE_DST[e] == v) c++;
    return c;
  endfunction

  // Index of the k-th edge entering node v.
  function automatic int unsigned in_edge(input int unsigned v, input int unsigned k);
    int unsigned c = 0;
    for (int unsigned e = 0; e < M; e++) begin
      if (EDGE_DST[e] == v) begin
        if (c == k) return e;
        c++;
      end
    end
    return 0;
  endfunction

  logic [N-1:0]   active;
  logic [N-1:0]   prev_busy, prev_valid;
  logic [M-1:0]   counting, fire, arrived;
  logic [W-1:0]   w [M];
  logic [IDW-1:0] src_id [M];
  logic [W-1:0]   min_w, step;
  logic           step_valid;
  logic           run_q;
  logic [31:0]    steps_q;

  // ---------------- edges
  for (genvar e = 0; e < M; e++) begin : g_edge
    apd_edge #(.W(W), .IDW(IDW), .SRC_ID(EDGE_SRC[e])) u_edge (
      .clk            (clk),
      .rst_n          (rst_n),
      .load_i         (start_i),
      .weight_i       (weight_i[e]),
      .origin_active_i(active[EDGE_SRC[e]]),
      .target_active_i(active[EDGE_DST[e]]),
      .dec_i          (step),
      .dec_valid_i    (step_valid),
      .counting_o     (counting[e]),
      .w_o            (w[e]),
      .fire_o         (fire[e]),
      .arrived_o      (arrived[e]),
      .src_id_o       (src_id[e])
    );
  end

  // ---------------- nodes
  for (genvar v = 0; v < N; v++) begin : g_node
    localparam int unsigned DEG  = in_deg(v);
    localparam int unsigned PDEG = (DEG == 0) ? 1 : DEG;
    logic [PDEG-1:0] in_fire;
    logic [IDW-1:0]  in_id [PDEG];
    for (genvar k = 0; k < PDEG; k++) begin : g_in
      if (DEG == 0) begin : g_none
        assign in_fire[k] = 1'b0;
        assign in_id[k]   = '0;
      end else begin : g_wire
        assign in_fire[k] = fire[in_edge(v, k)];
        assign in_id[k]   = src_id[in_edge(v, k)];
      end
    end
    apd_node #(.IN_DEG(PDEG), .IDW(IDW), .ID(v)) u_node (
      .clk         (clk),
      .rst_n       (rst_n),
      .load_i      (start_i),
      .is_source_i (source_i == IDW'(v)),
      .in_fire_i   (in_fire),
      .in_src_id_i (in_id),
      .active_o    (active[v]),
      .prev_o      (prev_o[v]),
      .prev_valid_o(prev_valid[v]),
      .prev_busy_o (prev_busy[v])
    );
  end

  // ---------------- time-advance minimizer over all counting edges
  time_advance_minimizer #(.N(M), .W(W)) u_min (
    .val_i      (w),
    .valid_i    (counting),
    .min_o      (min_w),
    .min_valid_o(step_valid)
  );

  // Naive mode: advance by one tick, or by none while a zero weight waits.
  assign step = ACCEL ? min_w : ((min_w == '0) ? '0 : W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q   <= 1'b0;
      steps_q <= '0;
    end else if (start_i) begin
      run_q   <= 1'b1;
      steps_q <= '0;
    end else if (run_q && step_valid) begin
      steps_q <= steps_q + 1;
    end
  end

  assign done_o       = run_q && !step_valid && !(|prev_busy);
  assign busy_o       = run_q && !done_o;
  assign reached_o    = active;
  assign tree_edge_o  = arrived;
  assign step_count_o = steps_q;

  // Every reached node has a final PREV once the run is over.
  a_prev_final: assert property (@(posedge clk) disable iff (!rst_n)
                                 done_o |-> ((active & ~prev_valid) == '0));

endmodule
