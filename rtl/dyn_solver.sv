// dyn_solver: dynamically reconfigurable architecture of the accelerated
// propagation-delay shortest-path solver.
//
// N node modules (dyn_node) are fully interconnected: bit y of node x's
// ACT_NODES bus drives bit x of node y's ACTIVATE bus, so any node can reach
// any other and the graph lives only in the nodes' edge queues. Each node
// reports TIME_OUT, the wait of its nearest pending edge; the time-advance
// minimizer (a comparator tree over the N nodes) returns the smallest, and
// this step is broadcast back to all nodes as TIME_IN. Every clock thus
// moves time to the next arrival.
//
// Use: clear_i empties every edge queue. Each cfg_i clock adds the directed
// edge cfg_src_i -> cfg_dst_i of weight cfg_weight_i (INIT_CONF). start_i
// then starts a run from source_i. done_o rises once every node is reached
// (or no reachable edge is left) and every PREV search has ended; prev_o[v]
// then names v's predecessor in a shortest-path tree, for each v with
// reached_o[v] set. A run consumes the queues: reload before the next run.
// overflow_o reports that a node was given more distinct weights than its
// queue holds (NODE_DEPTH[v], by default DEPTH for every node); that node's
// extra edges were dropped.
//
// Full interconnection, the per-node queues, the option of shorter queues
// for some nodes and the n-input minimizer follow the document. Stopping once all nodes are reached, the load and
// start protocol and the step counter are this design's choices.
module dyn_solver #(
  parameter int unsigned N     = 4,                      // nodes (Fig. 5 shows 4)
  parameter int unsigned DEPTH = N,                      // distinct weights per node
  parameter int unsigned W     = apd_pkg::WEIGHT_W_DEF,
  // Queue depth of each node; nodes with few departing edges can be given
  // shorter queues to save resources.
  parameter int unsigned NODE_DEPTH [N] = '{default: DEPTH}
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            clear_i,
  input  logic                            cfg_i,
  input  logic [apd_pkg::id_width(N)-1:0] cfg_src_i,
  input  logic [apd_pkg::id_width(N)-1:0] cfg_dst_i,
  input  logic [W-1:0]                    cfg_weight_i,
  input  logic                            start_i,
  input  logic [apd_pkg::id_width(N)-1:0] source_i,
  output logic                            busy_o,
  output logic                            done_o,
  output logic [N-1:0]                    reached_o,
  output logic [apd_pkg::id_width(N)-1:0] prev_o [N],
  output logic [31:0]                     step_count_o,
  output logic                            overflow_o
);

  localparam int unsigned IDW = apd_pkg::id_width(N);

  logic [N-1:0]   act_nodes [N];     // act_nodes[x][y]: x reaches y
  logic [N-1:0]   activate  [N];     // activate[y][x]:  x reaches y
  logic [W-1:0]   time_out  [N];
  logic [N-1:0]   time_out_valid;
  logic [N-1:0]   active, prev_busy, prev_valid, overflow;
  logic [W-1:0]   step;
  logic           step_valid, advance, all_reached;
  logic           run_q;
  logic [31:0]    steps_q;

  for (genvar y = 0; y < N; y++) begin : g_xbar
    for (genvar x = 0; x < N; x++) begin : g_bit
      assign activate[y][x] = act_nodes[x][y];
    end
  end

  for (genvar v = 0; v < N; v++) begin : g_node
    dyn_node #(.N(N), .DEPTH(NODE_DEPTH[v]), .W(W), .ID(v)) u_node (
      .clk             (clk),
      .rst_n           (rst_n),
      .clear_i         (clear_i),
      .cfg_i           (cfg_i && (cfg_src_i == IDW'(v))),
      .cfg_dst_i       (cfg_dst_i),
      .cfg_weight_i    (cfg_weight_i),
      .start_i         (start_i),
      .is_source_i     (source_i == IDW'(v)),
      .activate_i      (activate[v]),
      .time_in_i       (step),
      .time_in_valid_i (advance),
      .time_out_o      (time_out[v]),
      .time_out_valid_o(time_out_valid[v]),
      .act_nodes_o     (act_nodes[v]),
      .active_o        (active[v]),
      .prev_o          (prev_o[v]),
      .prev_valid_o    (prev_valid[v]),
      .prev_busy_o     (prev_busy[v]),
      .overflow_o      (overflow[v])
    );
  end

  time_advance_minimizer #(.N(N), .W(W)) u_min (
    .val_i      (time_out),
    .valid_i    (time_out_valid),
    .min_o      (step),
    .min_valid_o(step_valid)
  );

  assign all_reached = &active;
  assign advance     = run_q && step_valid && !all_reached;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q   <= 1'b0;
      steps_q <= '0;
    end else if (clear_i) begin
      run_q   <= 1'b0;
      steps_q <= '0;
    end else if (start_i) begin
      run_q   <= 1'b1;
      steps_q <= '0;
    end else if (advance) begin
      steps_q <= steps_q + 1;
    end
  end

  assign done_o       = run_q && !advance && !(|prev_busy);
  assign busy_o       = run_q && !done_o;
  assign reached_o    = active;
  assign step_count_o = steps_q;
  assign overflow_o   = |overflow;

  a_prev_final: assert property (@(posedge clk) disable iff (!rst_n)
                                 done_o |-> ((active & ~prev_valid) == '0));

endmodule
