// apd_top: accelerated propagation-delay shortest-path processor.
//
// Two solvers for the single-source shortest-path problem with non-negative
// weights stand side by side, each with its own ports:
//  * the static solver (apd_static_solver), built for one graph topology
//    given by parameters, whose result is sent automatically over an RS-232
//    line (prev_uart_reporter) each time a run finishes;
//  * the dynamically reconfigurable solver (dyn_solver), whose graph is
//    loaded at run time into per-node edge queues.
// Both advance time on every clock straight to the next arrival of the
// spreading signal and return a shortest-path tree as a PREV list.
//
// Static side: s_start_i loads s_weight_i and starts from s_source_i;
// s_done_o, s_prev_o, s_reached_o, s_tree_edge_o and s_step_count_o give
// the result; the report starts on the clock after s_done_o rises and
// holds uart_busy_o while it runs (see prev_uart_reporter for the framing).
// Reconfigurable side: see dyn_solver for the d_* ports.
// Default sizes: a 5-node, 12-edge static graph and a 4-node reconfigurable
// array; both are example sizes, the document fixes none for a product.
module apd_top #(
  parameter int unsigned W            = apd_pkg::WEIGHT_W_DEF,
  parameter int unsigned S_N          = 5,
  parameter int unsigned S_M          = 12,
  parameter int unsigned S_EDGE_SRC [S_M] = '{0, 1, 0, 2, 1, 3, 2, 3, 2, 4, 3, 4},
  parameter int unsigned S_EDGE_DST [S_M] = '{1, 0, 2, 0, 3, 1, 3, 2, 4, 2, 4, 3},
  parameter int unsigned CLKS_PER_BIT = 434,
  parameter int unsigned D_N          = 4,
  parameter int unsigned D_DEPTH      = D_N,
  parameter int unsigned D_NODE_DEPTH [D_N] = '{default: D_DEPTH}
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // static solver
  input  logic                              s_start_i,
  input  logic [apd_pkg::id_width(S_N)-1:0] s_source_i,
  input  logic [W-1:0]                      s_weight_i [S_M],
  output logic                              s_busy_o,
  output logic                              s_done_o,
  output logic [S_N-1:0]                    s_reached_o,
  output logic [apd_pkg::id_width(S_N)-1:0] s_prev_o [S_N],
  output logic [S_M-1:0]                    s_tree_edge_o,
  output logic [31:0]                       s_step_count_o,
  output logic                              uart_tx_o,
  output logic                              uart_busy_o,
  // reconfigurable solver
  input  logic                              d_clear_i,
  input  logic                              d_cfg_i,
  input  logic [apd_pkg::id_width(D_N)-1:0] d_cfg_src_i,
  input  logic [apd_pkg::id_width(D_N)-1:0] d_cfg_dst_i,
  input  logic [W-1:0]                      d_cfg_weight_i,
  input  logic                              d_start_i,
  input  logic [apd_pkg::id_width(D_N)-1:0] d_source_i,
  output logic                              d_busy_o,
  output logic                              d_done_o,
  output logic [D_N-1:0]                    d_reached_o,
  output logic [apd_pkg::id_width(D_N)-1:0] d_prev_o [D_N],
  output logic [31:0]                       d_step_count_o,
  output logic                              d_overflow_o
);

  logic s_done_q;

  apd_static_solver #(
    .N(S_N), .M(S_M), .W(W), .EDGE_SRC(S_EDGE_SRC), .EDGE_DST(S_EDGE_DST)
  ) u_static (
    .clk         (clk),
    .rst_n       (rst_n),
    .start_i     (s_start_i),
    .source_i    (s_source_i),
    .weight_i    (s_weight_i),
    .busy_o      (s_busy_o),
    .done_o      (s_done_o),
    .reached_o   (s_reached_o),
    .tree_edge_o (s_tree_edge_o),
    .prev_o      (s_prev_o),
    .step_count_o(s_step_count_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_done_q <= 1'b0;
    else        s_done_q <= s_done_o;
  end

  prev_uart_reporter #(
    .N(S_N), .IDW(apd_pkg::id_width(S_N)), .CLKS_PER_BIT(CLKS_PER_BIT)
  ) u_report (
    .clk   (clk),
    .rst_n (rst_n),
    .send_i(s_done_o && !s_done_q),
    .prev_i(s_prev_o),
    .tx_o  (uart_tx_o),
    .busy_o(uart_busy_o)
  );

  dyn_solver #(.N(D_N), .DEPTH(D_DEPTH), .W(W), .NODE_DEPTH(D_NODE_DEPTH)) u_dyn (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear_i     (d_clear_i),
    .cfg_i       (d_cfg_i),
    .cfg_src_i   (d_cfg_src_i),
    .cfg_dst_i   (d_cfg_dst_i),
    .cfg_weight_i(d_cfg_weight_i),
    .start_i     (d_start_i),
    .source_i    (d_source_i),
    .busy_o      (d_busy_o),
    .done_o      (d_done_o),
    .reached_o   (d_reached_o),
    .prev_o      (d_prev_o),
    .step_count_o(d_step_count_o),
    .overflow_o  (d_overflow_o)
  );

endmodule
