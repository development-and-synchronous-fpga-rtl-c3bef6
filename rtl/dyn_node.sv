// dyn_node: one node of the dynamically reconfigurable architecture.
//
// The node holds the edges that leave it in a weight-ordered queue
// (dyn_edge_queue), loaded one edge per clock through the INIT_CONF port
// (cfg_i, cfg_dst_i, cfg_weight_i). The node state machine is IDLE until
// the node is reached, ACTIVE while it still has queued edges, and DRAINED
// once all of them have delivered their signal.
//
// Reaching the node: start_i with is_source_i makes it ACTIVE directly;
// otherwise any bit of the ACTIVATE bus (activate_i[x]: node x reaches this
// node now) does. On that clock the local time accumulator is cleared and
// the PREV search (prev_finder) takes a snapshot of activate_i and picks
// one sender, whose index becomes PREV. The source's PREV is itself.
//
// Time keeping: the accumulator adds the global step TIME_IN on every clock
// while the node is ACTIVE. A subtractor gives TIME_OUT = head weight -
// accumulator, the smallest waiting value of the node's edges, which goes
// to the global time-advance minimizer. When TIME_OUT equals the step the
// head's edges reach their targets: the head is popped and its destination
// set is driven on ACT_NODES (act_nodes_o) in that same clock, so the
// targets are ACTIVE from the next clock on.
//
// The queue, accumulator, subtractor, ACT_NODES/ACTIVATE buses and PREV
// search follow the document. Firing on the clock whose step brings
// TIME_OUT to zero (rather than one clock later), the three-state machine,
// and keeping edges whose targets are already reached in the queue (they
// still take part in the minimum) are this design's choices.
module dyn_node #(
  parameter int unsigned N     = 4,                      // nodes in the array
  parameter int unsigned DEPTH = 4,                      // queue entries
  parameter int unsigned W     = apd_pkg::WEIGHT_W_DEF,
  parameter int unsigned ID    = 0
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            clear_i,       // empty the queue
  input  logic                            cfg_i,         // INIT_CONF: add an edge
  input  logic [apd_pkg::id_width(N)-1:0] cfg_dst_i,
  input  logic [W-1:0]                    cfg_weight_i,
  input  logic                            start_i,
  input  logic                            is_source_i,
  input  logic [N-1:0]                    activate_i,    // ACTIVATE bus
  input  logic [W-1:0]                    time_in_i,     // TIME_IN
  input  logic                            time_in_valid_i,
  output logic [W-1:0]                    time_out_o,    // TIME_OUT
  output logic                            time_out_valid_o,
  output logic [N-1:0]                    act_nodes_o,   // ACT_NODES bus
  output logic                            active_o,
  output logic [apd_pkg::id_width(N)-1:0] prev_o,
  output logic                            prev_valid_o,
  output logic                            prev_busy_o,
  output logic                            overflow_o
);

  localparam int unsigned IDW = apd_pkg::id_width(N);

  typedef enum logic [1:0] {S_IDLE, S_ACTIVE, S_DRAINED} state_e;

  state_e       state_q;
  logic [W-1:0] acc_q;
  logic         src_q;
  logic         head_valid;
  logic [W-1:0] head_key;
  logic [N-1:0] head_dst;
  logic         fire, activate, found;
  logic [IDW-1:0] idx;

  assign activate = (state_q == S_IDLE) && !start_i && (|activate_i);

  // Subtractor: remaining wait of the nearest departing edge.
  assign time_out_o       = head_key - acc_q;
  assign time_out_valid_o = (state_q == S_ACTIVE) && head_valid;
  assign fire             = time_out_valid_o && time_in_valid_i && (time_out_o == time_in_i);
  assign act_nodes_o      = fire ? head_dst : '0;

  dyn_edge_queue #(.N(N), .DEPTH(DEPTH), .W(W)) u_queue (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear_i     (clear_i),
    .ins_i       (cfg_i),
    .ins_key_i   (cfg_weight_i),
    .ins_dst_i   (cfg_dst_i),
    .pop_i       (fire),
    .head_valid_o(head_valid),
    .head_key_o  (head_key),
    .head_dst_o  (head_dst),
    .overflow_o  (overflow_o)
  );

  // Node state machine and local time accumulator.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      acc_q   <= '0;
      src_q   <= 1'b0;
    end else if (start_i || clear_i) begin
      state_q <= (start_i && is_source_i) ? S_ACTIVE : S_IDLE;
      src_q   <= start_i && is_source_i;
      acc_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (activate) begin
          state_q <= S_ACTIVE;
          acc_q   <= '0;
        end
        S_ACTIVE: begin
          if (!head_valid) state_q <= S_DRAINED;
          else if (time_in_valid_i) acc_q <= acc_q + time_in_i;
        end
        default: ;
      endcase
    end
  end

  prev_finder #(.N(N)) u_prev (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear_i  (start_i || clear_i),
    .trigger_i(activate),
    .cand_i   (activate_i),
    .busy_o   (prev_busy_o),
    .found_o  (found),
    .index_o  (idx)
  );

  assign active_o     = (state_q != S_IDLE);
  assign prev_o       = src_q ? IDW'(ID) : idx;
  assign prev_valid_o = src_q || found;

endmodule
