// prev_finder: the small PREV-search state machine inside every node.
//
// When a node is activated, several incoming signals may have arrived in the
// same clock; any one of them gives a valid shortest-path tree, but only one
// is recorded. On the clock edge where trigger_i is high the module takes a
// snapshot of the candidate vector cand_i (bit k set = candidate k delivered
// the activating signal) and then inspects one candidate per clock, starting
// at index 0, until it meets a set bit. It then reports that index on
// index_o with found_o high, and returns to idle. A search therefore takes
// between 1 and N clocks after the trigger, runs alongside the rest of the
// solver and never holds up the time advance, as the document requires.
//
// The sequential one-per-clock scan follows the document; the snapshot and
// the scan order (lowest index first) are this design's choices. clear_i
// returns the machine to idle and drops found_o. An empty snapshot makes
// the scan end with found_o low after N clocks.
module prev_finder #(
  parameter int unsigned N = 4                  // number of candidates
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear_i,
  input  logic                         trigger_i,
  input  logic [N-1:0]                 cand_i,
  output logic                         busy_o,
  output logic                         found_o,
  output logic [apd_pkg::id_width(N)-1:0] index_o
);

  localparam int unsigned IW = apd_pkg::id_width(N);

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_DONE} state_e;

  state_e         state_q;
  logic [N-1:0]   mask_q;
  logic [IW-1:0]  idx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      mask_q  <= '0;
      idx_q   <= '0;
    end else if (clear_i) begin
      state_q <= S_IDLE;
      mask_q  <= '0;
      idx_q   <= '0;
    end else if (trigger_i) begin
      state_q <= S_SCAN;
      mask_q  <= cand_i;
      idx_q   <= '0;
    end else if (state_q == S_SCAN) begin
      if (mask_q[idx_q]) begin
        state_q <= S_DONE;
      end else if (32'(idx_q) == N - 1) begin
        state_q <= S_IDLE;               // nothing found
      end else begin
        idx_q <= idx_q + 1'b1;
      end
    end
  end

  assign busy_o  = (state_q == S_SCAN);
  assign found_o = (state_q == S_DONE);
  assign index_o = idx_q;

endmodule
