// apd_edge: one directed edge of the static architecture.
//
// The edge holds the waiting function w(e), the distance the signal still
// has to travel along it. load_i copies the weight l(e) into w(e) and clears
// the arrival flag. The edge is counting while its origin node is active and
// its target node is not (ORIGIN_ACTIVE && !TARGET_ACTIVE); only then does it
// offer w(e) to the time-advance minimizer and subtract the current step
// dec_i on each clock. An edge whose target is reached through another edge
// stops counting and is never heard from again.
//
// Timing: the edge whose w(e) equals the step fires in that same clock
// (fire_o, combinational), so that w(e) and the target's ACTIVE register are
// both updated on one clock edge: one activation event per clock. The
// document describes the arrival as w(e) reaching 0; firing on the clock
// that brings it to 0 is this design's way to keep the next step from
// skipping the newly activated node. Edges of weight 0 take part in the
// minimum too, so a step of 0 delivers them without advancing time.
// arrived_o remembers that this edge delivered the signal; src_id_o is the
// identifier of the origin node that the edge carries to its target.
module apd_edge #(
  parameter int unsigned W      = apd_pkg::WEIGHT_W_DEF,
  parameter int unsigned IDW    = 3,
  parameter int unsigned SRC_ID = 0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load_i,          // start of a run: w <= weight_i
  input  logic [W-1:0]   weight_i,        // l(e)
  input  logic           origin_active_i, // ORIGIN_ACTIVE
  input  logic           target_active_i, // TARGET_ACTIVE
  input  logic [W-1:0]   dec_i,           // accelerated time step
  input  logic           dec_valid_i,
  output logic           counting_o,      // offers w to the minimizer
  output logic [W-1:0]   w_o,
  output logic           fire_o,          // signal reaches the target now
  output logic           arrived_o,       // this edge delivered the signal
  output logic [IDW-1:0] src_id_o
);

  logic [W-1:0] w_q;
  logic         arrived_q;

  assign counting_o = origin_active_i && !target_active_i;
  assign fire_o     = counting_o && dec_valid_i && (w_q == dec_i);
  assign w_o        = w_q;
  assign arrived_o  = arrived_q;
  assign src_id_o   = IDW'(SRC_ID);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q       <= '0;
      arrived_q <= 1'b0;
    end else if (load_i) begin
      w_q       <= weight_i;
      arrived_q <= 1'b0;
    end else if (counting_o && dec_valid_i) begin
      w_q <= w_q - dec_i;
      if (fire_o) arrived_q <= 1'b1;
    end
  end

endmodule
