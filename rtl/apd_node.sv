// apd_node: one node of the static architecture.
//
// The node keeps its ACTIVE register and its PREV register. load_i starts a
// run: ACTIVE is cleared, or set if this node is the source (is_source_i).
// Afterwards ACTIVE is set on the clock edge where any incoming edge fires
// (in_fire_i). On that same edge the PREV state machine (prev_finder) takes
// a snapshot of the firing edges and scans them one per clock; PREV then
// takes the origin identifier carried by the chosen edge (in_src_id_i). The
// source node's PREV is its own identifier. prev_valid_o is high once PREV
// holds its final value; prev_busy_o while the search is still running.
//
// ACTIVE and PREV as registers, the edge identifiers carried on the edge
// bus, and the sequential search follow the document. Reading the
// identifier from the edges, scan order and the source's own PREV value are
// this design's choices.
module apd_node #(
  parameter int unsigned IN_DEG = 2,           // incoming edges (at least 1)
  parameter int unsigned IDW    = 3,
  parameter int unsigned ID     = 0            // this node's identifier
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load_i,
  input  logic           is_source_i,
  input  logic [IN_DEG-1:0] in_fire_i,
  input  logic [IDW-1:0] in_src_id_i [IN_DEG],
  output logic           active_o,
  output logic [IDW-1:0] prev_o,
  output logic           prev_valid_o,
  output logic           prev_busy_o
);

  logic active_q, src_q;
  logic found;
  logic [apd_pkg::id_width(IN_DEG)-1:0] idx;

  wire activate = !active_q && (|in_fire_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      src_q    <= 1'b0;
    end else if (load_i) begin
      active_q <= is_source_i;
      src_q    <= is_source_i;
    end else if (activate) begin
      active_q <= 1'b1;
    end
  end

  prev_finder #(.N(IN_DEG)) u_prev (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear_i  (load_i),
    .trigger_i(activate && !load_i),
    .cand_i   (in_fire_i),
    .busy_o   (prev_busy_o),
    .found_o  (found),
    .index_o  (idx)
  );

  assign active_o     = active_q;
  assign prev_o       = src_q ? IDW'(ID) : in_src_id_i[idx];
  assign prev_valid_o = src_q || found;

endmodule
