// dyn_edge_queue: the edge store of a reconfigurable node.
//
// Holds the edges leaving one node as a list ordered by weight, smallest
// first, so that it is read as a FIFO from the head and behaves as a min
// priority queue keyed by the weight l(e). Each entry is one weight key and
// the set of destination nodes (a bit per node) reached over edges of that
// weight, so all edges of equal weight share an entry and leave together.
//
// Loading (INIT_CONF): ins_i with (ins_key_i, ins_dst_i) adds one edge per
// clock. If the key is present the destination bit is added to that entry;
// otherwise the entry is inserted at its sorted place and the entries
// behind it shift back by one. Inserting into a full queue sets overflow_o
// (sticky until clear_i) and drops the edge. pop_i removes the head; the new
// head is visible on the next clock. Insertion and pop are not meant to
// overlap; if both are high, pop wins and the insert is dropped.
//
// The weight-ordered FIFO, shared weight keys and the destination bitset
// follow the document; insertion by shifting, the overflow flag and the
// clear input are this design's choices.
module dyn_edge_queue #(
  parameter int unsigned N     = 4,                      // nodes (bitset width)
  parameter int unsigned DEPTH = 4,                      // distinct weights held
  parameter int unsigned W     = apd_pkg::WEIGHT_W_DEF
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            clear_i,
  input  logic                            ins_i,
  input  logic [W-1:0]                    ins_key_i,
  input  logic [apd_pkg::id_width(N)-1:0] ins_dst_i,
  input  logic                            pop_i,
  output logic                            head_valid_o,
  output logic [W-1:0]                    head_key_o,
  output logic [N-1:0]                    head_dst_o,
  output logic                            overflow_o
);

  typedef struct packed {
    logic [W-1:0] key;
    logic [N-1:0] dst;
  } entry_t;

  entry_t       q_q   [DEPTH];
  logic [DEPTH:0] vld_q;          // vld_q[i]: entry i holds data; vld_q[DEPTH] = 0
  logic         ovf_q;

  logic [DEPTH-1:0] match, less;
  logic             any_match;
  logic [N-1:0]     dst_bit;

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      match[i] = vld_q[i] && (q_q[i].key == ins_key_i);
      less[i]  = vld_q[i] && (q_q[i].key <  ins_key_i);
    end
    any_match = |match;
    dst_bit   = N'(1) << ins_dst_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
      ovf_q <= 1'b0;
      for (int i = 0; i < DEPTH; i++) q_q[i] <= '0;
    end else if (clear_i) begin
      vld_q <= '0;
      ovf_q <= 1'b0;
    end else if (pop_i) begin
      for (int i = 0; i < DEPTH - 1; i++) q_q[i] <= q_q[i+1];
      vld_q <= {1'b0, vld_q[DEPTH:1]};
    end else if (ins_i) begin
      if (any_match) begin
        for (int i = 0; i < DEPTH; i++)
          if (match[i]) q_q[i].dst <= q_q[i].dst | dst_bit;
      end else if (vld_q[DEPTH-1]) begin
        ovf_q <= 1'b1;
      end else begin
        // Entries with a smaller key stay; the first entry with a larger key
        // (or the first free slot) takes the new edge; the rest move back.
        for (int i = 0; i < DEPTH; i++) begin
          if (!less[i]) begin
            if (i == 0 || less[i-1]) begin
              q_q[i].key <= ins_key_i;
              q_q[i].dst <= dst_bit;
            end else begin
              q_q[i] <= q_q[i-1];
            end
          end
        end
        vld_q <= {vld_q[DEPTH-1:0], 1'b1};
      end
    end
  end

  assign head_valid_o = vld_q[0];
  assign head_key_o   = q_q[0].key;
  assign head_dst_o   = q_q[0].dst;
  assign overflow_o   = ovf_q;

endmodule
