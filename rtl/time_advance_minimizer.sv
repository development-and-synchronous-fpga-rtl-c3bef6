// time_advance_minimizer: the "time-advance minimizer" of the solver.
//
// A purely combinational binary comparator tree that returns the smallest
// value among the inputs whose valid bit is set, together with a valid flag
// that is low when no input is valid. In the solvers the inputs are the
// waiting values w(e) of the edges that are still counting down (static
// architecture) or the TIME_OUT values of the nodes (reconfigurable
// architecture), and the output is the accelerated time step that every
// counting element subtracts on the next clock.
//
// The tree has ceil(log2(N)) levels of two-input compare-select cells and
// O(N) cells in all, as the document describes; the unused leaves of a
// non-power-of-two N are tied invalid. Ties choose the left input; the index
// of the winner is not needed and not produced. No clock, no latency.
module time_advance_minimizer #(
  parameter int unsigned N = 8,                         // inputs (Fig. 4 shows 8)
  parameter int unsigned W = apd_pkg::WEIGHT_W_DEF      // value width
) (
  input  logic [W-1:0] val_i [N],
  input  logic [N-1:0] valid_i,
  output logic [W-1:0] min_o,
  output logic         min_valid_o
);

  localparam int unsigned LG = (N <= 1) ? 0 : $clog2(N);

  for (genvar l = 0; l <= LG; l++) begin : g_lvl
    logic [W-1:0]        v  [2**l];
    logic [(2**l)-1:0]   ok;
    for (genvar i = 0; i < 2**l; i++) begin : g_cell
      if (l == LG) begin : g_leaf
        if (i < N) begin : g_in
          assign v[i]  = val_i[i];
          assign ok[i] = valid_i[i];
        end else begin : g_pad
          assign v[i]  = '0;
          assign ok[i] = 1'b0;
        end
      end else begin : g_cmp
        logic take_left;
        assign take_left = g_lvl[l+1].ok[2*i] &&
                           (!g_lvl[l+1].ok[2*i+1] || g_lvl[l+1].v[2*i] <= g_lvl[l+1].v[2*i+1]);
        assign v[i]  = take_left ? g_lvl[l+1].v[2*i] : g_lvl[l+1].v[2*i+1];
        assign ok[i] = g_lvl[l+1].ok[2*i] | g_lvl[l+1].ok[2*i+1];
      end
    end
  end

  assign min_o       = g_lvl[0].v[0];
  assign min_valid_o = g_lvl[0].ok[0];

endmodule
