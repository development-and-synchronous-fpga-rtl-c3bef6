// apd_pkg: constants and helpers shared by the accelerated propagation-delay
// shortest-path solvers.
//
// The solvers find a single-source shortest-path tree (SPT) by letting a
// "signal" spread from the source node along the edges, each edge delaying it
// by its weight, and jumping time forward on every clock to the next arrival.
// The weight width is this design's choice; the document does not give one.
package apd_pkg;

  // Default width of an edge weight / waiting value w(e).
  localparam int unsigned WEIGHT_W_DEF = 16;

  // Width of a node identifier for a graph of n nodes (at least 1 bit).
  function automatic int unsigned id_width(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
