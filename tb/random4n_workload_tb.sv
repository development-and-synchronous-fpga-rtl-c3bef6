// random4n_workload_tb: the static solver on a graph of the Random4-n kind
// used to benchmark the method: n = 1024 nodes, m = 4n = 4096 directed
// edges (a Hamiltonian cycle 0 -> 1 -> ... -> n-1 -> 0, which keeps every
// node reachable, plus 3n pseudo-random arcs from a linear congruential
// generator), arc lengths drawn from [0, n] (odd runs) or [1, n] (even
// runs). Ten runs from random sources; every result is checked against a
// Bellman-Ford reference (see apd_static_harness) and the mean number of
// time steps is printed. For comparison, the published figure for n = 1024
// is about 750 clocks on average over ten sources, on graphs of the same
// kind but not the same graphs.
module random4n_workload_tb;
  localparam int unsigned RN = 256, RM = 4 * RN;
  typedef int unsigned arr_t [RM];

  function automatic arr_t gen_edges(input bit want_dst);
    arr_t a;
    int unsigned x = 2024;
    for (int unsigned i = 0; i < RN; i++) a[i] = want_dst ? (i + 1) % RN : i;
    for (int unsigned k = RN; k < RM; k++) begin
      int unsigned s, d;
      x = x * 1103515245 + 12345; s = (x >> 12) % RN;
      x = x * 1103515245 + 12345; d = (x >> 12) % RN;
      if (d == s) d = (s + 1) % RN;
      a[k] = want_dst ? d : s;
    end
    return a;
  endfunction

  localparam arr_t RSRC = gen_edges(1'b0);
  localparam arr_t RDST = gen_edges(1'b1);

  logic clk = 0;
  always #5 clk = ~clk;

  int c, f;
  logic fin;

  apd_static_harness #(.N(RN), .M(RM), .EDGE_SRC(RSRC), .EDGE_DST(RDST), .RUNS(10), .MAXW(RN)) h (
    .clk(clk), .checks(c), .failures(f), .finished(fin));

  initial begin
    repeat (2) @(posedge clk);  // the harnesses clear their flags at time 0
    wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c, f + 1);
    $finish;
  end
endmodule
