// random4n_dyn_workload_tb: the reconfigurable solver on Random4-n-style
// graphs: n = 64 nodes, m = 4n = 256 directed edges (a bidirectional ring,
// which keeps every node reachable, plus 2n random arcs), arc lengths in
// [0, n] (odd runs) or [1, n] (even runs), ten runs, each with a freshly
// loaded graph and a random source. Queues hold 16 distinct weights per
// node, well above the out-degree of such graphs, so nothing overflows.
// Results are checked against Bellman-Ford (see apd_dyn_harness), and the
// mean number of time steps is printed.
module random4n_dyn_workload_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  int c, f;
  logic fin;

  apd_dyn_harness #(.N(64), .DEPTH(16), .RUNS(10), .MAXW(64), .EXTRA(128)) h (
    .clk(clk), .checks(c), .failures(f), .finished(fin));

  initial begin
    repeat (2) @(posedge clk);  // the harnesses clear their flags at time 0
    wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c, f + 1);
    $finish;
  end
endmodule
