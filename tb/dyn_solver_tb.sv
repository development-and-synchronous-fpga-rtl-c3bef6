// dyn_solver_tb: end-to-end test of the reconfigurable solver: the
// default 4-node array, a 12-node array and a 6-node array whose nodes
// have queues of different depths, each reloaded with a new random graph
// for every run.
module dyn_solver_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  int c0, f0, c1, f1, c2, f2;
  logic fin0, fin1, fin2;

  apd_dyn_harness #(.N(4), .RUNS(40), .MAXW(9), .EXTRA(4)) h_small (
    .clk(clk), .checks(c0), .failures(f0), .finished(fin0));

  apd_dyn_harness #(.N(12), .RUNS(30), .MAXW(40), .EXTRA(30)) h_big (
    .clk(clk), .checks(c1), .failures(f1), .finished(fin1));

  localparam int unsigned MIXED_DEPTH [6] = '{6, 2, 6, 1, 6, 3};

  // queues of different depths per node (two nodes hold only 1 and 2 weights)
  apd_dyn_harness #(.N(6), .DEPTH(6), .RUNS(30), .MAXW(12), .EXTRA(12),
                    .NODE_DEPTH(MIXED_DEPTH)) h_mixed (
    .clk(clk), .checks(c2), .failures(f2), .finished(fin2));

  initial begin
    repeat (2) @(posedge clk);  // the harnesses clear their flags at time 0
    wait (fin0 && fin1 && fin2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
