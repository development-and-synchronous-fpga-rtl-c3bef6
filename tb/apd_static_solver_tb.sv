// apd_static_solver_tb: end-to-end test of the static solver on two
// graphs: the default 5-node example graph (including the worked example
// that needs 3 time steps, and 6 with the naive algorithm) and a 16-node graph of 48 directed edges (a
// bidirectional ring plus 16 pseudo-random chords, generated at
// elaboration by a linear congruential generator). Both graphs are run
// with the accelerated and with the naive algorithm.
module apd_static_solver_tb;
  localparam int unsigned BN = 16, BM = 48;
  typedef int unsigned arr_t [BM];

  // Edges 0..31: ring i <-> i+1; edges 32..47: chords from an LCG.
  function automatic arr_t gen_edges(input bit want_dst);
    arr_t a;
    int unsigned x = 12345;
    for (int unsigned i = 0; i < BN; i++) begin
      a[2*i]   = want_dst ? (i + 1) % BN : i;
      a[2*i+1] = want_dst ? i : (i + 1) % BN;
    end
    for (int unsigned k = 2 * BN; k < BM; k++) begin
      int unsigned s, d;
      x = x * 1103515245 + 12345; s = (x >> 16) % BN;
      x = x * 1103515245 + 12345; d = (x >> 16) % BN;
      if (d == s) d = (s + 3) % BN;
      a[k] = want_dst ? d : s;
    end
    return a;
  endfunction

  localparam arr_t BSRC = gen_edges(1'b0);
  localparam arr_t BDST = gen_edges(1'b1);

  logic clk = 0;
  always #5 clk = ~clk;

  int c0, f0, c1, f1, c2, f2, c3, f3;
  logic fin0, fin1, fin2, fin3;

  apd_static_harness #(.RUNS(30), .MAXW(9), .EXAMPLE(1'b1)) h_small (
    .clk(clk), .checks(c0), .failures(f0), .finished(fin0));

  apd_static_harness #(.N(BN), .M(BM), .EDGE_SRC(BSRC), .EDGE_DST(BDST), .RUNS(30), .MAXW(50)) h_big (
    .clk(clk), .checks(c1), .failures(f1), .finished(fin1));

  apd_static_harness #(.RUNS(30), .MAXW(9), .EXAMPLE(1'b1), .ACCEL(1'b0)) h_small_naive (
    .clk(clk), .checks(c2), .failures(f2), .finished(fin2));

  apd_static_harness #(.N(BN), .M(BM), .EDGE_SRC(BSRC), .EDGE_DST(BDST), .RUNS(30), .MAXW(50),
                       .ACCEL(1'b0)) h_big_naive (
    .clk(clk), .checks(c3), .failures(f3), .finished(fin3));

  initial begin
    repeat (2) @(posedge clk);  // the harnesses clear their flags at time 0
    wait (fin0 && fin1 && fin2 && fin3);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end
endmodule
