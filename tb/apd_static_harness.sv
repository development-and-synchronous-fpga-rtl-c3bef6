// apd_static_harness: drives one apd_static_solver instance through RUNS
// runs on random weights and random sources and checks every result
// against a Bellman-Ford reference computed here:
//  * reached_o[v] is set exactly for the nodes reachable from the source;
//  * prev_o of the source is itself, and for every other reached node v
//    there is an edge prev_o[v] -> v with dref(prev) + l(e) = dref(v);
//  * the run takes at most (reached nodes - 1) time steps, and, when all
//    weights are at least 1, exactly as many steps as there are distinct
//    distances among the reached nodes other than the source.
// With ACCEL cleared the solver runs the naive algorithm instead; the step
// bound is then (largest distance + reached nodes - 1), and, when all
// weights are at least 1, the run takes exactly the largest distance.
// With EXAMPLE set, run 0 uses the fixed example weights of the default
// 5-node graph from node 0 and expects 3 steps (6 with the naive algorithm).
module apd_static_harness #(
  parameter int unsigned N = 5,
  parameter int unsigned M = 12,
  parameter int unsigned EDGE_SRC [M] = '{0, 1, 0, 2, 1, 3, 2, 3, 2, 4, 3, 4},
  parameter int unsigned EDGE_DST [M] = '{1, 0, 2, 0, 3, 1, 3, 2, 4, 2, 4, 3},
  parameter int unsigned RUNS    = 20,
  parameter int unsigned MAXW    = 20,
  parameter bit          EXAMPLE = 1'b0,
  parameter bit          ACCEL   = 1'b1
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int IDW = apd_pkg::id_width(N);
  localparam int W   = 16;
  localparam int INF = 32'h7fff_ffff;

  logic rst_n = 0, start = 0, busy, done;
  logic [IDW-1:0] source = '0;
  logic [W-1:0] wt [M];
  logic [N-1:0] reached;
  logic [M-1:0] tree;
  logic [IDW-1:0] prev [N];
  logic [31:0] steps;

  apd_static_solver #(.N(N), .M(M), .W(W), .EDGE_SRC(EDGE_SRC), .EDGE_DST(EDGE_DST), .ACCEL(ACCEL)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .source_i(source), .weight_i(wt),
    .busy_o(busy), .done_o(done), .reached_o(reached), .tree_edge_o(tree),
    .prev_o(prev), .step_count_o(steps));

  int dref [N];
  longint step_sum = 0;
  localparam int EX_W [12] = '{2, 2, 3, 3, 4, 4, 3, 3, 3, 3, 1, 1};

  task automatic fail(string msg);
    failures++;
    $display("FAIL (N=%0d run): %s", N, msg);
  endtask

  task automatic reference(input int src);
    bit changed;
    for (int v = 0; v < N; v++) dref[v] = INF;
    dref[src] = 0;
    do begin
      changed = 0;
      for (int e = 0; e < M; e++)
        if (dref[EDGE_SRC[e]] != INF && dref[EDGE_SRC[e]] + int'(wt[e]) < dref[EDGE_DST[e]]) begin
          dref[EDGE_DST[e]] = dref[EDGE_SRC[e]] + int'(wt[e]);
          changed = 1;
        end
    end while (changed);
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    for (int e = 0; e < M; e++) wt[e] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < int'(RUNS); r++) begin
      bit no_zero, ok;
      int src, cyc, nreach, ndist, dmax, exp_steps;
      int seen [int];
      if (r > 0) step_sum += longint'(steps);
      seen.delete();
      no_zero = (r % 2 == 0);
      if (EXAMPLE && r == 0) begin
        for (int e = 0; e < M; e++) wt[e] = W'(EX_W[e % 12]);
        src = 0;
      end else begin
        for (int e = 0; e < M; e++) wt[e] = W'($urandom_range(no_zero ? 1 : 0, MAXW));
        src = $urandom_range(0, N - 1);
      end
      reference(src);
      @(negedge clk); source = IDW'(src); start = 1;
      @(negedge clk); start = 0;
      cyc = 0;
      while (!done && cyc < 4 * N * M + 100) begin @(negedge clk); cyc++; end
      checks++;
      if (!done) begin fail("no done"); continue; end
      nreach = 0;
      dmax = 0;
      for (int v = 0; v < N; v++) begin
        checks++;
        if (reached[v] != (dref[v] != INF)) fail($sformatf("reached[%0d]=%b dref %0d", v, reached[v], dref[v]));
        if (dref[v] == INF) continue;
        nreach++;
        if (dref[v] > dmax) dmax = dref[v];
        if (v != src) seen[dref[v]] = 1;
        checks++;
        if (v == src) begin
          if (int'(prev[v]) != src) fail("source prev");
        end else begin
          ok = 0;
          for (int e = 0; e < M; e++)
            if (EDGE_DST[e] == v && EDGE_SRC[e] == prev[v] &&
                dref[EDGE_SRC[e]] != INF && dref[EDGE_SRC[e]] + int'(wt[e]) == dref[v]) ok = 1;
          if (!ok) fail($sformatf("prev[%0d]=%0d not on a shortest path (dref %0d)", v, prev[v], dref[v]));
        end
      end
      ndist = seen.num();
      exp_steps = ACCEL ? ndist : dmax;
      checks++;
      if (ACCEL && int'(steps) > nreach - 1) fail($sformatf("steps %0d > reached-1 %0d", steps, nreach - 1));
      if (!ACCEL && int'(steps) > dmax + nreach - 1)
        fail($sformatf("steps %0d > largest distance %0d + reached-1 %0d", steps, dmax, nreach - 1));
      if (no_zero) begin
        checks++;
        if (int'(steps) != exp_steps) fail($sformatf("steps %0d expected %0d", steps, exp_steps));
      end
      if (EXAMPLE && r == 0) begin
        checks++;
        if (int'(steps) != (ACCEL ? 3 : 6) || int'(prev[3]) != 1 || int'(prev[4]) != 2)
          fail($sformatf("example: steps %0d prev D %0d prev E %0d", steps, prev[3], prev[4]));
      end
    end
    step_sum += longint'(steps);
    $display("static solver (%0s) N=%0d M=%0d: %0d runs, %0d time steps in all, mean %0d",
             ACCEL ? "accelerated" : "naive", N, M, RUNS, step_sum, step_sum / RUNS);
    finished = 1;
  end
endmodule
