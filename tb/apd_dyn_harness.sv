// apd_dyn_harness: drives one dyn_solver instance through RUNS runs. Each
// run clears the array, loads a random graph through the configuration
// port (a bidirectional ring, so every node is reachable, plus random
// extra edges, never more distinct weights per node than its queue depth
// NODE_DEPTH), starts
// from a random source and checks the result against a Bellman-Ford
// reference computed here:
//  * every node is reached and the source's PREV is itself;
//  * for every other node v there is an edge PREV(v) -> v with
//    dist(PREV) + l(e) = dist(v);
//  * with all weights at least 1, the number of time steps equals the
//    number of distinct times dist(u) + l at which some queue entry of a
//    node u comes due, up to the time the last node is reached (entries
//    whose targets are already reached still cost a step).
module apd_dyn_harness #(
  parameter int unsigned N     = 4,
  parameter int unsigned DEPTH = N,
  parameter int unsigned RUNS  = 20,
  parameter int unsigned MAXW  = 20,
  parameter int unsigned EXTRA = 4,
  parameter int unsigned NODE_DEPTH [N] = '{default: DEPTH}
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int IDW = apd_pkg::id_width(N);
  localparam int W   = 16;
  localparam int INF = 32'h7fff_ffff;

  logic rst_n = 0, clear = 0, cfg = 0, start = 0;
  logic [IDW-1:0] csrc = '0, cdst = '0, source = '0;
  logic [W-1:0] cw = '0;
  logic busy, done, ovf;
  logic [N-1:0] reached;
  logic [IDW-1:0] prev [N];
  logic [31:0] steps;

  dyn_solver #(.N(N), .DEPTH(DEPTH), .W(W), .NODE_DEPTH(NODE_DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .clear_i(clear), .cfg_i(cfg), .cfg_src_i(csrc), .cfg_dst_i(cdst),
    .cfg_weight_i(cw), .start_i(start), .source_i(source), .busy_o(busy), .done_o(done),
    .reached_o(reached), .prev_o(prev), .step_count_o(steps), .overflow_o(ovf));

  int es [$], ed [$], ew [$];
  int dref [N];
  longint step_sum = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL (dyn N=%0d): %s", N, msg);
  endtask

  function automatic int keys_of(input int u, input int k);   // is k a key of u
    foreach (es[i]) if (es[i] == u && ew[i] == k) return 1;
    return 0;
  endfunction

  function automatic int nkeys(input int u);
    int seen [int];
    foreach (es[i]) if (es[i] == u) seen[ew[i]] = 1;
    return seen.num();
  endfunction

  task automatic add_edge(input int s, input int d, input int w);
    if (keys_of(s, w) == 0 && nkeys(s) >= int'(NODE_DEPTH[s])) return;
    es.push_back(s); ed.push_back(d); ew.push_back(w);
    @(negedge clk);
    cfg = 1; csrc = IDW'(s); cdst = IDW'(d); cw = W'(w);
    @(negedge clk); cfg = 0;
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < int'(RUNS); r++) begin
      bit no_zero, changed, ok;
      int src, cyc, dmax;
      int due [int];
      no_zero = (r % 2 == 0);
      es.delete(); ed.delete(); ew.delete();
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int i = 0; i < int'(N); i++) begin
        add_edge(i, (i + 1) % N, $urandom_range(no_zero ? 1 : 0, MAXW));
        add_edge((i + 1) % N, i, $urandom_range(no_zero ? 1 : 0, MAXW));
      end
      repeat (EXTRA) begin
        int s, d;
        s = $urandom_range(0, N - 1); d = $urandom_range(0, N - 1);
        if (s != d) add_edge(s, d, $urandom_range(no_zero ? 1 : 0, MAXW));
      end
      src = $urandom_range(0, N - 1);
      for (int v = 0; v < int'(N); v++) dref[v] = INF;
      dref[src] = 0;
      do begin
        changed = 0;
        foreach (es[e])
          if (dref[es[e]] != INF && dref[es[e]] + ew[e] < dref[ed[e]]) begin
            dref[ed[e]] = dref[es[e]] + ew[e]; changed = 1;
          end
      end while (changed);
      @(negedge clk); source = IDW'(src); start = 1;
      @(negedge clk); start = 0;
      cyc = 0;
      while (!done && cyc < 8 * N * N + 100) begin @(negedge clk); cyc++; end
      step_sum += longint'(steps);
      checks++;
      if (!done) begin fail("no done"); continue; end
      checks++;
      if (ovf) fail("unexpected overflow");
      dmax = 0;
      for (int v = 0; v < int'(N); v++) begin
        checks++;
        if (!reached[v]) fail($sformatf("node %0d not reached", v));
        if (dref[v] > dmax) dmax = dref[v];
        checks++;
        if (v == src) begin
          if (int'(prev[v]) != src) fail("source prev");
        end else begin
          ok = 0;
          foreach (es[e])
            if (ed[e] == v && es[e] == int'(prev[v]) && dref[es[e]] + ew[e] == dref[v]) ok = 1;
          if (!ok) fail($sformatf("prev[%0d]=%0d not on a shortest path", v, prev[v]));
        end
      end
      if (no_zero) begin
        due.delete();
        foreach (es[e]) if (dref[es[e]] + ew[e] <= dmax) due[dref[es[e]] + ew[e]] = 1;
        checks++;
        if (int'(steps) != due.num()) fail($sformatf("steps %0d expected %0d", steps, due.num()));
      end
    end
    $display("reconfigurable solver N=%0d: %0d runs, %0d time steps in all, mean %0d",
             N, RUNS, step_sum, step_sum / RUNS);
    finished = 1;
  end
endmodule
