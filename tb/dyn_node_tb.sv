// dyn_node_tb: self-checking test of one reconfigurable node.
// Each trial loads random edges through the configuration port, reaches
// the node through a random ACTIVATE pattern (or starts it as the
// source), and then plays the rest of the array: every clock the time step
// is either the node's own TIME_OUT or a random smaller value from
// "elsewhere". A model of the queue and the local time accumulator here
// predicts TIME_OUT, the ACT_NODES pattern on each firing clock and the
// final PREV (lowest sender of the activating pattern).
module dyn_node_tb;
  localparam int N = 6, DEPTH = 6, W = 16;
  logic clk = 0, rst_n = 0, clear = 0, cfg = 0, start = 0, is_src = 0, tv = 0;
  logic [2:0] cdst = '0;
  logic [W-1:0] cw = '0, tin = '0, tout;
  logic [N-1:0] act_in = '0, act_out;
  logic toutv, active, pvalid, pbusy, ovf;
  logic [2:0] prev;
  int checks = 0, failures = 0;
  int rk [$], rd [$];
  int acc;

  always #5 clk = ~clk;

  dyn_node #(.N(N), .DEPTH(DEPTH), .W(W), .ID(4)) dut (
    .clk(clk), .rst_n(rst_n), .clear_i(clear), .cfg_i(cfg), .cfg_dst_i(cdst), .cfg_weight_i(cw),
    .start_i(start), .is_source_i(is_src), .activate_i(act_in), .time_in_i(tin),
    .time_in_valid_i(tv), .time_out_o(tout), .time_out_valid_o(toutv), .act_nodes_o(act_out),
    .active_o(active), .prev_o(prev), .prev_valid_o(pvalid), .prev_busy_o(pbusy),
    .overflow_o(ovf));

  task automatic cmp(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic ref_insert(input int k, input int d);
    int p = 0;
    foreach (rk[i]) if (rk[i] == k) begin rd[i] |= (1 << d); return; end
    while (p < rk.size() && rk[p] < k) p++;
    rk.insert(p, k);
    rd.insert(p, 1 << d);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 80; t++) begin
      int exp_prev, guard;
      bit as_src;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      rk.delete(); rd.delete();
      repeat ($urandom_range(1, DEPTH)) begin
        int k, d;
        k = $urandom_range(0, 25); d = $urandom_range(0, N - 1);
        cfg = 1; cw = W'(k); cdst = 3'(d);
        @(negedge clk); cfg = 0;
        ref_insert(k, d);
      end
      as_src = (t % 5 == 0);
      @(negedge clk); start = 1; is_src = as_src;
      @(negedge clk); start = 0; is_src = 0;
      cmp("active after start", int'(active), int'(as_src));
      cmp("time out invalid while idle", int'(toutv), int'(as_src));
      if (as_src) exp_prev = 4;
      else begin
        logic [N-1:0] pat;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        pat = N'($urandom_range(1, (1 << N) - 1));
        exp_prev = 0;
        for (int i = N - 1; i >= 0; i--) if (pat[i]) exp_prev = i;
        act_in = pat;
        @(negedge clk); act_in = N'($urandom);      // later arrivals are ignored
        @(negedge clk); act_in = '0;
        // the two clocks above had no step: nothing may have fired yet
        cmp("active", int'(active), 1);
      end
      acc = 0;
      guard = 0;
      while (rk.size() > 0 && guard < 200) begin
        int exp_out, step;
        exp_out = rk[0] - acc;
        cmp("time out valid", int'(toutv), 1);
        cmp("time out", int'(tout), exp_out);
        step = ($urandom_range(0, 2) == 0 && exp_out > 0) ? $urandom_range(0, exp_out - 1) : exp_out;
        tin = W'(step); tv = 1;
        #1;
        cmp("act nodes", int'(act_out), (step == exp_out) ? rd[0] : 0);
        @(negedge clk); tv = 0;
        acc += step;
        if (step == exp_out) begin void'(rk.pop_front()); void'(rd.pop_front()); end
        guard++;
      end
      @(negedge clk);
      cmp("drained", int'(toutv), 0);
      repeat (N + 1) @(negedge clk);
      cmp("prev valid", int'(pvalid), 1);
      cmp("prev", int'(prev), exp_prev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
