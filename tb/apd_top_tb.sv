// apd_top_tb: end-to-end test of the whole processor at its default sizes.
//
// Static side (5 nodes, 12 directed edges): the worked example from node
// 0, then random weight sets from random sources, some with zero weights.
// Each result is checked against a Bellman-Ford reference, and the PREV
// list that the serial link sends afterwards is received at 434 clocks per
// bit and compared with the result.
// Reconfigurable side (4 nodes): random graphs are loaded, solved and
// checked the same way, the array is reloaded between runs, and one load
// gives a node more distinct weights than its queue holds to provoke the
// overflow flag.
// Every mechanism of the design must occur at least once, or a failure is
// counted: time skips of more than one unit, zero steps, simultaneous
// arrivals at a node, edges that stop counting because their target was
// reached first, multi-clock PREV searches, serial reports, merged queue
// keys, queue heads whose targets were all reached already, reloading of
// the reconfigurable array, and queue overflow.
module apd_top_tb;
  localparam int SN = 5, SM = 12, DN = 4, W = 16, CPB = 434;
  localparam int SIDW = 3, DIDW = 2;
  localparam int INF = 32'h7fff_ffff;
  // The top's default static graph.
  localparam int SSRC [SM] = '{0, 1, 0, 2, 1, 3, 2, 3, 2, 4, 3, 4};
  localparam int SDST [SM] = '{1, 0, 2, 0, 3, 1, 3, 2, 4, 2, 4, 3};
  localparam int EX_W [SM] = '{2, 2, 3, 3, 4, 4, 3, 3, 3, 3, 1, 1};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_start = 0, s_busy, s_done, uart_tx, uart_busy;
  logic [SIDW-1:0] s_source = '0;
  logic [W-1:0] s_weight [SM];
  logic [SN-1:0] s_reached;
  logic [SIDW-1:0] s_prev [SN];
  logic [SM-1:0] s_tree;
  logic [31:0] s_steps;
  logic d_clear = 0, d_cfg = 0, d_start = 0, d_busy, d_done, d_ovf;
  logic [DIDW-1:0] d_csrc = '0, d_cdst = '0, d_source = '0;
  logic [W-1:0] d_cw = '0;
  logic [DN-1:0] d_reached;
  logic [DIDW-1:0] d_prev [DN];
  logic [31:0] d_steps;

  apd_top dut (
    .clk(clk), .rst_n(rst_n),
    .s_start_i(s_start), .s_source_i(s_source), .s_weight_i(s_weight), .s_busy_o(s_busy),
    .s_done_o(s_done), .s_reached_o(s_reached), .s_prev_o(s_prev), .s_tree_edge_o(s_tree),
    .s_step_count_o(s_steps), .uart_tx_o(uart_tx), .uart_busy_o(uart_busy),
    .d_clear_i(d_clear), .d_cfg_i(d_cfg), .d_cfg_src_i(d_csrc), .d_cfg_dst_i(d_cdst),
    .d_cfg_weight_i(d_cw), .d_start_i(d_start), .d_source_i(d_source), .d_busy_o(d_busy),
    .d_done_o(d_done), .d_reached_o(d_reached), .d_prev_o(d_prev), .d_step_count_o(d_steps),
    .d_overflow_o(d_ovf));

  int checks = 0, failures = 0;
  // mechanism counters
  int n_skip = 0, n_zero_step = 0, n_multi = 0, n_deact = 0, n_long_search = 0, n_report = 0;
  int n_merged = 0, n_stale = 0, n_reload = 0, n_overflow = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  // ---------------- mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if (dut.u_static.step_valid && dut.u_static.step > 1) n_skip++;
    if (dut.u_static.step_valid && dut.u_static.step == 0) n_zero_step++;
    for (int x = 0; x < DN; x++) begin
      if ($countones(dut.u_dyn.act_nodes[x]) > 1) n_merged++;
      if (dut.u_dyn.act_nodes[x] != 0 && (dut.u_dyn.act_nodes[x] & ~dut.u_dyn.active) == 0) n_stale++;
    end
  end
  for (genvar v = 0; v < SN; v++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (!dut.u_static.active[v] && $countones(dut.u_static.g_node[v].in_fire) > 1) n_multi++;
      if (dut.u_static.g_node[v].u_node.u_prev.busy_o &&
          dut.u_static.g_node[v].u_node.u_prev.idx_q != 0 &&
          dut.u_static.g_node[v].u_node.u_prev.state_q == 2'd1) n_long_search++;
    end
  end

  // ---------------- serial receiver
  byte rx_q [$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_tx);
      repeat (CPB / 2) @(posedge clk);
      if (uart_tx != 0) continue;
      for (int k = 0; k < 8; k++) begin
        repeat (CPB) @(posedge clk);
        b[k] = uart_tx;
      end
      repeat (CPB) @(posedge clk);
      if (uart_tx != 1) fail("serial stop bit");
      rx_q.push_back(b);
    end
  end

  // ---------------- static side
  int sd [SN];

  task automatic static_run(input int src, input bit example, input bit zero_ok);
    bit changed, ok;
    int cyc;
    for (int e = 0; e < SM; e++) s_weight[e] = example ? W'(EX_W[e]) : W'($urandom_range(zero_ok ? 0 : 1, 12));
    for (int v = 0; v < SN; v++) sd[v] = INF;
    sd[src] = 0;
    do begin
      changed = 0;
      for (int e = 0; e < SM; e++)
        if (sd[SSRC[e]] != INF && sd[SSRC[e]] + int'(s_weight[e]) < sd[SDST[e]]) begin
          sd[SDST[e]] = sd[SSRC[e]] + int'(s_weight[e]); changed = 1;
        end
    end while (changed);
    rx_q.delete();
    @(negedge clk); s_source = SIDW'(src); s_start = 1;
    @(negedge clk); s_start = 0;
    cyc = 0;
    while (!s_done && cyc < 1000) begin @(negedge clk); cyc++; end
    checks++;
    if (!s_done) begin fail("static: no done"); return; end
    for (int e = 0; e < SM; e++)
      if (s_reached[SSRC[e]] && !s_tree[e] && dut.u_static.w[e] != 0) n_deact++;
    for (int v = 0; v < SN; v++) begin
      checks++;
      if (!s_reached[v]) begin fail($sformatf("static: node %0d not reached", v)); continue; end
      ok = (v == src) ? (int'(s_prev[v]) == src) : 0;
      for (int e = 0; e < SM; e++)
        if (v != src && SDST[e] == v && SSRC[e] == int'(s_prev[v]) && sd[SSRC[e]] + int'(s_weight[e]) == sd[v]) ok = 1;
      if (!ok) fail($sformatf("static: prev[%0d]=%0d wrong", v, s_prev[v]));
    end
    if (example) begin
      checks++;
      if (s_steps != 3) fail($sformatf("static example: %0d steps, expected 3", s_steps));
    end
    // serial report of the PREV list
    cyc = 0;
    while (rx_q.size() < SN && cyc < 2 * SN * 10 * CPB + 1000) begin @(negedge clk); cyc++; end
    while (uart_busy) @(negedge clk);
    checks++;
    if (rx_q.size() != SN) fail($sformatf("serial: %0d bytes received", rx_q.size()));
    else begin
      n_report++;
      for (int v = 0; v < SN; v++) begin
        checks++;
        if (rx_q[v] != 8'(s_prev[v])) fail($sformatf("serial: byte %0d = %0d, prev %0d", v, rx_q[v], s_prev[v]));
      end
    end
  endtask

  // ---------------- reconfigurable side
  int des [$], ded [$], dew [$];
  int dd [DN];

  task automatic d_load(input int s, input int d, input int w);
    des.push_back(s); ded.push_back(d); dew.push_back(w);
    @(negedge clk); d_cfg = 1; d_csrc = DIDW'(s); d_cdst = DIDW'(d); d_cw = W'(w);
    @(negedge clk); d_cfg = 0;
  endtask

  task automatic dyn_run(input int src, input bit overflow_case);
    bit changed, ok;
    int cyc;
    des.delete(); ded.delete(); dew.delete();
    @(negedge clk); d_clear = 1;
    @(negedge clk); d_clear = 0;
    n_reload++;
    for (int i = 0; i < DN; i++) begin
      d_load(i, (i + 1) % DN, $urandom_range(1, 6));
      d_load((i + 1) % DN, i, $urandom_range(1, 6));
    end
    // node 0 gets a second edge to each neighbour with the weight of an
    // existing edge, so that keys merge
    d_load(0, 2, dew[0]);
    if (overflow_case) for (int k = 0; k < 5; k++) d_load(3, 1, 20 + k);
    checks++;
    if (d_ovf != overflow_case) fail($sformatf("dyn: overflow flag %b", d_ovf));
    if (d_ovf) n_overflow++;
    if (overflow_case) return;
    for (int v = 0; v < DN; v++) dd[v] = INF;
    dd[src] = 0;
    do begin
      changed = 0;
      foreach (des[e])
        if (dd[des[e]] != INF && dd[des[e]] + dew[e] < dd[ded[e]]) begin
          dd[ded[e]] = dd[des[e]] + dew[e]; changed = 1;
        end
    end while (changed);
    @(negedge clk); d_source = DIDW'(src); d_start = 1;
    @(negedge clk); d_start = 0;
    cyc = 0;
    while (!d_done && cyc < 1000) begin @(negedge clk); cyc++; end
    checks++;
    if (!d_done) begin fail("dyn: no done"); return; end
    for (int v = 0; v < DN; v++) begin
      checks++;
      ok = (v == src) ? (int'(d_prev[v]) == src) : 0;
      foreach (des[e])
        if (v != src && ded[e] == v && des[e] == int'(d_prev[v]) && dd[des[e]] + dew[e] == dd[v]) ok = 1;
      if (!d_reached[v] || !ok) fail($sformatf("dyn: node %0d reached %b prev %0d", v, d_reached[v], d_prev[v]));
    end
  endtask

  initial begin
    for (int e = 0; e < SM; e++) s_weight[e] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    static_run(0, 1'b1, 1'b0);
    for (int r = 0; r < 12; r++) static_run($urandom_range(0, SN - 1), 1'b0, r % 3 == 2);
    for (int r = 0; r < 30; r++) dyn_run($urandom_range(0, DN - 1), 1'b0);
    dyn_run(0, 1'b1);
    $display("mechanisms: skip=%0d zero_step=%0d multi_arrival=%0d deactivated=%0d long_search=%0d report=%0d merged=%0d stale=%0d reload=%0d overflow=%0d",
             n_skip, n_zero_step, n_multi, n_deact, n_long_search, n_report, n_merged, n_stale, n_reload, n_overflow);
    checks++; if (n_skip == 0)        fail("no time skip");
    checks++; if (n_zero_step == 0)   fail("no zero step");
    checks++; if (n_multi == 0)       fail("no simultaneous arrival");
    checks++; if (n_deact == 0)       fail("no deactivated edge");
    checks++; if (n_long_search == 0) fail("no multi-clock PREV search");
    checks++; if (n_report == 0)      fail("no serial report");
    checks++; if (n_merged == 0)      fail("no merged queue key");
    checks++; if (n_stale == 0)       fail("no stale queue head");
    checks++; if (n_reload == 0)      fail("no reload");
    checks++; if (n_overflow == 0)    fail("no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
