// prev_finder_tb: self-checking test of the PREV search state machine.
// For random candidate masks it triggers a search, scrambles the candidate
// input afterwards (the snapshot must be used), and checks that the search
// reports the lowest set index exactly index+1 clocks after the trigger,
// and that an empty mask ends after N clocks with nothing found.
module prev_finder_tb;
  localparam int N = 6;
  logic clk = 0, rst_n = 0, clear = 0, trig = 0;
  logic [N-1:0] cand;
  logic busy, found;
  logic [2:0] idx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prev_finder #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .clear_i(clear), .trigger_i(trig),
                            .cand_i(cand), .busy_o(busy), .found_o(found), .index_o(idx));

  task automatic one(input logic [N-1:0] m);
    int exp_idx = -1, cyc = 0;
    for (int i = N - 1; i >= 0; i--) if (m[i]) exp_idx = i;
    @(negedge clk); cand = m; trig = 1;
    @(negedge clk); trig = 0; cand = N'($urandom);
    while (busy && cyc < 3 * N) begin @(negedge clk); cand = N'($urandom); cyc++; end
    checks++;
    if (exp_idx < 0) begin
      if (found || cyc != N) begin
        failures++; $display("FAIL empty mask: found %b after %0d", found, cyc);
      end
    end else if (!found || int'(idx) != exp_idx || cyc != exp_idx + 1) begin
      failures++;
      $display("FAIL mask %b: found %b idx %0d after %0d, expected %0d after %0d",
               m, found, idx, cyc, exp_idx, exp_idx + 1);
    end
  endtask

  initial begin
    cand = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    one('0);
    for (int i = 0; i < N; i++) one(N'(1 << i));
    for (int t = 0; t < 300; t++) one(N'($urandom));
    // clear drops a finished result
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (found || busy) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
