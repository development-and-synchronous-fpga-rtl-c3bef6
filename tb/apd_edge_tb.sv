// apd_edge_tb: self-checking test of the static edge module.
// A reference model of w(e) and the arrival flag is stepped alongside the
// edge while origin/target activity and the time step are driven at
// random (the step never exceeds w while the edge counts, as the minimizer
// guarantees). Checks w, counting, fire, arrived and the carried origin id.
module apd_edge_tb;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, load = 0, oa = 0, ta = 0, dv = 0;
  logic [W-1:0] wt = '0, dec = '0;
  logic counting, fire, arrived;
  logic [W-1:0] w;
  logic [2:0] sid;
  int checks = 0, failures = 0;
  int mw; logic marr;

  always #5 clk = ~clk;

  apd_edge #(.W(W), .IDW(3), .SRC_ID(5)) dut (
    .clk(clk), .rst_n(rst_n), .load_i(load), .weight_i(wt), .origin_active_i(oa),
    .target_active_i(ta), .dec_i(dec), .dec_valid_i(dv), .counting_o(counting),
    .w_o(w), .fire_o(fire), .arrived_o(arrived), .src_id_o(sid));

  task automatic cmp(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 60; run++) begin
      @(negedge clk);
      wt = W'($urandom_range(0, 40)); load = 1; oa = 0; ta = 0; dv = 0;
      @(negedge clk); load = 0;
      mw = int'(wt); marr = 0;
      for (int c = 0; c < 40; c++) begin
        oa = ($urandom_range(0, 3) != 0);
        ta = ($urandom_range(0, 9) == 0) ? 1'b1 : (marr ? 1'b1 : 1'b0);
        dv = ($urandom_range(0, 5) != 0);
        dec = (oa && !ta) ? W'($urandom_range(0, mw)) : W'($urandom_range(0, 100));
        if ($urandom_range(0, 2) == 0 && oa && !ta) dec = W'(mw);
        #1;
        cmp("counting", int'(counting), int'(oa && !ta));
        cmp("fire", int'(fire), int'(oa && !ta && dv && int'(dec) == mw));
        cmp("w", int'(w), mw);
        cmp("src id", int'(sid), 5);
        @(negedge clk);
        if (oa && !ta && dv) begin
          if (int'(dec) == mw) marr = 1;
          mw = mw - int'(dec);
        end
        cmp("w after clock", int'(w), mw);
        cmp("arrived", int'(arrived), int'(marr));
      end
    end
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
