// apd_node_tb: self-checking test of the static node module.
// Each trial loads the node (as source or not), fires a random set of its
// four incoming edges on one clock, later fires other edges, and checks
// that ACTIVE is set on the first firing clock only, that PREV becomes the
// origin id of the lowest-numbered edge of the first firing set within
// IN_DEG clocks, and that later arrivals change nothing.
module apd_node_tb;
  localparam int D = 4;
  logic clk = 0, rst_n = 0, load = 0, is_src = 0;
  logic [D-1:0] fire = '0;
  logic [3:0] ids [D];
  logic active, pvalid, pbusy;
  logic [3:0] prev;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  apd_node #(.IN_DEG(D), .IDW(4), .ID(9)) dut (
    .clk(clk), .rst_n(rst_n), .load_i(load), .is_source_i(is_src), .in_fire_i(fire),
    .in_src_id_i(ids), .active_o(active), .prev_o(prev), .prev_valid_o(pvalid),
    .prev_busy_o(pbusy));

  task automatic cmp(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    ids = '{4'd3, 4'd12, 4'd7, 4'd1};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic [D-1:0] first;
      int exp_k;
      @(negedge clk);
      is_src = (t % 7 == 0); load = 1;
      @(negedge clk); load = 0; is_src = 0;
      cmp("active after load", int'(active), (t % 7 == 0) ? 1 : 0);
      if (t % 7 == 0) begin
        cmp("source prev", int'(prev), 9);
        cmp("source prev valid", int'(pvalid), 1);
        fire = 4'b0110;
        @(negedge clk); fire = '0;
        cmp("source prev kept", int'(prev), 9);
        continue;
      end
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        cmp("stays inactive", int'(active), 0);
      end
      first = D'($urandom_range(1, 15));
      exp_k = 0;
      for (int k = D - 1; k >= 0; k--) if (first[k]) exp_k = k;
      fire = first;
      @(negedge clk);
      cmp("activated", int'(active), 1);
      fire = D'($urandom);               // later, ignored arrivals
      @(negedge clk); fire = '0;
      repeat (D + 1) @(negedge clk);
      cmp("prev valid", int'(pvalid), 1);
      cmp("prev busy", int'(pbusy), 0);
      cmp("prev", int'(prev), int'(ids[exp_k]));
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
