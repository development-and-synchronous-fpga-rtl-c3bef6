// dyn_edge_queue_tb: self-checking test of the weight-ordered edge queue.
// Random edges (weight, destination) are inserted; a reference list kept
// here, sorted by weight with one destination set per weight, predicts the
// head after every step. The queue is then popped empty and each head is
// compared. Filling past DEPTH distinct weights must raise the overflow
// flag and leave the held entries unchanged; clear must empty the queue.
module dyn_edge_queue_tb;
  localparam int N = 8, DEPTH = 5, W = 16;
  logic clk = 0, rst_n = 0, clear = 0, ins = 0, pop = 0;
  logic [W-1:0] key = '0;
  logic [2:0] dst = '0;
  logic hv, ovf;
  logic [W-1:0] hk;
  logic [N-1:0] hd;
  int checks = 0, failures = 0;

  int rk [$];         // reference keys, ascending
  int rd [$];         // reference destination sets

  always #5 clk = ~clk;

  dyn_edge_queue #(.N(N), .DEPTH(DEPTH), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .clear_i(clear), .ins_i(ins), .ins_key_i(key), .ins_dst_i(dst),
    .pop_i(pop), .head_valid_o(hv), .head_key_o(hk), .head_dst_o(hd), .overflow_o(ovf));

  task automatic cmp(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic ref_insert(input int k, input int d, output bit over);
    int p = 0;
    over = 0;
    foreach (rk[i]) if (rk[i] == k) begin rd[i] |= (1 << d); return; end
    if (rk.size() == DEPTH) begin over = 1; return; end
    while (p < rk.size() && rk[p] < k) p++;
    rk.insert(p, k);
    rd.insert(p, 1 << d);
  endtask

  task automatic check_head();
    cmp("head valid", int'(hv), rk.size() > 0);
    if (rk.size() > 0) begin
      cmp("head key", int'(hk), rk[0]);
      cmp("head dst", int'(hd), rd[0]);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      bit over, exp_ovf;
      exp_ovf = 0;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      rk.delete(); rd.delete();
      check_head();
      cmp("overflow cleared", int'(ovf), 0);
      repeat ($urandom_range(1, 12)) begin
        int k, d;
        k = $urandom_range(0, (t % 3 == 0) ? 4 : 30);
        d = $urandom_range(0, N - 1);
        key = W'(k); dst = 3'(d); ins = 1;
        @(negedge clk); ins = 0;
        ref_insert(k, d, over);
        if (over) exp_ovf = 1;
        check_head();
        cmp("overflow", int'(ovf), int'(exp_ovf));
      end
      while (rk.size() > 0) begin
        pop = 1;
        @(negedge clk); pop = 0;
        void'(rk.pop_front()); void'(rd.pop_front());
        check_head();
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
