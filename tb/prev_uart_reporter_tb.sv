// prev_uart_reporter_tb: self-checking test of the serial result link.
// A 3-entry PREV list of 10-bit identifiers (two bytes per entry) is sent
// at 4 clocks per bit. A receiver model here samples the line in the
// middle of each bit, checks start and stop bits and the byte values
// (entry order, low byte first), and checks that busy lasts exactly
// entries * bytes * 10 * 4 clocks.
module prev_uart_reporter_tb;
  localparam int N = 3, IDW = 10, CPB = 4, BYTES = 2;
  logic clk = 0, rst_n = 0, send = 0;
  logic [IDW-1:0] prev [N];
  logic tx, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prev_uart_reporter #(.N(N), .IDW(IDW), .CLKS_PER_BIT(CPB)) dut (
    .clk(clk), .rst_n(rst_n), .send_i(send), .prev_i(prev), .tx_o(tx), .busy_o(busy));

  task automatic cmp(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  int busy_cycles;
  always @(posedge clk) if (busy) busy_cycles++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    cmp("idle line", int'(tx), 1);
    for (int t = 0; t < 4; t++) begin
      logic [15:0] word;
      for (int i = 0; i < N; i++) prev[i] = IDW'($urandom);
      busy_cycles = 0;
      @(negedge clk); send = 1;
      @(negedge clk); send = 0;
      // the start bit of the first frame is on the line from this clock on
      for (int b = 0; b < N * BYTES; b++) begin
        logic [7:0] got;
        if (b > 0) while (tx) @(negedge clk);   // wait for the start edge
        repeat (CPB / 2 - 1) @(negedge clk);
        cmp("start bit", int'(tx), 0);
        for (int k = 0; k < 8; k++) begin
          repeat (CPB) @(negedge clk);
          got[k] = tx;
        end
        repeat (CPB) @(negedge clk);
        cmp("stop bit", int'(tx), 1);
        word = 16'(prev[b / BYTES]);
        cmp($sformatf("byte %0d", b), int'(got), int'(word[8*(b % BYTES) +: 8]));
      end
      repeat (3 * CPB) @(negedge clk);
      cmp("busy length", busy_cycles, N * BYTES * 10 * CPB);
      cmp("idle after", int'(busy), 0);
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
