// time_advance_minimizer_tb: self-checking test of the comparator tree.
// Two instances (8 inputs, the document's example, and 5 inputs, a
// non-power-of-two size) get random values and valid masks, including the
// all-invalid and single-valid cases; the result is compared with a
// straightforward linear search.
module time_advance_minimizer_tb;
  localparam int W = 16;

  logic [W-1:0] v8 [8];
  logic [7:0]   ok8;
  logic [W-1:0] m8;
  logic         mv8;
  logic [W-1:0] v5 [5];
  logic [4:0]   ok5;
  logic [W-1:0] m5;
  logic         mv5;

  int checks = 0, failures = 0;

  time_advance_minimizer #(.N(8), .W(W)) dut8 (.val_i(v8), .valid_i(ok8), .min_o(m8), .min_valid_o(mv8));
  time_advance_minimizer #(.N(5), .W(W)) dut5 (.val_i(v5), .valid_i(ok5), .min_o(m5), .min_valid_o(mv5));

  task automatic check8();
    logic [W-1:0] best = '1; logic any = 0;
    for (int i = 0; i < 8; i++) if (ok8[i]) begin
      if (!any || v8[i] < best) best = v8[i];
      any = 1;
    end
    checks++;
    if (mv8 !== any || (any && m8 !== best)) begin
      failures++;
      $display("FAIL n8: valid %b min %0d expected valid %b min %0d", mv8, m8, any, best);
    end
  endtask

  task automatic check5();
    logic [W-1:0] best = '1; logic any = 0;
    for (int i = 0; i < 5; i++) if (ok5[i]) begin
      if (!any || v5[i] < best) best = v5[i];
      any = 1;
    end
    checks++;
    if (mv5 !== any || (any && m5 !== best)) begin
      failures++;
      $display("FAIL n5: valid %b min %0d expected valid %b min %0d", mv5, m5, any, best);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 8; i++) v8[i] = W'($urandom_range(0, (t % 3 == 0) ? 7 : 65535));
      for (int i = 0; i < 5; i++) v5[i] = W'($urandom_range(0, (t % 3 == 0) ? 7 : 65535));
      case (t % 4)
        0: begin ok8 = '0; ok5 = '0; end
        1: begin ok8 = 8'(1 << (t % 8)); ok5 = 5'(1 << (t % 5)); end
        2: begin ok8 = '1; ok5 = '1; end
        default: begin ok8 = 8'($urandom); ok5 = 5'($urandom); end
      endcase
      #1;
      check8();
      check5();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
