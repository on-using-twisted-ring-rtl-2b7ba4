// tb_bist_counter - self-checking test of bist_counter.
//
// Two instances, modulus 5 (not a power of two) and modulus 8, are driven
// with a random enable. A behavioural count kept in the testbench predicts
// the count and the terminal-count flag every cycle; the number of enabled
// cycles between flags must equal the modulus.
module tb_bist_counter;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en5, en8;
  logic [2:0] c5, c8;
  logic tc5, tc8;
  int checks = 0, failures = 0;
  int m5, m8;

  always #5 clk = ~clk;

  bist_counter #(.MODULUS(5)) dut5 (.clk, .rst_n, .en(en5), .count(c5), .tc(tc5));
  bist_counter #(.MODULUS(8)) dut8 (.clk, .rst_n, .en(en8), .count(c8), .tc(tc8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en5 = 0; en8 = 0; m5 = 0; m8 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      en5 = ($urandom_range(0, 3) != 0);
      en8 = ($urandom_range(0, 1) != 0);
      #1;
      check(c5 == 3'(m5), "count mod 5");
      check(tc5 == (m5 == 4), "tc mod 5");
      check(c8 == 3'(m8), "count mod 8");
      check(tc8 == (m8 == 7), "tc mod 8");
      @(posedge clk);
      if (en5) m5 = (m5 + 1) % 5;
      if (en8) m8 = (m8 + 1) % 8;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
