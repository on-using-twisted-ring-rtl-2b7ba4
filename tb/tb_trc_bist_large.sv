// tb_trc_bist_large - trc_bist at the size of the largest circuit whose test
// time is tabulated: s9234, n = 247 inputs, 33 seeds. With on-chip seeds a
// full run takes 2n^2 s + 2ns = 4,042,896 clocks (about 8.1 ms at 500 MHz; simulated with a 10 ns clock);
// with a tester ten times slower, 2n^2 s + ns = 4,034,745 BIST cycles plus
// ns = 8151 tester bits. Seeds are made up; every pattern is checked.
module tb_trc_bist_large;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int  checks, failures;
  bit  finished;

  trc_bist_run #("s9234", 247, 33, 4042896, 4034745, 8151) r0 (clk, checks, failures, finished);

  initial begin
    #200ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
