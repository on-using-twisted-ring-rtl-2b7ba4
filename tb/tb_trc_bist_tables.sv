// tb_trc_bist_tables - trc_bist at the sizes of the ISCAS-89 benchmark
// experiments (number of inputs n and number of seeds s per circuit). For
// each circuit the generator is run with ROM seeds and with seeds from a
// tester ten times slower than the BIST clock, and the cycle counts are
// compared with the published ones: 2n^2 s + 2ns clocks with on-chip seeds,
// 2n^2 s + ns BIST cycles plus ns tester cycles with external seeds. The
// seeds themselves are made up; every applied pattern is still checked.
module tb_trc_bist_tables;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 11;
  int  c_checks [NC];
  int  c_failures [NC];
  bit  c_finished [NC];

  //                      circuit   n   s  clocks(ROM)  BIST cycles  tester bits
  trc_bist_run #("s349",  24,  3,   3600,   3528,   72) r0  (clk, c_checks[0],  c_failures[0],  c_finished[0]);
  trc_bist_run #("s386",  13,  6,   2184,   2106,   78) r1  (clk, c_checks[1],  c_failures[1],  c_finished[1]);
  trc_bist_run #("s420",  35,  8,  20160,  19880,  280) r2  (clk, c_checks[2],  c_failures[2],  c_finished[2]);
  trc_bist_run #("s510",  25,  5,   6500,   6375,  125) r3  (clk, c_checks[3],  c_failures[3],  c_finished[3]);
  trc_bist_run #("s526",  24,  7,   8400,   8232,  168) r4  (clk, c_checks[4],  c_failures[4],  c_finished[4]);
  trc_bist_run #("s641",  54,  6,  35640,  35316,  324) r5  (clk, c_checks[5],  c_failures[5],  c_finished[5]);
  trc_bist_run #("s713",  54,  8,  47520,  47088,  432) r6  (clk, c_checks[6],  c_failures[6],  c_finished[6]);
  trc_bist_run #("s820",  23,  9,   9936,   9729,  207) r7  (clk, c_checks[7],  c_failures[7],  c_finished[7]);
  trc_bist_run #("s953",  45,  9,  37260,  36855,  405) r8  (clk, c_checks[8],  c_failures[8],  c_finished[8]);
  trc_bist_run #("s1196", 32, 17,  35904,  35360,  544) r9  (clk, c_checks[9],  c_failures[9],  c_finished[9]);
  trc_bist_run #("s1238", 32, 16,  33792,  33280,  512) r10 (clk, c_checks[10], c_failures[10], c_finished[10]);

  int checks, failures;
  bit all_done;

  initial begin
    #5ms;
    $display("watchdog expired");
    checks = 0; failures = 1;
    for (int i = 0; i < NC; i++) begin checks += c_checks[i]; failures += c_failures[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    do begin
      @(posedge clk);
      all_done = 1;
      for (int i = 0; i < NC; i++) all_done &= c_finished[i];
    end while (!all_done);
    checks = 0; failures = 0;
    for (int i = 0; i < NC; i++) begin checks += c_checks[i]; failures += c_failures[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
