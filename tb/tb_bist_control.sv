// tb_bist_control - self-checking test of the BIST control logic (twist
// counter, shift counter and FSM together).
//
// A cycle model written in the testbench walks through the schedule of one
// seed: n Load cycles, then n rounds of n Twist1 + n Twist2 cycles and one
// Shift cycle. It predicts state, TE, SE, SCE, the multiplexer select and
// the enables every cycle. Three runs with n = 5:
//   1. ROM seeds, always enabled: every seed must take 2n^2 + 2n = 60 clocks
//      of which 2n^2 + n = 55 apply patterns (pattern efficiency 55/60).
//   2. ROM seeds with a random run enable (pauses).
//   3. Tester seeds with a scan strobe every 10th clock (f_s/f_ext = 10):
//      Load advances only on strobes, the pattern cycles stay at 55.
module tb_bist_control;
  import trc_bist_pkg::*;

  localparam int N = 5;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en, ext_seed, scan_strobe;
  tc_state_e state;
  mux_sel_e mux_sel;
  logic reg_en, rom_en, pattern_valid, seed_done, te, se, sce;
  int checks = 0, failures = 0;

  // cycle model
  int m_st, m_cnt, m_sh;   // m_st: 0 Load, 1 Twist1, 2 Twist2, 3 Shift
  int cyc_in_seed, pat_in_seed, loads_in_seed, seeds;

  always #5 clk = ~clk;

  bist_control #(.N(N)) dut (
    .clk, .rst_n, .en, .ext_seed, .scan_strobe, .state, .mux_sel, .reg_en,
    .rom_en, .pattern_valid, .seed_done, .te, .se, .sce
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (model state %0d cnt %0d shifts %0d)", what, $time, m_st, m_cnt, m_sh);
    end
  endtask

  task automatic model_reset();
    m_st = 0; m_cnt = 0; m_sh = 0;
    cyc_in_seed = 0; pat_in_seed = 0; loads_in_seed = 0; seeds = 0;
  endtask

  // Check the outputs of this cycle and advance the model one clock.
  // full_rate: en is always high, so the seed length can be checked.
  task automatic cycle(input bit full_rate);
    bit step;
    mux_sel_e exp_sel;
    #1;
    step = en && (m_st != 0 || !ext_seed || scan_strobe);
    exp_sel = (m_st == 0) ? (ext_seed ? SEL_SCAN : SEL_ROM) :
              (m_st == 3) ? SEL_RING : SEL_TWIST;
    check(2'(state) == 2'(m_st), "state");
    check(te == (m_st != 3 && m_cnt == N - 1), "TE");
    check(se == (m_sh == N - 1), "SE");
    check(sce == (m_st == 3), "SCE");
    check(mux_sel == exp_sel, "mux select");
    check(reg_en == step, "register enable");
    check(rom_en == (step && m_st == 0 && !ext_seed), "ROM enable");
    check(pattern_valid == (en && m_st != 0), "pattern valid");
    check(seed_done == (step && m_st == 3 && m_sh == N - 1), "seed done");
    cyc_in_seed++;
    if (pattern_valid) pat_in_seed++;
    if (step && m_st == 0) loads_in_seed++;
    @(posedge clk);
    #1;
    if (step) begin
      if (m_st == 3) begin
        m_cnt = 0;
        if (m_sh == N - 1) begin
          m_sh = 0; m_st = 0;
          seeds++;
          check(pat_in_seed == 2 * N * N + N, "pattern cycles per seed = 2n^2+n");
          check(loads_in_seed == N, "load steps per seed = n");
          if (full_rate) check(cyc_in_seed == 2 * N * N + 2 * N, "clocks per seed = 2n^2+2n");
          cyc_in_seed = 0; pat_in_seed = 0; loads_in_seed = 0;
        end else begin
          m_sh++; m_st = 1;
        end
      end else if (m_cnt == N - 1) begin
        m_cnt = 0; m_st++;
      end else m_cnt++;
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // run 1: ROM seeds, full rate
    en = 0; ext_seed = 0; scan_strobe = 0;
    model_reset();
    repeat (2) @(posedge clk);
    #1 rst_n = 1; en = 1;
    while (seeds < 3) cycle(1);
    // run 2: random pauses
    model_reset();
    rst_n = 0; #1 rst_n = 1;
    while (seeds < 3) begin
      en = ($urandom_range(0, 3) != 0);
      cycle(0);
    end
    // run 3: tester seeds, strobe every 10th clock
    model_reset();
    en = 0; ext_seed = 1;
    rst_n = 0; #1 rst_n = 1; en = 1;
    for (int c = 0; seeds < 2; c++) begin
      scan_strobe = (c % 10 == 9);
      cycle(0);
    end
    check(seeds == 2, "tester run finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
