// tb_trc_bist - end-to-end test of trc_bist at its default parameters: the
// five-input c17 example with the single seed 01100.
//
// The c17 benchmark is attached as the CUT and its responses go to the
// response monitor. The testbench builds the expected pattern sequence
// itself from the seed, as bit arrays b_1..b_n: for each of n rounds, the
// round's start pattern and its 2n-1 successive twists (b_1 <= not b_n, the
// rest move right), then the Shift cycle, which applies the start pattern
// again, and a 1-bit rotation gives the next round's start pattern.
// It checks:
//   * every applied pattern against that sequence, and the MISR signature
//     against a signature computed from the c17 responses;
//   * n load cycles, 2n^2 + n = 55 pattern cycles, 60 clocks in all, then
//     done and no further activity;
//   * that the ten test cubes of c17's deterministic test set are all
//     embedded, the last one first appearing in pattern cycle 31;
//   * the same run with the seed scanned in by a slow tester (one bit per
//     10 clocks), giving the same patterns and signature;
//   * a run with random pauses of the run enable.
// Every mechanism (ROM load, tester load and its waits for the strobe,
// Twist1, Twist2, Shift, return to Twist1, return to Load, pause, done) is
// counted and must occur at least once.
module tb_trc_bist;
  import trc_bist_pkg::*;

  localparam int N = 5;
  localparam int NPAT = 2 * N * N + N;
  localparam bit SEED [1:N] = '{0, 1, 1, 0, 0};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic bist_en, ext_seed, scan_in, scan_strobe;
  logic [N-1:0] cut_in;
  logic pattern_valid, te, se, sce, done;
  logic [1:0] cut_resp, signature;
  tc_state_e state;
  logic [0:0] seed_index;
  logic [2:0] rom_addr;

  int checks = 0, failures = 0;
  bit exp_pat [NPAT][1:N];
  int unsigned exp_sig;

  // mechanism counters
  int n_rom_load, n_ext_load, n_strobe_wait, n_twist1, n_twist2, n_shift;
  int n_to_twist1, n_to_load, n_pause, n_done;

  string cubes [10] = '{"0110X", "0111X", "X101X", "000XX", "100XX",
                        "X00X0", "XX111", "X10X0", "101XX", "X00X1"};

  always #5 clk = ~clk;

  trc_bist dut (
    .clk, .rst_n, .bist_en, .ext_seed, .scan_in, .scan_strobe, .cut_in,
    .pattern_valid, .cut_resp, .signature, .state, .te, .se, .sce,
    .rom_addr, .seed_index, .done
  );

  c17_model cut (
    .g1(cut_in[4]), .g2(cut_in[3]), .g3(cut_in[2]), .g6(cut_in[1]), .g7(cut_in[0]),
    .g22(cut_resp[1]), .g23(cut_resp[0])
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [N-1:0] to_vec(input bit p [1:N]);
    logic [N-1:0] v;
    for (int i = 1; i <= N; i++) v[N-i] = p[i];
    return v;
  endfunction

  function automatic logic [1:0] c17_ref(input bit p [1:N]);
    bit n10, n11, n16, n19;
    n10 = !(p[1] && p[3]);
    n11 = !(p[3] && p[4]);
    n16 = !(p[2] && n11);
    n19 = !(n11 && p[5]);
    return {!(n10 && n16), !(n16 && n19)};
  endfunction

  function automatic bit cube_hit(input string cube, input bit p [1:N]);
    for (int i = 1; i <= N; i++)
      if (cube[i-1] != "X" && (cube[i-1] == "1") != p[i]) return 0;
    return 1;
  endfunction

  task automatic build_reference();
    bit p [1:N];
    bit q [1:N];
    int k = 0;
    p = SEED;
    for (int r = 0; r < N; r++) begin
      for (int t = 0; t < 2 * N; t++) begin
        exp_pat[k++] = p;
        q[1] = !p[N];
        for (int i = 2; i <= N; i++) q[i] = p[i-1];
        p = q;
      end
      exp_pat[k++] = p;        // Shift cycle: twist cycle closed, start pattern again
      q[1] = p[N];
      for (int i = 2; i <= N; i++) q[i] = p[i-1];
      p = q;
    end
    exp_sig = 0;
    for (int j = 0; j < NPAT; j++) begin
      exp_sig = (exp_sig * 2) ^ 32'(c17_ref(exp_pat[j]));
      if (exp_sig >= 4) exp_sig ^= 7;
    end
  endtask

  task automatic count_state(input tc_state_e prev);
    case (state)
      ST_TWIST1: begin n_twist1++; if (prev == ST_SHIFT) n_to_twist1++; end
      ST_TWIST2: n_twist2++;
      ST_SHIFT:  n_shift++;
      ST_LOAD:   if (prev == ST_SHIFT) n_to_load++;
      default: ;
    endcase
  endtask

  // One complete run. mode 0: ROM, full rate; 1: tester, strobe every 10th
  // clock; 2: ROM with random pauses.
  task automatic run(input int mode);
    int k = 0, loads = 0, clocks = 0, first_hit [10];
    int tester_bit = 0, tick = 0;
    tc_state_e prev;
    foreach (first_hit[c]) first_hit[c] = -1;
    rst_n = 0;
    bist_en = 0; ext_seed = (mode == 1); scan_in = 0; scan_strobe = 0;
    #1 rst_n = 1;
    @(posedge clk); #1;
    prev = state;
    while (!done && clocks < 2000) begin
      bist_en = (mode == 2) ? ($urandom_range(0, 3) != 0) : 1'b1;
      scan_strobe = 0;
      if (mode == 1) begin
        tick++;
        if (tick == 10) begin
          tick = 0;
          scan_strobe = 1;
          scan_in = SEED[N - tester_bit];   // b_n first
        end
      end
      #1;
      if (!bist_en) n_pause++;
      if (state == ST_LOAD && bist_en) begin
        if (mode == 1) begin
          if (scan_strobe) begin n_ext_load++; loads++; tester_bit++; end
          else n_strobe_wait++;
        end else begin
          n_rom_load++; loads++;
        end
      end
      if (pattern_valid) begin
        check(k < NPAT, "no more patterns than 2n^2+n");
        if (k < NPAT) begin
          check(cut_in == to_vec(exp_pat[k]), $sformatf("pattern %0d", k));
          foreach (cubes[c])
            if (first_hit[c] < 0 && cube_hit(cubes[c], exp_pat[k])) first_hit[c] = k;
        end
        k++;
      end
      @(posedge clk); #1;
      clocks++;
      count_state(prev);
      prev = state;
    end
    check(done, "done raised");
    n_done += done;
    check(k == NPAT, $sformatf("pattern cycles %0d = 2n^2+n", k));
    check(loads == N, "n load steps");
    if (mode == 0) check(clocks == 2 * N * N + 2 * N, $sformatf("clocks %0d = 2n^2+2n", clocks));
    if (mode == 1) check(clocks <= NPAT + 10 * N && clocks > NPAT + 10 * (N - 1),
                         $sformatf("clocks %0d with a 10x slower tester", clocks));
    check(signature == 2'(exp_sig), "MISR signature");
    for (int c = 0; c < 10; c++) check(first_hit[c] >= 0, {"cube ", cubes[c], " embedded"});
    if (mode == 0) begin
      int last = 0;
      foreach (first_hit[c]) if (first_hit[c] > last) last = first_hit[c];
      check(last == 30, $sformatf("all cubes embedded within 31 pattern cycles (last %0d)", last));
    end
    // after done nothing moves
    repeat (5) begin
      @(posedge clk); #1;
      check(!pattern_valid && state == ST_LOAD, "idle after done");
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_rom_load = 0; n_ext_load = 0; n_strobe_wait = 0; n_twist1 = 0; n_twist2 = 0;
    n_shift = 0; n_to_twist1 = 0; n_to_load = 0; n_pause = 0; n_done = 0;
    bist_en = 0; ext_seed = 0; scan_in = 0; scan_strobe = 0;
    build_reference();
    repeat (2) @(posedge clk);
    run(0);
    run(1);
    run(2);
    check(n_rom_load > 0, "ROM load happened");
    check(n_ext_load > 0, "tester load happened");
    check(n_strobe_wait > 0, "wait for tester strobe happened");
    check(n_twist1 > 0, "Twist1 happened");
    check(n_twist2 > 0, "Twist2 happened");
    check(n_shift > 0, "Shift happened");
    check(n_to_twist1 > 0, "Shift -> Twist1 (SE = 0) happened");
    check(n_to_load > 0, "Shift -> Load (SE = 1) happened");
    check(n_pause > 0, "pause happened");
    check(n_done == 3, "done happened in every run");
    $display("mechanisms: rom_load=%0d ext_load=%0d strobe_wait=%0d twist1=%0d twist2=%0d shift=%0d to_twist1=%0d to_load=%0d pause=%0d done=%0d",
             n_rom_load, n_ext_load, n_strobe_wait, n_twist1, n_twist2, n_shift,
             n_to_twist1, n_to_load, n_pause, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
