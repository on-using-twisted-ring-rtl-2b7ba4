// trc_bist_run - testbench helper: one trc_bist of a given size run twice,
// once with seeds from its ROM and once with the same seeds scanned in by a
// tester model that delivers one bit every 10th clock (a 500 MHz BIST clock
// against a 50 MHz tester). Used by tb_trc_bist_tables.
//
// The seeds are made up by a small xorshift generator (the real seeds of the
// benchmark circuits are not part of this design). Every applied pattern is
// checked against a closed-form reference: pattern j of a seed belongs to
// round r = j / (2n+1) at position t = j mod (2n+1); the round starts from
// the seed rotated right r times, and t twists of a pattern p give
//   q_i = not p_(n-t+i) for i <= t, q_i = p_(i-t) for i > t   (t <= n),
// and the complement of the (t-n)-twist for n < t < 2n; position 2n (the
// Shift cycle) gives the start pattern again.
// Checked cycle counts:
//   CLOCKS_ROM  total clocks with ROM seeds        = 2n^2 s + 2ns
//   PAT_CYCLES  pattern (BIST) cycles              = 2n^2 s + ns
//   LOAD_BITS   tester bits scanned in             = ns
// and, with the tester, total clocks = PAT_CYCLES + up to 10 * LOAD_BITS.
module trc_bist_run #(
  parameter string NAME = "c17",
  parameter int    N = 5,
  parameter int    S = 1,
  parameter int    CLOCKS_ROM = 60,
  parameter int    PAT_CYCLES = 55,
  parameter int    LOAD_BITS = 5
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   finished
);
  import trc_bist_pkg::*;

  function automatic logic [S*N-1:0] make_seeds();
    logic [S*N-1:0] v;
    int unsigned x = 32'h2545F491 ^ (N * 7919) ^ (S * 104729);
    for (int i = 0; i < S * N; i++) begin
      x ^= x << 13; x ^= x >> 17; x ^= x << 5;
      v[i] = x[7];
    end
    return v;
  endfunction

  localparam logic [S*N-1:0] SEEDS = make_seeds();

  logic rst_n;
  logic bist_en, ext_seed, scan_in, scan_strobe;
  logic [N-1:0] cut_in;
  logic pattern_valid, te, se, sce, done;
  logic [1:0] cut_resp, signature;
  tc_state_e state;
  logic [cnt_width(S)-1:0] seed_index;
  logic [cnt_width(S*N)-1:0] rom_addr;

  trc_bist #(.N(N), .NUM_SEEDS(S), .SEEDS(SEEDS)) dut (
    .clk, .rst_n, .bist_en, .ext_seed, .scan_in, .scan_strobe, .cut_in,
    .pattern_valid, .cut_resp, .signature, .state, .te, .se, .sce,
    .rom_addr, .seed_index, .done
  );

  // a stand-in CUT: parity of all inputs and of the odd ones
  always_comb begin
    cut_resp[1] = ^cut_in;
    cut_resp[0] = 1'b0;
    for (int i = 1; i < N; i += 2) cut_resp[0] ^= cut_in[i];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %s at %0t", NAME, what, $time);
    end
  endtask

  // seed bit b_i (i = 1..n) of seed number sd
  function automatic bit seed_bit(int sd, int i);
    return SEEDS[sd * N + (N - i)];
  endfunction

  // expected pattern j (0 .. 2n^2+n-1) of seed sd
  function automatic logic [N-1:0] expected(int sd, int j);
    bit start [1:N];
    logic [N-1:0] v;
    int r = j / (2 * N + 1);
    int t = j % (2 * N + 1);
    bit inv = 0;
    for (int i = 1; i <= N; i++) start[i] = seed_bit(sd, ((i - 1 - r) % N + N) % N + 1);
    if (t == 2 * N) t = 0;
    if (t > N) begin t -= N; inv = 1; end
    for (int i = 1; i <= N; i++)
      v[N-i] = inv ^ ((i <= t) ? !start[N - t + i] : start[i - t]);
    return v;
  endfunction

  task automatic run(input bit tester);
    int clocks = 0, pats = 0, j = 0, sd = 0, bits = 0, tick = 0, bit_in_seed = 0;
    rst_n = 0; bist_en = 0; ext_seed = tester; scan_in = 0; scan_strobe = 0;
    #1 rst_n = 1;
    @(posedge clk); #1;
    bist_en = 1;
    while (!done && clocks < 4 * CLOCKS_ROM + 20 * LOAD_BITS) begin
      scan_strobe = 0;
      if (tester && ++tick == 10) begin
        tick = 0;
        scan_strobe = 1;
        scan_in = seed_bit(sd, N - bit_in_seed);   // b_n first
      end
      #1;
      if (tester && scan_strobe && state == ST_LOAD) begin
        bits++;
        bit_in_seed++;
      end
      if (pattern_valid) begin
        if (sd < S) check(cut_in == expected(sd, j), $sformatf("seed %0d pattern %0d", sd, j));
        pats++;
        if (++j == 2 * N * N + N) begin
          j = 0; sd++; bit_in_seed = 0;
        end
      end
      @(posedge clk); #1;
      clocks++;
    end
    check(done, "done raised");
    check(sd == S, "all seeds applied");
    check(pats == PAT_CYCLES, $sformatf("pattern cycles %0d, expected %0d", pats, PAT_CYCLES));
    if (!tester) begin
      check(clocks == CLOCKS_ROM, $sformatf("clocks %0d, expected %0d", clocks, CLOCKS_ROM));
      $display("%s (n=%0d, s=%0d) on-chip seeds: %0d clocks, %0d pattern cycles, efficiency %.4f",
               NAME, N, S, clocks, pats, real'(pats) / real'(clocks));
    end else begin
      check(bits == LOAD_BITS, $sformatf("tester bits %0d, expected %0d", bits, LOAD_BITS));
      check(clocks <= PAT_CYCLES + 10 * LOAD_BITS && clocks > PAT_CYCLES + 10 * (LOAD_BITS - S),
            $sformatf("clocks %0d with the tester", clocks));
      $display("%s (n=%0d, s=%0d) tester seeds: %0d clocks, %0d BIST cycles, %0d tester bits",
               NAME, N, S, clocks, pats, bits);
    end
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    rst_n = 0; bist_en = 0; ext_seed = 0; scan_in = 0; scan_strobe = 0;
    repeat (2) @(posedge clk);
    run(0);
    run(1);
    finished = 1;
  end

endmodule
