// trc_bist - test-per-clock BIST pattern generator built from a reseeded
// twisted-ring counter (TRC), with its seed source and response monitor.
//
// The CUT's n-bit input register is reused as the pattern generator. For
// each seed: the seed is loaded serially (n cycles, from the on-chip ROM or
// from an external tester), then the register runs n rounds of 2n twists
// (Johnson-counter steps, F_1 <= not F_n) followed by one 1-bit ring shift
// (F_1 <= F_n). That applies 2n^2 + n patterns per seed, one per clock, to
// the CUT, whose r response bits are compacted by a MISR. After NUM_SEEDS
// seeds the generator stops and raises done. The pattern efficiency (pattern
// cycles over all cycles) is (2n^2+n)/(2n^2+2n) with on-chip seeds.
//
// Parameters: N is the number of CUT inputs (register length), NUM_SEEDS the
// number of seeds in the ROM, SEEDS the seeds, seed i in bits
// [i*N +: N] written MSB first as b_1..b_n (e.g. 5'b01100 is the pattern
// 01100). The defaults are the five-input c17 example, whose whole test set
// is embedded by the single seed 01100. R and RESP_POLY size the response
// monitor (this design's choice, R >= 2).
//
// Ports:
//   bist_en      run enable; everything holds while low
//   ext_seed     1: seeds come from the tester on scan_in; 0: from the ROM
//                (hold constant during a run)
//   scan_in, scan_strobe  tester bit, taken in a Load cycle with the strobe
//   cut_in       the scan register, wired straight to the CUT inputs
//                (cut_in[N-1] = b_1 = F_1)
//   pattern_valid  cut_in holds a test pattern this cycle
//   cut_resp     CUT outputs, captured when pattern_valid
//   signature    MISR contents
//   state        FSM state (00 Load, 01 Twist1, 10 Twist2, 11 Shift)
//   te, se, sce  Twist Enable, Shift Enable, Shift-Counter Enable
//   rom_addr     ROM counter (next seed bit to be loaded)
//   seed_index   number of seeds completed so far (mod NUM_SEEDS)
//   done         all NUM_SEEDS seeds applied; sticky until reset
// Single clock, asynchronous active-low reset. Everything except the stop
// after NUM_SEEDS seeds, the strobe for tester seeds and the MISR follows
// the original architecture.
//
// The concurrent assertions below use rst_n in "disable iff"; lint reports
// this as the asynchronous reset also being used synchronously. It is a
// simulation-only use and adds no hardware.
module trc_bist
  import trc_bist_pkg::*;
#(
  parameter int unsigned             N         = 5,
  parameter int unsigned             NUM_SEEDS = 1,
  parameter logic [NUM_SEEDS*N-1:0]  SEEDS     = 5'b01100,
  parameter int unsigned             R         = 2,
  parameter logic [R-1:0]            RESP_POLY = 2'b11
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               bist_en,
  input  logic                               ext_seed,
  input  logic                               scan_in,
  input  logic                               scan_strobe,
  output logic [N-1:0]                       cut_in,
  output logic                               pattern_valid,
  input  logic [R-1:0]                       cut_resp,
  output logic [R-1:0]                       signature,
  output tc_state_e                          state,
  output logic                               te,
  output logic                               se,
  output logic                               sce,
  output logic [cnt_width(NUM_SEEDS*N)-1:0]  rom_addr,
  output logic [cnt_width(NUM_SEEDS)-1:0]    seed_index,
  output logic                               done
);

  localparam int unsigned DEPTH = NUM_SEEDS * N;
  localparam int unsigned AW    = cnt_width(DEPTH);

  // ROM contents in load order: for each seed, b_n first and b_1 last. With
  // b_1 stored at the seed's most significant bit this is exactly the seed
  // vector read from its least significant bit upwards.
  localparam logic [DEPTH-1:0] ROM_CONTENTS = SEEDS;

  logic     en;
  mux_sel_e mux_sel;
  logic     reg_en, rom_en, seed_done;
  logic     rom_bit, rom_last, sin, fn;
  logic     last_seed;

  assign en = bist_en && !done;

  bist_control #(.N(N)) u_control (
    .clk           (clk),
    .rst_n         (rst_n),
    .en            (en),
    .ext_seed      (ext_seed),
    .scan_strobe   (scan_strobe),
    .state         (state),
    .mux_sel       (mux_sel),
    .reg_en        (reg_en),
    .rom_en        (rom_en),
    .pattern_valid (pattern_valid),
    .seed_done     (seed_done),
    .te            (te),
    .se            (se),
    .sce           (sce)
  );

  seed_rom #(.DEPTH(DEPTH), .CONTENTS(ROM_CONTENTS), .AW(AW)) u_rom (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (rom_en),
    .addr    (rom_addr),
    .bit_out (rom_bit),
    .last    (rom_last)
  );

  trc_mux u_mux (
    .sel     (mux_sel),
    .rom_bit (rom_bit),
    .scan_in (scan_in),
    .fn      (fn),
    .d       (sin)
  );

  scan_register #(.N(N)) u_scan_reg (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (reg_en),
    .sin   (sin),
    .q     (cut_in),
    .so    (fn)
  );

  response_monitor #(.R(R), .POLY(RESP_POLY)) u_monitor (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (pattern_valid),
    .resp  (cut_resp),
    .sig   (signature)
  );

  // Seed counter: counts completed seeds and stops the generator after the
  // last one.
  bist_counter #(.MODULUS(NUM_SEEDS), .W(cnt_width(NUM_SEEDS))) u_seed_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (seed_done),
    .count (seed_index),
    .tc    (last_seed)
  );

  // With seeds from the ROM, the ROM counter reaches its last address
  // exactly when the last bit of the last seed is loaded.
  property p_rom_wraps_with_seeds;
    @(posedge clk) disable iff (!rst_n)
      (rom_en && rom_last) |-> (last_seed && te);
  endproperty
  assert property (p_rom_wraps_with_seeds);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       done <= 1'b0;
    else if (seed_done && last_seed)  done <= 1'b1;
  end

endmodule
