// bist_control - BIST control logic: twist counter, shift counter and FSM.
//
// For every seed the scan register is run through Load (n cycles), then n
// rounds of [2n twists + one 1-bit shift], i.e. 2n^2 + n pattern cycles
// after n load cycles. The twist counter (modulo n) counts the Load cycles
// and each half of the Twist state and raises TE on its n-th count; it is
// held while SCE is high. The shift counter (modulo n) is advanced by SCE,
// once per Shift cycle, and raises SE on the n-th shift. This arrangement
// of two counters and the FSM follows the original block diagram.
//
// The block also decodes the FSM state into the multiplexer select. Load
// takes the seed from the ROM or, with ext_seed high, from the tester's scan
// input; Twist1/Twist2 select the inverted feedback and Shift the plain
// feedback. That decode is this design's own (the original multiplexer
// labels do not match the FSM codes).
//
// Seeds from a slow external tester: with ext_seed high the Load state
// advances only in cycles where scan_strobe is high (one tester bit has
// arrived); the pattern cycles then run at the full clock rate without the
// tester. This single-clock strobe scheme stands in for the separate tester
// clock and is this design's own choice.
//
// Outputs, all valid in the cycle they describe:
//   reg_en        the scan register moves at the next edge
//   mux_sel       serial-input source for the scan register
//   rom_en        the ROM counter advances (Load from ROM)
//   pattern_valid the register holds a pattern applied to the CUT this cycle
//                 (Twist1, Twist2, Shift)
//   seed_done     last cycle of the last shift for the current seed
//
// The concurrent assertions below use rst_n in "disable iff"; lint reports
// this as the asynchronous reset also being used synchronously. It is a
// simulation-only use and adds no hardware.
module bist_control
  import trc_bist_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  input  logic      ext_seed,
  input  logic      scan_strobe,
  output tc_state_e state,
  output mux_sel_e  mux_sel,
  output logic      reg_en,
  output logic      rom_en,
  output logic      pattern_valid,
  output logic      seed_done,
  output logic      te,
  output logic      se,
  output logic      sce
);

  localparam int unsigned K = cnt_width(N);

  logic         step;
  logic [K-1:0] twist_count;
  logic [K-1:0] shift_count;

  assign step = en && ((state != ST_LOAD) || !ext_seed || scan_strobe);

  bist_counter #(.MODULUS(N), .W(K)) u_twist_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (step && !sce),
    .count (twist_count),
    .tc    (te)
  );

  bist_counter #(.MODULUS(N), .W(K)) u_shift_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (step && sce),
    .count (shift_count),
    .tc    (se)
  );

  test_control_fsm u_fsm (
    .clk   (clk),
    .rst_n (rst_n),
    .step  (step),
    .te    (te),
    .se    (se),
    .state (state),
    .sce   (sce)
  );

  always_comb begin
    unique case (state)
      ST_LOAD:   mux_sel = ext_seed ? SEL_SCAN : SEL_ROM;
      ST_SHIFT:  mux_sel = SEL_RING;
      default:   mux_sel = SEL_TWIST;
    endcase
  end

  assign reg_en        = step;
  assign rom_en        = step && (state == ST_LOAD) && !ext_seed;
  assign pattern_valid = en && (state != ST_LOAD);
  assign seed_done     = step && sce && se;

  // The twist counter is idle in Shift and the shift counter only moves in
  // Shift, so on every entry to Twist1 the twist counter is at zero.
  property p_twist_counter_idle_in_shift;
    @(posedge clk) disable iff (!rst_n) (state == ST_SHIFT) |-> (twist_count == '0);
  endproperty
  assert property (p_twist_counter_idle_in_shift);

  // A new seed always starts with the shift counter at zero.
  property p_shift_counter_idle_in_load;
    @(posedge clk) disable iff (!rst_n) (state == ST_LOAD) |-> (shift_count == '0);
  endproperty
  assert property (p_shift_counter_idle_in_load);

endmodule
