// test_control_fsm - the Moore state machine of the TRC BIST control logic.
//
// Four states in two flip-flops, with the original two-bit codes:
//   Load   (00): the seed is shifted serially into the n-bit scan register.
//                TE (twist counter at its n-th count) moves on to Twist1.
//   Twist1 (01): the register runs as a twisted-ring (Johnson) counter.
//                After n twists (TE) it moves to Twist2.
//   Twist2 (10): n more twists; after these 2n twists the register holds the
//                pattern it held on entering Twist1 again. TE moves to Shift.
//   Shift  (11): one cycle, one 1-bit ring shift. SE (the n-th shift) returns
//                to Load for the next seed, otherwise back to Twist1.
// SCE ("shift-counter enable") is high exactly in the Shift state; it
// advances the shift counter and holds the twist counter. The states, their
// codes and the transitions follow the original state diagram; decoding SCE
// as "state == Shift" and using TE for the unlabelled Twist1 -> Twist2
// transition are this design's reading of it.
//
// Interface: step is a clock enable; nothing changes in a cycle where it is
// low. Asynchronous active-low reset to Load. state and sce are registered
// outputs (sce is a decode of the state register only).
module test_control_fsm
  import trc_bist_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      step,
  input  logic      te,
  input  logic      se,
  output tc_state_e state,
  output logic      sce
);

  tc_state_e state_nx;

  always_comb begin
    state_nx = state;
    unique case (state)
      ST_LOAD:   if (te) state_nx = ST_TWIST1;
      ST_TWIST1: if (te) state_nx = ST_TWIST2;
      ST_TWIST2: if (te) state_nx = ST_SHIFT;
      ST_SHIFT:  state_nx = se ? ST_LOAD : ST_TWIST1;
      default:   state_nx = ST_LOAD;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= ST_LOAD;
    else if (step)  state <= state_nx;
  end

  assign sce = (state == ST_SHIFT);

endmodule
