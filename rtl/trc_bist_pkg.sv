// trc_bist_pkg - types shared by the twisted-ring-counter (TRC) BIST blocks.
//
// tc_state_e is the state of the test control FSM with the two-bit codes
// of the original design: Load = 00, the Twist state split into Twist1 = 01
// and Twist2 = 10, and Shift = 11. The two state bits are what steer the
// serial-input multiplexer of the scan register.
//
// mux_sel_e names the four sources of that multiplexer. Their two-bit codes
// are the labels of the original multiplexer drawing (01 = F_n fed back,
// 10 = F_n inverted, 11 = scan in, 00 = ROM). Which source each FSM state
// selects is decoded in bist_control, because the state codes and these
// labels do not line up one to one.
package trc_bist_pkg;

  typedef enum logic [1:0] {
    ST_LOAD   = 2'b00,
    ST_TWIST1 = 2'b01,
    ST_TWIST2 = 2'b10,
    ST_SHIFT  = 2'b11
  } tc_state_e;

  typedef enum logic [1:0] {
    SEL_ROM   = 2'b00,  // serial seed bit from the on-chip ROM
    SEL_RING  = 2'b01,  // F_n fed back unchanged: ring counter, "shift"
    SEL_TWIST = 2'b10,  // F_n fed back inverted: Johnson counter, "twist"
    SEL_SCAN  = 2'b11   // serial seed bit from the external tester
  } mux_sel_e;

  // Width of a counter that must hold the values 0 .. n-1 (k = ceil(log2 n),
  // at least 1).
  function automatic int unsigned cnt_width(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
