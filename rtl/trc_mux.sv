// trc_mux - 4-to-1 serial-input multiplexer of the TRC scan register.
//
// Adding this multiplexer (and an inverter) in front of the first flip-flop
// F_1 is all it takes to turn the CUT's input scan register into a ring or
// twisted-ring counter; nothing is inserted between the register and the
// CUT. The four inputs are those of the original drawing: the ROM's serial
// seed bit, the tester's scan-in bit, the last flip-flop F_n fed back
// unchanged (shift) and F_n fed back through the inverter (twist).
// Purely combinational.
module trc_mux
  import trc_bist_pkg::*;
(
  input  mux_sel_e sel,
  input  logic     rom_bit,
  input  logic     scan_in,
  input  logic     fn,        // output of the last scan flip-flop F_n
  output logic     d          // serial input of F_1
);

  always_comb begin
    unique case (sel)
      SEL_ROM:   d = rom_bit;
      SEL_RING:  d = fn;
      SEL_TWIST: d = !fn;
      SEL_SCAN:  d = scan_in;
      default:   d = rom_bit;
    endcase
  end

endmodule
