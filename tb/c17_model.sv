// c17_model - behavioural model of the ISCAS-85 benchmark c17, used as the
// circuit under test of the five-input example. Six two-input NAND gates;
// inputs G1, G2, G3, G6, G7 and outputs G22, G23. The netlist is the
// standard published benchmark; it is a testbench model, not part of the
// BIST logic.
module c17_model (
  input  logic g1, g2, g3, g6, g7,
  output logic g22, g23
);

  logic g10, g11, g16, g19;

  assign g10 = !(g1 && g3);
  assign g11 = !(g3 && g6);
  assign g16 = !(g2 && g11);
  assign g19 = !(g11 && g7);
  assign g22 = !(g10 && g16);
  assign g23 = !(g16 && g19);

endmodule
