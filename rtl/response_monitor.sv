// response_monitor - multiple-input signature register (MISR) for the CUT's
// r response bits.
//
// Test-per-clock BIST captures one response per clock; this monitor folds
// each one into an R-bit signature: the register shifts left by one, the bit
// shifted out is fed back through the characteristic polynomial POLY
// (Galois form, POLY holds the coefficients of x^(R-1) .. x^0), and the
// response vector is XORed in. The response monitor is only named by the
// original design; using a MISR, its polynomial and its reset value are
// this design's choices.
//
// Interface: en captures resp at the clock edge (high in every cycle that
// applies a pattern). sig is the registered signature. Asynchronous
// active-low reset to zero.
module response_monitor #(
  parameter int unsigned    R    = 2,
  parameter logic [R-1:0]   POLY = 2'b11   // x^2 + x + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [R-1:0] resp,
  output logic [R-1:0] sig
);

  logic [R-1:0] sig_nx;

  always_comb begin
    sig_nx = {sig[R-2:0], 1'b0} ^ resp;
    if (sig[R-1]) sig_nx = sig_nx ^ POLY;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sig <= '0;
    else if (en)  sig <= sig_nx;
  end

endmodule
