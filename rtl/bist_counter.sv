// bist_counter - enabled modulo-MODULUS counter with a terminal-count flag.
//
// This is the k-bit counter (k = ceil(log2 n)) of the BIST control logic; two
// of them are used, the twist counter, whose flag is "Twist Enable" (TE), and
// the shift counter, whose flag is "Shift Enable" (SE). The original
// detects the terminal count with an AND of the k counter bits, which is
// exact when n is a power of two; here the flag is a compare against
// MODULUS-1 and the counter wraps to zero after it, so any n works without
// redesigning the counter.
//
// Interface: en advances the count by one at the rising clock edge;
// tc is combinational and high while count == MODULUS-1, so it is high in the
// same cycle as the MODULUS-th enabled cycle. rst_n is an asynchronous,
// active-low reset to zero.
module bist_counter #(
  parameter int unsigned MODULUS = 5,
  parameter int unsigned W       = trc_bist_pkg::cnt_width(MODULUS)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] count,
  output logic         tc
);

  localparam logic [W-1:0] LAST = W'(MODULUS - 1);

  assign tc = (count == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      count <= '0;
    else if (en)     count <= tc ? '0 : count + 1'b1;
  end

endmodule
