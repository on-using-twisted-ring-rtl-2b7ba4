// scan_register - the n-bit input scan register F_1 .. F_n of the CUT.
//
// A plain shift register: on each enabled clock edge F_1 takes the serial
// input and F_i takes F_{i-1}. The register's parallel output drives the CUT
// inputs directly. The bit order is chosen so that a pattern written
// b_1 b_2 ... b_n reads left to right: q[N-1] is F_1 (b_1) and q[0] is F_n
// (b_n). A shift therefore moves the pattern one place to the right, and
// loading a seed serially takes n cycles with b_n entering first.
//
// Interface: en is a clock enable, sin the serial input, so = F_n.
// Asynchronous active-low reset to all zeros (this design's choice: the
// register is always loaded with a seed before it is used).
module scan_register #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         sin,
  output logic [N-1:0] q,
  output logic         so
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (en)  q <= {sin, q[N-1:1]};
  end

  assign so = q[0];

endmodule
