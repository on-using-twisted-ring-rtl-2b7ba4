// seed_rom - on-chip seed store with its ROM counter, read one bit a cycle.
//
// The seeds are applied serially: while a seed is loaded the ROM counter is
// clocked at the scan rate and the ROM delivers one seed bit per cycle to
// the scan register's multiplexer. The ROM is DEPTH x 1 bit (DEPTH =
// NUM_SEEDS * N), its contents the constant parameter CONTENTS, with bit a
// being the bit presented at address a. Packing the seeds in load order
// (b_n of seed 0 at address 0, b_1 of seed 0 at address N-1, then seed 1,
// ...) is done by the top level. The counter wraps to address 0 after the
// last bit. A 1-bit-wide ROM is this design's reading of the original
// drawing, where a single line runs from the ROM to the multiplexer.
//
// Interface: en advances the address at the clock edge; bit_out and last
// are combinational from the current address. Asynchronous active-low reset to
// address 0.
module seed_rom #(
  parameter int unsigned     DEPTH    = 5,
  parameter logic [DEPTH-1:0] CONTENTS = 5'b01100,
  parameter int unsigned     AW       = trc_bist_pkg::cnt_width(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [AW-1:0] addr,
  output logic          bit_out,
  output logic          last      // addr is the last ROM address
);

  bist_counter #(.MODULUS(DEPTH), .W(AW)) u_rom_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .count (addr),
    .tc    (last)
  );

  assign bit_out = CONTENTS[addr];

endmodule
