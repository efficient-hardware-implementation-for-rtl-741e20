// mc_sbox: one 16x4 S-box ROM of the mCrypton substitution layer.
//
// SEL chooses which of the four S-boxes the ROM holds: S0 and S1 are the
// cipher's stored tables, S2 and S3 are their inverses (see mc_pkg). The ROM is
// an array filled from the package at elaboration and read asynchronously, so
// a lookup is purely combinational (four 4-input LUTs on an FPGA).
// Interface: x is the input nibble, y = S_SEL(x). No clock, no latency.
module mc_sbox
  import mc_pkg::*;
#(
  parameter int unsigned SEL = 0
) (
  input  nibble_t x,
  output nibble_t y
);

  localparam sbox_table_t TABLE = sbox_table(SEL);

  nibble_t rom [16];

  always_comb begin
    for (int i = 0; i < 16; i++) rom[i] = TABLE[i];
  end

  assign y = rom[x];

endmodule
