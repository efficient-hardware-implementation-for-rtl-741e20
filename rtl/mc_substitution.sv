// mc_substitution: the nonlinear substitution layer gamma of mCrypton.
//
// The 64-bit input is a 4x4 nibble array; nibble (i,j) passes through S-box
// S((i+j) mod 4), so row i uses S(i), S(i+1), S(i+2), S(i+3) on its four
// nibbles, as the cipher defines gamma. Sixteen mc_sbox ROMs of 16x4 bits
// do the work in parallel (64 LUT outputs in total).
// Interface: 64-bit din in, 64-bit dout out; combinational, no latency.
module mc_substitution
  import mc_pkg::*;
(
  input  state_t din,
  output state_t dout
);

  for (genvar i = 0; i < 4; i++) begin : g_row
    for (genvar j = 0; j < 4; j++) begin : g_col
      mc_sbox #(.SEL((i + j) % 4)) u_sbox (
        .x(din[i][j]),
        .y(dout[i][j])
      );
    end
  end

endmodule
