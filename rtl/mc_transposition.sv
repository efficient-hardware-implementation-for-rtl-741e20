// mc_transposition: the row-to-column transposition tau of mCrypton.
//
// Nibble (i,j) of the 4x4 array moves to position (j,i). The block is pure
// wiring: it costs no logic, only a reordering of 4-bit groups.
// Interface: 64-bit din in, 64-bit dout out; combinational, no latency.
module mc_transposition
  import mc_pkg::*;
(
  input  state_t din,
  output state_t dout
);

  always_comb begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        dout[j][i] = din[i][j];
  end

endmodule
