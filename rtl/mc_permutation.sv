// mc_permutation: the column-wise bit permutation pi of mCrypton.
//
// Column j of the 4x4 nibble array, read top to bottom as (a0, a1, a2, a3), is
// replaced by (b0, b1, b2, b3) with
//     b_i = XOR over k of ( m((j + i + k) mod 4) AND a_k ),
// where the masks are m0 = 1110, m1 = 1101, m2 = 1011, m3 = 0111. Each output
// bit is therefore the XOR of three input bits: the block is wiring, constant
// AND masks and XOR gates only, with no shifter. pi is its own inverse.
// Interface: 64-bit din in, 64-bit dout out; combinational, no latency.
module mc_permutation
  import mc_pkg::*;
(
  input  state_t din,
  output state_t dout
);

  always_comb begin
    for (int j = 0; j < 4; j++) begin      // column
      for (int i = 0; i < 4; i++) begin    // output row
        nibble_t acc;
        acc = '0;
        for (int k = 0; k < 4; k++) acc ^= PI_MASK[(j + i + k) % 4] & din[k][j];
        dout[i][j] = acc;
      end
    end
  end

endmodule
