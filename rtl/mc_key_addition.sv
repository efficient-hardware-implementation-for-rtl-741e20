// mc_key_addition: the key addition sigma of mCrypton.
//
// The state is combined with a 64-bit round key by a bitwise XOR, as the
// cipher defines it.
// Interface: 64-bit din and round_key in, 64-bit dout out; combinational.
module mc_key_addition
  import mc_pkg::*;
(
  input  state_t           din,
  input  logic [KEY_W-1:0] round_key,
  output state_t           dout
);

  assign dout = din ^ round_key;

endmodule
