// mc_key_const_rom: the memory of key-schedule round constants.
//
// One 16-bit constant per round, DEPTH (12) words in all. Word a, used by
// round a+1, is the GF(2^4) element x^a (modulo x^4 + x + 1) repeated in all
// four nibbles: 1111, 2222, 4444, 8888, 3333, 6666, CCCC, BBBB, 5555, AAAA,
// 7777, EEEE (hex). The contents are computed at elaboration, so no data file
// is needed; the array is read asynchronously.
// Interface: addr (0..DEPTH-1) in, data out; an address past the end reads 0.
module mc_key_const_rom
  import mc_pkg::*;
#(
  parameter int unsigned DEPTH = ROUNDS
) (
  input  logic [3:0] addr,
  output row_t       data
);

  row_t rom [DEPTH];

  always_comb begin
    nibble_t c;
    c = 4'h1;
    for (int a = 0; a < DEPTH; a++) begin
      rom[a] = {4{c}};
      c = gf16_xtime(c);
    end
  end

  assign data = (32'(addr) < DEPTH) ? rom[addr] : '0;

endmodule
