// mc_pkg: types and constants shared by the mCrypton-64 encryption core.
//
// The 64-bit block is a 4x4 array of nibbles. Row i holds nibbles a(i,0)..a(i,3);
// a(0,0) occupies bits [63:60] of the flat vector and a(3,3) bits [3:0], so the
// packed state_t below casts straight to and from a 64-bit word.
//
// S-boxes: the cipher uses four 4-bit S-boxes with S2 = S0^-1 and S3 = S1^-1.
// Only S0 and S1 are stored here; S2 and S3 are derived by inverting them in a
// constant function, which is exactly the relation the algorithm defines.
// Round constants of the key schedule: constant i (i = 1..12) is the nibble
// x^(i-1) in GF(2^4) modulo x^4 + x + 1, repeated in all four nibbles of a
// 16-bit word. The S-box and constant values follow the published mCrypton
// cipher; this design's own choices are the bit ordering and the controller
// encodings below.
package mc_pkg;

  localparam int unsigned BLOCK_W = 64;   // block size
  localparam int unsigned KEY_W   = 64;   // mCrypton-64 key size
  localparam int unsigned ROUNDS  = 12;   // number of rounds
  localparam int unsigned LATENCY = 30;   // cycles from enable to ciphertext

  typedef logic [3:0]            nibble_t;
  typedef logic [0:3][3:0]       row_t;    // 16-bit row, nibble 0 in the MSBs
  typedef logic [0:3][0:3][3:0]  state_t;  // [row][column][bit]

  typedef logic [0:15][3:0]      sbox_table_t;

  localparam sbox_table_t S0_TABLE = {4'h4, 4'hF, 4'h3, 4'h8, 4'hD, 4'hA, 4'hC, 4'h0,
                                      4'hB, 4'h5, 4'h7, 4'hE, 4'h2, 4'h6, 4'h1, 4'h9};
  localparam sbox_table_t S1_TABLE = {4'h1, 4'hC, 4'h7, 4'hA, 4'h6, 4'hD, 4'h5, 4'h3,
                                      4'hF, 4'hB, 4'h2, 4'h0, 4'h8, 4'h4, 4'h9, 4'hE};

  // Inverse of a bijective 4-bit table.
  function automatic sbox_table_t invert_table(sbox_table_t t);
    sbox_table_t r;
    r = '0;
    for (int x = 0; x < 16; x++) r[t[x]] = nibble_t'(x);
    return r;
  endfunction

  // Table of S-box number sel (0..3).
  function automatic sbox_table_t sbox_table(int unsigned sel);
    case (sel % 4)
      0:       return S0_TABLE;
      1:       return S1_TABLE;
      2:       return invert_table(S0_TABLE);
      default: return invert_table(S1_TABLE);
    endcase
  endfunction

  // Multiply a GF(2^4) element by x, modulo x^4 + x + 1.
  function automatic nibble_t gf16_xtime(nibble_t a);
    return {a[2:0], 1'b0} ^ (a[3] ? 4'b0011 : 4'b0000);
  endfunction

  // Masks of the bit permutation: m0 = 1110, m1 = 1101, m2 = 1011, m3 = 0111.
  localparam logic [0:3][3:0] PI_MASK = {4'b1110, 4'b1101, 4'b1011, 4'b0111};

  // Operation of the round datapath in one cycle.
  typedef enum logic [2:0] {
    DP_HOLD,   // keep the state
    DP_LOAD,   // state <- plaintext
    DP_KEY0,   // state <- state ^ initial key
    DP_ROUND,  // state <- sigma_K(tau(pi(gamma(state))))
    DP_TRANS,  // state <- tau(state)   (output transformation)
    DP_PERM,   // state <- pi(state)    (output transformation)
    DP_OUT     // ciphertext register <- state
  } dp_op_t;

  // Operation of the key schedule in one cycle.
  typedef enum logic [1:0] {
    KS_HOLD,   // keep the key register and round key
    KS_LOAD,   // key register <- user key
    KS_STEP    // produce the next round key and rotate the key register
  } ks_op_t;

endpackage
