// mc_ref_pkg: independent reference model of mCrypton-64 encryption for the
// testbenches. It works on flat 64-bit words with explicit index arithmetic,
// types all four S-box tables out in full, and writes the bit permutation one
// bit at a time, so it shares no code with the RTL.
// Nibble (i,j) of a block sits at bits [63-4*(4i+j) -: 4].
package mc_ref_pkg;

  function automatic logic [3:0] ref_sbox(int sel, logic [3:0] x);
    logic [63:0] t;
    case (sel % 4)
      0: t = 64'h4F38DAC0B57E2619;
      1: t = 64'h1C7A6D53FB20849E;
      2: t = 64'h7EC209DA3F5864B1;
      default: t = 64'hB0A7D642CE3915F8;
    endcase
    return t[63 - 4*x -: 4];
  endfunction

  function automatic logic [3:0] get_n(logic [63:0] s, int i, int j);
    return s[63 - 4*(4*i + j) -: 4];
  endfunction

  function automatic logic [63:0] set_n(logic [63:0] s, int i, int j, logic [3:0] v);
    logic [63:0] r;
    r = s;
    r[63 - 4*(4*i + j) -: 4] = v;
    return r;
  endfunction

  function automatic logic [63:0] ref_gamma(logic [63:0] s);
    logic [63:0] r;
    r = '0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        r = set_n(r, i, j, ref_sbox(i + j, get_n(s, i, j)));
    return r;
  endfunction

  // Bit permutation: in column j, output nibble i bit b is the XOR of input
  // bits b of the three nibbles k whose mask m((i+j+k) mod 4) has bit b set;
  // mask m(n) is all ones except bit n (m0 = 1110, ..., m3 = 0111).
  function automatic logic [63:0] ref_pi(logic [63:0] s);
    logic [63:0] r;
    logic [3:0] o;
    int mi;
    r = '0;
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 4; i++) begin
        o = '0;
        for (int b = 0; b < 4; b++)
          for (int k = 0; k < 4; k++) begin
            mi = (i + j + k) % 4;           // masks 1110,1101,1011,0111
            if (b != mi) o[b] = o[b] ^ get_n(s, k, j)[b];
          end
        r = set_n(r, i, j, o);
      end
    return r;
  endfunction

  function automatic logic [63:0] ref_tau(logic [63:0] s);
    logic [63:0] r;
    r = '0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        r = set_n(r, j, i, get_n(s, i, j));
    return r;
  endfunction

  function automatic logic [15:0] ref_const(int r);  // r = 1..12
    logic [3:0] c [12] = '{4'h1, 4'h2, 4'h4, 4'h8, 4'h3, 4'h6,
                           4'hC, 4'hB, 4'h5, 4'hA, 4'h7, 4'hE};
    return {4{c[r-1]}};
  endfunction

  // Round keys 0..12 of the key schedule.
  function automatic void ref_round_keys(logic [63:0] key, output logic [63:0] rk [13]);
    logic [15:0] u [4];
    logic [15:0] t;
    for (int w = 0; w < 4; w++) u[w] = key[63 - 16*w -: 16];
    rk[0] = key;
    for (int r = 1; r <= 12; r++) begin
      t = {ref_sbox(0, u[0][15:12]), ref_sbox(1, u[0][11:8]),
           ref_sbox(2, u[0][7:4]),   ref_sbox(3, u[0][3:0])} ^ ref_const(r);
      rk[r] = {u[1] ^ t, u[2] ^ t, u[3] ^ t, u[0] ^ t};
      t = u[0];
      u[0] = u[1]; u[1] = u[2]; u[2] = u[3];
      u[3] = (t << 3) | (t >> 13);
    end
  endfunction

  function automatic logic [63:0] ref_encrypt(logic [63:0] pt, logic [63:0] key);
    logic [63:0] rk [13];
    logic [63:0] s;
    ref_round_keys(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 12; r++) s = ref_tau(ref_pi(ref_gamma(s))) ^ rk[r];
    return ref_tau(ref_pi(ref_tau(s)));
  endfunction

endpackage
