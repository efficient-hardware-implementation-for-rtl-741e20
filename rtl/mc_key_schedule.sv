// mc_key_schedule: on-the-fly round key generation for mCrypton-64.
//
// A 64-bit key register U = (U0, U1, U2, U3) of four 16-bit words is loaded
// with the user key; the user key itself is the round key of the initial key
// addition. For each of the twelve rounds r (one KS_STEP each):
//     T        = S(U0) ^ C(r)                      (C from mc_key_const_rom)
//     K(r)     = (U1 ^ T, U2 ^ T, U3 ^ T, U0 ^ T)  (registered in round_key)
//     U        = (U1, U2, U3, U0 <<< 3)            (word and bit rotation)
// S(U0) is row 0 of the substitution layer, S0..S3 on the four nibbles. This
// block has no S-boxes of its own: it sends U0 out on u0 and takes S(U0) back
// on s_u0 from the substitution unit of the round datapath, which it shares
// with the data in a cycle where the data does not use it.
// The two operations (an S-box step that makes the round key, a rotation that
// updates the key words) and the twelve-word constant memory follow the
// architecture described; the exact word combination and the rotation amount
// are this design's choice.
// Timing: round_key and key_reg change on the clock edge that ends a KS_STEP
// or KS_LOAD cycle; u0 is a direct view of the register.
module mc_key_schedule
  import mc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  ks_op_t           op,
  input  logic [3:0]       round_idx,  // 1..ROUNDS during KS_STEP
  input  logic [KEY_W-1:0] key_in,
  output row_t             u0,         // to the shared substitution unit
  input  row_t             s_u0,       // S(U0) back from it
  output logic [KEY_W-1:0] key_reg,    // U, the initial round key after KS_LOAD
  output logic [KEY_W-1:0] round_key
);

  localparam int unsigned ROT = 3;

  typedef row_t [0:3] key_words_t;

  function automatic row_t rotl16(row_t w);
    logic [15:0] f;
    f = w;
    return {f[15-ROT:0], f[15:16-ROT]};
  endfunction

  key_words_t u_q, u_d;
  logic [KEY_W-1:0] rk_q, rk_d;
  row_t c_round, t;

  mc_key_const_rom u_const (
    .addr(round_idx - 4'd1),
    .data(c_round)
  );

  assign u0 = u_q[0];
  assign t  = s_u0 ^ c_round;

  always_comb begin
    u_d  = u_q;
    rk_d = rk_q;
    unique case (op)
      KS_LOAD: u_d = key_in;
      KS_STEP: begin
        rk_d = {u_q[1] ^ t, u_q[2] ^ t, u_q[3] ^ t, u_q[0] ^ t};
        u_d  = {u_q[1], u_q[2], u_q[3], rotl16(u_q[0])};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_q  <= '0;
      rk_q <= '0;
    end else begin
      u_q  <= u_d;
      rk_q <= rk_d;
    end
  end

  assign key_reg   = u_q;
  assign round_key = rk_q;

endmodule
