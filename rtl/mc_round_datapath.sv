// mc_round_datapath: the 64-bit state register of mCrypton and the one set of
// round components that every step of the encryption reuses.
//
// One instance each of substitution (gamma), bit permutation (pi), row-to-column
// transposition (tau) and key addition (sigma) sits in a chain in front of the
// state register. The operation op picks what the register loads:
//   DP_LOAD   plaintext
//   DP_KEY0   state ^ key0                         (initial key addition)
//   DP_ROUND  sigma_K(tau(pi(gamma(state))))       (one full round)
//   DP_TRANS  tau(state)                           (output transformation)
//   DP_PERM   pi(state)                            (output transformation)
//   DP_OUT    the ciphertext register takes the state
//   DP_HOLD   nothing changes
// The output transformation tau, pi, tau reuses the round's own pi and tau by
// feeding them the state directly, one component per cycle.
// Resource sharing with the key schedule: while sub_key_sel is high the
// substitution unit sees the key word ks_word in row 0 (rows 1-3 zero) instead
// of the state, and row 0 of its output goes back on ks_sbox. The state must
// not run a round in the same cycle; an assertion checks that.
// Timing: every operation takes one clock cycle; state and ciphertext are
// registered, ks_sbox is combinational from ks_word.
module mc_round_datapath
  import mc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  dp_op_t             op,
  input  logic               sub_key_sel,
  input  logic [BLOCK_W-1:0] plaintext,
  input  logic [KEY_W-1:0]   key0,
  input  logic [KEY_W-1:0]   round_key,
  input  row_t               ks_word,
  output row_t               ks_sbox,
  output logic [BLOCK_W-1:0] state,
  output logic [BLOCK_W-1:0] ciphertext
);

  state_t state_q, state_d;
  logic [BLOCK_W-1:0] ct_q, ct_d;
  state_t sub_in, sub_out, pi_in, pi_out, tau_in, tau_out, ka_in, ka_out;
  logic [KEY_W-1:0] ka_key;

  assign sub_in = sub_key_sel ? state_t'({ks_word, 48'h0}) : state_q;
  assign pi_in  = (op == DP_PERM)  ? state_q : sub_out;
  assign tau_in = (op == DP_TRANS) ? state_q : pi_out;
  assign ka_in  = (op == DP_KEY0)  ? state_q : tau_out;
  assign ka_key = (op == DP_KEY0)  ? key0    : round_key;

  mc_substitution u_gamma (.din(sub_in), .dout(sub_out));
  mc_permutation  u_pi    (.din(pi_in),  .dout(pi_out));
  mc_transposition u_tau  (.din(tau_in), .dout(tau_out));
  mc_key_addition u_sigma (.din(ka_in), .round_key(ka_key), .dout(ka_out));

  assign ks_sbox = sub_out[0];

  always_comb begin
    state_d = state_q;
    ct_d    = ct_q;
    unique case (op)
      DP_LOAD:           state_d = plaintext;
      DP_KEY0, DP_ROUND: state_d = ka_out;
      DP_TRANS:          state_d = tau_out;
      DP_PERM:           state_d = pi_out;
      DP_OUT:            ct_d    = state_q;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      ct_q    <= '0;
    end else begin
      state_q <= state_d;
      ct_q    <= ct_d;
    end
  end

  assign state      = state_q;
  assign ciphertext = ct_q;

  // The substitution unit serves either the key schedule or the round.
  a_no_sbox_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    !(sub_key_sel && op == DP_ROUND));

endmodule
