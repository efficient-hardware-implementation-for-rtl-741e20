// mcrypton_top: mCrypton-64 block encryption core (64-bit block, 64-bit key).
//
// Ports: plaintext and key (64 bits each) and a one-bit enable in, the 64-bit
// ciphertext out, as the architecture describes; clk, the asynchronous
// active-low reset rst_n and the done and busy flags are this design's additions.
// Hold plaintext and key stable and raise enable for at least one cycle while
// the core is idle; the ciphertext register is updated and done pulses high
// LATENCY = 30 cycles after the edge that sampled enable. The ciphertext stays
// until the next block completes. Holding enable high runs one block every 30
// cycles (64 bits per 30 cycles, about 644 Mbit/s at 302 MHz).
// Inside: mc_controller sequences mc_round_datapath (state register with one
// shared substitution, permutation, transposition and key-addition unit) and
// mc_key_schedule (key register, round constant memory), which borrows the
// datapath's substitution unit for its S-box step.
module mcrypton_top
  import mc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic [BLOCK_W-1:0] plaintext,
  input  logic [KEY_W-1:0]   key,
  output logic [BLOCK_W-1:0] ciphertext,
  output logic               done,
  output logic               busy
);

  dp_op_t           dp_op;
  ks_op_t           ks_op;
  logic             sub_key_sel;
  logic [3:0]       round_idx;
  row_t             ks_word, ks_sbox;
  logic [KEY_W-1:0] key_reg, round_key;

  mc_controller u_ctrl (
    .clk, .rst_n, .enable,
    .dp_op, .ks_op, .sub_key_sel, .round_idx, .busy, .done
  );

  mc_key_schedule u_ks (
    .clk, .rst_n,
    .op(ks_op), .round_idx, .key_in(key),
    .u0(ks_word), .s_u0(ks_sbox),
    .key_reg, .round_key
  );

  mc_round_datapath u_dp (
    .clk, .rst_n,
    .op(dp_op), .sub_key_sel, .plaintext,
    .key0(key_reg), .round_key,
    .ks_word, .ks_sbox,
    .state(), .ciphertext
  );

endmodule
