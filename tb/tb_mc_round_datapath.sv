// tb_mc_round_datapath: runs random sequences of datapath operations on
// mc_round_datapath and compares the state register after each one with the
// reference model: load, initial key addition, full round, transposition,
// permutation and ciphertext output. In cycles where the key schedule borrows
// the substitution unit it checks the S-box result and that the state holds.
module tb_mc_round_datapath;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  dp_op_t op;
  logic sub_key_sel;
  logic [63:0] plaintext, key0, round_key, state, ciphertext;
  logic [15:0] ks_word, ks_sbox;
  logic [63:0] exp_state, exp_ct;
  int checks = 0, failures = 0;
  int n_ops [7];

  mc_round_datapath dut (.clk, .rst_n, .op, .sub_key_sel, .plaintext, .key0,
                         .round_key, .ks_word, .ks_sbox, .state, .ciphertext);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: %h, expected %h", what, got, exp);
    end
  endtask

  initial begin
    op = DP_HOLD; sub_key_sel = 0; plaintext = '0; key0 = '0; round_key = '0; ks_word = '0;
    exp_state = '0; exp_ct = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(state, 64'h0, "state after reset");
    for (int n = 0; n < 5000; n++) begin
      plaintext = {$urandom, $urandom};
      key0      = {$urandom, $urandom};
      round_key = {$urandom, $urandom};
      ks_word   = 16'($urandom);
      op = (n == 0) ? DP_LOAD : dp_op_t'($urandom_range(0, 6));
      sub_key_sel = (op != DP_ROUND) && ($urandom_range(0, 1) == 1);
      n_ops[op]++;
      #1;
      if (sub_key_sel)
        check(64'(ks_sbox), 64'(ref_gamma({ks_word, 48'h0}) >> 48), "shared S-box");
      case (op)
        DP_LOAD:  exp_state = plaintext;
        DP_KEY0:  exp_state = exp_state ^ key0;
        DP_ROUND: exp_state = ref_tau(ref_pi(ref_gamma(exp_state))) ^ round_key;
        DP_TRANS: exp_state = ref_tau(exp_state);
        DP_PERM:  exp_state = ref_pi(exp_state);
        DP_OUT:   exp_ct = exp_state;
        default: ;
      endcase
      @(negedge clk);
      check(state, exp_state, $sformatf("state after op %0d", op));
      check(ciphertext, exp_ct, "ciphertext register");
    end
    for (int o = 0; o < 7; o++) begin
      checks++;
      if (n_ops[o] == 0) begin failures++; $display("operation %0d never ran", o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
