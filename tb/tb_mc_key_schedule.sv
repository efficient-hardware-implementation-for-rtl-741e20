// tb_mc_key_schedule: loads random keys into mc_key_schedule, answers its
// S-box requests with the reference S-boxes (as the shared substitution unit
// would), and compares all twelve round keys with the reference key schedule.
// Also checks that KS_HOLD keeps the round key and that reset clears it.
module tb_mc_key_schedule;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  ks_op_t op;
  logic [3:0] round_idx;
  logic [63:0] key_in, key_reg, round_key;
  logic [15:0] u0, s_u0;
  logic [63:0] rk [13];
  int checks = 0, failures = 0;

  mc_key_schedule dut (.clk, .rst_n, .op, .round_idx, .key_in,
                       .u0, .s_u0, .key_reg, .round_key);

  always #5 clk = ~clk;
  assign s_u0 = {ref_sbox(0, u0[15:12]), ref_sbox(1, u0[11:8]),
                 ref_sbox(2, u0[7:4]),   ref_sbox(3, u0[3:0])};

  initial begin
    repeat (20000) @(posedge clk);
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
    op = KS_HOLD; round_idx = 0; key_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      key_in = (n == 0) ? 64'h0 : (n == 1) ? 64'h0123_4567_89AB_CDEF : {$urandom, $urandom};
      ref_round_keys(key_in, rk);
      op = KS_LOAD;
      @(negedge clk);
      check(key_reg, rk[0], "initial key");
      key_in = ~key_in;               // must not matter any more
      for (int r = 1; r <= 12; r++) begin
        op = KS_STEP; round_idx = 4'(r);
        @(negedge clk);
        check(round_key, rk[r], $sformatf("round key %0d", r));
        op = KS_HOLD; round_idx = 4'hF;
        @(negedge clk);
        check(round_key, rk[r], "round key held");
      end
    end
    rst_n = 0;
    #1;
    check(round_key, 64'h0, "round key after reset");
    check(key_reg, 64'h0, "key register after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
