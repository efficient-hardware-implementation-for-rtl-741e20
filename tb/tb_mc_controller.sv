// tb_mc_controller: pulses enable and compares the controller's outputs in
// every cycle with the expected 30-cycle schedule (load, initial key addition,
// twelve key-step/data-step pairs, tau, pi, tau, output, done). Then holds
// enable high to check back-to-back blocks every 30 cycles, and checks that
// enable is ignored while a block is running.
module tb_mc_controller;
  import mc_pkg::*;

  logic clk = 0, rst_n = 0, enable = 0;
  dp_op_t dp_op;
  ks_op_t ks_op;
  logic sub_key_sel, busy, done;
  logic [3:0] round_idx;
  int checks = 0, failures = 0;

  mc_controller dut (.clk, .rst_n, .enable, .dp_op, .ks_op, .sub_key_sel,
                     .round_idx, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cycle(int c, dp_op_t dp, ks_op_t ks, logic sel, int rnd);
    #1;
    checks++;
    if (dp_op !== dp || ks_op !== ks || sub_key_sel !== sel ||
        (rnd > 0 && round_idx !== 4'(rnd)) || busy !== (c > 0)) begin
      failures++;
      $display("cycle %0d: dp %s ks %s sel %b round %0d busy %b", c, dp_op.name(),
               ks_op.name(), sub_key_sel, round_idx, busy);
    end
  endtask

  // Checks one block whose enable is sampled at the coming posedge;
  // returns with the clock at the negedge after done.
  task automatic run_block(bit hold_enable);
    expect_cycle(0, DP_LOAD, KS_LOAD, 0, 0);
    @(negedge clk);
    enable = hold_enable;
    expect_cycle(1, DP_KEY0, KS_HOLD, 0, 0);
    @(negedge clk);
    for (int r = 1; r <= 12; r++) begin
      expect_cycle(2 * r, DP_HOLD, KS_STEP, 1, r);
      @(negedge clk);
      expect_cycle(2 * r + 1, DP_ROUND, KS_HOLD, 0, r);
      @(negedge clk);
    end
    expect_cycle(26, DP_TRANS, KS_HOLD, 0, 0); @(negedge clk);
    expect_cycle(27, DP_PERM,  KS_HOLD, 0, 0); @(negedge clk);
    expect_cycle(28, DP_TRANS, KS_HOLD, 0, 0); @(negedge clk);
    expect_cycle(29, DP_OUT,   KS_HOLD, 0, 0);
    checks++;
    if (done) begin failures++; $display("done too early"); end
    @(negedge clk);
    checks++;
    if (!done) begin failures++; $display("done missing after 30 cycles"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (busy || done || dp_op !== DP_HOLD) begin failures++; $display("not idle after reset"); end
    @(negedge clk);
    // single block, enable for one cycle
    enable = 1;
    run_block(0);
    checks++;
    if (busy || dp_op !== DP_HOLD) begin failures++; $display("not idle after block"); end
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("done longer than one cycle"); end
    // enable held high: blocks every 30 cycles, enable ignored while busy
    enable = 1;
    run_block(1);
    run_block(1);
    run_block(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
