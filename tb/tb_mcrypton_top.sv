// tb_mcrypton_top: end-to-end test of the mCrypton-64 core at its default
// configuration. Encrypts random and directed plaintext/key pairs and compares
// each ciphertext with the reference model; checks that done rises exactly 30
// cycles after the edge that sampled enable; runs blocks back to back with
// enable held high (one block per 30 cycles); changes plaintext, key and
// enable while a block runs (they must be ignored); and resets the core in the
// middle of a block. It counts how often each mechanism of the design ran
// (key schedule borrowing the substitution unit, rounds, output
// transformation, back-to-back start, ignored enable, reset mid-block) and
// fails if any never did.
module tb_mcrypton_top;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  logic clk = 0, rst_n = 0, enable = 0;
  logic [63:0] plaintext = '0, key = '0, ciphertext;
  logic done, busy;
  int checks = 0, failures = 0;
  int n_shared_sbox = 0, n_rounds = 0, n_output_perm = 0, n_back_to_back = 0;
  int n_ignored_enable = 0, n_mid_reset = 0, n_blocks = 0;

  mcrypton_top dut (.clk, .rst_n, .enable, .plaintext, .key, .ciphertext, .done, .busy);

  always #5 clk = ~clk;

  // mechanism counters, from the core's internal control signals
  always @(posedge clk) if (rst_n) begin
    if (dut.sub_key_sel) n_shared_sbox++;
    if (dut.dp_op == DP_ROUND) n_rounds++;
    if (dut.dp_op == DP_PERM) n_output_perm++;
    if (enable && busy) n_ignored_enable++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Start one block at the next posedge (enable for one cycle), wait for
  // done counting cycles, and check latency and ciphertext.
  task automatic one_block(logic [63:0] pt, logic [63:0] k);
    int cycles;
    logic [63:0] exp;
    exp = ref_encrypt(pt, k);
    plaintext = pt; key = k; enable = 1;
    @(negedge clk);                       // enable sampled: cycle 0
    cycles = 1;
    enable = 0;
    while (!done && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    n_blocks++;
    check(cycles == LATENCY, $sformatf("latency %0d cycles, expected %0d", cycles, LATENCY));
    check(ciphertext === exp, $sformatf("pt %h key %h: ct %h, expected %h", pt, k, ciphertext, exp));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !done && ciphertext == 64'h0, "idle with zero ciphertext after reset");

    // directed vectors
    one_block(64'h0, 64'h0);
    one_block(64'hFFFF_FFFF_FFFF_FFFF, 64'hFFFF_FFFF_FFFF_FFFF);
    one_block(64'h0123_4567_89AB_CDEF, 64'hFEDC_BA98_7654_3210);
    // random vectors with idle gaps
    for (int n = 0; n < 40; n++) begin
      one_block({$urandom, $urandom}, {$urandom, $urandom});
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end

    // inputs and enable changed while a block runs
    begin
      logic [63:0] pt0, k0, exp0;
      pt0 = {$urandom, $urandom}; k0 = {$urandom, $urandom};
      exp0 = ref_encrypt(pt0, k0);
      plaintext = pt0; key = k0; enable = 1;
      @(negedge clk);
      for (int c = 1; c < LATENCY; c++) begin
        check(!done, "done early while inputs change");
        plaintext = {$urandom, $urandom}; key = {$urandom, $urandom};
        enable = (c % 3 == 0);
        @(negedge clk);
      end
      check(done && ciphertext === exp0, $sformatf("ct %h with changing inputs, expected %h", ciphertext, exp0));
      enable = 0;
      @(negedge clk);
      while (busy) @(negedge clk);
    end

    // back to back: enable held high, a new ciphertext every 30 cycles
    begin
      logic [63:0] pts [6], ks [6];
      int last_done, cyc;
      for (int b = 0; b < 6; b++) begin pts[b] = {$urandom, $urandom}; ks[b] = {$urandom, $urandom}; end
      plaintext = pts[0]; key = ks[0]; enable = 1;
      cyc = 0; last_done = -1;
      for (int b = 0; b < 6; b++) begin
        @(negedge clk); cyc++;            // block b sampled in the previous edge
        if (b + 1 < 6) begin plaintext = pts[b + 1]; key = ks[b + 1]; end
        while (!done) begin @(negedge clk); cyc++; end
        check(ciphertext === ref_encrypt(pts[b], ks[b]), $sformatf("back-to-back block %0d", b));
        if (last_done >= 0) begin
          check(cyc - last_done == LATENCY, $sformatf("blocks %0d cycles apart", cyc - last_done));
          if (cyc - last_done == LATENCY) n_back_to_back++;
        end
        last_done = cyc;
        n_blocks++;
        if (b == 5) enable = 0;
      end
      @(negedge clk);
      while (busy) @(negedge clk);
    end

    // reset in the middle of a block, then a clean block
    plaintext = {$urandom, $urandom}; key = {$urandom, $urandom}; enable = 1;
    @(negedge clk);
    enable = 0;
    repeat (13) @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    check(!busy && !done, "idle during reset");
    rst_n = 1;
    n_mid_reset++;
    repeat (2) @(negedge clk);
    check(!busy && !done, "stays idle after reset");
    one_block({$urandom, $urandom}, {$urandom, $urandom});

    check(n_shared_sbox > 0, "key schedule never used the shared substitution unit");
    check(n_rounds > 0, "no round ran");
    check(n_output_perm > 0, "no output transformation ran");
    check(n_back_to_back > 0, "no back-to-back blocks");
    check(n_ignored_enable > 0, "enable never raised while busy");
    check(n_mid_reset > 0, "no reset during a block");
    check(n_rounds >= 12 * n_blocks, $sformatf("%0d rounds for %0d blocks", n_rounds, n_blocks));
    $display("mechanisms: shared S-box %0d, rounds %0d, output pi %0d, back-to-back %0d, ignored enable %0d, mid-block reset %0d, blocks %0d",
             n_shared_sbox, n_rounds, n_output_perm, n_back_to_back, n_ignored_enable, n_mid_reset, n_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
