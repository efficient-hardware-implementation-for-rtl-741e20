// tb_mc_substitution: drives mc_substitution with directed and random 64-bit blocks and compares
// every output with the reference model's ref_gamma.
module tb_mc_substitution;
  import mc_ref_pkg::*;

  logic [63:0] din, dout, expected;
  int checks = 0, failures = 0;

  mc_substitution dut (.din(din), .dout(dout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [63:0] v);
    din = v;
    #1;
    expected = ref_gamma(v);
    checks++;
    if (dout !== expected) begin
      failures++;
      if (failures < 10) $display("in %h: out %h, expected %h", v, dout, expected);
    end
  endtask

  initial begin
    check(64'h0);
    check(64'hFFFF_FFFF_FFFF_FFFF);
    check(64'h0123_4567_89AB_CDEF);
    for (int b = 0; b < 64; b++) check(64'h1 << b);   // single bits
    for (int n = 0; n < 2000; n++) check({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
