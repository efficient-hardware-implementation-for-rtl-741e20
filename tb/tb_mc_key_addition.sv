// tb_mc_key_addition: drives mc_key_addition with random blocks and keys and
// compares the output with the XOR of the two.
module tb_mc_key_addition;
  logic [63:0] din, key, dout;
  int checks = 0, failures = 0;

  mc_key_addition dut (.din(din), .round_key(key), .dout(dout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      din = {$urandom, $urandom};
      key = (n < 64) ? 64'h1 << n : {$urandom, $urandom};
      #1;
      checks++;
      if (dout !== (din ^ key)) begin
        failures++;
        if (failures < 10) $display("%h ^ %h gave %h", din, key, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
