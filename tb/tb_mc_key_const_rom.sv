// tb_mc_key_const_rom: reads every word of the round constant memory and
// compares it with the typed-out constants; addresses past the end read 0.
module tb_mc_key_const_rom;
  import mc_ref_pkg::*;

  logic [3:0]  addr;
  logic [15:0] data;
  int checks = 0, failures = 0;

  mc_key_const_rom dut (.addr(addr), .data(data));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      checks++;
      if (data !== ((a < 12) ? ref_const(a + 1) : 16'h0)) begin
        failures++;
        $display("addr %0d: %h", a, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
