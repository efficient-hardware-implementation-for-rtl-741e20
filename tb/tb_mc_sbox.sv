// tb_mc_sbox: checks the four S-box ROMs exhaustively against the reference
// tables, and checks that S2 and S3 undo S0 and S1.
module tb_mc_sbox;
  import mc_ref_pkg::*;

  logic [3:0] x;
  logic [3:0] y [4];
  logic [3:0] x2, x3, inv2, inv3;
  int checks = 0, failures = 0;

  mc_sbox #(.SEL(0)) u_s0 (.x(x), .y(y[0]));
  mc_sbox #(.SEL(1)) u_s1 (.x(x), .y(y[1]));
  mc_sbox #(.SEL(2)) u_s2 (.x(x), .y(y[2]));
  mc_sbox #(.SEL(3)) u_s3 (.x(x), .y(y[3]));
  // chained: S2(S0(x)) and S3(S1(x)) must give x back
  mc_sbox #(.SEL(2)) u_i2 (.x(x2), .y(inv2));
  mc_sbox #(.SEL(3)) u_i3 (.x(x3), .y(inv3));
  assign x2 = y[0];
  assign x3 = y[1];

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (y[s] !== ref_sbox(s, x)) begin
          failures++;
          $display("S%0d(%h) = %h, expected %h", s, x, y[s], ref_sbox(s, x));
        end
      end
      checks += 2;
      if (inv2 !== x) begin failures++; $display("S2(S0(%h)) = %h", x, inv2); end
      if (inv3 !== x) begin failures++; $display("S3(S1(%h)) = %h", x, inv3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
