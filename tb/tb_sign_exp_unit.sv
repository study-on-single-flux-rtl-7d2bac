// tb_sign_exp_unit: exhaustive check of sign XOR and biased exponent
// subtraction (bias 15) over all 5-bit exponents, both adjust values and all
// sign pairs, including the overflow and underflow flags.
module tb_sign_exp_unit;
  logic z_s, d_s, adj, q_s, ovf, unf;
  logic [4:0] z_e, d_e, q_e;
  int checks = 0, failures = 0;

  sign_exp_unit #(.NE(5)) dut (.*);

  // Watchdog: the checks take far less than this many time steps.
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int s = 0; s < 4; s++)
      for (int a = 0; a < 32; a++)
        for (int b = 0; b < 32; b++)
          for (int j = 0; j < 2; j++) begin
            z_s = s[0]; d_s = s[1]; z_e = 5'(a); d_e = 5'(b); adj = j[0];
            #1;
            e = a - b + 15 - j;
            checks++;
            if (q_s != (s[0] ^ s[1]) || q_e != 5'(e) || ovf != (e > 30) || unf != (e < 1)) begin
              failures++;
              if (failures < 10) $display("FAIL %0d - %0d adj %0d: q_e=%0d ovf=%b unf=%b", a, b, j, q_e, ovf, unf);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
