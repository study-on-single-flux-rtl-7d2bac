// tb_recip_lut: checks every entry of the 4-bit seed table against the
// accuracy rule it must meet: for d0 = D/16 with D = 8..15, x0 = X/8 is the
// largest 1.xxx value with x0 * d0 <= 1 (found here by search), so that
// 0 <= 1/d0 - x0 < 2^-3, except d0 = 0.5 where x0 = 1.111.
module tb_recip_lut;
  logic [3:0] d, x0;
  int checks = 0, failures = 0;

  recip_lut #(.N(4)) dut (.*);

  // Watchdog: the checks take far less than this many time steps.
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x;
    real err;
    for (int dd = 8; dd < 16; dd++) begin
      d = 4'(dd);
      #1;
      x = 15;
      while (x * dd > 128) x--;
      err = 16.0 / dd - x / 8.0;
      checks++;
      if (x0 != 4'(x) || err < 0.0 || (dd != 8 && err >= 0.125)) begin
        failures++;
        $display("FAIL d=%b x0=%b expected %b", d, x0, 4'(x));
      end
    end
    d = 4'b1011; #1;
    checks++;
    if (x0 != 4'b1011) begin failures++; $display("FAIL worked example seed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
