// tb_twos_comp_conv: for every fraction length 1..14 and random d < 1 in
// that format, checks x = 2^(f+1) - d, i.e. x_i = 2 - d_i.
module tb_twos_comp_conv;
  logic [15:0] d, x;
  logic [4:0]  frac;
  int checks = 0, failures = 0;

  twos_comp_conv #(.W(16)) dut (.*);

  // Watchdog: the checks take far less than this many time steps.
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned dv;
    for (int f = 1; f <= 14; f++)
      for (int t = 0; t < 50; t++) begin
        dv = $urandom_range(1, (1 << f) - 1);
        d = 16'(dv); frac = 5'(f);
        #1;
        checks++;
        if (x != 16'((1 << (f + 1)) - dv)) begin
          failures++;
          $display("FAIL f=%0d d=%h x=%h", f, d, x);
        end
      end
    // d1 of the worked example: 0.1111001 -> 1.0000111
    d = 16'h79; frac = 5'd7; #1;
    checks++;
    if (x != 16'h87) begin failures++; $display("FAIL worked example x1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
