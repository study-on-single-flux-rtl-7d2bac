// tb_serial_adder: adds random 12-bit numbers as LSB-first streams (12 data
// clocks, 2 zero clocks) through the bit-serial adder and compares the sum
// stream, one clock late, with a + b. Also checks the synchronous clear.
module tb_serial_adder;
  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, a = 1'b0, b = 1'b0, s;
  int checks = 0, failures = 0;

  serial_adder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned x, y, sum, got;
    @(negedge clk); rst = 1'b0;
    for (int t = 0; t < 200; t++) begin
      x = $urandom_range(0, 4095); y = $urandom_range(0, 4095);
      if (t == 0) begin x = 4095; y = 4095; end
      sum = x + y; got = 0;
      for (int k = 0; k < 14; k++) begin
        a = x[k]; b = y[k];
        @(negedge clk);
        got[k] = s;
      end
      checks++;
      if (got != sum) begin
        failures++;
        $display("FAIL %0d + %0d gave %0d", x, y, got);
      end
    end
    // A carry pending when clr arrives must be dropped.
    a = 1'b1; b = 1'b1; @(negedge clk);
    a = 1'b0; b = 1'b0; clr = 1'b1; @(negedge clk);
    clr = 1'b0; @(negedge clk);
    checks++;
    if (s !== 1'b0) begin failures++; $display("FAIL clr kept carry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
