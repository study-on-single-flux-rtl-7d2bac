// tb_bs_multiplier: self-checking test of the bit-serial multiplier at its
// default width (16). For random operand widths w in {4, 8, 16} it loads Y,
// streams two X operands back to back in windows of 2w clocks (w data bits,
// w zeros), and compares the serial product bits, taken LAT = 5 clocks after
// each X bit, with X * Y computed here. Y is reloaded between pairs, so the
// clearing of the delay chain is exercised too.
module tb_bs_multiplier;
  localparam int W = 16, LAT = 5;

  logic clk = 1'b0, rst = 1'b1;
  logic y_load = 1'b0, x_in = 1'b0, p_out;
  logic [W-1:0] y_in = '0;
  int checks = 0, failures = 0;

  bs_multiplier #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stream history: the product bit sampled at clock n belongs to the X bit
  // sampled at clock n - LAT.
  logic [63:0] exp_bit_hist;   // expected product bit per clock, shifted in
  longint      clk_n = 0;
  bit          expect_q [$];

  initial begin
    int w;
    longint unsigned x0, x1, y, p0, p1;
    @(negedge clk); rst = 1'b0;
    for (int t = 0; t < 60; t++) begin
      w  = 4 << $urandom_range(0, 2);
      y  = $urandom_range(0, (1 << w) - 1);
      x0 = $urandom_range(0, (1 << w) - 1);
      x1 = $urandom_range(0, (1 << w) - 1);
      if (t == 0) begin w = 16; y = 16'hffff; x0 = 16'hffff; x1 = 16'h8001; end
      p0 = x0 * y; p1 = x1 * y;
      // set Y
      @(negedge clk); y_load = 1'b1; y_in = W'(y); x_in = 1'b0;
      @(negedge clk); y_load = 1'b0;
      for (int k = 0; k < 4 * w; k++) begin
        x_in = (k < w) ? x0[k] : (k >= 2 * w && k < 3 * w) ? x1[k - 2 * w] : 1'b0;
        expect_q.push_back((k < 2 * w) ? p0[k] : p1[k - 2 * w]);
        @(negedge clk);
      end
      x_in = 1'b0;
      repeat (LAT) begin expect_q.push_back(1'b0); @(negedge clk); end
    end
    repeat (LAT + 2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare: the expected stream is delayed by LAT clocks; between operations
  // the product stream must be zero. The y_load clock itself contributes an
  // expected zero as well.
  bit exp_pipe [$];
  always @(posedge clk) begin
    if (!rst) begin
      exp_pipe.push_back(y_load ? 1'b0 : (expect_q.size() > 0 ? expect_q.pop_front() : 1'b0));
      if (exp_pipe.size() > LAT) begin
        checks++;
        if (p_out !== exp_pipe.pop_front()) begin
          failures++;
          if (failures < 10) $display("FAIL at %0t: p_out=%b", $time, p_out);
        end
      end
    end
  end
endmodule
