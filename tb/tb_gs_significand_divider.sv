// tb_gs_significand_divider: runs the Goldschmidt significand divider
// (N = 4, K = 3) on all 64 normal operand pairs and on random pairs at
// N = 5, and compares the exact product z_K with a reference computed here
// (seed by search, exact integer products). Also checks the worked example
// z0 = 1.111, d0 = 0.1011 -> z3 = 10.101110100010110011110010011, the
// latency of 88 clocks at N = 4 (gs_pkg::div_latency), and convergence:
// z_K within 2^-11 relative below z0 / d0.
module tb_gs_significand_divider;
  logic clk = 1'b0, rst = 1'b1, start4 = 1'b0, start5 = 1'b0;
  logic [3:0] d4, z4;
  logic [4:0] d5, z5;
  logic busy4, done4, busy5, done5;
  logic [31:0] q4;
  logic [39:0] q5;
  int checks = 0, failures = 0;

  gs_significand_divider #(.N(4), .K(3)) dut4 (
    .clk, .rst, .start(start4), .d_in(d4), .z_in(z4), .busy(busy4), .done(done4), .q(q4));
  gs_significand_divider #(.N(5), .K(3)) dut5 (
    .clk, .rst, .start(start5), .d_in(d5), .z_in(z5), .busy(busy5), .done(done5), .q(q5));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_zk(int n, int zf, int df, output int fz);
    longint d, z, x;
    int fd, fx;
    x = (1 << n) - 1;
    while (x * df > (longint'(1) << (2 * n - 1))) x--;
    d = df; z = zf; fd = n; fz = n - 1; fx = n - 1;
    for (int i = 1; i <= 3; i++) begin
      d = d * x; z = z * x; fd += fx; fz += fx;
      x = (longint'(1) << (fd + 1)) - d; fx = fd;
    end
    return z;
  endfunction

  task automatic check_val(int n, int zf, int df, longint got);
    longint e;
    int fz;
    real rq, tq;
    e = ref_zk(n, zf, df, fz);
    tq = real'(zf) * 2.0 / real'(df);
    rq = real'(got) / real'(longint'(1) << fz);
    checks++;
    if (got != e || rq > tq || (tq - rq) / tq >= 1.0 / 2048.0) begin
      failures++;
      $display("FAIL n=%0d z=%0d d=%0d got %h expected %h", n, zf, df, got, e);
    end
  endtask

  initial begin
    int lat;
    @(negedge clk); rst = 1'b0;
    for (int zf = 8; zf < 16; zf++)
      for (int df = 8; df < 16; df++) begin
        @(negedge clk);
        z4 = 4'(zf); d4 = 4'(df); start4 = 1'b1;
        @(negedge clk); start4 = 1'b0;
        lat = 0;
        while (!done4) begin @(negedge clk); lat++; end
        checks++;
        if (lat != gs_pkg::div_latency(4, 3) || lat != 88) begin
          failures++; $display("FAIL latency %0d", lat);
        end
        check_val(4, zf, df, longint'(q4));
        if (zf == 15 && df == 11) begin
          checks++;
          if (q4 != 32'b10101110100010110011110010011) begin
            failures++; $display("FAIL worked example");
          end
        end
      end
    for (int t = 0; t < 40; t++) begin
      int zf, df;
      zf = $urandom_range(16, 31); df = $urandom_range(16, 31);
      @(negedge clk);
      z5 = 5'(zf); d5 = 5'(df); start5 = 1'b1;
      @(negedge clk); start5 = 1'b0;
      while (!done5) @(negedge clk);
      check_val(5, zf, df, longint'(q5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
