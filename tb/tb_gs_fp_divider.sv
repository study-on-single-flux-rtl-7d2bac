// tb_gs_fp_divider: end-to-end test of the floating-point Goldschmidt divider
// at its default parameters (5-bit exponent, 4-bit significands, 3
// iterations, 11-bit quotient significand).
//
// It runs the worked example (z = 1.111, d = 1.011, whose exact third-iteration
// product is 10.101110100010110011110010011), then every pair of normal 4-bit
// significands with random signs and exponents, plus exponents chosen to
// overflow and underflow. Each result is compared with a reference computed
// here with plain integer arithmetic (seed found by search, exact products),
// the quotient is checked to be within 2^-11 relative of the true z/d, and
// the start-to-done latency must be 88 clocks. The mechanisms of the design
// are counted and each must occur: the seed clipped at d = 1.000, the
// write-back of one product overlapping the next multiplication, both
// normalisation cases, both range flags, and back-to-back divisions.
module tb_gs_fp_divider;
  localparam int NE = 5, NF = 4, NQ = 11, LAT = 88, FZ = 27;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic z_s, d_s;
  logic [NE-1:0] z_e, d_e, q_e;
  logic [NF-1:0] z_f, d_f;
  logic busy, done, q_s, ovf, unf;
  logic [NQ-1:0] q_f;

  int checks = 0, failures = 0;
  int n_clip = 0, n_overlap = 0, n_norm_hi = 0, n_norm_lo = 0, n_ovf = 0, n_unf = 0;
  int n_b2b = 0;
  longint cycle = 0;

  gs_fp_divider dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Overlap: a product bit written back while the next multiplication streams.
  always @(posedge clk)
    if (!rst && dut.u_sig.x_valid && (dut.u_sig.wr_d || dut.u_sig.wr_z)) n_overlap++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Exact Goldschmidt product z_3 (27 fraction bits) for significands
  // z = zf / 8 and d0 = df / 16.
  function automatic longint ref_z3(int zf, int df);
    longint d, z, x;
    int fd, fz, fx;
    x = 15;
    while (x * df > 128) x--;            // largest 1.xxx not above 1/d0
    d = df; z = zf; fd = 4; fz = 3; fx = 3;
    for (int i = 1; i <= 3; i++) begin
      d = d * x; z = z * x; fd += fx; fz += fx;
      x = (longint'(1) << (fd + 1)) - d; fx = fd;
    end
    return z;
  endfunction

  task automatic divide(input bit zs, input int ze, input int zf,
                        input bit ds, input int de, input int df,
                        input bit back_to_back);
    longint t0, z3, qf_exp;
    int e;
    bit adj;
    real rq, tq;
    int n;
    if (!back_to_back) @(negedge clk);
    z_s = zs; z_e = NE'(ze); z_f = NF'(zf);
    d_s = ds; d_e = NE'(de); d_f = NF'(df);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 0;
    while (!done) begin
      @(negedge clk);
      n++;
    end
    t0 = cycle - n;
    check(cycle - t0 == LAT, $sformatf("latency %0d, expected %0d", cycle - t0, LAT));
    z3  = ref_z3(zf, df);
    adj = (z3 < (longint'(2) << FZ));
    qf_exp = adj ? (z3 >> (FZ - NQ + 1)) : (z3 >> (FZ - NQ + 2));
    e = ze - de + 15 - int'(adj);
    check(dut.u_sig.q == 32'(z3), $sformatf("z3 %h, expected %h", dut.u_sig.q, z3));
    check(q_f == NQ'(qf_exp), $sformatf("q_f %b, expected %b (z=%0d d=%0d)", q_f, NQ'(qf_exp), zf, df));
    check(q_s == (zs ^ ds), "q_s");
    check(q_e == NE'(e), $sformatf("q_e %0d, expected %0d", q_e, NE'(e)));
    check(ovf == (e > 30) && unf == (e < 1), "range flags");
    tq = 2.0 * zf / df;
    rq = real'(z3) / real'(longint'(1) << FZ);
    check(rq <= tq && (tq - rq) / tq < 1.0 / 2048.0, "accuracy 2^-11");
    if (df == 8) n_clip++;
    if (adj) n_norm_lo++; else n_norm_hi++;
    if (e > 30) n_ovf++;
    if (e < 1) n_unf++;
    if (back_to_back) n_b2b++;
  endtask

  initial begin
    z_s = 0; d_s = 0; z_e = '0; d_e = '0; z_f = '0; d_f = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // Worked example: z0 = 1.111, d0 = 0.1011 (d = 1.011), x0 = 1.011.
    divide(1'b0, 15, 15, 1'b0, 15, 11, 1'b0);
    check(dut.u_sig.q == 32'b10101110100010110011110010011, "worked example z3");
    check(dut.u_sig.seed_q == 4'b1011, "worked example x0");
    // All normal significand pairs, random signs and mid-range exponents.
    for (int zf = 8; zf < 16; zf++)
      for (int df = 8; df < 16; df++)
        divide(1'($urandom), 5 + $urandom_range(0, 20), zf,
               1'($urandom), 5 + $urandom_range(0, 20), df, 1'($urandom));
    // Exponent range.
    divide(1'b1, 30, 15, 1'b0, 1, 8, 1'b0);
    divide(1'b0, 1, 8, 1'b1, 30, 15, 1'b0);
    $display("clip=%0d overlap=%0d norm_hi=%0d norm_lo=%0d ovf=%0d unf=%0d b2b=%0d",
             n_clip, n_overlap, n_norm_hi, n_norm_lo, n_ovf, n_unf, n_b2b);
    check(n_clip > 0, "seed clip never happened");
    check(n_overlap > 0, "overlapped write-back never happened");
    check(n_norm_hi > 0 && n_norm_lo > 0, "a normalisation case never happened");
    check(n_ovf > 0 && n_unf > 0, "a range flag never happened");
    check(n_b2b > 0, "back-to-back division never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
