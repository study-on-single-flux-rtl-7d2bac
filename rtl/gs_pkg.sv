// gs_pkg: shared constants and width arithmetic of the Goldschmidt divider.
//
// The divider works on exact fixed-point numbers whose fraction length grows
// with every iteration. With an N-bit divisor significand d0 = 0.1xxx
// (N fraction bits), an N-bit dividend significand z0 = 1.xxx (N-1 fraction
// bits) and an N-bit seed x0 = 1.xxx (N-1 fraction bits):
//   iteration i (1..K) multiplies operands of w_i = N * 2^(i-1) bits,
//   producing 2*w_i-bit products, so the multiplier must be N * 2^(K-1) wide;
//   d_i carries FD(i) = 2^(i-1) (2N-1) fraction bits (x_i = 2 - d_i the same),
//   z_i carries FZ(i) = 2^i (N-1) + 2^(i-1) - 1 fraction bits (i >= 1).
// The defaults (N = 4, K = 3) are the configuration of the original SFQ divider: a
// 16-bit multiplier and a 32-bit final product z3 with 27 fraction bits.
package gs_pkg;

  // Significand width of the divider inputs (hidden bit included).
  localparam int unsigned N_IN_DEF = 4;
  // Number of Goldschmidt iterations (multiplications of the z branch).
  localparam int unsigned K_DEF    = 3;

  // Operand width of the multiplications of iteration i (1-based).
  function automatic int unsigned op_width(int unsigned n, int unsigned i);
    return n << (i - 1);
  endfunction

  // Multiplier width needed for n-bit inputs and k iterations.
  function automatic int unsigned mult_width(int unsigned n, int unsigned k);
    return n << (k - 1);
  endfunction

  // Fraction bits of d_i (and of x_i = 2 - d_i), i >= 1.
  function automatic int unsigned frac_d(int unsigned n, int unsigned i);
    return (2 * n - 1) << (i - 1);
  endfunction

  // Fraction bits of z_i, i >= 1.
  function automatic int unsigned frac_z(int unsigned n, int unsigned i);
    return ((n - 1) << i) + (1 << (i - 1)) - 1;
  endfunction

  // Latency of a bit-serial multiplier of width w: one clock for the
  // partial-product AND row plus one per level of the adder tree.
  function automatic int unsigned mult_latency(int unsigned w);
    return 1 + $clog2(w);
  endfunction

  // Clocks from the edge that samples the start pulse (and registers the
  // lookup) to the edge that raises done in the significand divider: one
  // 'set x' clock per iteration, a d and a z multiplication window of 2*w_i
  // clocks in iterations 1..k-1, only the z window in iteration k, and the
  // drain of the multiplier pipeline. 88 clocks for n = 4, k = 3.
  function automatic int unsigned div_latency(int unsigned n, int unsigned k);
    int unsigned t;
    t = k;
    for (int unsigned i = 1; i < k; i++) t += 4 * op_width(n, i);
    t += 2 * op_width(n, k);
    t += mult_latency(mult_width(n, k));
    return t;
  endfunction

endpackage
