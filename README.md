# Bit-serial Goldschmidt floating-point divider

Division is the slowest of the four arithmetic operations. This design divides
with only a multiplier. It uses Goldschmidt's algorithm: multiply the dividend and
the divisor by the same factors until the divisor becomes 1. The dividend is then
the quotient. Each factor follows from the previous divisor by a subtraction from
2. Only one multiplier is needed, and it is *bit-serial*: one operand arrives one
bit per clock, least-significant bit first. Such a multiplier is small, and its
size grows linearly with the word length.

The architecture was conceived for superconducting single-flux-quantum (SFQ)
logic, where every gate is clocked and bit-serial pipelines are natural. This
RTL is a synchronous, synthesizable model of the same architecture. It has the
same blocks, the same order of operations and the same number formats. It is
written in SystemVerilog for ordinary simulators and synthesis tools.

The default configuration takes 4-bit significands (hidden bit included) and
runs three Goldschmidt iterations. It returns an 11-bit quotient significand,
the width of IEEE 754 half precision, with a 5-bit exponent. A division takes
88 clocks.

## The algorithm and its number formats

For `q = z0 / d0`:

```
x0 = table(d0)                       seed, 0 <= 1/d0 - x0 < 2^-p
for i = 1 .. K:
    d_i = d_{i-1} * x_{i-1}          (not needed for i = K)
    z_i = z_{i-1} * x_{i-1}
    x_i = 2 - d_i
return z_K
```

If the seed has relative error `e0 = 1 - d0*x0 < 2^-p`, then `d_i = 1 - e0^(2^i)`.
The z branch therefore approaches the quotient from below, with a relative error
of `e0^(2^K)`. With `p = 3` and `K = 3` this is below `2^-12`. That is one bit
more than the 11-bit result needs.

Nothing is rounded inside the divider. Every product keeps all of its bits, so the
fraction lengths grow each iteration:

| value | format (N = 4) | fraction bits | stored in |
|-------|----------------|---------------|-----------|
| d0 | `0.1xxx` (the significand 1.xxx, halved) | 4 | Reg d |
| z0 | `1.xxx` | 3 | Reg z |
| x0 | `1.xxx` from the lookup table | 3 | multiplier latches |
| d1, x1 | `0.xxxxxxx`, `1.xxxxxxx` | 7 | Reg d / Reg x |
| z1 | `xx.xxxxxx` | 6 | Reg z |
| d2, x2 | 14 fraction bits | 14 | Reg d / Reg x |
| z2 | `xx.` + 13 | 13 | Reg z |
| z3 | `xx.` + 27 (32-bit field) | 27 | Reg z |

In general, iteration `i` multiplies `w_i = N * 2^(i-1)`-bit operands. That is
why the multiplier is `N * 2^(K-1)` = 16 bits wide and Reg z is 32 bits.
`gs_pkg` holds this width arithmetic (`op_width`, `mult_width`, `frac_d`,
`frac_z`, `div_latency`).

Worked example, checked bit for bit by the testbenches:
z0 = 1.111, d0 = 0.1011 (divisor significand 1.011), seed x0 = 1.011. This
gives z3 = 10.101110100010110011110010011 = 2.72724833…, against
z0/d0 = 2.72727272….

## Seed table (`recip_lut`)

The table returns the largest `1.xxx` (N-1 fraction bits) that is not above
`1/d0`:
`x0 = min(floor(2^(2N-1) / D), 2^N - 1) / 2^(N-1)`, where `D = d0 * 2^N`.
This gives `p = N - 1`. The table is built at elaboration, so it needs no data
file. Only `d0 = 0.5` is clipped: its exact seed would be 2, and the table gives
1.111 instead. Its error is exactly `2^-3`, and because `d0*eps = 2^-4` it still
converges. In the SFQ original this table is a semiconductor/superconductor
hybrid part. Here it is plain logic, and its output is registered in the start
clock.

## The bit-serial multiplier (`bs_multiplier`, `serial_adder`)

```
 x_in ──┬───────────── AND(y0) ─┐
        D ──────────── AND(y1) ─┤  serial adder tree,
        D ─ D ──────── AND(y2) ─┤  log2 W levels,      ──> p_out
        …                       │  one clock per level
 y_in ─> [NDRO latches y0..yW-1]
```

- **Parallel operand.** The parallel operand `Y` (the factor `x_{i-1}`) sits in
  W latches. It is shared by the d and z multiplications of an iteration, so it
  is loaded once per iteration. This is the "set x" step.
- **Serial operand.** The serial operand `X` (`d_{i-1}` or `z_{i-1}`) is
  delayed by a flip-flop chain, so row `i` sees `X` exactly `i` clocks late.
  The clocked AND of row `i` therefore emits `X * y_i * 2^i` as a stream that is
  already aligned by weight to the clock count.
- **Adder tree.** A binary tree of bit-serial adders sums the rows. Each adder
  is a full adder with a carry flip-flop and a registered sum.

Timing: if X bit 0 is sampled at clock edge `t0`, a consumer samples product bit
`k` at edge `t0 + k + LAT`, where `LAT = 1 + ceil(log2 W)` (5 clocks for W = 16).

An operation on `w`-bit operands occupies a *window* of `2w` clocks: `w` data
bits followed by `w` zeros, which is how long the `2w`-bit product needs to
leave. A product always fits its window, so every adder's carry is back at zero
when the window ends. Windows can therefore follow each other without a gap and
without clearing the adders.

When Y is reloaded, the delay chain is cleared as well. Otherwise the tail of the
last window, still in the chain, would meet the new, wider Y. An assertion checks
that Y is only loaded between windows.

## Schedule (`gs_controller`)

Clock edges, counted from the edge that samples `start` (N = 4, K = 3):

| edge | action |
|------|--------|
| 0 | operands into Reg d / Reg z, seed registered ("lookup") |
| 1 | set x0 |
| 2–9 | d1 = d0·x0 (4 data + 4 zero clocks) |
| 10–17 | z1 = z0·x0; d1 is still being written back during edges 7–14 |
| 18 | set x1 = 2 − d1 |
| 19–34 | d2 = d1·x1 |
| 35–50 | z2 = z1·x1 |
| 51 | set x2 = 2 − d2 |
| 52–83 | z3 = z2·x2 (d3 is not computed) |
| 88 | last bit of z3 written, `done` rises |

The latency is `K + Σ_{i<K} 4·w_i + 2·w_K + LAT`. That is 88 clocks for the
defaults.

Product bits are steered back by a tag pipeline that is exactly `LAT` stages
deep. Each streamed clock pushes a tag (destination register, bit index). The tag
that leaves the pipeline says where the bit now on `p_out` belongs. This is what
lets the z multiplication start while the d product is still draining. It is the
pipelined overlap of consecutive multiplications.

The registers are written in place: the product bit with index `k` arrives `LAT`
clocks after operand bit `k` was read. Reg d therefore holds `d_{i-1}` and
becomes `d_i` without a second register. The d product is written to Reg x as
well. The two's complement converter reads Reg x and forms the next
`x_i = 2 − d_i` as `(~d + 1)` masked to `frac+1` bits.

The published SFQ circuit needs 87 clocks. Its schedule has the same phases,
but its exact phase lengths are set by the superconducting cells. The schedule
here is its own and takes 88.

## Floating-point wrapper (`gs_fp_divider`, `sign_exp_unit`)

- **Sign:** `q_s = z_s XOR d_s`.
- **Exponent:** `q_e = z_e − d_e + 15`.
- **Significand:** the divisor significand `1.xxx` is given to the divider as
  `d0 = 0.1xxx`, so `z_K ≈ 2·z_f/d_f`, which lies in (1, 4).
- **Normalisation:** if `z_K ≥ 2`, the top 11 bits from the 2's place down are
  taken and the exponent is kept. Otherwise the 11 bits from the 1's place are
  taken and the exponent is decremented.
- **Rounding:** the significand is truncated. Because z approaches from below,
  the result is within 2^-10 (one unit in the last place) plus the 2^-11
  convergence error below the true quotient.
- **Range:** `ovf` and `unf` flag a biased exponent outside 1 … 30. Zero,
  infinity, NaN and subnormal inputs are not decoded, so operands must be normal
  (significand MSB set).

## Interface of the top, `gs_fp_divider`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; asynchronous reset, active high |
| `start` | in | 1 | one-clock pulse while `busy` is low; samples all operand fields |
| `z_s`, `z_e`, `z_f` | in | 1, NE, NF_IN | dividend sign, biased exponent, significand `1.xxx` |
| `d_s`, `d_e`, `d_f` | in | 1, NE, NF_IN | divisor, same fields |
| `busy` | out | 1 | high from the clock after `start` until `done` |
| `done` | out | 1 | one-clock pulse; the results then hold until the next `start` |
| `q_s`, `q_e`, `q_f` | out | 1, NE, NF_OUT | quotient; `q_f` is `1.xxxxxxxxxx` |
| `ovf`, `unf` | out | 1 | exponent out of the normal range |

`start` may be raised in the very clock in which `done` is high.

Parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `NE` | 5 | exponent width |
| `NF_IN` | 4 | input significand width |
| `K` | 3 | number of iterations |
| `NF_OUT` | 11 | output significand width |

The seed accuracy is tied to `NF_IN − 1`. `NF_IN = 5` is simulated too. For wider
inputs, check that `(NF_IN−1)·2^K` exceeds `NF_OUT`. For single or double
precision, the published design assumes a separately chosen 8-bit seed, which
this parameterisation does not offer.

## Where this design departs from the SFQ original

- **Clocking.** The model is synchronous, with a single clock. It does not model
  SFQ pulse logic, the bias network or the passive transmission-line wiring.
- **Lookup table.** The hybrid lookup table is a ROM computed at elaboration.
- **Delay chain.** In the multiplier, the flip-flop chain delays the serial
  operand. Y is loaded in parallel in one clock instead of being shifted in.
- **Converter.** The two's complement converter is parallel logic.
- **Registers.** They are bit-addressable rather than shift registers.
- **Schedule.** The window lengths, the one-clock "set x" and the start/busy/done
  handshake are this design's own. They give 88 clocks against the original's 87.
- **Wrapper.** Normalisation, truncation and the range flags are additions that
  a complete floating-point result needs.
- **Not built:** the two-multiplier variant, which runs the d and z branches in
  parallel to cut latency by about 40%.

## Files

`rtl/`:

| file | content |
|------|---------|
| `gs_pkg.sv` | widths, fraction lengths, latency formula |
| `serial_adder.sv` | bit-serial full adder |
| `bs_multiplier.sv` | latched-Y, serial-X multiplier with adder tree |
| `recip_lut.sv` | seed table |
| `twos_comp_conv.sv` | x = 2 − d |
| `gs_register.sv` | Reg x / d / z |
| `gs_controller.sv` | schedule and write-back steering |
| `gs_significand_divider.sv` | the Goldschmidt significand divider |
| `sign_exp_unit.sv` | sign XOR, exponent subtraction, range flags |
| `gs_fp_divider.sv` | top |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=<n> failures=<m>`.

- `tb_gs_fp_divider` runs the top at its default parameters:
  - the worked example;
  - all 64 pairs of normal significands, with random signs and exponents, some
    of them back to back;
  - overflow and underflow cases.

  It compares against integer reference arithmetic and requires 2^-11
  accuracy and an 88-clock latency. It counts that every mechanism occurred:
  seed clipping, overlapped write-back, both normalisation cases, both flags and
  back-to-back starts.
- `tb_gs_controller` compares the control outputs clock by clock with the
  schedule above.
- `tb_gs_significand_divider` also runs a 5-bit-input instance.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/gs_pkg.sv \
    tb/tb_gs_fp_divider.sv --top-module tb_gs_fp_divider -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find each module in the file of the same name. The
package must be named explicitly. `-Wno-fatal` keeps the testbenches' width
warnings from stopping the build. Every testbench finishes in well under a
second.
