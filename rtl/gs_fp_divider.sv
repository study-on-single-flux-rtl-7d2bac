// gs_fp_divider: floating-point divider built around a bit-serial Goldschmidt
// significand divider.
//
// Q = Z / D is split into q_s = z_s XOR d_s, q_e = z_e - d_e + bias, and the
// significand quotient z_f / d_f. The significand path feeds d_f (1.xxx,
// hidden bit included) to the divider as d0 = d_f / 2 = 0.1xxx and z_f as
// z0 = 1.xxx, so the divider returns z_K ~ 2 z_f / d_f in (1, 4). The result
// is normalised to an NF_OUT-bit significand 1.xxxxxxxxxx (hidden bit
// included, 11 bits by default as in half precision): if z_K >= 2 it is
// halved and the exponent kept, otherwise it is taken as is and the exponent
// decremented. The significand is truncated, not rounded.
//
// Interface: start (one-clock pulse while busy is low) samples all operand
// fields; done pulses after gs_pkg::div_latency(NF_IN, K) clocks (88 by
// default); q_s, q_e, q_f, ovf and unf then hold until the next start.
// Operands must be normal numbers (significand MSB set); zero, infinity,
// NaN and subnormals are not decoded, and ovf/unf only flag an exponent out of
// the normal range.
//
// Follows the original SFQ divider: the sign XOR, the biased exponent subtraction, the
// Goldschmidt significand divider with 4-bit significands, three iterations
// and an 11-bit quotient. This design's own: field-level ports instead of
// a packed format, the normalisation step, truncation, the range flags.
module gs_fp_divider
  import gs_pkg::*;
#(
  parameter int unsigned NE     = 5,
  parameter int unsigned NF_IN  = N_IN_DEF,
  parameter int unsigned K      = K_DEF,
  parameter int unsigned NF_OUT = 11
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              z_s,
  input  logic [NE-1:0]     z_e,
  input  logic [NF_IN-1:0]  z_f,
  input  logic              d_s,
  input  logic [NE-1:0]     d_e,
  input  logic [NF_IN-1:0]  d_f,
  output logic              busy,
  output logic              done,
  output logic              q_s,
  output logic [NE-1:0]     q_e,
  output logic [NF_OUT-1:0] q_f,
  output logic              ovf,
  output logic              unf
);
  localparam int unsigned MW    = mult_width(NF_IN, K);
  localparam int unsigned QW    = 2 * MW;
  localparam int unsigned QFRAC = frac_z(NF_IN, K);

  logic [QW-1:0]  zk;
  logic           zs_q, ds_q;
  logic [NE-1:0]  ze_q, de_q;
  logic           adj;

  initial begin
    assert (QFRAC + 1 >= NF_OUT && QFRAC + 2 <= QW)
      else $fatal(1, "gs_fp_divider: NF_OUT does not fit the quotient");
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      zs_q <= 1'b0;
      ds_q <= 1'b0;
      ze_q <= '0;
      de_q <= '0;
    end else if (start && !busy) begin
      zs_q <= z_s;
      ds_q <= d_s;
      ze_q <= z_e;
      de_q <= d_e;
    end
  end

  gs_significand_divider #(.N(NF_IN), .K(K)) u_sig (
    .clk, .rst, .start, .d_in(d_f), .z_in(z_f), .busy, .done, .q(zk)
  );

  // Normalisation: bit QFRAC+1 of z_K has weight 2.
  assign adj = ~zk[QFRAC+1];
  assign q_f = adj ? zk[QFRAC -: NF_OUT] : zk[QFRAC+1 -: NF_OUT];

  sign_exp_unit #(.NE(NE)) u_se (
    .z_s(zs_q), .d_s(ds_q), .z_e(ze_q), .d_e(de_q), .adj,
    .q_s, .q_e, .ovf, .unf
  );
endmodule
