// sign_exp_unit: sign and exponent of a floating-point quotient.
//
// q_s = z_s XOR d_s, and the biased exponent q_e = z_e - d_e + BIAS - adj,
// where adj = 1 when the significand quotient has to be doubled to be
// normalised (see gs_fp_divider). The difference is formed NE+2 bits wide;
// ovf flags a result above 2^NE - 2 and unf one below 1 (the all-ones and
// all-zeros codes are the special values of the IEEE 754 format). q_e is the
// low NE bits. Combinational. The XOR and the biased subtraction follow the
// original SFQ divider; the flags are this design's addition, since the original does not
// treat exponent range.
module sign_exp_unit #(
  parameter int unsigned NE   = 5,
  parameter int unsigned BIAS = (1 << (NE - 1)) - 1
) (
  input  logic          z_s,
  input  logic          d_s,
  input  logic [NE-1:0] z_e,
  input  logic [NE-1:0] d_e,
  input  logic          adj,
  output logic          q_s,
  output logic [NE-1:0] q_e,
  output logic          ovf,
  output logic          unf
);
  logic signed [NE+1:0] e;

  always_comb begin
    q_s = z_s ^ d_s;
    e   = $signed({2'b00, z_e}) - $signed({2'b00, d_e})
        + $signed((NE+2)'(BIAS)) - $signed((NE+2)'(adj));
    q_e = e[NE-1:0];
    ovf = (e > $signed((NE+2)'((1 << NE) - 2)));
    unf = (e < $signed((NE+2)'(1)));
  end
endmodule
