// twos_comp_conv: forms the next Goldschmidt factor x_i = 2 - d_i.
//
// d_i is a fixed-point number below one with f fraction bits held in the low
// bits of a W-bit word. Its two's complement over f+1 bits, (~d + 1) masked
// to f+1 bits, is exactly 2 - d_i (format 1.f) for 0 < d_i < 1. f changes
// from iteration to iteration because the numbers are kept exact, so it is
// an input. Combinational. The published SFQ design specifies the function (2 - d_i by a
// two's complement converter); the parallel form is this design's choice.
module twos_comp_conv #(
  parameter int unsigned W  = 16,
  parameter int unsigned FW = $clog2(W) + 1
) (
  input  logic [W-1:0]  d,
  input  logic [FW-1:0] frac,
  output logic [W-1:0]  x
);
  logic [W:0] mask;

  always_comb begin
    mask = ((W+1)'(1) << (frac + 1)) - 1'b1;
    x    = W'((~{1'b0, d} + 1'b1) & mask);
  end
endmodule
