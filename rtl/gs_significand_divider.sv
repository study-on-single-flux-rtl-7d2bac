// gs_significand_divider: Goldschmidt division of significands on one
// bit-serial multiplier.
//
// Computes q = z0 / d0 by z_i = z_{i-1} * x_{i-1}, d_i = d_{i-1} * x_{i-1},
// x_i = 2 - d_i, starting from a table seed x0 ~ 1/d0. d_i converges to one
// and z_i to the quotient quadratically: with a seed good to 2^-p the
// relative error after K iterations is below 2^-(p * 2^K) (about 2^-12 for
// p = 3, K = 3, beyond the 11-bit quotient). All products are kept exact,
// so the result is the exact product z0 * x0 * x1 * ... * x_{K-1}.
//
// Inputs, sampled with start (one-clock pulse while busy is low):
//   d_in = 0.1xxx  divisor significand halved, N fraction bits, MSB must be 1
//   z_in = 1.xxx   dividend significand, N-1 fraction bits, MSB must be 1
// Output q = z_K, 2*MW bits with QFRAC fraction bits (for N = 4, K = 3:
// 32 bits, 27 fraction bits, value in (1, 4)), valid from the done pulse until
// the next start. Latency: gs_pkg::div_latency(N, K) clocks (88 by default).
//
// Structure as in the original SFQ divider's block diagram: lookup table, one multiplier
// whose parallel operand is x_{i-1} and whose serial operand is d_{i-1} or
// z_{i-1}, registers for x_i, d_i and z_i, and a two's complement converter
// from Reg x back to the multiplier. The exact-width schedule, the write-back
// in place and the handshake are this design's choices.
module gs_significand_divider
  import gs_pkg::*;
#(
  parameter int unsigned N = N_IN_DEF,
  parameter int unsigned K = K_DEF
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          start,
  input  logic [N-1:0]                  d_in,
  input  logic [N-1:0]                  z_in,
  output logic                          busy,
  output logic                          done,
  output logic [2*mult_width(N,K)-1:0]  q
);
  localparam int unsigned MW  = mult_width(N, K);
  localparam int unsigned QW  = 2 * MW;
  localparam int unsigned LAT = mult_latency(MW);
  localparam int unsigned IW  = $clog2(QW);
  localparam int unsigned DIW = $clog2(MW);
  localparam int unsigned FW  = $clog2(MW) + 1;

  logic          ld, y_load, y_sel, x_valid, x_from_z, wr_d, wr_z;
  logic [FW-1:0] conv_frac;
  logic [IW-1:0] rd_idx, wr_idx;
  logic [N-1:0]  seed, seed_q;
  logic [MW-1:0] x_q, x_next, y_in;
  logic [QW-1:0] z_q;
  logic          d_bit, z_bit, x_in, p_out;

  gs_controller #(.N(N), .K(K), .MW(MW), .LAT(LAT), .IW(IW), .FW(FW)) u_ctrl (
    .clk, .rst, .start, .busy, .done, .ld, .y_load, .y_sel, .conv_frac,
    .x_valid, .x_from_z, .rd_idx, .wr_d, .wr_z, .wr_idx
  );

  recip_lut #(.N(N)) u_lut (.d(d_in), .x0(seed));

  // The lookup is read in the start clock.
  always_ff @(posedge clk or posedge rst) begin
    if (rst)     seed_q <= '0;
    else if (ld) seed_q <= seed;
  end

  gs_register #(.W(MW), .IW(DIW)) u_reg_d (
    .clk, .rst, .load(ld), .load_val(MW'(d_in)),
    .wr_en(wr_d), .wr_idx(wr_idx[DIW-1:0]), .wr_bit(p_out),
    .rd_idx(rd_idx[DIW-1:0]), .rd_bit(d_bit), .q()
  );

  gs_register #(.W(MW), .IW(DIW)) u_reg_x (
    .clk, .rst, .load(ld), .load_val('0),
    .wr_en(wr_d), .wr_idx(wr_idx[DIW-1:0]), .wr_bit(p_out),
    .rd_idx('0), .rd_bit(), .q(x_q)
  );

  gs_register #(.W(QW), .IW(IW)) u_reg_z (
    .clk, .rst, .load(ld), .load_val(QW'(z_in)),
    .wr_en(wr_z), .wr_idx(wr_idx), .wr_bit(p_out),
    .rd_idx(rd_idx), .rd_bit(z_bit), .q(z_q)
  );

  twos_comp_conv #(.W(MW), .FW(FW)) u_conv (.d(x_q), .frac(conv_frac), .x(x_next));

  assign y_in = y_sel ? x_next : MW'(seed_q);
  assign x_in = x_valid & (x_from_z ? z_bit : d_bit);

  bs_multiplier #(.W(MW)) u_mult (
    .clk, .rst, .y_load, .y_in, .x_in, .p_out
  );

  assign q = z_q;

  // d_{i-1} is read from the low half of Reg d only.
  assert property (@(posedge clk) disable iff (rst)
                   x_valid && !x_from_z |-> rd_idx < IW'(MW));
  assert property (@(posedge clk) disable iff (rst) start && !busy |-> d_in[N-1] && z_in[N-1]);
endmodule
