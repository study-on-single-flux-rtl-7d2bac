// gs_register: result register of the divider (Reg for x_i, d_i or z_i).
//
// Product bits leave the bit-serial multiplier one per clock; each is written
// into the register at its bit position (wr_en, wr_idx, wr_bit). The same
// register feeds the next multiplication bit by bit through rd_idx/rd_bit, and
// its whole value is visible on q. A write and a read in the same clock may
// address different bits; the divider always reads a bit before it is
// overwritten, so one register holds both d_{i-1} and d_i. load replaces the
// whole value (used to take the operand at start). Reset is asynchronous and
// active high. The published SFQ design gives the register's role, not its insides.
module gs_register #(
  parameter int unsigned W  = 16,
  parameter int unsigned IW = (W > 1) ? $clog2(W) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [W-1:0]  load_val,
  input  logic          wr_en,
  input  logic [IW-1:0] wr_idx,
  input  logic          wr_bit,
  input  logic [IW-1:0] rd_idx,
  output logic          rd_bit,
  output logic [W-1:0]  q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)        q         <= '0;
    else if (load)  q         <= load_val;
    else if (wr_en) q[wr_idx] <= wr_bit;
  end

  assign rd_bit = q[rd_idx];
endmodule
