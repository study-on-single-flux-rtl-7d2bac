// serial_adder: bit-serial adder, the '+' node of the multiplier's adder tree.
//
// Two operands arrive least-significant bit first, one bit per clock. Each
// clock the full-adder sum of a, b and the stored carry is registered on s and
// the carry-out is kept for the next bit, so the sum stream leaves one clock
// after the operand streams. A stream whose value fits its window leaves the
// carry at zero when it ends, so consecutive operations need no clear; clr
// (synchronous) and rst (asynchronous, active high) zero the carry and sum.
// The published SFQ design names this element only; the carry flip-flop form is this
// design's choice.
module serial_adder (
  input  logic clk,
  input  logic rst,
  input  logic clr,
  input  logic a,
  input  logic b,
  output logic s
);
  logic carry;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      s     <= 1'b0;
      carry <= 1'b0;
    end else if (clr) begin
      s     <= 1'b0;
      carry <= 1'b0;
    end else begin
      s     <= a ^ b ^ carry;
      carry <= (a & b) | (a & carry) | (b & carry);
    end
  end
endmodule
