// bs_multiplier: bit-serial multiplier with a latched parallel operand.
//
// The parallel operand Y is held in a bank of W non-destructive-readout
// latches (NDRO cells in the superconducting original), loaded in one clock by
// y_load. The serial operand X enters on x_in least-significant bit first. A
// chain of D flip-flops delays X so that row i sees X i clocks late; row i
// ANDs that bit with y[i] in a clocked AND gate, so every row's partial-product
// stream is already aligned by weight to the clock count. A binary tree of
// bit-serial adders (log2 W levels, one clock each) sums the W rows.
//
// Timing: if bit 0 of X is sampled at clock edge t0, product bit k is on p_out
// during the clock after edge t0 + k + LAT - 1 and is sampled by a consumer at
// edge t0 + k + LAT, with LAT = 1 + ceil(log2 W) (5 for W = 16). The product of two
// w-bit operands (w <= W) is 2w bits long, so an operation occupies a window
// of 2w clocks: X for w clocks followed by w zero clocks. Windows may follow
// each other back to back while Y is unchanged; y_load, issued between
// windows, also clears the X delay chain so the tail of the last window cannot
// meet the new Y.
//
// Follows the original SFQ divider: latched parallel operand, serial operand broadcast to
// a row of AND gates, D-flip-flop chain, adder tree of serial adders.
// This design's own choices: the delay chain carries X (the original's figure
// draws a chain on a control line), Y is loaded in parallel in one clock,
// and a W that is not a power of two gets a tree padded with zero rows.
module bs_multiplier #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         y_load,
  input  logic [W-1:0] y_in,
  input  logic         x_in,
  output logic         p_out
);

  logic [W-1:0] y_q;       // NDRO bank
  logic [W-1:0] x_dly;     // x_dly[i] = x_in delayed by i clocks
  logic [W-1:0] x_chain;   // flip-flops of the delay chain (index 0 unused)
  logic [W-1:0] pp_q;      // clocked AND row
  // Adder tree in heap order over TW = 2^ceil(log2 W) leaves: node n sums
  // nodes 2n and 2n+1; the leaves TW..2TW-1 are the partial-product rows
  // (rows W..TW-1 are constant zero), node 1 is the product stream.
  localparam int unsigned TW = 1 << $clog2(W);
  logic [2*TW-1:1] node;

  initial begin
    assert (W >= 2) else $fatal(1, "bs_multiplier: W must be at least 2");
  end

  always_comb begin
    x_dly    = x_chain;
    x_dly[0] = x_in;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      y_q     <= '0;
      x_chain <= '0;
      pp_q    <= '0;
    end else begin
      pp_q <= x_dly & y_q;
      if (y_load) begin
        y_q     <= y_in;
        x_chain <= '0;
      end else begin
        x_chain <= {x_dly[W-2:0], 1'b0};
      end
    end
  end

  assign node[2*TW-1:TW] = TW'(pp_q);

  for (genvar n = 1; n < TW; n++) begin : g_add
    serial_adder u_add (
      .clk (clk),
      .rst (rst),
      .clr (1'b0),
      .a   (node[2*n]),
      .b   (node[2*n+1]),
      .s   (node[n])
    );
  end

  assign p_out = node[1];

  // Y may only change between windows: the AND row must not be fed new Y
  // while the delay chain still holds bits of the previous window.
  property p_load_between_windows;
    @(posedge clk) disable iff (rst) y_load |-> !x_in;
  endproperty
  assert property (p_load_between_windows);
endmodule
