// gs_controller: schedule of the bit-serial Goldschmidt divider.
//
// One division runs K iterations on one multiplier. Iteration i (1..K) first
// sets the multiplier's parallel operand ('set x': the seed x0 from the lookup
// table for i = 1, else x_{i-1} = 2 - d_{i-1} from the two's complement
// converter), then streams d_{i-1} through it to give d_i (skipped in the last
// iteration, where d_K is not needed) and z_{i-1} to give z_i. Each stream is
// a window of 2*w_i clocks, w_i = N * 2^(i-1): the w_i operand bits then w_i
// zeros, the time the 2*w_i-bit product needs to leave the multiplier. The
// z window follows the d window without a gap, so the d product is still being
// written back while z streams (the pipelined overlap of the multiplications).
//
// Write-back is steered by a tag pipeline as deep as the multiplier latency
// LAT: every streamed clock pushes (destination, bit index), and the tag leaving
// the pipeline tells which register takes the product bit on p_out now.
// done pulses for one clock on the edge that writes the last bit of z_K; busy
// is high from the clock after start is sampled until done.
// Latency, start edge to done edge: K + sum_{i<K} 4 w_i + 2 w_K + LAT
// (88 clocks for N = 4, K = 3; see gs_pkg::div_latency).
//
// Follows the original SFQ divider: the order lookup, set x, d then z multiplication per
// iteration, overlap of a write-back with the next multiplication, only z in
// the last iteration. This design's own: the window lengths, the
// one-clock 'set x', the start/busy/done handshake.
module gs_controller
  import gs_pkg::*;
#(
  parameter int unsigned N   = N_IN_DEF,
  parameter int unsigned K   = K_DEF,
  parameter int unsigned MW  = mult_width(N, K),
  parameter int unsigned LAT = mult_latency(MW),
  parameter int unsigned IW  = $clog2(2 * MW),
  parameter int unsigned FW  = $clog2(MW) + 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // operand load and seed capture (the start clock)
  output logic          ld,
  // multiplier parallel operand
  output logic          y_load,
  output logic          y_sel,       // 0: seed from lookup, 1: converter
  output logic [FW-1:0] conv_frac,   // fraction bits of d_{i-1}
  // multiplier serial operand
  output logic          x_valid,     // 1: drive an operand bit, 0: zero
  output logic          x_from_z,    // 0: from Reg d, 1: from Reg z
  output logic [IW-1:0] rd_idx,
  // write-back of product bits
  output logic          wr_d,        // into Reg d and Reg x
  output logic          wr_z,        // into Reg z
  output logic [IW-1:0] wr_idx
);
  typedef enum logic [2:0] {S_IDLE, S_SETX, S_DOP, S_ZOP, S_DRAIN} state_t;

  typedef struct packed {
    logic          valid;
    logic          to_z;
    logic          last;
    logic [IW-1:0] idx;
  } tag_t;

  state_t          state;
  logic [7:0]      iter;
  logic [IW:0]     cnt;
  logic [IW:0]     w;
  tag_t            tag_in;
  tag_t            pipe [LAT];
  logic            streaming;

  initial begin
    assert (K >= 2) else $fatal(1, "gs_controller: K must be at least 2");
  end

  assign w         = (IW+1)'(N) << (iter - 1);
  assign streaming = (state == S_DOP) || (state == S_ZOP);
  assign busy      = (state != S_IDLE);
  assign ld        = (state == S_IDLE) && start;
  assign y_load    = (state == S_SETX);
  assign y_sel     = (iter != 8'd1);
  assign conv_frac = FW'((2 * N - 1) << (iter - 2));   // FD(iter-1)
  assign x_valid   = streaming && (cnt < w);
  assign x_from_z  = (state == S_ZOP);
  assign rd_idx    = cnt[IW-1:0];

  always_comb begin
    tag_in       = '0;
    tag_in.valid = streaming;
    tag_in.to_z  = (state == S_ZOP);
    tag_in.last  = (state == S_ZOP) && (iter == 8'(K)) && (cnt == 2 * w - 1);
    tag_in.idx   = cnt[IW-1:0];
  end

  assign wr_d   = pipe[LAT-1].valid && !pipe[LAT-1].to_z;
  assign wr_z   = pipe[LAT-1].valid &&  pipe[LAT-1].to_z;
  assign wr_idx = pipe[LAT-1].idx;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= S_IDLE;
      iter  <= 8'd1;
      cnt   <= '0;
      done  <= 1'b0;
      for (int j = 0; j < LAT; j++) pipe[j] <= '0;
    end else begin
      pipe[0] <= tag_in;
      for (int j = 1; j < LAT; j++) pipe[j] <= pipe[j-1];
      done <= pipe[LAT-1].valid && pipe[LAT-1].last;

      unique case (state)
        S_IDLE: if (start) begin
          iter  <= 8'd1;
          state <= S_SETX;
        end
        S_SETX: begin
          cnt   <= '0;
          state <= (iter < 8'(K)) ? S_DOP : S_ZOP;
        end
        S_DOP: begin
          if (cnt == 2 * w - 1) begin
            cnt   <= '0;
            state <= S_ZOP;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_ZOP: begin
          if (cnt == 2 * w - 1) begin
            cnt <= '0;
            if (iter == 8'(K)) begin
              state <= S_DRAIN;
            end else begin
              iter  <= iter + 8'd1;
              state <= S_SETX;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DRAIN: if (pipe[LAT-1].valid && pipe[LAT-1].last) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
