// tb_gs_controller: compares the controller's outputs clock by clock with a
// schedule built here from the algorithm (N = 4, K = 3, multiplier latency 5):
//   cycle 0 start/ld; then per iteration i: one 'set x' clock, a d window
//   of 2 w_i clocks (not in the last iteration) and a z window of 2 w_i clocks
//   with w_i = 4, 8, 16, the first w_i clocks of each driving operand bits;
//   each streamed clock is written back 5 clocks later; done follows the
//   last write-back, 88 clocks after the start edge. Two divisions run, the
//   second started in the clock done is seen.
module tb_gs_controller;
  localparam int N = 4, K = 3, LAT = 5, TOTAL = 100;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic busy, done, ld, y_load, y_sel, x_valid, x_from_z, wr_d, wr_z;
  logic [4:0] conv_frac, rd_idx, wr_idx;
  int checks = 0, failures = 0;

  gs_controller #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected schedule per cycle after the start cycle.
  bit e_yload [TOTAL], e_ysel [TOTAL], e_xv [TOTAL], e_xz [TOTAL];
  bit e_wrd [TOTAL], e_wrz [TOTAL], e_done [TOTAL];
  int e_frac [TOTAL], e_rd [TOTAL], e_wi [TOTAL];
  int done_cycle;

  task automatic build();
    int c = 1, w, fd;
    int last_c = 0;
    fd = N;   // fraction bits of d_0
    for (int i = 1; i <= K; i++) begin
      w = N << (i - 1);
      e_yload[c] = 1; e_ysel[c] = (i > 1); e_frac[c] = (i > 1) ? fd : 0;
      c++;
      for (int op = (i < K) ? 0 : 1; op < 2; op++)
        for (int k = 0; k < 2 * w; k++) begin
          e_xv[c] = (k < w); e_xz[c] = (op == 1); e_rd[c] = k;
          if (op == 0) e_wrd[c + LAT] = 1; else e_wrz[c + LAT] = 1;
          e_wi[c + LAT] = k;
          last_c = c;
          c++;
        end
      fd = (i == 1) ? 2 * N - 1 : 2 * fd;
    end
    done_cycle = last_c + LAT + 1;
    e_done[done_cycle] = 1;
  endtask

  task automatic run_one();
    start = 1'b1;
    #1;
    checks++; if (!ld) begin failures++; $display("FAIL ld"); end
    @(negedge clk); start = 1'b0;
    for (int c = 1; c <= done_cycle; c++) begin
      checks++;
      if (y_load != e_yload[c] || x_valid != e_xv[c] || wr_d != e_wrd[c] || wr_z != e_wrz[c]
          || done != e_done[c] || busy != (c < done_cycle)
          || (y_load && y_sel != e_ysel[c]) || (y_load && y_sel && int'(conv_frac) != e_frac[c])
          || (x_valid && (x_from_z != e_xz[c] || int'(rd_idx) != e_rd[c]))
          || ((wr_d || wr_z) && int'(wr_idx) != e_wi[c])) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d: yl=%b xv=%b xz=%b rd=%0d wd=%b wz=%b wi=%0d done=%b frac=%0d",
                   c, y_load, x_valid, x_from_z, rd_idx, wr_d, wr_z, wr_idx, done, conv_frac);
      end
      if (c < done_cycle) @(negedge clk);
    end
  endtask

  initial begin
    build();
    checks++;
    if (done_cycle != 89) begin failures++; $display("FAIL latency model %0d", done_cycle); end
    @(negedge clk); rst = 1'b0;
    @(negedge clk);
    run_one();
    run_one();   // back to back
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
