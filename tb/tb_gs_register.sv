// tb_gs_register: loads a word, rewrites it bit by bit while reading a
// different bit each clock (as the divider does when a new product replaces
// the operand it is made from), and checks q and rd_bit against a model.
module tb_gs_register;
  localparam int W = 32;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0, wr_en = 1'b0, wr_bit = 1'b0, rd_bit;
  logic [W-1:0] load_val = '0, q, model;
  logic [4:0] wr_idx = '0, rd_idx = '0;
  int checks = 0, failures = 0;

  gs_register #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst = 1'b0;
    checks++; if (q != '0) begin failures++; $display("FAIL reset"); end
    for (int t = 0; t < 20; t++) begin
      model = $urandom;
      load = 1'b1; load_val = model; @(negedge clk); load = 1'b0;
      checks++; if (q != model) begin failures++; $display("FAIL load"); end
      for (int k = 0; k < 200; k++) begin
        wr_en = 1'($urandom); wr_idx = 5'($urandom); wr_bit = 1'($urandom);
        rd_idx = 5'($urandom);
        #1;
        checks++;
        if (rd_bit != model[rd_idx]) begin failures++; $display("FAIL read"); end
        @(negedge clk);
        if (wr_en) model[wr_idx] = wr_bit;
        checks++;
        if (q != model) begin failures++; $display("FAIL write q=%h model=%h", q, model); end
      end
      wr_en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
