// Gaussian filter test: random and extreme windows against
// floor((corners + 2*edges + 4*centre) / 16), one clock of latency.
module tb_gaussian_filter;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 1, in_valid = 0, out_valid;
  logic [2:0][2:0][7:0] in_win = '0;
  logic [7:0] out_pix;
  int checks = 0, failures = 0;
  gaussian_filter dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int s;
      @(negedge clk);
      in_valid = 1;
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
        in_win[i][j] = (n == 0) ? 8'hff : (n == 1) ? 8'h00 : 8'($urandom);
      s = 0;
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
        s += int'(in_win[i][j]) * ((i == 1 ? 2 : 1) * (j == 1 ? 2 : 1));
      @(negedge clk);
      in_valid = 0;
      `CHECK(out_valid, "valid after one clock")
      `CHECK(int'(out_pix) == s / 16, "gauss value")
    end
    `TB_FINISH
  end
endmodule
