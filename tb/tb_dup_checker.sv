// Duplication checker test: equal replicas never flag; any single-bit
// difference flags err on the next clock.
module tb_dup_checker;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 1, err;
  logic [15:0] a = 0, b = 0;
  int checks = 0, failures = 0;
  dup_checker #(.W(16)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      bit flip;
      @(negedge clk);
      a = 16'($urandom);
      flip = $urandom_range(0, 1);
      b = flip ? a ^ (16'(1) << $urandom_range(0, 15)) : a;
      @(negedge clk);
      `CHECK(err == flip, "mismatch flag")
    end
    `TB_FINISH
  end
endmodule
