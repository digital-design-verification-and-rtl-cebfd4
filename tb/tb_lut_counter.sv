// LUT counter test: after each start, idx = 0..35 on 36 consecutive clocks
// with active, done on 35 only, then idle.
module tb_lut_counter;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 1, start = 0, active, done;
  logic [5:0] idx;
  int checks = 0, failures = 0;
  lut_counter #(.N(36)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (2000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int i = 0; i < 36; i++) begin
        `CHECK(active && int'(idx) == i, "index sequence")
        `CHECK(done == (i == 35), "done on the last index")
        @(negedge clk);
      end
      `CHECK(!active && !done, "stops after 36")
      repeat (r) @(negedge clk);
    end
    `TB_FINISH
  end
endmodule
