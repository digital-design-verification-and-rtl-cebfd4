// Hough mapper test: random edges and angles of both regions; b must equal
// floor(y + x*cot) (left) or floor(y - x*cot) (right) computed with the
// 24-bit truncated product, two clocks after the input, in order.
module tb_hough_mapper;
  `include "tb_check.svh"
  import ld_pkg::*;
  logic clk = 0, rst_n = 1, in_valid = 0, in_lr = 0, out_valid, out_lr;
  logic [9:0] in_x = 0, in_y = 0;
  logic [5:0] in_idx = 0, out_idx;
  logic [23:0] in_cot = 0;
  logic signed [12:0] out_b;
  int checks = 0, failures = 0;
  int eb [$], elr [$];
  hough_mapper dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end
  always @(posedge clk) if (out_valid) begin
    `CHECK(int'(out_b) == eb.pop_front(), "b value")
    `CHECK(int'({out_lr, out_idx}) == elr.pop_front(), "tag")
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      longint p;
      @(negedge clk);
      in_valid = $urandom_range(0, 3) != 0;
      in_x = 10'($urandom_range(0, 511)); in_y = 10'($urandom_range(0, 511));
      in_lr = $urandom_range(0, 1); in_idx = 6'($urandom_range(0, 35));
      in_cot = 24'($urandom_range(5963, 23399));
      if (in_valid) begin
        p = (longint'(in_x) * longint'(in_cot)) & 64'hFFFFFF;   // 10.14 product
        eb.push_back(int'(in_lr ? ((longint'(in_y) <<< 14) - p) >>> 14 : ((longint'(in_y) <<< 14) + p) >>> 14));
        elr.push_back(int'({in_lr, in_idx}));
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(negedge clk);
    `CHECK(eb.size() == 0, "all results, two-clock latency")
    `TB_FINISH
  end
endmodule
