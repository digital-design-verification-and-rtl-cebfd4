// Quadrant detector test: random signed gradients (and zero cases). Same signs
// must give q2 = 0 and operands (|Gy|, |Gx|); opposite signs q2 = 1 and
// (|Gx|, |Gy|); the position passes through; one clock of latency.
module tb_quadrant_detector;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 1, in_valid = 0;
  logic signed [10:0] in_gx = 0, in_gy = 0;
  logic [9:0] in_x = 0, in_y = 0, out_x, out_y;
  logic out_valid, out_q2;
  logic [10:0] out_cx, out_cy;
  int checks = 0, failures = 0;
  quadrant_detector dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int gx, gy, ax, ay;
      bit same;
      gx = (n < 4) ? ((n & 1) ? 0 : 5) : $urandom_range(0, 2040) - 1020;
      gy = (n < 4) ? ((n & 2) ? 0 : -7) : $urandom_range(0, 2040) - 1020;
      @(negedge clk);
      in_valid = 1; in_gx = 11'(gx); in_gy = 11'(gy);
      in_x = 10'($urandom); in_y = 10'($urandom);
      ax = gx < 0 ? -gx : gx; ay = gy < 0 ? -gy : gy;
      same = (gx < 0) == (gy < 0);
      @(negedge clk);
      in_valid = 0;
      `CHECK(out_valid, "valid")
      `CHECK(out_q2 == !same, "quadrant flag")
      `CHECK(int'(out_cx) == (same ? ay : ax) && int'(out_cy) == (same ? ax : ay), "operands")
      `CHECK(out_x == in_x && out_y == in_y, "position carried")
    end
    `TB_FINISH
  end
endmodule
