// CORDIC test: random first-quadrant vectors, one per clock, against
// atan(y/x) in units of atan(2^-15) rad. Ten iterations must stay within one
// degree (572 units; the document quotes about 1 degree at worst) and the
// mean error must be under 0.3 degree; results arrive exactly ITER clocks
// after their inputs, in order, with the sideband.
module tb_cordic;
  `include "tb_check.svh"
  localparam int ITER = 10;
  localparam real UNIT = 3.0517578115e-5;
  logic clk = 0, rst_n = 1, in_valid = 0;
  logic [10:0] in_x = 0, in_y = 0;
  logic [7:0] in_sb = 0, out_sb;
  logic out_valid;
  logic [16:0] out_theta;
  int checks = 0, failures = 0;
  real exp_q [$];
  int  sb_q [$];
  longint t_q [$];
  longint cyc = 0;
  real err_sum = 0.0;
  int nres = 0;
  cordic #(.ITER(ITER), .SB_W(8)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end
  always @(posedge clk) begin
    cyc++;
    if (out_valid) begin
      real e, d;
      e = exp_q.pop_front();
      d = (real'(out_theta) - e); if (d < 0) d = -d;
      err_sum += d; nres++;
      `CHECK(d < 572.0, "angle within one degree")
      `CHECK(int'(out_sb) == sb_q.pop_front(), "sideband")
      `CHECK(cyc - t_q.pop_front() == ITER, "latency = ITER clocks")  // sampled at edge t, seen at edge t+ITER
    end
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int x, y;
      @(negedge clk);
      x = (n == 0) ? 0 : $urandom_range(0, 1020);
      y = (n == 1) ? 0 : $urandom_range(0, 1020);
      if (x == 0 && y == 0) x = 1;
      in_valid = 1; in_x = 11'(x); in_y = 11'(y); in_sb = 8'(n);
      exp_q.push_back($atan2(real'(y), real'(x)) / UNIT);
      sb_q.push_back(n % 256);
      t_q.push_back(cyc + 1);   // sampled at the coming edge
    end
    @(negedge clk) in_valid = 0;
    repeat (ITER + 3) @(negedge clk);
    $display("INFO mean error %0.3f deg", err_sum / nres / 571.9);
    `CHECK(nres == 3000, "all results")
    `CHECK(err_sum / nres < 0.3 * 571.9, "mean error")
    `TB_FINISH
  end
endmodule
