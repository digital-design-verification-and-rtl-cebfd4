// Theta detection test: random gradients and positions, one per clock. The
// reference folds atan2(Gx, Gy) into [0,180) degrees in floating point and
// sorts it into right (110..145) / left (35..70) / rejected; cases within
// 1 degree of an ROI border are not judged (CORDIC error). Results must come
// CORDIC_ITER+2 = 12 clocks after their inputs, in order, with the position;
// in_done must come out with the same delay; the duplicated CORDIC must agree.
module tb_theta_detection;
  `include "tb_check.svh"
  import ld_pkg::*;
  logic clk = 0, rst_n = 1, in_ed = 0, in_done = 0;
  logic signed [10:0] in_gx = 0, in_gy = 0;
  logic [9:0] in_x = 0, in_y = 0;
  logic wr_en, rejected, out_done, fusa_err;
  edge_t out_edge;
  int checks = 0, failures = 0;
  int cls_q [$];       // 0 reject, 1 left, 2 right, 3 don't care
  int pos_q [$];
  longint t_q [$];
  longint cyc = 0, t_done = 0;
  int nerr = 0, njudged = 0;
  theta_detection dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end
  always @(posedge clk) begin
    cyc++;
    if (fusa_err) nerr++;
    if (out_done) `CHECK(cyc - t_done == 12, "done latency")
    if (wr_en || rejected) begin
      int cls, pos;
      cls = cls_q.pop_front(); pos = pos_q.pop_front();
      `CHECK(cyc - t_q.pop_front() == 12, "latency 12 clocks")
      if (cls != 3) begin
        njudged++;
        `CHECK(rejected == (cls == 0), "rejection")
        if (wr_en) `CHECK(out_edge.lr == (cls == 2), "region")
      end
      if (wr_en) `CHECK(int'({out_edge.x, out_edge.y}) == pos, "position")
    end
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int gx, gy;
      real d;
      @(negedge clk);
      gx = $urandom_range(0, 1600) - 800; gy = $urandom_range(0, 1600) - 800;
      if (gx == 0 && gy == 0) gx = 1;
      in_ed = ($urandom_range(0, 3) != 0);
      in_gx = 11'(gx); in_gy = 11'(gy);
      in_x = 10'($urandom); in_y = 10'($urandom);
      if (in_ed) begin
        d = $atan2(real'(gx), real'(gy)) * 180.0 / 3.14159265358979;
        if (d < 0.0) d += 180.0;
        if (d >= 180.0) d -= 180.0;
        if ((d > 34.0 && d < 36.0) || (d > 69.0 && d < 71.0) || (d > 109.0 && d < 111.0) || (d > 144.0 && d < 146.0))
          cls_q.push_back(3);
        else if (d >= 110.0 && d <= 145.0) cls_q.push_back(2);
        else if (d >= 35.0 && d <= 70.0) cls_q.push_back(1);
        else cls_q.push_back(0);
        pos_q.push_back(int'({in_x, in_y}));
        t_q.push_back(cyc + 1);
      end
    end
    @(negedge clk) in_ed = 0; in_done = 1; t_done = cyc + 1;
    @(negedge clk) in_done = 0;
    repeat (20) @(negedge clk);
    `CHECK(cls_q.size() == 0, "every edge accounted for")
    `CHECK(njudged > 2500, "enough judged cases")
    `CHECK(nerr == 0, "CORDIC replicas agree")
    `TB_FINISH
  end
endmodule
