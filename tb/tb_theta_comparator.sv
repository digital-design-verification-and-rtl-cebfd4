// Theta comparator test: angles swept over 0..180 degrees in both quadrant
// encodings; right for 110..145 deg, left for 35..70 deg, otherwise rejected;
// position and region flag written with wr_en one clock later. Each ROI
// bound is also presented exactly and one unit either side (bounds inclusive).
module tb_theta_comparator;
  `include "tb_check.svh"
  import ld_pkg::*;
  logic clk = 0, rst_n = 1, in_valid = 0, in_q2 = 0, wr_en, rejected;
  logic [16:0] in_theta = 0;
  logic [9:0] in_x = 0, in_y = 0;
  edge_t out_edge;
  int checks = 0, failures = 0;
  int nr = 0, nl = 0, nrej = 0;
  int bounds [4] = '{TH_R_MIN, TH_R_MAX, TH_L_MIN, TH_L_MAX};
  theta_comparator dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (100000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int u = 0; u < 102944; u += 97) begin
      real deg;
      bit r, l;
      @(negedge clk);
      in_valid = 1;
      in_q2 = (u >= 51472);
      in_theta = 17'(in_q2 ? u - 51472 : u);
      in_x = 10'($urandom); in_y = 10'($urandom);
      deg = real'(u) / 571.9;
      r = (deg >= 110.0 && deg <= 145.0);
      l = (deg >= 35.0 && deg <= 70.0);
      @(negedge clk);
      in_valid = 0;
      if (deg > 0.05 && (deg - 35.0 > 0.01 || 35.0 - deg > 0.01) && (deg - 70.0 > 0.01 || 70.0 - deg > 0.01)
          && (deg - 110.0 > 0.01 || 110.0 - deg > 0.01) && (deg - 145.0 > 0.01 || 145.0 - deg > 0.01)) begin
        `CHECK(wr_en == (r || l) && rejected == !(r || l), "ROI decision")
        if (wr_en) `CHECK(out_edge.lr == r && out_edge.x == in_x && out_edge.y == in_y, "edge written")
      end
      if (wr_en && out_edge.lr) nr++;
      if (wr_en && !out_edge.lr) nl++;
      if (rejected) nrej++;
    end
    `CHECK(nr > 0 && nl > 0 && nrej > 0, "all three outcomes")
    foreach (bounds[k]) for (int d = -1; d <= 1; d++) begin
      int u;
      bit r, l;
      u = bounds[k] + d;
      r = (u >= TH_R_MIN && u <= TH_R_MAX);
      l = (u >= TH_L_MIN && u <= TH_L_MAX);
      @(negedge clk);
      in_valid = 1;
      in_q2 = (u >= TH_90);
      in_theta = 17'(in_q2 ? u - TH_90 : u);
      @(negedge clk);
      in_valid = 0;
      `CHECK(wr_en == (r || l) && (!wr_en || out_edge.lr == r), "ROI bound")
    end
    `TB_FINISH
  end
endmodule
