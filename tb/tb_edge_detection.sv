// Edge detection test on a 16 x 12 frame written into the ROM (random, then a
// bright square). Reference: integer Gauss (/16, floored) over the interior,
// then Sobel over the smoothed interior; every output must carry the right
// position (row X, column Y, from 3), Gx, Gy and edge flag, in raster order,
// (W-4)*(H-4) outputs, done with the last; the duplicated address generator
// and position counters must agree (fusa_err low).
module tb_edge_detection;
  `include "tb_check.svh"
  localparam int W = 16, H = 12;
  logic clk = 0, rst_n = 1, start = 0;
  logic out_valid, out_ed, done, fusa_err;
  logic [9:0] out_x, out_y;
  logic signed [10:0] out_gx, out_gy;
  int img [H][W], g [H][W], sx [H][W], sy [H][W];
  int checks = 0, failures = 0;
  int nout = 0, ndone = 0, ned = 0, nerr = 0;
  edge_detection #(.IMG_W(W), .IMG_H(H)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end

  always @(posedge clk) begin
    if (out_valid) begin
      int r, c, m;
      r = 2 + nout / (W-4); c = 2 + nout % (W-4);   // 0-based frame position
      m = (sx[r][c] < 0 ? -sx[r][c] : sx[r][c]) + (sy[r][c] < 0 ? -sy[r][c] : sy[r][c]);
      `CHECK(int'(out_x) == r + 1 && int'(out_y) == c + 1, "position")
      `CHECK(int'(out_gx) == sx[r][c] && int'(out_gy) == sy[r][c], "gradients")
      `CHECK(out_ed == (m > 210), "edge flag")
      if (out_ed) ned++;
      nout++;
    end
    if (done) begin
      ndone++;
      `CHECK(out_valid && nout == (W-4)*(H-4), "done with the last output")
    end
    if (fusa_err) nerr++;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        img[r][c] = (f == 0) ? $urandom_range(0, 255) : ((r >= 4 && r < 9 && c >= 5 && c < 11) ? 220 : 30);
        dut.u_rom.mem[r*W + c] = 8'(img[r][c]);
      end
      for (int r = 1; r < H-1; r++) for (int c = 1; c < W-1; c++) begin
        int s;
        s = 0;
        for (int i = -1; i <= 1; i++) for (int j = -1; j <= 1; j++)
          s += img[r+i][c+j] * (i == 0 ? 2 : 1) * (j == 0 ? 2 : 1);
        g[r][c] = s / 16;
      end
      for (int r = 2; r < H-2; r++) for (int c = 2; c < W-2; c++) begin
        sx[r][c] = (g[r-1][c+1]-g[r-1][c-1]) + 2*(g[r][c+1]-g[r][c-1]) + (g[r+1][c+1]-g[r+1][c-1]);
        sy[r][c] = (g[r+1][c-1]-g[r-1][c-1]) + 2*(g[r+1][c]-g[r-1][c]) + (g[r+1][c+1]-g[r-1][c+1]);
      end
      nout = 0; ndone = 0; ned = 0; nerr = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      repeat (W*H + 4*W + 40) @(negedge clk);
      `CHECK(nout == (W-4)*(H-4), "output count")
      `CHECK(ndone == 1, "done once")
      `CHECK(ned > 0, "edges found")
      `CHECK(nerr == 0, "replicas agree")
    end
    `TB_FINISH
  end
endmodule
