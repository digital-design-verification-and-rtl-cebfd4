// Image control test (10 x 7 random frame, random input gaps, two frames):
// the window stream must be every 3x3 neighbourhood of the frame in raster
// order, (W-2)*(H-2) of them, with done on the last one. The duplicated
// control unit must agree (fusa_err low); a forced difference in its write
// address must raise fusa_err.
module tb_image_control;
  `include "tb_check.svh"
  localparam int W = 10, H = 7;
  logic clk = 0, rst_n = 1, start = 0, in_valid = 0;
  logic [7:0] in_pix = 0;
  logic [2:0][2:0][7:0] win;
  logic win_valid, done, fusa_err;
  logic [7:0] img [H][W];
  int checks = 0, failures = 0;
  int nwin, ndone, nerr;
  image_control #(.IMG_W(W), .IMG_H(H)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end

  always @(posedge clk) begin
    if (win_valid) begin
      int r, c;
      r = nwin / (W-2); c = nwin % (W-2);
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          `CHECK(win[i][j] == img[r+i][c+j], "window pixel")
      nwin++;
    end
    if (fusa_err) nerr++;
    if (done) begin
      ndone++;
      `CHECK(nwin == (W-2)*(H-2), "done with the last window")
    end
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = 8'($urandom);
      nwin = 0; ndone = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int p = 0; p < W*H; ) begin
        in_valid = (f == 0) ? 1'b1 : ($urandom_range(0, 2) != 0);
        in_pix = img[p / W][p % W];
        @(negedge clk);
        if (in_valid) p++;
      end
      in_valid = 0;
      repeat (3*W) @(negedge clk);
      `CHECK(nwin == (W-2)*(H-2), "window count")
      `CHECK(ndone == 1, "one done")
    end
    `CHECK(nerr == 0, "replica control units agree")
    force dut.g_fusa.waddr2 = ~dut.waddr;
    @(negedge clk);
    release dut.g_fusa.waddr2;
    @(negedge clk);
    `CHECK(nerr > 0, "forced control difference reported")
    `TB_FINISH
  end
endmodule
