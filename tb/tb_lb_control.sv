// Line-buffer control test (8 x 6 frame, input with random gaps): exactly one
// write enable per input pixel, rotating over the four buffers row by row;
// no window read before four rows are in; (W-2)*(H-2) window reads, each with
// three read enables starting at the top-row buffer; last on the final read;
// and every read addresses a slot not yet overwritten by the next row.
module tb_lb_control;
  `include "tb_check.svh"
  localparam int W = 8, H = 6;
  logic clk = 0, rst_n = 1, start = 0, in_valid = 0;
  logic [3:0] we, re;
  logic [2:0] waddr, raddr;
  logic [1:0] top_sel;
  logic rd_valid, last;
  int checks = 0, failures = 0;
  lb_control #(.IMG_W(W), .IMG_H(H)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (5000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    int npix = 0, nrd = 0, nlast = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int c = 0; c < 400; c++) begin
      in_valid = (npix < W*H) && ($urandom_range(0, 3) != 0);
      #1;
      if (in_valid) begin
        int row;
        row = npix / W;
        `CHECK(we == 4'(1 << (row % 4)), "one-hot write enable of row mod 4")
        `CHECK(int'(waddr) == npix % W, "write address")
      end else begin
        `CHECK(we == 0, "no write without input")
      end
      if (rd_valid) begin
        int k;
        k = nrd / (W-2);
        `CHECK(npix >= 4*W || npix == W*H, "read only after four rows")
        `CHECK(int'(top_sel) == k % 4, "top row buffer")
        `CHECK(int'(raddr) == nrd % (W-2), "read column")
        `CHECK($countones(re) == 3 && re[top_sel] && re[2'(top_sel+1)] && re[2'(top_sel+2)], "three read enables")
        nrd++;
      end
      if (last) nlast++;
      if (last) `CHECK(nrd == (W-2)*(H-2), "last on final window")
      if (in_valid) npix++;
      @(negedge clk);
    end
    `CHECK(nrd == (W-2)*(H-2), "window count")
    `CHECK(nlast == 1, "single last")
    `TB_FINISH
  end
endmodule
