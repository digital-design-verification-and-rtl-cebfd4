// Position counters test (8 x 7 frame): positions (3,3) .. (H-2, W-2) in
// raster order on enabled clocks only, done at the end and holding there.
module tb_pos_counters;
  `include "tb_check.svh"
  localparam int W = 8, H = 7;
  logic clk = 0, rst_n = 1, start = 0, en = 0, done;
  logic [9:0] x, y;
  int checks = 0, failures = 0;
  pos_counters #(.IMG_W(W), .IMG_H(H)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (2000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    int n = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (n < (W-4)*(H-4)) begin
      en = $urandom_range(0, 1);
      #1;
      if (en) begin
        `CHECK(int'(x) == 3 + n / (W-4) && int'(y) == 3 + n % (W-4), "position")
        n++;
      end
      @(negedge clk);
    end
    en = 0;
    @(negedge clk);
    `CHECK(done, "done at the end")
    `CHECK(int'(x) == H-2 && int'(y) == W-2, "holds at the last position")
    en = 1; repeat (3) @(negedge clk);
    `CHECK(int'(x) == H-2 && int'(y) == W-2, "stays stopped")
    `TB_FINISH
  end
endmodule
