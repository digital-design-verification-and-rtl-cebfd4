// Sobel filter test: random and step windows; Gx, Gy against the kernels,
// ed against |Gx| + |Gy| > 210, two clocks of latency, back-to-back inputs.
module tb_sobel_filter;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 1, in_valid = 0, out_valid, out_ed;
  logic [2:0][2:0][7:0] in_win = '0;
  logic signed [10:0] out_gx, out_gy;
  int checks = 0, failures = 0;
  int egx [$], egy [$];
  int ned = 0;
  sobel_filter dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end
  always @(posedge clk) if (out_valid) begin
    int gx, gy;
    gx = egx.pop_front(); gy = egy.pop_front();
    `CHECK(int'(out_gx) == gx && int'(out_gy) == gy, "gradients")
    `CHECK(out_ed == ((gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy) > 210), "edge flag")
    if (out_ed) ned++;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int p [3][3];
      @(negedge clk);
      in_valid = 1;
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) begin
        case (n % 4)
          0: p[i][j] = (j == 2) ? 255 : 0;          // vertical step
          1: p[i][j] = (i == 0) ? 255 : 0;          // horizontal step
          default: p[i][j] = $urandom_range(0, 255);
        endcase
        in_win[i][j] = 8'(p[i][j]);
      end
      egx.push_back((p[0][2]-p[0][0]) + 2*(p[1][2]-p[1][0]) + (p[2][2]-p[2][0]));
      egy.push_back((p[2][0]-p[0][0]) + 2*(p[2][1]-p[0][1]) + (p[2][2]-p[0][2]));
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(negedge clk);
    `CHECK(egx.size() == 0, "all outputs seen, latency 2")
    `CHECK(ned > 100 && ned < 3000, "both edge and non-edge seen")
    `TB_FINISH
  end
endmodule
