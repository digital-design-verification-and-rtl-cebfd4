// Image ROM test: the default picture must be dark road everywhere except the
// two 5-pixel stripes on rows 290..511 (left centred on 520 - row, right on
// 60 + 0.7002*row), and a read must return its pixel exactly one clock later.
module tb_image_rom;
  `include "tb_check.svh"
  logic clk = 0;
  logic [17:0] addr = '0;
  logic [7:0]  data;
  int checks = 0, failures = 0;
  image_rom dut (.clk, .addr, .data);
  always #5 clk = ~clk;
  initial begin repeat (400000) @(posedge clk); failures++; `TB_FINISH end

  function automatic int expected(int r, int c);
    real cl, cr;
    cl = 520.0 - r;
    cr = $floor(60.0 + r * 0.7002);
    if (r >= 290 && ((c >= cl - 2 && c <= cl + 2) || (c >= cr - 2 && c <= cr + 2))) return 210;
    return 50;
  endfunction

  initial begin
    int bright = 0;
    for (int a = 0; a < 512*512; a += 7) begin
      @(negedge clk) addr = 18'(a);
      @(negedge clk);
      `CHECK(int'(data) == expected(a / 512, a % 512), "pixel value")
      if (data == 8'd210) bright++;
    end
    `CHECK(bright > 200, "stripes present")
    `TB_FINISH
  end
endmodule
