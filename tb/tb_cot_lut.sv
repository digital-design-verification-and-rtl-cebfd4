// cot LUT test: every index of both regions against |cot(theta)| * 2^14 in
// floating point (right theta = -70+i, left theta = -145+i degrees),
// within one LSB; right values must rise and left values fall with i.
module tb_cot_lut;
  `include "tb_check.svh"
  logic clk = 0, lr = 0;
  logic [5:0] idx = 0;
  logic [23:0] cot;
  int checks = 0, failures = 0;
  cot_lut dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (2000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    int prev;
    for (int r = 0; r < 2; r++) begin
      prev = r ? 0 : 1 << 30;
      for (int i = 0; i < 36; i++) begin
        real th, c, e;
        @(negedge clk) lr = r[0]; idx = 6'(i);
        @(negedge clk);
        th = (r ? -70.0 : -145.0) + i;
        c = $cos(th * 3.14159265358979 / 180.0) / $sin(th * 3.14159265358979 / 180.0);
        if (c < 0) c = -c;
        e = c * 16384.0 - real'(cot);
        `CHECK(e < 1.0 && e > -1.0, "cot value")
        `CHECK(r ? int'(cot) > prev : int'(cot) < prev, "monotonic")
        prev = int'(cot);
      end
    end
    `TB_FINISH
  end
endmodule
