// Fixed-point multiplier test: random 10.14 operands in the design's range
// (x an integer up to 1023, cot below 1.5) and random full-width ones; the
// output must be bits [37:14] of the exact product.
module tb_fxp_mult;
  `include "tb_check.svh"
  logic [23:0] a, b, p;
  int checks = 0, failures = 0;
  fxp_mult dut (.*);
  initial begin #1000000; failures++; `TB_FINISH end
  initial begin
    for (int n = 0; n < 5000; n++) begin
      longint unsigned full;
      a = (n % 2) ? 24'($urandom) : 24'($urandom_range(0, 1023)) << 14;
      b = (n % 2) ? 24'($urandom) : 24'($urandom_range(0, 24575));
      #1;
      full = longint'(a) * longint'(b);
      `CHECK(p == 24'(full >> 14), "product bits")
      if (n % 2 == 0) `CHECK(real'(p) / 16384.0 - real'(a) * real'(b) / 268435456.0 < 0.0001, "value")
    end
    `TB_FINISH
  end
endmodule
