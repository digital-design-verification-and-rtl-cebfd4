// Triplication voter test: with any one replica corrupted the output is the
// good value and mismatch is set; with all three equal there is no mismatch.
module tb_tmr_voter;
  `include "tb_check.svh"
  logic [7:0] a, b, c, y;
  logic mismatch;
  int checks = 0, failures = 0;
  tmr_voter #(.W(8)) dut (.*);
  initial begin #1000000; failures++; `TB_FINISH end
  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] v, bad;
      int which;
      v = 8'($urandom);
      bad = v ^ 8'($urandom_range(1, 255));
      which = $urandom_range(0, 3);
      a = (which == 0) ? bad : v;
      b = (which == 1) ? bad : v;
      c = (which == 2) ? bad : v;
      #1;
      `CHECK(y == v, "majority value")
      `CHECK(mismatch == (which != 3), "mismatch flag")
    end
    `TB_FINISH
  end
endmodule
