// Maximum detector test: a stream of accumulator updates (each address's
// count rising by one per update, as the accumulator produces them) over 200
// addresses, skewed so a few cells lead. After every update the two kept
// entries must be two distinct cells holding the two highest counts of the
// model, with the right b and index; clear empties them.
module tb_max_detector;
  `include "tb_check.svh"
  import ld_pkg::*;
  localparam int N = 200;
  logic clk = 0, rst_n = 1, clear = 0, in_valid = 0;
  logic [13:0] in_addr = 0;
  logic [15:0] in_count = 0;
  logic signed [12:0] in_b = 0;
  logic [5:0] in_idx = 0;
  line_t max1, max2;
  int checks = 0, failures = 0;
  int cnt [N];
  max_detector dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (100000) @(posedge clk); failures++; `TB_FINISH end
  function automatic int bof(int a); return a * 2 - 52; endfunction
  function automatic int iof(int a); return a % 36; endfunction
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      `CHECK(max1.votes == 0 && max2.votes == 0, "cleared")
      foreach (cnt[i]) cnt[i] = 0;
      for (int n = 0; n < 6000; n++) begin
        int a, t1, t2;
        a = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 4) : $urandom_range(0, N-1);
        cnt[a]++;
        @(negedge clk);
        in_valid = 1; in_addr = 14'(a); in_count = 16'(cnt[a]);
        in_b = 13'(bof(a)); in_idx = 6'(iof(a));
        @(negedge clk);
        in_valid = 0;
        t1 = 0; t2 = 0;
        foreach (cnt[i]) begin
          if (cnt[i] > t1) begin t2 = t1; t1 = cnt[i]; end
          else if (cnt[i] > t2) t2 = cnt[i];
        end
        `CHECK(int'(max1.votes) == t1 && int'(max2.votes) == t2, "two highest counts")
        `CHECK(!(max1.b == max2.b && max1.idx == max2.idx) || max2.votes == 0, "distinct cells")
        if (max1.votes != 0) begin
          int a1;
          a1 = (int'(max1.b) + 52) / 2;
          `CHECK(cnt[a1] == int'(max1.votes) && iof(a1) == int'(max1.idx), "max1 is that cell")
        end
        if (max2.votes != 0) begin
          int a2;
          a2 = (int'(max2.b) + 52) / 2;
          `CHECK(cnt[a2] == int'(max2.votes) && iof(a2) == int'(max2.idx), "max2 is that cell")
        end
      end
    end
    `TB_FINISH
  end
endmodule
