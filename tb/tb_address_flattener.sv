// Address flattener test: random b (inside and outside both ROIs), region and
// angle index; a vote with addr = ((b-bmin)>>1)*36 + idx (+4212 for left) and
// the bin's b for pairs inside the ROI, invalid_b otherwise; ROI borders
// included explicitly.
module tb_address_flattener;
  `include "tb_check.svh"
  import ld_pkg::*;
  logic clk = 0, rst_n = 1, in_valid = 0, in_lr = 0;
  logic signed [12:0] in_b = 0, out_b;
  logic [5:0] in_idx = 0, out_idx;
  logic vote, invalid_b, out_lr;
  logic [13:0] addr;
  int checks = 0, failures = 0;
  int nv = 0, ni = 0, maxaddr = 0;
  address_flattener dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int b, bmin, bmax, idx;
      bit lr;
      lr = $urandom_range(0, 1);
      bmin = lr ? -52 : 336; bmax = lr ? 180 : 566;
      case (n % 8)
        0: b = bmin;  1: b = bmax;  2: b = bmin - 1;  3: b = bmax + 1;
        default: b = $urandom_range(0, 1400) - 700;
      endcase
      idx = $urandom_range(0, 35);
      @(negedge clk);
      in_valid = 1; in_lr = lr; in_b = 13'(b); in_idx = 6'(idx);
      @(negedge clk);
      in_valid = 0;
      if (b >= bmin && b <= bmax) begin
        int a;
        a = ((b - bmin) / 2) * 36 + idx + (lr ? 0 : 4212);
        `CHECK(vote && !invalid_b, "vote inside ROI")
        `CHECK(int'(addr) == a, "address")
        `CHECK(int'(out_b) == bmin + ((b - bmin) / 2) * 2 && out_idx == 6'(idx) && out_lr == lr, "tag")
        if (a > maxaddr) maxaddr = a;
        nv++;
      end else begin
        `CHECK(!vote && invalid_b, "rejected outside ROI")
        ni++;
      end
    end
    `CHECK(maxaddr < 8388, "addresses inside the accumulator")
    `CHECK(nv > 100 && ni > 100, "both outcomes")
    `TB_FINISH
  end
endmodule
