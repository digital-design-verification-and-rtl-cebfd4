// Accumulator test (64 counters): clear, then random vote streams with many
// back-to-back votes to the same address. Each vote's new count must equal a
// count-per-address model; the bypass must be used and flagged; votes arriving
// during clear are ignored; a second clear zeroes everything.
module tb_accumulator;
  `include "tb_check.svh"
  localparam int D = 64;
  logic clk = 0, rst_n = 1, clear = 0, ready, in_valid = 0, out_valid, bypass;
  logic [5:0] in_addr = 0, out_addr;
  logic [3:0] in_tag = 0, out_tag;
  logic [15:0] out_count;
  int checks = 0, failures = 0;
  int model [D];
  int exp_q [$], tag_q [$];
  int nbyp = 0;
  accumulator #(.DEPTH(D), .TAG_W(4)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (50000) @(posedge clk); failures++; `TB_FINISH end
  always @(posedge clk) begin
    if (out_valid) begin
      `CHECK(int'(out_count) == exp_q.pop_front(), "vote count")
      `CHECK(int'(out_tag) == tag_q.pop_front(), "tag")
    end
    if (bypass) nbyp++;
  end
  task automatic do_clear();
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    `CHECK(!ready, "busy while clearing")
    while (!ready) @(negedge clk);
    foreach (model[i]) model[i] = 0;
  endtask
  initial begin
    int a;
    repeat (2) @(posedge clk); rst_n = 1;
    do_clear();
    for (int f = 0; f < 2; f++) begin
      a = 0;
      for (int n = 0; n < 3000; n++) begin
        @(negedge clk);
        in_valid = $urandom_range(0, 4) != 0;
        if ($urandom_range(0, 2) == 0) a = $urandom_range(0, D-1);
        in_addr = 6'(a); in_tag = 4'($urandom);
        if (in_valid) begin
          model[a]++;
          exp_q.push_back(model[a]); tag_q.push_back(int'(in_tag));
        end
      end
      @(negedge clk) in_valid = 0;
      repeat (3) @(negedge clk);
      `CHECK(exp_q.size() == 0, "every vote answered")
      do_clear();
    end
    // votes during a clear are ignored
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0; in_valid = 1; in_addr = 6'd5;
    @(negedge clk) in_valid = 0;
    while (!ready) @(negedge clk);
    @(negedge clk) in_valid = 1; in_addr = 6'd5; exp_q.push_back(1); tag_q.push_back(int'(in_tag));
    @(negedge clk) in_valid = 0;
    repeat (3) @(negedge clk);
    `CHECK(nbyp > 100, "bypass exercised")
    `TB_FINISH
  end
endmodule
