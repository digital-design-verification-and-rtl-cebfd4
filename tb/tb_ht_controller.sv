// Controller test with a behavioural 36-step counter: an edge is read (rd_en)
// only when the FIFO is valid and the accumulator ready, the counter starts in
// the same clock, and no further read comes for 36 clocks; with edges always
// waiting, reads come exactly every 37 clocks.
module tb_ht_controller;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 1, fifo_valid = 0, ready = 0, cnt_done;
  logic rd_en, cnt_start, idle, state_o;
  int checks = 0, failures = 0;
  int cnt = -1;
  longint cyc = 0, last_rd = -100;
  int nrd = 0, nperiod37 = 0;
  ht_controller dut (.*);
  assign cnt_done = (cnt == 35);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end
  always @(posedge clk) begin
    cyc++;
    if (rd_en) begin
      `CHECK(fifo_valid && ready, "read only when valid and ready")
      `CHECK(cnt_start, "counter started with the read")
      `CHECK(cyc - last_rd >= 37, "at least 36 idle clocks between reads")
      if (cyc - last_rd == 37) nperiod37++;
      last_rd = cyc; nrd++;
    end
    if (cnt_start) cnt <= 0;
    else if (cnt >= 0 && cnt < 35) cnt <= cnt + 1;
    else cnt <= -1;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk) fifo_valid = 1;          // not ready yet
    repeat (5) @(negedge clk);
    `CHECK(nrd == 0, "waits for accumulator ready")
    ready = 1;
    repeat (37 * 10) @(negedge clk);
    `CHECK(nrd == 10 && nperiod37 == 9, "one edge per 37 clocks")
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      fifo_valid = $urandom_range(0, 3) == 0;
      ready = $urandom_range(0, 7) != 0;
    end
    `CHECK(nrd > 20, "reads under random conditions")
    `TB_FINISH
  end
endmodule
