// FIFO test (depth 8): random writes and reads against a queue model; data
// order, full/empty/valid flags, overflow on a write while full (the entry is
// dropped), registered read data; both full and empty must be reached; clear
// empties it.
module tb_sync_fifo;
  `include "tb_check.svh"
  localparam int D = 8;
  logic clk = 0, rst_n = 1, clear = 0, wr_en = 0, rd_en = 0;
  logic [11:0] wr_data = 0, rd_data;
  logic full, empty, valid, overflow;
  int checks = 0, failures = 0;
  int q [$];
  int nfull = 0, nempty = 0, novf = 0;
  sync_fifo #(.W(12), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    int exp_rd;
    bit pend;
    pend = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (pend) `CHECK(int'(rd_data) == exp_rd, "read data order")
      `CHECK(empty == (q.size() == 0) && valid == (q.size() != 0), "empty / valid")
      `CHECK(full == (q.size() == D), "full")
      if (full) nfull++;
      if (empty) nempty++;
      wr_en = ($urandom_range(0, 99) < ((n / 500) % 2 ? 70 : 30));
      rd_en = !empty && ($urandom_range(0, 99) < 50);
      wr_data = 12'($urandom);
      #1;
      `CHECK(overflow == (wr_en && full), "overflow flag")
      if (overflow) novf++;
      pend = rd_en;
      if (rd_en) exp_rd = q.pop_front();
      if (wr_en && !full) q.push_back(int'(wr_data));
    end
    @(negedge clk) wr_en = 0; rd_en = 0;
    @(negedge clk) wr_en = 1; clear = 1;
    @(negedge clk) wr_en = 0; clear = 0;
    `CHECK(empty, "clear empties")
    `CHECK(nfull > 0 && nempty > 0 && novf > 0, "full, empty and overflow reached")
    `TB_FINISH
  end
endmodule
