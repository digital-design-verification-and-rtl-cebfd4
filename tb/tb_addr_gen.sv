// Address generator test: after start, DEPTH consecutive addresses 0..DEPTH-1,
// one per clock with valid, done on the last, then idle; a restart repeats it.
module tb_addr_gen;
  `include "tb_check.svh"
  localparam int DEPTH = 37;
  logic clk = 0, rst_n = 1, start = 0;
  logic [5:0] addr;
  logic valid, done;
  int checks = 0, failures = 0;
  addr_gen #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (2000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      int n, ndone;
      n = 0; ndone = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int c = 0; c < DEPTH + 10; c++) begin
        if (valid) begin
          `CHECK(int'(addr) == n, "address sequence")
          n++;
        end
        if (done) begin
          ndone++;
          `CHECK(int'(addr) == DEPTH - 1, "done on last address")
        end
        @(negedge clk);
      end
      `CHECK(n == DEPTH, "one address per location, no pause")
      `CHECK(ndone == 1, "single done")
    end
    `TB_FINISH
  end
endmodule
