// Line buffer test: fill a row, read every triple {LB(a),LB(a+1),LB(a+2)} one
// clock after the address, then overwrite the row while reading it with the
// read pointer at the write pointer: the old row must come out.
module tb_line_buffer;
  `include "tb_check.svh"
  localparam int D = 16;
  logic clk = 0, we = 0, re = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0;
  logic [7:0] rdata [3];
  logic [7:0] model [D];
  int checks = 0, failures = 0;
  line_buffer #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (2000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk) we = 1; waddr = 4'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int a = 0; a <= D - 3; a++) begin
      @(negedge clk) re = 1; raddr = 4'(a);
      @(negedge clk) re = 0;
      for (int k = 0; k < 3; k++) `CHECK(rdata[k] == model[a + k], "triple read")
    end
    // read-before-write while the next row streams in
    for (int a = 0; a < D; a++) begin
      logic [7:0] exp [3];
      @(negedge clk);
      we = 1; waddr = 4'(a); wdata = 8'($urandom);
      re = (a <= D - 3); raddr = 4'(a);
      for (int k = 0; k < 3; k++) exp[k] = model[(a + k) % D];
      model[a] = wdata;
      @(posedge clk); #1;
      if (a <= D - 3) for (int k = 0; k < 3; k++) `CHECK(rdata[k] == exp[k], "old row read during overwrite")
    end
    `TB_FINISH
  end
endmodule
