// Line drawer test: random sets of four lines (some with zero votes). For
// every swept row the drawn y of each line must equal floor(b -/+ x*|cot|)
// computed from the same table, pix_valid must be set exactly when the line
// has votes and y is inside the image, the sweep must last FRAME_H clocks
// (one row per clock, first row two clocks after start) and done must mark
// the last row.
module tb_line_drawer;
  `include "tb_check.svh"
  import ld_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  lanes_t lanes;
  logic out_valid, done;
  logic [COORD_W-1:0] out_x;
  logic [3:0][COORD_W-1:0] out_y;
  logic [3:0] pix_valid;
  int checks = 0, failures = 0;
  line_drawer dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_FINISH end

  function automatic line_t rnd_line(bit right);
    line_t l;
    l.votes = ($urandom_range(0, 4) == 0) ? '0 : VOTE_W'($urandom_range(1, 500));
    l.b     = right ? B_W'($urandom_range(0, 232) - 52) : B_W'($urandom_range(336, 566));
    l.idx   = IDX_W'($urandom_range(0, 35));
    return l;
  endfunction

  initial begin
    line_t ln [4];
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      int rows, ndone, t0, tfirst;
      ln[0] = rnd_line(0); ln[1] = rnd_line(0); ln[2] = rnd_line(1); ln[3] = rnd_line(1);
      lanes = '{l1: ln[0], l2: ln[1], r1: ln[2], r2: ln[3]};
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      t0 = 1; rows = 0; ndone = 0; tfirst = -1;
      while (rows < FRAME_H) begin
        @(negedge clk);
        t0++;
        if (out_valid) begin
          if (tfirst < 0) tfirst = t0;
          `CHECK(int'(out_x) == rows, "row order")
          for (int i = 0; i < 4; i++) begin
            longint c, yf;
            int y;
            bit in_img;
            c = longint'(cot_table(i >= 2 ? 35 - ln[i].idx : ln[i].idx));
            yf = (longint'(ln[i].b) <<< 14) + (i >= 2 ? 1 : -1) * longint'(rows) * c;
            y = int'(yf >>> 14);
            in_img = ln[i].votes != 0 && y >= 0 && y < FRAME_W;
            `CHECK(pix_valid[i] == in_img, "pixel valid")
            if (in_img) `CHECK(int'(out_y[i]) == y, "drawn y")
          end
          if (done) ndone++;
          `CHECK(done == (rows == FRAME_H - 1), "done on last row")
          rows++;
        end
        if (t0 > FRAME_H + 10) break;
      end
      `CHECK(rows == FRAME_H && ndone == 1, "FRAME_H rows, one done")
      `CHECK(tfirst == 2, "first row two clocks after start")
      @(negedge clk);
      `CHECK(!out_valid, "sweep ends")
    end
    `TB_FINISH
  end
endmodule
