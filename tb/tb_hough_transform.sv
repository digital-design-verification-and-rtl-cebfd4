// Hough transform test with a bit-exact reference model.
// Frame 1: 400 edges written back to back right after start: points on two
// right lines and one left line plus random edges. Checks: the first FIFO
// read waits for the accumulator clear (ACC_DEPTH clocks), consecutive reads
// are exactly 37 clocks apart (one edge per 37 clocks), the frame finishes
// 37 clocks per edge after the first read plus a short pipeline tail, and the
// two maxima of each region have the reference's top two vote counts on cells
// whose reference count equals the reported votes; the number of votes cast
// and of b ROI rejections match the reference. fusa_err stays low.
// Frame 2: 1100 edges back to back overflow the 1024-deep FIFO; the overflow
// count must match the writes made while full, and the result must match the
// reference built from the accepted edges only. One controller replica is
// forced wrong during this frame: the vote masks it (results still exact)
// while fusa_err reports it. Then one duplicated LUT counter output is forced
// and fusa_err must rise.
module tb_hough_transform;
  `include "tb_check.svh"
  import ld_pkg::*;
  logic clk = 0, rst_n = 1, start = 0, in_wr = 0, in_done = 0;
  edge_t in_edge;
  lanes_t lanes;
  logic lanes_valid, done, fifo_full, fifo_overflow, invalid_b, acc_bypass, fusa_err;
  int checks = 0, failures = 0;
  hough_transform dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values
  initial begin repeat (200000) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_FINISH end

  int cyc = 0;
  always @(posedge clk) cyc++;

  // reference accumulator [lr][bin][idx]
  int acc [2][128][36];
  edge_t acc_list [$];
  int ovf_cnt, fusa_cnt, inv_cnt, vote_cnt, inv_exp, vote_exp, last_rd, first_rd, bad_gap, n_rd;
  always @(posedge clk) begin
    if (fifo_overflow) ovf_cnt++;
    if (invalid_b) inv_cnt++;
    if (dut.a_vote) vote_cnt++;
    if (fusa_err) fusa_cnt++;
    if (dut.rd_en) begin
      if (n_rd == 0) first_rd = cyc;
      else if (cyc - last_rd != 37) bad_gap++;
      last_rd = cyc; n_rd++;
    end
  end

  function automatic int floordiv(longint a, longint d);
    longint q = a / d;
    if ((a % d != 0) && ((a < 0) != (d < 0))) q--;
    return int'(q);
  endfunction

  task automatic model_vote(edge_t e);
    for (int k = 0; k < 36; k++) begin
      longint c, b;
      int bmin, bmax;
      c = longint'(cot_table(e.lr ? 35 - k : k));
      b = e.lr ? floordiv((longint'(e.y) << 14) - longint'(e.x) * c, 16384)
               : floordiv((longint'(e.y) << 14) + longint'(e.x) * c, 16384);
      bmin = e.lr ? B_MIN_R : B_MIN_L;
      bmax = e.lr ? B_MAX_R : B_MAX_L;
      if (b >= bmin && b <= bmax) begin acc[e.lr][(int'(b) - bmin) >> 1][k]++; vote_exp++; end
      else inv_exp++;
    end
  endtask

  task automatic check_region(bit lr, line_t m1, line_t m2, string nm);
    int t1 = 0, t2 = 0, bmin;
    bmin = lr ? B_MIN_R : B_MIN_L;
    for (int i = 0; i < 128; i++) for (int k = 0; k < 36; k++) begin
      if (acc[lr][i][k] > t1) begin t2 = t1; t1 = acc[lr][i][k]; end
      else if (acc[lr][i][k] > t2) t2 = acc[lr][i][k];
    end
    $display("INFO %s: model top %0d %0d, dut %0d (b=%0d idx=%0d) %0d (b=%0d idx=%0d)", nm, t1, t2,
             m1.votes, int'(m1.b), m1.idx, m2.votes, int'(m2.b), m2.idx);
    `CHECK(int'(m1.votes) == t1 && int'(m2.votes) == t2, {nm, " top two counts"})
    `CHECK(acc[lr][(int'(m1.b) - bmin) >> 1][m1.idx] == int'(m1.votes), {nm, " max1 cell"})
    `CHECK(acc[lr][(int'(m2.b) - bmin) >> 1][m2.idx] == int'(m2.votes), {nm, " max2 cell"})
    `CHECK(m1.b != m2.b || m1.idx != m2.idx, {nm, " distinct cells"})
  endtask

  function automatic edge_t line_pt(bit lr, int b0, int k);
    edge_t e;
    int x, y;
    longint c;
    c = longint'(cot_table(lr ? 35 - k : k));
    do begin
      x = $urandom_range(3, 509);
      y = lr ? b0 + int'((longint'(x) * c) >>> 14) : b0 - int'((longint'(x) * c) >>> 14);
    end while (y < 3 || y > 509);
    e.lr = lr; e.x = COORD_W'(x); e.y = COORD_W'(y);
    return e;
  endfunction

  task automatic frame(int n, int fault_cyc);
    int t0, ovf_exp, n_acc;
    foreach (acc[i, j, k]) acc[i][j][k] = 0;
    ovf_cnt = 0; inv_cnt = 0; vote_cnt = 0; inv_exp = 0; vote_exp = 0; n_rd = 0; bad_gap = 0; ovf_exp = 0; n_acc = 0;
    @(negedge clk) start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    for (int i = 0; i < n; i++) begin
      edge_t e;
      int r = $urandom_range(0, 9);
      if (r < 3)      e = line_pt(1, 100, 12);
      else if (r < 5) e = line_pt(1, 20, 20);
      else if (r < 8) e = line_pt(0, 450, 8);
      else begin
        e.lr = $urandom_range(0, 1);
        e.x = COORD_W'($urandom_range(3, 509)); e.y = COORD_W'($urandom_range(3, 509));
      end
      in_wr = 1; in_edge = e;
      #1;
      if (fifo_full) ovf_exp++; else begin model_vote(e); n_acc++; end
      @(negedge clk);
    end
    in_wr = 0; in_done = 1;
    @(negedge clk) in_done = 0;
    wait (lanes_valid);
    @(negedge clk);
    $display("INFO frame: %0d edges, %0d accepted, overflow %0d, first read at +%0d, lanes at +%0d",
             n, n_acc, ovf_cnt, first_rd - t0, cyc - t0);
    `CHECK(ovf_cnt == ovf_exp, "overflow count")
    `CHECK(vote_cnt == vote_exp && inv_cnt == inv_exp, "votes cast and b ROI rejections")
    `CHECK(n_rd == n_acc, "one read per accepted edge")
    `CHECK(bad_gap == 0, "reads exactly 37 clocks apart")
    `CHECK(first_rd - t0 >= ACC_DEPTH, "first read after accumulator clear")
    `CHECK(cyc - first_rd >= 37 * n_acc && cyc - first_rd <= 37 * n_acc + 12, "frame time 37 clocks per edge")
    check_region(1, lanes.r1, lanes.r2, "right");
    check_region(0, lanes.l1, lanes.l2, "left");
  endtask

  initial begin
    in_edge = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    frame(400, 0);
    `CHECK(fusa_cnt == 0, "no safety error in normal run")
    // frame 2 with one controller replica stuck
    fork
      begin
        repeat (9000) @(posedge clk);
        force dut.c_state[1] = 1'b1;
        force dut.c_rd[1] = 1'b0;
      end
    join_none
    frame(1100, 0);
    `CHECK(ovf_cnt > 0, "FIFO overflowed")
    `CHECK(fusa_cnt > 0, "controller replica fault reported")
    release dut.c_state[1];
    release dut.c_rd[1];
    // duplicated LUT counter fault
    fusa_cnt = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (20) @(negedge clk);
    `CHECK(fusa_cnt == 0, "no error after release")
    force dut.g_dup.idx2 = 6'd5;
    @(negedge clk) in_wr = 1; in_edge = line_pt(1, 100, 12);
    @(negedge clk) in_wr = 0;
    repeat (ACC_DEPTH + 60) @(negedge clk);
    `CHECK(fusa_cnt > 0, "duplicated LUT counter fault reported")
    release dut.g_dup.idx2;
    `TB_FINISH
  end
endmodule
