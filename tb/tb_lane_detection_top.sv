// End-to-end test of the lane detector at its default (full) size.
//
// Frame 1 runs the ROM's default picture: a dark road with a left stripe
// centred on y = 520 - x (theta -135 deg, index 10) and a right stripe centred
// on y = 60 + 0.7002 x (theta -55 deg, index 15), both 5 pixels wide, rows
// 290..511. Each stripe has two edges, so both maxima of a region must lie
// on that stripe's angle (+/-1 index) and within 6 of its centre line's b.
// The drawn lines are checked against y = b -/+ x*|cot| computed in floating
// point (+/-1 pixel), including clipping at the image border.
// Frame 2 overwrites the ROM with noise so that far more edges reach the Hough
// FIFO than it can take: the FIFO must overflow, the frame must still finish.
// While frame 2 runs, one CORDIC replica's output is forced for a few clocks:
// the duplication checker must raise fusa_err (clean in frame 1).
// Counted events: filtered pixels, edges, theta ROI rejections, b ROI
// rejections, FIFO overflows, accumulator bypasses, clipped line pixels,
// safety errors; each must occur at least once. The bypass cannot occur on its
// own in the assembled design (consecutive votes always differ in theta
// index), so frame 2 holds the accumulator's vote address for three clocks.
module tb_lane_detection_top;
  import ld_pkg::*;

  logic clk = 0, rst_n = 1, start = 0;
  lanes_t lanes;
  logic lanes_valid, ld_valid, ld_done, fifo_full, fusa_err;
  logic [COORD_W-1:0] ld_x;
  logic [3:0][COORD_W-1:0] ld_y;
  logic [3:0] ld_pix_valid;
  logic ev_pixel, ev_edge, ev_rej, ev_ovf, ev_invb, ev_byp;

  lane_detection_top dut (
    .clk, .rst_n, .start, .lanes, .lanes_valid, .ld_valid, .ld_x, .ld_y,
    .ld_pix_valid, .ld_done, .ev_pixel, .ev_edge, .ev_theta_reject(ev_rej),
    .ev_fifo_overflow(ev_ovf), .ev_invalid_b(ev_invb), .ev_acc_bypass(ev_byp),
    .fifo_full, .fusa_err
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real reset edge, so flops start from their reset values

  int checks = 0, failures = 0;
  int n_pix = 0, n_edge = 0, n_rej = 0, n_ovf = 0, n_invb = 0, n_byp = 0, n_clip = 0, n_draw = 0;
  longint cyc = 0;
  logic [ACC_AW-1:0] hold_addr;

  always @(posedge clk) begin
    cyc++;
    if (ev_pixel) n_pix++;
    if (ev_edge) n_edge++;
    if (ev_rej)  n_rej++;
    if (ev_ovf)  n_ovf++;
    if (ev_invb) n_invb++;
    if (ev_byp)  n_byp++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real cotd(input real deg);
    return $cos(deg * 3.14159265358979 / 180.0) / $sin(deg * 3.14159265358979 / 180.0);
  endfunction

  // Watchdog
  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(output longint lat);
    longint t0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = cyc;
    wait (lanes_valid);
    lat = cyc - t0;
  endtask

  task automatic check_line(input line_t l, input bit right, input string nm);
    int exp_idx, exp_b;
    exp_idx = right ? 15 : 10;
    exp_b   = right ? ROAD_BR : ROAD_BL;
    $display("%s: votes=%0d b=%0d idx=%0d", nm, int'(l.votes), int'(l.b), int'(l.idx));
    check(l.votes > 50, {nm, " has votes"});
    check(int'(l.idx) >= exp_idx - 1 && int'(l.idx) <= exp_idx + 1, {nm, " theta index"});
    check(int'(l.b) >= exp_b - 6 && int'(l.b) <= exp_b + 6, {nm, " intercept"});
  endtask

  // Check the drawn pixels of frame 1 against floating point.
  line_t dl [4];
  bit    drawing = 0;
  always @(posedge clk) begin
    if (drawing && ld_valid) begin
      for (int i = 0; i < 4; i++) begin
        real c, yr;
        int  ye;
        bit  in_img;
        c  = (i >= 2) ? cotd(70.0 - real'(dl[i].idx)) : cotd(35.0 + real'(dl[i].idx));
        yr = (i >= 2) ? real'(dl[i].b) + real'(ld_x) * c : real'(dl[i].b) - real'(ld_x) * c;
        ye = $floor(yr);
        in_img = (yr >= 0.0) && (yr < 512.0);
        if (ld_pix_valid[i]) begin
          n_draw++;
          check(int'(ld_y[i]) >= ye - 1 && int'(ld_y[i]) <= ye + 1, "drawn y");
        end else begin
          n_clip++;
          check(!in_img || yr < 1.0 || yr > 510.0, "pixel wrongly clipped");
        end
      end
    end
  end

  initial begin
    longint lat1, lat2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);

    // ---------------- frame 1: default road picture ----------------
    run_frame(lat1);
    $display("frame 1: %0d cycles to lanes, edges=%0d theta-rejected=%0d b-rejected=%0d overflow=%0d",
             lat1, n_edge, n_rej, n_invb, n_ovf);
    check_line(lanes.l1, 0, "left 1");
    check_line(lanes.l2, 0, "left 2");
    check_line(lanes.r1, 1, "right 1");
    check_line(lanes.r2, 1, "right 2");
    check(lanes.l1.votes >= lanes.l2.votes && lanes.r1.votes >= lanes.r2.votes, "maxima ordered");
    check(lanes.l1.b != lanes.l2.b || lanes.l1.idx != lanes.l2.idx, "left maxima distinct");
    check(lat1 > 262144 && lat1 < 300000, "frame latency");
    check(n_pix == (FRAME_W - 4) * (FRAME_H - 4), "one filtered pixel per clock, 508 x 508");
    check(!fusa_err, "no safety error on a clean frame");
    dl[0] = lanes.l1; dl[1] = lanes.l2; dl[2] = lanes.r1; dl[3] = lanes.r2;
    drawing = 1;
    wait (ld_done);
    @(posedge clk);
    drawing = 0;
    check(n_draw > 1000, "line pixels drawn");
    check(n_clip > 0, "line pixels clipped at the border");

    // ---------------- frame 2: noise, FIFO overflow, injected fault --------
    for (int i = 0; i < FRAME_W * FRAME_H; i++)
      dut.u_ed.u_rom.mem[i] = 8'($urandom);
    fork
      run_frame(lat2);
      begin
        repeat (100000) @(posedge clk);
        force dut.u_td.g_fusa.c_theta2 = '1;
        repeat (4) @(posedge clk);
        release dut.u_td.g_fusa.c_theta2;
        repeat (10) @(posedge clk);
        check(fusa_err, "injected CORDIC fault detected");
        // Votes of one edge always differ in theta index, so two consecutive
        // votes never hit the same accumulator cell on their own. Hold the
        // vote address for three clocks to make the accumulator's bypass act.
        repeat (20000) @(posedge clk);
        @(negedge clk iff dut.u_ht.a_vote);
        hold_addr = dut.u_ht.a_addr;
        force dut.u_ht.a_addr = hold_addr;
        repeat (3) @(negedge clk);
        release dut.u_ht.a_addr;
      end
    join
    $display("frame 2: %0d cycles to lanes, overflow=%0d fusa_err=%0d", lat2, n_ovf, fusa_err);
    check(lanes_valid, "noisy frame completes");
    check(fusa_err, "safety error still flagged at the end of the frame");

    // ---------------- mechanisms ----------------
    $display("events: edges=%0d theta_rej=%0d b_rej=%0d fifo_ovf=%0d bypass=%0d clipped=%0d",
             n_edge, n_rej, n_invb, n_ovf, n_byp, n_clip);
    check(n_edge > 0, "edges detected");
    check(n_rej > 0, "edges rejected by theta ROI");
    check(n_invb > 0, "votes rejected by b ROI");
    check(n_ovf > 0, "FIFO overflow");
    check(n_byp > 0, "accumulator bypass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
