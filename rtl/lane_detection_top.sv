// Lane detector, top level. A start pulse processes one 512x512 frame held in
// the image ROM and yields the two strongest straight lines of each lane
// boundary, as (votes, y-intercept b, theta index), then draws them.
//
//   edge_detection  : ROM, Gaussian + Sobel filters on line buffers, edge flag
//   theta_detection : edge angle by CORDIC, keep edges in the left/right ROI
//   hough_transform : FIFO, b = x*cot(theta) + y voting, two maxima per region
//   line_drawer     : y = b -/+ x*|cot| for every row, clipped to the image
//
// Results: lanes (l1/l2 left, r1/r2 right), valid from lanes_valid until the
// next start. theta index i means -145+i deg for left lines and -70+i deg for
// right lines; b is the start of a 2-pixel bin. After lanes_valid the drawer
// streams IMG_H rows (ld_*), ending with ld_done.
// Event outputs (one-clock pulses) report each filtered pixel (ev_pixel), each
// edge pixel (ev_edge), edges outside the theta ROI, FIFO overflow, b outside
// the b ROI and accumulator bypasses. fusa_err is sticky until start: some
// duplicated or triplicated block disagreed with its copy.
//
// Reset is asynchronous, active low, everywhere. The lint warning that rst_n
// is also used synchronously comes from the assertions' "disable iff (!rst_n)"
// in the sub-blocks, which are not hardware.
module lane_detection_top
  import ld_pkg::*;
#(
  parameter bit FUSA       = 1'b1,
  parameter int FIFO_DEPTH = 1024
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output lanes_t                  lanes,
  output logic                    lanes_valid,
  output logic                    ld_valid,
  output logic [COORD_W-1:0]      ld_x,
  output logic [3:0][COORD_W-1:0] ld_y,
  output logic [3:0]              ld_pix_valid,
  output logic                    ld_done,
  output logic                    ev_pixel,
  output logic                    ev_edge,
  output logic                    ev_theta_reject,
  output logic                    ev_fifo_overflow,
  output logic                    ev_invalid_b,
  output logic                    ev_acc_bypass,
  output logic                    fifo_full,
  output logic                    fusa_err
);

  logic                  ed_edge, ed_done, ed_err;
  logic [COORD_W-1:0]    ed_x, ed_y;
  logic signed [G_W-1:0] ed_gx, ed_gy;
  logic                  td_wr, td_done, td_err;
  edge_t                 td_edge;
  logic                  ht_done, ht_err;

  edge_detection #(.FUSA(FUSA)) u_ed (
    .clk, .rst_n, .start,
    .out_valid(ev_pixel), .out_ed(ed_edge), .out_x(ed_x), .out_y(ed_y),
    .out_gx(ed_gx), .out_gy(ed_gy), .done(ed_done), .fusa_err(ed_err)
  );

  theta_detection #(.FUSA(FUSA)) u_td (
    .clk, .rst_n, .in_ed(ed_edge), .in_gx(ed_gx), .in_gy(ed_gy),
    .in_x(ed_x), .in_y(ed_y), .in_done(ed_done),
    .wr_en(td_wr), .out_edge(td_edge), .rejected(ev_theta_reject),
    .out_done(td_done), .fusa_err(td_err)
  );

  hough_transform #(.FIFO_DEPTH(FIFO_DEPTH), .FUSA(FUSA)) u_ht (
    .clk, .rst_n, .start, .in_wr(td_wr), .in_edge(td_edge), .in_done(td_done),
    .lanes, .lanes_valid, .done(ht_done), .fifo_full,
    .fifo_overflow(ev_fifo_overflow), .invalid_b(ev_invalid_b),
    .acc_bypass(ev_acc_bypass), .fusa_err(ht_err)
  );

  line_drawer u_ld (
    .clk, .rst_n, .start(ht_done), .lanes,
    .out_valid(ld_valid), .out_x(ld_x), .out_y(ld_y), .pix_valid(ld_pix_valid),
    .done(ld_done)
  );

  assign ev_edge = ed_edge;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     fusa_err <= 1'b0;
    else if (start) fusa_err <= 1'b0;
    else if (ed_err || td_err || ht_err) fusa_err <= 1'b1;

endmodule
