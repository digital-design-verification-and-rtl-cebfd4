// Line drawer (inverse Hough transform): turns the four detected lines back
// into image pixels. On start it latches the lines and sweeps x (row) from 0
// to IMG_H-1, one row per clock, computing for each line
//   left  lines: y = floor(b - x*|cot|)
//   right lines: y = floor(b + x*|cot|)
// with the same cot table and fixed-point multiplier as the Hough transform.
// pix_valid[i] is high when line i has votes and its y falls inside the image
// (0 .. IMG_W-1); a y outside is suppressed. Order: 0 = l1, 1 = l2, 2 = r1,
// 3 = r2. Outputs are registered; out_valid marks the IMG_H sweep cycles and
// done the last one. The document draws the lines over the camera picture;
// writing them into a frame store is left to the user of these outputs.
// Assertions check that the row counter starts at 0 on start and stops after
// the last row.
module line_drawer
  import ld_pkg::*;
#(
  parameter int IMG_W = ld_pkg::FRAME_W,
  parameter int IMG_H = ld_pkg::FRAME_H
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  lanes_t                   lanes,
  output logic                     out_valid,
  output logic [COORD_W-1:0]       out_x,
  output logic [3:0][COORD_W-1:0]  out_y,
  output logic [3:0]               pix_valid,
  output logic                     done
);

  localparam int SW = COT_W + 4;

  line_t              ln [4];
  logic               run;
  logic [COORD_W-1:0] x;
  logic [COT_W-1:0]   cot  [4];
  logic [COT_W-1:0]   prod [4];
  logic signed [SW-1:0] yfx [4];
  logic signed [SW-COT_Q-1:0] yi [4];

  for (genvar i = 0; i < 4; i++) begin : g_line
    localparam bit RIGHT = (i >= 2);
    assign cot[i] = cot_table(RIGHT ? IDX_W'(N_THETA - 1) - ln[i].idx : ln[i].idx);
    fxp_mult u_mul (.a(COT_W'(x) << COT_Q), .b(cot[i]), .p(prod[i]));
    assign yfx[i] = RIGHT ? (SW'(ln[i].b) <<< COT_Q) + SW'(prod[i])
                          : (SW'(ln[i].b) <<< COT_Q) - SW'(prod[i]);
    assign yi[i]  = yfx[i][SW-1:COT_Q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; x <= '0;
      for (int i = 0; i < 4; i++) ln[i] <= '0;
      out_valid <= 1'b0; out_x <= '0; out_y <= '0; pix_valid <= '0; done <= 1'b0;
    end else begin
      if (start) begin
        run   <= 1'b1;
        x     <= '0;
        ln[0] <= lanes.l1; ln[1] <= lanes.l2; ln[2] <= lanes.r1; ln[3] <= lanes.r2;
      end else if (run) begin
        if (x == COORD_W'(IMG_H - 1)) run <= 1'b0;
        x <= x + 1'b1;
      end
      out_valid <= run && !start;
      done      <= run && !start && (x == COORD_W'(IMG_H - 1));
      out_x     <= x;
      for (int i = 0; i < 4; i++) begin
        out_y[i]     <= COORD_W'(yi[i]);
        pix_valid[i] <= run && !start && (ln[i].votes != '0) &&
                        (yi[i] >= 0) && (yi[i] < (SW-COT_Q)'(IMG_W));
      end
    end
  end

  // The sweep starts at row 0 and ends after row IMG_H-1.
  a_sweep_start: assert property (@(posedge clk) disable iff (!rst_n)
    start |=> run && x == '0);
  a_sweep_end: assert property (@(posedge clk) disable iff (!rst_n)
    (run && !start && x == COORD_W'(IMG_H - 1)) |=> !run);

endmodule
