// Quadrant detector: folds the edge gradient into the first quadrant, where the
// CORDIC works, and remembers which half-plane it came from.
//
// The edge angle used by the lane detector is measured from the row axis:
// theta = atan2(Gx, Gy) folded into [0, 180) degrees. When Gx and Gy have the
// same sign the angle is atan(|Gx|/|Gy|) and the CORDIC gets (|Gy|, |Gx|);
// otherwise it is 90 deg + atan(|Gy|/|Gx|), the CORDIC gets (|Gx|, |Gy|) and
// q2 tells the comparator to add 90 degrees. The document states only that the
// detector passes magnitudes and a first/second quadrant flag and that 90 deg
// is added in the second quadrant; the operand order is this design's choice,
// made so that the folded angle matches the document's theta ROIs.
// The edge position is carried along. One register stage.
module quadrant_detector
  import ld_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [G_W-1:0] in_gx,
  input  logic signed [G_W-1:0] in_gy,
  input  logic [COORD_W-1:0]    in_x,
  input  logic [COORD_W-1:0]    in_y,
  output logic                  out_valid,
  output logic [G_W-1:0]        out_cx,     // CORDIC x operand (>= 0)
  output logic [G_W-1:0]        out_cy,     // CORDIC y operand (>= 0)
  output logic                  out_q2,
  output logic [COORD_W-1:0]    out_x,
  output logic [COORD_W-1:0]    out_y
);

  logic [G_W-1:0] ax, ay;
  logic           same;

  assign ax   = in_gx[G_W-1] ? G_W'(-in_gx) : G_W'(in_gx);
  assign ay   = in_gy[G_W-1] ? G_W'(-in_gy) : G_W'(in_gy);
  assign same = (in_gx[G_W-1] == in_gy[G_W-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_cx <= '0; out_cy <= '0; out_q2 <= 1'b0;
      out_x <= '0; out_y <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_q2 <= !same;
        out_cx <= same ? ay : ax;
        out_cy <= same ? ax : ay;
        out_x  <= in_x;
        out_y  <= in_y;
      end
    end
  end

endmodule
