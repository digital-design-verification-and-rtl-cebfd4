// Position counters: give the frame position (X = row, Y = column, 1-based as
// in the document) of each pixel the Sobel filter outputs. Two 3x3 filters
// each drop a one-pixel border, so outputs start at (3,3). Y counts 3..IMG_W-2
// once per en and wraps to 3; X counts 3..IMG_H-2 and steps when Y wraps. Both
// hold at (IMG_H-2, IMG_W-2), where done is raised. x/y show the position of
// the pixel presented with en in the same cycle. start reloads (3,3).
module pos_counters
  import ld_pkg::*;
#(
  parameter int IMG_W = ld_pkg::FRAME_W,
  parameter int IMG_H = ld_pkg::FRAME_H
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               en,
  output logic [COORD_W-1:0] x,
  output logic [COORD_W-1:0] y,
  output logic               done
);

  logic at_end;
  assign at_end = (x == COORD_W'(IMG_H - 2)) && (y == COORD_W'(IMG_W - 2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= COORD_W'(3); y <= COORD_W'(3); done <= 1'b0;
    end else if (start) begin
      x <= COORD_W'(3); y <= COORD_W'(3); done <= 1'b0;
    end else if (en && !done) begin
      if (at_end) begin
        done <= 1'b1;
      end else if (y == COORD_W'(IMG_W - 2)) begin
        y <= COORD_W'(3);
        x <= x + 1'b1;
      end else begin
        y <= y + 1'b1;
      end
    end
  end

endmodule
