// Image ROM: holds one 8-bit grey frame, IMG_W x IMG_H, flattened row by row
// (address = row*IMG_W + column), and returns the addressed pixel one clock
// after the address (synchronous read, as a block RAM would).
//
// The frame is the lane detector's input. The document loads a camera picture
// converted offline; here the contents come from INIT_FILE ($readmemh, two hex
// digits per pixel) when one is given, otherwise from ld_pkg's road_* constants, a
// synthetic road with two lane stripes (this design's own default picture).
module image_rom
  import ld_pkg::*;
#(
  parameter int    IMG_W     = ld_pkg::FRAME_W,
  parameter int    IMG_H     = ld_pkg::FRAME_H,
  parameter string INIT_FILE = "",
  localparam int   DEPTH     = IMG_W * IMG_H,
  localparam int   AW        = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  output logic [PIX_W-1:0] data
);

  logic [PIX_W-1:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
    else begin
      mem = '{default: ROAD_DARK};
      for (int r = ROAD_ROW0; r < IMG_H; r++)
        for (int d = -ROAD_HALF; d <= ROAD_HALF; d++) begin
          if (road_left(r) + d >= 0 && road_left(r) + d < IMG_W)
            mem[r*IMG_W + road_left(r) + d] = ROAD_LIGHT;
          if (road_right(r) + d >= 0 && road_right(r) + d < IMG_W)
            mem[r*IMG_W + road_right(r) + d] = ROAD_LIGHT;
        end
    end
  end

  always_ff @(posedge clk) data <= mem[addr];

endmodule
