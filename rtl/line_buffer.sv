// Line buffer: a RAM holding one image row. One pixel is written per cycle at
// waddr. A read at raddr returns, one clock later, the three neighbouring
// pixels {LB(raddr), LB(raddr+1), LB(raddr+2)}: one row of a 3x3 kernel.
// A read and a write in the same cycle to the same slot return the old pixel,
// which lets the control unit read a row while the next row overwrites it
// behind the read pointer. raddr must not exceed DEPTH-3.
module line_buffer
  import ld_pkg::*;
#(
  parameter int  DEPTH = 512,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [PIX_W-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [PIX_W-1:0] rdata [3]
);

  logic [PIX_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re)
      for (int k = 0; k < 3; k++) rdata[k] <= mem[AW'(raddr + AW'(k))];
  end

endmodule
