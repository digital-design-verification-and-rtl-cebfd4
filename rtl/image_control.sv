// Image control: four line buffers and their control unit, turning a raster
// pixel stream (one pixel per in_valid, gaps allowed) into a stream of 3x3
// windows for a filter. win[r][c] is row r (0 = top), column c (0 = left) of
// the window; win_valid marks it; done pulses with the frame's last window.
// A frame of IMG_W x IMG_H pixels gives (IMG_W-2) x (IMG_H-2) windows in raster
// order. The document uses this unit twice: 512 wide ahead of the Gauss filter
// and 510 wide ahead of the Sobel filter. See lb_control for the timing.
// With FUSA = 1 the control unit is duplicated and its outputs compared, as
// the document does for the Gauss and Sobel control units; fusa_err pulses
// (one clock late) on a mismatch. The line buffers are not duplicated.
module image_control
  import ld_pkg::*;
#(
  parameter int  IMG_W = 512,
  parameter int  IMG_H = 512,
  parameter bit  FUSA  = 1'b1,
  localparam int AW    = $clog2(IMG_W)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        in_valid,
  input  logic [PIX_W-1:0]            in_pix,
  output logic [2:0][2:0][PIX_W-1:0]  win,
  output logic                        win_valid,
  output logic                        done,
  output logic                        fusa_err
);

  logic [3:0]       we, re;
  logic [AW-1:0]    waddr, raddr;
  logic [1:0]       top_sel, top_sel_q;
  logic             rd_valid, last;
  logic [PIX_W-1:0] lb_q [4][3];

  lb_control #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_ctrl (
    .clk, .rst_n, .start, .in_valid,
    .we, .waddr, .re, .raddr, .top_sel, .rd_valid, .last
  );

  for (genvar i = 0; i < 4; i++) begin : g_lb
    line_buffer #(.DEPTH(IMG_W)) u_lb (
      .clk, .we(we[i]), .waddr, .wdata(in_pix),
      .re(re[i]), .raddr, .rdata(lb_q[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_valid <= 1'b0;
      done      <= 1'b0;
      top_sel_q <= '0;
    end else begin
      win_valid <= rd_valid && !start;
      done      <= last && !start;
      top_sel_q <= top_sel;
    end
  end

  always_comb
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        win[r][c] = lb_q[2'(top_sel_q + 2'(r))][c];

  if (FUSA) begin : g_fusa
    logic [3:0]    we2, re2;
    logic [AW-1:0] waddr2, raddr2;
    logic [1:0]    top_sel2;
    logic          rd_valid2, last2;

    lb_control #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_ctrl2 (
      .clk, .rst_n, .start, .in_valid,
      .we(we2), .waddr(waddr2), .re(re2), .raddr(raddr2), .top_sel(top_sel2),
      .rd_valid(rd_valid2), .last(last2)
    );
    dup_checker #(.W(8 + 2*AW + 4)) u_chk (
      .clk, .rst_n,
      .a({we, re, waddr, raddr, top_sel, rd_valid, last}),
      .b({we2, re2, waddr2, raddr2, top_sel2, rd_valid2, last2}),
      .err(fusa_err)
    );
  end else begin : g_nofusa
    assign fusa_err = 1'b0;
  end

endmodule
