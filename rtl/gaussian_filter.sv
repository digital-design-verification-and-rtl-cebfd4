// Gaussian filter: 3x3 smoothing kernel (1 2 1; 2 4 2; 1 2 1)/16 applied to a
// window. The weights are powers of two, so the multiply-accumulate is shifts
// and adders only; the fraction is dropped (>> 4), which keeps the output an
// 8-bit pixel (the largest sum is 16*255). One register stage: out_pix and
// out_valid follow in_win / in_valid by one clock.
module gaussian_filter
  import ld_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [2:0][2:0][PIX_W-1:0] in_win,
  output logic                       out_valid,
  output logic [PIX_W-1:0]           out_pix
);

  logic [PIX_W+3:0] corners, edges, sum;

  always_comb begin
    corners = (PIX_W+4)'(in_win[0][0]) + (PIX_W+4)'(in_win[0][2])
            + (PIX_W+4)'(in_win[2][0]) + (PIX_W+4)'(in_win[2][2]);
    edges   = (PIX_W+4)'(in_win[0][1]) + (PIX_W+4)'(in_win[1][0])
            + (PIX_W+4)'(in_win[1][2]) + (PIX_W+4)'(in_win[2][1]);
    sum     = corners + (edges << 1) + ((PIX_W+4)'(in_win[1][1]) << 2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_pix <= PIX_W'(sum >> 4);
    end
  end

endmodule
