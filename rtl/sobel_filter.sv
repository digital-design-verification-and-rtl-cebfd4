// Modified Sobel operator. From a 3x3 window it forms
//   Gx = (P13-P11) + 2(P23-P21) + (P33-P31)   (change along a row, across columns)
//   Gy = (P31-P11) + 2(P32-P12) + (P33-P13)   (change down the columns)
// and the cheap magnitude |G| ~ |Gx| + |Gy|. The edge-detected flag ed is set
// when that magnitude exceeds THRESHOLD (210 in the document). Gx and Gy are
// carried alongside so the next block can compute the edge angle.
// Two register stages: gradients, then magnitude and compare; out_* follow
// in_* by two clocks.
module sobel_filter
  import ld_pkg::*;
#(
  parameter int THRESHOLD = ld_pkg::SOBEL_TH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [2:0][2:0][PIX_W-1:0] in_win,
  output logic                       out_valid,
  output logic signed [G_W-1:0]      out_gx,
  output logic signed [G_W-1:0]      out_gy,
  output logic                       out_ed
);

  function automatic logic signed [G_W-1:0] px(input logic [PIX_W-1:0] p);
    return G_W'(signed'({1'b0, p}));
  endfunction

  logic signed [G_W-1:0] gx, gy, gx_q, gy_q;
  logic [G_W-1:0]        ax, ay;
  logic [G_W:0]          mag;
  logic                  v_q;

  always_comb begin
    gx = (px(in_win[0][2]) - px(in_win[0][0]))
       + ((px(in_win[1][2]) - px(in_win[1][0])) <<< 1)
       + (px(in_win[2][2]) - px(in_win[2][0]));
    gy = (px(in_win[2][0]) - px(in_win[0][0]))
       + ((px(in_win[2][1]) - px(in_win[0][1])) <<< 1)
       + (px(in_win[2][2]) - px(in_win[0][2]));
    ax  = gx_q[G_W-1] ? G_W'(-gx_q) : G_W'(gx_q);
    ay  = gy_q[G_W-1] ? G_W'(-gy_q) : G_W'(gy_q);
    mag = (G_W+1)'(ax) + (G_W+1)'(ay);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0; gx_q <= '0; gy_q <= '0;
      out_valid <= 1'b0; out_gx <= '0; out_gy <= '0; out_ed <= 1'b0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        gx_q <= gx;
        gy_q <= gy;
      end
      out_valid <= v_q;
      if (v_q) begin
        out_gx <= gx_q;
        out_gy <= gy_q;
        out_ed <= mag > (G_W+1)'(THRESHOLD);
      end
    end
  end

endmodule
