// Theta comparator: completes the edge angle (adds 90 degrees in the second
// quadrant) and sorts the edge into the right ROI (110..145 deg, i.e. the
// document's -70..-35 deg), the left ROI (35..70 deg, i.e. -145..-110 deg) or
// neither. An edge inside an ROI is written to the Hough FIFO (wr_en) with
// lr = 1 for right, 0 for left; an edge outside raises rejected instead.
// One register stage.
module theta_comparator
  import ld_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [THETA_W-1:0] in_theta,
  input  logic               in_q2,
  input  logic [COORD_W-1:0] in_x,
  input  logic [COORD_W-1:0] in_y,
  output logic               wr_en,
  output edge_t              out_edge,
  output logic               rejected
);

  logic [THETA_W:0] th;
  logic             in_r, in_l;

  assign th   = (THETA_W+1)'(in_theta) + (in_q2 ? (THETA_W+1)'(TH_90) : '0);
  assign in_r = (th >= (THETA_W+1)'(TH_R_MIN)) && (th <= (THETA_W+1)'(TH_R_MAX));
  assign in_l = (th >= (THETA_W+1)'(TH_L_MIN)) && (th <= (THETA_W+1)'(TH_L_MAX));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en <= 1'b0; rejected <= 1'b0; out_edge <= '0;
    end else begin
      wr_en    <= in_valid && (in_r || in_l);
      rejected <= in_valid && !(in_r || in_l);
      if (in_valid) out_edge <= '{lr: in_r, x: in_x, y: in_y};
    end
  end

endmodule
