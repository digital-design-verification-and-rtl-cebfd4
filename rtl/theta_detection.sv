// Theta detection: decides for every detected edge whether its orientation
// puts it in the right or left lane ROI, and forwards only those edges.
// Quadrant detector (1 clock) -> CORDIC (CORDIC_ITER clocks) -> comparator
// (1 clock): an edge entering with in_ed leaves CORDIC_ITER+2 clocks later as
// wr_en/out_edge, or as rejected. in_done is delayed by the same amount.
// With FUSA = 1 the CORDIC is duplicated and compared (dup_checker); fusa_err
// pulses on a mismatch. The two CORDICs are identical logic fed by the same
// signals, so a synthesis run that merges equivalent cells folds them into one
// and fusa_err becomes constant 0. An implementation flow must keep the
// replicas apart (keep/dont-touch on the instances, or separate placement);
// the same holds for every duplicated block of the design.
module theta_detection
  import ld_pkg::*;
#(
  parameter bit FUSA = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_ed,
  input  logic signed [G_W-1:0] in_gx,
  input  logic signed [G_W-1:0] in_gy,
  input  logic [COORD_W-1:0]    in_x,
  input  logic [COORD_W-1:0]    in_y,
  input  logic                  in_done,
  output logic                  wr_en,
  output edge_t                 out_edge,
  output logic                  rejected,
  output logic                  out_done,
  output logic                  fusa_err
);

  localparam int SB_W = 1 + 2*COORD_W;
  localparam int LAT  = CORDIC_ITER + 2;

  logic               q_valid, q_q2, c_valid;
  logic [G_W-1:0]     q_cx, q_cy;
  logic [COORD_W-1:0] q_x, q_y;
  logic [THETA_W-1:0] c_theta;
  logic [SB_W-1:0]    c_sb;
  logic [LAT-1:0]     done_sr;

  quadrant_detector u_qd (
    .clk, .rst_n, .in_valid(in_ed), .in_gx, .in_gy, .in_x, .in_y,
    .out_valid(q_valid), .out_cx(q_cx), .out_cy(q_cy), .out_q2(q_q2),
    .out_x(q_x), .out_y(q_y)
  );

  cordic #(.SB_W(SB_W)) u_cordic (
    .clk, .rst_n, .in_valid(q_valid), .in_x(q_cx), .in_y(q_cy),
    .in_sb({q_q2, q_x, q_y}),
    .out_valid(c_valid), .out_theta(c_theta), .out_sb(c_sb)
  );

  theta_comparator u_cmp (
    .clk, .rst_n, .in_valid(c_valid), .in_theta(c_theta),
    .in_q2(c_sb[SB_W-1]), .in_x(c_sb[2*COORD_W-1:COORD_W]), .in_y(c_sb[COORD_W-1:0]),
    .wr_en, .out_edge, .rejected
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) done_sr <= '0;
    else        done_sr <= {done_sr[LAT-2:0], in_done};
  assign out_done = done_sr[LAT-1];

  if (FUSA) begin : g_fusa
    logic               c_valid2;
    logic [THETA_W-1:0] c_theta2;
    logic [SB_W-1:0]    c_sb2;
    cordic #(.SB_W(SB_W)) u_cordic2 (
      .clk, .rst_n, .in_valid(q_valid), .in_x(q_cx), .in_y(q_cy),
      .in_sb({q_q2, q_x, q_y}),
      .out_valid(c_valid2), .out_theta(c_theta2), .out_sb(c_sb2)
    );
    dup_checker #(.W(1 + THETA_W + SB_W)) u_chk (
      .clk, .rst_n, .a({c_valid, c_theta, c_sb}), .b({c_valid2, c_theta2, c_sb2}), .err(fusa_err)
    );
  end else begin : g_nofusa
    assign fusa_err = 1'b0;
  end

endmodule
