// CORDIC in vectoring mode: the angle of a first-quadrant vector (in_x, in_y),
// both non-negative, as atan(in_y / in_x).
//
// Each stage i rotates the vector by +/- atan(2^-i) towards the x axis using
// only shifts and adds (x -/+ y>>i, y +/- x>>i) and adds the rotation to the
// angle sum, taken from ld_pkg::cordic_angle. Angles are integers in units of
// atan(2^-15) rad (90 degrees = 51472), so no fraction is needed. ITER stages
// (10 in the document, where the error is about 1 degree or less) are fully
// pipelined: a new vector every clock, result ITER clocks later. The CORDIC
// gain scales x but not the angle, so it is ignored. The inputs are scaled up
// by 2^FRAC inside to keep precision in the shifted terms (own choice).
// Sideband bits (edge position, quadrant flag) travel with the vector.
module cordic
  import ld_pkg::*;
#(
  parameter int ITER = ld_pkg::CORDIC_ITER,
  parameter int IN_W = ld_pkg::G_W,
  parameter int SB_W = 1,
  parameter int FRAC = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [IN_W-1:0]    in_x,
  input  logic [IN_W-1:0]    in_y,
  input  logic [SB_W-1:0]    in_sb,
  output logic               out_valid,
  output logic [THETA_W-1:0] out_theta,
  output logic [SB_W-1:0]    out_sb
);

  localparam int W = IN_W + FRAC + 2;     // room for the CORDIC gain and sign

  logic signed [W-1:0]         xs [ITER+1];
  logic signed [W-1:0]         ys [ITER+1];
  logic signed [THETA_W:0]     zs [ITER+1];
  logic                        vs [ITER+1];
  logic [SB_W-1:0]             sbs[ITER+1];

  assign xs[0]  = W'({2'b00, in_x} << FRAC);
  assign ys[0]  = W'({2'b00, in_y} << FRAC);
  assign zs[0]  = '0;
  assign vs[0]  = in_valid;
  assign sbs[0] = in_sb;

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    localparam logic signed [THETA_W:0] ANG = (THETA_W+1)'(cordic_angle(i));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0; vs[i+1] <= 1'b0; sbs[i+1] <= '0;
      end else begin
        vs[i+1] <= vs[i];
        if (vs[i]) begin
          sbs[i+1] <= sbs[i];
          if (ys[i] >= 0) begin           // rotate clockwise
            xs[i+1] <= xs[i] + (ys[i] >>> i);
            ys[i+1] <= ys[i] - (xs[i] >>> i);
            zs[i+1] <= zs[i] + ANG;
          end else begin                  // rotate anticlockwise
            xs[i+1] <= xs[i] - (ys[i] >>> i);
            ys[i+1] <= ys[i] + (xs[i] >>> i);
            zs[i+1] <= zs[i] - ANG;
          end
        end
      end
    end
  end

  assign out_valid = vs[ITER];
  assign out_sb    = sbs[ITER];
  assign out_theta = zs[ITER][THETA_W] ? '0 : zs[ITER][THETA_W-1:0];

endmodule
