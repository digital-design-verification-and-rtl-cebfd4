// Hough mapper: maps an edge (x, y) and one angle's |cot| to the y-intercept
// of the line through the edge at that angle,
//   left  (lr = 0): b = floor(y + x*|cot|)
//   right (lr = 1): b = floor(y - x*|cot|)
// which is b = x*cot(theta) + y with the sign taken from the region. x is
// extended to 10.14 and multiplied by fxp_mult; the sum is formed in fixed
// point and floored to an integer, since b is used as an address. Two register
// stages (product, then b); lr and idx travel along.
module hough_mapper
  import ld_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [COORD_W-1:0]    in_x,
  input  logic [COORD_W-1:0]    in_y,
  input  logic                  in_lr,
  input  logic [IDX_W-1:0]      in_idx,
  input  logic [COT_W-1:0]      in_cot,
  output logic                  out_valid,
  output logic signed [B_W-1:0] out_b,
  output logic                  out_lr,
  output logic [IDX_W-1:0]      out_idx
);

  localparam int SW = COT_W + 2;     // signed sum width

  logic [COT_W-1:0]   x_fx, prod, prod_q;
  logic [COORD_W-1:0] y_q;
  logic               v_q, lr_q;
  logic [IDX_W-1:0]   idx_q;
  logic signed [SW-1:0] y_fx, sum;

  assign x_fx = COT_W'(in_x) << COT_Q;

  fxp_mult u_mul (.a(x_fx), .b(in_cot), .p(prod));

  assign y_fx = SW'(y_q) <<< COT_Q;
  assign sum  = lr_q ? y_fx - SW'(prod_q) : y_fx + SW'(prod_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0; prod_q <= '0; y_q <= '0; lr_q <= 1'b0; idx_q <= '0;
      out_valid <= 1'b0; out_b <= '0; out_lr <= 1'b0; out_idx <= '0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        prod_q <= prod; y_q <= in_y; lr_q <= in_lr; idx_q <= in_idx;
      end
      out_valid <= v_q;
      if (v_q) begin
        out_b   <= B_W'(sum >>> COT_Q);     // arithmetic shift = floor
        out_lr  <= lr_q;
        out_idx <= idx_q;
      end
    end
  end

endmodule
