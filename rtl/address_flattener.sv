// Address flattener: checks that a (b, theta) pair lies in its region's b ROI
// and turns it into a 1-D accumulator address.
//   right: addr = ((b - B_MIN_R) >> B_SHIFT) * N_THETA + idx
//   left:  addr = ((b - B_MIN_L) >> B_SHIFT) * N_THETA + idx + ACC_OFFSET_L
// b is quantised to steps of 2^B_SHIFT (2 in the document). The left block
// starts after the whole right block (ACC_OFFSET_L = 117*36); the document's
// offset formula is taken to mean that. A pair outside the ROI gives no vote
// and raises invalid_b. The quantised b (bin start) travels with the vote for
// the maximum detectors. One register stage.
module address_flattener
  import ld_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [B_W-1:0] in_b,
  input  logic                  in_lr,
  input  logic [IDX_W-1:0]      in_idx,
  output logic                  vote,
  output logic [ACC_AW-1:0]     addr,
  output logic                  invalid_b,
  output logic signed [B_W-1:0] out_b,
  output logic                  out_lr,
  output logic [IDX_W-1:0]      out_idx
);

  logic signed [B_W-1:0] bmin, bmax, boff;
  logic [B_W-1:0]        bin;
  logic                  in_roi;
  logic [ACC_AW-1:0]     a;

  always_comb begin
    bmin   = in_lr ? B_W'(B_MIN_R) : B_W'(B_MIN_L);
    bmax   = in_lr ? B_W'(B_MAX_R) : B_W'(B_MAX_L);
    in_roi = (in_b >= bmin) && (in_b <= bmax);
    boff   = in_b - bmin;
    bin    = B_W'(boff) >> B_SHIFT;
    a      = ACC_AW'(bin) * ACC_AW'(N_THETA) + ACC_AW'(in_idx)
           + (in_lr ? '0 : ACC_AW'(ACC_OFFSET_L));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vote <= 1'b0; invalid_b <= 1'b0; addr <= '0;
      out_b <= '0; out_lr <= 1'b0; out_idx <= '0;
    end else begin
      vote      <= in_valid && in_roi;
      invalid_b <= in_valid && !in_roi;
      if (in_valid) begin
        addr    <= a;
        out_b   <= bmin + B_W'(bin << B_SHIFT);
        out_lr  <= in_lr;
        out_idx <= in_idx;
      end
    end
  end

endmodule
