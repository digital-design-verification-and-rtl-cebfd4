// Fixed-point multiplier: unsigned 24-bit x 24-bit, both 10.14, giving the
// 10.14 product. The full product has 48 bits with 28 fraction bits; the known
// operand ranges (x < 1024, |cot| < 1.43, product < 1024) let it keep only
// bits [37:14] and drop the rest. Combinational.
module fxp_mult
  import ld_pkg::*;
(
  input  logic [COT_W-1:0] a,
  input  logic [COT_W-1:0] b,
  output logic [COT_W-1:0] p
);

  logic [2*COT_W-1:0] full;

  assign full = a * b;
  assign p    = COT_W'(full >> COT_Q);

endmodule
