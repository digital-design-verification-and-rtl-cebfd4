// cot(theta) look-up table: |cot| in 24-bit unsigned 10.14 fixed point for the
// 36 angles of the selected region, 1 degree apart. Right region (lr = 1):
// theta = -70 + idx deg; left region (lr = 0): theta = -145 + idx deg. Both
// sets of magnitudes are cot(35..70 deg), so one 36-entry table
// (ld_pkg::cot_table, round(cot(phi)*2^14)) serves both, read in opposite
// orders; the document stores 72 entries with a region offset, which holds the
// same numbers. Signs are left to the adder (right: negative, left: positive).
// Registered read: cot follows idx by one clock.
module cot_lut
  import ld_pkg::*;
(
  input  logic             clk,
  input  logic             lr,
  input  logic [IDX_W-1:0] idx,
  output logic [COT_W-1:0] cot
);

  always_ff @(posedge clk)
    cot <= cot_table(lr ? IDX_W'(N_THETA - 1) - idx : idx);

endmodule
