// Triplication voter (safety mechanism): bitwise two-out-of-three majority of
// three replicas, so one faulty replica is outvoted and the design keeps
// working. mismatch (combinational) reports that the replicas disagree.
// Used on the Hough-transform controller, the block whose failure the
// document rates most critical.
module tmr_voter #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         mismatch
);

  assign y        = (a & b) | (a & c) | (b & c);
  assign mismatch = (a != b) || (a != c);

endmodule
