// Duplication checker (safety mechanism): compares the outputs of two replicas
// of a block and raises err, registered, in the cycle after they differ.
// The design duplicates the blocks whose single failure would spoil a whole
// frame (address generator, position counters, CORDIC, LUT counter, address
// flattener, accumulator, maximum detectors); the first replica drives the
// datapath and the second only feeds this checker.
module dup_checker #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         err
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) err <= 1'b0;
    else        err <= (a != b);

endmodule
