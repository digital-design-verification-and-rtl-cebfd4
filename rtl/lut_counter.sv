// LUT counter: on start, steps idx through 0 .. N-1, one value per clock,
// starting the clock after start; active is high while idx is meaningful and
// done marks the last value. It walks the cot(theta) LUT over the 36 angles of
// one region for each edge.
module lut_counter #(
  parameter int  N  = 36,
  localparam int IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [IW-1:0] idx,
  output logic          active,
  output logic          done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; active <= 1'b0;
    end else if (start) begin
      idx <= '0; active <= 1'b1;
    end else if (active) begin
      if (idx == IW'(N - 1)) active <= 1'b0;
      else                   idx    <= idx + 1'b1;
    end
  end

  assign done = active && (idx == IW'(N - 1));

endmodule
