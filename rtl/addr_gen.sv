// Address generator for the image ROM: a plain incrementing counter. A start
// pulse begins a frame; from the next clock on one address is issued per cycle,
// 0 .. DEPTH-1, with valid high, never pausing. done pulses with the last
// address. A start during a frame restarts it.
module addr_gen #(
  parameter int DEPTH = 512 * 512,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [AW-1:0] addr,
  output logic          valid,
  output logic          done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr  <= '0;
      valid <= 1'b0;
    end else if (start) begin
      addr  <= '0;
      valid <= 1'b1;
    end else if (valid) begin
      if (addr == AW'(DEPTH - 1)) valid <= 1'b0;
      else                        addr  <= addr + 1'b1;
    end
  end

  assign done = valid && (addr == AW'(DEPTH - 1));

endmodule
