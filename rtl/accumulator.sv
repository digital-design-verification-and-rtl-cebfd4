// Hough accumulator: a 2-port RAM of vote counters. A vote reads its counter
// (clock 1) and writes it back plus one (clock 2); the new count leaves on
// out_* with the vote's tag. If two back-to-back votes hit the same address,
// the second one's read returned the value from before the first one's write,
// so the just-written value is used instead (bypass; the bypass output marks
// it). Counters saturate at 2^VOTE_W-1 (own choice).
//
// clear starts a sweep that writes zero to every counter, one per clock
// (DEPTH clocks); ready is low meanwhile and votes must wait. The document does
// not say how the accumulator is emptied between frames; the sweep is this
// design's choice.
module accumulator
  import ld_pkg::*;
#(
  parameter int  DEPTH = ld_pkg::ACC_DEPTH,
  parameter int  TAG_W = 1,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  output logic              ready,
  input  logic              in_valid,
  input  logic [AW-1:0]     in_addr,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output logic [AW-1:0]     out_addr,
  output logic [VOTE_W-1:0] out_count,
  output logic [TAG_W-1:0]  out_tag,
  output logic              bypass
);

  logic [VOTE_W-1:0] mem [DEPTH];
  logic [VOTE_W-1:0] rdata, base, newv;
  logic [AW-1:0]     a1, caddr;
  logic [TAG_W-1:0]  tag1;
  logic              v1, clearing;

  assign ready  = !clearing;
  assign bypass = v1 && out_valid && (out_addr == a1);
  assign base   = bypass ? out_count : rdata;
  assign newv   = (&base) ? base : base + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b0; caddr <= '0;
      v1 <= 1'b0; a1 <= '0; tag1 <= '0;
      out_valid <= 1'b0; out_addr <= '0; out_count <= '0; out_tag <= '0;
    end else begin
      if (clear) begin
        clearing <= 1'b1;
        caddr    <= '0;
      end else if (clearing) begin
        if (caddr == AW'(DEPTH - 1)) clearing <= 1'b0;
        caddr <= caddr + 1'b1;
      end
      v1 <= in_valid && ready && !clear;
      if (in_valid) begin
        a1   <= in_addr;
        tag1 <= in_tag;
      end
      out_valid <= v1;
      if (v1) begin
        out_addr  <= a1;
        out_count <= newv;
        out_tag   <= tag1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) rdata <= mem[in_addr];
    if (clearing)  mem[caddr] <= '0;
    else if (v1)   mem[a1]    <= newv;
  end

endmodule
