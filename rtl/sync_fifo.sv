// Synchronous FIFO between theta detection and the Hough transform: logic
// around a 2-port RAM whose read and write addresses are internal counters.
// full: every slot written and not yet read; empty: read pointer equals write
// pointer; valid = !empty tells the controller an edge is waiting. A write
// while full is dropped and reported by overflow: the edge stream upstream
// never stalls. rd_data is registered: it appears the clock after rd_en and
// holds until the next read. Pointers carry one extra wrap bit.
//
// rst_n also appears in the assertions' "disable iff (!rst_n)", which lint
// reports as a synchronous use of an asynchronous reset; the flops themselves
// all reset asynchronously.
module sync_fifo #(
  parameter int  W     = 8,
  parameter int  DEPTH = 1024,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         full,
  output logic         empty,
  output logic         valid,
  output logic         overflow
);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  assign empty    = (wp == rp);
  assign full     = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign valid    = !empty;
  assign overflow = wr_en && full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else if (clear) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr_en && !full) wp <= wp + 1'b1;
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
    if (rd_en && !empty) rd_data <= mem[rp[AW-1:0]];
  end

  // A read is only issued while an entry is waiting.
  a_rd_when_valid: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> valid);

endmodule
