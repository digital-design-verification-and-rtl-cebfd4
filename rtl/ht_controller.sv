// Hough-transform controller: a two-state FSM. In IDLE, when the FIFO holds an
// edge (fifo_valid) and the accumulator is ready, it reads the edge (rd_en) and
// starts the LUT counter (cnt_start) in the same clock, then waits in BUSY for
// the counter's last step (cnt_done). One edge therefore takes 37 clocks, and
// rd_en stays low for at least 36 clocks after each read.
// The document gives the behaviour, not the encoding; the states are this
// design's own. state_o is the state (0 = IDLE, 1 = BUSY): the parent reads
// "idle" from it, and the triplication voter compares it.
module ht_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic fifo_valid,
  input  logic ready,
  input  logic cnt_done,
  output logic rd_en,
  output logic cnt_start,
  output logic state_o
);

  typedef enum logic {IDLE = 1'b0, BUSY = 1'b1} state_t;
  state_t state;

  assign rd_en     = (state == IDLE) && fifo_valid && ready;
  assign cnt_start = rd_en;
  assign state_o   = state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 state <= IDLE;
    else if (rd_en)             state <= BUSY;
    else if (state == BUSY && cnt_done) state <= IDLE;
  end

endmodule
