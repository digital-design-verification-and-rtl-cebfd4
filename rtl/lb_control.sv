// Line-buffer control unit. Steers an image stream into four line buffers and
// reads 3x3 windows out of them without ever stalling the stream.
//
// Row r of the frame is written into buffer r mod 4, one pixel per in_valid.
// Once four rows are held, every pixel written into row r (r >= 4) also reads
// column c (c < IMG_W-2) of window row r-4, i.e. rows r-4, r-3, r-2 from
// buffers r mod 4, r+1 mod 4, r+2 mod 4. The buffer being written is the top
// row being read, and the read pointer is always at or ahead of the write
// pointer, so the old row is read before it is overwritten (states 2..5 of the
// document's control unit, cycling LB1..LB4). After the last row is written
// the two remaining window rows are read out on an internal column counter
// (IMG_W cycles per row, of which IMG_W-2 carry a window). A frame therefore
// yields (IMG_H-2) x (IMG_W-2) windows. Reading waits for four full rows, so
// the first window comes 4*IMG_W-1 input pixels after the first pixel.
//
// rd_valid marks a cycle that reads a window; the window appears at the line
// buffer outputs one clock later. top_sel names the buffer holding its top row.
// last marks the read of the frame's final window. start clears the unit.
// Assertions check the properties the document proves formally for this unit:
// one write enable at a time, three read enables per window.
module lb_control #(
  parameter int  IMG_W = 512,
  parameter int  IMG_H = 512,
  localparam int AW    = $clog2(IMG_W),
  localparam int RW    = $clog2(IMG_H + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          in_valid,
  output logic [3:0]    we,
  output logic [AW-1:0] waddr,
  output logic [3:0]    re,
  output logic [AW-1:0] raddr,
  output logic [1:0]    top_sel,
  output logic          rd_valid,
  output logic          last
);

  logic [AW-1:0] wcol, fcol;
  logic [RW-1:0] wrow;
  logic          frow;       // flush row 0 / 1
  logic          fdone;      // flush finished
  logic          accept, flushing;
  logic [1:0]    frow_k;     // buffer holding the first flushed window row

  assign accept   = in_valid && (wrow < RW'(IMG_H));
  assign flushing = (wrow == RW'(IMG_H)) && !fdone;
  assign frow_k   = 2'(IMG_H - 4) + 2'(frow);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcol <= '0; wrow <= '0; fcol <= '0; frow <= 1'b0; fdone <= 1'b0;
    end else if (start) begin
      wcol <= '0; wrow <= '0; fcol <= '0; frow <= 1'b0; fdone <= 1'b0;
    end else if (accept) begin
      if (wcol == AW'(IMG_W - 1)) begin
        wcol <= '0;
        wrow <= wrow + 1'b1;
      end else begin
        wcol <= wcol + 1'b1;
      end
    end else if (flushing) begin
      if (fcol == AW'(IMG_W - 1)) begin
        fcol <= '0;
        frow <= 1'b1;
        if (frow) fdone <= 1'b1;
      end else begin
        fcol <= fcol + 1'b1;
      end
    end
  end

  always_comb begin
    we       = '0;
    re       = '0;
    waddr    = wcol;
    raddr    = wcol;
    top_sel  = wrow[1:0];
    rd_valid = 1'b0;
    last     = 1'b0;
    if (accept) begin
      we[wrow[1:0]] = 1'b1;
      rd_valid      = (wrow >= RW'(4)) && (wcol < AW'(IMG_W - 2));
    end else if (flushing) begin
      raddr    = fcol;
      top_sel  = frow_k;
      rd_valid = fcol < AW'(IMG_W - 2);
      last     = frow && (fcol == AW'(IMG_W - 3));
    end
    if (rd_valid)
      for (int k = 0; k < 3; k++) re[2'(top_sel + 2'(k))] = 1'b1;
  end

  // At most one line buffer is written at a time.
  a_we_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    (we & (we - 4'd1)) == 4'd0);
  // A window reads exactly three buffers. The one being written is read at
  // the write address (slots x..x+2, before the write lands), so reading
  // never falls behind writing.
  a_three_reads: assert property (@(posedge clk) disable iff (!rst_n)
    rd_valid |-> (re == ~(4'd1 << 2'(top_sel + 2'd3))) && (!accept || raddr == waddr));
  // The first window comes 4*IMG_W-1 accepted pixels after the first one.
  a_first_window: assert property (@(posedge clk) disable iff (!rst_n)
    (rd_valid && !flushing) |-> (wrow >= RW'(4)));

endmodule
