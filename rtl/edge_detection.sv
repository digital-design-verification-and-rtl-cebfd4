// Edge detection: reads a frame from the image ROM and produces, for every
// pixel the two 3x3 filters can process, its position, its Sobel gradients and
// an edge-detected flag.
//
// Chain: address generator -> image ROM (1 clock) -> image control 512 wide
// -> Gaussian filter (1 clock) -> image control 510 wide -> Sobel filter
// (2 clocks) -> output register, with the position counters counting the Sobel
// outputs. The stream never stalls: one ROM pixel per clock, and each image
// control first waits for four rows. A frame yields (IMG_H-4) x (IMG_W-4)
// outputs (508 x 508), positions X (row) and Y (column) from 3 to 510.
// out_valid marks every processed pixel, out_ed the ones that are edges;
// done pulses with the last one.
//
// With FUSA = 1 the address generator, the two image controls' control units
// and the position counters are duplicated and compared (dup_checker);
// fusa_err pulses on a mismatch.
//
// The first image control's done output (g_done) is left unused: the end of
// the frame is taken from the second image control, which follows it.
module edge_detection
  import ld_pkg::*;
#(
  parameter int    IMG_W     = ld_pkg::FRAME_W,
  parameter int    IMG_H     = ld_pkg::FRAME_H,
  parameter int    THRESHOLD = ld_pkg::SOBEL_TH,
  parameter bit    FUSA      = 1'b1,
  parameter string INIT_FILE = "",
  localparam int   AW        = $clog2(IMG_W * IMG_H)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  out_valid,
  output logic                  out_ed,
  output logic [COORD_W-1:0]    out_x,
  output logic [COORD_W-1:0]    out_y,
  output logic signed [G_W-1:0] out_gx,
  output logic signed [G_W-1:0] out_gy,
  output logic                  done,
  output logic                  fusa_err
);

  logic [AW-1:0]          addr;
  logic                   addr_valid, addr_done, rom_valid;
  logic [PIX_W-1:0]       rom_pix, g_pix;
  logic [2:0][2:0][PIX_W-1:0] g_win, s_win;
  logic                   g_win_valid, g_done, g_valid;
  logic                   s_win_valid, s_done;
  logic                   sb_valid, sb_ed;
  logic signed [G_W-1:0]  sb_gx, sb_gy;
  logic [COORD_W-1:0]     pc_x, pc_y;
  logic                   pc_done;
  logic [1:0]             s_done_d;
  logic                   g_err, s_err;

  addr_gen #(.DEPTH(IMG_W * IMG_H)) u_addr (
    .clk, .rst_n, .start, .addr, .valid(addr_valid), .done(addr_done)
  );

  image_rom #(.IMG_W(IMG_W), .IMG_H(IMG_H), .INIT_FILE(INIT_FILE)) u_rom (
    .clk, .addr, .data(rom_pix)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rom_valid <= 1'b0;
    else        rom_valid <= addr_valid && !start;

  image_control #(.IMG_W(IMG_W), .IMG_H(IMG_H), .FUSA(FUSA)) u_gic (
    .clk, .rst_n, .start, .in_valid(rom_valid), .in_pix(rom_pix),
    .win(g_win), .win_valid(g_win_valid), .done(g_done), .fusa_err(g_err)
  );

  gaussian_filter u_gf (
    .clk, .rst_n, .in_valid(g_win_valid), .in_win(g_win),
    .out_valid(g_valid), .out_pix(g_pix)
  );

  image_control #(.IMG_W(IMG_W - 2), .IMG_H(IMG_H - 2), .FUSA(FUSA)) u_sic (
    .clk, .rst_n, .start, .in_valid(g_valid), .in_pix(g_pix),
    .win(s_win), .win_valid(s_win_valid), .done(s_done), .fusa_err(s_err)
  );

  sobel_filter #(.THRESHOLD(THRESHOLD)) u_sf (
    .clk, .rst_n, .in_valid(s_win_valid), .in_win(s_win),
    .out_valid(sb_valid), .out_gx(sb_gx), .out_gy(sb_gy), .out_ed(sb_ed)
  );

  pos_counters #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_pc (
    .clk, .rst_n, .start, .en(sb_valid), .x(pc_x), .y(pc_y), .done(pc_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_ed <= 1'b0; out_x <= '0; out_y <= '0;
      out_gx <= '0; out_gy <= '0; done <= 1'b0; s_done_d <= '0;
    end else begin
      s_done_d  <= {s_done_d[0], s_done && !start};
      done      <= s_done_d[1];
      out_valid <= sb_valid;
      out_ed    <= sb_valid && sb_ed;
      if (sb_valid) begin
        out_x  <= pc_x;
        out_y  <= pc_y;
        out_gx <= sb_gx;
        out_gy <= sb_gy;
      end
    end
  end

  if (FUSA) begin : g_fusa
    logic [AW-1:0]      addr2;
    logic               valid2, done2;
    logic [COORD_W-1:0] x2, y2;
    logic               pdone2;
    logic               e_addr, e_pc;

    addr_gen #(.DEPTH(IMG_W * IMG_H)) u_addr2 (
      .clk, .rst_n, .start, .addr(addr2), .valid(valid2), .done(done2)
    );
    pos_counters #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_pc2 (
      .clk, .rst_n, .start, .en(sb_valid), .x(x2), .y(y2), .done(pdone2)
    );
    dup_checker #(.W(AW + 2)) u_chk_addr (
      .clk, .rst_n, .a({addr, addr_valid, addr_done}), .b({addr2, valid2, done2}), .err(e_addr)
    );
    dup_checker #(.W(2*COORD_W + 1)) u_chk_pc (
      .clk, .rst_n, .a({pc_x, pc_y, pc_done}), .b({x2, y2, pdone2}), .err(e_pc)
    );
    assign fusa_err = e_addr || e_pc || g_err || s_err;
  end else begin : g_nofusa
    assign fusa_err = 1'b0;
  end

endmodule
