// Hough transform for straight lane lines, in the slope/intercept form
// b = x*cot(theta) + y, which needs one LUT and one multiplier per vote.
//
// Edges from theta detection (position and left/right flag) queue in a FIFO.
// The controller takes one edge at a time and the LUT counter walks the 36
// angles of the edge's region, one per clock:
//   counter -> cot LUT (1) -> mapper: product (1), b (1) -> address
//   flattener (1) -> accumulator: read (1), write (1) -> maximum detectors (1)
// A (b, theta) outside the region's b ROI casts no vote (invalid_b). The two
// maximum detectors follow the accumulator's writes and hold the two most
// voted lines of each region. An edge costs 37 clocks.
//
// start clears the FIFO, the maximum detectors and (over ACC_DEPTH clocks)
// the accumulator. in_done says no more edges will come; once the FIFO and the
// pipeline are empty, done pulses and lanes_valid rises with lanes final.
//
// Safety mechanisms (FUSA = 1, following the document's choice of blocks): the
// controller is triplicated with a majority vote; LUT counter, address
// flattener, accumulator and both maximum detectors are duplicated and
// compared. fusa_err pulses on any mismatch.
//
// Assertions check the document's formal properties: reads at least 37 clocks
// apart, the counter active for 36 angles after each read, no vote for a b
// outside the ROI.
//
// rst_n also appears in the assertions' "disable iff (!rst_n)", which lint
// reports as a synchronous use of an asynchronous reset; the flops themselves
// all reset asynchronously.
module hough_transform
  import ld_pkg::*;
#(
  parameter int FIFO_DEPTH = 1024,
  parameter bit FUSA       = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   in_wr,
  input  edge_t  in_edge,
  input  logic   in_done,
  output lanes_t lanes,
  output logic   lanes_valid,
  output logic   done,
  output logic   fifo_full,
  output logic   fifo_overflow,
  output logic   invalid_b,
  output logic   acc_bypass,
  output logic   fusa_err
);

  localparam int TAG_W = 1 + B_W + IDX_W;

  // FIFO
  edge_t e;
  logic  f_empty, f_valid, rd_en;

  sync_fifo #(.W($bits(edge_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clear(start), .wr_en(in_wr), .wr_data(in_edge),
    .rd_en, .rd_data(e), .full(fifo_full), .empty(f_empty), .valid(f_valid),
    .overflow(fifo_overflow)
  );

  // Controller
  logic acc_ready, cnt_start, cnt_done, ctrl_idle, ctrl_state;
  logic [2:0] c_rd, c_start, c_state;
  logic       tmr_err;

  ht_controller u_ctrl0 (
    .clk, .rst_n, .fifo_valid(f_valid), .ready(acc_ready), .cnt_done,
    .rd_en(c_rd[0]), .cnt_start(c_start[0]), .state_o(c_state[0])
  );

  if (FUSA) begin : g_tmr
    for (genvar i = 1; i < 3; i++) begin : g_rep
      ht_controller u_ctrl (
        .clk, .rst_n, .fifo_valid(f_valid), .ready(acc_ready), .cnt_done,
        .rd_en(c_rd[i]), .cnt_start(c_start[i]), .state_o(c_state[i])
      );
    end
    logic [2:0] voted;
    tmr_voter #(.W(3)) u_vote (
      .a({c_rd[0], c_start[0], c_state[0]}),
      .b({c_rd[1], c_start[1], c_state[1]}),
      .c({c_rd[2], c_start[2], c_state[2]}),
      .y(voted), .mismatch(tmr_err)
    );
    assign {rd_en, cnt_start, ctrl_state} = voted;
  end else begin : g_single
    assign {c_rd[2:1], c_start[2:1], c_state[2:1]} = '0;
    assign {rd_en, cnt_start, ctrl_state} = {c_rd[0], c_start[0], c_state[0]};
    assign tmr_err = 1'b0;
  end
  assign ctrl_idle = !ctrl_state;

  // LUT counter and cot LUT
  logic [IDX_W-1:0] idx;
  logic             cnt_active;
  lut_counter #(.N(N_THETA)) u_cnt (
    .clk, .rst_n, .start(cnt_start), .idx, .active(cnt_active), .done(cnt_done)
  );

  logic [COT_W-1:0]   cot;
  logic               s1_v, s1_lr;
  logic [COORD_W-1:0] s1_x, s1_y;
  logic [IDX_W-1:0]   s1_idx;

  cot_lut u_lut (.clk, .lr(e.lr), .idx, .cot);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_lr <= 1'b0; s1_x <= '0; s1_y <= '0; s1_idx <= '0;
    end else begin
      s1_v <= cnt_active;
      if (cnt_active) begin
        s1_lr <= e.lr; s1_x <= e.x; s1_y <= e.y; s1_idx <= idx;
      end
    end
  end

  // b = y +/- x*cot
  logic                  m_v, m_lr;
  logic signed [B_W-1:0] m_b;
  logic [IDX_W-1:0]      m_idx;

  hough_mapper u_map (
    .clk, .rst_n, .in_valid(s1_v), .in_x(s1_x), .in_y(s1_y), .in_lr(s1_lr),
    .in_idx(s1_idx), .in_cot(cot),
    .out_valid(m_v), .out_b(m_b), .out_lr(m_lr), .out_idx(m_idx)
  );

  // ROI check and flattening
  logic                  a_vote, a_lr;
  logic [ACC_AW-1:0]     a_addr;
  logic signed [B_W-1:0] a_b;
  logic [IDX_W-1:0]      a_idx;

  address_flattener u_flat (
    .clk, .rst_n, .in_valid(m_v), .in_b(m_b), .in_lr(m_lr), .in_idx(m_idx),
    .vote(a_vote), .addr(a_addr), .invalid_b, .out_b(a_b), .out_lr(a_lr), .out_idx(a_idx)
  );

  // Voting
  logic                  v_valid;
  logic [ACC_AW-1:0]     v_addr;
  logic [VOTE_W-1:0]     v_count;
  logic [TAG_W-1:0]      v_tag;

  accumulator #(.DEPTH(ACC_DEPTH), .TAG_W(TAG_W)) u_acc (
    .clk, .rst_n, .clear(start), .ready(acc_ready),
    .in_valid(a_vote), .in_addr(a_addr), .in_tag({a_lr, a_b, a_idx}),
    .out_valid(v_valid), .out_addr(v_addr), .out_count(v_count), .out_tag(v_tag),
    .bypass(acc_bypass)
  );

  logic                  v_lr;
  logic signed [B_W-1:0] v_b;
  logic [IDX_W-1:0]      v_idx;
  assign {v_lr, v_b, v_idx} = v_tag;

  max_detector u_max_l (
    .clk, .rst_n, .clear(start), .in_valid(v_valid && !v_lr), .in_addr(v_addr),
    .in_count(v_count), .in_b(v_b), .in_idx(v_idx), .max1(lanes.l1), .max2(lanes.l2)
  );
  max_detector u_max_r (
    .clk, .rst_n, .clear(start), .in_valid(v_valid && v_lr), .in_addr(v_addr),
    .in_count(v_count), .in_b(v_b), .in_idx(v_idx), .max1(lanes.r1), .max2(lanes.r2)
  );

  // End of frame
  logic done_seen, pipe_busy;
  assign pipe_busy = cnt_active || s1_v || m_v || a_vote || invalid_b || v_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_seen <= 1'b0; done <= 1'b0; lanes_valid <= 1'b0;
    end else if (start) begin
      done_seen <= 1'b0; done <= 1'b0; lanes_valid <= 1'b0;
    end else begin
      if (in_done) done_seen <= 1'b1;
      done <= done_seen && !lanes_valid && !done && f_empty && ctrl_idle && !pipe_busy;
      if (done) lanes_valid <= 1'b1;
    end
  end

  // Duplicated blocks
  if (FUSA) begin : g_dup
    logic [IDX_W-1:0]      idx2;
    logic                  act2, cdone2;
    logic                  a_vote2, inv2, a_lr2;
    logic [ACC_AW-1:0]     a_addr2;
    logic signed [B_W-1:0] a_b2;
    logic [IDX_W-1:0]      a_idx2;
    logic                  rdy2, v_valid2, byp2;
    logic [ACC_AW-1:0]     v_addr2;
    logic [VOTE_W-1:0]     v_count2;
    logic [TAG_W-1:0]      v_tag2;
    line_t                 l1b, l2b, r1b, r2b;
    logic [4:0]            err;

    lut_counter #(.N(N_THETA)) u_cnt2 (
      .clk, .rst_n, .start(cnt_start), .idx(idx2), .active(act2), .done(cdone2)
    );
    address_flattener u_flat2 (
      .clk, .rst_n, .in_valid(m_v), .in_b(m_b), .in_lr(m_lr), .in_idx(m_idx),
      .vote(a_vote2), .addr(a_addr2), .invalid_b(inv2), .out_b(a_b2), .out_lr(a_lr2), .out_idx(a_idx2)
    );
    accumulator #(.DEPTH(ACC_DEPTH), .TAG_W(TAG_W)) u_acc2 (
      .clk, .rst_n, .clear(start), .ready(rdy2),
      .in_valid(a_vote), .in_addr(a_addr), .in_tag({a_lr, a_b, a_idx}),
      .out_valid(v_valid2), .out_addr(v_addr2), .out_count(v_count2), .out_tag(v_tag2),
      .bypass(byp2)
    );
    max_detector u_max_l2 (
      .clk, .rst_n, .clear(start), .in_valid(v_valid && !v_lr), .in_addr(v_addr),
      .in_count(v_count), .in_b(v_b), .in_idx(v_idx), .max1(l1b), .max2(l2b)
    );
    max_detector u_max_r2 (
      .clk, .rst_n, .clear(start), .in_valid(v_valid && v_lr), .in_addr(v_addr),
      .in_count(v_count), .in_b(v_b), .in_idx(v_idx), .max1(r1b), .max2(r2b)
    );

    dup_checker #(.W(IDX_W + 2)) u_chk_cnt (
      .clk, .rst_n, .a({idx, cnt_active, cnt_done}), .b({idx2, act2, cdone2}), .err(err[0]));
    dup_checker #(.W(3 + ACC_AW + B_W + IDX_W)) u_chk_flat (
      .clk, .rst_n, .a({a_vote, invalid_b, a_lr, a_addr, a_b, a_idx}),
      .b({a_vote2, inv2, a_lr2, a_addr2, a_b2, a_idx2}), .err(err[1]));
    dup_checker #(.W(3 + ACC_AW + VOTE_W + TAG_W)) u_chk_acc (
      .clk, .rst_n, .a({acc_ready, v_valid, acc_bypass, v_addr, v_count, v_tag}),
      .b({rdy2, v_valid2, byp2, v_addr2, v_count2, v_tag2}), .err(err[2]));
    dup_checker #(.W(2*$bits(line_t))) u_chk_ml (
      .clk, .rst_n, .a({lanes.l1, lanes.l2}), .b({l1b, l2b}), .err(err[3]));
    dup_checker #(.W(2*$bits(line_t))) u_chk_mr (
      .clk, .rst_n, .a({lanes.r1, lanes.r2}), .b({r1b, r2b}), .err(err[4]));

    assign fusa_err = tmr_err || (|err);
  end else begin : g_nodup
    assign fusa_err = tmr_err;
  end

  // The FIFO is read at most once per edge time.
  a_rd_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |=> !rd_en [*36]);
  // After a read the LUT counter is active for exactly the 36 angles, and
  // reports done on the last one.
  a_count_36: assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |=> (cnt_active && !cnt_done) [*35] ##1 (cnt_active && cnt_done) ##1 !cnt_active);
  // A b outside the ROI never reaches the accumulator.
  a_no_vote_invalid: assert property (@(posedge clk) disable iff (!rst_n)
    !(a_vote && invalid_b));

endmodule
