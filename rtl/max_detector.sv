// Maximum detector for one region: follows the accumulator's writes and keeps
// the two most voted (b, theta) cells, so the two edges of a painted lane line
// are both found without scanning the accumulator. Because a count only ever
// grows by one, comparing each updated count with the current two best
// (matching by accumulator address) keeps them exact. On equal counts the cell
// that got there first stays ahead. clear empties both entries. One register
// stage. The document names the block and its comparator-and-gates structure;
// the update rule is this design's.
module max_detector
  import ld_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  in_valid,
  input  logic [ACC_AW-1:0]     in_addr,
  input  logic [VOTE_W-1:0]     in_count,
  input  logic signed [B_W-1:0] in_b,
  input  logic [IDX_W-1:0]      in_idx,
  output line_t                 max1,
  output line_t                 max2
);

  logic [ACC_AW-1:0] k1, k2;
  line_t             cand;

  assign cand = '{votes: in_count, b: in_b, idx: in_idx};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max1 <= '0; max2 <= '0; k1 <= '1; k2 <= '1;
    end else if (clear) begin
      max1 <= '0; max2 <= '0; k1 <= '1; k2 <= '1;
    end else if (in_valid) begin
      if (in_addr == k1) begin
        max1 <= cand;
      end else if (in_addr == k2) begin
        if (in_count > max1.votes) begin
          max1 <= cand; k1 <= in_addr;
          max2 <= max1; k2 <= k1;
        end else begin
          max2 <= cand;
        end
      end else if (in_count > max1.votes) begin
        max1 <= cand; k1 <= in_addr;
        max2 <= max1; k2 <= k1;
      end else if (in_count > max2.votes) begin
        max2 <= cand; k2 <= in_addr;
      end
    end
  end

endmodule
