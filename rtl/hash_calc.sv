// hash_calc: 13-bit hash key of an 8x8 luma block (IBC hash search).
//
// The key packs the three most significant bits of the DC average of each
// 4x4 quarter (top-left, top-right, bottom-left, bottom-right, at bit
// positions 12:10, 9:7, 6:4 and 3:1) and a one-bit gradient flag in bit 0,
// as in the reduced hash of the design. The flag is 0 only when the four MSBs
// of the gradient are zero, i.e. when the 8-bit gradient is below 16.
// The gradient is taken as the mean of the horizontal and the vertical
// absolute neighbour differences over the block (56 + 56 differences); the
// flag is therefore (sum_h + sum_v) >= 16 * 112. That definition, and the
// quarter order, are this design's reading.
// The block also reports the luma activity min(sum_h, sum_v), used by the
// local search to gate its 2-D search.
//
// Timing: one block per cycle, result registered one cycle after in_valid.
module hash_calc
  import scc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  pix_t              blk [64],      // raster order, blk[r*8+c]
  output logic              out_valid,
  output logic [KEY_W-1:0]  key,
  output logic [15:0]       activity       // min(sum_h, sum_v)
);

  logic [11:0] dc_sum [4];
  logic [15:0] sum_h, sum_v;
  logic        delta;
  logic [KEY_W-1:0] key_c;

  always_comb begin
    for (int q = 0; q < 4; q++) dc_sum[q] = '0;
    sum_h = '0;
    sum_v = '0;
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) begin
        dc_sum[(r / 4) * 2 + (c / 4)] += 12'(blk[r*8+c]);
        if (c > 0) sum_h += 16'(absdiff(blk[r*8+c], blk[r*8+c-1]));
        if (r > 0) sum_v += 16'(absdiff(blk[r*8+c], blk[(r-1)*8+c]));
      end
    end
    // DC = sum/16, so MSB_3(DC) = sum[11:9]
    delta = (32'(sum_h) + 32'(sum_v)) >= 32'(16 * 112);
    key_c = {dc_sum[0][11:9], dc_sum[1][11:9], dc_sum[2][11:9], dc_sum[3][11:9], delta};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      key       <= '0;
      activity  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        key      <= key_c;
        activity <= (sum_h < sum_v) ? sum_h : sum_v;
      end
    end
  end

endmodule
