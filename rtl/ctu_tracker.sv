// ctu_tracker: keeps track of which reconstructed CTUs of each CTU row are
// already in DRAM ("Completed CTU Tracker").
//
// For every CTU row it holds the number of leading CTUs that are complete
// and a 4-bit mask of the 32x32 blocks written so far in the next CTU.
// write_to_ddr reports each written 32x32 block on blk_done; when the
// last block of a CTU arrives the row's count advances (blocks outside the
// picture, as in the bottom CTU row of a 1080-line picture, are not waited
// for). CTUs are assumed
// to be written in order along a row. Query (combinational): a reference
// area whose top-left and bottom-right samples are q_x0/q_y0 and q_x1/q_y1
// is available when the CTU holding its bottom-right sample is complete, or
// is the CTU in progress and the 32x32 blocks of both corners are written.
// frame_start clears everything.
module ctu_tracker
  import scc_pkg::*;
#(
  parameter int PIC_W = 1920,
  parameter int PIC_H = 1080
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             frame_start,
  input  logic             blk_done,
  input  logic [POS_W-1:0] blk_x,
  input  logic [POS_W-1:0] blk_y,
  input  logic [POS_W-1:0] q_x0,
  input  logic [POS_W-1:0] q_y0,
  input  logic [POS_W-1:0] q_x1,
  input  logic [POS_W-1:0] q_y1,
  output logic             avail
);
  localparam int ROWS = (PIC_H + CTU - 1) / CTU;
  localparam int COLS = (PIC_W + CTU - 1) / CTU;
  localparam int CW   = $clog2(COLS + 1);
  localparam int RW   = $clog2(ROWS);

  logic [CW-1:0] done_cnt [ROWS];
  logic [3:0]    mask     [ROWS];
  logic [RW-1:0] br, qr;
  logic [1:0]    bq;

  logic [3:0]    need;
  logic          bot_in, right_in;

  assign br = RW'(blk_y >> 6);
  assign bq = {blk_y[5], blk_x[5]};
  // 32x32 blocks lying outside the picture (bottom CTU row when PIC_H is not
  // a multiple of 64, likewise the last column) are never written
  assign bot_in   = (32'(br) * CTU + 32) < PIC_H;
  assign right_in = (32'(blk_x >> 6) * CTU + 32) < PIC_W;
  assign need     = {bot_in && right_in, bot_in, right_in, 1'b1};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) begin
        done_cnt[r] <= '0;
        mask[r]     <= '0;
      end
    end else if (frame_start) begin
      for (int r = 0; r < ROWS; r++) begin
        done_cnt[r] <= '0;
        mask[r]     <= '0;
      end
    end else if (blk_done && 32'(br) < ROWS) begin
      if (((mask[br] | (4'b1 << bq)) & need) == need) begin
        mask[br]     <= '0;
        done_cnt[br] <= done_cnt[br] + 1'b1;
      end else begin
        mask[br] <= mask[br] | (4'b1 << bq);
      end
    end
  end

  logic [CW-1:0] qc;
  logic          q_same0;
  always_comb begin
    qr = RW'(q_y1 >> 6);
    qc = CW'(q_x1 >> 6);
    q_same0 = (q_x0 >> 6) == (q_x1 >> 6) && (q_y0 >> 6) == (q_y1 >> 6);
    if (32'(qr) >= ROWS)
      avail = 1'b0;
    else if (qc < done_cnt[qr])
      avail = 1'b1;
    else if (qc == done_cnt[qr])
      avail = mask[qr][{q_y1[5], q_x1[5]}] &&
              (!q_same0 || mask[qr][{q_y0[5], q_x0[5]}]);
    else
      avail = 1'b0;
  end
endmodule
