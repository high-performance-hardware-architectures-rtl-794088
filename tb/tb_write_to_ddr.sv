// tb_write_to_ddr: sends random 32x32 blocks at random positions as 128
// beats with random gaps, stalls the DRAM write port at random, and checks
// every written row (address and 256-bit data) and the blk_done report.
`include "tb/tb_util.svh"
module tb_write_to_ddr;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  logic rst_n = 0, rec_valid = 0, rec_ready, wr_valid, wr_ready, blk_done;
  logic [POS_W-1:0] rec_x, rec_y, blk_x, blk_y; pix_t rec_data [8];
  logic [31:0] wr_addr; logic [255:0] wr_data;
  write_to_ddr dut (.*);
  `TB_WATCHDOG(200000)
  logic [7:0] blk [32][32]; int bx, by, row_seen, dones;
  always @(posedge clk) wr_ready <= $urandom_range(0, 3) != 0;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    dones = 0;
    for (int b = 0; b < 30; b++) begin
      bx = 32 * $urandom_range(0, 59); by = 32 * $urandom_range(0, 32);
      for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) blk[y][x] = 8'($urandom);
      row_seen = 0;
      for (int t = 0; t < 128; t++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        rec_valid = 1; rec_x = POS_W'(bx); rec_y = POS_W'(by);
        for (int i = 0; i < 8; i++) rec_data[i] = blk[t / 4][(t % 4) * 8 + i];
        #1; while (!rec_ready) begin @(negedge clk); #1; end
        @(negedge clk); rec_valid = 0;
      end
      while (row_seen < 32) @(negedge clk);
      @(negedge clk);
    end
    `CHECK(dones == 30, "one blk_done per block")
    `TB_END
  end
  always @(negedge clk) if (rst_n) begin
    if (wr_valid && wr_ready) begin
      logic [255:0] e;
      for (int x = 0; x < 32; x++) e[x * 8 +: 8] = blk[row_seen][x];
      `CHECK(wr_addr == 32'((by + row_seen) * 1920 + bx), "row address")
      `CHECK(wr_data == e, "row data")
      `CHECK(!rec_ready, "input held while writing")
      row_seen++;
    end
    if (blk_done) begin
      `CHECK(row_seen == 32 && blk_x == POS_W'(bx) && blk_y == POS_W'(by), "blk_done after last row")
      dones++;
    end
  end
endmodule
