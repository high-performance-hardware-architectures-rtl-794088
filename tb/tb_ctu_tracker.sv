// tb_ctu_tracker: reports the 32x32 blocks of a 1920x1080 picture CTU by
// CTU in z-order (the bottom CTU row only has its upper two blocks) and
// after every report asks random reference areas, comparing the answer
// with a list of written blocks kept by the testbench.
`include "tb/tb_util.svh"
module tb_ctu_tracker;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  logic rst_n = 0, frame_start = 0, blk_done = 0, avail;
  logic [POS_W-1:0] blk_x = 0, blk_y = 0, q_x0, q_y0, q_x1, q_y1;
  ctu_tracker dut (.*);
  `TB_WATCHDOG(2000000)
  bit written [34][60];
  // model: the area is available when the CTU of the bottom-right corner is
  // finished, or when the 32x32 blocks of both corners are written and both
  // corners are in that same CTU
  function automatic bit ctu_done(int r, int c);
    for (int q = 0; q < 4; q++)
      if (2 * r + q / 2 < 34 && !written[2 * r + q / 2][2 * c + q % 2]) return 0;
    return 1;
  endfunction
  function automatic bit model(int x0, int y0, int x1, int y1);
    if (ctu_done(y1 / 64, x1 / 64)) return 1;
    if (x0 / 64 == x1 / 64 && y0 / 64 == y1 / 64)
      return written[y1 / 32][x1 / 32] && written[y0 / 32][x0 / 32];
    return written[y1 / 32][x1 / 32] && (ctu_done(y0 / 64, x0 / 64));
  endfunction
  int n_av, n_na;
  task automatic probe(int nq);
    for (int k = 0; k < nq; k++) begin
      int x0, y0, w, h;
      w = 8 << $urandom_range(0, 2); h = w;
      x0 = $urandom_range(0, 1920 - w); y0 = $urandom_range(0, 1080 - h);
      q_x0 = POS_W'(x0); q_y0 = POS_W'(y0); q_x1 = POS_W'(x0 + w - 1); q_y1 = POS_W'(y0 + h - 1);
      #1;
      `CHECK(avail == model(x0, y0, x0 + w - 1, y0 + h - 1), $sformatf("area %0d,%0d size %0d", x0, y0, w))
      if (avail) n_av++; else n_na++;
    end
  endtask
  initial begin
    n_av = 0; n_na = 0;
    foreach (written[i, j]) written[i][j] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 17; r++)
      for (int c = 0; c < 30; c++)
        for (int q = 0; q < 4; q++) begin
          if (r * 64 + (q / 2) * 32 >= 1080) continue;
          @(negedge clk);
          blk_done = 1; blk_x = POS_W'(c * 64 + (q % 2) * 32); blk_y = POS_W'(r * 64 + (q / 2) * 32);
          @(negedge clk); blk_done = 0;
          written[2 * r + q / 2][2 * c + q % 2] = 1;
          probe(8);
        end
    `CHECK(n_av > 1000 && n_na > 1000, "both answers exercised")
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    foreach (written[i, j]) written[i][j] = 0;
    probe(200);
    `TB_END
  end
endmodule
