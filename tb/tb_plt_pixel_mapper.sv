// tb_plt_pixel_mapper: random palettes and 8x8 CUs made of palette colours
// with noise and a few outliers; each index is compared with a nearest-entry
// search in the testbench (escape when above the threshold). Checks that a
// CU takes 16 input beats with four lanes.
`include "tb/tb_util.svh"
module tb_plt_pixel_mapper;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  logic rst_n = 0, start = 0, pix_valid = 0, pix_ready, done;
  yuv_t palette [64]; logic [6:0] pal_cnt; logic [9:0] esc_thr; yuv_t pix [4];
  logic [6:0] idx_arr [64]; logic [6:0] esc_cnt;
  plt_pixel_mapper dut (.*);
  `TB_WATCHDOG(100000)
  function automatic int sadf(yuv_t a, yuv_t b);
    return (a.y > b.y ? a.y - b.y : b.y - a.y) + (a.u > b.u ? a.u - b.u : b.u - a.u) + (a.v > b.v ? a.v - b.v : b.v - a.v);
  endfunction
  int n_esc = 0;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 80; t++) begin
      yuv_t cu [64]; int exp_idx [64]; int beats, e_esc;
      pal_cnt = 7'($urandom_range(0, 64));
      esc_thr = 10'($urandom_range(5, 60));
      for (int j = 0; j < 64; j++) palette[j] = yuv_t'($urandom);
      e_esc = 0;
      for (int p = 0; p < 64; p++) begin
        if (pal_cnt != 0 && $urandom_range(0, 9) != 0) begin
          cu[p] = palette[$urandom_range(0, int'(pal_cnt) - 1)];
          cu[p].u = cu[p].u ^ 8'($urandom_range(0, 3));
        end else cu[p] = yuv_t'($urandom);
        exp_idx[p] = 0;
        for (int j = 1; j < pal_cnt; j++) if (sadf(cu[p], palette[j]) < sadf(cu[p], palette[exp_idx[p]])) exp_idx[p] = j;
        if (pal_cnt == 0 || sadf(cu[p], palette[exp_idx[p]]) > int'(esc_thr)) begin exp_idx[p] = int'(pal_cnt); e_esc++; end
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      beats = 0;
      for (int b = 0; b < 16; b++) begin
        for (int k = 0; k < 4; k++) pix[k] = cu[k * 16 + b];
        pix_valid = 1; #1;
        `CHECK(pix_ready, "ready while pixels remain")
        @(negedge clk); beats++;
      end
      pix_valid = 0; #1;
      `CHECK(!pix_ready, "not ready after 16 beats")
      while (!done) @(negedge clk);
      for (int p = 0; p < 64; p++) `CHECK(int'(idx_arr[p]) == exp_idx[p], $sformatf("t%0d pixel %0d: %0d exp %0d", t, p, idx_arr[p], exp_idx[p]))
      `CHECK(int'(esc_cnt) == e_esc, "escape count")
      n_esc += e_esc;
    end
    `CHECK(n_esc > 0, "escape pixels occurred")
    `TB_END
  end
endmodule
