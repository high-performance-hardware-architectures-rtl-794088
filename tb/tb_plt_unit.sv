// tb_plt_unit: runs the palette coding unit on a sequence of CUs.
// 8x8 CUs go through the clustering into the 8x8 coder; a few 16x16 CUs
// are given their centres directly on the 16x16 port (vertical stripes,
// which favour copy-above runs). Each CU is made of
// three or four base colours plus small noise; consecutive CUs share some
// base colours so that predictor entries get reused. After each CU the
// result is "chosen" (rd_valid) and the predictor of all three coders is
// compared with: chosen palette, then the old entries it did not reuse.
// Per CU: palette entries valid up to pal_cnt, reused entries first, run
// lengths summing to the CU size, bit estimate non-zero. Reused and new
// entries, escape runs, copy-above and index runs, and predictor updates
// must all have occurred.
`include "tb/tb_util.svh"
module tb_plt_unit;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  localparam int LANES = 4;
  logic rst_n = 0, cl_start = 0, cl_pix_valid = 0, cl_busy;
  logic [9:0] err_margin = 10'd24, esc_thr = 10'd3; logic [17:0] thr = 18'd48;
  yuv_t cl_pix, new16_c, new32_c;
  logic new16_valid = 0, new16_last = 0, new32_valid = 0, new32_last = 0;
  logic start [3], pix_valid [3], pix_ready [3], busy [3], done [3];
  yuv_t pix [3][LANES];
  logic [COST_W-1:0] bits [3]; logic [6:0] pal_cnt [3]; plt_entry_t pal [3][64];
  logic run_valid [3], run_above [3]; logic [6:0] run_index [3]; logic [10:0] run_len [3];
  logic rd_valid = 0; logic [1:0] rd_sel = 0; logic ctl_busy;
  plt_unit dut (.*);
  `TB_WATCHDOG(500000)

  int run_sum [3]; int n_above = 0, n_index = 0, n_esc = 0, n_reuse = 0, n_new = 0, n_upd = 0;
  always @(negedge clk) if (rst_n)
    for (int g = 0; g < 3; g++) if (run_valid[g]) begin
      run_sum[g] += int'(run_len[g]);
      if (run_above[g]) n_above++;
      else begin n_index++; if (run_index[g] == pal_cnt[g]) n_esc++; end
    end

  yuv_t base [8];
  function automatic yuv_t noisy(yuv_t c);
    yuv_t r;
    r.y = 8'(int'(c.y) + $urandom_range(0, 4)); r.u = 8'(int'(c.u) + $urandom_range(0, 2)); r.v = c.v;
    return r;
  endfunction

  task automatic finish_cu(int g, int sz);
    yuv_t old [64]; int oc, k; logic ru [64];
    while (!done[g]) @(negedge clk);
    `CHECK(run_sum[g] == sz * sz, $sformatf("run lengths cover the CU (%0d)", run_sum[g]))
    `CHECK(bits[g] > 0 && pal_cnt[g] <= 64, "bit estimate and palette size")
    for (int i = 0; i < 64; i++) begin
      `CHECK(pal[g][i].valid == (i < int'(pal_cnt[g])), "palette valid flags")
      if (i > 0 && i < int'(pal_cnt[g])) `CHECK(!(pal[g][i - 1].is_new && !pal[g][i].is_new), "reused entries first")
      if (i < int'(pal_cnt[g])) begin if (pal[g][i].is_new) n_new++; else n_reuse++; end
    end
    // choose this result and check the predictor rebuild
    oc = int'(dut.pred_cnt[0]);
    for (int i = 0; i < 64; i++) begin old[i] = dut.pred[0][i]; ru[i] = dut.reuse[g][i]; end
    @(negedge clk); rd_valid = 1; rd_sel = 2'(g); @(negedge clk); rd_valid = 0;
    #1; while (ctl_busy) begin @(negedge clk); #1; end
    @(negedge clk);
    k = 0;
    for (int i = 0; i < int'(pal_cnt[g]) && k < 64; i++) begin
      for (int c = 0; c < 3; c++) `CHECK(dut.pred[c][k] == pal[g][i].c, "predictor: palette entry")
      k++;
    end
    for (int i = 0; i < oc && k < 64; i++) if (!ru[i]) begin
      for (int c = 0; c < 3; c++) `CHECK(dut.pred[c][k] == old[i], "predictor: unused old entry")
      k++;
    end
    for (int c = 0; c < 3; c++) `CHECK(int'(dut.pred_cnt[c]) == k, "predictor size")
    n_upd++;
  endtask

  // lane l carries the l-th horizontal band of the CU
  task automatic feed_pixels(int g, yuv_t px [$]);
    int band;
    band = px.size() / LANES;
    for (int p = 0; p < band; p++) begin
      pix_valid[g] = 1;
      for (int l = 0; l < LANES; l++) pix[g][l] = px[l * band + p];
      #1; while (!pix_ready[g]) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    pix_valid[g] = 0;
  endtask

  task automatic cu8(int b0);
    yuv_t px [$]; int nb;
    nb = $urandom_range(3, 4);
    for (int i = 0; i < 64; i++) px.push_back(noisy(base[(b0 + ((i / 8 + (i % 8) / 3) % nb)) % 8]));
    run_sum[0] = 0;
    @(negedge clk); start[0] = 1; @(negedge clk); start[0] = 0;
    cl_start = 1; @(negedge clk); cl_start = 0;
    for (int i = 0; i < 64; i++) begin cl_pix_valid = 1; cl_pix = px[i]; @(negedge clk); end
    cl_pix_valid = 0;
    feed_pixels(0, px);
    finish_cu(0, 8);
  endtask

  task automatic cu16(int b0);
    yuv_t px [$];
    for (int i = 0; i < 256; i++) px.push_back(base[(b0 + (i % 16) / 6) % 8]);  // vertical stripes
    run_sum[1] = 0;
    @(negedge clk); start[1] = 1; @(negedge clk); start[1] = 0;
    for (int j = 0; j < 3; j++) begin
      new16_valid = 1; new16_c = base[(b0 + j) % 8]; new16_last = j == 2; @(negedge clk);
    end
    new16_valid = 0; new16_last = 0;
    feed_pixels(1, px);
    finish_cu(1, 16);
  endtask

  initial begin
    for (int g = 0; g < 3; g++) begin start[g] = 0; pix_valid[g] = 0; for (int l = 0; l < LANES; l++) pix[g][l] = '0; end
    new16_c = '0; new32_c = '0; cl_pix = '0;
    for (int i = 0; i < 8; i++) begin base[i].y = 8'(30 * i + 5); base[i].u = 8'(200 - 20 * i); base[i].v = 8'(17 * i); end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 12; n++) begin
      if (n % 4 == 3) cu16(n % 8); else cu8(n % 8);
    end
    `CHECK(n_new > 0 && n_reuse > 0 && n_esc > 0 && n_above > 0 && n_index > 0 && n_upd > 0,
           $sformatf("mechanisms new=%0d reuse=%0d esc=%0d above=%0d index=%0d upd=%0d", n_new, n_reuse, n_esc, n_above, n_index, n_upd))
    `TB_END
  end
endmodule
