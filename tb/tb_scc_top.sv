// tb_scc_top: end-to-end run of the whole design at its default size
// (1920x1080 picture, 100 vectors per hash key, 64-entry palettes).
//
// Picture: original samples of the first CTU row; CTUs 0 and 1 are flat
// (their 128 blocks share one hash key, more than a bucket holds), CTUs 2..4
// are random with two planted 8x8 copies (one on the same rows inside the
// local window, one in CTU 4 copying a grid block of CTU 2 that only the
// hash search can reach).
// IBC: the estimation stage clears its table, then for CTUs 0..4 loads the
// search window, estimates a few CUs and updates the hash table. Every
// candidate list must hold legal vectors whose costs equal the SAD
// recomputed here. The lists of CTUs 2..4 are then turned into
// configuration packets of the high throughput stage (one per candidate),
// with the reconstruction (here equal to the original) written back
// through the stage: the first packet is sent before the write-back and
// must stall. Every residual must equal original minus reference, and every
// CU result must be the list's best vector and cost.
// Palette: a sequence of 8x8 CUs through clustering, plus 16x16 and 32x32
// CUs on their own coders, each followed by a predictor update; checks as
// in the palette unit's own test.
// Block vector candidates: three 8x8 CUs of CTU 1 are coded as IBC one
// after the other; the candidates of the second and third must take the
// left and the above neighbour's vector first, then the last coded one.
// Mechanisms counted (each must happen): 2-D search, hash hit, hash-bucket
// overflow, stall on an unfinished CTU, cache hit, cache miss, chunk split
// over two cache lines, palette entry reuse, new entry, escape pixel,
// copy-above run, index run, predictor update, spatial vector candidate.
`include "tb/tb_util.svh"
module tb_scc_top;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  localparam int W = 1920, H = 1080, LANES = 4;
  logic rst_n = 0;
  // estimation
  logic est_cfg_valid = 0, est_cfg_ready; logic [1:0] est_cfg_op;
  logic [POS_W-1:0] est_cfg_ctu_x, est_cfg_ctu_y; logic [5:0] est_cfg_cu_x, est_cfg_cu_y;
  logic est_win_we = 0; logic [6:0] est_win_x; logic [5:0] est_win_y; pix_t est_win_data [8];
  logic est_out_valid, est_out_ready = 0; cand_list_t est_out_list;
  logic ht_tab_req, ht_tab_we, ht_tab_gnt, ht_tab_rvalid; logic [31:0] ht_tab_addr, ht_tab_wdata, ht_tab_rdata;
  logic fr_req, fr_gnt, fr_rvalid; logic [POS_W-1:0] fr_x, fr_y; pix_t fr_rdata [8];
  logic [2:0] est_events;
  // high throughput
  logic ht_frame_start = 0, ht_cfg_valid = 0, ht_cfg_ready, ht_cfg_last;
  logic [POS_W-1:0] ht_cfg_cu_x, ht_cfg_cu_y; logic [2:0] ht_cfg_log2; bv_t ht_cfg_bv;
  logic ht_orig_valid = 0, ht_orig_ready; pix_t ht_orig_data [8];
  logic ht_res_valid, ht_res_last; logic signed [8:0] ht_res [8];
  logic ht_cu_done; logic [POS_W-1:0] ht_cu_x, ht_cu_y; bv_t ht_cu_bv; logic [COST_W-1:0] ht_cu_sad;
  logic ht_rec_valid = 0, ht_rec_ready; logic [POS_W-1:0] ht_rec_x, ht_rec_y; pix_t ht_rec_data [8];
  logic ht_mem_req, ht_mem_gnt, ht_mem_rvalid; logic [26:0] ht_mem_addr; logic [255:0] ht_mem_rdata;
  logic ht_wr_valid, ht_wr_ready; logic [31:0] ht_wr_addr; logic [255:0] ht_wr_data;
  logic [3:0] ht_events;
  // palette
  logic cl_start = 0, cl_pix_valid = 0, cl_busy;
  logic [9:0] err_margin = 10'd24, plt_esc_thr = 10'd3; logic [17:0] plt_thr = 18'd48;
  yuv_t cl_pix, new16_c, new32_c;
  logic new16_valid = 0, new16_last = 0, new32_valid = 0, new32_last = 0;
  logic plt_start [3], plt_pix_valid [3], plt_pix_ready [3], plt_busy [3], plt_done [3];
  yuv_t plt_pix [3][4];
  logic [COST_W-1:0] plt_bits [3]; logic [6:0] plt_pal_cnt [3]; plt_entry_t plt_pal [3][64];
  logic plt_run_valid [3], plt_run_above [3]; logic [6:0] plt_run_index [3]; logic [10:0] plt_run_len [3];
  logic rd_valid = 0; logic [1:0] rd_sel = 0; logic plt_ctl_busy;

  // block vector candidates
  logic mvc_frame_start = 0, mvc_q_valid = 0, mvc_out_valid, mvc_upd_valid = 0, mvc_upd_ibc = 0;
  logic [POS_W-1:0] mvc_q_x = 0, mvc_q_y = 0, mvc_upd_x = 0, mvc_upd_y = 0;
  logic [2:0] mvc_q_log2 = 3, mvc_upd_log2 = 3; bv_t mvc_cand [2], mvc_upd_bv = 0; logic [1:0] mvc_n_spatial;
  int n_spat = 0;

  scc_top dut (.*);
  `TB_WATCHDOG(3000000)

  logic [7:0] pic [64][W];   // first CTU row of the original picture
  logic [7:0] dram [int];    // reconstructed picture in DRAM (sparse)
  longint cyc = 0;

  // ---------------- DRAM models ----------------
  logic [31:0] htmem [int];
  longint hq_t [$]; logic [31:0] hq_d [$];
  longint fq_t [$]; int fq_x [$], fq_y [$];
  int lat; logic busy_m; logic [26:0] ma;
  always @(posedge clk) begin
    cyc++;
    ht_tab_gnt <= $urandom_range(0, 1); fr_gnt <= $urandom_range(0, 1);
    ht_mem_gnt <= $urandom_range(0, 1); ht_wr_ready <= $urandom_range(0, 3) != 0;
    ht_tab_rvalid <= 0; fr_rvalid <= 0; ht_mem_rvalid <= 0;
    if (!rst_n) busy_m <= 0;
    else begin
      if (ht_tab_req && ht_tab_gnt) begin
        if (ht_tab_we) htmem[int'(ht_tab_addr)] = ht_tab_wdata;
        else begin
          hq_t.push_back(cyc + $urandom_range(3, 8));
          hq_d.push_back(htmem.exists(int'(ht_tab_addr)) ? htmem[int'(ht_tab_addr)] : 32'h0);
        end
      end
      if (fr_req && fr_gnt) begin
        fq_t.push_back(cyc + $urandom_range(3, 8)); fq_x.push_back(int'(fr_x)); fq_y.push_back(int'(fr_y));
      end
      if (ht_mem_req && ht_mem_gnt && !busy_m) begin busy_m <= 1; ma <= ht_mem_addr; lat <= $urandom_range(2, 7); end
      else if (busy_m) begin
        if (lat == 0) begin
          ht_mem_rvalid <= 1; busy_m <= 0;
          for (int i = 0; i < 32; i++)
            ht_mem_rdata[i * 8 +: 8] <= dram.exists(int'(32 * ma) + i) ? dram[int'(32 * ma) + i] : 8'h0;
        end else lat <= lat - 1;
      end
      if (ht_wr_valid && ht_wr_ready)
        for (int i = 0; i < 32; i++) dram[int'(ht_wr_addr) + i] = ht_wr_data[i * 8 +: 8];
    end
    if (hq_t.size() > 0 && hq_t[0] <= cyc) begin
      ht_tab_rvalid <= 1; ht_tab_rdata <= hq_d[0]; void'(hq_t.pop_front()); void'(hq_d.pop_front());
    end
    if (fq_t.size() > 0 && fq_t[0] <= cyc) begin
      fr_rvalid <= 1;
      for (int i = 0; i < 8; i++) fr_rdata[i] <= (fq_y[0] < 64) ? pic[fq_y[0]][fq_x[0] + i] : 8'h0;
      void'(fq_t.pop_front()); void'(fq_x.pop_front()); void'(fq_y.pop_front());
    end
  end

  // ---------------- mechanism counters ----------------
  int n_2d = 0, n_hit = 0, n_drop = 0, n_stall = 0, n_chit = 0, n_miss = 0, n_split = 0;
  int n_above = 0, n_index = 0, n_esc = 0, n_reuse = 0, n_new = 0, n_upd = 0;
  always @(posedge clk) if (rst_n) begin
    n_2d += int'(est_events[0]); n_hit += int'(est_events[1]); n_drop += int'(est_events[2]);
    n_stall += int'(ht_events[0]); n_chit += int'(ht_events[1]); n_miss += int'(ht_events[2]); n_split += int'(ht_events[3]);
  end

  // ---------------- IBC estimation ----------------
  task automatic est_send(int op, int cx, int ux, int uy);
    @(negedge clk);
    est_cfg_valid = 1; est_cfg_op = 2'(op); est_cfg_ctu_x = POS_W'(cx); est_cfg_ctu_y = '0;
    est_cfg_cu_x = 6'(ux); est_cfg_cu_y = 6'(uy);
    #1; while (!est_cfg_ready) begin @(negedge clk); #1; end
    @(negedge clk); est_cfg_valid = 0;
  endtask
  task automatic load_window(int ctu);
    for (int half = 0; half < 2; half++) begin
      int bx;
      bx = (ctu - 1 + half) * 64;
      if (bx < 0) continue;
      for (int y = 0; y < 64; y++) for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        est_win_we = 1; est_win_x = 7'(half * 64 + c * 8); est_win_y = 6'(y);
        for (int i = 0; i < 8; i++) est_win_data[i] = pic[y][bx + c * 8 + i];
      end
    end
    @(negedge clk); est_win_we = 0;
  endtask
  function automatic int sad8(int x0, int y0, int x1, int y1);
    int s = 0;
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
      int d;
      d = int'(pic[y0 + r][x0 + c]) - int'(pic[y1 + r][x1 + c]);
      s += d < 0 ? -d : d;
    end
    return s;
  endfunction
  function automatic bit coded(int x, int y, int cux, int cuy);
    int zc, zr;
    if (x / 64 < cux / 64) return 1;
    if (x / 64 > cux / 64) return 0;
    zc = 0; zr = 0;
    for (int b = 0; b < 3; b++) begin
      zc |= (((cux % 64) >> (b + 3)) & 1) << (2 * b) | (((cuy % 64) >> (b + 3)) & 1) << (2 * b + 1);
      zr |= (((x % 64) >> (b + 3)) & 1) << (2 * b) | (((y % 64) >> (b + 3)) & 1) << (2 * b + 1);
    end
    return zr < zc;
  endfunction
  cand_list_t lists [$];
  task automatic est_cu(int ctu, int ux, int uy, int want_x, int want_y);
    cand_list_t l; int cux, cuy; bit found;
    cux = ctu * 64 + ux; cuy = uy;
    est_send(1, ctu * 64, ux, uy);
    @(negedge clk); est_out_ready = 1;
    while (!est_out_valid) @(negedge clk);
    l = est_out_list;
    @(negedge clk); est_out_ready = 0;
    `CHECK(int'(l.x) == cux && int'(l.y) == cuy, "list position")
    found = 0;
    for (int k = 0; k < NCAND; k++) if (l.c[k].valid) begin
      int rx, ry;
      rx = cux + int'(l.c[k].bv.x); ry = cuy + int'(l.c[k].bv.y);
      `CHECK(rx >= 0 && ry >= 0 && ry + 8 <= 64 && rx + 8 <= W, "reference inside the coded CTU row")
      if (rx >= 0 && ry >= 0 && ry + 8 <= 64 && rx + 8 <= W) begin
        `CHECK(coded(rx, ry, cux, cuy) && coded(rx + 7, ry + 7, cux, cuy), "reference already coded")
        `CHECK(int'(l.c[k].cost) == sad8(cux, cuy, rx, ry), "candidate cost is the SAD")
      end
      if (k > 0) `CHECK(l.c[k - 1].valid && l.c[k - 1].cost <= l.c[k].cost, "list sorted")
      if (rx == want_x && ry == want_y && l.c[k].cost == 0) found = 1;
    end
    if (want_x >= 0) `CHECK(found, $sformatf("planted copy for CU %0d,%0d", cux, cuy))
    if (ctu >= 2 && l.c[0].valid) lists.push_back(l);
  endtask

  // ---------------- IBC high throughput ----------------
  logic [63:0] orig_q [$];
  logic orig_ready_s;
  always @(posedge clk) orig_ready_s <= ht_orig_ready;
  always @(negedge clk) begin
    if (ht_orig_valid && orig_ready_s) void'(orig_q.pop_front());
    ht_orig_valid = orig_q.size() > 0;
    if (ht_orig_valid) for (int i = 0; i < 8; i++) ht_orig_data[i] = orig_q[0][i * 8 +: 8];
  end
  int exp_res [$]; int exp_last [$];
  int exp_cu_x [$], exp_cu_y [$], exp_bx [$], exp_by [$], exp_sad [$];
  always @(negedge clk) if (rst_n) begin
    if (ht_res_valid) begin
      for (int i = 0; i < 8; i++) begin
        `CHECK(exp_res.size() > 0 && int'(ht_res[i]) == exp_res[0], "residual sample")
        void'(exp_res.pop_front());
      end
      `CHECK(int'(ht_res_last) == exp_last[0], "res_last position")
      void'(exp_last.pop_front());
    end
    if (ht_cu_done) begin
      `CHECK(exp_cu_x.size() > 0, "expected a CU result")
      `CHECK(int'(ht_cu_x) == exp_cu_x[0] && int'(ht_cu_y) == exp_cu_y[0], "CU position")
      `CHECK(int'(ht_cu_bv.x) == exp_bx[0] && int'(ht_cu_bv.y) == exp_by[0], "best vector equals the list's best")
      `CHECK(int'(ht_cu_sad) == exp_sad[0], "best SAD equals the list's best cost")
      void'(exp_cu_x.pop_front()); void'(exp_cu_y.pop_front());
      void'(exp_bx.pop_front()); void'(exp_by.pop_front()); void'(exp_sad.pop_front());
    end
  end
  task automatic ht_cu(cand_list_t l);
    int cx, cy, n;
    cx = int'(l.x); cy = int'(l.y); n = 0;
    for (int k = 0; k < NCAND; k++) if (l.c[k].valid) n++;
    for (int k = 0; k < n; k++) begin
      int rx, ry;
      rx = cx + int'(l.c[k].bv.x); ry = cy + int'(l.c[k].bv.y);
      for (int y = 0; y < 8; y++) begin
        logic [63:0] b;
        for (int i = 0; i < 8; i++) begin
          b[i * 8 +: 8] = pic[cy + y][cx + i];
          exp_res.push_back(int'(pic[cy + y][cx + i]) - int'(pic[ry + y][rx + i]));
        end
        exp_last.push_back(y == 7);
        orig_q.push_back(b);
      end
    end
    exp_cu_x.push_back(cx); exp_cu_y.push_back(cy);
    exp_bx.push_back(int'(l.c[0].bv.x)); exp_by.push_back(int'(l.c[0].bv.y)); exp_sad.push_back(int'(l.c[0].cost));
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      ht_cfg_valid = 1; ht_cfg_cu_x = POS_W'(cx); ht_cfg_cu_y = POS_W'(cy); ht_cfg_log2 = 3'd3;
      ht_cfg_bv = l.c[k].bv; ht_cfg_last = k == n - 1;
      #1; while (!ht_cfg_ready) begin @(negedge clk); #1; end
      @(negedge clk); ht_cfg_valid = 0;
    end
  endtask
  task automatic write_back(int ctu);
    for (int q = 0; q < 4; q++) begin
      int ox, oy;
      ox = ctu * 64 + (q % 2) * 32; oy = (q / 2) * 32;
      for (int t = 0; t < 128; t++) begin
        @(negedge clk);
        ht_rec_valid = 1; ht_rec_x = POS_W'(ox); ht_rec_y = POS_W'(oy);
        for (int i = 0; i < 8; i++) ht_rec_data[i] = pic[oy + t / 4][ox + (t % 4) * 8 + i];
        #1; while (!ht_rec_ready) begin @(negedge clk); #1; end
      end
      @(negedge clk); ht_rec_valid = 0;
    end
  endtask

  // ---------------- palette ----------------
  int run_sum [3];
  always @(negedge clk) if (rst_n)
    for (int g = 0; g < 3; g++) if (plt_run_valid[g]) begin
      run_sum[g] += int'(plt_run_len[g]);
      if (plt_run_above[g]) n_above++;
      else begin n_index++; if (plt_run_index[g] == plt_pal_cnt[g]) n_esc++; end
    end
  yuv_t base [8];
  function automatic yuv_t noisy(yuv_t c);
    yuv_t r;
    r.y = 8'(int'(c.y) + $urandom_range(0, 4)); r.u = 8'(int'(c.u) + $urandom_range(0, 2)); r.v = c.v;
    return r;
  endfunction
  task automatic plt_finish(int g, int sz);
    yuv_t old [64]; int oc, k; logic ru [64];
    while (!plt_done[g]) @(negedge clk);
    `CHECK(run_sum[g] == sz * sz, "run lengths cover the CU")
    `CHECK(plt_bits[g] > 0 && plt_pal_cnt[g] <= 64, "bit estimate and palette size")
    for (int i = 0; i < 64; i++) begin
      `CHECK(plt_pal[g][i].valid == (i < int'(plt_pal_cnt[g])), "palette valid flags")
      if (i > 0 && i < int'(plt_pal_cnt[g])) `CHECK(!(plt_pal[g][i - 1].is_new && !plt_pal[g][i].is_new), "reused entries first")
      if (i < int'(plt_pal_cnt[g])) begin if (plt_pal[g][i].is_new) n_new++; else n_reuse++; end
    end
    oc = int'(dut.u_plt.pred_cnt[0]);
    for (int i = 0; i < 64; i++) begin old[i] = dut.u_plt.pred[0][i]; ru[i] = dut.u_plt.reuse[g][i]; end
    @(negedge clk); rd_valid = 1; rd_sel = 2'(g); @(negedge clk); rd_valid = 0;
    #1; while (plt_ctl_busy) begin @(negedge clk); #1; end
    @(negedge clk);
    k = 0;
    for (int i = 0; i < int'(plt_pal_cnt[g]) && k < 64; i++) begin
      for (int c = 0; c < 3; c++) `CHECK(dut.u_plt.pred[c][k] == plt_pal[g][i].c, "predictor: palette entry")
      k++;
    end
    for (int i = 0; i < oc && k < 64; i++) if (!ru[i]) begin
      for (int c = 0; c < 3; c++) `CHECK(dut.u_plt.pred[c][k] == old[i], "predictor: unused old entry")
      k++;
    end
    for (int c = 0; c < 3; c++) `CHECK(int'(dut.u_plt.pred_cnt[c]) == k, "predictor size")
    n_upd++;
  endtask
  task automatic plt_feed(int g, yuv_t px [$]);
    int band;
    band = px.size() / LANES;
    for (int p = 0; p < band; p++) begin
      plt_pix_valid[g] = 1;
      for (int l = 0; l < LANES; l++) plt_pix[g][l] = px[l * band + p];
      #1; while (!plt_pix_ready[g]) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    plt_pix_valid[g] = 0;
  endtask
  task automatic plt_cu8(int b0);
    yuv_t px [$]; int nb;
    nb = $urandom_range(3, 4);
    for (int i = 0; i < 64; i++) px.push_back(noisy(base[(b0 + ((i / 8 + (i % 8) / 3) % nb)) % 8]));
    run_sum[0] = 0;
    @(negedge clk); plt_start[0] = 1; @(negedge clk); plt_start[0] = 0;
    cl_start = 1; @(negedge clk); cl_start = 0;
    for (int i = 0; i < 64; i++) begin cl_pix_valid = 1; cl_pix = px[i]; @(negedge clk); end
    cl_pix_valid = 0;
    plt_feed(0, px);
    plt_finish(0, 8);
  endtask
  // 16x16 and 32x32: vertical stripes of three colours given as centres
  task automatic plt_big(int g, int b0);
    yuv_t px [$]; int sz;
    sz = 8 << g;
    for (int i = 0; i < sz * sz; i++) px.push_back(base[(b0 + (i % sz) / (sz / 3 + 1)) % 8]);
    run_sum[g] = 0;
    @(negedge clk); plt_start[g] = 1; @(negedge clk); plt_start[g] = 0;
    for (int j = 0; j < 3; j++) begin
      if (g == 1) begin new16_valid = 1; new16_c = base[(b0 + j) % 8]; new16_last = j == 2; end
      else begin new32_valid = 1; new32_c = base[(b0 + j) % 8]; new32_last = j == 2; end
      @(negedge clk);
    end
    new16_valid = 0; new16_last = 0; new32_valid = 0; new32_last = 0;
    plt_feed(g, px);
    plt_finish(g, sz);
  endtask

  // ---------------- main ----------------
  initial begin
    for (int g = 0; g < 3; g++) begin plt_start[g] = 0; plt_pix_valid[g] = 0; for (int l = 0; l < LANES; l++) plt_pix[g][l] = '0; end
    new16_c = '0; new32_c = '0; cl_pix = '0;
    for (int i = 0; i < 8; i++) begin base[i].y = 8'(30 * i + 5); base[i].u = 8'(200 - 20 * i); base[i].v = 8'(17 * i); end
    foreach (pic[y, x]) pic[y][x] = (x < 128) ? 8'd90 : 8'($urandom);
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
      pic[16 + r][192 + 24 + c] = pic[16 + r][128 + 21 + c];  // CTU 3 CU (24,16) <- (149,16)
      pic[8 + r][256 + 16 + c] = pic[r][128 + 8 + c];         // CTU 4 CU (16,8)  <- (136,0)
    end
    repeat (2) @(posedge clk); rst_n = 1;
    fork
      begin : ibc
        est_send(0, 0, 0, 0);
        for (int ctu = 0; ctu < 5; ctu++) begin
          load_window(ctu);
          for (int n = 0; n < 3; n++) est_cu(ctu, 8 * $urandom_range(0, 7), 8 * $urandom_range(0, 7), -1, -1);
          if (ctu == 3) est_cu(3, 24, 16, 128 + 21, 16);
          if (ctu == 4) est_cu(4, 16, 8, 128 + 8, 0);
          est_send(2, ctu * 64, 0, 0);
        end
        // high throughput stage on the candidate lists
        @(negedge clk); ht_frame_start = 1; @(negedge clk); ht_frame_start = 0;
        ht_cu(lists[0]);
        repeat (50) @(negedge clk);
        `CHECK(exp_cu_x.size() == 1 && n_stall > 0, "first CU waits for its reference CTUs")
        for (int ctu = 0; ctu < 5; ctu++) write_back(ctu);
        for (int i = 1; i < lists.size(); i++) ht_cu(lists[i]);
        while (exp_cu_x.size() > 0) @(negedge clk);
        repeat (4) @(negedge clk);
        `CHECK(exp_res.size() == 0 && orig_q.size() == 0, "all residuals delivered")
      end
      begin : bv_candidates
        bv_t v [3];
        v[0].x = -13'sd40; v[0].y = 13'sd0; v[1].x = -13'sd24; v[1].y = 13'sd0; v[2].x = -13'sd8; v[2].y = -13'sd8;
        @(negedge clk); mvc_frame_start = 1; @(negedge clk); mvc_frame_start = 0;
        for (int k = 0; k < 3; k++) begin
          int cx, cy;
          cx = k == 1 ? 72 : 64; cy = k == 2 ? 8 : 0;
          @(negedge clk); mvc_q_valid = 1; mvc_q_x = POS_W'(cx); mvc_q_y = POS_W'(cy);
          @(negedge clk); mvc_q_valid = 0;
          `CHECK(mvc_out_valid, "candidate answer")
          if (k == 0) `CHECK(int'(mvc_cand[0].x) == -16 && int'(mvc_cand[1].x) == -8 && mvc_n_spatial == 0, "no neighbour: default candidates")
          // second CU: left neighbour (first CU); third CU: above neighbour (first CU), then the last coded vector
          if (k > 0) `CHECK(mvc_cand[0] == v[0] && mvc_cand[1] == v[k - 1] && mvc_n_spatial == 1, $sformatf("candidates of CU %0d", k))
          if (mvc_n_spatial != 0) n_spat++;
          mvc_upd_valid = 1; mvc_upd_x = POS_W'(cx); mvc_upd_y = POS_W'(cy); mvc_upd_ibc = 1; mvc_upd_bv = v[k];
          @(negedge clk); mvc_upd_valid = 0;
        end
      end
      begin : palette
        for (int n = 0; n < 10; n++) plt_cu8(n % 8);
        plt_big(1, 2);
        plt_big(2, 5);
        plt_cu8(3);
      end
    join
    `CHECK(n_2d > 0, $sformatf("2-D searches: %0d", n_2d))
    `CHECK(n_hit > 0, $sformatf("hash hits: %0d", n_hit))
    `CHECK(n_drop > 0, $sformatf("hash bucket overflows: %0d", n_drop))
    `CHECK(n_stall > 0, $sformatf("stall cycles: %0d", n_stall))
    `CHECK(n_chit > 0 && n_miss > 0, $sformatf("cache hits/misses: %0d/%0d", n_chit, n_miss))
    `CHECK(n_split > 0, $sformatf("split chunks: %0d", n_split))
    `CHECK(n_reuse > 0 && n_new > 0, $sformatf("palette reused/new entries: %0d/%0d", n_reuse, n_new))
    `CHECK(n_esc > 0, $sformatf("escape runs: %0d", n_esc))
    `CHECK(n_above > 0 && n_index > 0, $sformatf("copy-above/index runs: %0d/%0d", n_above, n_index))
    `CHECK(n_upd > 0, $sformatf("predictor updates: %0d", n_upd))
    `CHECK(n_spat > 0, $sformatf("spatial vector candidates: %0d", n_spat))
    $display("mechanisms: 2d=%0d hash_hit=%0d hash_drop=%0d stall=%0d cache_hit=%0d miss=%0d split=%0d reuse=%0d new=%0d esc=%0d above=%0d index=%0d upd=%0d spatial=%0d CUs=%0d",
             n_2d, n_hit, n_drop, n_stall, n_chit, n_miss, n_split, n_reuse, n_new, n_esc, n_above, n_index, n_upd, n_spat, lists.size());
    `TB_END
  end
endmodule
