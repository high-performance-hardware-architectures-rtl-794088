// tb_plt_cu_coder: whole CU coder runs for 8x8 and 16x16 CUs. The centres
// are a mix of predictor colours (slightly perturbed) and new colours; the
// pixels are taken from those centres, plus a few stray random pixels that
// usually become escapes. Checked: palette order (reused
// entries first in predictor order, then new ones), every pixel's index
// points at its nearest palette colour, the run stream rebuilds the index
// array, and the bit estimate equals the listed parts.
`include "tb/tb_util.svh"
module tb_plt_cu_coder;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  logic rst_n = 0;
  yuv_t pred [64]; logic [6:0] pred_cnt; logic [17:0] thr = 18'd50; logic [9:0] esc_thr = 10'd30;

  function automatic int sadf(yuv_t a, yuv_t b);
    return (a.y > b.y ? a.y - b.y : b.y - a.y) + (a.u > b.u ? a.u - b.u : b.u - a.u) + (a.v > b.v ? a.v - b.v : b.v - a.v);
  endfunction
  function automatic int bl(int v); int n = 0; while (v > 0) begin n++; v >>= 1; end return n; endfunction

  `TB_WATCHDOG(400000)

  for (genvar g = 0; g < 2; g++) begin : g_sz
    localparam int N = 8 << g;
    logic start = 0, new_valid = 0, new_last = 0, pix_valid = 0, pix_ready, busy, done, run_valid, run_above;
    yuv_t new_c, pix [4];
    plt_entry_t pal [64]; logic [6:0] pal_cnt; logic reuse [64]; logic [6:0] idx_arr [N*N];
    logic [6:0] run_index; logic [$clog2(N*N+1)-1:0] run_len; logic [COST_W-1:0] bits;
    plt_cu_coder #(.CU_SIZE(N)) dut (.clk, .rst_n, .start, .pred, .pred_cnt, .thr, .esc_thr,
      .new_valid, .new_c, .new_last, .pix_valid, .pix, .pix_ready, .busy, .done, .pal, .pal_cnt, .reuse,
      .idx_arr, .run_valid, .run_above, .run_index, .run_len, .bits);
    int ra [$], rl [$], ri [$];
    always @(posedge clk) if (run_valid) begin ra.push_back(run_above); rl.push_back(int'(run_len)); ri.push_back(run_index); end

    task automatic run_cu(int seed);
      yuv_t cent [$]; yuv_t cu [N*N]; int nc, run_bits, n_new, n_esc, p, last_key;
      int rebuilt [N*N];
      nc = $urandom_range(2, 12);
      cent = {};
      for (int i = 0; i < nc; i++) begin
        yuv_t c;
        if (i % 2 == 0) begin c = pred[$urandom_range(0, int'(pred_cnt) - 1)]; c.y = c.y ^ 8'(1); end
        else c = yuv_t'($urandom);
        cent.push_back(c);
      end
      for (int i = 0; i < N * N; i++) cu[i] = (i % N < N / 2 && i / N > 1) ? cent[(i / N) % nc] : cent[$urandom_range(0, nc - 1)];
      // a few stray pixels of random colour, usually coded as escapes
      for (int i = 0; i < 3; i++) cu[$urandom_range(0, N * N - 1)] = yuv_t'($urandom);
      ra = {}; rl = {}; ri = {};
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int i = 0; i < cent.size(); i++) begin new_valid = 1; new_c = cent[i]; new_last = (i == nc - 1); @(negedge clk); end
      new_valid = 0; new_last = 0;
      for (int b = 0; b < N * N / 4; b++) begin
        for (int k = 0; k < 4; k++) pix[k] = cu[k * (N * N / 4) + b];
        pix_valid = 1;
        #1; while (!pix_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
      pix_valid = 0;
      while (!done) @(negedge clk);
      // palette order
      last_key = -1; n_new = 0;
      for (int i = 0; i < pal_cnt; i++) begin
        `CHECK(pal[i].valid && int'({pal[i].is_new, pal[i].order}) > last_key, $sformatf("N%0d palette order at %0d", N, i))
        last_key = int'({pal[i].is_new, pal[i].order});
        if (pal[i].is_new) n_new++;
      end
      // nearest-colour indices
      n_esc = 0;
      for (int i = 0; i < N * N; i++) begin
        int best; best = 1 << 20;
        for (int j = 0; j < pal_cnt; j++) if (sadf(cu[i], pal[j].c) < best) best = sadf(cu[i], pal[j].c);
        if (idx_arr[i] == pal_cnt) begin n_esc++; `CHECK(best > int'(esc_thr), "escape only when far") end
        else `CHECK(sadf(cu[i], pal[idx_arr[i]].c) == best, $sformatf("N%0d pixel %0d nearest", N, i))
      end
      // runs rebuild the array (traverse scan)
      p = 0; run_bits = 0;
      for (int i = 0; i < ra.size(); i++) begin
        run_bits += bl(rl[i]) + (p >= N ? 1 : 0) + (ra[i] ? 0 : bl(int'(pal_cnt)));
        for (int k = 0; k < rl[i]; k++) begin
          int r, c, q;
          r = p / N; c = p % N; if (r % 2) c = N - 1 - c; q = r * N + c;
          rebuilt[q] = ra[i] ? rebuilt[q - N] : ri[i];
          p++;
        end
      end
      `CHECK(p == N * N, "runs cover the CU")
      for (int i = 0; i < N * N; i++) `CHECK(rebuilt[i] == int'(idx_arr[i]), $sformatf("N%0d rebuild %0d", N, i))
      `CHECK(int'(bits) == run_bits + 24 * n_new + int'(pred_cnt) + 24 * n_esc, $sformatf("N%0d bits %0d", N, bits))
    endtask
  end

  initial begin
    pred_cnt = 7'd20;
    for (int i = 0; i < 64; i++) pred[i] = yuv_t'($urandom);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      g_sz[0].run_cu(t);
      g_sz[1].run_cu(t);
    end
    `TB_END
  end
endmodule
