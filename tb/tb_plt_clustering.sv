// tb_plt_clustering: 8x8 CUs drawn from a few well separated colours plus
// small noise. With an error margin between the noise and the colour
// distance every colour must come out as one cluster whose centre is the
// mean of its pixels (truncated), in order of first appearance. A CU of
// unique random colours must open at most 64 clusters.
`include "tb/tb_util.svh"
module tb_plt_clustering;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  logic rst_n = 0, start = 0, pix_valid = 0, busy, out_valid, out_last, done;
  logic [9:0] err_margin; yuv_t pix, out_c; logic [6:0] n_clusters;
  plt_clustering dut (.*);
  `TB_WATCHDOG(200000)
  yuv_t got [$];
  always @(posedge clk) if (out_valid) got.push_back(out_c);
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int nc; yuv_t base [8]; int sy [8], su [8], sv [8], cnt [8]; int order [$]; int seen [8];
      nc = $urandom_range(1, 8);
      for (int i = 0; i < nc; i++) begin
        base[i].y = 8'(10 + 30 * i); base[i].u = 8'(200 - 20 * i); base[i].v = 8'(($urandom_range(0, 3)) * 60 + 10);
        sy[i] = 0; su[i] = 0; sv[i] = 0; cnt[i] = 0; seen[i] = 0;
      end
      order = {}; got = {};
      err_margin = 10'd20;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int p = 0; p < 64; p++) begin
        int c;
        c = (p < nc) ? p : $urandom_range(0, nc - 1);
        pix = base[c];
        pix.y = pix.y + 8'($urandom_range(0, 3));
        pix.v = pix.v + 8'($urandom_range(0, 2));
        sy[c] += pix.y; su[c] += pix.u; sv[c] += pix.v; cnt[c]++;
        if (!seen[c]) begin seen[c] = 1; order.push_back(c); end
        pix_valid = 1; @(negedge clk);
      end
      pix_valid = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      `CHECK(int'(n_clusters) == nc, $sformatf("clusters %0d exp %0d", n_clusters, nc))
      `CHECK(got.size() == nc, "one centre per cluster")
      foreach (order[i]) if (i < got.size())
        `CHECK(int'(got[i].y) == sy[order[i]] / cnt[order[i]] && int'(got[i].u) == su[order[i]] / cnt[order[i]] &&
               int'(got[i].v) == sv[order[i]] / cnt[order[i]], $sformatf("t%0d centre %0d", t, i))
    end
    // all-different colours: capped at 64 clusters, all pixels their own centre
    err_margin = 0;
    got = {};
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int p = 0; p < 64; p++) begin pix = '{8'(p * 4), 8'(255 - p), 8'(p)}; pix_valid = 1; @(negedge clk); end
    pix_valid = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    `CHECK(n_clusters == 7'd64 && got.size() == 64, "64 clusters")
    `CHECK(got[10] == '{8'(40), 8'(245), 8'(10)}, "singleton centre")
    `TB_END
  end
endmodule
