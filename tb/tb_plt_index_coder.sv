// tb_plt_index_coder: random index arrays built from few values with
// horizontal and vertical structure. A model walks the same traverse scan
// with the longest-run rule and produces the expected runs and bit count;
// the coder's run stream and bits must match, and the runs must rebuild the
// array.
`include "tb/tb_util.svh"
module tb_plt_index_coder;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  localparam int N = 8;
  logic rst_n = 0, start = 0, busy, done, run_valid, run_above;
  logic [6:0] idx_arr [N*N]; logic [6:0] pal_cnt, run_index;
  logic [6:0] run_len, n_runs; logic [COST_W-1:0] bits;
  plt_index_coder #(.CU_SIZE(N)) dut (.*);
  `TB_WATCHDOG(200000)

  int got_a [$], got_l [$], got_i [$];
  always @(posedge clk) if (run_valid) begin got_a.push_back(run_above); got_l.push_back(run_len); got_i.push_back(run_index); end

  function automatic int rs(int s);  // scan position -> raster
    int r, c; r = s / N; c = s % N; if (r % 2) c = N - 1 - c; return r * N + c;
  endfunction
  function automatic int bl(int v); int n = 0; while (v > 0) begin n++; v >>= 1; end return n; endfunction

  int n_above = 0, n_index = 0;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int ea [$], el [$], ei [$]; int p, ebits; int rebuilt [N*N];
      pal_cnt = 7'($urandom_range(1, 6));
      for (int i = 0; i < N * N; i++) begin
        case (t % 4)
          0: idx_arr[i] = 7'($urandom_range(0, pal_cnt));
          1: idx_arr[i] = 7'((i % N) < 3 ? 0 : 1);                                  // vertical stripes
          2: idx_arr[i] = (i >= N && $urandom_range(0, 3) != 0) ? idx_arr[i - N] : 7'($urandom_range(0, pal_cnt));
          default: idx_arr[i] = 7'((i / 5) % 3);
        endcase
      end
      // model
      ea = {}; el = {}; ei = {}; got_a = {}; got_l = {}; got_i = {};
      p = 0; ebits = 0;
      while (p < N * N) begin
        int li, la, q; bit gi, ga;
        li = 1; la = (rs(p) >= N && idx_arr[rs(p)] == idx_arr[rs(p) - N]) ? 1 : 0;
        gi = 1; ga = la;
        q = p + 1;
        while (q < N * N && ((gi && idx_arr[rs(q)] == idx_arr[rs(p)]) || (ga && rs(q) >= N && idx_arr[rs(q)] == idx_arr[rs(q) - N]))) begin
          gi = gi && idx_arr[rs(q)] == idx_arr[rs(p)];
          ga = ga && rs(q) >= N && idx_arr[rs(q)] == idx_arr[rs(q) - N];
          if (gi) li++;
          if (ga) la++;
          q++;
        end
        if (la > 0 && la >= li) begin ea.push_back(1); el.push_back(la); ei.push_back(idx_arr[rs(p)]); ebits += bl(la) + (p >= N); p += la; end
        else begin ea.push_back(0); el.push_back(li); ei.push_back(idx_arr[rs(p)]); ebits += bl(li) + (p >= N) + bl(pal_cnt); p += li; end
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      `CHECK(got_a.size() == ea.size() && int'(n_runs) == ea.size(), $sformatf("t%0d runs %0d exp %0d", t, got_a.size(), ea.size()))
      foreach (ea[i]) if (i < got_a.size())
        `CHECK(got_a[i] == ea[i] && got_l[i] == el[i] && (ea[i] == 1 || got_i[i] == ei[i]), $sformatf("t%0d run %0d", t, i))
      `CHECK(int'(bits) == ebits, $sformatf("bits %0d exp %0d", bits, ebits))
      // the runs must rebuild the index array
      p = 0;
      foreach (got_a[i]) for (int k = 0; k < got_l[i]; k++) begin
        rebuilt[rs(p)] = got_a[i] ? rebuilt[rs(p) - N] : got_i[i];
        p++;
      end
      for (int i = 0; i < N * N; i++) `CHECK(rebuilt[i] == idx_arr[i], "rebuild")
      foreach (got_a[i]) if (got_a[i]) n_above++; else n_index++;
    end
    `CHECK(n_above > 0 && n_index > 0, "both run modes used")
    `TB_END
  end
endmodule
