// tb_plt_entry_mapper: random predictor tables and streams of new entries,
// some close to predictor colours and some far. The list (order, reuse and
// new flags, colours) is compared with a sequential model in the testbench,
// and done must rise n + 5 cycles after the first of n back-to-back entries
// (the list takes n + 6 cycles).
`include "tb/tb_util.svh"
module tb_plt_entry_mapper;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  logic rst_n = 0, start = 0, in_valid = 0, in_last = 0, done;
  yuv_t pred [64]; logic [6:0] pred_cnt; logic [17:0] thr; yuv_t in_c;
  plt_entry_t list [64]; logic [6:0] list_cnt; logic reuse [64];
  plt_entry_mapper dut (.*);
  `TB_WATCHDOG(100000)
  int n_reuse = 0, n_new = 0;

  function automatic int sadf(yuv_t a, yuv_t b);
    return (a.y > b.y ? a.y - b.y : b.y - a.y) + (a.u > b.u ? a.u - b.u : b.u - a.u) + (a.v > b.v ? a.v - b.v : b.v - a.v);
  endfunction
  function automatic int ssdf(yuv_t a, yuv_t b);
    int dy, du, dv; dy = int'(a.y) - int'(b.y); du = int'(a.u) - int'(b.u); dv = int'(a.v) - int'(b.v);
    return dy * dy + du * du + dv * dv;
  endfunction

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      yuv_t ins [$]; plt_entry_t expl [$]; bit used [64]; int n, cyc;
      pred_cnt = 7'($urandom_range(0, 64)); if (t == 0) pred_cnt = 0;
      thr = 18'($urandom_range(0, 300));
      for (int i = 0; i < 64; i++) begin pred[i] = yuv_t'($urandom); used[i] = 0; end
      n = $urandom_range(1, 64);
      ins = {};
      for (int i = 0; i < n; i++) begin
        yuv_t c;
        if (pred_cnt != 0 && $urandom_range(0, 1)) begin
          c = pred[$urandom_range(0, int'(pred_cnt) - 1)];
          c.y = c.y ^ 8'($urandom_range(0, 7));
        end else c = yuv_t'($urandom);
        ins.push_back(c);
      end
      // model
      expl = {};
      foreach (ins[i]) begin
        int b; b = 0;
        for (int j = 1; j < pred_cnt; j++) if (sadf(ins[i], pred[j]) < sadf(ins[i], pred[b])) b = j;
        if (expl.size() >= 64) continue;
        if (pred_cnt == 0 || ssdf(ins[i], pred[b]) > int'(thr)) expl.push_back('{1'b1, 1'b1, 7'(i), ins[i]});
        else if (!used[b]) begin used[b] = 1; expl.push_back('{1'b1, 1'b0, 7'(b), pred[b]}); end
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      foreach (ins[i]) begin
        in_valid = 1; in_c = ins[i]; in_last = (i == n - 1);
        @(negedge clk);
        if (i == 0) cyc = 0;
        cyc++;
      end
      in_valid = 0; in_last = 0;
      while (!done) begin @(negedge clk); cyc++; end
      `CHECK(cyc == n + 5, $sformatf("done after %0d cycles, n=%0d", cyc, n))
      `CHECK(int'(list_cnt) == expl.size(), $sformatf("count %0d exp %0d", list_cnt, expl.size()))
      foreach (expl[i]) begin
        `CHECK(list[i] == expl[i], $sformatf("t%0d entry %0d", t, i))
        if (expl[i].is_new) n_new++; else n_reuse++;
      end
      for (int j = 0; j < 64; j++) `CHECK(reuse[j] == used[j], "reuse flag")
    end
    `CHECK(n_new > 0 && n_reuse > 0, "both new and reused entries seen")
    `TB_END
  end
endmodule
