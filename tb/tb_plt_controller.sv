// tb_plt_controller: a sequence of RD decisions with random palettes and
// reuse flags; after each update every coder's predictor must equal the
// chosen palette followed by the unused old entries (cut at 64), and the
// update must take PRED_SIZE + 2 cycles.
`include "tb/tb_util.svh"
module tb_plt_controller;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  logic rst_n = 0, upd_valid = 0, busy; logic [1:0] upd_sel;
  plt_entry_t sel_pal [64]; logic [6:0] sel_cnt; logic sel_reuse [64];
  yuv_t pred [3][64]; logic [6:0] pred_cnt [3];
  plt_controller dut (.*);
  `TB_WATCHDOG(100000)
  yuv_t model [$];
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 3; n++) `CHECK(pred_cnt[n] == 0, "empty after reset")
    model = {};
    for (int t = 0; t < 50; t++) begin
      yuv_t nm [$]; int cyc;
      upd_sel = 2'($urandom_range(0, 2));
      sel_cnt = 7'($urandom_range(0, 64));
      for (int i = 0; i < 64; i++) begin
        sel_pal[i] = '0;
        if (i < sel_cnt) begin sel_pal[i].valid = 1; sel_pal[i].c = yuv_t'($urandom); end
        sel_reuse[i] = (i < model.size()) && $urandom_range(0, 1);
      end
      nm = {};
      for (int i = 0; i < sel_cnt; i++) nm.push_back(sel_pal[i].c);
      foreach (model[j]) if (!sel_reuse[j] && nm.size() < 64) nm.push_back(model[j]);
      @(negedge clk); upd_valid = 1; @(negedge clk); upd_valid = 0;
      cyc = 1;
      while (busy) begin @(negedge clk); cyc++; end
      `CHECK(cyc == 66, $sformatf("update cycles %0d", cyc))
      model = nm;
      for (int n = 0; n < 3; n++) begin
        `CHECK(int'(pred_cnt[n]) == model.size(), $sformatf("t%0d coder %0d count %0d exp %0d", t, n, pred_cnt[n], model.size()))
        foreach (model[j]) `CHECK(pred[n][j] == model[j], $sformatf("t%0d coder %0d entry %0d", t, n, j))
      end
    end
    `TB_END
  end
endmodule
