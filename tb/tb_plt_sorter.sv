// tb_plt_sorter: random interleaved lists of reused and new entries with
// empty slots; the output must be the same entries ordered reused first (by
// predictor index), then new (by arrival), then empty, and done must come
// PAL_SIZE + 1 cycles after load.
`include "tb/tb_util.svh"
module tb_plt_sorter;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  logic rst_n = 0, load = 0, busy, done;
  plt_entry_t in_list [64], out_list [64];
  plt_sorter dut (.*);
  `TB_WATCHDOG(100000)
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      plt_entry_t exp_l [$]; int n, cyc;
      bit used_o [128];
      n = $urandom_range(0, 64);
      exp_l = {};
      foreach (used_o[i]) used_o[i] = 0;
      for (int i = 0; i < 64; i++) begin
        in_list[i] = '0;
        if (i < n) begin
          int o;
          do o = $urandom_range(0, 127); while (used_o[o]);
          used_o[o] = 1;
          in_list[i].valid = 1; in_list[i].is_new = o[6]; in_list[i].order = 7'(o % 64); in_list[i].c = yuv_t'($urandom);
        end
      end
      // reference order: ascending {is_new, order}, keys are unique
      for (int k = 0; k < 128; k++)
        for (int i = 0; i < n; i++) if ({in_list[i].is_new, in_list[i].order[5:0]} == 7'(k)) exp_l.push_back(in_list[i]);
      @(negedge clk); load = 1; @(negedge clk); load = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      `CHECK(cyc == 65, $sformatf("sort cycles %0d", cyc))
      for (int i = 0; i < 64; i++)
        if (i < n) `CHECK(out_list[i] == exp_l[i], $sformatf("t%0d pos %0d", t, i))
        else `CHECK(!out_list[i].valid, "empty slot last")
    end
    `TB_END
  end
endmodule
