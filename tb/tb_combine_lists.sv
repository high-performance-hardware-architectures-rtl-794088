// tb_combine_lists: random pairs of lists, sometimes sharing vectors;
// the result must be the K cheapest distinct vectors (local list first on a
// tie) and done must come 2K + 1 cycles after start.
`include "tb/tb_util.svh"
module tb_combine_lists;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  localparam int K = 4;
  logic rst_n = 0, start = 0, done;
  cand_t la [K], lb [K], lo [K];
  combine_lists #(.K(K)) dut (.clk, .rst_n, .start, .list_a(la), .list_b(lb), .done, .list(lo));
  `TB_WATCHDOG(100000)

  function automatic void mk(output cand_t l [K], input int base);
    int c, n;
    c = $urandom_range(0, 5);
    n = $urandom_range(0, K);
    for (int i = 0; i < K; i++) begin
      l[i] = '0;
      if (i < n) begin
        l[i].valid = 1; l[i].bv.x = BV_W'($urandom_range(0, 5) + base); l[i].bv.y = BV_W'(i);
        // the same vector always has the same cost, as it would in the search
        l[i].cost = COST_W'((int'(l[i].bv.x) * 7 + i * 3) % 13);
      end
    end
  endfunction

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      cand_t all [$]; cand_t exp_l [$]; int cyc;
      mk(la, 0); mk(lb, (t % 2) ? 0 : 100);
      all = {};
      for (int i = 0; i < K; i++) if (la[i].valid) all.push_back(la[i]);
      for (int i = 0; i < K; i++) if (lb[i].valid) all.push_back(lb[i]);
      exp_l = {};
      // selection sort, stable, skipping vectors already chosen
      while (exp_l.size() < K && all.size() > 0) begin
        int b; bit dup;
        b = 0;
        for (int i = 1; i < all.size(); i++) if (all[i].cost < all[b].cost) b = i;
        dup = 0;
        foreach (exp_l[j]) if (exp_l[j].bv == all[b].bv) dup = 1;
        if (!dup) exp_l.push_back(all[b]);
        all.delete(b);
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      `CHECK(cyc == 2 * K + 1, $sformatf("latency %0d", cyc))
      for (int i = 0; i < K; i++) begin
        if (i < exp_l.size()) `CHECK(lo[i] == exp_l[i], $sformatf("t%0d slot %0d", t, i))
        else `CHECK(!lo[i].valid, "slot empty")
      end
    end
    `TB_END
  end
endmodule
