// tb_best_list: random streams of distinct vectors with random costs; the
// list must equal the K cheapest (earlier first on equal cost). A vector
// already in the list is offered again and must be ignored.
`include "tb/tb_util.svh"
module tb_best_list;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  localparam int K = 4;
  logic rst_n = 0, clear = 0, in_valid = 0;
  bv_t in_bv; logic [COST_W-1:0] in_cost;
  cand_t list [K];
  best_list #(.K(K)) dut (.clk, .rst_n, .clear, .in_valid, .in_bv, .in_cost, .list);
  `TB_WATCHDOG(100000)
  int cost_q [$]; int id_q [$];
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 40; run++) begin
      int n;
      n = $urandom_range(1, 20);
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      cost_q = {}; id_q = {};
      for (int i = 0; i < n; i++) begin
        in_valid = 1; in_bv.x = 13'(i + run * 32); in_bv.y = -13'(i); in_cost = COST_W'($urandom_range(0, 30));
        cost_q.push_back(int'(in_cost)); id_q.push_back(i);
        @(negedge clk);
      end
      in_valid = 0;
      // reference: stable selection of the K smallest costs
      for (int s = 0; s < K && s < n; s++) begin
        int best;
        best = -1;
        for (int i = 0; i < n; i++) begin
          if (cost_q[i] < 0) continue;
          if (best < 0 || cost_q[i] < cost_q[best]) best = i;
        end
        `CHECK(list[s].valid && list[s].bv.x == 13'(best + run * 32) && int'(list[s].cost) == cost_q[best],
               $sformatf("run %0d slot %0d", run, s))
        cost_q[best] = -1;
      end
      if (n < K) `CHECK(!list[n].valid, "empty slot stays empty")
      // re-offer the best vector at cost 0: must be ignored as duplicate
      begin
        cand_t before0, before1;
        before0 = list[0]; before1 = list[1];
        in_valid = 1; in_bv = list[0].bv; in_cost = '0; @(negedge clk); in_valid = 0;
        `CHECK(list[0] == before0 && list[1] == before1, "duplicate ignored")
      end
    end
    `TB_END
  end
endmodule
