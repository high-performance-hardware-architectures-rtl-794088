// best_list: keeps the K lowest-cost block-vector candidates ("Best List
// Creation" of the IBC estimation stage).
//
// The list is held sorted by cost, entry 0 best. An offered candidate is
// inserted in front of the first entry with a higher cost (ties keep the
// earlier one first) and the last entry falls off. A candidate whose vector
// is already in the list is ignored. One candidate per cycle, result visible
// the next cycle; clear empties the list. K is this design's choice.
module best_list
  import scc_pkg::*;
#(
  parameter int K = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  in_valid,
  input  bv_t   in_bv,
  input  logic [COST_W-1:0] in_cost,
  output cand_t list [K]
);
  cand_t nxt [K];
  logic  dup;
  int    pos;

  always_comb begin
    dup = 1'b0;
    pos = K;
    for (int i = K - 1; i >= 0; i--) begin
      if (list[i].valid && list[i].bv == in_bv) dup = 1'b1;
      if (!list[i].valid || list[i].cost > in_cost) pos = i;
    end
    for (int i = 0; i < K; i++) begin
      if (i < pos)       nxt[i] = list[i];
      else if (i == pos) nxt[i] = '{valid: 1'b1, bv: in_bv, cost: in_cost};
      else               nxt[i] = list[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) list[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < K; i++) list[i] <= '0;
    end else if (in_valid && !dup && pos < K) begin
      list <= nxt;
    end
  end
endmodule
