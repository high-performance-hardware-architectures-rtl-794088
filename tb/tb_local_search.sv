// tb_local_search: fills the 1x2 CTU window with random samples, plants a
// copy of the current CU in the left CTU, and compares the best list with a
// brute-force search over the same candidate pattern done in the testbench
// (validity from a per-corner coded-area model). Checks the activity gate of
// the 2-D pass and the cycle count of a search.
`include "tb/tb_util.svh"
module tb_local_search;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  localparam int K = 4;
  logic rst_n = 0, win_we = 0, start = 0, busy, done, did_2d;
  logic [6:0] win_x; logic [5:0] win_y; pix_t win_data [8];
  logic [6:0] rd_x = 0; logic [5:0] rd_y = 0; pix_t rd_blk [64];
  logic [POS_W-1:0] ctu_x, ctu_y; logic [5:0] cu_x, cu_y;
  cand_t list [K];
  local_search #(.K(K)) dut (.*);
  `TB_WATCHDOG(200000)

  int w [64][128];
  int ncu_2d = 0, ncu_1d = 0;

  function automatic int zo(int x, int y);
    int r = 0;
    for (int b = 5; b >= 2; b--) r = r * 4 + ((y >> b) & 1) * 2 + ((x >> b) & 1);
    return r;
  endfunction
  // window coordinates; left CTU is always coded, current CTU by z-scan
  function automatic bit ok(int x, int y, int cx, int cy);
    if (int'(ctu_x) == 0 && x < 64) return 0;
    if (x + 7 < 64) return 1;
    if (x < 64) return zo(x + 7 - 64, y + 7) < zo(cx, cy);
    return zo(x - 64, y) < zo(cx, cy) && zo(x + 7 - 64, y + 7) < zo(cx, cy);
  endfunction
  function automatic int sad(int x, int y, int cx, int cy);
    int s = 0;
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
      int d; d = w[y + r][x + c] - w[cy + r][64 + cx + c]; s += d < 0 ? -d : d;
    end
    return s;
  endfunction

  task automatic run(int cx, int cy, int flat);
    int act, gh, gv, d, cyc, exp_cyc;
    int cx_l [$], cy_l [$], cost_l [$];
    // content
    for (int y = 0; y < 64; y++) for (int x = 0; x < 128; x++) w[y][x] = $urandom_range(0, 255);
    if (flat) for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) w[cy + r][64 + cx + c] = 100 + (r + c) % 2;
    begin
      int px; px = $urandom_range(0, 56);
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) w[cy + r][px + c] = w[cy + r][64 + cx + c];
    end
    for (int y = 0; y < 64; y++) for (int x = 0; x < 128; x += 8) begin
      @(negedge clk); win_we = 1; win_x = 7'(x); win_y = 6'(y);
      for (int i = 0; i < 8; i++) win_data[i] = pix_t'(w[y][x + i]);
    end
    @(negedge clk); win_we = 0;
    // activity
    gh = 0; gv = 0;
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
      if (c > 0) begin d = w[cy + r][64 + cx + c] - w[cy + r][64 + cx + c - 1]; gh += d < 0 ? -d : d; end
      if (r > 0) begin d = w[cy + r][64 + cx + c] - w[cy + r - 1][64 + cx + c]; gv += d < 0 ? -d : d; end
    end
    act = gh < gv ? gh : gv;
    // candidate pattern
    for (int x = 0; x <= 120; x++) begin cx_l.push_back(x); cy_l.push_back(cy); end
    for (int y = 0; y <= 56; y++) begin cx_l.push_back(64 + cx); cy_l.push_back(y); end
    if (act > 168) for (int y = 0; y <= 56; y += 4) for (int x = 0; x <= 120; x += 4) begin cx_l.push_back(x); cy_l.push_back(y); end
    foreach (cx_l[i]) cost_l.push_back(ok(cx_l[i], cy_l[i], cx, cy) ? sad(cx_l[i], cy_l[i], cx, cy) : -1);
    // drop later duplicates
    foreach (cx_l[i]) for (int j = 0; j < i; j++) if (cx_l[j] == cx_l[i] && cy_l[j] == cy_l[i]) cost_l[i] = -1;
    exp_cyc = 3 + 121 + 57 + (act > 168 ? 15 * 31 : 0) + 2;
    cu_x = 6'(cx); cu_y = 6'(cy);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    `CHECK(did_2d == (act > 168), $sformatf("2-D gate, activity %0d", act))
    `CHECK(cyc == exp_cyc, $sformatf("cycles %0d exp %0d", cyc, exp_cyc))
    if (did_2d) ncu_2d++; else ncu_1d++;
    for (int s = 0; s < K; s++) begin
      int b; b = -1;
      foreach (cost_l[i]) if (cost_l[i] >= 0 && (b < 0 || cost_l[i] < cost_l[b])) b = i;
      if (b < 0) `CHECK(!list[s].valid, "empty slot")
      else begin
        `CHECK(list[s].valid && int'(list[s].cost) == cost_l[b] &&
               int'(list[s].bv.x) == cx_l[b] - 64 - cx && int'(list[s].bv.y) == cy_l[b] - cy,
               $sformatf("slot %0d: got (%0d,%0d) %0d exp (%0d,%0d) %0d", s, list[s].bv.x, list[s].bv.y,
                         list[s].cost, cx_l[b] - 64 - cx, cy_l[b] - cy, cost_l[b]))
        cost_l[b] = -1;
      end
    end
    if (ctu_x != 0) `CHECK(list[0].cost == 0, "planted copy found")
  endtask

  initial begin
    ctu_x = 128; ctu_y = 64;
    repeat (2) @(posedge clk); rst_n = 1;
    run(0, 0, 0);
    run(8, 16, 1);
    run(40, 24, 0);
    run(56, 56, 1);
    ctu_x = 0; ctu_y = 0;
    run(32, 32, 0);
    `CHECK(ncu_2d > 0 && ncu_1d > 0, "both 1-D only and 2-D searches happened")
    `TB_END
  end
endmodule
