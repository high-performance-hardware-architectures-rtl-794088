// tb_mv_candidate: codes two CTU rows of a 256x128 picture with random
// quadtree partitions (64 -> 32 -> 16 -> 8, z-order) and random IBC/intra
// decisions. Before each CU is recorded its candidates are asked for and
// compared with a model that looks the A1 and B1 neighbours up in a full
// 8x8-grid map of the coded picture and applies the same fill-up rule.
// Timing: query driven at a falling edge, answer checked at the next falling
// edge, then one update cycle per CU. Answers with 0, 1 and 2 spatial
// candidates must each occur. The frame is coded twice with a frame_start between.
`include "tb/tb_util.svh"
module tb_mv_candidate;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  localparam int W = 256, H = 128;
  logic rst_n = 0, frame_start = 0, q_valid = 0, out_valid, upd_valid = 0, upd_ibc = 0;
  logic [POS_W-1:0] q_x = 0, q_y = 0, upd_x = 0, upd_y = 0;
  logic [2:0] q_log2 = 3, upd_log2 = 3;
  bv_t cand [2], upd_bv = 0; logic [1:0] n_spatial;
  mv_candidate #(.PIC_W(W), .PIC_H(H)) dut (.*);
  `TB_WATCHDOG(200000)

  bit  m_ibc [H / 8][W / 8];
  bv_t m_bv  [H / 8][W / 8];
  bv_t lastq [$];
  int n_sp [3];

  task automatic code_cu(int x, int y, int lg);
    int w; bit a_ok, b_ok; bv_t a, b, e0, e1, f0, f1, nb;
    w = 1 << lg;
    a_ok = x > 0 && m_ibc[(y + w - 1) / 8][(x - 1) / 8];
    a = m_bv[(y + w - 1) / 8][(x - 1) / 8];
    b_ok = y > 0 && m_ibc[(y - 1) / 8][(x + w - 1) / 8];
    b = m_bv[(y - 1) / 8][(x + w - 1) / 8];
    if (a_ok && b_ok && a == b) b_ok = 0;
    f0.x = BV_W'(-2 * w); f0.y = '0; f1.x = BV_W'(-w); f1.y = '0;
    if (lastq.size() >= 2) begin f0 = lastq[0]; f1 = lastq[1]; end
    else if (lastq.size() == 1) begin f1 = f0; f0 = lastq[0]; end
    if (a_ok && b_ok) begin e0 = a; e1 = b; end
    else if (a_ok) begin e0 = a; e1 = f0; end
    else if (b_ok) begin e0 = b; e1 = f0; end
    else begin e0 = f0; e1 = f1; end
    @(negedge clk); q_valid = 1; q_x = POS_W'(x); q_y = POS_W'(y); q_log2 = 3'(lg);
    @(negedge clk); q_valid = 0;
    `CHECK(out_valid, "answer one cycle after the query")
    `CHECK(cand[0] == e0 && cand[1] == e1, $sformatf("candidates for CU %0d,%0d size %0d: %p %p want %p %p", x, y, w, cand[0], cand[1], e0, e1))
    `CHECK(int'(n_spatial) == int'(a_ok) + int'(b_ok), "spatial count")
    n_sp[int'(a_ok) + int'(b_ok)]++;
    // decision (mostly IBC, vectors from a small set so that repeats occur)
    upd_ibc = $urandom_range(0, 3) != 0;
    nb.x = BV_W'(-8 * $urandom_range(1, 4)); nb.y = BV_W'(-8 * $urandom_range(0, 1));
    upd_valid = 1; upd_x = POS_W'(x); upd_y = POS_W'(y); upd_log2 = 3'(lg); upd_bv = nb;
    @(negedge clk); upd_valid = 0;
    for (int r = y / 8; r < (y + w) / 8; r++) for (int c = x / 8; c < (x + w) / 8; c++) begin
      m_ibc[r][c] = upd_ibc; m_bv[r][c] = nb;
    end
    if (upd_ibc && (lastq.size() == 0 || lastq[0] != nb)) begin
      lastq.push_front(nb);
      if (lastq.size() > 2) void'(lastq.pop_back());
    end
  endtask

  // partition of one CTU, listed in z-order (x, y, log2 size)
  int cus [$][3];
  function automatic void quad(int x, int y, int lg);
    if (lg > 3 && (lg == 6 || $urandom_range(0, 2) != 0)) begin
      for (int q = 0; q < 4; q++) quad(x + (q % 2) * (1 << (lg - 1)), y + (q / 2) * (1 << (lg - 1)), lg - 1);
    end else cus.push_back('{x, y, lg});
  endfunction

  initial begin
    foreach (m_ibc[r, c]) begin m_ibc[r][c] = 0; m_bv[r][c] = '0; end
    foreach (n_sp[i]) n_sp[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    for (int f = 0; f < 2; f++) begin
      for (int cy = 0; cy < H; cy += 64) for (int cx = 0; cx < W; cx += 64) begin
        cus.delete(); quad(cx, cy, 6);
        foreach (cus[i]) code_cu(cus[i][0], cus[i][1], cus[i][2]);
      end
      @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
      foreach (m_ibc[r, c]) m_ibc[r][c] = 0;
      lastq.delete();
    end
    `CHECK(n_sp[0] > 0 && n_sp[1] > 0 && n_sp[2] > 0, $sformatf("0/1/2 spatial candidates: %0d/%0d/%0d", n_sp[0], n_sp[1], n_sp[2]))
    `TB_END
  end
endmodule
