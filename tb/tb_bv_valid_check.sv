// tb_bv_valid_check: hand-worked vectors plus random vectors checked against
// a per-corner "is this sample coded" model (earlier CTU row, earlier CTU in
// the row, or earlier in z-scan inside the CTU), for all three PU shapes and
// both the window-limited and the whole-picture variants.
`include "tb/tb_util.svh"
module tb_bv_valid_check;
  import scc_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  logic [POS_W-1:0] cu_x, cu_y; logic [2:0] cu_log2; logic part; bv_t bv;
  logic v0, v1, v2, g0;
  bv_valid_check #(.SHAPE(0), .LOCAL(1)) d0 (.cu_x, .cu_y, .cu_log2, .part, .bv, .valid(v0));
  bv_valid_check #(.SHAPE(1), .LOCAL(1)) d1 (.cu_x, .cu_y, .cu_log2, .part, .bv, .valid(v1));
  bv_valid_check #(.SHAPE(2), .LOCAL(1)) d2 (.cu_x, .cu_y, .cu_log2, .part, .bv, .valid(v2));
  bv_valid_check #(.SHAPE(0), .LOCAL(0)) dg (.cu_x, .cu_y, .cu_log2, .part, .bv, .valid(g0));

  function automatic int z(int x, int y);
    int r = 0;
    for (int b = 5; b >= 2; b--) r = r * 4 + ((y >> b) & 1) * 2 + ((x >> b) & 1);
    return r;
  endfunction
  function automatic bit coded(int x, int y, int cx, int cy);
    if (y / 64 < cy / 64) return 1;
    if (y / 64 == cy / 64 && x / 64 < cx / 64) return 1;
    if (y / 64 == cy / 64 && x / 64 == cx / 64) return z(x % 64, y % 64) < z(cx % 64, cy % 64);
    return 0;
  endfunction
  function automatic bit model(int shape, bit local_only, int cx, int cy, int l2, bit pt, int bx, int by);
    int w, h, px, py, x0, y0, x1, y1;
    w = 1 << l2; h = w; px = cx; py = cy;
    if (shape == 1) begin w = w / 2; if (pt) px += w; end
    if (shape == 2) begin h = h / 2; if (pt) py += h; end
    x0 = px + bx; y0 = py + by; x1 = x0 + w - 1; y1 = y0 + h - 1;
    if (x0 < 0 || y0 < 0 || x1 >= 1920 || y1 >= 1080) return 0;
    if (!coded(x0, y0, cx, cy) || !coded(x1, y1, cx, cy)) return 0;
    if (local_only && !(y0 / 64 == cy / 64 && y1 / 64 == cy / 64 && x0 / 64 >= cx / 64 - 1 && x1 / 64 <= cx / 64)) return 0;
    return 1;
  endfunction

  task automatic apply(int cx, int cy, int l2, bit pt, int bx, int by);
    cu_x = POS_W'(cx); cu_y = POS_W'(cy); cu_log2 = 3'(l2); part = pt; bv.x = BV_W'(bx); bv.y = BV_W'(by);
    #1;
    `CHECK(v0 == model(0, 1, cx, cy, l2, pt, bx, by), $sformatf("2Nx2N cu(%0d,%0d) bv(%0d,%0d)", cx, cy, bx, by))
    `CHECK(v1 == model(1, 1, cx, cy, l2, pt, bx, by), $sformatf("Nx2N cu(%0d,%0d) bv(%0d,%0d)", cx, cy, bx, by))
    `CHECK(v2 == model(2, 1, cx, cy, l2, pt, bx, by), $sformatf("2NxN cu(%0d,%0d) bv(%0d,%0d)", cx, cy, bx, by))
    `CHECK(g0 == model(0, 0, cx, cy, l2, pt, bx, by), $sformatf("global cu(%0d,%0d) bv(%0d,%0d)", cx, cy, bx, by))
  endtask

  initial begin
    // hand-worked cases, CU 8x8 at (72, 8) in CTU (64, 0)
    apply(72, 8, 3, 0, -8, 0);    #1 `CHECK(v0 == 1, "left neighbour in same 16x16 is coded")
    apply(72, 8, 3, 0, 0, -8);    #1 `CHECK(v0 == 1, "above neighbour is coded")
    apply(72, 8, 3, 0, 8, 0);     #1 `CHECK(v0 == 0, "right neighbour not yet coded")
    apply(72, 8, 3, 0, -72, 0);   #1 `CHECK(v0 == 1 && g0 == 1, "left CTU inside window")
    apply(72, 8, 3, 0, -80, 0);   #1 `CHECK(v0 == 0, "outside picture")
    apply(200, 70, 3, 0, -136, 0);#1 `CHECK(v0 == 0 && g0 == 1, "two CTUs left: only hash search")
    apply(200, 70, 3, 0, 0, -40); #1 `CHECK(v0 == 0 && g0 == 1, "CTU row above: only hash search")
    apply(200, 70, 3, 0, 300, -40);#1 `CHECK(g0 == 1, "row above, far right is coded")
    apply(200, 70, 3, 0, 100, 0); #1 `CHECK(g0 == 0, "same row, CTU to the right not coded")
    for (int t = 0; t < 20000; t++) begin
      int l2, cx, cy;
      l2 = $urandom_range(3, 5);
      cx = ($urandom_range(0, 1919) >> l2) << l2;
      cy = ($urandom_range(0, 1079) >> l2) << l2;
      if (cy + (1 << l2) > 1080) cy = 1080 - (1 << l2);
      apply(cx, cy, l2, 1'($urandom), $urandom_range(0, 200) - 150, $urandom_range(0, 100) - 70);
    end
    `TB_END
  end
endmodule
