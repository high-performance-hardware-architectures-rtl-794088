// tb_ibc_estimation: runs the IBC estimation stage over the first CTU row
// of a 256x128 picture of original samples, with DRAM models for the hash
// table and the frame (random grant, pipelined in-order reads, 3..8 cycle
// latency).
// Picture: random samples, except that the lower half of CTU 0 is flat
// (many blocks share one hash key; with MAX_PER_KEY = 4 the bucket fills
// and inserts are dropped) and two planted copies:
//   - an 8x8 block of CTU 1 copies a block of CTU 0 (inside the local
//     window on the same rows, found by the horizontal 1-D search),
//   - an 8x8 block of CTU 2 copies a grid-aligned block of CTU 0 (outside
//     the window, only the hash search can find it).
// For every CU of the run each listed candidate must be a legal vector
// (reference inside the picture and already coded), its cost must equal the
// SAD recomputed here, the list must be sorted, and the planted CUs must
// have a zero-cost candidate with the planted vector. 2-D searches, hash
// hits and hash drops must all have occurred.
`include "tb/tb_util.svh"
module tb_ibc_estimation;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  localparam int W = 256, H = 128;
  logic rst_n = 0, cfg_valid = 0, cfg_ready; logic [1:0] cfg_op;
  logic [POS_W-1:0] cfg_ctu_x, cfg_ctu_y; logic [5:0] cfg_cu_x, cfg_cu_y;
  logic win_we = 0; logic [6:0] win_x; logic [5:0] win_y; pix_t win_data [8];
  logic out_valid, out_ready = 0; cand_list_t out_list;
  logic ht_req, ht_we, ht_gnt, ht_rvalid; logic [31:0] ht_addr, ht_wdata, ht_rdata;
  logic fr_req, fr_gnt, fr_rvalid; logic [POS_W-1:0] fr_x, fr_y; pix_t fr_rdata [8];
  logic ev_2d, ev_hash_hit, ev_hash_drop;
  ibc_estimation #(.MAX_PER_KEY(4), .PIC_W(W), .PIC_H(H)) dut (.*);
  `TB_WATCHDOG(2000000)

  logic [7:0] pic [H][W];
  // ---- hash table DRAM ----
  logic [31:0] htmem [int];
  longint hq_t [$]; logic [31:0] hq_d [$];
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    ht_gnt <= $urandom_range(0, 1);
    fr_gnt <= $urandom_range(0, 1);
    ht_rvalid <= 0; fr_rvalid <= 0;
    if (rst_n && ht_req && ht_gnt) begin
      if (ht_we) htmem[int'(ht_addr)] = ht_wdata;
      else begin hq_t.push_back(cyc + $urandom_range(3, 8)); hq_d.push_back(htmem.exists(int'(ht_addr)) ? htmem[int'(ht_addr)] : 32'h0); end
    end
    if (hq_t.size() > 0 && hq_t[0] <= cyc) begin
      ht_rvalid <= 1; ht_rdata <= hq_d[0]; void'(hq_t.pop_front()); void'(hq_d.pop_front());
    end
  end
  // ---- frame DRAM ----
  longint fq_t [$]; int fq_x [$], fq_y [$];
  always @(posedge clk) begin
    if (rst_n && fr_req && fr_gnt) begin
      fq_t.push_back(cyc + $urandom_range(3, 8)); fq_x.push_back(int'(fr_x)); fq_y.push_back(int'(fr_y));
    end
    if (fq_t.size() > 0 && fq_t[0] <= cyc) begin
      fr_rvalid <= 1;
      for (int i = 0; i < 8; i++) fr_rdata[i] <= pic[fq_y[0]][fq_x[0] + i];
      void'(fq_t.pop_front()); void'(fq_x.pop_front()); void'(fq_y.pop_front());
    end
  end
  int n_2d = 0, n_hit = 0, n_drop = 0;
  always @(posedge clk) if (rst_n) begin n_2d += int'(ev_2d); n_hit += int'(ev_hash_hit); n_drop += int'(ev_hash_drop); end

  task automatic send(int op, int cx, int cy, int ux, int uy);
    @(negedge clk);
    cfg_valid = 1; cfg_op = 2'(op); cfg_ctu_x = POS_W'(cx); cfg_ctu_y = POS_W'(cy); cfg_cu_x = 6'(ux); cfg_cu_y = 6'(uy);
    #1; while (!cfg_ready) begin @(negedge clk); #1; end
    @(negedge clk); cfg_valid = 0;
  endtask
  task automatic load_window(int ctu);
    for (int half = 0; half < 2; half++) begin
      int bx;
      bx = (ctu - 1 + half) * 64;
      if (bx < 0) continue;
      for (int y = 0; y < 64; y++) for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        win_we = 1; win_x = 7'(half * 64 + c * 8); win_y = 6'(y);
        for (int i = 0; i < 8; i++) win_data[i] = pic[y][bx + c * 8 + i];
      end
    end
    @(negedge clk); win_we = 0;
  endtask
  function automatic int sad8(int x0, int y0, int x1, int y1);
    int s = 0;
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
      int d;
      d = int'(pic[y0 + r][x0 + c]) - int'(pic[y1 + r][x1 + c]);
      s += d < 0 ? -d : d;
    end
    return s;
  endfunction
  // coded: CTUs before the current one, or earlier in z-order inside it
  function automatic bit coded(int x, int y, int cux, int cuy);
    int zc, zr;
    if (x / 64 < cux / 64) return 1;
    if (x / 64 > cux / 64) return 0;
    zc = 0; zr = 0;
    for (int b = 0; b < 3; b++) begin
      zc |= (((cux % 64) >> (b + 3)) & 1) << (2 * b) | (((cuy % 64) >> (b + 3)) & 1) << (2 * b + 1);
      zr |= (((x % 64) >> (b + 3)) & 1) << (2 * b) | (((y % 64) >> (b + 3)) & 1) << (2 * b + 1);
    end
    return zr < zc;
  endfunction
  task automatic run_cu(int ctu, int ux, int uy, int want_x, int want_y);
    cand_list_t l; int cux, cuy; bit found;
    cux = ctu * 64 + ux; cuy = uy;
    send(1, ctu * 64, 0, ux, uy);
    @(negedge clk); out_ready = 1;
    while (!out_valid) @(negedge clk);
    l = out_list;
    @(negedge clk); out_ready = 0;
    `CHECK(int'(l.x) == cux && int'(l.y) == cuy, "list position")
    found = 0;
    for (int k = 0; k < NCAND; k++) if (l.c[k].valid) begin
      int rx, ry;
      rx = cux + int'(l.c[k].bv.x); ry = cuy + int'(l.c[k].bv.y);
      `CHECK(rx >= 0 && ry >= 0 && rx + 8 <= W && ry + 8 <= H, "reference inside picture")
      if (rx >= 0 && ry >= 0 && rx + 8 <= W && ry + 8 <= H) begin
        `CHECK(coded(rx, ry, cux, cuy) && coded(rx + 7, ry + 7, cux, cuy), $sformatf("reference %0d,%0d coded for CU %0d,%0d", rx, ry, cux, cuy))
        `CHECK(int'(l.c[k].cost) == sad8(cux, cuy, rx, ry), "candidate cost is the SAD")
      end
      if (k > 0) `CHECK(!l.c[k - 1].valid || l.c[k - 1].cost <= l.c[k].cost, "list sorted")
      if (rx == want_x && ry == want_y && l.c[k].cost == 0) found = 1;
    end
    if (want_x >= 0) `CHECK(found, $sformatf("planted copy for CU %0d,%0d", cux, cuy))
  endtask

  initial begin
    foreach (pic[y, x]) pic[y][x] = 8'($urandom);
    for (int y = 32; y < 64; y++) for (int x = 0; x < 64; x++) pic[y][x] = 8'd90;
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
      pic[16 + r][64 + 24 + c] = pic[16 + r][21 + c];  // CTU 1 CU (24,16) <- (21,16)
      pic[8 + r][128 + 16 + c] = pic[r][8 + c];        // CTU 2 CU (16,8)  <- (8,0)
    end
    repeat (2) @(posedge clk); rst_n = 1;
    send(0, 0, 0, 0, 0);
    for (int ctu = 0; ctu < 3; ctu++) begin
      load_window(ctu);
      for (int n = 0; n < 4; n++) run_cu(ctu, 8 * $urandom_range(0, 7), 8 * $urandom_range(0, 7), -1, -1);
      if (ctu == 1) run_cu(1, 24, 16, 21, 16);
      if (ctu == 2) run_cu(2, 16, 8, 8, 0);
      send(2, ctu * 64, 0, 0, 0);
    end
    `CHECK(n_2d > 0 && n_hit > 0 && n_drop > 0, $sformatf("mechanisms 2d=%0d hit=%0d drop=%0d", n_2d, n_hit, n_drop))
    `TB_END
  end
endmodule
