// tb_ibc_ht_stage: drives the IBC high throughput stage on a 256x128
// picture with a DRAM model (random grant, 3..8 cycle read latency) that
// serves cache lines from a byte array and stores the 256-bit rows written
// back by the stage.
// Phase 1: a candidate that points into a CTU not yet written must stall
//   until the reconstruction of CTUs 0 and 1 is fed through the write-back
//   port; the written rows are compared with the fed samples.
// Phase 2: random CUs of 8/16/32 samples in CTU 2 with 1..5 random vectors
//   into CTUs 0/1; every residual sample and every CU result (best vector,
//   SAD; first minimum wins) is compared with a reference computation.
// Phase 3: five 8x8 candidates with 8-aligned vectors, issued twice; on the
//   warm second pass (vectors chosen so that their cache lines do not
//   share a direct-mapped slot) the five predictions must finish within 45 cycles of
//   the first residual (the paper's Table III budget for an 8x8 CU).
// Cache hits, misses, split chunks and stalls must all have occurred.
`include "tb/tb_util.svh"
module tb_ibc_ht_stage;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  localparam int W = 256, H = 128;
  logic rst_n = 0, frame_start = 0;
  logic cfg_valid = 0, cfg_ready, cfg_last;
  logic [POS_W-1:0] cfg_cu_x, cfg_cu_y; logic [2:0] cfg_log2; bv_t cfg_bv;
  logic orig_valid = 0, orig_ready; pix_t orig_data [8];
  logic res_valid, res_last; logic signed [8:0] res [8];
  logic cu_done; logic [POS_W-1:0] cu_x, cu_y; bv_t cu_bv; logic [COST_W-1:0] cu_sad;
  logic rec_valid = 0, rec_ready; logic [POS_W-1:0] rec_x, rec_y; pix_t rec_data [8];
  logic mem_req, mem_gnt, mem_rvalid, wr_valid, wr_ready;
  logic [26:0] mem_addr; logic [255:0] mem_rdata, wr_data; logic [31:0] wr_addr;
  logic ev_stall, ev_hit, ev_miss, ev_split;
  ibc_ht_stage #(.PIC_W(W), .PIC_H(H), .CACHE_LINES(64)) dut (.*);
  `TB_WATCHDOG(400000)

  logic [7:0] gold [H][W];   // reconstruction the testbench feeds back
  logic [7:0] dram [W * H];  // DRAM model contents
  // ---- DRAM model ----
  int lat; logic busy_m; logic [26:0] ma;
  always @(posedge clk) begin
    mem_gnt <= $urandom_range(0, 1);
    wr_ready <= $urandom_range(0, 3) != 0;
    mem_rvalid <= 0;
    if (!rst_n) busy_m <= 0;
    else if (mem_req && mem_gnt && !busy_m) begin busy_m <= 1; ma <= mem_addr; lat <= $urandom_range(2, 7); end
    else if (busy_m) begin
      if (lat == 0) begin
        mem_rvalid <= 1; busy_m <= 0;
        for (int i = 0; i < 32; i++) mem_rdata[i * 8 +: 8] <= (32 * ma + i < W * H) ? dram[32 * ma + i] : 8'h0;
      end else lat <= lat - 1;
    end
    if (rst_n && wr_valid && wr_ready)
      for (int i = 0; i < 32; i++) dram[wr_addr + i] <= wr_data[i * 8 +: 8];
  end
  int n_stall = 0, n_hit = 0, n_miss = 0, n_split = 0;
  always @(posedge clk) if (rst_n) begin
    n_stall += int'(ev_stall); n_hit += int'(ev_hit); n_miss += int'(ev_miss); n_split += int'(ev_split);
  end

  // ---- original sample feeder ----
  logic [63:0] orig_q [$];
  always @(negedge clk) begin
    if (orig_valid && orig_ready_s) void'(orig_q.pop_front());
    orig_valid = orig_q.size() > 0;
    if (orig_valid) for (int i = 0; i < 8; i++) orig_data[i] = orig_q[0][i * 8 +: 8];
  end
  logic orig_ready_s;  // ready sampled at the clock edge
  always @(posedge clk) orig_ready_s <= orig_ready;
  // note: orig_valid changes only at negedge, so the handshake seen at the
  // posedge is the one recorded in orig_ready_s

  // ---- expected results ----
  int exp_res [$]; int exp_last [$];
  int exp_cu_x [$], exp_cu_y [$], exp_bx [$], exp_by [$], exp_sad [$];
  int n_res_last = 0; longint t_res_last [$]; longint t_first_res = -1;
  always @(negedge clk) if (rst_n) begin
    if (res_valid) begin
      if (t_first_res < 0) t_first_res = $time;
      for (int i = 0; i < 8; i++) begin
        `CHECK(exp_res.size() > 0 && int'(res[i]) == exp_res[0], $sformatf("residual sample %0d got %0d exp %0d", i, res[i], exp_res[0]))
        void'(exp_res.pop_front());
      end
      `CHECK(int'(res_last) == exp_last[0], "res_last position")
      void'(exp_last.pop_front());
      if (res_last) begin n_res_last++; t_res_last.push_back($time); end
    end
    if (cu_done) begin
      `CHECK(exp_cu_x.size() > 0, "expected a CU result")
      `CHECK(int'(cu_x) == exp_cu_x[0] && int'(cu_y) == exp_cu_y[0], "CU position")
      `CHECK(int'(cu_bv.x) == exp_bx[0] && int'(cu_bv.y) == exp_by[0],
             $sformatf("best vector got %0d,%0d exp %0d,%0d", cu_bv.x, cu_bv.y, exp_bx[0], exp_by[0]))
      `CHECK(int'(cu_sad) == exp_sad[0], "best SAD")
      void'(exp_cu_x.pop_front()); void'(exp_cu_y.pop_front());
      void'(exp_bx.pop_front()); void'(exp_by.pop_front()); void'(exp_sad.pop_front());
    end
  end

  // one CU with its list of vectors: queue originals and expected values,
  // then push the configuration packets
  task automatic send_cu(int cx, int cy, int lg, int bx [$], int by [$]);
    int s, best, bbx, bby, sad;
    logic [7:0] org [32][32];
    s = 1 << lg; best = -1;
    for (int y = 0; y < s; y++) for (int x = 0; x < s; x++) org[y][x] = 8'($urandom);
    for (int k = 0; k < bx.size(); k++) begin
      sad = 0;
      for (int y = 0; y < s; y++)
        for (int c = 0; c < s / 8; c++) begin
          logic [63:0] b;
          for (int i = 0; i < 8; i++) begin
            int d;
            b[i * 8 +: 8] = org[y][c * 8 + i];
            d = int'(org[y][c * 8 + i]) - int'(gold[cy + by[k] + y][cx + bx[k] + c * 8 + i]);
            exp_res.push_back(d);
            sad += d < 0 ? -d : d;
          end
          exp_last.push_back(y == s - 1 && c == s / 8 - 1);
          orig_q.push_back(b);
        end
      if (best < 0 || sad < best) begin best = sad; bbx = bx[k]; bby = by[k]; end
    end
    exp_cu_x.push_back(cx); exp_cu_y.push_back(cy);
    exp_bx.push_back(bbx); exp_by.push_back(bby); exp_sad.push_back(best);
    for (int k = 0; k < bx.size(); k++) begin
      @(negedge clk);
      cfg_valid = 1; cfg_cu_x = POS_W'(cx); cfg_cu_y = POS_W'(cy); cfg_log2 = 3'(lg);
      cfg_bv.x = BV_W'(bx[k]); cfg_bv.y = BV_W'(by[k]); cfg_last = k == bx.size() - 1;
      #1; while (!cfg_ready) begin @(negedge clk); #1; end
      @(negedge clk); cfg_valid = 0;
    end
  endtask

  task automatic wait_idle();
    while (exp_cu_x.size() > 0) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    int bx [$], by [$];
    int cx, cy, lg, s, nc, stall_before;
    foreach (gold[y, x]) gold[y][x] = 8'($urandom);
    foreach (dram[i]) dram[i] = 8'h0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;

    // ---- phase 1: stall until CTUs 0 and 1 are written back ----
    bx = '{-120}; by = '{8};
    send_cu(128, 0, 3, bx, by);
    repeat (30) @(negedge clk);
    `CHECK(n_stall > 0 && exp_cu_x.size() == 1, "candidate waits for its reference CTU")
    stall_before = n_stall;
    for (int b = 0; b < 8; b++) begin
      int ox, oy;
      ox = (b / 4) * 64 + (b % 2) * 32; oy = ((b / 2) % 2) * 32;
      for (int t = 0; t < 128; t++) begin
        @(negedge clk);
        rec_valid = 1; rec_x = POS_W'(ox); rec_y = POS_W'(oy);
        for (int i = 0; i < 8; i++) rec_data[i] = gold[oy + t / 4][ox + (t % 4) * 8 + i];
        #1; while (!rec_ready) begin @(negedge clk); #1; end
        @(negedge clk); rec_valid = 0;
      end
    end
    wait_idle();
    repeat (2) @(negedge clk);
    while (wr_valid) @(negedge clk);
    for (int y = 0; y < 64; y++) for (int x = 0; x < 128; x++)
      `CHECK(dram[y * W + x] == gold[y][x], $sformatf("written-back sample in DRAM at %0d,%0d", x, y))

    // ---- phase 2: random CUs in CTU 2 ----
    for (int n = 0; n < 60; n++) begin
      lg = $urandom_range(3, 5); s = 1 << lg;
      cx = 128 + s * $urandom_range(0, 64 / s - 1); cy = s * $urandom_range(0, 64 / s - 1);
      nc = $urandom_range(1, 5);
      bx.delete(); by.delete();
      for (int k = 0; k < nc; k++) begin
        bx.push_back($urandom_range(0, 128 - s) - cx);
        by.push_back($urandom_range(0, 64 - s) - cy);
      end
      send_cu(cx, cy, lg, bx, by);
    end
    wait_idle();

    // ---- phase 3: throughput of five warm 8x8 predictions ----
    for (int pass = 0; pass < 2; pass++) begin
      longint t0;
      bx = '{-136, -104, -72, -40, -96}; by = '{0, 0, 0, 0, 0};
      // originals are queued first so the feeder never starves the stage
      t_res_last.delete(); t_first_res = -1;
      send_cu(136, 0, 3, bx, by);
      wait_idle();
      t0 = t_first_res;
      `CHECK(t_res_last.size() == 5, "five predictions")
      if (pass == 1) $display("five warm 8x8 predictions: %0d cycles", (t_res_last[4] - t0) / 10 + 1);
      if (pass == 1)
        `CHECK((t_res_last[4] - t0) / 10 + 1 <= 45,
               $sformatf("five warm 8x8 predictions in %0d cycles", (t_res_last[4] - t0) / 10 + 1))
    end

    `CHECK(n_hit > 0 && n_miss > 0 && n_split > 0 && n_stall > 0,
           $sformatf("mechanisms hit=%0d miss=%0d split=%0d stall=%0d", n_hit, n_miss, n_split, n_stall))
    `CHECK(exp_res.size() == 0 && orig_q.size() == 0, "all residuals delivered")
    `TB_END
  end
endmodule
