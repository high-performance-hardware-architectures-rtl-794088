// plt_unit: palette coding unit. Palette clustering of 8x8 CUs, the palette
// controller and three CU coders for 8x8, 16x16 and 32x32 CUs.
//
// The 8x8 coder takes its cluster centres straight from plt_clustering;
// the 16x16 and 32x32 coders take theirs on the new16_*/new32_* ports.
// Each coder is started on its own start bit and fed pixels LANES at a time
// on its own pixel port. Each coder reports its palette, index runs and bit
// estimate; those outputs are what an entropy coder would consume. When RD
// optimisation has chosen a coder's result, rd_valid/rd_sel let the
// controller rebuild the palette predictor that every coder uses next.
module plt_unit
  import scc_pkg::*;
#(
  parameter int PRED_SIZE = 64,
  parameter int PAL_SIZE  = 64,
  parameter int LANES     = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // clustering of 8x8 CUs
  input  logic        cl_start,
  input  logic [9:0]  err_margin,
  input  logic        cl_pix_valid,
  input  yuv_t        cl_pix,
  output logic        cl_busy,
  // coder settings
  input  logic [17:0] thr,
  input  logic [9:0]  esc_thr,
  // cluster centres of 16x16 and 32x32 CUs
  input  logic        new16_valid,
  input  yuv_t        new16_c,
  input  logic        new16_last,
  input  logic        new32_valid,
  input  yuv_t        new32_c,
  input  logic        new32_last,
  // per coder: 0 = 8x8, 1 = 16x16, 2 = 32x32
  input  logic        start [3],
  input  logic        pix_valid [3],
  input  yuv_t        pix [3][LANES],
  output logic        pix_ready [3],
  output logic        busy [3],
  output logic        done [3],
  output logic [COST_W-1:0] bits [3],
  output logic [6:0]  pal_cnt [3],
  output plt_entry_t  pal [3][PAL_SIZE],
  output logic        run_valid [3],
  output logic        run_above [3],
  output logic [6:0]  run_index [3],
  output logic [10:0] run_len [3],
  // RD decision
  input  logic        rd_valid,
  input  logic [1:0]  rd_sel,
  output logic        ctl_busy
);
  logic       cl_out_valid, cl_out_last, cl_done;
  yuv_t       cl_out_c;
  logic [6:0] cl_n;
  yuv_t       pred [3][PRED_SIZE];
  logic [6:0] pred_cnt [3];
  logic       reuse [3][PRED_SIZE];
  logic       nv [3], nl [3];
  yuv_t       nc [3];

  plt_clustering #(.NPIX(64), .MAX_CLUSTERS(64)) u_cluster (
    .clk, .rst_n, .start(cl_start), .err_margin, .pix_valid(cl_pix_valid), .pix(cl_pix),
    .busy(cl_busy), .out_valid(cl_out_valid), .out_c(cl_out_c), .out_last(cl_out_last),
    .done(cl_done), .n_clusters(cl_n)
  );

  assign nv = '{cl_out_valid, new16_valid, new32_valid};
  assign nc = '{cl_out_c, new16_c, new32_c};
  assign nl = '{cl_out_last, new16_last, new32_last};

  for (genvar g = 0; g < 3; g++) begin : g_coder
    localparam int SZ = 8 << g;
    logic [6:0] idx_unused [SZ*SZ];
    logic [$clog2(SZ*SZ+1)-1:0] len;
    plt_cu_coder #(.CU_SIZE(SZ), .PRED_SIZE(PRED_SIZE), .PAL_SIZE(PAL_SIZE), .LANES(LANES)) u_coder (
      .clk, .rst_n, .start(start[g]), .pred(pred[g]), .pred_cnt(pred_cnt[g]), .thr, .esc_thr,
      .new_valid(nv[g]), .new_c(nc[g]), .new_last(nl[g]),
      .pix_valid(pix_valid[g]), .pix(pix[g]), .pix_ready(pix_ready[g]),
      .busy(busy[g]), .done(done[g]), .pal(pal[g]), .pal_cnt(pal_cnt[g]), .reuse(reuse[g]),
      .idx_arr(idx_unused), .run_valid(run_valid[g]), .run_above(run_above[g]),
      .run_index(run_index[g]), .run_len(len), .bits(bits[g])
    );
    assign run_len[g] = 11'(len);
  end

  logic [1:0] sel;
  assign sel = (rd_sel > 2'd2) ? 2'd0 : rd_sel;

  plt_controller #(.NUM(3), .PRED_SIZE(PRED_SIZE), .PAL_SIZE(PAL_SIZE)) u_ctl (
    .clk, .rst_n, .upd_valid(rd_valid), .upd_sel(sel), .sel_pal(pal[sel]), .sel_cnt(pal_cnt[sel]),
    .sel_reuse(reuse[sel]), .busy(ctl_busy), .pred, .pred_cnt
  );
endmodule
