// scc_top: screen content coding tools for an HEVC encoder, side by side:
//   * the IBC estimation stage (candidate vectors from original samples),
//   * the IBC high throughput stage (predictions and residuals from
//     reconstructed samples, reconstruction write-back),
//   * the palette coding unit (clustering, palette controller, CU coders),
//   * the block vector candidate unit that feeds syntax generation (mvc_*).
// In an encoder the estimation stage's candidate lists are turned into
// configuration packets of the high throughput stage by the encoder's
// control; here the lists come out on est_* and the packets go in on ht_cfg_*
// so that the control and the RD decision stay outside. The external DRAM
// (hash table, original and reconstructed pictures) and the palette entropy
// coder are outside as well; their connections are ports.
module scc_top
  import scc_pkg::*;
#(
  parameter int PIC_W = 1920,
  parameter int PIC_H = 1080
) (
  input  logic              clk,
  input  logic              rst_n,
  // ---------- IBC estimation ----------
  input  logic              est_cfg_valid,
  output logic              est_cfg_ready,
  input  logic [1:0]        est_cfg_op,
  input  logic [POS_W-1:0]  est_cfg_ctu_x,
  input  logic [POS_W-1:0]  est_cfg_ctu_y,
  input  logic [5:0]        est_cfg_cu_x,
  input  logic [5:0]        est_cfg_cu_y,
  input  logic              est_win_we,
  input  logic [6:0]        est_win_x,
  input  logic [5:0]        est_win_y,
  input  pix_t              est_win_data [8],
  output logic              est_out_valid,
  input  logic              est_out_ready,
  output cand_list_t        est_out_list,
  output logic              ht_tab_req,
  output logic              ht_tab_we,
  output logic [31:0]       ht_tab_addr,
  output logic [31:0]       ht_tab_wdata,
  input  logic              ht_tab_gnt,
  input  logic              ht_tab_rvalid,
  input  logic [31:0]       ht_tab_rdata,
  output logic              fr_req,
  output logic [POS_W-1:0]  fr_x,
  output logic [POS_W-1:0]  fr_y,
  input  logic              fr_gnt,
  input  logic              fr_rvalid,
  input  pix_t              fr_rdata [8],
  output logic [2:0]        est_events,     // {hash drop, hash hit, 2-D search}
  // ---------- IBC high throughput ----------
  input  logic              ht_frame_start,
  input  logic              ht_cfg_valid,
  output logic              ht_cfg_ready,
  input  logic [POS_W-1:0]  ht_cfg_cu_x,
  input  logic [POS_W-1:0]  ht_cfg_cu_y,
  input  logic [2:0]        ht_cfg_log2,
  input  bv_t               ht_cfg_bv,
  input  logic              ht_cfg_last,
  input  logic              ht_orig_valid,
  output logic              ht_orig_ready,
  input  pix_t              ht_orig_data [8],
  output logic              ht_res_valid,
  output logic signed [8:0] ht_res [8],
  output logic              ht_res_last,
  output logic              ht_cu_done,
  output logic [POS_W-1:0]  ht_cu_x,
  output logic [POS_W-1:0]  ht_cu_y,
  output bv_t               ht_cu_bv,
  output logic [COST_W-1:0] ht_cu_sad,
  input  logic              ht_rec_valid,
  output logic              ht_rec_ready,
  input  logic [POS_W-1:0]  ht_rec_x,
  input  logic [POS_W-1:0]  ht_rec_y,
  input  pix_t              ht_rec_data [8],
  output logic              ht_mem_req,
  output logic [26:0]       ht_mem_addr,
  input  logic              ht_mem_gnt,
  input  logic              ht_mem_rvalid,
  input  logic [255:0]      ht_mem_rdata,
  output logic              ht_wr_valid,
  input  logic              ht_wr_ready,
  output logic [31:0]       ht_wr_addr,
  output logic [255:0]      ht_wr_data,
  output logic [3:0]        ht_events,      // {split chunk, miss, hit, stall}
  // ---------- palette ----------
  input  logic              cl_start,
  input  logic [9:0]        err_margin,
  input  logic              cl_pix_valid,
  input  yuv_t              cl_pix,
  output logic              cl_busy,
  input  logic [17:0]       plt_thr,
  input  logic [9:0]        plt_esc_thr,
  input  logic              new16_valid,
  input  yuv_t              new16_c,
  input  logic              new16_last,
  input  logic              new32_valid,
  input  yuv_t              new32_c,
  input  logic              new32_last,
  input  logic              plt_start [3],
  input  logic              plt_pix_valid [3],
  input  yuv_t              plt_pix [3][4],
  output logic              plt_pix_ready [3],
  output logic              plt_busy [3],
  output logic              plt_done [3],
  output logic [COST_W-1:0] plt_bits [3],
  output logic [6:0]        plt_pal_cnt [3],
  output plt_entry_t        plt_pal [3][64],
  output logic              plt_run_valid [3],
  output logic              plt_run_above [3],
  output logic [6:0]        plt_run_index [3],
  output logic [10:0]       plt_run_len [3],
  input  logic              rd_valid,
  input  logic [1:0]        rd_sel,
  output logic              plt_ctl_busy,
  // ---------- block vector candidates ----------
  input  logic              mvc_frame_start,
  input  logic              mvc_q_valid,
  input  logic [POS_W-1:0]  mvc_q_x,
  input  logic [POS_W-1:0]  mvc_q_y,
  input  logic [2:0]        mvc_q_log2,
  output logic              mvc_out_valid,
  output bv_t               mvc_cand [2],
  output logic [1:0]        mvc_n_spatial,
  input  logic              mvc_upd_valid,
  input  logic [POS_W-1:0]  mvc_upd_x,
  input  logic [POS_W-1:0]  mvc_upd_y,
  input  logic [2:0]        mvc_upd_log2,
  input  logic              mvc_upd_ibc,
  input  bv_t               mvc_upd_bv
);
  ibc_estimation #(.PIC_W(PIC_W), .PIC_H(PIC_H)) u_est (
    .clk, .rst_n,
    .cfg_valid(est_cfg_valid), .cfg_ready(est_cfg_ready), .cfg_op(est_cfg_op),
    .cfg_ctu_x(est_cfg_ctu_x), .cfg_ctu_y(est_cfg_ctu_y), .cfg_cu_x(est_cfg_cu_x), .cfg_cu_y(est_cfg_cu_y),
    .win_we(est_win_we), .win_x(est_win_x), .win_y(est_win_y), .win_data(est_win_data),
    .out_valid(est_out_valid), .out_ready(est_out_ready), .out_list(est_out_list),
    .ht_req(ht_tab_req), .ht_we(ht_tab_we), .ht_addr(ht_tab_addr), .ht_wdata(ht_tab_wdata),
    .ht_gnt(ht_tab_gnt), .ht_rvalid(ht_tab_rvalid), .ht_rdata(ht_tab_rdata),
    .fr_req, .fr_x, .fr_y, .fr_gnt, .fr_rvalid, .fr_rdata,
    .ev_2d(est_events[0]), .ev_hash_hit(est_events[1]), .ev_hash_drop(est_events[2])
  );

  ibc_ht_stage #(.PIC_W(PIC_W), .PIC_H(PIC_H)) u_ht (
    .clk, .rst_n, .frame_start(ht_frame_start),
    .cfg_valid(ht_cfg_valid), .cfg_ready(ht_cfg_ready), .cfg_cu_x(ht_cfg_cu_x), .cfg_cu_y(ht_cfg_cu_y),
    .cfg_log2(ht_cfg_log2), .cfg_bv(ht_cfg_bv), .cfg_last(ht_cfg_last),
    .orig_valid(ht_orig_valid), .orig_ready(ht_orig_ready), .orig_data(ht_orig_data),
    .res_valid(ht_res_valid), .res(ht_res), .res_last(ht_res_last),
    .cu_done(ht_cu_done), .cu_x(ht_cu_x), .cu_y(ht_cu_y), .cu_bv(ht_cu_bv), .cu_sad(ht_cu_sad),
    .rec_valid(ht_rec_valid), .rec_ready(ht_rec_ready), .rec_x(ht_rec_x), .rec_y(ht_rec_y), .rec_data(ht_rec_data),
    .mem_req(ht_mem_req), .mem_addr(ht_mem_addr), .mem_gnt(ht_mem_gnt), .mem_rvalid(ht_mem_rvalid), .mem_rdata(ht_mem_rdata),
    .wr_valid(ht_wr_valid), .wr_ready(ht_wr_ready), .wr_addr(ht_wr_addr), .wr_data(ht_wr_data),
    .ev_stall(ht_events[0]), .ev_hit(ht_events[1]), .ev_miss(ht_events[2]), .ev_split(ht_events[3])
  );

  plt_unit #(.PRED_SIZE(64), .PAL_SIZE(64), .LANES(4)) u_plt (
    .clk, .rst_n, .cl_start, .err_margin, .cl_pix_valid, .cl_pix, .cl_busy,
    .thr(plt_thr), .esc_thr(plt_esc_thr),
    .new16_valid, .new16_c, .new16_last, .new32_valid, .new32_c, .new32_last,
    .start(plt_start), .pix_valid(plt_pix_valid), .pix(plt_pix), .pix_ready(plt_pix_ready),
    .busy(plt_busy), .done(plt_done), .bits(plt_bits), .pal_cnt(plt_pal_cnt), .pal(plt_pal),
    .run_valid(plt_run_valid), .run_above(plt_run_above), .run_index(plt_run_index), .run_len(plt_run_len),
    .rd_valid, .rd_sel, .ctl_busy(plt_ctl_busy)
  );

  mv_candidate #(.PIC_W(PIC_W), .PIC_H(PIC_H)) u_mvc (
    .clk, .rst_n, .frame_start(mvc_frame_start),
    .q_valid(mvc_q_valid), .q_x(mvc_q_x), .q_y(mvc_q_y), .q_log2(mvc_q_log2),
    .out_valid(mvc_out_valid), .cand(mvc_cand), .n_spatial(mvc_n_spatial),
    .upd_valid(mvc_upd_valid), .upd_x(mvc_upd_x), .upd_y(mvc_upd_y), .upd_log2(mvc_upd_log2),
    .upd_ibc(mvc_upd_ibc), .upd_bv(mvc_upd_bv)
  );
endmodule
