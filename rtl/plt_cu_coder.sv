// plt_cu_coder: one palette CU coder (8x8, 16x16 or 32x32 by CU_SIZE).
//
// Flow for one CU, started by start:
//   1. the CU's cluster centres stream in (new_valid/new_c/new_last) and
//      plt_entry_mapper matches each against the coder's palette predictor,
//      reusing a predictor entry or adding a new one;
//   2. plt_sorter moves reused entries ahead of new ones;
//   3. the CU's pixels stream in, LANES per cycle, and plt_pixel_mapper
//      writes the palette index array (escape index = palette size);
//   4. plt_index_coder codes the index array as runs.
// done pulses with the final palette (pal/pal_cnt, reuse flags), the index
// array and a bit estimate: 24 bits per new entry, one reuse flag per
// predictor entry, 24 bits per escape pixel, plus the run bits.
module plt_cu_coder
  import scc_pkg::*;
#(
  parameter int CU_SIZE   = 8,
  parameter int PRED_SIZE = 64,
  parameter int PAL_SIZE  = 64,
  parameter int LANES     = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  yuv_t        pred [PRED_SIZE],
  input  logic [6:0]  pred_cnt,
  input  logic [17:0] thr,
  input  logic [9:0]  esc_thr,
  input  logic        new_valid,
  input  yuv_t        new_c,
  input  logic        new_last,
  input  logic        pix_valid,
  input  yuv_t        pix [LANES],
  output logic        pix_ready,
  output logic        busy,
  output logic        done,
  output plt_entry_t  pal [PAL_SIZE],
  output logic [6:0]  pal_cnt,
  output logic        reuse [PRED_SIZE],
  output logic [6:0]  idx_arr [CU_SIZE*CU_SIZE],
  output logic        run_valid,
  output logic        run_above,
  output logic [6:0]  run_index,
  output logic [$clog2(CU_SIZE*CU_SIZE+1)-1:0] run_len,
  output logic [COST_W-1:0] bits
);
  typedef enum logic [2:0] {S_IDLE, S_MAP, S_SORT, S_PIX, S_CODE, S_DONE} state_t;
  state_t state;

  logic       em_done, so_done, so_busy, pm_done, ic_done, ic_busy;
  plt_entry_t em_list [PAL_SIZE];
  logic [6:0] em_cnt;
  yuv_t       pal_c [PAL_SIZE];
  logic [$clog2(CU_SIZE*CU_SIZE+1)-1:0] esc_cnt, n_runs;
  logic [COST_W-1:0] run_bits;
  logic [6:0] n_new;

  plt_entry_mapper #(.PRED_SIZE(PRED_SIZE), .PAL_SIZE(PAL_SIZE)) u_map (
    .clk, .rst_n, .start, .pred, .pred_cnt, .thr,
    .in_valid(new_valid && state == S_MAP), .in_c(new_c), .in_last(new_last),
    .done(em_done), .list(em_list), .list_cnt(em_cnt), .reuse
  );

  plt_sorter #(.PAL_SIZE(PAL_SIZE)) u_sort (
    .clk, .rst_n, .load(em_done && state == S_MAP), .in_list(em_list),
    .busy(so_busy), .done(so_done), .out_list(pal)
  );

  always_comb
    for (int i = 0; i < PAL_SIZE; i++) pal_c[i] = pal[i].c;

  plt_pixel_mapper #(.CU_SIZE(CU_SIZE), .PAL_SIZE(PAL_SIZE), .LANES(LANES)) u_pix (
    .clk, .rst_n, .start(so_done), .palette(pal_c), .pal_cnt(em_cnt), .esc_thr,
    .pix_valid(pix_valid && state == S_PIX), .pix, .pix_ready, .done(pm_done),
    .idx_arr, .esc_cnt
  );

  plt_index_coder #(.CU_SIZE(CU_SIZE)) u_code (
    .clk, .rst_n, .start(pm_done), .idx_arr, .pal_cnt(em_cnt), .busy(ic_busy), .done(ic_done),
    .run_valid, .run_above, .run_index, .run_len, .bits(run_bits), .n_runs
  );

  always_comb begin
    n_new = '0;
    for (int i = 0; i < PAL_SIZE; i++) n_new += 7'(pal[i].valid && pal[i].is_new);
  end

  assign pal_cnt = em_cnt;
  assign busy    = state != S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      bits  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:  if (start) state <= S_MAP;
        S_MAP:   if (em_done) state <= S_SORT;
        S_SORT:  if (so_done) state <= S_PIX;
        S_PIX:   if (pm_done) state <= S_CODE;
        S_CODE:  if (ic_done) begin
          bits  <= run_bits + COST_W'(n_new) * 24 + COST_W'(pred_cnt) + COST_W'(esc_cnt) * 24;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
