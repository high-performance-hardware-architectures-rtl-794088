// plt_controller: palette control module. Keeps the palette predictor of
// each CU coder and updates it when rate-distortion optimisation has chosen
// the palette result of one coder.
//
// Update rule (the predictor update of the standard): the new predictor is
// the chosen CU's palette in its final order, followed by the entries of the
// chosen coder's old predictor that the CU did not reuse, in their old
// order, cut at PRED_SIZE. The palette is copied in one cycle, then the old
// predictor is walked one entry per cycle, so an update takes PRED_SIZE + 2
// cycles (busy high). The new predictor is then written to every coder, so
// all coders continue from the most recently used palette. Reset empties
// all predictors.
module plt_controller
  import scc_pkg::*;
#(
  parameter int NUM       = 3,
  parameter int PRED_SIZE = 64,
  parameter int PAL_SIZE  = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        upd_valid,
  input  logic [1:0]  upd_sel,
  input  plt_entry_t  sel_pal [PAL_SIZE],
  input  logic [6:0]  sel_cnt,
  input  logic        sel_reuse [PRED_SIZE],
  output logic        busy,
  output yuv_t        pred [NUM][PRED_SIZE],
  output logic [6:0]  pred_cnt [NUM]
);
  typedef enum logic [1:0] {S_IDLE, S_WALK, S_COMMIT} state_t;
  state_t state;

  yuv_t       tab [PRED_SIZE];
  logic [6:0] tab_cnt;
  logic [6:0] j;
  logic [1:0] sel_q;
  logic       reuse_q [PRED_SIZE];

  assign busy = state != S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      tab_cnt <= '0;
      j       <= '0;
      sel_q   <= '0;
      for (int i = 0; i < PRED_SIZE; i++) begin
        tab[i]     <= '0;
        reuse_q[i] <= 1'b0;
      end
      for (int n = 0; n < NUM; n++) begin
        pred_cnt[n] <= '0;
        for (int i = 0; i < PRED_SIZE; i++) pred[n][i] <= '0;
      end
    end else begin
      unique case (state)
        S_IDLE: if (upd_valid) begin
          for (int i = 0; i < PRED_SIZE; i++) begin
            tab[i]     <= (i < PAL_SIZE) ? sel_pal[i % PAL_SIZE].c : '0;
            reuse_q[i] <= sel_reuse[i];
          end
          tab_cnt <= (sel_cnt > 7'(PRED_SIZE)) ? 7'(PRED_SIZE) : sel_cnt;
          sel_q   <= upd_sel;
          j       <= '0;
          state   <= S_WALK;
        end
        S_WALK: begin
          if (j < pred_cnt[int'(sel_q) % NUM] && !reuse_q[j[$clog2(PRED_SIZE)-1:0]] && tab_cnt < 7'(PRED_SIZE)) begin
            tab[tab_cnt[$clog2(PRED_SIZE)-1:0]] <= pred[int'(sel_q) % NUM][j[$clog2(PRED_SIZE)-1:0]];
            tab_cnt <= tab_cnt + 1'b1;
          end
          if (j == 7'(PRED_SIZE - 1)) state <= S_COMMIT;
          j <= j + 1'b1;
        end
        S_COMMIT: begin
          for (int n = 0; n < NUM; n++) begin
            pred[n]     <= tab;
            pred_cnt[n] <= tab_cnt;
          end
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
