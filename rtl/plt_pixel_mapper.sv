// plt_pixel_mapper: gives every pixel of a CU the index of its closest
// palette entry ("Pixel Cost Calculator", "Comparator", "Palette Index
// Array").
//
// The CU is split into LANES (4) horizontal bands of CU_SIZE/LANES rows.
// Each cycle pix[k] carries the next pixel of band k in raster order, so a
// CU takes CU_SIZE*CU_SIZE/LANES input cycles. Stage 1 registers the Y/U/V
// SAD of each lane's pixel to every palette entry; stage 2 picks the
// smallest (lowest index on ties) and writes the index array. A pixel whose
// best SAD exceeds esc_thr, or any pixel when the palette is empty, is an
// escape pixel and gets index pal_cnt. done pulses once the last index is
// written (two cycles after the last input beat).
module plt_pixel_mapper
  import scc_pkg::*;
#(
  parameter int CU_SIZE  = 8,
  parameter int PAL_SIZE = 64,
  parameter int LANES    = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  yuv_t       palette [PAL_SIZE],
  input  logic [6:0] pal_cnt,
  input  logic [9:0] esc_thr,
  input  logic       pix_valid,
  input  yuv_t       pix [LANES],
  output logic       pix_ready,
  output logic       done,
  output logic [6:0] idx_arr [CU_SIZE*CU_SIZE],
  output logic [$clog2(CU_SIZE*CU_SIZE+1)-1:0] esc_cnt
);
  localparam int NPIX = CU_SIZE * CU_SIZE;
  localparam int BAND = NPIX / LANES;
  localparam int PW   = $clog2(BAND + 1);

  logic [9:0] cost [LANES][PAL_SIZE];
  logic       v1;
  logic [PW-1:0] pos1, cnt_in;
  logic       active;
  logic [6:0] best_idx [LANES];
  logic [9:0] best_cost [LANES];

  assign pix_ready = active && cnt_in < PW'(BAND);

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      best_idx[k]  = '0;
      best_cost[k] = cost[k][0];
      for (int j = 1; j < PAL_SIZE; j++)
        if (7'(j) < pal_cnt && cost[k][j] < best_cost[k]) begin
          best_cost[k] = cost[k][j];
          best_idx[k]  = 7'(j);
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1      <= 1'b0;
      pos1    <= '0;
      cnt_in  <= '0;
      active  <= 1'b0;
      done    <= 1'b0;
      esc_cnt <= '0;
      for (int k = 0; k < LANES; k++)
        for (int j = 0; j < PAL_SIZE; j++) cost[k][j] <= '0;
      for (int i = 0; i < NPIX; i++) idx_arr[i] <= '0;
    end else begin
      done <= 1'b0;
      // stage 1: pixel cost calculator
      v1 <= pix_valid && pix_ready;
      if (pix_valid && pix_ready) begin
        pos1   <= cnt_in;
        cnt_in <= cnt_in + 1'b1;
        for (int k = 0; k < LANES; k++)
          for (int j = 0; j < PAL_SIZE; j++) cost[k][j] <= yuv_sad(pix[k], palette[j]);
      end
      // stage 2: comparator and index array write
      if (v1) begin
        for (int k = 0; k < LANES; k++) begin
          if (pal_cnt == '0 || best_cost[k] > esc_thr) begin
            idx_arr[k * BAND + 32'(pos1)] <= pal_cnt;
          end else begin
            idx_arr[k * BAND + 32'(pos1)] <= best_idx[k];
          end
        end
        esc_cnt <= esc_cnt + ($bits(esc_cnt))'(count_esc());
        if (pos1 == PW'(BAND - 1)) begin
          done   <= 1'b1;
          active <= 1'b0;
        end
      end
      if (start) begin
        active  <= 1'b1;
        cnt_in  <= '0;
        esc_cnt <= '0;
      end
    end
  end

  function automatic int count_esc();
    int n = 0;
    for (int k = 0; k < LANES; k++)
      if (pal_cnt == '0 || best_cost[k] > esc_thr) n++;
    return n;
  endfunction
endmodule
