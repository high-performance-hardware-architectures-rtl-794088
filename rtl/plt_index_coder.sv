// plt_index_coder: codes a CU's palette index array as runs and estimates
// the bits ("CU coding").
//
// Scan: horizontal traverse, i.e. even rows left to right and odd rows
// right to left. At the start of each run the coder walks forward one
// position per cycle, extending two candidate runs at once:
//   copy-index : positions with the same index as the run's first position;
//   copy-above : positions whose index equals the one directly above
//                (not available in the first row).
// When neither can be extended, the mode with the longer run is taken (ties
// go to copy-above), instead of choosing by entropy-coded cost. Every run is
// emitted on the run_* outputs and the next run starts after it.
// Bit estimate, from plain binary lengths instead of CABAC:
//   1 mode bit per run outside the first row,
//   ceil(log2(pal_cnt + 1)) index bits per copy-index run (pal_cnt is the
//   escape index), and bit_length(run length) bits per run.
// A CU of P positions with R runs takes about P + R + 2 cycles.
module plt_index_coder
  import scc_pkg::*;
#(
  parameter int CU_SIZE = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [6:0] idx_arr [CU_SIZE*CU_SIZE],
  input  logic [6:0] pal_cnt,
  output logic       busy,
  output logic       done,
  output logic       run_valid,
  output logic       run_above,     // 1 copy-above, 0 copy-index
  output logic [6:0] run_index,
  output logic [$clog2(CU_SIZE*CU_SIZE+1)-1:0] run_len,
  output logic [COST_W-1:0] bits,
  output logic [$clog2(CU_SIZE*CU_SIZE+1)-1:0] n_runs
);
  localparam int NPIX = CU_SIZE * CU_SIZE;
  localparam int SW   = $clog2(NPIX + 1);

  typedef enum logic [1:0] {S_IDLE, S_BEGIN, S_WALK} state_t;
  state_t state;

  logic [SW-1:0] p, q, len_i, len_a;
  logic          go_i, go_a;
  logic [6:0]    ref_idx;

  // traverse scan helpers
  function automatic int raster(input logic [SW-1:0] s);
    int r, c;
    r = int'(s) / CU_SIZE;
    c = int'(s) % CU_SIZE;
    if (r % 2 == 1) c = CU_SIZE - 1 - c;
    return r * CU_SIZE + c;
  endfunction

  function automatic logic [6:0] idx_at(input logic [SW-1:0] s);
    return idx_arr[raster(s) % NPIX];
  endfunction

  function automatic logic above_eq(input logic [SW-1:0] s);
    int rp;
    rp = raster(s);
    if (rp < CU_SIZE) return 1'b0;
    return idx_arr[rp % NPIX] == idx_arr[(rp - CU_SIZE) % NPIX];
  endfunction

  function automatic int bitlen(input int v);
    int n = 0;
    while (v > 0 && n < 32) begin
      n++;
      v = v >> 1;
    end
    return n;
  endfunction

  logic cont_i, cont_a, in_range;
  logic [SW-1:0] len_sel;
  logic          sel_above;

  assign in_range = q < SW'(NPIX);
  assign cont_i   = go_i && in_range && idx_at(q) == ref_idx;
  assign cont_a   = go_a && in_range && above_eq(q);
  assign sel_above = len_a != '0 && len_a >= len_i;
  assign len_sel   = sel_above ? len_a : len_i;
  assign busy      = state != S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      p         <= '0;
      q         <= '0;
      len_i     <= '0;
      len_a     <= '0;
      go_i      <= 1'b0;
      go_a      <= 1'b0;
      ref_idx   <= '0;
      done      <= 1'b0;
      run_valid <= 1'b0;
      run_above <= 1'b0;
      run_index <= '0;
      run_len   <= '0;
      bits      <= '0;
      n_runs    <= '0;
    end else begin
      done      <= 1'b0;
      run_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          p      <= '0;
          bits   <= '0;
          n_runs <= '0;
          state  <= S_BEGIN;
        end
        S_BEGIN: begin
          if (p >= SW'(NPIX)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            ref_idx <= idx_at(p);
            len_i   <= SW'(1);
            len_a   <= SW'(above_eq(p));
            go_i    <= 1'b1;
            go_a    <= above_eq(p);
            q       <= p + 1'b1;
            state   <= S_WALK;
          end
        end
        S_WALK: begin
          if (cont_i || cont_a) begin
            if (cont_i) len_i <= len_i + 1'b1;
            if (cont_a) len_a <= len_a + 1'b1;
            go_i <= cont_i;
            go_a <= cont_a;
            q    <= q + 1'b1;
          end else begin
            run_valid <= 1'b1;
            run_above <= sel_above;
            run_index <= ref_idx;
            run_len   <= len_sel;
            n_runs    <= n_runs + 1'b1;
            bits      <= bits + COST_W'(bitlen(int'(len_sel)))
                              + COST_W'(p >= SW'(CU_SIZE) ? 1 : 0)
                              + (sel_above ? '0 : COST_W'(bitlen(int'(pal_cnt))));
            p         <= p + len_sel;
            state     <= S_BEGIN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
