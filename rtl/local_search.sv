// local_search: block-vector search of one 8x8 CU over a 1x2 CTU window
// (the "Local Search" of the IBC estimation stage, with its CU read and its
// controller).
//
// The window holds the original samples of the CTU to the left (columns
// 0..63) and of the current CTU (columns 64..127), 64 rows, loaded eight
// samples per write. After start the controller scans, one candidate per
// cycle:
//   1. horizontal 1-D search: every column on the CU's own rows;
//   2. vertical 1-D search: every row in the CU's own columns;
//   3. 2-D search on a STEP2D grid over the whole window, only when the luma
//      activity min(sum_h, sum_v) of the CU exceeds ACT_THR (168).
// Each candidate's 8x8 SAD is taken in one cycle from the window, its vector
// is checked by bv_valid_check (window mode) and valid ones go to a K-entry
// best list. An extra combinational port reads any 8x8 block of the window
// for the hash units. done pulses when the list is final; it stays readable until
// the next start. Cycles from start to done: 3 + 121 + 57 + 2 (+ 465 with the 2-D pass at
// STEP2D = 4).
module local_search
  import scc_pkg::*;
#(
  parameter int K       = 4,
  parameter int STEP2D  = 4,
  parameter int ACT_THR = 168,
  parameter int PIC_W   = 1920,
  parameter int PIC_H   = 1080
) (
  input  logic             clk,
  input  logic             rst_n,
  // window load
  input  logic             win_we,
  input  logic [6:0]       win_x,       // multiple of 8
  input  logic [5:0]       win_y,
  input  pix_t             win_data [8],
  // read of any 8x8 block of the window (hash calculation and update)
  input  logic [6:0]       rd_x,
  input  logic [5:0]       rd_y,
  output pix_t             rd_blk [64],
  // search command
  input  logic [POS_W-1:0] ctu_x,       // picture position of the current CTU
  input  logic [POS_W-1:0] ctu_y,
  input  logic             start,
  input  logic [5:0]       cu_x,        // CU offset inside the CTU, multiple of 8
  input  logic [5:0]       cu_y,
  output logic             busy,
  output logic             done,
  output logic             did_2d,
  output cand_t            list [K]
);
  localparam int WIN_W = 2 * CTU;
  localparam int WIN_H = CTU;

  typedef enum logic [2:0] {S_IDLE, S_ACT, S_DEC, S_H, S_V, S_2D, S_DRAIN} state_t;
  state_t state;

  pix_t win [WIN_H][WIN_W];
  pix_t cur [64], refb [64];
  logic [6:0] wx;
  logic [5:0] wy;
  logic [5:0] cx, cy;
  logic       act_valid, hc_valid;
  logic [KEY_W-1:0] unused_key;
  logic [15:0] activity;
  logic [COST_W-1:0] sad_c;
  logic cand_ok;
  bv_t  bv_c;
  logic p_valid;
  bv_t  p_bv;
  logic [COST_W-1:0] p_sad;
  logic [1:0] drain;

  always_ff @(posedge clk) begin
    if (win_we)
      for (int i = 0; i < 8; i++) win[win_y][win_x + 7'(i)] <= win_data[i];
  end

  always_comb begin
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        cur[r*8+c]  = win[cy + 6'(r)][7'(CTU) + 7'(cx) + 7'(c)];
        refb[r*8+c] = win[6'(wy + 6'(r))][7'(wx + 7'(c))];
        rd_blk[r*8+c] = win[6'(rd_y + 6'(r))][7'(rd_x + 7'(c))];
      end
  end

  hash_calc u_act (
    .clk, .rst_n, .in_valid(state == S_ACT), .blk(cur),
    .out_valid(hc_valid), .key(unused_key), .activity(activity)
  );
  assign act_valid = hc_valid;

  block_sad #(.N(64)) u_sad (.cur(cur), .ref_pix(refb), .sad(sad_c));

  assign bv_c.x = BV_W'(signed'({1'b0, wx})) - BV_W'(signed'({1'b0, 7'(CTU) + 7'(cx)}));
  assign bv_c.y = BV_W'(signed'({1'b0, wy})) - BV_W'(signed'({1'b0, cy}));

  bv_valid_check #(.SHAPE(0), .LOCAL(1), .PIC_W(PIC_W), .PIC_H(PIC_H)) u_chk (
    .cu_x(ctu_x + POS_W'(cx)), .cu_y(ctu_y + POS_W'(cy)), .cu_log2(3'd3), .part(1'b0),
    .bv(bv_c), .valid(cand_ok)
  );

  best_list #(.K(K)) u_best (
    .clk, .rst_n, .clear(start && state == S_IDLE), .in_valid(p_valid),
    .in_bv(p_bv), .in_cost(p_sad), .list(list)
  );

  assign busy = state != S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      wx      <= '0;
      wy      <= '0;
      cx      <= '0;
      cy      <= '0;
      p_valid <= 1'b0;
      p_bv    <= '0;
      p_sad   <= '0;
      done    <= 1'b0;
      did_2d  <= 1'b0;
      drain   <= '0;
    end else begin
      done    <= 1'b0;
      p_valid <= (state == S_H || state == S_V || state == S_2D) && cand_ok;
      p_bv    <= bv_c;
      p_sad   <= sad_c;
      unique case (state)
        S_IDLE: if (start) begin
          cx     <= cu_x;
          cy     <= cu_y;
          did_2d <= 1'b0;
          state  <= S_ACT;
        end
        S_ACT: state <= S_DEC;
        S_DEC: if (act_valid) begin
          did_2d <= activity > 16'(ACT_THR);
          wx     <= '0;
          wy     <= cy;
          state  <= S_H;
        end
        S_H: begin
          if (wx == 7'(WIN_W - 8)) begin
            wx    <= 7'(CTU) + 7'(cx);
            wy    <= '0;
            state <= S_V;
          end else wx <= wx + 1'b1;
        end
        S_V: begin
          if (wy == 6'(WIN_H - 8)) begin
            wx    <= '0;
            wy    <= '0;
            state <= did_2d ? S_2D : S_DRAIN;
            drain <= '0;
          end else wy <= wy + 1'b1;
        end
        S_2D: begin
          if (32'(wx) + STEP2D > WIN_W - 8) begin
            wx <= '0;
            if (32'(wy) + STEP2D > WIN_H - 8) begin
              state <= S_DRAIN;
              drain <= '0;
            end else wy <= wy + 6'(STEP2D);
          end else wx <= wx + 7'(STEP2D);
        end
        S_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 2'd1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
