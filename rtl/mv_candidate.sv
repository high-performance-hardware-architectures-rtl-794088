// mv_candidate: block vector predictor candidates for syntax generation
// ("Motion Vector Candidate" with its "Motion Vector Line Buffer" and
// "Intra/IBC Mode Line Buffer").
//
// The source architecture only states that this unit gives the syntax
// generator its parameters from the prediction mode and vectors of the
// neighbouring CUs. The candidate rule used here is the block vector
// predictor of the screen content coding drafts: the left-bottom neighbour
// A1 (x-1, y+h-1) and the above-right neighbour B1 (x+w-1, y-1), each taken
// when it is inside the picture and IBC coded (B1 only if it differs from
// A1), then filled up with the last two coded vectors of the picture, and
// finally with (-2w, 0) and (-w, 0). Fill-up values are not pruned against
// the spatial ones, and a repeat of the latest coded vector is not stored
// twice (own choices).
// Storage, on an 8x8 grid:
//   mode/vector line buffer: one entry per 8-sample column of the picture,
//     holding the bottom row of the CU that last covered it (this is the row
//     above for the next CTU row as well as inside the CTU);
//   left column buffer: one entry per 8-sample row of a CTU, holding the
//     right column of the CU that last covered it.
// Interface: q_valid with the CU position and size asks for the two
// candidates, answered one cycle later on out_valid/cand. upd_valid records
// the final decision of a CU (IBC or not, and its vector); CUs must be
// recorded in coding order. frame_start clears all stored modes.
module mv_candidate
  import scc_pkg::*;
#(
  parameter int PIC_W = 1920,
  parameter int PIC_H = 1080
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             frame_start,
  // query
  input  logic             q_valid,
  input  logic [POS_W-1:0] q_x,
  input  logic [POS_W-1:0] q_y,
  input  logic [2:0]       q_log2,       // 3, 4 or 5
  output logic             out_valid,
  output bv_t              cand [2],
  output logic [1:0]       n_spatial,    // how many candidates came from neighbours
  // decision of a coded CU
  input  logic             upd_valid,
  input  logic [POS_W-1:0] upd_x,
  input  logic [POS_W-1:0] upd_y,        // only its position inside the CTU is used
  input  logic [2:0]       upd_log2,
  input  logic             upd_ibc,
  input  bv_t              upd_bv
);
  localparam int COLS = (PIC_W + 7) / 8;
  localparam int CW   = $clog2(COLS);

  logic       top_ibc  [COLS];
  bv_t        top_bv   [COLS];
  logic       left_ibc [8];
  bv_t        left_bv  [8];
  bv_t        last0, last1;
  logic [1:0] n_last;

  // ---------------- query ----------------
  logic [POS_W-1:0] w, ay, bx;
  logic   a_ok, b_ok;
  bv_t    a_bv, b_bv, c0, c1, d0, d1;
  logic [1:0] ns;
  assign w = POS_W'(1) << q_log2;
  always_comb begin
    ay = q_y + w - 1'b1;
    bx = q_x + w - 1'b1;
    a_ok = q_x != '0 && ay < POS_W'(PIC_H) && left_ibc[ay[5:3]];
    a_bv = left_bv[ay[5:3]];
    b_ok = q_y != '0 && bx < POS_W'(PIC_W) && top_ibc[CW'(bx >> 3)];
    b_bv = top_bv[CW'(bx >> 3)];
    if (a_ok && b_ok && b_bv == a_bv) b_ok = 1'b0;
    // fill-up values: last coded vectors, then (-2w, 0) and (-w, 0)
    d0.x = BV_W'(0) - BV_W'({w, 1'b0}); d0.y = '0;
    d1.x = BV_W'(0) - BV_W'(w);         d1.y = '0;
    c0 = d0;
    c1 = d1;
    if (n_last == 2'd2) begin c0 = last0; c1 = last1; end
    else if (n_last == 2'd1) begin c0 = last0; c1 = d0; end
    ns = 2'(a_ok) + 2'(b_ok);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      cand[0]   <= '0;
      cand[1]   <= '0;
      n_spatial <= '0;
    end else begin
      out_valid <= q_valid;
      if (q_valid) begin
        n_spatial <= ns;
        if (a_ok && b_ok)      begin cand[0] <= a_bv; cand[1] <= b_bv; end
        else if (a_ok)         begin cand[0] <= a_bv; cand[1] <= c0; end
        else if (b_ok)         begin cand[0] <= b_bv; cand[1] <= c0; end
        else                   begin cand[0] <= c0;   cand[1] <= c1; end
      end
    end
  end

  // ---------------- update ----------------
  logic [POS_W-1:0] uw;
  assign uw = POS_W'(1) << upd_log2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < COLS; i++) begin top_ibc[i] <= 1'b0; top_bv[i] <= '0; end
      for (int i = 0; i < 8; i++) begin left_ibc[i] <= 1'b0; left_bv[i] <= '0; end
      last0  <= '0;
      last1  <= '0;
      n_last <= '0;
    end else if (frame_start) begin
      for (int i = 0; i < COLS; i++) top_ibc[i] <= 1'b0;
      for (int i = 0; i < 8; i++) left_ibc[i] <= 1'b0;
      n_last <= '0;
    end else if (upd_valid) begin
      for (int i = 0; i < 4; i++)
        if (POS_W'(i * 8) < uw && 32'(upd_x >> 3) + i < COLS) begin
          top_ibc[CW'(upd_x >> 3) + CW'(i)] <= upd_ibc;
          top_bv[CW'(upd_x >> 3) + CW'(i)]  <= upd_bv;
        end
      for (int i = 0; i < 4; i++)
        if (POS_W'(i * 8) < uw) begin
          left_ibc[upd_y[5:3] + 3'(i)] <= upd_ibc;
          left_bv[upd_y[5:3] + 3'(i)]  <= upd_bv;
        end
      if (upd_ibc) begin
        // most recent first; a repeat of the latest vector is not stored twice
        if (n_last == '0 || upd_bv != last0) begin
          last0 <= upd_bv;
          last1 <= last0;
          if (n_last != 2'd2) n_last <= n_last + 1'b1;
        end
      end
    end
  end
endmodule
