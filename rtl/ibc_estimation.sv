// ibc_estimation: IBC estimation stage. For every 8x8 CU it produces a short
// list of promising block vectors from original (not reconstructed) samples,
// so it runs outside the reconstruction feedback loop.
//
// Configuration packets (a FIFO) drive a main controller:
//   OP_FRAME  : clear the hash table (start of a frame);
//   OP_CU     : estimate one CU. The local search (1-D and activity-gated
//               2-D search over a 1x2 CTU window) and the hash search run in
//               parallel; their best lists are combined and the combined
//               list is pushed into the output FIFO;
//   OP_CTU    : hash update after a CTU is finished: the 64 8x8 blocks of
//               the current CTU are hashed and inserted into the table.
// Hash search: the CU's 13-bit key is looked up; every stored block position
// becomes a vector, is checked by bv_valid_check (whole coded area), and its
// eight reference rows are fetched from the frame memory back to back and
// scored by SAD. Both memories are external DRAM; the hash table port and
// the frame read port are in-order request/grant ports.
// The window load port of the local search is passed through.
// All sizes follow the document except K (4) and the 2-D search step.
module ibc_estimation
  import scc_pkg::*;
#(
  parameter int MAX_PER_KEY = 100,
  parameter int STEP2D      = 4,
  parameter int PIC_W       = 1920,
  parameter int PIC_H       = 1080
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration packets
  input  logic             cfg_valid,
  output logic             cfg_ready,
  input  logic [1:0]       cfg_op,       // 0 frame, 1 CU, 2 CTU done
  input  logic [POS_W-1:0] cfg_ctu_x,
  input  logic [POS_W-1:0] cfg_ctu_y,
  input  logic [5:0]       cfg_cu_x,
  input  logic [5:0]       cfg_cu_y,
  // CTU buffer -> search window
  input  logic             win_we,
  input  logic [6:0]       win_x,
  input  logic [5:0]       win_y,
  input  pix_t             win_data [8],
  // combined candidate lists to the high throughput stage
  output logic             out_valid,
  input  logic             out_ready,
  output cand_list_t       out_list,
  // hash table DRAM port
  output logic             ht_req,
  output logic             ht_we,
  output logic [31:0]      ht_addr,
  output logic [31:0]      ht_wdata,
  input  logic             ht_gnt,
  input  logic             ht_rvalid,
  input  logic [31:0]      ht_rdata,
  // frame DRAM read port, 8 samples of one row per beat
  output logic             fr_req,
  output logic [POS_W-1:0] fr_x,
  output logic [POS_W-1:0] fr_y,
  input  logic             fr_gnt,
  input  logic             fr_rvalid,
  input  pix_t             fr_rdata [8],
  // event counters for observation
  output logic             ev_2d,
  output logic             ev_hash_hit,
  output logic             ev_hash_drop
);
  localparam int K = NCAND;
  localparam logic [1:0] OP_FRAME = 2'd0, OP_CU = 2'd1, OP_CTU = 2'd2;

  typedef struct packed {
    logic [1:0]       op;
    logic [POS_W-1:0] ctu_x, ctu_y;
    logic [5:0]       cu_x, cu_y;
  } cfg_t;

  // ---------------- configuration FIFO ----------------
  cfg_t cfg_in, cfg;
  logic cfg_v, cfg_pop;
  assign cfg_in = '{op: cfg_op, ctu_x: cfg_ctu_x, ctu_y: cfg_ctu_y, cu_x: cfg_cu_x, cu_y: cfg_cu_y};
  sync_fifo #(.T(cfg_t), .DEPTH(8)) u_cfg_fifo (
    .clk, .rst_n, .in_valid(cfg_valid), .in_ready(cfg_ready), .in_data(cfg_in),
    .out_valid(cfg_v), .out_ready(cfg_pop), .out_data(cfg), .count()
  );

  typedef enum logic [2:0] {M_IDLE, M_FRAME, M_CU, M_COMB, M_PUSH, M_UPD} mstate_t;
  mstate_t mst;
  cfg_t    cmd;

  // ---------------- local search ----------------
  logic  ls_start, ls_busy, ls_done, ls_2d;
  cand_t ls_list [K];
  logic [6:0] rd_x;
  logic [5:0] rd_y;
  pix_t  rd_blk [64];

  local_search #(.K(K), .STEP2D(STEP2D), .PIC_W(PIC_W), .PIC_H(PIC_H)) u_local (
    .clk, .rst_n, .win_we, .win_x, .win_y, .win_data,
    .rd_x, .rd_y, .rd_blk,
    .ctu_x(cmd.ctu_x), .ctu_y(cmd.ctu_y), .start(ls_start), .cu_x(cmd.cu_x), .cu_y(cmd.cu_y),
    .busy(ls_busy), .done(ls_done), .did_2d(ls_2d), .list(ls_list)
  );

  // ---------------- hash units ----------------
  logic hc_in, hc_v, hu_in, hu_v;
  logic [KEY_W-1:0] hc_key, hu_key;
  logic [15:0] hc_act_unused, hu_act_unused;
  logic [5:0] upd_blk;          // block index during hash update
  logic [1:0] ust;              // hash update step: hash, wait, insert

  // The hash calculation reads the current CU, the hash update the CTU's blocks.
  assign rd_x = (mst == M_UPD) ? 7'(CTU) + {1'b0, upd_blk[2:0], 3'b000} : 7'(CTU) + 7'(cmd.cu_x);
  assign rd_y = (mst == M_UPD) ? {upd_blk[5:3], 3'b000} : cmd.cu_y;

  hash_calc u_hash_calc (.clk, .rst_n, .in_valid(hc_in), .blk(rd_blk),
                         .out_valid(hc_v), .key(hc_key), .activity(hc_act_unused));
  hash_calc u_hash_update (.clk, .rst_n, .in_valid(hu_in), .blk(rd_blk),
                           .out_valid(hu_v), .key(hu_key), .activity(hu_act_unused));

  logic ht_busy, ins_valid, ins_ready, lk_valid, lk_ready, ht_out_v, lk_done;
  logic [2*POS_W-1:0] ins_pos, ht_out_pos;
  logic [KEY_W-1:0] ins_key, lk_key;

  hash_table_ctrl #(.MAX_PER_KEY(MAX_PER_KEY)) u_table (
    .clk, .rst_n, .clear_req(mst == M_FRAME), .busy(ht_busy),
    .ins_valid, .ins_ready, .ins_key, .ins_pos, .ins_drop(ev_hash_drop),
    .lk_valid, .lk_ready, .lk_key, .out_valid(ht_out_v), .out_pos(ht_out_pos), .lk_done,
    .mem_req(ht_req), .mem_we(ht_we), .mem_addr(ht_addr), .mem_wdata(ht_wdata),
    .mem_gnt(ht_gnt), .mem_rvalid(ht_rvalid), .mem_rdata(ht_rdata)
  );

  // hash update: one block hashed per cycle into a holding register, then inserted
  assign ins_valid = mst == M_UPD && ust == 2'd2;
  assign ins_pos   = {cmd.ctu_x + POS_W'({upd_blk[2:0], 3'b000}), cmd.ctu_y + POS_W'({upd_blk[5:3], 3'b000})};

  // ---------------- hash search ----------------
  typedef enum logic [2:0] {H_IDLE, H_KEY, H_LOOK, H_CAND, H_FETCH, H_INS, H_DONE} hstate_t;
  hstate_t hst;
  logic hs_start, hs_done;
  logic [KEY_W-1:0] key_q;
  logic pf_v, pf_pop, pf_in_ready;
  logic [2*POS_W-1:0] pf_pos;
  logic lk_seen;
  bv_t  hbv;
  logic hbv_ok;
  logic [3:0] rows_req, rows_got;
  logic [COST_W-1:0] hsad, row_sad;
  pix_t cur_row [8];
  cand_t hs_list [K];
  logic [POS_W-1:0] cux, cuy;

  assign cux = cmd.ctu_x + POS_W'(cmd.cu_x);
  assign cuy = cmd.ctu_y + POS_W'(cmd.cu_y);

  sync_fifo #(.T(logic [2*POS_W-1:0]), .DEPTH(128)) u_pos_fifo (
    .clk, .rst_n, .in_valid(ht_out_v), .in_ready(pf_in_ready), .in_data(ht_out_pos),
    .out_valid(pf_v), .out_ready(pf_pop), .out_data(pf_pos), .count()
  );

  assign hbv.x = BV_W'(signed'({1'b0, pf_pos[2*POS_W-1:POS_W]})) - BV_W'(signed'({1'b0, cux}));
  assign hbv.y = BV_W'(signed'({1'b0, pf_pos[POS_W-1:0]})) - BV_W'(signed'({1'b0, cuy}));

  bv_valid_check #(.SHAPE(0), .LOCAL(0), .PIC_W(PIC_W), .PIC_H(PIC_H)) u_hchk (
    .cu_x(cux), .cu_y(cuy), .cu_log2(3'd3), .part(1'b0), .bv(hbv), .valid(hbv_ok)
  );

  always_comb
    for (int c = 0; c < 8; c++) cur_row[c] = rd_blk[rows_got[2:0]*8 + c];

  block_sad #(.N(8)) u_row_sad (.cur(cur_row), .ref_pix(fr_rdata), .sad(row_sad));

  best_list #(.K(K)) u_hash_best (
    .clk, .rst_n, .clear(hs_start), .in_valid(hst == H_INS),
    .in_bv(hbv), .in_cost(hsad), .list(hs_list)
  );

  assign hc_in    = hs_start;
  assign lk_valid = hst == H_LOOK && !lk_seen;
  assign lk_key   = key_q;
  assign fr_req   = hst == H_FETCH && rows_req < 4'd8;
  assign fr_x     = POS_W'(pf_pos[2*POS_W-1:POS_W]);
  assign fr_y     = POS_W'(pf_pos[POS_W-1:0]) + POS_W'(rows_req);
  assign pf_pop   = (hst == H_CAND && pf_v && !hbv_ok) || (hst == H_INS);
  assign ev_hash_hit = hst == H_INS;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hst         <= H_IDLE;
      key_q       <= '0;
      lk_seen     <= 1'b0;
      rows_req    <= '0;
      rows_got    <= '0;
      hsad        <= '0;
      hs_done     <= 1'b0;
    end else begin
      unique case (hst)
        H_IDLE: if (hs_start) begin
          hs_done     <= 1'b0;
          lk_seen     <= 1'b0;
          hst         <= H_KEY;
        end
        H_KEY: if (hc_v) begin
          key_q       <= hc_key;
          hst         <= H_LOOK;
        end
        H_LOOK: begin
          if (lk_done) hst <= H_CAND;
        end
        H_CAND: begin
          if (!pf_v) begin
            hs_done <= 1'b1;
            hst     <= H_IDLE;
          end else if (hbv_ok) begin
            rows_req <= '0;
            rows_got <= '0;
            hsad     <= '0;
            hst      <= H_FETCH;
          end
        end
        H_FETCH: begin
          if (fr_req && fr_gnt) rows_req <= rows_req + 1'b1;
          if (fr_rvalid) begin
            hsad     <= hsad + row_sad;
            rows_got <= rows_got + 1'b1;
            if (rows_got == 4'd7) hst <= H_INS;
          end
        end
        H_INS: hst <= H_CAND;
        default: hst <= H_IDLE;
      endcase
      if (hst == H_LOOK && lk_valid && lk_ready) lk_seen <= 1'b1;
    end
  end

  // ---------------- combine and output ----------------
  logic cb_start, cb_done;
  cand_t cb_list [K];
  cand_list_t res;
  logic of_in_ready;

  combine_lists #(.K(K)) u_combine (
    .clk, .rst_n, .start(cb_start), .list_a(ls_list), .list_b(hs_list), .done(cb_done), .list(cb_list)
  );

  always_comb begin
    res.x = cux;
    res.y = cuy;
    for (int i = 0; i < K; i++) res.c[i] = cb_list[i];
  end

  sync_fifo #(.T(cand_list_t), .DEPTH(4)) u_out_fifo (
    .clk, .rst_n, .in_valid(mst == M_PUSH), .in_ready(of_in_ready), .in_data(res),
    .out_valid, .out_ready, .out_data(out_list), .count()
  );

  // ---------------- main controller ----------------
  logic cu_started, ls_ok;
  assign cfg_pop  = mst == M_IDLE && cfg_v;
  assign ls_start = mst == M_CU && !cu_started;
  assign hs_start = mst == M_CU && !cu_started;
  assign cb_start = mst == M_CU && cu_started && ls_ok && hs_done && hst == H_IDLE;
  assign ev_2d    = ls_done && ls_2d;
  assign hu_in    = mst == M_UPD && ust == 2'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst         <= M_IDLE;
      cmd         <= '0;
      cu_started  <= 1'b0;
      ls_ok       <= 1'b0;
      upd_blk     <= '0;
      ust         <= '0;
      ins_key     <= '0;
    end else begin
      unique case (mst)
        M_IDLE: if (cfg_v) begin
          cmd <= cfg;
          unique case (cfg.op)
            OP_FRAME: mst <= M_FRAME;
            OP_CU:    begin mst <= M_CU; cu_started <= 1'b0; ls_ok <= 1'b0; end
            default:  begin mst <= M_UPD; upd_blk <= '0; ust <= '0; end
          endcase
        end
        M_FRAME: if (ht_busy) mst <= M_IDLE;
        M_CU: begin
          cu_started <= 1'b1;
          if (ls_done) ls_ok <= 1'b1;
          if (cb_start) mst <= M_COMB;
        end
        M_COMB: if (cb_done) mst <= M_PUSH;
        M_PUSH: if (of_in_ready) mst <= M_IDLE;
        M_UPD: begin
          // hash one block, insert it, move on
          unique case (ust)
            2'd0: ust <= 2'd1;
            2'd1: if (hu_v) begin
              ins_key <= hu_key;
              ust     <= 2'd2;
            end
            default: if (ins_ready) begin
              ust     <= 2'd0;
              upd_blk <= upd_blk + 1'b1;
              if (upd_blk == 6'd63) mst <= M_IDLE;
            end
          endcase
        end
        default: mst <= M_IDLE;
      endcase
    end
  end
endmodule
