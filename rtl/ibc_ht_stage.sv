// ibc_ht_stage: IBC high throughput stage. Builds the IBC prediction of a
// CU from reconstructed pixels for each candidate block vector, forms the
// residuals, keeps the best candidate per CU, and writes reconstructed
// pixels back to DRAM while tracking which CTUs are complete.
//
// Main controller: takes configuration packets {CU position, log2 size,
// vector, last} from a FIFO. Before a packet starts, the completed CTU
// tracker must report its reference area as written; otherwise the stage
// stalls (ev_stall). A started packet is cut into chunks of 8 samples, one
// per cycle, row by row.
// Reconstructed residual loader: a chunk at byte address a needs cache line
// a/32, and also line a/32 + 1 when it crosses a line boundary (two
// cycles). Requests go through ref_cache; the answers are reassembled in
// order into 8-sample prediction beats and queued for the residual
// generator. Requests are only issued while the prediction queue has room.
// Residual generator: pairs prediction beats with the original-sample FIFO
// (the original CU must be supplied once per candidate) and emits residuals
// towards RDOQ/transform. At the end of each candidate its SAD is compared;
// after a packet flagged last, the CU's best vector and SAD are reported on
// cu_done.
// Reconstruction feedback: write_to_ddr collects 32x32 blocks and writes
// them as 256-bit rows; ctu_tracker records them.
// With a warm cache and chunks that do not cross lines an 8x8 prediction
// takes 8 cycles, back to back across packets.
module ibc_ht_stage
  import scc_pkg::*;
#(
  parameter int PIC_W       = 1920,
  parameter int PIC_H       = 1080,
  parameter int CACHE_LINES = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_start,
  // configuration packets
  input  logic              cfg_valid,
  output logic              cfg_ready,
  input  logic [POS_W-1:0]  cfg_cu_x,
  input  logic [POS_W-1:0]  cfg_cu_y,
  input  logic [2:0]        cfg_log2,     // 3, 4 or 5
  input  bv_t               cfg_bv,
  input  logic              cfg_last,     // last candidate of this CU
  // original samples, 8 per beat, raster order
  input  logic              orig_valid,
  output logic              orig_ready,
  input  pix_t              orig_data [8],
  // residuals towards RDOQ / transform
  output logic              res_valid,
  output logic signed [8:0] res [8],
  output logic              res_last,
  // best candidate of a CU
  output logic              cu_done,
  output logic [POS_W-1:0]  cu_x,
  output logic [POS_W-1:0]  cu_y,
  output bv_t               cu_bv,
  output logic [COST_W-1:0] cu_sad,
  // reconstructed feedback from RDOQ, 32x32 blocks
  input  logic              rec_valid,
  output logic              rec_ready,
  input  logic [POS_W-1:0]  rec_x,
  input  logic [POS_W-1:0]  rec_y,
  input  pix_t              rec_data [8],
  // DRAM read (cache line) and write (picture row) ports
  output logic              mem_req,
  output logic [26:0]       mem_addr,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [255:0]      mem_rdata,
  output logic              wr_valid,
  input  logic              wr_ready,
  output logic [31:0]       wr_addr,
  output logic [255:0]      wr_data,
  // events
  output logic              ev_stall,
  output logic              ev_hit,
  output logic              ev_miss,
  output logic              ev_split
);
  typedef struct packed {
    logic [POS_W-1:0] x, y;
    logic [2:0]       log2;
    bv_t              bv;
    logic             last;
  } pkt_t;

  typedef struct packed {
    logic [4:0] off;
    logic       two;
    logic       part;
    logic       last;
  } meta_t;

  typedef struct packed {
    logic [63:0] d;
    logic        last;
  } beat_t;

  // ---------------- configuration FIFO and main controller ----------------
  pkt_t pin, head, cur;
  logic head_v, pop;
  assign pin = '{x: cfg_cu_x, y: cfg_cu_y, log2: cfg_log2, bv: cfg_bv, last: cfg_last};
  sync_fifo #(.T(pkt_t), .DEPTH(8)) u_cfg (
    .clk, .rst_n, .in_valid(cfg_valid), .in_ready(cfg_ready), .in_data(pin),
    .out_valid(head_v), .out_ready(pop), .out_data(head), .count()
  );

  // reference area of the head packet, checked against the tracker
  logic signed [BV_W+1:0] hx0, hy0;
  logic [POS_W-1:0] qx0, qy0, qx1, qy1;
  logic head_avail, head_in_pic;
  always_comb begin
    hx0 = (BV_W+2)'(head.x) + (BV_W+2)'(head.bv.x);
    hy0 = (BV_W+2)'(head.y) + (BV_W+2)'(head.bv.y);
    head_in_pic = hx0 >= 0 && hy0 >= 0 &&
                  hx0 + ((BV_W+2)'(1) << head.log2) <= PIC_W &&
                  hy0 + ((BV_W+2)'(1) << head.log2) <= PIC_H;
    qx0 = POS_W'(hx0);
    qy0 = POS_W'(hy0);
    qx1 = POS_W'(hx0 + ((BV_W+2)'(1) << head.log2) - 1);
    qy1 = POS_W'(hy0 + ((BV_W+2)'(1) << head.log2) - 1);
  end

  logic wb_done;
  logic [POS_W-1:0] wb_x, wb_y;
  ctu_tracker #(.PIC_W(PIC_W), .PIC_H(PIC_H)) u_tracker (
    .clk, .rst_n, .frame_start, .blk_done(wb_done), .blk_x(wb_x), .blk_y(wb_y),
    .q_x0(qx0), .q_y0(qy0), .q_x1(qx1), .q_y1(qy1), .avail(head_avail)
  );

  logic        running, issue, last_chunk;
  logic [5:0]  row;
  logic [1:0]  chk;
  logic        second;        // second line of a split chunk
  logic [31:0] baddr;
  logic        two_lines;
  logic        c_ready, c_valid, c_v_o;
  logic [255:0] c_data;

  // reference position of the current packet (inside the picture, checked before start)
  logic [POS_W-1:0] ref_x, ref_y;
  assign ref_x      = POS_W'((BV_W+2)'(cur.x) + (BV_W+2)'(cur.bv.x));
  assign ref_y      = POS_W'((BV_W+2)'(cur.y) + (BV_W+2)'(cur.bv.y));
  assign baddr      = (32'(ref_y) + 32'(row)) * 32'(PIC_W) + 32'(ref_x) + 32'({chk, 3'b000});
  assign two_lines  = baddr[4:0] > 5'd24;
  assign last_chunk = row == 6'((1 << cur.log2) - 1) && chk == 2'((1 << (cur.log2 - 3)) - 1) && (!two_lines || second);

  logic [$clog2(9)-1:0] pq_count;
  logic [$clog2(9)-1:0] mq_count;
  assign issue = running && c_ready && (32'(pq_count) + 32'(mq_count) < 6);
  // a packet may start when idle or right after the last chunk of the previous one
  assign pop   = head_v && head_in_pic && head_avail && (!running || (issue && last_chunk));
  assign ev_stall = head_v && (!running || (issue && last_chunk)) && !(head_in_pic && head_avail);

  // order of the packets whose predictions are in flight
  pkt_t inflight_head;
  logic if_v;
  logic cand_end;
  sync_fifo #(.T(pkt_t), .DEPTH(8)) u_inflight (
    .clk, .rst_n, .in_valid(pop), .in_ready(), .in_data(head),
    .out_valid(if_v), .out_ready(cand_end), .out_data(inflight_head), .count()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      cur     <= '0;
      row     <= '0;
      chk     <= '0;
      second  <= 1'b0;
    end else begin
      if (issue) begin
        if (two_lines && !second) begin
          second <= 1'b1;
        end else begin
          second <= 1'b0;
          if (chk == 2'((1 << (cur.log2 - 3)) - 1)) begin
            chk <= '0;
            row <= row + 1'b1;
          end else chk <= chk + 1'b1;
          if (last_chunk) running <= 1'b0;
        end
      end
      if (pop) begin
        cur     <= head;
        running <= 1'b1;
        row     <= '0;
        chk     <= '0;
        second  <= 1'b0;
      end
    end
  end

  // ---------------- cache and reconstructed residual loader ----------------
  assign c_valid = issue;
  ref_cache #(.LINES(CACHE_LINES), .ADDR_W(27)) u_cache (
    .clk, .rst_n, .flush(frame_start), .req_valid(c_valid), .req_ready(c_ready),
    .req_addr(27'(baddr >> 5) + 27'(second)), .resp_valid(c_v_o), .resp_data(c_data),
    .hit(ev_hit), .miss(ev_miss), .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata
  );
  assign ev_split = issue && two_lines && !second;

  meta_t m_in, m_out;
  logic  m_v;
  assign m_in = '{off: baddr[4:0], two: two_lines, part: second, last: last_chunk};
  sync_fifo #(.T(meta_t), .DEPTH(8)) u_meta (
    .clk, .rst_n, .in_valid(issue), .in_ready(), .in_data(m_in),
    .out_valid(m_v), .out_ready(c_v_o), .out_data(m_out), .count(mq_count)
  );

  logic [255:0] hold;
  logic [511:0] two_line;
  beat_t b_in, b_out;
  logic  b_push, b_v, b_pop;
  always_comb begin
    two_line = m_out.part ? {c_data, hold} : {256'b0, c_data};
    b_in.d   = two_line[32'(m_out.off) * 8 +: 64];
    b_in.last = m_out.last;
    b_push   = c_v_o && (!m_out.two || m_out.part);
  end
  always_ff @(posedge clk) if (c_v_o && m_out.two && !m_out.part) hold <= c_data;

  sync_fifo #(.T(beat_t), .DEPTH(8)) u_pred_q (
    .clk, .rst_n, .in_valid(b_push), .in_ready(), .in_data(b_in),
    .out_valid(b_v), .out_ready(b_pop), .out_data(b_out), .count(pq_count)
  );

  // ---------------- residual generator ----------------
  pix_t pred [8], org [8];
  logic org_v, org_pop;
  logic [63:0] org_flat, orig_flat;
  always_comb
    for (int i = 0; i < 8; i++) begin
      pred[i] = b_out.d[i*8 +: 8];
      org[i]  = org_flat[i*8 +: 8];
      orig_flat[i*8 +: 8] = orig_data[i];
    end

  sync_fifo #(.T(logic [63:0]), .DEPTH(16)) u_orig (
    .clk, .rst_n, .in_valid(orig_valid), .in_ready(orig_ready), .in_data(orig_flat),
    .out_valid(org_v), .out_ready(org_pop), .out_data(org_flat), .count()
  );

  logic [COST_W-1:0] cand_sad;
  residual_generator u_resgen (
    .clk, .rst_n, .pred_valid(b_v), .pred_ready(b_pop), .pred, .pred_last(b_out.last),
    .orig_valid(org_v), .orig_ready(org_pop), .orig(org),
    .res_valid, .res, .res_last, .sad(cand_sad)
  );

  // ---------------- best candidate per CU ----------------
  logic have_best;
  bv_t  best_bv;
  logic [COST_W-1:0] best_sad;
  logic better;
  assign cand_end = res_last;
  assign better   = !have_best || cand_sad < best_sad;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_best <= 1'b0;
      best_bv   <= '0;
      best_sad  <= '0;
      cu_done   <= 1'b0;
      cu_x      <= '0;
      cu_y      <= '0;
      cu_bv     <= '0;
      cu_sad    <= '0;
    end else begin
      cu_done <= 1'b0;
      if (cand_end) begin
        if (inflight_head.last) begin
          cu_done   <= 1'b1;
          cu_x      <= inflight_head.x;
          cu_y      <= inflight_head.y;
          cu_bv     <= better ? inflight_head.bv : best_bv;
          cu_sad    <= better ? cand_sad : best_sad;
          have_best <= 1'b0;
        end else if (better) begin
          have_best <= 1'b1;
          best_bv   <= inflight_head.bv;
          best_sad  <= cand_sad;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) cand_end |-> if_v);
  assert property (@(posedge clk) disable iff (!rst_n) c_v_o |-> m_v);

  // ---------------- reconstruction write-back ----------------
  write_to_ddr #(.PIC_W(PIC_W)) u_wb (
    .clk, .rst_n, .rec_valid, .rec_ready, .rec_x, .rec_y, .rec_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data, .blk_done(wb_done), .blk_x(wb_x), .blk_y(wb_y)
  );
endmodule
