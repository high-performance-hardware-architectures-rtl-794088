// plt_entry_mapper: builds the palette of a CU from its cluster centres
// ("Old Palette Entries", "Palette Cost calculator" and "Comparator" of the
// CU coder).
//
// Each new palette entry (cluster centre) enters on its own cycle and flows
// through a six-stage pipeline, so entries stream in back to back:
//   1  cost: sum of absolute Y/U/V differences to every predictor entry
//   2-4  three-stage comparator tree, 4:1 per stage (64 -> 16 -> 4 -> 1),
//        giving the closest predictor entry (lowest index on ties)
//   5  sum of squared differences to that entry against the threshold
//   6  list write: if the SSD exceeds thr (or the predictor is empty) the
//      entry is appended as a new entry; otherwise the predictor entry is
//      marked reused and appended once, keeping its predictor index as its
//      order.
// The list therefore holds reused and new entries interleaved; plt_sorter
// reorders it. With the first entry in cycle 0 and n entries back to back,
// done is high in cycle n+5: the list takes n+6 cycles. start clears the
// list. A full list drops further entries.
module plt_entry_mapper
  import scc_pkg::*;
#(
  parameter int PRED_SIZE = 64,
  parameter int PAL_SIZE  = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  yuv_t       pred [PRED_SIZE],
  input  logic [6:0] pred_cnt,
  input  logic [17:0] thr,
  input  logic       in_valid,
  input  yuv_t       in_c,
  input  logic       in_last,
  output logic       done,
  output plt_entry_t list [PAL_SIZE],
  output logic [6:0] list_cnt,
  output logic       reuse [PRED_SIZE]
);
  localparam int NP = 64;  // comparator tree width
  initial assert (PRED_SIZE <= NP);

  typedef struct packed {
    logic       v;
    logic       last;
    logic [6:0] seq;
    yuv_t       c;
  } tag_t;

  typedef struct packed {
    logic [9:0] cost;
    logic [5:0] idx;
  } cmin_t;

  function automatic cmin_t min4(input cmin_t a, input cmin_t b, input cmin_t c, input cmin_t d);
    cmin_t ab, cd;
    ab = (b.cost < a.cost) ? b : a;
    cd = (d.cost < c.cost) ? d : c;
    return (cd.cost < ab.cost) ? cd : ab;
  endfunction

  tag_t  t1, t2, t3, t4, t5;
  cmin_t s1 [NP];
  cmin_t s2 [16];
  cmin_t s3 [4];
  cmin_t s4;
  logic  new5;
  logic [5:0] idx5;
  logic [6:0] seq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1 <= '0; t2 <= '0; t3 <= '0; t4 <= '0; t5 <= '0;
      for (int i = 0; i < NP; i++) s1[i] <= '0;
      for (int i = 0; i < 16; i++) s2[i] <= '0;
      for (int i = 0; i < 4; i++)  s3[i] <= '0;
      s4   <= '0;
      new5 <= 1'b0;
      idx5 <= '0;
      seq  <= '0;
    end else begin
      // stage 1: palette cost calculator
      t1 <= '{v: in_valid, last: in_last, seq: seq, c: in_c};
      if (start) seq <= '0;
      else if (in_valid) seq <= seq + 1'b1;
      for (int j = 0; j < NP; j++) begin
        s1[j].idx  <= 6'(j);
        s1[j].cost <= (j < PRED_SIZE && 7'(j) < pred_cnt) ? yuv_sad(in_c, pred[j % PRED_SIZE]) : 10'h3FF;
      end
      // stages 2-4: comparator tree
      t2 <= t1;
      for (int g = 0; g < 16; g++) s2[g] <= min4(s1[4*g], s1[4*g+1], s1[4*g+2], s1[4*g+3]);
      t3 <= t2;
      for (int g = 0; g < 4; g++)  s3[g] <= min4(s2[4*g], s2[4*g+1], s2[4*g+2], s2[4*g+3]);
      t4 <= t3;
      s4 <= min4(s3[0], s3[1], s3[2], s3[3]);
      // stage 5: threshold on the squared error to the closest entry
      t5   <= t4;
      idx5 <= s4.idx;
      new5 <= (pred_cnt == '0) || (yuv_ssd(t4.c, pred[32'(s4.idx) % PRED_SIZE]) > thr);
    end
  end

  // stage 6: list write
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < PAL_SIZE; i++) list[i] <= '0;
      for (int i = 0; i < PRED_SIZE; i++) reuse[i] <= 1'b0;
      list_cnt <= '0;
      done     <= 1'b0;
    end else if (start) begin
      for (int i = 0; i < PAL_SIZE; i++) list[i] <= '0;
      for (int i = 0; i < PRED_SIZE; i++) reuse[i] <= 1'b0;
      list_cnt <= '0;
      done     <= 1'b0;
    end else if (t5.v) begin
      done <= t5.last;
      if (list_cnt < 7'(PAL_SIZE)) begin
        if (new5) begin
          list[list_cnt[$clog2(PAL_SIZE)-1:0]] <= '{valid: 1'b1, is_new: 1'b1, order: t5.seq, c: t5.c};
          list_cnt <= list_cnt + 1'b1;
        end else if (!reuse[32'(idx5) % PRED_SIZE]) begin
          list[list_cnt[$clog2(PAL_SIZE)-1:0]] <= '{valid: 1'b1, is_new: 1'b0, order: 7'(idx5), c: pred[32'(idx5) % PRED_SIZE]};
          reuse[32'(idx5) % PRED_SIZE] <= 1'b1;
          list_cnt <= list_cnt + 1'b1;
        end
      end
    end else begin
      done <= 1'b0;
    end
  end
endmodule
