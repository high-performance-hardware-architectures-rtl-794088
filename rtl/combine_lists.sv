// combine_lists: merges the local-search and the hash-search best lists into
// one list of the K best distinct candidates ("Combine Lists").
//
// On start both input lists are captured; their 2K entries are then offered
// to a best_list one per cycle (local list first, empty entries skipped by
// the list), so an equal-cost tie keeps the local candidate first and a
// vector present in both lists appears once. done pulses 2K + 1 cycles after
// start, when the merged list is final.
module combine_lists
  import scc_pkg::*;
#(
  parameter int K = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  cand_t list_a [K],
  input  cand_t list_b [K],
  output logic  done,
  output cand_t list [K]
);
  cand_t buf_q [2*K];
  logic  run;
  logic [$clog2(2*K+1)-1:0] idx;
  cand_t cur;

  assign cur = buf_q[idx[$clog2(2*K)-1:0]];

  best_list #(.K(K)) u_best (
    .clk, .rst_n, .clear(start), .in_valid(run && cur.valid),
    .in_bv(cur.bv), .in_cost(cur.cost), .list(list)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      idx  <= '0;
      done <= 1'b0;
      for (int i = 0; i < 2 * K; i++) buf_q[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        for (int i = 0; i < K; i++) begin
          buf_q[i]     <= list_a[i];
          buf_q[K + i] <= list_b[i];
        end
        idx <= '0;
        run <= 1'b1;
      end else if (run) begin
        if (idx == ($bits(idx))'(2 * K - 1)) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
        idx <= idx + 1'b1;
      end
    end
  end
endmodule
