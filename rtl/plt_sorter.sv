// plt_sorter: puts reused predictor entries ahead of new entries in a
// palette list ("Sorting Unit").
//
// Odd-even transposition sort over PAL_SIZE entries with PAL_SIZE/2
// two-element comparators (32 for 64 entries). In even phases comparator i
// orders the pair (2i, 2i+1), in odd phases the pair (2i-1, 2i): each entry
// at an even position is compared with the entry below and the entry above
// on alternate cycles. The key is {is_new, order} (plt_key), so reused
// entries come first in predictor order, then new entries in arrival order,
// then empty slots. PAL_SIZE phases always suffice: done is high PAL_SIZE + 1
// cycles after the load cycle, with the sorted list on out_list.
module plt_sorter
  import scc_pkg::*;
#(
  parameter int PAL_SIZE = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  plt_entry_t in_list [PAL_SIZE],
  output logic       busy,
  output logic       done,
  output plt_entry_t out_list [PAL_SIZE]
);
  logic [$clog2(PAL_SIZE+1)-1:0] phase;
  plt_entry_t nxt [PAL_SIZE];

  assign busy = phase != '0;

  always_comb begin
    nxt = out_list;
    for (int i = 0; i < PAL_SIZE / 2; i++) begin
      if (!phase[0]) begin
        if (plt_key(out_list[2*i+1]) < plt_key(out_list[2*i])) begin
          nxt[2*i]   = out_list[2*i+1];
          nxt[2*i+1] = out_list[2*i];
        end
      end else if (i > 0) begin
        if (plt_key(out_list[2*i]) < plt_key(out_list[2*i-1])) begin
          nxt[2*i-1] = out_list[2*i];
          nxt[2*i]   = out_list[2*i-1];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      done  <= 1'b0;
      for (int i = 0; i < PAL_SIZE; i++) out_list[i] <= '0;
    end else begin
      done <= 1'b0;
      if (load) begin
        out_list <= in_list;
        phase    <= ($bits(phase))'(PAL_SIZE);
      end else if (phase != '0) begin
        out_list <= nxt;
        phase    <= phase - 1'b1;
        if (phase == 1) done <= 1'b1;
      end
    end
  end
endmodule
