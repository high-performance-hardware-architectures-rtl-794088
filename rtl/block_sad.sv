// block_sad: sum of absolute differences of N sample pairs (the "Residual
// Generation" of the IBC estimation stage).
//
// Purely combinational: the caller registers the result. With N = 64 it
// scores a whole 8x8 candidate in one cycle (local search); with N = 8 it
// scores one row and the caller accumulates over eight rows (hash search).
module block_sad
  import scc_pkg::*;
#(
  parameter int N = 64
) (
  input  pix_t               cur [N],
  input  pix_t               ref_pix [N],
  output logic [COST_W-1:0]  sad
);
  always_comb begin
    sad = '0;
    for (int i = 0; i < N; i++) sad += COST_W'(absdiff(cur[i], ref_pix[i]));
  end
endmodule
