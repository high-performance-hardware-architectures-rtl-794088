// tb_block_sad: random sample vectors for N = 64 and N = 8, SAD compared
// with a sum computed in the testbench.
`include "tb/tb_util.svh"
module tb_block_sad;
  import scc_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  pix_t a [64], b [64], a8 [8], b8 [8];
  logic [COST_W-1:0] s64, s8;
  block_sad #(.N(64)) dut64 (.cur(a), .ref_pix(b), .sad(s64));
  block_sad #(.N(8))  dut8  (.cur(a8), .ref_pix(b8), .sad(s8));
  initial begin
    for (int t = 0; t < 500; t++) begin
      int e64, e8;
      e64 = 0; e8 = 0;
      for (int i = 0; i < 64; i++) begin
        a[i] = 8'($urandom); b[i] = (t % 5 == 0) ? a[i] : 8'($urandom);
        e64 += (a[i] > b[i]) ? a[i] - b[i] : b[i] - a[i];
      end
      for (int i = 0; i < 8; i++) begin
        a8[i] = 8'($urandom); b8[i] = 8'($urandom);
        e8 += (a8[i] > b8[i]) ? a8[i] - b8[i] : b8[i] - a8[i];
      end
      #1;
      `CHECK(int'(s64) == e64, $sformatf("sad64 %0d exp %0d", s64, e64))
      `CHECK(int'(s8) == e8, $sformatf("sad8 %0d exp %0d", s8, e8))
    end
    `TB_END
  end
endmodule
