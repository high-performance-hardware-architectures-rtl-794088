// tb_residual_generator: random prediction and original beats with random
// gaps on both sides; residuals (orig - pred) and the per-prediction SAD
// are compared with testbench arithmetic.
`include "tb/tb_util.svh"
module tb_residual_generator;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  logic rst_n = 0, pred_valid = 0, pred_ready, pred_last = 0, orig_valid = 0, orig_ready, res_valid, res_last;
  pix_t pred [8], orig [8]; logic signed [8:0] res [8]; logic [COST_W-1:0] sad;
  residual_generator dut (.*);
  `TB_WATCHDOG(100000)
  int exp_res [$]; int exp_sad [$];
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 50; c++) begin
      int nb, s;
      nb = 8 << $urandom_range(0, 2); s = 0;
      for (int b = 0; b < nb; b++) begin
        for (int i = 0; i < 8; i++) begin
          pred[i] = 8'($urandom); orig[i] = 8'($urandom);
          exp_res.push_back(int'(orig[i]) - int'(pred[i]));
          s += orig[i] > pred[i] ? orig[i] - pred[i] : pred[i] - orig[i];
        end
        pred_last = (b == nb - 1);
        if (pred_last) exp_sad.push_back(s);
        pred_valid = 0; orig_valid = 0;
        while (!(pred_valid && orig_valid)) begin
          if ($urandom_range(0, 2) != 0) pred_valid = 1;
          if ($urandom_range(0, 2) != 0) orig_valid = 1;
          #1;
          `CHECK(pred_ready == orig_valid && orig_ready == pred_valid, "ready pairing")
          @(negedge clk);
        end
      end
      pred_valid = 0; orig_valid = 0;
    end
    repeat (3) @(negedge clk);
    `CHECK(exp_res.size() == 0 && exp_sad.size() == 0, "all beats seen")
    `TB_END
  end
  // outputs are registered, so they are sampled half a cycle later
  always @(negedge clk) if (rst_n && res_valid) begin
    for (int i = 0; i < 8; i++) begin
      `CHECK(int'(res[i]) == exp_res[0], "residual")
      void'(exp_res.pop_front());
    end
    if (res_last) begin `CHECK(int'(sad) == exp_sad[0], "prediction SAD") void'(exp_sad.pop_front()); end
  end
endmodule
