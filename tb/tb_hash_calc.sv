// tb_hash_calc: random and flat 8x8 blocks; key and activity are rebuilt
// from Eq. (2) in the testbench and compared, one-cycle latency checked.
`include "tb/tb_util.svh"
module tb_hash_calc;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  logic rst_n = 0, in_valid = 0, out_valid;
  pix_t blk [64];
  logic [KEY_W-1:0] key;
  logic [15:0] act;
  hash_calc dut (.clk, .rst_n, .in_valid, .blk, .out_valid, .key, .activity(act));
  `TB_WATCHDOG(10000)

  function automatic void model(output logic [12:0] k, output int a);
    int dc [4]; int gh, gv, d;
    dc = '{0, 0, 0, 0}; gh = 0; gv = 0;
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
      dc[(y >= 4 ? 2 : 0) + (x >= 4 ? 1 : 0)] += blk[y*8+x];
      if (x > 0) begin d = int'(blk[y*8+x]) - int'(blk[y*8+x-1]); gh += d < 0 ? -d : d; end
      if (y > 0) begin d = int'(blk[y*8+x]) - int'(blk[(y-1)*8+x]); gv += d < 0 ? -d : d; end
    end
    k = 13'(((dc[0] / 16) >> 5) << 10 | ((dc[1] / 16) >> 5) << 7 | ((dc[2] / 16) >> 5) << 4 |
        ((dc[3] / 16) >> 5) << 1 | (((gh + gv) / 112) >= 16 ? 1 : 0));
    a = gh < gv ? gh : gv;
  endfunction

  initial begin
    logic [12:0] ek; int ea;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int mode;
      mode = t % 3;
      for (int i = 0; i < 64; i++) begin
        if (mode == 0) blk[i] = 8'($urandom);
        else if (mode == 1) blk[i] = 8'(((i % 8) < 4 ? 40 : 200) + (i / 32) * 20);   // flat quarters
        else blk[i] = 8'(100 + $urandom_range(0, 6));                             // low gradient
      end
      model(ek, ea);
      @(negedge clk); in_valid = 1;
      @(negedge clk); in_valid = 0;
      `CHECK(out_valid, "out_valid one cycle after in_valid")
      `CHECK(key == ek, $sformatf("key %h exp %h", key, ek))
      `CHECK(int'(act) == ea, $sformatf("activity %0d exp %0d", act, ea))
    end
    `TB_END
  end
endmodule
