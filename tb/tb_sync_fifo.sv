// tb_sync_fifo: random pushes and pops against a queue model.
`include "tb/tb_util.svh"
module tb_sync_fifo;
  `TB_COUNTERS
  `TB_CLOCK
  logic rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [15:0] in_data, out_data;
  logic [3:0] count;
  sync_fifo #(.T(logic [15:0]), .DEPTH(8)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .count);
  `TB_WATCHDOG(100000)
  logic [15:0] q [$];
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 99) < (t < 1500 ? 70 : 30));
      out_ready = ($urandom_range(0, 99) < 50);
      in_data = 16'($urandom);
      #1;
      `CHECK(int'(count) == q.size(), "count")
      `CHECK(in_ready == (q.size() < 8), "in_ready")
      `CHECK(out_valid == (q.size() > 0), "out_valid")
      begin
        bit pop, push;
        pop = out_valid && out_ready; push = in_valid && in_ready;
        if (pop) `CHECK(out_data == q[0], "data order")
        @(posedge clk);
        if (pop) void'(q.pop_front());
        if (push) q.push_back(in_data);
      end
    end
    `TB_END
  end
endmodule
