// tb_ref_cache: random line addresses from a small pool against a DRAM
// model whose line content is a function of the address, with random grant
// and latency. Every answer must carry the right line, hits and misses must
// match a direct-mapped tag model, hits answer in one cycle, and a flush
// must turn the next access into a miss.
`include "tb/tb_util.svh"
module tb_ref_cache;
  `TB_COUNTERS
  `TB_CLOCK
  logic rst_n = 0, flush = 0, req_valid = 0, req_ready, resp_valid, hit, miss, mem_req, mem_gnt, mem_rvalid;
  logic [26:0] req_addr, mem_addr; logic [255:0] resp_data, mem_rdata;
  ref_cache #(.LINES(16)) dut (.*);
  `TB_WATCHDOG(200000)
  function automatic logic [255:0] line_of(logic [26:0] a);
    return {8{a ^ 27'h5A5A5, 5'(a)}};
  endfunction
  // DRAM model
  int lat; logic busy_m = 0; logic [26:0] ma;
  always @(posedge clk) begin
    mem_gnt <= $urandom_range(0, 1);
    mem_rvalid <= 0;
    if (!rst_n) busy_m <= 0;
    else if (mem_req && mem_gnt && !busy_m) begin busy_m <= 1; ma <= mem_addr; lat <= $urandom_range(2, 8); end
    else if (busy_m) begin
      if (lat == 0) begin mem_rvalid <= 1; mem_rdata <= line_of(ma); busy_m <= 0; end
      else lat <= lat - 1;
    end
  end
  logic [26:0] tags [16]; bit vld [16];
  int n_hit = 0, n_miss = 0;
  task automatic access(logic [26:0] a);
    bit exp_hit; int cyc;
    exp_hit = vld[a % 16] && tags[a % 16] == a;
    @(negedge clk); req_valid = 1; req_addr = a; #1;
    `CHECK(req_ready, "ready when idle")
    `CHECK(hit == exp_hit && miss == !exp_hit, $sformatf("hit/miss for %h", a))
    @(negedge clk); req_valid = 0;
    cyc = 1;
    while (!resp_valid) begin @(negedge clk); cyc++; end
    `CHECK(resp_data == line_of(a), $sformatf("data for %h got %h exp_hit %0d cyc %0d", a, resp_data[31:0], exp_hit, cyc))
    if (exp_hit) begin `CHECK(cyc == 1, "hit answers next cycle") n_hit++; end else n_miss++;
    vld[a % 16] = 1; tags[a % 16] = a;
  endtask
  initial begin
    foreach (vld[i]) vld[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) access(27'($urandom_range(0, 40)) + 27'h100);
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    foreach (vld[i]) vld[i] = 0;
    access(27'h100);
    `CHECK(n_hit > 100 && n_miss > 100, "hits and misses both exercised")
    `TB_END
  end
endmodule
