// tb_hash_table_ctrl: inserts random (key, position) pairs, overfills one
// bucket, then looks up every key used and compares the streamed positions
// with the testbench's own bucket lists. The DRAM model has random grant
// stalls and a fixed read latency. A frame clear must empty the table.
`include "tb/tb_util.svh"
module tb_hash_table_ctrl;
  import scc_pkg::*;
  `TB_COUNTERS
  `TB_CLOCK
  localparam int MAXK = 100;
  logic rst_n = 0, clear_req = 0, busy;
  logic ins_valid = 0, ins_ready, ins_drop, lk_valid = 0, lk_ready, out_valid, lk_done;
  logic [KEY_W-1:0] ins_key, lk_key;
  logic [2*POS_W-1:0] ins_pos, out_pos;
  logic mem_req, mem_we, mem_gnt, mem_rvalid; logic [31:0] mem_addr, mem_wdata, mem_rdata;
  hash_table_ctrl dut (.*);
  `TB_WATCHDOG(200000)

  // DRAM model: random grant, reads return 6 cycles later in order
  logic [31:0] dram [int];
  logic [31:0] rpipe [6]; logic rv [6];
  int drops = 0;
  always_ff @(posedge clk) begin
    mem_gnt <= ($urandom_range(0, 3) != 0);
    if (mem_req && mem_gnt && mem_we) dram[int'(mem_addr)] = mem_wdata;
    rv[0] <= mem_req && mem_gnt && !mem_we;
    rpipe[0] <= dram.exists(int'(mem_addr)) ? dram[int'(mem_addr)] : 32'hDEAD;
    for (int i = 1; i < 6; i++) begin rv[i] <= rv[i-1]; rpipe[i] <= rpipe[i-1]; end
    if (ins_drop) drops++;
  end
  assign mem_rvalid = rv[5];
  assign mem_rdata  = rpipe[5];

  logic [2*POS_W-1:0] model [int][$];
  int keys [$];

  task automatic insert(int k, logic [2*POS_W-1:0] p);
    @(negedge clk); ins_valid = 1; ins_key = KEY_W'(k); ins_pos = p;
    #1; while (!ins_ready) begin @(negedge clk); #1; end
    @(negedge clk); ins_valid = 0;
    if (model[k].size() < MAXK) model[k].push_back(p);
  endtask

  task automatic lookup(int k);
    int n;
    n = 0;
    @(negedge clk); lk_valid = 1; lk_key = KEY_W'(k);
    #1; while (!lk_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    if (out_valid) begin `CHECK(0, "data before lookup accepted") end
    @(negedge clk); lk_valid = 0;
    forever begin
      @(posedge clk);
      if (out_valid) begin
        `CHECK(n < model[k].size() && out_pos == model[k][n], $sformatf("key %0d entry %0d", k, n))
        n++;
      end
      if (lk_done) break;
    end
    `CHECK(n == (model.exists(k) ? model[k].size() : 0), $sformatf("key %0d count %0d", k, n))
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (!busy);
    for (int i = 0; i < 300; i++) begin
      int k;
      k = $urandom_range(0, 40) * 97;
      insert(k, (2*POS_W)'($urandom));
      if (model[k].size() == 1) keys.push_back(k);
    end
    for (int i = 0; i < MAXK + 3; i++) insert(7, (2*POS_W)'(i));   // overfill bucket 7
    keys.push_back(7);
    @(negedge clk);
    `CHECK(drops == 3, $sformatf("three inserts dropped, saw %0d", drops))
    foreach (keys[i]) lookup(keys[i]);
    lookup(8190);                                                   // empty bucket
    // new frame: table cleared
    @(negedge clk); clear_req = 1; @(negedge clk); clear_req = 0;
    @(negedge clk); wait (!busy);
    model.delete();
    lookup(7);
    `TB_END
  end
endmodule
