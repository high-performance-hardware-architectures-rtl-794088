// hash_table_ctrl: IBC hash table kept in external DRAM, with the number of
// entries stored under each key held on chip ("Hash Table Controller",
// "Hash Update" write path and "DDR Read").
//
// The table has 2^KEY_W buckets of MAX_PER_KEY slots; slot s of key k lives
// at DRAM word BASE + k*MAX_PER_KEY + s and holds the {x, y} position of an
// 8x8 block. The fill counters sit in an on-chip memory with a registered
// read. A full bucket drops further inserts (ins_drop pulses).
//   clear   : zeroes all counters, one per cycle (start of a frame).
//   insert  : ins_valid/ins_ready; read counter, write DRAM slot, bump count.
//   lookup  : lk_valid/lk_ready; all reads of the bucket are issued back to
//             back so the DRAM latency is paid once, the stored positions
//             stream out on out_valid and lk_done pulses after the last one
//             (or alone for an empty bucket). The consumer must take every
//             out_valid beat.
// DRAM port: in-order request/grant; reads return on mem_rvalid in order.
module hash_table_ctrl
  import scc_pkg::*;
#(
  parameter int MAX_PER_KEY = 100,
  parameter int BASE        = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear_req,
  output logic              busy,
  input  logic              ins_valid,
  output logic              ins_ready,
  input  logic [KEY_W-1:0]  ins_key,
  input  logic [2*POS_W-1:0] ins_pos,
  output logic              ins_drop,
  input  logic              lk_valid,
  output logic              lk_ready,
  input  logic [KEY_W-1:0]  lk_key,
  output logic              out_valid,
  output logic [2*POS_W-1:0] out_pos,
  output logic              lk_done,
  output logic              mem_req,
  output logic              mem_we,
  output logic [31:0]       mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [31:0]       mem_rdata
);
  localparam int NKEYS = 1 << KEY_W;
  localparam int CNT_W = $clog2(MAX_PER_KEY + 1);

  typedef enum logic [2:0] {S_CLEAR, S_IDLE, S_INS, S_LK_CNT, S_LK_RUN} state_t;
  state_t state;

  logic [CNT_W-1:0] cnt_mem [NKEYS];
  logic [CNT_W-1:0] cnt_q;
  logic [KEY_W-1:0] key_q, rd_addr, clr_addr;
  logic [2*POS_W-1:0] pos_q;
  logic [CNT_W-1:0] n_q, issued, received;
  logic cnt_we;
  logic [KEY_W-1:0] cnt_waddr;
  logic [CNT_W-1:0] cnt_wdata;

  assign busy      = state == S_CLEAR;
  assign ins_ready = state == S_IDLE && !clear_req;
  assign lk_ready  = state == S_IDLE && !clear_req && !ins_valid;
  assign rd_addr   = (state != S_IDLE) ? key_q : (ins_valid ? ins_key : lk_key);

  // counter memory: one write port, one registered read port
  always_ff @(posedge clk) begin
    if (cnt_we) cnt_mem[cnt_waddr] <= cnt_wdata;
    cnt_q <= cnt_mem[rd_addr];
  end

  always_comb begin
    cnt_we    = 1'b0;
    cnt_waddr = key_q;
    cnt_wdata = cnt_q + 1'b1;
    if (state == S_CLEAR) begin
      cnt_we    = 1'b1;
      cnt_waddr = clr_addr;
      cnt_wdata = '0;
    end else if (state == S_INS && cnt_q < CNT_W'(MAX_PER_KEY) && mem_gnt) begin
      cnt_we = 1'b1;
    end
  end

  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = 32'(BASE) + 32'(key_q) * 32'(MAX_PER_KEY);
    mem_wdata = 32'(pos_q);
    if (state == S_INS && cnt_q < CNT_W'(MAX_PER_KEY)) begin
      mem_req  = 1'b1;
      mem_we   = 1'b1;
      mem_addr = mem_addr + 32'(cnt_q);
    end else if (state == S_LK_RUN && issued < n_q) begin
      mem_req  = 1'b1;
      mem_addr = mem_addr + 32'(issued);
    end
  end

  assign out_valid = state == S_LK_RUN && mem_rvalid;
  assign out_pos   = mem_rdata[2*POS_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_CLEAR;
      clr_addr <= '0;
      key_q    <= '0;
      pos_q    <= '0;
      n_q      <= '0;
      issued   <= '0;
      received <= '0;
      ins_drop <= 1'b0;
      lk_done  <= 1'b0;
    end else begin
      ins_drop <= 1'b0;
      lk_done  <= 1'b0;
      unique case (state)
        S_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (clr_addr == KEY_W'(NKEYS - 1)) state <= S_IDLE;
        end
        S_IDLE: begin
          if (clear_req) begin
            clr_addr <= '0;
            state    <= S_CLEAR;
          end else if (ins_valid) begin
            key_q <= ins_key;
            pos_q <= ins_pos;
            state <= S_INS;
          end else if (lk_valid) begin
            key_q <= lk_key;
            state <= S_LK_CNT;
          end
        end
        S_INS: begin
          if (cnt_q >= CNT_W'(MAX_PER_KEY)) begin
            ins_drop <= 1'b1;
            state    <= S_IDLE;
          end else if (mem_gnt) begin
            state <= S_IDLE;
          end
        end
        S_LK_CNT: begin
          n_q      <= cnt_q;
          issued   <= '0;
          received <= '0;
          state    <= S_LK_RUN;
        end
        S_LK_RUN: begin
          if (mem_req && mem_gnt) issued <= issued + 1'b1;
          if (mem_rvalid) received <= received + 1'b1;
          if (received + CNT_W'(mem_rvalid) == n_q) begin
            lk_done <= 1'b1;
            state   <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a read can only come back for a request that was issued
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_LK_RUN && mem_rvalid) |-> received < issued);
endmodule
