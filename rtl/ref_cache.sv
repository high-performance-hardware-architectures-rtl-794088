// ref_cache: direct-mapped read cache in front of the external DRAM that
// holds the reconstructed picture (IBC high throughput stage "Cache").
//
// A line is LINE_BYTES = 32 bytes, one 256-bit DRAM beat; addresses are
// line addresses (byte address / 32). A hit is answered on resp_* the cycle
// after the request, and a new request can be taken every cycle. A miss
// drops req_ready, reads the line from DRAM, fills it and answers; one miss
// is outstanding at a time. flush invalidates every line (new frame).
// hit/miss pulse once per request for observation.
module ref_cache #(
  parameter int LINES  = 64,
  parameter int ADDR_W = 27
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ADDR_W-1:0] req_addr,
  output logic              resp_valid,
  output logic [255:0]      resp_data,
  output logic              hit,
  output logic              miss,
  output logic              mem_req,
  output logic [ADDR_W-1:0] mem_addr,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [255:0]      mem_rdata
);
  localparam int IW = $clog2(LINES);
  localparam int TW = ADDR_W - IW;

  typedef enum logic [1:0] {S_READY, S_REQ, S_WAIT} state_t;
  state_t state;

  logic [255:0]    data_mem [LINES];
  logic [TW-1:0]   tag_mem  [LINES];
  logic            vld      [LINES];
  logic [ADDR_W-1:0] miss_addr;
  logic [IW-1:0]   idx;
  logic            is_hit;

  assign idx       = req_addr[IW-1:0];
  assign is_hit    = vld[idx] && tag_mem[idx] == req_addr[ADDR_W-1:IW];
  assign req_ready = state == S_READY;
  assign hit       = req_valid && req_ready && is_hit;
  assign miss      = req_valid && req_ready && !is_hit;
  assign mem_req   = state == S_REQ;
  assign mem_addr  = miss_addr;

  always_ff @(posedge clk) begin
    if (state == S_WAIT && mem_rvalid) begin
      data_mem[miss_addr[IW-1:0]] <= mem_rdata;
      tag_mem[miss_addr[IW-1:0]]  <= miss_addr[ADDR_W-1:IW];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_READY;
      miss_addr  <= '0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
      for (int i = 0; i < LINES; i++) vld[i] <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      if (flush) begin
        for (int i = 0; i < LINES; i++) vld[i] <= 1'b0;
      end
      unique case (state)
        S_READY: if (req_valid) begin
          if (is_hit && !flush) begin
            resp_valid <= 1'b1;
            resp_data  <= data_mem[idx];
          end else begin
            miss_addr <= req_addr;
            state     <= S_REQ;
          end
        end
        S_REQ: if (mem_gnt) state <= S_WAIT;
        S_WAIT: if (mem_rvalid) begin
          vld[miss_addr[IW-1:0]] <= 1'b1;
          resp_valid <= 1'b1;
          resp_data  <= mem_rdata;
          state      <= S_READY;
        end
        default: state <= S_READY;
      endcase
    end
  end
endmodule
