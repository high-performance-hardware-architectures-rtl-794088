// sync_fifo: single-clock first-in first-out buffer (the FIFOs between the
// stages of the IBC and palette pipelines).
//
// Standard valid/ready on both sides; DEPTH entries of type T. Data written
// in one cycle can be read from the next. Assertions flag a write into a
// full FIFO or a read from an empty one.
module sync_fifo #(
  parameter type T     = logic [31:0],
  parameter int  DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = $clog2(DEPTH);
  T mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic push, pop;

  assign in_ready  = count < ($bits(count))'(DEPTH);
  assign out_valid = count != '0;
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + ($bits(count))'(push) - ($bits(count))'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && !in_ready && push));
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> count != '0);
endmodule
