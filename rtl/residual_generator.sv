// residual_generator: subtracts the IBC prediction from the original pixels
// (high throughput stage "Residual Generator").
//
// A beat of 8 predicted samples (from the reconstructed residual loader) is
// paired with the next beat of 8 original samples (from the original YUV
// FIFO); when both are present the signed 9-bit residuals are registered
// and sent towards RDOQ and transform. The sum of absolute residuals is
// accumulated over a prediction and reported with res_last, so the caller
// can rank the candidate predictions of a CU. Throughput: 8 samples/cycle.
module residual_generator
  import scc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pred_valid,
  output logic              pred_ready,
  input  pix_t              pred [8],
  input  logic              pred_last,
  input  logic              orig_valid,
  output logic              orig_ready,
  input  pix_t              orig [8],
  output logic              res_valid,
  output logic signed [8:0] res [8],
  output logic              res_last,
  output logic [COST_W-1:0] sad
);
  logic fire;
  logic [COST_W-1:0] acc, beat_sad;

  assign fire       = pred_valid && orig_valid;
  assign pred_ready = orig_valid;
  assign orig_ready = pred_valid;

  always_comb begin
    beat_sad = '0;
    for (int i = 0; i < 8; i++) beat_sad += COST_W'(absdiff(orig[i], pred[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_last  <= 1'b0;
      acc       <= '0;
      sad       <= '0;
      for (int i = 0; i < 8; i++) res[i] <= '0;
    end else begin
      res_valid <= fire;
      res_last  <= fire && pred_last;
      if (fire) begin
        for (int i = 0; i < 8; i++) res[i] <= signed'({1'b0, orig[i]}) - signed'({1'b0, pred[i]});
        if (pred_last) begin
          sad <= acc + beat_sad;
          acc <= '0;
        end else begin
          acc <= acc + beat_sad;
        end
      end
    end
  end
endmodule
