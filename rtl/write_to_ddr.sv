// write_to_ddr: writes reconstructed pixels fed back from RDOQ into the
// reconstructed picture in DRAM ("Write to DDR" with its 32x32 memory
// controller).
//
// A 32x32 block arrives as 128 beats of 8 samples in raster order
// (rec_valid/rec_ready, block position on rec_x/rec_y with the first beat)
// and is collected in a 32x32 block memory. It is then written out one
// 32-sample row per 256-bit beat (wr_valid/wr_ready, byte address
// (y + r) * PIC_W + x), 32 beats, during which rec_ready is low. After the
// last row blk_done pulses with the block position for the CTU tracker.
module write_to_ddr
  import scc_pkg::*;
#(
  parameter int PIC_W = 1920
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rec_valid,
  output logic              rec_ready,
  input  logic [POS_W-1:0]  rec_x,
  input  logic [POS_W-1:0]  rec_y,
  input  pix_t              rec_data [8],
  output logic              wr_valid,
  input  logic              wr_ready,
  output logic [31:0]       wr_addr,
  output logic [255:0]      wr_data,
  output logic              blk_done,
  output logic [POS_W-1:0]  blk_x,
  output logic [POS_W-1:0]  blk_y
);
  logic [255:0] rows [32];
  logic [6:0]   beat;
  logic [4:0]   wrow;
  logic         writing;

  assign rec_ready = !writing;
  assign wr_valid  = writing;
  assign wr_addr   = (32'(blk_y) + 32'(wrow)) * 32'(PIC_W) + 32'(blk_x);
  assign wr_data   = rows[wrow];

  always_ff @(posedge clk) begin
    if (rec_valid && rec_ready)
      for (int i = 0; i < 8; i++) rows[beat[6:2]][(32'(beat[1:0]) * 8 + i) * 8 +: 8] <= rec_data[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat     <= '0;
      wrow     <= '0;
      writing  <= 1'b0;
      blk_done <= 1'b0;
      blk_x    <= '0;
      blk_y    <= '0;
    end else begin
      blk_done <= 1'b0;
      if (rec_valid && rec_ready) begin
        if (beat == '0) begin
          blk_x <= rec_x;
          blk_y <= rec_y;
        end
        beat <= beat + 1'b1;
        if (beat == 7'd127) begin
          writing <= 1'b1;
          wrow    <= '0;
        end
      end
      if (writing && wr_ready) begin
        wrow <= wrow + 1'b1;
        if (wrow == 5'd31) begin
          writing  <= 1'b0;
          blk_done <= 1'b1;
        end
      end
    end
  end
endmodule
