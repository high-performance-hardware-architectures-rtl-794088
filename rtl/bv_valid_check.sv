// bv_valid_check: decides whether a block vector of a prediction unit points
// to a reference block that is already coded ("BV Valid Check").
//
// Inputs are the CU position and log2 size, the PU shape (SHAPE: 0 = 2Nx2N,
// 1 = Nx2N, 2 = 2NxN), the PU index within the CU and the vector. The
// reference block must lie inside the picture and be fully coded before the
// current CU:
//   * bottom-right CTU of the reference in an earlier CTU row, or in the same
//     CTU row and an earlier CTU column: coded;
//   * in the current CTU: both its top-left and bottom-right 4x4 units must
//     precede the CU in z-scan order (the rule the standard uses);
//   * anything to the right of or below that: not coded.
// With LOCAL = 1 the reference must also lie in the 1x2 CTU window of the
// local search, i.e. the current CTU and the CTU to its left.
// Purely combinational.
module bv_valid_check
  import scc_pkg::*;
#(
  parameter int SHAPE = 0,
  parameter int LOCAL = 1,
  parameter int PIC_W = 1920,
  parameter int PIC_H = 1080
) (
  input  logic [POS_W-1:0] cu_x,
  input  logic [POS_W-1:0] cu_y,
  input  logic [2:0]       cu_log2,   // 3..5
  input  logic             part,      // PU index for Nx2N / 2NxN
  input  bv_t              bv,
  output logic             valid
);
  localparam int LOG2_CTU = $clog2(CTU);

  logic signed [BV_W+1:0] px, py, rx0, ry0, rx1, ry1;
  logic [BV_W+1:0] w, h;
  logic [7:0] z_cu, z_tl, z_br;
  logic in_pic, coded, in_win;
  logic signed [BV_W+1:0] ctu_cx, ctu_cy;

  function automatic logic [7:0] zorder(input logic [5:0] x, input logic [5:0] y);
    return {y[5], x[5], y[4], x[4], y[3], x[3], y[2], x[2]};
  endfunction

  always_comb begin
    w  = (BV_W+2)'(1) << cu_log2;
    h  = w;
    px = (BV_W+2)'(cu_x);
    py = (BV_W+2)'(cu_y);
    if (SHAPE == 1) begin
      w = w >> 1;
      if (part) px = px + (BV_W+2)'(w);
    end else if (SHAPE == 2) begin
      h = h >> 1;
      if (part) py = py + (BV_W+2)'(h);
    end
    rx0 = px + (BV_W+2)'(bv.x);
    ry0 = py + (BV_W+2)'(bv.y);
    rx1 = rx0 + (BV_W+2)'(w) - 1;
    ry1 = ry0 + (BV_W+2)'(h) - 1;
    in_pic = (rx0 >= 0) && (ry0 >= 0) && (rx1 < PIC_W) && (ry1 < PIC_H);
    ctu_cx = (BV_W+2)'(cu_x >> LOG2_CTU);
    ctu_cy = (BV_W+2)'(cu_y >> LOG2_CTU);
    z_cu = zorder(cu_x[5:0], cu_y[5:0]);
    z_tl = zorder(rx0[5:0], ry0[5:0]);
    z_br = zorder(rx1[5:0], ry1[5:0]);
    if ((ry1 >>> LOG2_CTU) < ctu_cy)
      coded = 1'b1;
    else if ((ry1 >>> LOG2_CTU) == ctu_cy && (rx1 >>> LOG2_CTU) < ctu_cx)
      coded = 1'b1;
    else if ((ry1 >>> LOG2_CTU) == ctu_cy && (rx1 >>> LOG2_CTU) == ctu_cx)
      // top-left may sit in an earlier CTU (coded) or in this one (z-scan)
      coded = (z_br < z_cu) &&
              (((rx0 >>> LOG2_CTU) < ctu_cx) || ((ry0 >>> LOG2_CTU) < ctu_cy) || (z_tl < z_cu));
    else
      coded = 1'b0;
    in_win = (ry0 >>> LOG2_CTU) == ctu_cy && (ry1 >>> LOG2_CTU) == ctu_cy &&
             (rx0 >>> LOG2_CTU) >= ctu_cx - 1 && (rx1 >>> LOG2_CTU) <= ctu_cx;
    valid = in_pic && coded && (LOCAL == 0 || in_win);
  end
endmodule
