// scc_pkg: types, sizes and small helper functions shared by the Intra Block
// Copy (IBC) and palette (PLT) screen content coding blocks.
//
// Sizes that follow the text: 13-bit hash key (three MSBs of four 4x4 DC
// averages plus a one-bit gradient flag), at most 64 palette clusters, 8-bit
// samples, 64x64 CTUs searched over a 1x2 CTU window. The coordinate and
// vector widths are chosen here to cover a 1920x1080 picture.
package scc_pkg;

  localparam int PIX_W   = 8;    // bits per sample
  localparam int POS_W   = 12;   // unsigned picture coordinate (0..2047)
  localparam int BV_W    = 13;   // signed block-vector component
  localparam int KEY_W   = 13;   // hash key width, Eq. (2)
  localparam int COST_W  = 20;   // SAD / bit-cost width
  localparam int CTU     = 64;   // CTU size in luma samples

  typedef logic [PIX_W-1:0] pix_t;

  // Block vector: displacement from the current block to its reference.
  typedef struct packed {
    logic signed [BV_W-1:0] x;
    logic signed [BV_W-1:0] y;
  } bv_t;

  // One entry of a candidate list.
  typedef struct packed {
    logic              valid;
    bv_t               bv;
    logic [COST_W-1:0] cost;
  } cand_t;

  // Combined candidate list of one CU, as passed to the high throughput stage.
  localparam int NCAND = 4;
  typedef struct packed {
    logic [POS_W-1:0]       x;
    logic [POS_W-1:0]       y;
    cand_t [NCAND-1:0]      c;
  } cand_list_t;

  // One colour (palette entry or pixel).
  typedef struct packed {
    logic [PIX_W-1:0] y;
    logic [PIX_W-1:0] u;
    logic [PIX_W-1:0] v;
  } yuv_t;

  // Palette list entry: colour plus sort key. Reused predictor entries
  // (is_new = 0) sort ahead of new entries; within each group by order.
  typedef struct packed {
    logic       valid;
    logic       is_new;
    logic [6:0] order;
    yuv_t       c;
  } plt_entry_t;

  function automatic logic [PIX_W-1:0] absdiff(input logic [PIX_W-1:0] a, input logic [PIX_W-1:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  // Sum of absolute colour differences over Y, U and V.
  function automatic logic [9:0] yuv_sad(input yuv_t a, input yuv_t b);
    return 10'(absdiff(a.y, b.y)) + 10'(absdiff(a.u, b.u)) + 10'(absdiff(a.v, b.v));
  endfunction

  // Sum of squared colour differences over Y, U and V.
  function automatic logic [17:0] yuv_ssd(input yuv_t a, input yuv_t b);
    logic [7:0] dy, du, dv;
    dy = absdiff(a.y, b.y);
    du = absdiff(a.u, b.u);
    dv = absdiff(a.v, b.v);
    return 18'(dy * dy) + 18'(du * du) + 18'(dv * dv);
  endfunction

  // Sort key of a palette list entry: smaller sorts first, empty slots last.
  function automatic logic [8:0] plt_key(input plt_entry_t e);
    return e.valid ? {1'b0, e.is_new, e.order} : 9'h1FF;
  endfunction

endpackage
