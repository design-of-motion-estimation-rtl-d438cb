// me_pkg: types, constants and small functions shared by the three motion
// estimation engines in this library:
//   * the binary (shape) motion estimator, prefix bme_
//   * the variable block size motion estimator with early termination, prefix vbs_
//   * the vertical data reuse motion estimator, prefix vr_
// Pixel order convention used everywhere: within a row, column 0 is the
// leftmost pixel.  For 8-bit pixel rows packed into a vector, column j sits in
// bits [8j+7:8j].  For binary rows, column 0 sits in the most significant bit.
package me_pkg;

  typedef logic [7:0] pixel_t;

  // Motion vector component: -32..+31 covers every search range used here.
  typedef logic signed [6:0] mvc_t;

  typedef struct packed {
    mvc_t x;
    mvc_t y;
  } mv_t;

  // Result of one block: best SAD and its motion vector.
  typedef struct packed {
    logic [15:0] sad;
    mv_t         mv;
  } me_result_t;

  // ---------------------------------------------------------------------
  // H.264 variable block size bookkeeping.  Mode numbers follow H.264 JM:
  // 1 = 16x16, 2 = 16x8, 3 = 8x16, 4 = 8x8, 5 = 8x4, 6 = 4x8, 7 = 4x4.
  // The 41 sub-blocks are stored in one array in this order:
  //   0        f0          (mode 1)
  //   1..2     e0,e1       (mode 2, top/bottom)
  //   3..4     d0,d1       (mode 3, left/right)
  //   5..8     c0..c3      (mode 4, raster order)
  //   9..16    b0..b7      (mode 5, raster order)
  //   17..24   a0..a7      (mode 6, raster order)
  //   25..40   00..15      (mode 7, raster order)
  // ---------------------------------------------------------------------
  localparam int unsigned NUM_SUBBLK = 41;
  localparam int unsigned IDX_M1 = 0;
  localparam int unsigned IDX_M2 = 1;
  localparam int unsigned IDX_M3 = 3;
  localparam int unsigned IDX_M4 = 5;
  localparam int unsigned IDX_M5 = 9;
  localparam int unsigned IDX_M6 = 17;
  localparam int unsigned IDX_M7 = 25;

  // Operation of a binary motion estimation PE (bme_pe).
  typedef enum logic [2:0] {
    BME_NOP     = 3'd0,
    BME_CNT_LD  = 3'd1,  // count_reg  = ones(row)
    BME_CNT_ADD = 3'd2,  // count_reg += ones(row)
    BME_CNT_SUB = 3'd3,  // count_reg -= ones(row)
    BME_SAD_LD  = 3'd4,  // sad_reg    = ones(cur ^ row)
    BME_SAD_ADD = 3'd5   // sad_reg   += ones(cur ^ row)
  } bme_op_e;

  // Number of one bits in a 16-bit binary row.
  function automatic logic [4:0] popcount16(input logic [15:0] v);
    logic [4:0] s;
    s = '0;
    for (int i = 0; i < 16; i++) s += 5'(v[i]);
    return s;
  endfunction

  // |a - b| of two pixels.
  function automatic logic [7:0] absdiff(input pixel_t a, input pixel_t b);
    return (a > b) ? (a - b) : (b - a);
  endfunction

endpackage
