// me_pkg: types and constants shared by the two-step motion estimator.
//
// The estimator works on 16x16 macroblocks (MB) with 8-bit luma pixels. The
// adder tree produces costs for the 41 H.264 partitions of a macroblock,
// numbered here as follows (bx/by count 4-pixel columns/rows, bx8/by8 count
// 8-pixel columns/rows, width x height):
//   0..15  4x4   : by*4 + bx
//   16..23 8x4   : 16 + by*2 + bx8
//   24..31 4x8   : 24 + by8*4 + bx
//   32..35 8x8   : 32 + by8*2 + bx8   (A, B, C, D of the macroblock)
//   36..37 16x8  : 36 + by8
//   38..39 8x16  : 38 + bx8
//   40     16x16
// The partition numbering, the cost and vector widths and the enumerations
// are this design's own choices; the 41 partitions, the 8-bit pixels, the
// truncation mask 8'b1100_0000 (six truncated bits) and the 16x16 macroblock
// follow the document. A module that uses only some of these constants
// (a single PE, for instance) is linted with the whole package, so the
// linter reports the others as unused parameters there.
package me_pkg;

  localparam int MB     = 16;        // macroblock width and height
  localparam int NPE    = MB * MB;   // processing elements per array
  localparam int NPART  = 41;        // partitions per macroblock
  localparam int PIX_W  = 8;         // full-resolution pixel width
  localparam int LR_W   = 2;         // low-resolution pixel width (2 MSBs)
  localparam int COST_W = 16;        // widest partition cost (16x16 SAD)
  localparam int MV_W   = 6;         // signed motion vector component

  localparam logic [PIX_W-1:0] TRUNC_MASK = 8'b1100_0000;  // NTB = 6

  typedef logic [PIX_W-1:0]        pix_t;
  typedef logic [LR_W-1:0]         lrpix_t;
  typedef logic [COST_W-1:0]       cost_t;
  typedef logic signed [MV_W-1:0]  mvc_t;

  typedef struct packed {
    mvc_t x;
    mvc_t y;
  } mv_t;

  // Source of a PE's search-pixel register (Fig. 5 mux).
  typedef enum logic [1:0] {
    R_FROM_TOP    = 2'd0,   // data moves down, new row enters at the top
    R_FROM_BOTTOM = 2'd1,   // data moves up, new row enters at the bottom
    R_FROM_RIGHT  = 2'd2    // data moves left, new column enters at the right
  } rsel_e;

  // Macroblock partition chosen by the decision unit.
  typedef enum logic [1:0] {
    MODE_16X16 = 2'd0,
    MODE_16X8  = 2'd1,
    MODE_8X16  = 2'd2,
    MODE_8X8   = 2'd3
  } mb_mode_e;

  // Sub-partition of one 8x8 block when the mode is MODE_8X8.
  typedef enum logic [1:0] {
    SUB_8X8 = 2'd0,
    SUB_8X4 = 2'd1,
    SUB_4X8 = 2'd2,
    SUB_4X4 = 2'd3
  } sub_mode_e;

  // Partition index helpers.
  function automatic int p4x4(input int by, input int bx);
    return by * 4 + bx;
  endfunction
  function automatic int p8x4(input int by, input int bx8);
    return 16 + by * 2 + bx8;
  endfunction
  function automatic int p4x8(input int by8, input int bx);
    return 24 + by8 * 4 + bx;
  endfunction
  function automatic int p8x8(input int by8, input int bx8);
    return 32 + by8 * 2 + bx8;
  endfunction
  function automatic int p16x8(input int by8);
    return 36 + by8;
  endfunction
  function automatic int p8x16(input int bx8);
    return 38 + bx8;
  endfunction
  localparam int P16X16 = 40;

endpackage
