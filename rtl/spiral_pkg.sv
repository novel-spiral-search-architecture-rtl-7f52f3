// spiral_pkg: types and constants shared by the spiral-search motion
// estimator.
//
// Pixels are 8-bit luma samples. The search window is 32x32 pixels and the
// largest block (the H.264 macroblock) is 16x16; both numbers follow the
// architecture description. A search may also be run for one of the smaller
// H.264 partitions (16x8 ... 4x4); the partition is then anchored at the
// upper-left corner of the pixel reuse array. The mode encoding, the SAD
// word width and the position tag layout are this design's own choices.
package spiral_pkg;

  localparam int PIX_W  = 8;    // bits per pixel
  localparam int SW     = 32;   // search window side, pixels
  localparam int MB     = 16;   // macroblock side, pixels
  localparam int SAD_W  = 16;   // holds 256 * 255

  typedef logic [PIX_W-1:0] pixel_t;
  typedef logic [SAD_W-1:0] sad_t;

  // Direction in which the pixel reuse array moves its contents.
  //   SH_RIGHT: a new LEFT column enters (block moved one pixel left)
  //   SH_LEFT : a new RIGHT column enters (block moved one pixel right)
  //   SH_UP   : a new DOWN (bottom) row enters (block moved one pixel down)
  //   SH_DOWN : a new UPPER row enters (block moved one pixel up)
  typedef enum logic [1:0] {SH_RIGHT, SH_LEFT, SH_UP, SH_DOWN} shift_dir_t;

  // Block size searched, H.264 naming: width x height.
  typedef enum logic [2:0] {
    MODE_16X16, MODE_16X8, MODE_8X16, MODE_8X8, MODE_8X4, MODE_4X8, MODE_4X4
  } blk_mode_t;

  function automatic logic [4:0] mode_w(blk_mode_t m);
    case (m)
      MODE_16X16, MODE_16X8: return 5'd16;
      MODE_8X16, MODE_8X8, MODE_8X4: return 5'd8;
      default: return 5'd4;
    endcase
  endfunction

  function automatic logic [4:0] mode_h(blk_mode_t m);
    case (m)
      MODE_16X16, MODE_8X16: return 5'd16;
      MODE_16X8, MODE_8X8, MODE_4X8: return 5'd8;
      default: return 5'd4;
    endcase
  endfunction

  // All 41 SADs of one block position.
  //   s4x4[4*i+j]   : 4x4 sub-block in sub-row i, sub-column j
  //   s8x8[2*a+b]   : 8x8 quadrant in row a, column b
  //   s8x4[2*q+h]   : upper (h=0) / lower (h=1) 8x4 half of 8x8 quadrant q
  //   s4x8[2*q+v]   : left (v=0) / right (v=1) 4x8 half of 8x8 quadrant q
  //   s16x8[h]      : upper / lower 16x8 half
  //   s8x16[v]      : left / right 8x16 half
  typedef struct packed {
    sad_t [15:0] s4x4;
    sad_t [7:0]  s8x4;
    sad_t [7:0]  s4x8;
    sad_t [3:0]  s8x8;
    sad_t [1:0]  s16x8;
    sad_t [1:0]  s8x16;
    sad_t        s16x16;
  } sad_set_t;

  // Marks the cycle in which the reuse array holds a complete block.
  typedef struct packed {
    logic       valid;   // block at (x, y) is complete
    logic       last;    // last position of the spiral
    logic [4:0] x;       // block origin column in the window
    logic [4:0] y;       // block origin row in the window
  } pos_tag_t;

endpackage
