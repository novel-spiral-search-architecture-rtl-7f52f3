// pra16x16: the 16x16 pixel reuse array (macroblock comparator).
//
// Holds one block of reference pixels, 16 4x4 sub-arrays (pra4x4) chained
// in a 4x4 grid, and compares it pixel by pixel with the current
// macroblock. Each cycle with shift_en high the whole array moves one pixel
// in direction dir and line_in, the row or column just read from the search
// window memory, enters at the trailing edge: as the left column
// (SH_RIGHT), the right column (SH_LEFT), the bottom row (SH_UP) or the top
// row (SH_DOWN). Element k of line_in is row k of a column or column k of a
// row. All other pixels are reused, so one new block position costs one
// memory read.
//
// Variable block size: for a partition smaller than 16x16 (mode) only the
// upper-left sub-arrays covering it are clocked; the others hold their
// contents. Bypass multiplexers feed the external right-column input to the
// last active sub-array column and the external down-row input to the last
// active sub-array row. As in the 16x16 array drawing there are bypasses
//   - between sub-columns 0 and 1 in sub-rows 0..1 (4-wide blocks),
//   - between sub-columns 1 and 2 in every sub-row (8-wide blocks),
//   - between sub-rows 0 and 1 in sub-columns 0..1 (4-tall blocks),
//   - between sub-rows 1 and 2 in every sub-column (8-tall blocks).
// The left-column and upper-row inputs always enter at sub-column 0 and
// sub-row 0. The clock gating is expressed as a clock enable per sub-array.
// Timing: pixels load on the rising edge; ad is combinational from the
// stored pixels and cur.
module pra16x16
  import spiral_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  blk_mode_t           mode,
  input  logic                shift_en,
  input  shift_dir_t          dir,
  input  pixel_t [15:0]       line_in,
  input  pixel_t [15:0][15:0] cur,      // [row][col]
  output pixel_t [15:0][15:0] ref_out,  // [row][col]
  output pixel_t [15:0][15:0] ad        // [row][col]
);
  logic [2:0] w4, h4;   // active sub-array columns / rows: 1, 2 or 4

  assign w4 = 3'(mode_w(mode) >> 2);
  assign h4 = 3'(mode_h(mode) >> 2);

  pixel_t [3:0][3:0][3:0][3:0] sub_ref;  // [I][J][row][col]
  pixel_t [3:0][3:0][3:0][3:0] sub_cur;
  pixel_t [3:0][3:0][3:0][3:0] sub_ad;

  for (genvar I = 0; I < 4; I++) begin : g_si
    for (genvar J = 0; J < 4; J++) begin : g_sj
      pixel_t [3:0] l_in, r_in, u_in, d_in;
      logic         active;

      assign active = (3'(I) < h4) && (3'(J) < w4);

      for (genvar k = 0; k < 4; k++) begin : g_k
        // left column input: external at sub-column 0
        if (J == 0) begin : g_le assign l_in[k] = line_in[4*I+k];
        end else begin : g_ln     assign l_in[k] = sub_ref[I][J-1][k][3];
        end
        // right column input: external at sub-column 3 or through bypass
        if (J == 3) begin : g_re assign r_in[k] = line_in[4*I+k];
        end else if ((J == 0 && I < 2) || J == 1) begin : g_rb
          // bypass: this sub-array is the right edge of a 4- or 8-wide block
          assign r_in[k] = (w4 == 3'(J + 1)) ? line_in[4*I+k] : sub_ref[I][J+1][k][0];
        end else begin : g_rn     assign r_in[k] = sub_ref[I][J+1][k][0];
        end
        // upper row input: external at sub-row 0
        if (I == 0) begin : g_ue assign u_in[k] = line_in[4*J+k];
        end else begin : g_un     assign u_in[k] = sub_ref[I-1][J][3][k];
        end
        // down row input: external at sub-row 3 or through bypass
        if (I == 3) begin : g_de assign d_in[k] = line_in[4*J+k];
        end else if ((I == 0 && J < 2) || I == 1) begin : g_db
          // bypass: this sub-array is the bottom edge of a 4- or 8-tall block
          assign d_in[k] = (h4 == 3'(I + 1)) ? line_in[4*J+k] : sub_ref[I+1][J][0][k];
        end else begin : g_dn     assign d_in[k] = sub_ref[I+1][J][0][k];
        end
        for (genvar c = 0; c < 4; c++) begin : g_c
          assign sub_cur[I][J][k][c]     = cur[4*I+k][4*J+c];
          assign ref_out[4*I+k][4*J+c]   = sub_ref[I][J][k][c];
          assign ad[4*I+k][4*J+c]        = sub_ad[I][J][k][c];
        end
      end

      pra4x4 u_sub (
        .clk      (clk),
        .rst_n    (rst_n),
        .en       (active),
        .shift_en (shift_en),
        .dir      (dir),
        .left_in  (l_in),
        .right_in (r_in),
        .up_in    (u_in),
        .down_in  (d_in),
        .cur      (sub_cur[I][J]),
        .ref_out  (sub_ref[I][J]),
        .ad       (sub_ad[I][J])
      );
    end
  end
endmodule
