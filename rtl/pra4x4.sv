// pra4x4: 4x4 sub-array of the pixel reuse array.
//
// Sixteen pra_cell instances in a 4x4 mesh. On a shift every cell takes the
// pixel of its neighbour in the direction of travel; cells on the edge take
// the matching external input instead:
//   SH_RIGHT - left_in[i] enters column 0 of row i
//   SH_LEFT  - right_in[i] enters column 3 of row i
//   SH_UP    - down_in[j] enters row 3 of column j
//   SH_DOWN  - up_in[j] enters row 0 of column j
// ref_out exposes the stored reference pixels (its edge rows and columns
// feed the neighbouring sub-arrays) and ad the 16 absolute differences
// against cur. en is the sub-array's clock enable: an inactive sub-array
// keeps its contents and does not toggle. Cells load on the rising edge
// when en and shift_en are both high.
// The mesh and its four edge inputs follow the 4x4 reuse array drawing.
module pra4x4
  import spiral_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              shift_en,
  input  shift_dir_t        dir,
  input  pixel_t [3:0]      left_in,
  input  pixel_t [3:0]      right_in,
  input  pixel_t [3:0]      up_in,
  input  pixel_t [3:0]      down_in,
  input  pixel_t [3:0][3:0] cur,      // [row][col]
  output pixel_t [3:0][3:0] ref_out,  // [row][col]
  output pixel_t [3:0][3:0] ad        // [row][col]
);
  for (genvar i = 0; i < 4; i++) begin : g_row
    for (genvar j = 0; j < 4; j++) begin : g_col
      pra_cell u_cell (
        .clk               (clk),
        .rst_n             (rst_n),
        .en                (en && shift_en),
        .dir               (dir),
        .uprow_pixel_in    ((i == 0) ? up_in[j]    : ref_out[(i+3)%4][j]),
        .leftcol_pixel_in  ((j == 0) ? left_in[i]  : ref_out[i][(j+3)%4]),
        .rightcol_pixel_in ((j == 3) ? right_in[i] : ref_out[i][(j+1)%4]),
        .downrow_pixel_in  ((i == 3) ? down_in[j]  : ref_out[(i+1)%4][j]),
        .currmb_pixel_in   (cur[i][j]),
        .ref_pixel         (ref_out[i][j]),
        .abs_diff          (ad[i][j])
      );
    end
  end
endmodule
