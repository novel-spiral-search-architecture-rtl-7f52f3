// cur_mb_mem: current macroblock memory.
//
// A 16x16 array of pixel registers written one 16-pixel row per cycle
// (wr_row selects the row, wr_pix holds columns 0..15) and read all at once:
// mb[r][c] is wired to the current-pixel input of reuse-array cell (r, c).
// The macroblock is loaded before a search and stays constant during it.
// Timing: a row written at a rising edge is visible on mb right after it.
// The architecture states only that the current macroblock is loaded into
// the comparator before a search; the row-wide write port is this design's
// choice.
module cur_mb_mem
  import spiral_pkg::*;
(
  input  logic                clk,
  input  logic                wr_en,
  input  logic [3:0]          wr_row,
  input  pixel_t [15:0]       wr_pix,
  output pixel_t [15:0][15:0] mb      // [row][col]
);
  always_ff @(posedge clk) begin
    if (wr_en) mb[wr_row] <= wr_pix;
  end
endmodule
