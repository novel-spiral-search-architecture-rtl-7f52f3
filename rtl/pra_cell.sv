// pra_cell: one cell of the pixel reuse array.
//
// A 4-to-1 multiplexer picks the pixel arriving from the neighbour above,
// left, right or below, according to the shift direction, and loads it into
// the reference-pixel register when en is high. The register drives the
// neighbours (ref_pixel) and an absolute-difference unit that compares it
// with the co-located current-macroblock pixel, |r - c|, combinationally.
// Timing: the register loads on the rising clock edge; abs_diff follows
// ref_pixel and currmb_pixel_in in the same cycle.
// Structure and signal names follow the cell drawing of the architecture;
// the asynchronous reset to zero is this design's choice.
module pra_cell
  import spiral_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  shift_dir_t dir,
  input  pixel_t     uprow_pixel_in,     // from the cell above
  input  pixel_t     leftcol_pixel_in,   // from the cell to the left
  input  pixel_t     rightcol_pixel_in,  // from the cell to the right
  input  pixel_t     downrow_pixel_in,   // from the cell below
  input  pixel_t     currmb_pixel_in,
  output pixel_t     ref_pixel,
  output pixel_t     abs_diff
);
  pixel_t nxt;

  always_comb begin
    unique case (dir)
      SH_RIGHT: nxt = leftcol_pixel_in;
      SH_LEFT:  nxt = rightcol_pixel_in;
      SH_UP:    nxt = downrow_pixel_in;
      default:  nxt = uprow_pixel_in;   // SH_DOWN
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  ref_pixel <= '0;
    else if (en) ref_pixel <= nxt;
  end

  assign abs_diff = (ref_pixel >= currmb_pixel_in) ? ref_pixel - currmb_pixel_in
                                                   : currmb_pixel_in - ref_pixel;
endmodule
