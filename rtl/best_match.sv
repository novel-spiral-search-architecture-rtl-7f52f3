// best_match: minimum-SAD tracking and threshold early termination.
//
// Watches the SAD sets leaving the SAD tree. For every valid position it
// takes the SAD of the block size being searched (the 16x16 SAD, or the
// upper-left partition's SAD for a smaller mode) and keeps the smallest one
// seen with its block origin. The first position of a search is the spiral
// centre; the motion vector is reported relative to it. A strictly smaller
// SAD is needed to replace the best match, so on a tie the position nearer
// the centre in spiral order wins.
//
// Early termination: with a non-zero threshold, a SAD below the threshold
// ends the search. early_term (and stop, which the address generator
// obeys) rises in the next cycle, done pulses with it, and positions still
// in flight are ignored. Without early termination done pulses one cycle
// after the position tagged last. start clears everything for a new search.
// npos counts the positions evaluated. Outputs are registered.
// Tracking the minimum SAD and stopping on a threshold follow the
// architecture description; how the result is reported is this design's
// choice.
module best_match
  import spiral_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  blk_mode_t  mode,
  input  sad_t       threshold,
  input  sad_set_t   sads,
  input  pos_tag_t   tag,
  output logic       stop,
  output logic       active,
  output logic       done,
  output sad_t       best_sad,
  output logic [4:0] best_x,
  output logic [4:0] best_y,
  output logic signed [5:0] mv_x,
  output logic signed [5:0] mv_y,
  output logic       early_term,
  output logic [8:0] npos
);
  sad_t       sel;
  logic       first;
  logic [4:0] cen_x, cen_y;

  always_comb begin
    unique case (mode)
      MODE_16X16: sel = sads.s16x16;
      MODE_16X8:  sel = sads.s16x8[0];
      MODE_8X16:  sel = sads.s8x16[0];
      MODE_8X8:   sel = sads.s8x8[0];
      MODE_8X4:   sel = sads.s8x4[0];
      MODE_4X8:   sel = sads.s4x8[0];
      default:    sel = sads.s4x4[0];
    endcase
  end

  assign stop = early_term;
  assign mv_x = 6'(best_x) - 6'(cen_x);
  assign mv_y = 6'(best_y) - 6'(cen_y);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; done <= 1'b0; first <= 1'b0; early_term <= 1'b0;
      best_sad <= '1; best_x <= '0; best_y <= '0; cen_x <= '0; cen_y <= '0;
      npos <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        active     <= 1'b1;
        first      <= 1'b1;
        early_term <= 1'b0;
        best_sad   <= '1;
        npos       <= '0;
      end else if (active && tag.valid) begin
        npos  <= npos + 1'b1;
        first <= 1'b0;
        if (first) begin
          cen_x <= tag.x;
          cen_y <= tag.y;
        end
        if (first || sel < best_sad) begin
          best_sad <= sel;
          best_x   <= tag.x;
          best_y   <= tag.y;
        end
        if (threshold != '0 && sel < threshold) begin
          early_term <= 1'b1;
          active     <= 1'b0;
          done       <= 1'b1;
        end else if (tag.last) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end
endmodule
