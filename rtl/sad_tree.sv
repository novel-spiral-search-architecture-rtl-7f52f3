// sad_tree: pipelined sum-of-absolute-differences tree.
//
// Turns the 256 absolute differences of the pixel reuse array into all 41
// SADs that H.264 variable block size motion estimation needs, in three
// register stages:
//   stage 1: sixteen 4x4 SADs (one adder tree per 4x4 sub-array);
//   stage 2: four 8x8 SADs and the eight 8x4 and eight 4x8 SADs, each a sum
//            of two or four stage-1 results;
//   stage 3: the 16x16 SAD and the two 16x8 and two 8x16 SADs, from the
//            stage-2 8x8 SADs.
// Results of the earlier stages are carried along so that one sad_set_t
// holds every SAD of the same block position; tag_out is tag_in delayed
// by the same three cycles. Latency: 3 clock cycles, one position per cycle.
// The three stages and what each produces follow the SAD hardware
// description; the alignment registers and the index order in sad_set_t
// are this design's choices.
module sad_tree
  import spiral_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  pixel_t [15:0][15:0] ad,       // [row][col]
  input  pos_tag_t            tag_in,
  output sad_set_t            sads,
  output pos_tag_t            tag_out
);
  // ---------------- stage 1: 4x4 SADs ------------------------------------
  sad_t [15:0] s4_c, s1_4x4;
  pos_tag_t    tag1, tag2;

  always_comb begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        s4_c[4*i+j] = '0;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++)
            s4_c[4*i+j] += SAD_W'(ad[4*i+r][4*j+c]);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_4x4 <= '0;
      tag1   <= '0;
    end else begin
      s1_4x4 <= s4_c;
      tag1   <= tag_in;
    end
  end

  // ---------------- stage 2: 8x8, 8x4, 4x8 ---------------------------------
  sad_t [3:0]  s8x8_c, s2_8x8;
  sad_t [7:0]  s8x4_c, s4x8_c, s2_8x4, s2_4x8;
  sad_t [15:0] s2_4x4;

  always_comb begin
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++) begin
        for (int h = 0; h < 2; h++)
          s8x4_c[2*(2*a+b)+h] = s1_4x4[(2*a+h)*4+2*b] + s1_4x4[(2*a+h)*4+2*b+1];
        for (int v = 0; v < 2; v++)
          s4x8_c[2*(2*a+b)+v] = s1_4x4[(2*a)*4+2*b+v] + s1_4x4[(2*a+1)*4+2*b+v];
        s8x8_c[2*a+b] = s1_4x4[(2*a)*4+2*b]   + s1_4x4[(2*a)*4+2*b+1]
                      + s1_4x4[(2*a+1)*4+2*b] + s1_4x4[(2*a+1)*4+2*b+1];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_8x8 <= '0; s2_8x4 <= '0; s2_4x8 <= '0; s2_4x4 <= '0;
      tag2   <= '0;
    end else begin
      s2_8x8 <= s8x8_c;
      s2_8x4 <= s8x4_c;
      s2_4x8 <= s4x8_c;
      s2_4x4 <= s1_4x4;
      tag2   <= tag1;
    end
  end

  // ---------------- stage 3: 16x16, 16x8, 8x16 -----------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sads    <= '0;
      tag_out <= '0;
    end else begin
      sads.s4x4    <= s2_4x4;
      sads.s8x4    <= s2_8x4;
      sads.s4x8    <= s2_4x8;
      sads.s8x8    <= s2_8x8;
      sads.s16x8[0] <= s2_8x8[0] + s2_8x8[1];
      sads.s16x8[1] <= s2_8x8[2] + s2_8x8[3];
      sads.s8x16[0] <= s2_8x8[0] + s2_8x8[2];
      sads.s8x16[1] <= s2_8x8[1] + s2_8x8[3];
      sads.s16x16   <= s2_8x8[0] + s2_8x8[1] + s2_8x8[2] + s2_8x8[3];
      tag_out       <= tag2;
    end
  end
endmodule
