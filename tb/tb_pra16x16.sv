// tb_pra16x16: self-checking test of the 16x16 pixel reuse array.
// For every block size a plain W x H array model anchored at the upper-left
// corner is shifted in random directions with random new rows/columns.
// After each cycle all 256 stored pixels are compared with the model (the
// sub-arrays outside the active block must not change) and the absolute
// differences of the active block are compared with |ref - cur|.
module tb_pra16x16;
  import spiral_pkg::*;
  logic clk = 0, rst_n = 0, shift_en;
  blk_mode_t mode;
  shift_dir_t dir;
  pixel_t [15:0] line_in;
  pixel_t [15:0][15:0] cur, ref_out, ad, m, mn;
  int checks = 0, failures = 0;

  pra16x16 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift_en = 0; mode = MODE_16X16; dir = SH_RIGHT; line_in = '0; m = '0;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) cur[r][c] = pixel_t'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int md = 0; md < 7; md++) begin
      for (int n = 0; n < 400; n++) begin
        int w, h;
        @(negedge clk);
        mode = blk_mode_t'(md);
        w = int'(mode_w(mode));
        h = int'(mode_h(mode));
        shift_en = ($urandom % 6) != 0;
        dir = shift_dir_t'($urandom % 4);
        for (int k = 0; k < 16; k++) line_in[k] = pixel_t'($urandom);
        mn = m;
        if (shift_en)
          for (int r = 0; r < h; r++)
            for (int c = 0; c < w; c++)
              case (dir)
                SH_RIGHT: mn[r][c] = (c == 0)     ? line_in[r] : m[r][c-1];
                SH_LEFT:  mn[r][c] = (c == w - 1) ? line_in[r] : m[r][c+1];
                SH_UP:    mn[r][c] = (r == h - 1) ? line_in[c] : m[r+1][c];
                default:  mn[r][c] = (r == 0)     ? line_in[c] : m[r-1][c];
              endcase
        m = mn;
        @(posedge clk); #1;
        for (int r = 0; r < 16; r++)
          for (int c = 0; c < 16; c++) begin
            checks++;
            if (ref_out[r][c] !== m[r][c]) begin
              failures++;
              if (failures < 10) $display("mode %0d dir %0d: ref[%0d][%0d] got %0d exp %0d",
                                          md, dir, r, c, ref_out[r][c], m[r][c]);
            end
            if (r < h && c < w) begin
              int e;
              e = (int'(m[r][c]) > int'(cur[r][c])) ? int'(m[r][c]) - int'(cur[r][c])
                                                    : int'(cur[r][c]) - int'(m[r][c]);
              checks++;
              if (int'(ad[r][c]) != e) begin
                failures++;
                if (failures < 10) $display("ad[%0d][%0d] got %0d exp %0d", r, c, ad[r][c], e);
              end
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
