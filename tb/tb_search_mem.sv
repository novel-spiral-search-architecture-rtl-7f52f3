// tb_search_mem: self-checking test of the rotated, partitioned search
// window memory. The window is written half-row by half-row in the
// alternating P0/P1 then P2/P3 order with random pixels and mirrored in a
// plain 32x32 array here. Every row and column is then read at every
// offset, plus random reads between random rewrites, and each 16-pixel
// slice is compared with the plain array (pixels past the line end read 0).
module tb_search_mem;
  import spiral_pkg::*;
  localparam int P = 16;
  logic clk = 0;
  logic wr_en = 0, wr_half = 0, rd_is_col = 0;
  logic [4:0] wr_row = 0, rd_line = 0, rd_off = 0;
  pixel_t [P-1:0] wr_pix = '0, rd_pix;
  pixel_t img [2*P][2*P];
  int checks = 0, failures = 0;

  search_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_half(int row, int half);
    @(negedge clk);
    wr_en = 1; wr_row = 5'(row); wr_half = half[0];
    for (int k = 0; k < P; k++) begin
      wr_pix[k] = pixel_t'($urandom);
      img[row][half*P + k] = wr_pix[k];
    end
    @(posedge clk); #1 wr_en = 0;
  endtask

  task automatic check_read(int is_col, int line, int off);
    @(negedge clk);
    rd_is_col = is_col[0]; rd_line = 5'(line); rd_off = 5'(off);
    #1;
    for (int k = 0; k < P; k++) begin
      pixel_t e;
      if (off + k >= 2*P) e = '0;
      else e = is_col ? img[off + k][line] : img[line][off + k];
      checks++;
      if (rd_pix[k] !== e) begin
        failures++;
        if (failures < 10) $display("%s %0d off %0d k %0d: got %0d exp %0d",
                                    is_col ? "col" : "row", line, off, k, rd_pix[k], e);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < 2*P; r++) begin
      write_half(r, 0);
      write_half(r, 1);
    end
    for (int c = 0; c < 2; c++)
      for (int line = 0; line < 2*P; line++)
        for (int off = 0; off < 2*P; off++)
          check_read(c, line, off);
    for (int n = 0; n < 500; n++) begin
      write_half($urandom % (2*P), $urandom % 2);
      check_read($urandom % 2, $urandom % (2*P), $urandom % (P+1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
