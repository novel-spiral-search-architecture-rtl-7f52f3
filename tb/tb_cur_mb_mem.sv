// tb_cur_mb_mem: self-checking test of the current macroblock memory.
// Writes all 16 rows with random pixels, then rewrites random rows, and
// after each write compares all 256 outputs with a model array.
module tb_cur_mb_mem;
  import spiral_pkg::*;
  logic clk = 0, wr_en = 0;
  logic [3:0] wr_row = 0;
  pixel_t [15:0] wr_pix = '0;
  pixel_t [15:0][15:0] mb, m;
  int checks = 0, failures = 0;

  cur_mb_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int row, logic en);
    @(negedge clk);
    wr_en = en; wr_row = 4'(row);
    for (int k = 0; k < 16; k++) wr_pix[k] = pixel_t'($urandom);
    if (en) m[row] = wr_pix;
    @(posedge clk); #1 wr_en = 0;
  endtask

  initial begin
    for (int r = 0; r < 16; r++) wr(r, 1'b1);
    for (int n = 0; n < 200; n++) begin
      wr($urandom % 16, ($urandom % 4) != 0);
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++) begin
          checks++;
          if (mb[r][c] !== m[r][c]) begin
            failures++;
            if (failures < 10) $display("pixel %0d,%0d got %0d exp %0d", r, c, mb[r][c], m[r][c]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
