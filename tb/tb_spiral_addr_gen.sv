// tb_spiral_addr_gen: self-checking test of the spiral address generator.
// For random centres and every block size the expected spiral is built
// here by walking each ring R with fixed segment lengths (left 1, down
// 2R-1, right 2R, up 2R, left 2R) while the ring fits in the window. The
// test checks the centre load rows, that every access reads exactly the
// row or column the move needs with the right offset and shift direction,
// the order of the tagged positions, the last flag, and the cycle count
// H + 4*Rmax*(Rmax+1) (8R positions in ring R). The ring-1 boundary
// example (centre (3,4), 16x16: left column 2, bottom row 20, right
// column 19, top row 3) is checked
// explicitly, as is a full +-8 search (289 positions) and early stop.
module tb_spiral_addr_gen;
  import spiral_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  logic [4:0] center_x = 0, center_y = 0;
  blk_mode_t mode = MODE_16X16;
  logic acc_valid, acc_is_col, busy;
  logic [4:0] acc_line, acc_off, ring;
  shift_dir_t acc_dir;
  pos_tag_t tag;
  int checks = 0, failures = 0;

  spiral_addr_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic bit fits(int x, int y, int w, int h, int r);
    return x - r >= 0 && y - r >= 0 && x + w - 1 + r <= 31 && y + h - 1 + r <= 31;
  endfunction

  // Runs one search; stop_after > 0 raises stop after that many positions.
  // Returns the number of positions tagged.
  task automatic run(int cx_in, int cy_in, blk_mode_t md, int stop_after,
                     output int npos, output int ncyc, output int lines[$]);
    int w, h, cx, cy, rmax, x, y;
    int ex[$], ey[$];
    int px, py, k;
    w = int'(mode_w(md)); h = int'(mode_h(md));
    cx = (cx_in > 32 - w) ? 32 - w : cx_in;
    cy = (cy_in > 32 - h) ? 32 - h : cy_in;
    ex.push_back(cx); ey.push_back(cy);
    rmax = 0;
    for (int r = 1; fits(cx, cy, w, h, r); r++) begin
      rmax = r;
      x = cx - r + 1; y = cy - r + 1;
      x--; ex.push_back(x); ey.push_back(y);
      repeat (2*r - 1) begin y++; ex.push_back(x); ey.push_back(y); end
      repeat (2*r)     begin x++; ex.push_back(x); ey.push_back(y); end
      repeat (2*r)     begin y--; ex.push_back(x); ey.push_back(y); end
      repeat (2*r)     begin x--; ex.push_back(x); ey.push_back(y); end
    end
    @(negedge clk);
    center_x = 5'(cx_in); center_y = 5'(cy_in); mode = md; start = 1;
    @(negedge clk);
    start = 0;
    npos = 0; ncyc = 0; k = 0; px = cx; py = cy;
    lines = {};
    while (busy) begin
      if (stop_after > 0 && npos >= stop_after) stop = 1;
      #1;
      if (acc_valid) begin
        ncyc++;
        lines.push_back(int'(acc_line));
        if (k < h) begin
          chk(!acc_is_col && int'(acc_line) == cy + k && int'(acc_off) == cx && acc_dir == SH_UP,
              $sformatf("load row %0d: line %0d off %0d", k, acc_line, acc_off));
          k++;
        end else if (npos < ex.size()) begin
          int nx, ny;
          nx = ex[npos]; ny = ey[npos];
          if (nx == px - 1)
            chk(acc_is_col && int'(acc_line) == nx && int'(acc_off) == py && acc_dir == SH_RIGHT, "left move");
          else if (nx == px + 1)
            chk(acc_is_col && int'(acc_line) == px + w && int'(acc_off) == py && acc_dir == SH_LEFT, "right move");
          else if (ny == py + 1)
            chk(!acc_is_col && int'(acc_line) == py + h && int'(acc_off) == px && acc_dir == SH_UP, "down move");
          else
            chk(!acc_is_col && int'(acc_line) == py - 1 && int'(acc_off) == px && acc_dir == SH_DOWN, "up move");
        end
      end
      if (tag.valid) begin
        chk(npos < ex.size() && int'(tag.x) == ex[npos] && int'(tag.y) == ey[npos],
            $sformatf("position %0d: got (%0d,%0d) exp (%0d,%0d)", npos, tag.x, tag.y,
                      ex[npos], ey[npos]));
        chk(tag.last == (npos == ex.size() - 1), $sformatf("last flag at %0d", npos));
        px = int'(tag.x); py = int'(tag.y);
        npos++;
      end
      @(negedge clk);
    end
    stop = 0;
    if (stop_after == 0) begin
      chk(npos == ex.size(), $sformatf("position count %0d exp %0d", npos, ex.size()));
      chk(ncyc == h + 4 * rmax * (rmax + 1),
          $sformatf("cycles %0d exp %0d", ncyc, h + 4 * rmax * (rmax + 1)));
    end
  endtask

  initial begin
    int np, nc;
    int lines[$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // boundary example: centre (3,4), 16x16
    run(3, 4, MODE_16X16, 0, np, nc, lines);
    chk(np == 1 + 8 + 16 + 24, "centre (3,4) searches rings 1..3");
    chk(lines[16] == 2 && lines[17] == 20 && lines[18] == 18 && lines[19] == 19
        && lines[20] == 4 && lines[21] == 3 && lines[22] == 3 && lines[23] == 2,
        "ring 1 accesses for centre (3,4)");
    // full +-8 search
    run(8, 8, MODE_16X16, 0, np, nc, lines);
    chk(np == 289, $sformatf("full search 289 positions, got %0d", np));
    chk(nc == 16 + 288, "full search cycle count");
    // random centres and all block sizes
    for (int n = 0; n < 60; n++)
      run($urandom % 32, $urandom % 32, blk_mode_t'($urandom % 7), 0, np, nc, lines);
    // early stop
    run(8, 8, MODE_16X16, 20, np, nc, lines);
    chk(np <= 21 && !busy, $sformatf("stop ends the search (%0d positions)", np));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
