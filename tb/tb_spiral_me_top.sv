// tb_spiral_me_top: end-to-end test of the spiral-search motion estimator
// at its full size (32x32 window, 16x16 macroblock).
//
// A random 32x32 reference window and a current macroblock are written
// through the write ports. The macroblock is a copy of the window block at
// a chosen position with a few pixels changed, so a clear best match
// exists. The testbench computes, for every position that appears on
// sad_out, all 41 sub-block SADs directly from the window and the
// macroblock, and checks them. It checks that the positions follow the
// spiral order (one ring after another, each a step of one pixel), the
// minimum SAD and motion vector of each search, the position count and
// the cycle count from start to done: H + 4*Rmax*(Rmax+1) access cycles
// plus 5 cycles of pipeline.
//
// Searches run: a full +-8 search of a 16x16 block from centre (8,8)
// (289 positions), searches at other centres for every block size (which
// use the bypass paths of the reuse array), a search with a threshold that
// ends early on the planted match, and a start pulse while busy (ignored).
// Each mechanism - left, right, up and down moves, ring growth, the
// window-edge termination, early termination, every bypass block size,
// centre clamping and the ignored start - is counted and must occur.
module tb_spiral_me_top;
  import spiral_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sw_wr_en = 0, sw_wr_half = 0, mb_wr_en = 0, start = 0;
  logic [4:0] sw_wr_row = 0, center_x = 0, center_y = 0;
  logic [3:0] mb_wr_row = 0;
  pixel_t [15:0] sw_wr_pix = '0, mb_wr_pix = '0;
  blk_mode_t mode = MODE_16X16;
  sad_t threshold = '0;
  logic busy, done, early_term, sad_valid;
  sad_t best_sad;
  logic [4:0] best_x, best_y, sad_x, sad_y, ring;
  logic signed [5:0] mv_x, mv_y;
  logic [8:0] npos;
  sad_set_t sad_out;

  pixel_t img [32][32];
  pixel_t mbm [16][16];
  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0, n_up = 0, n_down = 0, n_ring = 0, n_edge = 0;
  int n_early = 0, n_clamp = 0, n_busy_start = 0;
  int n_mode [7];

  spiral_me_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  function automatic int bsad(int x, int y, int r0, int c0, int h, int w);
    int s = 0;
    for (int r = r0; r < r0 + h; r++)
      for (int c = c0; c < c0 + w; c++) begin
        int d;
        d = int'(img[y + r][x + c]) - int'(mbm[r][c]);
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  function automatic sad_set_t model(int x, int y, int w, int h);
    sad_set_t e;
    // only the part covered by the active block is meaningful
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) e.s4x4[4*i+j] = sad_t'(bsad(x, y, 4*i, 4*j, 4, 4));
    for (int qa = 0; qa < 2; qa++)
      for (int qb = 0; qb < 2; qb++) begin
        int q = 2*qa + qb;
        e.s8x8[q]     = sad_t'(bsad(x, y, 8*qa, 8*qb, 8, 8));
        e.s8x4[2*q]   = sad_t'(bsad(x, y, 8*qa, 8*qb, 4, 8));
        e.s8x4[2*q+1] = sad_t'(bsad(x, y, 8*qa + 4, 8*qb, 4, 8));
        e.s4x8[2*q]   = sad_t'(bsad(x, y, 8*qa, 8*qb, 8, 4));
        e.s4x8[2*q+1] = sad_t'(bsad(x, y, 8*qa, 8*qb + 4, 8, 4));
      end
    e.s16x8[0] = sad_t'(bsad(x, y, 0, 0, 8, 16));
    e.s16x8[1] = sad_t'(bsad(x, y, 8, 0, 8, 16));
    e.s8x16[0] = sad_t'(bsad(x, y, 0, 0, 16, 8));
    e.s8x16[1] = sad_t'(bsad(x, y, 0, 8, 16, 8));
    e.s16x16   = sad_t'(bsad(x, y, 0, 0, 16, 16));
    return e;
  endfunction

  function automatic int pick(sad_set_t s, blk_mode_t m);
    case (m)
      MODE_16X16: return int'(s.s16x16);
      MODE_16X8:  return int'(s.s16x8[0]);
      MODE_8X16:  return int'(s.s8x16[0]);
      MODE_8X8:   return int'(s.s8x8[0]);
      MODE_8X4:   return int'(s.s8x4[0]);
      MODE_4X8:   return int'(s.s4x8[0]);
      default:    return int'(s.s4x4[0]);
    endcase
  endfunction

  function automatic bit fits(int x, int y, int w, int h, int r);
    return x - r >= 0 && y - r >= 0 && x + w - 1 + r <= 31 && y + h - 1 + r <= 31;
  endfunction

  // Write the window with random pixels and the macroblock as the block at
  // (mx, my) with nchg pixels changed.
  task automatic load(int mx, int my, int nchg);
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++) img[r][c] = pixel_t'($urandom);
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) mbm[r][c] = img[my + r][mx + c];
    repeat (nchg) mbm[$urandom % 16][$urandom % 16] = pixel_t'($urandom);
    for (int r = 0; r < 32; r++)
      for (int hf = 0; hf < 2; hf++) begin
        @(negedge clk);
        sw_wr_en = 1; sw_wr_row = 5'(r); sw_wr_half = hf[0];
        for (int k = 0; k < 16; k++) sw_wr_pix[k] = img[r][16*hf + k];
      end
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      sw_wr_en = 0; mb_wr_en = 1; mb_wr_row = 4'(r);
      for (int k = 0; k < 16; k++) mb_wr_pix[k] = mbm[r][k];
    end
    @(negedge clk);
    mb_wr_en = 0;
  endtask

  task automatic search(int cx_in, int cy_in, blk_mode_t md, int thr, bit poke_busy);
    int w, h, cx, cy, rmax, cyc, cnt, bs, bx, by, px, py, r_prev, nexp, stopped;
    bit got_done;
    w = int'(mode_w(md)); h = int'(mode_h(md));
    cx = (cx_in > 32 - w) ? 32 - w : cx_in;
    cy = (cy_in > 32 - h) ? 32 - h : cy_in;
    if (cx != cx_in || cy != cy_in) n_clamp++;
    rmax = 0;
    while (fits(cx, cy, w, h, rmax + 1)) rmax++;
    nexp = 1 + 4 * rmax * (rmax + 1);
    n_mode[int'(md)]++;
    @(negedge clk);
    while (busy) @(negedge clk);
    center_x = 5'(cx_in); center_y = 5'(cy_in); mode = md; threshold = sad_t'(thr);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1; cnt = 0; bs = 0; bx = 0; by = 0; px = cx; py = cy; r_prev = 0;
    got_done = 0; stopped = 0;
    while (!got_done && cyc < 2000) begin
      if (poke_busy && cyc == 40) begin
        // a start while busy must be ignored
        center_x = 0; center_y = 0; start = 1; n_busy_start++;
      end else start = 0;
      #1;
      if (sad_valid) begin
        int x, y, v, rr;
        sad_set_t e;
        x = int'(sad_x); y = int'(sad_y);
        e = model(x, y, w, h);
        v = pick(sad_out, md);
        chk(v == pick(e, md), $sformatf("mode %0d pos (%0d,%0d): SAD %0d exp %0d", md, x, y, v, pick(e, md)));
        if (md == MODE_16X16)
          chk(sad_out == e, $sformatf("all 41 SADs at (%0d,%0d)", x, y));
        else begin
          // every sub-block SAD that lies inside the active block
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++)
              if (4*i + 4 <= h && 4*j + 4 <= w)
                chk(sad_out.s4x4[4*i+j] == e.s4x4[4*i+j], "4x4 SAD inside the block");
          for (int q = 0; q < 4; q++)
            if (8*(q/2) + 8 <= h && 8*(q%2) + 8 <= w)
              chk(sad_out.s8x8[q] == e.s8x8[q] && sad_out.s8x4[2*q +: 2] == e.s8x4[2*q +: 2]
                  && sad_out.s4x8[2*q +: 2] == e.s4x8[2*q +: 2], "8x8, 8x4, 4x8 SADs inside the block");
          if (w == 8 && h == 4) chk(sad_out.s8x4[0] == e.s8x4[0], "8x4 SAD");
          if (w == 4 && h == 8) chk(sad_out.s4x8[0] == e.s4x8[0], "4x8 SAD");
          if (w == 16 && h == 8) chk(sad_out.s16x8[0] == e.s16x8[0], "16x8 SAD");
          if (w == 8 && h == 16) chk(sad_out.s8x16[0] == e.s8x16[0], "8x16 SAD");
        end
        // spiral order: first the centre, then steps of one pixel with
        // Chebyshev distance never decreasing
        rr = ((x - cx < 0 ? cx - x : x - cx) > (y - cy < 0 ? cy - y : y - cy))
             ? (x - cx < 0 ? cx - x : x - cx) : (y - cy < 0 ? cy - y : y - cy);
        if (cnt == 0) chk(x == cx && y == cy, "search starts at the centre");
        else begin
          chk(((x - px) * (x - px) + (y - py) * (y - py)) == 1, "one-pixel step");
          chk(rr == r_prev || rr == r_prev + 1 || (rr == r_prev - 1 && x == px - 1),
              "ring order");
          if (x == px - 1) n_left++;
          if (x == px + 1) n_right++;
          if (y == py + 1) n_down++;
          if (y == py - 1) n_up++;
          if (rr > r_prev) n_ring++;
        end
        if (cnt == 0 || v < bs) begin bs = v; bx = x; by = y; end
        if (thr != 0 && v < thr && stopped == 0) stopped = cnt + 1;
        px = x; py = y; r_prev = (rr > r_prev) ? rr : r_prev;
        cnt++;
      end
      if (done) got_done = 1;
      @(negedge clk);
      cyc++;
    end
    start = 0;
    chk(got_done, "done pulse");
    chk(int'(best_sad) == bs && int'(best_x) == bx && int'(best_y) == by,
        $sformatf("best %0d at (%0d,%0d), exp %0d at (%0d,%0d)", best_sad, best_x, best_y, bs, bx, by));
    chk(int'(mv_x) == bx - cx && int'(mv_y) == by - cy, "motion vector");
    if (stopped != 0) begin
      n_early++;
      chk(early_term && cnt == stopped && int'(npos) == stopped,
          $sformatf("early termination after %0d positions (npos %0d)", stopped, npos));
    end else begin
      n_edge++;
      chk(!early_term, "no early termination");
      chk(cnt == nexp && int'(npos) == nexp, $sformatf("positions %0d exp %0d", cnt, nexp));
      // accesses in cycles 1..H+nexp-1, done 5 cycles after the last
      chk(cyc - 1 == h + nexp - 1 + 5,
          $sformatf("cycles to done %0d exp %0d", cyc - 1, h + nexp - 1 + 5));
    end
    repeat (5) if (busy) @(negedge clk);
    chk(!busy, "idle within 5 cycles of done");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // full +-8 search, planted match at mv (+3,-2)
    load(11, 6, 3);
    search(8, 8, MODE_16X16, 0, 1'b1);
    chk(int'(mv_x) == 3 && int'(mv_y) == -2, $sformatf("full search finds planted match, mv (%0d,%0d)", mv_x, mv_y));
    // early termination on the same data: threshold just above the match
    search(8, 8, MODE_16X16, bsad(11, 6, 0, 0, 16, 16) + 1, 1'b0);
    chk(int'(best_x) == 11 && int'(best_y) == 6, "early termination at the planted match");
    // other centres and every block size
    for (int n = 0; n < 14; n++) begin
      load($urandom % 17, $urandom % 17, $urandom % 8);
      search($urandom % 32, $urandom % 32, blk_mode_t'(n % 7), 0, 1'b0);
    end
    // threshold searches for small partitions
    load(10, 12, 0);
    search(10, 10, MODE_8X8, 1, 1'b0);
    search(4, 30, MODE_4X4, 0, 1'b0);
    $display("moves L %0d R %0d U %0d D %0d, ring steps %0d, edge ends %0d, early ends %0d, clamps %0d, starts while busy %0d",
             n_left, n_right, n_up, n_down, n_ring, n_edge, n_early, n_clamp, n_busy_start);
    chk(n_left > 0 && n_right > 0 && n_up > 0 && n_down > 0, "all four move directions");
    chk(n_ring > 0, "ring growth");
    chk(n_edge > 0, "window-edge termination");
    chk(n_early > 0, "early termination");
    chk(n_clamp > 0, "centre clamping");
    chk(n_busy_start > 0, "start while busy");
    for (int m = 0; m < 7; m++) chk(n_mode[m] > 0, $sformatf("block size %0d used", m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
