// tb_vga_frame: one 640x480 frame of +-8 motion estimation, timed.
//
// A synthetic reference frame is generated from a pixel hash (coordinates
// outside the frame are clamped to its edge). Every 16x16 macroblock of
// the current frame is a copy of the reference at its own known motion
// vector within +-8, with a few pixels altered in one block of three. For
// each of the 40x30 = 1200 macroblocks the testbench writes the 32x32
// search window around the block and the block itself into the design,
// searches from centre (8,8), and checks the motion vector and the SAD at
// it, computed here. It counts every clock of the frame, loads included,
// and checks the frame against the 60 fps budget at 500 MHz
// (500e6 / 60 = 8,333,333 cycles, 6,944 per macroblock).
// A second pass over the first two macroblock rows repeats the searches
// with a threshold just above the true SAD and checks that early
// termination finds the same vectors in fewer cycles.
module tb_vga_frame;
  import spiral_pkg::*;
  localparam int FW = 640, FH = 480;
  localparam int BUDGET = 500_000_000 / 60;
  typedef int unsigned u32_t;

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

  int checks = 0, failures = 0;
  longint cycles = 0;
  pixel_t cur [16][16];

  spiral_me_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (2_000_000) @(posedge clk);
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

  function automatic u32_t mix(u32_t a);
    a ^= a >> 16; a *= 32'h7feb352d; a ^= a >> 15; a *= 32'h846ca68b; a ^= a >> 16;
    return a;
  endfunction

  function automatic pixel_t refpix(int x, int y);
    x = (x < 0) ? 0 : (x > FW - 1) ? FW - 1 : x;
    y = (y < 0) ? 0 : (y > FH - 1) ? FH - 1 : y;
    return pixel_t'(mix(u32_t'(x * 1031 + y * 7919 + 17)));
  endfunction

  // true motion vector of macroblock (bx, by), each component in -8..8
  function automatic int mvx(int bx, int by); return int'(mix(u32_t'(bx * 131 + by * 977 + 5)) % 17) - 8; endfunction
  function automatic int mvy(int bx, int by); return int'(mix(u32_t'(bx * 613 + by * 251 + 9)) % 17) - 8; endfunction

  // One macroblock: load window and block, search, check. Returns cycles.
  task automatic do_mb(int bx, int by, bit use_thr, output longint used, output int nused);
    int dx, dy, x0, y0, s;
    longint c0;
    c0 = cycles;
    dx = mvx(bx, by); dy = mvy(bx, by);
    x0 = 16 * bx - 8; y0 = 16 * by - 8;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) begin
        cur[r][c] = refpix(16 * bx + dx + c, 16 * by + dy + r);
        if ((bx + by) % 3 == 0 && (r * 16 + c) % 61 == 7) cur[r][c] ^= 8'h05;
      end
    s = 0;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) begin
        int d;
        d = int'(refpix(x0 + 8 + dx + c, y0 + 8 + dy + r)) - int'(cur[r][c]);
        s += (d < 0) ? -d : d;
      end
    // search window, half-row per cycle
    for (int r = 0; r < 32; r++)
      for (int hf = 0; hf < 2; hf++) begin
        @(negedge clk);
        sw_wr_en = 1; sw_wr_row = 5'(r); sw_wr_half = hf[0];
        for (int k = 0; k < 16; k++) sw_wr_pix[k] = refpix(x0 + 16 * hf + k, y0 + r);
      end
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      sw_wr_en = 0; mb_wr_en = 1; mb_wr_row = 4'(r);
      for (int k = 0; k < 16; k++) mb_wr_pix[k] = cur[r][k];
    end
    @(negedge clk);
    mb_wr_en = 0;
    center_x = 5'd8; center_y = 5'd8; mode = MODE_16X16;
    threshold = use_thr ? sad_t'(s + 1) : '0;
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    chk(int'(mv_x) == dx && int'(mv_y) == dy,
        $sformatf("MB (%0d,%0d): mv (%0d,%0d) exp (%0d,%0d)", bx, by, mv_x, mv_y, dx, dy));
    chk(int'(best_sad) == s, $sformatf("MB (%0d,%0d): SAD %0d exp %0d", bx, by, best_sad, s));
    chk(early_term == use_thr, "early termination only with a threshold");
    nused = int'(npos);
    while (busy) @(negedge clk);
    used = cycles - c0;
  endtask

  initial begin
    longint t0, used, frame, worst, pass2_full, pass2_early;
    int np, pos_full, pos_early;
    repeat (2) @(posedge clk);
    rst_n = 1;
    t0 = cycles; worst = 0;
    for (int by = 0; by < FH / 16; by++)
      for (int bx = 0; bx < FW / 16; bx++) begin
        do_mb(bx, by, 1'b0, used, np);
        chk(np == 289, "289 positions per macroblock");
        if (used > worst) worst = used;
      end
    frame = cycles - t0;
    $display("frame: %0d cycles (%0d per macroblock worst), budget %0d (%0d per macroblock)",
             frame, worst, BUDGET, BUDGET / 1200);
    chk(frame <= BUDGET, "frame fits the 60 fps budget at 500 MHz");
    chk(worst <= BUDGET / 1200, "every macroblock fits its share");
    // early termination on the first two macroblock rows
    pass2_full = 0; pass2_early = 0; pos_full = 0; pos_early = 0;
    for (int by = 0; by < 2; by++)
      for (int bx = 0; bx < FW / 16; bx++) begin
        do_mb(bx, by, 1'b0, used, np); pass2_full += used; pos_full += np;
        do_mb(bx, by, 1'b1, used, np); pass2_early += used; pos_early += np;
      end
    $display("80 macroblocks: %0d positions / %0d cycles full search, %0d positions / %0d cycles with early termination",
             pos_full, pass2_full, pos_early, pass2_early);
    chk(pos_early < pos_full && pass2_early < pass2_full, "early termination saves positions and cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
