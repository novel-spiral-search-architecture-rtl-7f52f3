// tb_best_match: self-checking test of minimum-SAD tracking and early
// termination. Streams of random SAD sets with position tags are fed for
// every block size; the testbench keeps its own minimum of the SAD that
// the mode selects (first strict minimum wins) and checks best_sad,
// best_x/y, the motion vector against the first position, npos, and the
// done pulse after the last tag. With a threshold, it checks that the
// search ends at the first SAD below it, that stop rises, and that later
// positions are ignored.
module tb_best_match;
  import spiral_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  blk_mode_t mode = MODE_16X16;
  sad_t threshold = '0;
  sad_set_t sads = '0;
  pos_tag_t tag = '0;
  logic stop, active, done, early_term;
  sad_t best_sad;
  logic [4:0] best_x, best_y;
  logic signed [5:0] mv_x, mv_y;
  logic [8:0] npos;
  int checks = 0, failures = 0;

  best_match dut (.*);

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

  task automatic search(blk_mode_t md, int thr, int len);
    int bs, bx, by, cx, cy, cnt, stop_at, seen_done;
    @(negedge clk);
    mode = md; threshold = sad_t'(thr); start = 1;
    @(negedge clk);
    start = 0;
    bs = 1 << 30; cnt = 0; stop_at = -1; seen_done = 0;
    cx = 0; cy = 0; bx = 0; by = 0;
    for (int n = 0; n < len; n++) begin
      int v;
      sads = sad_set_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                          $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                          $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                          $urandom, $urandom, $urandom});
      tag.valid = ($urandom % 5) != 0 || n == len - 1;
      tag.last  = (n == len - 1);
      tag.x = 5'($urandom); tag.y = 5'($urandom);
      v = pick(sads, md);
      if (tag.valid && stop_at < 0) begin
        if (cnt == 0) begin cx = int'(tag.x); cy = int'(tag.y); end
        if (cnt == 0 || v < bs) begin bs = v; bx = int'(tag.x); by = int'(tag.y); end
        cnt++;
        if (thr != 0 && v < thr) stop_at = n;
      end
      @(negedge clk);
      if (done) seen_done++;
      if (stop_at >= 0) chk(stop && early_term, "stop after a SAD below threshold");
    end
    tag = '0;
    @(negedge clk);
    if (done) seen_done++;
    chk(seen_done == 1, $sformatf("one done pulse (%0d)", seen_done));
    chk(int'(best_sad) == bs && int'(best_x) == bx && int'(best_y) == by,
        $sformatf("best got %0d (%0d,%0d) exp %0d (%0d,%0d)", best_sad, best_x, best_y, bs, bx, by));
    chk(int'(mv_x) == bx - cx && int'(mv_y) == by - cy, "motion vector");
    chk(int'(npos) == cnt, $sformatf("npos %0d exp %0d", npos, cnt));
    chk(early_term == (stop_at >= 0), "early_term flag");
    chk(!active, "idle after the search");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++)
      search(blk_mode_t'($urandom % 7), ($urandom % 3 == 0) ? int'($urandom % 8000) : 0,
             1 + $urandom % 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
