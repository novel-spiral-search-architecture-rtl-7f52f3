// tb_sad_tree: self-checking test of the pipelined SAD tree.
// Feeds a new random 16x16 block of absolute differences every cycle (with
// all-255 blocks to reach the largest sums), computes all 41 SADs here
// directly from the pixels, and checks each result and its tag exactly
// three cycles later.
module tb_sad_tree;
  import spiral_pkg::*;
  logic clk = 0, rst_n = 0;
  pixel_t [15:0][15:0] ad;
  pos_tag_t tag_in, tag_out;
  sad_set_t sads;
  sad_set_t exp_q [$];
  pos_tag_t tag_q [$];
  int checks = 0, failures = 0;

  sad_tree dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int blk(pixel_t [15:0][15:0] a, int r0, int c0, int h, int w);
    int s = 0;
    for (int r = r0; r < r0 + h; r++)
      for (int c = c0; c < c0 + w; c++) s += int'(a[r][c]);
    return s;
  endfunction

  function automatic sad_set_t model(pixel_t [15:0][15:0] a);
    sad_set_t e;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) e.s4x4[4*i+j] = sad_t'(blk(a, 4*i, 4*j, 4, 4));
    for (int qa = 0; qa < 2; qa++)
      for (int qb = 0; qb < 2; qb++) begin
        int q = 2*qa + qb;
        e.s8x8[q]      = sad_t'(blk(a, 8*qa, 8*qb, 8, 8));
        e.s8x4[2*q]    = sad_t'(blk(a, 8*qa, 8*qb, 4, 8));
        e.s8x4[2*q+1]  = sad_t'(blk(a, 8*qa + 4, 8*qb, 4, 8));
        e.s4x8[2*q]    = sad_t'(blk(a, 8*qa, 8*qb, 8, 4));
        e.s4x8[2*q+1]  = sad_t'(blk(a, 8*qa, 8*qb + 4, 8, 4));
      end
    e.s16x8[0] = sad_t'(blk(a, 0, 0, 8, 16));
    e.s16x8[1] = sad_t'(blk(a, 8, 0, 8, 16));
    e.s8x16[0] = sad_t'(blk(a, 0, 0, 16, 8));
    e.s8x16[1] = sad_t'(blk(a, 0, 8, 16, 8));
    e.s16x16   = sad_t'(blk(a, 0, 0, 16, 16));
    return e;
  endfunction

  initial begin
    ad = '0; tag_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      // compare what left the pipeline at the last edge
      if (exp_q.size() == 3) begin
        sad_set_t e;
        pos_tag_t t;
        e = exp_q.pop_front();
        t = tag_q.pop_front();
        checks++;
        if (sads !== e) begin
          failures++;
          if (failures < 10) $display("cycle %0d: SAD mismatch 16x16 got %0d exp %0d", n, sads.s16x16, e.s16x16);
        end
        checks++;
        if (tag_out !== t) begin
          failures++;
          if (failures < 10) $display("cycle %0d: tag mismatch", n);
        end
      end
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++)
          ad[r][c] = (n % 50 == 7) ? 8'hff : pixel_t'($urandom);
      tag_in = pos_tag_t'($urandom);
      exp_q.push_back(model(ad));
      tag_q.push_back(tag_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
