// tb_pra4x4: self-checking test of the 4x4 reuse sub-array.
// A 4x4 array model in the testbench is shifted in the same random
// directions with the same random edge inputs; after every cycle the stored
// pixels and the 16 absolute differences are compared with the model.
// The clock enable is also exercised: with en low nothing may change.
module tb_pra4x4;
  import spiral_pkg::*;
  logic clk = 0, rst_n = 0, en, shift_en;
  shift_dir_t dir;
  pixel_t [3:0] l_in, r_in, u_in, d_in;
  pixel_t [3:0][3:0] cur, refo, ad, m, mn;
  int checks = 0, failures = 0;

  pra4x4 dut (.clk, .rst_n, .en, .shift_en, .dir, .left_in(l_in), .right_in(r_in),
              .up_in(u_in), .down_in(d_in), .cur, .ref_out(refo), .ad);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; shift_en = 0; dir = SH_RIGHT; l_in = '0; r_in = '0; u_in = '0; d_in = '0;
    cur = '0; m = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = ($urandom % 8) != 0;
      shift_en = ($urandom % 8) != 0;
      dir = shift_dir_t'($urandom % 4);
      for (int k = 0; k < 4; k++) begin
        l_in[k] = pixel_t'($urandom); r_in[k] = pixel_t'($urandom);
        u_in[k] = pixel_t'($urandom); d_in[k] = pixel_t'($urandom);
        for (int c = 0; c < 4; c++) cur[k][c] = pixel_t'($urandom);
      end
      mn = m;
      if (en && shift_en)
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++)
            case (dir)
              SH_RIGHT: mn[r][c] = (c == 0) ? l_in[r] : m[r][c-1];
              SH_LEFT:  mn[r][c] = (c == 3) ? r_in[r] : m[r][c+1];
              SH_UP:    mn[r][c] = (r == 3) ? d_in[c] : m[r+1][c];
              default:  mn[r][c] = (r == 0) ? u_in[c] : m[r-1][c];
            endcase
      m = mn;
      @(posedge clk); #1;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          int e;
          e = (int'(m[r][c]) > int'(cur[r][c])) ? int'(m[r][c]) - int'(cur[r][c])
                                                : int'(cur[r][c]) - int'(m[r][c]);
          checks++;
          if (refo[r][c] !== m[r][c] || int'(ad[r][c]) != e) begin
            failures++;
            if (failures < 10) $display("cell %0d,%0d: ref %0d exp %0d ad %0d exp %0d",
                                        r, c, refo[r][c], m[r][c], ad[r][c], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
