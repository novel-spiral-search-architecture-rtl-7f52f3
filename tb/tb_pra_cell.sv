// tb_pra_cell: self-checking test of one pixel reuse array cell.
// Drives random neighbour pixels and directions, and checks that the
// register loads the neighbour selected by the direction only when enabled,
// and that abs_diff equals |ref - cur| computed here.
module tb_pra_cell;
  import spiral_pkg::*;
  logic clk = 0, rst_n = 0, en;
  shift_dir_t dir;
  pixel_t up, lf, rt, dn, cu, rp, ad;
  int checks = 0, failures = 0;
  pixel_t model;

  pra_cell dut (.clk, .rst_n, .en, .dir, .uprow_pixel_in(up), .leftcol_pixel_in(lf),
                .rightcol_pixel_in(rt), .downrow_pixel_in(dn), .currmb_pixel_in(cu),
                .ref_pixel(rp), .abs_diff(ad));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; dir = SH_RIGHT; up = 0; lf = 0; rt = 0; dn = 0; cu = 0;
    model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en  = ($urandom % 4) != 0;
      dir = shift_dir_t'($urandom % 4);
      up = pixel_t'($urandom); lf = pixel_t'($urandom);
      rt = pixel_t'($urandom); dn = pixel_t'($urandom); cu = pixel_t'($urandom);
      if (en) case (dir)
        SH_RIGHT: model = lf;
        SH_LEFT:  model = rt;
        SH_UP:    model = dn;
        default:  model = up;
      endcase
      @(posedge clk); #1;
      checks++;
      if (rp !== model) begin
        failures++;
        if (failures < 10) $display("ref mismatch: got %0d exp %0d", rp, model);
      end
      checks++;
      if (int'(ad) != ((int'(model) > int'(cu)) ? int'(model) - int'(cu) : int'(cu) - int'(model))) begin
        failures++;
        if (failures < 10) $display("abs mismatch: ref %0d cur %0d ad %0d", model, cu, ad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
