// spiral_me_top: spiral-search motion estimator.
//
// Full-search block matching that starts at a predicted search centre and
// grows outwards ring by ring, so that a search can stop early once a good
// enough match is found. Data flow, one block position per clock:
//
//   search_mem --row/column--> pra16x16 --|r-c| x256--> sad_tree --> best_match
//        ^                        ^                                     |
//   spiral_addr_gen (addresses) ---+ cur_mb_mem (current block)        stop
//
// The address generator reads exactly one 16-pixel row or column of the
// 32x32 search window per cycle; the pixel reuse array shifts it in and
// reuses the other 240 reference pixels. The SAD tree produces all 41
// H.264 sub-block SADs three cycles later, and best_match keeps the
// minimum and raises stop when a SAD falls below the threshold.
//
// Use: write the window (sw_wr_*, one half-row per cycle) and the current
// block (mb_wr_*, one row per cycle) while busy is low, then pulse start
// with centre, mode and threshold (0 = no early termination). start is
// ignored while busy. done pulses when the search ends; best_* and mv_*
// then hold the result until the next start. After an early termination
// busy stays high for up to four more cycles while the positions still in
// the pipeline drain (they are discarded). Every evaluated position also
// appears on sad_out with sad_valid, sad_x and sad_y.
// Latency: H cycles to load the centre block, then one position per cycle;
// a result leaves the SAD tree 4 cycles after its access and done follows
// one cycle later. A full +-8 search of a 16x16 block (centre (8,8)) takes
// 16 + 288 access cycles.
// The reuse array's ref_out port (its stored pixels) is left open here:
// only the absolute differences are needed.
// The block structure follows the architecture description; the port
// protocol, the one-cycle alignment register in front of the SAD tree and
// the reporting are this design's choices.
module spiral_me_top
  import spiral_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // search window write
  input  logic                sw_wr_en,
  input  logic [4:0]          sw_wr_row,
  input  logic                sw_wr_half,
  input  pixel_t [15:0]       sw_wr_pix,
  // current macroblock write
  input  logic                mb_wr_en,
  input  logic [3:0]          mb_wr_row,
  input  pixel_t [15:0]       mb_wr_pix,
  // search control
  input  logic                start,
  input  logic [4:0]          center_x,
  input  logic [4:0]          center_y,
  input  blk_mode_t           mode,
  input  sad_t                threshold,
  // result
  output logic                busy,
  output logic                done,
  output sad_t                best_sad,
  output logic [4:0]          best_x,
  output logic [4:0]          best_y,
  output logic signed [5:0]   mv_x,
  output logic signed [5:0]   mv_y,
  output logic                early_term,
  output logic [8:0]          npos,
  output logic [4:0]          ring,       // ring radius being searched
  // SADs of every evaluated position
  output logic                sad_valid,
  output sad_set_t            sad_out,
  output logic [4:0]          sad_x,
  output logic [4:0]          sad_y
);
  logic            start_ok;
  blk_mode_t       mode_q;
  sad_t            thr_q;

  logic            gen_busy, bm_active, stop;
  logic            acc_valid, acc_is_col;
  logic [4:0]      acc_line, acc_off;
  shift_dir_t      acc_dir;
  pos_tag_t        gen_tag, pra_tag, sad_tag;

  pixel_t [15:0]       rd_pix;
  pixel_t [15:0][15:0] cur_mb, ad;

  // After an early stop up to four positions are still in the reuse array
  // and SAD pipeline; busy covers them so that they cannot reach the next
  // search.
  logic [2:0] drain;

  assign busy     = gen_busy || bm_active || (drain != '0);
  assign start_ok = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q  <= MODE_16X16;
      thr_q   <= '0;
      pra_tag <= '0;
      drain   <= '0;
    end else begin
      if (gen_busy)           drain <= 3'd4;
      else if (drain != '0)   drain <= drain - 1'b1;
      if (start_ok) begin
        mode_q <= mode;
        thr_q  <= threshold;
      end
      pra_tag <= gen_tag;       // the reuse array holds this position next cycle
    end
  end

  search_mem #(.P(MB)) u_smem (
    .clk       (clk),
    .wr_en     (sw_wr_en && !busy),
    .wr_row    (sw_wr_row),
    .wr_half   (sw_wr_half),
    .wr_pix    (sw_wr_pix),
    .rd_is_col (acc_is_col),
    .rd_line   (acc_line),
    .rd_off    (acc_off),
    .rd_pix    (rd_pix)
  );

  cur_mb_mem u_cur (
    .clk    (clk),
    .wr_en  (mb_wr_en && !busy),
    .wr_row (mb_wr_row),
    .wr_pix (mb_wr_pix),
    .mb     (cur_mb)
  );

  spiral_addr_gen #(.SWIN(SW)) u_gen (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start_ok),
    .center_x   (center_x),
    .center_y   (center_y),
    .mode       (mode),
    .stop       (stop),
    .acc_valid  (acc_valid),
    .acc_is_col (acc_is_col),
    .acc_line   (acc_line),
    .acc_off    (acc_off),
    .acc_dir    (acc_dir),
    .tag        (gen_tag),
    .busy       (gen_busy),
    .ring       (ring)
  );

  pra16x16 u_pra (
    .clk      (clk),
    .rst_n    (rst_n),
    .mode     (mode_q),
    .shift_en (acc_valid),
    .dir      (acc_dir),
    .line_in  (rd_pix),
    .cur      (cur_mb),
    .ref_out  (),
    .ad       (ad)
  );

  sad_tree u_sad (
    .clk     (clk),
    .rst_n   (rst_n),
    .ad      (ad),
    .tag_in  (pra_tag),
    .sads    (sad_out),
    .tag_out (sad_tag)
  );

  best_match u_best (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start_ok),
    .mode       (mode_q),
    .threshold  (thr_q),
    .sads       (sad_out),
    .tag        (sad_tag),
    .stop       (stop),
    .active     (bm_active),
    .done       (done),
    .best_sad   (best_sad),
    .best_x     (best_x),
    .best_y     (best_y),
    .mv_x       (mv_x),
    .mv_y       (mv_y),
    .early_term (early_term),
    .npos       (npos)
  );

  assign sad_valid = sad_tag.valid && bm_active;
  assign sad_x     = sad_tag.x;
  assign sad_y     = sad_tag.y;

endmodule
