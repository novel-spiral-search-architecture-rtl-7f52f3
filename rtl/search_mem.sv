// search_mem: search window memory with single-cycle row and column access.
//
// The 2P x 2P window (32x32 by default) is split into four P x P partitions,
// P0 (upper left), P1 (upper right), P2 (lower left) and P3 (lower right).
// Each partition is P banks wide, one pixel per bank. Row r of a partition
// is stored rotated right by (r mod P) pixels: pixel (r, c) lives in bank
// (c + r) mod P at address r. A row therefore sits at one address in every
// bank, and a column is spread diagonally over all banks, so either can be
// read in one cycle when every bank is given its own address.
//
// Write port: one half-row of P pixels per cycle (wr_half 0 = columns
// 0..P-1, 1 = columns P..2P-1), rotated by a bank of P-to-1 multiplexers
// that all partitions share. Writing rows 0..P-1 alternately into P0 and P1
// and then rows P..2P-1 into P2 and P3 fills the window in 4P cycles.
//
// Read port (combinational, three multiplexer levels):
//   1. partition select: a row below P reads {P0,P1}, otherwise {P2,P3};
//      a column below P reads {P0,P2}, otherwise {P1,P3};
//   2. rearrange: each half is rotated back into original pixel order,
//      giving the whole 2P-pixel row or column;
//   3. offset select: P consecutive pixels starting at rd_off are returned.
//      Pixels past the end of the line read as 0 (only needed when a
//      partition smaller than P is searched near the window edge).
// The partitioning, rotation scheme and the three read levels follow the
// architecture description; the explicit row/half write address and the
// zero fill past the line end are this design's choices.
module search_mem
  import spiral_pkg::*;
#(
  parameter int P = 16                   // partition side; window is 2P
) (
  input  logic                   clk,
  input  logic                   wr_en,
  input  logic [$clog2(2*P)-1:0] wr_row,
  input  logic                   wr_half,
  input  pixel_t [P-1:0]         wr_pix,
  input  logic                   rd_is_col,
  input  logic [$clog2(2*P)-1:0] rd_line,
  input  logic [$clog2(2*P)-1:0] rd_off,
  output pixel_t [P-1:0]         rd_pix
);
  localparam int AW = $clog2(P);
  localparam int LW = $clog2(2*P);

  // mem[partition][bank][address]
  pixel_t mem [4][P][P];

  // ---------------- write: rotate right by the local row number ----------
  logic [AW-1:0] wr_r;
  logic [1:0]    wr_part;
  pixel_t [P-1:0] wr_rot;

  assign wr_r    = wr_row[AW-1:0];
  assign wr_part = {wr_row[LW-1], wr_half};

  always_comb begin
    for (int b = 0; b < P; b++)
      wr_rot[b] = wr_pix[AW'(b - int'(wr_r))];
  end

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int b = 0; b < P; b++)
        mem[wr_part][b][wr_r] <= wr_rot[b];
  end

  // ---------------- read ---------------------------------------------------
  logic [AW-1:0] s;            // local row (row access) or column (column access)
  logic [1:0]    part_a, part_b;
  logic [AW-1:0] addr [P];
  pixel_t [P-1:0] bank_a, bank_b;
  pixel_t [2*P-1:0] line;

  assign s = rd_line[AW-1:0];

  always_comb begin
    // level 1: partition select and per-bank address
    if (!rd_is_col) begin
      part_a = rd_line[LW-1] ? 2'd2 : 2'd0;
      part_b = rd_line[LW-1] ? 2'd3 : 2'd1;
    end else begin
      part_a = rd_line[LW-1] ? 2'd1 : 2'd0;
      part_b = rd_line[LW-1] ? 2'd3 : 2'd2;
    end
    for (int b = 0; b < P; b++) begin
      addr[b]   = rd_is_col ? AW'(b - int'(s)) : s;
      bank_a[b] = mem[part_a][b][addr[b]];
      bank_b[b] = mem[part_b][b][addr[b]];
    end
    // level 2: undo the rotation, element k sits in bank (k + s) mod P
    for (int k = 0; k < P; k++) begin
      line[k]     = bank_a[AW'(k + int'(s))];
      line[P + k] = bank_b[AW'(k + int'(s))];
    end
    // level 3: P pixels starting at rd_off
    for (int k = 0; k < P; k++)
      rd_pix[k] = (int'(rd_off) + k < 2*P) ? line[LW'(int'(rd_off) + k)] : '0;
  end

endmodule
