# Spiral-search motion estimation engine

Block-matching motion estimation compares a block of the current video
frame with every candidate block of a search window in the previous frame
and keeps the position with the smallest sum of absolute differences
(SAD). Classic full-search hardware scans the window in raster or snake
order, which maximises pixel reuse but must always visit every position.

This design instead starts at a *predicted* centre (for example the motion
vector of a neighbouring block) and walks outwards in square rings.
Because good matches are usually near the prediction, a SAD threshold can
end the search after a few positions, and if the block partition is known
in advance the unused parts of the comparator are not clocked. Still, a
complete search costs one memory read and one clock cycle per position,
like a raster-scan full search.

Main numbers (all defaults):

| item | value |
|---|---|
| search window | 32 x 32 pixels (+-8 for a 16x16 block) |
| block sizes | 16x16, 16x8, 8x16, 8x8, 8x4, 4x8, 4x4 (H.264) |
| SADs per position | all 41 H.264 sub-block SADs |
| throughput | 1 position per cycle after an H-cycle centre load |
| full +-8 search | 289 positions, 16 + 288 access cycles, result 5 cycles later |
| pixel / SAD width | 8 / 16 bits |

## Data path

```
             sw_wr_*                 spiral_addr_gen
                |                  (row/col, line, offset, direction, tag)
                v                         |
          search_mem  ---- 16 pixels ---->+
      (4 partitions x 16 banks)           v
                                      pra16x16  <---- cur_mb_mem <- mb_wr_*
                                  (16 x pra4x4, 256 x pra_cell)
                                          | 256 |r-c|
                                          v
                                      sad_tree (3 stages, 41 SADs)
                                          v
                                      best_match --stop--> spiral_addr_gen
```

Files (one module or package per file in `rtl/`):

| file | role |
|---|---|
| `spiral_pkg.sv` | pixel, SAD, mode, shift-direction and tag types |
| `spiral_me_top.sv` | top level, wiring and the start/busy/done protocol |
| `search_mem.sv` | rotated, partitioned search window memory |
| `spiral_addr_gen.sv` | ring-by-ring address generator |
| `pra16x16.sv`, `pra4x4.sv`, `pra_cell.sv` | pixel reuse array |
| `sad_tree.sv` | pipelined adder tree |
| `cur_mb_mem.sv` | current block registers |
| `best_match.sv` | minimum SAD, motion vector, early termination |

## The spiral and why one read per position is enough

Positions are block origins (upper-left pixel) in window coordinates,
x to the right and y downwards. After the centre (cx, cy), ring R visits
the 8R positions at Chebyshev distance R, starting from the upper-left
corner of ring R-1:

```
left 1, down 2R-1, right 2R, up 2R, left 2R
```

Ring 1 from (X,Y): (X-1,Y) (X-1,Y+1) (X,Y+1) (X+1,Y+1) (X+1,Y) (X+1,Y-1)
(X,Y-1) (X-1,Y-1). Every step moves the block by one pixel, so the block
at the new position shares all but one row or column with the previous
one. The address generator reads only that row or column:

| move | read | slice offset | reuse array shift |
|---|---|---|---|
| left to x-1 | column x-1 | y | right (new left column) |
| right to x+1 | column x+W | y | left (new right column) |
| down to y+1 | row y+H | x | up (new bottom row) |
| up to y-1 | row y-1 | x | down (new top row) |

The generator keeps the ring boundaries as the addresses of the
outermost column and row of ring R: LEFT = cx-R, RIGHT = cx+W-1+R,
UP = cy-R, DOWN = cy+H-1+R (a 16x16 block at (3,4) gives 2, 19, 3, 20
for ring 1). A segment ends when its access reaches its boundary; the
ring ends when a counter reaches 8R. The boundaries then grow by one. If
any of them would leave the window the search ends, so only complete
rings are searched. A centre at (8,8) with a 16x16 block therefore gives
the full +-8 search of 289 positions, while a centre near an edge gives
fewer rings.

Before the first ring the centre block is loaded row by row through the
bottom edge of the reuse array (H cycles). A centre whose block would not
fit is clamped to the last valid origin.

## Search window memory: rows and columns in one cycle

Reading a whole column in one cycle from a row-organised memory is the
core difficulty. The window is split into four 16x16 partitions (P0 upper
left, P1 upper right, P2 lower left, P3 lower right), each made of 16
banks one pixel wide. Row r of a partition is stored rotated right by
r mod 16: pixel (r, c) sits in bank (c + r) mod 16 at address r.

- A **row** occupies the same address in every bank, rotated.
- A **column** c is spread over the diagonal: row r of it is in bank
  (c + r) mod 16 at address r, so each bank is read once, at its own
  address (b - c) mod 16.

Reading therefore takes three multiplexer levels:

1. Partition select. A row below 16 comes from {P0, P1}, a higher row from
   {P2, P3}; a column below 16 from {P0, P2}, a higher one from {P1, P3}.
   The first half of a line comes from P0, P1 or P2, the second from P1,
   P2 or P3.
2. Rearrange. Each half is rotated back by the local row or column
   number. Element k is in bank (k + s) mod 16, giving the 32-pixel line
   in original order.
3. Offset select. 16 consecutive pixels starting at the offset.

Writes come in half-rows of 16 pixels (`wr_half` picks columns 0-15 or
16-31). One shared set of 16-to-1 multiplexers rotates them. Filling the
window takes 64 cycles, row 0 left, row 0 right, row 1 left, and so on.
The read path is combinational from the register banks. The reuse array
takes the slice at the next clock edge.

## Pixel reuse array and variable block sizes

`pra_cell` is a pixel register with a 4-to-1 input multiplexer, fed by
its upper, left, right and lower neighbours, and an |r - c| unit against
the co-located current-block pixel. `pra4x4` is a 4x4 mesh of cells with
four 4-pixel edge inputs. `pra16x16` chains 4x4 of those.

For a partition smaller than 16x16 the searched block is the upper-left
partition of the current block. It occupies the upper-left sub-arrays.
Only those are enabled, so the rest keep their contents and do not
toggle. Bypass multiplexers route the external right-column and
bottom-row inputs to the edge of the active area:

- right-column bypass between sub-columns 0|1 (sub-rows 0-1) and 1|2 (all sub-rows);
- bottom-row bypass between sub-rows 0|1 (sub-columns 0-1) and 1|2 (all sub-columns).

The left-column and top-row inputs always enter at sub-column 0 and
sub-row 0. Inactive sub-arrays are held by a clock enable. A
clock-gating flow can turn that enable into gated clocks.

## SAD tree and result

`sad_tree` registers sixteen 4x4 SADs, then the four 8x8, eight 8x4 and
eight 4x8 SADs, then the 16x16, two 16x8 and two 8x16 SADs. Earlier
results are delayed so that one `sad_set_t` holds all 41 SADs of one
position. The top puts them on `sad_out` for an external mode decision.
Only the SADs inside the active block are meaningful when a smaller mode
is searched.

`best_match` tracks the SAD of the searched block size (the 16x16 SAD, or
the upper-left partition's SAD) and keeps the first strict minimum. Ties
therefore go to the position nearest the centre in spiral order. With a
non-zero `threshold`, the first SAD below it raises `stop`, and the
address generator halts. Positions already in the pipeline are
discarded.

## Interface and timing (`spiral_me_top`)

1. While `busy` is low, write the window (`sw_wr_en`, `sw_wr_row`,
   `sw_wr_half`, `sw_wr_pix`) and the current block (`mb_wr_en`,
   `mb_wr_row`, `mb_wr_pix`, row 0-15). Writes are ignored while busy.
2. Pulse `start` with `center_x`, `center_y`, `mode` (`blk_mode_t`) and
   `threshold` (0 disables early termination). A `start` while busy is
   ignored.
3. Accesses run from the next cycle. A position's SADs appear on
   `sad_out` (`sad_valid`, `sad_x`, `sad_y`) 4 cycles after its access.
   `done` pulses one cycle after the last position, or after the position
   that met the threshold.
4. `best_sad`, `best_x`, `best_y`, `mv_x`, `mv_y` (signed, relative to
   the centre; positive `mv_y` means the match lies below the centre), `early_term` and `npos` hold until the next start.
   After an early stop `busy` stays high up to 4 more cycles while the
   pipeline drains. `ring` shows the ring radius being searched.

Cycle count from the start edge to `done`: H + (positions - 1) + 5, with
positions = 1 + 4·Rmax·(Rmax+1).

## Throughput against a video format

For 640x480 at 60 fps and a 500 MHz clock there are 1200 macroblocks per
frame and 72,000 per second, so 6,944 cycles per macroblock. A +-8
search costs 64 (window write) + 16 (block write) + 16 + 288 + 5 cycles,
plus one cycle of handshake in the testbench. That is 390 cycles, about
5.6 % of the budget. `tb_vga_frame` runs a whole synthetic 640x480 frame
(1200 macroblocks, each with a known motion vector) in 468,000 cycles,
against a budget of 8,333,333. On the first 80 macroblocks, a threshold
just above the true SAD cuts the positions searched from 23,120 to 10,746
and the cycles from 31,200 to 19,226. The RTL has not been timed in
a cell library. Only three SAD pipeline stages are present, so a long
combinational path runs from the search memory read through the reuse
array input.

## Where this RTL makes its own choices

- Coordinates grow downwards. A "down" move increments y. This agrees
  with the boundary formulas above.
- Segment lengths (left 1, down 2R-1, right 2R, up 2R, left 2R) are
  derived from the 8R positions per ring. Rings are never searched in
  part.
- The centre is loaded through the bottom row input and clamped into
  the window.
- The write port takes explicit row and half addresses. Reads are
  combinational. Slices running past the end of a line read 0.
- Clock gating is a per-sub-array clock enable.
- All 41 SADs come out aligned after 3 stages. The early-termination
  rule is SAD < threshold. Ties keep the earlier position.
- Widths: 8-bit pixels, 16-bit SADs. Reset is asynchronous and active-low
  on all control and datapath registers except the two memories.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/spiral_pkg.sv \
          tb/tb_spiral_me_top.sv --top-module tb_spiral_me_top
./obj_dir/Vtb_spiral_me_top
```

Replace `spiral_me_top` with any block name to run its testbench. They are:

| testbench | what it checks |
|---|---|
| `tb_pra_cell`, `tb_pra4x4` | shift in all directions, enable, |r-c| against a model |
| `tb_pra16x16` | every block size: shifts, bypasses, idle sub-arrays |
| `tb_search_mem` | every row and column at every offset, random rewrites |
| `tb_cur_mb_mem` | row writes |
| `tb_sad_tree` | all 41 SADs and the 3-cycle latency |
| `tb_spiral_addr_gen` | spiral order, accesses, ring counts, cycle count, the (3,4) boundary example, stop |
| `tb_best_match` | minimum, motion vector, threshold stop, done |
| `tb_vga_frame` | a full 640x480 frame at +-8: motion vectors, SADs, cycle budget, early-termination savings |
| `tb_spiral_me_top` | end to end at full size: every SAD against a software model, spiral order, best match, cycle count, early termination, every block size, centre clamping, start while busy |

To change the window size, `search_mem` takes the partition size `P`
and `spiral_addr_gen` the window side `SWIN`. The top uses
`spiral_pkg::SW` and `MB`, and the position tag is 5 bits per
coordinate. A larger window therefore means widening `pos_tag_t` and the
top's address ports as well.
