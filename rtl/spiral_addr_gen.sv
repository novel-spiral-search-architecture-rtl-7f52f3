// spiral_addr_gen: spiral address generator.
//
// Given a search centre (the origin of the predicted block) it produces one
// search-memory access per cycle, each reading exactly the row or column
// the pixel reuse array needs for the next block position:
//
//   LOAD   : the centre block is read row by row, rows cy .. cy+H-1, each
//            row entering the reuse array at the bottom (SH_UP). After the
//            H-th row the array holds the block at (cx, cy).
//   SPIRAL : ring R = 1, 2, ... around the centre. Ring R covers the 8R
//            positions at Chebyshev distance R and is walked as
//              left 1, down 2R-1, right 2R, up 2R, left 2R
//            starting from the upper-left corner of ring R-1. A left move
//            reads the new left column, a right move the new right column,
//            a down move the new bottom row and an up move the new top row.
//
// For ring R the boundaries are the addresses of the outermost column or
// row the ring touches: LEFT = cx-R, RIGHT = cx+W-1+R, UP = cy-R,
// DOWN = cy+H-1+R (for a 16x16 block at (3,4), ring 1 gives 2, 19, 3, 20).
// A segment ends when its access reaches the boundary of its side; a ring
// ends when the position counter reaches 8R. Then R is incremented and the
// boundaries are recomputed; if the new ring would leave the SW x SW window
// the search is over. The access that completes the final position carries
// tag.last. A stop input (early termination) ends the search at once; no
// access is issued in a cycle where stop is high.
//
// Interface: start is a one-cycle request, accepted when busy is low;
// center_x/center_y/mode are sampled with it. The centre is clamped so the
// block lies inside the window. acc_* and tag are combinational from the
// state and valid in the same cycle; the access is consumed by the reuse
// array at the next rising edge, after which the array holds tag.x/tag.y.
// Throughput: H cycles for the centre, then one position per cycle:
// H + 4*Rmax*(Rmax+1) cycles for a search over rings 1..Rmax.
// The ring order, the 8R counter, the boundary formulae and the termination
// rule follow the architecture description. Rows grow downwards here, as in
// the boundary example of the description. The row-by-row centre load and
// the clamping are this design's choices.
module spiral_addr_gen
  import spiral_pkg::*;
#(
  parameter int SWIN = SW                // search window side
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [$clog2(SWIN)-1:0]  center_x,
  input  logic [$clog2(SWIN)-1:0]  center_y,
  input  blk_mode_t                mode,
  input  logic                     stop,
  output logic                     acc_valid,
  output logic                     acc_is_col,
  output logic [$clog2(SWIN)-1:0]  acc_line,
  output logic [$clog2(SWIN)-1:0]  acc_off,
  output shift_dir_t               acc_dir,
  output pos_tag_t                 tag,
  output logic                     busy,
  output logic [$clog2(SWIN)-1:0]  ring
);
  localparam int AW = $clog2(SWIN);
  localparam int CW = AW + 4;            // counter for up to 8R positions

  typedef enum logic [1:0] {ST_IDLE, ST_LOAD, ST_SPIRAL} state_t;
  typedef enum logic [1:0] {SEG_LEFT, SEG_DOWN, SEG_RIGHT, SEG_UP} seg_t;

  state_t         state;
  seg_t           seg;
  logic [AW-1:0]  cx, cy;                // centre
  logic [AW-1:0]  px, py;                // current block origin
  logic [AW:0]    w, h;                  // block size
  logic [AW-1:0]  lcnt;                  // rows loaded
  logic [AW-1:0]  rad;                   // ring radius R
  logic [CW-1:0]  cnt;                   // positions done in this ring
  typedef logic signed [AW+1:0] bnd_t;  // boundary, may go below 0
  bnd_t           left_b, right_b, up_b, down_b;  // ring boundaries

  // Does ring r fit in the window around centre (x, y) for a w x h block?
  function automatic logic ring_fits(int x, int y, int bw, int bh, int r);
    return (x - r >= 0) && (y - r >= 0) &&
           (x + bw - 1 + r <= SWIN - 1) && (y + bh - 1 + r <= SWIN - 1);
  endfunction

  // ---------------- combinational access for the current step ------------
  logic [AW-1:0] nx, ny;       // block origin after this access
  logic          ring_end;     // this access completes the ring
  logic          next_fits;    // ring R+1 fits

  always_comb begin
    acc_valid  = 1'b0;
    acc_is_col = 1'b0;
    acc_line   = '0;
    acc_off    = '0;
    acc_dir    = SH_UP;
    nx         = px;
    ny         = py;
    tag        = '0;
    next_fits  = ring_fits(int'(cx), int'(cy), int'(w), int'(h), int'(rad) + 1);
    ring_end   = (int'(cnt) + 1 == 8 * int'(rad));
    unique case (state)
      ST_LOAD: begin
        acc_valid  = !stop;
        acc_line   = AW'(cy + lcnt);
        acc_off    = cx;
        acc_dir    = SH_UP;
        tag.valid  = !stop && (AW'(lcnt + 1) == AW'(h));
        tag.last   = !ring_fits(int'(cx), int'(cy), int'(w), int'(h), 1);
        tag.x      = 5'(cx);
        tag.y      = 5'(cy);
      end
      ST_SPIRAL: begin
        acc_valid = !stop;
        unique case (seg)
          SEG_LEFT: begin
            nx = px - 1'b1;
            acc_is_col = 1'b1; acc_line = nx;            acc_off = py; acc_dir = SH_RIGHT;
          end
          SEG_DOWN: begin
            ny = py + 1'b1;
            acc_is_col = 1'b0; acc_line = AW'(py + h);   acc_off = px; acc_dir = SH_UP;
          end
          SEG_RIGHT: begin
            nx = px + 1'b1;
            acc_is_col = 1'b1; acc_line = AW'(px + w);   acc_off = py; acc_dir = SH_LEFT;
          end
          default: begin // SEG_UP
            ny = py - 1'b1;
            acc_is_col = 1'b0; acc_line = ny;            acc_off = px; acc_dir = SH_DOWN;
          end
        endcase
        tag.valid = !stop;
        tag.last  = ring_end && !next_fits;
        tag.x     = 5'(nx);
        tag.y     = 5'(ny);
      end
      default: ;
    endcase
  end

  assign busy = (state != ST_IDLE);
  assign ring = rad;

  // ---------------- state update -----------------------------------------
  logic [AW:0] mw, mh;                   // size of the requested block
  assign mw = (AW+1)'(mode_w(mode));
  assign mh = (AW+1)'(mode_h(mode));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      seg   <= SEG_LEFT;
      cx <= '0; cy <= '0; px <= '0; py <= '0;
      w  <= '0; h  <= '0;
      lcnt <= '0; rad <= '0; cnt <= '0;
      left_b <= '0; right_b <= '0; up_b <= '0; down_b <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          w  <= mw;
          h  <= mh;
          cx <= (int'(center_x) > SWIN - int'(mw)) ? AW'(SWIN - int'(mw)) : center_x;
          cy <= (int'(center_y) > SWIN - int'(mh)) ? AW'(SWIN - int'(mh)) : center_y;
          lcnt  <= '0;
          state <= ST_LOAD;
        end
        ST_LOAD: begin
          if (stop) state <= ST_IDLE;
          else if (AW'(lcnt + 1) == AW'(h)) begin
            px  <= cx;
            py  <= cy;
            rad <= AW'(1);
            cnt <= '0;
            seg <= SEG_LEFT;
            left_b  <= bnd_t'(int'(cx) - 1);
            right_b <= bnd_t'(int'(cx) + int'(w));
            up_b    <= bnd_t'(int'(cy) - 1);
            down_b  <= bnd_t'(int'(cy) + int'(h));
            state   <= ring_fits(int'(cx), int'(cy), int'(w), int'(h), 1) ? ST_SPIRAL : ST_IDLE;
          end else lcnt <= lcnt + 1'b1;
        end
        ST_SPIRAL: begin
          if (stop) state <= ST_IDLE;
          else begin
            px <= nx;
            py <= ny;
            if (ring_end) begin
              // update the spiral ring boundaries, or finish
              cnt <= '0;
              seg <= SEG_LEFT;
              rad <= rad + 1'b1;
              left_b  <= left_b - bnd_t'(1);
              right_b <= right_b + bnd_t'(1);
              up_b    <= up_b - bnd_t'(1);
              down_b  <= down_b + bnd_t'(1);
              if (!next_fits) state <= ST_IDLE;
            end else begin
              cnt <= cnt + 1'b1;
              unique case (seg)
                SEG_LEFT:  if (int'(nx) == int'(left_b))              seg <= SEG_DOWN;
                SEG_DOWN:  if (int'(py) + int'(h) == int'(down_b))    seg <= SEG_RIGHT;
                SEG_RIGHT: if (int'(px) + int'(w) == int'(right_b))   seg <= SEG_UP;
                default:   if (int'(ny) == int'(up_b))                seg <= SEG_LEFT;
              endcase
            end
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

endmodule
