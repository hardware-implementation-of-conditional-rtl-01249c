// search_range: bounds of the area searched for the current block's match.
//
// The search area is SEARCH_RANGE x SEARCH_RANGE pixels (32 x 32 by default)
// centred on the current block: a candidate block may be displaced by up to
// SEARCH_RANGE/2 pixels in each direction. The bounds are then clipped so that a
// candidate block never leaves the IMG_W x IMG_H frame. The outputs are
// inclusive limits on the candidate block's top-left position.
// The 32 x 32 area follows the reference design's test configuration; reading it as a
// +/-16 pixel displacement and clipping at the frame edge are this design's
// choices. Purely combinational.
module search_range
  import me_pkg::*;
#(
  parameter int IMG_W        = 64,
  parameter int IMG_H        = 64,
  parameter int SEARCH_RANGE = 32
) (
  input  pos_t   cur,
  output range_t bounds
);

  localparam int HALF  = SEARCH_RANGE / 2;
  localparam int X_MAX = IMG_W - BLK;
  localparam int Y_MAX = IMG_H - BLK;

  always_comb begin
    int xl, xh, yl, yh;
    xl = int'(cur.x) - HALF;
    xh = int'(cur.x) + HALF;
    yl = int'(cur.y) - HALF;
    yh = int'(cur.y) + HALF;
    bounds.x_low  = coord_t'((xl < 0)     ? 0     : xl);
    bounds.x_high = coord_t'((xh > X_MAX) ? X_MAX : xh);
    bounds.y_low  = coord_t'((yl < 0)     ? 0     : yl);
    bounds.y_high = coord_t'((yh > Y_MAX) ? Y_MAX : yh);
  end

endmodule
