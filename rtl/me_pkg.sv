// me_pkg: types and constants shared by the 2D-logarithmic motion estimator.
//
// The estimator works on 8-bit grey-level pixels and 4x4 blocks, the sizes the
// design is built around. A block position is the (x, y) of its top-left pixel,
// x the column and y the row. Coordinates are 7 bits wide, enough for the 64x64
// frames the design holds; a motion vector is the signed difference of two such
// positions. A SAD of a 4x4 block is at most 16 * 255 = 4080 and fits 12 bits.
// Candidate ordering inside the diamond and the square (index 0 is always the
// centre) is this design's own choice; ties go to the lowest index, so the
// centre wins a tie.
package me_pkg;

  localparam int PIX_W   = 8;            // bits per grey-level pixel
  localparam int BLK     = 4;            // block edge in pixels
  localparam int NPIX    = BLK * BLK;    // pixels per block
  localparam int SAD_W   = 12;           // ceil(log2(16*255+1))
  localparam int COORD_W = 7;            // block coordinate width
  localparam int STEP_W  = 5;            // step size width (up to 16)
  localparam int MV_W    = COORD_W + 1;  // signed motion vector component

  typedef logic [PIX_W-1:0]          pixel_t;
  typedef logic [NPIX-1:0][PIX_W-1:0] block_t;  // row-major, pixel r*BLK+c
  typedef logic [SAD_W-1:0]          sad_t;
  typedef logic [COORD_W-1:0]        coord_t;
  typedef logic [STEP_W-1:0]         step_t;
  typedef logic signed [MV_W-1:0]    mv_t;

  typedef struct packed {
    coord_t x;
    coord_t y;
  } pos_t;

  // Inclusive bounds of the positions a candidate block may take.
  typedef struct packed {
    coord_t x_low;
    coord_t x_high;
    coord_t y_low;
    coord_t y_high;
  } range_t;

  // True if a candidate position lies inside the search area.
  function automatic logic in_range(input int x, input int y, input range_t r);
    return (x >= int'(r.x_low)) && (x <= int'(r.x_high)) &&
           (y >= int'(r.y_low)) && (y <= int'(r.y_high));
  endfunction

endpackage
