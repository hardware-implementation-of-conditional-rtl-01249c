// diamond_generate: the five candidate positions of one 2D-logarithmic step.
//
// Around the centre (new_x, new_y) it places four more points `step` pixels to
// the left, right, above and below, the diamond of the 2D-logarithmic search.
// Each candidate is flagged valid when it lies inside the search bounds; an
// invalid candidate is left out of the comparison. The positions go to the
// reference frame store, whose block read ports hand the five 4x4 blocks to the
// five SAD units. The order is centre, left, right, up, down (index 0 is the
// centre); the order and the exclusion of out-of-range points are this design's
// choices. Purely combinational.
module diamond_generate
  import me_pkg::*;
(
  input  pos_t   center,
  input  step_t  step,
  input  range_t bounds,
  output pos_t   cand  [5],
  output logic   valid [5]
);

  localparam int DX [5] = '{0, -1, 1,  0, 0};
  localparam int DY [5] = '{0,  0, 0, -1, 1};

  always_comb begin
    for (int k = 0; k < 5; k++) begin
      int x, y;
      x        = int'(center.x) + DX[k] * int'(step);
      y        = int'(center.y) + DY[k] * int'(step);
      cand[k]  = '{x: coord_t'(x), y: coord_t'(y)};
      valid[k] = in_range(x, y, bounds);
    end
  end

endmodule
