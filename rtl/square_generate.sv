// square_generate: the nine candidate positions of the final search step.
//
// When the step size has come down to one, the centre and its eight neighbours
// at distance one are tested. Each candidate is flagged valid when it lies
// inside the search bounds; invalid ones are left out of the comparison. The
// order is the centre first, then the neighbours row by row from the top left
// (index 0 is the centre); the order is this design's choice. Purely
// combinational.
module square_generate
  import me_pkg::*;
(
  input  pos_t   center,
  input  range_t bounds,
  output pos_t   cand  [9],
  output logic   valid [9]
);

  localparam int DX [9] = '{0, -1, 0, 1, -1, 1, -1, 0, 1};
  localparam int DY [9] = '{0, -1, -1, -1, 0, 0, 1, 1, 1};

  always_comb begin
    for (int k = 0; k < 9; k++) begin
      int x, y;
      x        = int'(center.x) + DX[k];
      y        = int'(center.y) + DY[k];
      cand[k]  = '{x: coord_t'(x), y: coord_t'(y)};
      valid[k] = in_range(x, y, bounds);
    end
  end

endmodule
