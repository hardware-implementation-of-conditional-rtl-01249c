// sad5_comparator: decision logic of one diamond step.
//
// Takes the five SADs of the diamond candidates and picks the smallest among the
// valid ones; on a tie the lower index wins, so the centre (index 0) is kept
// unless a neighbour is strictly better. The winner becomes the new centre. The
// step size is halved when the winner is the centre or lies on the border of the
// search area, and kept otherwise. `to_square` tells the controller that the new
// step size is one (or less), so the nine-point square step comes next.
// `halved` and `on_border` are reported for observation.
// The halving rules follow the 2D-logarithmic search; treating the clipped
// frame edge as the border and the tie rule are this design's choices.
// Purely combinational.
module sad5_comparator
  import me_pkg::*;
(
  input  sad_t   sad   [5],
  input  logic   valid [5],
  input  pos_t   cand  [5],
  input  step_t  step,
  input  range_t bounds,
  output pos_t   new_center,
  output step_t  new_step,
  output sad_t   best_sad,
  output logic   to_square,
  output logic   halved,
  output logic   on_border
);

  logic [2:0] best;

  always_comb begin
    best = 3'd0;
    for (int k = 1; k < 5; k++)
      if (valid[k] && sad[k] < sad[best]) best = 3'(k);
    new_center = cand[best];
    best_sad   = sad[best];
    on_border  = (best != 3'd0) &&
                 (cand[best].x == bounds.x_low  || cand[best].x == bounds.x_high ||
                  cand[best].y == bounds.y_low  || cand[best].y == bounds.y_high);
    halved     = (best == 3'd0) || on_border;
    new_step   = halved ? (step >> 1) : step;
    to_square  = (new_step <= step_t'(1));
  end

endmodule
