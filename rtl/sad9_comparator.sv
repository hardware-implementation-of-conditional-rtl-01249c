// sad9_comparator: decision logic of the final nine-point step.
//
// Picks the smallest of the nine square SADs among the valid candidates (ties go
// to the lower index, so the centre wins a tie) and turns the winning position
// into the motion vector: the best position minus the current block's position,
// signed, x horizontal and y vertical. The best SAD is passed on with it.
// Purely combinational; the motion estimator registers the results.
module sad9_comparator
  import me_pkg::*;
(
  input  sad_t  sad   [9],
  input  logic  valid [9],
  input  pos_t  cand  [9],
  input  pos_t  cur,
  output mv_t   mv_x,
  output mv_t   mv_y,
  output sad_t  best_sad,
  output pos_t  best_pos
);

  logic [3:0] best;

  always_comb begin
    best = 4'd0;
    for (int k = 1; k < 9; k++)
      if (valid[k] && sad[k] < sad[best]) best = 4'(k);
    best_pos = cand[best];
    best_sad = sad[best];
    mv_x     = mv_t'($signed({1'b0, cand[best].x}) - $signed({1'b0, cur.x}));
    mv_y     = mv_t'($signed({1'b0, cand[best].y}) - $signed({1'b0, cur.y}));
  end

endmodule
