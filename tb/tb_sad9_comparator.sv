// tb_sad9_comparator: checks the final choice among nine SADs and the motion
// vector (best position minus current position, signed) against a model.
module tb_sad9_comparator;
  import me_pkg::*;

  sad_t  sad [9];
  logic  valid [9];
  pos_t  cand [9];
  pos_t  cur, bp;
  mv_t   mvx, mvy;
  sad_t  bs;
  int checks = 0, failures = 0;

  sad9_comparator dut (.sad, .valid, .cand, .cur, .mv_x(mvx), .mv_y(mvy),
                       .best_sad(bs), .best_pos(bp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int best;
      cur = '{x: coord_t'($urandom_range(60)), y: coord_t'($urandom_range(60))};
      for (int k = 0; k < 9; k++) begin
        sad[k]   = sad_t'($urandom_range(30));
        valid[k] = (k == 0) ? 1'b1 : 1'($urandom_range(4) != 0);
        cand[k]  = '{x: coord_t'($urandom_range(60)), y: coord_t'($urandom_range(60))};
      end
      #1;
      best = 0;
      for (int k = 1; k < 9; k++) if (valid[k] && sad[k] < sad[best]) best = k;
      checks++;
      if (bs != sad[best] || bp != cand[best] ||
          int'(mvx) != int'(cand[best].x) - int'(cur.x) ||
          int'(mvy) != int'(cand[best].y) - int'(cur.y)) begin
        failures++;
        $display("FAIL n=%0d best=%0d: mv (%0d,%0d) sad %0d", n, best, mvx, mvy, bs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
