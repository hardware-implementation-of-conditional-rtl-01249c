// tb_sad5_comparator: checks the diamond decision (new centre, new step, best
// SAD, square-step request) for random SADs, valid flags and positions, with
// many ties, against a model written in the testbench.
module tb_sad5_comparator;
  import me_pkg::*;

  sad_t   sad [5];
  logic   valid [5];
  pos_t   cand [5];
  step_t  step;
  range_t b;
  pos_t   nc;
  step_t  ns;
  sad_t   bs;
  logic   to_sq, halved, on_border;
  int checks = 0, failures = 0;
  int n_halve = 0, n_border = 0, n_move = 0;

  sad5_comparator dut (.sad, .valid, .cand, .step, .bounds(b), .new_center(nc),
                       .new_step(ns), .best_sad(bs), .to_square(to_sq),
                       .halved, .on_border);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int best, exp_step;
      logic border;
      for (int k = 0; k < 5; k++) begin
        sad[k]   = sad_t'($urandom_range(20));        // small range: many ties
        valid[k] = (k == 0) ? 1'b1 : 1'($urandom_range(3) != 0);
        cand[k]  = '{x: coord_t'($urandom_range(60)), y: coord_t'($urandom_range(60))};
      end
      step = step_t'($urandom_range(1, 16));
      b = '{x_low: coord_t'($urandom_range(60)), x_high: coord_t'($urandom_range(60)),
            y_low: coord_t'($urandom_range(60)), y_high: coord_t'($urandom_range(60))};
      if ($urandom_range(3) == 0) b.x_low = cand[$urandom_range(1, 4)].x;
      #1;
      best = 0;
      for (int k = 1; k < 5; k++) if (valid[k] && sad[k] < sad[best]) best = k;
      border = (best != 0) && (cand[best].x == b.x_low || cand[best].x == b.x_high ||
                               cand[best].y == b.y_low || cand[best].y == b.y_high);
      exp_step = (best == 0 || border) ? step / 2 : step;
      if (best == 0) n_halve++; else if (border) n_border++; else n_move++;
      checks++;
      if (nc != cand[best] || ns != exp_step || bs != sad[best] ||
          to_sq != (exp_step <= 1)) begin
        failures++;
        $display("FAIL n=%0d best=%0d: centre (%0d,%0d) step %0d sad %0d sq %0b",
                 n, best, nc.x, nc.y, ns, bs, to_sq);
      end
    end
    checks++;
    if (n_halve == 0 || n_border == 0 || n_move == 0) begin
      failures++;
      $display("FAIL a decision kind never occurred");
    end
    $display("centre %0d, border %0d, move %0d", n_halve, n_border, n_move);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
