// tb_diamond_generate: checks the five diamond positions and their valid flags
// for random centres, steps and search bounds.
module tb_diamond_generate;
  import me_pkg::*;

  pos_t   center, cand [5];
  step_t  step;
  range_t b;
  logic   valid [5];
  int checks = 0, failures = 0;
  int dx [5] = '{0, -1, 1, 0, 0};
  int dy [5] = '{0, 0, 0, -1, 1};

  diamond_generate dut (.center, .step, .bounds(b), .cand, .valid);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      automatic int cx = $urandom_range(60), cy = $urandom_range(60), s = $urandom_range(16);
      automatic int xl = $urandom_range(cx), yl = $urandom_range(cy);
      automatic int xh = cx + $urandom_range(60 - cx), yh = cy + $urandom_range(60 - cy);
      center = '{x: coord_t'(cx), y: coord_t'(cy)};
      step = step_t'(s);
      b = '{x_low: coord_t'(xl), x_high: coord_t'(xh), y_low: coord_t'(yl), y_high: coord_t'(yh)};
      #1;
      for (int k = 0; k < 5; k++) begin
        automatic int x = cx + dx[k] * s, y = cy + dy[k] * s;
        automatic logic v = (x >= xl && x <= xh && y >= yl && y <= yh);
        checks++;
        if (valid[k] != v || (v && (cand[k].x != x || cand[k].y != y))) begin
          failures++;
          $display("FAIL k=%0d centre (%0d,%0d) step %0d: got (%0d,%0d) v=%0b",
                   k, cx, cy, s, cand[k].x, cand[k].y, valid[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
