// tb_square_generate: checks the nine square positions and their valid flags
// for random centres and search bounds.
module tb_square_generate;
  import me_pkg::*;

  pos_t   center, cand [9];
  range_t b;
  logic   valid [9];
  int checks = 0, failures = 0;

  square_generate dut (.center, .bounds(b), .cand, .valid);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      automatic int cx = $urandom_range(60), cy = $urandom_range(60);
      automatic int xl = $urandom_range(cx), yl = $urandom_range(cy);
      automatic int xh = cx + $urandom_range(60 - cx), yh = cy + $urandom_range(60 - cy);
      automatic bit seen [9] = '{default: 0};
      center = '{x: coord_t'(cx), y: coord_t'(cy)};
      b = '{x_low: coord_t'(xl), x_high: coord_t'(xh), y_low: coord_t'(yl), y_high: coord_t'(yh)};
      #1;
      checks++;
      if (cand[0].x != cx || cand[0].y != cy || !valid[0]) begin
        failures++;
        $display("FAIL centre not first");
      end
      // every neighbour appears exactly once, flagged as the bounds say
      for (int k = 0; k < 9; k++) begin
        automatic int i = int'(cand[k].x) - cx + 1, j = int'(cand[k].y) - cy + 1;
        automatic int x = cx + (k % 3) - 1, y = cy + (k / 3) - 1;
        automatic logic v = (x >= xl && x <= xh && y >= yl && y <= yh);
        checks++;
        if (x >= 0 && y >= 0) begin
          // position (x,y) must be offered somewhere, flagged v
          automatic bit found = 0;
          for (int m = 0; m < 9; m++)
            if (cand[m].x == x && cand[m].y == y && valid[m] == v) found = 1;
          if (!found) begin
            failures++;
            $display("FAIL (%0d,%0d) missing or wrong flag", x, y);
          end
        end
        if (i >= 0 && i <= 2 && j >= 0 && j <= 2) begin
          if (seen[j*3+i]) begin
            failures++;
            $display("FAIL duplicate candidate");
          end
          seen[j*3+i] = 1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
