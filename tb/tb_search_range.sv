// tb_search_range: checks the search-area bounds for every block position of a
// 64x64 frame: +/-16 around the block, clipped so the block stays in the frame.
module tb_search_range;
  import me_pkg::*;

  pos_t   cur;
  range_t b;
  int checks = 0, failures = 0;

  search_range dut (.cur, .bounds(b));

  function automatic int clip(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y <= 60; y++)
      for (int x = 0; x <= 60; x++) begin
        cur = '{x: coord_t'(x), y: coord_t'(y)};
        #1;
        checks++;
        if (b.x_low != clip(x - 16, 0, 60) || b.x_high != clip(x + 16, 0, 60) ||
            b.y_low != clip(y - 16, 0, 60) || b.y_high != clip(y + 16, 0, 60)) begin
          failures++;
          $display("FAIL at (%0d,%0d): %0d %0d %0d %0d", x, y,
                   b.x_low, b.x_high, b.y_low, b.y_high);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
