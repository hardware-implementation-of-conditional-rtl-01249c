// tb_active_block_classifier: random blocks and thresholds; the active-pixel
// count and the block decision are checked against counts made in the
// testbench, including pixel differences exactly at T_g and counts exactly at T_p.
module tb_active_block_classifier;
  import me_pkg::*;

  block_t a, b;
  pixel_t t_g;
  logic [4:0] t_p, cnt;
  logic active;
  int checks = 0, failures = 0, n_act = 0, n_inact = 0;

  active_block_classifier dut (.cur_blk(a), .ref_blk(b), .t_g, .t_p, .active_cnt(cnt), .active);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      automatic int e = 0;
      t_g = 8'($urandom_range(60));
      for (int i = 0; i < 16; i++) begin
        automatic int base = $urandom_range(255);
        automatic int d = (n % 3 == 0) ? int'(t_g) + $urandom_range(2) - 1 : $urandom_range(120);
        a[i] = 8'(base);
        b[i] = 8'((($urandom_range(1) == 1) && base + d <= 255) || base - d < 0 ? base + d : base - d);
      end
      for (int i = 0; i < 16; i++) begin
        automatic int d = (a[i] > b[i]) ? a[i] - b[i] : b[i] - a[i];
        if (d > t_g) e++;
      end
      t_p = (n % 4 == 0) ? 5'(e) : 5'($urandom_range(16));
      #1;
      checks++;
      if (cnt != e || active != (e > int'(t_p))) begin
        failures++;
        $display("FAIL n=%0d count %0d expected %0d active %0b", n, cnt, e, active);
      end
      if (active) n_act++; else n_inact++;
    end
    checks++;
    if (n_act == 0 || n_inact == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
