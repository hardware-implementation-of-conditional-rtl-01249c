// tb_sad_threshold_cmp: checks that SAD_TH is high exactly when the SAD is above
// the threshold, for random values and at the boundary.
module tb_sad_threshold_cmp;
  import me_pkg::*;

  sad_t sad, threshold;
  logic sad_th;
  int checks = 0, failures = 0;

  sad_threshold_cmp dut (.sad, .threshold, .sad_th);

  task automatic apply(int s, int t);
    sad = sad_t'(s); threshold = sad_t'(t);
    #1;
    checks++;
    if (sad_th !== (s > t)) begin
      failures++;
      $display("FAIL sad=%0d th=%0d got %0b", s, t, sad_th);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(100, 100); apply(101, 100); apply(99, 100); apply(0, 0); apply(4080, 4079);
    apply(103, 100); apply(0, 4095); apply(4095, 0);
    for (int n = 0; n < 1000; n++) begin
      automatic int t = $urandom_range(4095);
      apply($urandom_range(4095), t);
      apply(t, t);
      if (t < 4095) apply(t + 1, t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
