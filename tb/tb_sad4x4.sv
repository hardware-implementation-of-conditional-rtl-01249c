// tb_sad4x4: checks the 4x4 SAD unit against sums worked out in the testbench.
// Random and extreme blocks are applied; the result must appear exactly one
// clock after `en`, hold while `en` is low, and add up when `acc` is high.
module tb_sad4x4;
  import me_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, acc = 0;
  block_t a, b;
  logic [15:0] sad;
  int checks = 0, failures = 0;

  sad4x4 #(.ACC_W(16)) dut (.clk, .rst_n, .en, .acc, .cur_blk(a), .ref_blk(b), .sad);

  always #5 clk = ~clk;

  function automatic int ref_sad(block_t x, block_t y);
    int s = 0;
    for (int i = 0; i < 16; i++) s += (x[i] > y[i]) ? x[i] - y[i] : y[i] - x[i];
    return s;
  endfunction

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp, total;
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // extremes
    for (int i = 0; i < 16; i++) begin a[i] = 8'hFF; b[i] = 8'h00; end
    @(negedge clk) en = 1;
    @(negedge clk) en = 0;
    check(sad, 4080, "all 255 vs 0");
    for (int i = 0; i < 16; i++) begin a[i] = 8'h00; b[i] = 8'hFF; end
    @(negedge clk) en = 1;
    @(negedge clk) en = 0;
    check(sad, 4080, "all 0 vs 255");
    // random, one per cycle, latency one
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 16; i++) begin a[i] = 8'($urandom); b[i] = 8'($urandom); end
      exp = ref_sad(a, b);
      en = 1;
      @(posedge clk); #1;
      check(sad, exp, "random block");
    end
    // hold while en low
    en = 0;
    exp = sad;
    for (int i = 0; i < 16; i++) a[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    #1 check(sad, exp, "hold");
    // accumulate four pieces
    total = 0;
    for (int n = 0; n < 4; n++) begin
      for (int i = 0; i < 16; i++) begin a[i] = 8'($urandom); b[i] = 8'($urandom); end
      total += ref_sad(a, b);
      en = 1; acc = (n != 0);
      @(posedge clk); #1;
      check(sad, total, "accumulate");
    end
    en = 0; acc = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
