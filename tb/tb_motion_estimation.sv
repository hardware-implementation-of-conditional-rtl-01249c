// tb_motion_estimation: runs the 2D-logarithmic search unit on whole test frames
// and compares each motion vector, best SAD and latency with the reference model.
// The testbench plays the frame stores: it answers every block address from its
// own arrays in the same cycle, and supplies SAD_TH from its own co-located SAD.
// It also checks that each search rule (skip, diamond move, centre halving,
// border halving, excluded candidates, direct square step) occurred.
module tb_motion_estimation;
  import me_pkg::*;
  import tb_me_model::*;

  logic   clk = 0, rst_n = 0, start = 0;
  pos_t   currblk, cur_pos, ref_pos [14];
  step_t  step_size;
  logic   sad_th, busy, done, mv_out;
  block_t cur_blk, ref_blk [14];
  mv_t    mv_x, mv_y;
  sad_t   best_sad;
  frame_t cf, rf;
  int     thresh;
  int     fver = 0;  // bumped when the frames change, so the block lookups re-evaluate
  int checks = 0, failures = 0;
  int n_skip = 0, n_move = 0, n_chalve = 0, n_bhalve = 0, n_excl = 0, n_direct = 0, n_search = 0;

  motion_estimation dut (.clk, .rst_n, .start, .currblk, .step_size, .sad_th,
                         .cur_pos, .cur_blk, .ref_pos, .ref_blk, .busy, .done,
                         .mv_out, .mv_x, .mv_y, .best_sad);

  always #5 clk = ~clk;

  always_comb begin
    cur_blk = '0;
    ref_blk = '{default: '0};
    if (fver >= 0)
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        cur_blk[r*4+c] = cf[(int'(cur_pos.y) + r) * W + int'(cur_pos.x) + c];
        for (int k = 0; k < 14; k++) begin
          automatic int x = int'(ref_pos[k].x) + c, y = int'(ref_pos[k].y) + r;
          ref_blk[k][r*4+c] = (x < W && y < H) ? rf[y*W + x] : 8'h00;
        end
      end
  end
  always_comb sad_th = (fver >= 0) && blk_sad(cf, rf, cur_pos.x, cur_pos.y, cur_pos.x, cur_pos.y) > thresh;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_block(int cx, int cy, int step0, int th);
    result_t e;
    int cyc;
    thresh = th;
    e = search(cf, rf, cx, cy, step0, th);
    @(negedge clk);
    currblk = '{x: coord_t'(cx), y: coord_t'(cy)};
    step_size = step_t'(step0);
    start = 1;
    @(posedge clk);
    #1 start = 0;
    cyc = 0;
    do begin
      @(posedge clk); #1;
      cyc++;
    end while (!done && cyc < 1000);
    check(mv_out && int'(mv_x) == e.mvx && int'(mv_y) == e.mvy && int'(best_sad) == e.bsad,
          $sformatf("block (%0d,%0d) step %0d th %0d: mv (%0d,%0d) sad %0d, expected (%0d,%0d) sad %0d",
                    cx, cy, step0, th, mv_x, mv_y, best_sad, e.mvx, e.mvy, e.bsad));
    check(cyc == e.cycles, $sformatf("block (%0d,%0d): latency %0d, expected %0d",
                                     cx, cy, cyc, e.cycles));
    @(posedge clk); #1;
    check(mv_out && !done, "mv_out held, done one cycle");
    n_skip   += e.skipped;
    n_move   += e.moves;
    n_chalve += e.center_halvings;
    n_bhalve += e.border_halvings;
    n_excl   += e.excluded;
    n_search += !e.skipped;
    if (!e.skipped && step0 <= 1) n_direct++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int shifts [6][2] = '{'{0, 0}, '{3, -2}, '{-7, 5}, '{12, 6}, '{-14, -11}, '{5, 9}};
    thresh = 0;
    currblk = '0; step_size = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      make_frames(cf, rf, shifts[f][0], shifts[f][1], (f == 0) ? 0 : 6);
      fver++;
      // the printed test case: block (8,4), step 4, threshold 100
      run_block(8, 4, 4, 100);
      for (int n = 0; n < 25; n++)
        run_block(4 * $urandom_range(15), 4 * $urandom_range(15),
                  (n % 5 == 0) ? 1 : (n % 5 == 1) ? 8 : 4,
                  (n % 4 == 0) ? 4080 : $urandom_range(200));
      run_block(0, 0, 4, 0);
      run_block(60, 60, 16, 0);
      run_block(60, 0, 2, 0);
    end
    check(n_skip > 0 && n_move > 0 && n_chalve > 0 && n_bhalve > 0 && n_excl > 0 && n_direct > 0,
          "every search rule occurred");
    $display("searched %0d skipped %0d moves %0d centre-halvings %0d border-halvings %0d excluded %0d direct-square %0d",
             n_search, n_skip, n_move, n_chalve, n_bhalve, n_excl, n_direct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
