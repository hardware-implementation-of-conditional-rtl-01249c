// tb_cme_top: end-to-end test of the conditional motion estimator at its
// default size (64x64 frames, 4x4 blocks, 32x32 search area).
//
// For each of three frame pairs it loads the reference and the current frame
// through the pixel write port, then estimates every one of the 256 blocks of
// the current frame in turn, as a frame encoder would, and finally reads back
// the whole motion-compensated frame. Each block's vector, best SAD and latency
// are compared with the reference model; each compensated pixel with the
// reference pixel the model's vector points at. Block (8,4) with step 4 and
// threshold 100 is among the requests, as in the design's own test. The
// testbench counts, from the design's own signals, how often each mechanism
// occurred: blocks classified active and inactive by the T_g/T_p test, still
// blocks skipped by the threshold, diamond moves, halving at the
// centre and at the border, candidates excluded at the search-area edge, square
// steps, searches entered with step one, and compensated blocks; one that never
// occurs is a failure.
module tb_cme_top;
  import me_pkg::*;
  import tb_me_model::*;

  logic clk = 0, rst_n = 0;
  logic cur_we = 0, ref_we = 0, start = 0;
  logic [11:0] wr_addr = '0, mc_rd_addr = '0;
  pixel_t wr_data = '0, mc_rd_data;
  coord_t currblk_x = '0, currblk_y = '0;
  step_t  step_size = '0;
  sad_t   threshold = '0;
  pixel_t t_g = '0;
  logic [4:0] t_p = '0;
  logic   blk_active;
  logic   busy, sad_th, mv_out, mc_done;
  mv_t    mv_x, mv_y;
  sad_t   best_sad;

  frame_t cf, rf;
  int exp_mvx [16][16], exp_mvy [16][16];
  int checks = 0, failures = 0;
  int n_skip = 0, n_move = 0, n_chalve = 0, n_bhalve = 0, n_excl = 0, n_square = 0,
      n_step1 = 0, n_mc = 0, n_active = 0, n_inactive = 0;

  cme_top dut (.*);

  always #5 clk = ~clk;

  // Mechanism counters, taken from the design's own signals.
  localparam int ST_DEVAL = 1, ST_DCMP = 2, ST_SEVAL = 3;
  always @(posedge clk) if (rst_n) begin
    if (int'(dut.u_me.state) == ST_DCMP) begin
      if (dut.u_me.first && !sad_th) n_skip++;
      else begin
        if (dut.u_me.d_new_center != dut.u_me.center) n_move++;
        if (dut.u_me.d_halved && !dut.u_me.d_on_border) n_chalve++;
        if (dut.u_me.d_on_border) n_bhalve++;
      end
    end
    if (int'(dut.u_me.state) == ST_DEVAL)
      for (int k = 1; k < 5; k++) if (!dut.u_me.d_valid[k]) n_excl++;
    if (int'(dut.u_me.state) == ST_SEVAL) begin
      n_square++;
      for (int k = 1; k < 9; k++) if (!dut.u_me.s_valid[k]) n_excl++;
    end
    if (start && !busy && step_size == 1) n_step1++;
    if (mc_done) n_mc++;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic load_frames();
    for (int i = 0; i < W*H; i++) begin
      @(negedge clk);
      ref_we = 1; cur_we = 0; wr_addr = 12'(i); wr_data = rf[i];
      @(negedge clk);
      ref_we = 0; cur_we = 1; wr_addr = 12'(i); wr_data = cf[i];
    end
    @(negedge clk);
    ref_we = 0; cur_we = 0;
  endtask

  task automatic run_block(int cx, int cy, int step0, int th);
    result_t e;
    int cyc;
    e = search(cf, rf, cx, cy, step0, th);
    exp_mvx[cy/4][cx/4] = e.mvx;
    exp_mvy[cy/4][cx/4] = e.mvy;
    @(negedge clk);
    currblk_x = coord_t'(cx); currblk_y = coord_t'(cy);
    step_size = step_t'(step0); threshold = sad_t'(th);
    t_g = 8'($urandom_range(4, 20)); t_p = 5'($urandom_range(2, 10));
    start = 1;
    @(posedge clk);
    #1 start = 0;
    begin
      automatic int na = 0;
      for (int j = 0; j < N; j++)
        for (int i = 0; i < N; i++) begin
          automatic int a = cf[(cy+j)*W + cx+i], b = rf[(cy+j)*W + cx+i];
          if (((a > b) ? a - b : b - a) > int'(t_g)) na++;
        end
      check(blk_active == (na > int'(t_p)),
            $sformatf("block (%0d,%0d): activity %0b, %0d active pixels, T_p %0d",
                      cx, cy, blk_active, na, t_p));
      if (na > int'(t_p)) n_active++; else n_inactive++;
    end
    cyc = 0;
    do begin
      @(posedge clk); #1;
      cyc++;
    end while (!mv_out && cyc < 1000);
    check(int'(mv_x) == e.mvx && int'(mv_y) == e.mvy && int'(best_sad) == e.bsad,
          $sformatf("block (%0d,%0d) step %0d th %0d: mv (%0d,%0d) sad %0d, expected (%0d,%0d) sad %0d",
                    cx, cy, step0, th, mv_x, mv_y, best_sad, e.mvx, e.mvy, e.bsad));
    check(cyc == e.cycles, $sformatf("block (%0d,%0d): latency %0d, expected %0d",
                                     cx, cy, cyc, e.cycles));
    @(posedge clk); #1;
    check(mc_done, "compensated block written one cycle after the vector");
  endtask

  task automatic check_mc_frame();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic int sx = x + exp_mvx[y/4][x/4], sy = y + exp_mvy[y/4][x/4];
        mc_rd_addr = 12'(y * W + x);
        #1;
        check(mc_rd_data == rf[sy*W + sx],
              $sformatf("compensated pixel (%0d,%0d): %0d, expected %0d",
                        x, y, mc_rd_data, rf[sy*W + sx]));
      end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int shifts [3][2] = '{'{3, -2}, '{-9, 6}, '{13, 11}};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      make_frames(cf, rf, shifts[f][0], shifts[f][1], 6);
      load_frames();
      for (int by = 0; by < 16; by++)
        for (int bx = 0; bx < 16; bx++) begin
          automatic int n = by * 16 + bx;
          if (bx == 2 && by == 1)
            run_block(8, 4, 4, 100);            // the design's own test request
          else
            run_block(4 * bx, 4 * by, (n % 7 == 0) ? 1 : (n % 7 == 1) ? 8 : 4,
                      (n % 5 == 0) ? 400 : 100);
        end
      check_mc_frame();
    end
    check(n_skip > 0,   "a still block was skipped");
    check(n_move > 0,   "a diamond step moved the centre");
    check(n_chalve > 0, "the step was halved at the centre");
    check(n_bhalve > 0, "the step was halved at the border");
    check(n_excl > 0,   "candidates were excluded at the search-area edge");
    check(n_square > 0, "a square step ran");
    check(n_step1 > 0,  "a search started with step one");
    check(n_mc == 3 * 256, "every block was compensated");
    check(n_active > 0 && n_inactive > 0, "blocks classified both active and inactive");
    $display("skipped %0d moves %0d centre-halvings %0d border-halvings %0d excluded %0d squares %0d step-one %0d compensated %0d active %0d inactive %0d",
             n_skip, n_move, n_chalve, n_bhalve, n_excl, n_square, n_step1, n_mc, n_active, n_inactive);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
