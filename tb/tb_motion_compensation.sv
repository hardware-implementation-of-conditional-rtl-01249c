// tb_motion_compensation: feeds random motion vectors for every 4x4 block of a
// 64x64 frame, answers the reference-block fetches from a random reference
// frame, and reads the compensated frame back pixel by pixel. Each pixel must be
// the reference pixel displaced by its block's vector; mc_done must follow each
// vector by one cycle.
module tb_motion_compensation;
  import me_pkg::*;

  localparam int W = 64, H = 64;
  logic   clk = 0, rst_n = 0, mv_valid = 0, mc_done;
  pos_t   cur_pos, ref_pos;
  mv_t    mv_x, mv_y;
  block_t ref_blk;
  logic [11:0] rd_addr;
  pixel_t rd_data;
  byte unsigned rf [W*H];
  int mvx_of [16][16], mvy_of [16][16];
  int checks = 0, failures = 0;
  int fver = 0;

  motion_compensation dut (.clk, .rst_n, .mv_valid, .cur_pos, .mv_x, .mv_y, .ref_pos,
                           .ref_blk, .mc_done, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  always_comb begin
    ref_blk = '0;
    if (fver >= 0)
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          automatic int x = int'(ref_pos.x) + c, y = int'(ref_pos.y) + r;
          ref_blk[r*4+c] = (x < W && y < H) ? rf[y*W + x] : 8'h00;
        end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (rf[i]) rf[i] = 8'($urandom);
    fver++;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int by = 0; by < 16; by++)
      for (int bx = 0; bx < 16; bx++) begin
        // a vector that keeps the displaced block inside the frame
        automatic int vx = $urandom_range(60) - 4 * bx;
        automatic int vy = $urandom_range(60) - 4 * by;
        if (vx < -16) vx = -16 + (vx % 3);
        if (vx > 16)  vx = 16 - (vx % 3);
        if (4 * bx + vx < 0)  vx = -4 * bx;
        if (4 * bx + vx > 60) vx = 60 - 4 * bx;
        if (vy < -16) vy = -16 + (vy % 3);
        if (vy > 16)  vy = 16 - (vy % 3);
        if (4 * by + vy < 0)  vy = -4 * by;
        if (4 * by + vy > 60) vy = 60 - 4 * by;
        mvx_of[by][bx] = vx;
        mvy_of[by][bx] = vy;
        @(negedge clk);
        cur_pos = '{x: coord_t'(4 * bx), y: coord_t'(4 * by)};
        mv_x = mv_t'(vx); mv_y = mv_t'(vy);
        mv_valid = 1;
        @(negedge clk);
        mv_valid = 0;
        checks++;
        if (!mc_done) begin
          failures++;
          $display("FAIL mc_done missing");
        end
        @(negedge clk);
        checks++;
        if (mc_done) begin
          failures++;
          $display("FAIL mc_done longer than one cycle");
        end
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic int sx = x + mvx_of[y/4][x/4], sy = y + mvy_of[y/4][x/4];
        rd_addr = 12'(y * W + x);
        #1;
        checks++;
        if (rd_data != rf[sy*W + sx]) begin
          failures++;
          if (failures < 10) $display("FAIL pixel (%0d,%0d): %0d vs %0d", x, y, rd_data, rf[sy*W+sx]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
