// tb_frame_ram: loads a random 64x64 frame a pixel per clock and reads random
// 4x4 blocks back on three ports at once, including blocks that run off the
// frame edge (those pixels read as zero).
module tb_frame_ram;
  import me_pkg::*;

  localparam int W = 64, H = 64;
  logic clk = 0, we = 0;
  logic [11:0] waddr;
  pixel_t wdata;
  pos_t   rd_pos [3];
  block_t rd_blk [3];
  byte unsigned img [W*H];
  int checks = 0, failures = 0;

  frame_ram #(.IMG_W(W), .IMG_H(H), .NRD(3)) dut (.clk, .we, .waddr, .wdata, .rd_pos, .rd_blk);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (img[i]) img[i] = 8'($urandom);
    for (int i = 0; i < W*H; i++) begin
      @(negedge clk);
      we = 1; waddr = 12'(i); wdata = img[i];
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 2000; n++) begin
      for (int p = 0; p < 3; p++)
        rd_pos[p] = '{x: coord_t'($urandom_range(63)), y: coord_t'($urandom_range(63))};
      #1;
      for (int p = 0; p < 3; p++)
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            automatic int x = rd_pos[p].x + c, y = rd_pos[p].y + r;
            automatic int e = (x < W && y < H) ? img[y*W + x] : 0;
            checks++;
            if (rd_blk[p][r*4+c] != e) begin
              failures++;
              if (failures < 10) $display("FAIL port %0d (%0d,%0d)", p, x, y);
            end
          end
    end
    // a write must land only at its own address
    @(negedge clk) we = 1; waddr = 12'd65; wdata = ~img[65];
    @(negedge clk) we = 0;
    img[65] = ~img[65];
    rd_pos[0] = '{x: 0, y: 1};
    rd_pos[1] = '{x: 0, y: 0};
    rd_pos[2] = '{x: 2, y: 1};
    #1;
    for (int p = 0; p < 3; p++)
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (rd_blk[p][r*4+c] != img[(rd_pos[p].y + r)*W + rd_pos[p].x + c]) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
