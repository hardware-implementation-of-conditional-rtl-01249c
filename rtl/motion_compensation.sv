// motion_compensation: builds the motion-compensated frame from motion vectors.
//
// For each estimated block it fetches the reference block the motion vector
// points at (current position + vector) and writes it, as a whole 4x4 block,
// into its own IMG_W x IMG_H frame store at the current block's position. After
// all blocks of a frame have been estimated, that store holds the prediction of
// the current frame from the reference frame.
//
// Interface and timing: `mv_valid` is a one-cycle pulse with `cur_pos`, `mv_x`,
// `mv_y` valid in the same cycle. In that cycle `ref_pos` addresses the
// reference store, `ref_blk` must return the block combinationally, and it is
// written at the clock edge; `mc_done` pulses in the next cycle. The store is
// read a pixel at a time at raster address `rd_addr` (combinational read).
// The reference design only names this unit and its purpose; the block copy, the store
// and its read port are this design's choices.
module motion_compensation
  import me_pkg::*;
#(
  parameter int IMG_W  = 64,
  parameter int IMG_H  = 64,
  parameter int ADDR_W = $clog2(IMG_W * IMG_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mv_valid,
  input  pos_t              cur_pos,
  input  mv_t               mv_x,
  input  mv_t               mv_y,
  output pos_t              ref_pos,
  input  block_t            ref_blk,
  output logic              mc_done,
  input  logic [ADDR_W-1:0] rd_addr,
  output pixel_t            rd_data
);

  pixel_t mem [IMG_W * IMG_H];

  assign ref_pos.x = coord_t'(MV_W'(cur_pos.x) + mv_x);
  assign ref_pos.y = coord_t'(MV_W'(cur_pos.y) + mv_y);

  always_ff @(posedge clk) begin
    if (mv_valid) begin
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++)
          if (int'(cur_pos.x) + c < IMG_W && int'(cur_pos.y) + r < IMG_H)
            mem[(int'(cur_pos.y) + r) * IMG_W + int'(cur_pos.x) + c] <= ref_blk[r*BLK+c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mc_done <= 1'b0;
    else        mc_done <= mv_valid;
  end

  assign rd_data = (int'(rd_addr) < IMG_W * IMG_H) ? mem[rd_addr] : '0;

endmodule
