// frame_ram: grey-level frame store with one pixel write port and NRD block
// read ports.
//
// Holds one IMG_W x IMG_H frame of 8-bit pixels in raster order (address
// y*IMG_W + x). Pixels are written one per clock through the write port, which is
// how a frame is loaded. Each read port takes a block position (top-left pixel)
// and returns the 4x4 block there, row-major, without waiting for a clock edge,
// like a distributed (LUT) RAM; a pixel outside the frame reads as zero. The
// estimator needs many blocks in the same cycle (five diamond and nine square
// candidates), which is why the store has many read ports.
// Two such stores, one for the current and one for the reference frame, follow
// the design; the port arrangement, asynchronous read and raster layout are this
// design's choices.
module frame_ram
  import me_pkg::*;
#(
  parameter int IMG_W  = 64,
  parameter int IMG_H  = 64,
  parameter int NRD    = 1,
  parameter int ADDR_W = $clog2(IMG_W * IMG_H)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  pixel_t            wdata,
  input  pos_t              rd_pos [NRD],
  output block_t            rd_blk [NRD]
);

  pixel_t mem [IMG_W * IMG_H];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < IMG_W * IMG_H) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      for (int r = 0; r < BLK; r++) begin
        for (int c = 0; c < BLK; c++) begin
          int x, y;
          x = int'(rd_pos[p].x) + c;
          y = int'(rd_pos[p].y) + r;
          rd_blk[p][r*BLK+c] = (x < IMG_W && y < IMG_H) ? mem[y*IMG_W + x] : '0;
        end
      end
    end
  end

endmodule
