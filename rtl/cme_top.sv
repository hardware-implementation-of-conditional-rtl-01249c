// cme_top: conditional motion estimation of 4x4 blocks with the 2D-logarithmic
// search, followed by motion compensation.
//
// A request names a 4x4 block of the current frame (currblk_x, currblk_y), the
// initial step size and a threshold. A SAD unit first compares the block with the
// co-located block of the reference frame and a comparator tests that SAD against
// the threshold (SAD_TH). A block whose SAD does not exceed the threshold is
// taken as still and gets a zero motion vector; any other block is searched by
// the motion estimator with the 2D-logarithmic search. The motion vector then
// drives motion compensation, which copies the matching reference block into the
// motion-compensated frame.
//
// Alongside, the activity test of the conditional scheme classifies the same
// co-located block: pixels whose frame difference exceeds T_g are active, and
// the block is active (blk_active) when more than T_p of its 16 pixels are. It
// is an output for the encoder; the search itself is gated by SAD_TH.
//
// Frames are loaded beforehand, one pixel per clock, into the current store
// (cur_we) or the reference store (ref_we) at raster address wr_addr = y*IMG_W+x.
// The reference store has 16 block read ports: the co-located block, five
// diamond and nine square candidates, and the motion compensation fetch.
//
// Timing: `start` is taken when the estimator is idle (busy low). The results
// mv_x, mv_y and best_sad appear with mv_out high 2 + 2*D cycles later for D
// diamond steps (2 cycles for a still block); mv_out stays high until the next
// start; blk_active is valid from the cycle after start until the next start.
// The compensated block is written one cycle after that (mc_done) and can
// be read back through mc_rd_addr / mc_rd_data. Defaults: 64x64 frames, 32x32
// search area, 8-bit pixels.
// The SAD-threshold-search structure and the sizes follow the reference design;
// the load ports, handshake and read-back port are this design's choices.
module cme_top
  import me_pkg::*;
#(
  parameter int IMG_W        = 64,
  parameter int IMG_H        = 64,
  parameter int SEARCH_RANGE = 32,
  parameter int ADDR_W       = $clog2(IMG_W * IMG_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  // frame loading
  input  logic              cur_we,
  input  logic              ref_we,
  input  logic [ADDR_W-1:0] wr_addr,
  input  pixel_t            wr_data,
  // request
  input  logic              start,
  input  coord_t            currblk_x,
  input  coord_t            currblk_y,
  input  step_t             step_size,
  input  sad_t              threshold,
  // activity test of the conditional scheme
  input  pixel_t            t_g,
  input  logic [4:0]        t_p,
  // result
  output logic              busy,
  output logic              sad_th,
  output logic              mv_out,
  output mv_t               mv_x,
  output mv_t               mv_y,
  output sad_t              best_sad,
  output logic              blk_active,
  // motion-compensated frame
  output logic              mc_done,
  input  logic [ADDR_W-1:0] mc_rd_addr,
  output pixel_t            mc_rd_data
);

  localparam int NREF = 16;  // 0: co-located, 1..14: estimator, 15: compensation

  pos_t   cur_pos;
  block_t cur_blk     [1];
  pos_t   cur_rd_pos  [1];
  pos_t   ref_rd_pos  [NREF];
  block_t ref_rd_blk  [NREF];
  pos_t   me_ref_pos  [14];
  block_t me_ref_blk  [14];
  pos_t   mc_ref_pos;
  sad_t   colo_sad;
  logic   me_done;

  // Current and reference frame stores.
  assign cur_rd_pos[0] = cur_pos;

  frame_ram #(.IMG_W(IMG_W), .IMG_H(IMG_H), .NRD(1)) u_cur_ram (
    .clk(clk), .we(cur_we), .waddr(wr_addr), .wdata(wr_data),
    .rd_pos(cur_rd_pos), .rd_blk(cur_blk));

  frame_ram #(.IMG_W(IMG_W), .IMG_H(IMG_H), .NRD(NREF)) u_ref_ram (
    .clk(clk), .we(ref_we), .waddr(wr_addr), .wdata(wr_data),
    .rd_pos(ref_rd_pos), .rd_blk(ref_rd_blk));

  assign ref_rd_pos[0] = cur_pos;
  for (genvar k = 0; k < 14; k++) begin : g_me_port
    assign ref_rd_pos[1+k] = me_ref_pos[k];
    assign me_ref_blk[k]   = ref_rd_blk[1+k];
  end
  assign ref_rd_pos[15] = mc_ref_pos;

  // Co-located SAD and threshold comparator.
  sad4x4 u_sad (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .acc(1'b0),
    .cur_blk(cur_blk[0]), .ref_blk(ref_rd_blk[0]), .sad(colo_sad));

  sad_threshold_cmp u_cmp (
    .sad(colo_sad), .threshold(threshold), .sad_th(sad_th));

  // Pixel/block activity test on the same co-located blocks.
  logic [4:0] active_cnt;

  active_block_classifier u_active (
    .cur_blk(cur_blk[0]), .ref_blk(ref_rd_blk[0]), .t_g(t_g), .t_p(t_p),
    .active_cnt(active_cnt), .active(blk_active));

  // 2D-logarithmic search.
  motion_estimation #(.IMG_W(IMG_W), .IMG_H(IMG_H), .SEARCH_RANGE(SEARCH_RANGE)) u_me (
    .clk(clk), .rst_n(rst_n), .start(start),
    .currblk('{x: currblk_x, y: currblk_y}), .step_size(step_size), .sad_th(sad_th),
    .cur_pos(cur_pos), .cur_blk(cur_blk[0]),
    .ref_pos(me_ref_pos), .ref_blk(me_ref_blk),
    .busy(busy), .done(me_done), .mv_out(mv_out),
    .mv_x(mv_x), .mv_y(mv_y), .best_sad(best_sad));

  // Motion compensation.
  motion_compensation #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_mc (
    .clk(clk), .rst_n(rst_n), .mv_valid(me_done), .cur_pos(cur_pos),
    .mv_x(mv_x), .mv_y(mv_y), .ref_pos(mc_ref_pos), .ref_blk(ref_rd_blk[15]),
    .mc_done(mc_done), .rd_addr(mc_rd_addr), .rd_data(mc_rd_data));

endmodule
