// active_block_classifier: conditional-motion-estimation activity test of a block.
//
// Each pixel of the frame difference |current - reference| is compared with the
// pixel threshold T_g: a pixel above it is active. The active pixels of the
// block are counted, and the block is active when the count is above the block
// threshold T_p. Active blocks are the ones that need motion estimation;
// inactive ones are coded with a zero vector. This is the classification rule
// of the conditional scheme, applied to the co-located 4x4 blocks the design
// already reads. T_g is an input: the adaptive (Bayesian) choice of T_g is not
// part of this design, and one T_g serves the whole block. Purely
// combinational; `active_cnt` (0..16) is also given out.
module active_block_classifier
  import me_pkg::*;
(
  input  block_t                 cur_blk,
  input  block_t                 ref_blk,
  input  pixel_t                 t_g,
  input  logic [$clog2(NPIX):0]  t_p,
  output logic [$clog2(NPIX):0]  active_cnt,
  output logic                   active
);

  always_comb begin
    active_cnt = '0;
    for (int i = 0; i < NPIX; i++) begin
      pixel_t d;
      d = (cur_blk[i] > ref_blk[i]) ? cur_blk[i] - ref_blk[i] : ref_blk[i] - cur_blk[i];
      if (d > t_g) active_cnt += 1'b1;
    end
    active = (active_cnt > t_p);
  end

endmodule
