// sad_threshold_cmp: decides whether a block needs a motion search.
//
// The SAD between the current block and the co-located reference block is
// compared with a threshold. If the SAD is above the threshold the block is
// taken to have moved and `sad_th` goes high, which lets the motion estimator
// run its search; otherwise the block keeps a zero motion vector. A SAD equal
// to the threshold counts as "not moved", which is this design's choice.
// Purely combinational.
module sad_threshold_cmp
  import me_pkg::*;
(
  input  sad_t sad,
  input  sad_t threshold,
  output logic sad_th
);

  assign sad_th = (sad > threshold);

endmodule
