// motion_estimation: 2D-logarithmic block search for one 4x4 block.
//
// The search starts at the current block's own position with the given step
// size. Each diamond step reads five candidate blocks (centre and the four
// points `step` away), computes their five SADs in parallel and moves the centre
// to the best one; the step is halved when the centre stays best or the best
// point is on the border of the search area. Once the step is one, a last
// square step compares the centre and its eight neighbours with nine parallel
// SAD units, and the winner gives the motion vector (best position minus the
// current position) and the best SAD.
// If `sad_th` is low after the first diamond step (the co-located SAD did not
// exceed the threshold) the block is taken as not moved: the motion vector is
// zero and the best SAD is the co-located SAD.
//
// Sub-units: search_range, diamond_generate with five sad4x4, sad5_comparator,
// square_generate with nine sad4x4, sad9_comparator, and one FSM.
//
// Interface and timing: `start` is sampled in IDLE together with currblk,
// step_size; `cur_pos` then holds the block position for the whole search (the
// current block store is read there and `cur_blk` must be its 4x4 block).
// `ref_pos[0..4]` address the diamond candidates and `ref_pos[5..13]` the square
// candidates in the reference store; `ref_blk` returns the blocks in the same
// cycle. `sad_th` must be valid in the cycle after the first diamond read
// (DCMP). Each diamond step takes two cycles (read and SAD into the
// accumulators, then compare), the square step two more; results are registered
// and `mv_out` rises with them, `done` pulses for one cycle, and `mv_out` stays
// high until the next start. Latency from the start cycle to `done`: 2 + 2*D
// cycles for D diamond steps when the block is searched, 2 when it is skipped.
// The two-cycle step, the start/done handshake and `done` are this design's
// choices; the unit split, the parallel SAD units and the search rules follow
// the reference architecture.
module motion_estimation
  import me_pkg::*;
#(
  parameter int IMG_W        = 64,
  parameter int IMG_H        = 64,
  parameter int SEARCH_RANGE = 32
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  pos_t   currblk,
  input  step_t  step_size,
  input  logic   sad_th,
  output pos_t   cur_pos,
  input  block_t cur_blk,
  output pos_t   ref_pos [14],
  input  block_t ref_blk [14],
  output logic   busy,
  output logic   done,
  output logic   mv_out,
  output mv_t    mv_x,
  output mv_t    mv_y,
  output sad_t   best_sad
);

  typedef enum logic [2:0] {S_IDLE, S_DEVAL, S_DCMP, S_SEVAL, S_SCMP} state_t;

  state_t state;
  pos_t   center;
  step_t  step;
  logic   first;
  range_t bounds;

  // Search area.
  search_range #(.IMG_W(IMG_W), .IMG_H(IMG_H), .SEARCH_RANGE(SEARCH_RANGE)) u_range (
    .cur(cur_pos), .bounds(bounds));

  // Diamond step: five candidates, five SAD units, SAD5 comparator.
  pos_t  d_cand  [5];
  logic  d_valid [5];
  sad_t  d_sad   [5];
  pos_t  d_new_center;
  step_t d_new_step;
  sad_t  d_best_sad;
  logic  d_to_square, d_halved, d_on_border;

  diamond_generate u_diamond (
    .center(center), .step(step), .bounds(bounds), .cand(d_cand), .valid(d_valid));

  for (genvar k = 0; k < 5; k++) begin : g_dsad
    assign ref_pos[k] = d_cand[k];
    sad4x4 u_sad (
      .clk(clk), .rst_n(rst_n), .en(state == S_DEVAL), .acc(1'b0),
      .cur_blk(cur_blk), .ref_blk(ref_blk[k]), .sad(d_sad[k]));
  end

  sad5_comparator u_sad5 (
    .sad(d_sad), .valid(d_valid), .cand(d_cand), .step(step), .bounds(bounds),
    .new_center(d_new_center), .new_step(d_new_step), .best_sad(d_best_sad),
    .to_square(d_to_square), .halved(d_halved), .on_border(d_on_border));

  // Square step: nine candidates, nine SAD units, SAD9 comparator.
  pos_t  s_cand  [9];
  logic  s_valid [9];
  sad_t  s_sad   [9];
  mv_t   s_mv_x, s_mv_y;
  sad_t  s_best_sad;
  pos_t  s_best_pos;

  square_generate u_square (
    .center(center), .bounds(bounds), .cand(s_cand), .valid(s_valid));

  for (genvar k = 0; k < 9; k++) begin : g_ssad
    assign ref_pos[5+k] = s_cand[k];
    sad4x4 u_sad (
      .clk(clk), .rst_n(rst_n), .en(state == S_SEVAL), .acc(1'b0),
      .cur_blk(cur_blk), .ref_blk(ref_blk[5+k]), .sad(s_sad[k]));
  end

  sad9_comparator u_sad9 (
    .sad(s_sad), .valid(s_valid), .cand(s_cand), .cur(cur_pos),
    .mv_x(s_mv_x), .mv_y(s_mv_y), .best_sad(s_best_sad), .best_pos(s_best_pos));

  // Controller.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur_pos  <= '0;
      center   <= '0;
      step     <= '0;
      first    <= 1'b0;
      done     <= 1'b0;
      mv_out   <= 1'b0;
      mv_x     <= '0;
      mv_y     <= '0;
      best_sad <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cur_pos <= currblk;
          center  <= currblk;
          step    <= (step_size == '0) ? step_t'(1) : step_size;
          first   <= 1'b1;
          mv_out  <= 1'b0;
          state   <= S_DEVAL;
        end
        S_DEVAL: state <= S_DCMP;
        S_DCMP: begin
          first <= 1'b0;
          if (first && !sad_th) begin
            // Not moved: zero vector, co-located SAD.
            mv_x     <= '0;
            mv_y     <= '0;
            best_sad <= d_sad[0];
            mv_out   <= 1'b1;
            done     <= 1'b1;
            state    <= S_IDLE;
          end else begin
            center <= d_new_center;
            step   <= d_new_step;
            state  <= d_to_square ? S_SEVAL : S_DEVAL;
          end
        end
        S_SEVAL: state <= S_SCMP;
        S_SCMP: begin
          mv_x     <= s_mv_x;
          mv_y     <= s_mv_y;
          best_sad <= s_best_sad;
          mv_out   <= 1'b1;
          done     <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // The centre of a diamond step is always a valid candidate.
  a_center_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_DEVAL) |-> d_valid[0]);
  // Every search ends with a result flagged on mv_out.
  a_done_flags: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> mv_out);

endmodule
