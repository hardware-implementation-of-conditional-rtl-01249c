// sad4x4: sum of absolute differences of two 4x4 pixel blocks.
//
// All sixteen pixel pairs are handled at once: sixteen subtractors form the
// signed differences, sixteen absolute-value units fold them to magnitudes and
// one adder sums the sixteen magnitudes. The sum goes into an accumulator
// register, as in the SAD architecture the design follows. With `acc` low an
// enabled cycle loads the register with the new block sum; with `acc` high it
// adds the new sum to what the register holds, so a larger block can be matched
// as several 4x4 pieces. The motion estimator only ever loads.
//
// Interface: cur_blk and ref_blk are 16 pixels, row-major. When `en` is high at
// a rising clock edge, `sad` takes the new value; it is valid from the next
// cycle on (latency one cycle, one block per cycle). Reset clears it.
// The load/accumulate control and the reset are this design's own choices.
module sad4x4
  import me_pkg::*;
#(
  parameter int ACC_W = SAD_W  // accumulator width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             acc,
  input  block_t           cur_blk,
  input  block_t           ref_blk,
  output logic [ACC_W-1:0] sad
);

  logic [PIX_W-1:0] absd [NPIX];
  logic [SAD_W-1:0] sum;

  // Difference and absolute-value unit per pixel pair.
  always_comb begin
    for (int i = 0; i < NPIX; i++) begin
      logic signed [PIX_W:0] d;
      d       = $signed({1'b0, cur_blk[i]}) - $signed({1'b0, ref_blk[i]});
      absd[i] = (d < 0) ? PIX_W'(-d) : PIX_W'(d);
    end
  end

  // Adder over the sixteen magnitudes.
  always_comb begin
    sum = '0;
    for (int i = 0; i < NPIX; i++) sum += SAD_W'(absd[i]);
  end

  // Accumulator.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sad <= '0;
    else if (en) sad <= (acc ? sad : '0) + ACC_W'(sum);
  end

endmodule
