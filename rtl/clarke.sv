// clarke: Clarke transform of the two measured phase currents (combinational).
//
// Only phases A and B are measured; with balanced currents ic = -ia - ib, and
// the amplitude-invariant transform reduces to
//   i_alpha = ia
//   i_beta  = (ia + 2*ib) / sqrt(3)
// The 1/sqrt(3) factor is applied by shift-and-add (foc_pkg::mul_frac), not
// by a multiplier; 2*ib is a left shift. The result is rounded to nearest and
// saturated to W bits. Using only shifts and adds follows the original
// design; the amplitude-invariant form is this design's choice.
module clarke
  import foc_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] ia,
  input  logic signed [W-1:0] ib,
  output logic signed [W-1:0] i_alpha,
  output logic signed [W-1:0] i_beta
);
  logic signed [31:0] sum;
  always_comb begin
    sum     = 32'(ia) + (32'(ib) <<< 1);
    i_alpha = ia;
    i_beta  = W'(clamp_bits(mul_frac(sum, K_INV_SQRT3), W));
  end
endmodule
