// inv_clarke: inverse Clarke transform (combinational), alpha/beta voltages
// to three phase voltages:
//   va =  v_alpha
//   vb = -v_alpha/2 + (sqrt(3)/2) v_beta
//   vc = -v_alpha/2 - (sqrt(3)/2) v_beta
// The halving is an arithmetic right shift and sqrt(3)/2 is applied by
// shift-and-add (foc_pkg::mul_frac), following the original design's
// multiplier-free transforms. Outputs are saturated to W bits.
module inv_clarke
  import foc_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] v_alpha,
  input  logic signed [W-1:0] v_beta,
  output logic signed [W-1:0] va,
  output logic signed [W-1:0] vb,
  output logic signed [W-1:0] vc
);
  logic signed [31:0] half_a, sb;
  always_comb begin
    // Both terms carry 8 fraction bits so that the sum is rounded only once.
    half_a = 32'(v_alpha) <<< 7;
    sb     = mul_frac(32'(v_beta) <<< 8, K_SQRT3_HALF);
    va     = v_alpha;
    vb     = W'(clamp_bits(( sb - half_a + 32'sd128) >>> 8, W));
    vc     = W'(clamp_bits((-sb - half_a + 32'sd128) >>> 8, W));
  end
endmodule
