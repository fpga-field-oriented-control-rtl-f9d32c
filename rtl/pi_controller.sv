// pi_controller: proportional-integral regulator for one rotor-frame current.
//
// On each `en` strobe (one per control loop iteration):
//   err   = ref_in - meas
//   integ = clamp(integ + KI*err, +-OUT_LIM * 2^SHIFT)
//   out   = clamp((KP*err + integ) / 2^SHIFT, +-OUT_LIM)
// Gains are integers scaled by 2^-SHIFT, so KP = 64 with SHIFT = 6 is a gain
// of 1 (output voltage count per current count). Clamping the integrator to
// the output range keeps it from winding up while the output saturates;
// `sat` is high while the output is clamped. Gains are fixed at build time.
// The PI structure is the original design's; gains, scaling and the
// anti-windup rule are this design's choices.
//
// Timing: `out` and `sat` are registered and valid the cycle after `en`.
module pi_controller #(
  parameter int unsigned W       = 16,
  parameter int          KP      = 64,
  parameter int          KI      = 8,
  parameter int unsigned SHIFT   = 6,
  parameter int          OUT_LIM = 2047
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] ref_in,
  input  logic signed [W-1:0] meas,
  output logic signed [W-1:0] out,
  output logic                sat
);
  localparam longint ILIM = longint'(OUT_LIM) <<< SHIFT;

  logic signed [47:0] err, integ, integ_sum, integ_next, total, scaled;

  always_comb begin
    err        = 48'(ref_in) - 48'(meas);
    integ_sum  = integ + 48'(KI) * err;
    if (integ_sum > 48'(ILIM))       integ_next = 48'(ILIM);
    else if (integ_sum < -48'(ILIM)) integ_next = -48'(ILIM);
    else                             integ_next = integ_sum;
    total      = 48'(KP) * err + integ_next;
    scaled     = total >>> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      integ <= '0;
      out   <= '0;
      sat   <= 1'b0;
    end else if (en) begin
      integ <= integ_next;
      if (scaled > 48'(OUT_LIM)) begin
        out <= W'(OUT_LIM);
        sat <= 1'b1;
      end else if (scaled < -48'(OUT_LIM)) begin
        out <= W'(-OUT_LIM);
        sat <= 1'b1;
      end else begin
        out <= W'(scaled);
        sat <= 1'b0;
      end
    end
  end
endmodule
