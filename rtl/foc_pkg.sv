// foc_pkg: types and constants shared by the field oriented control (FOC) design.
//
// Fixed-point convention: currents and voltages are signed 16-bit integers.
// A current is in ADC counts (one LSB of the 12-bit current-sense ADC, with
// mid-scale as zero); a voltage is in counts of the 12-bit SVPWM compare range.
// Angles are unsigned 16-bit binary angles: 2^16 is one full electrical turn.
//
// Multiplications by fixed irrational constants (1/sqrt3, sqrt3/2 and the
// CORDIC gain correction) are done with shift-and-add: the constant is held
// as a 16-bit unsigned fraction and every set bit adds one shifted copy of the
// operand. This is the shift-for-multiply substitution the transforms use
// instead of hardware multipliers.
package foc_pkg;

  typedef logic signed [15:0] sample_t;  // current or voltage
  typedef logic        [15:0] angle_t;   // binary angle, 2^16 per turn

  // Constants as unsigned Q0.16 fractions: round(value * 65536).
  localparam logic [15:0] K_INV_SQRT3   = 16'd37837;  // 1/sqrt(3)   = 0.577350
  localparam logic [15:0] K_SQRT3_HALF  = 16'd56756;  // sqrt(3)/2   = 0.866025
  localparam logic [15:0] K_CORDIC_GAIN = 16'd39797;  // 1/1.646760  = 0.607253

  // x * k / 65536, rounded to nearest, by shift-and-add over the set bits of k.
  function automatic logic signed [31:0] mul_frac(input logic signed [31:0] x,
                                                  input logic [15:0] k);
    logic signed [47:0] acc;
    logic signed [47:0] xe;
    xe  = 48'(x);
    acc = 48'sd32768;                      // rounding constant, 0.5 LSB
    for (int i = 0; i < 16; i++)
      if (k[i]) acc = acc + (xe <<< i);
    return 32'(acc >>> 16);
  endfunction

  // Clamp a wide signed value into a signed field of the given bit width.
  function automatic logic signed [31:0] clamp_bits(input logic signed [31:0] x,
                                                    input int unsigned bits);
    logic signed [31:0] hi, lo;
    hi = (32'sd1 <<< (bits - 1)) - 32'sd1;
    lo = -(32'sd1 <<< (bits - 1));
    if (x > hi) return hi;
    if (x < lo) return lo;
    return x;
  endfunction

endpackage
