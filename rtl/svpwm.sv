// svpwm: three-phase centre-aligned PWM generator.
//
// A BITS-wide counter runs up from 0 to 2^BITS-1 and back down, one step per
// `step` enable (from frac_clk_div), forming a triangle wave. Each phase
// setpoint is a signed BITS-bit voltage; it is moved to the counter's
// unsigned range by inverting its sign bit, and the phase output is high
// while that threshold is above the counter. All three phases are compared
// against the same triangle, so their edges are symmetric about the peaks of
// the triangle. Setpoints are copied into internal registers only when the
// counter turns around at the top or the bottom, so a new setpoint never
// splits a PWM pulse. As in the original design, no zero-sequence (DC offset)
// injection is applied: duty = (v + 2^(BITS-1)) / 2^BITS.
//
// Interface: `sample` pulses for one cycle at each turnaround, when the
// setpoints are taken; the control loop uses it as its trigger. `counter` and
// `upcount` expose the triangle. Outputs are registered. Reset: counter 0,
// counting up, latched setpoints 0 (50 % duty on every phase, zero line
// voltage), which is this design's choice.
module svpwm #(
  parameter int unsigned BITS = 12
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   step,
  input  logic signed [BITS-1:0] vu,
  input  logic signed [BITS-1:0] vv,
  input  logic signed [BITS-1:0] vw,
  output logic                   pwm_u,
  output logic                   pwm_v,
  output logic                   pwm_w,
  output logic        [BITS-1:0] counter,
  output logic                   upcount,
  output logic                   sample
);
  localparam logic [BITS-1:0] TOP = '1;
  localparam logic [BITS-1:0] MSB = {1'b1, {(BITS-1){1'b0}}};

  logic [BITS-1:0] th_u, th_v, th_w;  // latched thresholds, unsigned
  logic            turn;

  assign turn = step && ((upcount && counter == TOP) || (!upcount && counter == '0));

  always_ff @(posedge clk) begin
    if (rst) begin
      counter <= '0;
      upcount <= 1'b1;
      th_u    <= MSB;
      th_v    <= MSB;
      th_w    <= MSB;
      sample  <= 1'b0;
    end else begin
      sample <= turn;
      if (turn) begin
        upcount <= !upcount;
        counter <= upcount ? counter - 1'b1 : counter + 1'b1;
        th_u    <= vu ^ MSB;
        th_v    <= vv ^ MSB;
        th_w    <= vw ^ MSB;
      end else if (step) begin
        counter <= upcount ? counter + 1'b1 : counter - 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pwm_u <= 1'b0;
      pwm_v <= 1'b0;
      pwm_w <= 1'b0;
    end else begin
      pwm_u <= th_u > counter;
      pwm_v <= th_v > counter;
      pwm_w <= th_w > counter;
    end
  end
endmodule
