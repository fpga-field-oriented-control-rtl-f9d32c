// foc_top: FPGA field oriented controller for a three-phase permanent magnet
// motor driven by a three-phase inverter.
//
// Data flow:
//   * Two current-sense ADCs, each on its own SPI bus (adc_spi), give the
//     phase A and B currents; mid-scale (2048) is zero current.
//   * A quadrature encoder with index (quad_encoder) gives the rotor's
//     electrical angle.
//   * foc_loop turns currents and angle into three phase voltage setpoints
//     that hold the D and Q currents at their commands.
//   * svpwm compares the setpoints with a triangle wave and drives the three
//     gate lines; its triangle counter is stepped by frac_clk_div at
//     DIV_NUM/DIV_DEN of the clock rate.
//   * A noise-resistant UART receiver and cmd_parser take D and Q current
//     commands ("d1234\n", "q0100\n"); telemetry reports the measured D and Q
//     currents back as hex text through uart_tx.
//
// Loop timing: svpwm pulses `sample` at each top and bottom of its triangle.
// That pulse starts both ADC reads; when both results are in, one foc_loop
// iteration runs, and its setpoints are taken by svpwm at the next turnaround.
// With a 12 MHz clock and the 2/3 divider the PWM period is
// 2*4095*3/2 = 12285 cycles (977 Hz), so the loop runs at about 1.95 kHz.
// Status nets with no output pin (frame errors, command strobe, triangle
// counter, encoder count and direction, PI saturation, telemetry line count)
// are kept as named internal signals for probing in simulation or with an
// on-chip logic analyser.
// Block partitioning follows the original design; the trigger scheme, the
// clock rate and the ADC scaling are this design's choices.
module foc_top
  import foc_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 104,   // 12 MHz / 115200 baud
  parameter int unsigned ENC_CPR      = 4096,
  parameter int unsigned POLE_PAIRS   = 4,
  parameter int unsigned PWM_BITS     = 12,
  parameter int unsigned DIV_NUM      = 2,
  parameter int unsigned DIV_DEN      = 3,
  parameter int unsigned ADC_BITS     = 12
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       uart_rx,
  output logic       uart_tx,
  output logic [1:0] adc_cs_n,
  output logic [1:0] adc_sclk,
  input  logic [1:0] adc_sdo,
  input  logic       enc_a,
  input  logic       enc_b,
  input  logic       enc_i,
  output logic       pwm_u,
  output logic       pwm_v,
  output logic       pwm_w
);
  // ---------------- command link ----------------
  logic [7:0] rx_byte;
  logic       rx_valid, rx_ferr;
  sample_t    id_ref, iq_ref;
  logic       cmd_strobe;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst, .rx(uart_rx), .data(rx_byte), .valid(rx_valid), .frame_err(rx_ferr)
  );
  cmd_parser u_cmd (
    .clk, .rst, .rx_data(rx_byte), .rx_valid, .id_ref, .iq_ref, .cmd_strobe
  );

  // ---------------- PWM ----------------
  logic                       step;
  logic signed [PWM_BITS-1:0] vu, vv, vw;
  logic        [PWM_BITS-1:0] tri_cnt;
  logic                       tri_up, pwm_sample;

  frac_clk_div #(.W(16)) u_div (
    .clk, .rst, .num(16'(DIV_NUM)), .den(16'(DIV_DEN)), .tick(step)
  );
  svpwm #(.BITS(PWM_BITS)) u_pwm (
    .clk, .rst, .step, .vu, .vv, .vw, .pwm_u, .pwm_v, .pwm_w,
    .counter(tri_cnt), .upcount(tri_up), .sample(pwm_sample)
  );

  // ---------------- sensing ----------------
  logic [ADC_BITS-1:0] code_a, code_b;
  logic [1:0]          adc_done;
  logic [1:0]          have;
  sample_t             ia, ib;
  logic [$clog2(ENC_CPR)-1:0] enc_count;
  angle_t              theta;
  logic                enc_dir, enc_index_seen;

  adc_spi #(.DATA_BITS(ADC_BITS)) u_adc_a (
    .clk, .rst, .start(pwm_sample), .cs_n(adc_cs_n[0]), .sclk(adc_sclk[0]),
    .sdo(adc_sdo[0]), .data(code_a), .done(adc_done[0])
  );
  adc_spi #(.DATA_BITS(ADC_BITS)) u_adc_b (
    .clk, .rst, .start(pwm_sample), .cs_n(adc_cs_n[1]), .sclk(adc_sclk[1]),
    .sdo(adc_sdo[1]), .data(code_b), .done(adc_done[1])
  );

  quad_encoder #(.CPR(ENC_CPR), .POLE_PAIRS(POLE_PAIRS)) u_enc (
    .clk, .rst, .a(enc_a), .b(enc_b), .i(enc_i),
    .count(enc_count), .theta_e(theta), .dir(enc_dir), .index_seen(enc_index_seen)
  );

  // Offset-binary ADC codes to signed currents.
  localparam sample_t ADC_MID = sample_t'(1 << (ADC_BITS - 1));
  assign ia = sample_t'(code_a) - ADC_MID;
  assign ib = sample_t'(code_b) - ADC_MID;

  // Start the loop once both ADC results of this trigger are in.
  logic loop_start;
  assign loop_start = &(have | adc_done);

  always_ff @(posedge clk) begin
    if (rst)                  have <= '0;
    else if (loop_start)      have <= '0;
    else                      have <= have | adc_done;
  end

  // ---------------- control loop ----------------
  sample_t id_meas, iq_meas;
  logic    loop_done, pi_sat;

  foc_loop #(.PWM_BITS(PWM_BITS)) u_loop (
    .clk, .rst, .start(loop_start), .ia, .ib, .theta, .id_ref, .iq_ref,
    .vu, .vv, .vw, .id_meas, .iq_meas, .pi_sat, .done(loop_done)
  );

  // ---------------- telemetry ----------------
  logic [7:0] tx_byte;
  logic       tx_start, tx_busy;
  logic [15:0] tel_frames;

  telemetry u_tel (
    .clk, .rst, .trig(loop_done), .val_a(id_meas), .val_b(iq_meas),
    .tx_busy, .tx_data(tx_byte), .tx_start, .frames(tel_frames)
  );
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst, .data(tx_byte), .start(tx_start), .busy(tx_busy), .tx(uart_tx)
  );
endmodule
