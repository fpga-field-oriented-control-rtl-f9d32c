# Field oriented control of a three-phase motor in an FPGA

This is synthesizable SystemVerilog for a field oriented controller (FOC)
for a three-phase permanent magnet motor, driven through a three-phase
inverter. Three things are measured: two phase currents, each from its own
SPI ADC, and the rotor position, from a quadrature encoder. The controller
moves the currents into the rotor's frame of reference. There they split
into a D part, along the magnet, and a Q part, across it, which makes the
torque. Two PI regulators hold D and Q at the values commanded over a
serial link. The regulator outputs go back to the stator frame and become
three phase voltages. A centre-aligned PWM generator turns those into the
three gate-drive signals.

Why work in the rotor frame: D and Q change slowly even when the motor
spins fast, because the rotation has been removed from them. So a
regulator updated a few thousand times a second is enough. The catch is
that every iteration needs two coordinate transforms each way, and an
FPGA does those cheaply and with a fixed, short latency. Here one
iteration takes 42 clock cycles once the ADC results are in.

## Signal chain

```
 ADC A --SPI--> adc_spi --\                                   /--> pwm_u
 ADC B --SPI--> adc_spi ---+--> foc_loop --(vu,vv,vw)--> svpwm ---> pwm_v
 encoder A/B/I -> quad_encoder --theta--^        ^          |  \--> pwm_w
                                                 |          | step
 uart_rx -> cmd_parser --(id_ref, iq_ref)--------/   frac_clk_div
 uart_tx <- telemetry <--(id, iq measured)-- foc_loop
```

`foc_loop` runs these steps in order:

| step | block | operation |
|---|---|---|
| 1 | `clarke` | (ia, ib) -> (i_alpha, i_beta), where alpha = ia and beta = (ia + 2 ib)/sqrt3 |
| 2 | `park_cordic` | rotate by -theta: (alpha, beta) -> (id, iq) |
| 3 | `pi_controller` x2 | vd = PI(id_ref - id), vq = PI(iq_ref - iq) |
| 4 | `park_cordic` | rotate by +theta: (vd, vq) -> (v_alpha, v_beta) |
| 5 | `inv_clarke` | (v_alpha, v_beta) -> (va, vb, vc) |
| 6 | clamp | saturate each phase to the signed 12-bit PWM range |

Only two phase currents are measured. The third follows from
ia + ib + ic = 0, which is why the Clarke step needs only ia and ib.

### What sets the loop rate

The PWM triangle paces the loop. Each time the triangle turns around, at
its top and at its bottom, `svpwm` pulses `sample`. On that pulse:

1. Both ADC reads start together (67 cycles).
2. When both results are in, one `foc_loop` iteration runs (42 cycles).
3. The new setpoints wait in `foc_loop`'s outputs until the next
   turnaround, when `svpwm` takes them.

A measurement therefore affects the outputs half a PWM period later.
Currents are always sampled at the centre of a pulse, where the switching
noise is lowest.

The triangle has 2*(2^12 - 1) = 8190 steps per period. `frac_clk_div`
allows one step on 2 of every 3 clocks, so one PWM period is 12285 clocks.
With a 12 MHz clock that gives 977 Hz PWM and 1.95 kHz control. The loop
itself needs only about 110 cycles, so the PWM period is what limits the
rate. A faster clock, or a larger `DIV_NUM/DIV_DEN`, raises both.

## Number formats

All of these are set in `foc_pkg`:

- **Currents** are signed 16-bit numbers in ADC counts. The raw ADC code
  has mid-scale 2048 subtracted, so 0 means zero current and one count is
  one ADC step.
- **Voltages** are signed numbers in PWM counts. The PWM works on signed
  12-bit setpoints: -2048 gives 0 % duty and +2047 gives 100 %.
  Intermediate voltages are 16 bits wide. The PI outputs are limited to
  +-2047, and each phase voltage is clamped to 12 bits at the end.
- **Angles** are 16-bit binary angles: 65536 is one electrical turn.
- **PI gains** are integers scaled by 2^-6. The defaults, KP = 64 and
  KI = 8, mean 1 PWM count per ADC count of error, plus 1/8 of that error
  added to the integrator each iteration.

## The transforms without multipliers

The Clarke and inverse Clarke transforms multiply only by fixed
constants: 1/sqrt3 and sqrt3/2. The function `foc_pkg::mul_frac` stores
each constant as a 16-bit fraction (37837/65536 and 56756/65536). It adds
one shifted copy of the operand for each set bit of that fraction, then
rounds. A halving is an arithmetic shift. So these transforms contain
adders and no multipliers.

The Park rotations do need sin and cos of a changing angle. `park_cordic`
computes them with an iterative CORDIC, one micro-rotation per clock:

- **Folding.** The rotation angle is -theta for Park and +theta for the
  inverse. If it lies between 90 and 270 degrees, the vector is negated
  and the angle moved by 180 degrees. The remaining angle is then within
  +-90 degrees, where CORDIC converges.
- **Iterations.** Sixteen steps each rotate by +-atan(2^-i), with the sign
  picked from the remaining angle. Each step costs only shifts and adds.
  The remaining angle is held with 2^20 units per turn, so the angle error
  is negligible.
- **Gain.** CORDIC lengthens the vector by 1.6468. A shift-and-add
  multiply by 0.60725 at the end removes this.
- **Precision.** The datapath carries 4 guard bits and 2 extra integer
  bits. Results are rounded and saturated to 16 bits. Tested error is
  within 3 counts of exact floating point over the +-20000 input range.

One CORDIC serves both the Park and the inverse Park step. A result is
ready ITER + 2 = 18 cycles after `start`.

## PWM generation

`svpwm` holds a 12-bit counter that counts up from 0 to 4095 and back
down, one step per `step` enable. Each signed setpoint has its sign bit
inverted, which maps it onto the counter's 0..4095 range. A phase output
is high while its threshold is above the counter. All three phases
compare against the same triangle, so their pulses are centred on the
same instant.

A setpoint is copied into its threshold register only when the counter
turns around. A new setpoint therefore never cuts a pulse in two. Duty is
(v + 2048)/4096. No common-mode (zero-sequence) offset is added to the
three setpoints. Adding one would let the line voltages reach the full
bus voltage (about 15 % more than now), but it makes the phase waveforms
harder to read. It would be a short addition before the threshold
registers.

`frac_clk_div` makes the counter's step rate a fraction NUM/DEN of the
clock. Every cycle an accumulator adds NUM. When the sum reaches DEN, the
divider emits a one-cycle `tick` and subtracts DEN, keeping the surplus.
The average rate is exactly NUM/DEN, and the ticks are as evenly spread as
whole cycles allow: 2/3 gives tick, tick, gap, repeating. `tick` is a
clock enable and not a new clock, so the whole design runs on one clock.

## Serial link

**Receiver.** `uart_rx` (8N1, 115200 baud at 12 MHz by default) is built
for a line next to a switching inverter. It does not sample each bit once
in its middle. Instead it counts how many clock cycles of the whole bit
time the line was high and takes the majority. A spike shorter than about
half a bit minus the 3-cycle input delay cannot flip a bit. The start bit
is judged the same way, so a spike on an idle line is dropped.

**Commands.** `cmd_parser` accepts `d` or `q` (either case), then exactly
four hex digits, then CR or LF. The digits are a 16-bit two's complement
current in ADC counts.
- `q0100` asks for Q current 256.
- `dff00` asks for D current -256. A negative D command weakens the
  magnet's field, which lets the motor run faster.

Any other character discards the line. A valid command takes effect the
cycle after its terminator. Both commands are 0 after reset.

**Telemetry.** After each loop iteration, `telemetry` sends the measured
D and Q currents as `hhhh hhhh` plus LF: lower-case hex, 16-bit two's
complement. A line is 10 characters, about 10400 cycles at 115200 baud.
That is longer than one loop iteration, so iterations that end while a
line is still being sent are skipped. In practice every second or third
iteration is reported.

## Sensor interfaces

**ADC.** `adc_spi` reads one ADC on a three-wire SPI bus (chip select,
clock, data out). Each current ADC has its own bus, so the two phases are
read at the same instant. The frame follows the usual small 12-bit SAR
ADC:

- Pulling CS low starts a conversion.
- The reader gives 16 clocks. sclk idles high. Data changes after the
  falling edge and is read on the rising edge.
- The last 12 bits are the result, MSB first.
- Each sclk half-period is `SCLK_DIV` system clocks (default 2, which is
  3 MHz sclk at 12 MHz).

For a different ADC, change `FRAME_BITS`, `DATA_BITS` and `SCLK_DIV`, and
check the clock edge against its datasheet.

**Encoder.** `quad_encoder` counts every edge of A and B: up when A leads
B, down when B leads A. A sample in which both lines changed is ignored.
The count wraps at CPR = 4096, and the rising edge of the index signal I
resets it to 0. The electrical angle is
count * POLE_PAIRS * 65536 / CPR + OFFSET, worked out with one multiply by
a build-time constant. For CPR = 4096 and 4 pole pairs this is simply
count * 64. `OFFSET` lines the index position up with the rotor's D axis.
It is 0 by default and must be measured on the real motor.

## Where this design makes its own choices

These were chosen here. Check them before using the design on hardware:

- **Clock.** 12 MHz is assumed, which sets `CLKS_PER_BIT = 104` for
  115200 baud. With another clock, change `CLKS_PER_BIT`; the PWM and
  loop rates scale with the clock.
- **Motor.** `POLE_PAIRS = 4` and `OFFSET = 0` are placeholders for the
  real motor.
- **ADC.** The frame format, the clock edge and the polarity are assumed.
  A code above mid-scale is taken as positive phase current. If the
  analogue front end inverts, swap the sign in `foc_top`.
- **Regulator.** Gains and limits are fixed at build time. The integrator
  is clamped to the output limit, which prevents wind-up.
- **Serial protocol.** The command and telemetry formats are this
  design's own.
- **Loop trigger.** The loop runs on each triangle turnaround, twice per
  PWM period.
- **Reset.** The PWM starts at 50 % duty on all three phases, which is
  zero line voltage. The gate outputs are low while reset is held. There
  is no inverter enable or fault input. Add one before driving real power
  stages.

Not included:
- readers for the temperature and bus-voltage ADCs, which share a
  separate SPI bus;
- an interface for a resolver-to-digital converter.

The encoder is the only position sensor.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference values are
worked out in the testbench, mostly in floating point:

- The transforms are checked against `$sin`, `$cos` and `$sqrt`.
- The PI regulator is checked against a real-valued model.
- The PWM is checked cycle by cycle against a triangle model, and with
  the setpoints 0x444, 0x000, 0xbbc.
- The UART receiver is checked with spikes of 1 to 10 clocks in every bit at
  32 clocks per bit.
- The ADC reader is checked against a behavioural ADC model
  (`tb/adc_model.sv`), including its latency.

`tb_foc_top` runs the whole design at its default parameters:

1. It moves the encoder forward and back, then pulses the index.
2. It sends commands over a noisy serial line.
3. It drives the Q regulator into saturation and checks the resulting
   duty cycles on the three pins against the expected saturated voltage
   (50 %, 93.3 % and 6.7 %).
4. It feeds non-zero ADC currents and checks the D/Q values that come
   back in telemetry.

It also counts each mechanism and fails if one never happened: commands,
noise spikes, divider gaps, setpoint updates, loop iterations, ADC frames,
saturation, encoder directions, the index and telemetry lines.

`tb_foc_closed_loop` closes the current loop through a load model:

1. It measures the duty cycle of each gate output over every half PWM
   period and turns it into a phase voltage.
2. It removes the common-mode part, which a star-connected load does not
   see.
3. It drives a first-order resistive-inductive model per phase and feeds
   the model currents back through the ADC models.

With the rotor held at two angles, the D and Q currents reported over the
serial link settle within 6 counts of the commands. This includes a
negative D command of the kind used for field weakening.

Not verified:
- a spinning motor with back-EMF and saliency;
- timing closure on an FPGA.

## Simulating

Any testbench runs with plain Verilator 5, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/foc_pkg.sv tb/tb_foc_top.sv --top-module tb_foc_top -o sim
./obj_dir/sim
```

Swap in any other `tb_<block>.sv` and its module name the same way. The
full-system test takes about two seconds. The block testbenches take under
a second each.

## Files

- `rtl/foc_pkg.sv`: shared types, constants, shift-and-add multiply and
  clamp.
- `rtl/foc_top.sv`: top level.
- `rtl/foc_loop.sv`: control loop sequencer.
- `rtl/clarke.sv`, `rtl/inv_clarke.sv`, `rtl/park_cordic.sv`: transforms.
- `rtl/pi_controller.sv`: PI regulator.
- `rtl/svpwm.sv`, `rtl/frac_clk_div.sv`: PWM.
- `rtl/adc_spi.sv`: ADC reader.
- `rtl/quad_encoder.sv`: encoder interface.
- `rtl/uart_rx.sv`, `rtl/uart_tx.sv`, `rtl/hex_decoder.sv`,
  `rtl/hex_encoder.sv`, `rtl/cmd_parser.sv`, `rtl/telemetry.sv`: serial
  link.
- `tb/tb_*.sv`: one testbench per block.
- `tb/tb_foc_closed_loop.sv`: the closed-loop test described above.
- `tb/adc_model.sv`: behavioural SPI ADC.
