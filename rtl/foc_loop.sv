// foc_loop: one iteration of the field oriented current control loop.
//
// Sequence, started by `start` with fresh phase currents and rotor angle:
//   1. Clarke:        (ia, ib)            -> (i_alpha, i_beta)
//   2. Park:          (i_alpha, i_beta)   -> (id, iq)   rotate by -theta
//   3. PI regulators: id_ref - id, iq_ref - iq -> (vd, vq)
//   4. inverse Park:  (vd, vq)            -> (v_alpha, v_beta) rotate by +theta
//   5. inverse Clarke:(v_alpha, v_beta)   -> (va, vb, vc)
//   6. saturate to the signed PWM_BITS range and register vu, vv, vw.
// Regulating in the rotor frame means the PI regulators see nearly constant
// quantities even when the motor spins fast, which is why the loop can run at
// a few kilohertz. One park_cordic instance serves steps 2 and 4.
// The operation order follows the original design; the sequencing and the
// shared CORDIC are this design's choices.
//
// Timing: all inputs are sampled at `start` (ignored while busy). `done`
// pulses 2*(ITER+2) + 6 cycles after `start` (42 cycles with 16 CORDIC
// iterations) with vu/vv/vw and the measured id/iq updated in that cycle.
module foc_loop
  import foc_pkg::*;
#(
  parameter int unsigned W        = 16,
  parameter int unsigned PWM_BITS = 12,
  parameter int          KP       = 64,
  parameter int          KI       = 8,
  parameter int unsigned SHIFT    = 6
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       start,
  input  logic signed [W-1:0]        ia,
  input  logic signed [W-1:0]        ib,
  input  angle_t                     theta,
  input  logic signed [W-1:0]        id_ref,
  input  logic signed [W-1:0]        iq_ref,
  output logic signed [PWM_BITS-1:0] vu,
  output logic signed [PWM_BITS-1:0] vv,
  output logic signed [PWM_BITS-1:0] vw,
  output logic signed [W-1:0]        id_meas,
  output logic signed [W-1:0]        iq_meas,
  output logic                       pi_sat,
  output logic                       done
);
  localparam int VLIM = (1 << (PWM_BITS - 1)) - 1;

  typedef enum logic [2:0] {IDLE, PARK, PI, PI_WAIT, IPARK, ICLARKE} state_t;
  state_t state;

  logic signed [W-1:0] ia_q, ib_q, i_alpha, i_beta;
  angle_t              theta_q;
  logic                c_start, c_inv, c_done;
  logic signed [W-1:0] c_x, c_y, c_xo, c_yo;
  logic signed [W-1:0] vd, vq, v_alpha, v_beta, va, vb, vc;
  logic                pi_en, sat_d, sat_q;

  clarke #(.W(W)) u_clarke (.ia(ia_q), .ib(ib_q), .i_alpha(i_alpha), .i_beta(i_beta));

  park_cordic #(.W(W)) u_cordic (
    .clk, .rst, .start(c_start), .inverse(c_inv), .theta(theta_q),
    .x_in(c_x), .y_in(c_y), .x_out(c_xo), .y_out(c_yo), .done(c_done)
  );

  pi_controller #(.W(W), .KP(KP), .KI(KI), .SHIFT(SHIFT), .OUT_LIM(VLIM)) u_pi_d (
    .clk, .rst, .en(pi_en), .ref_in(id_ref), .meas(id_meas), .out(vd), .sat(sat_d)
  );
  pi_controller #(.W(W), .KP(KP), .KI(KI), .SHIFT(SHIFT), .OUT_LIM(VLIM)) u_pi_q (
    .clk, .rst, .en(pi_en), .ref_in(iq_ref), .meas(iq_meas), .out(vq), .sat(sat_q)
  );

  inv_clarke #(.W(W)) u_iclarke (.v_alpha(v_alpha), .v_beta(v_beta), .va(va), .vb(vb), .vc(vc));

  assign c_inv = (state == IPARK);
  assign c_x   = (state == IPARK) ? vd : i_alpha;
  assign c_y   = (state == IPARK) ? vq : i_beta;
  assign pi_en = (state == PI);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= IDLE;
      ia_q    <= '0;
      ib_q    <= '0;
      theta_q <= '0;
      c_start <= 1'b0;
      id_meas <= '0;
      iq_meas <= '0;
      v_alpha <= '0;
      v_beta  <= '0;
      vu      <= '0;
      vv      <= '0;
      vw      <= '0;
      pi_sat  <= 1'b0;
      done    <= 1'b0;
    end else begin
      c_start <= 1'b0;
      done    <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          ia_q    <= ia;
          ib_q    <= ib;
          theta_q <= theta;
          c_start <= 1'b1;
          state   <= PARK;
        end
        PARK: if (c_done) begin
          id_meas <= c_xo;
          iq_meas <= c_yo;
          state   <= PI;
        end
        PI: state <= PI_WAIT;
        PI_WAIT: begin
          pi_sat  <= sat_d | sat_q;
          c_start <= 1'b1;
          state   <= IPARK;
        end
        IPARK: if (c_done) begin
          v_alpha <= c_xo;
          v_beta  <= c_yo;
          state   <= ICLARKE;
        end
        ICLARKE: begin
          vu    <= PWM_BITS'(clamp_bits(32'(va), PWM_BITS));
          vv    <= PWM_BITS'(clamp_bits(32'(vb), PWM_BITS));
          vw    <= PWM_BITS'(clamp_bits(32'(vc), PWM_BITS));
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
