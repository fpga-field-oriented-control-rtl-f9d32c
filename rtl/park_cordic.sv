// park_cordic: Park and inverse Park transform by an iterative CORDIC.
//
// Park (inverse = 0) rotates the stator-frame vector (alpha, beta) by minus
// the electrical angle, giving the rotor-frame (d, q):
//   d =  alpha cos(theta) + beta sin(theta)
//   q = -alpha sin(theta) + beta cos(theta)
// Inverse Park (inverse = 1) rotates (d, q) by plus theta back to
// (alpha, beta). Both are the same vector rotation, so one CORDIC serves both.
//
// How it works: the rotation angle is first folded into [-90, +90] degrees by
// negating the vector (a 180 degree turn) when needed. Then ITER micro
// rotations by +-atan(2^-i) drive the residual angle to zero using only
// shifts and adds. The vector grows by the CORDIC gain (about 1.6468), which
// is removed at the end by a shift-and-add multiply by 0.60725. The datapath
// keeps GUARD extra fraction bits and two extra integer bits; results are
// rounded and saturated to W bits. Residual angle error is below 2^-20 turn.
// The use of a CORDIC for the Park transforms follows the original design;
// the iterative (one micro rotation per clock) form is this design's choice.
//
// Timing: `start` loads the operands; `done` pulses ITER + 2 cycles later
// with x_out/y_out valid until the next `start`. `start` while busy restarts.
module park_cordic
  import foc_pkg::*;
#(
  parameter int unsigned W    = 16,
  parameter int unsigned ITER = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic                inverse,
  input  angle_t              theta,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out,
  output logic                done
);
  localparam int unsigned GUARD = 4;
  localparam int unsigned XW    = W + 2 + GUARD + 1;  // datapath width
  localparam int unsigned ZW    = 21;                  // angle, 2^20 per turn

  // atan(2^-i) in units of 2^-20 turn, i = 0..15.
  localparam logic [ZW-1:0] ATAN [16] = '{
    21'd131072, 21'd77376, 21'd40884, 21'd20753, 21'd10417, 21'd5213,
    21'd2607,   21'd1304,  21'd652,   21'd326,   21'd163,   21'd81,
    21'd41,     21'd20,    21'd10,    21'd5
  };

  logic signed [XW-1:0] x, y;
  logic signed [ZW-1:0] z;
  logic [$clog2(ITER+1)-1:0] it;
  logic busy, fin;

  angle_t rot;          // rotation angle, counter-clockwise positive
  logic   fold;         // rotation outside +-90 degrees
  angle_t rot_f;

  assign rot   = inverse ? theta : angle_t'(-theta);
  assign fold  = rot[15] ^ rot[14];                 // 90..270 degrees
  assign rot_f = fold ? rot + 16'h8000 : rot;       // now in -90..+90

  logic signed [31:0] xg, yg;
  assign xg = mul_frac(32'(x), K_CORDIC_GAIN);
  assign yg = mul_frac(32'(y), K_CORDIC_GAIN);

  always_ff @(posedge clk) begin
    if (rst) begin
      x     <= '0;
      y     <= '0;
      z     <= '0;
      it    <= '0;
      busy  <= 1'b0;
      fin   <= 1'b0;
      done  <= 1'b0;
      x_out <= '0;
      y_out <= '0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (start) begin
        x    <= fold ? -(XW'(x_in) <<< GUARD) : (XW'(x_in) <<< GUARD);
        y    <= fold ? -(XW'(y_in) <<< GUARD) : (XW'(y_in) <<< GUARD);
        z    <= ZW'($signed(rot_f)) <<< 4;
        it   <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (z >= 0) begin
          x <= x - (y >>> it);
          y <= y + (x >>> it);
          z <= z - $signed(ATAN[it[3:0]]);
        end else begin
          x <= x + (y >>> it);
          y <= y - (x >>> it);
          z <= z + $signed(ATAN[it[3:0]]);
        end
        if (32'(it) == ITER - 1) begin
          busy <= 1'b0;
          fin  <= 1'b1;
        end
        it <= it + 1'b1;
      end else if (fin) begin
        x_out <= W'(clamp_bits((xg + (32'sd1 <<< (GUARD - 1))) >>> GUARD, W));
        y_out <= W'(clamp_bits((yg + (32'sd1 <<< (GUARD - 1))) >>> GUARD, W));
        done  <= 1'b1;
      end
    end
  end

  initial assert (ITER <= 16) else $error("park_cordic: ITER above 16 has no table entry");
endmodule
