// quad_encoder: quadrature encoder interface with index, and conversion of
// the rotor position to an electrical angle.
//
// The encoder gives two square waves A and B a quarter period apart and an
// index pulse I once per mechanical turn. Every rising or falling edge of A
// or B is one count, up when A leads B and down when B leads A; a sample in
// which both changed is invalid and ignored. The count wraps modulo CPR
// (counts per mechanical turn) and is set to 0 on the rising edge of I, which
// gives the absolute reference the A/B signals lack. Inputs are brought into
// the clock domain by two-flop synchronisers.
//
// The electrical angle is
//   theta_e = count * POLE_PAIRS * 2^16 / CPR + OFFSET   (mod 2^16)
// computed as one multiply by the build-time constant
// POLE_PAIRS * 2^32 / CPR followed by a 16-bit right shift, so a CPR that is
// not a power of two works too. With CPR = 4096 the multiply is a shift.
// Edge counting and the index reset follow the original design; the
// direction convention, pole pairs and OFFSET are this design's choices.
//
// Timing: count and theta_e follow an input edge after 3 cycles (2
// synchroniser stages, 1 register); theta_e is combinational from count.
module quad_encoder #(
  parameter int unsigned CPR        = 4096,
  parameter int unsigned POLE_PAIRS = 4,
  parameter int unsigned OFFSET     = 0
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   a,
  input  logic                   b,
  input  logic                   i,
  output logic [$clog2(CPR)-1:0] count,
  output logic [15:0]            theta_e,
  output logic                   dir,
  output logic                   index_seen
);
  localparam int unsigned CW = $clog2(CPR);
  localparam longint unsigned SCALE = (longint'(POLE_PAIRS) << 32) / longint'(CPR);

  logic [1:0] a_s, b_s, i_s;
  logic       a_q, b_q, i_q;
  logic       up, down;
  logic [CW+48-1:0] prod;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_s <= '0; b_s <= '0; i_s <= '0;
      a_q <= 1'b0; b_q <= 1'b0; i_q <= 1'b0;
    end else begin
      a_s <= {a_s[0], a};
      b_s <= {b_s[0], b};
      i_s <= {i_s[0], i};
      a_q <= a_s[1];
      b_q <= b_s[1];
      i_q <= i_s[1];
    end
  end

  // Exactly one of A, B changed: direction from the standard decode.
  always_comb begin
    up   = 1'b0;
    down = 1'b0;
    if ((a_s[1] ^ a_q) ^ (b_s[1] ^ b_q)) begin
      up   = a_s[1] ^ b_q;
      down = !up;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count      <= '0;
      dir        <= 1'b1;
      index_seen <= 1'b0;
    end else if (i_s[1] && !i_q) begin
      count      <= '0;
      index_seen <= 1'b1;
    end else if (up) begin
      count <= (32'(count) == CPR - 1) ? '0 : count + 1'b1;
      dir   <= 1'b1;
    end else if (down) begin
      count <= (count == '0) ? CW'(CPR - 1) : count - 1'b1;
      dir   <= 1'b0;
    end
  end

  assign prod    = (CW+48)'(count) * (CW+48)'(SCALE);
  assign theta_e = 16'(prod >> 16) + 16'(OFFSET);
endmodule
