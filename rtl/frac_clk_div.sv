// frac_clk_div: fractional clock divider, NUM output pulses per DEN input
// clock cycles on average (num <= den, checked by an assertion).
//
// An accumulator grows by `num` every clock. When the sum reaches `den` a
// pulse is produced and `den` is subtracted, keeping the overshoot, so the
// long-run rate is exactly num/den and the pulses are spread as evenly as
// whole clock cycles allow (2/3 gives pulse, pulse, gap, ...). The counter
// and the keep-the-remainder rollover follow the original divider; producing
// a one-cycle enable `tick` instead of a separate clock is this design's
// choice, so that everything stays in one clock domain.
//
// Timing: `tick` is registered; it is high in the cycle after the
// accumulator crossed `den`. Reset clears the accumulator.
module frac_clk_div #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         tick
);
  logic [W:0] acc;
  logic [W:0] sum;

  assign sum = acc + {1'b0, num};

  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      tick <= 1'b0;
    end else if (sum >= {1'b0, den}) begin
      acc  <= sum - {1'b0, den};
      tick <= 1'b1;
    end else begin
      acc  <= sum;
      tick <= 1'b0;
    end
  end

  // One tick per clock at most: a ratio above 1 would let the accumulator
  // grow without bound.
  a_ratio: assert property (@(posedge clk) disable iff (rst) num <= den)
    else $error("frac_clk_div: num above den");
endmodule
