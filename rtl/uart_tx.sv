// uart_tx: UART transmitter, 8 data bits, no parity, 1 stop bit, LSB first.
//
// A 10-bit frame (start 0, data, stop 1) is loaded into a shift register on
// `start` and shifted out one bit every CLKS_PER_BIT cycles. `busy` is high
// from the cycle after `start` until the stop bit has been sent; `start` is
// ignored while busy. The line idles high and is high in reset.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 104
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic       start,
  output logic       busy,
  output logic       tx
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  logic [9:0]    frame;
  logic [3:0]    bits_left;
  logic [CW-1:0] tick_cnt;

  assign busy = (bits_left != 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      frame     <= '1;
      bits_left <= '0;
      tick_cnt  <= '0;
      tx        <= 1'b1;
    end else if (!busy) begin
      tx <= 1'b1;
      if (start) begin
        frame     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        tick_cnt  <= '0;
      end
    end else begin
      tx <= frame[0];
      if (tick_cnt == CW'(CLKS_PER_BIT - 1)) begin
        tick_cnt  <= '0;
        frame     <= {1'b1, frame[9:1]};
        bits_left <= bits_left - 1'b1;
      end else begin
        tick_cnt <= tick_cnt + 1'b1;
      end
    end
  end
endmodule
