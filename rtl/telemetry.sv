// telemetry: reports two internal 16-bit values over the serial link as a
// text line "hhhh hhhh\n" (lower-case hex, most significant digit first).
//
// On `trig` the two values are copied and the 10 characters are handed to
// uart_tx one at a time: a character is offered with a one-cycle `tx_start`
// when the transmitter is not busy, and the next one only after `tx_busy`
// has been seen high and low again. A trigger that arrives while a line is
// still being sent is ignored, so the line rate adapts to the baud rate.
// `frames` counts completed lines. Which values are reported (the measured
// D and Q currents in the top level) and the line format are this design's
// choice.
module telemetry (
  input  logic        clk,
  input  logic        rst,
  input  logic        trig,
  input  logic [15:0] val_a,
  input  logic [15:0] val_b,
  input  logic        tx_busy,
  output logic [7:0]  tx_data,
  output logic        tx_start,
  output logic [15:0] frames
);
  logic [31:0] snap;
  logic [3:0]  idx;       // character index 0..9
  logic        active;
  logic        issued;    // start given, waiting for busy to rise and fall
  logic        seen_busy;
  logic [7:0]  hex_ch;
  logic [3:0]  nib;

  hex_encoder u_enc (.nibble(nib), .ch(hex_ch));

  always_comb begin
    nib = '0;
    unique case (idx)
      4'd0: nib = snap[31:28];
      4'd1: nib = snap[27:24];
      4'd2: nib = snap[23:20];
      4'd3: nib = snap[19:16];
      4'd5: nib = snap[15:12];
      4'd6: nib = snap[11:8];
      4'd7: nib = snap[7:4];
      4'd8: nib = snap[3:0];
      default: nib = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      snap      <= '0;
      idx       <= '0;
      active    <= 1'b0;
      issued    <= 1'b0;
      seen_busy <= 1'b0;
      tx_data   <= '0;
      tx_start  <= 1'b0;
      frames    <= '0;
    end else begin
      tx_start <= 1'b0;
      if (!active) begin
        if (trig) begin
          snap   <= {val_a, val_b};
          idx    <= '0;
          active <= 1'b1;
        end
      end else if (!issued) begin
        if (!tx_busy) begin
          tx_data   <= (idx == 4'd4) ? 8'h20 : (idx == 4'd9) ? 8'h0a : hex_ch;
          tx_start  <= 1'b1;
          issued    <= 1'b1;
          seen_busy <= 1'b0;
        end
      end else if (tx_busy) begin
        seen_busy <= 1'b1;
      end else if (seen_busy) begin
        issued <= 1'b0;
        if (idx == 4'd9) begin
          active <= 1'b0;
          frames <= frames + 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end
endmodule
