// cmd_parser: turns characters received over the serial link into D and Q
// current commands.
//
// Command syntax (this design's own): a letter selecting the target, 'd' or
// 'q' in either case, followed by exactly four hexadecimal digits giving a
// 16-bit two's complement value in ADC current counts, ended by CR or LF.
// Example: "q0100\n" requests Q current 256, "dff00\r" D current -256.
// A letter restarts parsing; any other unexpected character, a fifth digit
// or a terminator after too few digits discards the line. The value is
// written to `id_ref` or `iq_ref` in the cycle after the terminator arrives,
// with a one-cycle `cmd_strobe`. Both commands are zero after reset.
module cmd_parser
  import foc_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic [7:0] rx_data,
  input  logic    rx_valid,
  output sample_t id_ref,
  output sample_t iq_ref,
  output logic    cmd_strobe
);
  typedef enum logic [1:0] {WAIT_CMD, DIGITS} state_t;
  state_t      state;
  logic        sel_q;
  logic [2:0]  ndig;
  logic [15:0] acc;
  logic [3:0]  nib;
  logic        is_hex;
  logic        is_d, is_q, is_term;

  hex_decoder u_dec (.ch(rx_data), .nibble(nib), .is_hex(is_hex));

  assign is_d    = (rx_data == "d") || (rx_data == "D");
  assign is_q    = (rx_data == "q") || (rx_data == "Q");
  assign is_term = (rx_data == 8'h0d) || (rx_data == 8'h0a);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= WAIT_CMD;
      sel_q      <= 1'b0;
      ndig       <= '0;
      acc        <= '0;
      id_ref     <= '0;
      iq_ref     <= '0;
      cmd_strobe <= 1'b0;
    end else begin
      cmd_strobe <= 1'b0;
      if (rx_valid) begin
        // 'd' is also a hex digit: it is a command letter only outside DIGITS.
        if (state == DIGITS && is_hex && ndig < 3'd4) begin
          acc  <= {acc[11:0], nib};
          ndig <= ndig + 1'b1;
        end else if (state == DIGITS && is_term && ndig == 3'd4) begin
          state      <= WAIT_CMD;
          cmd_strobe <= 1'b1;
          if (sel_q) iq_ref <= sample_t'(acc);
          else       id_ref <= sample_t'(acc);
        end else if (is_d || is_q) begin
          state <= DIGITS;
          sel_q <= is_q;
          ndig  <= '0;
          acc   <= '0;
        end else begin
          state <= WAIT_CMD;
        end
      end
    end
  end
endmodule
