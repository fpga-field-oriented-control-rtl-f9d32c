// hex_decoder: ASCII hexadecimal digit to its 4-bit value (combinational).
// Accepts '0'-'9', 'a'-'f' and 'A'-'F'; `is_hex` is low for any other
// character and `nibble` is then 0.
module hex_decoder (
  input  logic [7:0] ch,
  output logic [3:0] nibble,
  output logic       is_hex
);
  always_comb begin
    is_hex = 1'b1;
    nibble = '0;
    if (ch >= "0" && ch <= "9")      nibble = 4'(ch - "0");
    else if (ch >= "a" && ch <= "f") nibble = 4'(ch - "a" + 8'd10);
    else if (ch >= "A" && ch <= "F") nibble = 4'(ch - "A" + 8'd10);
    else                             is_hex = 1'b0;
  end
endmodule
