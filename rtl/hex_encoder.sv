// hex_encoder: 4-bit value to its ASCII hexadecimal digit (combinational),
// '0'-'9' then lower-case 'a'-'f'.
module hex_encoder (
  input  logic [3:0] nibble,
  output logic [7:0] ch
);
  always_comb begin
    if (nibble < 4'd10) ch = 8'("0") + 8'(nibble);
    else                ch = 8'("a") + 8'(nibble) - 8'd10;
  end
endmodule
