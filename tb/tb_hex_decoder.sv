// tb_hex_decoder: all 256 characters; expected values come from a lookup
// string of the hex digits in both cases.
module tb_hex_decoder;
  logic [7:0] ch;
  logic [3:0] nibble;
  logic is_hex;
  int checks = 0, failures = 0;
  string lower = "0123456789abcdef";
  string upper = "0123456789ABCDEF";

  hex_decoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      automatic int exp_v = -1;
      for (int k = 0; k < 16; k++) begin
        logic [7:0] lo, up;
        lo = lower.getc(k);
        up = upper.getc(k);
        if (lo == 8'(c) || up == 8'(c)) exp_v = k;
      end
      ch = 8'(c);
      #1;
      checks++;
      if (exp_v < 0) begin
        if (is_hex) begin failures++; $display("FAIL %02h flagged hex", c); end
      end else if (!is_hex || int'(nibble) != exp_v) begin
        failures++;
        $display("FAIL %02h -> %0d/%b, want %0d", c, nibble, is_hex, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
