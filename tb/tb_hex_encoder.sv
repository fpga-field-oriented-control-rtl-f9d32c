// tb_hex_encoder: all 16 values against $sformatf("%h").
module tb_hex_encoder;
  logic [3:0] nibble;
  logic [7:0] ch;
  int checks = 0, failures = 0;

  hex_encoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      string s;
      nibble = 4'(v);
      #1;
      s = $sformatf("%h", 4'(v));
      checks++;
      if (ch != s[0]) begin
        failures++;
        $display("FAIL %0d -> %c want %s", v, ch, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
