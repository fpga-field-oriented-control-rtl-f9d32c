// tb_cmd_parser: feeds command strings byte by byte and checks the D and Q
// commands, the strobe, and that malformed lines change nothing.
module tb_cmd_parser;
  logic clk = 0, rst = 1;
  logic [7:0] rx_data = 0;
  logic rx_valid = 0;
  logic signed [15:0] id_ref, iq_ref;
  logic cmd_strobe;
  int checks = 0, failures = 0, strobes = 0;

  cmd_parser dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && cmd_strobe) strobes++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input string s);
    for (int i = 0; i < s.len(); i++) begin
      @(negedge clk); rx_data = s[i]; rx_valid = 1;
      @(negedge clk); rx_valid = 0;
      repeat ($urandom_range(3)) @(negedge clk);
    end
    repeat (2) @(negedge clk);
  endtask

  task automatic expect_refs(input int d, input int q, input int s, input string what);
    checks++;
    if (int'(id_ref) != d || int'(iq_ref) != q || strobes != s) begin
      failures++;
      $display("FAIL %s: id=%0d iq=%0d strobes=%0d", what, id_ref, iq_ref, strobes);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    expect_refs(0, 0, 0, "reset");
    send("q0100\n");          expect_refs(0, 256, 1, "q");
    send("dFF00\r");          expect_refs(-256, 256, 2, "d upper case");
    send("Q7fff\r\n");        expect_refs(-256, 32767, 3, "Q max");
    send("d12\n");            expect_refs(-256, 32767, 3, "too few digits");
    send("q123456\n");        expect_refs(-256, 32767, 3, "too many digits");
    send("qx123\n");          expect_refs(-256, 32767, 3, "bad character");
    send("zzq8000\n");        expect_refs(-256, -32768, 4, "garbage before command");
    send("q12dabcd\n");       expect_refs(-256, -32768, 4, "letter d inside digits is a digit");
    send("q12\nd00ff\n");     expect_refs(255, -32768, 5, "recovery");
    for (int k = 0; k < 20; k++) begin
      automatic int v = int'($urandom_range(65535));
      automatic bit isq = k[0];
      send($sformatf("%s%04h\n", isq ? "q" : "d", 16'(v)));
      checks++;
      if ((isq ? iq_ref : id_ref) != 16'(v)) begin
        failures++;
        $display("FAIL random %0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
