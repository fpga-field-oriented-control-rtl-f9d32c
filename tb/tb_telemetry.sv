// tb_telemetry: a transmitter stand-in in the testbench stays busy for a
// random time after every start; the characters collected must spell
// "hhhh hhhh\n" for the values at the trigger. A trigger during a line is
// ignored; `frames` counts lines.
module tb_telemetry;
  logic clk = 0, rst = 1;
  logic trig = 0;
  logic [15:0] val_a, val_b;
  logic tx_busy = 0;
  logic [7:0] tx_data;
  logic tx_start;
  logic [15:0] frames;
  int checks = 0, failures = 0;
  string line = "";
  int busy_left = 0;

  telemetry dut (.*);
  always #5 clk = ~clk;

  // transmitter stand-in: busy from the cycle after start for a random time
  always @(posedge clk) begin
    if (!rst && tx_start) begin
      checks++;
      if (tx_busy) begin failures++; $display("FAIL start while busy"); end
      line = {line, string'(tx_data)};
      busy_left = 3 + $urandom_range(20);
      tx_busy <= 1'b1;
    end else if (busy_left > 0) begin
      busy_left--;
      if (busy_left == 0) tx_busy <= 1'b0;
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 12; n++) begin
      logic [15:0] a, b;
      string want;
      a = 16'($urandom); b = 16'($urandom);
      line = "";
      @(negedge clk); val_a = a; val_b = b; trig = 1;
      @(negedge clk); trig = 0;
      val_a = ~a; val_b = ~b;                 // values must have been copied
      repeat (30) @(negedge clk);
      trig = 1; @(negedge clk); trig = 0;     // ignored: line in progress
      wait (line.len() == 10);
      wait (!tx_busy);
      repeat (5) @(negedge clk);
      want = $sformatf("%04h %04h\n", a, b);
      checks++;
      if (line != want) begin failures++; $display("FAIL line '%s' want '%s'", line, want); end
      checks++;
      if (int'(frames) != n + 1) begin failures++; $display("FAIL frames %0d", frames); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
