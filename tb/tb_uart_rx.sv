// tb_uart_rx: sends 8N1 frames to the receiver at 32 clocks per bit, clean
// and with spikes of up to 10 clocks inverted inside every bit, and checks the
// received bytes. Also checks that a spike on the idle line starts no frame,
// that a low stop bit gives frame_err and no byte, and the frame latency.
module tb_uart_rx;
  localparam int CPB = 32;
  logic clk = 0, rst = 1, rx = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;
  int got_n = 0, ferr_n = 0;
  byte got[$];
  longint t_valid;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && valid) begin got.push_back(data); got_n++; t_valid = $time / 10; end
    if (!rst && frame_err) ferr_n++;
  end

  // One bit: CPB clocks at level v; with noise, a spike of `glitch` clocks of
  // the opposite level at a random place inside the bit.
  task automatic send_bit(input bit v, input int glitch, input int min_at = 0);
    int at;
    at = (glitch > 0) ? min_at + $urandom_range(CPB - glitch - min_at) : CPB;
    for (int c = 0; c < CPB; c++) begin
      @(negedge clk);
      rx = (c >= at && c < at + glitch) ? !v : v;
    end
  endtask

  task automatic send_byte(input byte b, input int glitch, input bit stop = 1);
    send_bit(0, glitch, CPB / 2);   // keep the start edge itself clean
    for (int i = 0; i < 8; i++) send_bit(b[i], glitch);
    send_bit(stop, glitch);
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    byte sent[$];
    longint t0;
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (4) @(posedge clk);
    // clean frames, including latency measurement on the first
    t0 = $time / 10;
    send_byte(8'h55, 0); sent.push_back(8'h55);
    repeat (8) @(posedge clk);
    check(got_n == 1 && (t_valid - t0) >= 10 * CPB && (t_valid - t0) <= 10 * CPB + 5,
          "latency of one frame");
    send_byte(8'ha3, 0); sent.push_back(8'ha3);
    // noisy frames: spikes up to 10 clocks (under a third of a bit) in every bit
    for (int n = 0; n < 40; n++) begin
      automatic byte b = byte'($urandom);
      send_byte(b, 1 + (n % 10));
      sent.push_back(b);
    end
    repeat (2 * CPB) @(negedge clk);
    check(got.size() == sent.size(), "byte count");
    for (int i = 0; i < sent.size() && i < got.size(); i++)
      check(got[i] == sent[i], $sformatf("byte %0d", i));
    // idle spike of 10 clocks: no frame
    begin
      automatic int n_before = got_n;
      @(negedge clk); rx = 0; repeat (10) @(negedge clk); rx = 1;
      repeat (12 * CPB) @(negedge clk);
      check(got_n == n_before && ferr_n == 0, "idle spike ignored");
    end
    // stop bit low: frame error, no byte
    begin
      automatic int n_before = got_n;
      send_byte(8'h3c, 0, 0);
      rx = 1;
      repeat (3 * CPB) @(negedge clk);
      check(got_n == n_before && ferr_n == 1, "frame error");
      send_byte(8'h81, 0);
      repeat (2 * CPB) @(negedge clk);
      check(got_n == n_before + 1 && got[got.size()-1] == 8'h81, "recovery after frame error");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
