// tb_park_cordic: Park and inverse Park on random vectors and angles against
// floating-point rotation; allowed error 3 LSB. Checks the latency of
// ITER + 2 cycles and that inverse Park undoes Park.
module tb_park_cordic;
  localparam int ITER = 16;
  logic clk = 0, rst = 1, start = 0, inverse = 0, done;
  logic [15:0] theta;
  logic signed [15:0] x_in, y_in, x_out, y_out;
  int checks = 0, failures = 0, quad_fold = 0;

  park_cordic #(.W(16), .ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit inv, input int th, input int x, input int y,
                     output int xo, output int yo);
    int lat = 0;
    @(negedge clk);
    inverse = inv; theta = 16'(th); x_in = 16'(x); y_in = 16'(y); start = 1;
    @(negedge clk); start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; if (lat > 100) break; end
    checks++;
    if (lat != ITER + 2) begin failures++; $display("FAIL latency %0d", lat); end
    xo = int'(x_out); yo = int'(y_out);
  endtask

  task automatic one(input bit inv, input int th, input int x, input int y);
    real ang, c, s, wx, wy;
    int xo, yo;
    ang = 2.0 * 3.14159265358979 * real'(th) / 65536.0;
    if (!inv) ang = -ang;
    c = $cos(ang); s = $sin(ang);
    wx = real'(x) * c - real'(y) * s;
    wy = real'(x) * s + real'(y) * c;
    run(inv, th, x, y, xo, yo);
    if (th >= 16384 && th < 49152) quad_fold++;
    checks++;
    if ((real'(xo) - wx) > 3.0 || (wx - real'(xo)) > 3.0 || (real'(yo) - wy) > 3.0 || (wy - real'(yo)) > 3.0) begin
      failures++;
      if (failures < 10)
        $display("FAIL inv=%0d th=%0d (%0d,%0d) -> (%0d,%0d) want (%f,%f)", inv, th, x, y, xo, yo, wx, wy);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // quarter turns: Park of (1000, 0)
    one(0, 0, 1000, 0); one(0, 16384, 1000, 0); one(0, 32768, 1000, 0); one(0, 49152, 1000, 0);
    one(1, 8192, 2000, 0); one(1, 40000, -1500, 700);
    for (int k = 0; k < 600; k++)
      one(k[0], int'($urandom_range(65535)), int'($urandom_range(40000)) - 20000,
          int'($urandom_range(40000)) - 20000);
    // round trip
    for (int k = 0; k < 100; k++) begin
      int th, x, y, d, q, x2, y2;
      th = int'($urandom_range(65535));
      x = int'($urandom_range(8000)) - 4000; y = int'($urandom_range(8000)) - 4000;
      run(0, th, x, y, d, q);
      run(1, th, d, q, x2, y2);
      checks++;
      if (x2 - x > 4 || x - x2 > 4 || y2 - y > 4 || y - y2 > 4) begin
        failures++; $display("FAIL round trip %0d %0d -> %0d %0d", x, y, x2, y2);
      end
    end
    checks++;
    if (quad_fold == 0) begin failures++; $display("FAIL no folded angle tested"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
