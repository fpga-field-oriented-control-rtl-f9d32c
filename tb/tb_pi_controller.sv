// tb_pi_controller: compares the regulator with a floating-point PI model
// (integrator and output clamped to the limit) over random set points and
// measurements, checks the saturation flag, integrator wind-up limiting
// (recovery right after the error changes sign) and the one-cycle latency.
module tb_pi_controller;
  localparam int KP = 64, KI = 8, SHIFT = 6, LIM = 2047;
  logic clk = 0, rst = 1, en = 0;
  logic signed [15:0] ref_in, meas, out;
  logic sat;
  int checks = 0, failures = 0, sat_seen = 0;
  real m_integ;

  pi_controller #(.W(16), .KP(KP), .KI(KI), .SHIFT(SHIFT), .OUT_LIM(LIM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real clampr(input real x, input real lim);
    return (x > lim) ? lim : (x < -lim) ? -lim : x;
  endfunction

  task automatic step_pi(input int r, input int m);
    real err, total, want;
    @(negedge clk);
    ref_in = 16'(r); meas = 16'(m); en = 1;
    @(negedge clk); en = 0;
    err = real'(r - m);
    m_integ = clampr(m_integ + real'(KI) * err / 64.0, real'(LIM));
    total = real'(KP) * err / 64.0 + m_integ;
    want = clampr(total, real'(LIM));
    checks++;
    if ((real'(out) - want) > 1.0 || (want - real'(out)) > 1.0 ||
        sat != (total > real'(LIM) + 0.99 || total < -real'(LIM) - 0.99)) begin
      failures++;
      if (failures < 10) $display("FAIL r=%0d m=%0d out=%0d sat=%b want %f", r, m, out, sat, want);
    end
    if (sat) sat_seen++;
  endtask

  initial begin
    m_integ = 0.0;
    repeat (3) @(negedge clk);
    rst = 0;
    // small errors: linear region, integrator builds up
    for (int k = 0; k < 50; k++) step_pi(100, 90);
    // large positive error: saturates, integrator limited
    for (int k = 0; k < 200; k++) step_pi(3000, 0);
    // error reverses: output must leave the limit within a few steps
    begin
      automatic int n = 0;
      step_pi(0, 500);
      while (out == 16'(LIM) && n < 20) begin step_pi(0, 500); n++; end
      checks++;
      if (n > 3) begin failures++; $display("FAIL wind-up recovery took %0d steps", n); end
    end
    for (int k = 0; k < 2000; k++)
      step_pi(int'($urandom_range(4000)) - 2000, int'($urandom_range(4000)) - 2000);
    // en low: output holds
    begin
      automatic logic signed [15:0] o = out;
      ref_in = 16'sd1000; meas = 16'sd0;
      repeat (5) @(negedge clk);
      checks++;
      if (out != o) begin failures++; $display("FAIL output changed without en"); end
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
