// tb_foc_loop: runs single control-loop iterations from reset on random
// currents, angles and commands and compares the measured D/Q currents and
// the three phase setpoints with a floating-point model of Clarke, Park, PI
// (KP = 1, KI = 1/8 per step), inverse Park, inverse Clarke and the 12-bit
// clamp. Then runs repeated iterations with fixed inputs to check that the
// integrators keep accumulating, that the PI saturation flag is raised, and
// the loop latency.
module tb_foc_loop;
  localparam int LAT = 42;
  localparam real PI_C = 3.14159265358979;
  logic clk = 0, rst = 1, start = 0;
  logic signed [15:0] ia, ib, id_ref, iq_ref, id_meas, iq_meas;
  logic [15:0] theta;
  logic signed [11:0] vu, vv, vw;
  logic pi_sat, done;
  int checks = 0, failures = 0, sat_seen = 0;

  foc_loop #(.W(16), .PWM_BITS(12)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real clampr(input real x, input real lim);
    return (x > lim) ? lim : (x < -lim - 1.0) ? -lim - 1.0 : x;
  endfunction

  function automatic bit near(input int got, input real want, input real tol);
    return (real'(got) - want) <= tol && (want - real'(got)) <= tol;
  endfunction

  task automatic iterate(output int lat);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!done && lat < 500) begin @(negedge clk); lat++; end
  endtask

  // One iteration from reset; model integrators start at zero.
  task automatic one(input int a, input int b, input int th, input int dr, input int qr);
    real al, be, ang, c, s, d, q, vd, vq, va_, vb_, wu, wv, ww, integ_d, integ_q;
    int lat;
    rst = 1; repeat (2) @(negedge clk); rst = 0;
    ia = 16'(a); ib = 16'(b); theta = 16'(th); id_ref = 16'(dr); iq_ref = 16'(qr);
    iterate(lat);
    al = real'(a); be = (real'(a) + 2.0 * real'(b)) / $sqrt(3.0);
    ang = 2.0 * PI_C * real'(th) / 65536.0;
    c = $cos(ang); s = $sin(ang);
    d = al * c + be * s;
    q = -al * s + be * c;
    integ_d = clampr(8.0 * (real'(dr) - d) / 64.0, 2047.0);
    integ_q = clampr(8.0 * (real'(qr) - q) / 64.0, 2047.0);
    vd = clampr((real'(dr) - d) + integ_d, 2047.0);
    vq = clampr((real'(qr) - q) + integ_q, 2047.0);
    va_ = vd * c - vq * s;
    vb_ = vd * s + vq * c;
    wu = clampr(va_, 2047.0);
    wv = clampr(-va_ / 2.0 + $sqrt(3.0) / 2.0 * vb_, 2047.0);
    ww = clampr(-va_ / 2.0 - $sqrt(3.0) / 2.0 * vb_, 2047.0);
    checks++;
    if (lat != LAT) begin failures++; $display("FAIL latency %0d", lat); end
    checks++;
    if (!near(int'(id_meas), d, 3.0) || !near(int'(iq_meas), q, 3.0)) begin
      failures++;
      $display("FAIL dq: got %0d %0d want %f %f", id_meas, iq_meas, d, q);
    end
    checks++;
    if (!near(int'(vu), wu, 8.0) || !near(int'(vv), wv, 8.0) || !near(int'(vw), ww, 8.0)) begin
      failures++;
      $display("FAIL a=%0d b=%0d th=%0d dr=%0d qr=%0d: v %0d %0d %0d want %f %f %f",
               a, b, th, dr, qr, vu, vv, vw, wu, wv, ww);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    one(0, 0, 0, 0, 0);
    one(100, 0, 0, 0, 0);
    one(0, 0, 0, 0, 500);
    one(0, 0, 16384, 500, 0);
    for (int k = 0; k < 300; k++)
      one(int'($urandom_range(1200)) - 600, int'($urandom_range(1200)) - 600,
          int'($urandom_range(65535)), int'($urandom_range(1000)) - 500,
          int'($urandom_range(1000)) - 500);
    // repeated iterations: a constant Q error of 100 adds 12.5 per step
    rst = 1; repeat (2) @(negedge clk); rst = 0;
    ia = 0; ib = 0; theta = 0; id_ref = 0; iq_ref = 16'sd100;
    begin
      int lat, first_q, last_q;
      for (int n = 0; n < 200; n++) begin
        iterate(lat);
        if (n == 0) first_q = int'(dut.vq);
        if (n == 10) last_q = int'(dut.vq);
        if (pi_sat) sat_seen++;
      end
      checks++;
      if (last_q - first_q < 120 || last_q - first_q > 130) begin
        failures++; $display("FAIL integration %0d -> %0d", first_q, last_q);
      end
      checks++;
      if (sat_seen == 0) begin failures++; $display("FAIL saturation never reached"); end
      // saturated Q voltage at theta 0: vv = -vw, both near +-sqrt3/2*2047
      checks++;
      if (!near(int'(vv), 1773.0, 4.0) || !near(int'(vw), -1773.0, 4.0) || !near(int'(vu), 0.0, 2.0)) begin
        failures++; $display("FAIL saturated setpoints %0d %0d %0d", vu, vv, vw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
