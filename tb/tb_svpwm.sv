// tb_svpwm: drives the PWM generator with a steady step enable and compares
// counter, direction, sample pulses and all three outputs cycle by cycle
// with a reference triangle model. Uses the setpoints 444/000/bbc (hex),
// checks the resulting duty cycles against (v + 2048)/4096, and checks that
// setpoints changed mid-period only take effect at the next turnaround.
module tb_svpwm;
  localparam int BITS = 12;
  localparam int TOP  = (1 << BITS) - 1;
  logic clk = 0, rst = 1, step = 0;
  logic signed [BITS-1:0] vu, vv, vw;
  logic pwm_u, pwm_v, pwm_w, upcount, sample;
  logic [BITS-1:0] counter;
  int checks = 0, failures = 0;

  svpwm #(.BITS(BITS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int m_cnt;
  bit m_up;
  int m_th[3];
  int hi[3];
  int samples, midchange_ok;

  function automatic int thr(input logic signed [BITS-1:0] v);
    return int'(v) + (1 << (BITS - 1));
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int prev_cnt, prev_th[3];
    bit turn;
    vu = 12'h444; vv = 12'h000; vw = 12'hbbc;
    repeat (3) @(posedge clk);
    #1 rst = 0; step = 1;
    m_cnt = 0; m_up = 1; m_th = '{2048, 2048, 2048};
    samples = 0;
    hi = '{0, 0, 0};
    // three full periods, compare every cycle
    for (int k = 0; k < 3 * 2 * TOP; k++) begin
      @(posedge clk); #1;
      prev_cnt = m_cnt; prev_th = m_th;
      turn = (m_up && m_cnt == TOP) || (!m_up && m_cnt == 0);
      if (turn) begin
        m_th = '{thr(vu), thr(vv), thr(vw)};
        m_up = !m_up;
      end
      m_cnt = m_up ? m_cnt + 1 : m_cnt - 1;
      if (turn) samples++;
      check(int'(counter) == m_cnt, "counter");
      check(upcount == m_up, "upcount");
      check(sample == turn, "sample");
      check(pwm_u == (prev_th[0] > prev_cnt), "pwm_u");
      check(pwm_v == (prev_th[1] > prev_cnt), "pwm_v");
      check(pwm_w == (prev_th[2] > prev_cnt), "pwm_w");
      if (k >= 4 * TOP) begin
        hi[0] += pwm_u; hi[1] += pwm_v; hi[2] += pwm_w;
      end
    end
    check(samples == 5, "one sample at every turnaround");
    // duty over the last full period: (v + 2048)/4096 within 1/2048
    check(hi[0] >= 2*TOP*3140/4096 - 2 && hi[0] <= 2*TOP*3140/4096 + 2, "duty u");
    check(hi[1] >= 2*TOP*2048/4096 - 2 && hi[1] <= 2*TOP*2048/4096 + 2, "duty v");
    check(hi[2] >= 2*TOP*956/4096 - 2  && hi[2] <= 2*TOP*956/4096 + 2,  "duty w");
    check(hi[0] > hi[1] && hi[1] > hi[2], "duty order");

    // mid-period change: outputs must not respond until the next turnaround
    wait (counter == 1000 && upcount);
    @(negedge clk);
    vu = 12'h7ff;                 // would make pwm_u high for all counter < 4095
    midchange_ok = 1;
    while (int'(counter) != TOP) begin
      @(posedge clk); #1;
      if (counter > 12'hc45 && int'(counter) < TOP && pwm_u && !sample) midchange_ok = 0;
    end
    check(midchange_ok == 1, "setpoint held until turnaround");
    repeat (3) @(posedge clk); #1;
    check(pwm_u == 1'b1, "new setpoint after turnaround");

    // slow step enable: counter only moves on step
    step = 0;
    begin
      automatic int c0 = int'(counter);
      repeat (10) @(posedge clk); #1;
      check(int'(counter) == c0, "hold without step");
    end

    // extremes: -2048 never high, +2047 high except at the very top
    vu = -12'sd2048; vv = 12'sd2047;
    step = 1;
    wait (sample); @(posedge clk); #1;
    hi = '{0, 0, 0};
    for (int k = 0; k < 2 * TOP; k++) begin
      @(posedge clk); #1;
      hi[0] += pwm_u; hi[1] += pwm_v;
    end
    check(hi[0] == 0, "min duty");
    check(hi[1] >= 2 * TOP - 2, "max duty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
