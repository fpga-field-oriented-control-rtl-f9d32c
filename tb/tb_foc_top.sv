// tb_foc_top: end-to-end test of the whole controller at its default
// parameters (12-bit PWM, 2/3 divider, 4096-count encoder, 104 clocks per
// UART bit). Around the design the testbench has two SPI ADC models fed
// with chosen phase-current codes, a quadrature encoder driver, a serial
// command sender that adds noise spikes and a serial receiver that decodes
// the telemetry lines.
//
// Scenario:
//   1. encoder moves forward, backward, then an index pulse zeroes it;
//   2. with zero currents, "q07ff" (sent with spikes on the line) drives the
//      Q regulator into saturation; the measured PWM duty cycles must match
//      the saturated Q voltage at angle 0 (0, +1773, -1773 counts);
//   3. with non-zero ADC currents, the telemetry lines must report the D/Q
//      currents given by the Clarke and Park transforms of those currents.
// It counts every mechanism (commands, noisy bytes, divider skips, setpoint
// sampling, loop iterations, ADC frames, PI saturation, encoder directions
// and index, telemetry lines) and fails on any that never happened.
module tb_foc_top;
  localparam int CPB = 104;
  localparam real PI_C = 3.14159265358979;
  logic clk = 0, rst = 1;
  logic uart_rx = 1, uart_tx;
  logic [1:0] adc_cs_n, adc_sclk, adc_sdo;
  logic enc_a = 0, enc_b = 0, enc_i = 0;
  logic pwm_u, pwm_v, pwm_w;
  logic [11:0] code_a = 12'd2048, code_b = 12'd2048;
  int frames_a, frames_b, clocks_a, clocks_b;
  int checks = 0, failures = 0;

  foc_top dut (.*);
  adc_model #(.FRAME_BITS(16), .DATA_BITS(12)) adc_a (
    .cs_n(adc_cs_n[0]), .sclk(adc_sclk[0]), .code(code_a), .sdo(adc_sdo[0]),
    .frames(frames_a), .clocks(clocks_a));
  adc_model #(.FRAME_BITS(16), .DATA_BITS(12)) adc_b (
    .cs_n(adc_cs_n[1]), .sclk(adc_sclk[1]), .code(code_b), .sdo(adc_sdo[1]),
    .frames(frames_b), .clocks(clocks_b));

  always #5 clk = ~clk;

  // ---------------- watchdog ----------------
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_cmd = 0, n_skip = 0, n_step = 0, n_sample = 0, n_loop = 0, n_sat = 0;
  int n_fwd = 0, n_bwd = 0, n_index = 0, n_spikes = 0, n_lines = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.cmd_strobe) n_cmd++;
    if (dut.step) n_step++; else n_skip++;
    if (dut.pwm_sample) n_sample++;
    if (dut.loop_done) n_loop++;
    if (dut.loop_done && dut.pi_sat) n_sat++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- serial command sender with spikes ----------------
  task automatic send_byte(input byte b, input bit noisy);
    bit [9:0] fr = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      int at = (i == 0) ? CPB / 2 + int'($urandom_range(CPB / 2 - 30)) : int'($urandom_range(CPB - 30));
      for (int c = 0; c < CPB; c++) begin
        @(negedge clk);
        uart_rx = (noisy && c >= at && c < at + 25) ? !fr[i] : fr[i];
      end
      if (noisy) n_spikes++;
    end
  endtask

  task automatic send_str(input string s, input bit noisy);
    for (int i = 0; i < s.len(); i++) send_byte(s[i], noisy);
  endtask

  // ---------------- telemetry receiver ----------------
  string rx_line = "";
  int tel_d = 0, tel_q = 0;
  initial begin
    forever begin
      byte ch;
      @(negedge uart_tx);
      if (rst) continue;
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        ch[i] = uart_tx;
      end
      repeat (CPB) @(posedge clk);      // middle of the stop bit
      if (ch == 8'h0a) begin
        int d, q;
        if ($sscanf(rx_line, "%h %h", d, q) == 2) begin
          tel_d = int'($signed(16'(d)));
          tel_q = int'($signed(16'(q)));
          n_lines++;
        end
        rx_line = "";
      end else begin
        rx_line = {rx_line, string'(ch)};
      end
    end
  end

  // ---------------- encoder driver ----------------
  int enc_phase = 0;
  task automatic enc_move(input bit fwd, input int n);
    for (int k = 0; k < n; k++) begin
      enc_phase = fwd ? (enc_phase + 1) % 4 : (enc_phase + 3) % 4;
      @(negedge clk);
      enc_a = (enc_phase == 1 || enc_phase == 2);
      enc_b = (enc_phase == 2 || enc_phase == 3);
      repeat (20) @(negedge clk);
      if (fwd) n_fwd++; else n_bwd++;
    end
  endtask

  // ---------------- PWM duty measurement over one period ----------------
  task automatic measure_duty(output real du, output real dv, output real dw);
    int hu = 0, hv = 0, hw = 0, n = 0;
    @(posedge clk iff dut.pwm_sample);
    @(posedge clk);
    do begin
      @(posedge clk);
      hu += pwm_u; hv += pwm_v; hw += pwm_w; n++;
    end while (!dut.pwm_sample || n < 100);
    @(posedge clk iff dut.pwm_sample);
    begin
      int m = 0;
      do begin
        @(posedge clk);
        hu += pwm_u; hv += pwm_v; hw += pwm_w; n++; m++;
      end while (!dut.pwm_sample || m < 100);
    end
    du = real'(hu) / real'(n); dv = real'(hv) / real'(n); dw = real'(hw) / real'(n);
  endtask

  initial begin
    real du, dv, dw;
    int loops0, cycles0;
    repeat (5) @(negedge clk);
    rst = 0;

    // 1. encoder: forward, backward, index
    enc_move(1, 120);
    check(int'(dut.enc_count) == 120 && dut.enc_dir, "encoder forward count");
    enc_move(0, 45);
    check(int'(dut.enc_count) == 75 && !dut.enc_dir, "encoder backward count");
    check(dut.theta == 16'(75 * 64), "electrical angle from count");
    @(negedge clk); enc_i = 1; repeat (10) @(negedge clk); enc_i = 0;
    if (dut.enc_index_seen && dut.enc_count == 0) n_index++;
    check(dut.enc_count == 0 && dut.theta == 0, "index zeroes the angle");

    // 2. Q command over a noisy line; regulator saturates
    send_str("zz", 1);
    send_str("q07ff\n", 1);
    repeat (10) @(negedge clk);
    check(int'(dut.iq_ref) == 2047 && int'(dut.id_ref) == 0, "Q command received through noise");
    send_str("d0000\r", 1);
    repeat (10) @(negedge clk);
    check(n_cmd == 2, "two commands applied");
    // loop rate: 2 iterations per PWM period of 2*4095*3/2 cycles
    loops0 = n_loop; cycles0 = n_step + n_skip;
    repeat (4) @(posedge clk iff dut.pwm_sample);
    measure_duty(du, dv, dw);
    begin
      automatic real rate = real'(n_loop - loops0) / real'(n_step + n_skip - cycles0) * 12285.0;
      check(rate > 1.8 && rate < 2.2, $sformatf("loop iterations per PWM period %f", rate));
    end
    check(n_sat > 0, "Q regulator saturated");
    check(du > 0.49 && du < 0.51, $sformatf("duty U %f want 0.500", du));
    check(dv > 0.925 && dv < 0.941, $sformatf("duty V %f want 0.933", dv));
    check(dw > 0.059 && dw < 0.075, $sformatf("duty W %f want 0.067", dw));

    // 3. non-zero phase currents at a fixed angle: telemetry reports D/Q
    enc_move(1, 200);                   // theta = 200*64 binary degrees
    code_a = 12'd2048 + 12'd300;        // ia = +300
    code_b = 12'd2048 - 12'd100;        // ib = -100
    repeat (3) @(posedge clk iff dut.loop_done);
    begin
      automatic int lines0 = n_lines;
      real al, be, ang, d, q;
      wait (n_lines >= lines0 + 2);
      al = 300.0; be = (300.0 - 200.0) / $sqrt(3.0);
      ang = 2.0 * PI_C * real'(200 * 64) / 65536.0;
      d = al * $cos(ang) + be * $sin(ang);
      q = -al * $sin(ang) + be * $cos(ang);
      check((real'(tel_d) - d) < 3.0 && (d - real'(tel_d)) < 3.0 &&
            (real'(tel_q) - q) < 3.0 && (q - real'(tel_q)) < 3.0,
            $sformatf("telemetry d=%0d q=%0d want %f %f", tel_d, tel_q, d, q));
    end

    // every mechanism happened
    check(n_cmd >= 2, "commands");
    check(n_spikes > 0, "noise spikes injected");
    check(n_skip > 0 && n_step > 0, "fractional divider skipped pulses");
    check(n_step * 3 >= (n_step + n_skip) * 2 - 6 && n_step * 3 <= (n_step + n_skip) * 2 + 6,
          "divider ratio 2/3");
    check(n_sample > 0, "setpoints sampled at turnaround");
    check(n_loop > 0 && frames_a >= n_loop && frames_b >= n_loop, "loop iterations and ADC frames");
    check(n_sat > 0, "PI saturation");
    check(n_fwd > 0 && n_bwd > 0 && n_index > 0, "encoder forward, backward, index");
    check(n_lines > 0, "telemetry lines");
    $display("mechanisms: cmd=%0d spikes=%0d step=%0d skip=%0d sample=%0d loop=%0d sat=%0d fwd=%0d bwd=%0d index=%0d lines=%0d",
             n_cmd, n_spikes, n_step, n_skip, n_sample, n_loop, n_sat, n_fwd, n_bwd, n_index, n_lines);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
