// tb_foc_closed_loop: closes the current loop around the whole controller.
// The testbench measures the duty cycle of each gate output over every half
// PWM period, turns it into a phase voltage in PWM counts, removes the
// common-mode part (a star-connected load does not see it) and feeds it to
// a first-order resistive-inductive load model per phase:
//   i[k+1] = 0.85 i[k] + 0.15 * 0.5 * v[k]      (currents in ADC counts)
// The model currents go back through the SPI ADC models. With the rotor held
// at two angles, D and Q commands are sent over the serial line, including a
// negative D command as used for field weakening, and the D/Q currents
// reported by telemetry must settle within 6 counts of the command.
module tb_foc_closed_loop;
  localparam int CPB = 104;
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

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- load model ----------------
  real i_a = 0.0, i_b = 0.0, i_c = 0.0;
  int hu = 0, hv = 0, hw = 0, n = 0;
  always @(posedge clk) begin
    if (rst) begin
      hu = 0; hv = 0; hw = 0; n = 0;
    end else if (dut.pwm_sample && n > 0) begin
      real vu, vv, vw, cm;
      vu = 4096.0 * real'(hu) / real'(n) - 2048.0;
      vv = 4096.0 * real'(hv) / real'(n) - 2048.0;
      vw = 4096.0 * real'(hw) / real'(n) - 2048.0;
      cm = (vu + vv + vw) / 3.0;
      i_a = 0.85 * i_a + 0.15 * 0.5 * (vu - cm);
      i_b = 0.85 * i_b + 0.15 * 0.5 * (vv - cm);
      i_c = 0.85 * i_c + 0.15 * 0.5 * (vw - cm);
      code_a <= 12'(2048 + $rtoi(i_a + (i_a >= 0.0 ? 0.5 : -0.5)));
      code_b <= 12'(2048 + $rtoi(i_b + (i_b >= 0.0 ? 0.5 : -0.5)));
      hu = 0; hv = 0; hw = 0; n = 0;
    end else begin
      hu += pwm_u; hv += pwm_v; hw += pwm_w; n++;
    end
  end

  // ---------------- serial ----------------
  task automatic send_str(input string s);
    for (int k = 0; k < s.len(); k++) begin
      bit [9:0] fr;
      fr = {1'b1, s[k], 1'b0};
      for (int i = 0; i < 10; i++)
        repeat (CPB) begin @(negedge clk); uart_rx = fr[i]; end
    end
  endtask

  string rx_line = "";
  int tel_d = 0, tel_q = 0, n_lines = 0;
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
      repeat (CPB) @(posedge clk);
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

  task automatic enc_forward(input int steps);
    for (int k = 0; k < steps; k++) begin
      @(negedge clk);
      case (k % 4)
        0: enc_a = 1;
        1: enc_b = 1;
        2: enc_a = 0;
        default: enc_b = 0;
      endcase
      repeat (10) @(negedge clk);
    end
  endtask

  task automatic settle_and_check(input int d_cmd, input int q_cmd, input string what);
    int l0;
    logic [15:0] d16, q16;
    d16 = 16'(d_cmd);
    q16 = 16'(q_cmd);
    send_str($sformatf("d%04h\n", d16));
    send_str($sformatf("q%04h\n", q16));
    repeat (120) @(posedge clk iff dut.loop_done);     // about 60 PWM periods
    l0 = n_lines;
    wait (n_lines >= l0 + 2);
    checks++;
    if (tel_d - d_cmd > 6 || d_cmd - tel_d > 6 || tel_q - q_cmd > 6 || q_cmd - tel_q > 6) begin
      failures++;
      $display("FAIL %s: d=%0d q=%0d, commanded %0d %0d", what, tel_d, tel_q, d_cmd, q_cmd);
    end else begin
      $display("%s: d=%0d q=%0d, commanded %0d %0d", what, tel_d, tel_q, d_cmd, q_cmd);
    end
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst = 0;
    settle_and_check(0, 300, "Q current, angle 0");
    settle_and_check(-250, 300, "field weakening D current, angle 0");
    enc_forward(300);                        // electrical angle 300*64
    settle_and_check(150, -200, "D and Q, angle 19200");
    settle_and_check(0, 0, "zero current");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
