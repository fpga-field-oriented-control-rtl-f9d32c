// tb_frac_clk_div: checks that the divider emits exactly floor(k*num/den)
// pulses in the first k cycles after reset, cycle by cycle, for several
// ratios including the 2/3 setting; also the long-run pulse count.
module tb_frac_clk_div;
  logic clk = 0, rst = 1;
  logic [15:0] num, den;
  logic tick;
  int checks = 0, failures = 0;

  frac_clk_div #(.W(16)) dut (.clk, .rst, .num, .den, .tick);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_ratio(input int n, input int d, input int cycles);
    longint pulses = 0;
    longint prev_expect = 0;
    num = 16'(n); den = 16'(d);
    rst = 1;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    for (int k = 1; k <= cycles; k++) begin
      longint e;
      @(posedge clk); #1;
      e = (longint'(k) * n) / d;
      checks++;
      if (tick !== (e != prev_expect)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d/%0d cycle %0d tick=%b", n, d, k, tick);
      end
      prev_expect = e;
      pulses += tick;
    end
    checks++;
    if (pulses != (longint'(cycles) * n) / d) begin
      failures++;
      $display("FAIL %0d/%0d pulses %0d", n, d, pulses);
    end
  endtask

  initial begin
    num = 2; den = 3;
    run_ratio(2, 3, 300);
    run_ratio(5, 6, 600);
    run_ratio(1, 1, 50);
    run_ratio(3, 7, 700);
    run_ratio(1000, 1023, 5000);
    run_ratio(0, 5, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
