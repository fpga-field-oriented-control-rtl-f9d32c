// tb_clarke: random phase currents (and the extremes) against the transform
// computed in floating point: alpha = ia, beta = (ia + 2 ib)/sqrt(3),
// saturated to 16 bits; allowed error 1 LSB.
module tb_clarke;
  logic signed [15:0] ia, ib, i_alpha, i_beta;
  int checks = 0, failures = 0;

  clarke #(.W(16)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int a, input int b);
    real beta;
    int want;
    ia = 16'(a); ib = 16'(b);
    #1;
    beta = (real'(a) + 2.0 * real'(b)) / $sqrt(3.0);
    want = int'(beta);
    if (want > 32767) want = 32767;
    if (want < -32768) want = -32768;
    checks++;
    if (int'(i_alpha) != a || int'(i_beta) - want > 1 || want - int'(i_beta) > 1) begin
      failures++;
      if (failures < 10) $display("FAIL ia=%0d ib=%0d -> %0d %0d want %0d", a, b, i_alpha, i_beta, want);
    end
  endtask

  initial begin
    one(0, 0); one(1000, 0); one(0, 1000); one(-2048, 2047);
    one(32767, 32767); one(-32768, -32768); one(1, -1);
    for (int k = 0; k < 5000; k++) one($signed(16'($urandom)), $signed(16'($urandom)));
    for (int k = 0; k < 5000; k++) one(int'($urandom_range(4095)) - 2048, int'($urandom_range(4095)) - 2048);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
