// tb_inv_clarke: random alpha/beta voltages against the inverse transform
// computed in floating point; allowed error 1 LSB. Also checks that the three
// outputs sum to zero within 2 LSB.
module tb_inv_clarke;
  logic signed [15:0] v_alpha, v_beta, va, vb, vc;
  int checks = 0, failures = 0;

  inv_clarke #(.W(16)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(input real x);
    int r = int'(x);
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  task automatic one(input int a, input int b);
    int wb, wc;
    v_alpha = 16'(a); v_beta = 16'(b);
    #1;
    wb = sat(-real'(a) / 2.0 + $sqrt(3.0) / 2.0 * real'(b));
    wc = sat(-real'(a) / 2.0 - $sqrt(3.0) / 2.0 * real'(b));
    checks++;
    if (int'(va) != a || (int'(vb) - wb) > 1 || (wb - int'(vb)) > 1 ||
        (int'(vc) - wc) > 1 || (wc - int'(vc)) > 1) begin
      failures++;
      if (failures < 10) $display("FAIL %0d %0d -> %0d %0d %0d want %0d %0d", a, b, va, vb, vc, wb, wc);
    end
    if (a > -16000 && a < 16000 && b > -16000 && b < 16000) begin
      int s = int'(va) + int'(vb) + int'(vc);
      checks++;
      if (s > 2 || s < -2) begin failures++; $display("FAIL sum %0d", s); end
    end
  endtask

  initial begin
    one(0, 0); one(1000, 0); one(0, 1000); one(2047, -2047); one(32767, 32767); one(-32768, -32768);
    for (int k = 0; k < 10000; k++) one($signed(16'($urandom)), $signed(16'($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
