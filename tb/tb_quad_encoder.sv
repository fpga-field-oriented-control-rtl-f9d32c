// tb_quad_encoder: drives A/B quadrature forward and backward over more than
// a turn, with index pulses, and checks the count (modulo CPR), direction,
// index reset and the electrical angle count * POLE_PAIRS * 65536 / CPR.
module tb_quad_encoder;
  localparam int CPR = 4096, PP = 4;
  logic clk = 0, rst = 1;
  logic a = 0, b = 0, i = 0;
  logic [11:0] count;
  logic [15:0] theta_e;
  logic dir, index_seen;
  int checks = 0, failures = 0;
  int m_count = 0, phase = 0;

  quad_encoder #(.CPR(CPR), .POLE_PAIRS(PP), .OFFSET(0)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // one quadrature step; forward sequence of (A,B): 00 10 11 01
  task automatic move(input bit fwd);
    phase = fwd ? (phase + 1) % 4 : (phase + 3) % 4;
    @(negedge clk);
    a = (phase == 1 || phase == 2);
    b = (phase == 2 || phase == 3);
    m_count = fwd ? (m_count + 1) % CPR : (m_count + CPR - 1) % CPR;
    repeat (4) @(negedge clk);
    check(int'(count) == m_count, $sformatf("count %0d want %0d", count, m_count));
    check(dir == fwd, "direction");
    check(int'(theta_e) == (m_count * PP * 65536 / CPR) % 65536, "electrical angle");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);
    check(count == 0 && !index_seen, "reset state");
    for (int k = 0; k < 5000; k++) move(1);      // past one full turn (wrap)
    for (int k = 0; k < 6000; k++) move(0);      // back through zero
    // index: count returns to zero on the rising edge of I
    for (int k = 0; k < 37; k++) move(1);
    @(negedge clk); i = 1;
    repeat (4) @(negedge clk);
    m_count = 0;
    check(count == 0 && index_seen, "index reset");
    i = 0;
    for (int k = 0; k < 10; k++) move(0);
    // both lines changing at once is ignored
    @(negedge clk); a = !a; b = !b;
    repeat (4) @(negedge clk);
    check(int'(count) == m_count, "double change ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
