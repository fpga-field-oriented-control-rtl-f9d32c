// tb_uart_tx: sends bytes and decodes the line in the testbench by sampling
// the middle of each bit; checks start, data, stop bits, the bit time, busy,
// and that a start request while busy is ignored.
module tb_uart_tx;
  localparam int CPB = 12;
  logic clk = 0, rst = 1;
  logic [7:0] data;
  logic start = 0, busy, tx;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    byte vals[8] = '{8'h00, 8'hff, 8'h01, 8'h12, 8'ha0, 8'h5a, 8'h3c, 8'he6};
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk); #1;
    check(tx == 1'b1 && !busy, "idle after reset");
    foreach (vals[k]) begin
      byte r;
      longint t_edge;
      fork
        begin
          @(negedge clk); data = vals[k]; start = 1;
          @(negedge clk); start = 0;
          // a second request while busy must be ignored
          repeat (5) @(negedge clk);
          data = 8'h00; start = 1; @(negedge clk); start = 0;
        end
        begin
          @(negedge tx); t_edge = $time;
          // sample each bit at its middle
          #(CPB * 10 / 2);
          check(tx == 1'b0, "start bit");
          for (int i = 0; i < 8; i++) begin
            #(CPB * 10);
            r[i] = tx;
          end
          #(CPB * 10);
          check(tx == 1'b1, "stop bit");
          check(r == vals[k], $sformatf("data %02h got %02h", vals[k], r));
        end
      join
      wait (!busy);
      @(posedge clk); #1;
      check(tx == 1'b1, "line idle after frame");
      repeat (2 * CPB) @(posedge clk); #1;
      check(tx == 1'b1 && !busy, "request during busy ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
