// tb_adc_spi: reads random codes from the behavioural SPI ADC model and
// checks the result, the number of sclk pulses per frame, chip select
// framing and the conversion time of 2*SCLK_DIV*FRAME_BITS + SCLK_DIV + 1 cycles.
module tb_adc_spi;
  localparam int FRAME = 16, BITS = 12, DIV = 2;
  logic clk = 0, rst = 1, start = 0;
  logic cs_n, sclk, sdo, done;
  logic [BITS-1:0] data, code;
  int frames, clocks;
  int checks = 0, failures = 0;

  adc_spi #(.FRAME_BITS(FRAME), .DATA_BITS(BITS), .SCLK_DIV(DIV)) dut (.*);
  adc_model #(.FRAME_BITS(FRAME), .DATA_BITS(BITS)) adc (.cs_n, .sclk, .code, .sdo, .frames, .clocks);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    code = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(cs_n && sclk, "idle levels");
    for (int n = 0; n < 200; n++) begin
      automatic int lat = 0;
      logic [BITS-1:0] c;
      c = (n == 0) ? '0 : (n == 1) ? '1 : BITS'($urandom);
      code = c;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; lat = 1;
      check(!cs_n, "cs_n low during frame");
      while (!done && lat < 1000) begin @(negedge clk); lat++; end
      check(data == c, $sformatf("data %03h want %03h", data, c));
      check(lat == 2 * DIV * FRAME + DIV + 1, $sformatf("latency %0d", lat));
      check(clocks == FRAME, $sformatf("sclk pulses %0d", clocks));
      @(negedge clk);
      check(cs_n && sclk, "bus idle after frame");
      repeat ($urandom_range(5)) @(negedge clk);
    end
    check(frames == 200, "frame count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
