// adc_model: behavioural model of a three-wire SPI SAR ADC, for testbenches.
// On the falling edge of cs_n it captures `code` and drives the first bit of
// a FRAME_BITS frame (leading zeros, then the DATA_BITS code, MSB first) on
// sdo; after every rising sclk edge it moves to the next bit on the
// following falling edge. sdo is 0 while cs_n is high. `frames` counts
// chip-select pulses and `clocks` the rising sclk edges of the last frame.
module adc_model #(
  parameter int unsigned FRAME_BITS = 16,
  parameter int unsigned DATA_BITS  = 12
) (
  input  logic                 cs_n,
  input  logic                 sclk,
  input  logic [DATA_BITS-1:0] code,
  output logic                 sdo,
  output int                   frames,
  output int                   clocks
);
  logic [FRAME_BITS-1:0] frame;
  int rises;

  initial begin
    sdo    = 1'b0;
    frames = 0;
    clocks = 0;
    rises  = 0;
    frame  = '0;
  end

  always @(negedge cs_n) begin
    frame  = FRAME_BITS'(code);
    rises  = 0;
    sdo    = frame[FRAME_BITS-1];
    frames = frames + 1;
  end
  always @(posedge cs_n) sdo = 1'b0;
  always @(posedge sclk) if (!cs_n) begin
    rises  = rises + 1;
    clocks = rises;
  end
  always @(negedge sclk) if (!cs_n && rises > 0 && rises < FRAME_BITS)
    sdo = frame[FRAME_BITS-1-rises];
endmodule
