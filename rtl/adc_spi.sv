// adc_spi: reader for one current-sense SAR ADC on its own three-wire SPI bus
// (chip select, serial clock, serial data out of the ADC).
//
// Each phase current has its own ADC and bus so both can be read at full
// rate at the same time; that arrangement is the original design's. The frame
// format is this design's assumption, typical for small 12-bit SAR ADCs:
// pulling cs_n low starts a conversion and puts the first bit on sdo; the ADC
// then changes sdo after each falling edge of sclk and the reader samples it
// on the rising edge, FRAME_BITS clocks in all, MSB first, with the result in
// the last DATA_BITS bits. sclk idles high, each half period lasts SCLK_DIV
// system clocks.
//
// Timing: `start` (ignored while busy) drops cs_n in the next cycle;
// `done` pulses with `data` valid 2*SCLK_DIV*FRAME_BITS + SCLK_DIV + 1 cycles after
// `start`, and cs_n returns high at the same time.
module adc_spi #(
  parameter int unsigned FRAME_BITS = 16,
  parameter int unsigned DATA_BITS  = 12,
  parameter int unsigned SCLK_DIV   = 2
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  output logic                 cs_n,
  output logic                 sclk,
  input  logic                 sdo,
  output logic [DATA_BITS-1:0] data,
  output logic                 done
);
  localparam int unsigned DW = (SCLK_DIV > 1) ? $clog2(SCLK_DIV) : 1;
  localparam int unsigned BW = $clog2(FRAME_BITS + 1);

  logic [DW-1:0]         div_cnt;
  logic [BW-1:0]         bit_cnt;
  logic [DATA_BITS-1:0]  shreg;
  logic                  busy;
  logic                  half_end;

  assign half_end = (div_cnt == DW'(SCLK_DIV - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      cs_n    <= 1'b1;
      sclk    <= 1'b1;
      busy    <= 1'b0;
      div_cnt <= '0;
      bit_cnt <= '0;
      shreg   <= '0;
      data    <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          cs_n    <= 1'b0;
          div_cnt <= '0;
          bit_cnt <= '0;
        end
      end else begin
        div_cnt <= half_end ? '0 : div_cnt + 1'b1;
        if (half_end) begin
          if (sclk) begin
            if (bit_cnt == BW'(FRAME_BITS)) begin
              // all bits taken: end the frame
              busy <= 1'b0;
              cs_n <= 1'b1;
              data <= shreg;
              done <= 1'b1;
            end else begin
              sclk <= 1'b0;
            end
          end else begin
            sclk    <= 1'b1;                       // rising edge: sample
            shreg   <= {shreg[DATA_BITS-2:0], sdo};   // leading bits fall out
            bit_cnt <= bit_cnt + 1'b1;
          end
        end
      end
    end
  end
endmodule
