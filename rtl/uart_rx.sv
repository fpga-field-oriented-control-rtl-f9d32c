// uart_rx: noise-resistant UART receiver, 8 data bits, no parity, 1 stop bit,
// LSB first.
//
// The inverter next to the link induces short spikes on the serial line. So
// instead of taking one sample in the middle of a bit, the receiver counts
// how many clock cycles of the whole bit interval the line was high and
// decides the bit by majority: a spike shorter than half a bit cannot flip
// it. The bit intervals are timed from the first low sample of the start
// bit. The start bit itself is judged the same way, so a lone glitch on an
// idle line is dropped instead of starting a frame. The averaging over one
// bit time is the original design's idea; majority counting is how it is
// done here.
//
// Interface: `data` and a one-cycle `valid` at the end of the stop bit when
// the stop bit reads high; `frame_err` pulses instead when it reads low.
// Latency from the start edge: 10 bit times plus the 2-cycle synchroniser.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 104
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;
  state_t          state;
  logic [1:0]      sync;
  logic [CW-1:0]   tick_cnt;
  logic [CW-1:0]   ones;
  logic [2:0]      bit_idx;
  logic [7:0]      shreg;
  logic            rx_s;
  logic            bit_end;
  logic            bit_val;
  logic [CW-1:0]   ones_next;

  assign rx_s      = sync[1];
  assign bit_end   = (tick_cnt == CW'(CLKS_PER_BIT - 1));
  assign ones_next = ones + CW'(rx_s);
  // Majority over the bit interval, including the current sample.
  assign bit_val   = (32'(ones_next) * 2) > CLKS_PER_BIT;

  always_ff @(posedge clk) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], rx};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      tick_cnt  <= '0;
      ones      <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      if (state == IDLE) begin
        tick_cnt <= '0;
        ones     <= '0;
        if (!rx_s) begin
          state    <= START;
          tick_cnt <= CW'(1);
        end
      end else begin
        tick_cnt <= bit_end ? '0 : tick_cnt + 1'b1;
        ones     <= bit_end ? '0 : ones_next;
        if (bit_end) begin
          unique case (state)
            START: begin
              bit_idx <= '0;
              state   <= bit_val ? IDLE : DATA;
            end
            DATA: begin
              shreg   <= {bit_val, shreg[7:1]};
              bit_idx <= bit_idx + 1'b1;
              if (bit_idx == 3'd7) state <= STOP;
            end
            STOP: begin
              state <= IDLE;
              if (bit_val) begin
                data  <= shreg;
                valid <= 1'b1;
              end else begin
                frame_err <= 1'b1;
              end
            end
            default: state <= IDLE;
          endcase
        end
      end
    end
  end
endmodule
