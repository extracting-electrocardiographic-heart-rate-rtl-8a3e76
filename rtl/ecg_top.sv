// ecg_top: FPGA part of an electrocardiographic heart-rate monitor.
//
// An MCP3002 ADC digitises the amplified and filtered ECG. The FPGA
//   * reads the ADC over SPI (adc_spi_master, ~250 kHz SCLK, ~7.8 kHz
//     conversions),
//   * thins the conversions to ~400 Hz processing samples
//     (sample_rate_divider),
//   * finds the spacing of heartbeats against a 200-sample moving average
//     and converts it to beats per minute (hr_find),
//   * and returns that byte to a Raspberry Pi acting as SPI master
//     (pi_spi_slave).
// All logic runs on the 40 MHz board clock `clk`. `reset` is an
// asynchronous switch; it is synchronised and then resets every block
// synchronously. The block split and port names follow the original design;
// the single clock domain is this design's choice.
module ecg_top
  import ecg_pkg::*;
#(
  parameter int unsigned SCLK_INC = 410,   // ADC SCLK = clk * SCLK_INC / 2^16
  parameter int unsigned RATE_INC = 52     // processing rate = conversions * RATE_INC / 1024
) (
  input  logic clk,     // 40 MHz
  input  logic reset,   // active high, from a switch
  input  logic PiSCLK,  // serial clock from the Pi
  input  logic mosi,    // serial data from the Pi
  input  logic Din,     // serial data from the ADC (its Dout pin)
  output logic SCLK,    // serial clock to the ADC
  output logic CSBar,   // chip select to the ADC
  output logic Dout,    // serial data to the ADC (its Din pin)
  output logic miso     // serial data to the Pi
);

  logic rst;
  adc_t adc;
  logic done, new_data;
  hr_t  hr;

  sync_2ff #(.RESET_VAL(1'b1)) u_sync_reset (
    .clk, .rst(1'b0), .d(reset), .q(rst)
  );

  adc_spi_master #(.SCLK_INC(SCLK_INC)) u_spi_master (
    .clk, .rst, .Din, .SCLK, .CSBar, .Dout, .data(adc), .done
  );

  sample_rate_divider #(.RATE_INC(RATE_INC)) u_rate_div (
    .clk, .rst, .done, .new_data
  );

  hr_find u_hr_find (
    .clk, .rst, .adc, .new_data, .hr, .hr_valid(), .busy(), .peak_sep()
  );

  pi_spi_slave u_spi_slave (
    .clk, .rst, .PiSCLK, .mosi, .hr, .miso
  );

endmodule
