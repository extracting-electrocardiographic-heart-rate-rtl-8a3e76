// pi_spi_slave: sends the heart rate to the Raspberry Pi over SPI.
//
// There is no chip select. The Pi clocks PiSCLK (about 200-250 kHz, SPI
// mode 0) and sends a 16-bit word; a 1 on mosi marks where the readout
// starts. An 8-bit shift register drives miso from its MSB. At every falling
// PiSCLK edge it either loads `hr` (if mosi was 1 at the preceding rising
// edge) or shifts left, filling with 0. So after the marker bit the eight
// heart-rate bits follow MSB first, and then only zeros. With the Pi sending
// 0x0100, the marker is the 8th bit of the word and the Pi receives the heart
// rate in the low byte of the word it reads.
//
// PiSCLK and mosi are asynchronous to `clk`; both pass through two-flop
// synchronizers, and edges of PiSCLK are found in the `clk` domain. miso
// therefore changes 3 `clk` cycles (75 ns at 40 MHz) after a falling PiSCLK
// edge, well inside the half period before the Pi samples it. PiSCLK must
// stay high and low for at least 2 `clk` cycles each.
//
// Loading on the marker bit, MSB first, zeros afterwards, follows the
// original design. Synchronizing to `clk`, sampling mosi at the rising edge
// (it is changed by the Pi at the falling edge) and the synchronous reset to
// zero are this design's choices.
module pi_spi_slave
  import ecg_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic PiSCLK,
  input  logic mosi,
  input  hr_t  hr,       // heart rate to send
  output logic miso
);

  logic sclk_s, sclk_d, mosi_s;
  logic marker;          // mosi value at the last rising PiSCLK edge
  hr_t  hr_send;

  sync_2ff u_sync_sclk (.clk, .rst, .d(PiSCLK), .q(sclk_s));
  sync_2ff u_sync_mosi (.clk, .rst, .d(mosi),   .q(mosi_s));

  always_ff @(posedge clk) begin
    if (rst) begin
      sclk_d  <= 1'b0;
      marker  <= 1'b0;
      hr_send <= '0;
    end else begin
      sclk_d <= sclk_s;
      if (sclk_s && !sclk_d)            // rising edge: sample mosi
        marker <= mosi_s;
      if (!sclk_s && sclk_d) begin      // falling edge: load or shift
        if (marker) hr_send <= hr;
        else        hr_send <= {hr_send[HR_W-2:0], 1'b0};
      end
    end
  end

  assign miso = hr_send[HR_W-1];

endmodule
