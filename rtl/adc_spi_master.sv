// adc_spi_master: SPI master that reads channel 0 of an MCP3002 ADC.
//
// SCLK is the top bit of an ACC_W-bit phase accumulator that gains SCLK_INC
// every `clk`: 40 MHz * 410 / 65536 = 250.2 kHz with the defaults, the
// original design's divider. A 5-bit count of SCLK periods frames the
// transfers: CSBar is low for 16 SCLK periods and high for the next 16, so a
// new reading arrives every 32 SCLK periods (about 7.8 kHz).
//
// Bus timing (SPI mode 0, as the MCP3002 expects): CSBar and Dout change
// together with a falling edge of SCLK; Din is sampled in the `clk` cycle
// where SCLK rises. While CSBar is low the 16-bit command CMD is sent MSB
// first (leading 0, start, single-ended, channel 0, then zeros) and 16 bits
// are received; the ADC sends its null bit and then B9..B0 on the last 11
// clocks, so the last 10 received bits are the reading. At the falling edge
// that raises CSBar, `data` takes the reading and `done` pulses for one
// `clk` cycle.
//
// From the original: the divider constants, the 16-on/16-off chip select,
// the 0x6000 command and taking the low 10 received bits. This design's own
// choices: everything runs on `clk` with edge strobes instead of clocking
// flops on SCLK and CSBar, Din is sampled at the rising SCLK edge, `done` is a
// one-cycle strobe rather than the chip-select level, and a synchronous
// active-high reset starts a frame at the first falling edge.
module adc_spi_master
  import ecg_pkg::*;
#(
  parameter int unsigned ACC_W    = 16,
  parameter int unsigned SCLK_INC = 410,
  parameter logic [15:0] CMD      = MCP3002_CMD
) (
  input  logic clk,
  input  logic rst,
  input  logic Din,     // serial data from the ADC (its Dout pin)
  output logic SCLK,
  output logic CSBar,
  output logic Dout,    // serial command to the ADC (its Din pin)
  output adc_t data,    // last complete reading
  output logic done     // one-cycle strobe: `data` has a new reading
);

  logic [ACC_W-1:0] acc, acc_next;
  logic             sclk_rise, sclk_fall;
  logic [4:0]       cyc, cyc_next;   // SCLK periods within the 32-period frame
  logic [15:0]      tx;
  adc_t             rx;              // the last ADC_W received bits

  always_comb begin
    acc_next  = acc + ACC_W'(SCLK_INC);
    sclk_rise = !acc[ACC_W-1] &&  acc_next[ACC_W-1];
    sclk_fall =  acc[ACC_W-1] && !acc_next[ACC_W-1];
    cyc_next  = cyc + 5'd1;
  end

  assign SCLK = acc[ACC_W-1];

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      acc   <= '0;
      cyc   <= '1;           // first falling edge opens a frame
      CSBar <= 1'b1;
      Dout  <= 1'b0;
      tx    <= '0;
      rx    <= '0;
      data  <= '0;
    end else begin
      acc <= acc_next;
      if (sclk_rise && !CSBar)
        rx <= {rx[ADC_W-2:0], Din};
      if (sclk_fall) begin
        cyc <= cyc_next;
        if (cyc_next == 5'd0) begin
          CSBar <= 1'b0;
          Dout  <= CMD[15];
          tx    <= {CMD[14:0], 1'b0};
        end else if (cyc_next < 5'd16) begin
          Dout  <= tx[15];
          tx    <= {tx[14:0], 1'b0};
        end else if (cyc_next == 5'd16) begin
          CSBar <= 1'b1;
          Dout  <= 1'b0;
          data  <= rx;
          done  <= 1'b1;
        end
      end
    end
  end

endmodule
