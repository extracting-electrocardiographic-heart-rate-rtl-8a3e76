// ecg_pkg: widths and constants shared by the heart-rate monitor.
//
// The ADC is a 10-bit MCP3002, the heart rate is sent to the host as one
// unsigned byte, and data processing runs at a nominal 400 samples per second,
// i.e. 2500 microseconds per processed sample. All of these are the numbers
// of the original design. The MCP3002 command word is the 16-bit value sent
// MSB first while chip select is low: a leading zero, the start bit, the
// single-ended bit (1) and the channel bit (0 = CH0), then zeros.
package ecg_pkg;

  localparam int unsigned ADC_W = 10;  // MCP3002 resolution
  localparam int unsigned HR_W  = 8;   // heart rate byte sent to the host

  typedef logic [ADC_W-1:0] adc_t;
  typedef logic [HR_W-1:0]  hr_t;

  // 16-bit frame sent to the MCP3002: 0, start=1, SGL/DIFF=1, ODD/SIGN=0 (CH0), MSBF=0
  localparam logic [15:0] MCP3002_CMD = 16'h6000;

  // One minute in microseconds, and the nominal processing sample period
  localparam int unsigned MINUTE_US         = 60_000_000;
  localparam int unsigned US_PER_SAMPLE     = 2500;

endpackage
