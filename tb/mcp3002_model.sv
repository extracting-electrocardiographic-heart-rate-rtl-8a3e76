// mcp3002_model: behavioural model of the SPI side of an MCP3002 ADC.
// Not synthesizable; for testbenches only.
//
// While cs_n is low it waits for a start bit (the first 1 sampled on a rising
// SCLK edge), then takes SGL/DIFF, ODD/SIGN and MSBF on the next three rising
// edges. The reading `value` is captured at the MSBF edge. On the following
// falling edge it drives the null bit (0), then B9..B0 on the next ten
// falling edges, then 0. (The real part would go on with LSB-first data when
// MSBF is 0 and goes high-impedance when deselected; this model drives 0.)
// `conversions` counts completed readings, `bad_cmd` counts commands that
// were not "single-ended, channel 0".
module mcp3002_model (
  input  logic       sclk,
  input  logic       cs_n,
  input  logic       din,     // from the master
  output logic       dout,    // to the master
  input  logic [9:0] value    // analog input, already quantised
);

  int   phase;          // 0 wait start, 1 SGL, 2 ODD, 3 MSBF, 4 output
  int   out_idx;
  logic sgl, odd;
  logic [9:0] held;
  int   conversions = 0;
  int   bad_cmd = 0;

  initial begin
    dout = 1'b0; phase = 0; out_idx = 0; sgl = 0; odd = 0; held = '0;
  end

  always @(negedge cs_n) begin
    phase = 0; out_idx = 0; dout = 1'b0;
  end

  always @(posedge cs_n) dout = 1'b0;

  always @(posedge sclk) if (!cs_n) begin
    case (phase)
      0: if (din) phase = 1;
      1: begin sgl = din; phase = 2; end
      2: begin odd = din; phase = 3; end
      3: begin
        held = value;
        if (!(sgl == 1'b1 && odd == 1'b0)) bad_cmd++;
        phase = 4; out_idx = -1;
      end
      default: ;
    endcase
  end

  always @(negedge sclk) if (!cs_n && phase == 4) begin
    if (out_idx < 0) dout = 1'b0;                    // null bit
    else if (out_idx < 10) dout = held[9 - out_idx];
    else dout = 1'b0;
    if (out_idx == 9) conversions++;
    out_idx++;
  end

endmodule
