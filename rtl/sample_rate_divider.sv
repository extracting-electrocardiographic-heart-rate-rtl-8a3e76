// sample_rate_divider: slows the ADC conversion rate to the processing rate.
//
// A RATE_W-bit phase accumulator gains RATE_INC on every `done` strobe from
// the ADC master. Its top bit is a divided clock; each rising transition of
// that bit produces a one-cycle `new_data` strobe. With the defaults
// (52/1024) a 7812.5 Hz conversion rate becomes 396.7 Hz, the "400 Hz" at
// which the heart-rate finder works. `new_data` comes one `clk` after the
// `done` that causes it, so the reading that goes with it is already stable.
//
// The increment, the accumulator width and taking its top bit follow the
// original design; producing a strobe in the `clk` domain instead of using
// the top bit as a clock is this design's choice. Reset is synchronous.
module sample_rate_divider #(
  parameter int unsigned RATE_W   = 10,
  parameter int unsigned RATE_INC = 52
) (
  input  logic clk,
  input  logic rst,
  input  logic done,      // one strobe per ADC conversion
  output logic new_data   // one strobe per processing sample
);

  logic [RATE_W-1:0] acc, acc_next;

  assign acc_next = acc + RATE_W'(RATE_INC);

  always_ff @(posedge clk) begin
    new_data <= 1'b0;
    if (rst) begin
      acc <= '0;
    end else if (done) begin
      acc      <= acc_next;
      new_data <= !acc[RATE_W-1] && acc_next[RATE_W-1];
    end
  end

endmodule
