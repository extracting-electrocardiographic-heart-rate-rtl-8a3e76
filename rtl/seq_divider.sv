// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// Pulse `start` with `dividend` and `divisor` valid; the unit copies both,
// then runs W iterations of shift-compare-subtract. `done` pulses for one
// clock when `quotient` and `remainder` are valid, W+1 clocks after `start`.
// They hold their value until the next `start`. A zero divisor gives an
// all-ones quotient and the dividend as remainder, as a restoring divider
// naturally does. `start` while busy is ignored.
//
// The heart-rate finder uses two of these: one for the moving average
// (sum / number of samples) and one for beats per minute
// (one minute in microseconds / time between peaks). The original design
// writes both divisions as single-cycle operators; this sequential form is
// this design's choice, since a new sample arrives only every 2.5 ms.
module seq_divider #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  dvsr;
  logic [W-1:0]  quo;     // dividend bits shift out, quotient bits shift in
  logic [W-1:0]  rem;     // partial remainder, always below the divisor
  logic [CW-1:0] steps;

  logic [W:0] rem_shift;
  logic [W:0] rem_trial;

  always_comb begin
    rem_shift = {rem, quo[W-1]};   // one extra bit for the trial subtraction
    rem_trial = rem_shift - {1'b0, dvsr};
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy      <= 1'b0;
      steps     <= '0;
      dvsr      <= '0;
      quo       <= '0;
      rem       <= '0;
      quotient  <= '0;
      remainder <= '0;
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        steps <= CW'(W);
        dvsr  <= divisor;
        quo   <= dividend;
        rem   <= '0;
      end
    end else begin
      if (rem_trial[W]) begin       // negative: restore
        rem <= rem_shift[W-1:0];
        quo <= {quo[W-2:0], 1'b0};
      end else begin
        rem <= rem_trial[W-1:0];
        quo <= {quo[W-2:0], 1'b1};
      end
      steps <= steps - 1'b1;
      if (steps == CW'(1)) begin
        busy      <= 1'b0;
        done      <= 1'b1;
        quotient  <= rem_trial[W] ? {quo[W-2:0], 1'b0} : {quo[W-2:0], 1'b1};
        remainder <= rem_trial[W] ? rem_shift[W-1:0] : rem_trial[W-1:0];
      end
    end
  end

endmodule
