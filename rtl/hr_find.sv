// hr_find: time-domain peak finder that turns ADC samples into beats/minute.
//
// Every `new_data` strobe (nominally 400 Hz) processes the ADC reading
// present at that clock:
//   1. Moving envelope. The last WINDOW readings are kept in ADC_W shift
//      registers of WINDOW bits each, one per ADC bit, as in the original
//      design. Their running sum `baseline_sum` gains the new reading and
//      loses the reading shifted out of the far end. `baseline_n` counts the
//      readings taken since reset and stops at WINDOW. The moving average is
//      baseline_sum / baseline_n, taken before the new reading is added.
//      After reset the sum is seeded with BASELINE_SEED and baseline_n with
//      1, so the seed acts as one guessed reading until the window fills
//      (it stays in the sum afterwards, as in the original).
//   2. Peak separation. A reading above average + DELTA starts a count of
//      samples when no count is running. While counting, a reading above the
//      threshold after more than MIN_SEP samples ends the count: the count is
//      the peak separation, and counting stops until the next crossing.
//      Crossings within MIN_SEP samples belong to the same beat and are
//      ignored.
//   3. Conversion. time = peak_sep * US_PER_SAMPLE microseconds, and
//      hr = MINUTE_US / time, saturated to 8 bits.
// Both divisions use seq_divider, so one sample takes about 50 clocks: the
// moving-average divide (AVG_W+1 clocks), one update clock and, after a
// peak, the heart-rate divide (HR_DIV_W+1 clocks). `hr_valid` pulses when
// `hr` takes a new value. A `new_data` strobe that arrives while a sample is
// still in work is dropped (`busy` is high then); at 40 MHz and 400 Hz this
// cannot happen.
//
// Follows the original: window of 200, delta of 2, the 2500 us per sample
// conversion, the seed of 341 and the minimum separation of 225 samples (the
// text says "around 200"). This design's own choices: a synchronous
// active-high reset in the clock domain of `clk` with a strobe in place of a
// derived clock, the sequential dividers, heart rate 0 after reset, a count
// that saturates instead of wrapping, and saturation of the heart rate.
module hr_find
  import ecg_pkg::*;
#(
  parameter int unsigned WINDOW        = 200,
  parameter int unsigned DELTA         = 2,
  parameter int unsigned MIN_SEP       = 225,
  parameter int unsigned BASELINE_SEED = 341,
  parameter int unsigned US_PER_SAMP   = US_PER_SAMPLE,
  parameter int unsigned MINUTE        = MINUTE_US,
  parameter int unsigned COUNT_W       = 15
) (
  input  logic  clk,
  input  logic  rst,
  input  adc_t  adc,
  input  logic  new_data,
  output hr_t   hr,
  output logic  hr_valid,
  output logic  busy,
  output logic [COUNT_W-1:0] peak_sep   // last measured peak separation, in samples
);

  // Widths derived from the parameters
  localparam int unsigned SUM_W    = $clog2(WINDOW * ((1 << ADC_W) - 1) + BASELINE_SEED + 1);
  localparam int unsigned N_W      = $clog2(WINDOW + 1);
  localparam int unsigned AVG_W    = (SUM_W > N_W) ? SUM_W : N_W;
  localparam int unsigned TIME_W   = $clog2(US_PER_SAMP * ((1 << COUNT_W) - 1) + 1);
  localparam int unsigned MIN_W    = $clog2(MINUTE + 1);
  localparam int unsigned HR_DIV_W = (TIME_W > MIN_W) ? TIME_W : MIN_W;
  localparam logic [COUNT_W-1:0] COUNT_MAX = '1;

  typedef enum logic [1:0] {S_IDLE, S_AVG, S_UPDATE, S_HR} state_t;
  state_t state;

  // Moving envelope: one WINDOW-bit shift register per ADC bit
  logic [WINDOW-1:0] bit_reg [ADC_W];
  logic [SUM_W-1:0]  baseline_sum;
  logic [N_W-1:0]    baseline_n;
  logic [AVG_W-1:0]  moving_avg;
  adc_t              sample;
  adc_t              sub_val;

  // Peak separation
  logic               start_count;
  logic [COUNT_W-1:0] count;

  logic               above;

  // Dividers
  logic              avg_start, avg_done;
  logic [AVG_W-1:0]  avg_quo;
  logic              hr_start, hr_done;
  logic [HR_DIV_W-1:0] hr_quo;
  logic [HR_DIV_W-1:0] time_between;

  seq_divider #(.W(AVG_W)) u_avg_div (
    .clk, .rst,
    .start    (avg_start),
    .dividend (AVG_W'(baseline_sum)),
    .divisor  (AVG_W'(baseline_n)),
    .busy     (),
    .done     (avg_done),
    .quotient (avg_quo),
    .remainder()
  );

  seq_divider #(.W(HR_DIV_W)) u_hr_div (
    .clk, .rst,
    .start    (hr_start),
    .dividend (HR_DIV_W'(MINUTE)),
    .divisor  (time_between),
    .busy     (),
    .done     (hr_done),
    .quotient (hr_quo),
    .remainder()
  );

  always_comb begin
    for (int b = 0; b < ADC_W; b++) sub_val[b] = bit_reg[b][WINDOW-1];
    above = AVG_W'(sample) > (moving_avg + AVG_W'(DELTA));
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    avg_start <= 1'b0;
    hr_start  <= 1'b0;
    hr_valid  <= 1'b0;
    if (rst) begin
      state        <= S_IDLE;
      for (int b = 0; b < ADC_W; b++) bit_reg[b] <= '0;
      baseline_sum <= SUM_W'(BASELINE_SEED);
      baseline_n   <= N_W'(1);
      moving_avg   <= '0;
      sample       <= '0;
      start_count  <= 1'b0;
      count        <= '0;
      peak_sep     <= '0;
      time_between <= '0;
      hr           <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (new_data) begin
          sample    <= adc;
          avg_start <= 1'b1;
          state     <= S_AVG;
        end
        S_AVG: if (avg_done) begin
          moving_avg <= avg_quo;
          state      <= S_UPDATE;
        end
        S_UPDATE: begin
          // envelope
          if (baseline_n < N_W'(WINDOW)) baseline_n <= baseline_n + 1'b1;
          baseline_sum <= baseline_sum + SUM_W'(sample) - SUM_W'(sub_val);
          for (int b = 0; b < ADC_W; b++)
            bit_reg[b] <= {bit_reg[b][WINDOW-2:0], sample[b]};
          // peak separation
          state <= S_IDLE;
          if (above && !start_count) begin
            start_count <= 1'b1;
            count       <= COUNT_W'(1);
          end else if (above && (count > COUNT_W'(MIN_SEP))) begin
            peak_sep     <= count;
            count        <= '0;
            start_count  <= 1'b0;
            time_between <= HR_DIV_W'(count) * HR_DIV_W'(US_PER_SAMP);
            hr_start     <= 1'b1;
            state        <= S_HR;
          end else if (start_count && count != COUNT_MAX) begin
            count <= count + 1'b1;
          end
        end
        S_HR: if (hr_done) begin
          hr       <= (hr_quo > HR_DIV_W'((1 << HR_W) - 1)) ? '1 : HR_W'(hr_quo);
          hr_valid <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
