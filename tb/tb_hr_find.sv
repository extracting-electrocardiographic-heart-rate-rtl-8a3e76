// tb_hr_find: checks the peak finder against a sample-level reference model.
//
// The reference keeps its own 200-entry history queue, running sum, sample
// count and peak counter in plain integer arithmetic and predicts, for every
// processed sample, the heart rate and the last peak separation. The stimulus
// is a baseline with narrow and wide pulses, pulses closer together than the
// minimum separation (including periods of exactly 225 and 226 samples, on
// either side of the limit), noise, a reset in the middle, a sine wave of
// 320 samples per cycle and a long stretch without beats. On top of the model
// comparison, a clean pulse train with a period of P samples must settle to
// 24000/P or 24000/(P-1) beats per minute (a wide pulse restarts the count
// one sample after the peak that ended it), and each sample must be finished
// within 60 clocks.
module tb_hr_find;
  import ecg_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst = 1;
  adc_t adc = '0;
  logic new_data = 0;
  hr_t  hr;
  logic hr_valid, busy;
  logic [14:0] peak_sep;
  int checks = 0, failures = 0;

  hr_find dut (.clk, .rst, .adc, .new_data, .hr, .hr_valid, .busy, .peak_sep);

  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  int ref_sum, ref_n, ref_cnt, ref_sep, ref_hr;
  bit ref_sc;
  int hist [$];
  int n_start = 0, n_same_beat = 0, n_peak = 0, n_full = 0;

  function automatic void ref_reset();
    ref_sum = 341; ref_n = 1; ref_cnt = 0; ref_sep = 0; ref_hr = 0; ref_sc = 0;
    hist.delete();
    repeat (200) hist.push_back(0);
  endfunction

  function automatic void ref_step(input int x);
    int avg, old;
    bit above;
    avg = ref_sum / ref_n;
    if (ref_n < 200) ref_n++; else n_full++;
    old = hist.pop_back();
    hist.push_front(x);
    ref_sum = ref_sum + x - old;
    above = x > avg + 2;
    if (above && !ref_sc) begin
      ref_sc = 1; ref_cnt = 1; n_start++;
    end else if (above && ref_cnt > 225) begin
      ref_sep = ref_cnt; ref_cnt = 0; ref_sc = 0; n_peak++;
      ref_hr = 60_000_000 / (2500 * ref_sep);
      if (ref_hr > 255) ref_hr = 255;
    end else if (ref_sc) begin
      if (above) n_same_beat++;
      if (ref_cnt < 32767) ref_cnt++;
    end
  endfunction

  // ---------------- one processed sample ----------------
  task automatic sample(input int x);
    int lat;
    @(posedge clk);
    adc <= adc_t'(x);
    new_data <= 1;
    @(posedge clk);
    new_data <= 0;
    lat = 1;
    @(posedge clk);
    while (busy) begin
      @(posedge clk);
      lat++;
    end
    ref_step(x);
    check(lat <= 60, $sformatf("sample took %0d clocks", lat));
    check(hr == hr_t'(ref_hr) && peak_sep == 15'(ref_sep),
          $sformatf("hr %0d sep %0d, want %0d %0d", hr, peak_sep, ref_hr, ref_sep));
  endtask

  // pulse train: baseline `base`, pulse height `amp`, `width` samples wide
  task automatic train(input int base, input int amp, input int period, input int width,
                       input int beats, input int noise);
    for (int b = 0; b < beats; b++)
      for (int i = 0; i < period; i++)
        sample(base + ((i < width) ? amp : 0) + ((noise > 0) ? $urandom_range(0, noise) : 0));
  endtask

  int hr_updates = 0;
  always @(posedge clk) if (hr_valid && !rst) hr_updates++;

  initial begin
    ref_reset();
    repeat (4) @(posedge clk);
    rst = 0;
    @(posedge clk);
    check(hr == 0, "heart rate 0 after reset");
    // settle the baseline, then a clean 80 bpm train of single-sample pulses
    repeat (250) sample(500);
    train(500, 100, 300, 1, 5, 0);
    check(hr == 8'd80, $sformatf("period 300 -> %0d bpm, want 80", hr));
    // wide pulses: the extra samples of a beat must not count as beats
    train(500, 80, 240, 6, 6, 0);
    check(hr inside {8'd100}, $sformatf("period 240 wide -> %0d bpm, want 100", hr));
    // pulses closer than the minimum separation: every other one is skipped
    train(500, 80, 140, 2, 8, 0);
    check(hr inside {8'(24000 / 280), 8'(24000 / 279)}, $sformatf("period 140 -> %0d bpm", hr));
    // a period of exactly MIN_SEP samples is not enough: every other beat counts
    train(500, 100, 225, 1, 6, 0);
    check(hr == 8'(24000 / 450), $sformatf("period 225 -> %0d bpm, want %0d", hr, 24000 / 450));
    // one more sample is enough
    train(500, 100, 226, 1, 4, 0);
    check(hr == 8'(24000 / 226), $sformatf("period 226 -> %0d bpm, want %0d", hr, 24000 / 226));
    // noisy baseline, faster rhythm
    train(480, 120, 230, 3, 6, 1);
    // reset in the middle, then a different level
    rst = 1; repeat (2) @(posedge clk); rst = 0;
    ref_reset();
    @(posedge clk);
    check(hr == 0, "heart rate 0 after second reset");
    repeat (220) sample(700);
    train(700, 50, 400, 4, 4, 0);
    check(hr == 8'd60, $sformatf("period 400 -> %0d bpm, want 60", hr));
    // sine wave of 320 samples per cycle (75 bpm at 400 samples/s)
    for (int i = 0; i < 6 * 320; i++)
      sample(700 + $rtoi(60.0 * $sin(6.283185307179586 * i / 320.0) + 60.5) - 60);
    check(hr inside {[8'd74 : 8'd76]}, $sformatf("sine of period 320 -> %0d bpm, want 75", hr));
    // a long gap with no beats saturates the counter: no wrap, no false beat
    repeat (33000) sample(650);
    check(n_start > 0 && n_same_beat > 0 && n_peak > 10 && n_full > 0, "all cases reached");
    check(hr_updates == n_peak, $sformatf("%0d hr updates, %0d peaks", hr_updates, n_peak));
    $display("starts=%0d same_beat=%0d peaks=%0d", n_start, n_same_beat, n_peak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
