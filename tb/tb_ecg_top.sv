// tb_ecg_top: end-to-end test of the heart-rate monitor, at a faster clock
// ratio so that many beats fit in a short simulation.
//
// An MCP3002 model feeds the ADC master with a synthetic ECG: a flat
// baseline with a rectangular beat of BEAT_W processing samples every
// `beat` processing samples. A Raspberry Pi model reads the heart rate with
// the word 0x0100 every few milliseconds of simulated time. The SCLK divider
// is set to 4096/65536 (SCLK = clk/16) and the rate divider to 256/1024
// (every 4th conversion), so one processing sample takes 32*16*4 = 2048
// clocks. The heart rate the finder reports depends only on the beat period
// in samples: 24000/period beats per minute.
//
// Sequence: baseline settling, 75 bpm (320-sample period), 100 bpm
// (240 samples), beats closer than the minimum separation (160 samples,
// read as half the rate), a reset in the middle, then 60 bpm (400 samples).
// It checks the heart rate the Pi reads after each phase, that every Pi
// read agrees with the finder's output, the conversion and processing
// periods in clocks, and that each mechanism happened: conversions,
// processing samples, the moving window filling, a count starting, samples
// of the same beat being ignored, beats measured, Pi readouts and reset.
module tb_ecg_top;
  import ecg_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned SCLK_INC = 4096;
  localparam int unsigned RATE_INC = 256;
  localparam int          TS_CLK   = 32 * (65536 / SCLK_INC) * (1024 / RATE_INC);
  localparam int          BEAT_W   = 4;

  logic clk = 0, reset = 1;
  logic PiSCLK = 0, mosi = 0, Din, SCLK, CSBar, Dout, miso;
  logic [9:0] ecg_value;
  int checks = 0, failures = 0;

  ecg_top #(.SCLK_INC(SCLK_INC), .RATE_INC(RATE_INC)) dut (
    .clk, .reset, .PiSCLK, .mosi, .Din, .SCLK, .CSBar, .Dout, .miso
  );

  mcp3002_model adc (.sclk(SCLK), .cs_n(CSBar), .din(Dout), .dout(Din), .value(ecg_value));

  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- synthetic ECG, timed in clocks ----------------
  longint cyc = 0;
  always @(posedge clk) cyc++;
  int      base = 500, amp = 100, beat = 320;
  longint  phase_clk = 0;
  always @(posedge clk) begin
    phase_clk = (phase_clk + 1 >= longint'(beat) * TS_CLK) ? 0 : phase_clk + 1;
    ecg_value = 10'((phase_clk < BEAT_W * TS_CLK) ? base + amp : base);
  end

  // ---------------- Pi model ----------------
  task automatic pi_read(output logic [15:0] recv);
    for (int i = 15; i >= 0; i--) begin
      mosi = (i == 8);
      #2500;
      PiSCLK = 1;
      recv[i] = miso;
      #2500;
      PiSCLK = 0;
    end
    mosi = 0;
  endtask

  logic [15:0] last_read;
  int reads = 0;
  bit reader_on = 1;
  initial begin
    logic [15:0] r;
    hr_t hr_before;
    #100_000;
    forever begin
      #(2_000_000);
      if (reader_on) begin
        hr_before = dut.u_hr_find.hr;
        pi_read(r);
        check(r[15:8] == 8'h00 && (r[7:0] == hr_before || r[7:0] == dut.u_hr_find.hr),
              $sformatf("Pi read %h, finder %0d", r, dut.u_hr_find.hr));
        last_read = r;
        reads++;
      end
    end
  end

  // ---------------- mechanism counters and period checks ----------------
  int n_conv = 0, n_proc = 0, n_full = 0, n_start = 0, n_same = 0, n_beats = 0, n_reset = 0;
  longint last_done = -1, last_proc = -1;
  always @(posedge clk) begin
    if (dut.done && !dut.rst && cyc > 4) begin
      n_conv++;
      if (last_done >= 0)
        check(cyc - last_done == 32 * 65536 / SCLK_INC, $sformatf("conversion period %0d", cyc - last_done));
      last_done = cyc;
    end
    if (dut.new_data && !dut.rst && cyc > 4) begin
      n_proc++;
      if (last_proc >= 0)
        check(cyc - last_proc == TS_CLK, $sformatf("processing period %0d", cyc - last_proc));
      last_proc = cyc;
    end
    if (dut.u_hr_find.state == dut.u_hr_find.S_UPDATE && !dut.rst && cyc > 4) begin
      if (dut.u_hr_find.baseline_n == 200) n_full++;
      if (dut.u_hr_find.above && !dut.u_hr_find.start_count) n_start++;
      if (dut.u_hr_find.above && dut.u_hr_find.start_count && dut.u_hr_find.count <= 225) n_same++;
    end
    if (dut.u_hr_find.hr_valid && !dut.rst && cyc > 4) n_beats++;
    if (dut.rst) begin
      last_done = -1; last_proc = -1;
    end
  end

  task automatic run_samples(input int n);
    repeat (n * TS_CLK) @(posedge clk);
  endtask

  task automatic expect_read(input int bpm_lo, input int bpm_hi, input string what);
    logic [15:0] r;
    reader_on = 0;
    #10_000;
    pi_read(r);
    check(int'(r) >= bpm_lo && int'(r) <= bpm_hi, $sformatf("%s: Pi read %0d bpm, want %0d..%0d", what, r, bpm_lo, bpm_hi));
    reader_on = 1;
  endtask

  initial begin
    logic [15:0] r;
    repeat (10) @(posedge clk);
    reset = 0;
    run_samples(260);
    beat = 320; run_samples(5 * 320);
    expect_read(24000 / 321, 24000 / 319, "75 bpm");
    beat = 240; run_samples(5 * 240);
    expect_read(24000 / 241, 24000 / 239, "100 bpm");
    beat = 160; run_samples(8 * 160);
    expect_read(24000 / 321, 24000 / 319, "beats inside the minimum separation");
    // reset: the Pi must read zero
    reset = 1; n_reset++;
    repeat (10) @(posedge clk);
    reset = 0;
    reader_on = 0;
    #10_000;
    pi_read(r);
    check(r == 16'h0000, $sformatf("after reset Pi read %h", r));
    reader_on = 1;
    base = 650; amp = 60; beat = 400;
    run_samples(260 + 4 * 400);
    expect_read(24000 / 401, 24000 / 399, "60 bpm after reset");

    check(n_conv > 0,   "no ADC conversions");
    check(n_proc > 0,   "no processing samples");
    check(n_full > 0,   "moving window never filled");
    check(n_start > 0,  "no beat count started");
    check(n_same > 0,   "no same-beat sample ignored");
    check(n_beats > 5,  "too few beats measured");
    check(reads > 5,    "too few Pi reads");
    check(n_reset == 1, "reset not applied");
    check(adc.bad_cmd == 0, "ADC saw a wrong command");
    $display("conversions=%0d samples=%0d window_full=%0d starts=%0d same_beat=%0d beats=%0d pi_reads=%0d resets=%0d",
             n_conv, n_proc, n_full, n_start, n_same, n_beats, reads, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
