// tb_ecg_full: the heart-rate monitor at its real clock ratios.
//
// ecg_top runs with all its defaults: 40 MHz clock, SCLK = 40 MHz*410/65536
// (250.2 kHz), a conversion every 32 SCLK periods (5115 clocks, 7.8 kHz) and a
// processing sample every 1024/52 conversions (about 100,730 clocks, 397 Hz).
// An MCP3002 model sees a synthetic ECG in real time: baseline 520 with a
// 10 ms pulse of +90 every 800 ms (75 bpm). 800 ms is 317.6 processing
// samples, so the finder must report 24000/318 or 24000/317, i.e. 75 bpm
// (74..76 allowed). A Pi model reads the byte with 0x0100 (200 kHz clock).
// About 3.3 s of operation are simulated: baseline settling and four beats.
// Also checked: heart rate 0 before the first beat, the conversion period,
// and the processing period.
module tb_ecg_full;
  import ecg_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, reset = 1;
  logic PiSCLK = 0, mosi = 0, Din, SCLK, CSBar, Dout, miso;
  logic [9:0] ecg_value = 10'd520;
  int checks = 0, failures = 0;

  ecg_top dut (.clk, .reset, .PiSCLK, .mosi, .Din, .SCLK, .CSBar, .Dout, .miso);

  mcp3002_model adc (.sclk(SCLK), .cs_n(CSBar), .din(Dout), .dout(Din), .value(ecg_value));

  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ECG: 10 ms pulse every 800 ms, in clocks of 25 ns
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    ecg_value = ((cyc % 32_000_000) < 400_000) ? 10'd610 : 10'd520;
  end

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

  // conversion and processing periods
  longint last_done = -1, last_proc = -1;
  int n_conv = 0, n_proc = 0, n_beats = 0;
  always @(posedge clk) begin
    if (dut.done && !dut.rst && cyc > 4) begin
      if (last_done >= 0)
        check((cyc - last_done) inside {5115, 5116}, $sformatf("conversion period %0d", cyc - last_done));
      last_done = cyc;
      n_conv++;
    end
    if (dut.new_data && !dut.rst && cyc > 4) begin
      // 1024/52 = 19.7 conversions: 19 or 20 conversion periods
      if (last_proc >= 0)
        check((cyc - last_proc) inside {[19 * 5115 : 20 * 5116]}, $sformatf("processing period %0d", cyc - last_proc));
      last_proc = cyc;
      n_proc++;
    end
    if (dut.u_hr_find.hr_valid && !dut.rst && cyc > 4) n_beats++;
  end

  initial begin
    logic [15:0] r;
    repeat (10) @(posedge clk);
    reset = 0;
    #300_000_000;                         // 0.3 s: no beat measured yet
    pi_read(r);
    check(r == 16'h0000, $sformatf("before any beat Pi read %h", r));
    #3_000_000_000;                       // 3.0 s more
    pi_read(r);
    check(r >= 16'd74 && r <= 16'd76, $sformatf("Pi read %0d bpm, want 75", r));
    check(n_beats >= 1, "no beat measured");
    check(n_proc > 1200, $sformatf("only %0d processing samples", n_proc));
    check(adc.bad_cmd == 0, "ADC saw a wrong command");
    $display("conversions=%0d samples=%0d beats=%0d hr=%0d", n_conv, n_proc, n_beats, r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (140_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
