// tb_pi_spi_slave: checks the heart-rate SPI slave with a modelled Pi.
//
// The `pi_xfer` task is an SPI mode-0 master: it puts each bit of a 16-bit
// word on mosi while the clock is low, raises the clock, samples miso, and
// lowers it again, MSB first. With a marker bit at position p (8..15) the
// heart rate must come back in bits p-1..p-8, with zeros elsewhere; with the
// Pi's own word 0x0100 that is the low byte. Both 200 kHz and 250 kHz Pi
// clocks are used, with the clock phase random against the 40 MHz clock.
// A word with no marker after reset must read back as zero.
module tb_pi_spi_slave;
  import ecg_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst = 1;
  logic sclk = 0, mosi = 0, miso;
  hr_t  hr;
  int checks = 0, failures = 0;

  pi_spi_slave dut (.clk, .rst, .PiSCLK(sclk), .mosi, .hr, .miso);

  always #12.5 clk = ~clk;

  task automatic pi_xfer(input logic [15:0] send, input realtime half, output logic [15:0] recv);
    for (int i = 15; i >= 0; i--) begin
      mosi = send[i];
      #(half);
      sclk = 1;
      recv[i] = miso;
      #(half);
      sclk = 0;
    end
    mosi = 0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [15:0] r, e;
    int p;
    realtime half;
    hr = 8'hA5;
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (4) @(posedge clk);
    pi_xfer(16'h0000, 2500.0, r);
    check(r == 16'h0000, $sformatf("no marker after reset read %h", r));
    pi_xfer(16'h0100, 2500.0, r);
    check(r == 16'h00A5, $sformatf("0x0100 read %h, want 00a5", r));
    for (int n = 0; n < 200; n++) begin
      hr = hr_t'($urandom);
      p = (n < 100) ? 8 : $urandom_range(8, 15);
      half = (n % 2) ? 2000.0 : 2500.0;          // 250 kHz or 200 kHz
      #($urandom_range(0, 40) * 1.0);
      pi_xfer(16'(1 << p), half, r);
      e = 16'((32'(hr) << 8) >> (16 - p));
      check(r == e, $sformatf("marker %0d hr %h read %h want %h", p, hr, r, e));
    end
    // reset clears the shift register
    hr = 8'hFF;
    pi_xfer(16'h8000, 2500.0, r);           // leaves HR bits partly shifted
    rst = 1; repeat (3) @(posedge clk); rst = 0;
    pi_xfer(16'h0000, 2500.0, r);
    check(r == 16'h0000, $sformatf("after reset read %h", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
