// tb_adc_spi_master: checks the MCP3002 SPI master against the ADC model.
//
// A random 10-bit value is presented to the ADC model for each conversion.
// The testbench checks that every `done` delivers the value the model
// captured, that the model saw a valid CH0 single-ended command, that CSBar
// is low for exactly 16 SCLK periods and high for 16, and that the SCLK
// period and the conversion period match the divider (65536/410 and
// 32 * 65536/410 clocks, to within one clock).
module tb_adc_spi_master;
  import ecg_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst = 1;
  logic sclk, cs_n, mosi, miso_adc;
  adc_t data;
  logic done;
  logic [9:0] value;

  int checks = 0, failures = 0;

  adc_spi_master dut (
    .clk, .rst, .Din(miso_adc), .SCLK(sclk), .CSBar(cs_n), .Dout(mosi),
    .data, .done
  );

  mcp3002_model adc (.sclk, .cs_n, .din(mosi), .dout(miso_adc), .value);

  always #12.5 clk = ~clk;   // 40 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // New random ADC input at the start of every frame
  always @(negedge cs_n) value = 10'($urandom);

  // Expected value: what the model captured
  logic [9:0] expect_q [$];
  always @(posedge sclk) if (!cs_n && adc.phase == 3) expect_q.push_back(value);

  // SCLK periods per CS phase
  int sclk_in_low = 0, sclk_in_high = 0;
  always @(posedge sclk) begin
    if (!cs_n) sclk_in_low++; else sclk_in_high++;
  end
  int frames = 0;
  always @(negedge cs_n) begin
    if (frames > 0) check(sclk_in_high == 16, $sformatf("CSBar high for %0d SCLK, want 16", sclk_in_high));
    sclk_in_high = 0;
    frames++;
  end
  always @(posedge cs_n) begin
    if (!rst && frames > 0) check(sclk_in_low == 16, $sformatf("CSBar low for %0d SCLK, want 16", sclk_in_low));
    sclk_in_low = 0;
  end

  // Clock counts between SCLK rising edges and between done strobes
  longint cyc = 0;
  always @(posedge clk) cyc++;
  longint last_rise = -1, last_done = -1;
  int rises = 0;
  always @(posedge sclk) begin
    if (last_rise >= 0 && rises < 200) begin
      // 65536/410 = 159.8 clocks
      check((cyc - last_rise) inside {159, 160}, $sformatf("SCLK period %0d clocks", cyc - last_rise));
    end
    last_rise = cyc;
    rises++;
  end

  int readings = 0;
  always @(posedge clk) if (done && !rst) begin
    logic [9:0] e;
    if (expect_q.size() == 0) begin
      check(0, "done without a conversion");
    end else begin
      e = expect_q.pop_front();
      check(data == e, $sformatf("reading %h, want %h", data, e));
    end
    if (last_done >= 0)
      // 32 * 65536 / 410 = 5115.0 clocks
      check((cyc - last_done) inside {[5114:5116]}, $sformatf("conversion period %0d clocks", cyc - last_done));
    last_done = cyc;
    readings++;
  end

  initial begin
    value = 10'h155;
    repeat (5) @(posedge clk);
    rst = 0;
    wait (readings == 40);
    check(adc.bad_cmd == 0, "ADC saw a wrong command");
    check(adc.conversions >= 40, "ADC conversion count");
    // reset in the middle of a frame, then make sure it recovers
    @(negedge cs_n); repeat (2000) @(posedge clk);
    rst = 1; repeat (3) @(posedge clk);
    check(cs_n == 1'b1, "CSBar high in reset");
    expect_q.delete(); sclk_in_low = 0; sclk_in_high = 0; frames = 0;
    last_done = -1;
    rst = 0;
    readings = 0;
    wait (readings == 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
