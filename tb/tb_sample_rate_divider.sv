// tb_sample_rate_divider: checks the conversion-to-processing rate divider.
//
// `done` strobes arrive at random spacing. For the k-th strobe the expected
// `new_data` is worked out from integer arithmetic: the accumulator value
// before it is 52*(k-1) mod 1024, after it 52*k mod 1024, and a strobe is
// due when the top bit goes from 0 to 1. The testbench checks each clock,
// that new_data follows `done` by exactly one clock, and that 2048 strobes
// give 104 processing samples (ratio 52/1024, i.e. 7812.5 Hz -> 396.7 Hz).
module tb_sample_rate_divider;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst = 1, done = 0, new_data;
  int checks = 0, failures = 0;

  sample_rate_divider dut (.clk, .rst, .done, .new_data);

  always #12.5 clk = ~clk;

  int k = 0, seen = 0;
  logic due = 0;

  always @(posedge clk) begin
    // compare what the DUT shows now with what the previous cycle predicted
    checks++;
    if (new_data !== due) begin
      failures++;
      $display("FAIL: strobe %0d new_data=%0b want %0b", k, new_data, due);
    end
    if (new_data) seen++;
    if (!rst && done) begin
      k++;
      due <= (((52 * (k - 1)) % 1024) < 512) && (((52 * k) % 1024) >= 512);
    end else begin
      due <= 1'b0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2048) begin
      @(posedge clk) done <= 1;
      @(posedge clk) done <= 0;
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (seen != 104) begin
      failures++;
      $display("FAIL: %0d processing strobes for 2048 conversions, want 104", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
