// sync_2ff: two-flop synchronizer for a single asynchronous input.
//
// `q` follows `d` two to three `clk` edges later. Used for the Raspberry Pi's
// serial clock and data, which are unrelated to the FPGA clock. Flops reset
// to RESET_VAL, synchronously.
module sync_2ff #(
  parameter logic RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
