// Register that samples every tap of the delay line on the reference clock.
//
// One D flip-flop per tap, each with enable and reset. While enable is high
// the register follows the delay line on every reference clock edge; the
// capture controller drops enable the cycle after a non-zero code appears,
// which freezes that code until it is converted. The local reset clears the
// register before the channel is re-armed. The reset is synchronous here.
module tap_register #(
  parameter int unsigned NTAPS = 96
) (
  input  logic             clk,  // reference clock
  input  logic             rst,  // local or global reset, synchronous
  input  logic             en,   // sample enable from the capture controller
  input  logic [NTAPS-1:0] d,    // delay-line taps
  output logic [NTAPS-1:0] q     // sampled thermometer code
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end
endmodule
