// Thermometer-to-binary code converter of a TDC channel.
//
// The fine count N_f is the number of cells the hit step passed before the
// sampling edge. Near the front of the step, cells of very unequal delay and
// the sampling flip-flops can give a code that is not a clean thermometer
// (bubbles such as 1110100). Counting all ones instead of finding the first
// zero turns such a bubble into an error of at most its own size instead of
// a jump, which is this design's answer to bubble errors. The count is
// registered: N_f is valid one clock after the code.
module code_converter #(
  parameter int unsigned NTAPS = 96,
  localparam int unsigned NFW  = $clog2(NTAPS + 1)
) (
  input  logic             clk,
  input  logic [NTAPS-1:0] code,  // sampled taps
  output logic [NFW-1:0]   nf     // number of ones, one cycle later
);
  timeunit 1ps; timeprecision 1fs;

  logic [NFW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < int'(NTAPS); i++) ones = ones + NFW'(code[i]);
  end

  always_ff @(posedge clk) nf <= ones;
endmodule
