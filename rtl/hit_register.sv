// Hit flip-flop at the head of a TDC channel.
//
// The hit (or the reference tick) is the clock of a flip-flop whose D input
// is tied to 1, so its first rising edge sets the output and the step then
// runs down the delay line. The step is held until the global or the local
// reset clears it; further edges in between are ignored. This is the
// flip-flop drawn in front of the delay line of each channel; the clear is
// asynchronous here, which is this design's choice.
module hit_register (
  input  logic hit,   // timing input, active on its rising edge
  input  logic clr,   // global or local reset, asynchronous, active high
  output logic q      // held step into the delay line
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge hit or posedge clr) begin
    if (clr) q <= 1'b0;
    else     q <= 1'b1;
  end
endmodule
