// Behavioural model of the carry-chain tapped delay line (not synthesizable
// as written: in the FPGA it is a column of CARRY4 primitives).
//
// A step on din travels through NTAPS cells of delay TAU_PS each; tap i is
// the step after i+1 cells. Sampled by a clock edge, the taps form a
// thermometer code whose number of ones is the time from the step to the
// edge in units of tau. Cells come in groups of four as in a CARRY4, so
// NTAPS must be a multiple of 4. The nominal cell delay is one parameter;
// a real chain has cells of unequal delay, which is what the bin-to-bin
// calibration corrects. SLOW_EVERY makes every SLOW_EVERY-th cell
// SLOW_PS slower so that a testbench can give the line such unequal bins.
// Each tap is driven through a transport delay equal to its arrival time,
// so every edge reaches every tap even when a second edge follows within
// the line's length. Synthesis tools that ignore delays see plain wires.
module tdl_carry_chain #(
  parameter int unsigned NTAPS      = 96,    // cells, a multiple of 4
  parameter real         TAU_PS     = 62.5,  // delay of one cell
  parameter int unsigned SLOW_EVERY = 0,     // 0: all cells equal
  parameter real         SLOW_PS    = 0.0    // extra delay of a slow cell
) (
  input  logic             din,
  output logic [NTAPS-1:0] taps
);
  timeunit 1ps; timeprecision 1fs;

  // Delay of cell i.
  function automatic real cell_delay(input int i);
    bit slow = (SLOW_EVERY != 0) && ((i % int'(SLOW_EVERY)) == int'(SLOW_EVERY) - 1);
    return slow ? TAU_PS + SLOW_PS : TAU_PS;
  endfunction

  // Arrival time at tap i: the sum of the delays of cells 0..i.
  function automatic real arrival(input int i);
    real t = 0.0;
    for (int k = 0; k <= i; k++) t += cell_delay(k);
    return t;
  endfunction

  // Each tap follows din after its arrival time. The nonblocking
  // assignment with an intra-assignment delay is a transport delay: every
  // transition is scheduled, so a second edge never cancels one that is
  // still travelling down the line.
  for (genvar i = 0; i < int'(NTAPS); i++) begin : g_tap
    localparam real ARRIVAL_PS = arrival(i);
    initial taps[i] = 1'b0;  // the line starts empty
    always @(din) taps[i] <= #(ARRIVAL_PS) din;
  end

  initial begin
    if (NTAPS % 4 != 0) $error("tdl_carry_chain: NTAPS must be a multiple of 4");
  end
endmodule
