// Shared types and constants of the tapped-delay-line TDC.
//
// The TDC measures the time of a hit as a coarse count of reference-clock
// periods (T0) minus a fine count of carry-chain cells (tau). This package
// holds what several modules agree on: the calibration mode encoding, the
// states of the per-channel capture controller and the register map of the
// processor port. Times inside the design are integers in femtoseconds, so
// that a 62.5 ps or 16.1 ps cell delay is exact enough without fixed point.
package tdc_pkg;
  timeunit 1ps; timeprecision 1fs;

  // How a fine code is turned into a fine time.
  typedef enum logic {
    CAL_AVG = 1'b0,  // average bin width: t = code * T0 / Kmax
    CAL_BIN = 1'b1   // bin-to-bin: t = centre of the code's cumulative bin
  } cal_mode_e;

  // Capture controller of one channel (bit latch and control circuit).
  typedef enum logic [1:0] {
    LATCH_ARMED   = 2'd0,  // tap register follows the delay line
    LATCH_CONVERT = 2'd1,  // taps frozen, coarse count latched, word formed
    LATCH_RESET   = 2'd2   // local reset clears hit flip-flop and taps
  } latch_state_e;

  // Calibration engine states.
  typedef enum logic [1:0] {
    CAL_IDLE   = 2'd0,
    CAL_ACCUM  = 2'd1,  // count hits per fine code
    CAL_BUILD  = 2'd2,  // one table entry per cycle
    CAL_DIVIDE = 2'd3   // tau = T0 / Kmax, one bit per cycle
  } cal_state_e;

  // Which of the four overflow-flag cases a coarse difference fell in.
  typedef enum logic [1:0] {
    CASE_I   = 2'd0,  // OF_ref = 0, OF_x = 0
    CASE_II  = 2'd1,  // OF_ref = 0, OF_x = 1
    CASE_III = 2'd2,  // OF_ref = 1, OF_x = 0
    CASE_IV  = 2'd3   // OF_ref = 1, OF_x = 1
  } of_case_e;

  // Register map of the AXI4-Lite port (byte addresses).
  localparam logic [4:0] REG_CTRL    = 5'h00;  // [0] cal mode, [1] cal start (pulse), [2] buffer clear (pulse)
  localparam logic [4:0] REG_STATUS  = 5'h04;  // [0] empty, [1] full, [2] cal busy, [3] cal done, [31:16] level
  localparam logic [4:0] REG_DATA_LO = 5'h08;  // result bits 31:0, no side effect
  localparam logic [4:0] REG_DATA_HI = 5'h0C;  // result bits 63:32, reading pops the result
  localparam logic [4:0] REG_DROPS   = 5'h10;  // results lost to a full buffer
  localparam logic [4:0] REG_KMAX    = 5'h14;  // Kmax of channels 0 and 1, 16 bits each
  localparam logic [4:0] REG_KMAX_HI = 5'h18;  // Kmax of channels 2 and 3, 16 bits each

  // AXI response codes.
  localparam logic [1:0] AXI_OKAY   = 2'b00;
  localparam logic [1:0] AXI_SLVERR = 2'b10;
endpackage
