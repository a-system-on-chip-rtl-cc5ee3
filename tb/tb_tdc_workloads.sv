// Runs the whole TDC SoC at the other configurations the slides report, each
// through the same end-to-end sequence as tb_tdc_soc_top (tdc_e2e_bench):
//   res32  158 cells of 31.6 ps at 200 MHz (176 built), Kmax 159
//   long   33 ps cells with a 32-bit coarse counter; intervals of 0.1 to
//          0.4 ms, beyond the 81.92 us reach of the 14-bit default counter
//   uneven the default chain with every fourth cell 30 ps slower (own
//          choice, standing in for the CARRY4 boundaries), so the two
//          calibrations differ
// The three benches run in parallel; the result line sums their counts.
// The 16.1 ps variant (388 cells at 160 MHz) is not run here.
// Tolerances: with 2^14 calibration hits the running sum of the histogram
// has a statistical spread of about 24 ps (one sigma) near mid-range,
// whatever the cell size, so two stamps can be off by roughly 35 ps plus
// one cell. The uneven chain has 92.5 ps cells, which the average
// calibration cannot resolve. Hence 100 to 150 ps, not one LSB.
// Expected Kmax: a hit less than one cell before a clock edge leaves the
// code at 0 and is taken one period later, so Kmax = floor(T0/tau) + 1
// when T0/tau is not an integer. Cell counts and delays follow the slides;
// the built lengths, tolerances and interval ranges are own choices.
module tb_tdc_workloads;
  timeunit 1ps; timeprecision 1fs;

  bit done [3];
  int checks [3];
  int failures [3];

  tdc_e2e_bench #(.NAME("res32"), .NTAPS(176), .TAU_PS(31.6), .NOMINAL_TAPS(158),
                  .KMAX_EXP(159), .TOL_PS(100.0))
    u_res32 (.done(done[0]), .checks(checks[0]), .failures(failures[0]));

  tdc_e2e_bench #(.NAME("long"), .NTAPS(176), .TAU_PS(33.0), .COARSE_BITS(32),
                  .NOMINAL_TAPS(152), .KMAX_EXP(152), .TOL_PS(100.0),
                  .LONG_MIN_NS(100_000), .LONG_MAX_NS(400_000), .MEAS_PER_PAIR(12),
                  .EXPECT_WRAP(1'b0))
    u_long (.done(done[1]), .checks(checks[1]), .failures(failures[1]));

  tdc_e2e_bench #(.NAME("uneven"), .SLOW_EVERY(4), .SLOW_PS(30.0), .KMAX_EXP(0),
                  .TOL_PS(150.0))
    u_uneven (.done(done[2]), .checks(checks[2]), .failures(failures[2]));

  initial begin
    int c, f;
    wait (done[0] && done[1] && done[2]);
    c = 0; f = 0;
    for (int i = 0; i < 3; i++) begin c += checks[i]; f += failures[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    #100_000_000_000.0;
    $display("watchdog: benches did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end
endmodule
