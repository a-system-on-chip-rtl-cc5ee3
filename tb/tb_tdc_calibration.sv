// Testbench of tdc_calibration at a reduced size (16 cells, 2^8 hits per
// calibration, T0 = 1 ns) so that the reference values are easy to follow.
//
// Known code histograms are fed in random order. The testbench computes on
// its own Kmax, tau = T0 / Kmax and the bin-to-bin centres
// T0 * (2 * sum_{i<k} h_i + h_k) / 2^9, and compares every lookup in both
// modes, before the first calibration (nominal tau), after a first and
// after a second calibration with a different histogram. Lookups must
// answer one cycle after the request.
module tb_tdc_calibration;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;

  localparam int unsigned NTAPS = 16;
  localparam int unsigned T0    = 1_000_000;
  localparam int unsigned NOM   = 12;
  localparam int unsigned HL    = 8;
  localparam int unsigned NFW   = 5;

  logic clk = 1'b0, rst = 1'b1;
  logic cal_start = 1'b0;
  cal_mode_e cal_mode = CAL_AVG;
  logic hit_valid = 1'b0;
  logic [NFW-1:0] hit_code = '0;
  logic cal_busy, cal_done;
  logic [NFW-1:0] kmax;
  logic lk_valid = 1'b0;
  logic [NFW-1:0] lk_code = '0;
  logic lk_out_valid;
  logic [31:0] lk_time_fs;
  int checks = 0, failures = 0;

  tdc_calibration #(.NTAPS(NTAPS), .T0_FS(T0), .NOMINAL_TAPS(NOM), .HIST_LOG2(HL)) dut (
    .clk(clk), .rst(rst), .cal_start(cal_start), .cal_mode(cal_mode),
    .hit_valid(hit_valid), .hit_code(hit_code), .cal_busy(cal_busy),
    .cal_done(cal_done), .kmax(kmax), .lk_valid(lk_valid), .lk_code(lk_code),
    .lk_out_valid(lk_out_valid), .lk_time_fs(lk_time_fs));

  always #500 clk = ~clk;

  int hist [NTAPS+1];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic lookup(input int code, input cal_mode_e m, input longint exp);
    @(negedge clk);
    cal_mode = m; lk_valid = 1'b1; lk_code = NFW'(code);
    @(negedge clk);
    lk_valid = 1'b0;
    check(lk_out_valid == 1'b1, "lookup answer one cycle later");
    check(longint'(lk_time_fs) == exp,
          $sformatf("mode %0d code %0d time %0d expected %0d", m, code, lk_time_fs, exp));
  endtask

  // Random histogram over codes 1..top with hist[top] > 0, 2^HL hits.
  task automatic make_hist(input int top);
    int left = 1 << HL;
    foreach (hist[i]) hist[i] = 0;
    hist[top] = $urandom_range(1, 20);
    left -= hist[top];
    while (left > 0) begin
      int c = $urandom_range(1, top);
      hist[c]++; left--;
    end
  endtask

  task automatic calibrate(input int top);
    int pool [$];
    make_hist(top);
    foreach (hist[c]) for (int n = 0; n < hist[c]; n++) pool.push_back(c);
    pool.shuffle();
    @(negedge clk); cal_start = 1'b1;
    @(negedge clk); cal_start = 1'b0;
    check(cal_busy && !cal_done, "busy after start");
    foreach (pool[i]) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      hit_valid = 1'b1; hit_code = NFW'(pool[i]);
      @(negedge clk);
      hit_valid = 1'b0;
    end
    for (int w = 0; w < 200 && cal_busy; w++) @(negedge clk);
    check(!cal_busy && cal_done, "calibration finished");
    check(kmax == NFW'(top), $sformatf("kmax %0d expected %0d", kmax, top));
  endtask

  task automatic check_tables(input int top);
    longint cum = 0;
    longint tau = T0 / top;
    for (int k = 0; k <= int'(NTAPS); k++) begin
      lookup(k, CAL_AVG, k * tau);
      lookup(k, CAL_BIN, (longint'(T0) * (2 * cum + hist[k])) >> (HL + 1));
      cum += hist[k];
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    // Before calibration: nominal tau in both modes.
    for (int k = 0; k <= int'(NTAPS); k++) begin
      lookup(k, CAL_AVG, k * (T0 / NOM));
      lookup(k, CAL_BIN, k * (T0 / NOM));
    end
    calibrate(10);
    check_tables(10);
    calibrate(14);
    check_tables(14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
