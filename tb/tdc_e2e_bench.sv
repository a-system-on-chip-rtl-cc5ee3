// Reusable end-to-end bench for tdc_soc_top at any configuration, used by
// tb_tdc_workloads. Same sequence as tb_tdc_soc_top: average calibration
// from random hits, measurements with multi-hit groups and long intervals,
// bin-to-bin calibration, measurements again; every result is compared
// with the applied delay within TOL_PS. done rises at the end; checks and
// failures count what it compared. Calibration hits come 25 to 90 ns apart
// on each input (denser than in tb_tdc_soc_top, to keep the run short).
module tdc_e2e_bench #(
  parameter string       NAME        = "main",
  parameter int unsigned NTAPS       = 96,
  parameter real         TAU_PS      = 62.5,
  parameter int unsigned SLOW_EVERY  = 0,
  parameter real         SLOW_PS     = 0.0,
  parameter int unsigned T0_FS       = 5_000_000,
  parameter int unsigned COARSE_BITS = 14,
  parameter int unsigned NOMINAL_TAPS = 80,
  parameter int unsigned HIST_LOG2   = 14,
  parameter int unsigned KMAX_EXP    = 80,     // 0: not checked
  parameter int          LONG_MIN_NS = 10_000,
  parameter int          LONG_MAX_NS = 80_000,
  parameter int          MEAS_PER_PAIR = 40,
  parameter real         TOL_PS      = 100.0,
  parameter bit          EXPECT_WRAP = 1'b1
) (
  output bit done,
  output int checks,
  output int failures
);
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;

  localparam real T0_PS = real'(T0_FS) / 1000.0;

  logic clk = 1'b0, rst = 1'b0;
  logic [3:0] in_sig = '0;   // start1, stop1, start2, stop2
  logic [4:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 1'b0, wvalid = 1'b0, bready = 1'b0, arvalid = 1'b0, rready = 1'b0;
  logic [31:0] wdata = '0;
  logic [3:0]  wstrb = '0;
  logic        awready, wready, bvalid, arready, rvalid, irq;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;

  int n_cal_avg = 0, n_cal_bin = 0, n_drops = 0, n_full = 0, n_multi = 0, n_irq = 0;
  int n_results = 0;
  int case_seen [4];
  real exp_q [2][$];       // expected intervals per pair, in ps
  bit  multi_q [2][$];     // whether the result is a second or later stop
  bit  gen_busy [2];
  bit  reading;
  bit  cal_hits_on;        // random calibration hits running

  tdc_soc_top #(
    .NTAPS(NTAPS), .TAU_PS(TAU_PS), .SLOW_EVERY(SLOW_EVERY), .SLOW_PS(SLOW_PS),
    .T0_FS(T0_FS), .COARSE_BITS(COARSE_BITS), .NOMINAL_TAPS(NOMINAL_TAPS), .HIST_LOG2(HIST_LOG2)
  ) dut (
    .clk_ref(clk), .rst(rst),
    .start1(in_sig[0]), .stop1(in_sig[1]), .start2(in_sig[2]), .stop2(in_sig[3]),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .irq(irq));

  always #(T0_PS / 2.0) clk = ~clk;

  always @(posedge clk) if (irq) n_irq++;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s: %s", NAME, msg); end
  endtask

  // ---------------- AXI4-Lite master ----------------
  task automatic axi_write(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1'b1; wdata = d; wstrb = 4'hF; wvalid = 1'b1; bready = 1'b1;
    do @(posedge clk); while (!awready);
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    while (!bvalid) @(negedge clk);
    @(negedge clk); bready = 1'b0;
  endtask

  task automatic axi_read(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1'b1; rready = 1'b1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 1'b0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk); rready = 1'b0;
  endtask

  // ---------------- timing inputs ----------------
  task automatic pulse(input int ch);
    fork
      begin
        in_sig[ch] = 1'b1;
        #(1500.0);
        in_sig[ch] = 1'b0;
      end
    join_none
  endtask

  // Random delay with a fractional picosecond part, uncorrelated with clk.
  function automatic real rand_ps(input int lo_ns, input int hi_ns);
    return real'($urandom_range(lo_ns * 1000, hi_ns * 1000)) + real'($urandom_range(0, 999)) / 1000.0;
  endfunction

  // Random hits on every input until all channels are calibrated.
  task automatic calibrate(input cal_mode_e mode);
    logic [31:0] st, d;
    axi_write(REG_CTRL, {30'd0, 1'b1, 1'(mode)});
    cal_hits_on = 1'b1;
    fork
      for (int ch = 0; ch < 4; ch++) begin
        fork
          automatic int c = ch;
          while (cal_hits_on) begin
            #(rand_ps(25, 90));
            pulse(c);
          end
        join_none
      end
    join_none
    do begin
      repeat (2000) @(posedge clk);
      axi_read(REG_STATUS, st);
      if (st[1]) n_full++;
    end while (!(st[3] && !st[2]));
    cal_hits_on = 1'b0;
    #(300_000.0);
    if (mode == CAL_AVG) n_cal_avg++; else n_cal_bin++;
    for (int c = 0; c < 4; c++) begin
      if (c % 2 == 0) axi_read(c < 2 ? REG_KMAX : REG_KMAX_HI, d);
      if (KMAX_EXP != 0) check(d[16*(c%2) +: 16] == 16'(KMAX_EXP), $sformatf("%s: channel %0d Kmax %0d, expected %0d", NAME, c, d[16*(c%2) +: 16], KMAX_EXP));
    end
    axi_read(REG_DROPS, d);
    if (d != 0) n_drops++;
    // empty the buffer, keep the mode
    axi_write(REG_CTRL, {29'd0, 1'b1, 1'b0, 1'(mode)});
    axi_read(REG_STATUS, st);
    check(st[0] == 1'b1, "buffer empty after clear");
  endtask

  // Start/stop groups on one pair.
  task automatic gen_pair(input int p);
    for (int m = 0; m < MEAS_PER_PAIR; m++) begin
      int  nstop = $urandom_range(1, 3);
      real d, last;
      #(rand_ps(100, 400));
      pulse(2 * p);
      last = 0.0;
      for (int s = 0; s < nstop; s++) begin
        if (s == 0) begin
          if ($urandom_range(0, 9) < 3) d = rand_ps(LONG_MIN_NS, LONG_MAX_NS);   // long interval
          else                          d = rand_ps(0, 2000) + 300.0;
        end else begin
          d = last + rand_ps(60, 3000);
          if (d > real'(LONG_MAX_NS) * 1000.0 + 1_000_000.0) break;
        end
        #(d - last);
        pulse(2 * p + 1);
        exp_q[p].push_back(d);
        multi_q[p].push_back(s > 0);
        last = d;
      end
      #(rand_ps(60, 200));
    end
    gen_busy[p] = 1'b0;
  endtask

  task automatic reader();
    logic [31:0] st, lo, hi;
    longint word;
    int p, cs;
    real t_ps;
    while (reading || exp_q[0].size() != 0 || exp_q[1].size() != 0) begin
      axi_read(REG_STATUS, st);
      if (st[0]) begin
        if (!reading) repeat (50) @(posedge clk);
        if (!reading && st[0]) begin
          axi_read(REG_STATUS, st);
          if (st[0] && !reading) begin
            check(exp_q[0].size() == 0 && exp_q[1].size() == 0,
                  $sformatf("results missing: %0d and %0d", exp_q[0].size(), exp_q[1].size()));
            exp_q[0].delete(); exp_q[1].delete();
            break;
          end
        end
        repeat (20) @(posedge clk);
        continue;
      end
      axi_read(REG_DATA_LO, lo);
      axi_read(REG_DATA_HI, hi);
      word = longint'({hi, lo});
      p    = int'(hi[31]);
      cs   = int'(hi[30:29]);
      t_ps = real'(longint'(word << 3) >>> 3) / 1000.0;
      n_results++;
      case_seen[cs]++;
      if (exp_q[p].size() == 0) begin
        check(1'b0, $sformatf("unexpected result on pair %0d: %f ps", p, t_ps));
      end else begin
        real e = exp_q[p].pop_front();
        bit  mh = multi_q[p].pop_front();
        check(t_ps - e <= TOL_PS && e - t_ps <= TOL_PS,
              $sformatf("pair %0d interval %.1f ps, applied %.1f ps", p, t_ps, e));
        if (mh) n_multi++;
      end
    end
  endtask

  task automatic measure();
    reading = 1'b1;
    gen_busy[0] = 1'b1; gen_busy[1] = 1'b1;
    fork
      gen_pair(0);
      gen_pair(1);
      reader();
      begin
        wait (!gen_busy[0] && !gen_busy[1]);
        #(2_000_000.0);
        reading = 1'b0;
      end
    join
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    foreach (case_seen[i]) case_seen[i] = 0;
    #1 rst = 1'b1;
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    repeat (20) @(posedge clk);

    calibrate(CAL_AVG);
    measure();
    calibrate(CAL_BIN);
    measure();

    $display("%s: results %0d, cal avg %0d bin %0d, full %0d, drops %0d, multi-hit %0d, irq cycles %0d",
             NAME, n_results, n_cal_avg, n_cal_bin, n_full, n_drops, n_multi, n_irq);
    $display("overflow-flag cases I..IV: %0d %0d %0d %0d", case_seen[0], case_seen[1], case_seen[2], case_seen[3]);
    check(n_cal_avg > 0, "average calibration never ran");
    check(n_cal_bin > 0, "bin-to-bin calibration never ran");
    check(n_full > 0, "buffer never full");
    check(n_drops > 0, "no result dropped");
    check(n_multi > 0, "no multi-hit result");
    check(n_irq > 0, "no interrupt request");
    if (EXPECT_WRAP) foreach (case_seen[i]) check(case_seen[i] > 0, $sformatf("case %0d never occurred", i + 1));
    done = 1'b1;
  end
endmodule
