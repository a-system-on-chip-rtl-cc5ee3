// End-to-end testbench of tdc_soc_top with every parameter at its default
// (96-cell delay lines of 62.5 ps, 5 ns reference clock, 14-bit coarse
// counter with overflow flag, 2^14 hits per calibration, 512-entry buffer).
//
// The testbench plays the processor over AXI4-Lite and the detector on the
// four timing inputs:
//   1. average-bin-width calibration from random, clock-uncorrelated hits on
//      all inputs; Kmax must be 80 on every channel (5 ns / 62.5 ps). The
//      start/stop pairs keep producing results meanwhile, so the buffer
//      fills and results are dropped, which DROPS must show;
//   2. measurements: each start is followed by one to three stops (multi-hit,
//      common start) after known delays from 0.3 ns to 80 us, so the coarse
//      counter crosses full scale inside some intervals; every result read
//      back must match the applied delay within 100 ps and name the right
//      overflow-flag case;
//   3. bin-to-bin calibration and the same measurements again.
// Counted mechanisms (each must occur): both calibrations, buffer full with
// drops, multi-hit results, overflow-flag cases I to IV, interrupt request.
module tb_tdc_soc_top;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;

  localparam real T0_PS = 5000.0;
  localparam real TOL_PS = 100.0;
  localparam int  MEAS_PER_PAIR = 40;

  logic clk = 1'b0, rst = 1'b0;
  logic [3:0] in_sig = '0;   // start1, stop1, start2, stop2
  logic [4:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 1'b0, wvalid = 1'b0, bready = 1'b0, arvalid = 1'b0, rready = 1'b0;
  logic [31:0] wdata = '0;
  logic [3:0]  wstrb = '0;
  logic        awready, wready, bvalid, arready, rvalid, irq;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;

  int checks = 0, failures = 0;
  int n_cal_avg = 0, n_cal_bin = 0, n_drops = 0, n_full = 0, n_multi = 0, n_irq = 0;
  int n_results = 0;
  int case_seen [4];
  real exp_q [2][$];       // expected intervals per pair, in ps
  bit  multi_q [2][$];     // whether the result is a second or later stop
  bit  gen_busy [2];
  bit  reading;
  bit  cal_hits_on;        // random calibration hits running

  tdc_soc_top dut (
    .clk_ref(clk), .rst(rst),
    .start1(in_sig[0]), .stop1(in_sig[1]), .start2(in_sig[2]), .stop2(in_sig[3]),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .irq(irq));

  always #2500 clk = ~clk;

  always @(posedge clk) if (irq) n_irq++;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
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
            #(rand_ps(45, 250));
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
      check(d[16*(c%2) +: 16] == 16'd80, $sformatf("channel %0d Kmax %0d, expected 80", c, d[16*(c%2) +: 16]));
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
          if ($urandom_range(0, 9) < 3) d = rand_ps(10_000, 80_000);   // long interval
          else                          d = rand_ps(0, 2000) + 300.0;
        end else begin
          d = last + rand_ps(60, 3000);
          if (d > 81_000_000.0) break;
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
    foreach (case_seen[i]) case_seen[i] = 0;
    #1 rst = 1'b1;
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    repeat (20) @(posedge clk);

    calibrate(CAL_AVG);
    measure();
    calibrate(CAL_BIN);
    measure();

    $display("results %0d, cal avg %0d bin %0d, full %0d, drops %0d, multi-hit %0d, irq cycles %0d",
             n_results, n_cal_avg, n_cal_bin, n_full, n_drops, n_multi, n_irq);
    $display("overflow-flag cases I..IV: %0d %0d %0d %0d", case_seen[0], case_seen[1], case_seen[2], case_seen[3]);
    check(n_cal_avg > 0, "average calibration never ran");
    check(n_cal_bin > 0, "bin-to-bin calibration never ran");
    check(n_full > 0, "buffer never full");
    check(n_drops > 0, "no result dropped");
    check(n_multi > 0, "no multi-hit result");
    check(n_irq > 0, "no interrupt request");
    foreach (case_seen[i]) check(case_seen[i] > 0, $sformatf("case %0d never occurred", i + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000_000.0;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
