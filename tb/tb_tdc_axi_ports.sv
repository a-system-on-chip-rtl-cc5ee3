// Testbench of tdc_axi_ports: an AXI4-Lite master writes CTRL and reads
// every register while the testbench drives the TDC-side inputs. Checks the
// register contents, the one-cycle pulses (calibration start, buffer clear,
// buffer pop on a DATA_HI read only), SLVERR for unmapped addresses, and
// that responses are held while the master delays bready / rready.
module tb_tdc_axi_ports;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;

  logic aclk = 1'b0, aresetn = 1'b0;
  logic [4:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 1'b0, wvalid = 1'b0, bready = 1'b0, arvalid = 1'b0, rready = 1'b0;
  logic [31:0] wdata = '0;
  logic [3:0]  wstrb = '0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;
  cal_mode_e   cal_mode;
  logic        cal_start, buf_clear, buf_pop;
  logic [63:0] buf_data = '0;
  logic        buf_empty = 1'b1, buf_full = 1'b0, cal_busy = 1'b0, cal_done = 1'b0;
  logic [9:0]  buf_level = '0;
  logic [31:0] drops = '0;
  logic [63:0] kmax_all = '0;
  int checks = 0, failures = 0;
  int n_start = 0, n_clear = 0, n_pop = 0;

  tdc_axi_ports dut (
    .aclk(aclk), .aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .cal_mode(cal_mode), .cal_start(cal_start), .buf_clear(buf_clear), .buf_pop(buf_pop),
    .buf_data(buf_data), .buf_empty(buf_empty), .buf_full(buf_full), .buf_level(buf_level),
    .cal_busy(cal_busy), .cal_done(cal_done), .drops(drops), .kmax_all(kmax_all));

  always #2500 aclk = ~aclk;

  always @(posedge aclk) if (aresetn) begin
    if (cal_start) n_start++;
    if (buf_clear) n_clear++;
    if (buf_pop)   n_pop++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic axi_write(input logic [4:0] a, input logic [31:0] d, output logic [1:0] resp);
    @(negedge aclk);
    awaddr = a; awvalid = 1'b1; wdata = d; wstrb = 4'hF; wvalid = 1'b1;
    do @(posedge aclk); while (!awready);
    @(negedge aclk);
    awvalid = 1'b0; wvalid = 1'b0;
    repeat ($urandom_range(0, 3)) begin
      check(bvalid, "bvalid held while bready low");
      @(negedge aclk);
    end
    bready = 1'b1;
    do @(posedge aclk); while (!bvalid);
    resp = bresp;
    @(negedge aclk); bready = 1'b0;
  endtask

  task automatic axi_read(input logic [4:0] a, output logic [31:0] d, output logic [1:0] resp);
    logic [31:0] first;
    @(negedge aclk);
    araddr = a; arvalid = 1'b1;
    do @(posedge aclk); while (!arready);
    @(negedge aclk);
    arvalid = 1'b0;
    first = rdata;
    repeat ($urandom_range(0, 3)) begin
      check(rvalid && rdata == first, "rvalid and rdata held while rready low");
      @(negedge aclk);
    end
    rready = 1'b1;
    do @(posedge aclk); while (!rvalid);
    d = rdata; resp = rresp;
    @(negedge aclk); rready = 1'b0;
  endtask

  initial begin
    logic [31:0] d;
    logic [1:0]  r;
    repeat (3) @(negedge aclk);
    aresetn = 1'b1;
    check(cal_mode == CAL_AVG, "reset mode");
    // Start a calibration in bin-to-bin mode.
    axi_write(REG_CTRL, 32'h3, r);
    check(r == AXI_OKAY, "CTRL write OKAY");
    check(cal_mode == CAL_BIN, "mode set to bin-to-bin");
    check(n_start == 1, $sformatf("one calibration start pulse, got %0d", n_start));
    axi_read(REG_CTRL, d, r);
    check(d == 32'h1 && r == AXI_OKAY, "CTRL read back");
    // Clear the buffer, mode back to average.
    axi_write(REG_CTRL, 32'h4, r);
    check(n_clear == 1 && n_start == 1 && cal_mode == CAL_AVG,
          $sformatf("buffer clear pulse only: clear %0d start %0d mode %0d", n_clear, n_start, cal_mode));
    // Status and data registers with random inputs.
    for (int n = 0; n < 40; n++) begin
      logic [63:0] bd;
      int pops0;
      bd = {$urandom, $urandom};
      buf_data  = bd;
      buf_empty = $urandom_range(0, 1);
      buf_full  = $urandom_range(0, 1);
      buf_level = 10'($urandom);
      cal_busy  = $urandom_range(0, 1);
      cal_done  = $urandom_range(0, 1);
      drops     = $urandom;
      kmax_all  = {$urandom, $urandom};
      axi_read(REG_STATUS, d, r);
      check(d == {6'd0, buf_level, 12'd0, cal_done, cal_busy, buf_full, buf_empty}, $sformatf("STATUS %h", d));
      pops0 = n_pop;
      axi_read(REG_DATA_LO, d, r);
      check(d == bd[31:0] && n_pop == pops0, "DATA_LO, no pop");
      axi_read(REG_DATA_HI, d, r);
      check(d == bd[63:32], "DATA_HI");
      check(n_pop == pops0 + (buf_empty ? 0 : 1), "DATA_HI pops when not empty");
      axi_read(REG_DROPS, d, r);
      check(d == drops, "DROPS");
      axi_read(REG_KMAX, d, r);
      check(d == kmax_all[31:0], "KMAX");
      axi_read(REG_KMAX_HI, d, r);
      check(d == kmax_all[63:32], "KMAX_HI");
    end
    // Unmapped addresses.
    axi_read(5'h1C, d, r);
    check(r == AXI_SLVERR && d == 0, "unmapped read SLVERR");
    axi_write(5'h1C, 32'hFFFF_FFFF, r);
    check(r == AXI_SLVERR && n_start == 1, "unmapped write SLVERR, no effect");
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
