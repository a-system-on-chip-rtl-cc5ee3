// Testbench of tdc_channel with the main parameters (96 cells of 62.5 ps,
// 5 ns reference clock, 14-bit coarse counter).
//
// Each hit is placed (k + f) cells before a clock edge E1, with f between
// 0.2 and 0.8 so that no tap is on the edge. For k >= 1 the channel must
// report N_f = k with the coarse count of E1; for k = 0 the code at E1 is
// still empty and the next edge must give N_f = 80 (T0 / tau) with the
// coarse count of E1 + 1. The word must appear exactly two edges after the
// sampling edge, once per hit, also when a second hit arrives during the
// dead time.
module tb_tdc_channel;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned NTAPS = 96;
  localparam real         TAU   = 62.5;
  localparam int unsigned CB    = 14;
  localparam real         T0    = 5000.0;

  logic clk = 1'b0, rst = 1'b0, hit = 1'b0;
  logic [CB:0] cnt;
  logic        out_valid;
  logic [6:0]  out_nf;
  logic [CB:0] out_coarse;
  int checks = 0, failures = 0;
  int edges = 0;
  int words = 0;

  tdc_channel dut (
    .clk(clk), .rst(rst), .hit(hit), .coarse(cnt),
    .out_valid(out_valid), .out_nf(out_nf), .out_coarse(out_coarse));

  always #2500 clk = ~clk;   // rising edges at 2500 + n * 5000

  always @(posedge clk) begin
    edges <= edges + 1;
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  always @(posedge clk) if (out_valid) words++;

  task automatic one_hit(input int k, input bit extra_hit);
    real f, t_edge, d;
    int  exp_nf, samp_edge, got_edge, words0;
    logic [CB:0] exp_coarse;
    // next rising edge at least 1 us away
    @(posedge clk);
    t_edge = $realtime + 2.0 * T0;
    f = 0.2 + 0.6 * real'($urandom_range(0, 1000)) / 1000.0;
    d = (real'(k) + f) * TAU;
    words0 = words;
    #(t_edge - d - $realtime);
    hit = 1'b1;
    #(d + 1.0);                    // now 1 ps after E1
    exp_coarse = cnt;
    samp_edge  = edges;
    if (k >= 1) begin
      exp_nf = k;
    end else begin
      exp_nf = int'(T0 / TAU);
      @(posedge clk); #1;
      exp_coarse = cnt;
      samp_edge  = edges;
    end
    hit = 1'b0;
    if (extra_hit) begin
      #(1000.0); hit = 1'b1; #(500.0); hit = 1'b0;
    end
    // wait for the word
    got_edge = -1;
    for (int w = 0; w < 10 && got_edge < 0; w++) begin
      if (out_valid) got_edge = edges;
      else begin @(posedge clk); #1; end
    end
    checks++;
    if (got_edge != samp_edge + 2) begin
      failures++; $display("FAIL k=%0d word after %0d edges, expected 2", k, got_edge - samp_edge);
    end
    checks++;
    if (out_nf != 7'(exp_nf)) begin
      failures++; $display("FAIL k=%0d f=%f nf=%0d expected %0d", k, f, out_nf, exp_nf);
    end
    checks++;
    if (out_coarse != exp_coarse) begin
      failures++; $display("FAIL k=%0d coarse=%0d expected %0d", k, out_coarse, exp_coarse);
    end
    repeat (8) @(posedge clk);
    #1;
    checks++;
    if (words != words0 + 1) begin
      failures++; $display("FAIL k=%0d extra=%0d: %0d words for one hit", k, extra_hit, words - words0);
    end
  endtask

  initial begin
    #1 rst = 1'b1;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    repeat (10) @(posedge clk);
    for (int k = 0; k < 80; k++) one_hit(k, 1'b0);
    for (int n = 0; n < 200; n++) one_hit($urandom_range(0, 79), $urandom_range(0, 3) == 0);
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
