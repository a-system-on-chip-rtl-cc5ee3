// Testbench of bit_latch_ctrl: after a non-zero code the controller must
// drop tap_en at once, pulse coarse_en in the same cycle, word_valid one
// cycle later, hold local_rst for exactly RST_CYCLES cycles and then re-arm.
// A code that stays non-zero during the reset must not start a capture.
module tb_bit_latch_ctrl;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned RC = 2;
  logic clk = 1'b0, rst = 1'b1, code_nz = 1'b0;
  logic tap_en, coarse_en, word_valid, local_rst;
  int checks = 0, failures = 0;

  bit_latch_ctrl #(.RST_CYCLES(RC)) dut (
    .clk(clk), .rst(rst), .code_nz(code_nz), .tap_en(tap_en),
    .coarse_en(coarse_en), .word_valid(word_valid), .local_rst(local_rst));

  always #2500 clk = ~clk;

  task automatic check4(input logic te, ce, wv, lr, input string what);
    checks++;
    if ({tap_en, coarse_en, word_valid, local_rst} !== {te, ce, wv, lr}) begin
      failures++;
      $display("FAIL %s: en=%b coarse=%b word=%b lrst=%b expected %b%b%b%b",
               what, tap_en, coarse_en, word_valid, local_rst, te, ce, wv, lr);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    for (int n = 0; n < 50; n++) begin
      int idle = $urandom_range(0, 5);
      repeat (idle) begin
        @(negedge clk); check4(1, 0, 0, 0, "armed");
      end
      code_nz = 1'b1;                       // tap register shows a hit
      #1; check4(0, 1, 0, 0, "capture cycle");
      @(negedge clk); check4(0, 0, 1, 0, "convert cycle");
      for (int r = 0; r < int'(RC); r++) begin
        @(negedge clk);
        check4(0, 0, 0, 1, "local reset");
        if (r == 0) code_nz = $urandom_range(0, 1);  // stale code ignored
      end
      code_nz = 1'b0;                       // the reset cleared the taps
      @(negedge clk); check4(1, 0, 0, 0, "re-armed");
    end
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
