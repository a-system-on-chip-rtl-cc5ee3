// Testbench of coarse_counter (main 14-bit configuration): the count
// advances by one per clock from reset, the overflow flag OF is 0 below
// full scale 2^14, 1 from 2^14 to 2^15 - 1, and 0 again after the wrap.
module tb_coarse_counter;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned CB = 14;
  logic clk = 1'b0, rst = 1'b1;
  logic [CB:0] count;
  int checks = 0, failures = 0;
  int of_rise = -1, of_fall = -1;

  coarse_counter dut (.clk(clk), .rst(rst), .count(count));

  always #2500 clk = ~clk;

  initial begin
    logic prev_of;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++; if (count != '0) begin failures++; $display("FAIL reset value %0d", count); end
    rst = 1'b0;
    prev_of = 1'b0;
    for (int n = 1; n <= 3 * (1 << CB) + 5; n++) begin
      @(posedge clk); #1;
      checks++;
      if (count != (CB+1)'(n)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d count=%0d", n, count);
      end
      if (count[CB] && !prev_of && of_rise < 0) of_rise = n;
      if (!count[CB] && prev_of && of_fall < 0) of_fall = n;
      prev_of = count[CB];
    end
    checks++; if (of_rise != (1 << CB))       begin failures++; $display("FAIL OF rose at %0d", of_rise); end
    checks++; if (of_fall != (2 << CB))       begin failures++; $display("FAIL OF fell at %0d", of_fall); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
