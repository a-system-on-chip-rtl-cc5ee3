// Testbench of code_converter: clean thermometer codes of every length and
// codes with bubbles must give their number of ones one clock later.
module tb_code_converter;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned N = 96;
  logic clk = 1'b0;
  logic [N-1:0] code = '0;
  logic [6:0]   nf;
  int checks = 0, failures = 0;

  code_converter dut (.clk(clk), .code(code), .nf(nf));

  always #2500 clk = ~clk;

  task automatic apply(input logic [N-1:0] c, input int exp);
    @(negedge clk); code = c;
    @(posedge clk); #1;
    checks++;
    if (nf != 7'(exp)) begin
      failures++;
      $display("FAIL code=%h nf=%0d expected %0d", c, nf, exp);
    end
  endtask

  initial begin
    logic [N-1:0] c;
    int k, b;
    // Clean thermometer codes: k ones from tap 0.
    for (k = 0; k <= int'(N); k++) begin
      c = '0;
      for (int i = 0; i < k; i++) c[i] = 1'b1;
      apply(c, k);
    end
    // Bubbles: a zero inside the ones and a one past the front.
    for (int n = 0; n < 500; n++) begin
      k = $urandom_range(4, N - 4);
      c = '0;
      for (int i = 0; i < k; i++) c[i] = 1'b1;
      b = $urandom_range(1, k - 2);
      c[b] = 1'b0;
      c[k + $urandom_range(0, 2)] = 1'b1;
      apply(c, k);  // one removed, one added: the count is still k
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
