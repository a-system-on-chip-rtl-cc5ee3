// Testbench of tap_register: random taps, enable and reset against a
// reference model of an enabled, synchronously reset register.
module tb_tap_register;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned N = 96;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [N-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  tap_register dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));

  always #2500 clk = ~clk;

  function automatic logic [N-1:0] rand_taps();
    logic [N-1:0] v;
    for (int i = 0; i < N; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      rst = ($urandom_range(0, 15) == 0);
      en  = $urandom_range(0, 1);
      d   = rand_taps();
      @(posedge clk);
      if (rst)     model = '0;
      else if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL n=%0d q=%h expected %h", n, q, model);
      end
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
