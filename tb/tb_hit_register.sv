// Testbench of hit_register: the first rising hit edge sets the output, later
// edges and the falling edge leave it set, and only the clear resets it;
// an edge while the clear is high is ignored.
module tb_hit_register;
  timeunit 1ps; timeprecision 1fs;

  logic hit = 1'b0, clr = 1'b0, q;
  int checks = 0, failures = 0;

  hit_register dut (.hit(hit), .clr(clr), .q(q));

  task automatic expect_q(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b", what, q, exp);
    end
  endtask

  initial begin
    #1 clr = 1'b1;  // an edge on the clear, as a power-on reset gives
    #100;  expect_q(1'b0, "after clear");
    clr = 1'b0; #100; expect_q(1'b0, "idle");
    for (int n = 0; n < 20; n++) begin
      hit = 1'b1; #10;  expect_q(1'b1, "rising edge");
      hit = 1'b0; #50;  expect_q(1'b1, "held after falling edge");
      hit = 1'b1; #10;  expect_q(1'b1, "second edge");
      hit = 1'b0; #10;
      clr = 1'b1; #5;   expect_q(1'b0, "asynchronous clear");
      hit = 1'b1; #10;  expect_q(1'b0, "edge during clear");
      hit = 1'b0; #10;
      clr = 1'b0; #($urandom_range(10, 200)); expect_q(1'b0, "released, no edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
