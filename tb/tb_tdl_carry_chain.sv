// Testbench of the delay-line model: after a step at time t0 exactly k taps
// show it at t0 + (k + 0.5) * tau, for rising and falling steps, with the
// main 96-cell, 62.5 ps line and with a line that has slow cells.
module tb_tdl_carry_chain;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned N  = 96;
  localparam real         TAU = 62.5;

  logic din = 1'b0, din2 = 1'b0;
  logic [N-1:0] taps;
  logic [15:0]  taps2;
  int checks = 0, failures = 0;

  tdl_carry_chain dut (.din(din), .taps(taps));
  // Every 4th cell 20 ps slower.
  tdl_carry_chain #(.NTAPS(16), .TAU_PS(10.0), .SLOW_EVERY(4), .SLOW_PS(20.0)) dut2 (.din(din2), .taps(taps2));

  function automatic int ones(input logic [N-1:0] v);
    return $countones(v);
  endfunction

  initial begin
    #10000;
    checks++; if (taps !== '0) begin failures++; $display("FAIL line not empty"); end
    for (int r = 0; r < 4; r++) begin
      din = 1'b1;
      #(TAU / 2);
      for (int k = 0; k <= N; k++) begin
        checks++;
        if (ones(taps) != k || (k > 0 && taps[k-1] !== 1'b1)) begin
          failures++; $display("FAIL rise r=%0d k=%0d ones=%0d", r, k, ones(taps));
        end
        if (k < N) #(TAU);
      end
      #1000;
      din = 1'b0;
      #(TAU / 2);
      for (int k = 0; k <= N; k++) begin
        checks++;
        if (ones(taps) != N - k) begin
          failures++; $display("FAIL fall r=%0d k=%0d ones=%0d", r, k, ones(taps));
        end
        if (k < N) #(TAU);
      end
      #1000;
    end
    // Unequal cells: tap i switches after the sum of the cell delays up to i.
    begin
      real t0, acc;
      t0  = $realtime;
      din2 = 1'b1;
      acc = 0.0;
      for (int i = 0; i < 16; i++) begin
        acc += ((i % 4) == 3) ? 30.0 : 10.0;
        #(t0 + acc - 1.0 - $realtime);
        checks++; if (taps2[i] !== 1'b0) begin failures++; $display("FAIL slow tap %0d early", i); end
        #(2.0);
        checks++; if (taps2[i] !== 1'b1) begin failures++; $display("FAIL slow tap %0d late", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
