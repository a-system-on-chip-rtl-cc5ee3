// Testbench of interval_calc (14-bit coarse counter with overflow flag,
// T0 = 5 ns). Hit pairs are generated on an absolute time line: the start
// at coarse tick A, the stop D ticks later with 0 <= D < 2^14. The block
// only sees the wrapped 15-bit snapshots {OF, N_c}; it must recover
// CC = D and give D * T0 + t_ref - t_x. All four overflow-flag cases must
// occur and be reported, and the result must follow the input by one cycle.
module tb_interval_calc;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;

  localparam int unsigned CB = 14;
  localparam longint      T0 = 5_000_000;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic [CB:0] ref_coarse = '0, x_coarse = '0;
  logic [31:0] ref_tf = '0, x_tf = '0;
  logic out_valid;
  logic signed [62:0] interval_fs;
  of_case_e of_case;
  int checks = 0, failures = 0;
  int case_seen [4];

  interval_calc dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .ref_coarse(ref_coarse),
    .ref_tf_fs(ref_tf), .x_coarse(x_coarse), .x_tf_fs(x_tf),
    .out_valid(out_valid), .interval_fs(interval_fs), .of_case(of_case));

  always #2500 clk = ~clk;

  initial begin
    foreach (case_seen[i]) case_seen[i] = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      longint a, d, exp;
      int exp_case;
      a = $urandom_range(0, 1_000_000);
      case (n % 3)
        0: d = $urandom_range(0, 40);                      // short interval
        1: d = $urandom_range(0, (1 << CB) - 1);           // anywhere in range
        default: d = (1 << CB) - 1 - $urandom_range(0, 3); // near full scale
      endcase
      // start just before a full-scale boundary now and then
      if (n % 5 == 0) a = ((a >> CB) << CB) + (1 << CB) - $urandom_range(1, 30);
      @(negedge clk);
      in_valid   = 1'b1;
      ref_coarse = (CB+1)'(a);
      x_coarse   = (CB+1)'(a + d);
      ref_tf     = $urandom_range(0, 5_100_000);
      x_tf       = $urandom_range(0, 5_100_000);
      exp        = d * T0 + longint'(ref_tf) - longint'(x_tf);
      exp_case   = {ref_coarse[CB], x_coarse[CB]};
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid || longint'(interval_fs) != exp || int'(of_case) != exp_case) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%0d d=%0d: valid=%0b T=%0d expected %0d case=%0d expected %0d",
                   a, d, out_valid, interval_fs, exp, of_case, exp_case);
      end
      case_seen[exp_case]++;
    end
    foreach (case_seen[i]) begin
      checks++;
      if (case_seen[i] == 0) begin failures++; $display("FAIL case %0d never occurred", i); end
    end
    $display("cases I..IV: %0d %0d %0d %0d", case_seen[0], case_seen[1], case_seen[2], case_seen[3]);
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
