// Testbench of readout_fifo (depth 8 for the test): random writes and reads
// against a queue model; checks data order, empty, full, level and that a
// write into a full buffer is refused and flagged as overflow; then clear.
module tb_readout_fifo;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned W = 64, D = 8;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full, overflow;
  logic [3:0] level;
  int checks = 0, failures = 0, overflows = 0;
  logic [W-1:0] model [$];

  readout_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .rst(rst), .clear(clear), .wr_en(wr_en), .wr_data(wr_data),
    .rd_en(rd_en), .rd_data(rd_data), .empty(empty), .full(full),
    .level(level), .overflow(overflow));

  always #2500 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    bit exp_ovf;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      // phases: mostly writing, mostly reading, mixed
      int pw = (n / 200) % 3 == 0 ? 80 : ((n / 200) % 3 == 1 ? 20 : 50);
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      check(level == 4'(model.size()), "level");
      if (model.size() > 0) check(rd_data == model[0], $sformatf("head data %h expected %h", rd_data, model[0]));
      wr_en   = ($urandom_range(0, 99) < pw);
      rd_en   = ($urandom_range(0, 99) >= pw);
      wr_data = {$urandom, $urandom};
      exp_ovf = wr_en && (model.size() == D);
      @(posedge clk);
      if (rd_en && model.size() > 0) void'(model.pop_front());
      if (wr_en && !exp_ovf) model.push_back(wr_data);
      #1;
      check(overflow == exp_ovf, "overflow flag");
      if (exp_ovf) overflows++;
    end
    check(overflows > 0, "buffer was never full");
    @(negedge clk); wr_en = 1'b0; rd_en = 1'b0; clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    model.delete();
    check(empty && level == 0, "clear empties the buffer");
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
