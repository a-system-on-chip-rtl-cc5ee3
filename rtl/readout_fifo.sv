// Readout buffer: a synchronous first-in first-out memory.
//
// Measured intervals wait here until the processor reads them. A write
// when full is refused and reported on overflow for one cycle so that the
// caller can count lost results; a read when empty is ignored. rd_data
// always shows the oldest entry (first-word fall-through), so a read
// strobe simply advances to the next one. clear empties the buffer.
// Depth and width are this design's choice; DEPTH must be a power of two.
module readout_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      level,
  output logic             overflow
);
  timeunit 1ps; timeprecision 1fs;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign level   = wr_ptr - rd_ptr;
  assign empty   = (level == '0);
  assign full    = (level == (AW+1)'(DEPTH));
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      overflow <= wr_en && full;
    end
  end

  initial begin
    if (DEPTH != (1 << AW)) $error("readout_fifo: DEPTH must be a power of two");
  end
endmodule
