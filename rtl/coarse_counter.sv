// Free-running coarse counter shared by all channels.
//
// It counts reference clock periods and is never reset during operation:
// each hit takes a snapshot of it, and time intervals come from differences
// of snapshots (sliding scale). The count is COARSE_BITS wide with full
// scale FS = 2^COARSE_BITS; above it sits the overflow flag OF, which
// toggles every time the count wraps through FS, so a difference can tell
// whether the counter wrapped between two snapshots. COARSE_BITS = 14 is
// the main configuration; 32 gives the long-range version. Only the global
// reset clears it.
module coarse_counter #(
  parameter int unsigned COARSE_BITS = 14
) (
  input  logic                 clk,
  input  logic                 rst,
  output logic [COARSE_BITS:0] count   // {OF, N_c}
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end
endmodule
