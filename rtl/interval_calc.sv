// Time interval between a reference (start) hit and a channel-x (stop) hit.
//
// Both hits carry a snapshot {OF, N_c} of the free-running coarse counter
// and a calibrated fine time t_f = N_f * tau in femtoseconds. The coarse
// difference follows the four overflow-flag cases: when the two flags are
// equal the counter did not pass a full-scale boundary between the hits and
//     CC = N_c_x - N_c_ref            (cases I and IV),
// and when they differ it did, so full scale FS = 2^COARSE_BITS is added:
//     CC = FS + N_c_x - N_c_ref       (cases II and III).
// The interval is then
//     T = CC * T0 + t_f_ref - t_f_x.
// Intervals are valid up to one full scale (FS * T0, 81.92 us with the
// main 14-bit, 5 ns configuration). The result is signed and registered:
// out_valid follows in_valid by one cycle.
module interval_calc #(
  parameter int unsigned COARSE_BITS = 14,
  parameter int unsigned T0_FS       = 5_000_000,
  parameter int unsigned TF_BITS     = 32,
  parameter int unsigned T_BITS      = 63
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  logic [COARSE_BITS:0]      ref_coarse,  // {OF, N_c} of the start hit
  input  logic [TF_BITS-1:0]        ref_tf_fs,   // fine time of the start hit
  input  logic [COARSE_BITS:0]      x_coarse,    // {OF, N_c} of the stop hit
  input  logic [TF_BITS-1:0]        x_tf_fs,     // fine time of the stop hit
  output logic                      out_valid,
  output logic signed [T_BITS-1:0]  interval_fs,
  output tdc_pkg::of_case_e         of_case
);
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;

  localparam int unsigned CCW = COARSE_BITS + 2;  // signed coarse difference

  logic                  of_ref, of_x;
  logic [CCW-1:0]        nc_ref, nc_x;
  logic signed [CCW-1:0] cc;
  logic signed [T_BITS-1:0] t_comb;
  of_case_e              case_comb;

  assign of_ref = ref_coarse[COARSE_BITS];
  assign of_x   = x_coarse[COARSE_BITS];
  assign nc_ref = CCW'(ref_coarse[COARSE_BITS-1:0]);
  assign nc_x   = CCW'(x_coarse[COARSE_BITS-1:0]);

  always_comb begin
    if (of_ref != of_x) cc = signed'((CCW'(1) << COARSE_BITS) + nc_x - nc_ref);
    else                cc = signed'(nc_x - nc_ref);
    case_comb = of_case_e'({of_ref, of_x});
    t_comb = T_BITS'(cc) * signed'(T_BITS'(T0_FS))
           + signed'(T_BITS'(ref_tf_fs)) - signed'(T_BITS'(x_tf_fs));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid   <= 1'b0;
      interval_fs <= '0;
      of_case     <= CASE_I;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        interval_fs <= t_comb;
        of_case     <= case_comb;
      end
    end
  end
endmodule
