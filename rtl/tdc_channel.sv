// One tapped-delay-line TDC channel.
//
// Chain: hit flip-flop -> carry-chain delay line -> tap register (reference
// clock) -> code converter (ones count) -> data word. The bit latch and
// control circuit freezes the taps on the first non-zero code, latches the
// shared coarse counter into the coarse register in the same cycle, and
// then clears the channel with a local reset.
//
// The time of the hit is
//     t_hit = N_c * T0 - N_f * tau
// where N_c is the coarse count of the clock edge that sampled the code
// and N_f the number of cells the step had passed by that edge. The channel
// only reports {N_f, OF, N_c}; turning N_f into time (calibration) and
// subtracting two channels is done downstream.
//
// Timing: if edge E samples the first non-zero code, out_valid is high for
// one cycle after edge E+2. A new hit is accepted once edge E+2+RST_CYCLES
// has passed (the local reset is released). The delay line is a behavioural
// model of the FPGA carry chain; everything else is synthesizable.
module tdc_channel #(
  parameter int unsigned NTAPS       = 96,
  parameter real         TAU_PS      = 62.5,
  parameter int unsigned SLOW_EVERY  = 0,
  parameter real         SLOW_PS     = 0.0,
  parameter int unsigned COARSE_BITS = 14,
  parameter int unsigned RST_CYCLES  = 2,
  localparam int unsigned NFW        = $clog2(NTAPS + 1)
) (
  input  logic                 clk,         // reference clock
  input  logic                 rst,         // global reset
  input  logic                 hit,         // timing input, rising edge
  input  logic [COARSE_BITS:0] coarse,      // shared coarse counter {OF, N_c}
  output logic                 out_valid,   // one-cycle pulse per hit
  output logic [NFW-1:0]       out_nf,      // fine count N_f
  output logic [COARSE_BITS:0] out_coarse   // {OF, N_c} of the sampling edge
);
  timeunit 1ps; timeprecision 1fs;

  logic                 step;
  logic                 local_rst;
  logic [NTAPS-1:0]     taps, tap_q;
  logic                 tap_en, coarse_en, word_valid;
  logic [NFW-1:0]       nf;
  logic [COARSE_BITS:0] coarse_reg;

  hit_register u_hit (
    .hit (hit),
    .clr (rst | local_rst),
    .q   (step)
  );

  tdl_carry_chain #(
    .NTAPS(NTAPS), .TAU_PS(TAU_PS), .SLOW_EVERY(SLOW_EVERY), .SLOW_PS(SLOW_PS)
  ) u_tdl (
    .din  (step),
    .taps (taps)
  );

  tap_register #(.NTAPS(NTAPS)) u_taps (
    .clk (clk),
    .rst (rst | local_rst),
    .en  (tap_en),
    .d   (taps),
    .q   (tap_q)
  );

  code_converter #(.NTAPS(NTAPS)) u_conv (
    .clk  (clk),
    .code (tap_q),
    .nf   (nf)
  );

  bit_latch_ctrl #(.RST_CYCLES(RST_CYCLES)) u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .code_nz    (|tap_q),
    .tap_en     (tap_en),
    .coarse_en  (coarse_en),
    .word_valid (word_valid),
    .local_rst  (local_rst)
  );

  // Coarse register: the counter still shows the sampling edge's value in
  // the cycle in which the frozen code is first seen.
  always_ff @(posedge clk) begin
    if (rst)            coarse_reg <= '0;
    else if (coarse_en) coarse_reg <= coarse;
  end

  // TDC data word.
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid  <= 1'b0;
      out_nf     <= '0;
      out_coarse <= '0;
    end else begin
      out_valid <= word_valid;
      if (word_valid) begin
        out_nf     <= nf;
        out_coarse <= coarse_reg;
      end
    end
  end
endmodule
