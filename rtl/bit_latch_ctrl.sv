// Bit latch and control circuit of one TDC channel.
//
// It decides when the sampled delay line holds a hit and runs the capture:
//   ARMED   the tap register samples every cycle (tap_en = 1). The first
//           cycle in which the sampled code is non-zero, tap_en drops at
//           once so that the code stays frozen, and coarse_en latches the
//           coarse count, which at that moment still holds the value of the
//           edge that sampled the code.
//   CONVERT the code converter has counted the frozen code; word_valid
//           tells the channel to store the data word {N_f, OF, N_c}.
//   RESET   local_rst is high for RST_CYCLES cycles: it clears the hit
//           flip-flop and the tap register and lets the delay line empty
//           before the channel is armed again.
// A channel is therefore blind for 2 + RST_CYCLES cycles after a hit. The
// document names this circuit and its enable and local reset outputs; the
// three-state sequence and its timing are this design's own.
module bit_latch_ctrl #(
  parameter int unsigned RST_CYCLES = 2   // cycles of local reset
) (
  input  logic clk,
  input  logic rst,         // global reset, synchronous
  input  logic code_nz,     // sampled tap code is non-zero
  output logic tap_en,      // enable of the tap register
  output logic coarse_en,   // latch the coarse count this cycle
  output logic word_valid,  // N_f and the coarse register are valid
  output logic local_rst    // clears hit flip-flop and tap register
);
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;

  localparam int unsigned CW = $clog2(RST_CYCLES + 1);

  latch_state_e   state, state_n;
  logic [CW-1:0]  rst_cnt;

  always_comb begin
    state_n    = state;
    tap_en     = 1'b0;
    coarse_en  = 1'b0;
    word_valid = 1'b0;
    unique case (state)
      LATCH_ARMED: begin
        tap_en = !code_nz;
        if (code_nz) begin
          coarse_en = 1'b1;
          state_n   = LATCH_CONVERT;
        end
      end
      LATCH_CONVERT: begin
        word_valid = 1'b1;
        state_n    = LATCH_RESET;
      end
      LATCH_RESET: begin
        if (rst_cnt == CW'(1)) state_n = LATCH_ARMED;
      end
      default: state_n = LATCH_ARMED;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= LATCH_ARMED;
      rst_cnt   <= '0;
      local_rst <= 1'b0;
    end else begin
      state     <= state_n;
      local_rst <= (state_n == LATCH_RESET);
      if (state_n == LATCH_RESET && state != LATCH_RESET) rst_cnt <= CW'(RST_CYCLES);
      else if (rst_cnt != '0)                              rst_cnt <= rst_cnt - 1'b1;
    end
  end

  initial begin
    if (RST_CYCLES < 1) $error("bit_latch_ctrl: RST_CYCLES must be at least 1");
  end
endmodule
