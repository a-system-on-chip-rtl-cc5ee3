// In-system calibration of one TDC channel by the statistical code density
// test.
//
// Hits that are uncorrelated with the reference clock fall uniformly over a
// clock period T0, so the share of hits that land in fine code k is the
// share of T0 that cell k covers. On cal_start the engine clears its
// histogram in one cycle, counts exactly 2^HIST_LOG2 hits per code, and then builds two
// calibrations from it:
//   average bin width  Kmax = largest code seen, tau = T0 / Kmax (a
//                      sequential restoring divider), t(k) = k * tau;
//   bin-to-bin         t(k) = T0 * (sum_{i<k} h_i + h_k / 2) / 2^HIST_LOG2,
//                      the centre of bin k on the cumulative scale, kept in
//                      a table with one entry per code.
// Counting a power of two of hits makes the bin-to-bin division a shift;
// that, the sample count and the centre-of-bin choice are this design's.
// Until the first calibration the average mode uses T0 / NOMINAL_TAPS and
// the bin-to-bin mode falls back to it. Both tables give the fine time up
// to a constant offset that is the same for every hit of the channel.
//
// Lookups: lk_code in, lk_time_fs (femtoseconds) one cycle later. A
// calibration counts hits from the cycle after cal_start, takes
// 2^HIST_LOG2 hits, then NTAPS+1 cycles to build and TF_BITS to divide.
module tdc_calibration #(
  parameter int unsigned NTAPS        = 96,
  parameter int unsigned T0_FS        = 5_000_000,  // reference clock period
  parameter int unsigned NOMINAL_TAPS = 80,         // cells expected in T0
  parameter int unsigned HIST_LOG2    = 14,         // log2 of hits per calibration
  parameter int unsigned TF_BITS      = 32,         // width of a fine time
  localparam int unsigned NFW         = $clog2(NTAPS + 1)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    cal_start,    // pulse: begin a calibration
  input  tdc_pkg::cal_mode_e      cal_mode,     // which table lookups use
  input  logic                    hit_valid,    // a channel data word
  input  logic [NFW-1:0]          hit_code,     // its fine count
  output logic                    cal_busy,
  output logic                    cal_done,     // a calibration has finished
  output logic [NFW-1:0]          kmax,         // largest code of the last calibration
  input  logic                    lk_valid,
  input  logic [NFW-1:0]          lk_code,
  output logic                    lk_out_valid,
  output logic [TF_BITS-1:0]      lk_time_fs
);
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;

  localparam int unsigned HW    = HIST_LOG2 + 1;   // a bin can hold every hit
  localparam int unsigned DCW   = $clog2(TF_BITS + 1);
  localparam int unsigned NBINS = NTAPS + 1;

  cal_state_e           state;
  logic [HW-1:0]        hist [NBINS];
  logic [TF_BITS-1:0]   lut  [NBINS];
  logic [NFW-1:0]       addr;
  logic [HW-1:0]        total;
  logic [HW-1:0]        cum;
  logic [NFW-1:0]       kmax_t;
  logic [TF_BITS-1:0]   tau_fs;
  logic                 bin_ok;
  // divider
  logic [TF_BITS-1:0]   quot;
  logic [TF_BITS:0]     rem;
  logic [DCW-1:0]       div_cnt;

  logic [HW-1:0]        h_cur;
  logic [63:0]          bin_time;
  logic [TF_BITS:0]     rem_sh;
  logic                 q_bit;
  logic [TF_BITS-1:0]   quot_n;

  assign h_cur    = hist[addr];
  assign bin_time = (64'(T0_FS) * (64'(cum) * 2 + 64'(h_cur))) >> (HIST_LOG2 + 1);
  assign rem_sh   = {rem[TF_BITS-1:0], quot[TF_BITS-1]};
  assign q_bit    = (rem_sh >= (TF_BITS + 1)'(kmax_t));
  assign quot_n   = {quot[TF_BITS-2:0], q_bit};
  assign cal_busy = (state != CAL_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= CAL_IDLE;
      addr     <= '0;
      total    <= '0;
      cum      <= '0;
      kmax_t   <= '0;
      kmax     <= NFW'(NOMINAL_TAPS);
      tau_fs   <= TF_BITS'(T0_FS / NOMINAL_TAPS);
      bin_ok   <= 1'b0;
      cal_done <= 1'b0;
      quot     <= '0;
      rem      <= '0;
      div_cnt  <= '0;
      for (int i = 0; i < int'(NBINS); i++) begin
        hist[i] <= '0;
        lut[i]  <= '0;
      end
    end else begin
      unique case (state)
        CAL_IDLE: begin
          if (cal_start) begin
            for (int i = 0; i < int'(NBINS); i++) hist[i] <= '0;
            state    <= CAL_ACCUM;
            total    <= '0;
            bin_ok   <= 1'b0;
            cal_done <= 1'b0;
          end
        end
        CAL_ACCUM: begin
          if (hit_valid) begin
            hist[hit_code] <= hist[hit_code] + 1'b1;
            total          <= total + 1'b1;
            if (total == HW'((1 << HIST_LOG2) - 1)) begin
              state  <= CAL_BUILD;
              addr   <= '0;
              cum    <= '0;
              kmax_t <= '0;
            end
          end
        end
        CAL_BUILD: begin
          lut[addr] <= bin_time[TF_BITS-1:0];
          cum       <= cum + h_cur;
          if (h_cur != '0) kmax_t <= addr;
          addr <= addr + 1'b1;
          if (addr == NFW'(NTAPS)) begin
            // A histogram without hits (kmax 0) keeps the old tau.
            state   <= (h_cur != '0 || kmax_t != '0) ? CAL_DIVIDE : CAL_IDLE;
            cal_done <= (h_cur == '0 && kmax_t == '0);
            quot    <= TF_BITS'(T0_FS);   // dividend, shifted out as the quotient comes in
            rem     <= '0;
            div_cnt <= DCW'(TF_BITS);
          end
        end
        CAL_DIVIDE: begin
          // One restoring-division step per cycle: T0_FS / kmax_t.
          rem     <= q_bit ? rem_sh - (TF_BITS + 1)'(kmax_t) : rem_sh;
          quot    <= quot_n;
          div_cnt <= div_cnt - 1'b1;
          if (div_cnt == DCW'(1)) begin
            state    <= CAL_IDLE;
            cal_done <= 1'b1;
            bin_ok   <= 1'b1;
            kmax     <= kmax_t;
            tau_fs   <= quot_n;
          end
        end
        default: state <= CAL_IDLE;
      endcase
    end
  end

  // Lookup port.
  always_ff @(posedge clk) begin
    if (rst) begin
      lk_out_valid <= 1'b0;
      lk_time_fs   <= '0;
    end else begin
      lk_out_valid <= lk_valid;
      if (lk_valid) begin
        if (cal_mode == CAL_BIN && bin_ok) lk_time_fs <= lut[lk_code];
        else                               lk_time_fs <= TF_BITS'(lk_code * tau_fs);
      end
    end
  end

  initial begin
    if (NOMINAL_TAPS == 0 || NOMINAL_TAPS > NTAPS) $error("tdc_calibration: bad NOMINAL_TAPS");
  end
endmodule
