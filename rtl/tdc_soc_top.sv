// Four-input tapped-delay-line TDC peripheral for a soft-processor SoC.
//
// Inputs start1, stop1, start2 and stop2 each have a full TDC channel
// (hit flip-flop, carry-chain delay line, tap register, code converter,
// bit latch control, coarse register). All channels share one free-running
// coarse counter with an overflow flag, so every hit is tagged with an
// absolute time stamp and no counter is ever reset between measurements.
// Each channel has its own calibration engine (code density histogram,
// average or bin-to-bin), which turns its fine count into a fine time.
//
// Pair p (start_p, stop_p) is measured as a common-start TDC: a start hit is
// kept as the reference, and every stop hit that follows gives one interval
//     T = CC * T0 + t_f(start) - t_f(stop)
// with CC from the overflow-flag rule, until the next start replaces the
// reference. A start and a stop that reach the pairing logic in the same
// cycle (sampled by the same clock edge) are paired with each other.
// Results go to a readout buffer as 64-bit words
//     [63] pair, [62:61] overflow-flag case, [60:0] signed interval in fs
// which the processor reads over AXI4-Lite (see tdc_axi_ports). irq is high
// while the buffer holds a result.
//
// Timing: a hit sampled by reference-clock edge E reaches its interval
// calculator after edge E+3 and the buffer after edge E+5 (one more when
// both pairs finish in the same cycle: pair 0 is written first).
// The channel structure, the coarse counter with overflow flag, the
// interval equation and the two calibrations follow the document; the
// pairing of inputs, the result format, the buffer and the register map
// are this design's. The AXI port runs on the reference clock.
module tdc_soc_top #(
  parameter int unsigned NTAPS        = 96,
  parameter real         TAU_PS       = 62.5,
  parameter int unsigned SLOW_EVERY   = 0,
  parameter real         SLOW_PS      = 0.0,
  parameter int unsigned T0_FS        = 5_000_000,
  parameter int unsigned COARSE_BITS  = 14,
  parameter int unsigned RST_CYCLES   = 2,
  parameter int unsigned NOMINAL_TAPS = 80,
  parameter int unsigned HIST_LOG2    = 14,
  parameter int unsigned FIFO_DEPTH   = 512
) (
  input  logic        clk_ref,
  input  logic        rst,
  input  logic        start1,
  input  logic        stop1,
  input  logic        start2,
  input  logic        stop2,
  input  logic [4:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [4:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  output logic        irq
);
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;

  localparam int unsigned NCH     = 4;
  localparam int unsigned NPAIR   = 2;
  localparam int unsigned NFW     = $clog2(NTAPS + 1);
  localparam int unsigned TF_BITS = 32;
  localparam int unsigned T_BITS  = 61;
  localparam int unsigned LVLW    = $clog2(FIFO_DEPTH) + 1;

  logic [NCH-1:0]          hits;
  logic [COARSE_BITS:0]    coarse;
  logic [NCH-1:0]          ch_valid;
  logic [NFW-1:0]          ch_nf     [NCH];
  logic [COARSE_BITS:0]    ch_coarse [NCH];
  logic [COARSE_BITS:0]    ch_coarse_d [NCH];
  logic [NCH-1:0]          tf_valid;
  logic [TF_BITS-1:0]      tf_fs     [NCH];
  logic [NCH-1:0]          ch_busy, ch_done;
  logic [NFW-1:0]          ch_kmax   [NCH];

  cal_mode_e               cal_mode;
  logic                    cal_start, buf_clear, buf_pop;
  logic [63:0]             buf_rd_data;
  logic                    buf_empty, buf_full, buf_overflow;
  logic [LVLW-1:0]         buf_level;
  logic [31:0]             drops;
  logic [63:0]             kmax_all;

  assign hits = {stop2, start2, stop1, start1};

  coarse_counter #(.COARSE_BITS(COARSE_BITS)) u_coarse (
    .clk   (clk_ref),
    .rst   (rst),
    .count (coarse)
  );

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    tdc_channel #(
      .NTAPS(NTAPS), .TAU_PS(TAU_PS), .SLOW_EVERY(SLOW_EVERY), .SLOW_PS(SLOW_PS),
      .COARSE_BITS(COARSE_BITS), .RST_CYCLES(RST_CYCLES)
    ) u_ch (
      .clk        (clk_ref),
      .rst        (rst),
      .hit        (hits[c]),
      .coarse     (coarse),
      .out_valid  (ch_valid[c]),
      .out_nf     (ch_nf[c]),
      .out_coarse (ch_coarse[c])
    );

    tdc_calibration #(
      .NTAPS(NTAPS), .T0_FS(T0_FS), .NOMINAL_TAPS(NOMINAL_TAPS),
      .HIST_LOG2(HIST_LOG2), .TF_BITS(TF_BITS)
    ) u_cal (
      .clk          (clk_ref),
      .rst          (rst),
      .cal_start    (cal_start),
      .cal_mode     (cal_mode),
      .hit_valid    (ch_valid[c]),
      .hit_code     (ch_nf[c]),
      .cal_busy     (ch_busy[c]),
      .cal_done     (ch_done[c]),
      .kmax         (ch_kmax[c]),
      .lk_valid     (ch_valid[c]),
      .lk_code      (ch_nf[c]),
      .lk_out_valid (tf_valid[c]),
      .lk_time_fs   (tf_fs[c])
    );

    // Align the coarse stamp with the one-cycle calibration lookup.
    always_ff @(posedge clk_ref) begin
      if (ch_valid[c]) ch_coarse_d[c] <= ch_coarse[c];
    end

    assign kmax_all[16*c +: 16] = 16'(ch_kmax[c]);
  end

  // Common-start pairing and interval calculation.
  logic [NPAIR-1:0]          ref_ok;
  logic [COARSE_BITS:0]      ref_coarse [NPAIR];
  logic [TF_BITS-1:0]        ref_tf     [NPAIR];
  logic [NPAIR-1:0]          iv_valid;
  logic signed [T_BITS-1:0]  iv_fs      [NPAIR];
  of_case_e                  iv_case    [NPAIR];
  logic [NPAIR-1:0]          pend;
  logic [63:0]               pend_word  [NPAIR];
  logic                      wr_en;
  logic [63:0]               wr_data;
  logic [NPAIR-1:0]          wr_sel;

  for (genvar p = 0; p < NPAIR; p++) begin : g_pair
    always_ff @(posedge clk_ref) begin
      if (rst) begin
        ref_ok[p]     <= 1'b0;
        ref_coarse[p] <= '0;
        ref_tf[p]     <= '0;
      end else if (tf_valid[2*p]) begin
        ref_ok[p]     <= 1'b1;
        ref_coarse[p] <= ch_coarse_d[2*p];
        ref_tf[p]     <= tf_fs[2*p];
      end
    end

    interval_calc #(
      .COARSE_BITS(COARSE_BITS), .T0_FS(T0_FS), .TF_BITS(TF_BITS), .T_BITS(T_BITS)
    ) u_iv (
      .clk         (clk_ref),
      .rst         (rst),
      .in_valid    (tf_valid[2*p+1] && (ref_ok[p] || tf_valid[2*p])),
      .ref_coarse  (tf_valid[2*p] ? ch_coarse_d[2*p] : ref_coarse[p]),
      .ref_tf_fs   (tf_valid[2*p] ? tf_fs[2*p]       : ref_tf[p]),
      .x_coarse    (ch_coarse_d[2*p+1]),
      .x_tf_fs     (tf_fs[2*p+1]),
      .out_valid   (iv_valid[p]),
      .interval_fs (iv_fs[p]),
      .of_case     (iv_case[p])
    );

    // One result may wait per pair while the other pair is written.
    always_ff @(posedge clk_ref) begin
      if (rst) begin
        pend[p]      <= 1'b0;
        pend_word[p] <= '0;
      end else begin
        if (wr_sel[p]) pend[p] <= 1'b0;
        if (iv_valid[p]) begin
          pend[p]      <= 1'b1;
          pend_word[p] <= {1'(p), iv_case[p], iv_fs[p]};
        end
      end
    end
  end

  // Pair 0 has priority for the buffer's single write port.
  always_comb begin
    wr_sel = '0;
    if (pend[0])      wr_sel[0] = 1'b1;
    else if (pend[1]) wr_sel[1] = 1'b1;
  end
  assign wr_en   = |wr_sel;
  assign wr_data = wr_sel[0] ? pend_word[0] : pend_word[1];

  readout_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_buf (
    .clk      (clk_ref),
    .rst      (rst),
    .clear    (buf_clear),
    .wr_en    (wr_en),
    .wr_data  (wr_data),
    .rd_en    (buf_pop),
    .rd_data  (buf_rd_data),
    .empty    (buf_empty),
    .full     (buf_full),
    .level    (buf_level),
    .overflow (buf_overflow)
  );

  always_ff @(posedge clk_ref) begin
    if (rst || buf_clear) drops <= '0;
    else if (buf_overflow) drops <= drops + 1'b1;
  end

  assign irq = !buf_empty;

  tdc_axi_ports #(.LEVEL_BITS(LVLW)) u_axi (
    .aclk          (clk_ref),
    .aresetn       (!rst),
    .s_axi_awaddr  (s_axi_awaddr),
    .s_axi_awvalid (s_axi_awvalid),
    .s_axi_awready (s_axi_awready),
    .s_axi_wdata   (s_axi_wdata),
    .s_axi_wstrb   (s_axi_wstrb),
    .s_axi_wvalid  (s_axi_wvalid),
    .s_axi_wready  (s_axi_wready),
    .s_axi_bresp   (s_axi_bresp),
    .s_axi_bvalid  (s_axi_bvalid),
    .s_axi_bready  (s_axi_bready),
    .s_axi_araddr  (s_axi_araddr),
    .s_axi_arvalid (s_axi_arvalid),
    .s_axi_arready (s_axi_arready),
    .s_axi_rdata   (s_axi_rdata),
    .s_axi_rresp   (s_axi_rresp),
    .s_axi_rvalid  (s_axi_rvalid),
    .s_axi_rready  (s_axi_rready),
    .cal_mode      (cal_mode),
    .cal_start     (cal_start),
    .buf_clear     (buf_clear),
    .buf_pop       (buf_pop),
    .buf_data      (buf_rd_data),
    .buf_empty     (buf_empty),
    .buf_full      (buf_full),
    .buf_level     (buf_level),
    .cal_busy      (|ch_busy),
    .cal_done      (&ch_done),
    .drops         (drops),
    .kmax_all      (kmax_all)
  );
endmodule
