// AXI4-Lite slave port of the TDC peripheral: the processor's view of it.
//
// Registers (byte addresses, 32-bit):
//   0x00 CTRL    rw  [0] calibration mode (0 average, 1 bin-to-bin)
//                    [1] write 1: start a calibration (self-clearing)
//                    [2] write 1: empty the readout buffer (self-clearing)
//   0x04 STATUS  ro  [0] buffer empty, [1] buffer full, [2] calibration
//                    busy, [3] calibration done, [31:16] buffer level
//   0x08 DATA_LO ro  bits 31:0 of the oldest result
//   0x0C DATA_HI ro  bits 63:32 of the oldest result; reading it removes
//                    the result from the buffer (read DATA_LO first)
//   0x10 DROPS   ro  results lost because the buffer was full
//   0x14 KMAX    ro  Kmax of the last calibration, channel 0 in [15:0],
//                    channel 1 in [31:16]
//   0x18 KMAX_HI ro  the same for channels 2 and 3
// Other addresses read as 0 and answer SLVERR. Write strobes are honoured
// per byte for CTRL. A write is taken when address and data are both
// valid; the response follows one cycle later. A read answers one cycle
// after the address. The document names the port only; the register map
// is this design's.
module tdc_axi_ports #(
  parameter int unsigned LEVEL_BITS = 10
) (
  input  logic        aclk,
  input  logic        aresetn,
  // AXI4-Lite slave
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
  // TDC side
  output tdc_pkg::cal_mode_e    cal_mode,
  output logic                  cal_start,   // one-cycle pulse
  output logic                  buf_clear,   // one-cycle pulse
  output logic                  buf_pop,     // one-cycle pulse
  input  logic [63:0]           buf_data,
  input  logic                  buf_empty,
  input  logic                  buf_full,
  input  logic [LEVEL_BITS-1:0] buf_level,
  input  logic                  cal_busy,
  input  logic                  cal_done,
  input  logic [31:0]           drops,
  input  logic [63:0]           kmax_all
);
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;

  logic do_write, do_read;

  // Write channel: accept address and data together.
  assign s_axi_awready = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_wready  = s_axi_awready;
  assign do_write      = s_axi_awready;

  // Read channel: one outstanding read.
  assign s_axi_arready = !s_axi_rvalid;
  assign do_read       = s_axi_arvalid && s_axi_arready;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      s_axi_bvalid <= 1'b0;
      s_axi_bresp  <= AXI_OKAY;
      cal_mode     <= CAL_AVG;
      cal_start    <= 1'b0;
      buf_clear    <= 1'b0;
    end else begin
      cal_start <= 1'b0;
      buf_clear <= 1'b0;
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (do_write) begin
        s_axi_bvalid <= 1'b1;
        if ({s_axi_awaddr[4:2], 2'b00} == REG_CTRL) begin
          s_axi_bresp <= AXI_OKAY;
          if (s_axi_wstrb[0]) begin
            cal_mode  <= cal_mode_e'(s_axi_wdata[0]);
            cal_start <= s_axi_wdata[1];
            buf_clear <= s_axi_wdata[2];
          end
        end else begin
          s_axi_bresp <= AXI_SLVERR;
        end
      end
    end
  end

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
      s_axi_rresp  <= AXI_OKAY;
      buf_pop      <= 1'b0;
    end else begin
      buf_pop <= 1'b0;
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (do_read) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rresp  <= AXI_OKAY;
        unique case ({s_axi_araddr[4:2], 2'b00})
          REG_CTRL:    s_axi_rdata <= {31'd0, cal_mode};
          REG_STATUS:  s_axi_rdata <= {16'(buf_level), 12'd0, cal_done, cal_busy, buf_full, buf_empty};
          REG_DATA_LO: s_axi_rdata <= buf_data[31:0];
          REG_DATA_HI: begin
            s_axi_rdata <= buf_data[63:32];
            buf_pop     <= !buf_empty;
          end
          REG_DROPS:   s_axi_rdata <= drops;
          REG_KMAX:    s_axi_rdata <= kmax_all[31:0];
          REG_KMAX_HI: s_axi_rdata <= kmax_all[63:32];
          default: begin
            s_axi_rdata <= '0;
            s_axi_rresp <= AXI_SLVERR;
          end
        endcase
      end
    end
  end

  // Handshake rules of the slave side: a response stays valid until taken.
  a_bvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
endmodule
