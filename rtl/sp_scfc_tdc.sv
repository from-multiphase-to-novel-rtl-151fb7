`timescale 1ps/1ps
// sp_scfc_tdc: multichannel single-phase SCFC time-to-digital converter.
//
// NCH independent channels (sp_scfc_channel), each with its own delay line,
// TFF, coarse counter, samplers and decoder, all on one clock. Because every
// channel is reset on the same edge and runs from the same clock, their cycle
// counts are identical, so timestamps of different channels can be subtracted
// directly: this is how channel-to-channel time differences are measured.
// Timestamps are presented in parallel, one valid strobe per channel; how they
// are collected and shipped to a host is left to the user.
//
// Interface: clk (T_CLK = 2.5 ns nominal), rst_n (synchronous, active low),
// async_in[NCH] (events), ts_valid[NCH], ts[NCH] (see sp_scfc_channel).
// Timing: as sp_scfc_channel, per channel.
// Following the design: channel replication on one clock, defaults of the
// highest-resolution configuration and a channel count that fits the smaller
// target FPGA. This implementation's choice: the parallel output.
module sp_scfc_tdc
  import tdc_pkg::*;
#(
  parameter int unsigned NCH       = tdc_pkg::N_CH,
  parameter int unsigned NC        = tdc_pkg::N_C,
  parameter int unsigned NPH       = tdc_pkg::N_PH,
  parameter int unsigned DNTAP     = tdc_pkg::DELTA_NTAP,
  parameter int unsigned NTAP      = tdc_pkg::N_TAP,
  parameter int unsigned TP        = tdc_pkg::TP_PS,
  parameter int unsigned SPREAD_PS = 0,
  localparam int unsigned FW       = tdc_pkg::fine_w(NPH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NCH-1:0]            async_in,
  output logic [NCH-1:0]            ts_valid,
  output logic [NCH-1:0][NC+FW-1:0] ts
);

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    sp_scfc_channel #(
      .NC(NC), .NPH(NPH), .DNTAP(DNTAP), .NTAP(NTAP), .TP(TP), .SPREAD_PS(SPREAD_PS)
    ) u_ch (
      .clk     (clk),
      .rst_n   (rst_n),
      .async_in(async_in[c]),
      .ts_valid(ts_valid[c]),
      .ts      (ts[c])
    );
  end

endmodule
