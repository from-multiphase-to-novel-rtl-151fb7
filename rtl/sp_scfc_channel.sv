`timescale 1ps/1ps
// sp_scfc_channel: one channel of the single-phase shift-clock fast-counter
// time-to-digital converter (SP-SCFC-TDC).
//
// A multiphase SCFC-TDC gets its sub-clock resolution from several phase-
// shifted clocks. Here there is only one clock; the event itself is shifted
// instead. The event async_in runs down a tapped delay line and NPH copies of
// it, DNTAP taps apart, go to NPH identical phase samplers, all clocked by
// the same clock. Each sampler synchronises its copy with two flip-flops and,
// on the first edge that sees it, stores the state of a toggle flip-flop that
// inverts every cycle. Copies that reach the samplers before the next clock
// edge store one TFF value; the rest, caught an edge later, store the other.
// The decoder counts the latter (fine part) and appends it to the cycle count
// {coarse counter, TFF} captured with phase 0.
//
// Resolution: LSB = DNTAP * t_p (160 ps nominal for 10 taps of 16 ps), set
// by the tap step and not by the clock. NPH * LSB should cover one clock
// period. Full-scale range: 2^NC clock periods (640 ns).
//
// Interface: clk (T_CLK), rst_n (synchronous, active low), async_in (event,
// rising edge; low for at least two cycles before, high for at least two
// cycles after), ts_valid (one-cycle pulse), ts = {coarse, tff, fine}.
// Timing: ts_valid rises 2 or 3 clock edges after the first edge that sees
// the event (3 when the next edge falls within the span of the delay line).
// Following the design: the structure of the channel (delay line, one TFF and
// one coarse counter on the single clock, NPH samplers, coarse sampler,
// decoder) and all default sizes. This implementation's choices: the
// synchronous reset, the event handshake and the timestamp layout.
module sp_scfc_channel
  import tdc_pkg::*;
#(
  parameter int unsigned NC        = tdc_pkg::N_C,
  parameter int unsigned NPH       = tdc_pkg::N_PH,
  parameter int unsigned DNTAP     = tdc_pkg::DELTA_NTAP,
  parameter int unsigned NTAP      = tdc_pkg::N_TAP,
  parameter int unsigned TP        = tdc_pkg::TP_PS,
  parameter int unsigned SPREAD_PS = 0,
  localparam int unsigned FW       = tdc_pkg::fine_w(NPH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             async_in,
  output logic             ts_valid,
  output logic [NC+FW-1:0] ts
);

  logic [NPH-1:0] del_async;
  logic [NPH-1:0] valid, valid_s, q_s;
  logic           tff_q;
  logic [NC-2:0]  coarse, coarse_s;

  tdl_carry_chain #(
    .NTAP(NTAP), .DNTAP(DNTAP), .NPH(NPH), .TP(TP), .SPREAD_PS(SPREAD_PS)
  ) u_tdl (
    .async_in (async_in),
    .del_async(del_async)
  );

  scfc_tff u_tff (
    .clk  (clk),
    .rst_n(rst_n),
    .q    (tff_q)
  );

  coarse_counter #(.NC(NC)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .tff_q (tff_q),
    .coarse(coarse)
  );

  for (genvar i = 0; i < NPH; i++) begin : g_smp
    phase_sampler u_smp (
      .clk      (clk),
      .rst_n    (rst_n),
      .del_async(del_async[i]),
      .tff_q    (tff_q),
      .valid    (valid[i]),
      .valid_s  (valid_s[i]),
      .q_s      (q_s[i])
    );
  end

  coarse_sampler #(.NC(NC)) u_csmp (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid0  (valid[0]),
    .coarse  (coarse),
    .coarse_s(coarse_s)
  );

  therm_decoder #(.NC(NC), .NPH(NPH)) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_last(valid_s[NPH-1]),
    .q_s       (q_s),
    .coarse_s  (coarse_s),
    .ts_valid  (ts_valid),
    .ts        (ts)
  );

endmodule
