`timescale 1ps/1ps
// tdl_carry_chain: behavioural model of the tapped delay line of one channel.
//
// This is a behavioural model, not synthesizable logic. On the FPGA the line is
// a cascade of carry-chain primitives (four taps per primitive, so
// N_TAP = 4 * N_CARRY4); here every tap is a buffer with a fixed transport
// delay of TP_PS picoseconds plus an optional, repeatable per-tap deviation.
//
// The event input async_in enters tap 0. Phase output del_async[i] is taken
// at tap i*DELTA_NTAP, i.e. it is the input delayed by the sum of the delays
// of taps 1 .. i*DELTA_NTAP (transport delay, so pulses are never swallowed).
// The line starts empty (all taps low), so async_in must start low.
// Only the taps that feed a sampler are brought out, so two
// consecutive phases are DELTA_NTAP*TP_PS apart: that spacing is the LSB of
// the converter. The line must be long enough for the last phase, and in use
// its total length should exceed one clock period.
//
// Synthesis ignores the delays: every phase then collapses onto the input and
// the samplers behind them merge, so area figures of a channel built with this
// model understate the real one.
//
// Following the design: the carry-chain line, N_TAP = 256, DELTA_NTAP = 10 and
// t_p = 16 ps. This model's own choices: phase 0 taken at the line input, and
// the spread model (SPREAD_PS = 0 gives identical taps; otherwise tap k gets
// an extra delay of ((k*37) mod (2*SPREAD_PS+1)) - SPREAD_PS ps, a fixed
// pattern standing in for the measured tap-to-tap dispersion).
module tdl_carry_chain
  import tdc_pkg::*;
#(
  parameter int unsigned NTAP      = tdc_pkg::N_TAP,
  parameter int unsigned DNTAP     = tdc_pkg::DELTA_NTAP,
  parameter int unsigned NPH       = tdc_pkg::N_PH,
  parameter int unsigned TP        = tdc_pkg::TP_PS,
  parameter int unsigned SPREAD_PS = 0
) (
  input  logic           async_in,
  output logic [NPH-1:0] del_async
);

  // Delay of tap k (1 .. NTAP): the nominal delay plus the fixed deviation.
  function automatic int tap_delay(int k);
    if (SPREAD_PS == 0) return int'(TP);
    return int'(TP) + ((k * 37) % (2 * int'(SPREAD_PS) + 1)) - int'(SPREAD_PS);
  endfunction

  // Arrival time of the edge at tap n: the sum of the delays of taps 1 .. n.
  function automatic int line_delay(int n);
    int d = 0;
    for (int k = 1; k <= n; k++) d += tap_delay(k);
    return d;
  endfunction

  // Each phase output is the line input delayed by the sum of the taps in
  // front of it; the taps between two phase taps are not modelled one by one.
  assign del_async[0] = async_in;

  for (genvar i = 1; i < NPH; i++) begin : g_phase
    localparam int DLY = line_delay(i * int'(DNTAP));
    initial del_async[i] = 1'b0;
    always @(async_in) del_async[i] <= #(DLY) async_in;
  end

  initial begin
    if ((NPH - 1) * DNTAP > NTAP)
      $error("delay line too short: %0d taps for %0d phases of %0d taps", NTAP, NPH, DNTAP);
    if (SPREAD_PS >= TP)
      $error("tap spread %0d ps must stay below the tap delay %0d ps", SPREAD_PS, TP);
  end

endmodule
