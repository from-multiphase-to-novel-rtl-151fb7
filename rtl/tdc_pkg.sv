`timescale 1ps/1ps
// tdc_pkg: constants and a width helper shared by the single-phase shift-clock
// fast-counter TDC (SP-SCFC-TDC).
//
// The defaults describe the highest-resolution configuration of the design
// (16 phases, 10 delay-line taps per phase, 8-bit cycle count, 2.5 ns clock).
// The phase count is derived here as T_CLK / LSB = 2500 ps / 156.125 ps ~ 16;
// the tap step, tap count, tap delay, clock period and counter width are the
// design's published numbers. The channel count (32) is the number that fits
// the smaller target FPGA in this configuration.
package tdc_pkg;

  // Cycle counter width N_C: (N_C-1)-bit coarse counter plus the TFF bit.
  parameter int unsigned N_C        = 8;
  // Number of sampling phases (delayed copies of the event).
  parameter int unsigned N_PH       = 16;
  // Delay-line taps between two consecutive phases.
  parameter int unsigned DELTA_NTAP = 10;
  // Total delay-line length in taps (4 taps per carry-chain element).
  parameter int unsigned N_TAP      = 256;
  // Nominal propagation delay of one tap, in picoseconds.
  parameter int unsigned TP_PS      = 16;
  // Clock period T_CLK in picoseconds.
  parameter int unsigned TCLK_PS    = 2500;
  // Number of channels of the multichannel converter.
  parameter int unsigned N_CH       = 32;

  // Width of the binary fine field.
  function automatic int unsigned fine_w(int unsigned nph);
    return (nph > 1) ? $clog2(nph) : 1;
  endfunction

endpackage
