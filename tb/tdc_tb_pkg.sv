`timescale 1ps/1ps
// tdc_tb_pkg: reference model shared by the testbenches of the SP-SCFC-TDC.
//
// It predicts what an ideal channel must report for an event, from times
// alone: the clock has rising edges at T0 + n*TCLK, counting starts at the
// first rising edge after reset release (that edge is number 1), and phase i
// of the event sees it at t + i*LSB. Phase 0 is caught by the first edge
// after t (edge k0); every phase whose copy arrives before edge k0 is caught
// there, the rest one edge later. The expected timestamp in LSB units is
//     ts = k0 * NPH + (NPH - m)     (mod 2^NC * NPH)
// where m is the number of phases caught by edge k0 and edges are counted
// from the reset release. The result is ready two edges after the edge that
// catches the last phase.
package tdc_tb_pkg;

  // Index of the first rising edge strictly after time t (edges at t0 + n*tclk).
  function automatic longint first_edge_after(longint t, longint t0, longint tclk);
    if (t < t0) return 0;
    return (t - t0) / tclk + 1;
  endfunction

  // Expected timestamp; ecount0 is the index of the edge that counts 1.
  function automatic longint expected_ts(longint t, longint t0, longint tclk,
                                         longint lsb, int nph, int nc,
                                         longint ecount0);
    longint k0, e0, m, cnt;
    k0 = first_edge_after(t, t0, tclk);
    e0 = t0 + k0 * tclk;
    m  = 0;
    for (int i = 0; i < nph; i++) if (t + i * lsb < e0) m++;
    cnt = k0 - ecount0 + 1;
    return (cnt * nph + (nph - m)) % ((longint'(1) << nc) * nph);
  endfunction

  // Same with an arbitrary arrival time for every phase: dly[i] is the delay
  // of phase i behind the event (dly[0] = 0).
  function automatic longint expected_ts_dly(longint t, longint t0, longint tclk,
                                             input longint dly[], input int nc,
                                             longint ecount0);
    longint k0, e0, m, cnt;
    int nph;
    nph = dly.size();
    k0 = first_edge_after(t, t0, tclk);
    e0 = t0 + k0 * tclk;
    m  = 0;
    for (int i = 0; i < nph; i++) if (t + dly[i] < e0) m++;
    cnt = k0 - ecount0 + 1;
    return (cnt * nph + (nph - m)) % ((longint'(1) << nc) * nph);
  endfunction

  // Index of the edge on which ts_valid is first seen high.
  function automatic longint expected_valid_edge(longint t, longint t0, longint tclk,
                                                 longint lsb, int nph);
    return first_edge_after(t + (nph - 1) * lsb, t0, tclk) + 2;
  endfunction

endpackage
