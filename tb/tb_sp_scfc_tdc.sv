`timescale 1ps/1ps
// tb_sp_scfc_tdc: end-to-end test of the multichannel converter at its
// default sizes (32 channels, 16 phases, 10 taps of 16 ps, 8-bit cycle count).
//
// It reproduces the usual bench setup: one pulse generator drives channel 0
// directly and every other channel through a cable of its own fixed delay.
// For each pulse every channel must deliver exactly one timestamp, equal to
// the ideal model of tdc_tb_pkg and on the predicted clock edge. The test also
// checks the measured channel-to-channel delays against the cable delays, and
// keeps a code-density histogram of the fine codes. It counts the mechanisms
// of the design and fails if one never occurred: every fine code on every
// channel, an event whose delay line straddles a clock edge, one that does
// not, and wrap-around of the cycle count.
module tb_sp_scfc_tdc;
  import tdc_tb_pkg::*;

  localparam int NCH = 32, NC = 8, NPH = 16, FW = 4;
  localparam longint TCLK = 2500, T0 = 1257, LSB = 160;
  localparam int NEV = 300;
  localparam longint TSMOD = (longint'(1) << NC) * NPH;

  logic clk = 1'b0, rst_n = 1'b0;
  logic gen = 1'b0;
  logic [NCH-1:0] async_in;
  logic [NCH-1:0] ts_valid;
  logic [NCH-1:0][NC+FW-1:0] ts;

  int checks = 0, failures = 0;
  int straddle = 0, same_edge = 0, wraps = 0;
  int hist[NCH][NPH];
  longint cable[NCH];
  longint ecount0 = 4;

  // Per-channel capture of the results of the current pulse.
  int     n_pulses[NCH];
  longint got_ts[NCH], got_edge[NCH];

  sp_scfc_tdc dut (.clk(clk), .rst_n(rst_n), .async_in(async_in),
                   .ts_valid(ts_valid), .ts(ts));

  // Cables: channel 0 direct, the others delayed by an even number of ps.
  for (genvar c = 0; c < NCH; c++) begin : g_cable
    initial cable[c] = (c == 0) ? 0 : 2 * longint'($urandom_range(1, 2000));
    always @(gen) begin
      logic v;
      v = gen;
      #(cable[c]);
      async_in[c] = v;
    end
    initial async_in[c] = 1'b0;
  end

  initial begin
    #(T0 - TCLK / 2);
    forever #(TCLK / 2) clk = ~clk;
  end

  initial begin
    #(64'd100 * NEV * TCLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    for (int c = 0; c < NCH; c++)
      if (ts_valid[c]) begin
        n_pulses[c]++;
        got_ts[c]   = longint'(ts[c]);
        got_edge[c] = ($time - T0) / TCLK;
      end
  end

  initial begin
    longint t, tc, prev_ts0, diff, meas_ps;
    longint sum_err[NCH];
    int unsigned off;
    prev_ts0 = 0;
    for (int c = 0; c < NCH; c++) sum_err[c] = 0;
    #(T0 + 3 * TCLK + 100);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int ev = 0; ev < NEV; ev++) begin
      off = $urandom_range(0, 2 * int'(TCLK));
      if ((($time + off) & 1) != 0) off++;
      #(off);
      for (int c = 0; c < NCH; c++) n_pulses[c] = 0;
      t = $time;
      gen = 1'b1;
      // The longest cable plus the delay line plus the pipeline.
      repeat (6) @(posedge clk);
      gen = 1'b0;
      repeat (4) @(posedge clk);
      for (int c = 0; c < NCH; c++) begin
        tc = t + cable[c];
        checks++;
        if (n_pulses[c] != 1) begin
          failures++;
          $display("pulse %0d ch %0d: %0d timestamps", ev, c, n_pulses[c]);
          continue;
        end
        checks++;
        if (got_ts[c] != expected_ts(tc, T0, TCLK, LSB, NPH, NC, ecount0)) begin
          failures++;
          $display("pulse %0d ch %0d: ts %0d expected %0d", ev, c, got_ts[c],
                   expected_ts(tc, T0, TCLK, LSB, NPH, NC, ecount0));
        end
        checks++;
        if (got_edge[c] != expected_valid_edge(tc, T0, TCLK, LSB, NPH)) begin
          failures++;
          $display("pulse %0d ch %0d: result on edge %0d expected %0d", ev, c,
                   got_edge[c], expected_valid_edge(tc, T0, TCLK, LSB, NPH));
        end
        if (first_edge_after(tc + (NPH - 1) * LSB, T0, TCLK) != first_edge_after(tc, T0, TCLK))
          straddle++;
        else
          same_edge++;
        hist[c][got_ts[c] % NPH]++;
        // Channel-to-channel delay: within two bins of the cable delay.
        diff = (got_ts[c] - got_ts[0] + TSMOD) % TSMOD;
        meas_ps = diff * TCLK / NPH;
        sum_err[c] += meas_ps - cable[c];
        checks++;
        if (meas_ps - cable[c] > 2 * LSB || cable[c] - meas_ps > 2 * LSB) begin
          failures++;
          $display("pulse %0d ch %0d: measured delay %0d ps, cable %0d ps", ev, c,
                   meas_ps, cable[c]);
        end
      end
      if (got_ts[0] < prev_ts0) wraps++;
      prev_ts0 = got_ts[0];
    end
    for (int c = 0; c < NCH; c++)
      for (int f = 0; f < NPH; f++) begin
        checks++;
        if (hist[c][f] == 0) begin
          failures++;
          $display("ch %0d: fine code %0d never occurred", c, f);
        end
      end
    checks++;
    if (straddle == 0) begin failures++; $display("no delay line straddled an edge"); end
    checks++;
    if (same_edge == 0) begin failures++; $display("no delay line fitted between edges"); end
    checks++;
    if (wraps == 0) begin failures++; $display("cycle count never wrapped"); end
    $display("pulses %0d x %0d channels: straddling %0d, within one cycle %0d, wraps %0d",
             NEV, NCH, straddle, same_edge, wraps);
    $write("code density, channel 0:");
    for (int f = 0; f < NPH; f++) $write(" %0d", hist[0][f]);
    $display("");
    $display("mean delay error ch1 %0d ps, ch%0d %0d ps", sum_err[1] / NEV, NCH - 1,
             sum_err[NCH-1] / NEV);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
