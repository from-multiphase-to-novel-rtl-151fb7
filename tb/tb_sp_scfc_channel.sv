`timescale 1ps/1ps
// tb_sp_scfc_channel: self-checking test of one SP-SCFC-TDC channel at its
// default sizes (16 phases, 10 taps of 16 ps, 8-bit cycle count, 2.5 ns clock).
//
// Events are placed at random picosecond times (even, while clock edges fall
// on odd times, so no phase ever ties with an edge). For each event the
// timestamp and the clock edge on which ts_valid appears are compared with
// tdc_tb_pkg's ideal model. The run is long enough for the cycle count to wrap
// several times; it also counts how often every fine code occurred, how often
// the delay line straddled a clock edge, and how often the count wrapped, and
// fails if any of these never happened.
module tb_sp_scfc_channel;
  import tdc_tb_pkg::*;

  localparam int NC = 8, NPH = 16, FW = 4;
  localparam longint TCLK = 2500, T0 = 1257, LSB = 160;
  localparam int NEV = 400;

  logic clk = 1'b0, rst_n = 1'b0, async_in = 1'b0;
  logic ts_valid;
  logic [NC+FW-1:0] ts;

  int checks = 0, failures = 0;
  int fine_seen[NPH];
  int straddle = 0, wraps = 0;
  longint ecount0;

  sp_scfc_channel dut (.clk(clk), .rst_n(rst_n), .async_in(async_in),
                       .ts_valid(ts_valid), .ts(ts));

  initial begin
    #(T0 - TCLK / 2);
    forever #(TCLK / 2) clk = ~clk;
  end

  initial begin
    #(64'd1000 * NEV * TCLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint edge_now();
    return ($time - T0) / TCLK;
  endfunction

  initial begin
    longint t, exp_ts, exp_edge, got_edge, prev_ts;
    int unsigned off;
    prev_ts = 0;
    // Reset across three edges, release between edges 3 and 4.
    #(T0 + 3 * TCLK + 100);
    rst_n = 1'b1;
    ecount0 = 4;
    repeat (3) @(posedge clk);
    for (int ev = 0; ev < NEV; ev++) begin
      off = $urandom_range(0, 2 * int'(TCLK));
      if ((($time + off) & 1) != 0) off++;
      #(off);
      t = $time;
      async_in = 1'b1;
      exp_ts   = expected_ts(t, T0, TCLK, LSB, NPH, NC, ecount0);
      exp_edge = expected_valid_edge(t, T0, TCLK, LSB, NPH);
      if (first_edge_after(t + (NPH - 1) * LSB, T0, TCLK) != first_edge_after(t, T0, TCLK))
        straddle++;
      // Wait for the result.
      got_edge = -1;
      for (int c = 0; c < 8 && got_edge < 0; c++) begin
        @(posedge clk);
        #1;
        if (ts_valid) got_edge = edge_now();
      end
      checks++;
      if (got_edge != exp_edge) begin
        failures++;
        $display("event %0d at %0d ps: ts_valid on edge %0d, expected edge %0d",
                 ev, t, got_edge, exp_edge);
      end
      checks++;
      if (longint'(ts) != exp_ts) begin
        failures++;
        $display("event %0d at %0d ps: ts %0d, expected %0d", ev, t, ts, exp_ts);
      end
      fine_seen[ts[FW-1:0]]++;
      if (longint'(ts) < prev_ts) wraps++;
      prev_ts = longint'(ts);
      // ts_valid is a single-cycle pulse.
      @(posedge clk);
      #1;
      checks++;
      if (ts_valid) begin
        failures++;
        $display("event %0d: ts_valid longer than one cycle", ev);
      end
      // Keep the input high, then low, long enough for the samplers.
      repeat (2) @(posedge clk);
      async_in = 1'b0;
      repeat (3) @(posedge clk);
    end
    for (int f = 0; f < NPH; f++) begin
      checks++;
      if (fine_seen[f] == 0) begin
        failures++;
        $display("fine code %0d never occurred", f);
      end
    end
    checks++;
    if (straddle == 0) begin failures++; $display("no event straddled a clock edge"); end
    checks++;
    if (wraps == 0) begin failures++; $display("the cycle count never wrapped"); end
    $display("events %0d, straddling %0d, wraps %0d", NEV, straddle, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
