`timescale 1ps/1ps
// tb_sp_scfc_configs: runs the three published single-phase configurations
// side by side on the same events and the same 2.5 ns clock:
//   #1: 4 phases of 39 taps (LSB 624 ps)
//   #2: 8 phases of 20 taps (LSB 320 ps)
//   #3: 16 phases of 10 taps (LSB 160 ps, the default)
//   #3s: as #3, with non-uniform taps (8..24 ps, fixed pattern)
// Every timestamp and its clock edge are compared with the model of
// tdc_tb_pkg, given the arrival time of every phase (the sum of its tap
// delays). A code-density test (histogram of the fine codes over events
// spread uniformly in time) then gives each bin's width as
// count / events * T_CLK; the test prints the bin widths and the mean LSB
// (T_CLK / number of bins) and checks that every bin is within 25 % of the
// width the tap delays predict. With non-uniform taps the bins stay close to
// 160 ps because every bin sums ten taps.
module tb_sp_scfc_configs;
  import tdc_tb_pkg::*;

  localparam int NC = 8;
  localparam longint TCLK = 2500, T0 = 1257;
  localparam int NEV = 10000;
  localparam int NCFG = 4;
  localparam int    CFG_NPH[NCFG] = '{4, 8, 16, 16};
  localparam int    CFG_DN[NCFG]  = '{39, 20, 10, 10};
  localparam int    CFG_SPR[NCFG] = '{0, 0, 0, 8};
  localparam string CFG_NAME[NCFG] = '{"#1", "#2", "#3", "#3s"};

  logic clk = 1'b0, rst_n = 1'b0, async_in = 1'b0;
  logic [NCFG-1:0] ts_valid;
  logic [NC+1:0] ts1;
  logic [NC+2:0] ts2;
  logic [NC+3:0] ts3, ts4;
  longint dly[NCFG][];
  longint got_ts[NCFG], got_edge[NCFG];
  int n_res[NCFG];
  int hist[NCFG][16];
  int checks = 0, failures = 0;

  sp_scfc_channel #(.NPH(4),  .DNTAP(39)) dut1 (.clk, .rst_n, .async_in, .ts_valid(ts_valid[0]), .ts(ts1));
  sp_scfc_channel #(.NPH(8),  .DNTAP(20)) dut2 (.clk, .rst_n, .async_in, .ts_valid(ts_valid[1]), .ts(ts2));
  sp_scfc_channel #(.NPH(16), .DNTAP(10)) dut3 (.clk, .rst_n, .async_in, .ts_valid(ts_valid[2]), .ts(ts3));
  sp_scfc_channel #(.NPH(16), .DNTAP(10), .SPREAD_PS(8)) dut4 (.clk, .rst_n, .async_in,
                                                             .ts_valid(ts_valid[3]), .ts(ts4));

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
    for (int k = 0; k < NCFG; k++)
      if (ts_valid[k]) begin
        n_res[k]++;
        got_ts[k]   = (k == 0) ? longint'(ts1) : (k == 1) ? longint'(ts2) :
                      (k == 2) ? longint'(ts3) : longint'(ts4);
        got_edge[k] = ($time - T0) / TCLK;
      end
  end

  initial begin
    longint t, lsb, exp_ts;
    longint off;
    real width, pred;
    // Arrival time of every phase: the sum of its taps, tap k lasting
    // 16 ps + ((37k) mod (2S+1)) - S.
    for (int k = 0; k < NCFG; k++) begin
      dly[k] = new[CFG_NPH[k]];
      for (int i = 0; i < CFG_NPH[k]; i++) begin
        dly[k][i] = 0;
        for (int j = 1; j <= i * CFG_DN[k]; j++)
          dly[k][i] += 16 + ((CFG_SPR[k] == 0) ? 0 : ((j * 37) % (2 * CFG_SPR[k] + 1)) - CFG_SPR[k]);
      end
    end
    #(T0 + 3 * TCLK + 100);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int ev = 0; ev < NEV; ev++) begin
      off = longint'($urandom_range(0, 2 * int'(TCLK)));
      if ((($time + off) & 1) != 0) off++;
      #(off);
      for (int k = 0; k < NCFG; k++) n_res[k] = 0;
      t = $time;
      async_in = 1'b1;
      repeat (5) @(posedge clk);
      async_in = 1'b0;
      repeat (3) @(posedge clk);
      for (int k = 0; k < NCFG; k++) begin
        lsb = longint'(CFG_DN[k]) * 16;
        exp_ts = expected_ts_dly(t, T0, TCLK, dly[k], NC, 4);
        checks++;
        if (n_res[k] != 1 || got_ts[k] != exp_ts ||
            got_edge[k] != first_edge_after(t + dly[k][CFG_NPH[k]-1], T0, TCLK) + 2) begin
          failures++;
          $display("config %s event %0d at %0d: %0d results, ts %0d expected %0d, edge %0d",
                   CFG_NAME[k], ev, t, n_res[k], got_ts[k], exp_ts, got_edge[k]);
        end
        // The uniform configurations agree with the closed-form model too.
        if (CFG_SPR[k] == 0) begin
          checks++;
          if (exp_ts != expected_ts(t, T0, TCLK, lsb, CFG_NPH[k], NC, 4)) begin
            failures++;
            $display("reference models disagree");
          end
        end
        hist[k][got_ts[k] % CFG_NPH[k]]++;
      end
    end
    // Code-density test.
    for (int k = 0; k < NCFG; k++) begin
      lsb = longint'(CFG_DN[k]) * 16;
      $write("config %s: %0d taps/phase, mean LSB %0.2f ps, bins (ps):", CFG_NAME[k],
             CFG_DN[k], real'(TCLK) / CFG_NPH[k]);
      for (int f = 0; f < CFG_NPH[k]; f++) begin
        width = real'(hist[k][f]) / NEV * TCLK;
        // Fine code f spans the gap between the arrivals of phases
        // NPH-f-1 and NPH-f; code 0 takes what the phases leave of the period.
        pred = (f == 0) ? real'(TCLK - dly[k][CFG_NPH[k]-1])
                        : real'(dly[k][CFG_NPH[k]-f] - dly[k][CFG_NPH[k]-f-1]);
        $write(" %0.0f", width);
        checks++;
        if (width < 0.75 * pred || width > 1.25 * pred) begin
          failures++;
          $display("\nconfig %s bin %0d: %0.1f ps, expected about %0.1f ps", CFG_NAME[k], f, width, pred);
        end
      end
      $display("");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
