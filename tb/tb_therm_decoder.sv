`timescale 1ps/1ps
// tb_therm_decoder: checks the thermometer-to-binary decoder.
//
// Random stored phase words are built as a phase-0 value b repeated over the
// lowest 16-f phases and its inverse over the top f phases, for every f. With
// the valid strobe high, the next edge must present {coarse, b, f}; with it
// low the output must hold and ts_valid stay low.
module tb_therm_decoder;

  localparam int NC = 8, NPH = 16, FW = 4;

  logic clk = 1'b0, rst_n = 1'b0, vl = 1'b0;
  logic [NPH-1:0] qs = '0;
  logic [NC-2:0] cs = '0;
  logic ts_valid;
  logic [NC+FW-1:0] ts, exp_ts;
  int checks = 0, failures = 0;
  int seen[NPH];

  therm_decoder dut (.clk(clk), .rst_n(rst_n), .valid_last(vl), .q_s(qs),
                     .coarse_s(cs), .ts_valid(ts_valid), .ts(ts));

  always #1250 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f;
    logic b;
    @(posedge clk); #1;
    rst_n = 1'b1;
    exp_ts = '0;
    repeat (600) begin
      f  = $urandom_range(0, NPH - 1);
      b  = 1'($urandom);
      cs = 7'($urandom);
      qs = '0;
      for (int i = 0; i < NPH; i++) qs[i] = (i >= NPH - f) ? ~b : b;
      vl = ($urandom_range(0, 2) != 0);
      @(posedge clk); #1;
      checks++;
      if (ts_valid !== vl) begin failures++; $display("ts_valid %b expected %b", ts_valid, vl); end
      if (vl) begin
        exp_ts = {cs, b, 4'(f)};
        seen[f]++;
      end
      checks++;
      if (ts !== exp_ts) begin failures++; $display("ts %h expected %h", ts, exp_ts); end
    end
    for (int i = 0; i < NPH; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("fine %0d never tested", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
