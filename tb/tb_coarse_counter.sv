`timescale 1ps/1ps
// tb_coarse_counter: checks that the 7-bit coarse counter, fed by the real
// toggle flip-flop, forms with it an 8-bit binary count of clock cycles that
// wraps after 256 cycles. The expected count is kept as a plain integer.
module tb_coarse_counter;

  localparam int NC = 8;

  logic clk = 1'b0, rst_n = 1'b0, q;
  logic [NC-2:0] coarse;
  int checks = 0, failures = 0, wraps = 0;
  int unsigned n;

  scfc_tff u_tff (.clk(clk), .rst_n(rst_n), .q(q));
  coarse_counter dut (.clk(clk), .rst_n(rst_n), .tff_q(q), .coarse(coarse));

  always #1250 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if ({coarse, q} !== '0) begin failures++; $display("count not cleared"); end
    rst_n = 1'b1;
    n = 0;
    repeat (600) begin
      @(posedge clk); #1;
      n++;
      if (n % (1 << NC) == 0) wraps++;
      checks++;
      if ({coarse, q} !== NC'(n)) begin
        failures++;
        $display("cycle %0d: count %0d", n, {coarse, q});
      end
    end
    checks++;
    if (wraps < 2) begin failures++; $display("count did not wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
