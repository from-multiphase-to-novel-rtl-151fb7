`timescale 1ps/1ps
// tb_coarse_sampler: checks that the coarse sampler captures the running
// count exactly on the edges where Valid_0 is high and holds it otherwise.
module tb_coarse_sampler;

  logic clk = 1'b0, rst_n = 1'b0, v = 1'b0;
  logic [6:0] c = '0, cs, model;
  int checks = 0, failures = 0, captures = 0;

  coarse_sampler dut (.clk(clk), .rst_n(rst_n), .valid0(v), .coarse(c), .coarse_s(cs));

  always #1250 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    checks++;
    if (cs !== '0) begin failures++; $display("not cleared"); end
    rst_n = 1'b1;
    model = '0;
    repeat (500) begin
      c = 7'($urandom);
      v = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (v) begin model = c; captures++; end
      #1;
      checks++;
      if (cs !== model) begin failures++; $display("coarse_s %0d expected %0d", cs, model); end
    end
    checks++;
    if (captures == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
