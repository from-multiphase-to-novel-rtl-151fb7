`timescale 1ps/1ps
// tb_scfc_tff: checks the toggle flip-flop: cleared by reset, then inverted on
// every clock edge, for a random number of cycles, with reset re-applied
// twice in between.
module tb_scfc_tff;

  logic clk = 1'b0, rst_n = 1'b0, q;
  logic model;
  int checks = 0, failures = 0;

  scfc_tff dut (.clk(clk), .rst_n(rst_n), .q(q));

  always #1250 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++) begin
      rst_n = 1'b0;
      @(posedge clk); #1;
      checks++;
      if (q !== 1'b0) begin failures++; $display("q not cleared by reset"); end
      model = 1'b0;
      rst_n = 1'b1;
      repeat ($urandom_range(5, 40)) begin
        @(posedge clk); #1;
        model = ~model;
        checks++;
        if (q !== model) begin failures++; $display("q=%b expected %b", q, model); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
