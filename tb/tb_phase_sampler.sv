`timescale 1ps/1ps
// tb_phase_sampler: checks one phase sampler against the TFF it samples.
//
// The delayed event is raised at random times between clock edges. The first
// edge after the rise must start a one-cycle Valid pulse; on the edge that
// ends it, the stored TFF value must equal the TFF state that edge saw, and
// the stored Valid must follow one cycle later than Valid. The stored value
// must then hold while the input stays high, falls and stays low.
module tb_phase_sampler;

  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0, q;
  logic valid, valid_s, q_s;
  int checks = 0, failures = 0, ones = 0, zeros = 0;
  logic exp_q;

  scfc_tff u_tff (.clk(clk), .rst_n(rst_n), .q(q));
  phase_sampler dut (.clk(clk), .rst_n(rst_n), .del_async(d), .tff_q(q),
                     .valid(valid), .valid_s(valid_s), .q_s(q_s));

  initial begin
    #7;
    forever #1250 clk = ~clk;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    for (int ev = 0; ev < 200; ev++) begin
      repeat ($urandom_range(2, 5)) @(posedge clk);
      #($urandom_range(2, 2480));
      d = 1'b1;
      // Before the next edge nothing has happened yet.
      expect1(valid == 1'b0, "valid before the catching edge");
      @(posedge clk); #1;                      // catching edge k
      expect1(valid == 1'b1, "valid not raised by the first edge");
      expect1(valid_s == 1'b0, "valid_s too early");
      exp_q = q;                               // TFF state after edge k
      @(posedge clk); #1;                      // edge k+1
      expect1(valid == 1'b0, "valid longer than one cycle");
      expect1(valid_s == 1'b1, "valid_s missing");
      expect1(q_s == exp_q, "stored TFF value wrong");
      if (exp_q) ones++; else zeros++;
      repeat (2) @(posedge clk);
      #1 expect1(valid_s == 1'b0 && q_s == exp_q, "stored value not held while high");
      #300 d = 1'b0;
      repeat (3) @(posedge clk);
      #1 expect1(valid == 1'b0 && valid_s == 1'b0 && q_s == exp_q,
                 "falling edge disturbed the sampler");
    end
    expect1(ones > 0 && zeros > 0, "both TFF values stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
