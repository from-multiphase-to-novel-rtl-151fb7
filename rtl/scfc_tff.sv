`timescale 1ps/1ps
// scfc_tff: the 1-bit fine counter of a single-phase SCFC-TDC channel.
//
// A toggle flip-flop with its T input tied high: Q inverts on every rising
// edge of the channel clock, so it marks whether the current clock cycle is
// even or odd. All phase samplers of the channel store this one Q; a phase
// that is caught one clock edge later than phase 0 stores the opposite value,
// which is what builds the thermometric fine code.
//
// Interface: clk (T_CLK), rst_n (synchronous, active low, clears Q), q.
// Timing: q changes one clock edge after each edge, no other latency.
// Following the design: one TFF per channel on the single clock. The reset is
// this implementation's own addition.
module scfc_tff (
  input  logic clk,
  input  logic rst_n,
  output logic q
);

  always_ff @(posedge clk) begin
    if (!rst_n) q <= 1'b0;
    else        q <= ~q;
  end

endmodule
