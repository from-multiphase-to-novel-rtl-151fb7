`timescale 1ps/1ps
// coarse_sampler: the (N_C-1)-bit sampler of the coarse counter.
//
// N_C-1 flip-flops that capture the coarse count on the clock edge that ends
// the Valid_0 cycle of phase 0, i.e. on the same edge on which phase 0 stores
// the TFF state. The captured pair {coarse_s, Q_0 sampled} is the cycle count
// at the edge where phase 0 first saw the event. The value is held until the
// next event.
//
// Interface: clk, rst_n (synchronous, active low), valid0 (Valid_0 of phase
// 0), coarse (running count), coarse_s (captured count). Timing: one edge.
// Following the design: capture of the coarse count when Valid_0 = 1. The
// reset is this implementation's own.
module coarse_sampler #(
  parameter int unsigned NC = tdc_pkg::N_C
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid0,
  input  logic [NC-2:0] coarse,
  output logic [NC-2:0] coarse_s
);

  always_ff @(posedge clk) begin
    if (!rst_n)      coarse_s <= '0;
    else if (valid0) coarse_s <= coarse;
  end

endmodule
