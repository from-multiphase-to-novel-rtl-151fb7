`timescale 1ps/1ps
// coarse_counter: the (N_C-1)-bit coarse counter of an SCFC-TDC channel.
//
// It runs on the same clock as the channel's toggle flip-flop and counts the
// TFF's wrap-arounds: it advances on the edges where the TFF goes from 1 to 0.
// {coarse, tff_q} is therefore one N_C-bit binary count of clock cycles, with
// the TFF as its least significant bit (Nutt interpolation: a coarse counter
// beside a 1-bit fine counter). The full-scale range of a timestamp is
// 2^N_C clock periods (640 ns for N_C = 8 and T_CLK = 2.5 ns).
//
// Interface: clk, rst_n (synchronous, active low, clears the count), tff_q
// (present TFF state), coarse (count). Timing: coarse changes on the same
// edge as the TFF falls from 1 to 0.
// Following the design: width N_C-1 = 7 and the shared clock. This
// implementation's choice: the counter is enabled by the TFF state instead of
// running from a clock of twice the period, so the pair counts in step.
module coarse_counter #(
  parameter int unsigned NC = tdc_pkg::N_C
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tff_q,
  output logic [NC-2:0] coarse
);

  always_ff @(posedge clk) begin
    if (!rst_n)     coarse <= '0;
    else if (tff_q) coarse <= coarse + 1'b1;
  end

endmodule
