`timescale 1ps/1ps
// phase_sampler: sampler of one phase of an SCFC-TDC channel.
//
// The delayed event del_async (DelAsync_i) is first synchronised by a flip-flop
// (Sync_i) and then resampled (OldSync_i). Valid_i = Sync_i & ~OldSync_i is
// high for exactly the one cycle after the first clock edge that sees the
// event. On the edge that ends that cycle the sampler stores the TFF state
// (q_s) and a registered copy of Valid_i (valid_s). q_s holds its value until
// the next event. Because the TFF toggles every cycle, q_s tells on which
// clock edge this phase caught the event.
//
// Interface: clk, rst_n (synchronous, active low), del_async, tff_q (the
// channel's TFF), valid (Valid_i, combinational), valid_s (Valid_i delayed
// one cycle), q_s (stored TFF state).
// Timing: if clock edge k is the first to see del_async high, Sync_i rises
// at edge k, valid is high from edge k to edge k+1, and q_s and valid_s are
// updated at edge k+1. del_async must stay low for two cycles before an event
// and high for two cycles after it.
// Following the design: the Sync/OldSync/Valid structure and the stored TFF
// state and Valid_i. This implementation's choices: q_s is written only while
// Valid_i is high and held otherwise; the reset.
module phase_sampler (
  input  logic clk,
  input  logic rst_n,
  input  logic del_async,
  input  logic tff_q,
  output logic valid,
  output logic valid_s,
  output logic q_s
);

  logic sync, old_sync;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync     <= 1'b0;
      old_sync <= 1'b0;
      valid_s  <= 1'b0;
      q_s      <= 1'b0;
    end else begin
      sync     <= del_async;
      old_sync <= sync;
      valid_s  <= valid;
      if (valid) q_s <= tff_q;
    end
  end

  assign valid = sync & ~old_sync;

  // Input rule: an event must still be high on the edge after it was first
  // seen, otherwise it was too short to be measured reliably.
  assert property (@(posedge clk) disable iff (!rst_n) valid |=> sync)
    else $error("event on del_async shorter than two clock cycles");

endmodule
