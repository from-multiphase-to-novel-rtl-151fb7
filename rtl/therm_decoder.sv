`timescale 1ps/1ps
// therm_decoder: turns the sampled phases of a channel into a binary timestamp.
//
// Each phase sampler stores the TFF state of the clock edge that caught its
// delayed copy of the event. Phases caught by the same edge as phase 0 store
// the same value as phase 0; the later phases, caught one edge later, store the
// opposite value. XOR with phase 0 turns the stored word into a thermometer
// code whose number of ones, fine = 0 .. NPH-1, is the number of phases the
// next edge had to catch. An event that arrives later within the clock cycle
// leaves fewer phases ahead of the edge, so fine grows with the arrival time.
// The timestamp, in units of the LSB, is
//     ts = {coarse_s, q_s[0]} * NPH + fine
// i.e. the concatenation {coarse_s, q_s[0], fine}; NPH must be a power of two.
// Its range is 2^NC clock periods; it wraps around after that, and only the
// difference of two timestamps has meaning.
//
// Interface: clk, rst_n (synchronous, active low); valid_last (registered
// Valid of the last phase), q_s (stored TFF state of every phase), coarse_s
// (captured coarse count); ts_valid (one-cycle pulse), ts (timestamp).
// Timing: ts and ts_valid are registered, one edge after valid_last. The last
// phase is always the last to be caught, so all inputs are settled by then.
// Following the design: the decoder combines the coarse sample with the fine
// code after thermometer-to-binary conversion. This implementation's choices:
// the XOR-and-count conversion (which also tolerates bubbles in the code), the
// timestamp layout and the registered output. The assertion checks that the
// code is a clean thermometer code.
module therm_decoder #(
  parameter int unsigned NC  = tdc_pkg::N_C,
  parameter int unsigned NPH = tdc_pkg::N_PH,
  localparam int unsigned FW = tdc_pkg::fine_w(NPH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_last,
  input  logic [NPH-1:0]   q_s,
  input  logic [NC-2:0]    coarse_s,
  output logic             ts_valid,
  output logic [NC+FW-1:0] ts
);

  logic [NPH-1:0] therm;
  logic [FW-1:0]  fine;

  always_comb begin
    therm = q_s ^ {NPH{q_s[0]}};
    fine  = '0;
    for (int i = 0; i < NPH; i++) fine += FW'(therm[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ts_valid <= 1'b0;
      ts       <= '0;
    end else begin
      ts_valid <= valid_last;
      if (valid_last) ts <= {coarse_s, q_s[0], fine};
    end
  end

  initial begin
    if (NPH < 2 || (NPH & (NPH - 1)) != 0)
      $error("NPH = %0d must be a power of two", NPH);
  end

  // A clean thermometer code has its ones in one block at the top end.
  always_ff @(posedge clk) begin
    if (rst_n && valid_last)
      assert (therm == ~({NPH{1'b1}} >> fine))
        else $error("fine code %b is not a thermometer code", therm);
  end

endmodule
