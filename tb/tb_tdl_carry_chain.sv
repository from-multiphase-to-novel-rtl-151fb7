`timescale 1ps/1ps
// tb_tdl_carry_chain: checks the behavioural delay-line model.
//
// Two lines are driven by the same random steps: one with identical 16 ps
// taps, one with the fixed per-tap deviation pattern (5 ps spread). For every
// rising and falling step each phase output must still hold its old value
// 1 ps before its computed arrival time and the new value 1 ps after it. The
// arrival time of phase i is the sum of the delays of taps 1 .. i*10.
module tb_tdl_carry_chain;

  localparam int NTAP = 256, DN = 10, NPH = 16, TP = 16, SPR = 5;

  logic a = 1'b0;
  logic [NPH-1:0] d_ideal, d_spread;
  int checks = 0, failures = 0;
  longint arr_ideal[NPH], arr_spread[NPH];

  tdl_carry_chain dut_ideal (.async_in(a), .del_async(d_ideal));
  tdl_carry_chain #(.SPREAD_PS(SPR)) dut_spread (.async_in(a), .del_async(d_spread));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Walks forward 1 ps at a time from the step and checks every output
  // 1 ps before and 1 ps after its arrival time.
  task automatic check_after_step(input logic v);
    for (longint dt = 0; dt <= arr_spread[NPH-1] + 2 || dt <= arr_ideal[NPH-1] + 2; dt++) begin
      for (int i = 0; i < NPH; i++) begin
        if (dt == arr_ideal[i] - 1 || dt == arr_ideal[i] + 1) begin
          checks++;
          if (d_ideal[i] !== ((dt > arr_ideal[i]) ? v : ~v)) begin
            failures++;
            $display("ideal phase %0d wrong at +%0d ps", i, dt);
          end
        end
        if (dt == arr_spread[i] - 1 || dt == arr_spread[i] + 1) begin
          checks++;
          if (d_spread[i] !== ((dt > arr_spread[i]) ? v : ~v)) begin
            failures++;
            $display("spread phase %0d wrong at +%0d ps", i, dt);
          end
        end
      end
      #1;
    end
  endtask

  initial begin
    for (int i = 0; i < NPH; i++) begin
      arr_ideal[i]  = longint'(i) * DN * TP;
      arr_spread[i] = 0;
      for (int k = 1; k <= i * DN; k++)
        arr_spread[i] += TP + ((k * 37) % (2 * SPR + 1)) - SPR;
    end
    // Phase 0 has no delay; its value is checked right after the step.
    for (int rep = 0; rep < 6; rep++) begin
      #($urandom_range(100, 5000));
      a = ~a;
      check_after_step(a);
    end
    checks++;
    if (arr_spread[NPH-1] == arr_ideal[NPH-1] && arr_spread[1] == arr_ideal[1]) begin
      failures++;
      $display("spread model has no effect");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
