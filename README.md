# Single-phase shift-clock fast-counter TDC

A time-to-digital converter (TDC) gives each input event a timestamp. A
counter on the system clock gives the clock cycle; the fine resolution inside
that cycle comes from somewhere else. The classic multichannel FPGA approach
is the *multiphase* shift-clock fast counter: several copies of the clock,
each shifted in phase, all sample the event. The resolution is then the
clock period divided by the number of phases. That is limited by how many
clock nets and PLL outputs the device has, and by the skew between those
clocks.

This design turns that around. It has **one clock** and shifts the **event**
instead. Each channel sends its input down a tapped delay line (on a 7-series
FPGA, a chain of carry primitives). A copy is taken every `DNTAP` taps, and
all copies are sampled by identical synchronous samplers on the same clock.
So the resolution is set by the tap step, `LSB = DNTAP * t_p`, and no longer
by the clock resources. Because every sampler has two flip-flops of
synchronisation, the metastability exposure of a plain delay-line TDC is
avoided too.

Default configuration: one 2.5 ns clock, 16 phases of 10 taps (nominal
160 ps, 156.25 ps on average), an 8-bit cycle count (640 ns range), and 32
channels.

## How one measurement works

Each channel holds:

* `tdl_carry_chain`: the delay line. Phase output `del_async[i]` is the event
  delayed by `i * DNTAP` taps.
* `scfc_tff`: a single toggle flip-flop. It inverts on every clock edge, so
  its state `Q` says whether the current cycle is odd or even.
* `coarse_counter`: a 7-bit counter that advances whenever the TFF wraps from
  1 to 0. `{coarse, Q}` is an 8-bit count of clock cycles.
* 16 × `phase_sampler`: one per phase.
* `coarse_sampler` and `therm_decoder`.

Take an event that rises at time `t`, with clock edge `k` the first edge after
`t`:

1. **Synchronise.** Each phase sampler registers its delayed copy (`Sync_i`)
   and registers it once more (`OldSync_i`). `Valid_i = Sync_i & ~OldSync_i`
   is high for exactly one cycle after the first edge that sees the copy.
2. **Store the TFF.** On the edge that ends the `Valid_i` cycle, sampler `i`
   stores the TFF state (`q_s[i]`) and a delayed copy of `Valid_i`. Phase 0
   is caught by edge `k`. The coarse sampler captures the coarse count on the
   same edge as phase 0, so `{coarse_s, q_s[0]}` is the cycle count right
   after edge `k`.
3. **Which phases made it.** The copies that reach their samplers before
   edge `k` are caught by edge `k`. The later copies are caught by edge
   `k+1`, when the TFF has already inverted. The stored word, XORed with
   `q_s[0]`, is a thermometer code:

       phase:    15 14 13 12 11 ... 3 2 1 0
       q_s^q0:    1  1  1  0  0 ... 0 0 0 0    -> fine = 3

   `fine` is the number of phases caught one edge late. An event that
   arrives later within the clock cycle leaves fewer copies ahead of edge
   `k`, so a larger `fine` means a later event.
4. **Timestamp.** When the last phase's stored `Valid` appears, the decoder
   registers

       ts = {coarse_s, q_s[0], fine}  =  cycle_count * NPH + fine

   in units of `T_CLK / NPH`. The last phase is always the last to be
   caught, so all the other phases have settled by then.

The total span of the tapped phases, `(NPH-1) * LSB`, must be less than one
clock period. The whole line, `NPH * LSB`, should be about one clock period.
With 16 × 160 ps = 2.56 ns against a 2.5 ns clock, fine code 0 covers only
the part of the cycle the other 15 bins leave (100 ps). Averaged over a
cycle, the LSB is `T_CLK / NPH = 156.25 ps`.

### Latency and input rules

* `ts_valid` is a one-cycle pulse. It rises on edge `k+2`, or on edge `k+3`
  when the delay line straddles the next edge. With the default sizes
  that is nearly always the case.
* An event is a rising edge. The input must be low for at least two cycles
  before it. It must stay high for at least two cycles after it, plus the
  length of the delay line. An assertion in every phase sampler reports an
  event that is gone one edge after it was first seen. Back-to-back events
  closer than about 5 cycles on one channel are not supported.
* The cycle count wraps every `2^NC` cycles (640 ns). Only differences of
  timestamps that are less than that apart have meaning. A host unwraps
  longer intervals.
* All channels are cleared by the same synchronous `rst_n` and run from the
  same clock. Their counts are therefore identical, and the timestamps of
  different channels can be subtracted directly.

## Configurations

The resolution is a parameter choice: `DNTAP` sets the tap step, and `NPH`
must be a power of two with `NPH * DNTAP * t_p ≈ T_CLK`.

| name | `NPH` | `DNTAP` | nominal LSB | mean LSB (`T_CLK/NPH`) |
|------|-------|---------|-------------|------------------------|
| #1   | 4     | 39      | 624 ps      | 625 ps                 |
| #2   | 8     | 20      | 320 ps      | 312.5 ps               |
| #3 (default) | 16 | 10  | 160 ps      | 156.25 ps              |

The published channel counts for #3 are 32 on an Artix-7 35T and 112 on an
Artix-7 100T. The default `NCH = 32` is the smaller of the two.

## Files

| file | contents |
|------|----------|
| `rtl/tdc_pkg.sv` | default sizes (`N_C`, `N_PH`, `DELTA_NTAP`, `N_TAP`, `TP_PS`, `TCLK_PS`, `N_CH`) and `fine_w()` |
| `rtl/sp_scfc_tdc.sv` | top: `NCH` channels, parallel outputs `ts_valid[NCH]`, `ts[NCH]` |
| `rtl/sp_scfc_channel.sv` | one channel |
| `rtl/tdl_carry_chain.sv` | delay line, **behavioural model** |
| `rtl/scfc_tff.sv`, `rtl/coarse_counter.sv` | TFF and 7-bit coarse counter |
| `rtl/phase_sampler.sv`, `rtl/coarse_sampler.sv` | samplers |
| `rtl/therm_decoder.sv` | thermometer-to-binary decoder and timestamp register |
| `tb/tdc_tb_pkg.sv` | ideal reference model used by the channel-level testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_sp_scfc_configs` |

Top-level ports of `sp_scfc_tdc`: `clk`, `rst_n` (synchronous, active low),
`async_in[NCH]`, `ts_valid[NCH]`, and `ts[NCH][NC+log2(NPH)-1:0]` (12 bits by
default).

## The delay line is a model

`tdl_carry_chain` is not synthesizable. It gives each phase output a
transport delay equal to the sum of the tap delays in front of it. By default
every tap is 16 ps. With `SPREAD_PS > 0`, tap `k` gets a fixed deviation of
`((37k) mod (2·SPREAD_PS+1)) − SPREAD_PS` ps. This is a simple way to
exercise non-uniform taps. It does not reproduce measured carry-chain
statistics, where single taps range from about 1 ps to about 50 ps. Summing
many taps per phase averages those differences out, which is why the design
works without calibration.

For an FPGA build, replace this module with a cascade of carry primitives:
64 CARRY4 for 256 taps, with the event on the carry input, and
`del_async[i]` taken from carry output `i*DNTAP`. Keep the same ports. The
chain must be placed in one column. Everything else is plain synchronous
logic.

Synthesis ignores the model's delays. All phases then collapse onto the
input and the identical samplers behind them are merged, so synthesized area
numbers mean nothing until the real carry chain is in place.

The model starts with all taps low, so `async_in` must start low. The
simulation has no metastability. Real synchronisers resolve it, but the
testbenches cannot show that.

## Choices made in this implementation

The overall structure follows the published architecture: a delay line per
channel, one TFF and one coarse counter on the single clock, identical
Sync/OldSync/Valid samplers, a coarse sampler triggered by phase 0, and a
decoder. The following are this implementation's own choices:

* **Phase count.** The number of phases of the single-phase design is
  derived as `T_CLK / LSB`: 16, 8 and 4 for the three configurations.
* **Coarse counter clocking.** The counter runs on the single clock but only
  advances while the TFF is 1. This is equivalent to a counter on a clock of
  twice the period. The range is `2^NC · T_CLK` = 640 ns.
* **Stored TFF value.** It is written only during `Valid_i` and held
  otherwise. The stored `Valid_i` is its one-cycle-delayed copy.
* **Decoder.** XOR-and-count (ones count). It also tolerates bubbles. An
  assertion flags codes that are not clean thermometer codes.
* **Outputs.** The output is registered, with a one-cycle strobe per
  channel, laid out as `{coarse, TFF, fine}`.
* **Phase 0 tap.** Phase 0 is taken at the input of the line. Any constant
  offset cancels in timestamp differences.
* **Reset.** Every register has a synchronous active-low reset.
* **No readout path.** There is no FIFO, serialiser or host link. Each
  channel presents its timestamp in parallel, and collecting them is left to
  the integrator.

## Simulation

Every file sets `` `timescale 1ps/1ps ``. The delay line needs `--timing`.
Example, end-to-end test of the full 32-channel converter:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/tdc_pkg.sv tb/tdc_tb_pkg.sv tb/tb_sp_scfc_tdc.sv \
        --top-module tb_sp_scfc_tdc -o sim
    ./obj_dir/sim

Each testbench ends with `TB_RESULT checks=N failures=M`.

* `tb_sp_scfc_tdc`: all 32 channels at default sizes. Channel 0 is driven by
  a pulse source and the other channels by fixed "cable" delays of up to
  4 ns. The test runs 300 pulses. Every timestamp and the clock edge it
  appears on are compared with an ideal model. Measured channel-to-channel
  delays are checked against the cable delays (within two bins). The test
  requires that every fine code occurs on every channel, that both latencies
  occur, and that the count wraps.
* `tb_sp_scfc_configs`: configurations #1, #2 and #3 on the same events,
  plus a fourth channel like #3 but with non-uniform taps (8 to 24 ps each).
  It checks every timestamp against a model that knows each phase's arrival
  time. It then runs a code-density test over 10,000 events. Each bin must be
  within 25 % of the width the taps predict, and the test prints the bin
  widths.
* `tb_sp_scfc_channel`: one channel, 400 events.
* Module tests: `tb_tdl_carry_chain` (phase arrival times, including with
  tap spread), `tb_scfc_tff`, `tb_coarse_counter`, `tb_phase_sampler`,
  `tb_coarse_sampler` and `tb_therm_decoder`.

All testbenches simulate in seconds. The 32-channel one is dominated by its
C++ build, which takes about half a minute.

## Limits of what is verified

* Time resolution, DNL/INL, precision and temperature drift are properties
  of the physical carry chain. They are not modelled. The simulated code
  density only shows that the logic turns a delay line into the expected
  bins.
* Metastability and the synchroniser MTBF are not simulated.
* Event pile-up on one channel (events closer than the input rules allow) is
  not handled and not tested.
