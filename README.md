# 25 ps CMOS time-to-digital converter

This converter measures the time between a rising edge on `start` and a rising edge
on `stop`. It covers intervals up to 4.775 ns in steps of 25 ps. It does not use a fast
counter. It uses one 1.25 GHz clock (period 800 ps), spread by a delay-locked loop
into 32 phases 25 ps apart, and splits the measurement into two parts:

* **fine part:** each input is sampled by 32 samplers, one on each phase. The result
  says where the edge fell inside the 800 ps period, to 25 ps.
* **coarse part:** a 5-bit shift register counts the whole periods between the two
  edges.

The output block combines the two parts:

    interval = periods * 800 ps + (START value - STOP value) * 25 ps

The design was first published as a 0.35 µm, 3.3 V mixed-signal circuit. This
repository gives its digital part as synthesizable SystemVerilog. The analog parts
(the delay-locked loop and the 500 ps buffers) are behavioural models, so the whole
converter can be simulated end to end.

## How 32 phases 25 ps apart are made from 100 ps gates

In a 0.35 µm process an inverter takes about 100 ps, so a chain of 25 ps delay cells
cannot be built. Each stage of the clock generator (`tdc_mpcg`) instead delays by
**half a period plus one step: 400 + 25 = 425 ps**.

Stage *k* lags stage 1 by (k-1)·425 ps. Modulo the 800 ps period, that is
(k-1)·25 ps, plus 400 ps when k-1 is odd. An extra 400 ps is the same as taking the
complementary output. So for each stage we take the true output or the complement,
whichever lands in the first half of the period. That gives 16 clocks 25 ps apart. The
16 other outputs fill the second half of the period. This is how the outputs map onto
`phase[j]`, where `phase[j]` rises j·25 ps after `phase[0]`:

| stage k | k-1 | true output | complement |
|---------|-----|-------------|------------|
| 1       | 0   | phase[0]    | phase[16]  |
| 2       | 1   | phase[17]   | phase[1]   |
| 3       | 2   | phase[2]    | phase[18]  |
| …       | …   | …           | …          |
| 16      | 15  | phase[31]   | phase[15]  |

The loop holds the stage delay at 425 ps. Sixteen stage delays are 6800 ps, which is
8.5 periods. So when the delay is right, the complement of stage 17 (φ17_b) rises
together with stage 1 (φ1). A phase detector compares these two edges. A charge pump
then moves the control voltage on the loop-filter capacitor, and that voltage sets the
delay of every stage. The chain has 19 stages: a dummy driven by the input clock, the
17 active stages, and a dummy after stage 17. The dummies give every active stage the
same load. `ref_clk` is `phase[0]` (φ1). It is the reference clock for the shift
register and for the codes.

Model details. These are choices made in this implementation:

* The stage delay is linear in the control voltage: 375 ps + 25 ps/V. It is 425 ps at
  2.0 V.
* The phase detector is bang-bang. On each rising edge of φ1 it samples φ17_b. High
  means φ17_b is early, so the loop asks for more delay; low means it asks for less.
  This is correct for any error under half a period, so the loop needs no start-up
  logic.
* The pump moves the control voltage by ±1 mV per cycle. It starts at 1.65 V and is
  clamped to 0–3.3 V.

After `dll_rst_n` the loop settles in about 400 input cycles (≈ 320 ns). Then it
dithers by a few mV. In simulation the worst phase error is under 2 ps. The bound
checked by the tests is 3 ps.

## Fine measurement: sampler, register, MUX ring, coder

`tdc_channel` is one START block or STOP block. Two identical copies are used.

1. **Sampler bunch** (`tdc_sampler_bank`, 32 × `tdc_sampler`). Sampler *k* samples the
   input on the rising edge of `phase[k]` and holds the result. In silicon, each
   sampler is a clocked sense amplifier that compares the input with a 1.65 V bias,
   followed by an R-S latch. After an input edge, the samplers whose clock has risen
   since the edge hold 1 and the others hold 0. The 32 outputs therefore form a
   *circular thermometer code*.
2. **Register block** (`tdc_capture_reg`). The samplers keep sampling. A copy of the
   input, delayed by 500 ps (`tdc_delay_buf`), clocks a 32-bit register that freezes
   the pattern shortly after the edge.
   * In the circuit, a sampler's output appears about 400 ps after its clock edge, so
     only the first few samplers show a 1 when the register is clocked.
   * The RTL samplers have no delay, so the stored run is 20 ones long.
   * The position of the run's first 1 is the same in both cases, and so is the result.
3. **MUX block** (`tdc_first_high`). This is a ring of 2:1 multiplexers. MUX *k* passes
   sampler *k* when sampler *k−1* is low, and passes ground when sampler *k−1* is high.
   MUX 0 looks at sampler 31. Only the first sampler of the run stays high, so the
   output is one-hot. This keeps the code well defined whatever the run length.
4. **Coding block** (`tdc_coder`). It encodes the one-hot word as 5 bits.

**What the 5-bit value means.** Say sampler *k* is the first one high. Then the edge
fell in the 25 ps before `phase[k]`. The code is **(32 − k) mod 32**: the number of
whole 25 ps steps from the edge to the *next* reference edge. The original text
contradicts itself here:

* In one place it reads the code as the time *after* the reference edge.
* Its interval equation, its timing diagram and its simulated example only work if
  the code is the time *to* the next reference edge.

This implementation follows the equation.

The code is valid once `captured` goes high, 500 ps after the input edge. An assertion
in `tdc_channel` checks that the MUX ring outputs are one-hot after every capture.

## Coarse count and the interval

`tdc_shift_reg` shifts a 1 into a 5-bit register on every rising edge of `ref_clk`
that comes after `start` has risen and before `stop` has risen. In the circuit, STOP
disconnects the reference clock from the register. Here the same effect is a clock
enable, `start & ~stop`. The contents are a thermometer code. The number of ones is
the number of reference edges between the two inputs.

Call those reference edges N. The START value is the time from START to the first
reference edge after it. The STOP value is the time from STOP to the first reference
edge after STOP. So:

    T = N·800 + START·25 − STOP·25   (each code rounded down to 25 ps, error < 25 ps)

Worked example, used in the top-level test: START arrives 112.5 ps after a reference
edge, and STOP arrives 1700 ps later.

* START value: ⌊687.5/25⌋ = 27 (`11011`).
* STOP value: ⌊587.5/25⌋ = 23 (`10111`).
* Two reference edges fall in between, so the shift register holds `00011`.
* Result: 2·800 + (27 − 23)·25 = **1700 ps**.

`tdc_dsp` evaluates the equation. It outputs `interval_lsb` (signed, in 25 ps steps)
and `interval_ps` (signed, in ps). Five bits of shift register give a range of
5·800 + 31·25 = 4775 ps. `sr_full` goes high when all five bits are set. From then on,
longer intervals read as 5 periods.

## Top level: `tdc_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_in` | in | 1 | 1.25 GHz input clock |
| `dll_rst_n` | in | 1 | active low, restarts the clock generator's loop |
| `rst_n` | in | 1 | active low, asynchronous; clears the registers and the shift register |
| `start`, `stop` | in | 1 | measured edges (levels; keep high until the next `rst_n`) |
| `ref_clk` | out | 1 | reference clock, `phase[0]` |
| `start_code`, `stop_code` | out | 5 | fine values |
| `shift_reg` | out | 5 | coarse count, thermometer code |
| `interval_lsb` | out | 9 | signed interval, 25 ps units |
| `interval_ps` | out | 14 | signed interval, ps |
| `valid` | out | 1 | both edges captured |
| `sr_full` | out | 1 | coarse count saturated |

Operating sequence:

1. Pulse `dll_rst_n` once and wait about 400 cycles for the loop to settle.
2. For each measurement, pulse `rst_n` low with `start` and `stop` low.
3. Raise `start`, then `stop`, and keep both high.
4. `valid` rises exactly 500 ps after `stop`. The outputs hold until the next `rst_n`.

The async resets need an edge, so drive them high, then low.

The parameters (`NUM_PHASES`, `SR_BITS`, `LSB_PS`, `REF_PERIOD_PS`,
`CAPTURE_DELAY_PS`) default to the design's values in `tdc_pkg`. The phase mapping and
the 425 ps stage delay assume 32 phases of an 800 ps clock. The fine logic is written
for any power-of-two `NUM_PHASES`, but the clock generator is only right at the
default.

## What is synthesizable

The synthesizable parts are: `tdc_sampler`, `tdc_sampler_bank`, `tdc_capture_reg`,
`tdc_first_high`, `tdc_coder`, `tdc_channel`, `tdc_shift_reg`, `tdc_dsp` and
`tdc_dll_pd`. Each sampler flop is clocked by its own phase. In silicon these are
full-custom sense-amplifier cells placed on matched clock lines, and the 25 ps
resolution depends on that matching. A standard-cell flow would not keep it.

The behavioural models, with transport delays and `real` voltages, are:
`tdc_dll_stage`, `tdc_dll_cp`, `tdc_mpcg` and `tdc_delay_buf`. The top level
instantiates them, so it simulates but does not synthesize as a whole.

## Where this implementation fills gaps or departs

* The sampler is reduced to its logic function: a rising-edge sample held until the
  next edge. Its differential clock and data inputs are single-ended, and its
  ≈400 ps latency is not modelled.
* The reference period is 800 ps throughout. One passage of the original calls the
  counted period 775 ps. 775 ps is the span of the 32 fine steps (31·25 ps), and the
  interval equation uses 800 ps.
* These are this implementation's own: the resets, `captured`, `valid`, `sr_full`,
  the output widths and the clock-enable form of the shift-register gating.
* These are also model choices: the phase detector circuit, the pump step, the
  delay-versus-voltage curve and the start voltage.
* Not represented: power (177 mW was reported in simulation), layout and
  transistor-level timing.

## Files

`rtl/` holds one module or package per file:

* `tdc_pkg`: constants.
* Fine path: `tdc_sampler`, `tdc_sampler_bank`, `tdc_capture_reg`, `tdc_first_high`,
  `tdc_coder`, `tdc_channel`.
* Coarse path and output: `tdc_shift_reg`, `tdc_dsp`.
* Clock generator: `tdc_mpcg`, `tdc_dll_stage`, `tdc_dll_pd`, `tdc_dll_cp`.
* `tdc_delay_buf`: the 500 ps buffer.
* `tdc_top`: the top level.

`tb/` holds one self-checking testbench per module, `<module>_tb.sv`. Each testbench
prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

All files use `timeunit 1ps; timeprecision 1fs`. The models need Verilator's timing
support. From the repository root, for example:

    verilator --binary --timing --assert -Wno-fatal -j 4 --top-module tdc_top_tb \
        -y rtl -y tb +libext+.sv rtl/tdc_pkg.sv tb/tdc_top_tb.sv
    ./obj_dir/Vtdc_top_tb

`-Wno-fatal` is needed because the variable stage delay gives a ZERODLY warning. Pass
the package first. For another test, replace `tdc_top_tb` with another `<module>_tb`.

`tdc_top_tb` runs the whole converter at its default size in well under a second. It:

* lets the loop settle and checks all 32 phase offsets;
* runs the worked example above;
* runs corner cases (25 ps, one period, exactly 4.775 ns, beyond the range);
* runs 120 random intervals of up to 5 ns, and checks every output against values
  computed from the edge times;
* checks that `valid` comes 500 ps after `stop`.

It counts how often each mechanism occurred and fails if one never did: loop lock, an
interval inside one period, a coarse count above zero, a STOP value above the START
value, and a full shift register. The block testbenches check each module against
independent models: exact edge times for the samplers and delays, every thermometer
run for the MUX ring, every code, and the clamping of the pump.
