# Flying-adder frequency synthesizer with a PLL clean-up loop

A flying adder makes a new clock out of the N evenly spaced phases of a fixed
clock. It never divides a clock by an integer: it picks, edge by edge, which
phase to pass on next, so it can produce almost any frequency, and it reaches
a new frequency on the very next edge after its control word changes. The
price is that, when the control word is fractional, its output edges are not
evenly spaced. That unevenness is periodic, so it shows up as spurs in the
spectrum.

This design puts a conventional charge-pump PLL behind the flying adder. The
PLL locks to the flying adder's average frequency and its low-pass loop
filter removes the period-to-period variation. The result keeps the flying
adder's fine frequency resolution, with a much cleaner output. What is lost
is the instant response: the output now follows a new setting only as fast as
the PLL loop settles.

```
               FPC                                   FW
 freq_control ----> nphase_clock_gen ==N phases==> flying_adder --f_FA--> cp_pll --> f_o
      |                                                 ^                    ^
      +-----------------------FW------------------------+                    |
      +-----------------------FPLL-------------------------------------------+
```

The default configuration is N = 8 phases, an n = 5 bit accumulator and an
r = 3 bit phase select.

## The flying adder loop

`flying_adder` is four small blocks and a bit slice in a loop:

```
 phases[N-1:0] --> fa_phase_mux --m(t)--+--> fa_toggle_ff --> f_FA
                        ^               |
                     y (r bits)         | clock
                        |               v
                  x[n-1:n-r]    <-- fa_register <-- fa_adder <-- FW
                     (r MSBs)       x (n bits)     x + FW mod 2^n
                                         |______________^
```

* The multiplexer passes phase `y` to its output `m(t)`.
* Each rising edge of `m(t)` clocks the register: `x(k+1) = (x(k) + FW) mod 2^n`.
* The top r bits of `x` become the new select `y`.
* A toggle flip-flop halves `m(t)` to give `f_FA`.

Phase i lags phase 0 by i·Δ, where Δ = 1/(N·f_CLK). Suppose the select moves
from phase a to phase b on an edge. The next rising edge of `m(t)` is the
next rising edge of phase b, which is j·Δ later, with j = (b − a) mod N. When
j = 0 the wait is a full period, N·Δ. This holds whether phase b is low or
already high when the select switches. If it is low, `m(t)` drops and rises
again j·Δ later. If it is high, `m(t)` simply stays high until phase b's next
rising edge.

FW is an n-bit number whose top r bits count whole phase steps; its lower
n − r bits are a fraction of a step. On average each `m(t)` edge advances the
select by FW / 2^(n−r) phases, so the average `m(t)` period is
Δ·FW/2^(n−r), and

    f_FA = f_CLK · N · 2^(n−r) / (2 · FW)

For the defaults this is f_FA = 16·f_CLK / FW. The useful range is
FW = 4 … 31, from 4·f_CLK down to 0.516·f_CLK. That is the usual flying adder
range of 0.5·f_CLK to 0.5·N·f_CLK for N phases. Below FW = 4, some edges would
not advance the select at all and would cost a whole period, so the formula
stops holding.

**Integer and fractional words.** When FW is a multiple of 2^(n−r) (4 by
default), every edge advances by the same number of phases and `f_FA` is a
clean clock. Any other FW mixes two edge spacings. Take FW = 31 with
f_CLK = 1 GHz:

* The register counts down by one on each edge (31 ≡ −1 mod 32).
* The select therefore stays put for three edges and steps back one phase on
  the fourth.
* The `m(t)` spacings are 8Δ, 8Δ, 8Δ, 7Δ, repeating: an average of 7.75Δ.
* The `f_FA` periods alternate between 16Δ and 15Δ, i.e. 2000 ps and 1875 ps.
* The average is 516.13 MHz. The edge pattern repeats every four `m(t)`
  edges (31Δ = 3.875 ns), so the spectrum has spurs at ±258 MHz around the
  carrier and at the multiples of that offset. In general, the pattern is at
  most 2^(n−r) edges long. The nearest spur therefore sits
  f_m/2^(n−r) or further from the carrier, where f_m is the average `m(t)`
  rate.

**Timing.** FW is sampled at each rising edge of `m(t)`. A new word therefore
shapes the edge after next, and any 32 consecutive edges after that already
span exactly 8·FW·Δ. The register and the toggle flip-flop reset
asynchronously (`rst_n`, active low) to 0, which selects phase 0.

**Hardware caveats.** In this loop the multiplexer output clocks the register
that drives the multiplexer select. Static timing analysis sees this as a
path from a flop into a clock. That path is the architecture itself. The
multiplexer is a plain combinational select. In silicon, the register's
clock-to-output delay must be short compared with Δ. The multiplexer must
also not glitch when switching to a phase that is low, which leaves a short
pulse on `m(t)` (zero-width in RTL simulation). The RTL does not model these
analog timing limits.

## The N-phase clock (`nphase_clock_gen`)

This is a timed behavioural model of an N-stage oscillator and cannot be
synthesized. It produces N clocks with 50 % duty cycle, phase i lagging by
i·Δ, with all phases updated together every Δ. The coarse code FPC selects
the band: Δ = 125 + 25·FPC ps, which gives f_CLK = 1 GHz, 833 MHz, 714 MHz or
625 MHz. The band table is this design's own choice. N must be a power of two.

## The PLL (`cp_pll` = `pfd` + `pll_analog`)

* `pfd` is the usual two-flip-flop phase-frequency detector, written as
  RTL. A reference edge sets UP, a feedback edge sets DN, and both clear as
  soon as both are set. The clearing path has zero delay in RTL, so the
  overlap pulse has zero width. The external reset and the clearing path are
  written as two asynchronous triggers, so that the detector always leaves
  reset cleared in simulation. Some synthesis flows reject two asynchronous
  triggers on one flip-flop. For those, merge them into a single reset pin
  driven by !rst_n | (up & dn).
* `pll_analog` is a behavioural model with real-valued state, advanced every
  5 ps. It contains:
  * a 100 µA charge pump;
  * a second-order passive loop filter, with R = 3.2 kΩ in series with
    C1 = 20 pF and C2 = 2 pF across both;
  * a VCO at f = 400 MHz + 100 MHz·FPLL + 200 MHz/V · vctrl.
* The VCO gives a sine output (`vco_sine`) and a logic output (`fo`). The
  logic output is high during the positive half of the sine.
* The loop natural frequency is about 5 MHz, with damping near 1. That is well
  far below the spur offsets of the default configuration (at least
  f_m/4, i.e. 130 MHz or more), so the spurs are filtered.
* The feedback is divide-by-one: f_o equals the average f_FA.
* FPLL must put the VCO band near the target, leaving the loop to cover only
  the remaining few tens of MHz.

All component values are this design's choices, made to give a loop that
locks within a few microseconds and clearly filters the default flying
adder's pattern. The 5 ps time step quantizes the output edges to 5 ps.

## Frequency control (`freq_control`)

This block is a register bank holding FPC, FPLL and FW. A host writes all
three together with `cfg_wr` on `cfg_clk`, and the new values appear one
`cfg_clk` edge later. After reset the values are FPC = 0, FPLL = 0 and
FW = 31. Choosing the settings (the coarse bands and the FW for a wanted
frequency) is left to the host. FW crosses from the `cfg_clk` domain into the
`m(t)` domain without a synchronizer. A word that changes exactly at an
`m(t)` edge can be caught half old and half new for one edge. That disturbs
one edge spacing and nothing more.

## Measured behaviour

These results come from the testbenches, at the default sizes and with
f_CLK = 1 GHz unless stated otherwise.

| setting | f_FA (expected = measured) | f_o after lock | period spread f_FA → f_o |
|---|---|---|---|
| FPC 0, FW 31, FPLL 1 (fractional) | 516.13 MHz | 516.13 MHz | 125 ps → 5 ps |
| FPC 0, FW 24, FPLL 2 (integer) | 666.67 MHz | 666.67 MHz | 0 → 0 |
| FPC 1 (833 MHz), FW 31, FPLL 0 | 430.11 MHz | 430.11 MHz | 150 ps → 10 ps |
| FPC 0, FW 13, FPLL 8 (fractional) | 1230.77 MHz | 1230.77 MHz | 125 ps → 5 ps |

A DFT of 3.1 µs of both signals at FW = 31, after lock, shows the spurs at
±258 MHz. They sit at −22.7 dBc on f_FA and at −67.8 dBc on the PLL's sine
output. All other bins between 258 MHz and 774 MHz are below −100 dBc on
both signals.

The full sweep FW = 4 … 31 gives f_FA/f_CLK = 16/FW exactly for every word,
measured as the span of 32 edges.

## Files

| file | contents |
|---|---|
| `rtl/fa_synth_pkg.sv` | default sizes (N = 8, n = 5, r = 3, FPC 2 bits, FPLL 4 bits) and an f_FA ratio helper |
| `rtl/fa_adder.sv`, `fa_register.sv`, `fa_phase_mux.sv`, `fa_toggle_ff.sv` | the flying adder's parts (the truncation to r bits is a bit slice in `flying_adder`) |
| `rtl/flying_adder.sv` | the flying adder loop |
| `rtl/freq_control.sv` | settings register bank |
| `rtl/pfd.sv` | phase-frequency detector |
| `rtl/nphase_clock_gen.sv` | N-phase oscillator, behavioural |
| `rtl/pll_analog.sv` | charge pump, loop filter, VCO, behavioural |
| `rtl/cp_pll.sv` | PLL = pfd + pll_analog |
| `rtl/fa_pll_synth.sv` | the complete synthesizer |
| `tb/tb_<module>.sv` | a self-checking testbench per module |

Synthesizable: every module except `nphase_clock_gen`, `pll_analog`, and the
two wrappers that contain them (`cp_pll`, `fa_pll_synth`). For silicon, the
synthesizable core is `freq_control` + `flying_adder` + `pfd` (with the
reset caveat above). The oscillators
and the charge pump/filter would be analog macros with the same ports.

All files declare `timeunit 1ps; timeprecision 1ps;`.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
For example, the end-to-end run at the default sizes:

```
verilator --binary --timing --assert -Irtl rtl/fa_synth_pkg.sv \
    tb/tb_fa_pll_synth.sv --top-module tb_fa_pll_synth -o sim
./obj_dir/sim
```

Other testbenches build the same way; substitute the testbench name. Each one
runs in well under a second.

* `tb_flying_adder` checks the cycle-exact edge spacing, the register values
  and the f_FA-versus-FW curve.
* `tb_flying_adder_wide` checks the same frequency law with a longer
  accumulator (N = 8, n = 8) and with more phases (N = 16, n = 7).
* `tb_fa_pll_spectrum` measures the spur levels before and after the PLL.
* `tb_cp_pll` checks lock, relock and filtering with an ideal reference.
* `tb_fa_pll_synth` steps the whole system through the four settings in the
  table above. It also confirms that each mechanism happened at least once:
  fractional and integer words, register wrap-around, FW, FPC and FPLL
  changes, PLL lock, spur filtering, and UP and DN pulses.

## Changing it

* **More phases or a longer accumulator:** set `NPHASE` (a power of two) and
  `NBITS` on `fa_pll_synth`. `NBITS − log2(NPHASE)` is the number of fraction
  bits. Each added bit halves the frequency step and lengthens the repeat
  pattern, which lowers the spur frequencies. The PLL bandwidth must then come
  down with them (smaller `ICP_A` or larger `C1_F`).
* **Other clock or VCO bands:** edit `DELTA0_PS`/`DELTA_STEP_PS` in
  `nphase_clock_gen`, or `F0_HZ`/`FSTEP_HZ`/`KV_HZ_PER_V` in `pll_analog`.

## Where this design goes beyond, or departs from, the published architecture

* The f_FA formula is in the form above: f_CLK·N·2^(n−r)/(2·FW). The shorter
  form f_CLK·N/FW holds only for `m(t)` with FW counted in whole phase steps.
  The form used here matches the published f_FA-versus-FW curve for n = 5,
  r = 3, N = 8 (4·f_CLK at FW = 4, 0.516·f_CLK at FW = 31).
* The architecture names the PLL only as a conventional charge-pump PLL with
  a sine-output VCO. The PFD circuit, the filter topology and all component
  values here are this design's choices. So are the divide-by-one feedback
  (the output runs at the f_FA frequency) and the VCO band table.
* How coarse tuning works (FPC, FPLL) is left open by the architecture.
  The band tables and code widths are this design's choices.
* The frequency control block's host interface and reset values are this
  design's choices, as are the reset behaviour elsewhere and the 50 % phase
  duty cycle.
* No spectrum is computed. Spur suppression is checked in the time domain, as
  the spread of output periods before and after the PLL.
