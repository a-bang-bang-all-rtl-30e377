# Bang-bang all-digital PLL (10 MHz → 280 MHz)

This is a clock multiplier built almost entirely from digital logic. It takes a
10 MHz crystal reference and produces a 280 MHz clock, 28 times the reference.
That clock drives a serializer, which sends two 14-bit ADC samples per reference
period down a single wire.

The phase detector is a single D flip-flop, a *bang-bang* detector. It reports
only whether the divided output clock arrived early or late, never by how much.
That makes it small and easy to port, but it has a very narrow capture range. So
a second, frequency-locked loop brings the oscillator close to the target
frequency first. Then it hands over to the phase loop. Only one loop controls
the oscillator at any time.

The oscillator is a current-mode DAC feeding a current-controlled ring
oscillator (the DCO, digitally controlled oscillator). It is analog, so here it
is a behavioural model. Everything else is synthesizable SystemVerilog.

## Block diagram

```
             +----------------------- frequency loop (FLL) ------------------------+
             |                                                                      |
 ref_clk --+-+-> freq_detector --ferr--> lock_detect --locked--+                    |
 (10 MHz)  |     (count DCO periods     |                      |                    |
           |      per ref period,       +--> freq_controller --+-- coarse[5:0] --+  |
           |      ferr = 28 - count)         (coarse += ferr)                    |  |
           |                                                                     v  |
           +--> bbpd --early--> phase_controller --- fine[9:0] --> fine_dac_decoder |
           |    (1 DFF)         (KP/KI filter, held                   |             |
           |       ^             at 512 while FLL on)                 v             |
           |       |                                  current_dac_model --> ico_model --> clk_out (280 MHz)
           |       |                                        ^ pedestal[1:0]          |
           |       +------------ fb_clk <------ freq_divider (/28) <------------------+
           |                                                                         |
           +--> serializer (adc_a, adc_b -> sdata) <-------- clk_out, frame strobe --+
```

## How the two loops share the oscillator

This is the part of the design that needs the most care.

**Start-up.** Reset is synchronized into the reference domain, and that copy is
the INIT signal. INIT loads three values:

- the 6-bit coarse word goes to its centre code, 32;
- the 10-bit fine word goes to half scale, 512;
- `locked` is cleared, so the frequency loop is in control.

**Frequency acquisition.** The frequency detector counts DCO periods during
each reference period. It then forms `ferr = FCW − count`, with FCW = 28. Once
per reference period the frequency controller adds `ferr` to the coarse word.
One coarse step is about 4.7 MHz and one count is 10 MHz, so the loop gain is
about 0.5 per update. The error shrinks within a few reference periods. All this
time the fine word is held at 512.

**Handover.** `lock_detect` watches for |ferr| ≤ 1, which means the output is
within about ±10 MHz of 280 MHz. After 4 such measurements in a row it raises
`locked`. That freezes the coarse word and releases the phase loop.

**Phase acquisition and tracking.** The fine DAC at half scale spans about
±37 MHz. That is more than the ±10 MHz (plus one coarse step) the FLL can leave
behind. The phase loop therefore pulls in from wherever the FLL stopped.

**Losing lock.** If 4 measurements in a row fall outside the window, `locked`
drops. This happens after a reference-frequency step or a large trim change. The
FLL takes over again and the fine word returns to 512.

The count-based detector resolves only one reference frequency (10 MHz), and a
count can be off by one depending on where the edges fall. The 4-in-a-row filter
keeps that quantization from switching the loops back and forth. Without a
filter, the window alone would still decide.

## The phase loop

`bbpd` samples the divided clock `fb_clk` on each rising reference edge:

- `early = 1`: the feedback edge came first, so the DCO is fast.
- `early = 0`: the reference came first, so the DCO is slow.

The loop filter is a proportional-integral filter. Its input is only ever ±1,
so the gains reduce to adding or subtracting constants:

```
I[n]      = I[n-1] + KI   (early = 0)   or   I[n-1] − KI   (early = 1)
D_fine[n] = I[n]   + KP   (early = 0)   or   I[n]   − KP   (early = 1)
```

This is `D(z) = (KP + KI/(1 − z⁻¹))·e(z)`. The defaults are KP = 4 and KI = 1.
Both adders are ripple-carry adder/subtractors. Their overflow logic also flags
a negative result. On overflow the integral holds its value and the output
saturates at 0 or 1023.

The loop filter registers run on the inverted reference clock. The fine word
therefore changes half a reference period after each phase decision. In loop
terms that is a delay of D = 0.5 reference periods. A bang-bang loop of this
kind settles into a bounded limit cycle only when KI/KP < 2/(2D+1). That bound
is 1 here, and the defaults give 0.25. Raising KP shortens pull-in, up to a
point, and always makes the limit cycle larger.

In locked operation the loop never stops moving. The fine word steps up and
down by about KP around its mean value, and the feedback edge dithers around the
reference edge. With the ideal DCO model at the default gains, the feedback edge
stays within about ±0.2 ns of the reference edge. The real circuit adds device
noise, which this model does not include.

## The frequency loop

- `jk_counter`: a 6-bit synchronous counter made of JK stages, with an AND chain
  that enables each toggle. It counts DCO edges.
- `freq_detector`: retimes the reference into the DCO domain with two
  flip-flops. On the retimed rising edge it stores the count and restarts the
  counter at 1, so the stored value is exactly the number of DCO periods in one
  reference period. `ferr` comes from a 7-bit adder/subtractor (6 bits plus
  sign). `ferr` changes two or three DCO cycles after a reference edge and then
  holds for the rest of the period. The reference-domain logic can therefore
  sample it safely on its next edge.
- `freq_controller`: `coarse += ferr`, saturating at 0 and 63, with the
  centre-code INIT multiplexer.
- `lock_detect`: the window and the in-a-row filter described above.

## Oscillator model (DAC + ICO)

The real oscillator is analog. It has three current DACs that are summed, and a
4-stage differential ring oscillator whose delay is set by that current.

| DAC     | control                        | structure                                                  | frequency step (model) |
|---------|--------------------------------|------------------------------------------------------------|------------------------|
| coarse  | 6-bit `coarse` (FLL)           | 64 fine-LSB units per step                                 | ≈ 4.7 MHz              |
| fine    | 10-bit `fine` (PLL)            | 4 binary LSB sources + 63 thermometer cells of 16 LSBs each | ≈ 73 kHz per LSB       |
| pedestal| `pedestal` 00 / 01 / 11        | two equal sources                                          | ≈ 20 MHz each          |

The synthesizable part of the fine DAC is `fine_dac_decoder`. It splits the
code into the 4 binary bits and drives the 63 unit cells from a 3-bit row
decoder and a 3-bit column decoder on an 8 × 8 grid. Cells switch on in order,
so the DAC is monotonic by construction.

`current_dac_model` returns the total current as an integer number of fine-LSB
units. `ico_model` turns that into a frequency:

```
f = 72 MHz + i_units × 0.0734375 MHz, clamped to 100 … 400 MHz
```

With coarse 32, fine 512 and one pedestal source, this gives exactly 280 MHz.
The model has no noise, mismatch or DAC glitches. Changing `F0_KHZ` on the top,
or changing the pedestal input, moves the centre frequency the way a process,
supply or temperature shift would.

## Feedback divider

`freq_divider` is a 4-bit JK counter that counts 0 … 13. When the count reaches
13, each upper stage's J/K pair is forced to J = 0, K = 1, so the next edge
clears the counter. The step from 13 back to 0 is where the MSB falls. That step
toggles a divide-by-two, which gives f/28 with a 50 % duty cycle.

The ratio is 2·(M+1), where M is the reset count. M is the parameter
`DIV_RESET` on the top (default 13), and FCW follows it automatically. The
divider also outputs `frame`, a one-cycle strobe just before `fb_clk` falls.

## Serializer

On each reference edge (the ADC sample clock) the serializer captures
`{adc_a, adc_b}`. At the divider's `frame` strobe, half a reference period
later when the words are stable, it loads them into a 28-bit shift register. It
then shifts them out one bit per DCO cycle: adc_a first, then adc_b, each MSB
first. `sframe` marks the first bit of each word.

## Clocks, reset, timing

- `ref_clk` domain: `bbpd`, `lock_detect`, `freq_controller`, and the
  serializer's input capture.
- Inverted `ref_clk`: `phase_controller`.
- `clk_out` (DCO) domain: `freq_divider`, `freq_detector` with its counter, and
  the serializer's shift register.
- `rst_n` is asynchronous and active low. It is synchronized into both domains.
- Latency: a phase decision reaches the fine word after half a reference period.
  A frequency measurement reaches the coarse word about one reference period
  after the measured period ends.

## Files

| file | contents |
|------|----------|
| `rtl/adpll_pkg.sv` | widths and defaults (6-bit coarse, 10-bit fine, FCW 28, KP 4, KI 1) |
| `rtl/adder_subtractor.sv` | ripple-carry add/subtract with overflow |
| `rtl/bbpd.sv` | bang-bang phase detector |
| `rtl/phase_controller.sv` | PI loop filter of the phase loop |
| `rtl/jk_counter.sv` | 6-bit JK counter |
| `rtl/freq_detector.sv` | DCO periods per reference period, frequency error |
| `rtl/freq_controller.sv` | coarse accumulator |
| `rtl/lock_detect.sv` | loop handover |
| `rtl/freq_divider.sv` | ÷28 divider |
| `rtl/fine_dac_decoder.sv` | fine DAC segmentation logic |
| `rtl/current_dac_model.sv` | behavioural current DAC |
| `rtl/ico_model.sv` | behavioural ring oscillator |
| `rtl/serializer.sv` | 2 × 14-bit parallel-to-serial stage |
| `rtl/adpll_top.sv` | everything wired together |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_adpll_kp.sv` | lock time and limit cycle for KP = 3, 4, 8 |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. Each one has a
watchdog. To run the full system test at the default parameters:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/adpll_pkg.sv \
          tb/tb_adpll_top.sv --top-module tb_adpll_top -Mdir obj_top
./obj_top/Vtb_adpll_top
```

Any other testbench runs the same way with its own name. `ico_model` uses
real-valued delays, so `--timing` is required. The simulation has two states,
so the testbenches pulse `rst_n` low to make every asynchronous reset act.

What `tb_adpll_top` does, with defaults and no parameter overrides:

1. Start with the pedestal at 00, so the DCO is about 20 MHz low, and wait for
   lock.
2. Check that there are 28 ± 1 output edges per reference period over 200
   periods.
3. Check that the feedback edge is within 1.5 ns of the reference edge. About
   0.16 ns is typical.
4. Deserialize the serial output and check it against the ADC words.
5. Step the reference to 12.5 MHz, then 7.5 MHz, then back to 10 MHz. Each time,
   check that the FLL re-engages and the loop relocks at 28 × the new reference.
6. Apply a 180° reference phase step and check that the phase realigns.
7. Change the pedestal to 11 (+40 MHz) and check that the loop relocks.

It counts FLL updates, lock entries and exits, and up and down decisions. Any
mechanism that never happened counts as a failure. The whole run takes well
under a second.

`tb_adpll_kp` runs three copies of the PLL side by side, with KP = 3, 4 and 8
and KI = 1. Each starts 20 MHz low. With the ideal oscillator model the results
are:

| KP | phase lock after reset | limit cycle (feedback edge, peak-to-peak) |
|----|------------------------|-------------------------------------------|
| 3  | 49.0 µs                | 0.21 ns                                   |
| 4  | 30.8 µs                | 0.30 ns                                   |
| 8  | 31.6 µs                | 0.53 ns                                   |

A larger KP gives a larger limit cycle. Too small a KP makes pull-in much
slower. KP = 4 is the default for that reason. These numbers contain no device
noise, so they show only the loop's own quantization behaviour.

## Departures and choices

These points are decisions of this implementation, not fixed by the
architecture:

- The bang-bang flip-flop samples the feedback clock with the reference clock.
  This keeps its output synchronous to the loop filter.
- The described circuit clocks the loop filter registers with delayed copies of
  the reference, so they update within the same period. Here a single register
  stage on the inverted reference clock stands in for that, giving D = 0.5.
- The frequency detector restarts its counter synchronously, after a
  two-flip-flop synchronizer. The described circuit uses a reset pulse made from
  delay cells, XOR and AND gates.
- The divider's divide-by-two uses the DCO clock with an enable on the 13→0
  step. It is not clocked by the counter MSB, but it switches on the same edge.
- What happens on overflow (hold or saturate), the lock filter (4 in a row each
  way), the `valid` flag of the frequency detector and all reset behaviour are
  choices of this implementation.
- The serializer's bit order, frame marker and load point are choices of this
  implementation.
- The DAC weights and the oscillator offset are chosen to match the stated steps
  (≈ 4.7 MHz coarse, ≈ 20 MHz pedestal, about 12 bits overall, 100–400 MHz
  range). They are not measured values.

Not included:

- the analog bias circuits of the DAC and ICO, and the oscillator's output
  comparator. Their combined effect is in the two behavioural models.
- the circuit that aligns the divider counter with the reference edge at
  start-up, which is not specified.
- the crystal oscillator.
- jitter, supply noise and PVT corner behaviour. These need a transistor-level
  oscillator and cannot be reproduced by the ideal model.
