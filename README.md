# Fully digital fractional frequency synthesizer

This synthesizer makes an output frequency that is a programmable fraction of
an input frequency. It does so with counters and a register only: no
oscillator control loop, no DAC, no lookup table. It measures how long one
input period lasts, scales that number, and builds each output period from the
scaled number.

```
            fc1                          fc2
             |                            |
 f_x --> [Counter 1, up] --C1--> [Register: C2 = m1*C1/k1 +/- fine]
                                    |  integer M        | fraction R
                                    v                   v
                                 [Adder] <--ovf-- [Accumulator]
                                    |                   ^ step
                                    v preset            |
                     fc2 --> [Counter 2, down] ---------+----> f_y
```

* **Counter 1** counts ticks of the count frequency fc1 during one period of
  f_x, so it holds `C1 = fc1 / f_x`.
* At every rising edge of f_x the **register** takes C1 and turns it into
  `C2 = g(C1) = m1 * C1 / k1 (+/- fine)`.
* **Counter 2** counts fc2 ticks down from C2. Each time it runs out it emits
  one output pulse and reloads, so `f_y = fc2 / C2`.

Together these give

```
f_y = (k1 / m1) * (fc2 / fc1) * f_x
```

The output follows the input period by period. The first measured period
after a change already gives the new output. With fc1 = fc2 and m1 = k1 = 1
the output copies the input frequency. k1 > 1 multiplies it and m1 > 1
divides it, each by up to 2^8. The 8 bits by which Counter 2 is wider than
Counter 1 hold that range.

The output is a pulse train (`fy`, one clock cycle per output period) plus a
square wave at half its frequency (`fy_div2`).

## Where the fraction goes: error correction

C2 is an integer number of fc2 ticks, but m1*C1/k1 usually is not. Take a
×11 multiplier at C1 = 1000. It needs output periods of 90.909 ticks. If the
fraction is simply dropped, every period lasts 90 ticks and the output runs
about 1 % fast. Synthesizers that only truncate always err in this direction.

The register therefore keeps `FRAC_W` = 16 fractional bits of the quotient.
The integer part goes to Counter 2 and the fraction goes to a first-order
accumulator (`frac_accumulator`). The accumulator steps once per output
period, when Counter 2 reloads, and adds the fraction modulo 2^16. When the
addition carries, the correction adder (`c2_adder`) makes that one period a
tick longer. Over 2^16 periods exactly `frac` of them are lengthened, so the
mean period is C2 plus its fraction. Single periods still differ from the
ideal by less than one tick. This is the same idea as the accumulator in a
fractional-N PLL divider, applied to the period counter.

In the ×11 example, 88 consecutive output periods take 8000 ticks (ideal
8000.0). Each of them lasts 90 or 91 ticks. For ×5.7, set m1 = 10 and
k1 = 57: 57 periods take 10000 ± 1 ticks. `corr_en` turns the correction on;
when it is off, the accumulator is held at zero.

The one-tick resolution stays: the output jitters by up to one fc2 period.
Only the mean frequency is exact, to 2^-16 of a tick per period.

## Timing of a measurement

All logic except the PLL prescaler runs on one master clock `clk`, for
example a crystal oscillator. fc1 and fc2 are **clock enables**, not clocks:

```
fc1 = f_clk / (gen1_div * 2^gen_exp)      fc2 = f_clk / (gen2_div * 2^gen_exp)
```

Here is what happens to one input period:

1. `fx_in` is asynchronous. It passes through a two-flop synchroniser
   (`input_edge`). A rising edge becomes a one-cycle `rise` pulse three
   clock cycles later. The delay is the same for every edge, so it does not
   change the measured periods.
2. On `rise`, Counter 1 hands over its count and restarts in the same cycle.
   A tick that arrives in that cycle belongs to the period that ends. Because
   the handover and the restart happen in one synchronous step, no counts are
   lost. A design that uses external load and clear pulses loses a fixed
   number of counts to their width: 17 to 20 counts at 31 MHz with 600 ns
   pulses. `fine_sub`/`fine_val` can subtract such an offset.
3. The register takes the count. A sequential restoring divider (`seq_divider`)
   then computes `m1*C1*2^16 / k1`. This takes C1_W + M_W + FRAC_W = 49 clock
   cycles. If an input edge arrives while the divider is busy, the newest
   count waits and is converted next.
4. The new C2 reaches Counter 2 at its next reload. The current output period
   is never cut short.

The delay from an input edge to the new output is therefore about one input
period plus 52 clock cycles. The control inputs `m1`, `k1`, `fine_sub` and
`fine_val` are sampled when a conversion starts.

The register ignores the first capture after reset, because it covers only
part of a period. Until a measured C2 exists, Counter 2 does not count.

**Limits.**

* Counter 1 must hold a whole input period: `C1_W >= ceil(log2(fc1max / fxmin))`.
  A longer period saturates the counter at all ones and sets `c1_ovf`.
* The input must stay high and low for at least two clock cycles each. At
  33.3 MHz the default 24-bit Counter 1 covers 2 Hz to 6.2 MHz; both ends
  are simulated.
* At high input frequencies C1 is small and is quantised to one count. At
  3.275 MHz with a 31.111 MHz clock, C1 alternates between 9 and 10.

## Adaptive generator control

Few counts in Counter 1 make C1, and with it the output, coarse. Too many
counts overrun the counter. `adaptive_ctrl` reads each accepted C1:

* If C1 is below `C_LOW` = 2^(C1_W/2), it lowers `gen_exp` by one. This
  doubles both count frequencies.
* If C1 is above `C_HIGH` = 2^(C1_W-1), or the counter overran, it raises
  `gen_exp` by one. This halves both count frequencies.

Both generators share `gen_exp`, so fc1/fc2 and therefore f_y stay the same.
The period in progress when the scale changes is counted partly at the old
rate and partly at the new one. That capture is dropped: `discard` is high
until it has passed.

The output period that is running at the switch, and the next one, still use
the old C2 at the new fc2. So the output has a short transient at each
rescale. `adapt_en` enables the block; with it off, `gen_exp` holds its value,
which is 0 after reset.

## Use in a fractional PLL

With the synthesizer in the feedback path of a PLL, the loop gets a
fractional divide ratio from an integer divider:

```
f_ref --> PD --> LPF --> VCO --+--> f_o
           ^                   |
           +-- f_y <-- SYNT <-- /N
```

With `pll_mode` = 1, the synthesizer input is `fo_clk` (the VCO output)
divided by `n_div` (`n_divider`, clocked by `fo_clk` itself). `fy` then goes
to the phase detector. In lock

```
f_o = N * (m1 / k1) * (fc1 / fc2) * f_ref
```

`n_div` <= 1 passes `fo_clk` through undivided. The phase detector, loop
filter and VCO are analog parts outside this RTL.

## Modules

| module | role |
|---|---|
| `fdfs_pkg` | default widths shared by all modules |
| `fdfs_top` | the synthesizer: wires all blocks below |
| `input_edge` | synchroniser and rising-edge pulse (load + clear of Counter 1) |
| `freq_gen` | Generator 1 / Generator 2: enable at f_clk/(div·2^exp) |
| `counter1` | up counter measuring the input period, saturating, overflow flag |
| `synth_register` | holds C1, computes C2 = m1·C1/k1 ± fine as integer and 16-bit fraction, clips to 0 .. 2^C2_W−1 (`c2_sat`) |
| `seq_divider` | restoring divider used by the register, one quotient bit per cycle |
| `frac_accumulator` | fraction accumulator of the error correction |
| `c2_adder` | integer part + carry − 1 → preset of Counter 2 |
| `counter2` | down counter built from cascaded 8-bit `down_slice`s; the carry out of the last slice is `fy` and reloads all slices |
| `down_slice` | one 8-bit slice with carry in / carry out |
| `adaptive_ctrl` | power-of-two rescaling of both generators |
| `n_divider` | divide-by-N prescaler for PLL use |

Counter 2 reloads on the tick after it reaches zero, so a preset P gives a
period of P + 1 ticks. This is why the adder subtracts one. A C2 of 0 gives
the shortest period, one tick.

### Parameters of `fdfs_top`

| parameter | default | meaning |
|---|---|---|
| `C1_W` | 24 | Counter 1 width |
| `C2_W` | 32 | Counter 2 width (C1_W + 8 for the 2^8 range) |
| `M_W` | 9 | width of m1 and k1 (1 .. 256; k1 = 0 gives the largest C2, clipped) |
| `FINE_W` | 23 | fine-tuning magnitude; `fine_sub` chooses subtract |
| `FRAC_W` | 16 | fractional bits of C2 and accumulator width |
| `GEN_W` | 8 | generator divide-ratio width |
| `EXP_MAX` | 8 | largest adaptive exponent |
| `N_W` | 16 | PLL prescaler width |

The 24/32-bit counters, the 2^8 range and the 23-bit fine tuning match an
FPGA implementation of this synthesizer. A 16-bit version with 16-bit
counters (`C1_W = C2_W = 16`) also works. With a 31.111 MHz clock its lowest
input frequency is 31.111e6 / 2^16 ≈ 475 Hz.

Sizes after coarse synthesis at the defaults: about 210 word-level cells and
360 flip-flops. Most of them are in the divider and the register.

## Where this design departs from the original synthesizer

* **One clock.** The original block diagram has two independent
  generators, and the board version clocked both counters from one crystal
  while two external one-shots made the Load, Enable and Clear pulses. Here everything is synchronous to one clock, and the one-shots are
  replaced by an edge detector. So the constant count difference those pulses
  caused does not occur.
* **General g(C1).** The original used power-of-two shifts of the register
  contents, and an adder/subtractor, for g(C1). Here a divider computes
  m1·C1/k1, which includes the shifts and also covers ratios such as ×11 and
  ×5.7. It costs 49 cycles of latency per measurement.
* **Design choices.** The following are this design's own choices: the
  fractional width (16 bits), the first-order accumulator clocked once per
  output period, the adaptive thresholds, the factor of two per adaptive step,
  the dropping of mixed-rate captures, and the `−1` in the preset.
* **Analog parts.** The PLL's analog parts (phase detector, loop filter, VCO)
  are not included.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fdfs_pkg.sv tb/tb_fdfs_top.sv \
          --top-module tb_fdfs_top -o sim && ./obj_dir/sim
```

Replace `tb_fdfs_top` with the testbench you want.

* `tb_fdfs_top` runs the whole synthesizer at `C1_W = 12`, `C2_W = 20`. It
  covers follower, input change, ×11 with and without correction, ×5.7,
  fine add and subtract, clipping, overrun, adaptive up and down, the
  generator ratio and the PLL prescaler. It counts each of these mechanisms
  and fails if one never happened.
* `tb_fdfs_full` runs the top at its default parameters with real-valued
  clock and input periods. It takes about 30 s and covers:
  * a 31.111 MHz clock with inputs from 1.502 kHz to 3.275 MHz. The measured
    C1 must be within one count of the counts measured on hardware at those
    frequencies: 20713, 15478, 7762, 5181, 3108, 1555, 777, 311.
  * a 33.3 MHz clock with a 6.2 MHz input, ×11 and ×5.7 at 10 kHz, and ×11
    with a 6.2 MHz output.
  * a 2 Hz input, which puts 16.65 million counts in the 24-bit counter
    without overrun.
* `tb_fdfs_pll` closes a fractional PLL around the synthesizer. The VCO and
  the phase detector are behavioural models in the testbench. With N = 8,
  m1/k1 = 57/10 and a 100 kHz reference, the VCO settles at 4.56 MHz, a
  ×45.6 multiple. The lock resolution is one count of C1 (here 1/58). The
  ratio is then switched to ×24.
* `tb_fdfs_lattice16` runs the 16-bit configuration at its lowest input
  frequency: 476 Hz still fits and 470 Hz overruns.

The simulator has two states. The testbenches therefore reset everything
they read and use `$urandom` for random stimulus.
