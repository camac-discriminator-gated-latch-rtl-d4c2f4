# TITO: discriminator-gated latches with a digital multiplicity trigger

A streamer chamber is expensive to fire, so it is fired only when a
phototube hodoscope in front of it shows enough particle tracks. Each
phototube drives a discriminator. The discriminator pulses that fall inside a
strobe (the master K⁻ trigger) are caught in latches. The number of latches
set is the multiplicity *m*. It is counted in binary, module by module, while
the event is still held in the latches. An analyzer compares *m* with a
threshold *N* set on a rotary switch:

* if *m* ≥ *N*, it fires the chamber at a delayed strobe. The computer then
  reads the latch words over CAMAC and clears them.
* if *m* < *N*, a fast reset pulse clears every latch, ready for the next event.

This repository holds SystemVerilog for the whole digital chain. In its
default configuration there are five 16-channel latch modules (80 channels)
and one analyzer. The analog front-end parts are behavioural models.

## Signal path of one channel

```
vin ─► disc_comparator ─► pulse_shaper ─► AND(gate, ~inhibit) ─┬─► nim_out
       (threshold)        (delay-type                           └─► set ┐
                           differentiator)                              latch ─► b (led, readout, digital sum)
                                              latch_rst ─────────► reset ┘      a_n (analog sum)
```

* **Comparator** (`disc_comparator`): true while the input is more negative
  than `THRESH_MV` (default −100 mV; the hardware can be set from −50 to
  −500 mV). It is a behavioural model of the analog stage. Voltages
  everywhere are signed 16-bit millivolt integers (`tito_pkg::mv_t`), so the
  models need no `real` nets.
* **Pulse shaper** (`pulse_shaper`): the comparator level is registered,
  then delayed by `PULSE_W` stages. The output is the level AND NOT its delayed
  copy. A leading edge therefore gives one pulse of `PULSE_W` cycles. An
  input shorter than that gives a pulse as long as the input. A level that
  stays high gives no second pulse, so the discriminator responds only to
  fast edges.
* **Coincidence gate and latch** (`disc_channel`): the three inputs are the
  shaped pulse, the strobe gate and NOT inhibit. The gate output is the
  channel's NIM output, and it sets a flip-flop. The flip-flop's reset
  overrides its set.

### Clock and timing

The original circuit had no clock. This design runs everything on one clock,
assumed to be 1 ns per cycle, so that the pulse widths in nanoseconds become
cycle counts (`PULSE_W = 8` for the 8 ns standard pulse). At that clock:

| path | latency |
|---|---|
| input crossing threshold → `nim_out` | 1 cycle |
| input → latch, LED, readout, analog and digital sums | 2 cycles |
| latches → analyzer `ge`, `sum` | combinational |
| analyzer strobe → `trigger`, `uniq` | combinational |
| reset input → latches cleared | 1 cycle |

A 20-cycle strobe gate and an 8-cycle pulse coincide for 8 + 20 − 1 = 27
input positions, close to the 30 ns overlap range measured on the hardware.
A 50 MHz input train (10 high, 10 low) gives one full-width pulse per input.

## The latch module (`tito_latch_module`)

One module handles 16 channels and contains:

* **Strobe and reset translation.** The NIM strobe and fast-reset inputs go
  through comparators with a fixed −220 mV bias.
* **Strobe fan-out and latch reset** (`strobe_reset_ctrl`). Four fan-out
  gates each enable four coincidence gates. The `strobe_off` switch forces
  all four on, so the module becomes a 16-channel ungated discriminator. The
  latch reset is the fast reset OR CAMAC `C·S2`.
* **CAMAC readout** (`camac_readout`). When the module's N line is asserted
  with F(0)·A(0), the latch word goes onto R1–R16 and Q = 1. Otherwise the
  outputs are 0, so several modules can be ORed onto the dataway.
* **Analog sums** (`analog_sum`, behavioural). There is one output per
  8-channel half, −100 mV per set latch, in 9 levels from 0 to −800 mV.
* **Digital addition logic** (`addition_logic`), described in the next
  section.

## Counting without a counter: the addition logic

This is the least obvious part of the design. The multiplicity is computed
entirely in combinational logic, and it ripples from module to module along
a four-line bus (`tito_pkg::msum_t`). The lines are `sum[2:0]` (binary
weights 1, 2, 4) and `ovf`, which means *m* ≥ 8. Eight is the most that
matters, because *N* ≤ 8.

Inside a module:

1. **Four-line encoder** (`four_line_encoder`). It counts four lines A–D as
   two pairs, using gates instead of adders:
   * "1" = (A⊕B)⊕(C⊕D)
   * "2" = (A⊕B)(C⊕D) + (AB)⊕(CD)
   * "4" = ABCD
2. **Eight-line encoder** (`eight_line_encoder`). It merges two of those
   counts, *x* and *y* (each at most 4), with gates:
   * "1" = x1⊕y1
   * "2" = x2⊕y2⊕x1y1
   * "4" = x1y1(x2+y2) + x2y2 + (x4⊕y4)
   * "8" = x4y4

   The "4" term uses exactly one of the two "4" lines, so 4 + 4 shows
   only as "8".
3. **First-rank adder.** A 3-bit ripple adder (`ripple_adder`, built from
   `full_adder` cells) adds the 1-2-4 counts of the two halves.
4. **m ≥ 1 output** (`m_ge1`). It is the OR of the first-rank sum, its
   carry and both "8" lines. It is true whenever this module holds any latch.
5. **Second-rank adder.** It adds the module's 3-bit count to the sum
   arriving from the previous module (`prev`). The result goes out on `next`.
6. **Overflow.** `next.ovf` is the OR of both "8" lines, both adder carries
   and `prev.ovf`. `next_ovf_n` is its complement.

When `ovf` is set, the 1-2-4 lines hold *m* mod 8 or less and mean nothing.
Every consumer must look at `ovf` first.

## The analyzer (`analyzer`, `mult_decoder`)

1. The 1-2-4 lines are ANDed with NOT overflow and decoded one-hot into
   *m* = 0…7. The zero line is also suppressed during overflow. Line 8 is the
   overflow, so exactly one of the nine lines is true.
2. `ge[k]` (*m* ≥ *k*+1, for *k* = 0…7) is the OR of the decoded lines from
   *k*+1 upward.
3. `n_select` is the rotary switch, and picks `ge[N-1]`. Positions 0 and 9–15
   select nothing.
4. The unique lines and the selected line are ANDed with the analyzer's
   translated NIM strobe. This gives `uniq` and `trigger`.

## Top level (`tito_top`)

`tito_top` chains `N_MODULES` latch modules. Module 0 starts from a zero
sum, and the last module feeds the analyzer. The modules share the dataway
lines A, F, S2, C and I and have one N line each. `camac_r` and `camac_q`
are the OR of all modules. The ports are plain arrays: per channel `vin`,
per module `strobe_mv`, `reset_mv`, `strobe_off`, `nim_out`, `led`, `m_ge1`
and `asum_mv`, and the analyzer's `an_strobe_mv`, `n_select`, `sum`, `uniq`,
`ge` and `trigger`. An active-low `rst_n` clears all state at power-up.

| parameter | default | meaning |
|---|---|---|
| `N_MODULES` | 5 | latch modules (five 16-bit latch words) |
| `PULSE_W` | 8 | shaped pulse width, cycles |
| `THRESH_MV` | −100 | channel threshold, mV |
| `NIM_BIAS_MV` | −220 | strobe/reset translator bias, mV |

## What follows the original and what is this design's own

These parts follow the original hardware:

* the channel structure: comparator, delay-type differentiator, three-input
  coincidence, set/reset latch
* strobe fan-out in four groups of four, and strobe-off mode
* reset = fast reset OR C·S2
* the encoder equations
* the two-rank adder structure, the overflow OR and its complement
* overflow gating and decoding in the analyzer
* strobed unique and trigger outputs selected by a switch
* five modules of 16 channels

These are this design's own choices:

* **Clock.** There is a single 1 ns clock. Latches and shaper are registers,
  not asynchronous gates.
* **Power-up reset.** `rst_n` is added.
* **Latch conflict.** Reset wins over a simultaneous set.
* **CAMAC read.** The word is read with F(0)·A(0) and answered with Q = 1.
  No X response is given.
* **Translator biases.** The reset input and the analyzer strobe use the
  same −220 mV bias as the latch-module strobe.
* **One threshold per module.** It is a parameter, not a per-channel
  adjustment.
* **m ≥ 1.** The output includes the first-rank carry, so that a 4 + 4 split
  also reports *m* ≥ 1.
* **Greater-than logic.** It is a plain OR chain, not a gate arrangement
  tuned for propagation delay.
* **Analog models.** The comparator and analog sum are ideal: no slewing,
  hysteresis, offset or delay.

Not modelled at all:

* input protection, the 50 Ω termination and LED, TTL and NIM level
  translators (they have no logic of their own)
* the phototube amplifiers and the K⁻ trigger logic
* the analyzer's scalers and its CAMAC controller and readout of the four
  multiplicity bits
* the host computer

## Verification

Every module in `rtl/` has a self-checking testbench in `tb/`
(`tb_<module>.sv`). Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog:

* **Encoders, adder, decoder, analyzer, readout and strobe control:**
  exhaustive over all inputs (the addition logic is exhaustive for one- and
  two-bit patterns and random beyond).
* **`tb_pulse_shaper`:** pulse width, latency, short inputs, a 50 MHz train
  and slope sensitivity.
* **`tb_disc_channel`:** sweeps the input time against the strobe and checks
  the 27-cycle overlap range. It also checks latency, inhibit, strobe-off
  and reset priority.
* **`tb_tito_latch_module`:** random events, threshold margins, both reset
  paths, readout addressing, analog outputs and the sum chain.
* **`tb_tito_top`:** runs 60 events through the full five-module system at
  default parameters. It checks every latch word read over CAMAC, the sums,
  all `ge` outputs, `uniq` and the trigger against *N*. It also requires
  that each of these has happened: accepted, rejected, overflow, stray
  out-of-strobe pulse, inhibit, strobe-off, fast reset, CAMAC clear and
  readout.

All testbenches pass. To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
  --top-module tb_tito_top rtl/tito_pkg.sv tb/tb_tito_top.sv -o sim
./obj_dir/sim
```

Any other testbench works the same way: change the `--top-module` and the
file name.
