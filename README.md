# N-bit LFSR pseudo-noise generator

A spread-spectrum CDMA transmitter gives each user a pseudo-noise (PN)
sequence. The sequence looks random but is fully determined, and it repeats
only after a long period. The cheapest way to make one is a linear feedback
shift register (LFSR). An LFSR is a chain of N flip-flops. On every clock the
chain shifts by one place, and the empty first stage is filled with the XNOR
of a few chosen stages, called taps. With the right taps the register steps
through all 2^N - 1 allowed states before it repeats. That is a
maximal-length sequence, or m-sequence.

This RTL builds that generator at any width. It has tap tables for 4, 8, 16,
32 and 64 bits. A top level holds all five widths side by side.

## Files

| file | what it is |
|------|------------|
| `rtl/lfsr_pkg.sv` | feedback type and the tap table (`tap_mask()`) |
| `rtl/lfsr.sv` | the parameterised N-bit generator |
| `rtl/lfsr_top.sv` | top level: 4, 8, 16, 32 and 64-bit generators side by side |
| `tb/lfsr_ref_pkg.sv` | reference model and the published sequence starts, for the testbenches |
| `tb/lfsr_tb.sv` | unit test of `lfsr` at six configurations |
| `tb/lfsr_top_tb.sv` | end-to-end test of `lfsr_top` at its defaults |

## The feedback polynomials

A polynomial term x^k names stage k. Stage 1 is the stage that receives the
feedback, and stage k is bit k-1 of the state word.

| width | polynomial | period (clocks) |
|------:|------------|----------------:|
| 4  | x^4 + x^3 + 1 | 15 |
| 8  | x^8 + x^6 + x^5 + x^4 + 1 | 255 |
| 16 | x^16 + x^15 + x^13 + x^4 + 1 | 65 535 |
| 32 | x^32 + x^22 + x^2 + x + 1 | 4 294 967 295 |
| 64 | x^64 + x^63 + x^61 + x^60 + 1 | 2^64 - 1 |

The feedback bit is `~^(state & TAPS)`, the XNOR of the tapped stages. The
next state is `{state[N-2:0], feedback}`. If you draw stage 1 on the left,
the data moves right and the feedback enters at the left. Read as a binary
number, the state shifts towards its MSB.

### Why XNOR, and the lock-up state

An XNOR register can never leave the all-ones state: every tap reads 1, so
the feedback is 1 again. The all-zeros state is legal and is the natural start
after reset. An XOR register is the other way round: zero is the stuck state.
XNOR feedback gives these known sequences, starting from zero:

* 4 bit: 0, 1, 3, 7, 14, 13, 11, 6, 12, 9, 2, 5, 10, 4, 8, then 0 again (1111 never occurs)
* 8 bit: 1, 3, 7, 15, 30, 61, 122, 244, 232, 208, 161, 67, ...
* 16 bit: 1, 3, 7, 15, 30, 60, 120, 240, 481, 963, 1927, ...
* 32 bit: 1, 2, 4, 9, 18, 36, 73, 146, 292, 585, ...

These are the reference patterns for the generator, and the testbenches
check them. XOR feedback is still available as `FEEDBACK = FB_XOR`. Reset
then loads 1 instead of 0.

Shifting can never reach the lock-up state. An assertion in `lfsr` checks
this. The state can only get there by loading it as a seed, and the register
then stays there while enabled.

## `lfsr` — the generator

```
lfsr #(.NUM_BITS(32), .TAPS(<from table>), .FEEDBACK(FB_XNOR)) u (
  .clk, .rst, .enable, .seed_dv, .seed_data, .lfsr_data, .pn_out, .done);
```

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | rising-edge clock |
| `rst` | in | 1 | synchronous, active high; clears the state to 0 (XNOR) or 1 (XOR) |
| `enable` | in | 1 | low: the state holds; `seed_dv` is ignored too |
| `seed_dv` | in | 1 | with `enable` high, load `seed_data` instead of shifting |
| `seed_data` | in | N | seed, and the value `done` compares against |
| `lfsr_data` | out | N | the state, all stages in parallel |
| `pn_out` | out | 1 | serial PN chip: the last stage, bit N-1 |
| `done` | out | 1 | high while `lfsr_data == seed_data` |

Timing:

* The generator produces one state per enabled clock.
* All outputs come directly from the register. `done` passes through one
  N-bit equality comparator.
* A seed loaded on clock t is visible after clock t. `done` is then high at
  once.
* `done` rises again exactly 2^N - 1 enabled clocks later, when the sequence
  has come round to the seed. With the seed held at 0 after reset, `done`
  therefore marks the end of each period.
* `seed_data` is also the compare value. Changing it while the register runs
  moves the point where `done` fires.

Per stage, the logic is one flip-flop and a 2:1 seed multiplexer. Stage 1
also has the 2- or 4-input XNOR. There is no carry chain, which is why an
LFSR is faster than a binary counter of the same width.

Parameters:

* `NUM_BITS` (default 32): the register width.
* `TAPS`: the tap mask. Its default is `lfsr_pkg::tap_mask(NUM_BITS)`. For a
  width that is not in the table you must give `TAPS` yourself, and the mask
  must include bit N-1. Elaboration stops with an error otherwise.
* `FEEDBACK`: `FB_XNOR` (default) or `FB_XOR`.

## `lfsr_top` — all widths together

`lfsr_top` holds five independent `lfsr` instances: 4, 8, 16, 32 and 64 bits,
all with XNOR feedback and the tabulated taps. They share `clk` and `rst`.
Each width has its own ports:

* `enable<N>`
* `seed_dv<N>`
* `seed<N>`
* `data<N>`
* `pn<N>`
* `done<N>`

The top has no parameters. Synthesis gives 124 flip-flops: one per stage, and
nothing else holds state.

## Where this departs from the reference design

* **Reset.** The reference FPGA implementation has no reset pin. Its pin
  count is 2N + 4: clock, enable, seed valid, done, plus N seed and N data
  pins. Its register starts at zero from the FPGA's power-up value. Here a
  synchronous `rst` gives the same start state in any technology. Tie it low
  if you do not want it.
* **Serial output.** `pn_out` is an extra output. It is only a copy of the
  last stage.
* **Feedback gate.** The design is sometimes described as "XOR-based". Every
  sequence it is specified by needs XNOR feedback, so XNOR is the default.
  XOR is a parameter option.
* **`done` semantics.** The comparator against the seed input is part of the
  reference structure. Its exact meaning (equal to the seed, level not
  pulse) is this design's choice.
* **Tap table.** The table covers exactly five widths. Any other width is
  supported only through an explicit `TAPS`.
* **Not included.** The CDMA use of the sequence is to multiply it with the
  message bits. That spreading step is not part of this RTL. With 0/1 logic
  levels the multiplication is an XOR of the message bit with `pn_out`, but
  the chip rate and the spreading factor are left to the user.
* **Speed.** The clock rate a register reaches depends on the target. The
  reference FPGA implementation is reported at roughly 1 GHz to 1.3 GHz. This
  RTL has the same one-gate-level feedback path, but it has not been timed.

## Verification

Each testbench compares the RTL with a reference model in `tb/lfsr_ref_pkg.sv`
on every clock. The model computes each next state from the polynomial
exponents, one tap at a time, and does not reuse the RTL's tap masks.

`tb/lfsr_tb.sv` tests six configurations:

* the default 32-bit generator;
* the 4, 8, 16 and 64-bit generators;
* an 8-bit XOR variant.

It checks:

* the published sequence starts listed above;
* the exact periods, 15, 255 and 65 535 clocks, with every state seen only
  once in a period;
* the number of `done` pulses;
* that a low `enable` holds the state;
* seed loads, and that a load is ignored while disabled;
* the period measured from an arbitrary seed;
* that the lock-up states hold;
* reset in mid-run.

`tb/lfsr_top_tb.sv` runs `lfsr_top` at its defaults for 70 000 clocks:

* The 16-bit generator runs one complete 65 535-state period without a
  break.
* The other widths get random stalls and random seed loads.
* Near the end, the 4-bit generator is loaded with its lock-up state, and a
  reset is applied in mid-run.

It counts each of these events and fails if one never happened. The 32 and
64-bit periods are far too long to simulate. Those two widths are checked
state by state against the model for the first 70 000 clocks.

Each run prints `TB_RESULT checks=<n> failures=<n>`. Simulation with
Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/lfsr_pkg.sv rtl/lfsr.sv rtl/lfsr_top.sv \
  tb/lfsr_ref_pkg.sv tb/lfsr_top_tb.sv --top-module lfsr_top_tb
./obj_dir/Vlfsr_top_tb
```

Use `tb/lfsr_tb.sv` and `--top-module lfsr_tb` for the unit test. Both run
in well under a second.
