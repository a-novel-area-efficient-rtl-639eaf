# Folded modified convolutional interleaver (FMCI), 4 x 4

A channel interleaver scatters neighbouring coded symbols in time. A burst of
channel errors then reaches the decoder, here a MAP (BCJR) decoder, as
scattered single errors. A convolutional interleaver does this by giving each
of the N symbol positions of a period its own delay. Built directly, every
position has its own shift register, so a 4 x 4 interleaver needs
M(N-1)/2 = 6 storage elements. A block interleaver needs MN = 16.

The FMCI takes a different route in two steps:

1. **Modify** the interleaver: change which position gets which delay, so
   that fewer symbols wait at the same time.
2. **Fold** it: stop giving each position its own register. All positions
   share the smallest set of registers that can hold every waiting symbol.
   That number comes from *lifetime analysis*. A fixed allocation table, filled
   in by *forward-backward register allocation*, says which symbol sits in
   which register in each cycle.

For the 4 x 4 case (M = N = 4, J = 1) the interleaver needs only **two
registers**, M - 2. That is 87.5 % less storage than the block interleaver's
16. This RTL implements:

* that interleaver;
* a matching one-register deinterleaver;
* the slot counter that sequences both;
* a top level that chains them end to end.

## Files

| file | contents |
|---|---|
| `rtl/fmci_pkg.sv` | slot type, period, latencies and the allocation tables |
| `rtl/fmci_ctrl.sv` | folding controller: modulo-4 slot counter and fill flag |
| `rtl/fmci_interleaver.sv` | two-register folded interleaver |
| `rtl/fmci_deinterleaver.sv` | one-register folded deinterleaver |
| `rtl/fmci_top.sv` | interleaver feeding deinterleaver; the top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

## The schedule

Time is split into periods of four cycles. Each cycle is a *time instance*
4l+m: l is the period number and m (0..3) is the *slot*. The four symbols of
a period are called c, d, b and a, in the order they arrive, in slots 0 to 3.
Each symbol gets its own delay through the interleaver:

| symbol | arrives in slot | delay (cycles) | live during cycles | leaves in slot |
|---|---|---|---|---|
| c | 0 | 2 | 1, 2 | 2 |
| d | 1 | 3 | 2, 3, 4 | 0 (next period) |
| b | 2 | 1 | 3 | 3 |
| a | 3 | 2 | 4, 5 | 1 (next period) |

Taking the cycles modulo 4, exactly two symbols are live in every slot. So two
registers, R1 and R2, are enough, and both are busy all the time.

### Forward-backward allocation

Forward allocation puts a new symbol into R1 and moves it on to R2 one cycle
later. If a symbol reaches the last register while it is still live, it is
moved *backward* into a register that has become free. The resulting table
(contents during each slot, in steady state) is:

| slot | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| R1 | d (moved back from R2) | c | d | b |
| R2 | a (loaded from input) | a (held) | c (moved from R1) | d (moved from R1) |
| output | R1 → d | R2 → a | R2 → c | R1 → b |

From this table, each register gets a multiplexer that chooses its next value
for each slot. It can take the input, the other register, or its own value:

* R1 takes the input in slots 0, 1 and 2. In slot 3 it takes R2 (the
  backward move of d).
* R2 takes R1 in slots 1 and 2 (forward moves of c and d), the input in
  slot 3 (a), and holds its value in slot 0.
* The output multiplexer reads R1 in slots 0 and 3 and R2 in slots 1 and 2.

`fmci_pkg` holds these as three constant arrays of a `src_e` enum:
`INT_R1_NEXT`, `INT_R2_NEXT` and `INT_OUT`. `fmci_interleaver` decodes them.
To try another ordering, change only these tables, plus the delays in the
testbenches.

The stream leaving the interleaver is, per period: d of the previous period,
a of the previous period, c, b. In terms of positions in the original stream
(c = 4l, d = 4l+1, b = 4l+2, a = 4l+3), the channel carries
… 4l-3, 4l-1, 4l, 4l+2, 4l+1, 4l+3, 4l+4, 4l+6 …. Two symbols that are
adjacent on the channel therefore come from original positions one or two
apart. This small permutation spreads a burst only a little. The saving is in
storage, not in spreading.

### Deinterleaver

The deinterleaver gives each symbol the complementary delay, 3 minus its
interleaver delay: d 0, a 1, c 1, b 2. Every symbol then leaves the pair
exactly **3 cycles** after it entered. The same lifetime analysis shows that
one register R is enough:

| slot | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| input | d | a | c | b |
| R holds | b | b | a | c |
| R next | hold | input | input | input |
| output | input (d passes straight through) | R → b | R → a | R → c |

The output order d, b, a, c in slots 0 to 3 is the original order c, d, b, a,
shifted by three cycles. In slot 0 the output is a combinational copy of the
input.

## Interfaces and timing

All modules use `clk` and an active-low synchronous `rst_n`. `en = 1` presents
one symbol in that cycle. `en = 0` stalls: registers and slot counters keep
their values.

* `fmci_interleaver`: `sym_in` → `sym_out`. `out_valid` rises when the
  third symbol after reset is presented, which is the cycle in which c of
  the first period comes out, and stays high. `sym_out` comes from the
  multiplexer of R1 and R2 only, with no combinational path from `sym_in`.
* `fmci_deinterleaver`: `out_valid` rises when the fourth symbol after reset
  is presented, and stays high. Its slot counter must run in step with the
  interleaver's. In `fmci_top` this holds because both halves share reset
  and `en`. An assertion in the top checks it.
* `fmci_top`: `sym_in` → `chan_sym` (interleaved stream, `chan_valid`) →
  `dec_sym` (restored stream for the MAP decoder, `dec_valid`). `slot` is the
  current m.
* `DATA_W` (default 1, one-bit storage elements) sets the symbol width. Use
  a larger value to carry soft symbols.

After synthesis the top has 11 flip-flop bits at `DATA_W = 1`: three data
registers, two 2-bit slot counters and two small fill counters.

## How far it follows the source description

The two-register count and the lifetimes of c, d and b follow the scheme's
description. So do the forward move of c, the forward-then-backward moves of
d, and the output instances: R1 at 4l+0 and 4l+3, R2 at 4l+2. The rest of
the design departs from it or fills gaps:

* **Symbol a.** The description gives a no lifetime, that is, it leaves in
  the same cycle it arrives. But then slot 3 would have two outputs and
  slot 1 none. The given lifetimes add up to 6 cycles per period, and no
  one-symbol-per-cycle permutation with period 4 allows that. Here a is held
  in R2 for two cycles and leaves in the free slot 1. The register count
  stays at two.
* **End-to-end delay.** The description quotes 2M = 8 cycles for this
  configuration. This design has 3 cycles from interleaver input to
  deinterleaver output. The figure of 8 could not be reproduced from the
  given lifetimes.
* **Deinterleaver.** The description only names it. It was derived here
  with the same method.
* **Own choices.** The enable/stall behaviour, the valid flags, reset and
  the `DATA_W` parameter were chosen here.
* **Fixed size.** Only M = N = 4 is built. The M-2 storage and 2M delay
  formulas for other M = NJ come with no allocation tables for them.
* **No MAP decoder.** The decoder is outside this RTL. Its input is
  `dec_sym`/`dec_valid`.

## Verification

Each testbench compares the outputs with a model written differently from
the RTL. It ends with a `TB_RESULT checks=… failures=…` line and has a
watchdog.

* `tb_fmci_ctrl`: slot equals the number of accepted symbols mod 4. Checks
  when `primed` rises, random stalls, and a reset in the middle of the run.
* `tb_fmci_interleaver`: 8-bit random symbols with random stalls. In slot m
  the output must equal the input from 3, 2, 2 or 1 accepted cycles earlier.
  `out_valid` must rise after exactly two symbols.
* `tb_fmci_deinterleaver`: the testbench builds the interleaved stream
  itself. Every output must equal the original symbol from 3 cycles earlier.
* `tb_fmci_top`: the whole path at default parameters, 4000 symbols with
  stalls. Checks the interleaved stream, the restored stream, the 3-cycle
  delay and the valid timing. It also watches the registers and counts each
  mechanism of the schedule, failing if one never happens: stall, forward
  move, backward move, hold of a, input load into R2, deinterleaver bypass
  and deinterleaver hold.

Run one with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl rtl/fmci_pkg.sv rtl/fmci_ctrl.sv \
  rtl/fmci_interleaver.sv rtl/fmci_deinterleaver.sv rtl/fmci_top.sv \
  tb/tb_fmci_top.sv --top-module tb_fmci_top
./obj_dir/Vtb_fmci_top
```

Each testbench finishes in well under a second.
