# BZ-FAD: a low-switching shift-and-add multiplier

A shift-and-add multiplier is about the smallest multiplier there is: one adder, a
few registers and a counter, one bit of the multiplier per clock. Its weakness is
power. In every cycle it shifts the B register, shifts the partial product, counts
in binary, switches a 0/A multiplexer in front of the adder and adds, even when
the bit of B it is working on is 0 and the addition changes nothing.

BZ-FAD ("Bypass Zero, Feed A Directly") keeps the serial structure and removes
most of that switching:

| Source of switching in a conventional shift-and-add | What this design does instead |
|---|---|
| B register shifted every cycle | B is loaded once and stays put; a multiplexer selects bit B(i) |
| Binary step counter | One-hot ring counter, split into clock-gated blocks ("hot blocks") |
| 0/A multiplexer in front of the adder | A is wired straight to the adder |
| Adder used on every step | For a 0 bit of B the adder's result is skipped (bypass) |
| Low half of the partial product shifted every cycle | Product bit i is written once into latch i, selected by the ring counter |

The RTL is an unsigned 16 x 16 -> 32-bit multiplier. Its ring counter is 16 bits
long in blocks of 4 flip-flops.

## One multiplication

Registers and storage (`bzfad_multiplier`):

- `a_q`, `b_q`: operand registers. They are loaded when `start` is accepted and
  do not change afterwards.
- `ring`: the 16-bit one-hot ring counter (`hot_block_ring_counter`). While idle,
  its hot bit is on bit 0.
- `pph`: the high half of the partial product (`pp_high_register`), N bits.
- `plow`: the low half of the product, N latches (`plow_latches`).

In step i (i = 0 .. N-1) the hot bit is at `ring[i]`:

1. `b_bit_mux` computes `b_bit = |(b_q & ring)`, which is B(i).
2. `bzfad_adder` always computes `sum = a_q + pph` (N+1 bits). A goes in
   directly, with no gating.
3. The bypass multiplexer in `pp_high_register` picks `nxt = b_bit ? sum : {0, pph}`.
   - `nxt[0]` is the finished product bit i. It goes to latch i of `plow`.
   - `nxt[N:1]` becomes the new `pph`.
   So for a 0 bit the adder output is ignored, and the register just shifts right.
4. On the rising edge at the end of the step, the ring counter moves its hot
   bit to `ring[i+1]`. After bit N-1 it wraps to bit 0.

After N steps, `product = {pph, plow}`. The ring counter is back at bit 0, ready
for the next operation. The ring counter also acts as the step counter:
`bzfad_controller` ends the run on the step in which `ring[N-1]` is hot. There is
no binary counter anywhere.

### Interface and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `start` | in | 1 | on a rising edge while `busy` is low: load `a`, `b` and begin |
| `a`, `b` | in | 16 | multiplicand, multiplier (unsigned) |
| `busy` | out | 1 | steps in progress; `start` is ignored meanwhile |
| `done` | out | 1 | high for one clock after the last step |
| `product` | out | 32 | A*B; valid from `done` until the next accepted `start` |

If `start` is accepted on edge t, the steps run on edges t+1 … t+N and `done`
is high in the clock after edge t+N. That makes N = 16 clocks from start to
result. A `start` held high during `done` is accepted, so operations can follow
each other with no gap. `a` and `b` may change as soon as they have been loaded.

## The hot-block ring counter

A one-hot ring counter changes only two flip-flops per shift, yet a plain one
clocks all of them every cycle. The hot-block counter (`hot_block_ring_counter`)
splits the flip-flops into blocks of `BLOCK` (4 by default). Each block has its
own gated clock from a `hot_block_clock_gate` cell. A block's clock runs in a
cycle only when `shift` is high and one of these holds:

- the block holds the hot bit, so the bit moves inside the block or leaves it; or
- the last flip-flop of the previous block holds the hot bit, so the bit enters
  on this edge.

So each shift clocks `BLOCK` flip-flops, or `2*BLOCK` when the hot bit crosses
into the next block. A plain counter clocks all `WIDTH` of them. The gating cell
has the same three parts whatever the block size:

- a 2:1 multiplexer that forms the enable: 1 if the block is hot, otherwise the
  previous block's last bit, ANDed with `run`;
- a resettable latch, open while `clk` is low. It holds the enable through the
  high phase, so the gated clock cannot glitch when the ring changes just after
  the edge;
- a NAND of `clk` and the latched enable.

The NAND output is inverted here, so the gated clock is in phase with `clk` and
all flip-flops in the design use the rising edge. In reset the latch is cleared,
which turns off every block clock. The ring flip-flops therefore use an
asynchronous reset, which puts the hot bit on bit 0 whether or not a clock runs.

`tb_ring_counter_sizes` counts the flip-flop clock edges over 192 shifts for
widths 16/32/48/64 and block sizes 2/4/8/16. The count is (BLOCK+1) per shift on
average, against WIDTH for a plain counter. For 64 bits with blocks of 4, that is
7% of the plain counter's flip-flop clocking. The count leaves out the gating
cells' own load and the clock tree, so it is not a power figure.

## The low-order product latches

`plow` is N level-sensitive latches, not a register. Latch i is open when
`busy & ring[i] & ~clk`, which is the low half of step i only. It closes on the
rising edge that ends the step. The data bit `nxt[0]` and `ring` change only
after that edge, so the latch captures a bit that has been stable for the whole
low phase. Each latch is written once per multiplication and keeps its value until
the next one. The latches have no reset; every bit is rewritten on each
operation. Static timing for this path needs `nxt[0]` (an adder carry chain
from `pph` and `a_q`) to settle within the high phase plus the low phase, which
is one clock period.

Both latch uses (this one and the gating latch) are intentional. Synthesis
reports 20 latch bits for the top: 16 here and one per ring-counter block.

## Switching activity

`tb_bzfad_multiplier` runs 100 random operand pairs through the design and
through a cycle-accurate model of a conventional shift-and-add multiplier. It
counts per-clock bit transitions of the corresponding parts. One run gave:

| Part | this design | conventional model |
|---|---|---|
| Low-order product storage (latches / shifting B register) | 747 | 12868 |
| Adder output | 12139 | 12744 |
| Multiplexers (B-bit select + bypass / 0-A select) | 12769 | 6115 |
| Step counter flip-flop outputs (ring / 5-bit binary) | 3200 | 3200 |

The low-order storage shows the large reduction the architecture is designed for,
about 94%. The multiplexers switch more than in the conventional design, as
expected. Three things these counts do not show:

- The adder saves much less here than a design that also freezes its inputs on
  bypassed steps. In this RTL the high half of the partial product still shifts
  every step, so the adder input keeps changing. See "Choices" below.
- The ring counter's benefit is in clock activity, which these output transitions
  do not capture.
- These are zero-delay transition counts. They include no glitches and no
  capacitance weighting.

## Choices made in this RTL

The list of modifications above is the architecture. Everything below is this
design's own choice:

- **Unsigned operands.** There is no sign handling.
- **The high partial product still shifts.** Only the low half stops shifting,
  replaced by latches. The adder's input is therefore not held constant during
  bypassed steps.
- **The ring counter is N bits long.** Its wrap-around marks the last step, and
  it comes back home at bit 0 without being reloaded.
- **Block details.** Ring counter blocks are clocked through the gating cell
  described above. The exact wiring of the multiplexer, latch and NAND is
  reconstructed from their roles. The `shift`/`run` input that stops the counter
  between operations is an addition.
- **Ripple-carry adder.** This is the smallest adder, in keeping with a
  multiplier aimed at area and power rather than speed.
- **Handshake and reset.** The `start`/`busy`/`done` handshake, the asynchronous
  active-low reset and the latch clock phase are all choices made here.
- **Not built.**
  - The comparison designs: the conventional shift-and-add and a tree-based
    array multiplier.
  - The alternative that replaces the low-order latches with a serial-to-parallel
    converter.

## Files

`rtl/` holds one module or package per file:

| File | Contents |
|---|---|
| `bzfad_pkg.sv` | default sizes (`BZ_N = 16`, `BZ_BLOCK = 4`), controller state type |
| `bzfad_multiplier.sv` | top: registers, wiring, one-hot assertions |
| `bzfad_controller.sv` | idle/run sequencer, start/busy/done |
| `hot_block_ring_counter.sv` | clock-gated one-hot ring counter (`WIDTH`, `BLOCK`) |
| `hot_block_clock_gate.sv` | per-block gating cell |
| `b_bit_mux.sv` | one-hot selector of B(i) |
| `bzfad_adder.sv` | ripple-carry adder with carry out |
| `pp_high_register.sv` | high partial product and bypass multiplexer |
| `plow_latches.sv` | low-order product latches |

`tb/` holds a self-checking testbench `tb_<module>.sv` for each module, plus
`tb_ring_counter_sizes.sv`. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- `tb_bzfad_multiplier` runs the top at its default size. It checks products and
  the 16-clock latency. It also checks that each mechanism occurred: add steps,
  bypass steps, ring block hand-overs, ring wrap, ignored starts and back-to-back
  starts.
- `tb_hot_block_ring_counter` checks 16-bit and 64-bit counters, including which
  blocks receive a clock edge.

### Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bzfad_pkg.sv \
    tb/tb_bzfad_multiplier.sv --top-module tb_bzfad_multiplier -Mdir obj
./obj/Vtb_bzfad_multiplier
```

Use the same command with another `tb_*.sv` file and its module name. Every
testbench finishes in well under a second. Each testbench drives `rst_n` from 1 to 0
at the start, because the gated ring-counter clocks are off during reset and the
flip-flops rely on the asynchronous reset edge.

### Changing the size

`N` and `BLOCK` are parameters of `bzfad_multiplier`, with defaults taken from
`bzfad_pkg`. `WIDTH` (= `N`) must be a multiple of `BLOCK`, and `BLOCK` must be at
least 2; an assertion checks this at elaboration. The latency is always N clocks.
