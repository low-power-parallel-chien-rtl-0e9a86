# Two-step low-power parallel Chien search

A BCH decoder finds its error positions with a Chien search. The search
evaluates the error locator polynomial Λ(x) at every candidate position of
the code word. In a high-throughput decoder the search is done p positions per
clock. That takes p·t constant Galois-field multipliers, all switching on
every cycle, and the Chien search is often the part of the decoder that uses
the most power.

This design cuts that activity with a cheap pre-test. A position can only be
an error if the field value under test equals the identity element, 0…01. So
if any of its top L bits is 1, the position cannot be an error, and the other
M−L bits are never needed. Each row therefore computes the top L bits first
(step one). It computes the rest (step two) only when those bits are all zero.
For random data that happens with probability 2^−L, so most of the
second-step logic stays still.

The RTL is parameterised. Its defaults are the BCH (8752, 8192, 40) code over
GF(2^14), searched 16 positions per cycle (p = 16), with L = 3 bits tested in
step one.

## The p-parallel search

Write Λ(x) = 1 + Y(x), with Y(x) = Σ_{j=1..t} λ_j x^j. Position k (k = 1…n)
is flagged when Y(α^k) = 1, which is the same as Λ(α^k) = 0.

The search runs for n/p cycles, w = 0 … n/p−1. In cycle w it tests positions
wp+1 … wp+p. Each coefficient j has one register holding

    ω_j(w) = λ_j · α^(j·p·w)

so that Y(α^(wp+i)) = Σ_j ω_j(w) · α^(i·j). Row i of the array (i = 1…p)
multiplies every ω_j by the constant α^(ij), adds the t products (a t-input
XOR), and compares the sum with 1.

Row p's products ω_j · α^(jp) are exactly the next register values ω_j(w+1).
So one multiplier per column both updates its register and feeds row p. A
multiplexer in front of each register loads λ_j when a new polynomial
arrives. These are the `omega_cell` blocks.

Every constant multiplier is a fixed binary matrix: output bit b is the XOR of
the input bits k for which bit b of α^(EXP+k) is set. `ffm_const` builds this
matrix at elaboration from the primitive polynomial. It can produce any
contiguous slice HI..LO of the product, and a slice costs only the matrix
columns it keeps. Those slices are the "partial multipliers" of the two steps.

## The two-step rows and their one-bit pipeline

Rows 1…p−1 are split into two steps (`cs_two_step_row`). Row p is not split,
because its multipliers must produce full values to update the registers.

**Step one (every cycle).** t partial multipliers produce only bits
M−1…M−L of ω_j(w)·α^(ij). Their XOR gives the top L bits of Y(α^(wp+i)). If
those bits are all zero, a one-bit register `en` is set for the next cycle.

**Step two (next cycle, only when `en` = 1).** Running step two in the same
cycle would put two multipliers in series and lengthen the critical path, so
step two runs one cycle later. By then the registers no longer hold ω_j(w):
they hold ω_j(w+1) = ω_j(w)·α^(jp). The obvious fix is to copy all t·M
register bits into a second bank. That doubles the registers.

Instead, step two multiplies the *current* register value by a different
constant:

    ω_j(w+1) · α^((2^m−1) + j(i−p)) = ω_j(w) · α^(jp) · α^(j(i−p)) = ω_j(w) · α^(ij)

The factor α^(2^m−1) equals 1. It is there only to keep the exponent
positive. The result is the same product as before, so only the single `en`
bit has to be pipelined per row. The step-two partial multipliers produce bits
M−L−1…0. An error is flagged when those bits equal 0…01.

**Gating.** While `en` is 0, every step-two multiplier input is ANDed to zero.
The step-two multipliers and adder then do not toggle. Their sum is 0, which
can never equal 1, so no separate qualification of the error flag is needed.

The price is one cycle of latency. The registers must also hold ω(n/p) for one
extra cycle, so that the last window's step two can run.

## Timing and interface (`chien_search_two_step`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | a new polynomial is on `lambda` |
| `ready` | out | 1 | `start` is taken in this cycle |
| `lambda` | in | T×M | `lambda[j-1]` = λ_j (λ_0 = 1 is implied) |
| `err_valid` | out | 1 | `err` holds the results of window `err_window` |
| `err_window` | out | ⌈log2(NW+1)⌉ | w |
| `err` | out | P | bit i−1: an error at position w·p+i |
| `step2_en` | out | P−1 | row i ran step two in this cycle (for activity measurement) |
| `done` | out | 1 | results of the last window |

- **Load.** The cycle in which `start` and `ready` are both high loads the
  registers (`load`).
- **Step one.** It runs for the next NW = ⌈n/p⌉ cycles.
- **Results.** Window w comes out one cycle after its step one, so the first
  result appears two cycles after `start`.
- **Row p.** Its comparator output goes through one flip-flop, so that all p
  flags of a window leave together.
- **Back-to-back code words.** `ready` goes high again in the cycle in which
  the last window's step two runs. A new polynomial can therefore be loaded
  every NW+1 cycles: 548 at the defaults.
- **`done`.** It comes NW+1 cycles after the load.

`err` is combinational from the step-two adders and the row-p flip-flop. When
p does not divide n, the flags beyond position n in the last window are
masked.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `M` | 14 | field dimension. It follows from n = k + m·t for (8752, 8192, 40). |
| `T` | 40 | correctable errors, and so the number of coefficient registers |
| `N` | 8752 | code length, i.e. the number of positions searched |
| `P` | 16 | parallel factor |
| `L` | 3 | MSBs tested in step one |
| `POLY` | `32'h402B` | primitive polynomial, x^14+x^5+x^3+x+1 |

Shared defaults live in `rtl/cs_pkg.sv`, which also holds the elaboration-time
field functions. `POLY` must be primitive for the chosen `M`. `M` may be at
most 32 and `L` from 1 to M−1.

## Which choices are this design's own

The architecture follows the published two-step scheme:

- the register, multiplexer and α^(jp) multiplier of each column;
- the full last row;
- the MSB/LSB split;
- the enable-only pipeline, with its α^((2^m−1)+j(i−p)) constants.

These points were not specified and were chosen here:

- **p = 16.** Any p works. 16 divides 8752.
- **L = 3.** Per row and cycle, the expected number of product bits computed
  is about L + (M−L)·2^−L, which is smallest at L = 3 for M = 14.
- **The primitive polynomial.**
- **The step-two input gate is an AND.** It forces the multiplier inputs to
  zero while `en` is low.
- **Control.** The controller (`cs_ctrl`) is this design's own: the
  start/ready handshake, the hold of the registers between code words, the
  `done` pulse and the one-cycle drain.
- **Aligned outputs.** The row-p flip-flop makes all flags of a window leave
  in the same cycle.
- **Reset.** It is synchronous and active-low.

The search tests α^1 … α^n in that order, starting with ω_j(0) = λ_j. With a
shortened code, the decoder must map these positions to bit positions. If it
wants a different start point, it can preload λ_j·α^(j·s).

The syndrome calculator and the key-equation solver of a complete decoder are
outside this RTL.

## Files

| file | content |
|---|---|
| `rtl/cs_pkg.sv` | defaults and elaboration-time GF(2^m) functions |
| `rtl/ffm_const.sv` | constant multiplier, full or bit slice |
| `rtl/gf_adder.sv` | T-input XOR adder |
| `rtl/omega_cell.sv` | coefficient register, load multiplexer, α^(jp) update multiplier |
| `rtl/cs_full_row.sv` | row p: adder and ==1 comparator |
| `rtl/cs_two_step_row.sv` | rows 1…p−1: step one, `en` flip-flop, gated step two |
| `rtl/cs_ctrl.sv` | sequencer |
| `rtl/chien_search_two_step.sv` | top level |
| `tb/tb_gf_pkg.sv` | reference field arithmetic (log/antilog tables built at run time) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_cs_small_config` |

At the defaults, the top synthesises to roughly 32k word-level cells and 598
flip-flops in a generic flow.

## Verification

Each testbench prints `TB_RESULT checks=N failures=F`. Its reference values
come from a separate log/antilog implementation of the field.

- **`tb_ffm_const`.** Full and sliced multipliers, including negative
  exponents and exponents above 2^m−1.
- **`tb_omega_cell`.** Load priority over update, hold and update over
  random sequences.
- **`tb_cs_two_step_row`.** Register sets are solved so that Y = 1 (an
  error), or only the MSBs are zero, or random. The test checks `en` and
  `err` one cycle later, and that both clear when idle.
- **`tb_cs_ctrl`.** The sequence, a `start` ignored while running, a
  back-to-back load in the drain cycle, and the NW+1-cycle period.
- **`tb_chien_search_two_step`.** Runs the top at its default size for ten
  code words:
  - no errors;
  - 40 errors, including positions 1, n and positions in the last row;
  - random error counts;
  - random coefficient sets, checked position by position.

  Four of the polynomials are loaded back to back. The test checks every
  reported position, and that `done` comes n/p+1 cycles after the load. It
  also counts each mechanism (load, back-to-back load, step two run or
  skipped, step two run without an error, errors found in split rows and in
  row p) and fails if any of them never happens.

  On random error patterns, step two runs in 12–14 % of row tests, close to
  the 2^−3 expected for L = 3. For an all-zero polynomial (no errors) the MSBs
  are always zero, so step two runs every cycle.

  For each code word the test also reports how many multiplier output bits
  were evaluated, relative to a search that computes all p·t·m bits every
  cycle. It is about 36 % at the defaults. This is an activity count, not a
  power figure.
- **`tb_cs_small_config`.** Runs the top at BCH (15, 7, 2) over GF(2^4) with
  p = 4 and L = 2. It searches every error pattern of weight ≤ 2 and 200
  random polynomials, all loaded back to back. Here p does not divide n, so
  this test also checks the mask on position 16.

The power saving itself is not measured here. `step2_en` gives the activity
for a power estimate.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/cs_pkg.sv tb/tb_gf_pkg.sv tb/tb_chien_search_two_step.sv \
        --top-module tb_chien_search_two_step
    ./obj_dir/Vtb_chien_search_two_step

Replace the testbench name to run another one. The full-size end-to-end run
takes about a minute to build and run.
