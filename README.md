# Area-efficient carry skip adder with BEC slices, and a 5-tap FIR filter built on it

A carry skip adder cuts its operands into slices. Each slice works out its own
sum while the carry travels along the slices through one small "skip" gate per
slice, not through every full adder. The usual way to make each slice's sum
ready for either carry-in is to give it two ripple adders, one for carry-in 0
and one for carry-in 1, and pick one with a mux. That doubles the slice.

This design keeps **one** ripple adder per slice, run with carry-in 0. It gets
the carry-in-1 result from a **binary-to-excess-1 converter (BEC)**, which adds
one to the ripple adder's output. An incrementer is much smaller than a second
adder. The widest slice, in the middle, is a **parallel prefix adder**, so
its carries do not ripple. The skip gates alternate **AOI** and **OAI**
cells, so every carry hop is a single inverting gate.

The 32-bit adder is used on its own, and also as the adder unit of a
**5-tap FIR filter**. The top level `cska_fir_top` brings out both side by side.

## Slice map of the 32-bit adder

| slice | bits   | width | kind                         | skip cell | carry it hands on |
|-------|--------|-------|------------------------------|-----------|-------------------|
| 0     | 2:0    | 3     | RCA + 4-bit BEC + mux        | none      | true (mux carry)  |
| 1     | 6:3    | 4     | RCA + 5-bit BEC + mux        | AOI       | inverted          |
| 2     | 11:7   | 5     | RCA + 6-bit BEC + mux        | OAI       | true              |
| 3     | 19:12  | 8     | Kogge-Stone prefix adder     | AOI       | inverted          |
| 4     | 24:20  | 5     | RCA + 6-bit BEC + mux        | OAI       | true              |
| 5     | 28:25  | 4     | RCA + 5-bit BEC + mux        | AOI       | inverted          |
| 6     | 31:29  | 3     | RCA + 4-bit BEC + mux        | OAI       | true = `cout`     |

The kinds of slice, the prefix middle slice and the AOI/OAI skip cells are the
published structure. The widths 3,4,5 | 8 | 5,4,3 are this implementation's
choice: slices grow towards the middle and shrink again. The outer slices are 3
bits, which matches the 3-bit RCA / 4-bit BEC unit of the published design. The
split lives in `cska_pkg` and can be changed (see *Changing the sizes*).

## How one ripple slice works (`rca_bec_stage`)

For an M-bit slice:

1. `rca` adds the slices of `a` and `b` with carry-in 0. This gives the
   (M+1)-bit value `{c0, s0}`.
2. `bec`, which is M+1 bits wide, forms `{c0, s0} + 1`. That is exactly the
   slice result for carry-in 1.
3. A 2:1 mux, selected by the carry coming into the slice, gives `{cout, sum}`.

Example, 3 bits: a = 101, b = 011. The RCA gives 1000. The BEC gives 1001.
With carry-in 1 the mux picks 1001, so the sum is 001 with a carry out of 1
(5 + 3 + 1 = 9).

The BEC is an XOR per bit, fed by a running AND: bit i flips exactly when all
lower bits are 1, so `x[0] = ~b[0]` and `x[i] = b[i] ^ (b[0] & … & b[i-1])`.

The slice also exports two signals for the skip logic:
- `grp_gen = c0`: the slice makes a carry by itself.
- `grp_prop = &(a ^ b)`: the slice would pass an incoming carry straight on.

All of this depends only on `a` and `b`, so it settles while the carry is
still on its way. When the carry arrives it only switches the mux.

## The skip chain and its polarity (`skip_logic`)

The carry out of slice s is

    carry[s] = grp_gen[s] | (grp_prop[s] & carry[s-1])

This is one AND-OR. As a single CMOS gate it is inverting, so the design uses
two forms:

- **AOI**: takes inputs in true polarity and returns `~carry`.
- **OAI**: takes inverted inputs and returns the true carry:
  `~(~g & (~p | ~c))`, which equals `g | p & c`.

The cells alternate, starting with AOI at slice 1. So the carry on the wire
between slices is true after an OAI and inverted after an AOI. Inside
`cska_adder`, `chain[s]` is the physical cell output and `carry[s]` is the
true-polarity carry. Where a slice's mux select needs the true carry after an
AOI, an inverter restores it; the OAI that follows gets the inverted carry
directly. With seven slices the last cell is an OAI, so `cout` needs no
inverter. With an even number of slices the RTL adds the inverter
automatically.

Slice 0 has no skip cell. Its carry-out is the carry output of its own mux,
selected by the adder's `cin`.

A skip cell computes the same function as the multiplexer of a classic
carry-skip adder, "if the whole slice propagates, pass carry-in, else pass the
slice's own carry". The two differ only in circuit form.

## The prefix middle slice (`prefix_adder`)

The widest slice sits in the middle of the word. Instead of a ripple adder it
is a parallel prefix adder, with three parts:

- **Preprocessing**: `g = a & b`, `p = a ^ b`.
- **Prefix network**: Kogge-Stone, `ceil(log2 W)` levels. Level l combines
  each position with the one 2^l below it: `(G,P)∘(G',P') = (G | P&G', P&P')`.
  After the last level, `G[j]` and `P[j]` cover bits j..0.
- **Postprocessing**: the carry into bit j is `G[j-1] | P[j-1] & cin`
  (`cin` for bit 0), and `sum = p ^ carry`.

`G` and `P` of the top bit are the slice's group generate and propagate. They
feed the skip cell after this slice, like the ripple slices' signals. The
published design only calls for "a parallel prefix network". Kogge-Stone is
this implementation's choice.

## The FIR filter (`fir_filter`)

    y[n] = h0·x[n] + h1·x[n-1] + h2·x[n-2] + h3·x[n-3] + h4·x[n-4]

The filter is direct form:
- A delay line holds the last four accepted samples.
- Five multipliers (plain `*`, signed 8 × 8 bits) form the tap products.
- The products are sign-extended to 32 bits.
- A chain of four `cska_adder` instances sums them, with carry-in 0 and the
  carry-out dropped (two's-complement arithmetic).

**Timing.** A sample is accepted at a rising edge where `in_valid` is high.
At that same edge `y_out` is loaded with y[n] for that sample, and `out_valid`
is high in the following cycle. That gives a latency of one clock and up to one
sample per clock. Cycles with `in_valid` low leave the delay line and `y_out`
unchanged. `rst_n` is a synchronous, active-low reset that clears the delay
line, `y_out` and `out_valid`.

**Coefficients.** `coef[0..4]` (= h0..h4, signed 8-bit) are input ports, so
any filter can be loaded. Hold them steady while samples stream.

The published design fixes only the tap count and the use of the proposed
adder for the additions. The rest is this implementation's choice: the form,
the widths, the multipliers, the coefficient ports, the handshake and the
reset.

## Module hierarchy

    cska_fir_top
    ├── cska_adder            (32-bit adder brought out on add_* ports)
    │   ├── rca_bec_stage ×6
    │   │   ├── rca ── full_adder ×M
    │   │   └── bec
    │   ├── prefix_adder ×1
    │   └── skip_logic ×6
    └── fir_filter            (fir_* ports)
        └── cska_adder ×4

`cska_pkg` holds the shared constants, the skip-cell kind `skip_kind_e`
(`SKIP_AOI`/`SKIP_OAI`) and the slice-width array type `stage_w_t`.

Apart from the FIR's two registers (the delay line and the output), everything
is combinational. The adder's `{cout, sum} = a + b + cin` is valid once the
inputs have settled.

## Changing the sizes

`cska_adder` parameters:
- `WIDTH`
- `NUM_STAGES` (at most 16)
- `MID_STAGE`: the 0-based index of the prefix slice; it must be an inner slice.
- `STAGE_W`: a 16-entry array, least significant slice first, with 0 in the
  unused entries. The entries must add up to `WIDTH`; an assertion at the
  start of simulation checks this.

Example:

    cska_adder #(.WIDTH(16), .NUM_STAGES(5), .MID_STAGE(2),
                 .STAGE_W('{0: 2, 1: 3, 2: 6, 3: 3, 4: 2, default: 0})) u_add (...);

`fir_filter` has parameters `TAPS`, `DATA_W`, `COEF_W` and `ACC_W`. `ACC_W`
must equal the adder's `WIDTH`, since the FIR instantiates `cska_adder` at its
defaults.

## Simulating

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --timescale 1ns/1ps -y rtl \
        rtl/cska_pkg.sv tb/tb_cska_fir_top.sv --top-module tb_cska_fir_top -o sim
    ./obj_dir/sim

Replace the testbench name to run another one.

| testbench          | what it checks |
|--------------------|----------------|
| `tb_rca`           | every input at 3 bits, random at 9 bits; sum, carry and propagate bits |
| `tb_bec`           | every input at 4 and 9 bits against b + 1 |
| `tb_rca_bec_stage` | every input at 3 and 5 bits; sum, carry, group generate and propagate |
| `tb_skip_logic`    | truth tables of the AOI and OAI forms |
| `tb_prefix_adder`  | every input at 8 bits (2^17 cases) and at 5 bits |
| `tb_cska_adder`    | the default adder with the five characterization vectors, corner cases, full-length propagate runs and 20,000 random operands; also a 6-slice and a 16-bit configuration. It counts, per slice, carries that skipped the slice and selections of the BEC result, and fails if any count is zero |
| `tb_fir_filter`    | impulse and step responses, extreme values, random streams with gaps, a mid-stream reset and a coefficient change, all against an integer model; checks the one-cycle latency every cycle |
| `tb_cska_fir_top`  | the whole top at its default sizes: adder and filter run at the same time, with the same coverage counters |

The five characterization vectors are the published test patterns. Each
operand bit follows a fixed five-step pattern (`10110`, `10010`, `11111`,
`00000`, `11001`, depending on the bit), and vector t takes step t of every
bit.

Every testbench has also been run against a deliberately broken copy of its
module (for example a dropped inverter in the carry chain, or swapped mux
inputs), and each one reported failures.

## What is not here, and other departures

- **Variable latency.** The published adder comes from a "hybrid variable
  latency" carry-skip family. No predictor condition, timing or interface for
  variable latency is specified, so this adder is purely combinational and
  single-cycle.
- **Incrementation blocks.** The published block diagram also draws an
  "incrementation block" in each slice. Here the BEC plus mux is that
  incrementer; there is no separate one.
- **Skip-cell order.** The published diagram shows an AOI cell in the slice
  just above the prefix slice. With the strict alternation and the 7-slice
  split used here, that slice (slice 4) gets an OAI. The logic function is
  unchanged.
- **Results not reproduced.** The power, delay and transistor-count comparisons
  (32-bit adder against a conventional and a concatenation/incrementation
  carry-skip adder; FIR filter with either adder) come from transistor-level
  simulation. They cannot be reproduced from RTL. The baseline adders are not
  included.
- **Widths.** The FIR's published transistor count suggests narrower datapaths
  than the 8-bit samples and 32-bit sums used here. The widths are parameters.
