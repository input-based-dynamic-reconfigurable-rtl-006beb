# Reconfigurable approximate adders for video encoding

Video encoders spend most of their arithmetic in motion estimation (sums of
absolute differences) and in the DCT, and both tolerate small errors in the
low-order bits of a result. An adder that is *always* approximate is either
too inaccurate for demanding content or too timid to save much power. The
adders here let the degree of approximation (DA) change at run time: every
adder cell has an exact mode and a cheap approximate mode, and a small
control word decides, per addition, how many low-order bits run in the
approximate mode. A DA of 0 gives an ordinary exact adder.

Two adders of this kind are provided, side by side in `rab_top`:

* a **64-bit reconfigurable carry look-ahead adder** (`rab_cla64`), made of
  eight 8-bit tree-CLA blocks (`rab_cla8`) with a separate 4-bit DA per block;
* a **reconfigurable ripple-carry adder** (`rab_rca`, 8 bits by default) made
  of dual-mode full adders.

Both are purely combinational: no clock, no reset, no state.

## The approximate mode of a cell

Every cell computes its exact function when its select `app` is 0. When `app`
is 1 it relays its operands instead of computing anything: operand `b` stands
in for the "sum-like" outputs and operand `a` for the "carry-like" outputs.
In silicon the exact logic of the cell would be power-gated in that mode, which
is where the saving comes from. In RTL both results exist and a 2:1
multiplexer picks one, so this code models the function, not the power.

| cell (module) | exact mode (`app`=0) | approximate mode (`app`=1) |
|---|---|---|
| dual-mode full adder (`rab_dmfa`) | s = a⊕b⊕cin, cout = ab + b·cin + a·cin | s = b, cout = a |
| first-level CLA cell with carry out (`rab_dmclb1`) | p = a⊕b, g = ab, s = p⊕cin, cout = g + p·cin | p = b, g = a, s = b, cout = a |
| first-level CLA cell (`rab_dmclb2`) | p = a⊕b, g = ab, s = p⊕cin | p = b, g = a, s = b |
| combiner with carry out (`rab_dmpgb1`) | p = pa·pb, g = gb + ga·pb, cout = g + p·cin | p = pa, g = gb, cout = g + p·cin |
| combiner (`rab_dmpgb2`) | p = pa·pb, g = gb + ga·pb | p = pa, g = gb |

In the combiners, `a` is the less significant group and `b` the more
significant one. Over the eight input patterns of a full adder the relaying
mode gets 10 of the 16 output bits right (cout = a is right 6 times, s = b 4
times), better than truncation, which forces both outputs to 0.

## Degree of approximation and the fan-in rule

This is the part of the design that takes the most care to understand.

**The DA word.** A block's `ctrl` is a number k: the k least significant bit
positions are approximate (`rab_da_decoder`, `app[i] = i < k`). Values of k at
or above the block width approximate the whole block. The thermometer coding
is a choice of this implementation; it keeps all error at the low end.

**Combiners follow their fan-in.** In the CLA, a propagate/generate combiner
may be approximate only when *every* block feeding it is approximate, directly
or further down the tree. `rab_cla8_ctrl` gets this by ANDing the selects of a
combiner's two children. With the thermometer DA the 8-bit block then behaves as
follows:

| ctrl | bit cells approximate | combiners approximate |
|---|---|---|
| 0 | none | none |
| 1 | bit 0 | none |
| 2, 3 | bits 0..1, 0..2 | pair 1..0 |
| 4, 5 | bits 0..3, 0..4 | pairs 1..0, 3..2; nibble 3..0 |
| 6, 7 | bits 0..5, 0..6 | as above + pair 5..4 |
| 8..15 | all | all, root included |

**Errors are not confined to the approximated bits.** The combiners that stay
exact still combine the relayed p and g values of approximated cells. A carry
into an exact bit can then be wrong, so the error is not bounded by 2^k, and an
odd DA can be worse than the even DA above it. Computed with the reference
model over all 65,536 pairs of 8-bit operands (carry in 0):

| ctrl | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|---|
| mean abs error | 0 | 0.5 | 1.0 | 2.7 | 4.0 | 10.6 | 19.1 | 45.5 | 64.0 |
| max abs error | 0 | 1 | 2 | 14 | 8 | 56 | 56 | 248 | 128 |

(The error compares the 9-bit result {cout, s} with a + b.) Even DA values,
which line up with whole pairs or nibbles, behave best. A controller choosing
the DA should take this into account.

## The 8-bit carry look-ahead block (`rab_cla8`)

A radix-2 tree with 8 bit cells and 7 combiners:

```
 level 4                 pg7 (root, bits 7..0) ── cout, pout, gout
                        /                   \
 level 3        pg5 (3..0) ─► c4         pg6 (7..4)
                /        \               /        \
 level 2   pg1 (1..0)  pg2 (3..2)   pg3 (5..4)  pg4 (7..6)
            ─► c2                    ─► c6
           /   \       /   \         /   \       /   \
 level 1  b0   b1     b2   b3       b4   b5     b6   b7
          ─►c1        ─►c3          ─►c5        ─►c7
```

* Even bits use the cell with carry out (`rab_dmclb1`), which gives the carry
  into the odd bit above it; odd bits use `rab_dmclb2`.
* `pg1`, `pg3`, `pg5` and `pg7` are `rab_dmpgb1` and give the carries into bits
  2, 6, 4 and the block carry out. `pg1`, `pg5` and `pg7` take the block carry
  in; `pg3` takes c4.
* `pg2`, `pg4` and `pg6` only combine p and g (`rab_dmpgb2`).

The 15 selects travel as one packed struct, `rab_pkg::cla8_app_t`, with fields
`leaf[7:0]`, `l2[3:0]`, `l3[1:0]` and `root`. Interface: `a[7:0]`, `b[7:0]`,
`cin`, `ctrl[3:0]` in; `s[7:0]`, `pout`, `gout`, `cout` out (32 signals).
Example, exact mode: a = 8'hAF, b = 8'hDF, cin = 0 gives s = 8'h8E, cout = 1,
pout = 0, gout = 1.

## The 64-bit adder (`rab_cla64`)

Eight `rab_cla8` blocks. The carry out of block k is the carry in of block
k+1: look-ahead inside a block, ripple between blocks. The critical path
therefore runs through the root combiner of every block. Block k takes its DA
from `ctrl[4k+3:4k]`, so each byte lane can be set on its own. A lane with
DA ≥ 8 passes its `b` byte through and sends `a[8k+7] | (b[8k] & carry in)` on
as its carry.

`pout` and `gout` describe the whole word: `pout` is the AND of the block
propagates, and `gout` is built block by block as `g_k | (p_k & gout_below)`.
In exact mode they equal "every bit propagates" and "a + b carries out". The
block count is the parameter `NBLK` (default 8, 64 bits). Interface: `a`, `b`,
`s` of 64 bits; `cin`; `ctrl[31:0]`; `pout`, `gout`, `cout` (228 signals).

## The ripple-carry variant (`rab_rca`)

`W` dual-mode full adders in a carry chain (default 8), with `rab_da_decoder`
as the controller and a DA word of `$clog2(W+1)` bits. With DA = k < W the low
k sum bits equal `b`, the carry into bit k is `a[k-1]`, and the upper bits add
exactly. With k ≥ W, `s = b` and `cout = a[W-1]`. Here the error does stay
below 2^(k+1).

## Top level (`rab_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `cla_a`, `cla_b` | in | 64 | operands of the CLA |
| `cla_cin` | in | 1 | carry in |
| `cla_ctrl` | in | 32 | DA of byte lane k in bits 4k+3..4k |
| `cla_s` | out | 64 | sum |
| `cla_pout`, `cla_gout`, `cla_cout` | out | 1 | word propagate, word generate, carry out |
| `rca_a`, `rca_b` | in | `RCA_W` | operands of the RCA |
| `rca_cin` | in | 1 | carry in |
| `rca_ctrl` | in | `RCA_CW` | DA of the RCA |
| `rca_s` | out | `RCA_W` | sum |
| `rca_cout` | out | 1 | carry out |

Parameters: `NBLK` = 8, `RCA_W` = 8, `RCA_CW` = `$clog2(RCA_W+1)`.

**Subtraction.** The blocks are meant to serve as adder/subtractors. No
subtract pin is provided: present `~b` with a carry in of 1 to get `a - b`.
In exact mode this is checked by the top-level test. With DA > 0 the
approximated low bits then relay `~b`.

## Where this departs from the original description, and what is missing

* **Power gating** of the exact cell is not modelled. The RTL selects between
  both results, so it reproduces the arithmetic but none of the power saving.
* **Which cell type sits where in the 8-bit tree**, the thermometer meaning of
  `ctrl`, one DA field per byte lane in the 64-bit adder, and the word-level
  `pout`/`gout` are choices of this implementation. They agree with the
  signal count of the original 8-bit and 64-bit adders (32 and 228) and with
  the carries named on their critical path.
* The original controller drives a 16-bit select bus; here there are 15
  selects, one per cell, and no spare.
* The original description includes a simulation trace with `ctrl` = 4'b1101.
  Its sum does not follow from the cell equations under any decoding found, so
  it was not used as a reference. The cell equations and the fan-in rule were
  followed.
* The original power figures are for a 16-bit RCA and the structure is shown
  as an 8-bit one. The default here is 8; set `W = 16` for the other.
* **Not included:** the motion-estimation and DCT units of the encoder, and
  the input-based logic that picks the DA from the video content and a quality
  target. Neither is specified in enough detail to build. The DA enters on the
  `ctrl` ports instead.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come
from `tb/rab_ref_pkg.sv`. That reference does not mirror the RTL netlist. It
forms group p/g level by level over aligned bit ranges. A range counts as
approximate when all its bits lie below the DA. The carry into an even bit i
comes from the range of size lowbit(i) ending at bit i-1.

| testbench | what it covers |
|---|---|
| `tb_rab_dmfa`, `tb_rab_dmclb`, `tb_rab_dmclb2`, `tb_rab_dmpgb1`, `tb_rab_dmpgb2` | every input pattern of each cell in both modes |
| `tb_rab_da_decoder`, `tb_rab_cla8_ctrl` | every `ctrl` value |
| `tb_rab_rca` | all 2^17 operand/carry patterns × 16 DA values at 8 bits; 100,000 random vectors at 16 bits |
| `tb_rab_cla8` | all 2^21 combinations of a, b, cin and ctrl; exact mode also against the integer sum; closed form for a fully approximate block |
| `tb_rab_cla64` | 40,000 random vectors, half exact (vs. 65-bit integer sum), half with random per-lane DA, including long carry chains |
| `tb_rab_top` | 20,000 vectors through both adders at default sizes. It counts and requires: exact mode, cell-only and combiner approximation, fully approximate lanes, carries between blocks, mixed lanes, DA changes, subtraction, both RCA modes and at least one approximate result that differs from the exact sum |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_rab_cla8 \
    rtl/rab_pkg.sv tb/rab_ref_pkg.sv tb/tb_rab_cla8.sv -Mdir obj -o sim
./obj/sim
```

Other modules are found via `-Irtl`. Every testbench finishes in well under a
second.

Delays are not modelled, so no timing is verified here. For comparison, the
original 64-bit adder on a Spartan-3E FPGA used 506 four-input LUTs with a
24.0 ns combinational path, and the 8-bit block alone 65 LUTs and 13.8 ns.

## Changing it

* Different lane count: `rab_cla64 #(.NBLK(n))` builds an 8n-bit adder with
  4n ctrl bits.
* Different DA coding: replace `rab_da_decoder`. `rab_cla8_ctrl` derives the
  combiner selects from whatever cell selects it gets, so the fan-in rule
  keeps holding.
* Another approximate cell: change the `app = 1` branch of the cell modules.
  The reference in `tb/rab_ref_pkg.sv` has to follow.
