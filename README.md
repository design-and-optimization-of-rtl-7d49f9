# Carry speculative adder (CSPA)

A wide adder is slow because a carry may have to ripple from the least to the
most significant bit. This adder cuts the operands into blocks and lets every
block start adding at once with a *guessed* carry in. The guess is nearly always
right; when it is not, the mistake is detected and only the affected block is
fixed. The final result is always exact: speculation changes the latency of an
addition, never its value.

Default configuration: 32-bit operands, two 16-bit blocks, an 8-bit carry
predictor. With uniformly random operands about 0.2% of additions need the
correction step.

## Structure

```
 a,b,cin ──► EN registers ──► cspa_core ──── Sum* ─────────────────────┐
  in_valid     (en_reg)        │  per block:                            ▼
  in_ready ◄──┐                │   block_adder  (partial sum, guessed   mux2 ──► sum, cout
              │                │                 carry in)               ▲
              │                │   carry_predictor (guess for the next   │
              │                │                 block)                  │
              │                │   dual_carry_gen (carry out for cin=0/1)│
              │                └─ actual carries, guessed carries        │
              │                        │                                 │
              │                  error_detect ── e (per block), ER       │
              │                        │                                 │
              │                  error_recovery ── Sum_REC ─► en_reg ────┘
              │                        │               (captured on ERR_block)
              └──────────────── cspa_ctrl (VALID, ERR_block, MUX select)
```

| File | Role |
|---|---|
| `rtl/cspa_pkg.sv` | default sizes `CSPA_WIDTH`, `CSPA_BLOCK`, `CSPA_PRED` |
| `rtl/sum_gen.sv`, `rtl/carry_gen.sv` | full-adder sum bit and carry bit, kept as separate cells |
| `rtl/block_adder.sv` | one block's sum generator: ripple of the two cells |
| `rtl/carry_predictor.sv` | guesses a block's carry out from its upper bits |
| `rtl/dual_carry_gen.sv` | a block's carry out for carry in 0 and for carry in 1 |
| `rtl/cspa_core.sv` | the speculative adder: all blocks plus the exact carry chain |
| `rtl/error_detect.sv` | per-block mismatch flags and their OR, ER |
| `rtl/error_recovery.sv` | corrects the flagged blocks of Sum* into Sum_REC |
| `rtl/en_reg.sv` | register with load enable (input EN blocks, recovered-sum hold) |
| `rtl/mux2.sv` | output multiplexer, Sum* on input 0, Sum_REC on input 1 |
| `rtl/cspa_ctrl.sv` | variable-latency control |
| `rtl/cspa_top.sv` | the complete adder |

## How the speculation works

Take block *k* (bits `16k+15 .. 16k`). Three circuits look at its operand bits,
all at the same time:

* **Sum generator** (`block_adder`) adds the block's bits with a carry in that
  is *assumed*, not waited for. Block 0 uses the real `cin`; block *k* > 0 uses
  the carry guessed by the predictor of block *k*-1. The concatenated block
  sums form the speculative sum Sum*.
* **Carry predictor** (`carry_predictor`) guesses the block's carry out from its
  `PRED` most significant bit pairs only: it is the carry out of those upper
  bits when their own carry in is taken as 0 (the generate signal of that bit
  group). This is a short circuit, independent of the lower bits and of the
  blocks below.
* **Dual carry generator** (`dual_carry_gen`) computes the block's true carry
  out twice, for carry in 0 (block generate G) and for carry in 1 (G or block
  propagate). The real carries then pass from block to block through one
  select each: `c[k+1] = c[k] ? cout1[k] : cout0[k]`.

The guess for block *k*'s carry in is wrong exactly when the upper `PRED` bit
pairs of block *k*-1 all propagate (each pair differs) and a carry reaches them
from below. A guessed 1 is never wrong (an upper-group generate always reaches
the block's carry out), so every error is a missed carry. For random operands
the chance is 2^-PRED × ~1/2 per block boundary: 0.2% at the defaults.

**Error detection** compares, per block, the carry its sum generator used with
the real carry from the select chain. A mismatch flags that block; ER is the OR
of the flags.

**Error recovery** fixes only the flagged blocks. A block added with a carry in
that was off by one has a partial sum that is off by exactly one, so it is
incremented (real carry 1) or decremented (real carry 0; cannot happen with
this predictor, but the block handles it). Any overflow of that increment is
already accounted for: the adder's carries come from the exact chain, not from
the block sums. The final carry out `cout` always comes from the exact chain.

## Timing and handshake

`cspa_top` registers the operands, computes in the next cycle and presents the
result combinationally from those registers.

* Operands are taken on a rising edge with `in_valid && in_ready`.
* **No error** (ER low): `out_valid` is high in the next cycle with
  `sum`/`cout` = Sum* and `out_recovered` low. Latency 1 cycle, one addition
  per cycle.
* **Error** (ER high): that cycle is blocked (ERR_block). `out_valid` stays
  low, `in_ready` drops so the source holds its next operands, and Sum_REC with
  the exact carry out is captured in a register. In the following cycle
  `out_valid` and `out_recovered` are high and the output multiplexer shows the
  captured value; `in_ready` is high again. Latency 2 cycles, one bubble.
* There is no back-pressure from the consumer: a result is valid for exactly
  the one cycle in which `out_valid` is high.
* `rst_n` is an asynchronous, active-low reset that clears the control state and
  the registers.

Assertions check that a recovery cycle never overlaps an operation, that no
operands are taken while blocked, and that a guessed carry is never a carry
that does not exist.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `WIDTH` | 32 | operand width; a multiple of `BLOCK`, at least two blocks |
| `BLOCK` | 16 | block adder width |
| `PRED` | 8 | upper bits of a block the predictor uses, 1..`BLOCK` |

Larger `PRED` makes errors rarer (halving per extra bit) and the predictor
slower; smaller `BLOCK` gives more block boundaries, each a chance of error.
The block adder and the recovery arithmetic are written as plain logic and
`+`, so synthesis picks their implementation.

## Choices in this RTL

The block decomposition, the MSB carry predictor, the dual carry generators,
per-block error detection, correction of only the erroneous block and the
Sum*/Sum_REC multiplexer controlled by the error signal describe the published
architecture. The following are this design's own:

* The total width of 32 bits and the 8-bit predictor. The 16-bit block is the
  block size the architecture was demonstrated with. With these sizes the
  random-operand error rate (~0.2%) is of the same order as the ~0.16%
  reported for the original design.
* The predictor rule (generate of the upper bit group, carry in taken as 0).
* Synchronous input registers with a load enable instead of latches or gated
  inputs, and no gated clock.
* The cycle timing above: a registered recovered sum and a registered error
  flag driving the output multiplexer, so a corrected addition takes two cycles.
* Error flags are one per block. A bit-level error vector, as in some
  descriptions of the error detector, would not add information, since a block
  is either entirely right or off by one.
* The error recovery block takes Sum*, the real carries and the flags, rather
  than recomputing from the operands.
* Ripple-carry block adders and a bit-serial G/P reduction in the carry
  generators: the simplest structures with the required function. The
  block-level circuit figures (delay, power, area in a 90 nm process) are not
  represented in RTL.

## Simulating

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`) that
prints `TB_RESULT checks=N failures=M`. For example, the end-to-end test at
default parameters:

```
verilator --binary --timing --assert -Irtl rtl/cspa_pkg.sv tb/tb_cspa_top.sv \
          --top-module tb_cspa_top -Mdir obj_top
./obj_top/Vtb_cspa_top
```

`tb_cspa_top` sends 2000 additions with random gaps, a quarter of them built to
make the predictor miss, then 100000 uniformly random back-to-back additions.
Each result is checked against `a + b + cin` and for its latency (1 or 2
cycles). The test requires plain results, recovered results, input stalls,
idle cycles and carry-outs to occur, and prints the measured recovery rate; it
fails if that rate is outside 0.1%..0.3%. The test takes well under a second.

`tb_cspa_core` also runs the core at 64 bits with four blocks and a 4-bit
predictor, where several block boundaries can mispredict in one addition.

`tb_cspa_top_multi` runs the complete adder at the same 64-bit, four-block,
4-bit-predictor size with the upper predictor bits of random blocks forced to
propagate, so that recovery regularly corrects two or three blocks in one
addition; it checks every result and its latency.
