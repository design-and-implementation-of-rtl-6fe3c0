# 12 x 12-bit ANT multiplier with a fixed-width reduced-precision replica

Lowering a multiplier's supply voltage below the level its critical path needs
(voltage over-scaling, VOS) saves power roughly with the square of the voltage. The cost
is that the longest carry paths miss the sampling edge, and the product comes out with
wrong high-order bits. Algorithmic noise tolerance (ANT) accepts these errors and repairs
them. Next to the full multiplier, the main DSP block (MDSP), runs a much smaller
*reduced-precision replica* (RPR) whose short paths still meet timing at the lowered
voltage. When the two results disagree by more than a threshold, the replica's coarse
but safe estimate is used instead.

This design makes the replica itself a *fixed-width* multiplier. It multiplies the 6
most significant bits of each 12-bit operand and keeps only the 6 most significant bits
of that product. Most of its partial-product array is never built. The error of leaving
it out is compensated by two small correction vectors. The replica stays short, small
and close to the rounded product.

```
            +------------------+   ya (24 b)
 x,y  -->[reg]-+-->|  mdsp_multiplier |------------------------+
 (12 b)        |   |  12 x 12, full   |                        v
               |   +------------------+                +--------------+
               |                                       | ant_decision |--[reg]--> p (24 b)
               |   +------------------+  6 b   << 18   |  |ya-yr|>TH ?|--[reg]--> err_detected
               +-->| fixed_width_rpr  |---------------->|   yr : ya    |
        x[11:6],   |  6 x 6 -> 6 bits |   yr (24 b)    +--------------+
        y[11:6]    +------------------+
```

## The fixed-width replica and its compensation

The replica multiplies a = x[11:6] by b = y[11:6]. Its output y_r approximates
round(a*b / 2^6), so y_r shifted left by 18 approximates the 24-bit product x*y. Number the
columns of the 6 x 6 partial-product array by c = i + j for the term a[i]&b[j]:

| columns | name | treatment |
|---|---|---|
| 6 .. 10 | main part | built and summed as in any multiplier |
| 5 | input correction vector, ICV (beta) | its six terms are the heaviest of the discarded part; they are injected directly, at their own weight |
| 4 | minor input correction vector, MICV (alpha) | reduced to one bit, alpha = OR of its five terms |
| 0 .. 3 | – | not built |

The output is

    y_r = floor( (main + ICV*2^5 + (1 + alpha)*2^5) / 2^6 )

The constant 1·2^5 is the rounding offset. alpha·2^5 stands in for what columns 0..4
would have contributed. With uniform operands, their expected value is one unit of 2^5,
and alpha is 1 with probability 1 - (3/4)^5 ≈ 0.76. Over all 4096 operand pairs the
result is:

| | mean error | largest error | mean squared error |
|---|---|---|---|
| this replica | -0.12 LSB | 1.52 LSB | 0.153 LSB² |
| plain truncation (columns < 6 dropped, no correction) | 1.25 LSB | 5.02 LSB | 2.236 LSB² |

The compensation adds no path longer than the main array: the ICV terms enter the
array like any other partial product, and alpha is a single OR gate.

The overall scheme comes from the design this RTL follows:
- a 6-bit fixed-width replica;
- an ICV injected directly;
- an MICV that patches the cases where the ICV alone under-compensates.

That design does not state the alpha equation or the rounding constant. The choices above
are this implementation's and are the most likely point of departure from the original
circuit. The original also balances the weights of ICV terms that have equal sums but
different positions; that refinement is not modelled.

The module is parameterised by word length N. At N = 5 .. 10 the mean squared error stays
between 0.15 and 0.38 LSB², against 1.5 .. 6.3 LSB² for plain truncation (see
`tb_rpr_word_lengths`). The ANT top uses 6, the length the design settles on as the
best trade-off between replica delay and accuracy.

## The decision rule and the threshold

`ant_decision` outputs `yr` instead of `ya` when |ya - yr| > TH, and raises `err`.

TH must be larger than any distance that a *correct* product can have from the replica
estimate, or correct results would be thrown away. That distance has two parts:
- the replica's own rounding, at most 1.52 · 2^18;
- the operand LSBs the replica never sees, at most (2·63·63·64 + 63·63) < 1.96 · 2^18.

Their sum is below 3.5 · 2^18, so the default TH = 2^20 (4 · 2^18) never fires on a
correct product. Any main-block error of more than 2^20 is replaced. A corrected output
lies within 3.5 · 2^18 of the true product. An error smaller than TH passes through
unchanged. This is the tolerated "noise" that ANT trades for power. Under VOS the failing
paths are the long carry chains into the upper product bits, so real errors are mostly
large.

Neither the comparison rule nor the threshold is given by the design this RTL follows.
Both are the standard ANT form, chosen here.

## Timing and interface of `ant_multiplier`

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | sampling clock (the reference implementation runs at 200 MHz) |
| rst_n | in | 1 | asynchronous reset, active low |
| in_valid | in | 1 | x and y are valid this cycle |
| x, y | in | 12 | unsigned operands |
| out_valid | out | 1 | p and err_detected are valid |
| p | out | 24 | ANT-corrected product |
| err_detected | out | 1 | the replica estimate replaced the main result |

Operands are registered on the clock edge where `in_valid` is high. The main multiplier,
replica and decision block form one combinational stage. The result is registered at
the next edge, so `out_valid` follows `in_valid` by exactly two edges. One operation can
be started every cycle. The register stages, the valid handshake and the reset are
choices of this implementation; the source design gives none of them.

Parameters: `N` (operand width, 12), `RPR_N` (replica word length, 6), `TH` (threshold,
2^20). Shared defaults live in `ant_pkg`. Operands are unsigned throughout.

## Files

| file | content |
|---|---|
| `rtl/ant_pkg.sv` | shared widths and threshold |
| `rtl/mdsp_multiplier.sv` | main block: N x N unsigned array multiplier, 2N-bit product |
| `rtl/fixed_width_rpr.sv` | fixed-width replica with ICV/MICV compensation |
| `rtl/ant_decision.sv` | threshold comparison and output selection |
| `rtl/ant_multiplier.sv` | top: registers, the three blocks, output register |
| `tb/tb_mdsp_multiplier.sv` | corner and 20000 random products against integer multiplication |
| `tb/tb_fixed_width_rpr.sv` | all 4096 replica inputs against an arithmetic reference; error statistics |
| `tb/tb_rpr_word_lengths.sv` | replicas of 5 to 10 bits, exhaustive, with the MSE table |
| `tb/tb_ant_decision.sv` | threshold edges, random pairs, both outcomes |
| `tb/tb_ant_multiplier.sv` | end-to-end test at full size with imitated VOS errors |

## Simulating

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. For example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/ant_pkg.sv tb/tb_ant_multiplier.sv --top-module tb_ant_multiplier
./obj_dir/Vtb_ant_multiplier
```

Each testbench runs in well under a second.

VOS is an electrical effect, and RTL cannot produce it. `tb_ant_multiplier` imitates
its result: while an operation sits in the combinational stage, the testbench `force`s
the main multiplier's output net (`dut.mdsp_p`) to a corrupted value. It mixes three
cases over 20000 operations issued on random cycles, mostly back to back:

- clean (60%): the exact product must come out, with `err_detected` low;
- small error (20%): one bit below 2^18 flipped; it must pass unchanged;
- large error (20%): bits among 21..23 flipped; the replica estimate, computed in the
  testbench from the operands, must come out with `err_detected` high.

The test also checks:
- the two-cycle latency;
- that every output lies within 3.5 · 2^18 of the exact product;
- that each case, back-to-back issue, and both values of alpha occurred.

It reports the SNR of the corrected output next to that of the uncorrected main block.
The corrected SNR must be higher.

## What is not here

- **Voltage over-scaling itself.** The supply scaling and the resulting SNR-versus-K_vos
  behaviour at process corners are circuit-level effects. The reference 90-nm
  implementation reaches a lowest reliable supply of 0.623 · VDD, with 4616.5 µm² and
  0.393 mW at 0.6 V / 200 MHz. None of this can be reproduced in RTL simulation.
- **The internal structure of the main multiplier.** The source design gives it only as
  a 12-bit full-width multiplier. It is written here as a plain row-by-row array.
  Synthesis is free to restructure it.
- **ICV weight balancing** of equal-sum terms at different positions (see above).
- **The full-width replica** is a baseline the design compares against, not part of it,
  and is not included.
