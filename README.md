# Two-stage hybrid LDPC decoder

Soft-decision LDPC decoding with the sum-product algorithm (SPA) corrects
the most errors, but it needs the most hardware and has the longest delay.
Hard-decision bit flipping (BF) is nearly free, but it corrects far less.
The two-stage hybrid decoder runs a few SPA iterations first. SPA removes
most errors while the channel's soft information is still available. The
SPA hard decision then goes to a BF stage, which works on the remaining
iteration budget. It stops as soon as the syndrome is zero. The split of the
iteration budget between the two stages sets the trade-off between delay
and error rate.

This RTL implements the decoder for the small half-rate (6,3) code that
the published FPGA case study uses. The defaults are one SPA iteration
followed by up to two BF iterations. Everything is integer arithmetic: the
probabilities are scaled integers and no fractions are used.

## The code and the bit order

The code has N = 6 bits and M = 3 parity checks. Bit `b` of every vector is
symbol node d(b+1), and row `i` of H is check h(i+1). Vectors are written
bit 5 first, as they are printed below. The default parity check matrix is:

```
row 0: 001011
row 1: 010110
row 2: 100011
```

This is the matrix of the published simulations. The published description
of the code also gives a matrix that differs in one bit, with row 0 =
`001001`. Every module takes the matrix as the parameter `HM`, so either
matrix can be used.

A syndrome is printed check 2 first. For example, `110` means checks 2 and
1 are unsatisfied.

## Stage one: integer sum-product

The probabilities of a received bit are integers, not fractions. They are
scaled so that the pair sums to 63, not 1. The messages on each edge (i,j)
of the Tanner graph, where H[i][j] = 1, are computed in three steps.

**Initialisation.** Every edge starts with the a-priori pair of its bit:
Q0(i,j) = f0(j) and Q1(i,j) = f1(j).

**Horizontal (check node) step**, in `spa_horizontal`:

```
dQ(i,j) = Q0(i,j) - Q1(i,j)
dR(i,j) = product of dQ(i,j') over the other bits j' of check i
R0(i,j) = (1 + dR(i,j)) / 2        R1(i,j) = (1 - dR(i,j)) / 2
```

The division truncates toward zero, as integer division does. So dR = 0
gives R0 = R1 = 0, not one half.

**Vertical (symbol node) step**, in `spa_vertical`:

```
Qj^x     = f_j^x * product of R^x(i,j) over all checks i of bit j
r_j      = 1 if Qj^1 > Qj^0, else 0          (a tie decides 0)
Q^x(i,j) = f_j^x * product of R^x(i',j) over the other checks i' of bit j
```

A bit with only one check has no other check to multiply over. Its message
for the next iteration is 0.

These integers are never renormalised, so they grow by orders of magnitude
from one iteration to the next. They also collapse to zero easily. Once two
dQ values of a check are zero, every R of that check is 0, and the
posteriors tie at 0. The messages are 48-bit signed, and every product
saturates at the 48-bit limits. Saturation keeps the sign, and the sign is
what decides each bit. For the two iterations of the case study no value
comes near the limit: the largest is about 1.2e7.

Here is a worked example, bit 5 in the first iteration (f0 = 13, f1 = 50).
Its only check is check 2, whose other bits 1 and 0 have dQ = -49 and -23.
So dR = 1127, R0 = 564 and R1 = -563. That gives Q5^0 = 13 * 564 = 7332
and Q5^1 = 50 * -563 = -28150. The bit decides 0.

`spa_decoder` runs this loop. After each iteration it checks the syndrome
of the hard decision. It stops on a zero syndrome or when `MAX_ITERS`
iterations are done.

## Stage two: bit flipping

`bf_flip` performs one flip step on a hard-decision word r with syndrome S:

```
y = S . H  (mod 2)                 bit j of y: XOR of the syndrome bits of j's checks
flip bit j (j < 5) when y[j] >= y[j+1]     bit 5 is never flipped
```

Each bit of y is compared with its neighbour to the left in the printed
order. Where it is not smaller, the code bit is flipped. Example: r =
`100011` has S = `110`. Checks 1 and 2 are unsatisfied, so y = row1 XOR
row2 = `110101`. Bits 4, 2 and 0 satisfy the rule, so r becomes `110110`.
From there the sequence continues `101011`, then `110101`.

The rule is cheap and crude. It can move a word away from the nearest
codeword, and it can cycle. That is why BF alone performs worst.

`bf_decoder` checks the syndrome first. A word that is already a codeword
passes through unchanged. Otherwise it flips until the syndrome is zero or
`MAX_ITERS` flips are done.

## Front end: from samples to probabilities

`prob_mapper` takes six received samples. Each is the channel value times
1000, as a 13-bit signed integer. It finds the smallest and largest sample of
the codeword and divides that span into 64 equal intervals:

```
n = floor((v - min) * 64 / (max - min + 1))
```

Every sample gets the probability pair of its interval. The pair comes from
a 64-entry table computed at elaboration. The table uses a Gaussian channel
with BPSK means -1 (bit 0) and +1 (bit 1):

```
x_n   = SPAN * (2n + 1 - 64) / 64
f1[n] = round(63 / (1 + exp(-2 x_n / SIGMA^2))),   f0[n] = 63 - f1[n]
```

The defaults are SPAN = 2.0 and SIGMA = 1.15 (the parameters `SPAN_MILLI`
and `SIGMA_MILLI`). A positive sample favours bit 1. The table is this
design's own. The original table is not known, and its six published
values (see below) cannot be matched by one Gaussian.

## Control, interface and timing

`hybrid_decoder` is the top level. Its sequence is as follows:

1. `start` is accepted while `busy` is low. The samples are registered.
2. The mapped probabilities load into the SPA stage.
3. The SPA stage runs `SPA_ITERS` iterations. It stops early on a zero
   syndrome.
4. If the SPA syndrome is zero, or `BF_ITERS = 0`, the BF stage is
   **bypassed**. Otherwise the SPA hard decision starts the BF stage.
5. `done` pulses for one cycle. At that point the outputs are valid:
   `decoded`, `syndrome`, `success` (syndrome zero) and `bf_used`, plus the
   iteration count of each stage. The SPA decision and its syndrome are on
   `spa_decoded` and `spa_syndrome`.

Latency is counted in clock edges, from the edge that takes `start` to the
edge that raises `done`:

| path | latency | defaults |
|---|---|---|
| BF bypassed | 4 + 2 * SPA iterations | 6 |
| BF runs | 6 + 2 * SPA iterations + BF iterations | 8 to 10 |
| `spa_decoder` alone | 1 + 2 * iterations | |
| `bf_decoder` alone | 2 + iterations | |

Each SPA iteration takes two cycles. The horizontal step is registered,
then the vertical step and the syndrome check run. Each BF flip takes one
cycle. One decode runs at a time, and the two stages are never busy
together. An assertion in the top checks this. Reset is asynchronous and
active low.

## Modules

| module | role |
|---|---|
| `ldpc_pkg` | sizes, default H, message type, saturating multiply/subtract, (1 ± x)/2 |
| `hybrid_decoder` | top: mapping, stage sequencing, BF bypass |
| `prob_mapper` | min/max, 64 intervals, probability table |
| `spa_decoder` | SPA iteration controller and message registers |
| `spa_horizontal` | check node step: dQ, dR, R0, R1 |
| `spa_vertical` | symbol node step: posteriors, decision, message update |
| `syndrome_unit` | S = r . H^T |
| `bf_decoder` | BF iteration controller |
| `bf_flip` | y = S . H and the flip rule |

Everything is parameterised by `NB`, `MB` and `HM`. The datapath is fully
parallel: every edge has its own multipliers, so the size grows with the
number of ones in H.

## How far it follows the published design

These parts match the published simulation values exactly:

- The BF stage reproduces every published flip step. With BF alone for
  three iterations, `100011` goes to `110110`, `101011`, then `110101`,
  with final syndrome `001`. As the BF stage of the hybrid, `010000` goes
  to `000110`, then `001101`, with syndrome `110`.
- Given the published probabilities and check messages, the vertical step
  reproduces every published posterior, the decision `010000` and every
  updated message.
- The horizontal step reproduces the published second SPA iteration and
  every published first-iteration value of checks 0 and 2.

Three parts differ from the published simulation:

- **One dQ value.** The published first iteration shows dQ = 0 for check 1,
  bit 4, where the defining equation gives 60 - 3 = 57. This RTL follows
  the equation. As a result, the check-1 messages on bits 2 and 1 differ.
  The first SPA decision for the published samples also differs: the
  published run gives `010000`, then SPA converges to `000000` in the
  second iteration and the hybrid ends at `001101`. With its own
  probability table (next item), this RTL's SPA stage decides `010101` for
  the published samples. The hybrid then ends at `001011`, with syndrome
  `011`.
- **The probability table.** The published pairs for the samples
  460, 2500, -1500, -70, -3200 and 980 are
  (f0, f1) = (20,43), (7,56), (54,9), (38,25), (60,3) and (13,50). The table
  here gives the same ordering but other values: (18,45), (3,60), (48,15),
  (26,37), (60,3) and (13,50). The -70 sample lands on the other side.
- **Tie breaking.** A tie between the posteriors decides 0, as the
  published waveforms show. The published flow chart's rule ("if Q0 > Q1
  then 0, else 1") would decide 1.

These choices are this design's own: the 48-bit saturating message width,
the clock-cycle schedule, the handshake, the reset and the iteration
counter width.

The original design was measured on an FPGA: 1825 LUTs, 60 DSP blocks and
a 26.25 ns logic-plus-routing delay for the hybrid. Its 84 I/O buffers are
exactly the 78 sample bits plus the 6 decoded bits. So that implementation
appears to have been one combinational circuit, with no clock or control
pins. This RTL is clocked instead. It reuses one SPA datapath and one BF
datapath on every iteration, following the iteration loops of the
algorithm. The published resource and delay figures therefore do not carry
over to it.

The published evaluation also includes a long (200,100) code with 2 SPA and
8 BF iterations. That code's matrix is not available, and the RTL is built
for the (6,3) code. The 2 + 8 split itself is supported through the
parameters. The unnormalised message growth means a heavier code would need
a different number format.

## Simulation

The testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=F`. They compare against reference models in
`tb/ldpc_ref_pkg.sv`, which are written independently of the RTL and use
128-bit integers and real arithmetic. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module hybrid_decoder_tb \
  -y rtl -y tb +libext+.sv rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/hybrid_decoder_tb.sv
./obj_dir/Vhybrid_decoder_tb
```

| testbench | what it runs |
|---|---|
| `hybrid_decoder_tb` | top at its defaults: the published samples, plus 2000 noisy BPSK frames of all codewords. Checks results and latency, and that the BF bypass, BF success and BF limit each occur |
| `hybrid_splits_tb` | splits 3+0 (SPA alone), 2+8 and 1+2 side by side on 1500 frames |
| `spa_decoder_tb` | SPA with 3 iterations: published messages, random inputs, latency |
| `bf_decoder_tb` | both published BF runs, all 64 words, latency |
| `spa_horizontal_tb`, `spa_vertical_tb` | published message values, random and saturating inputs |
| `bf_flip_tb`, `syndrome_unit_tb`, `prob_mapper_tb` | published values plus exhaustive or random inputs |

The frames use a noise amplitude that cycles through eight levels. On them,
the share decoded to the transmitted codeword orders the splits as SPA
alone (3+0) first, then 2+8, then 1+2. SPA alone is ahead of both hybrid
splits, as in the published long-code study. BF alone is not part of this
comparison. With this tiny code and coarse integer arithmetic, the absolute
numbers mean little.

## Changing it

- **Iteration split:** set `SPA_ITERS` (at least 1) and `BF_ITERS` (0 or
  more) on `hybrid_decoder`. Raise `IW` above 4 bits for more than 15
  iterations per stage.
- **Another code:** set `NB`, `MB` and `HM`. `prob_mapper` and the
  testbench reference package assume six 13-bit samples and 6-bit
  probabilities. `ldpc_pkg` holds the sample width `RW`, the probability
  resolution `K` and the message width `DW`.
- **Channel table:** set `SPAN_MILLI` and `SIGMA_MILLI` on `prob_mapper`.
  Also change the matching constants in `ref_map` of the reference package.
