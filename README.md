# A sequential multiplier built from 2-bit MGDI multiplier cells

This design multiplies two N-bit unsigned numbers (N = 4 by default) using only
small 2-bit × 2-bit multipliers. Each 2-bit multiplier is a fixed circuit of
Modified Gate Diffusion Input (MGDI) cells. An MGDI cell is a two-transistor gate
that becomes an AND, OR, inverter or multiplexer depending on how its three
terminals are tied. The wide product is not formed in one array. Operand A is
fed in one 2-bit digit per clock. All digit products made on the same clock
have the same binary weight, so they are summed, shifted into place and
accumulated by ripple-carry adders. For N = 4 two 2-bit multipliers are enough,
and the 8-bit product is ready five clocks after the operands are taken.

The RTL has three levels:

| level | module | role |
|---|---|---|
| cell | `mgdi_cell` | the MGDI cell as a logic element, `out = G ? N : P` |
| 2-bit multiplier | `mul2_mgdi` | P3..P0 = A1A0 × B1B0, built from 16 `mgdi_cell`s |
| N-bit multiplier | `seq_multiplier` (top) | Register1, SR1..SR5, RCA1, RCA2, Register2, timing and control |

## The MGDI cell as logic

The cell is one pMOS and one nMOS transistor with a shared gate terminal **G**
and a shared drain (the output). Unlike a CMOS inverter, the sources are
inputs: **P** (the pMOS source) and **N** (the nMOS source). When G = 0 the pMOS
conducts and the output follows P. When G = 1 the nMOS conducts and the
output follows N. So the cell's logic function is a 2:1 multiplexer, and tying
P and N gives the basic gates (A drives G):

| N | P | output | name used below |
|---|---|---|---|
| 0 | B | !A & B | F1 |
| B | 1 | !A \| B | F2 |
| 1 | B | A \| B | OR |
| B | 0 | A & B | AND |
| C | B | A ? C : B | MUX |
| 0 | 1 | !A | NOT |

"Modified" refers to the transistor bulks: they are tied to the supply rails
rather than to P and N. That, the threshold drop on a passed level, and the
cell's delay and power are transistor-level properties. The RTL does not model
them: `mgdi_cell` is an ideal full-swing multiplexer and is synthesizable.

## The 2-bit multiplier (`mul2_mgdi`)

The four product bits come from a Karnaugh-map minimisation of the 16-row
truth table of A1A0 × B1B0. The terms are grouped to suit the cell:

```
P0 = A0 B0
P1 = !B1 B0 A1 + B1 !A1 A0 + !B0 A0 B1 + B0 A1 !A0
P2 = A1 B1 (!A0 + !B0)
P3 = A1 A0 B1 B0
```

Each term of P1 contains exactly one complemented literal. The pair with the
complement is one F1 cell (G = the complemented signal, P = the other one).
An AND cell then adds the third literal, and three OR cells join the four
terms. `(!A0 + !B0)` is an F2 cell whose N input is an inverter cell on B0.
`A1 B1` is formed once and shared by P2 and P3, and P3 reuses P0.

| output | cells |
|---|---|
| P0 | 1 AND |
| P1 | 4 F1 + 4 AND + 3 OR |
| P2 | 1 AND (A1B1) + 1 NOT + 1 F2 + 1 AND |
| P3 | 1 AND (A1B1 · P0) |

That is 16 cells, or 32 transistors. The published circuit realises the same
equations with 26 transistors. Its exact wiring was not reproduced, so this
netlist is this design's own. It gives the same function, but its cell count is
not the published one.

## The N-bit multiplier (`seq_multiplier`)

### Digits and weights

Split both operands into 2-bit digits, A = Σ a_i·4^i and B = Σ b_j·4^j, with
K = N/2 digits each. Then A·B = Σ a_i·b_j·4^(i+j). The design has one 2-bit
multiplier per digit of B. Multiplier j always multiplies by b_j. It receives
the A digits one per clock, one clock later than multiplier j−1. On pulse t,
multiplier j therefore forms a_(t−j)·b_j, and every product of pulse t has
weight 4^t. The datapath never has to shift single products against each
other. It adds the products of a pulse, shifts the sum left by 2t, and
accumulates. There are 2K−1 pulses.

### Blocks

- **Register1** (`operand_reg`) holds B. Multiplier j reads bits `2j+1:2j`.
- **SR1 and SR2** (`digit_shift_reg`) hold the even bits of A (A2 A0) and the
  odd bits of A (A3 A1). Each shifts one bit per pulse toward its output bit
  and fills with zeros. The two output bits together form the current A digit
  `{SR2, SR1}`: A1A0 first, then A3A2, then 0.
- **A-digit pipeline.** A 2-bit register between neighbouring multipliers
  passes the A digit on one pulse late.
- **SR5 and SR4** (`product_reg`) capture the 4-bit products of multiplier 0
  and multiplier 1 on every pulse.
- **RCA1** (`product_adder`) adds the products of one pulse. For K = 2 it is
  a single 5-bit ripple-carry adder. For larger K it is a chain of K−1 of them.
- **SR3** (`sr3_shift_reg`) loads RCA1's sum shifted left by 2t places
  (0, 2 or 4 for N = 4), so the sum reaches RCA2 with its weight.
- **RCA2** (`rca`, 2N bits) adds SR3 to the value fed back from Register2.
- **Register2** (`acc_reg`) stores RCA2's sum. After the last step it holds
  A·B.
- **Timing and control** (`timing_control`) is an idle/run state machine with
  a step counter. It produces `ld`, `pulse`, `sr3_ld` with the pulse index
  `sr3_t`, and `acc_ld`.

All adders are chains of `full_adder` cells.

### Schedule for N = 4

The pipeline has three stages. A pulse captures products in SR4/SR5. The next
edge moves their weighted sum into SR3. The edge after that accumulates it into
Register2. Edge E0 is the rising edge that samples `start`. At E0, SR1/SR2 and
Register1 are loaded, and SR3, SR4, SR5, Register2 and the A-digit pipeline are
cleared.

| cycle after | multiplier 0 | multiplier 1 | SR3 loads (at the edge ending it) | Register2 becomes |
|---|---|---|---|---|
| E0 | A1A0·B1B0 | 0 | – | – |
| E1 | A3A2·B1B0 | A1A0·B3B2 | SR5+SR4 = A1A0·B1B0, no shift | – |
| E2 | 0 | A3A2·B3B2 | (A3A2·B1B0 + A1A0·B3B2) << 2 | A1A0·B1B0 |
| E3 | – | – | (A3A2·B3B2) << 4 | + middle sum << 2 |
| E4 | – | – | – | + A3A2·B3B2 << 4 |
| E5 | `done` = 1, product valid | | | |

The "Register2 becomes" column gives the value after the edge that ends the
cycle. `busy` is high from E0 until E5. `done` is high for the one cycle
after E5. `product` holds its value until the next `start`.

## Interface and timing

```
seq_multiplier #(parameter int unsigned N = 4)   // even
  input  clk, rst_n          // rst_n: asynchronous, active low
  input  start               // one cycle; taken only while busy is low
  input  [N-1:0]   a, b      // sampled on the edge that takes start
  output busy, done          // done: one-cycle pulse
  output [2N-1:0]  product   // Register2
```

- **Latency.** `done` rises N+1 rising edges after the edge that samples
  `start` (5 for N = 4).
- **Throughput.** `start` may be raised in the cycle where `done` is high, so
  one product completes every N+1 cycles.
- **Busy.** A `start` while `busy` is high is ignored.
- **Assertions.** The RTL checks three rules: the step counter stays in range,
  `done` never comes while busy, and RCA2 never carries out of 2N bits.

## Wider operands

`N` can be any even width. The design then has N/2 two-bit multipliers
(each with its own product register, like SR4/SR5) and N−1 pulses. SR1/SR2
become N/2 bits long. RCA1 sums N/2 products with 4+clog2(N/2) bits. SR3, RCA2
and Register2 are 2N bits wide. Latency stays N+1 edges. N = 4 is the
reference configuration. N = 8 is also simulated.

## Departures and choices

These follow the published block diagram and its pulse-by-pulse description
only in function:

- The 2-bit multiplier's cell netlist is this design's own: 16 cells against
  the published 26 transistors.
- SR4 and SR5 are parallel 4-bit registers. SR3 is a parallel load through a
  2t-place left shifter. It does not shift one bit per clock.
- The product A1A0·B1B0 reaches Register2 through RCA1 and SR3, with no shift,
  like every other product. It does not enter RCA2 on a separate path. The sum
  is the same.
- Multiplier 0 feeds SR5 and multiplier 1 feeds SR4. The order does not matter
  to RCA1.
- Which A digit reaches the second multiplier when is fixed by the pulse
  schedule. The register that delays it is an addition here.
- The control unit, the start/busy/done handshake, the reset and all adder and
  register widths are this design's choices.
- Nothing analog is modelled: no delay, power or signal levels.

## Simulation

Each testbench in `tb/` checks its results and ends by printing
`TB_RESULT checks=<n> failures=<m>`.

| testbench | what it checks |
|---|---|
| `tb_mgdi_cell` | all six cell configurations for every input |
| `tb_mul2_mgdi` | all 16 input pairs against the truth table and a·b |
| `tb_rca` | all 8-bit operand pairs, both carry-ins |
| `tb_product_adder` | two-input RCA1 exhaustively; four-input RCA1 at random |
| `tb_operand_reg`, `tb_digit_shift_reg`, `tb_product_reg`, `tb_sr3_shift_reg`, `tb_acc_reg` | the registers against cycle models |
| `tb_timing_control` | the control schedule cycle by cycle for N = 4 and 8 |
| `tb_seq_multiplier` | end to end (see below) |
| `tb_seq_multiplier_full` | the default 4-bit unit, all 256 pairs with latency |

`tb_seq_multiplier` runs all 256 pairs of the 4-bit unit, then back-to-back
random pairs, then 1000+ pairs on an 8-bit instance. It also counts the
mechanisms and fails if one never occurs: each SR3 shift (0, 2, 4), both
multipliers contributing in one pulse, the Register2 feedback, the A digit
passed on, a `start` ignored while busy, and a `start` in the `done` cycle.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  --top-module tb_seq_multiplier -y rtl -y tb +libext+.sv \
  rtl/mulseq_pkg.sv tb/tb_seq_multiplier.sv
./obj_dir/Vtb_seq_multiplier
```

The package `rtl/mulseq_pkg.sv` holds the digit and product types and the
controller's state type. It must be listed before the other files. Verilator
reports `SYNCASYNCNET` on `rst_n`. The cause is that the assertions use `rst_n`
in `disable iff` while the flip-flops use it as an asynchronous reset. It is
harmless.
