# Very-high-radix combined divider and square-root unit

This unit computes `x / d` and `sqrt(x)` for 54-bit significands. At the default radix
r = 2^9 = 512 it produces nine result bits per iteration. A division takes 9 clock cycles
and a square root takes 15.

At such a radix, the usual quotient-digit selection table becomes impractical. This design
avoids it with **prescaling**. The operands are first multiplied by a factor M. M is chosen
so that the quantity that multiplies each new digit in the recurrence is very close to 1.
That quantity is `M*d` for division and `T = M*S` for square root. Once it is that close
to 1, the next digit is simply the current residual estimate, shifted by r and **rounded to
the nearest integer**. Most of the unit's ideas follow from that one choice:

* There is a single rounding recoder for all digit selection. The same recoder also rounds M.
* Division and square root share the recoder, the multiply-accumulate array and most of the
  registers.
* The square-root recurrence has a term in `s^2`. That term needs a second multiplication.
  To keep the cycle as short as a division cycle, each square-root iteration takes two
  clock cycles (A and B).

Everything is written in synthesizable SystemVerilog. Two parameters set the size: `N`
(operand fraction bits, default 54) and `B` (log2 of the radix, default 9). Every width and
both coefficient tables are derived from them.

## The two recurrences

Notation: r = 2^b; `w[j]` is the residual; digits are signed integers.

**Division.** M is approximately 1/d.

```
w[0]   = M*x/2
q[j+1] = round(r*w[j])              (rounding of a truncated estimate)
w[j+1] = r*w[j] - (M*d)*q[j+1]
Q      = sum q[j] r^-j  ~  x/(2d)
```

There are `ceil(n/b)` iterations, so 6 at b = 9. The residual stays within
|w| < 1 - 1/(2r), and every digit after the first satisfies |q| <= r-1.

**Square root.** M is approximately 1/sqrt(x). Let `k = b+3` and `S` be the partial root.
The unit keeps `T = M*S` and `t = M*s`:

```
w[0]    = 4*M*x,  T[0] = 0
s1      = round(2r*w[0])          ( = round(2^k * M*x), up to 8r, gives k bits at once )
s[j+1]  = round(r*w[j])           (j >= 1, |s| <= r-1)
w[j+1]  = r*w[j] - T[j]*s[j+1] - (1/2) t[j+1] s[j+1] 2^-k r^-j
T[j+1]  = T[j] + t[j+1] 2^-k r^-j,       t[j+1] = M*s[j+1]
S       = 2^-k (s1 + sum_{j>=2} s[j] r^-(j-1))  ~ sqrt(x)
```

There are `ceil((n-3)/b)` iterations, so 6 at b = 9. Because `M*sqrt(x)` is close to 1,
`M*x` is itself close to `sqrt(x)`. The first k bits of the root therefore come from the
same rounding recoder, and no separate first-digit table is needed.

## Computing the scaling factor M

M is a linear interpolation read from a small table. The table is addressed by the leading
bits of the operand:

```
P = C - A*delta,   delta = (next hb bits of the operand) ,   M = round(2^m P) 2^-m
```

Here `m = b+5`, so M has one integer bit and b+5 fraction bits.

| | division (TABD) | square root (TABS) |
|---|---|---|
| operand range | d in [1/2,1) | x in [1/4,1) |
| index bits | ceil(b/2)+1 fraction bits of d; the leading 1 is not stored (5 address bits at b = 9) | ceil(b/2)+2 fraction bits of x (7 at b = 9) |
| delta | next floor(b/2)+4 bits (8) | next floor(b/2)+4 bits (8) |
| C | 1 + (b+3) fraction bits | 1 + (b+8) fraction bits |
| A | 2 + ceil(b/2)+1 (b odd) or b/2+3 (b even) fraction bits | 2 + ceil(b/2)+3 fraction bits |

With `I = 2^-tau` and `y` the table's truncated operand:

```
division:  C = 2(y+I) / (2y(y+I) + (I/2)^2),   A = 2 / (2y(y+I) + (I/2)^2)
sqrt:      D = 27648y^6 - 7344y^4 I^2 + 1620y^3 I^3 + 36y^2 I^4 - 27y I^5 + I^6
           C = 216 (4y-I)^2 y^1.5 (8y^2 + 4yI - I^2) / D,   A = 216 (4y-I)^3 y^1.5 / D
```

Both coefficients are rounded to nearest. The integer bit of C is always 1 and is not
stored. `tabd.sv` and `tabs.sv` evaluate these formulas in a constant function at
elaboration, so the ROM contents follow `B` automatically.

L-MUL forms `C - A*delta` in carry-save form. Both vectors are truncated to m+2 fraction
bits. The recoder then adds them, adds 1/2 and drops the fraction. The result is 2^m*M as
radix-4 signed digits.

## Datapath

```
 TABD  TABS                         MUX4 (d*2^-m | M*2^-k r^-j)
   \   /                              |
   MUX1 --C,A--> L-MUL <-- MUX2 (delta)    MUL (-Md | -t r^-J, carry-save)
                   | P                  /    |            \
        W-hat --> MUX3 --> RECOD --digits    ADD (-t r^-J)   CSA (+ -T)
                              |  \            | /2           |
                            OTFC  CONV -> M   MUX5         MUX7 <- -Md
                                              |              |
              W --MUX6 (0 | w | r*w)--> MAC <-+            C-GEN
              ^                          |                   |
              +---- W, W-hat <-----------+           R {p, carries}
                                                             |
                                              S-GEN --> -T / -Md (to MUX5, CSA)
```

* **RECOD** is the digit selector. It receives two carry-save vectors that were truncated
  to 3 fraction bits (from W-hat, or from L-MUL). It adds them, rounds, and Booth-recodes the
  integer into 9 radix-4 digits in {-2..2}. These digits are the multiplier of both MAC and
  MUL.
* **MAC** is the one large array. It computes `multiplicand * digits + two accumulation
  lines` and leaves the result in carry-save form. The multiplicand is selected by MUX5:
  `2^-m x/2`, `2^(2-m) x`, `-t r^-J / 2` or `-T` / `-Md`. It updates the residual register W.
  W-hat holds the top slice of the same result, which feeds the next selection.
* **MUL** produces the *negated* product `-M*d` or `-t r^-J`. R holds `-Md` for division and
  `-T` for square root, so both can enter MAC as an addend.
* **R and the two-step adder.** C-GEN computes the propagate bits and all carries with a
  Kogge-Stone prefix network. R stores {propagate, carries}. S-GEN forms the sum with one XOR
  in the following cycle. This moves the XOR out of the cycle that loads R.
* **OTFC** appends digits to Q and Q-1 without carry propagation. In the last cycle it
  chooses Q or Q-1 from the sign of the final residual, then rounds.

## Cycle schedule

| cycle | division | square root |
|---|---|---|
| 1, 2 | table, L-MUL, round M; MAC: `w[0] = M x/2`; MUL: `-Md` -> C-GEN -> R | table, L-MUL, round M; MAC: `w[0] = 4Mx`; CONV: M -> M register; R = 0 |
| iteration | 1 cycle: `w = r w + (-Md) q` | A: `v = r w + (-T) s` -> W. B: `w = v + (-t r^-J/2) s` -> W, W-hat; `-T - t r^-J` -> R |
| last | residual sign and zero test, correction, rounding | same |
| total | 3 + ceil(n/b) | 3 + 2 ceil((n-3)/b) |

| b | 9 | 11 | 14 | 18 |
|---|---|---|---|---|
| division cycles | 9 | 8 | 7 | 6 |
| square-root cycles | 15 | 13 | 11 | 9 |

Multi-cycle paths:

* The set-up path (table, then L-MUL, RECOD and MAC) has no register in it. It is a
  two-cycle path, and W, W-hat and R load at the end of cycle 2.
* In a square-root iteration, W-hat and the digit stay constant through cycles A and B.
  The MUL -> ADD path and the MUL -> CSA -> C-GEN -> R path may therefore use both
  cycles. Only W loads at the end of A.

A timing constraint file for synthesis must declare both of these as two-cycle paths.

## Number formats

This section explains most of the width arithmetic in the RTL. The widths come from
`dsq_pkg.sv`.

* **Residual domain.** W, R, MAC, MUL, CSA, ADD and the two-step adder all share one
  two's-complement format with `fw` fraction bits and `iw = b+6` integer bits. At n = 54,
  b = 9 that is 72 + 15 = 87 bits. `fw` is the larger of `n+1+m` (for `M x/2`) and
  `m+k+1+b(iterations-1)` (the last `t s r^-J / 2` term of square root). At that width every
  step of both recurrences is exact. Carry-save vectors are kept modulo 2^87. Their sum is
  right whenever the true value fits, even when one vector alone does not.
* **The alignment `r^-J`** is made by shifting M before it enters MUL. The product is then
  already in the residual format, and halving `-t r^-J` is a one-bit arithmetic shift.
* **Estimate.** W-hat holds both residual vectors truncated to b+4 fraction bits. The
  recoder reads r*w-hat (3 fraction bits) or 2r*w-hat. The combined truncation error is below
  1/4. That margin is required: truncating each vector to only 2 bits lets the error reach
  1/2, and the residual bound then fails.
* **Result.** The result is a fixed-point integer in `resw = 59` bits:
  * Division delivers `floor(x/d * 2^(b*ceil(n/b)-1))`, which is `floor(x/d * 2^53)` at the
    default.
  * Square root delivers `floor(sqrt(x) * 2^(k + b(ceil((n-3)/b)-1)))`, which is
    `floor(sqrt(x) * 2^57)`.

  `res_rnd` drops the last bit and rounds to nearest, ties to even. The sticky bit is
  "final residual non-zero".

## Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | sampled only while `busy` is low; captures `op`, `x`, `d` |
| `op` | in | 1 | `OP_DIV` (0) or `OP_SQRT` (1), type `dsq_pkg::op_e` |
| `x`, `d` | in | N | fractions, value = integer * 2^-N; division x, d in [1/2,1); square root x in [1/4,1) (`d` unused) |
| `busy` | out | 1 | operation in progress |
| `done` | out | 1 | one-cycle pulse; the result outputs are valid from then until the next operation ends |
| `res_trunc` | out | resw | exact result, truncated (formats above) |
| `res_rnd` | out | resw-1 | rounded result |
| `inexact` | out | 1 | some non-zero part was discarded |

`done` rises 9 (division) or 15 (square root) clock edges after the edge that samples
`start`; a `start` while busy is ignored. Assertions in `divsqrt_unit` check two things:

* the operands are normalised;
* every digit after the first satisfies `|s| <= r-1`, the condition that the scaling
  guarantees.

Sign and exponent handling are left to the surrounding floating-point unit. That includes
making the radicand's exponent even, which maps x into [1/4,1).

## Choices this implementation makes

The published algorithm leaves the following open or constrains them differently. Each item
changes how far the RTL can be read as "the" published unit.

* **Dividend halved.** The residual starts at `M x/2`, not `M x`. With x/d up to 2, an
  unhalved start gives a first digit near 2r. That exceeded the residual bound in a
  bit-level model. Division therefore produces 53 quotient bits (54 digits minus the halving)
  plus a guard bit.
* **Estimate precision.** Each carry-save vector keeps 3 fraction bits, not 2 (see above).
* **Table sizes.** For odd b there are two competing sets of sizes. The TABS index uses
  ceil(b/2)+2 bits and A has ceil(b/2)+3 fraction bits. A 6-bit index at b = 9 leaves M
  outside its required interval by up to 1.5x, and the square root then fails to converge.
  The TABD index uses ceil(b/2)+1 bits.
* **Widths.** One uniform 87-bit residual format is used everywhere. The original sizes are
  trimmed per unit: MAC result n+2b+10, R n+b+7, ADD 2b+10. The uniform format costs area
  but makes every step exact.
* **MUX6** has an extra zero input for the set-up cycle.
* **Arrays.** The multiplier arrays are linear chains of 3:2 adders behind radix-4 Booth
  selection, not 4:2 trees. The function is the same; the delay is not.
* **OTFC** uses additions, not concatenations, so that the oversized first digit (up to 8r)
  fits.
* **Rounding mode, reset and handshake** are this design's own.

## Verification

Each block has a self-checking testbench in `tb/` against an independent reference. Each
prints `TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `tb_divsqrt_unit` | full size (N = 54, B = 9). About 1100 divisions and square roots: corners, both edges of every table interval, random operands, perfect squares. Checks the result, rounding, inexact flag and latency against 128-bit long division and integer square root. It also counts negative digits, final corrections, exact results, round-ups and large first digits, and fails if any of them never happened. |
| `tb_divsqrt_radix` | the same kind of checks at b = 9, 11, 14 and 18 side by side, including the cycle-count table above |
| `tb_tabd`, `tb_tabs` | every ROM word against the formulas evaluated in floating point |
| `tb_lmul`, `tb_recod`, `tb_conv`, `tb_mul`, `tb_mac`, `tb_cpa`, `tb_csa`, `tb_cgen`, `tb_sgen` | arithmetic identities on random operands (modular sums, prefix carries against ripple carries, digit range) |
| `tb_otfc` | random digit strings, correction and rounding |
| `tb_dsq_ctrl` | latency, digit steps and register loads per operation; `start` ignored while busy |

To run one, with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/dsq_pkg.sv tb/tb_divsqrt_unit.sv --top-module tb_divsqrt_unit -o sim
./obj_dir/sim
```

The full-size test finishes in about a second.

What is *not* verified:

* timing;
* the two-cycle paths under a real clock;
* gate-level behaviour.

The convergence of the tables is shown only by simulation, not by proof: every table
interval's edges plus random operands, at all four radices.

## Changing the design

* `B` may be any radix for which the tables converge. 9, 11, 14 and 18 are tested. The
  tables, widths, digit counts and cycle counts all follow from `B`. Another radix should be
  rerun through `tb_divsqrt_radix` (add it to the list there).
* `N` changes the operand width. Keep `resw` and the 128-bit references in the testbenches
  in range.
* The residual format (`fw`, `iw`) and the estimate width (`riw`, 3 fraction bits) are
  set in one place, `dsq_pkg.sv`.

## Files

`rtl/dsq_pkg.sv` holds the widths, digit type and control word. `rtl/divsqrt_unit.sv` is
the top level: multiplexers, registers W, W-hat, R and M, and the checks. The other files
are one block each:

* `dsq_ctrl` — the sequencer
* `tabd`, `tabs` — the two coefficient tables
* `lmul` — L-MUL
* `recod` — RECOD
* `conv` — CONV
* `mul` — MUL
* `mac` — MAC
* `cpa` — ADD, and the final residual adder
* `csa` — CSA
* `cgen`, `sgen` — C-GEN and S-GEN
* `otfc` — OTFC
* `csmul` — the Booth carry-save array shared by L-MUL, MUL and MAC
