# Segmented leap-ahead LFSR random number generator

This design produces an M-bit uniform pseudo-random word on every clock from
a single N-stage LFSR. Unlike a plain leap-ahead LFSR, it does not lose most of
its period when N and M are badly matched.

## The problem: leap-ahead LFSRs lose period

A Galois LFSR with N stages steps through all 2^N − 1 non-zero states, but
it delivers one new random bit per clock. Reading several neighbouring stages
as a word gives words that are strongly correlated, because each word is the
previous one shifted by one place. The *leap-ahead* LFSR fixes this. Write
one step as a matrix product over GF(2), X(t+1) = A·X(t). The register then
advances by A^M, that is M steps at once, in a single clock. The XOR logic of
A^M is fixed, so it costs one XOR tree per state bit.

The cost is the period. Stepping M at a time through a cycle of length
2^N − 1 returns to the start after

    T_joined = (2^N − 1) / gcd(2^N − 1, M)

words. With N = M = 18: 2^18 − 1 = 262,143 = 9 · 29,127, so the leap-ahead
LFSR repeats after only 29,127 words.

## The idea: split into two segments whose periods multiply

When 2^N − 1 and M share a factor, the register is cut into two halves:

| | stages | bits leapt and output per step | steps |
|---|---|---|---|
| segment #1 | X_1..X_I, I = ⌈N/2⌉ | M1 = ⌈M/2⌉ | every clock |
| segment #2 | X_{I+1}..X_N, J = ⌊N/2⌋ | M2 = ⌊M/2⌋ | once per full period of segment #1 |

Each half is a maximal-length leap-ahead LFSR in its own right, with its own
feedback polynomial. Segment #2 moves on only after segment #1 has passed
through all of its P1 states, like the digits of an odometer. The period of
the pair is therefore the product

    T_split = P1 · P2,   Pk = (2^len_k − 1) / gcd(2^len_k − 1, M_k)

With N = M = 18 this gives 511 · 511 = 261,121 words. That is nine times the
joined period, and close to the 262,143 of the unsplit register. When splitting
would not help (gcd(2^N − 1, M) = 1), the two segments are chained back into
one N-stage leap-ahead LFSR. That is the conventional design, with its full
period of 2^N − 1.

Simulated periods with M = 3, for comparison:

| N | joined | split |
|---|---|---|
| 12 | 1,365 | 3,969 |
| 14 | 5,461 | 16,129 |
| 16 | 21,845 | 65,025 |
| 18 | 87,381 | 261,121 |
| 20 | 349,525 | 1,046,529 |

For odd N, 2^N − 1 is not divisible by 3, so the generator stays joined with
the full period 2^N − 1. The split period is at most (2^⌈N/2⌉ − 1)(2^⌊N/2⌋ − 1),
slightly under 2^N − 1. Splitting therefore only pays when the joined period has
collapsed, and automatic mode splits only then.

## Structure

```
                                               mode
                                                |
  +--------------------------+          +-------+--------+
  | leap_step #(N, M)        |          | seg_ctrl       |
  | joined next state        |          | sel            |----- sel -------+
  +----+----------------+----+          | P1 counter     |-- seg2_step --+ |
       | [I-1:0]        | [N-1:I]       +----------------+               | |
  +----v---------+ +----v---------+                                      | |
  | lfsr_segment | | lfsr_segment |<--- en = seg2_step ------------------+ |
  | #1 (I, M1)   | | #2 (J, M2)   |<--- sel -------------------------------+
  | en = 1       | |              |   (segment #1 gets sel too)
  +----+---------+ +----+---------+
       | s1             | s2
       +-------+--------+
               v
     state = {s2, s1} --> feeds leap_step, and gives rnd
```

* **`leap_step`** is the A^M transform: a purely combinational
  N-in/N-out XOR network. Column c of A^M is found when the design is
  elaborated, by stepping the unit vector e_c through M single Galois steps.
  Output bit r is then the XOR of those input bits whose column has a 1 in
  row r. With M = 1 it is the ordinary one-bit Galois LFSR: X_1' = X_N and
  X_{k+1}' = X_k ⊕ (C_k ∧ X_N).
* **`lfsr_segment`** is a register with a multiplexer in front of it. With
  `sel = 1` the register takes its own A^M1 next state, computed by its own
  `leap_step` (split). With `sel = 0` it takes its slice of the joined N-stage
  next state (joined). A step enable lets segment #2 run slowly, and a
  synchronous reset loads the seed.
* **`seg_ctrl`** decides `sel` and makes segment #2's step. A counter modulo
  P1 raises `step2` for one clock every P1 clocks. In joined mode `step2` stays
  high and the counter stays at 0.
* **`seg_leap_urng`** (top) wires these together and selects the output word.
* **`lfsr_pkg`** holds the tap table, the mode type and the elaboration-time
  functions: the single step, A^M, gcd and periods.

### Why the multiplexer selects a whole vector

The classic drawing of this architecture puts a one-bit multiplexer on the
feedback path: segment #2's register input comes either from the end of
segment #1 (chained) or from its own last stage (independent). That suffices
for a one-step LFSR. After a leap of M > 1 steps, however, every next-state
bit depends on the feedback bits of all M intermediate steps. So in this RTL
each segment selects between two complete next-state vectors: its own A^M
result and its slice of the joined A^M result. Both XOR networks are fixed at
elaboration. The mux has the same meaning and the same encoding (0 = chained,
1 = independent), but it is W bits wide.

### Why an enable instead of a second clock

The architecture, as usually drawn, drives segment #2 from a second clock,
divided by the number of states of segment #1. This RTL keeps one clock and
gives segment #2 a synchronous step enable, which yields the same state
sequence. There is no divided clock to constrain and no clock-domain crossing.
To drive segment #2 from a real divided clock instead, replace `en` with a
clock and keep `seg_ctrl`'s counter as the divider.

## Interface of `seg_leap_urng`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | the only clock |
| `rst` | in | 1 | synchronous, active high; loads `seed` and clears the divider |
| `seed` | in | N | seed, bit k−1 = X_k; bits I−1:0 go to segment #1 |
| `mode` | in | `lfsr_pkg::mode_e` | `MODE_AUTO` (split iff gcd(2^N − 1, M) > 1), `MODE_JOINED`, `MODE_SPLIT` |
| `rnd` | out | M | random word |
| `sel` | out | 1 | 1 while running split |
| `seg2_step` | out | 1 | high in the cycle whose clock edge moves segment #2 |

Parameters: `N = 18` and `M = 18` (2 ≤ M ≤ N ≤ 24). `TAPS_N`, `TAPS_1`
and `TAPS_2` are the tap masks of the joined LFSR and of the two segments.
They default to `lfsr_pkg::default_taps()`. A tap mask has bit 0 = feedback
into X_1 and bit k = tap C_k (XOR into X_{k+1}). Each default mask gives the
maximal period 2^n − 1, checked by exhaustive period search. The 18-stage
default is {X_1, C_7}, the 9-stage default {X_1, C_4}, and the 4-stage default
{X_1, C_3}.

**Timing.** There is no pipeline. In the cycle after `rst`, `rnd` shows the
seed. After that a new word appears after every clock edge, giving M bits per
clock. Changing `mode` takes effect at the next edge and keeps the current
state. On entering split mode the divider starts from 0, so segment #2 first
moves P1 clocks later.

**Output word.** In joined mode `rnd` is X_{N−M+1}..X_N, the last M stages.
In split mode it is {segment #2's last M2 stages, segment #1's last M1
stages}. For the default M = N both are the whole state.

**Seeds.** An all-zero seed for a segment would lock it up, so it is
replaced by 1. The all-zero seed thus starts at X_1 = X_{I+1} = 1.

## Choices made here, and where the design departs from its source

The segmentation, the segment sizes for even N and M, the chained/independent
mux, the slowed-down second segment, and the default size (m = 18, which with
the published periods of 29,127 and 261,121 implies n = 18) follow the
published architecture. The following are this implementation's own:

* **Which period criterion.** Published descriptions of the architecture
  state the split condition both as "2^n divisible by m" and as "2^n − 1 and
  m share a factor". This design uses 2^n − 1. An XOR LFSR has 2^n − 1
  states, and only this reading gives the published periods (29,127 joined,
  261,121 split at n = m = 18). One published 4-stage state ring includes
  0000, which a real LFSR cannot reach. Only its genuine single steps were
  used, to pick the 4-stage taps.
* **Segment sizes for odd N or M.** Segment #1 takes the larger half of both
  the stages and the output bits.
* **Exactly two segments.** The architecture is sometimes described as "two
  or more" segments. All its worked cases use two, and so does this design.
* **Tap masks, output bit selection, zero-seed handling, reset style and the
  `mode` override** are not specified by the source.
* **Single clock with step enable, and vector-wide muxes**, as explained
  above.
* **Published comparisons not reproduced.** A plot of the period for M = 3
  shows the conventional generator near 2^20 − 1 at N = 20. The period formula
  and this RTL give 349,525 there. A claimed gain of "up to 2.5×" is smaller
  than what the formulas give: 3× at N = 18, M = 3, and 9× at N = M = 18. A
  published waveform for N = M = 4 repeats after 7 words. No 4-stage maximal
  LFSR can do that, so it was not used as a reference. FPGA area, clock rate
  and throughput figures are not modelled.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=… failures=…`.
The expected values come from a reference written inside the testbench: a
one-bit Galois step repeated M times. They do not come from the package
functions the RTL uses.

| testbench | what it shows |
|---|---|
| `tb_leap_step` | A^M against repeated single steps: every 4-stage input for leaps 1–4, and random 9- and 18-stage inputs; the 4-stage single steps follow the expected ring |
| `tb_lfsr_segment` | Random `sel`/`en`/reset/seed traffic on a 9-stage segment (leap 9) and a 4-stage segment (leap 3), checked every clock, including the hold and zero-seed cases |
| `tb_seg_ctrl` | Automatic split decision for (18,18), (4,3) and (17,3); `step2` exactly once per 511 and per 3 clocks; behaviour on mode switches |
| `tb_seg_leap_urng` | Full default size. Every word for a whole split period; first repeat after exactly 261,121 words, with 512 steps of segment #2 in the run; joined repeat after exactly 29,127; 20,000 clocks of random mode switches and resets; zero seed. Each mechanism is counted and must occur |
| `tb_period_sweep` | M = 3 for N = 4..20, joined and automatic side by side; every period against the formulas above; N = M = 4 stays joined with period 15 |

Run a testbench with plain Verilator (5.x) from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/lfsr_pkg.sv \
          tb/tb_seg_leap_urng.sv --top-module tb_seg_leap_urng -o sim
./obj_dir/sim
```

The full-size run takes well under a second, and the sweep takes a few
seconds. The RTL also lints cleanly with `verilator --lint-only -Wall`.
Concurrent assertions check that a disabled segment holds its state and that
the divider stays in range.

## Changing the design

* **Other sizes.** Set `N` and `M` on `seg_leap_urng`. Lengths up to 24
  stages are covered by the tap table. Extend `lfsr_pkg::default_taps` (and
  `MAX_N`) for longer registers; any maximal-length mask will do.
* **Other polynomials.** Override `TAPS_N`, `TAPS_1` and `TAPS_2`. The split
  period is only P1 · P2 if both segment masks are maximal. P1 is derived
  from the segment's length, not measured.
* **Fixed mode.** Tie `mode` to a constant. Synthesis then removes the unused
  mux inputs. With `MODE_JOINED` the unused segment networks disappear too.
