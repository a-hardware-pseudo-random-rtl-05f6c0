# Logistic-map PRNG with stochastic-computing arithmetic

This is a pseudo-random number generator built around a chaotic map, the
logistic map x' = r x (1 - x). A digital chaotic map usually needs
multipliers, which cost DSP blocks on an FPGA. Here the products are formed
by **stochastic computing** instead. Each operand becomes a bit stream whose
density of ones equals its value. An AND gate multiplies two such streams,
and a counter turns a stream back into a binary number. Besides the two AND
gates, the whole datapath is LFSRs, comparators, counters and one subtractor.
The generator produces one new 16-bit value x_n every 2^16 - 1 clock cycles:
1.53 kHz at 100 MHz.

Finite precision makes a plain digital logistic map fall into short cycles.
Two perturbations counter this:

* **The control parameter follows the output.** The map is rewritten as
  x' = 4 x (1 - x) - d x (1 - x), with d = 4 - r. In this form every operand
  lies in [0, 1], so each one can be carried by a unipolar stream. After
  each iteration, d is set to x' / 4.
* **The LFSR seeds advance.** Each stochastic number generator (SNG)
  restarts its LFSR from a seed that grows by one per iteration. If x repeats,
  its streams are ordered differently, so the products come out different.

## The map as built

Because d_n = x_n / 4, one iteration computes

    x_{n+1} = (4 - x_n/4) * x_n * (1 - x_n)      (each product by counting)
    d_{n+1} = x_{n+1} / 4

The largest value of this function is about 0.969, at x = 0.5. At x = 0.969
the function gives about 0.11, and everywhere between 0.11 and 0.969 it gives
more. An orbit that enters [0.11, 0.97] therefore stays there. A 2000-value run from
x0 = 0.25 never produced a value below 1/16 and was densest near the top of
the range. This shape comes from the map itself and is not a defect of the
hardware. If you need uniform output, post-process it.

## Datapath

```
          x_n ──┬── NOT ──> SNG_x1 ──┐
                │                    AND (Multiplier 1) ──┬──> Counter 2 ──> <<2 (Shifter 1) ──┐
                └────────> SNG_x  ───┘                    │                                    │
                                                          AND (Multiplier 2) ──> Counter 1 ──> − (Subtractor)
          d_n ───────────> SNG_u  ────────────────────────┘                                    │
                                                                                      x_{n+1} ─┤
          x_n register <──────────────────────────────────────────────────────────────────────┤
          d_n register <── >>2 (Shifter 2) <──────────────────────────────────────────────────┘
```

| module | role |
|---|---|
| `sc_logistic_prng` | top: the datapath above, the x and d registers, the control interface |
| `sng` | stochastic number generator: seed counter, LFSR, comparator (`bit = LFSR < x`) |
| `lfsr` | loadable 16-bit maximal-length Fibonacci LFSR |
| `sc_mul` | stream multiplier (AND) |
| `sc_counter` | de-randomizer: counts the ones of a stream over one period |
| `elm_update` | Shifter 1, Subtractor (saturating) and Shifter 2 |
| `iter_ctrl` | period timer: `period_end` on the last of every 65535 cycles |
| `sc_add`, `sc_sub` | scaled stochastic adder (multiplexer) and subtractor (multiplexer with inverted second input) |
| `prng_pkg` | width and LFSR tap masks |

The PRNG does not use `sc_add` and `sc_sub`. They are the other two basic
stochastic elements. The top instantiates them and brings their pins out
(`sca_*`, `scs_*`), so that they can be used and tested.

## How one iteration is counted, and where the randomness comes from

An iteration spans exactly one LFSR period, 65535 cycles. In that time, each
LFSR visits every nonzero 16-bit value exactly once. The count of a single
stream is therefore exact: SNG_x emits exactly x - 1 ones, whatever its
seed. Only the **products** depend on how the three LFSRs line up:

* Counter 2 counts cycles in which both `LFSR1 < NOT x` and `LFSR2 < x` hold.
  Its expected value is about 65536 x (1 - x). The exact value depends on how
  LFSR1 and LFSR2 are aligned.
* Counter 1 counts the cycles where, in addition, `LFSR3 < d` holds.

This alignment is the only source of variation. For that reason:

* The three LFSRs use different maximal-length polynomials:
  x^16+x^14+x^13+x^11+1 for SNG_x1, x^16+x^15+x^13+x^4+1 for SNG_x, and
  x^16+x^12+x^3+x+1 for SNG_u. With one shared polynomial, the products would
  depend only on the seed differences.
* At every period end, all three seeds advance by one and each LFSR reloads
  from its new seed. The alignment therefore changes from one iteration to
  the next.
* A change of one LSB in x0 changes a single bit of each SNG stream. Whether
  that reaches a count depends on whether the changed bit coincides with a
  one in the other stream. With some seeds the change is lost entirely and
  two trajectories stay identical. The same holds for a change of d0 by a few
  LSBs. `tb_workload_sensitivity` shows one seed set of each kind. With
  seeds 1234h/ACE1h/5A5Ah, x0 = 4000h and x0 = 4001h part after the first
  iteration. With seeds 1111h/2222h/3333h, the same pair never parts.
* Counter 1 counts a subset of the bits Counter 2 counts, so 4·C2 − C1 is
  never negative. It can exceed 1.0 when x is close to 0.5, because
  4 x (1 - x) = 1 there and counting noise can push the result higher. In
  that case x' saturates at FFFFh.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | bit clock (100 MHz in the reference implementation) |
| `rst_n` | in | 1 | synchronous, active low; x = d = 0 |
| `init` | in | 1 | load `x0`, `d0` and the three seeds, clear the counters, start a period |
| `x0`, `d0` | in | 16 | initial x and d as fractions k/65536 (d0 = 0 is the standard start) |
| `seed_x1`, `seed_x`, `seed_u` | in | 16 | initial LFSR seeds (0 is replaced by 1) |
| `x_out`, `d_out` | out | 16 | current x_n and d_n |
| `valid` | out | 1 | one-cycle pulse in the first cycle showing a new `x_out` |

If `init` is high in cycle t, the first period samples cycles t+1 to t+65535.
`valid` is high in cycle t + 65536, together with the new `x_out`. After that
it comes every 65535 cycles. After reset and before the first `init`, the generator runs
from x = 0 and outputs 0. 0 is a fixed point of the map.

Values are 16-bit unsigned fractions k/65536. Counters count over 65535
bits, so a count k also reads as k/65536. The resulting 1/65536 scale
error is ignored. `NOT x_n` (65535 − x) stands for 1 − x.

## Departures and choices

These points are not fixed by the published description:

* **Comparator sense.** The published SNG diagram prints `Y < X`, with the
  LFSR as Y. Its prose says a one is emitted when the LFSR is *greater* than
  x. The RTL follows the diagram, because only then does the stream density
  equal x.
* **Subtractor operands.** The prose swaps the labels of the two counters.
  The RTL follows the block diagram and the equation: Shifter 1 scales
  Counter 2's x(1−x) by 4, and the Subtractor removes Counter 1's d·x(1−x).
* **Two clocks become one.** The improved SNG uses a fast clock for the LFSR
  and a slow one for the seed counter. Here a single clock drives everything,
  and `period_end` serves as a clock enable.
* **Own choices.** The polynomials, the initial seeds, the reload of the LFSR
  from the stepped seed, skipping seed 0, saturation at FFFFh, the `init`/
  `valid` interface, the reset values and a `d0` input are all choices of
  this design. The standard start is d = 0. The `d0` input exists for
  parameter-sensitivity experiments.
* **Which bits form the random output.** How output bits are taken from x_n
  for bit-level statistical tests is not specified. The RTL exposes x_n.
* **Size.** The registers total 177 flip-flops and there is no multiplier.
  The published FPGA implementation reports 445 registers and 373 LUTs,
  which presumably include logic outside this datapath.

## Verification

All testbenches are self-checking and print
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_lfsr` | sequence against a tap-by-tap reference, period 65535 with no repeats, load, zero seed |
| `tb_sng` | every stream bit against a reference LFSR and comparator over three periods, exact one-counts, seed stepping and wrap |
| `tb_sc_mul`, `tb_sc_add`, `tb_sc_sub` | truth tables, the 8-bit worked examples (10100110·01111110 = 00100110; 11111011 + 00100110 with select 10010101 → 10110011), output densities |
| `tb_sc_counter` | count per cycle against a reference, clear, full window without overflow |
| `tb_elm_update` | shifts, subtraction and saturation against integer arithmetic |
| `tb_iter_ctrl` | 65535-cycle period, one-cycle pulse, restart |
| `tb_sc_logistic_prng` | full size: 105 iterations compared exactly with a bit-level reference model (`tb/prng_ref_pkg.sv`); exact valid timing; the d feedback, seed stepping, saturation and re-init each occur |
| `tb_workload_sensitivity` | 100 iterations: x0 4000h vs 4001h and d0 0 vs 8 diverge and decorrelate; determinism |
| `tb_workload_sequence` | 2000 consecutive values: ≥ 90 % distinct (no short cycle), bins 1–15 of 16 all hit, d = x/4, never 0, timing |

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/prng_pkg.sv tb/prng_ref_pkg.sv \
    tb/tb_sc_logistic_prng.sv --top-module tb_sc_logistic_prng -Mdir obj -o sim
./obj/sim
```

For other testbenches, change the last file name and `--top-module`.
`tb/prng_ref_pkg.sv` is needed only by `tb_sng` and `tb_sc_logistic_prng`.
The full-size testbench takes a few seconds. `tb_workload_sequence` takes
about a minute.

Not verified here: the long statistical suites (NIST SP 800-22 on 10^6 bits,
TestU01 Rabbit/Alphabit on 2^20 bits). At 65535 cycles per value they need
about 4·10^9 cycles, which is about 40 s of hardware time but far too long to
simulate.

## Changing it

* `W` (all modules) sets the precision and with it the period, 2^W − 1
  cycles per value. The tap masks must then be maximal-length polynomials for
  the new width. The defaults in `prng_pkg` are 16-bit only.
* `TAPS_X1`, `TAPS_X` and `TAPS_U` on the top select the three polynomials.
  Keep them distinct.
