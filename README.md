# Two-segment Fibonacci LFSR random-number generator

An n-bit linear-feedback shift register (LFSR) runs through 2^n - 1 states
and then repeats them in the same order. This generator splits the n
flip-flops into two independent Fibonacci LFSRs and chains them the way the
digits of an odometer are chained:

- **Segment 1** (N1 flip-flops) steps on every clock edge.
- **Segment 2** (N2 flip-flops) steps only once segment 1 has been through its
  whole period, i.e. once every P1 = 2^N1 - 1 clocks.

The random number is the two registers side by side, `{segment 1, segment 2}`.
This gives a different order of numbers from a single LFSR of the same width.
The period is P1 · P2 = (2^N1 - 1)(2^N2 - 1), a little shorter than the
2^(N1+N2) - 1 of a single register. The gap closes quickly as the width grows.

The hardware is small: two shift registers with an XOR feedback each, and a
modulo-P1 counter (the *clock controller*) that decides when segment 2 moves.
It needs N1 + N2 flip-flops in the segments and N1 more in the counter.

## Files

| file | contents |
|---|---|
| `rtl/lfsr_pkg.sv` | feedback polynomials by width, `lfsr_period()` |
| `rtl/fib_lfsr_segment.sv` | one N-bit Fibonacci LFSR with seed load and step enable |
| `rtl/clock_controller.sv` | modulo-(2^N1 - 1) counter that paces segment 2 |
| `rtl/two_segment_lfsr.sv` | top: both segments plus the controller |
| `tb/tb_fib_lfsr_segment.sv` | segment sequences, hold, clear, periods of widths 2..24 |
| `tb/tb_clock_controller.sv` | step spacing for P1 = 3, 7, 15, restart after clear |
| `tb/tb_two_segment_lfsr.sv` | exact sequences of the 2:4, 3:3 and 4:4 generators, with mechanism counts |
| `tb/tb_two_segment_periods.sv` | periods of nine splits from 6 to 18 bits, plus partial runs of 16:16 and 32:32 |
| `tb/tb_two_segment_lfsr_full.sv` | default 4:4 generator through one full period of 225 numbers |

## One segment

A segment is a chain of D flip-flops D1 … DN. On each step every flip-flop
takes the value of its predecessor, and D1 takes the XOR of the *tapped*
flip-flops. For a polynomial X^N + X^k + … + 1, the term X^k taps Dk. Some
examples:

| width | polynomial | D1 is loaded with |
|---|---|---|
| 2 | X^2 + X + 1 | D2 ^ D1 |
| 3 | X^3 + X^2 + 1 | D3 ^ D2 |
| 4 | X^4 + X^3 + 1 | D4 ^ D3 |
| 5 | X^5 + X^3 + 1 | D5 ^ D3 |

In the RTL, `q[0]` is D1 and `q[N-1]` is DN. The register therefore shifts
towards its MSB, and the feedback enters at bit 0:

    q <= {q[N-2:0], ^(q & TAPS)};

With a primitive polynomial the register visits every non-zero state once per
period. It can never reach zero from a non-zero seed, and a zero seed would
lock it at zero. The segment rejects a zero seed at elaboration, and it
asserts at run time that the register never becomes zero.

`lfsr_pkg::fib_taps(n)` holds polynomials for widths 2–32 and 64:

- **2–8, 18 and 19 bits:** the polynomials the generator was specified with.
- **All other widths:** taken from the widely published table of
  maximal-length polynomials. That list was needed because the 9:9, 16:16 and
  32:32 splits use segment widths the specification gives no polynomial for.

Every entry is a primitive polynomial. Widths 2–24 are also simulated for
their full 2^n - 1 period. The 25–32 and 64-bit entries have not been
simulated through a period.

## The clock controller and the timing

Segment 2 has to move exactly when segment 1 finishes a period. The
controller is a counter of N1 bits that counts 0, 1, …, P1 - 1 and then wraps
to 0. While it holds P1 - 1, it raises `seg2_step`. On that edge segment 2
steps and the counter wraps. After `clear`, segment 2 therefore first moves
on edge P1. On that same edge segment 1 returns to its seed. Segment 2 then
moves again on edges 2·P1, 3·P1, and so on.

The original scheme describes this as a second, slower clock, "Clock 2",
driving segment 2. This RTL keeps one clock domain and uses `seg2_step` as a
clock enable of segment 2. The sequence of states is the same, and there is
no derived clock to constrain or skew.

Here is the 2:4 generator from seed 17 (segment 1 = `01`, segment 2 = `0001`),
as the RTL produces it:

| edge | seg 1 | seg 2 | number | segment 2 |
|---|---|---|---|---|
| 0 (after clear) | 01 | 0001 | 17 | seed |
| 1 | 11 | 0001 | 49 | holds |
| 2 | 10 | 0001 | 33 | holds |
| 3 | 01 | 0010 | 18 | steps |
| 4 | 11 | 0010 | 50 | holds |
| 5 | 10 | 0010 | 34 | holds |
| 6 | 01 | 0100 | 20 | steps |
| 7 | 11 | 0100 | 52 | holds |

The full 45-number cycle is 17, 49, 33, 18, 50, 34, 20, 52, 36, 25, 57, 41, …,
24, 56, 40, and then 17 again. `tb_two_segment_lfsr` checks all 45 numbers.

## Period and the numbers it cannot produce

The two segments come back to their seeds together only after P1 · P2 edges,
so the output repeats with that period. The simulated periods are:

| split | bits | period (2^N1-1)(2^N2-1) | single n-bit LFSR | ratio |
|---|---|---|---|---|
| 2:4, 4:2 | 6 | 45 | 63 | 71.4 % |
| 3:3 | 6 | 49 | 63 | 77.8 % |
| 2:6, 6:2 | 8 | 189 | 255 | 74.1 % |
| 3:5, 5:3 | 8 | 217 | 255 | 85.1 % |
| 4:4 | 8 | 225 | 255 | 88.2 % |
| 9:9 | 18 | 261,121 | 262,143 | 99.6 % |
| 16:16 | 32 | ≈ 4.2948 × 10^9 | ≈ 4.2950 × 10^9 | 99.997 % |
| 32:32 | 64 | ≈ 1.844674406 × 10^19 | ≈ 1.844674407 × 10^19 | ≈ 100 % |

For a given total width, an even split gives the longest period.

Both segments are always non-zero, so any value in which either half is
all-zero never appears. For the 4:4 generator that excludes 0, the 15 values
`0000xxxx` and the 15 values `xxxx0000`. One period holds the other
256 - 31 = 225 values, each exactly once. For example, `00010000` and
`00000010` cannot occur. Every output has at least two flip-flops at 1.

## Interface of `two_segment_lfsr`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; one new number after every rising edge |
| `clear` | in | 1 | synchronous, active high: loads both seeds, counter to 0 |
| `lfsr_out` | out | N1 | segment 1 |
| `lfsr_out1` | out | N2 | segment 2 |
| `lfsr_out12` | out | N1+N2 | random number `{lfsr_out, lfsr_out1}` |

| parameter | default | meaning |
|---|---|---|
| `N1` | 4 | flip-flops in segment 1 (also the counter width) |
| `N2` | 4 | flip-flops in segment 2 |
| `SEED1` | 1 | seed of segment 1, non-zero |
| `SEED2` | 1 | seed of segment 2, non-zero |

The defaults are the 4:4 8-bit generator that starts at 17 (`0001 0001`).
That is the configuration that was simulated and run on an FPGA board in the
original work. Any split whose two widths both have a polynomial in
`lfsr_pkg` can be built. With equal widths, the natural choice is the same
seed for both segments. With unequal widths each segment needs its own seed,
which is why there are two seed parameters.

The outputs come straight from the flip-flops. There is no combinational path
from `clear` to the outputs.

## Verification

All testbenches are self-checking. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`.

- **Exact sequences.**
  - The 6-bit segment with seed 32 produces the 63-number sequence of a
    single 6-bit LFSR: 32, 1, 2, 4, 8, 16, 33, 3, …
  - The 2:4 generator produces the 45-number cycle above.
  - The 3:3 generator produces its 49-number cycle 9, 17, 41, 25, 57, 49, 33,
    10, …
  - The 4:4 generator matches an independent model written in the testbench,
    over two periods and after a mid-run clear.
- **Timing.**
  - Segment 2 moves on exactly every P1-th edge and nowhere else.
  - The controller's step pulse falls on edges P1, 2·P1, … after a clear.
  - The 4:4 output returns to 17 first on edge 225.
- **Periods.** The nine splits from 2:4 to 9:9 reach the periods in the table
  above. The 4:4 generator gives 225 distinct numbers in one period. The
  16:16 split's segment 1 completes its 65,535-state period, and segment 2
  makes its first step on that same edge. The full periods of 16:16 and
  32:32 are far too long to simulate.
- **Mechanisms.** The end-to-end test counts:
  - segment-2 steps and holds;
  - segment-1 wraps;
  - whole-output wraps;
  - clears.

  If any of these never happened, the test fails.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/lfsr_pkg.sv tb/tb_two_segment_lfsr.sv --top-module tb_two_segment_lfsr
    ./obj_dir/Vtb_two_segment_lfsr

Substitute any other testbench name. The slowest one is
`tb_fib_lfsr_segment`: its 24-bit register runs 16.8 million cycles, which
takes about 10 s.

## Departures and choices

These points are this design's own, not part of the original scheme:

- **One clock domain.** Segment 2 is paced by a clock enable rather than by a
  divided clock, as described above. The states are the same.
- **`clear`.** It is synchronous and active high, and it loads the seeds and
  zeroes the counter. The original simulation shows a `clear` input but does
  not describe it.
- **Bit order.** D1 (the flip-flop fed by the XOR) is the least significant
  bit of each segment. Segment 1 forms the upper half of the number. This is
  the order that reproduces the published example sequences.
- **Extra polynomials.** The polynomials for widths 9–17, 20–32 and 64 were
  added from the standard table, as described above.
- **No board wrapper.** The generator was demonstrated on a BASYS 2
  (Spartan-3) board, with the number shown on its LEDs. No pin mapping or
  display-clock divider is given for that demonstration, so none is provided
  here. The top brings its outputs out as plain ports.
- **Area and speed not reproduced.** The reported FPGA results for the 4:4
  generator are 8 slices at about 331 MHz. They depend on the vendor flow and
  have not been reproduced here.
