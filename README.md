# Carry-save Bresenham fractional clock divider

A fractional clock divider produces `f_out = (P/Q) * f_in` from a reference
clock `f_in`, for any integers `P < Q`. The classic way to do this is the
Bresenham algorithm. An accumulator `e` advances by `p` every input cycle, or
by `p - q` when a *modulo event* fires. The events fall as evenly as the input
clock allows: `p` events in every `q` cycles, with no long-term phase drift.
For clock division, `p = 2P` and `q = Q`, because each output period needs two
edges, so each event toggles the output.

The weak point of the textbook circuit is the binary adder. Its carry chain,
plus the comparison that finds the modulo event, makes the critical path grow
with the accumulator width. This design removes the carry chain completely:

* `e` is held in **carry-save form**, as a pseudo-sum `e_s` plus a pseudo-carry
  `e_c`. One 3:2 carry-save adder forms the next `e` with one full-adder delay.
* The modulo event comes from a **soft threshold**. It looks only at the two
  MSBs of `e_s` and `e_c`, never at the full value of `e`.

The critical path is therefore constant, whatever the width. The only
signal that gets harder to drive as the width grows is the select line of the
`p` / `p-q` multiplexer. The price is that the event pattern is no longer
guaranteed to be the optimal Bresenham pattern. In practice it matches that
pattern for most fractions, and the ratio `p/q` is always exact (see
"Cycles and output quality").

## The accumulator step

Every rising edge of `clk`:

```
mod_evt = (t == 0) ? (e_s[N-1] | e_c[N-1])    // one MSB set
                   : (e_s[N-1] & e_c[N-1])    // both MSBs set
d       = mod_evt ? (p - q) : p               // p - q in two's complement
e_s'    = e_s ^ e_c ^ d
e_c'    = majority(e_s, e_c, d) << 1          // carry out of the MSB dropped
clk_out' = clk_out ^ mod_evt
```

The value of `e` is the plain integer sum `e_s + e_c`, taken without any
modulo. For example, `e_s = 2^N-1` with `e_c = 1` means `2^N`, not 0. Each bit
position therefore holds one digit from {0, 1, 2}. The two encodings of the
digit 1 (`e_s` bit set, or `e_c` bit set) behave identically from then on. Bit 0
of `e_c` is always 0, because nothing carries into the adder.

Dropping the MSB carry is a modulo-`2^N` reduction. The arithmetic stays
consistent with the arithmetic modulo `q` only if that reduction happens
exactly when it should:

1. adding `p` must never carry out of the MSB, and
2. adding `p - q` (a subtraction) must always carry out of the MSB.

The two soft-threshold rules are the two border cases that guarantee this.
If both MSBs are set, adding `p` would carry out, so the event must fire; both
rules fire. If neither MSB is set, adding `p - q` would not carry out, so the
event must not fire; neither rule fires. Given the width rule below, the
divider then tracks the exact integer recurrence `e' = e + p` or
`e' = e + p - q` from any start state.

## Choosing the width n and the option t

An `n`-bit setting is safe when

```
t = 0:  n >= max{ ld(p+1),     1 + ld(q-p) }
t = 1:  n >= max{ 1 + ld(p+1), 1 + ld(q-p) }        (ld = ceil(log2))
```

These conditions mean that `p - q` fits in `n`-bit two's complement, that `p`
fits in `n` unsigned bits (for `t = 1` with its MSB clear), and that the range
`e` travels through fits the carry-save register. `csdiv_pkg::min_width(p, q, t)`
computes this minimum, written `n_min` below. After it has settled, `e` stays
in the *cyclic range*:

```
t = 0:  [2^(n-1) + p - q,  2(2^(n-1) - 1) - 1 + p]
t = 1:  [2^n + p - q,      2^n + 2^(n-1) - 3 + p]
```

The hardware has a fixed width `N` (default 16). An `n`-bit setting with
`n <= N` runs unchanged by shifting `p`, `p - q` and the initial `e` left by
`N - n` bits. The low bits then stay zero and take no part in the
arithmetic.

**Example.** For `P/Q = 2/7`, use `p = 4` and `q = 7`. With `t = 1`,
`n_min = 4`. The shift is 12, so write `cfg_p = 16'h4000`,
`cfg_pmq = 16'hD000` (that is, -3 in 4 bits, shifted), `cfg_t = 1`,
`cfg_init_s = 16'hF000` and `cfg_init_c = 0`. `clk_out` then has 2 periods per
7 input cycles.

## Cycles and output quality

Because of the redundant encoding, which events fire depends on the encoding
of `e`, not just on its value. So the sequence of states is not fixed in
advance by `p`, `q` and `t` alone. It also depends on the initial state.

Some facts do hold in every case:

* Every run ends in a cycle.
* The period of that cycle is a multiple of `q`.
* The cycle contains exactly `p` events per `q` cycles, so the average output
  frequency is exact.

What can vary is how evenly the events are spread. Quality is measured as the
mean squared distance of the event times from the ideal times `i*q/p`, after
choosing the best constant phase. For a reduced fraction, the classic
Bresenham divider reaches `(1 - 1/p^2)/12`, and no pattern does better.

The observed behaviour of this divider is as follows. These are simulation
results, not proofs. The testbenches reproduce each of them on the RTL for all
5021 reduced fractions with `q <= 128`. They start from every state of one
residue class modulo `q`, and every cycle passes through that class.

* At `n = n_min`, for either `t`, there is exactly one cycle and its period is
  `q`. No particular initial value is needed, because any start state settles
  into it.
* At `n = n_min + 1`, a setting may have several cycles, or a cycle longer
  than `q`. Examples: `(p,q;n,t) = (2,3;4,1)` has two cycles, one through
  digits `1210` and one through `2101`. `(2,5;4,t)` has a single cycle of
  period `2q`.
* `(4,7;4,1)` has a single cycle. It passes through the digits `2011` and gives
  exactly the Bresenham pattern.
* Some fractions fall short of Bresenham quality. `6/13` misses it in all four
  settings (`n in {n_min, n_min+1}`, `t in {0,1}`). `6/17` reaches it at
  `n_min + 1` but not at `n_min`.
* 4742 of the 5021 fractions (94 %) reach Bresenham quality in at least one of
  the four settings.
* No setting wins everywhere. For every pair of the four settings, some
  fraction favours each of the two.
* `n_min` is usually the better choice. For 4947 of the 5021 fractions, the
  best of `n_min` (over `t`) is at least as good as the best of `n_min + 1`.
  The first exception, in order of `q`, is `6/17`.

If you want to select a particular cycle at `n_min + 1`, use the loadable
initial value (`cfg_init_s`, `cfg_init_c`).

## Hardware structure

```
cfg_* ──► cfg_regs ──p, p-q──► operand_mux ──d──► cs_adder ──► cs_register ──e_s,e_c──┐
              │ t                  ▲ mod_evt                       ▲ init (cfg_load)   │
              └──────────► soft_threshold ◄────────────────────────┴───────────────────┘
                                   │ mod_evt
                                   └──► toggle_out ──► clk_out
```

| file | role |
| --- | --- |
| `rtl/csdiv_pkg.sv` | threshold enum `thr_e`, `DEFAULT_WIDTH`, `min_width()` |
| `rtl/cfg_regs.sv` | registers for `p`, `p - q` and `t`, written by one strobe |
| `rtl/cs_register.sv` | `e_s` / `e_c` registers, loadable with an initial value |
| `rtl/soft_threshold.sv` | modulo event from the two MSBs |
| `rtl/operand_mux.sv` | `p` / `p - q` select |
| `rtl/cs_adder.sv` | 3:2 carry-save adder, reports the dropped MSB carry |
| `rtl/toggle_out.sv` | output flip-flop, toggles on each event |
| `rtl/cs_clock_divider.sv` | top level |

Ports of `cs_clock_divider #(N = 16)`:

| port | dir | width | meaning |
| --- | --- | --- | --- |
| `clk`, `rst_n` | in | 1 | reference clock, asynchronous active-low reset |
| `cfg_load` | in | 1 | one-cycle strobe that writes the configuration, loads `e`, and clears `clk_out` |
| `cfg_p`, `cfg_pmq` | in | N | `p` and `p - q` (two's complement), both shifted to the N-bit field |
| `cfg_t` | in | 1 | threshold option |
| `cfg_init_s`, `cfg_init_c` | in | N | initial pseudo-sum and pseudo-carry, shifted |
| `clk_out` | out | 1 | divided clock |
| `mod_evt` | out | 1 | modulo event (output edge strobe) for the current state |
| `e_s`, `e_c` | out | N | accumulator state |
| `wrap_err` | out | 1 | the current addition breaks rule 1 or 2 above (width too small) |

Timing:

* All state is clocked on the rising edge of `clk`.
* `mod_evt` and `wrap_err` are combinational from the registers.
* `clk_out` changes on the edge that ends a cycle in which `mod_evt` is high.
* A configuration written with `cfg_load` takes effect at that same edge. The
  next cycle already steps with the new values.
* After reset, every register is zero and the divider is idle: `e = 0`,
  `p = 0`, and no events fire.

The synthesized top has 66 flip-flops at `N = 16`: `2N` for `e`, `2N + 1` for
the configuration, and 1 for the output.

## Design choices beyond the algorithm

The datapath is the algorithm above and nothing more. The following parts were
chosen for this implementation:

* The default width `N = 16`. This is enough for every fraction with
  `q <= 4096` at either `n_min` or `n_min + 1`, both of which need at most 14
  bits.
* The configuration port: one strobe writes `p`, `p - q` and `t`. Software
  computes `p - q` and the shift.
* The loadable initial value, the all-zero reset state, and the clearing of
  `clk_out` on reconfiguration.
* The `wrap_err` diagnostic. `cs_adder` brings out the dropped MSB carry only
  to support it.
* Reading `ld` as the ceiling of `log2`, and the mapping `t = 0` → one MSB,
  `t = 1` → both MSBs. Both readings reproduce all the example settings listed
  above.

Two things are deliberately not included. The binary Bresenham divider serves
only as the quality reference, and exists here only as a formula in the
testbenches. No synthesis or timing results are reproduced.

## Simulation

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`,
and it has a watchdog. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/csdiv_pkg.sv tb/cs_clock_divider_tb.sv \
          --top-module cs_clock_divider_tb
./obj_dir/Vcs_clock_divider_tb
```

* `tb/cs_clock_divider_tb.sv` runs the top at its default width. Every cycle it
  checks the threshold rule, the exact integer step, `wrap_err` and the output
  toggle, using its own arithmetic. It finds each cycle the divider settles
  into, checks the cycle's period, its event count, and that it stays inside
  the cyclic range, and compares its quality with the Bresenham formula. It
  covers the example settings above. It forces `wrap_err` with a width that is
  too small. It also runs a full-width division `2000/30303`, and checks the
  drift-free balance `events*q = cycles*p - (e_end - e_start)`. Each mechanism
  must occur at least once.
* `tb/csdiv_sweep_tb.sv` runs every reduced fraction with `q <= QMAX`
  (default 128, about a minute) in all four settings, from every state of the residue class of `2^n - 1`.
  It checks the observations listed in "Cycles and output quality". Raise
  `QMAX` for a wider sweep. The run time grows roughly with `QMAX^3.5`.
* `tb/<block>_tb.sv` are unit tests for each module. For example, the adder
  test checks `s_out + c_out + cout*2^N == s_in + c_in + d`, and that each sum
  bit is the parity of its own input bits.

To use a different width, override `N` on `cs_clock_divider` (with `N >= 2`),
and change `DEFAULT_WIDTH` in `csdiv_pkg` if you want the testbenches to follow.
