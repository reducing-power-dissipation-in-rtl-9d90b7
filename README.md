# Low-power pipelined phase accumulator

A direct digital frequency synthesiser (DDFS) adds a frequency word `A` to an
N-bit phase register on every clock. The top M bits of that register address
a waveform table, and a DAC turns the table's output into a sine wave of
frequency `f_out = A * F_clk / 2^N`. Fine frequency resolution needs a wide
register: about 50 bits for micro-hertz steps at 1 GS/s. A high output
frequency needs a GHz clock. A 50-bit carry chain does not settle in 1 ns, so
the adder has to be pipelined. A fully bit-pipelined (systolic) accumulator
needs about N² flip-flops, and those flip-flops draw most of its power.

This RTL is such an accumulator, built to spend less power in three ways:

1. **Radix-2^K digits.** The carry ripples through K bits in one cycle
   before it is stored. This gives D = N/K pipeline stages instead of N. The
   latency and the flip-flop count shrink by about a factor of K.
2. **Gated increment rows.** The flip-flops that hold and skew the
   increment change only when a new frequency word is loaded. Their clocks
   are gated off the rest of the time.
3. **Individually gated output flip-flops.** Each flip-flop that
   re-aligns the output is clocked only in cycles where its input differs
   from its state.

It also keeps only the M bits of the phase word. The re-alignment flip-flops
for the N-M low bits are not built at all.

The defaults are N = 32, M = 16 and K = 8: a 32-bit accumulator with a 16-bit
phase word, built from 8-bit (radix-256) digit adders in 4 stages. Any N
that is a multiple of K works, with 0 < M ≤ N. K = 1 gives the classic
systolic accumulator.

## How the pipeline is arranged

Split the N bits into D digits of K bits. Digit column `d` has three parts:

* a K-bit sum register `sum_q[d]`;
* a radix-2^K adder (`pa_digit_adder`) that adds the increment digit and the
  stored carry to that register;
* a carry flip-flop `carry[d+1]` that passes the carry to column `d+1`.
  The top column has none: its carry-out is dropped, so the accumulator
  wraps modulo 2^N.

Column `d+1` uses a carry that column `d` produced one cycle earlier. So
column `d` always runs `d` cycles behind column 0. Two triangles of
flip-flops make this consistent:

```
            row 0:  A register        [d3 d2 d1 d0]   clocked when load
 increment  row 1:  skew              [d3 d2 d1]      clocked when f[1]
 skew       row 2:                    [d3 d2]         clocked when f[2]
 (upper)    row 3:                    [d3]            clocked when f[3]
                     column d takes digit d from row d
 columns:           sum/adder/carry   col0 -> col1 -> col2 -> col3
 output             digit d delayed by D-1-d cycles, top M bits only,
 deskew (lower)     each flip-flop individually clock gated
```

* **Increment skew (`pa_increment_skew`).** Row 0 is the register that
  holds `A`. Row `s` holds digits `s..D-1`, one cycle later than row `s-1`.
  Column `d` reads its digit from row `d`, so each column adds the new
  increment in the same accumulation step.
* **Output deskew (`pa_output_deskew`).** Bit `b` of digit `d = b/K` is
  delayed by `D-1-d` cycles, so all bits of `phase` belong to the same
  step. Only bits `N-M .. N-1` get delay chains.

Flip-flop count, not counting the strobe delay line described below:

| part | flip-flops |
|---|---|
| increment register | N |
| skew rows | K·D(D-1)/2 |
| column sums | N |
| carries | D-1 |
| deskew | Σ over kept bits of (D-1-digit) |

Without truncation this totals `N + (D-1) + N·D`. With N = 8 that is
79 flip-flops for K = 1 and 43 for K = 2. For K = 1, truncating to M bits
removes `(N+M-1)(N-M)/2` flip-flops: 22 for N = 8, M = 4. The default
configuration synthesises to 126 flip-flops: 163 − 40 (truncation) + 3
(strobe delay line).

## Clock gating

Both gating schemes use one cell, `pa_clock_gate`:

```
gclk = ~(en & ~clk)      // = ~en | clk
```

While `en = 0` the gated clock stays high and produces no rising edge.
While `en = 1` it follows `clk`. The enable is launched from a rising edge
and changes during the high phase, when `gclk` is held at 1. This is why
the NAND with the inverted clock is used: a plain AND of `en` and `clk`
would make a false rising edge there. The rule for every enable is that it
must come from rising-edge logic and settle before the falling edge of
`clk`. The same rule holds for `load` and `inc` driven from outside.

* **Increment rows.** A 1-bit delay line `f[1..D-1]` runs on the free
  clock and carries the `load` strobe down the triangle. Row 0 is gated by
  `load`, and row `s` by `f[s]`, which is `load` delayed by `s` cycles. A
  row is clocked exactly once per loaded increment. A new load may follow
  the previous one on any cycle, including back to back.
* **Deskew flip-flops.** `pa_gated_dff` gates its own clock with
  `d ^ q`. It behaves exactly like a plain D flip-flop, but gets no edge
  while its value would not change. With a small increment, the upper
  digits of the sum change rarely, so most of those edges are saved.

The column sum and carry registers run on the free clock: they change
almost every cycle.

All flip-flops have an asynchronous active-low reset `rst_n` to 0. It is
asynchronous so that flip-flops whose clock is gated off are still
initialised.

## Interface and timing of `pa_accumulator`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `load` | in | 1 | a new frequency word is on `inc` |
| `inc` | in | N | frequency word (increment) |
| `phase` | out | M | top M bits of the accumulated phase |
| `busy` | out | 1 | a loaded word is still moving through the skew rows (includes `load` itself) |

Drive `load` and `inc` from the rising edge of `clk`. Say the edge that
samples `load = 1` is edge 0. The increment register takes `inc` there,
and column 0 starts adding it at edge 1.

Let `S(e) = S(e-1) + A(e-1)` be the plain, unpipelined running sum, where
`A(e-1)` is the register's value just before edge `e`. Then after edge `e`,
`phase` equals the top M bits of `S(e-D+1)`. The first sum that includes a
new word appears D+1 edges after the edge that samples `load`. That is D
edges after the increment register takes it: 4 for the defaults, 32 for a
systolic 32-bit accumulator. The waveform table that `phase` would address,
the DAC and the filter are not part of this RTL.

The critical path is one flip-flop, a K-bit lookahead adder and a set-up
time. Choose K as the largest value that still meets the clock period; at
about 1 ns in a 90 nm process, that is K = 8.

## Files

| file | contents |
|---|---|
| `rtl/pa_accumulator.sv` | top: digit columns, carry registers, both triangles |
| `rtl/pa_increment_skew.sv` | increment register, skew rows, strobe delay line, row clock gates |
| `rtl/pa_output_deskew.sv` | output alignment chains for the kept M bits |
| `rtl/pa_gated_dff.sv` | flip-flop with XOR enable and its own clock gate |
| `rtl/pa_clock_gate.sv` | NAND clock gate |
| `rtl/pa_digit_adder.sv` | K-bit adder with two-level carry lookahead |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_gate_rule_check.sv` | assertion, bound to every clock gate: enable constant through the low phase |
| `tb/tb_acc_harness.sv` | parameterised checker for one accumulator configuration |
| `tb/tb_pa_workloads.sv` | 26 configurations run side by side (see below) |

## Verification

Every testbench checks against values computed separately from the design.
Each prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb_pa_accumulator` runs the default configuration, with no parameter
  overrides, for 20,000 cycles. It uses rare loads, bursts of back-to-back
  loads, and small and mid-sized powers of two. Every cycle it compares
  `phase` with a reference model of `S(e-D+1)`. It checks the D+1 latency.
  It also fails unless each of these happened at least once: a load, a load
  while the previous word was still in the skew rows, a cycle with the
  skew-row clocks gated off, a stored carry, a wrap-around, and a skipped
  clock edge at an individually gated flip-flop. A checker bound to every
  `pa_clock_gate` asserts the timing rule of the gate: no enable may change
  while `clk` is low.
* `tb_pa_workloads` runs the same checks, through `tb_acc_harness`, on 26
  configurations:
  * 16-, 24- and 32-bit accumulators with M = 16 and K = 1, 2, 4 and 8;
  * systolic accumulators of 8 to 30 bits with M = N/2, where the word
    changes every 1000 cycles;
  * a 16-bit systolic accumulator with M = 8, fed increments `2^k` for
    k = 0 and 8..14;
  * 8-bit examples;
  * DDFS sizes of 50 bits (M = 18) and 52 bits (M = 14).
* The module testbenches check:
  * the gate's levels and edges;
  * that the gated flip-flop is clocked exactly when `d != q`;
  * the adder, exhaustively for K = 1, 4 and 8;
  * that skew row `s` gets exactly one clock edge, `s` cycles after each
    load;
  * the deskew alignment with truncation inside a digit.

Simulating with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_pa_accumulator.sv \
    --top-module tb_pa_accumulator -o sim
./obj_dir/sim
```

Use `tb_pa_workloads.sv` (with `--top-module tb_pa_workloads`) for the
configuration sweep. Every simulation finishes in well under a second.

## Where this departs from, or adds to, the scheme it implements

* **Power is not modelled.** The power gains are the point of the
  architecture, but an RTL simulation cannot measure them. The testbenches
  only show that the clocks are in fact gated off.
* **The adder is a flat lookahead.** Each carry is a two-level sum of
  products of generate and propagate terms. No particular lookahead tree is
  prescribed, and a synthesis tool may restructure it.
* **Row 0 is gated too.** The increment register is gated by `load`
  through the same cell as the skew rows, so there are D gated rows, not D-1.
* **`busy` is an addition.**
* **Only the deskew flip-flops are gated individually.** The sum and carry
  registers are not.
* **The gated clocks are ordinary logic.** In a standard-cell flow, map
  `pa_clock_gate` onto a NAND2 fed by the inverted clock from the clock
  tree, and make sure timing closure treats the gated nets as clocks. An
  integrated clock-gating cell with a latch is a safe alternative, but it is
  not what is written here.
