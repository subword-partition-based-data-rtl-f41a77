# Subword-partitioned data-driven clock gating, with a transposed FIR filter

Signal-processing datapaths often carry words that are much smaller than the
bus they travel on: a quiet or narrowband signal in a 16-bit register may only
ever use its lowest few bits, while the upper bits repeat the sign. Every clock
edge still reaches those upper flip-flops, and the multipliers and adders
behind them see their inputs toggle whenever the sign flips.

This design splits a two's-complement register into a sign bit and several
equal *subwords* and gives every subword except the lowest its own clock
enable. A subword is clocked only when it carries information, meaning its bits
are not all copies of the sign. The enables are computed from the word arriving
at the register, in the same cycle that word is loaded, so no cycle of latency
is added. The register is used as the input register of a transposed-form FIR
filter. There, one register and one set of enable logic serve every tap
multiplier.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable apart from the
testbenches. It has no vendor primitives.

## The subword view of a word

A `W`-bit word (`W = n+1`) is a sign bit `b[W-1]` plus `P` subwords of
`M = (W-1)/P` bits. Subword 0 holds the least significant bits and subword
`P-1` the most significant magnitude bits:

```
 bit:   15 | 14 ........ 10 | 9 ......... 5 | 4 ......... 0      (W=16, P=3, M=5)
        s  |   subword 2    |   subword 1   |   subword 0
```

`W-1` must divide evenly by `P`; elaboration stops with an error otherwise.
The default is `W = 16`, `P = 3`, `M = 5`. Words in `[-32, 31]` need only
subword 0. Words in `[-1024, 1023]` need subwords 0 and 1.

## Enable generation (the core of the scheme)

A subword has **no information** (NOI) when all its bits equal the sign bit
*and* every more significant subword has no information either. Its clock
enable is the inverse, `EN_i = !NOI_i`. `sw_enable_gen` builds this enable for
one subword from four terms ORed together:

| term | meaning |
|---|---|
| `OR(subword) AND NOT sign` | positive word with a 1 in this subword |
| `NAND(subword) AND sign` | negative word with a 0 in this subword |
| `sign XOR sign_prev` | the word changed sign since the last clock |
| `en_above` | the next higher subword is enabled |

`sign_prev` is a flip-flop inside the generator that samples the incoming sign
on every clock. The `en_above` input chains the generators from subword `P-1`
(whose `en_above` is 0) down to subword 1. So once a subword has to load, every
subword below it loads too. This keeps the stored word consistent: a higher
subword never holds new data above stale lower data.

Why the sign-change term is there: take a small positive word followed by a
small negative one. Neither has information in subword 2, but the stored
`00000` must become `11111` if the flip-flops are read directly. The XOR term
forces every subword to load on the cycle the sign flips. With the output
correction described next, `q` would be right without this term. The term is
kept as published, and it costs one flip-flop and one XOR per generator.

Subword 0 has no generator. It changes for almost any non-zero signal, so
gating it would cost more than it saves. The sign bit is also loaded every
cycle.

### Keeping the register output exact

A gated subword keeps whatever bits it last stored. Its true value is a copy of
the sign, but the stored bits may be left over from an earlier, larger word of
the same sign. For example, after `+700` (subword 1 = `10101`) comes `+3`:
subword 1 is not clocked and still holds `10101`. Reading the flip-flops
directly would give `+675`.

`sw_cg_register` therefore keeps one more flip-flop per gated subword. It
records whether that subword loaded on the last clock, and the output
multiplexer drives the sign bit in place of the stored bits of a subword that
did not. The output `q` is always exactly the previous input word. The cost is
`P-1` flag flip-flops and one 2:1 multiplexer per gated bit. The upper bits of
`q` toggle only when the sign changes. This output correction is this design's
addition; the scheme as published does not say how stale subwords are kept
out of the datapath.

At the defaults the gated register has `2*(P-1) = 4` more flip-flops than a
plain 16-bit register: two sign copies in the generators and two flags.

## Two ways to gate the clock

The parameter `GATE` (type `sw_gate_e` from `sw_cg_pkg`) chooses how the
enable reaches the flip-flops:

* `SW_GATE_ENABLE` (default): each subword is an ordinary register with a load
  condition, all on the one clock. ASIC synthesis turns this into clock-gating
  cells and FPGA synthesis into clock-enable pins. Static timing stays in a
  single clock domain.
* `SW_GATE_ICG`: each gated subword gets a `sw_clock_gate` cell. The cell has
  a latch that is transparent while `clk` is low, followed by an AND with
  `clk`, so the gated clock cannot glitch if the enable changes while the
  clock is high. The cell is held open while reset is asserted so that gated
  subwords clear too. This build contains latches and derived clocks by intent.

Both builds behave the same at their ports, and the testbenches run them side
by side.

## Transposed FIR filter

`sw_fir_transposed` computes `y[n] = sum_k coef[k] * x[n-k]` in transposed
form:

```
 x ──► [sw_cg_register] ──► x_q   (one word, sent to every multiplier)

 x_q*coef[N-1] ─► [D] ─► (+ x_q*coef[N-2]) ─► [D] ─► ... ─► (+ x_q*coef[0]) ─► [D] ─► y_full, y
```

The gated input register feeds every multiplier. One enable generator chain
therefore covers all `N_TAPS` multipliers, and when the input is small the
upper multiplier input bits stay still. The adder chain has a register between
adders. The multiplier nearest the output uses `coef[0]`.

* Sum registers are `ACC_W = W + COEF_W + clog2(N_TAPS)` bits wide (35 at the
  defaults), so no partial sum can overflow.
* `y_full` is the full sum. `y` is `y_full >> (COEF_W-1)` cut to `Y_W` bits.
  With Q1.15 coefficients and unit gain, `y` is on the same scale as `x`. `y`
  wraps if the filter gain exceeds one.
* Timing: one sample per clock. A sample presented before rising edge `t` is
  reflected in `y`/`y_full` after edge `t+1`, a latency of 2 cycles (input
  register, then output register).
* Coefficients are an input port (`coef[k]`, signed `COEF_W` bits), meant to
  be held static.

## Two-register arithmetic stage

`sw_arith_unit` is the smallest use of the register. Two operands are each
captured in a `sw_cg_register` and feed one combinational operator, a
multiplier (default) or an adder, chosen by `OP`. The `2*W`-bit result is
combinational from the two registers. It is not part of the filter; the top
level places it beside the filter with its own ports.

## Top level: `sw_fir_top`

It instantiates `u_fir` (the filter) and `u_arith` (the arithmetic stage, set
to multiply). They share `clk` and `rst_n` but no data. Ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low **synchronous** reset |
| `x` | in | `W` | filter input |
| `coef` | in | `N_TAPS` × `COEF_W` (packed) | filter coefficients |
| `y`, `y_full` | out | `Y_W`, `ACC_W` | scaled and full filter output |
| `x_sw_en` | out | `P` | subword enables of the filter input register (bit 0 is always 1) |
| `op_a`, `op_b` | in | `W` | operands of the arithmetic stage |
| `op_result` | out | `2W` | product of the registered operands |
| `op_a_en`, `op_b_en` | out | `P` | subword enables of the operand registers |

The enable outputs exist so that gating activity can be observed or counted.
Because subword 0 is never gated, bit 0 of each is the constant 1.

### Parameters

| parameter | default | origin |
|---|---|---|
| `W` | 16 | word width of the published design |
| `P` | 3 | subword count of the published design |
| `GATE` | `SW_GATE_ENABLE` | this design's choice |
| `N_TAPS` | 6 | this design's choice (one multiplier per DSP slice in the published FPGA figures) |
| `COEF_W` | 16 | this design's choice |
| `Y_W` | 16 | output width of the published design |

Shared defaults and the two enums (`sw_gate_e`, `sw_op_e`) are in
`rtl/sw_cg_pkg.sv`.

## Where this RTL departs from, or goes beyond, the published design

* **Output correction** of gated subwords (flag flip-flops and multiplexers),
  described above, is this design's own; without it the register output is
  wrong after a large word is followed by a smaller one of the same sign.
* **Tap count, coefficient width and coefficients** are not given by the
  published design. 6 taps, 16-bit coefficients and coefficients supplied at a
  port are this design's choices.
* **Internal widths:** the published FPGA build reports 112 flip-flops without
  gating. That is far fewer than the full-width 35-bit sum registers used here
  need (about 225 flip-flops in this filter), so the original must have
  narrowed its partial sums in a way it does not describe. This RTL keeps full
  precision.
* **Output register and scaling** of `y` are this design's choices.
* **Gating form:** load enables by default, an explicit gating cell as an
  option. The published text only says that the clock is ANDed with the enable.
* **Power** cannot be judged from this RTL alone. The published comparison
  (about half the dynamic power on an FPGA for narrowband input, 4 extra
  registers) depends on the implementation and on the signal statistics.

## Verification

Each testbench in `tb/` checks its block against values computed
independently of the block. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog if it hangs.

| testbench | what it checks |
|---|---|
| `tb_sw_enable_gen` | enable against a reference for random and directed inputs; each of the four enable terms must occur |
| `tb_sw_clock_gate` | gated clock low while `clk` is low, steady while `clk` is high even when `en` toggles, edge count equals enabled cycles |
| `tb_sw_cg_register` | sine bursts at three amplitudes plus random words into three builds (P=3 with enables, P=3 with gating cells, P=5); `q` equals the previous input, enables match a cascade model, gated subwords keep their stored bits |
| `tb_sw_arith_unit` | multiplier and adder builds against direct arithmetic on random operands of random size |
| `tb_sw_fir_transposed` | impulse response and 2-cycle latency; low-pass filter on passband sine plus noise at large and small amplitude; random asymmetric coefficients; enable and gating-cell builds must agree |
| `tb_sw_fir_top` | whole top at default sizes: filter against a direct-form reference over 9000 samples of sine plus noise at three amplitudes, noise power reduced as the coefficients predict, multiplier stage against direct products; requires subword 1 and 2 gating, cascade-only enables, sign-change reloads, and gating in both operand registers |

The noise is approximately Gaussian (a sum of four uniform values). With the
6-tap low-pass used in the tests (Q1.15 values 1638, 6554, 8192, 8192, 6554,
1638, sum 32768), white noise power should fall to `sum(h^2) ≈ 0.21` of its
input value, and the top-level test measures 0.21.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl +libext+.sv \
    rtl/sw_cg_pkg.sv tb/tb_sw_fir_top.sv --top-module tb_sw_fir_top -o sim
./obj_dir/sim
```

Replace the testbench file and top-module name to run another. Linting the
RTL: `verilator --lint-only -Wall -y rtl +libext+.sv rtl/sw_cg_pkg.sv
rtl/sw_fir_top.sv --top-module sw_fir_top`.

## Changing the design

* To change the partition, set `W` and `P` so that `W-1` divides by `P`. For
  example `W=16, P=5` gives five 3-bit subwords; this combination is covered
  by `tb_sw_cg_register`.
* Finer subwords gate more often but add one generator, one flag flip-flop and
  `M` multiplexers per subword.
* To use the scheme elsewhere, put `sw_cg_register` at a point where one word
  fans out to many arithmetic units, as the FIR input does. The enable logic
  is then shared by all of them.

## Files

```
rtl/sw_cg_pkg.sv          shared defaults and enums
rtl/sw_enable_gen.sv      enable for one subword
rtl/sw_clock_gate.sv      latch-based clock-gating cell
rtl/sw_cg_register.sv     subword-gated register
rtl/sw_arith_unit.sv      two gated registers feeding an adder or multiplier
rtl/sw_fir_transposed.sv  transposed FIR with gated input register
rtl/sw_fir_top.sv         top level
tb/tb_*.sv                one self-checking testbench per module
```
