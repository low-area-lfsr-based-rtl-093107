# Low-power test pattern generator with a per-flip-flop modified clock

Built-in self-test (BIST) drives a circuit with long streams of test patterns,
and during test a chip typically burns far more power than in normal use. A
large share of that is clock power: every flip-flop of the pattern generator
receives every clock edge, even the flip-flops whose value does not change.

This design cuts that waste in two ways:

1. **Modified clock.** Every flip-flop has its own small control logic that
   compares the flip-flop's data input with its output and passes the clock
   only when they differ. A flip-flop that is not going to change gets no
   clock edge.
2. **Single-bit-change patterns.** The main pattern source is a Gray code
   generator. It steps through all 2^n patterns of an n-bit word, and each
   pattern differs from the one before in exactly one bit. With the modified
   clock this means that only one flip-flop is clocked per pattern.

A standard three-stage LFSR built from the same modified-clock flip-flops sits
next to the Gray code generator as a pseudo-random source.

## Block structure

```
tpg_top
 ├─ gray_code_gen  (N = 4)   N x mc_dff ─┐
 └─ mc_lfsr        (W = 3)   W x mc_dff ─┤
                                          └─ mc_dff = mc_clock_gate + D flip-flop
tpg_pkg: default widths, bin2gray / gray2bin
```

| File | Module | Role |
|---|---|---|
| `rtl/tpg_pkg.sv` | package | default widths, Gray/binary conversion functions |
| `rtl/mc_clock_gate.sv` | `mc_clock_gate` | control logic: the modified clock for one flip-flop |
| `rtl/mc_dff.sv` | `mc_dff` | D flip-flop clocked by its own `mc_clock_gate` |
| `rtl/gray_code_gen.sv` | `gray_code_gen` | exhaustive Gray code pattern generator |
| `rtl/mc_lfsr.sv` | `mc_lfsr` | Fibonacci LFSR with modified-clock stages |
| `rtl/tpg_top.sv` | `tpg_top` | both generators side by side |

## The modified clock (`mc_clock_gate`, `mc_dff`)

The control logic computes `change = d ^ q` and gates the clock with it:
`gclk = clk & change`. The flip-flop samples `d` on the rising edge of `gclk`.

There is one subtlety. A bare AND gate would produce a runt pulse: the rising
edge of `clk` clocks the flip-flop, `q` becomes `d`, `change` drops to 0
and `gclk` falls again while `clk` is still high. The other flip-flops change
too, so `d` may move during the high phase as well. This design therefore
holds `change` in a latch that is transparent only while `clk` is low.
`gclk` is then a clean copy of the `clk` high phase in every cycle where the
flip-flop changes, and stays low in every other cycle. This is the usual
latch-plus-AND clock-gate cell. The synthesis report therefore shows one latch
bit per flip-flop, and they are intended.

Timing rules that follow from this:

* `d` and `q` must settle while `clk` is low, which holds for ordinary
  single-clock logic.
* Seen from its pins, `mc_dff` behaves exactly like a rising-edge D flip-flop
  with one cycle of latency. Only the number of clock edges its storage
  element receives changes.
* `rst_n` is an asynchronous, active-low reset that acts on the flip-flop
  directly. It does not go through the gate.

In an ASIC flow the latch and AND would normally be replaced by the library's
integrated clock-gating cell. Skew between `clk` and the gated clocks then
has to be handled by clock-tree synthesis.

## Gray code generator (`gray_code_gen`)

Each bit of the pattern register is an `mc_dff`. The next pattern is formed
combinationally:

```
next = bin2gray(gray2bin(pattern) + 1)      (mod 2^N)
bin2gray(b) = b ^ (b >> 1)
gray2bin(g)[i] = g[N-1] ^ ... ^ g[i]
```

When `en` is high the register advances one pattern per clock. When `en` is
low, `d = q` for every bit, so no flip-flop is clocked at all. After reset
the pattern is 0. After 2^N steps it returns to 0. Bit i toggles
2^(N-1-i) times per full sequence, and the top bit toggles twice. In total
the flip-flops receive exactly 2^N clock edges per sequence, where an
ungated register would receive N·2^N.

Only the function of this generator is specified (all 2^n patterns, one bit
changing per step). The counter-through-binary structure above is this
design's own. Any circuit with the same sequence would serve.

## Modified-clock LFSR (`mc_lfsr`)

This is a Fibonacci LFSR with `W` stages Y1..YW, where `y[k-1]` is Yk. Y1
takes the XOR of the tapped stages, and each further stage takes the one
before it. Each stage is an `mc_dff`, so a stage that keeps its value in a
cycle is not clocked.

* Default: `W = 3`, taps Y2 and Y3 (polynomial x^3 + x^2 + 1). This gives the
  maximal period of 7, through all non-zero states.
* `load` copies `seed` into the register on the next clock. It takes priority
  over `en`. `en` low holds the register, and then no stage is clocked.
* Reset loads `SEED` (default 001).
* The all-zero state locks the register. Never load it.
* For other widths, pass a primitive tap mask in `TAPS`. The default
  expression taps the last two stages, which is maximal only for some widths
  (3, 4, 6, 7, 15, ...). For example, for 24 bits x^24+x^23+x^22+x^17+1 is
  primitive.

## Top level (`tpg_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | free-running clock |
| `rst_n` | in | 1 | async active-low reset (Gray pattern 0, LFSR `LFSR_SEED`) |
| `gray_en` | in | 1 | advance the Gray code generator |
| `lfsr_en` | in | 1 | advance the LFSR |
| `lfsr_load`, `lfsr_seed` | in | 1, `LFSR_W` | synchronous seed load |
| `gray_pattern` | out | `GRAY_N` | exhaustive pattern to the circuit under test |
| `lfsr_pattern` | out | `LFSR_W` | pseudo-random pattern to the circuit under test |

Parameters: `GRAY_N = 4`, `LFSR_W = 3`, `LFSR_TAPS = 3'b110`,
`LFSR_SEED = 3'b001`. The circuit under test is outside this design. Both
pattern buses are brought out, and the integrator decides which inputs each
one drives.

## What follows the source design and what does not

Taken from the source design:

* the modified-clock principle: clock a flip-flop only when its value changes,
  using an XOR of D and Q ANDed with the clock, on every flip-flop;
* a Gray code generator that produces all 2^n patterns with one bit changing
  per step;
* the three-stage standard LFSR with XOR feedback into the first stage and a
  modified clock on each stage.

Choices of this implementation:

* the latch in the clock gate;
* the Gray generator's internal structure and its width of 4;
* the LFSR taps (Y2, Y3);
* the seed load port, read from an unlabelled "input" to the LFSR;
* the enables, the reset values and the asynchronous reset style;
* the side-by-side top with two separate pattern buses.

Not included:

* a pattern generator without the modified clock, which serves only as the
  power baseline;
* the circuit under test;
* any power measurement. The testbenches count gated clock edges instead,
  which stand in for clock power.

## Simulation

Every testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<m>`. Any run with a non-zero failure count
has failed. Each testbench also has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/tpg_pkg.sv tb/tb_tpg_top.sv --top-module tb_tpg_top -Mdir obj
./obj/Vtb_tpg_top
```

Replace `tb_tpg_top` with any other testbench name to run it instead.

| Testbench | What it checks |
|---|---|
| `tb_mc_clock_gate` | gated clock high exactly in cycles with d ≠ q, low during clk low, no glitch when q follows d |
| `tb_mc_dff` | plain-flip-flop behaviour, async reset, gated edges equal value changes |
| `tb_gray_code_gen` | sequence against k ^ (k>>1), Hamming distance 1, all 16 patterns, wrap, hold, exactly one flip-flop clocked per step, per-bit edge counts |
| `tb_mc_lfsr` | sequence against a reference LFSR, period 7, no lock-up, hold, load and its priority, gated edges equal toggles per stage |
| `tb_tpg_top` | both generators at default size under random enables and loads. It also counts Gray wraps, full LFSR periods, loads, holds and withheld clock edges, and fails if any of them never happens. |
| `tb_lfsr24` | `mc_lfsr` widened to 24 stages (x^24+x^23+x^22+x^17+1), 20000 shifts against a reference model, no early repeat, gated edges equal toggles |

`tb_tpg_top` runs the top with all parameters at their defaults. In a typical
run of 400 cycles the seven flip-flops receive about 800 gated clock edges,
against 2800 for an ungated register.
