# Chained frequency translators with power meters

This design shifts a complex (I/Q) baseband signal in frequency, one sample per
clock, and measures its power after every shift. A frequency translator
multiplies each incoming sample by a rotating unit phasor, cos + j·sin, taken
from a numerically controlled oscillator. Each step of the oscillator's
phase sets the shift: at a 400 MHz clock, one unit of step is 400 MHz / 8192 ≈
48.8 kHz. A power meter behind the translator reports the average of
I² + Q² over the last eight samples.

One translator plus one power meter is a `comp_block`. `large_system`
chains 100 of them. Each block's output feeds the next
block's input, every block has its own step input, and every block's power
reading comes out on its own port. The chain is a large, regular workload
for simulation and synthesis studies, so the arithmetic is fully specified:
every result is bit-exact and reproducible from the formulas below.

The top level, `study_top`, places this chain beside two small, unrelated
example circuits: a sum of two registered products, and a pair of call
counters (see below).

The chain comes from a study that built it three ways: hand-written VHDL,
bit-exact HLS C++ and library-based HLS C++. It compared area, timing and
simulation time. This RTL follows the hand-written architecture: table-based
oscillator, three-multiplier complex product, shift-register averager. It
is written in synthesizable SystemVerilog.

## Number formats

| path | format | overflow | rounding |
|---|---|---|---|
| samples, oscillator, power | 16-bit signed, 6 integer + 10 fraction bits (Q6.10, range −32 … +31.999) | saturate | truncate (drop low bits, i.e. floor) |
| phase, step | 13-bit unsigned integer | wrap around | — |

The shared types live in `rtl/fx_pkg.sv`:

- `sample_t` is a 16-bit signed sample.
- `phase_t` is the 13-bit phase.
- `iq_t` is a packed struct `{i, q}`, where `i` is the real part and `q` the imaginary part.
- `saturate()` clamps a wide value into a sample.

## The oscillator: one eighth of a circle in two tables

The phase accumulator (`phase_accumulator`) adds `step` to a 13-bit register
on every clock. It does this whether or not the input is valid, so the
oscillator frequency is exactly `f_clk · step / 2^13`. Negative steps in
two's complement (e.g. `13'h1fff` = −1) shift the signal down.

The phase is split into two fields:

```
phase[12:10] = segment s   (which eighth of the circle, 45° each)
phase[9:0]   = k           (position inside the segment, 1024 steps)
```

The generator (`sincos_generator`) uses two 1024 × 16 tables (`trig_rom`):

- **SROM** holds sin(x) for x in [0°, 45°).
- **CROM** holds cos(x) for x in [0°, 45°).

The rest of the circle follows from symmetry. In odd segments the angle
inside the segment runs backwards, so the tables are read at the mirrored
address `k0 − k`, with `k0 = 1023`, i.e. `~k`. The segment then decides which
table feeds which output and which sign it gets:

| segment | address | cos | sin |
|---|---|---|---|
| 0 | k  |  CROM |  SROM |
| 1 | ~k |  SROM |  CROM |
| 2 | k  | −SROM |  CROM |
| 3 | ~k | −CROM |  SROM |
| 4 | k  | −CROM | −SROM |
| 5 | ~k | −SROM | −CROM |
| 6 | k  |  SROM | −CROM |
| 7 | ~k |  CROM | −SROM |

The mirrored read is exact only because of one detail of the tables. Entry
`k` holds the value at `(k + 0.5)` table steps, i.e. half a step into its
bin, not at `k`. Then `1023 − k` lands exactly on `45° − angle(k)`. The
oscillator therefore outputs cos/sin of `(phase + 0.5) · 2π / 8192`, with
no seam at any 45° boundary. Every table value is `trunc(f(angle) · 1024)`.
Magnitudes are at most 1024 (1.0), so negating them never overflows.

The table contents are an elaboration-time constant. A constant function
evaluates the Taylor series of sin or cos in 60-bit integer fixed point at
`theta = (2k + 1)·π / 8192` and truncates the result to 10 fraction bits.
Because the arithmetic is integer-only, any synthesis tool sees a plain
constant ROM, and the series error is far below one output LSB.

Timing: cycle 1 is the synchronous table read, with the segment number
registered alongside. Cycle 2 is the registered swap and negate. The phase
register adds one more cycle, so the oscillator value for the phase of cycle
`t` is ready three cycles later.

## The complex multiplier: three multiplications

`complex_multiplier` computes `p = a · b` with one shared product and two
private ones:

```
common = a.i · (b.i + b.q)
p.i    = common − b.q · (a.i + a.q)
p.q    = common + b.i · (a.q − a.i)
```

This equals `(a.i·b.i − a.q·b.q) + j(a.i·b.q + a.q·b.i)` exactly, because the
integer arithmetic is full width up to the end. Three multipliers keep the
throughput at one product per cycle. The pipeline has the shape of three
DSP slices:

1. Register the pre-adder sums.
2. Register the three 33-bit products.
3. Post-add, drop the 10 surplus fraction bits and saturate.

Latency is 3 cycles. In the translator, `a` is the signal and `b` is the
oscillator. `valid_in` travels alongside the data and never gates it.

## The frequency translator

`freq_translator` = accumulator (1 cycle) → sine/cosine generator (2) →
complex multiplier (3). The input sample waits in a three-register delay
line. That way it reaches the multiplier together with the oscillator value
computed from the phase of its own cycle:

```
iq_out(t + 6) = iq_in(t) · (cos + j·sin)((phase(t) + 0.5) · 2π / 8192)
phase(t)      = phase(t − 1) + step(t),   phase = 0 after reset
valid_out(t + 6) = valid_in(t)
```

Latency is 6 cycles and throughput is one sample per cycle. A rotation
preserves magnitude, so the multiplier only saturates when the input is
beyond the circle of radius 32. For example, I = Q = 31.99 rotated by 45°
has a real part of 45.2.

## The power meter

`power_meter` computes:

```
p_inst(t) = min((I² + Q²) >> 10, 32767)          instantaneous power, Q6.10
pwr_out   = (p_inst(t) + p_inst(t−1) + … + p_inst(t−7)) >> 3
```

- An input whose `valid_in` is low is replaced by zero before squaring, so
  undefined data never enters the average.
- The squares are registered; that register is the one cycle of latency.
- The sum of squares is truncated and saturated. Saturation starts at
  |x|² ≥ 32, i.e. |x| ≥ 5.66.
- A seven-entry shift register, moving every cycle, holds the older values.
- A balanced adder tree sums the seven stored values. The new value
  settles last in the cycle, after the squares' adder and the saturation, so
  it is added after the tree and passes through only one adder. The sums are
  three bits wider than a sample, so they cannot overflow, and the division
  by eight is a 3-bit shift.
- `pwr_out` is combinational from those registers and is marked by
  `valid_out`, which is `valid_in` delayed one cycle.

For seven cycles after reset, and after any invalid inputs, the window still
contains zeros. A consumer that wants a settled reading should wait for
eight valid samples in a row. An assertion checks that the average never
looks negative.

## The chain

`comp_block` feeds the translator output (`iq_out`, `valid_freq`) into the
power meter (`pwr_out`, `valid_pwr`). `large_system #(N_DEVICES = 100)`
connects block n's output to block n+1's input.

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; synchronous active-low reset of all registers except the table read registers |
| `step[N]` | 13 each | oscillator step of every block |
| `valid_in`, `iq_in` | 1, 32 | first input sample |
| `valid_out`, `iq_out` | 1, 32 | output of the last block, 6·N cycles later (600 by default) |
| `valid_pwr[N]`, `pwr_out[N]` | 1, 16 each | each block's average power, 6·(n+1)+1 cycles after the input |

Each block uses 5 multipliers (3 in the complex product, 2 squarers) and 2
table ROMs, so the default chain uses 500 multipliers and 200 ROMs of
1024 × 16 bits. The system has no controller: whatever drives it must set
the steps and feed the first input. In the testbenches, the testbench plays
that role.

## The sum-of-products example

`sum_of_products` is a small stand-alone circuit that computes
`y = a0·b0 + a1·b1`. It has 16-bit signed inputs. The two full 32-bit products
are registered, which gives one cycle of latency. Their sum is reduced to the
low 16 bits, i.e. it wraps around, as in a 16-bit integer. A synchronous
active-low reset clears both product registers. In `study_top` its ports
are `sop_a0`, `sop_b0`, `sop_a1`, `sop_b1` and `sop_y`.

## The call-counter example

`static_counters` models a top function that calls two sub-functions, each
keeping a private register that starts at 0, adds one per call and returns the
new value. A call is one clock edge with `call` high. After n calls both
outputs, `var1` and `var2`, equal n, since each sub-function has its own
register. They are 32-bit registers: one cycle of latency, hold between calls,
wrap on overflow, synchronous active-low reset to 0.

With `SHARED = 1` the module instead builds the circuit that results when both
sub-functions use one register, the first and then the second on every call.
A call then adds two, and the outputs after n calls are `2n − 1` and `2n`, so
`var2` is already 2 after the first call. This form shows what happens when two
sub-functions accidentally refer to the same state. The top level uses the
default, separate form, with ports `cnt_call`, `cnt_var1` and `cnt_var2`.

## How far it can be trusted

The results are checked bit-exactly against an independent model,
`tb/tb_ref_pkg.sv`. The model computes the oscillator from cos/sin of the
full angle rather than from the folded tables, multiplies with the ordinary
four-product formula and sums squares directly.

- Every one of the 8192 phases is checked.
- Every testbench also checks the latency.
- The saturation paths, the zeroing of invalid inputs, phase wrap-around and
  all eight segments are exercised and counted.

What is **not** established here is the 400 MHz clock target. The pipeline
cuts are placed where the target architecture places them. The 16 × 17-bit
products and the 8-input adder tree are the longest paths, but no timing
analysis was run.

Choices this RTL makes where the source description is silent:

- the half-step table offset and `k0 = 1023`
- taking the low 16 bits of the sum in `sum_of_products`
- the call strobe, the reset and the 32-bit wrap-around of `static_counters`
- synchronous active-low reset to zero, and a phase that starts at 0
- operand order in the multiplier (signal × oscillator)
- the exact register placement inside the multiplier
- an accumulator that free-runs regardless of `valid_in`, consistent with
  valid being a side-band signal only

Measured implementations of the 100-block chain reportedly reached about 500
cycles of end-to-end latency, below the 600 that six cycles per block imply.
This design keeps the specified six cycles per block.

## Files

| file | contents |
|---|---|
| `rtl/fx_pkg.sv` | formats, types, `saturate()` |
| `rtl/phase_accumulator.sv` | 13-bit wrapping phase register |
| `rtl/trig_rom.sv` | SROM / CROM eighth-wave table |
| `rtl/sincos_generator.sv` | segment folding of the two tables |
| `rtl/complex_multiplier.sv` | three-multiplier complex product |
| `rtl/freq_translator.sv` | oscillator + delay line + multiplier |
| `rtl/power_meter.sv` | squares, saturation, 8-sample rolling average |
| `rtl/comp_block.sv` | translator + power meter |
| `rtl/large_system.sv` | the chain |
| `rtl/sum_of_products.sv` | the two-product example |
| `rtl/static_counters.sv` | the call-counter example, separate or shared register |
| `rtl/study_top.sv` | top level: chain and both examples side by side |
| `tb/tb_ref_pkg.sv` | reference model functions |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_large_system.sv` | the default 100-block chain, every output every cycle |
| `tb/tb_study_top.sv` | end-to-end test of the whole top level at default sizes |
| `tb/tb_workload_large_system.sv` | one million samples through the 100-block chain |
| `tb/tb_workload_components.sv` | one million samples through a lone translator and a lone power meter |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_large_system \
    -y rtl -y tb +libext+.sv rtl/fx_pkg.sv tb/tb_ref_pkg.sv tb/tb_large_system.sv
./obj_dir/Vtb_large_system
```

Replace `tb_large_system` with any other testbench name. The 100-block chain
takes about a minute to compile. The one-million-sample workload then runs
in well under a minute.

To change the chain length, override `N_DEVICES`. To change the averaging
window, override the power meter's `WINDOW`, which must be a power of two.
The sample and phase formats are package constants in `fx_pkg`.
Changing `ADDR_W` or `PHASE_W` changes the table size and the frequency
resolution together.
