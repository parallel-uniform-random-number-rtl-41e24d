# Parallel uniform random number generator from bit-count summators

A 32-bit linear congruential generator (LCG),

    X(n+1) = (A * X(n) + C) mod 2^32,   A = 2^27 + 2^21 + 1 = 136314881,  C = 2^14 + 2^11 + 1 = 18433

implemented without any multiplier or adder primitives. The modulo costs nothing because the word is 32 bits wide. A and C each have only three set bits, so `A * X + C` is the sum of three shifted copies of `X` and three constant ones. The design adds these bit by bit. Each result bit gets one small combinational "column summator" that counts the ones arriving in that bit position. Ten such generator modules are chained in one clock period, so the design delivers ten consecutive numbers of the sequence on every clock edge.

The multiplier and increment were chosen for two reasons. C is odd and A = 1 (mod 4), which gives the full period 2^32; with both odd, the low bit alternates, so even and odd numbers both occur. They also score well on a set of statistical tests (autocorrelation and histogram error). The few set bits keep the logic small and fast. The statistical selection itself is not part of this RTL; see "What is not here".

## Files

| file | contents |
|---|---|
| `rtl/lcg_pkg.sv` | default W, A, C, chain length, seed; `col_inputs()` used at elaboration |
| `rtl/sum2.sv` … `rtl/sum6.sv` | the 2- to 6-input column summators |
| `rtl/lcg_step.sv` | one combinational generator step, `y = A*x + C mod 2^W` |
| `rtl/lcg_gen.sv` | state register + one step: the single generator, and the head of the chain |
| `rtl/lcg_parallel.sv` | top: register + ten steps in a chain with feedback |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Column summators

Write `A * X + C` as a column addition. Result bit `i` receives:

* `X[i-j]` for every set bit `A[j]` with `j <= i`. For the default A, that means `X[i]`, `X[i-21]` (if `i >= 21`) and `X[i-27]` (if `i >= 27`);
* a constant `1` if `C[i] = 1` (bits 0, 11 and 14 by default);
* carries from lower columns.

A column with *n* one-bit inputs sums to a value 0..n. Written in binary, that sum is at most three bits for n ≤ 6:

| output | weight | goes to |
|---|---|---|
| `Yw` | 1 | the result bit `y[i]` |
| `Pw` | 2 | an input of column `i+1` |
| `Rw` | 4 | an input of column `i+2` (only for n ≥ 4) |

Each summator computes these three bits directly as two-level AND/OR/XOR logic, not as a tree of full adders:

* `Yw` is always the XOR (parity) of all inputs.
* `Pw` is "at least two ones", masked where the count is 4 or 5 (binary 100 and 101 have bit 1 clear). In the 6-input cell the mask is lifted when all six inputs are 1, because 6 = 110.
* `Rw` is "at least four ones", written as a sum of products that covers every 4-input subset (the 6-input cell covers all 15 with six terms).

`sum2` and `sum3` are the half and full adder. `sum4`, `sum5` and `sum6` are wider counters. Their testbenches compare all 2^n input patterns against a population count.

## Building the 32-bit step (`lcg_step`)

`lcg_step` builds all of this at elaboration time from the parameters `W`, `A` and `C`. For every column, `lcg_pkg::col_inputs()` counts the column's inputs: the shifted `X` bits and the constant of `C`, plus one for `Pw` from column `i-1` if that column had two or more inputs, plus one for `Rw` from column `i-2` if that column had four or more. The module then instantiates the summator of exactly that size. The carries out of the top two columns are dropped; that is the `mod 2^W`. They stay as unused signals, which lint reports.

With the default parameters the column sizes are:

| bits | inputs | summator |
|---|---|---|
| 0–10, 12–13, 15–20 | 2 | `sum2` |
| 11, 14, 21–26 | 3 | `sum3` |
| 27–28 | 4 | `sum4` |
| 29–31 | 5 | `sum5` |

The default does not need `sum6`. It is there for parameter pairs with denser columns. A column that would need more than six inputs stops elaboration with an error. All eight alternative (A, C) pairs of the original parameter survey need at most five inputs. So does the 8-bit teaching example A = 41, C = 5. The testbench checks all of these against a plain multiply-add.

The carry path is a ripple: `Pw` moves one column per summator and `Rw` two. One step therefore settles after about 32 summator delays. On the original FPGA timing models that was 7.3 ns (fast) to 16.7 ns (slow) per step, within a 20 ns clock.

## The parallel chain (`lcg_parallel`)

```
          +-------------------------------------------------------------+
          |  rnd[9]                                                     |
          v                                                             |
   clk -> [X register] -> f -> rnd[0] -> f -> rnd[1] -> ... -> f -> rnd[9]
          (lcg_gen)              (lcg_step)                 (lcg_step)
```

Only the first module has a register (`lcg_gen`). The other nine are purely combinational `lcg_step` instances, and each takes the previous module's output as its `x`. On a clock edge the register takes `rnd[9]`. Then `rnd[0..9] = f(X), f²(X), …, f¹⁰(X)`, and the next edge continues exactly where this one stopped. The output is therefore the single generator's sequence delivered ten numbers at a time, with no gap and no overlap.

The price is the timing. The whole chain of ten steps is one single-cycle combinational path. The original measurements put it at 16.6 ns (fast model) to 41.0 ns (slow model). That is too long for a 20 ns clock, so the clock must be slowed to cover it: 10 MHz is the suggested figure. No multicycle handshake or pipelining is added. If you need full clock rate, register between steps. That changes the latency and is not part of this design.

`N` (the chain length) is a parameter. `N = 1` gives the single generator with one number per clock.

## Interfaces and timing

`lcg_parallel #(W=32, A=136314881, C=18433, N=10, SEED=1)`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset: X ← SEED |
| `load` | in | 1 | synchronous: X ← `seed` on the next rising edge |
| `seed` | in | W | start value |
| `rnd` | out | N×W (packed) | `rnd[k]` = (k+1)-th number after X; all change together after each edge |

`lcg_gen` has the same clock, reset and seed ports, plus `d` (the register's next value), `q` (the register) and `y = f(q)`. To use it as a stand-alone generator, tie `d` to `y`.

`lcg_step` has no clock: `x` in, `y` out.

## Where this design makes its own choices

The column summators, the parameter values, the ten-module chain with one register, and the feedback from the last module follow the original design. These parts are this design's own:

* **Column wiring.** Carries go to `i+1` (`Pw`) and `i+2` (`Rw`), and each column's summator is sized from its input count. The original describes only that the small summators are "combined". The rule here is verified arithmetically for every parameter set above.
* **Register position.** The register holds X at the module's input, and the module outputs f(X). The original figure shows the register in the first module but not on which side of the logic.
* **Reset and seeding.** An asynchronous reset to `SEED = 1` and a synchronous `load`/`seed` are added. The original only mentions repeating runs from different initial values.
* **Generality.** `A` and `C` are parameters and `col_inputs()` checks them. The original builds one fixed 32-bit module.
* **Clocking.** The chain is a single-cycle path, following the original's advice to lower the clock frequency. An earlier remark there that the chain takes "less than 10 clock cycles" is not turned into a multicycle scheme.

## What is not here

* **Parameter selection.** The statistical selection of A and C is an offline software study, not hardware. It used 10^5-sample sequences, an autocorrelation score summed over lags 1..100 and a histogram squared-error score. The testbench of the full chain checks only a coarse histogram: 16 bins over 100 000 numbers, each within 2 %.
* **Timing figures.** The gate-level settling times above come from a vendor timing model and cannot be reproduced by RTL simulation.
* **Gaussian generator.** A Gaussian generator built on top of this one is mentioned only as future work.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and stops on its own, with a watchdog for hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/lcg_pkg.sv rtl/sum?.sv rtl/lcg_step.sv \
    rtl/lcg_gen.sv rtl/lcg_parallel.sv tb/tb_lcg_parallel.sv --top-module tb_lcg_parallel
obj_dir/Vtb_lcg_parallel
```

| testbench | what it checks |
|---|---|
| `tb_sum2` … `tb_sum6` | every input pattern against `$countones` |
| `tb_lcg_step` | 20 000 random 32-bit inputs for the default; all 256 inputs of the 8-bit example; 2 000 inputs for each of the eight alternative (A, C) pairs |
| `tb_lcg_gen` | reset value, 1 000 consecutive numbers at one per clock, alternating low bit, seed load, asynchronous reset mid-run |
| `tb_lcg_parallel` | default parameters, 10 000 clocks = 100 000 numbers. Each number is checked against a reference multiply-add. The feedback across clocks and the rate of ten numbers per clock are checked. Reset, load, chain and feedback are each counted and must each occur. It also runs the histogram check. |

The full-chain testbench runs in well under a second.
