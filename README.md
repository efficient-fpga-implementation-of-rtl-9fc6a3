# HSCA: a Sine Cosine Algorithm optimiser in hardware

The Sine Cosine Algorithm (SCA) is a population-based optimiser. A swarm of
`n` candidate solutions ("particles") in a `d`-dimensional box `[lb, ub]^d`
is moved towards the best solution found so far, `P`, and each coordinate
oscillates around it:

```
x' = x + r1 * sin(r2) * |r3 * P_j - x|     if r4 < 0.5
x' = x + r1 * cos(r2) * |r3 * P_j - x|     if r4 >= 0.5
r1 = a - a * t / T                          (t = iteration, T = iterations)
```

`r2` in [0, 2π), `r3` in [0, 2) and `r4` in [0, 1) are random. While `r1 >= 1`
the steps can overshoot `P` (exploration); once `r1 < 1` they shrink towards it
(exploitation).

This RTL is a hardware SCA engine. It follows the architecture of the HLS design
in "Efficient FPGA Implementation of Sine Cosine Algorithm using High Level
Synthesis", and keeps its main idea: the sine and cosine of every update come
from a pipelined shift-and-add CORDIC unit, not from a floating-point library.
The particle-update loop is pipelined so that one coordinate is updated per
clock cycle. The engine sits behind an AXI4-Lite register interface and sends
its result out over AXI4-Stream, which makes it an IP core for a Zynq-style
processor/FPGA system. Besides ten standard benchmark functions it can
minimise a TDOA (time difference of arrival) localisation cost, which finds
the position of a radio source from range differences measured at four
anchor nodes.

## Structure

```
              AXI4-Lite                                     AXI4-Stream
processor ───────────────► hsca_axil_regs                  ──────────► DMA
                               │ config, start    ▲ results      ▲
                               ▼                  │              │
        ┌──────────────────── hsca_core ──────────┴──────────────┤
        │                                                        │
        │  hsca_init (IM) ──coords──┐                      hsca_axis_out
        │   MAX_D × hsca_lfsr       ▼                            ▲
        │        │ rows      hsca_fitness (FM) ──fitness──► best tracking ──► P
        │        ▼                  ▲                            │
        │  hsca_pop_mem ◄──────► hsca_update (PUM) ◄─────────────┘
        │   Pop[n][d], fitness[n]   hsca_lfsr, hsca_cordic, r1
        └────────────────────────────────────────────────────────┘
```

| file | block | role |
|---|---|---|
| `hsca_pkg.sv` | package | number formats, constants, benchmark enum, saturating arithmetic |
| `hsca_lfsr.sv` | RNG | 32-bit Galois LFSR, 32 shifts per clock |
| `hsca_cordic.sv` | CORDIC | pipelined sin/cos, `ITER` rotations, one angle per cycle |
| `hsca_init.sv` | IM | random initial population, one particle per cycle from `MAX_D` LFSR lanes |
| `hsca_fitness.sv` | FM | streaming benchmark evaluation, one coordinate per cycle |
| `hsca_tdoa_fitness.sv` | FM part | TDOA localisation cost over four anchors |
| `hsca_isqrt.sv` | helper | pipelined square root (Ackley, TDOA ranges) |
| `hsca_exp.sv` | helper | exponential (Ackley) |
| `hsca_update.sv` | PUM | pipelined SCA update of every coordinate |
| `hsca_pop_mem.sv` | memory | population `Pop[MAX_N][MAX_D]` and `fitness[MAX_N]` |
| `hsca_div.sv` | helper | sequential divider for `a/T` |
| `hsca_core.sv` | engine | sequencing, best-particle tracking, control factor `r1` |
| `hsca_axil_regs.sv` | AXI4-Lite slave | parameters, start, status, results |
| `hsca_axis_out.sv` | AXI4-Stream master | result packet to the DMA |
| `hsca_top.sv` | top | the IP core: registers + engine + stream |

The processor, the AXI interconnect, the DMA and the DDR memory of the system
are not part of this RTL. The ports of `hsca_top` are where they connect.

## Number formats

All arithmetic is fixed point:

* **Q16.16, 32 bits** (`pos_t`): coordinates, bounds, `r1`, `r3`, angles in
  radians, and sin/cos. This covers every benchmark box used (up to ±600).
* **Q48.16, 64 bits** (`fit_t`): fitness values. Additions and
  multiplications saturate. The product term of f4 overflows for large
  boxes (30 coordinates of magnitude 10 give 10^30), so that fitness
  saturates at the largest value. The optimiser still works because it only
  compares fitness values.

Products are truncated, never rounded. Expect errors of a few 2^-16 per
operation.

## The update pipeline (hsca_update)

This is the heart of the design. Every cycle, one coordinate `(i, j)` of the
population enters the pipeline, visiting `j = 0..d-1` for each particle
`i = 0..n-1`:

| stage | work |
|---|---|
| issue | memory address `(i, j)`. One LFSR word gives `r2 = 2π·u[15:0]/2^16`, `r3 = u[30:16]/2^14` and `r4 = u[31]`. `P_j` is taken from the best-particle register. |
| CORDIC 0 | `r2` is folded into [-π/2, π/2] and a "negate" flag is kept. The memory word `x` arrives. |
| CORDIC 1..ITER | one micro-rotation each. The metadata and `x` travel in a parallel delay line. |
| update | `x' = clamp(x + r1·trig·|r3·P_j - x|, lb, ub)`, with `trig = r4 ? cos : sin` |
| write | `x'` is written back to `Pop[i][j]` and sent to the fitness module in the same cycle. |

An iteration takes `n·d + CORDIC_ITER + 3` cycles, from `start` to the `done`
pulse of the PUM. The same coordinate is never read twice in one iteration,
so the write-back cannot race a read.

### CORDIC

Rotation mode: the vector starts at `(K, 0)` with `K = 0.60725252935`. Each
stage `i` rotates it by `±atan(2^-i)` using two shifts and three additions.
At the end, `x ≈ cos θ` and `y ≈ sin θ`. The default of **four rotations**
is small: the residual angle can be up to `atan(1/8) ≈ 0.12 rad`, so sin and
cos are only good to about ±0.13. For SCA this hardly matters, because `r2`
is a random step direction anyway. Set `CORDIC_ITER` up to 16 for accurate
values (±2·10^-3 is checked at 16). The latency is `ITER + 1` cycles and the
throughput is one angle per cycle. The folding stage is this design's
addition. Without it, the rotations could not reach angles beyond about
±1.6 rad.

## A run (hsca_core)

1. **Start.** The LFSRs are seeded from `seed`. The divider starts computing
   `a/T`.
2. **Initialisation (IM).** `MAX_D` LFSR lanes produce all coordinates of a
   particle in one cycle: `x = lb + r·(ub - lb)`. The particle is written to
   memory as one word. It is then streamed to the fitness module one
   coordinate per cycle, while the next particle is generated. Each particle
   takes `d` cycles.
3. **Best tracking.** Every fitness result is compared with the best so far.
   After a phase has drained, the best particle is copied from the
   population memory into the `P` register in one cycle. Every update of an
   iteration therefore sees the same `P`.
4. **Iterations.** For `t = 0..T-1`, the PUM runs with
   `r1 = a - t·(a/T)`, and the best particle is updated after each one.
5. **End.** `done`/`irq` pulses. `best_fit`, `best_pos`, `cycles` and `iter`
   hold the result. The stream port sends the packet.

A run takes exactly

```
max(n·d + 4 + max(L, 2), 34) + T·(n·d + CORDIC_ITER + 6 + L)
```

cycles, where `L` is the latency of the fitness module: 1 for f1–f6 and f10,
18 for f8 and f9, 52 for f7 and 35 for TDOA. Each phase ends only when the
fitness module is empty (its `busy` output is low), so the next iteration
always sees the final best particle. For 30 particles × 30 dimensions × 1000
iterations on f1 this is 911,906 cycles, or 9.1 ms at 100 MHz.

Lower fitness is better. `t_max = 0` evaluates only the initial population.
The register block checks the configuration before a start. It refuses to
start unless `1 ≤ n ≤ MAX_N`, `1 ≤ d ≤ MAX_D` and `lb < ub`. `hsca_core`
used on its own makes no such check.

## Benchmark functions (hsca_fitness)

`FUNC` selects the function. The code is the function number minus 1.

| FUNC | function | latency |
|---|---|---|
| 0 | f1 sphere Σx² | 1 |
| 1 | f2 Rosenbrock Σ100(x[i+1]-x[i]²)² + (x[i]-1)² | 1 |
| 2 | f3 Σ i·x² | 1 |
| 3 | f4 Σ\|x\| + Π\|x\| (the product saturates) | 1 |
| 4 | f5 max\|x\| | 1 |
| 5 | f6 three-hump camel (x1, x2 only) | 1 |
| 6 | f7 Ackley -20·exp(-0.2·√(mean x²)) - exp(mean cos 2πx) + 20 + e | 52 |
| 7 | f8 Rastrigin Σ(x² - 10·cos 2πx + 10) | 18 |
| 8 | f9 Griewank Σx²/4000 - Π cos(x_i/√i) + 1 | 18 |
| 9 | f10 Styblinski–Tang ½Σ(x⁴ - 16x² + 5x) | 1 |
| 10 | TDOA localisation cost (see below) | 35 |

Latency is counted in cycles from the last coordinate to the result. Each
coordinate adds its term to a running sum, a second sum, a product or a
maximum, and particles may follow back to back with every function. For f10,
the coefficient 16 is the one that gives the known minimum of -39.166 per
dimension.

### Cosine, square root and exponential

f7–f9 need the cosine of every coordinate. The module has its own CORDIC for
this, with 16 rotations, because four rotations are too coarse for a fitness
value. Before the CORDIC, the angle is reduced to a fraction of a turn:

* For f7 and f8, `cos(2πx)` has period 1, so the turn is simply the
  fractional bits of `x`.
* For f9, `x·(1/√i)` is multiplied by `1/(2π)`, and bits 47:32 of the
  product are the turn.

The turn is then scaled by 2π into [0, 2π). `1/√i` and `1/D` come from small
tables of `MAX_D` entries. These are computed at elaboration by constant
functions: `1/√i = 2^32 / isqrt(i·2^32)` and `1/D = round(2^16/D)`. A
17-stage delay line carries the coordinate beside the CORDIC.

f7 goes on after the sums are complete:

1. The means of x² and cos are taken, multiplied by the `1/D` table.
2. A 32-stage square root (`hsca_isqrt`, digit by digit, one result per
   cycle) gives √(mean x²).
3. Two exponential units compute the two exponentials. Each works as
   `e^y = 2^k·2^f` with a degree-6 polynomial for `2^f`, which is accurate
   to about 2·10^-4.

The testbench compares f7–f9 with floating-point formulas, to within 0.05
plus 0.1 % of the value. Most of that margin is the CORDIC error summed over
30 coordinates.

### TDOA localisation (hsca_tdoa_fitness)

A source at `u = (x, y, z)` is heard by anchor nodes `s_1..s_4`. The
measured range differences are `R_m1 = |u - s_m| - |u - s_1| + noise`. The
maximum-likelihood estimate of `u` minimises

```
J(u) = Σ_{m=2..4} (R_m1 - (|u - s_m| - |u - s_1|))²
```

The unit handles particles as follows:

* It collects the particle's coordinates. Two-coordinate particles use
  `z = 0`.
* It forms the four squared ranges and runs four square roots in parallel.
* It adds up the squared errors.

The engine minimises `J` directly. This has the same optimum as maximising
`1/J` and needs no divider. The anchor coordinates and the three measured
differences are registers (see below). With 100 particles in 2-D, the
end-to-end test finds the target to within 0.1 units in 100 iterations.

## Host interface

**AXI4-Lite registers** (32-bit words; full map in `hsca_axil_regs.sv`):

| offset | register |
|---|---|
| `0x00` | CTRL: write bit 0 to start (ignored while busy, refused for a bad configuration); read bit 0 = busy, bit 1 = done (sticky), bit 2 = configuration error |
| `0x04`–`0x20` | N, D, T, LB, UB, A (default 2.0), SEED, FUNC (0..9 = f1..f10, 10 = TDOA) |
| `0x24`/`0x28` | best fitness, low/high word |
| `0x2C`/`0x30` | cycles of the last run; iterations done |
| `0x34` | index of the particle whose stored fitness is read at `0x38`/`0x3C` |
| `0x40 + 12m + 4k` | TDOA anchor `m` (0..3), coordinate `k` (x, y, z), Q16.16 |
| `0x70 + 4(m-2)` | TDOA measured range difference `R_m1`, m = 2..4, Q16.16 |
| `0x100 + 4j` | coordinate `j` of the best particle |

**AXI4-Stream result packet**, sent after every run: `d` beats of best-particle
coordinates, then the best fitness as a low and a high word. TLAST marks the
last beat. TDATA is held under back-pressure.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `MAX_N` | 512 | largest population (the largest one evaluated for the original design) |
| `MAX_D` | 256 | largest dimension count (the original evaluates up to 256) |
| `CORDIC_ITER` | 4 | CORDIC rotations (the original's count) |
| `T_W` | 16 | width of the iteration count |

The population memory is `MAX_N × MAX_D × 32` bits = 4 Mibit, plus
`MAX_N × 64` bits of fitness. It is written as plain arrays with synchronous
reads, so that synthesis can map it to block RAM. `MAX_D` sizes several
other parts too:

* the number of LFSR lanes in the initialise module (256 at the default);
* the width of the best-particle register and of the memory row;
* the best-particle window of the register map.

Problems of up to 30 dimensions need only `MAX_D = 30`. That makes the
engine several times smaller.

How the evaluated settings of the original design fit:

* 30 particles × 1000 iterations with 10–30 dimensions fits, for all ten
  functions.
* Population 100 fits.
* Populations 256 and 512 with 256 dimensions fit. One iteration at
  512 × 256 is simulated end to end: 262,161 cycles. A whole run of 1000
  iterations at that size would take 131 M cycles.
* TDOA localisation with 100 particles, 500 iterations and 2-D positions fits.
  It takes 122,739 cycles.

## Where this design departs from the original, and why

* **Parameters arrive over AXI4-Lite.** The original initialisation module
  fetches them from DDR memory. The DMA path is used only for the result
  packet, whose format is this design's own.
* **Random numbers are drawn per coordinate.** The original's pseudo code
  draws `r2`, `r3` and `r4` once per particle but evaluates CORDIC per
  coordinate. Here they are drawn per coordinate, as in the standard SCA.
* **Updated coordinates are clamped to `[lb, ub]`.** The original does not
  say how it handles coordinates that leave the box.
* **Best-particle tracking is this design's mechanism.** The original
  describes it as sorting. Here it is a running minimum with one copy per
  iteration.
* **Initialisation is slower than the original's picture.** The original
  shows a particle initialised and evaluated in two cycles. Here a particle
  takes `d` cycles, because the fitness module takes one coordinate per
  cycle.
* **The fixed-point formats, the LFSR polynomial, the register map and the
  quadrant folding in the CORDIC** are all this design's choices. So are the
  ways cos, sqrt and exp are computed for f7–f9.
* **Ackley has no outer sum.** The expression printed for f7 wraps the
  Ackley formula in an extra sum over the dimensions. Here it is the usual
  Ackley function. The minimum is 0 either way.
* **TDOA returns the cost, not its reciprocal.** The original states the
  fitness as `1/J`, to be maximised. Here the engine minimises `J` itself.
  TDOA is one more function code of the fitness module, with four anchors.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | checks |
|---|---|
| `hsca_lfsr_tb` | sequence against a bit-serial polynomial model, seeding, hold, bit balance |
| `hsca_cordic_tb` | sin/cos against `$sin`/`$cos` over [0, 2π] at 4 and 16 rotations; latency; throughput |
| `hsca_fitness_tb` | all ten functions and the TDOA cost against floating-point formulas; tags; latency of each kind; `busy`; saturation |
| `hsca_tdoa_fitness_tb` | cost against a floating-point model for 3-D and 2-D particles, back to back and with gaps; zero cost at the true target; latency; `busy` |
| `hsca_init_tb` | every row against an LFSR model; bounds; stream order and flags; `n·d + 2` cycles |
| `hsca_update_tb` | every updated coordinate against the update formula in floating point; clamping at both bounds; sin and cos branches; timing |
| `hsca_pop_mem_tb` | random traffic on all ports against a reference array |
| `hsca_axil_regs_tb` | all registers; start refused while busy and for each bad configuration; sticky done; AXI response hold rules |
| `hsca_axis_out_tb` | packet order; TLAST; data held under random back-pressure; trigger ignored mid-packet |
| `hsca_core_tb` | best fitness recomputed from the best particle; monotone best; convergence on f1, f10 and TDOA; runs of f7–f9; exact cycle counts for every latency; divider wait; `T = 0` |
| `hsca_top_tb` | end to end at the default sizes through AXI4-Lite and AXI4-Stream (details below) |

`hsca_top_tb` first runs 30 × 30 × 1000 on f1, which converges to about
2·10^-4. It then runs shorter jobs on f2–f10. It also runs a TDOA
localisation with 100 particles, with the anchors written over AXI4-Lite,
which must find the target. One iteration with the largest population
and dimension count, 512 × 256, checks the full memory size. It counts that every mechanism occurs at least
once:

* sin and cos updates;
* clamping at both bounds;
* `r1` at or above 1, and below 1;
* best-particle replacement;
* fitness saturation;
* a wait for the divider;
* stream back-pressure;
* a start refused while busy;
* a wait for the fitness module to empty;
* starts refused for a bad configuration.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/hsca_pkg.sv tb/hsca_top_tb.sv \
          -y rtl --top-module hsca_top_tb -o sim && ./obj_dir/sim
```

The end-to-end test takes about 30 seconds including the build. SystemVerilog
assertions cover the AXI hold rules, the CORDIC/delay-line alignment and the
exclusive use of the fitness module. The `assert property` lines use
`disable iff (!rst_n)` next to asynchronously reset flops, and Verilator
reports this as `SYNCASYNCNET`. This is expected.

Not verified: timing closure and resource use on an FPGA. The memories'
mapping to block RAM has not been tried on a vendor tool.
