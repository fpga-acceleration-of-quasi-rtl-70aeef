# Quasi-random Brownian motion accelerator

Quasi-Monte Carlo pricing of a path-dependent derivative needs many sampled
asset paths. Each path is driven by Brownian motion, and the samples come from
a low-discrepancy sequence instead of a pseudo-random one. This RTL produces
those Brownian paths in hardware. It uses three pipelined stages that run at
the same time:

1. **Sobol generator**: builds an `S = NA x NT`-dimensional Sobol point
   (32-bit uniforms), `NA` dimensions per clock cycle.
2. **Inverse normal CDF (ICDF)**: `NA` lanes turn each uniform into a
   double-precision standard normal draw, `z = Phi^-1(u)`.
3. **Brownian bridge**: `NA` floating-point pipelines (one per asset) build an
   `NT`-step standard Brownian path by bisection. Each interval they refine
   uses one vector of `NA` normal draws.

One Sobol point yields one path for each of the `NA` assets. The lowest Sobol
dimensions feed the bridge's first, largest intervals. Those intervals carry
most of a path's variance, and the low dimensions of a Sobol sequence are the
most uniform.

Default size: `NA = 8` assets and `NT = 512` time steps. That means `S = 4096`
Sobol dimensions and one Gaussian per asset per cycle.

```
 rom load ──► sobol_gen ──(NA x 32 bit)──► icdf ──(NA x fp64)──► brownian_bridge ──► out_w[NA], out_pos
               ▲ ready                      │ in_ready / out_ready     z_valid/z_ready
               └────────────────────────────┘
```

## Sobol generator (`sobol_gen`)

The generator uses the Gray-code (Antonov-Saleev) form of the Sobol sequence.
Point `n` follows from point `n-1` with one XOR per dimension:

    x_n[j] = x_(n-1)[j] XOR v_k[j],   k = bit where gray(n) and gray(n-1) differ

Here `gray(n) = n ^ (n >> 1)`, and `k` is the number of trailing zeros of `n`.

One point of `S` dimensions takes `C = S/D` cycles ("cycles per vector").
The generator produces `D` dimensions per cycle, and `qmc_top` sets `D = NA`.
It has two memories:

* **Direction-vector ROM**: `C x W` words of `D x W` bits.
  - Word `cpv*W + k` holds `v_k` for dimensions `cpv*D .. cpv*D+D-1`.
  - Dimension `cpv*D + l` sits in bits `[l*W +: W]`.
  - The vectors are computed off-line, so any choice of primitive polynomials
    and initial values works. They are written through `rom_we`, `rom_addr`
    and `rom_wdata` before a run.
* **State RAM**: `C` words of `D x W` bits. It holds the previous point.

The pipeline has six stages:

1. A cycle counter `cpv` runs `0..C-1`, and its terminal count advances `n`.
2. The Gray codes of `n` and `n-1` are XORed, which gives a one-hot vector.
3. The one-hot vector is converted to the binary index `k`.
4. The ROM address is `base + k`. The base accumulates `W` on every cycle of
   a point.
5. The ROM and the state RAM are read.
6. The XOR of the two is registered as `dout` and written back to the state
   RAM.

The RAM word for point `n-1` is read again `C` cycles later, so `C` must be
larger than 3. This is checked at elaboration. The state of point 0 is zero:
the RAM read is masked while `n = 1`.

`ready` is a clock enable for the whole pipeline. The ICDF uses it to stall
the generator.

## Inverse normal CDF (`icdf`)

Each 32-bit input is read as `u = din / 2^32`. Each lane does the following:

* **Range reduction** (`icdf_range_reduce`):
  - It folds `u` about 0.5, using `Phi^-1(1-u) = -Phi^-1(u)`, so only
    `(0, 0.5]` needs to be approximated.
  - It then sorts the folded value `a` into one of three cases:
    - **central**: `a` is in `[2^-12, 0.5)`. This range is split into
      `M = 11` octaves `[2^-(i+2), 2^-(i+1))`. Each octave is split into
      `2^R = 64` equal segments.
      - The segment is `rom_idx = i*64 + j`.
      - The offset inside it is `t` in `[0,1)`, which is exact as a double.
    - **tail**: `a` is below `2^-12`.
    - **exactly 0.5**: gives `z = 0`.
  - Input 0 is treated as `2^-32`.
* **Central evaluation**:
  - A cubic (`KC = 3`) per segment.
  - Coefficient ROM (`icdf_coeff_rom`): dual-port, one per two lanes.
  - Fully pipelined Horner evaluator (`icdf_central`): one result per cycle per
    lane, with 3 multiplier/adder pairs.
* **Tail evaluation** (`icdf_tail`):
  - In the tail, `Phi^-1` is smooth in `y = ln(-ln a)`.
  - One multi-cycle unit serves all lanes. It computes `ln a`, then
    `y = ln(-ln a)`, then a degree-7 (`KT = 7`) polynomial in `y - y_c`.
  - It uses one logarithm unit (`fp64_log`), one adder and one multiplier.
  - It takes 239 cycles per value.
  - Tail inputs occur with probability `2 x 2^-12 = 1/2048` for uniform input.
    One unit therefore keeps up with up to 2048 lanes on average.
* **Tail plumbing**:
  - Tail inputs wait in a per-lane FIFO.
  - A round-robin arbiter (`icdf_tail_arbiter`) picks one lane at a time.
  - Results come back through a demultiplexer to the lane, tagged with the
    lane number.
* **Merge** (`icdf_merge`):
  - Puts results back in input order.
  - An order FIFO holds each vector's central values and which lanes need a
    tail result. Per-lane FIFOs hold tail results.
  - A vector leaves only when all its tail results have arrived. While it
    waits, the order FIFO fills, `in_ready` drops, and the ICDF and the Sobol
    generator stall.
  - The order FIFO holds 256 vectors, more than the tail latency, so a single
    tail evaluation does not stall the input.
  - The tail FIFOs are sized for every tail input that can be in flight, so
    they never overflow.

Latency without tail inputs is 20 enabled cycles:

| Step | Cycles |
|---|---|
| Range reduction | 1 |
| ROM | 1 |
| Horner evaluation | 18 |

A vector with a tail input waits about 240 cycles longer, and so does every
vector behind it. The input side keeps running while the order FIFO has room.

### Coefficient tables

No coefficient is stored in a file. Every coefficient is computed at
elaboration by `real` functions in `qmc_pkg`:

* **`Phi^-1`**:
  - Start value: Abramowitz-Stegun 26.2.23.
  - Newton steps on `Phi`: 4.
  - `Phi` is computed from its Taylor series for `x > -3.6`. Otherwise it uses
    the continued fraction of the Mills ratio.
* **Central cubics**: interpolate `Phi^-1` at the 4 Chebyshev nodes of each
  segment (in `t`).
* **Tail polynomial**: interpolates at 8 Chebyshev nodes in `y` over
  `[2^-32, 2^-12)`, centred at the midpoint `y_c`.

Chebyshev interpolation is close to the minimax fit. Measured accuracy against
an independent numerical `Phi`:

| Region | Worst relative error |
|---|---|
| Whole ICDF | `7.4e-11` |
| Tail | `3.3e-12` |

Both are below the `1e-10` target.

## Brownian bridge (`brownian_bridge`)

The path `W(t_p)`, with `t_p = p*T/NT`, `W(0) = 0` and `T = T_HORIZON = 1`, is
built by bisection:

1. The endpoint comes first: `W(T) = sqrt(T) Z`.
2. Then each interval `[l, r]` with `r - l >= 2` gets its midpoint `p`:

       W(p) = a W(l) + (1 - a) W(r) + b Z
       a = (t_r - t_p)/(t_r - t_l) = 1/2
       b = sqrt((t_p - t_l)(t_r - t_p)/(t_r - t_l)) = sqrt(h*dt/2),  h = p & -p

Supporting blocks:

* `bb_coeff_rom` holds `a`, `1 - a` and `b` for every position `p`.
  - It is computed at elaboration.
  - Entry `NT` holds the endpoint: `a = 1 - a = 0`, `b = sqrt(T)`.
* `bb_fp_pipe` evaluates the formula with three multipliers and two adders.
  - One result per cycle.
  - Latency 9.
  - `NA` copies run in lock-step.

### Controller

The controller makes one decision per cycle:

* **A result leaves the pipelines**:
  - It is reported on `out_valid`, `out_pos` and `out_w`.
  - Its left half-interval is issued at once, and its right half is queued.
  - If no Gaussian vector is ready, both halves are queued. This needs the
    queue's second write port.
* **Otherwise**: the oldest queued interval is issued when a Gaussian vector
  is ready.
* **Not issued or queued**: intervals of one step have no interior point.

A path is done when the queue is empty and nothing is in flight.

Queue entries and the pipeline's side-band carry the interval ends and the
path values at both ends. The bridge therefore never reads back a path memory.
The queue (`bb_queue`) is `NT/2` deep. That is the number of length-2
intervals, which bounds its occupancy.

Points come out in the order they are computed, not in time order. The
receiver must place them by `out_pos`.

### Timing

| Configuration | Cycles per path |
|---|---|
| `NT = 64`, draws always ready | 109 |
| `NA = 8`, `NT = 512`, first path from `start` (no tail input) | 584 |
| `NA = 8`, `NT = 512`, average over a run that forces one tail evaluation per path | 681 |

The early bisection levels are bound by the 10-cycle issue-to-result
latency. After that the bridge reaches one point per cycle. A result whose
halves are single steps has nothing to issue, so the controller uses that
cycle to issue from the queue. Without this, about half the cycles of the last
level would be idle.

A tail evaluation holds the results behind it for about 240 cycles. The
deep order FIFO keeps the Sobol generator and the ICDF running meanwhile.

## Floating-point units

`fp64_add` and `fp64_mul` are pipelined IEEE-754 double units:

* Latency 3, one operation per cycle.
* Clock enable `en`.
* Round to nearest, ties to even.
* Subnormals are flushed to zero.
* NaN and infinity inputs are not handled; the datapath never makes them.

`fp64_log` is a sequenced natural logarithm:

* It splits off the exponent and looks up a 64-entry table for
  `1/c` and `-ln c`.
* It sums a 9-term series in `r = x/c - 1`, with `|r| < 2^-7`.
* Its own adder and multiplier carry out the steps.
* It takes 89 cycles.

## Top level (`qmc_top`)

| Ports | Purpose |
|---|---|
| `rom_we`, `rom_addr`, `rom_wdata` | Load the direction vectors |
| `start`, `num_paths` | Start a run |
| `busy`, `path_done` | Run status |
| `out_valid`, `out_pos`, `out_w[NA]` | Result points |
| `icdf_tail_issue`, `icdf_tail_wait`, `icdf_stall`, `bb_starved`, `bb_queue_count` | Monitoring |

Parameters:

| Parameter | Meaning | Default |
|---|---|---|
| `NA` | Assets, also the Sobol dimensions per cycle | 8 |
| `NT` | Time steps, a power of two | 512 |
| `W` | Sobol bits | 32 |

The stages are linked by valid/ready handshakes. The result stream has no
back-pressure.

The default build contains:

* A direction-vector ROM of 16384 x 256 bits.
* A state RAM of 512 x 256 bits.
* 8 ICDF lanes with 4 coefficient ROMs of 704 x 4 doubles.
* One tail unit.
* 8 bridge pipelines.

## Where this design departs from, or adds to, the original description

* **Dimensions per cycle**: the number of Sobol dimensions per cycle was open.
  Here it is `NA`.
* **Double clocking**: the coefficient ROMs are not double-clocked. Each
  dual-port ROM serves two lanes.
* **Coefficients**: Chebyshev interpolation is used, not a true minimax fit.
* **Logarithm and bridge arithmetic**: the logarithm and the bridge
  expression are built from plain pipelined add and multiply units. No
  expression-level generator was used.
* **Not included**:
  - double buffering of finished paths;
  - a host interface;
  - a generator for the direction vectors.
* **Own choices**: the exact central/tail boundary (`2^-12`), the FIFO depths,
  the reset behaviour, the start/count control and the ROM load port.

## Simulation

The RTL needs a simulator with `real` constant functions, for example
Verilator 5. Every testbench in `tb/` checks itself and ends with a
`TB_RESULT checks=.. failures=..` line. Example:

    verilator --binary --timing rtl/qmc_pkg.sv $(ls rtl/*.sv | grep -v qmc_pkg) \
              tb/tb_normal_pkg.sv tb/tb_qmc_top.sv --top-module tb_qmc_top
    ./obj_dir/Vtb_qmc_top

(The package must come first on the command line.)

Testbenches:

| Testbench | What it runs |
|---|---|
| `tb_qmc_top` | End to end at `NA = 2`, `NT = 32`, 60 paths |
| `tb_qmc_top_full` | Default size, 3 paths, about 20 s |
| One per module | Each module against an independent reference model |

The end-to-end testbenches:

* Regenerate the Sobol values.
* Recover each Gaussian draw from the reported bridge points.
* Check it against `Phi^-1` of the right Sobol dimension.
* Count each mechanism and fail if any never occurs: tail evaluations, merge
  waits, ICDF back-pressure, the 0.5 case, queue use, and bridge starvation.

At the default size, elaboration spends several seconds computing the
coefficient tables.
