# Data-mining accelerators: continuous-update K-means and similarity-distance arrays

Clustering spends nearly all of its time on two things: measuring the distance
between every data sample and every cluster centre, and recomputing the
centres. This repository holds synthesizable SystemVerilog for hardware that
attacks both:

* a **K-means engine for one-dimensional data** that updates the two affected
  centroids immediately after every element that changes cluster, and that
  does so without a divider: every division by a cluster population is
  replaced by a right shift by the logarithm of the nearest power of two;
* a family of **processor arrays for Manhattan distance matrices**
  `D(k,n) = sum_m |X(m,n) - Y(k,m)|` between `N` samples `X` and `K`
  reference samples `Y` of `M` features. They all come from one
  three-dimensional computation domain `(k, m, n)`. Each array is that domain
  under a chosen time schedule and a projection onto processors: six 2-D
  arrays, five linear arrays, and one scalable array whose size `wk x wn`
  does not depend on `K`, `M` or `N`.

All engines run from one clock and one synchronous, active-low reset
(`rst_n`). They share no data. The top level `dm_accel_top` places one of
each side by side.

## 1. The K-means engine (`km1d_top`)

### Algorithm

The dataset `e[0..n-1]` starts in a random partition chosen by the host. The
host loads every element and its label, plus each centroid and its
population. A *pass* then streams every element through the datapath once.
For element `e` with current label `src`:

1. `dest = argmin_j |e - c_j|`;
2. if `dest != src`: `n_src -= 1`, `n_dest += 1`, relabel the element, and
   update both centroids at once:

   ```
   c_src  += (c_src - e)  / n_src        (n_src after the decrement)
   c_dest += (e - c_dest) / n_dest       (n_dest after the increment)
   ```

These are the exact recursive forms of "mean after removing / adding one
element". The engine repeats passes until one moves no element, or until
`MAX_ITER` passes have run. Because the centroids move after every element
rather than once per pass, the engine usually needs fewer passes than the
textbook algorithm. The price is more updates per pass.

### Division by shifting

`x / n` becomes `x >>> p`, where `2^p` is the power of two nearest to `n`.
The interval that rounds to `2^k` is `[3*2^(k-2), 3*2^(k-1))`, so `p` comes
from comparing `n` against those bounds (a tie rounds up; `n = 1` gives
`p = 0`). The shift is arithmetic, and the sum saturates to the data range.
The error comes from the rounding: at most a factor between 2/3 and 4/3 on
the step size. It is largest for small clusters and fades as clusters grow.
If a move empties its source cluster (`n_src = 0`), that centroid is left
unchanged.

### Pipeline

```
 e_mem/l_mem ──read──► km_dist_calc ──► km_min_dist ──► km_count_unit ──► km_centroid_update
   (1 clk)              (1 clk)       (ceil(log2 K) clk)   (1 clk)           (3 clk)
                                            │                                    │
             label write-back ◄─────────────┘          centroids c[0..K-1] ◄─────┘
```

* `km_dist_calc` has one `|e - c_j|` unit per cluster, and a register after them.
* `km_min_dist` is a tree of two-input comparators with a register after each
  level. The element and its old label travel with it. On a tie the lower
  index wins.
* `km_count_unit` holds the `K` populations. It decrements `n_src` and
  increments `n_dest` when the label changes, and passes the updated counts
  on.
* `km_centroid_update` runs in three stages: round the counts and form the
  differences; shift; add and write back.

One element enters per clock. **The subtle point is staleness.** An element
reads the centroids when it enters `km_dist_calc`. The updates from the
elements just ahead of it are still in the pipeline. So an element can see
centroids that are up to about `log2 K + 5` updates old. This is the nature
of a pipelined continuous update. It does not stop convergence, because a
pass ends only when a whole pass moved nothing.

Labels are written back when the compare tree delivers `dest`. Each element
is read once per pass, so a label is never read while its new value is still
in flight. `changed` is collected over the pass. After the last element, the
controller lets the pipeline drain and then decides.

### Timing and use

* A pass takes `n + ceil(log2 K) + 7` clocks: `n` issue clocks, then the
  drain and the decision. For 400,000 pixels and `K = 8`, that is 400,010
  clocks, or 3.3 ms per pass at 121 MHz.
* Loading: while `busy` is low, write `ld_e_we/ld_addr/ld_e/ld_l` for each
  element and `ld_c_we/ld_k/ld_c/ld_n` for each cluster. Then set `n_elems`
  and pulse `start`. Writes are ignored while the engine is busy, and an
  assertion flags them.
* Result: `done` pulses for one clock. After that, `converged`, `iterations`,
  `centroids` and `counts` are valid, and `rd_addr -> rd_label` reads any
  label combinationally.

Defaults: `K = 8`, 8-bit data, `N_MAX = 400,000`, `MAX_ITER = 64`. The
element and label memories are plain arrays. Synthesis maps them to RAM.

## 2. Distance matrices: one domain, many arrays

Every design below computes `D(k,n) = sum_m |X(m,n) - Y(k,m)|`, where
`X` is `M x N` and `Y` is `K x M`. Each point `(k,m,n)` of the domain needs
`X(m,n)` (shared by all `k`), `Y(k,m)` (shared by all `n`), and the partial sum
for `(k,n)` (carried along `m`). A *schedule* gives each point a time step. A
*projection* gives it a processor. An input that does not move between
processors is *local*. One that reaches all processors along a line in the
same clock is *broadcast*. One passed from one processor to the next is
*pipelined*.

| module | array | projection | X | Y | D | clocks |
|---|---|---|---|---|---|---|
| `pa2d_design1` | `K x M` | along n | pipelined in time (skewed), broadcast along k | local | pipelined along m | `N + M - 1` |
| `pa2d_design2` | `K x M` | along n | skewed, then pipelined along k | local | pipelined along m | `K + M + N - 2` |
| `pa2d_design3` | `K x N` | along m | broadcast along k | broadcast along n | local | `M` |
| `pa2d_design4` | `K x N` | along m | skewed, broadcast along k | pipelined along n | local | `M + N - 1` |
| `pa2d_design5` | `K x N` | along m | pipelined along k | skewed, broadcast along n | local | `K + M - 1` |
| `pa2d_design6` | `K x N` | along m | skewed, pipelined along k | skewed, pipelined along n | local | `K + M + N - 2` |
| `lin_design1` | `K` | `(m,n)` folded, `t = m + M*n` | broadcast | one per PE | local | `M*N` |
| `lin_design2` | `K` | `(m,n)` folded, `t = n + N*m` | broadcast | one per PE | N partial sums per PE | `M*N` |
| `lin_design3` | `M` + adder tree | `(k,n)` folded, `t = k + K*n` | one per PE | one per PE | adder tree | `K*N` |
| `lin_design5` | `N` | `(k,m)` folded, `t = m + M*k` | one per PE | broadcast | local | `K*M` |
| `lin_design6` | `N` | `(k,m)` folded, `t = k + K*m` | one per PE | broadcast | K partial sums per PE | `K*M` |
| `sd_scalable_array` | `wk x wn` | k mod wk, n mod wn | broadcast along j | broadcast along i | local | `ceil(K/wk)*ceil(N/wn)*M` |

The clocks column is the exact number of time steps from the first input to
the last result, i.e. the span of the schedule. Rounded complexity figures
such as `M + N` or `K + M + N` for the skewed arrays are one or two steps
higher than these exact counts.

Most of these arrays are built from a few processing elements:

* `sd_acc_pe`: `d <= (first ? 0 : d) + |x - y|` on every enabled clock.
  It is used by `pa2d_design3`, `lin_design1`, `lin_design5` and the
  scalable array.
* `pa2d_d1_pe`: a stored `Y` value and `d_out <= d_in + |x - y|`. It is
  used by `pa2d_design1`. `pa2d_d2_pe` adds a register that passes `x` on.
  It is used by `pa2d_design2`.
* `pa2d_pipe_pe`: the same accumulator, plus registered copies of `x`, `y` and the
  step flags for the next PE. It is used by `pa2d_design4` to `pa2d_design6`.
* `sd_bank_pe`: an accumulator with a bank of `R` partial sums, addressed by
  the sample being visited. It is used by `lin_design2` and `lin_design6`.

`lin_design3` uses a purely combinational `sd_absdiff_pe`. `sd_skew` is the
triangle of delay registers that gives lane `i` a delay of `i` clocks.

### 2-D arrays

**`pa2d_design1`: many samples (`N >> K, M`).** PE(k,m) holds `Y(k,m)`. It
is loaded once through `y_we/y_k/y_m/y_in`. A whole sample `X(.,n)` is
presented in one clock (`x_valid`, `x_col`). Row `m` delays its value by `m`
registers, `M(M-1)/2` in total, so that `X(m,n)` reaches row `m` at time
`m + n`. Partial sums flow from `m = 0` to `m = M-1`. Column `n` of `D`
appears on `d_col` with `d_valid`, `M - 1` clocks after the sample was taken.
A new sample can enter every clock. Defaults: `K = 2`, `M = 72`, 16-bit
features. This is gene-based clustering of a 72-sample microarray set.

**`pa2d_design2`** is the same `K x M` array, but `X` is not broadcast down
the `k` axis. It enters PE(0,m) and moves one PE per clock, so PE(k,m)
works at `k + m + n`. Row `k` of the result is `k` clocks later than row 0,
and it has its own `d_valid[k]`. This costs one register per PE and `K - 1`
extra clocks. In return, no signal fans out to `K` PEs.

**`pa2d_design3`: few samples with very many features (`M >> K, N`).**
There is one accumulating PE per output element. At step `m` the caller
presents the row `X(m, 0..N-1)` and the column `Y(0..K-1, m)`, and marks the
first and last step. The finished `K x N` matrix appears one clock after the
last step. Defaults: `K = 2`, `N = 72`, `M = 7129`. This is sample-based
clustering of the same data.

**`pa2d_design4`, `pa2d_design5`, `pa2d_design6`** have the same interface
and the same local accumulators. They replace one or both broadcasts with
pipelining:

* #4 pipelines `Y` along `n`, so column `n` runs `n` clocks late, and `X` is
  skewed to match;
* #5 pipelines `X` along `k`, and `Y` is skewed by row;
* #6 pipelines both, so PE(k,n) runs `k + n` clocks late.

The step flags (`in_valid`, `first`, `last`) travel with the pipelined data.
Each PE therefore pulses its own `dv[k][n]` when its sum is complete, and
`d_valid` is the pulse of the last PE. Matrices may follow back to back.
Read each PE on its `dv`, because it starts the next matrix one clock later.

### Linear arrays

* **`lin_design1`** (`K` PEs): `X(m,n)` is broadcast one value per clock,
  `m` fastest. PE `k` receives `Y(k,m)` in the same clock. After `M` values,
  `d_valid` pulses with the `K` distances of sample `n`. Samples can follow
  back to back, and `in_valid` may pause at any time. Defaults: `K = 16`,
  `M = 16`. This is the Bridge image set: 4,096 samples take 65,536 clocks,
  112 µs at 586 MHz.
* **`lin_design3`** (`M` PEs): all `M` features of one `X` sample and one
  `Y` sample enter together. `M` absolute differences and a
  `ceil(log2 M)`-level adder tree produce one distance per clock, registered
  once at the output. The caller chooses the order of the `(k,n)` pairs. For
  example, `n` outer and `k` inner keeps `X` fixed for `K` clocks.
* **`lin_design5`** (`N` PEs): the mirror image of `lin_design1`. `Y(k,m)`
  is broadcast, and PE `n` receives `X(m,n)`. It suits high-dimensional data
  with few samples. Defaults: `N = 72`, `M = 7129`.
* **`lin_design2`** and **`lin_design6`** are `lin_design1` and
  `lin_design5` with the loop order swapped: the sample index (`n`, or `k`
  for #6) runs fastest and the feature index runs slowest. Each PE must then
  keep one partial sum per sample, in a bank of `N` (or `K`) entries. Results
  come out during the last feature sweep, one sample per clock, tagged by
  `d_n` (or `d_k`). The time is the same as for #1 and #5, and the storage
  is much larger.

### The scalable array (`sd_scalable_array`, `sd_tile_sched`)

The `K x N` broadcast array of `pa2d_design3` is exact, but it grows with the
data. The scalable array folds it onto `wk x wn` PEs. PE `(i,j)` computes
every `D(k,n)` with `k mod wk = i` and `n mod wn = j`. The domain is cut into
tiles of `wk` reference samples by `wn` samples, and `sd_tile_sched` issues
one step per clock in this order:

```
t = m + M*kt + M*ceil(K/wk)*nt        kt = floor(k/wk), nt = floor(n/wn)
```

So `m` runs fastest, then the `k` tile, then the `n` tile. A tile is
complete after `M` consecutive steps. Then `tile_valid` pulses, and `tile_d`
holds its `wk x wn` distances, tagged `tile_kt`, `tile_nt`. Each clock the
array reads only `wn` values of `X` and `wk` values of `Y`, whatever `K`,
`M` and `N` are.

Memory interface: on a clock with `rd_en` high, the array asks for feature
`rd_m` of tiles `rd_kt` and `rd_nt`. `x_in[j]` must then carry
`X(rd_m, rd_nt*wn + j)`, and `y_in[i]` must carry `Y(rd_kt*wk + i, rd_m)`,
one clock later (a synchronous RAM read). For a partial last tile, the
positions outside `K` or `N` compute garbage that the user ignores. `done`
pulses with the last tile, `ceil(K/wk)*ceil(N/wn)*M + 1` clocks after
`start` was taken.

Defaults: `K = 26`, `M = 16`, `N = 20,000`, `wk = 13`, `wn = 2`, and 4-bit
features. This is the UCI letter-recognition set. One pass takes 320,000
clocks, 455 µs at 704 MHz. For other shapes, change `SA_WN`/`SA_WK`: `wn = 4`
halves the time and doubles the PEs.

## 3. Top level (`dm_accel_top`)

The top has one instance of each engine, with the port prefixes `km_`,
`p1_` to `p6_`, `l1_`, `l2_`, `l3_`, `l5_`, `l6_` and `sa_`. Each engine's parameters are
brought up with the same prefix, and the defaults are the sizes listed
above. At the defaults, the largest storage is the K-means element and label
memory: 400,000 x (8 + 3) bits.

## 4. Where this RTL departs from, or adds to, the original design

* **Chosen here, not given by the design:** data widths (8-bit pixels,
  16-bit microarray values, 8-bit Bridge features); the load and read ports;
  the reset; the start/busy/done handshakes; the `first`/`last` framing of
  the accumulating arrays; the scalable array's one-clock memory interface
  and tile tags; the K-means rules for ties (lower index wins), for rounding
  ties (round up), for empty clusters and for saturation; and `MAX_ITER`.
* **K-means pipeline:** the split into units and the stage counts follow the
  design. Staleness (Section 1) is accepted rather than stalled. The
  original stage count is 5 + `log2 K` stages. Here a memory read stage
  is added in front, and a drain-and-decide period at the end of each pass.
* **Scalable array order:** steps run in the order `m`, then `k` tile, then
  `n` tile.
* **Covered by existing modules:** linear Design #4 differs from Design #3
  only in the order of the `(k,n)` pairs (`k` outer), and `lin_design3`
  takes the pairs in any order. The two 2-D arrays for `K >> M, N` are
  `pa2d_design1`/`pa2d_design2` with the roles of `X` and `Y` exchanged. Use
  them with `K` and `N` swapped, and read the result transposed.
* **Not included:** the conventional K-means (with a divider and an update
  once per pass), and the earlier arrays that were only used for comparison.
  One of those is `lin_design1` with `X` passed from PE to PE instead of
  broadcast (schedule `[1 1 M]`). It needs `K - 1` more clocks and a
  triangle of delay registers on `Y`.

## 5. Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module with a model written independently in the testbench, checks latencies
and cycle counts, prints `TB_RESULT checks=<n> failures=<n>`, and has a
watchdog.

| testbench | what it shows |
|---|---|
| `tb_km_dist_calc`, `tb_km_min_dist`, `tb_km_count_unit`, `tb_km_centroid_update` | unit behaviour: distances, ties, compare-tree latency, counts, power-of-two rounding and shift arithmetic, back-to-back updates |
| `tb_km1d_top` | full clustering runs: convergence, every label equal to the nearest final centroid, populations equal to the label histogram, pass length `n + log2 K + 7` |
| `tb_sd_acc_pe`, `tb_pa2d_d1_pe` | the two PEs |
| `tb_pa2d_design1` to `tb_pa2d_design6`, `tb_lin_design1`, `tb_lin_design2`, `tb_lin_design3`, `tb_lin_design5`, `tb_lin_design6` | every distance, the output latency (per row or per PE where it differs), the total clocks, back-to-back matrices, and input gaps |
| `tb_sd_tile_sched`, `tb_sd_scalable_array` | the schedule order, a partial edge tile, every distance, one tile per `M` clocks, total `ceil(K/wk)*ceil(N/wn)*M` |
| `tb_dm_accel_top` | all thirteen engines at once at small sizes. It counts each mechanism and fails if one never happens: element moves with continuous update, an emptied cluster, repeated passes, convergence, the skewed and pipelined inputs of every 2-D array, broadcast accumulation, banks of partial sums, the adder tree, tiles and a partial tile |
| `tb_dm_accel_full` | the same checks at the default sizes: 40,000 K-means elements, 7,129 microarray samples on 2-D #1 and #2, the `72 x 7129` matrix on 2-D #3 to #6 and linear #5 and #6, the full 4,096-sample Bridge set on linear #1 and #2, 1,024 adder-tree distances, and the whole 20,000-sample letter set (320,000 steps). About a minute of simulation |

| `tb_workload_sizes` | the workload sizes that need other parameters than the defaults, each at full size on random data: K-means with 400,000 elements and `K = 8, 16, 32, 64` run to convergence, linear #1 with 32 and 64 PEs on 4,096 x 16 features, and the scalable array on 20,000 x 16 features with `wn = 4, 8, 16` and with `K = 8, 16, 32`. The harnesses are `km_workload_run`, `lin1_workload_run` and `sa_workload_run`. About 30 seconds |

The two top-level benches share their body, `tb/dm_tb_body.svh`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_km1d_top tb/tb_km1d_top.sv
./obj_dir/Vtb_km1d_top
```

Verilator simulates two states, so every register that is read has a reset.

## 6. Sizes versus the evaluated workloads

| workload | needs | default build |
|---|---|---|
| 1-D image, `K = 8`, 0.4 MPixel | 8 centroids, 400,000 elements | fits. 400,010 clocks per pass |
| same image, `K = 16/32/64` | 16-64 centroids | set `KM_K`. Simulated: converges in 3 passes of 400,011 to 400,013 clocks |
| microarray, gene-based (`K = 2`, `M = 72`, `N = 7129`) | `pa2d_design1`/`2`, 2 x 72 | fits. 7,200 / 7,201 clocks |
| microarray, sample-based (`K = 2`, `N = 72`, `M = 7129`) | `pa2d_design3` to `6`, 2 x 72, or `lin_design5`/`6` with 72 PEs | fits. 7,129 to 7,201 clocks, or 14,258 |
| Bridge, `N = 4096`, `M = 16`, `K = 16` | `lin_design1`/`2`, 16 PEs | fits. 65,536 clocks |
| Bridge, `K = 32/64` | 32/64 PEs | set `L1_K`. Simulated: 65,536 clocks |
| letters, `K = 26`, `M = 16`, `N = 20000`, `wk = 13`, `wn = 2` | 26 PEs | fits. 320,000 clocks |
| letters, `wn = 4/8/16`, or `K = 8/16/32` with `wk = K/2` | other array shapes | set `SA_WN` / `SA_K`, `SA_WK`. Simulated: 160,000 / 80,000 / 40,000, or 320,000 clocks |
