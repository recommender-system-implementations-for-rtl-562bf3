# Matrix-factorization recommender in hardware: a training engine and a prediction parallel circuit

A collaborative-filtering recommender built on matrix factorization keeps
its knowledge in two dense matrices: **P**, one row of *K* latent factors per
user, and **Q**, one row of *K* factors per item. The predicted rating of
user *u* for item *i* is the dot product

    r^(u,i) = sum_k P[u][k] * Q[i][k]

Training finds P and Q from the known ratings. Serving a recommender means
evaluating that dot product for very many (u, i) pairs.

This repository holds single-precision floating-point RTL for both jobs:

* **`ppc_top` – prediction parallel circuit (PPC).** It evaluates NPE
  predictions at once. It has two levels of parallelism. Inside one
  prediction element, the K factor products are formed by K multipliers
  working in parallel, and K/2 adders sum them. Across the circuit, NPE
  elements sit side by side, so the circuit holds NPE·K multipliers and
  NPE·K/2 adders. By default it is sized for a 20-user × 5-item test model
  with K = 2 and 100 elements, so one batch predicts the whole rating
  matrix.
* **`mf_sgd_engine` – training engine.** It learns P and Q by alternating
  stochastic gradient descent over a stored list of ratings. By default it
  is sized for MovieLens-100K: 943 users, 1,682 items and 100,000 ratings,
  with K = 2.

`recsys_top` places the two side by side. They are independent designs,
each sized for its own dataset, and there is no connection between them. A
host that wants to serve a trained model loads the engine's P and Q into the
PPC.

## Number format

All arithmetic is IEEE-754 single precision (`ppc_pkg::fp32_t`, a packed
struct of sign, exponent and fraction). It is done by two operator modules:

| module   | operation | latency | throughput |
|----------|-----------|---------|------------|
| `fp_mul` | a × b     | 1 cycle (combinational core, output register) | 1 per cycle |
| `fp_add` | a + b     | 1 cycle | 1 per cycle |

Rounding is to nearest, ties to even. These are deliberate simplifications:

* Subnormal inputs are read as zero, and results below the normal range
  flush to a signed zero.
* Overflow gives ±infinity.
* Any NaN result is the quiet NaN `0x7FC00000`.
* In the adder, an exact cancellation gives +0.

Within the normal range, results are bit-exact with IEEE single precision.
The testbenches check this against double-precision arithmetic that is
rounded back to single precision.

Each operator holds its output until the next `in_valid`. The controllers
rely on this: a result stays available as an operand for later steps.

## Prediction parallel circuit

### Prediction element (`ppc_pe`)

```
 p_row[0] q_row[0]   p_row[1] q_row[1]          stage 1: K fp_mul
      \   /               \   /
     fp_mul              fp_mul
          \              /
            \          /
              fp_add                            stage 2: K/2 fp_add
                |
               pred
```

With the default K = 2 the element is a two-stage pipeline:

* Products are registered at the first edge.
* The sum is registered at the second edge.
* `out_valid` rises two cycles after `in_valid`.
* A new pair can enter every cycle, and `in_ready` is constant 1.

With K > 2, K/2 adders cannot finish a K-term sum in one step. The element
therefore mixes parallel and sequential addition:

1. The first adder pass adds the products in pairs.
2. Each later cycle feeds the adders' own registered outputs back in pairs.
   This halves the number of partial sums each time; an odd leftover is
   added to +0.
3. The result appears 1 + ceil(log2 K) cycles after `in_valid`. That is 3
   cycles for K = 4 and 4 cycles for K = 6.

While an operation is in flight, `in_ready` is low. An assertion flags an
`in_valid` that arrives while the element is not ready.

The summation order is fixed: (p0q0 + p1q1) + (p2q2 + p3q3) + .... A software
model must use the same order to match bit for bit.

### Model storage (`factor_mem`)

P and Q each live in a register file (`factor_mem`) with NPE combinational
read ports, one per element. In the same cycle that a batch is presented,
every element reads the user row and item row it needs. The host loads one
factor per clock through the write port (`wr_row`, `wr_col`, `wr_data`). The
new value is seen by reads after that edge. Reset clears the matrix to +0.

### Interface and timing of `ppc_top`

| signal | meaning |
|--------|---------|
| `p_wr_*`, `q_wr_*` | load one factor of P or Q per cycle |
| `req_valid` / `req_ready` | a batch of NPE requests is accepted at an edge where both are high |
| `req_user[n]`, `req_item[n]` | the (u, i) pair that element n predicts |
| `resp_valid` | one-cycle pulse, 1 + ceil(log2 K) cycles after acceptance |
| `resp_pred[n]` | prediction of element n |

All elements share one start signal and run in lock step; an assertion
checks this. With K = 2, batches can be streamed one per cycle. A model
write at the same edge as a batch only affects later batches. To use fewer
than NPE elements, put don't-care pairs on the spare elements.

## Training engine

### Algorithm

Each training iteration makes two passes over all known ratings (u, i, r):

    user pass:  e = r - P[u]·Q[i];   P[u][k] += gamma * (e*Q[i][k] - lambda*P[u][k])
    item pass:  e = r - P[u]·Q[i];   Q[i][k] += gamma * (e*P[u][k] - lambda*Q[i][k])

The user pass updates only P and the item pass updates only Q. This is the
alternating form that allows the per-user and per-item loops to be done in
parallel. The update is the gradient step of the regularised squared error.
Each pass recomputes the error from the current model.

### Why one sorted list serves both passes

The rating list is stored once, sorted by user and then by item, and each
pass walks it from start to end. This is enough for both passes:

* In the user pass Q is constant. The final value of P[u] depends only on
  the order of user u's own ratings, and the list is sorted by user.
* In the item pass P is constant. Q[i] depends only on the order in which
  item i's ratings are visited. Walking a list sorted by user visits them in
  increasing user order, which is what a loop "for each user that rated
  item i" does.

So walking one list per pass gives every row exactly the sequence of updates
that separate per-user and per-item loops would give it.

### Datapath and schedule

All K factors of a rating are processed at once. The datapath has:

* one `ppc_pe` for the dot product;
* one `fp_add` for the error;
* per factor, the lanes `e*x`, `lambda*y`, their difference, the `gamma*`
  scaling and the final add.

That is 3K multipliers and 2K + 1 adders besides the dot product. Here x is
the fixed vector and y is the one being updated: x is Q and y is P in the
user pass, and the other way round in the item pass.

One rating takes 11 cycles:

| state | action |
|-------|--------|
| FETCH | read rating entry {user, item, r} |
| ROWS  | read P[u] and Q[i] into registers |
| DOT, DOTW ×2 | dot product in `ppc_pe` |
| ERR   | e = r − dot (r, an integer 0..7, converted to fp32 in hardware) |
| MUL   | e·x_k and λ·y_k for every k |
| SUB   | e·x_k − λ·y_k |
| SCALE | γ·(…) |
| UPD   | y_k + γ·(…) |
| WB    | write the new row back |

One iteration of N ratings therefore takes 22·N cycles: 2,200,000 cycles for
MovieLens-100K. `done` pulses 22·N·iterations + 1 cycles after the `start`
edge (as sampled by the testbench).

### Host interface

While the engine is idle, the host writes through
`host_we`/`host_sel`/`host_addr`/`host_col`/`host_wdata`:

* `host_sel` = 0 selects P and `host_sel` = 1 selects Q; one factor per
  write.
* `host_sel` = 2 selects the rating list. The entry is
  `{user, item, rating[2:0]}` packed into the low bits of `host_wdata`.

Writes while `busy` is high are ignored. To run, set `cfg_num_ratings`,
`cfg_iters`, `cfg_gamma` and `cfg_lambda` (fp32), then pulse `start`. `busy`
is high until `done` pulses. With zero ratings or zero iterations, `done`
pulses at once. `host_re` returns one factor of P or Q on `host_rdata` one
cycle later.

The initial random P and Q are the host's job. The P, Q and rating memories
are plain arrays without reset, meant to map onto block RAM.

## What is taken from the source design and what is not

Taken from the source design:

* The PPC's two levels of parallelism, its operator counts (K multipliers
  and K/2 adders per element) and the mix of parallel and sequential
  addition.
* The 20 × 5 test model with K = 2, and NPE in the range 30–100.
* The training algorithm's alternating user and item loops, a fixed
  iteration count, and the MovieLens-100K sizes.

Choices made here:

* The single-precision format details listed above.
* One register stage per operator.
* The load and request ports and the batch handshake.
* NPE = 100 as default.
* K = 2 for the training engine.
* The sequential walk over ratings, with only the factor loop unrolled.
* The sorted-list storage.

Departures and limits:

* **Update rule.** The source's printed equations for the SGD step read
  `P[u][k] += gamma*(e*P[u][k] - lambda*Q[i][k])`, with the two vectors the
  other way round from the gradient of the error function the same source
  minimises. This design uses the gradient form shown above. To get the
  printed form, swap `x_vec` and `y_vec` in the `b` operands of the `u_ex`
  and `u_ly` multipliers in the `g_lane` block of `mf_sgd_engine`.
* **Training parallelism.** The engine processes one rating at a time. A
  design that trains several users or items at once would replicate the
  datapath; it is not built.
* **Model delivery.** There is no memory hierarchy or bus between a host
  and the PPC beyond plain load and request ports.
* **Datasets.** Larger datasets (Kaggle Movies with 9,000 items,
  MovieLens-1M, Netflix) need larger `NUM_USERS`, `NUM_ITEMS` and
  `MAX_RATINGS`. Netflix's 100 M ratings (about 3.7 Gbit) do not fit on chip
  at all.

## Files

| file | contents |
|------|----------|
| `rtl/ppc_pkg.sv` | `fp32_t`, constants, default sizes |
| `rtl/fp_mul.sv`, `rtl/fp_add.sv` | single-precision operators |
| `rtl/ppc_pe.sv` | prediction element |
| `rtl/factor_mem.sv` | P / Q register file with NPE read ports |
| `rtl/ppc_top.sv` | prediction parallel circuit |
| `rtl/mf_sgd_engine.sv` | training engine |
| `rtl/recsys_top.sv` | top level, both circuits side by side |
| `tb/fp_ref_pkg.sv` | reference arithmetic (double precision rounded to single) |
| `tb/tb_*.sv` | one self-checking testbench per block |
| `tb/pe_check.sv` | driver and checker used by `tb_ppc_pe` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops, and has a
watchdog. Build and run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_recsys_top \
  -y rtl -y tb +libext+.sv rtl/ppc_pkg.sv tb/fp_ref_pkg.sv tb/tb_recsys_top.sv
obj_dir/Vtb_recsys_top +verilator+rand+reset+2
```

| testbench | what it covers | size |
|-----------|----------------|------|
| `tb_fp_mul`, `tb_fp_add` | 20,000 random and directed operand pairs each, one-cycle latency | – |
| `tb_ppc_pe` | K = 2 (pipelined), K = 4 and K = 6 (adder reuse), exact latency | – |
| `tb_factor_mem` | reset, random writes, all read ports, ignored out-of-range writes | 20 × 2, 8 ports |
| `tb_ppc_top` | full 20 × 5 batch, streamed batches, model rewrites | defaults |
| `tb_ppc_top_k6` | K = 6, 30 elements: batches stalled by `req_ready` | K = 6 |
| `tb_mf_sgd_engine` | training against a software replay, cycle count, zero-iteration run | 8 users, 6 items, 30 ratings |
| `tb_recsys_top` | whole design at its defaults: PPC batches, and one training iteration over 100,000 MovieLens-100K-shaped ratings, read back and compared | defaults |

`tb_recsys_top` runs about a minute; the others take seconds.

## Changing the design

* **PPC sizes.** `NPE`, `K`, `NUM_USERS` and `NUM_ITEMS` on `ppc_top` (or
  `NPE`, `PPC_K`, `PPC_USERS`, `PPC_ITEMS` on `recsys_top`). Index widths
  follow from the sizes.
* **Training sizes.** `K`, `NUM_USERS`, `NUM_ITEMS` and `MAX_RATINGS` on
  `mf_sgd_engine` (`TRN_*` on `recsys_top`). The host address is as wide as
  the widest of the three indices.
* **Pipelining the operators.** Deeper `fp_mul`/`fp_add` pipelines would
  need the PE's level tracking and the engine's state sequence lengthened to
  match. Both currently assume a one-cycle operator latency.
