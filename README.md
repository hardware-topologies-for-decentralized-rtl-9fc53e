# Decentralized Newton MIMO uplink detector: ring and star topologies

In a massive-MIMO base station, U users send one symbol each and B antennas
receive `y = H x + n`. The receiver has to estimate `x`. A centralized
detector needs all of `H` (B x U) and `y` in one place. That bandwidth grows
with B, which is the bottleneck this design avoids.

Here the antennas are split into C clusters of BC antennas each. Cluster c
keeps its own slice `H_c` (BC x U) and `y_c` and never sends them anywhere.
The clusters cooperate on a Newton iteration for the least-squares
(zero-forcing) problem:

```
x(t) = x(t-1) - D^-1 * sum_c ( G_c x(t-1) - m_c )
       G_c = H_c^H H_c        (local Gram matrix, U x U)
       m_c = H_c^H y_c        (local matched filter, U)
       D   = sum_c diag(G_c)  (diagonal approximation of the Hessian)
```

Only U-element vectors cross between clusters. These are the partial
gradients, the Hessian diagonal and the current estimate, so link traffic
does not depend on B. One cluster, the *apex*, owns `D` and performs the
update. Before the first iteration every cluster forms its own estimate
`x_c = diag(G_c)^-1 m_c`. The apex uses its own `x_C` as `x(0)`. After T
iterations `x(T)` goes to a 16-QAM slicer.

How the vectors move between clusters is the topology. Two are built:

* **Ring.** The clusters form a one-way chain that closes at the apex. A
  vector pair `(p, q)` travels around it once per iteration, and each cluster
  adds its share on the way. Every link has the same traffic whatever C is.
  Latency, however, grows with C.
* **Star.** Every non-apex cluster has its own two-way link to the apex. All
  clusters work at the same time, and the apex adds up their vectors. Latency
  does not grow with C, but the apex needs C-1 links.

`dn_mimo_top` holds both detectors side by side with separate ports:
`ring_*` and `star_*`. The ring side can be replicated to process N_SC
sub-carriers in parallel.

## Number format

Every real value is a 16-bit two's-complement word in Q4.12, and a complex
value is a pair of such words (`cplx_t`).

* Products are kept at full width and summed in 48-bit accumulators.
* A result is brought back to 16 bits by an arithmetic shift right of 12
  (rounding toward minus infinity) and then saturated.
* Division truncates `num * 4096 / den` toward zero and saturates. A divisor of
  zero or below gives the extreme value with the numerator's sign.

Only the 16+16-bit width comes from the published design. The Q4.12 point and
the rounding rules are this design's own. They assume channel entries scaled
so that a column of `H` has roughly unit energy: `D` then sums to about 1..4
and fits in the 4 integer bits.

All shared types and helpers (`sat`, `requant`, `cmul`, `cadd_sat`) are in
`rtl/dn_pkg.sv`. `W` and `FRAC` are set there.

## What every cluster computes (`dn_cluster_core`)

Apex and non-apex clusters, in both topologies, share one core:

| unit | module | work | cycles |
|---|---|---|---|
| local memory | `dn_local_mem` | BC rows of `H_c` (U entries each) and BC samples `y_c`; one write port; two asynchronous read ports | - |
| Gram matrix | `dn_gram` | all U x U entries of `G_c` plus its real diagonal. One H row per cycle, U² complex multipliers | BC + 1 |
| matched filter | `dn_mf` | `m_c`, one row per cycle, U multipliers | BC + 1 |
| initial estimate | `dn_vdiv` | `x_c = m_c / diag(G_c)`, 2U restoring dividers in parallel (helper `dn_div`) | W + FRAC + 1 = 29 |
| gradient | `dn_grad` | `g = G_c x - m_c`, one column of `G_c` per cycle, U multipliers | U + 1 |

The Gram matrix and matched filter run at the same time from the two memory
read ports.

The channel is constant over a coherence interval, so the Gram matrix is
recomputed only when `start` comes with `new_channel` set. Otherwise the
stored `G_c` and `D_c` are reused. The matched filter and the initial
estimate are recomputed for every symbol.

The gradient unit takes `x` from a multiplexer: `x_c` in iteration 1, and the
estimate received from the apex afterwards.

## The ring (`dn_ring_top`, `dn_ring_cluster`, `dn_ring_apex`)

Clusters 0..C-2 are `dn_ring_cluster`; cluster C-1 is the apex. Link k feeds
cluster k, and the apex's output feeds cluster 0.

Per symbol:

1. The apex sends an all-zero `(p, q)` vector to cluster 0. This starts the
   ring.
2. **Iteration 1.** Each non-apex cluster waits for its initial estimate, then
   forwards `p + diag(D_c)` and `q + g(x_c)`.
3. The apex adds its own parts and stores `D = p` for the rest of the symbol.
   It then computes `x(1) = x_C - D^-1 q` (`dn_newton_update`: 2U dividers and
   a saturating subtract, 30 cycles).
4. The apex sends `p = x(1)` and `q = 0` on to cluster 0.
5. **Iterations 2..T.** Each cluster passes `p` unchanged and forwards
   `q + g(p)`. The apex computes `x(t) = x(t-1) - D^-1 q`.
6. After iteration T the apex does not send again. `x(T)` appears on `x_out`
   with a one-cycle `x_valid`, together with the 16-QAM decisions `bits`.

Each non-apex cluster receives a whole vector before it computes its gradient.
A cluster therefore costs about 3U cycles per iteration: U beats in, U + 1
cycles of gradient, and U beats out, partly overlapped with the next cluster.
The ring testbench checks that one extra cluster adds exactly 3U·T cycles.

## The star (`dn_star_top`, `dn_star_cluster`, `dn_star_apex`)

Each non-apex cluster `dn_star_cluster` has an up link to the apex and a down
link from it. Each link has its own buffers.

**Iteration 1.** With no input, every cluster sends up `p_c = diag(D_c)` and
`q_c = g(x_c)`.

**Iteration t > 1.** A cluster waits for `x(t-1)` on its down link, then sends
`p_c = 0` and `q_c = g(x(t-1))`.

The apex `dn_star_apex` works through each iteration as follows:

1. It collects the vectors on all C-1 up links at once. Meanwhile it computes
   its own gradient.
2. It sums the C parts element-wise (`dn_aggregate`, N = C). The sum is formed
   at full width and saturated once.
3. In iteration 1 it stores `D`.
4. It applies the Newton update.
5. It broadcasts `x(t)` as `p` with `q = 0` on every down link. A beat leaves
   only when all down links can take it, so the links stay in lock-step.

## Links, beats and buffers

Every link carries one *beat* per cycle with a valid/ready handshake. A beat
is `beat_t = {p[u], q[u]}`: two complex words, 64 bits. A vector is U beats,
with element 0 first.

Every cluster caches its traffic in `dn_fifo` queues (DEPTH = U by default):

* ring clusters have an IN and an OUT queue;
* star clusters and the star apex have one in/out pair per link.

Data from a queue are read combinationally. An assertion in `dn_fifo` checks
that a sender holds its word while it is not accepted.

The tops have no back-pressure on their outputs.

* `start` is taken only when `ready` is high, meaning every cluster is idle.
* `x_valid` is a single-cycle pulse.
* `H` and `y` are written through per-cluster write ports (`h_cluster`,
  `h_addr`, `h_row` and `y_cluster`, `y_addr`, `y_data`). Do this before
  `start`, and do not write during a detection.

## Latency

Cycles from `start` to `x_valid` at the default size (U = 8, C = 4, BC = 32,
T = 3). These are measured in the full-size testbench, and every symbol takes
exactly the same time:

| topology | this RTL | published FPGA figure (340/379 MHz) |
|---|---|---|
| ring | 384 | 701 |
| star | 237 | 310 |

The published numbers come from a high-level-synthesis schedule with its own
pipelining, so they do not match cycle for cycle. The ordering and the scaling
do match:

* the star is faster;
* star latency does not depend on C (the testbench checks C = 2 and C = 3);
* ring latency grows linearly with C.

The same holds at the other evaluated sizes, measured in `tb_dn_workloads`.
The published figures are in brackets:

| configuration | ring | star |
|---|---|---|
| B = 64, C = 2, U = 8, T = 4 | 335 (541) | 299 (398) |
| B = 128, C = 4, U = 2, T = 3 | 246 (523) | 189 (248) |
| B = 64, C = 2, U = 6, T = 3 | 242 | 221 |

No clock frequency has been established for this RTL.

## Where this RTL departs from the published design

* `diag(D_c)` travels in `p` during iteration 1 of **every** symbol, not only
  once per coherence interval. This keeps the link protocol the same for
  every symbol. `D_c` itself is computed only with `new_channel`.
* The ring is started by a zero vector sent by the apex.
* Iterations are numbered 1..T, as in the published algorithm listings, with
  `x(0) = x_C`.
* The Gram unit computes the full matrix and does not exploit its Hermitian
  symmetry.
* The 16-QAM slicer assumes levels ±A and ±3A with A = `LEVEL` = 0.25,
  thresholds at -2A, 0 and +2A, and Gray code 00, 01, 11, 10 from the lowest
  level up. A value exactly on a threshold goes to the upper level.
* The RF front end that delivers `y_c` is not part of the RTL. Samples are
  written into each cluster's memory instead.
* `N_SC` defaults to one sub-carrier. With N_SC = 2, the ring instances are
  plain copies that share nothing. Two sub-carriers therefore take the same
  384 cycles as one, and throughput doubles. The published two-sub-carrier
  figure (492 cycles, against 707 for one) comes from a different schedule.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

Expected values come from `tb/dn_ref_pkg.sv`. This is an independent
integer model of the same fixed-point arithmetic. It includes a whole-detector
model of each topology, which differ only in where sums saturate.

| testbench | what it shows |
|---|---|
| `tb_dn_mimo_top` | all defaults; 6 symbols over two channels. Checks bit-exact `x(T)` and bits for both detectors, the star faster than the ring, constant latency, and at least 90 % correct decisions. Counts and requires Gram recompute, Gram reuse, ring detection and star detection |
| `tb_dn_workloads` | the other evaluated configurations run together, each on its own `dn_mimo_top`: two ring sub-carriers at the default size; B = 64, T = 4; U = 2; and U = 6. Each is checked bit-exact, as in the full-size test (driver: `tb_dn_workload_run`) |
| `tb_dn_ring_top`, `tb_dn_star_top` | U = 4, BC = 8, with C = 2 and C = 3; bit-exact results; the latency difference between the two C values (3U·T for the ring, 0 for the star) |
| `tb_dn_ring_cluster`, `tb_dn_ring_apex`, `tb_dn_star_cluster`, `tb_dn_star_apex` | one cluster against a testbench that plays its neighbours, with random back-pressure (stalls are counted and must occur) |
| `tb_dn_cluster_core` | new channel, Gram reuse, and recomputation after a channel change |
| the unit testbenches | random and corner values: saturation, a zero divisor, quotients that saturate, values on every slicer threshold, and a FIFO driven full and empty |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dn_pkg.sv tb/dn_ref_pkg.sv tb/tb_dn_mimo_top.sv \
    --top-module tb_dn_mimo_top -Mdir obj -o sim && obj/sim
```

The full-size test, and likewise `tb_dn_workloads`, takes about a minute to
compile and runs in seconds.

## Changing sizes

* `U`, `BC`, `C` and `T` are parameters of every top and default to the
  published main configuration. Other evaluated configurations are reached by
  overriding them:
  * U = 2, 4 or 6;
  * C = 2 (64 antennas);
  * T = 4;
  * N_SC = 2.
* `BC` sets both the local memory depth and the Gram and matched-filter run
  time.
* Hardware grows with U² per cluster through the Gram unit. Each cluster also
  has 2U dividers, and the apex has another 2U.
* The reference model in `tb/dn_ref_pkg.sv` takes the same four sizes, so the
  top-level testbenches can be rerun at any size by changing their
  `localparam`s.
