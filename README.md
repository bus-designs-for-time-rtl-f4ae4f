# Time-randomised bus network for a probabilistically analysable multicore

Measurement-based probabilistic timing analysis (MBPTA) bounds a task's
worst-case execution time by running it many times and fitting a tail
distribution to the observed times. That only works if every source of timing
variation behaves like a random variable: each delay needs a probability
attached to it, and no delay may depend on what other tasks are doing. A
conventional shared bus fails both tests. Fixed-priority or round-robin
arbitration makes one core's bus delay a deterministic function of the other
cores' traffic.

This RTL implements the interconnect of a clustered multicore built to pass
both tests. The cores of a cluster share an intra-cluster bus (the *ibus*). A
switch per cluster connects it to the inter-cluster bus (the *ebus*), and the
ebus leads to a fixed-latency memory controller. Every bus uses **randomised
arbitration in fixed time slots**:

- Time is cut into *rounds* of `L` cycles. Each round has exactly one owner.
- The owner is chosen at random, whether or not it has anything to send.
  A round whose owner is idle stays unused.
- So a core's bus delay has a fixed, computable distribution. It is the same
  whether the other cores are silent or hammering the bus.

Three policies are provided:

- **Random permutations** (the default): every window of `N` rounds gives
  each of the `N` contenders exactly one round, in a freshly shuffled order.
  The wait is bounded by `2N-2` rounds.
- **Lottery**: every round draws its owner at random. The wait is unbounded
  but geometrically distributed.
- **Round robin**: the deterministic reference. Every window gives the
  contenders their rounds in a fixed order.

The design follows the paper "Bus Designs for Time-Probabilistic Multicore
Processors". Where that paper is silent, this RTL makes its own choices. They
are listed in [Choices not fixed by the original design](#choices-not-fixed-by-the-original-design).

## Architecture

```
                     main memory (external)
                            |  mem_req_* / mem_rsp_*
                   +------------------+
                   |     mem_ctrl     |  fixed latency MC_LAT
                   +------------------+
                            |
   ebus  ====================================== pta_bus, N_CL contenders, L_E
            |                            |
       bus_switch (S)               bus_switch (S)
            |                            |
   ibus ==========               ============   pta_bus, N_CO contenders, L_I
        |   |   |   |           |   |   |   |
        c0  c1  c2  c3          c4  c5  c6  c7  (cores + caches, external)
```

A cache miss goes through three resources in series: its cluster's ibus, the
switch, then the ebus. It ends at the memory controller, which answers after a
fixed `MC_LAT` cycles. The response goes straight back to the core: it is
broadcast with the core id and is not arbitrated (see the choices below).

| parameter (`pta_multicore`) | default | meaning |
|---|---|---|
| `N_CO` | 4 | cores per cluster = ibus contenders (a power of two) |
| `N_CL` | 2 | clusters = ebus contenders (a power of two, 1 allowed) |
| `L_I`, `L_E` | 8 | round length of ibus and ebus, in cycles |
| `S_LAT` | 1 | switch crossing latency |
| `MC_LAT` | 16 | memory controller response latency |
| `MC_DEPTH` | 4 | requests in flight in the memory controller |
| `POLICY` | `ARB_RANDPERM` | `ARB_RANDPERM`, `ARB_LOTTERY` or `ARB_RR`, for all buses |

The original evaluation uses setups written *cores per cluster × clusters*:
4×1, 4×2, 4×4, 8×1 and 8×2, all with `L = 8` and random permutations. The
defaults give 4×2. The other setups are parameter overrides, and all five are
simulated (`tb_pta_configs`).

## Rounds and windows

`round_arbiter` holds three pieces of state:

- a cycle counter `0..L-1`, which makes the rounds;
- a round counter `0..N-1`, which makes the windows;
- the current owner.

A bus (`pta_bus`) grants only in cycle 0 of a round, and only to that round's
owner. The owner must hold `req_valid` in that cycle. A request that appears
later in the round waits for the next boundary. The granted transaction sits
on the bus for the whole round and is offered downstream in cycle `L-1`:

```
cycle      0    1    2   ...  L-1 |  0 ...
round      |<------ owner = 2 ---->| owner = 0
grant      core2                   |
out_valid                     X    |
```

Every bus delay therefore has three parts:

1. **Alignment:** 0 to `L-1` cycles until the next round boundary.
2. **Waiting rounds:** a whole number `k` of rounds, distributed as described
   below.
3. **Transfer:** exactly `L` cycles.

The time-composability argument rests on the owner being picked without
looking at the requests. A work-conserving arbiter would give an idle owner's
round to someone else, and that makes one core's delay depend on the others'
traffic. `tb_wait_distribution` checks that rule: one contender's wait
distribution is identical with the others idle and with the others saturating
the bus.

## Random permutations and the swap network

The `randperm` register (`randperm_unit`) holds `N` contender ids of `log2 N`
bits each. Slot `p` owns round `p` of the window. At every window boundary
the register is reshuffled using `N-1` fresh random bits in a tree of
conditional swaps:

- level 0: `N/2` bits, each swapping the two ids of one adjacent pair;
- level 1: `N/4` bits, each swapping two adjacent pairs;
- and so on, up to one bit that swaps the two halves.

For `N = 4` with random bits `b0 b1 b2`:

```
start           00 01 10 11      (order 0,1,2,3)
b0=1: swap 0/1  01 00 10 11
b1=0: keep 2/3  01 00 10 11
b2=1: swap pairs 10 11 01 00     (order 2,3,1,0)
```

A given id meets exactly one swap bit per level. So its new slot is its old
slot XOR a `log2 N`-bit random value, and every contender lands in every slot
with probability exactly `1/N`, whatever its previous slot was. The network
reaches only `2^(N-1)` of the `N!` orders. In the example, 2 and 3 always stay
in the same half. That does not matter for the analysis, which only needs each
individual contender's slot to be uniform.

The network costs `N log2 N` flip-flops and `log2 N` levels of 2:1 muxes.
`randbits` bit 0 is the first swap bit. The lower levels use the lower bits:
level `k` starts at bit `N - N/2^k`.

### Waiting-time distribution

Assume a request arrives at a round boundary, in a round of the window that is
independent of its contender's slot. It then waits `k` rounds with

```
P(k) = max(N-k, 0)/N^2 + sum_{i=max(1,N-k)}^{min(N-1,2N-k-1)} i/N^3 ,   0 <= k <= 2N-2
```

- The first term covers the case where the contender's slot is still ahead in
  the current window.
- The second term covers the case where the slot has passed and the request
  waits into the next window.

The worst case, `2N-2` rounds, arises when the contender had the first slot
of the current window and draws the last slot of the next one.

For the lottery, `P(k) = (1-1/N)^k / N`.

| contenders | random permutations: mean wait (model / measured) | max | lottery mean (model / measured) |
|---|---|---|---|
| 4 | 1.81 / 1.82 rounds | 6 | 3.00 / 3.01 |
| 8 | 4.16 / 4.16 rounds | 14 | – |
| 16 | 8.83 / 8.75 rounds | 30 | – |

Measured values come from 20 000 requests per case. Every `P(k)` agrees with
the formula within 0.015.

One caveat follows from the independence assumption. Suppose a core issues
its next request in the same window as its previous grant. Its slot in that
window has then already passed, and the request is sure to wait into the next
window. With back-to-back requests the measured mean for `N = 4` rises to
about 1.98 rounds. The per-request distribution is still random and bounded
by `2N-2` rounds, but it is not the one in the table.

## Lottery option

With `POLICY = ARB_LOTTERY`, the low `log2 N` bits of the PRNG name the owner
of every round, and the PRNG advances once per round. Nothing guarantees a
contender a round within any time. `pta_system_checker` therefore skips the
wait bound for this policy. The configuration test requires that a lottery
wait does exceed the permutation bound at least once.

## Round-robin option

With `POLICY = ARB_RR`, the bus is the deterministic alternative the
randomised ones are compared against. Contender `r` owns round `r` of every
window. The rounds of an idle owner again stay unused. A request waits at
most `N-1` rounds. Timing analysis cannot know the arrival phase, so it
charges every request that worst case, `(N-1) L` cycles with probability 1.
For `N = 4`, that charge is 3 rounds, while random permutations have a mean
of 1.8 rounds with a known probability for each wait. Their worst case, 6
rounds, is longer but has probability 1/64.

The measured waits match:

- In `tb_wait_distribution`, the wait is uniform over 0 to `N-1` rounds,
  with a mean of 1.49 rounds for `N = 4`.
- In `tb_pta_configs`, the longest ibus wait on a loaded 4x2 system is 31
  cycles, which is `(L-1) + (N-1) L`. Under random permutations it is 55
  cycles, and under the lottery 180 cycles.

## Random number source

Each bus has its own 32-bit xorshift generator (`prng_xorshift`, shifts 13,
17 and 5). It advances only when bits are consumed: once per window for
permutations, once per round for the lottery. All generators load new seeds
through `seed_we_i`/`seed_i` at the top level. Each bus XORs the common seed
with its own constant, so the buses never run in lockstep. MBPTA needs
independent runs, so reseed between measurement runs.

## Switch and the queue behind it

`bus_switch` delays every transaction from its ibus by exactly `S` cycles.
The transaction then waits in a FIFO of `N_CO` entries, whose head contends on
the ebus.

The queue is needed because the two buses run at different rates. An ibus can
deliver one request per `L_I` cycles. The ebus gives a cluster only one round
per `N_CL` rounds. With at most one outstanding miss per core, `N_CO` entries
always suffice, and the ibus never sees back-pressure.

The original analysis composes ibus, switch and ebus delays as independent
terms. That is exact for a request that finds the switch queue empty. A
request that queues behind others from its own cluster also waits for their
ebus rounds. Its delay is still bounded: at most `N_CO` ebus waits, which the
end-to-end checker uses as its upper bound. But it depends on the traffic of
its own cluster, which the published per-request composition does not model.

## Memory controller

`mem_ctrl` forwards each request to memory in the cycle it is accepted, and
returns the response exactly `MC_LAT` cycles after acceptance. This removes
memory's own latency variation (jitter) by always answering at the worst
case. The memory port has no back-pressure. Memory must answer every request,
reads and writes, in order and within `MC_LAT-1` cycles. If it is later,
`late_o` rises and an assertion fires. Up to `MC_DEPTH` requests may be in
flight. The ebus delivers at most one request per `L_E` cycles, so
`MC_DEPTH >= ceil(MC_LAT / L_E) + 1` never stalls it.

## Latency of one miss

From the ibus grant (cycle `g`) to the response at the core:

- The minimum is `(L_I-1) + S + (L_E-1) + MC_LAT`, which is 31 cycles at the
  defaults. It happens when the switch holds no other request and the ebus
  round owned by the cluster starts right away.
- The ibus wait, from request to grant, is at most `(L_I-1) + (2 N_CO - 2) L_I`
  cycles, which is 55 at the defaults.
- The ebus wait behind an empty switch queue is at most
  `(L_E-1) + (2 N_CL - 2) L_E`.

From the request to the response, a miss that finds the switch queue empty
takes `T = a + k_i L + L + k_e L + (L-1) + MC_LAT` cycles at the defaults.
Here `a` is the alignment to the next ibus round (0 to 7), and `k_i` and
`k_e` are the ibus and ebus round waits drawn from the distribution above.
No ebus alignment term appears: both buses use 8-cycle rounds that start
together, so an ibus delivery in cycle 7 plus the one-cycle switch lands on
an ebus round start. The total is therefore the convolution of the
per-resource distributions. Its mean is 54 cycles and its maximum is
102 cycles. `tb_hbus_etp` measures 15000 misses of one core at random
times:

| system | measured mean | largest gap to model distribution |
|---|---|---|
| core alone | 53.8 cycles | 0.009 |
| other cluster keeping the ebus busy | 54.0 cycles | 0.006 |
| lottery, core alone | 66.0 cycles (model 66.1) | 0.006 |

In the lottery row, `k_i` and `k_e` are geometric and the latency has no
upper bound. Both the model and the measurement lump everything above 160
cycles into one bin, which lowers the model mean from 66.5 to 66.1 cycles.

The other cluster's traffic leaves the distribution unchanged, which is
the time-composability property the design is built for. Traffic from
cores of the same cluster does change it, through the switch queue; see
the switch section.

## Interfaces

`pta_multicore` (all ports are plain signals or packed structs from
`pta_bus_pkg`):

| port | dir | meaning |
|---|---|---|
| `core_req_valid_i[c]`, `core_req_i[c]` | in | miss request of core `c = cluster*N_CO + i`. Hold both until `core_req_ready_o[c]`. `src` is overwritten with `c`. |
| `core_req_ready_o[c]` | out | ibus grant (one-cycle pulse, only at a round start) |
| `core_rsp_valid_o[c]`, `core_rsp_o` | out | response for core `c`. `core_rsp_o` is shared and carries `src`, `we` and `rdata`. |
| `mem_req_valid_o`, `mem_req_o` | out | request to memory (`we`, `addr`, `wdata`) |
| `mem_rsp_valid_i`, `mem_rsp_rdata_i` | in | in-order answers from memory |
| `seed_we_i`, `seed_i` | in | reseed all arbiters |
| `mc_late_o` | out | memory broke the fixed-latency contract |
| `ibus_*`, `ebus_*`, `switch_level_o` | out | round and window starts, round owners, switch fill levels (monitoring) |

A transaction (`bus_req_t`) is one 64-byte cache line plus address, type and
source id. It travels as one struct for the `L` cycles of a round. A 64-byte
line in 8 cycles corresponds to an 8-byte physical bus, but the beats are not
modelled. At most one outstanding request per core is expected.

The reset is asynchronous and active low. After reset, each arbiter spends one
cycle drawing its first permutation or lottery owner, so the very first
window is already random.

## What is not here

- **Cores and caches.** The processor model has 4-stage in-order cores and
  4 KB, 4-way, 64-byte-line instruction and data caches with random placement
  and random replacement. They come from earlier work and are not described
  in enough detail to build. Their misses enter through the core ports.
- **Main memory.** It is external. `tb/mem_model.sv` is a behavioural model
  with random latency.
- **The software experiments.** The EEMBC programs, the pWCET curves and the
  i.i.d. tests need the cores and caches. They cannot be reproduced with the
  interconnect alone. What can be checked at this level, the arbitration
  delay distributions behind them, is checked.

## Choices not fixed by the original design

- **Switch latency** `S = 1` and **memory-controller latency** `MC_LAT = 16`.
  No values are given.
- **Round lengths.** `L_I = L_E = 8`, the value used for all buses in the
  evaluation, even though the ebus is described as usually the slower one.
  Both are parameters. `tb_pta_configs` also runs a 4x2 system with
  `L_E = 16` and a 2-cycle switch.
- **Switch FIFO.** Its depth is `N_CO`.
- **Back-pressure rule.** A bus whose delivery is refused holds it, and rounds
  pass unused until it is taken. It never triggers in the assembled network.
- **Response path.** Responses are broadcast by id outside the buses, and
  writes are acknowledged too.
- **PRNG.** xorshift32, with per-bus seed constants and a reseed port.
- **Swap-network generalisation.** Only `N = 4` is spelled out in the source;
  this RTL extends the same tree to `N = 8, 16, ...`, and the `randbits`
  bit order is this RTL's choice.
- **Start-up.** The randperm register resets to the identity order and is
  reshuffled in the set-up cycle.
- **Single-cluster ebus.** With `N_CL = 1`, the ebus has one contender that
  owns every round. It keeps the round alignment and the `L_E` transfer.

## Files

| file | content |
|---|---|
| `rtl/pta_bus_pkg.sv` | transaction structs, policy enum, line size |
| `rtl/prng_xorshift.sv` | PRNG |
| `rtl/randperm_unit.sv` | randperm register and swap network |
| `rtl/round_arbiter.sv` | round/window timing, owner selection |
| `rtl/pta_bus.sv` | one shared bus (ibus or ebus) |
| `rtl/bus_switch.sv` | cluster switch with fixed latency and queue |
| `rtl/mem_ctrl.sv` | fixed-latency memory controller |
| `rtl/sync_fifo.sv` | FIFO helper |
| `rtl/pta_multicore.sv` | top: clusters, switches, ebus, controller |
| `tb/tb_*.sv` | self-checking testbenches, one per block |
| `tb/tb_pta_multicore.sv` | end-to-end test at the default size |
| `tb/tb_pta_configs.sv` | the 4×1, 4×4, 8×1, 8×2 setups, the lottery and round robin |
| `tb/tb_wait_distribution.sv` | wait distributions against the formulas |
| `tb/tb_hbus_etp.sv` | end-to-end miss latency distribution against the composed model |
| `tb/pta_system_checker.sv`, `tb/wait_probe.sv`, `tb/mem_model.sv` | test harnesses and the memory model |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/pta_bus_pkg.sv tb/tb_pta_multicore.sv --top-module tb_pta_multicore
./obj_dir/Vtb_pta_multicore
```

Replace the testbench name to run any other test. The package must come
first; the other files are found through `-y`.

What the tests establish:

- **End to end** (`tb_pta_multicore`, `tb_pta_configs`):
  - every read returns the last data its core wrote and every response
    reaches the right core;
  - ibus waits never exceed `2N-2` rounds plus alignment;
  - miss latency never drops below the sum of the fixed parts.
- **Mechanisms.** `tb_pta_multicore` requires each of these to happen at
  least once:
  - grants with no wait;
  - mid-round arrivals;
  - waits into the next window;
  - new permutations on ibus and ebus;
  - idle-owner rounds while others wait;
  - switch queueing;
  - ebus contention;
  - hidden memory jitter;
  - a reseed.

  Every observed window is a permutation of its contenders.
- **Block tests** check:
  - the worked swap example;
  - exact `1/N` slot uniformity over all `randbits`;
  - exact L-cycle transfers and the fixed controller latency;
  - the waiting-time formulas above.

A change in the swap network or the timing counters shows up as check
failures in its block test, not only in the end-to-end run.
