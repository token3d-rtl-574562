# Token3D: cycle-level power budgeting for 3D die-stacked multicores

Stacking cores on several device layers shortens wires but packs more power
into the same footprint, and cores far from the heatsink run hottest. Coarse
controls such as DVFS or thread migration are slow, so they match a power
budget only roughly. This design keeps each core within a power budget
**cycle by cycle**:

* Every core estimates its own power each cycle in **power tokens**. One
  token is the energy of one instruction spending one cycle in the
  instruction window.
* A core under its local budget reports its unused tokens. A central
  **load-balancer** pools them and hands them to the cores that are over
  budget. Those cores get that much extra budget for the cycle.
* The **Token3D** policy decides who gets the pooled tokens. Cores are sorted
  into temperature buckets, one bucket per layer. Cooler cores, usually the
  ones nearer the heatsink, get a larger share. They work more, and the
  hotter cores below them run less and cool down.
* A core that stays above its budget, even after its grant, gets a
  **throttle** request and the amount it is over by.

Two extra mechanisms are included for a *vertical* core, where every
structure is split across the four layers:

* the instruction window can be shrunk or grown one layer (32 entries) at a
  time;
* critical instructions go to fast ALUs in the upper layers, and the others
  go to slow, low-power ALUs in the lower layers.

The default configuration is 16 cores on 4 layers. Each core decodes and
issues 4 instructions per cycle and has a 128-entry instruction window.

## Data flow and timing

```
            fetch PCs ──► ptht ──(tokens, +1 cycle)──► core_power_meter ──► power, throttle, excess
 commit (pc, base, stamp) ─┘                              ▲   │ spare / over
                                                          │   ▼
 temp ──► leakage_token_unit (every 10K cycles) ──────────┘  token3d_balancer ──► grant (+1 cycle)
 temp ──► token3d_bucketizer (every 100K cycles) ──► bucket ──┘          │
                                                                        └──► back to core_power_meter
```

The loop for one core is:

| edge | what happens |
|------|--------------|
| t    | the core presents up to 4 fetched PCs |
| t+1  | `ptht` returns the token cost of each one |
| t+2  | `core_power_meter` registers *sum of costs + leakage tokens* as `power`; `spare` and `over` follow from `power` and `budget` combinationally |
| t+3  | `token3d_balancer` registers `grant` computed from all cores' reports of t+2 |
|      | `throttle = power > budget + grant`, using the newest grant |

Grants are not banked. Spare tokens of one cycle raise budgets only in the
next cycle, and they are dropped when no core is over budget.

## Token3D distribution (`token3d_balancer`)

This is the core of the design. Buckets are numbered 0 (coolest) to
`NBUCKETS-1`. Only buckets that hold at least one over-budget core take part.
Let `H` be the hottest bucket that takes part.

One **round** walks the levels `k = H, H-1, …, 0`. At level `k`, every
over-budget core in a bucket `≤ k` receives one token. So per round, a core
in bucket `b` receives `H-b+1` tokens: ×1 in the hottest active bucket, up to
×4 in the coolest with four buckets. Rounds repeat until the pool is empty.

Example: one over-budget core each in buckets 0, 1 and 2.

| pool | bucket 0 | bucket 1 | bucket 2 | why |
|------|----------|----------|----------|-----|
| 6    | 3        | 2        | 1        | one round |
| 12   | 6        | 4        | 2        | two rounds |
| 7    | 4        | 2        | 1        | one round + 1 token of the next level 2 (coolest first) |
| 10   | 5        | 3        | 2        | one round + level 2 complete + 1 token of level 1 |

The hardware does not hand out tokens one at a time. It gets the same result
in one cycle:

1. Weights `w_i = H-b_i+1` for over-budget cores (0 otherwise), with
   `R = Σ w_i`.
2. Complete rounds: every core gets `floor(pool/R)·w_i`.
3. Remainder `pool mod R`: levels are paid from `H` downwards while a whole
   level can be paid. A core gets one token for each paid level `≥ b_i`.
4. The first level that cannot be fully paid shares what is left, one token
   each. Order is by `(bucket, core index)`, so cooler buckets and lower
   indices go first.

The result equals the iterative process exactly. The testbench checks this
against a literal token-by-token model. The number of tokens handed out
always equals the pool when some core is over budget. The `pool`, `granted`
and `active` outputs make this visible.

Two choices here are not fixed by the underlying description:

* The multipliers are counted from the hottest *active* bucket. With buckets
  0–2 active, bucket 2 gets ×1, not ×2.
* Step 4 splits the last, incomplete level coolest first.

## Temperature buckets (`token3d_bucketizer`)

Every 100K cycles, each core is placed in bucket `k`, where `k` is the
largest `k < NBUCKETS` with

    100·(T_i − T_min) ≥ k · 5 · T_min

`T_min` is the coolest core's temperature, and the 5 % step is relative to
it. For example, with the coolest core at 70 °C the buckets end at 73.5, 77
and 80.5 °C, and anything hotter is in the last bucket. Because of the
cross-multiplication, no divider is needed.

* A core exactly on a boundary goes to the hotter bucket.
* Temperatures are unsigned Q8.4 °C. They are taken as already averaged; the
  sensors are outside this design.
* The first classification happens one cycle after reset. `epoch` marks the
  cycle before new buckets appear.

## Power tokens per core (`ptht`, `core_power_meter`)

`ptht` is the Power Token History Table: 8192 entries, direct mapped on
`PC[14:2]`, with no tag.

* **Reads.** It has 4 registered read ports, one per fetch slot, with one
  cycle of latency. An entry that has never been written returns
  `DEFAULT_TOKENS` (8). A valid bit per entry is cleared at reset.
* **Writes.** It has 4 commit write ports. A committing instruction writes
  `base_tokens + (now − dispatch_stamp)`, saturated at 1023. The base tokens
  cover its a-priori structure accesses. The difference is the number of
  cycles it spent in the window.
* **Dispatch stamp.** The core takes the stamp from `now_stamp`, a 16-bit
  free-running cycle counter, when the instruction enters the window.
* **Write ordering.** When two commits hit the same entry in one cycle, the
  younger one (higher slot) wins. A read in the same cycle still sees the old
  value.

`core_power_meter` adds the valid fetched costs and the leakage tokens, with
14-bit saturation, and registers the sum as `power`. From it:

* `over = power > budget`
* `spare = budget − power` when the core is under budget
* `throttle = power > budget + grant`
* `excess` = how far the core is above `budget + grant`

The core is expected to choose its power-reduction technique (fetch
throttling, etc.) from `excess`. Those techniques are part of the core, not
of this design.

## Leakage tokens (`leakage_token_unit`)

At the end of every 10K-cycle window, each core's leakage is recomputed as

    L = L_base · exp(β · (T − T_base))

and held, in tokens per cycle, until the next window.

* `exp` is read from a 256-entry table indexed by whole degrees. The table is
  in Q4.12, saturates just below 16, and is computed at elaboration from the
  `real` parameters `LEAK_BETA` (default 0.025 /°C) and `T_BASE` (default
  60 °C). Both defaults are assumptions; set them for your technology.
* One multiplier is shared by all cores. Cores are refreshed one per cycle,
  so the whole chip is fresh `NCORES` cycles after the window boundary, which
  is when `refresh_done` pulses. Until its first refresh, a core's leakage
  reads 0.
* `leak_base` is the leakage at `T_BASE`, the same for every core.

## Vertical-core extras

**`iw_layer_gate`** sits between a window-size policy and the window. The
policy asks for 1–4 layers of 32 entries; a request of 0 is treated as 1.
Each layer is in one of three states:

* **ON**: it is wanted, accepts allocations and is powered.
* **DRAIN**: it is no longer wanted. It accepts nothing new but stays powered
  until its entries empty.
* **OFF**: it is drained and unpowered.

A wanted layer switches ON again immediately. Layers are given up from
layer 0 (the bottom, farthest from the heatsink) upwards. A new request
shows on the outputs one cycle later. The policy itself, based on
memory-level parallelism, is not part of this design.

**`alu_crit_steer`** is combinational. It assigns up to 4 issuing
instructions, oldest first, to 3 fast and 3 slow integer ALUs:

* A critical instruction takes the lowest free fast unit.
* A non-critical instruction takes the lowest free slow unit.
* If the preferred group is full, the instruction takes a unit from the
  other group. Set `ALLOW_FALLBACK=0` to make it wait instead.

The grant includes the result latency: 1 cycle for a fast unit and 2 cycles
for a slow one (25 % slower, rounded up). The criticality predictor is
outside this design.

## The top level (`token3d_cmp`)

`token3d_cmp` instantiates one `ptht`, `core_power_meter`, `iw_layer_gate`
and `alu_crit_steer` per core. It adds one shared `leakage_token_unit`,
`token3d_bucketizer` and `token3d_balancer`.

The parts it connects to are not in this design, so their signals are plain
per-core array ports:

* the cores (fetch, commit, dispatch stamp, throttle);
* the temperature sensors;
* the window-size policy;
* the criticality predictor.

`core_budget` is the local budget per core per cycle, in tokens. The
intended use is half of the core's unconstrained power. Shared types and
widths are in `token3d_pkg`.

| parameter | default | meaning |
|-----------|---------|---------|
| `NCORES` | 16 | cores |
| `NLAYERS` | 4 | layers = Token3D buckets |
| `FETCH_W`, `COMMIT_W`, `ISSUE_W` | 4 | per-core widths (commit width assumed) |
| `PTHT_ENTRIES` | 8192 | PTHT entries per core |
| `LEAK_WINDOW` | 10 000 | leakage refresh period, cycles |
| `BUCKET_EPOCH` | 100 000 | re-bucketing period, cycles |
| `IW_ENTRIES` | 128 | instruction-window entries (4 × 32) |
| `N_FAST_ALU`, `N_SLOW_ALU` | 3, 3 | integer ALUs per core |

### Sizing notes

* Set `NCORES` to the number of cores actually present. An unused core port
  with zero activity looks like a core under budget and adds its whole budget
  to the pool.
* For a 2-layer stack, set `NLAYERS=2`. That gives two buckets, and the
  window gate then switches two groups of 64 entries. The ALU split does not
  depend on `NLAYERS`.
* The PTHT valid bits are flip-flops: 131 072 of them at the defaults. They
  are the bulk of the flip-flop count. The cost arrays are plain memories
  with no reset.

## Departures and open points

* The power-reduction techniques a throttled core applies, and their
  thresholds, are not part of this design.
* Leakage is tracked per core, not per structure. `LEAK_BETA` and `T_BASE`
  are placeholders.
* Temperatures come in on ports. No sensor or averaging hardware is
  included.
* Widths are this design's own choices: 10-bit instruction cost, 14-bit
  per-cycle power, Q8.4 temperature, 16-bit stamps. So are the PTHT's port
  count, reset behaviour and default cost.
* All timing is this design's own: one-cycle PTHT read, registered power,
  registered grants, one-cycle balancer.
* The floorplans (direct, mirror, L2, vertical and custom layer assignment)
  are physical placement. Only the layer count shows up in the logic.

## Simulating

Every block has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/token3d_pkg.sv tb/tb_token3d_balancer.sv --top-module tb_token3d_balancer
./obj_dir/Vtb_token3d_balancer
```

Replace the testbench name for the others:

| testbench | checks |
|-----------|--------|
| `tb_ptht` | default cost, residency counting, saturation, PC aliasing, same-cycle commits and read-during-write, random traffic |
| `tb_core_power_meter` | sums, spare/over at and around the budget, grant lifting a core out of throttle, saturation |
| `tb_token3d_balancer` | the example table above, then 3000 random cycles against a token-by-token model |
| `tb_token3d_bucketizer` | the 70 °C example, 5 % boundaries, refresh period (EPOCH shortened to 64) |
| `tb_leakage_token_unit` | `exp` reference within one token, refresh timing (window shortened to 300) |
| `tb_iw_layer_gate` | shrink with drain, power-off, regrow, one-layer minimum, random requests |
| `tb_alu_crit_steer` | preference, fallback, stalls, unit order, latency |
| `tb_token3d_cmp` | full chip at the default parameters for 220 000 cycles (two bucket epochs) |
| `tb_token3d_configs` | 2 and 4 layers × 4, 8 and 16 cores side by side, with epochs shortened to 20 000 / 2 000 cycles |

`tb_token3d_cmp` uses stand-in cores. Each runs a 64-instruction loop with
long-latency instructions, fetch widths that differ by core and phase, and
fetch stalls while throttled. Temperatures depend on the layer and reverse
half-way through. The window-size and criticality inputs are random. The test
checks:

* every core's power estimate, against a table model fed by the commits;
* leakage after each refresh;
* buckets after each epoch;
* token conservation and no grants to cores under budget;
* Token3D ordering: a cooler over-budget core never gets fewer tokens than a
  hotter one;
* the throttle rule, no busy entries in powered-off window layers, and ALU
  grants only to free units.

It also requires each mechanism to have occurred at least once, and prints
how often each did. It runs in a few seconds.

`tb_token3d_configs` runs the same environment for each of the six stack
configurations. The environment lives in `tb/token3d_harness.sv`, a
parameterized module; its stand-in cores vary their fetch width randomly
around the same per-core pattern. Compile it with `-y tb` added, because
that testbench picks the harness up from the `tb` folder.
