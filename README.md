# Radar multiple target tracking engine

An automotive radar sweeps its field of view every 20 ms and reports the
positions of the obstacles it sees, with no indication of which report
belongs to which obstacle. Multiple target tracking (MTT) turns these
unlabeled reports into *tracks*: one filtered position and velocity per
obstacle, kept stable from one sweep (a *scan*) to the next. A track is started
when a new obstacle appears and dropped when the obstacle leaves.

This RTL implements the MTT processing loop as a set of fixed-function engines
joined by queues. It follows a published MPSoC architecture for driver
assistance, in which each function of the loop ran as software on its own
soft-core processor and the processors exchanged data through FIFOs. The
processors are replaced here by dedicated hardware. The partitioning into
engines, the queue links between them, the tracking algorithms and the system
size (10 targets, 20 ms scan) all come from that architecture.

```
 radar ─q─► (pre-formatting, external) ─q─► gate_cost_unit ─q─► assignment_solver ─q─► track_maintenance
                                              ▲                                               │
                                              │ prediction q (x10)              shared command q
                                              │                                               ▼
                                        kalman_filter x10 ◄───────────────────────────────────┘
                                              │
                                              └─ estimate q (x10) ─► (interface / display, external)
```

## One scan, step by step

1. **Observations in.** The pre-formatted observations of a scan enter the
   observation queue as `obs_word_t {eos, x, y}` words. A word with `eos=1`
   closes the scan.
2. **Gate compute, gate check, cost matrix** (`gate_cost_unit`). The engine
   waits for two things: one prediction from each of the 10 filters, and the
   end of the scan. For each active track it turns the predicted innovation
   variances Sx, Sy into gate weights 1/Sx, 1/Sy. For every pair of
   observation i and track j it then computes the statistical distance
   `d2 = dx²/Sx + dy²/Sy`. Pairs with `d2 > 9.21` lie outside the gate and get
   `COST_INF`. The engine sends out the full 10×10 cost matrix with two sets
   of flags: "this observation falls in some gate" and "this gate holds an
   observation".
3. **Assignment** (`assignment_solver`). This engine finds the one-to-one
   pairing of observations and tracks that has the smallest total cost.
   `COST_INF` (256.0) is more than ten times any gated cost, so the solver
   first maximises the number of gated pairs and only then minimises their
   total. A pairing that ends up at `COST_INF` is reported as not assigned.
4. **Track maintenance** (`track_maintenance`). Per filter slot it keeps a
   5-scan hit history. A hit means the slot's gate held an observation; a
   miss means the gate was empty (an *obs-less gate*). It applies these rules:
   - An observation outside every gate starts a tentative track in the lowest
     free slot.
   - A track is confirmed at 3 hits within its last 5 scans.
   - A track is deleted after 3 consecutive misses.
   - A tentative track is also deleted when its first 5 scans end without
     confirmation.

   The engine then sends exactly one command per slot: `KF_UPDATE` (with the
   assigned observation), `KF_COAST`, `KF_INIT`, `KF_DELETE` or `KF_IDLE`.
5. **Filtering** (`kalman_filter` ×10). All filters watch the head of the
   shared command queue, and the filter whose `ID` matches takes the word. The
   filter corrects its state, predicts one scan ahead, and pushes two words:
   the prediction (used by step 2 in the next scan) and the estimate (for
   display).

The loop closes through the prediction queues. After reset every filter
offers an inactive prediction, so scan 0 can start.

## The engines in more detail

### Kalman filter: 4 states in 6 numbers

The state is `[x vx y vy]` under a constant-velocity model with time step
DT = 20 ms. The measurement is the position `(x, y)`. There is no control
input. Q and R are diagonal, and a new track starts with a block-diagonal
covariance, so the 4×4 covariance stays block-diagonal for the whole run.
Each axis is therefore an independent 2-state filter with covariance entries
`a = P(pos,pos)`, `b = P(pos,vel)` and `c = P(vel,vel)`. This is exact, not an
approximation. The gain needs one reciprocal per axis, `1/S` with `S = a + R`,
which comes from the iterative `hw_divider`.

```
correct:  k1 = a/S  k2 = b/S  e = z - x̂
          x = x̂ + k1·e   v = v̂ + k2·e   a -= k1·a   b -= k1·b   c -= k2·b
predict:  x̂ = x + DT·v   a = a + 2DT·b + DT²·c + Q_POS   b = b + DT·c   c = c + Q_VEL
```

A command takes 1 cycle to accept, 1 cycle to predict, and two divisions of
49 cycles each. That is about 100 cycles, plus the time until both output
queues accept.

### Assignment solver: Hungarian method with potentials

The solver uses the shortest-augmenting-path form of the Munkres / Hungarian
method. It keeps potentials `u` (rows) and `v` (columns) and adds the rows one
at a time. For each row it runs a Dijkstra-like search over the columns,
using the arrays `used`, `minv` (best reduced cost so far) and `way`
(back-pointers). When the search reaches a free column, the matching is
flipped along the path back to the root.

Each search step handles all N columns in parallel in one cycle, so each step
costs 3 cycles (`S_MARK`, `S_SCAN`, `S_CHECK`). The augment walk costs 1 cycle
per path link. Costs are unsigned Q16.16; potentials are 40-bit signed, with
"infinity" at 2³⁸.

### Gate engine

The gate engine has one `hw_divider` for its gate weights, which takes about
2 × 49 cycles per active track. It then emits one word per cycle, stalled by
the downstream queue:

- for each of the 10 rows: one `CM_OBS` word, then 10 `CM_COST` words;
- 10 `CM_TRK` words;
- one `CM_EOS` word.

Scan observations beyond 10 are dropped.

## Stream formats

The stream formats are the packed structs in `mtt_pkg.sv`. The index of a row
or track is given by the position of its word in the stream, except in
`AS_OBS` (`trk`) and `kf_cmd_t` (`id`).

| link | word | per scan |
|---|---|---|
| pre-formatting → gate | `obs_word_t` | observations, then one `eos` |
| filter → gate | `pred_word_t {active, x, y, sx, sy}` | 1 per filter |
| gate → solver | `cm_word_t` | 10 × (1 + 10) + 10 + 1 words |
| solver → maintenance | `as_word_t` | 10 `AS_OBS` + 10 `AS_TRK` + `AS_EOS` |
| maintenance → filters | `kf_cmd_t {id, op, confirmed, x, y}` | 1 per filter slot |
| filter → display | `est_word_t {id, active, confirmed, x, vx, y, vy}` | 1 per filter |

Every link is a valid/ready pair, and every queue is a `sync_fifo`. A queue
never loses a word: when the display stops reading, back-pressure propagates
to the filters, then to the maintenance, solver and gate engines, and finally
to the observation queue and the radar port.

## Numbers

All values are signed Q16.16 in 32 bits: metres, metres per second, and their
squares. The products use `mtt_pkg::fx_mul`, and the reciprocals use
`hw_divider` (2³² / S).

| parameter | default | origin |
|---|---|---|
| `N_TRK` (filters, cost-matrix size) | 10 | system size of the original design |
| scan period `DT` | 0.02 s | radar pulse repetition time of the original design |
| confirm / window / delete | 3 of 5, 3 misses | original design |
| `GATE_THR` | 9.21 (χ², 2 dof, 99 %) | this design |
| `R_MEAS`, `Q_POS`, `Q_VEL`, `P0_VEL` | 0.25 m², 0.01 m², 0.1 (m/s)², 100 (m/s)² | this design |
| queue depths | radar 32, obs 32, pred 2, cost 16, assignment 8, command 16, estimate 2 | this design |

At 100 MHz a scan must finish within 2,000,000 cycles. With all 10 filters
tracking, a scan takes at most about 1,310 cycles from its `eos` word to the
last estimate. Built with `N_TRK = 20`, the size planned for the original
system, it takes about 2,700 cycles.

## Where this design departs from the original system

- **No processors.** The original design ran each function as C code on a
  soft-core processor, using hardware multiply and divide instructions for
  the filters. Here each function is a fixed-function engine. The radar
  pre-formatting and the display processors are not built; their queue
  links are ports of `mtt_mpsoc_top`.
- **Fixed point.** The original design used floating point. This design uses
  Q16.16 throughout.
- **Assignment algorithm.** The original design names the Munkres algorithm.
  This design uses the potential-based Hungarian variant, which finds the
  same minimum.
- **Assignment path.** In this design the assignment reaches the filters
  through track maintenance, as in the processor diagram. It is not a direct
  assignment → filter link.
- **Choices of this design.** The state vector (Cartesian position and
  velocity), the gate threshold, the noise values, the rule that drops a
  tentative track that fails to confirm, and what happens to surplus
  observations are not given by the original design.

## Files

- `rtl/mtt_pkg.sv`: types, word formats, `fx_mul`.
- `rtl/sync_fifo.sv`: the queue.
- `rtl/hw_divider.sv`: the restoring divider.
- `rtl/kalman_filter.sv`, `rtl/gate_cost_unit.sv`,
  `rtl/assignment_solver.sv`, `rtl/track_maintenance.sv`: the engines.
- `rtl/mtt_mpsoc_top.sv`: the system.
- `tb/tb_<module>.sv`: one self-checking testbench per module, each ending
  with a `TB_RESULT checks=… failures=…` line.
- `tb/tb_mtt_full_load.sv` with its harness `tb/mtt_load_run.sv`: the
  full-load case at 10 and at 20 filters.

## Simulating

```
verilator --binary --timing --assert -Irtl rtl/mtt_pkg.sv rtl/*.sv \
    tb/tb_mtt_mpsoc_top.sv --top-module tb_mtt_mpsoc_top -o sim
./obj_dir/sim
```

Use the same command with another testbench for the single engines. The tests
are:

- `tb_mtt_mpsoc_top`: the full-size (10 filter) system over 80 scans. The
  scenario has five moving targets, two of them 1 m apart so that both
  observations fall in both gates. One target vanishes, one appears late, and
  two single-scan clutter reports appear. The display stops reading for
  1,500 µs (150,000 cycles at 100 MHz), which fills the estimate and
  observation queues. The test checks:
  - the track positions and the number of confirmed tracks;
  - that no two tracks swap identity;
  - the start and delete counts;
  - the per-scan latency;
  - that every mechanism above occurred at least once.
- `tb_mtt_full_load`: every filter busy, plus one more target that finds no
  free filter. It runs at 10 filters and at 20 filters side by side. Compile
  it with `-Itb tb/mtt_load_run.sv tb/tb_mtt_full_load.sv`.
- `tb_kalman_filter`: the filter against a floating-point model of the same
  equations.
- `tb_gate_cost_unit`: the gate engine against a floating-point model.
- `tb_assignment_solver`: the solver against the exhaustive optimum over all
  permutations of 5×5 matrices.
- `tb_track_maintenance`: the maintenance engine against a rule model, with
  scripted cases for each rule.
- `tb_sync_fifo`, `tb_hw_divider`: the queue and the divider.

## Limits

- The per-engine tests run at reduced sizes (4 or 5 tracks). The system
  tests run at the default size of 10.
- At N_TRK = 20 only the full-load test has been run.
- Fixed-point rounding makes estimates differ from a floating-point filter
  by up to about 1 %.
