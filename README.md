# BLITZCRANK-style motion planning accelerator in SystemVerilog

A robot trajectory of N states is optimised so that it is smooth and stays
clear of obstacles. The optimisation is cast as inference on a **factor
graph**. Each state θᵢ (joint positions and velocities) is a variable node.
Constant-velocity prior factors link neighbouring states. A collision-free
factor hangs on every state. Each Gauss-Newton iteration solves a sparse
least-squares system `A·Δ = b`. Instead of factoring the whole of `A`, the
hardware eliminates the variables one at a time. Every elimination works on a
small dense matrix built only from the factors next to that variable. The
chain is eliminated from both ends at once, on two copies of the solver
hardware.

This repository holds synthesizable RTL for the whole accelerator:

- a signed distance field engine;
- the two factor blocks;
- the inference block, with its Householder QR pipeline and back
  substitution;
- a top level that runs the Gauss-Newton loop.

It also holds a self-checking testbench for every block.

## Data flow

```
 host ──► input_buffer ──(map rows)──► sdf_block ──(2x2 SDF window)──┐
              │                                                      ▼
              └──(initial Θ)──► Θ registers ──► prior_factor ─┐  collision_factor
                                    ▲                         ▼        │
                                    │                    factor store ◄┘
                                    │                         │
                                    └──── Θ += Δ ◄── fg_inference (2 × qr_decomp, 2 × back_subst)
```

`blitzcrank_top` runs the sequence:

1. **SDF.** The occupancy map is turned into a signed distance field. This
   happens once per run.
2. **INIT.** Θ is copied from the input buffer. The first and last states are
   latched as the start and goal.
3. **FACT.** One state per cycle enters both factor pipelines. After two
   cycles of latency the results land in the factor store.
4. **INFER.** The inference block computes Δ.
5. **UPDATE.** The design sets `Θ += Δ`. It stops when `max|Δ| < tol`
   (`converged` = 1) or after `MAX_ITER` iterations. Otherwise it goes back
   to FACT.

All positions are in map cells. All numbers are signed Q16.16 fixed point
(see *Number formats*).

## The factor graph

The factor graph for the default configuration is as follows. There are
N = 20 states of a 3-DOF robot, so each state is a 6-vector
`[q0 q1 q2 q̇0 q̇1 q̇2]`. The graph has:

| factor | rows | touches | formed by |
|---|---|---|---|
| start prior | 2·DOF | θ₀ | `sp_w·I`, `b = −sp_w(θ₀ − θ_start)` |
| goal prior | 2·DOF | θ_{N−1} | same, with θ_goal |
| constant-velocity prior (i, i+1) | 2·DOF | θᵢ, θᵢ₊₁ | `prior_factor` |
| collision | 1 | θᵢ | `collision_factor` |

This gives 146 rows × 120 columns when stacked, with a density below 10 %.

**Prior factor.** The error is `e = Φθᵢ − θᵢ₊₁`, with `Φ = [[I, dt·I],[0, I]]`.
It is whitened by a 2×2 matrix `L`, applied to each joint's
(position, velocity) pair, where `LᵀL = Q⁻¹` of the GP prior. The block row
is `[LΦ  −L | −Le]`. The host supplies `L` and `dt`. For `Qc = 1`, `dt = 1`:
`L = [[√12, −√3],[0, 1]]`.

**Collision factor.** The robot is a point robot: one sphere centred at
configuration coordinates (q0, q1). The signed distance `d` and its gradient
come from bilinear interpolation of the SDF over the 2×2 cells around the
position. The hinge loss is `h = eps − d` when `d < eps`, and 0 otherwise.
The row is `[−w·∇d 0 … | −w·h]`. `eps` is the safety distance plus the sphere
radius, and `w` is 1/σ.

## Signed distance field (`sdf_block`, `sdf_kcu`, `sdf_hcu`)

1. The map G (8-bit occupancy) is thresholded into M, with 1 meaning
   occupied. It is read one row per cycle.
2. The distance transform needs one pass on M and one on its inverse M′.
   Each pass has two steps:
   - **Rows (K):** `NR` K-units each take a whole row. Each makes a forward
     and a backward scan (2W+1 cycles). This gives, for every 1, the
     distance along the row to the nearest 0. A row with no 0 gives 255,
     meaning "far".
   - **Columns (H):** `NC` H-units each take one column of K. For each row
     i, the unit searches every row j for `min K[j]² + (i−j)²`, one j per
     cycle, then takes a 32-cycle square root. This is the exact Euclidean
     distance.
3. `S = H′ − H`. At every cell exactly one of H and H′ is non-zero, so
   column jobs on M write `−H` into occupied cells and jobs on M′ write
   `+H′` into free cells. No read-modify-write is needed.

Row and column jobs go to whichever unit is free. The 64×64 default takes
about 205 k cycles, almost all in the column pass, which costs about
`2·W·H·(H+36)/NC` cycles. Only 2D maps are supported.

## Two-sided elimination (`fg_inference`)

This is the core of the design.

**Eliminating one state.** To eliminate θᵢ with neighbour θⱼ, the block
assembles a local matrix Ā with columns `[θᵢ (2·DOF) | θⱼ (2·DOF) | b]`:

```
 rows 0 .. c−1      carried factor (on θᵢ) from the previous step   [Cᵢ   0  | c ]
 row  c             collision factor of θᵢ                          [Jcᵢ  0  | bc]
 rows c+1 .. c+2DOF prior factor between θᵢ and θⱼ                  [J_i J_j | bp]
```

The QR block zeroes the first 2·DOF columns below the diagonal and applies
the same reflectors to the remaining columns and to `b`. Two things are taken
from the result:

- **Rows 0..2·DOF−1** are the *conditional* of θᵢ:
  `R_ii θᵢ + R_ij θⱼ = d`. It is stored for back substitution.
- **Rows 2·DOF..end**, restricted to `[θⱼ | b]`, are the new carried factor
  on θⱼ. It has one row more than the last one: the collision row is
  absorbed.

The start and goal priors seed the two carried factors, so the first step on
each side looks like every other step.

**Order.** The forward unit set eliminates θ₀, θ₁, … θ_{N/2−1}. The backward
set eliminates θ_{N−1}, … θ_{N/2+1}. For the backward set the prior's
Jacobians swap places. Both run in lockstep. The middle state θ_{N/2} is
eliminated last, by the forward set, from both carried factors plus its
collision row. Its Ā has only `[θ | b]` columns.

**Back substitution** then runs outwards from the middle. The forward unit
handles θ_{N/2}, then θ_{N/2−1}…θ₀. The backward unit handles
θ_{N/2+1}…θ_{N−1} in parallel. Each unit solves `R_ii x = d − R_ij x_j` row
by row, from the bottom.

**Sizes.** On a side, the rows of Ā at step s are `4·DOF + 1 + s`. The
middle step has `4·DOF + N` rows. With DOF = 3 and N = 20 that is at most
22 rows on a side and 32 × 7 in the middle. This sets `MAX_R = 32`.
`MAX_C = 4·DOF + 1 = 13`. A one-sided order would peak at 31 × 12 + b.

**Loading.** Ā is loaded into each QR buffer one element per cycle. Every
(row, column) up to the larger side's size is written, zeros included, so
nothing has to be cleared. The result is read back the same way.

## Householder QR pipeline (`qr_decomp`, `qr_evaluate`, `qr_update`)

One reflector per column k: `P = I − τ v vᵀ`, with

- `α = −sign(x_k)·‖x_{k:}‖`,
- `v = x − α e_k`,
- `τ = 1/(‖x‖(‖x‖ + |x_k|))`.

The pivot column becomes `α` on the diagonal and exact zeros below.

- **Update units** form a chain of `NU` units, linked by 4-deep valid/ready
  FIFOs. A pass streams columns k0…n_cols−1 of the buffer, row by row, into
  the first FIFO. Unit u applies reflector `k0+u`. Each unit:
  - buffers a column while accumulating `v·a` (Q32.32);
  - forms `f = τ·(v·a)`;
  - streams out `a − f·v`.

  Columns before its own pivot pass through untouched. The last unit writes
  back to the buffer.
- **Evaluate unit.** When a unit has buffered its pivot column, it raises a
  request. The single Evaluate unit reads that unit's buffer and computes
  the sum of squares, a 32-cycle square root and an 80-cycle division for τ.
  It returns α and τ to that unit. Unit u+1's Evaluate therefore runs while
  unit u is still updating later columns: the Evaluate phase of step k+1
  overlaps the Update phase of step k.
- **Time multiplexing.** If more than NU columns must be eliminated (2·DOF = 6
  > NU = 4 by default), the design makes further passes with k0 += NU.

An Update unit does not overlap taking in a column with emitting one, so each
column costs about 2R + 2 cycles per unit. A downstream unit that is busy
back-pressures the chain through the FIFOs.

## Number formats

| quantity | format |
|---|---|
| states, factors, SDF, matrix entries | Q16.16, 32-bit signed |
| dot products, sums of squares | Q32.32, 64-bit |
| Householder τ | Q24.40, 64-bit (keeps precision when ‖x‖ is large or small) |
| occupancy | 8-bit unsigned |

Products are truncated toward −∞. Values must stay below ±32768 and sums of
squares per column below 2³¹. With weights up to about 100 and matrices of
32 rows this holds comfortably. A zero column gives τ = 0, so no reflection
is applied. A zero pivot in back substitution gives 0.

## How this RTL departs from the original design

- **Number format.** The original uses single-precision floating point. Here
  everything is fixed point, so results differ from a float reference by
  rounding (about 1e-3 in the testbenches).
- **Robot model.** Only a point robot is modelled. There is one sphere, at
  the first two configuration coordinates, on a 2D map. Forward kinematics
  for an arm (such as the 7-DOF WAM) and the 3D distance-transform pass are
  not provided.
- **Start and goal.** Fixed-state priors of weight `sp_w` hold the start and
  goal. They are taken from the first and last initial states.
- **Solver steps.** The steps are undamped Gauss-Newton. Convergence is
  `max|Δ| < tol`, with an iteration limit of 10. Undamped steps can
  oscillate when the collision weight is large compared with the prior: a
  state is pushed past `eps`, the hinge switches off, and the prior pulls it
  back. The end-to-end test uses `eps = 6`, `w = 1`, and converges in four
  iterations.
- **Unit counts.** n_r, n_c and n_u are not fixed by the original; they are
  4, 4 and 4 here. The map size (64×64) is also this design's choice.
- **Interfaces.** The host interface, the handshakes (start/done pulses,
  valid/ready between Update units), the FIFO depth and the loading scheme
  for Ā are all this design's own.
- **Not built.** The inference-order search is software run ahead of
  synthesis. The FPGA platform it ran on is not part of the RTL.

## Parameters (`blitzcrank_top`)

| parameter | default | meaning |
|---|---|---|
| `DOF` | 3 | joints; a state has 2·DOF values |
| `N` | 20 | states in the trajectory (even) |
| `MAP_W`, `MAP_H` | 64 | map size in cells |
| `NR`, `NC` | 4 | K- and H-units in the SDF engine |
| `NU` | 4 | Update units per QR block |
| `MAX_R`, `MAX_C` | 32, 13 | QR buffer size; needs `MAX_R ≥ 4·DOF+N`, `MAX_C ≥ 4·DOF+1` |
| `MAX_ITER` | 10 | Gauss-Newton iteration limit |

Configuration inputs: `occ_thr`, `dt`, `prior_l[2][2]`, `eps`, `coll_w`,
`sp_w` and `tol`. The host loads the map through `map_we/map_x/map_y/map_data`
and the initial trajectory through `st_we/st_idx/st_comp/st_data`, then
pulses `start`. The result is on `theta` when `done` pulses.

## Simulating

Every file in `rtl/` is one module or package. Each testbench prints
`TB_RESULT checks=N failures=F` and ends with `$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/blitz_pkg.sv \
          tb/tb_blitzcrank_top.sv --top-module tb_blitzcrank_top -Mdir obj
./obj/Vtb_blitzcrank_top
```

Replace `blitzcrank_top` with any block name to run that block's test.

| testbench | what it checks |
|---|---|
| `tb_sdf_kcu` | row distances vs brute force; latency 2W+1 |
| `tb_sdf_hcu` | column distances vs real-valued search |
| `tb_sdf_block` | every S cell vs a brute-force signed Euclidean transform; window port |
| `tb_prior_factor` | Jacobians and error vs real arithmetic; 2-cycle latency; back-to-back inputs |
| `tb_collision_factor` | hinge value and gradient on an analytic SDF; clamping at the border |
| `tb_qr_evaluate` | α, τ vs real arithmetic; zero column; grant routing |
| `tb_qr_update` | one reflector applied to a column stream with back-pressure |
| `tb_qr_decomp` | whole partial QR vs a float Householder QR, 1 to 3 passes |
| `tb_back_subst` | recovers a known solution; singular pivot |
| `tb_fg_inference` | Δ vs least squares on the stacked system (normal equations) |
| `tb_input_buffer` | map rows and states read back |
| `tb_blitzcrank_top` | full-size run: a trajectory through a disc obstacle is bent clear of it; start and goal kept; SDF pass, hinge on and off, two-sided steps, QR pass reuse, Evaluate/Update overlap, FIFO back-pressure, convergence; a second run stops at the iteration limit |

The full-size end-to-end run takes 318 k cycles: 205 k for the SDF and about
28 k per Gauss-Newton iteration, over 4 iterations. It simulates in about a
second.
