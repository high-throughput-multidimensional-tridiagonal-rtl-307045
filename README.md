# Batched Thomas solvers and a streaming 2D ADI heat-diffusion pipeline

Implicit PDE time-steppers such as the Alternating Direction Implicit (ADI)
method spend most of their time solving thousands of small, independent
tridiagonal systems: one per mesh line, along each axis in turn. The Thomas
algorithm solves one such system in O(N) operations, but each row depends on
the row before it. A floating-point operator pipeline in hardware has a
latency of tens of cycles, so a solver working on a single system would sit
idle almost all the time.

This design hides that latency by **interleaving**. A solver takes a group of
`G` systems and processes row *i* of system 0, row *i* of system 1, and so
on, up to system `G-1`, before it moves on to row *i+1*. When the result of row *i* of a
system is needed again, `G` cycles have passed, which is more than the loop
latency. The pipeline then accepts one row per clock. Several such solvers
side by side (one per lane of a 256-bit beat, 8 FP32 lanes) make up the
vectorized solver. Two of these, wrapped in data-reordering buffers, give an
x-line and a y-line solve of a 2D mesh. A stencil, the two solves and an
accumulate adder form one full ADI iteration as a single streaming pipeline.
Several iterations are chained (loop unrolling), and several such compute
units sit side by side.

Everything is SystemVerilog with valid/ready streams. It is bit-exact FP32
(round to nearest even, subnormals flushed to zero), and the testbenches
check it against an independent software model.

## The ADI step that is computed

For a mesh `u` of `X × Y` points, one iteration is:

```
d = λ·((u_w + u_e) + (u_n + u_s) − 4u)      interior points; 0 on the boundary
solve  (−λ/2) d'_{i−1} + (1+λ) d'_i + (−λ/2) d'_{i+1} = d_i   along every x-line
solve  the same system along every y-line (on the result of the x-solve)
u = u + d''
```

The first and last row of every line system is an identity row (`a = 0, b = 1,
c = 0`), which keeps the boundary values fixed. The three coefficients are
parameters (`COEF_A`, `COEF_B`, `COEF_C`; defaults −0.5, 2.0, −0.5, i.e.
λ = 1), together with the stencil's `LAMBDA`. The solvers never store `a`,
`b` and `c`: `coef_gen` attaches them to each `d` value as it streams in.
This is why only `u` travels in and out of the pipeline.

## The batched Thomas solver (`thomas_solver`)

```
 stream in ─► thomas_interleave ─► thomas_forward ─► thomas_backward ─► bank_reader ─► stream out
 (a,b,c,d,       ping-pong          ping-pong          ping-pong
  system after   (a,b,c,d)          (c*,d*)            (u)
  system)
```

Each stage owns a **ping-pong buffer** (`pingpong_buffer`) of two banks of
`G·N` words each. A writer fills one bank and *commits* it, which sets that
bank's full flag. The next stage reads the full bank and *releases* it when
done. Meanwhile the writer fills the other bank. Because of this hand-over,
three groups can be in flight at once: one being loaded, one in the forward
pass, one in the backward pass.

* **Interleave.** The systems arrive one after another, row 0 to row N−1.
  Row *i* of system *s* is written at address `s·N + i`, so the forward stage
  can read them in the order `i` outer, `s` inner.
* **Forward pass.** For each row it computes
  `r = 1/(b − a·c*_{i−1})`, `c*_i = r·c` and `d*_i = r·(d − a·d*_{i−1})`.
  That is one divide, four multiplies and two subtracts, as in the classic
  formulation. `c*_{i−1}` and `d*_{i−1}` of all `G` systems live in two
  G-entry register files. The arithmetic itself is combinational. It is
  followed by an `LF`-stage delay line that stands for the operator pipeline
  latency. A result is written back to the register file, and to the (c*, d*)
  bank, when it leaves the delay line. Because `LF < G`, it is back before
  system *s* comes round again.
* **Backward pass.** It reads the (c*, d*) bank from row N−1 down to row 0
  (rows still interleaved over the group) and computes
  `u_i = d*_i − c*_i·u_{i+1}`. Its latency is modelled with `LB` stages in
  the same way.
* **Output.** `bank_reader` returns `u` system after system, in the order the
  systems came in.

Latency: the first system of a group leaves after about `3·G·N` cycles (fill,
forward, backward). After that, a new group finishes every `G·N` cycles.
This gives the model `(3 + ⌈B/G⌉)·G·N` cycles for a batch of `B` systems.
`thomas_solver_tb` checks the measured time against this model plus a small
pipeline allowance. For large batches the throughput tends to one row per
clock per solver.

`vec_thomas` puts `V = 8` such solvers in lockstep, one per lane of a beat.
Each lane solves its own systems.

## Getting lines into the solver's order

Meshes stream row-major, 8 consecutive x-points per beat. A beat therefore
holds 8 points of the *same* x-line, whereas the 8 lanes of `vec_thomas` need
8 *different* systems.

* **x-solve (`tridslv_x`).** `rows_to_blocks` buffers 8 whole x-lines and
  reads them out as 8×8 blocks. `transpose8x8` swaps each block in registers,
  so beat *k* now carries point *k* of the 8 lines. After the solve the same
  two steps run in reverse (`transpose8x8`, then `blocks_to_rows`). Lane *l*
  solves x-line `8·m + l`.
* **y-solve (`tridslv_y`).** `row_to_col` stores a whole XY plane and reads it
  column-wise. Beat *j* of a group carries the 8 points of row *j* in x-columns
  `8m … 8m+7`, so each lane walks down one y-line. No register transpose is
  needed. `col_to_row` writes the results with the inverse address pattern
  and reads them back row-major.

All of these are ping-pong buffers with a strided address counter
(`strided_addr`) on one side. While one plane or block of lines drains, the
next is already filling.

## One ADI iteration as a pipeline (`adi2d_stage`)

```
          ┌──────────► stencil2d ─► tridslv_x ─► tridslv_y ─┐
 u in ───►┤                                                  (+) ─► u out
          └──────────► delay_fifo (u) ─────────────────────┘
```

The accumulate step needs the *old* `u` at the moment the solved `d`
arrives. That is thousands of beats after `u` entered the stencil. The input
is therefore forked into a FIFO. The FIFO's depth is the most that the
stencil and both solves can hold at once (every ping-pong bank full, plus
pipeline slack). This way the fork never waits for the FIFO. `stencil2d`
keeps two line buffers. It emits row *j* when row *j+1* arrives, and after
the last row of a mesh it flushes one row of boundary zeros.

`adi2d_cu` chains `F_U = 3` stages, i.e. three ADI iterations per pass.
`adi2d_top` holds `N_CU = 3` independent compute units. Each unit has its own
input and output stream, and each takes its own share of the batch. Running
`n` iterations means `n / F_U` passes of the meshes through a unit.

Batches must fill whole solver groups. One group of 32 systems per lane needs
`8·32 = 256` lines, i.e. `256 / 128 = 2` meshes of 128×128. A batch per
compute unit must therefore be a multiple of `V·G / X` meshes (2 at the
defaults). The last group of a batch is not flushed on its own.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N_CU` | 3 | compute units in `adi2d_top` |
| `F_U` | 3 | ADI iterations chained in one unit |
| `X`, `Y` | 128 | mesh size; multiples of 8 |
| `G` | 32 | systems interleaved per solver group (the FP32 choice; use 64 for FP64) |
| `LF`, `LB` | 30, 10 | modelled loop latencies of forward and backward passes; must be `< G` |
| `LAMBDA` | 1.0 | stencil scale (diffusion number) |
| `COEF_A/B/C` | −0.5, 2.0, −0.5 | tridiagonal coefficients of interior rows |
| `EW`, `MW`, `V` (package) | 8, 23, 8 | floating-point format and lanes per beat |

Memory per Thomas solver is 2·G·N words each for (a, b, c, d), (c*, d*) and
u: 7 × 8192 32-bit words at the defaults. There are 16 solvers per ADI stage,
so a 3 × 3 build uses a lot of RAM. That amount is inherent to the method,
but it also makes full-size synthesis heavy.

## Where this departs from the method it follows

* **Data movement.** The external-memory read/write modules, the AXI
  interconnect and the HBM controllers of a real accelerator card are not
  included. Each compute unit has a plain valid/ready beat stream in and out.
  The u delay buffer is on-chip here; a large card design would keep it in
  external memory.
* **Arithmetic latency.** Operators are combinational functions with `LF`/`LB`
  register delays after them, not vendor floating-point cores. The schedule
  and the throughput are the same as with pipelined operators. The timing
  closure is not.
* **Number format.** FP32 only is exercised. Subnormals are flushed to zero,
  and NaN inputs are not specially handled.
* **Coefficients and boundary.** The λ-based coefficients, the 5-point
  stencil weights and the fixed-value boundary are this design's reading of
  the heat equation. They are parameters where they can be.
* **Not built.** The tiled (Thomas-Thomas / Thomas-PCR) solver for systems too
  long for on-chip memory, the 3D ADI application (a second unit solving z
  from XZ planes), the Heston stochastic-local-volatility application, and an
  FP64 build with `G = 64`.

## Simulating

Every block has a self-checking testbench in `tb/`. Each compares bit for
bit with a reference written with `real` arithmetic and rounded to FP32
(`fp_ref_pkg`, `thomas_ref_pkg`, `adi_ref_pkg`), and each ends with a
`TB_RESULT checks=… failures=…` line. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/tridsolv_pkg.sv tb/fp_ref_pkg.sv tb/thomas_ref_pkg.sv tb/adi_ref_pkg.sv \
    tb/thomas_solver_tb.sv --top-module thomas_solver_tb -o sim
./obj_dir/sim
```

Replace the testbench name for any other block. The testbenches use small
sizes (for example G = 4, 16×16 meshes) so they run in seconds.

* `adi2d_top_tb` runs two compute units (one iteration each) on 16×16 meshes for two passes: one
  steady pass and one with random input gaps and output back-pressure. It
  counts the design's mechanisms and fails if any of them never happened:
  input stalls, output back-pressure, ping-pong bank hand-overs, forward and
  backward passes working on different groups at the same time, the
  stencil's boundary flush, and the delay FIFO holding data.
* The full default configuration (3 units, 3 iterations, 128×128 meshes,
  G = 32) compiles, but its Verilator model takes more than ten minutes to
  build, before simulation even starts. The largest configuration simulated
  end to end is therefore the one above: 16×16 meshes, G = 4, two units of one
  iteration each (`adi2d_cu_tb` covers three chained iterations). The blocks are parameterised the same way at every
  size. To try the defaults, instantiate `adi2d_top` with no parameter list
  in a copy of `adi2d_top_tb`, with `X = Y = 128`, `G = 32`, `N_CU = 3` and
  two meshes per unit.
* `fp_pkg_tb` checks the package's add, subtract, multiply and divide on
  80 000 random and corner-case operands.

The RTL has no vendor primitives. The memories are plain arrays with one
write port and one registered read port each, which synthesis tools map to
block RAM.
