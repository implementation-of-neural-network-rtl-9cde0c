# Digital cellular neural network for binary image processing

A cellular neural network (CNN) is a grid of identical cells, each of which
only talks to the cells immediately around it. Each cell holds one pixel. It
repeatedly forms a weighted sum of its neighbours' current outputs and of
their (fixed) input pixels, and outputs the sign of that sum. The network
stops when no output changes. Every connection is local, yet information
still spreads across the whole image one ring of cells per iteration.
Segmentation, edge and corner detection, noise removal and object extraction
are all this same machine with a different set of weights.

This RTL implements a fully parallel, discrete-time CNN, in the form
published for Xilinx Virtex FPGAs. Every cell has its own datapath, and the
whole network performs one iteration per clock. The weights (the *template*)
sit in writable registers, so the task can be changed without rebuilding the
hardware.

## The update rule

For the cell at row i, column j, with neighbourhood radius r (so K = (2r+1)²
neighbours, the cell itself included):

```
x_ij(n+1) = Σ_k A[k] · y_k(n)  +  Σ_k B[k] · u_k  +  I
y_ij(n)   = +1 if x_ij(n) >= 0,  -1 if x_ij(n) < 0
```

* `u` is the input image. It is loaded once and does not change during a run.
* `x` is the cell state. Its start value `x(0)` is loaded together with `u`.
* `y` is the cell output: the sign of the state. Zero counts as +1.
* `A` (feedback template), `B` (control template) and the bias `I` are
  shared by all cells.

`A` acts on the neighbours' outputs, which change from one iteration to the
next. This is what lets a local rule have a global effect. `B·u + I` is the
same in every iteration.

## Data formats

| quantity | width | coding |
|---|---|---|
| input pixel `u`, start state `x0` | `DATA_W` | two's complement; when `DATA_W = 1`, bit 1 = +1 and bit 0 = -1 |
| template coefficient, bias | `COEF_W` | two's complement |
| cell output inside the array | 1 bit | 1 = +1, 0 = -1 |
| result `y_out` | `DATA_W` | +1 or -1 in two's complement; when `DATA_W = 1`, 1 / 0 |
| state `x_state` | `COEF_W + DATA_W + clog2(2K+1)` | two's complement |

The state is sized so that the weighted sum cannot overflow for any inputs
or template (see `cnn_pkg::state_width`). Because `y` is ±1, each `A` term is
just +A or -A, so no multiplier is used for it. The `B` terms do use real
multipliers: K of them per cell.

## Structure

```
                 tmpl_we/addr/wdata
                        │
               ┌────────▼─────────┐  A, B, I
               │ cnn_template_regs├──────────────┐
               └──────────────────┘              │
 u_in, x0_in, load ─────────────────────► ┌──────▼──────┐  y  ┌──────────────────┐
                                          │  cnn_array  ├────►│ cnn_output_latch ├─► y_out, y_valid
                                          │ (cnn_cell × │     └────────▲─────────┘
                                          │  ROWS·COLS) │              │ release
 start, clear ──► ┌─────────────┐  step   │             │              │
                  │ cnn_control ├────────►│             │              │
                  │             │◄────────┤ any_change  │              │
                  └──────┬──────┴─────────┴─────────────┘              │
                         └─────────────────────────────────────────────┘
```

| file | role |
|---|---|
| `rtl/cnn_pkg.sv` | shared functions (neighbourhood size, state width, template index) and the controller state type |
| `rtl/cnn_cell.sv` | one cell: weighted sum, state register, sign output, "would change" flag |
| `rtl/cnn_array.sv` | ROWS × COLS cells with toroidal neighbour wiring |
| `rtl/cnn_control.sv` | run / settle detection / release / clear sequencing |
| `rtl/cnn_template_regs.sv` | A, B, I registers with a write port |
| `rtl/cnn_output_latch.sv` | holds the results once the network has settled |
| `rtl/cnn_top.sv` | the complete network |

### Toroidal neighbourhood

The grid has no edge. Row `ROWS-1` neighbours row 0, and column `COLS-1`
neighbours column 0, so boundary cells need no made-up values. In
`cnn_array` the wiring is generated with plain modulo arithmetic on the
indices. Template index `k = (dr+r)·(2r+1) + (dc+r)`, with `dr, dc ∈ [-r, r]`,
means the coefficients are stored row by row starting from the top-left
neighbour, and the centre is at `K/2`. When the grid is smaller than the
neighbourhood (for example r = 2 on a 3 × 3 grid), a cell appears more than
once in its own neighbourhood. That is the correct toroidal behaviour, but
it is seldom what one wants.

### Knowing when the network has finished

The hard part of a hardware CNN is deciding when the answer is ready. Each
cell also computes the sign of its *next* state and raises `changed` if that
sign differs from its present output. The array ORs these flags into
`any_change`. The controller runs one iteration per clock. The first
iteration that flips no output means equilibrium: that iteration is still
applied (it moves the states, not the outputs), and the run ends.

The network cannot settle after this, because equal outputs and a constant
`u` produce the same next state. So the outputs are final. For templates
that never settle (an `A` centre of -1, for example, inverts every output on
every iteration), the run stops after `MAX_ITER` iterations with `converged`
low. The results are then a snapshot of the last state.

### Timing

```
clock edge:  0 (start sampled)   1 … N (iterations)   N+1 (results captured)   N+2
             IDLE/DONE → RUN     step high            release pulse            done, y_valid high
```

* `done` and `y_valid` rise N + 2 clocks after the edge that sampled `start`,
  where N is the number of iterations, the final unchanging one included.
  `iter_count` reports N.
* While `busy` is high, `load` and template writes are ignored.
* A `start` from DONE continues from the present state without reloading.
  A settled network finishes again after one iteration.
* `clear` aborts a run. It zeroes the states, the inputs and the results
  (a zero state reads as y = +1), but keeps the template.
* Reset is asynchronous and active low. It also zeroes the template.

One iteration is a single combinational sum of 2K + 1 terms. That sum is the
critical path, so the clock rate falls as `DATA_W`, `COEF_W` and `r` grow.
The iteration count does not depend on them.

## Loading a template

Write one coefficient per clock through `tmpl_we`, `tmpl_addr` and
`tmpl_wdata`:

| address | contents |
|---|---|
| 0 … K-1 | A, row-major (centre at K/2) |
| K … 2K-1 | B, row-major |
| 2K | I |

Three templates from the original work, each for r = 1 on ±1 images:

| task | A | B | I | min. COEF_W |
|---|---|---|---|---|
| object extraction, q = 1 | 7 centre, 1 around | 8 centre, 0 around | 5 | 5 |
| edge detection | 7 centre, 1 around | 4 centre, 0 around | 5 | 4 |
| corner ("angle embossment") | 1 centre, 0 around | 4 centre, -1 around | -5 | 4 |

The object-extraction template comes from a family with one free scale,
A = [q q q; q 1+6q q; q q q], B = 8q at the centre, I = 5q. To use it,
present the image as u = +1 (object) / -1 (background), and mark the wanted
object by starting one or more of its pixels at x0 = +1, with every other
pixel at -1. The marking then spreads through every object pixel that is
connected to a marked pixel through its eight neighbours. Unmarked objects
and the background end at -1.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `ROWS`, `COLS` | 3, 3 | grid size |
| `R` | 1 | neighbourhood radius (1 → 3×3, 2 → 5×5 templates) |
| `DATA_W` | 8 | input and output width |
| `COEF_W` | 8 | coefficient width |
| `MAX_ITER` | 64 | iteration limit |

The defaults are a 3 × 3-cell, r = 1 network with 8-bit signed data and
8-bit signed coefficients. The original evaluation also used these
variants, all reachable through the parameters:

* r = 1 with 1-bit data and 4-bit coefficients;
* r = 1 with 4-bit data and 4-bit coefficients;
* r = 2 with 1-bit data and 4-bit coefficients;
* the edge and corner templates with 2-, 3- and 8-bit data.

## How faithful this is

These follow the original description:

* the update rule;
* the sign activation, with zero mapping to +1;
* the local, toroidal wiring;
* all cells loading and updating in parallel;
* a controller that checks that every cell has finished, then releases
  the results and can clear the network;
* the radii, widths and templates listed above.

These are this implementation's own choices:

* **One bias for every cell.** The original text calls the bias a fixed
  value that may differ between cells, but every template it gives has a
  single `I`. This design shares one bias across the grid.
* **Grid size.** The 3 × 3-cell default is inferred from the published
  resource counts. The grid size of the r = 2 network is not known; the
  tests use 5 × 5.
* **Control details.** The iteration limit, the handshake (`start`, `busy`,
  `done`, `release`), locking loads and writes while busy, and the value
  `clear` leaves behind.
* **Template storage.** The template register file and its address map. The
  original keeps a trained, fixed template and only notes that patterns can
  be exchanged per task.
* **Number codings.** The codings in the table above, and edge-triggered
  flip-flops for the output register.

Not included:

* the training, which is done offline on a computer;
* an image input interface;
* the sequential, time-multiplexed "cellular image processor", which the
  original work suggests for large images but does not design.

Images therefore enter in parallel, one pixel per cell. Images larger than
the grid need a larger `ROWS`/`COLS`, at a cost of one cell datapath per
pixel.

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Each one also has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_cnn_cell` | new state, output, `changed`, load, hold and clear for random templates and neighbourhoods; r = 1 at 8/8 bits and r = 2 at 1/4 bits |
| `tb_cnn_array` | every cell's state after every iteration against a reference model, on non-square 4×5 (r = 1) and 5×6 (r = 2) grids, so row/column or wrap-around mistakes show |
| `tb_cnn_control` | step count, release, `converged`, latency, iteration limit, ignored `start`, clear |
| `tb_cnn_template_regs` | writes, lock, out-of-range addresses |
| `tb_cnn_output_latch` | capture, hold, ±1 coding at 8 and 1 bit, clear |
| `tb_cnn_top` | end to end at the default parameters; see below |
| `tb_cnn_workloads` | the same end-to-end checks on seven configurations: r = 1 with 1/4, 4/4 and 8/8 bit data/coefficients; r = 2 at 1/4 bits on 5×5; 2-, 3- and 8-bit data with 4-bit coefficients |
| `tb_cnn_object_extraction` | 8×8 network with the object-extraction template family for q = 1, 2, 3 on random images, compared with a flood fill rather than with the CNN model |

What `tb_cnn_top` covers:

* the templates above, random templates, and one template that never settles;
* results, states, `iter_count`, `converged` and the N + 2 latency, all
  against the reference model;
* each control mechanism at least once: convergence, the iteration limit,
  a load and a template write while busy, a clear during and after a run,
  and a restart without reloading.

The reference model is `tb/cnn_ref_pkg.sv`, plain integer arithmetic on a
toroidal grid. `tb/cnn_top_driver.sv` and `tb/cnn_array_harness.sv` are the
reusable stimulus and checking parts.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/cnn_pkg.sv tb/cnn_ref_pkg.sv tb/tb_cnn_top.sv --top-module tb_cnn_top
./obj_dir/Vtb_cnn_top
```

Replace `tb_cnn_top` with any other testbench name. Each one runs in
seconds.

The controller's two assertions mention `rst_n` so that they stay quiet
before the first reset. Verilator's lint notes this as a signal used both
asynchronously and synchronously. The note is harmless and does not affect
the logic.
