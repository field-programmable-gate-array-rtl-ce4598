# JPEG XR lapped biorthogonal transform on one on-chip tile

This is a forward Lapped Biorthogonal Transform (LBT) engine, the
spatial-to-frequency transform of JPEG XR. It keeps a whole 128 x 128 tile of
16-bit samples in a single-port on-chip RAM and computes the full two-stage
transform **in place**. Three small arithmetic units take turns on the RAM's
contents, and register banks turn the RAM's one-word-per-clock port into the
4- or 16-word parallel inputs the units need. The memory cost does not depend
on the image size. The tile store is 128 x 128 x 16 = 262,144 bits, and a
larger image is sent through one tile after another.

## What the transform does

JPEG XR groups samples into 4 x 4 *blocks* and 16 blocks into a 16 x 16
*macroblock*. The LBT runs the same recipe twice:

* **Stage 1**, on the sample plane (TILE x TILE):
  1. **Overlap pre-filter, 4-point (OPF_4pt).** Along the four edges of the
     tile, each row (top/bottom: rows 0, 1, P-2, P-1) and each column
     (left/right: columns 0, 1, P-2, P-1) that crosses a block boundary is
     filtered on the four samples 4i-2 .. 4i+1 around the boundary. These are
     the 2x4 and 4x2 edge areas. The 2x2 tile corners are left alone.
  2. **Overlap pre-filter, 4x4 (OPF_4x4).** It runs on every 4x4 area centred
     on a point where four blocks meet (rows and columns 4i-2 .. 4i+1).
  3. **Forward core transform (FCT_4x4).** A DCT-like integer transform runs
     on every 4x4 block. Its output 0 is the block's DC coefficient.
* **Stage 2**, on the plane of DC coefficients (TILE/4 x TILE/4): the same
  three steps. The 16 DC coefficients of a macroblock form one 4x4 "DC
  block". After stage 2, each macroblock holds one DC coefficient, 15
  low-pass coefficients and 240 high-pass coefficients.

The two pre-filters smooth across block boundaries, which reduces blocking
artefacts. They are optional: with `opf_en_i` low, only the two FCT passes
run.

The areas of one step never overlap, so jobs within a step can run in any
order. The engine runs them in raster order of their position.

## Datapath

```
 tile_in_i ─► MUX A ─► OCM (TILE*TILE x 16, single port) ─► DEMUX A ─► data_out_o
               ▲                                              │
               │                                           DEMUX B (word k)
               │                                              ▼
               │                                    bank A (16 x 16 bit)
               │                          words 3..0 │               │ words 15..0
               │                             DEMUX C ▼               ▼ DEMUX D
               │                               OPF_4pt        OPF_4x4   FCT_4x4
               │                                  ▼                ▼       ▼
               │                         bank B (4 x 16)         MUX C
               │                                  │                ▼
               │                               MUX B       bank C (16 x 16)
               │                                  │                │
               │                                  │             MUX D
               └──────────────── MUX E ◄──────────┴────────────────┘
```

`lbt_datapath` is this picture. `lbt_ctrl` drives every select, the RAM
address and strobe, and the bank loads, through one packed control word
(`dp_ctrl_t` in `lbt_pkg`). A DEMUX output that is not selected reads as zero.

## Schedule and timing

One tile goes through three phases:

| phase  | what happens | clocks |
|--------|--------------|--------|
| load   | `tile_in_i` written in raster order while `in_valid_i` and `in_ready_o` | TILE² (plus input gaps) |
| jobs   | stage 1 then stage 2; within a stage: edge OPF_4pt jobs, then OPF_4x4 jobs, then FCT jobs | sum of 2N+2 per job |
| unload | coefficients streamed in raster order, `out_valid_o` high, one per clock, no back-pressure, then a `done_o` pulse | TILE² + 1 |

Every job of N words (N = 4 for OPF_4pt, 16 otherwise) runs in four steps:

* **RD**, N clocks: the job's N addresses are issued, one per clock. Each
  word is written into bank A one clock after its address.
* **RDW**, 1 clock: bank A captures the last word.
* **CALC**, 1 clock: bank B or bank C loads the unit's result. The units are
  combinational.
* **WR**, N clocks: the results are written back to the same addresses.

So a job takes 10 clocks for OPF_4pt and 34 clocks for OPF_4x4 or FCT. Jobs
do not overlap. With P = TILE in stage 1 and P = TILE/4 in stage 2, each
stage runs:

* 8(P/4 - 1) OPF_4pt jobs
* (P/4 - 1)² OPF_4x4 jobs
* (P/4)² FCT jobs

For the default 128 x 128 tile with the filters on, that is 74,373 clocks of
processing (36,993 with the filters off). At the document's 107 MHz this is
about 0.7 ms per tile, plus 2 x 16,384 clocks for loading and unloading. The
first output word comes one clock after the last job.

Stage 2 does not copy the DC coefficients. It addresses every 4th row and
column of the RAM, where FCT_4x4 left them. The output is therefore the
coefficient plane in place:

* Each block's 16 FCT outputs are in row-major order at the block's
  positions.
* Each macroblock's 16 stage-2 coefficients sit at its 16 DC positions
  (rows and columns that are multiples of 4).

`busy_o`, `job_start_o`, `job_op_o` and `stage_o` report progress.

## The arithmetic units

All samples are 16-bit two's complement, and sums and differences wrap at 16
bits. Every unit is built from integer *lifting* steps of the form
`x ±= (k*y + r) >>> s` with k = 1 or 3. Each step can be undone exactly, so
the whole transform can be inverted without loss. The term `(k*y + r) >>> s`
is computed at 19 bits (`lbt_pkg::lift`), so the rounding constant and the
multiply by 3 never wrap.

* **t2x2h** is the 2x2 Hadamard. It is its own inverse.
* **t_odd** and **t_oddodd** are the two odd rotations of the core transform.
* **fwd_rotate** and **fwd_scale** are the two-sample rotation and scaling of
  the pre-filters.
* **opf_4pt** is built around one rotate and two scales. It starts with
  butterflies (a = A+D, b = B+C), then adds halving, negation and 3/8 lifting
  steps around them.
* **opf_4x4** works in three steps:
  1. four Hadamards on (0,3,12,15), (1,2,13,14), (4,7,8,11), (5,6,9,10);
  2. four scales on (0,15), (1,14), (4,11), (5,10) and four rotates on
     (13,12), (9,8), (7,3), (6,2);
  3. the same four Hadamards again.
* **fct_4x4** works in three steps:
  1. four Hadamards (rounding 0);
  2. a Hadamard with rounding 1 on (0,1,4,5), TOdd on (2,3,6,7) and
     (8,12,9,13), and TOddOdd on (10,11,14,15);
  3. an output permutation. Output k takes internal term
     PERM[k] = 0,8,4,6,2,10,14,12,1,11,15,13,9,3,7,5.

Each file lists its steps in its header comment.

## How far to trust it, and where it departs from its source

The block structure follows the published architecture closely:

* the memory, the register banks with their sizes, and every multiplexer;
* the order of the filter and transform steps;
* the connection diagrams of OPF_4pt, OPF_4x4 and FCT;
* the FCT output permutation.

The following are this design's own choices. Treat them with care:

* **Exact lifting constants of the building blocks.** The source names FWD
  Rotate, FWD Scale, T2x2h, T2x2h Enc, TOdd and the permutation, but does not
  give what is inside them. They were filled in following the
  JPEG XR reference transform as this design reads it. The ITU-T T.832 text was
  not available, so these are **not confirmed bit-exact against JPEG XR
  conformance streams**. The testbenches prove that the RTL equals the
  written-down equations and that each unit inverts exactly. They cannot
  prove that the equations are JPEG XR's. Before relying on bit-exact
  compatibility, compare `fwd_rotate`, `fwd_scale` and the rounding constants
  with the standard.
* **Shift direction in OPF_4pt.** The shift boxes of the 4-point filter
  diagram are drawn as left shifts. They are right shifts here, because the
  lifting steps halve.
* **TOddOdd.** The source labels all three odd units of the FCT "TOdd". The
  quadruple (10,11,14,15) uses the odd-odd rotation here, as JPEG XR does.
* **T2x2h Enc.** It is taken to be the same Hadamard as T2x2h, with rounding
  0.
* **Controller, handshakes, reset and timing.** These are all this design's
  own (synchronous active-low reset). The source shows an external "memory
  address" input. Here the sequencer generates all addresses.
* **Arithmetic and timing closure.**
  * The units are single-cycle combinational logic. The 107 MHz figure of the
    original FPGA build has not been checked for this RTL.
  * The original reports 4 hardware multipliers. The constant multiplies by 3
    here are left to synthesis.
* **Sample wrap-around.** 16-bit wrap-around is safe for 8-bit image data.
  Full-range 16-bit input can overflow inside the filters.
* **Tile size.** `TILE` defaults to 128. It accepts any multiple of 16 from
  32 to 256, and the smaller sizes are meant for simulation.

## Files

`rtl/`, sources listed bottom-up:

* `lbt_pkg.sv`: sample type, control word, job kinds, `lift`.
* `fwd_rotate.sv`, `fwd_scale.sv`, `t2x2h.sv`, `t_odd.sv`, `t_oddodd.sv`:
  lifting building blocks.
* `opf_4pt.sv`, `opf_4x4.sv`, `fct_4x4.sv`: the three processing units.
* `ocm.sv`: the single-port tile RAM, with one-clock read latency.
* `reg_bank.sv`: banks A, B and C.
* `lbt_datapath.sv`, `lbt_ctrl.sv`, `lbt_top.sv`.

`tb/`:

* `lbt_ref_pkg.sv`: an independent integer model of every unit, its exact
  inverse, and the whole-tile LBT.
* `tb_<unit>.sv`: one self-checking testbench per unit. Each one compares the
  unit with the model and checks that the model's inverse restores the input.
* `tb_lbt_datapath.sv`: drives the datapath's control word by hand.
* `tb_lbt_top.sv`: end to end at TILE = 32. It runs three tiles (filters on,
  off, on) with input gaps and checks:
  * every coefficient;
  * the job counts per stage;
  * the exact processing latency.
* `tb_lbt_full.sv`: the same checks on the default 128 x 128 engine. It
  takes about a second.
* `tb_lbt_image.sv`: a 256 x 256 test image cut into four 128 x 128 tiles
  and sent through the default engine one tile after another. It checks
  every coefficient. It also applies the model's inverse LBT to the
  hardware's output and checks that this gives back the image exactly, so
  the transform is shown to be lossless.

Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/lbt_pkg.sv tb/lbt_ref_pkg.sv tb/tb_lbt_full.sv --top-module tb_lbt_full
./obj_dir/Vtb_lbt_full
```

For another testbench, replace `tb_lbt_full`. Verilator finds the other
modules through `-Irtl -Itb`.
