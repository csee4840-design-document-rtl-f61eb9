# Stereo beacon tracker: pose from point pairs, then triangulation, in fixed point

This design is an FPGA accelerator for a two-camera tracking system. The system has no
calibration target and no known camera geometry. A bright infrared beacon is moved through
the scene, and each camera reduces each frame to one point, the beacon's centroid. The first
few dozen point pairs are used to recover the relative pose of the cameras: the essential
matrix, its decomposition into rotation and translation, and the choice among the four possible
solutions. After that, every new pair of centroids is triangulated into a 3D position.

Everything from pixels to 3D coordinates runs in hardware:

- streaming centroid extraction over frames read from the host's DDR;
- the eight-point method with a 9x9 Jacobi eigensolver;
- a 3x3 Jacobi SVD;
- pose decomposition;
- the chirality (positive-depth) test;
- linear (DLT) triangulation.

All arithmetic is fixed point. Software only fills DDR frame buffers, writes a handful of
registers and reads back the result.

The host side (webcam capture, the Linux driver, DDR itself and the HPS-FPGA bridges) is not
part of this RTL. The top level exposes an Avalon-MM slave and an Avalon-MM read master for it.

## Data flow

```
            Avalon-MM slave (16 x 32 bit)
                     |
               control_asm  ---- frame base ---->  ddr_reader  <==>  Avalon-MM burst read master
                 ^   |                                  |              (32-bit address, 64-bit data)
                 |   |                              pixel_fifo (512 x 64 bit)
   centroid (A,B)|   |                                  |
                 +---+------------------------------ centroid (threshold, sums, area check, divide)
                     |
                pixel pair  -> normalize A / normalize B  (K^-1, fixed intrinsics)
                     |
                pair_router  (MODE.calibration_mode)
               /            \
     calib_log (32 pairs)    triangulate  (runtime; P1, P2 from chirality)
          |                        |
       ess_est                RESULT_X/Y/Z
  (A^T A, jacobi_eig 9x9)
          |
     pose_decomp  (jacobi_svd3, R1/R2, +-t)
          |
      chirality   (triangulate x4, depth signs)  ->  P1 = [I|0], P2 = [R|t]
```

Each `CONTROL.start` handles one frame pair, as follows:

1. The control FSM reads camera A's active buffer, then camera B's, through the single
   reader, FIFO and centroid chain. Both cameras share this one chain.
2. It forms the pixel pair, and the two normalisers map it to normalised camera coordinates.
3. The pair then goes one of two ways:
   - In calibration mode it is appended to the log. When the log is full, the whole pose
     chain runs once, and `STATUS.calibrated` is set.
   - In runtime mode it is triangulated, and `RESULT_X/Y/Z` and `result_valid` are written.

After either path, `done` and `frame_ready` are set.

## Fixed-point formats

Defined in `rtl/stereo_pkg.sv`:

| type    | format      | used for                                                   |
|---------|-------------|------------------------------------------------------------|
| `pt_t`  | Q16.16      | pixel centroids, normalised coordinates, RESULT_X/Y/Z      |
| `un_t`  | Q2.30       | unit-scale values: eigenvectors, U, V, R, t, c and s       |
| `acc_t` | 64-bit      | A^T A of the eight-point method (Q32.32); Jacobi matrices  |

Results are in units of the camera baseline, because the translation from an essential matrix
has unit length. They are positive in front of camera A.

Inside `triangulate`, the DLT matrix A is held in Q8.24 and A^T A in Q16.48, which keeps
precision when the smallest eigenvalue is close to zero.

## The Jacobi engines (the hard part)

Three solvers are built on one rotation unit, `jacobi_rot`:

- `jacobi_eig` #(N=9), for the essential matrix;
- `jacobi_eig` #(N=4), for triangulation;
- `jacobi_svd3`, for the pose.

### The rotation

For a pivot (p, q) with d = a_qq - a_pp, the textbook tangent is t = sgn(tau) / (|tau| +
sqrt(1 + tau^2)), with tau = d / (2 a_pq). Forming tau overflows any fixed-point range when
a_pq is tiny. That is exactly the case near convergence, which is the case that matters.
`jacobi_rot` therefore uses the equivalent form

    t = sgn(d) sgn(a_pq) * 2|a_pq| / (|d| + sqrt(d^2 + 4 a_pq^2)),

which never exceeds 1 in magnitude. It then computes c = 1/sqrt(1+t^2) and s = t*c. One
130-bit digit-by-digit square root and one restoring divider are shared, in sequence, so a
rotation takes about 330 clocks. If |a_pq| <= EPS, the rotation is skipped.

### The eigensolver

`jacobi_eig` holds the matrix as an N x N register array and runs cyclic sweeps, a fixed
number of them (10 for N=9). For each pivot it:

1. computes the rotation;
2. updates the two columns, then the two rows, then the eigenvector matrix Q. Each update
   does one element per clock, with full-width products.

At the end it returns the eigenvector of the smallest diagonal entry, and that entry. A 9x9
solve takes roughly 60k clocks.

### The SVD

`jacobi_svd3` is a two-sided Jacobi on a 3x3 matrix. Each (p, q) step does two things:

- It diagonalises the 2x2 block of A^T A built from columns p and q, and applies the rotation
  to the columns of A and to V.
- It then does the same with rows, applying the rotation to U.

This scheme drives A to a *signed permutation* of diag(sigma), not to an ordered diagonal.
That is easy to miss, and the pose decomposition breaks without a fix. A final ordering step
does three things:

- for each output position, it finds the entry of largest magnitude;
- it permutes the columns of U and V accordingly;
- it moves the sign of that entry into U's column.

The result is U diag(sigma) V^T with sigma1 >= sigma2 >= sigma3 >= 0.

### Pose decomposition and chirality

`pose_decomp` works from the SVD of E_raw:

- It builds E = U diag(s, s, 0) V^T, with s the mean of the two larger singular values.
- It builds R1 = U W V^T and R2 = U W^T V^T, with W = [[0,-1,0],[1,0,0],[0,0,1]], and
  t = U(:,3).
- If det(R1) < 0, it negates both rotations and t. This is the same as using -E, which has
  the same epipolar geometry.

It outputs the four candidates (R1, +t), (R1, -t), (R2, +t), (R2, -t).

`chirality` triangulates the last logged pair under each candidate. It chooses the first
candidate whose point has positive depth in both cameras, meaning w*z > 0 for camera A and
w*(R X + t)_z > 0 for camera B. If none passes, it keeps the best-scoring candidate, clears
`ok`, and the control FSM reports error code 4.

## Register map

There are 16 word registers. `avs_address` is the word index (byte offset / 4), reads have a
latency of one clock, and there is no waitrequest.

| offset | name          | contents                                                                 |
|--------|---------------|--------------------------------------------------------------------------|
| 0x00   | CONTROL       | write-1 strobes: 0 start, 1 reset, 2 clear_done, 3 clear_error, 4 clear_result (read as 0) |
| 0x04   | STATUS        | 0 busy, 1 done, 2 calibrated, 3 result_valid, 4 error, 5 frame_ready     |
| 0x08   | MODE          | 0 calibration_mode, 2:1 algorithm_select (stored only)                   |
| 0x0C-0x18 | FRAME_A0/A1/B0/B1_ADDR | byte base addresses of the four grayscale frame buffers    |
| 0x1C   | ACTIVE_BUF    | 0: buffer for camera A, 1: buffer for camera B                           |
| 0x20   | THRESHOLD     | 7:0 pixel threshold (a pixel is foreground if it is > threshold)         |
| 0x24   | AREA_LIMS     | 31:16 maximum, 15:0 minimum foreground area (inclusive)                  |
| 0x28-0x30 | RESULT_X/Y/Z | Q16.16 signed, baseline units                                          |
| 0x34   | DEBUG0        | {y, x} integer centroid of camera A                                      |
| 0x38   | DEBUG1        | {y, x} integer centroid of camera B                                      |
| 0x3C   | DEBUG2        | 31:24 pairs logged, 23:16 error code, 11:10 algorithm_select, 9:8 chosen pose, 3:0 FSM state |

Error codes:

| code | meaning                                  |
|------|------------------------------------------|
| 1    | camera A's area is out of range          |
| 2    | camera B's area is out of range          |
| 3    | runtime start before calibration         |
| 4    | no pose candidate passed chirality       |

`CONTROL.reset` resets the control FSM and every pipeline block, including the calibration.
It keeps the configuration registers.

Typical use:

1. Write FRAME_*_ADDR, THRESHOLD and AREA_LIMS.
2. Set MODE.calibration_mode = 1.
3. For each frame pair: write ACTIVE_BUF, pulse start, and poll STATUS.done.
4. After 32 good pairs, `calibrated` rises.
5. Clear MODE.calibration_mode. Each later start gives one RESULT.

## Timing

The DDR reader issues 16-beat bursts. A burst is issued only when the FIFO has room for it
together with all beats still in flight, so the FIFO can never overflow. Addresses step by 8
bytes per beat.

The centroid stage takes one 64-bit beat (8 pixels) per clock. A 640x480 frame is therefore
38,400 beats, plus about 100 clocks for the two divisions, when DDR does not stall.

| operation                            | clocks                                    |
|--------------------------------------|-------------------------------------------|
| one runtime operation (two frames, centroids, 4x4 triangulation) | at most 98,460 measured, with random DDR stalls |
| the same at an assumed 50 MHz clock  | 2 ms, against 33 ms per frame at 30 fps   |
| last calibration operation (two frames, then the 9x9 eigensolver, SVD, pose and four chirality triangulations) | 192,678 measured |

The end-to-end testbench measures these counts. It fails if a runtime operation is shorter
than the 76,800 beats of its two frames, or longer than one frame period at 50 MHz.

## Accuracy

The end-to-end testbench uses a synthetic scene: a beacon rendered as a 4x4 block in each
640x480 frame, seen by two cameras with f = 600 px, about 11 degrees of relative yaw, and
a baseline of 1. The recovered points agree with a double-precision model of the same
algorithm to about 1e-4.

Against the true 3D points, the error is 1-4 % of depth. This comes entirely from rounding
the beacon to whole pixels, which puts each centroid within +-0.5 px of its true projection.
The testbench's tolerance is 5 % of depth.

Two properties of the approach itself are worth knowing:

- The eight-point solution is only as good as the spread of the calibration points.
- There is no Hartley normalisation. The inputs are already normalised camera coordinates.

## Departures and choices

The parts taken directly:

- the register map, its bit fields and the frame sizes;
- the 512 x 64-bit FIFO;
- the 8-byte address step;
- the rotation-based eigen and SVD algorithms;
- W, R1/R2 and t = U(:,3);
- the chirality rule.

This design's own choices:

- **One shared centroid chain.** A single reader, FIFO and centroid chain serves both cameras
  in turn. The frames are read one after the other.
- **Fixed intrinsics.** The camera intrinsics are parameters of `stereo_top` (`FX_A` ...
  `CY_B`, Q16.16), because the register map has no place for them.
- **Calibration size.** `CAL_PAIRS` = 32.
- **Chirality test point.** Chirality is decided on one point, the last logged pair.
- **Fixed sweep counts.** Eigensolver 10, SVD 8, triangulation 6. There is no convergence test.
- **The SVD ordering step**, described above.
- **algorithm_select** is stored and read back but selects nothing, since only one algorithm
  exists.
- **No smallest eigenvalue in DEBUG.** `ess_est` outputs it, but it is not among the DEBUG
  registers.
- **Error codes and DEBUG layout.** The error codes and the DEBUG register layout are this
  design's own.
- **Avalon details.** The read latency of 1 and the 16-beat bursts are this design's choice.

## Files

`rtl/` contains one module or package per file:

| file | what it is |
|------|------------|
| `stereo_pkg.sv` | types, register indices, error codes |
| `stereo_top.sv` | top level |
| `control_asm.sv` | registers and control FSM |
| `ddr_reader.sv`, `pixel_fifo.sv`, `centroid.sv` | frame path |
| `normalize.sv`, `pair_router.sv`, `calib_log.sv` | pair handling |
| `ess_est.sv`, `jacobi_eig.sv`, `jacobi_svd3.sv`, `pose_decomp.sv`, `chirality.sv`, `triangulate.sv` | geometry |
| `jacobi_rot.sv`, `udiv_seq.sv`, `usqrt_seq.sv` | shared arithmetic |

`tb/` contains the rest:

- one self-checking testbench per block, `tb_<block>.sv`;
- `tb_geom_pkg.sv`, a real-valued scene and reference geometry;
- `ddr_model.sv`, an Avalon burst slave with random waitrequest and latency, which renders
  beacon frames.

Each testbench ends with `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_stereo_top` runs the top at its default parameters, with full-size frames and 32
calibration pairs. It counts each mechanism and fails if any never happened:

- DDR stalls;
- buffer switches;
- area rejects;
- runtime before calibration;
- mode switch;
- pose solve;
- triangulations;
- clears;
- reset.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_stereo_top rtl/stereo_pkg.sv tb/tb_geom_pkg.sv tb/tb_stereo_top.sv
./obj_dir/Vtb_stereo_top
```

Any other testbench builds the same way, with its own name as the top module. Drop
`tb/tb_geom_pkg.sv` for testbenches that do not import it. `tb_stereo_top` runs in a few
seconds.
