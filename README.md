# DARTEL deformation accelerator (SystemVerilog)

DARTEL is a diffeomorphic registration method used in voxel-based morphometry
of brain MRI. It describes the warp between two images by a stationary velocity
field `u`. It turns that field into a deformation `Phi` and its Jacobian field
by integrating over time. That integration is the costly inner loop, so it is
the part moved into hardware. It has two steps:

1. **Small deformation.** Take one Euler step with a 1/2^K time step:
   `Phi(x) = x + u(x) / 2^K`, together with its Jacobian `I + Du(x) / 2^K`.
2. **Scaling and squaring.** Compose the deformation with itself K times:
   `Phi^(2t) = Phi^(t) o Phi^(t)`. Each composition also composes the Jacobian
   field by the chain rule: `J_C(x) = J_A(Phi_B(x)) * J_B(x)`.

K = 3 gives the usual eight-time-step scheme:
Phi^(1/8) -> Phi^(1/4) -> Phi^(1/2) -> Phi^(1).

This RTL does the whole integration in 16-bit fixed point. It works on the
full image (121 x 145 x 121 voxels by default) and handles one voxel per clock
cycle in every sweep. Alongside it sits a small library of fixed-point
elementary functions, reachable through a separate port:

- division and square root, by Newton-Raphson iteration;
- natural log and exponential, by table look-up.

## Top level: `dartel_accel`

```
            vel_* ──► [vol_mem: velocity u, 4 read ports]
                               │
                      small_deformation ──► [vol_mem: buffer 0] ◄─┐
                                                   │  ▲           │
                                          compose_unit (src ⇄ dst)│
                                                   ▼  │           │
                                              [vol_mem: buffer 1]─┘
                                                   │
            res_* ◄──────────── buffer (K mod 2), host read port
            m_*   ◄──►  fx_math_unit (div, sqrt, log, exp)
```

A run is K + 1 sweeps over the volume, started by one `start` pulse:

| sweep | unit | reads | writes |
|---|---|---|---|
| 0 | `small_deformation` | velocity | buffer 0 |
| 1 | `compose_unit` | buffer 0 | buffer 1 |
| 2 | `compose_unit` | buffer 1 | buffer 0 |
| 3 | `compose_unit` | buffer 0 | buffer 1 |

The result therefore ends up in buffer `K mod 2`. The host port `res_*` always
reads that buffer. A small controller (IDLE, SD, CSTART, CWAIT) sequences the
sweeps and swaps the source and destination buffers after each composition.
It starts the next composition only once the previous unit has written its
last voxel. An assertion checks this.

**Timing.** Suppose `start` is high in cycle s, and let N = NX·NY·NZ. Then
`done` pulses in cycle s + (N + 2) + K·(N + 7) + 1. For the default image that
is 8,491,804 cycles, or about 17 ms at a 2 ns clock. `busy` stays high until
`done`. `res_data` shows the word at `res_addr` one cycle after the address is
given. The `sweeps` output counts finished sweeps since reset, so a run adds
K + 1 to it. Do not write velocities or read results while `busy` is high.

**Host ports.** In a board build a PCIe endpoint would drive these ports. This
RTL does not contain one. The velocity volume is loaded one voxel per cycle
through `vel_we`, `vel_addr` and `vel_data`. `vel_addr` is the linear voxel
index x + NX·(y + NY·z).

A call's round trip is two link latencies, plus the argument and result
transfers, plus the run itself. The link latency is a few µs. On a 27 Gb/s
link the transfers take:

- 101.9 Mbit of velocities in: about 3.8 ms;
- 407.6 Mbit of positions and Jacobians out: about 15.1 ms.

The run itself takes about 17 ms, so at this size the transfers cost about
as much time as the computation.

## Number format

Every word is signed 16-bit fixed point with 7 fraction bits (Q9.7):

- the range is −256 … +255.99;
- the resolution is 1/128 of a voxel.

Choosing 16 bits means accepting some error to save resources. Against
double-precision floating point, 16-bit fixed point has been reported to keep
the RMS error of the computation under 10 %, while 8 bits goes above 30 %.
This RTL has not been measured against floating point. The 9/7
split between integer and fraction bits is this design's choice. It lets
absolute voxel positions up to 255 be represented; the longest image axis is
145 voxels. The Jacobian entries use the same format, so their resolution is
coarse (1/128). `FX_W` and `FX_F` are in `dartel_pkg`, but the arithmetic
units have their internal constants tuned to Q9.7.

A deformation sample (`def_t`, 192 bits) holds:

- the mapped position `phi` (x, y, z), as an absolute position in voxel units,
  not a displacement;
- the 3×3 Jacobian `jac[row][col] = d phi_row / d x_col`.

## Small deformation (`small_deformation`)

This unit sweeps the voxels with x varying fastest. Each cycle it issues four
reads of the velocity memory: the voxel itself and its +x, +y and +z
neighbours. The result is written two cycles later:

- `phi = x·128 + (u >>> K)`;
- `jac[r][c] = 128·δ(r,c) + ((u_r(x + e_c) − u_r(x)) >>> K)`.

The forward differences are this design's choice. At the upper face of each
axis the neighbour is the voxel itself, so the derivative there is 0. All
results saturate to 16 bits. With `start` in cycle s, `done` comes in cycle
s + N + 2.

## Composition (`compose_unit`)

This is the heart of the design, and the part where most of this design's own
choices sit. For each voxel x, in a pipeline that takes one voxel per cycle:

1. **Read B.** Read `Phi_B(x)` and `J_B(x)` (read port 8 of the source
   buffer).
2. **Split and clamp.** Each coordinate of `Phi_B(x)` becomes a lower corner
   index `i0` and a weight `f` in 0…128, taken from its 7 fraction bits.
   Points outside the volume are clamped:
   - a negative coordinate gives `i0 = 0, f = 0`;
   - a coordinate at or beyond `n − 1` gives `i0 = n − 2, f = 128`.

   The 8 corner addresses are formed combinationally from the read data and
   issued on read ports 0–7. Corner k has offsets {dz, dy, dx} = k.
3. **Interpolate.** All 12 words of A (position and Jacobian) are interpolated
   trilinearly:
   - seven linear steps, one pipeline stage per axis: four along x, then
     two along y, then one along z;
   - each step is `a + (((b − a) · f) >>> 7)`, with floor rounding.
4. **Multiply.** `J_C = interp(J_A) × J_B`. The dot products are summed at
   48 bits, shifted right by 7 and saturated. The position is the
   interpolated `Phi_A`.

For squaring, A and B are the same buffer, so the source buffer needs 9 read
ports per cycle plus one for the host. With `start` in cycle s, `done` comes
in cycle s + N + 6.

Resampling by trilinear interpolation, clamping at the borders, and the
rounding and saturation rules are all this design's own choices. The method
itself does not pin them down. Other border rules, such as wrap-around, would
change only the clamp step.

## Arithmetic functions (`fx_math_unit` and its four units)

A request (`m_valid`, `m_op`, `m_a`, `m_b`) returns its result exactly 6
cycles later. One request can be issued per cycle, and results come back in
order. The faster units are padded to the same latency, so two results never
collide; an assertion checks this.

| op | unit | method | own latency | accuracy |
|---|---|---|---|---|
| 0 | `fx_div_nr` | normalise divisor to [0.5,1); start 48/17 − 32/17·m; 3 iterations x ← x(2 − m·x) in Q30; multiply by dividend | 5 | ±1 LSB of trunc(a/b); b = 0 saturates |
| 1 | `fx_sqrt_nr` | normalise by even power of 2 to [0.25,1); start 7/3 − 4/3·m; 4 iterations y ← y(3 − m·y²)/2; √m = m·y | 6 | ±1 LSB; negative → 0 |
| 2 | `fx_log_lut` | leading-one normalisation; 256-entry table ln(1 + i/256) in Q2.14; add (p − 7)·ln 2 | 2 | ±1 LSB; a ≤ 0 → −32768 |
| 3 | `fx_exp_lut` | a·log2(e) = i + f; 256-entry table 2^(k/256) in Q1.14; shift by i | 2 | ±(2 LSB + 0.4 %); saturates |

Both tables are computed at elaboration from the formulas above, using
`$ln` and `$pow` in a constant function. No data files are needed.

These units stand in for the costly elementary operations of the original
software code. The original small-deformation routine, for example, leans
heavily on log and division. Which of its expressions use them is not
fixed here, so the units are exposed to the host rather than wired into the
deformation datapath.

## Memories (`vol_mem`)

Each memory is one array per volume, with one write port and NRD synchronous
read ports. A read of an address being written in the same cycle returns the
old word. At the default size the three memories hold:

| memory | contents | size |
|---|---|---|
| velocity | 2,122,945 × 48 bits | 102 Mbit |
| buffer 0 | 2,122,945 × 192 bits | 408 Mbit |
| buffer 1 | 2,122,945 × 192 bits | 408 Mbit |

That is far beyond the on-chip RAM of any current FPGA. A ZU7EV-class device
has about 38 Mbit of block RAM and UltraRAM. As written, this is a functional
model of the memory system. A hardware build would keep the volumes in
external DRAM. It would stream the sweeps, and it would cache a window of
slices around the current sample position to serve the 8 corner reads. That
restructuring is not done here.

## What is not here

- **Full multigrid (FMG) solver.** The solver for the regularised Gauss-Newton
  update of the velocity field is part of the accelerated DARTEL code, but the
  operator and grid schedule are not specified well enough to build it.
- **Velocity-to-momentum conversion** and the other auxiliary DARTEL routines.
- **PCIe endpoint and host software.** The software runs segmentation,
  normalisation and statistics, and calls the accelerator through MEX.

A complete DARTEL iteration also needs these parts. This RTL produces the
exponentiated deformation and its Jacobians, which feed them.

## Verification

Every module has a self-checking testbench in `tb/`. Each one:

- prints `TB_RESULT checks=N failures=M`;
- has a watchdog that stops the run if it hangs;
- checks exact latencies, or run lengths, in cycles.

`tb/dartel_ref_pkg.sv` is an integer reference model of the deformation
path. It implements the same arithmetic rules, written with divisions and
comparisons rather than shifts and bit slices.

| testbench | what it shows |
|---|---|
| `tb_fx_div_nr`, `tb_fx_sqrt_nr`, `tb_fx_log_lut`, `tb_fx_exp_lut` | ~3000 random and corner operands against real arithmetic; latency |
| `tb_fx_math_unit` | mixed ops, order, 6-cycle latency, every op used |
| `tb_vol_mem` | multi-port reads against a shadow array, read-during-write |
| `tb_small_deformation` | 5×4×3 volume, bit-exact, every voxel written once, N + 2 cycles |
| `tb_compose_unit` | 5×4×3 volume with many out-of-range sample points, bit-exact, N + 6 cycles |
| `tb_dartel_accel` | whole accelerator at 6×5×4, two runs, bit-exact Phi^(1) and Jacobians, run length, counts sweeps, border clamps and arithmetic ops |
| `tb_dartel_accel_full` | whole accelerator at the default 121×145×121, one run on a smooth synthetic field, all 2,122,945 voxels bit-exact (about 30 s and 0.6 GB of simulation) |

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/dartel_pkg.sv tb/dartel_ref_pkg.sv tb/tb_dartel_accel.sv \
    --top-module tb_dartel_accel -o sim
./obj_dir/sim
```

For the unit testbenches, drop `tb/dartel_ref_pkg.sv` if the testbench does
not import it.

## How far to trust it

Two things are established:

- The deformation datapath matches its reference model bit for bit, at small
  sizes and at full size.
- The arithmetic units meet the stated error bounds against real arithmetic.

What is not established:

- How close Q9.7 results come to the floating-point DARTEL code on real MRI
  data.
- Timing closure at 500 MHz. No FPGA build has been made. The longest paths
  are likely the corner-address arithmetic, which sits in the same cycle as
  the memory read data, and the 3×3 product.
- Resource use, given the memory caveat above.

The register-transfer structure is original to this implementation:

- the pipeline stages;
- the ping-pong buffers;
- the border rules;
- the number formats inside the units.
