# Pipelined particle-to-grid charge mapping

Particle-mesh Ewald methods for molecular dynamics split the electrostatic
force into a short-range part, computed directly between nearby particles, and
a long-range part computed on a regular grid with FFTs. Before the FFT, every
particle's charge has to be spread onto the grid points around it. This step
costs much more arithmetic than the FFT itself: a 92,224-atom system on a 32³
grid needs tens of millions of floating-point operations to map, but only a few
million for the 3-D FFT.

This RTL maps charges at **one particle per clock cycle**. Each particle
updates all 64 grid points of its 4×4×4 neighbourhood in the same cycle. Two
ideas make that possible:

1. **64 arithmetic units.** Each unit computes the contribution of the current
   particle to one of its 64 grid points.
2. **An interleaved grid memory.** The grid is spread over 64 RAM banks so that
   the 64 points of any particle always lie in 64 different banks. All 64 can
   then be read, updated and written back at once.

## The arithmetic

A particle at position (x, y, z), measured in grid spacings, lies in cell
(⌊x⌋, ⌊y⌋, ⌊z⌋). Its position inside that cell is o = x − ⌊x⌋ in x, and
likewise in y and z. The interpolation is third order: the particle touches the
grid points at offsets −1, 0, +1 and +2 from its cell in each dimension. The
weights for those four points are these cubics in o:

| weight | polynomial | grid point |
|---|---|---|
| φ₀ | −½o³ + o² − ½o | cell − 1 |
| φ₁ | 3/2 o³ − 5/2 o² + 1 | cell |
| φ₂ | −3/2 o³ + 2o² + ½o | cell + 1 |
| φ₃ | ½o³ − ½o² | cell + 2 |

The four weights sum to 1 for every o. The underlying basis function is C¹
continuous, so the same weights can also be used to interpolate forces back
from the grid. Grid point (i, j, k) receives Q·φᵢ(oₓ)·φⱼ(o_y)·φₖ(o_z) from a
particle with charge Q.

Number formats:

- Coordinates are unsigned fixed point, with `INT_W = log2(GRID_N)` integer
  bits over `FRAC_W` fraction bits.
- Charges, weights and grid values are IEEE-754 single precision.

The grid is periodic. A neighbourhood that crosses an edge wraps around to the
opposite side.

## Pipeline

```
 in_x/y/z, in_q ──► input reg ──┬─ fractions ─► 3 × basis unit ──► φx[4], φy[4], φz[4] ─┐
                                └─ cells, Q ──► delay line (matches basis latency) ───┤
                                                                                      ▼
                                        64 × arith_unit: (φx·φy)·(φz·Q) ──► contribution
                                                                                      │
 cell ─► interleave_addr ─► 64 bank addresses ─► 64 × grid_bank ─► read align_mux ─► + ─┘
                          └─ mux selects ──────────────────────── write align_mux ◄──┘
```

A particle accepted in cycle *t* moves through the pipeline as follows:

| cycle | what happens |
|---|---|
| *t*+1 | The input register holds the particle; each coordinate is split into its cell index and its fraction. |
| *t*+2 … *t*+7 | The three `basis_eval` units (x, y, z) turn the fractions into weights. Each unit converts its fraction exactly to a float, forms o² and o³, multiplies each power by its constant coefficient, and adds the terms. The weights are available in *t*+7. |
| *t*+8 | Arithmetic unit *a* = dx + 4dy + 16dz holds φx[dx]·φy[dy] and φz[dz]·Q. The bank addresses of the particle's 64 points go to the RAMs. |
| *t*+9 | The unit holds the product of the two. The RAM data arrives. The read `align_mux` routes each bank's word to the unit that owns that point, and each unit adds its contribution. The write `align_mux` routes the 64 sums back to their banks, which store them at the end of the cycle. |

A particle's support is read in cycle *t*+8 and written at the end of *t*+9.
The next particle reads its own support in cycle *t*+9, while the write is
still pending. **This overlap is the subtle part of the design.** Two particles
in a row usually share grid points, because particles sorted by cell are
neighbours. The next particle's read and the previous particle's write of the
same word then fall on the same clock edge.

Each `grid_bank` therefore has a write-first bypass: a read of the address being
written returns the new value. Because the read-add-write loop is only one
cycle long, this one bypass is the only forwarding path needed. The pipeline
never stalls for a data hazard, whatever the order of the particles.

The price of this choice is timing. The floating-point adder of each unit sits
in one cycle, between the RAM read data and the RAM write data. A faster clock
would need a deeper accumulate loop, and then more forwarding paths or a hazard
stall.

## Memory interleaving

Grid point (gx, gy, gz) is stored as follows:

- **bank** = (gx mod 4) + 4·(gy mod 4) + 16·(gz mod 4)
- **address** = (gx div 4) + G·(gy div 4) + G²·(gz div 4), where G = GRID_N/4

Any four consecutive indices, wrapped modulo GRID_N, have four different
residues mod 4. So the 4×4×4 points of a particle occupy each of the 64 banks
exactly once. This requires GRID_N to be a power of two and at least 8.

Which unit's point lands in which bank depends on the particle's cell, so the
ports must be realigned for every particle. `interleave_addr` computes three
tables from the cell index:

- the address of the particle's point in each bank;
- for each bank, the unit whose point it holds (the select of the write mux);
- for each unit, the bank that holds its point (the select of the read mux).

`align_mux` is the 64-way multiplexer array used on both sides. The default
32³ grid is 64 banks × 512 words × 32 bits = 128 KB.

## Operation and interface (`pgm_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | Clock and synchronous active-low reset. Reset clears the control state, not the grid. |
| `in_valid`, `in_ready` | in/out | Particle handshake. A particle is taken on a clock edge where both are high. `in_ready` is low only while a clear is pending or running. A particle that is offered must stay offered until it is taken (asserted). |
| `in_x`, `in_y`, `in_z` | in | Coordinates: `INT_W` cell bits above `FRAC_W` fraction bits. |
| `in_q` | in | Charge, single precision. |
| `clr_start` | in | Pulse to zero the grid. The clear waits until the particles in flight have been written. It then writes one word in every bank per cycle, GRID_N³/64 cycles in all (512 at the default size). |
| `clearing` | out | A clear is pending or running. |
| `idle` | out | No particle is in flight and no clear is pending or running. |
| `rd_valid`, `rd_x/y/z` | in | Read one grid point. Allowed only while `idle` (asserted). One read per cycle is possible. |
| `rd_data_valid`, `rd_data` | out | The value, one cycle after the request. |

A typical run:

1. Pulse `clr_start` and wait until `clearing` falls.
2. Stream the particles.
3. Wait for `idle`. It rises 10 cycles after the last particle is accepted.
4. Read the grid out.

The read port is where the FFT stage would attach.

Parameters of `pgm_top`:

| parameter | default | meaning |
|---|---|---|
| `GRID_N` | 32 | Grid points per dimension. |
| `FRAC_W` | 14 | Fraction bits of a coordinate. |
| `BASIS` | `BASIS_DIRECT` | `BASIS_DIRECT` evaluates the weights with floating-point arithmetic (`basis_eval`, latency 6). `BASIS_LUT` reads them from tables (`basis_lut`, latency 1, so the pipeline is 5 cycles shorter). |
| `LUT_N` | 14 | Table address bits for `BASIS_LUT`. Fractions with more bits are truncated. |

The number of units and banks is fixed at 64, the size of the order-3 support.
It is `NUM_BANKS` in `pgm_pkg`.

## Floating point

`fp_mul` and `fp_add` are combinational single-precision operators. They round
to nearest, ties to even. They simplify IEEE-754 in these ways:

- Subnormal inputs are read as zero, and subnormal results are flushed to zero.
- Overflow gives infinity.
- NaN and infinity inputs are not special-cased.

None of these cases can arise from weights in [0, 1] and ordinary charges.
Because every product and sum is rounded to single precision, a grid value
differs from an exact sum by a few parts in 10⁶ of the charge that reaches it.
Computing the weights as `o³` polynomials also loses some relative accuracy
where a weight is close to zero. This has no effect on a weight's absolute
error, which stays around 10⁻⁷.

The table variant `basis_lut` holds correctly rounded weights. The tables are
computed at elaboration: each weight is an exact integer numerator over
2^(3·LUT_N+1), rounded to single precision. No data file is needed.

## Departures and open points

- **Main configuration.** The floating-point basis evaluation is the default
  because that was the version built in hardware, at 450 particles/µs. The
  table version is a parameter.
- **Table size.** The three tables take 3 × 2¹⁴ × 16 bytes = 768 KB. The
  original table variant needed less memory overall, about 640 KB including the
  grid. How it organised its table is not known, so it is not reproduced.
- **Choices of this design.** The following were not specified and were chosen
  here:
  - the pipeline depth and the order of operations inside the basis unit;
  - the assignment of weights to the three multipliers of a unit;
  - the mod-4/div-4 bank mapping (only the fact that the mapping uses all
    integer bits was given);
  - the write-first bypass;
  - the clear and read-out port;
  - the valid/ready handshake;
  - periodic wrapping on the FPGA path.
- **Not included.**
  - The FFT units that would consume the grid are not part of this RTL.
  - Neither is interpolation from the grid back to particles (forces).
  - The GPU kernels for the same mapping (a particle-centric and a
    grid-centric variant) are software and have no RTL counterpart.
- **Floating-point units.** Vendor hard floating-point blocks are replaced by
  the portable `fp_mul` and `fp_add`. Their timing is not characterised.

## Files

`rtl/`:

- `pgm_pkg.sv`: types, constants and latencies shared by the modules.
- `pgm_top.sv`: the complete pipeline.
- `basis_eval.sv`: floating-point evaluation of the weights.
- `basis_lut.sv`: table lookup of the weights.
- `arith_unit.sv`: one of the 64 arithmetic units.
- `interleave_addr.sv`: bank addresses and mux selects.
- `align_mux.sv`: the 64-way multiplexer array.
- `grid_bank.sv`: one grid memory bank.
- `fp_mul.sv`, `fp_add.sv`: the floating-point operators.

`tb/`: one self-checking testbench per module, each named `tb_<module>.sv`.
They use `tb_fp_pkg.sv`, a double-precision reference for the floating-point
conversions. In addition:

- `tb_pgm_top.sv` runs the full design at its default size. It covers clears,
  bursts with and without gaps, clustered and edge-crossing particles, and a
  clear requested while particles are in flight. It then reads back and checks
  the whole grid.
- `tb_pgm_lut.sv` builds the design with the table basis, maps two random
  particle sets back to back and checks the whole grid after each.
- `tb_workloads.sv` maps 92,224 and 68,000 random particles, the sizes of the
  ApoA1 and DMPC benchmarks. It shows one particle per clock.

Each testbench prints `TB_RESULT checks=N failures=M`.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/pgm_pkg.sv tb/tb_fp_pkg.sv tb/tb_pgm_top.sv --top-module tb_pgm_top
./obj_dir/Vtb_pgm_top
```

Replace `tb_pgm_top` with any other testbench name. All the testbenches finish
in seconds.
