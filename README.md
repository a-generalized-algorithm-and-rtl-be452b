# Reconfigurable multiplier-free approximate DCT (8/16/32 points)

Video codecs such as HEVC use DCTs of length 8, 16 and 32. An exact DCT needs
multipliers. For 32 points, Loeffler's fast algorithm needs 79 multiplications
and 209 additions. This design computes an *approximate* DCT instead. The
approximate transform has three properties:

* **Multiplier-free:** its kernel holds only 0 and ±1, so it needs no
  multipliers and no shifts, only adders.
* **Orthogonal:** its inverse is its transpose (up to a per-row scale), so the
  same kind of structure can compute the inverse.
* **Recursive:** an N-point transform is built from two N/2-point transforms
  plus N additions. The cost is 22 additions for 8 points, 60 for 16 and 152
  for 32.

One 32-lane datapath holds 152 adders and a few rows of 2:1 multiplexers. On
each clock it computes one of three things, chosen by a mode input:

* one 32-point transform,
* two independent 16-point transforms, or
* four independent 8-point transforms.

## The 8-point kernel

Everything bottoms out in one 8-point integer kernel `T8`:

```
F0: [ 1  1  1  1  1  1  1  1]     F4: [ 1 -1 -1  1  1 -1 -1  1]
F1: [ 1  1  1  0  0 -1 -1 -1]     F5: [ 1 -1  0  1 -1  0  1 -1]
F2: [ 1  0  0 -1 -1  0  0  1]     F6: [ 0 -1  1  0  0  1 -1  0]
F3: [ 1  0 -1 -1  1  1  0 -1]     F7: [ 0 -1  1 -1  1 -1  1  0]
```

The rows are mutually orthogonal. Their squared norms are 8, 6, 4, 6, 8, 6, 4
and 6, so a diagonal scale of 1/sqrt(norm) would make the transform
orthonormal. The hardware does **not** apply that scale. In a codec the scale
folds into the quantiser step sizes.

`dct8_approx` evaluates `T8` with 22 adders in three columns:

| column | adders | what they compute |
|---|---|---|
| 1 | 8 | `a_i = x_i + x_(7-i)`, `b_i = x_i - x_(7-i)` |
| 2 | 8 | even: `a0+a3`, `a1+a2`, `F2 = a0-a3`, `F6 = a2-a1`; odd: `b0+b2`, `b0-b2`, `b0+b3`, `b2-b1` |
| 3 | 6 | `F0`, `F4` from the even sums; `F1 = (b0+b2)+b1`, `F3 = (b0-b2)-b3`, `F5 = (b0+b3)-b1`, `F7 = (b2-b1)-b3` |

The 8/8/6 column split, and F2 and F6 leaving after column 2, match the
published signal-flow graph. The pairing of the odd-part adders is this
design's own choice. It has the same adder count and depth.

## The recursion: N points from two N/2-point transforms

An N-point transform (N = 16, 32) has three steps:

1. **Input adder unit** (`input_adder_unit`): N additions.
   * `a_i = x_i + x_(N-1-i)` for i < N/2. This is the even half.
   * `b_i = x_i - x_(N-1-i)` for i < N/2. This is the odd half.
2. **Two N/2-point transforms:** one on `a`, one on `b`.
3. **Output permutation** (`output_permutation_unit`):
   * `F(2k) = upper(k)`
   * `F(2k+1) = lower(k)`

In matrix form the kernel is:

```
C_N[2k][j]   = C_(N/2)[k][j]          j <  N/2
C_N[2k][j]   = C_(N/2)[k][N-1-j]      j >= N/2
C_N[2k+1][j] = C_(N/2)[k][j]          j <  N/2
C_N[2k+1][j] = -C_(N/2)[k][N-1-j]     j >= N/2
```

Orthogonality carries through each level. The 32-point kernel is checked
directly: the testbench takes the hardware's impulse responses and verifies
that every pair of distinct rows has inner product 0.

The count of additions is A(N) = 2·A(N/2) + N, which gives 22, 60, 152 and
368 for N = 8, 16, 32 and 64.

## Reconfiguration

The recursion is what makes the datapath reconfigurable:

* In front of the two half-size units sits a row of 2:1 multiplexers
  (`computation_selection_unit`). It feeds them either the butterfly outputs
  (`a`, `b`) or the raw samples.
* After the units, the output permutation either interleaves the two halves
  or passes them through in order.

With raw samples and pass-through, the two half-size units simply become two
independent transforms of two neighbouring blocks of samples.

```
 X0..X31 ─┬─> 32-pt adder unit ─> [sel32 mux row] ─┬─> dct16_reconfig (upper) ─┐
          └───────────────────────────^            └─> dct16_reconfig (lower) ─┴─> [sel32 permutation] ─> F0..F31

 dct16_reconfig:  16-pt adder unit ─> [sel16 mux row] ─> 2 x dct8_approx ─> [sel16 permutation]
```

The two control lines decode as follows:

| `mode` (`dct_pkg::dct_mode_e`) | sel32 | sel16 | result |
|---|---|---|---|
| `MODE_8X4` (0) | 0 | 0 | four 8-point DCTs: lanes 0-7, 8-15, 16-23 and 24-31 map to the same output lanes |
| `MODE_16X2` (1) | 0 | 1 | two 16-point DCTs: lanes 0-15 and 16-31 |
| `MODE_32` (2), also code 3 | 1 | (forced 1) | one 32-point DCT |

A 32-point transform is two 16-point transforms of the butterfly outputs.
Therefore sel32 forces the 16-point stages on inside `dct32_reconfig`.

The published block diagram uses one output permutation block for all 32
lanes. Here the 16-point permutations sit inside each `dct16_reconfig`, and a
32-point permutation follows them. The resulting output order is identical.

The two half-size units only ever carry separate sample blocks. In 8-point or
16-point mode, no lane depends on samples outside its own block.

## Widths and timing

* **Inputs:** 8-bit signed samples (`IW = 8`).
* **Bit growth:** nothing is truncated. Each butterfly level adds one bit, and
  the 8-point unit adds three (its largest row sums eight samples).
* **Outputs:** `IW + 5` = 13-bit signed coefficients. In 16-point and 8-point
  modes the values are sign-extended to that width.
* **Inner widths:** `dct16_reconfig` defaults to `IW = 9` and `dct8_approx` to
  `IW = 10`. These are the widths they see inside the 32-point datapath.

`approx_dct_top` is the only clocked module:

* It registers the datapath output once.
* A block presented with `in_valid` high at clock edge *t* appears on `f`,
  with `out_valid` and `out_mode`, right after edge *t*.
* Latency is one clock. Throughput is one 32-sample block per clock in every
  mode, with no stalls.
* The mode may change on any cycle.
* While `in_valid` is low, `f` holds its last value and `out_valid` is 0.
* Reset is synchronous and active low. It clears `out_valid`, `out_mode` and
  `f`.

The combinational path in 32-point mode is as follows:

* 5 adders: two butterfly levels plus the three adder columns of the 8-point
  unit.
* 4 multiplexer levels: two selection rows and two permutations.

No pipeline registers sit inside the datapath. A natural place for one is
the boundary between `dct32_reconfig`'s selection row and its two
`dct16_reconfig` instances. That cut splits the path into 1 adder plus
1 multiplexer before the register and 4 adders plus 3 multiplexers after it;
`sel32`/`sel16` would then have to be delayed along with the data.

## Modules

| file | role |
|---|---|
| `rtl/dct_pkg.sv` | mode enum, lane count, 8-point bit growth |
| `rtl/dct8_approx.sv` | 8-point kernel, 22 adders |
| `rtl/input_adder_unit.sv` | N-point sum/difference butterfly (N = 16, 32) |
| `rtl/computation_selection_unit.sv` | row of 2:1 muxes: butterfly outputs or raw samples |
| `rtl/output_permutation_unit.sv` | even/odd interleave or pass-through |
| `rtl/dct16_reconfig.sv` | one 16-point or two 8-point transforms |
| `rtl/dct32_reconfig.sv` | one 32-point, two 16-point or four 8-point transforms (combinational) |
| `rtl/approx_dct_top.sv` | top: mode decoder, output register, valid/mode handshake |

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of
cycles.

The reference model is in `tb/tb_dct_ref_pkg.sv`. It never builds an adder
network. Instead, it expands the matrix recursion above entry by entry and
computes each output as a dot product.

The testbenches cover:

* extreme inputs, with all samples at the minimum or maximum value;
* sign patterns matched to each row, which reach the largest output magnitude;
* unit impulses;
* thousands of random blocks in every mode;
* orthogonality of the 32-point hardware transform.

`tb_approx_dct_top` runs the top at its default parameters:

* It streams 3000 blocks with random modes and random gaps.
* It checks every result exactly one clock after its input.
* It checks the reset values.
* It counts, and requires at least once, each of these events: each mode,
  mode code 3, back-to-back blocks, mode switches, idle cycles and a mid-stream
  reset.

To simulate the top with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    --top-module tb_approx_dct_top \
    rtl/dct_pkg.sv tb/tb_dct_ref_pkg.sv tb/tb_approx_dct_top.sv -o sim
obj_dir/sim
```

To run another testbench, name it in `--top-module` and in place of the
last file; `-y` finds the modules it uses. It finishes in well under a second.

## What is taken from the published architecture, and what is not

These parts follow the published design:

* the recursive decomposition: butterfly, two half-size transforms,
  even/odd interleave;
* 22/60/152 additions for 8/16/32 points, which this RTL matches exactly;
* the block structure of the reconfigurable 16-point and 32-point datapaths:
  input adder units, computation-selection multiplexer rows controlled by
  `sel16`/`sel32`, four 8-point units, output permutation;
* 8-bit inputs with full-precision outputs.

These are this design's own choices:

* **The 8-point kernel.** The published signal-flow graph fixes only its
  structure (22 adders in columns of 8, 8 and 6). `T8` above is the kernel
  the method is known for. It has exactly that structure and cost.
* **Order of the butterfly differences.** `b_i` pairs `x_i` with `x_(N-1-i)`,
  in natural order.
* **Split-mode output wiring.** Each unit's outputs pass through in order.
  The published diagram also draws multiplexers on F0 and F15. With this
  wiring both inputs of those two are equal, so they reduce to wires.
* **Control polarity** (`sel = 1` selects the larger transform) and the 2-bit
  mode encoding.
* **No normalisation** in hardware.
* **Registers.** There is a single output register with a valid flag. The
  original work mentions pipelined and non-pipelined versions but does not
  place the registers.

Not covered:

* **Transforms longer than 32 points.** The recursion extends to them by
  adding another butterfly level and doubling the datapath, but the
  architecture stops at 32.
* **Two-dimensional transforms.** They need a transposition buffer between a
  row pass and a column pass, which is not part of this design.
* **The inverse transform.** It is the transpose of this kernel and would
  mirror this structure, with the permutation in front and the butterflies
  behind. It is not built.
