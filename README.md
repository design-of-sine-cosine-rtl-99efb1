# Sine/cosine DDFS by vector rotation with angle recoding

This is a direct digital frequency synthesizer (DDFS) that produces a sine and a
cosine sample on every clock. It works by rotating a vector, like CORDIC, but it
drops CORDIC's main cost. CORDIC has to compare angles at every stage to decide
which way to rotate. Here the direction of every rotation step is simply one bit
of the angle. The first, large steps come from a small ROM. The middle steps are
shift-and-add stages. The last steps are merged into a single stage. With the
default 16-bit sizes, the whole chain is six registered stages. It needs no
multiplier and no sign-detection logic.

## Signal chain

```
fcw ─► PA ─► CDR (CI ─► M) ─► ROM ─► ROT k=6 ─► ROT k=7 ─► MRG k=8..19 ─► OS ─► cos_out, sin_out
        phase      octant, theta    (x,y) start vector                    unfold octant
```

| Block | Module | Role |
|---|---|---|
| PA | `phase_accumulator` | `acc += fcw` modulo 2^32; the top 16 bits are the phase |
| CI | `octant_folder` | folds the phase into the first half-quadrant [0, π/4] |
| M | `pi4_multiplier` | multiplies by π/4, which turns the folded fraction into radians |
| CDR | `radian_converter` | CI followed by M, with one register |
| ROM | `sincos_rom` | start vector for the first four angle digits |
| ROT | `rotation_stage` | one half-rotation by ±2^-k, using two shifts and two adders |
| MRG | `merged_stages` | every remaining half-rotation, done in one stage |
| OS | `output_stage` | rounds to 16 bits, clips, and maps back to the full circle |
| top | `ddfs_top` | wires the chain together |

Output frequency: `f_out = fcw / 2^32 · f_clk`. The outputs are signed two's
complement:

- `cos_out = round(A·cos(2π(φ + ½)/2^16))`
- `sin_out = round(A·sin(2π(φ + ½)/2^16))`

Here A = 32767 and φ is the 16-bit truncated phase. The extra half step is
explained under "Folding".

## The angle recoding (the part worth reading twice)

After folding, the angle θ lies in (0, π/4) rad, so it is below 1 rad. It is held
as N fraction bits b_1…b_N, with N = 18 and b_1 the most significant:
θ = Σ b_k 2^-k.

Split each bit's rotation 2^-k into two half-rotations of 2^-(k+1):

- If b_k = 1, both halves turn counter-clockwise.
- If b_k = 0, the two halves turn in opposite directions and cancel.

In both cases the first half is always counter-clockwise. All the first halves
together add up to a fixed angle:

    θ0 = 1/4 + 1/8 + … + 2^-(N+1) = 1/2 − 2^-(N+1)

The second halves are the only part that depends on the angle:

    θ = θ0 + Σ_{k=2}^{N+1} r_k 2^-k,   r_k = 2·b_{k-1} − 1 ∈ {−1, +1}

So the direction of rotation step k is bit b_{k-1} of θ. A 0 bit means −1 and a
1 bit means +1. No residual angle has to be tracked. Each step is the
pseudo-rotation

    x' = x − r_k 2^-k y,    y' = y + r_k 2^-k x

This uses tan(2^-k) ≈ 2^-k. Each step scales the vector by √(1 + 2^-2k). That
factor does not depend on r_k, so it is a constant, and it is removed once, in
the start vector.

### Where each digit is handled

- **ROM, digits k = 2…5.** The approximation tan(2^-k) ≈ 2^-k is poor for large
  steps. The ROM therefore takes the top four angle bits b_1…b_4 as its address.
  It returns the vector already rotated by θ0 and by those four digits:

      x = K·A'·cos(a),  y = K·A'·sin(a),  a = θ0 + Σ_{k=2}^{5} r_k 2^-k

  - K = Π cos(atan 2^-k) over the shift-and-add stages that follow (k = 6, 7).
  - A' = 32767·4 is the internal full scale, with two guard bits.

  The split point comes from the rule tan(2^-k) − 2^-k ≤ 2^-p. For p = 16 that
  holds from k = 5 on.

  The 16 words are computed during elaboration from this formula (see
  `ddfs_pkg::rom_value`), so no data file is needed. Since θ < π/4, the address
  never exceeds 12, and words 13–15 are never read.
- **Shift-and-add stages, k = 6 and 7.** One `rotation_stage` each. The shifted
  operand is rounded to nearest.
- **Merged stage, k = 8…19.** Take any two step tangents from k ≥ (p−1)/2 on.
  Their product is below the LSB of a p-bit word. So the remaining m = 12 steps
  can be applied at once:

      x' = x − y·R,   y' = y + x·R,   R = Σ_{i=8}^{19} r_i 2^-i

  Each product is built from 12 shifted copies of x or y, each added or
  subtracted according to its angle bit. The sum is exact. It is rounded once.
  This saves five pipeline stages. One effect remains: the merged stage's gain
  √(1+R²) is up to 1 + 2^-15, and it is not corrected. That costs up to about
  1 LSB of amplitude. It is the largest single error term.

The ROM size and the merge point are not separate knobs. Both follow from the
parameters:

- `ROM_BITS` sets the ROM.
- The merge point is `DATA_W/2`, which is ceil((p−1)/2).

The stages in between, from `ROM_BITS+2` to `DATA_W/2 − 1`, are generated. With
`ROM_BITS = 6` at p = 16 there are none.

## Folding (CI) and the radian conversion (M)

The top three phase bits are the octant o. The other 13 bits are the position f
inside that octant. In odd octants the angle is measured back from the next
multiple of π/4, so f is complemented.

A constant 1 is appended below f. That turns the folded value into
f + ½ LSB, and it makes the bitwise complement an exact mirror image:

    1 − (f + ½) = ~f + ½

The price is that the design computes sin/cos at the centre of each phase step,
i.e. of φ + ½. That is a fixed phase offset of π/2^16 rad. It does not affect
the spectrum.

The folded fraction (14 bits) is multiplied by π/4 in one of two ways:

- `USE_HW_MULT = 0` (default): no multiplier. π/4 is taken as
  2^-1 + 2^-2 + 2^-5 + 2^-8 + 2^-12 = 0.785400390625, which is 2.2·10^-6 too
  large. The product is the sum of five shifted copies of the fraction.
- `USE_HW_MULT = 1`: a multiplier by π/4 rounded to 20 bits. This maps onto an
  FPGA DSP block.

θ is rounded to 18 fraction bits.

## Unfolding (OS)

With C = cos a and S = sin a of the folded angle, the octant selects:

| o | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| cos | C | S | −S | −C | −C | −S | S | C |
| sin | S | C | C | S | −S | −C | −C | −S |

Before the swap, x and y are rounded from 19 internal bits to 16 and clipped to
±32767. Clipping to the symmetric range means negation can never overflow.

## Timing and interface

`ddfs_top` ports:

- `clk`
- `rst_n`: asynchronous, active low
- `fcw[31:0]`
- `valid`
- `cos_out[15:0]`
- `sin_out[15:0]`

Behaviour:

- There is one sample per clock and no stalls.
- The phase held in the accumulator after clock edge t appears at the outputs
  after edge t + 6. In general the latency is 4 + (DATA_W/2 − ROM_BITS − 2).
- After reset, `valid` rises on the 7th clock edge.
- A new `fcw` takes effect on the next edge. The accumulator is never cleared,
  so frequency changes keep the phase continuous.

Every register is reset to zero. Each stage carries `valid`, the octant and the
angle bits along with the vector.

## Parameters (top)

| Parameter | Default | Meaning |
|---|---|---|
| `ACC_W` | 32 | frequency word and accumulator width (n) |
| `PHASE_W` | 16 | truncated phase width (q) |
| `DATA_W` | 16 | output word length (p); also sets the merge point p/2 |
| `GUARD` | 2 | extra internal bits; the angle has `DATA_W+GUARD` bits |
| `ROM_BITS` | 4 | angle bits that address the ROM |
| `USE_HW_MULT` | 0 | π/4 by shift-and-add (0) or by a multiplier (1) |

Constraints:

- `PHASE_W ≥ 4`
- `GUARD ≥ 1`
- `ROM_BITS + 2 ≤ DATA_W/2`
- `PHASE_W + 10 > DATA_W + GUARD`, which the shift-and-add π/4 product needs

The method itself fixes no word lengths. All the defaults above are this
design's choices. Two things are derived, not chosen: the ROM/stage split comes
from tan(2^-k) − 2^-k ≤ 2^-p, and the merge point from k ≥ (p−1)/2.

## Accuracy

Against ideal A·sin and A·cos of the step centre, the worst error seen in
simulation is:

| Configuration | Worst error |
|---|---|
| default | 1.72 LSB |
| hardware-multiplier variant | 1.72 LSB |
| 12-bit build | 1.45 LSB |
| 64-word-ROM build | 1.69 LSB |

The error budget, largest first:

- the uncorrected gain of the merged stage: ≤ 1 LSB
- output rounding: 0.5 LSB
- the small-angle errors of stages 6 and 7, the π/4 constant, and the angle
  rounding: under 0.1 LSB each

The testbenches allow 2 LSB. Spurious-free dynamic range was not measured.

## Departures and limits

- Word lengths, guard bits, pipelining, reset, the half-LSB folding offset,
  rounding and clipping are this design's own choices.
- The merged stage follows the k ≥ (p−1)/2 rule literally. It does not
  compensate its own gain.
- There is no sine-only or cosine-only build that drops half of the datapath;
  both outputs are always produced.
- A PLL or any other clocking resource is outside this RTL.
- The ROM has 2^ROM_BITS words, even though only those up to π/4 are reachable.

## Files and simulation

`rtl/`:

- `ddfs_pkg.sv`: shared functions for θ0, the ROM words and the merge point
- one file per block, as in the table above

`tb/`:

- `tb_<block>.sv`: a self-checking testbench for each block
- `tb_ddfs_top.sv`: the whole synthesizer at its default parameters, about
  35,000 clocks. It uses several frequency words, including a sub-LSB phase step
  and one near Nyquist. It checks that all 8 octants, all 13 reachable ROM
  words, both rotation directions, accumulator wrap-around and frequency changes
  occur.
- `tb_ddfs_variants.sv`: the hardware-multiplier, 12-bit and 64-word-ROM
  configurations

Each testbench prints `TB_RESULT checks=N failures=M`. To run one, for example:

```
verilator --binary --timing -Wno-fatal --top-module tb_ddfs_top \
  -y rtl -y tb +libext+.sv rtl/ddfs_pkg.sv tb/tb_ddfs_top.sv
./obj_dir/Vtb_ddfs_top
```

The package must come first on the command line. Verilator finds every other
module through `-y`.
