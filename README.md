# CORDIC-twiddle 4-point FFT with Vedic multipliers

A small parallel FFT processor built around two ideas:

* **No twiddle ROM.** The twiddle factors W = e^{-jθ} are computed by CORDIC
  rotators from a few fixed angle constants. The CORDIC itself is
  multiplier-less (shift and add only) and keeps its elementary angles
  atan(2^-i) as hard-wired constants, so there is no angle ROM either.
  A comparator front end folds any angle in 0–360° into the first quadrant
  and returns the signs of sin and cos separately, which removes the
  ±99.9° convergence limit of a plain CORDIC.
* **Vedic multipliers for every product.** All twiddle products of the FFT
  use an unsigned Urdhva-Tiryakbhyam ("vertically and crosswise")
  multiplier. The twiddles come out of the CORDIC block in sign-magnitude
  form, which is exactly what an unsigned multiplier needs.

The FFT is a 4-point radix-2 decimation-in-time flow graph with every
butterfly in hardware, so a whole vector of four complex samples is
accepted on every clock cycle.

The design follows a published architecture at block level: controller,
angle constants, two modified CORDIC blocks, Vedic-multiplier FFT block. The
original gives no word lengths, number formats, iteration count, timing or
handshake. All of those are choices made here and are listed under
[Design choices](#design-choices-and-departures).

## Block diagram

```
             rst
              |
        +-----v---------+  cordic_en            fft_en
        | fft_controller|------------+-------------------------+
        +---------------+            |                         |
              ^ valid_1 & valid_2    |                         |
              |                      v                         v
  0 deg  ---> modified_cordic #1 --- tw_1 (W2^0 = W4^0 = 1) -->+----------------+
 90 deg  ---> modified_cordic #2 --- tw_2 (W4^1 = -j) -------->|  fft4_vedic    |--> X_re/X_im[4]
                                                               |  (4 butterflies|    out_valid
  x_re/x_im[4], in_valid ------------------------------------->|   2 stages)    |
                                                               +----------------+
```

| Module | Role |
|---|---|
| `cordic_fft_top` | Top level. Wires the blocks together and holds the two angle constants. |
| `fft_controller` | Start-up sequencer: reset → generate twiddles → wait → run. |
| `modified_cordic` | Twiddle generator for 0–360°: quadrant unit, CORDIC core and output register. |
| `cordic_quadrant` | Comparators that fold θ into φ ∈ [0°, 90°] and give the sign bits. |
| `cordic_core` | Unrolled, combinational rotation-mode CORDIC. |
| `fft4_vedic` | Parallel 4-point DIT FFT with two register stages. |
| `dit_butterfly` | a ± b·W. |
| `twiddle_cmul` | Complex sample × twiddle, using four Vedic products. |
| `vedic_mult` | Unsigned Urdhva-Tiryakbhyam multiplier. |
| `cfft_pkg` | Number formats, the atan(2^-i) and gain constants, `twiddle_t`, `quadrant_e`. |

## Twiddle generation

### CORDIC core (`cordic_core`)

`N_ITER` stages (16 by default) are chained with no registers between
them. Stage i takes δ = +1 if the residual angle z ≥ 0, else −1, and computes

```
x' = x + δ·(y >>> i)
y' = y − δ·(x >>> i)
z' = z − δ·atan(2^-i)
```

Note the direction: this is a **clockwise** rotation. The core starts from
(K, 0), where K = Π 1/√(1+2^-2i) ≈ 0.6072529 is pre-applied. It then turns
the vector clockwise by z₀ and ends with x = cos z₀ and y = −sin z₀. That is
the twiddle e^{-jz₀} itself. It converges for |z₀| ≤ 99.88°.

Formats: x and y are signed 20-bit values with 16 fraction bits. z is a
signed angle in **degrees** with 14 fraction bits (24 bits). Degrees are used
so that the quadrant comparators compare against 90, 180 and 270 directly.
The 20 constants atan(2^-i) are given in `cfft_pkg::atan_const` as
round(atan(2^-i)·180/π·2^14). The gain K for short chains is given in
`cfft_pkg::cordic_k` as round(K(n)·2^16).

### Quadrant folding (`cordic_quadrant`)

| θ | φ given to the core | sign of cos | sign of sin |
|---|---|---|---|
| [0, 90] | θ | + | + |
| (90, 180] | 180 − θ | − | + |
| (180, 270] | θ − 180 | − | − |
| (270, 360) | 360 − θ | + | − |

An angle of 360° or more is first reduced once by 360°. The result is
therefore valid for any input below 720°.

### Twiddle format (`modified_cordic`, `cfft_pkg::twiddle_t`)

The core output is turned into magnitudes: |x| becomes |cos φ| and |y|
becomes |sin φ|. Each is rounded from 16 to 14 fraction bits (Q2.14,
1.0 = 16384). The magnitudes are packed with the two sign bits into a
34-bit `twiddle_t`:

```
{ sign_c, sign_s, cos_mag[15:0], sin_mag[15:0] }    // sign bit 1 = negative
```

This word means W = cos θ − j sin θ. With 16 iterations the default build
produces:

* at 0°: cos_mag = 16385 and sin_mag = 0;
* at 90°: cos_mag = 1 and sin_mag = 16384.

Both are within one LSB of exact. Over the whole circle the testbench
accepts 4 LSB of error.

The result is captured into a register on a cycle where `en` is high.
`valid` rises on the next clock edge and stays high until reset.

## Vedic multiplier (`vedic_mult`)

The Urdhva-Tiryakbhyam method forms all crosswise bit products at once and
then works column by column. Column k adds every a[i]·b[j] with i+j = k plus
the carry passed on by column k−1. The lowest bit of that sum is product bit
k, and the rest is carried to column k+1. This is the decimal hand method
(14 × 15: 4·5 = 20, then 1·5 + 4·1 + 2 = 11, then 1·1 + 1 = 2, giving 210)
done in binary. The module is written as this column/carry loop. The bit-level
adders inside a column are left to synthesis. `A_W` and `B_W` may differ:
the FFT uses 16×16 in stage 1 and 18×16 in stage 2. The module is purely
combinational.

## FFT datapath (`fft4_vedic`, `dit_butterfly`, `twiddle_cmul`)

```
inputs, bit-reversed:  x(0) x(2) x(1) x(3)
stage 1:  A,B = x(0) ± W2^0·x(2)     C,D = x(1) ± W2^0·x(3)      -> register
stage 2:  F(0),F(2) = A ± W4^0·C     F(1),F(3) = B ± W4^1·D      -> register
```

The inputs are re-ordered by wiring, so ports are in natural order on both
sides.

**Complex product.** For b·W with W = c − j s:

* Re = b_re·c + b_im·s
* Im = b_im·c − b_re·s

Each of the four real products works on magnitudes, using one `vedic_mult`.
The 14 twiddle fraction bits are then removed by rounding half away from
zero. Last, the sign is restored as the XOR of the operand signs. All
products go through the multipliers, including the trivial W = 1 ones,
because the twiddles are run-time values from the CORDIC registers. A
synthesis tool that sees the constant angles will fold most of this away.

**Word growth.** A butterfly widens its outputs by two bits. This covers
|a| + √2·|b| even for a general twiddle. Nothing is scaled or saturated.
With 16-bit inputs the stage-1 outputs are 18 bits and F(k) are 20 bits
(`DATA_W+4`). Results are the unscaled DFT,
F(k) = Σₙ x(n)·e^{-j2πnk/4}.

**Accuracy.** With exact twiddles the output is the exact integer DFT (the
block testbench checks for equality). With the CORDIC twiddles of the top
level, each product carries the twiddle error of about 1/16384. For
full-scale inputs the end-to-end error seen was at most 8 LSB of the 20-bit
output.

## Timing and handshake

| Event | When |
|---|---|
| `rst` released (synchronous, active high) | edge 0 |
| controller in generate state, `cordic_en` = 1 | after edge 1 |
| twiddle registers loaded, CORDIC `valid` = 1 | edge 2 |
| `ready` = 1 (controller in run state, FFT enabled) | edge 3 |
| vector with `in_valid` = 1 sampled at edge t | result with `out_valid` = 1 after edge t+2 |

Vectors may follow back to back. Throughput is one 4-point transform per
clock. A vector offered while `ready` is low is ignored. The controller stays
in the run state until the next reset, and an assertion checks that it never
re-enables the CORDIC blocks while the FFT runs. The register stages load only
when valid data arrives, so the outputs hold their last value during gaps.

The CORDIC chain (16 stages) is combinational and is used only once after
reset. Its path still ends in a clocked register, however. A high clock
rate would need a multicycle constraint on that path or pipeline registers
in `cordic_core`.

## Design choices and departures

Taken from the published architecture:

* the block structure;
* the CORDIC stage equations with δ = sign(z);
* the unrolled stage chain with constant angles;
* the comparator front end with separate sin/cos sign outputs;
* the 4-point DIT flow graph with bit-reversed inputs;
* the Vedic multiplier for the FFT products;
* a parallel FFT.

Chosen here:

* **Word lengths and formats.** 16-bit complex samples. Angles in degrees
  with 14 fraction bits. Q2.14 twiddle magnitudes. 20-bit CORDIC x/y.
* **Iteration count.** 16.
* **Timing.** Synchronous reset, a four-state start-up controller, a
  register after each FFT stage, and the valid/ready handshake.
* **Shift direction.** One description of the CORDIC calls the shift a
  *left* shift. The equations and stage diagrams it accompanies scale by
  2^-i, so an arithmetic right shift is used.
* **Multiplier structure.** The multiplier is also described as
  "MUX based", but no such structure is specified. The column-and-carry
  Urdhva form is used instead.
* **Complex inputs.** The reference test of the original design feeds real
  samples only. The ports here take complex samples, which covers that case.
* **Angle constants.** The constant block holds just two angle values (0°
  and 90°). Here they are `localparam`s in `cordic_fft_top` and not a
  module of their own.

Not built:

* the Nikhilam multiplication method. It is presented only as an
  alternative sutra.
* FFT sizes other than 4 points. The architecture is described only for 4.
* The reported FPGA resource and frequency figures, which cannot be
  reproduced without the original word lengths.

## Simulation

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and stops with `$finish`, and has a watchdog.
To run, for example, the end-to-end test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/cfft_pkg.sv tb/tb_cordic_fft_top.sv --top-module tb_cordic_fft_top
./obj_dir/Vtb_cordic_fft_top
```

| Testbench | What it checks |
|---|---|
| `tb_vedic_mult` | 16×16 and 18×16 products against `*`, corners and random |
| `tb_twiddle_cmul` | complex product against a reference built on `*`, many angles and sign cases |
| `tb_dit_butterfly` | a ± bW, including full-scale inputs that need both guard bits |
| `tb_cordic_core` | x → cos, y → −sin over ±99°, residual angle near 0, general vectors |
| `tb_cordic_quadrant` | folding and signs over 0–720° |
| `tb_modified_cordic` | signed sin/cos over the full circle to 4 LSB, one-cycle capture, hold |
| `tb_fft_controller` | start-up sequence cycle by cycle for CORDIC delays of 1, 4 and 9 cycles |
| `tb_fft4_vedic` | exact DFT with exact twiddles; 2-cycle latency; back-to-back, gaps, `en` low |
| `tb_cordic_fft_top` | whole design at default parameters (see below) |

`tb_cordic_fft_top` runs the whole design at its default parameters:

* start-up in exactly 3 edges;
* early vectors dropped;
* about 500 vectors offered and some 370 accepted, random and full-scale,
  each compared with an integer DFT;
* back-to-back vectors and gaps;
* a reset in mid-stream.

It counts each of these events and fails if one never happens.

To change the sample width, set `DATA_W` on `cordic_fft_top`; the outputs
are `DATA_W+4` bits. To change the CORDIC depth, set `N_ITER` (1..20). Fewer
iterations shorten the combinational chain at the cost of twiddle accuracy.
To change angle and twiddle formats, edit `cfft_pkg`. If you change
`ANG_FRAC` or `XY_FRAC`, regenerate the constants with the formulas given
there.
