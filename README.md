# Tunable Floating-Point Adder

A pipelined floating-point adder whose significand precision is chosen per
operation. Each addition or subtraction carries a precision `m` between 4 and
24 bits, counting the integer bit. The result comes back correctly rounded to
nearest-even (ties to even) at exactly `m` bits. At `m = 24` this is a binary32
adder. Smaller `m` gives formats such as binary16-style (`m = 11`) or
bfloat16-style (`m = 8`) significands inside the same 32-bit container. A
second per-operation code narrows the exponent range to that of a 5- to 8-bit
exponent. Applications that tolerate some error, such as neural-network
training and inference, can run each stage at the lowest precision that
meets their error target.

The hard part is rounding at a position that moves with `m`. A fixed adder
rounds at one hard-wired bit. Here the design builds two bit-vectors from `m`
and uses them to find and place the rounding bits:

* the **rounding word** `RW`, which is one-hot at the guard position;
* the **MASK**, which has `m` leading ones.

This avoids adding `m` to the alignment shift amount, which would sit on the
critical path. The architecture follows the *Tunable Floating-Point Adder*
design of A. Nannarelli. The places where this RTL makes its own choices are
listed under "Departures and design choices" below.

## Number format and interface

The operands and the result are `tfp_num_t` structs: `{sign, exp[7:0], frac[22:0]}`,
bias 127, hidden integer bit.

* **Operand precision.** An operand at precision `m` has its significant bits
  in the top `m-1` fraction bits; the fraction bits below them are zero.
  Results always have this form.
* **Flush-to-zero.** A zero exponent means zero. Subnormal inputs are read as
  zero, and subnormal results are flushed to zero. No subnormals are ever
  produced.
* **Overflow.** With the full 8-bit exponent width, a result exponent of 255
  or more becomes infinity: exponent 255 with a zero fraction.
* **Exponent width.** A second code, `e_w`, selects an exponent width of
  5 to 8 bits for each operation. The field stays 8 bits wide with bias 127.
  An `e`-bit exponent, of bias `2^(e-1)-1`, stores as
  `129-2^(e-1) .. 126+2^(e-1)`. For example, 113..142 for `e = 5`, the
  binary16 range. Results below that range are flushed to zero, and results
  above it become infinity. Operands need no conversion.
* **Conversion.** Adding zero to a number of any precision rounds it to `m`
  bits and limits it to the `e_w` range. This is how binary32 values are
  converted to a lower precision.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of the valid bits and of the precision registers |
| `in_valid` | in | 1 | an operation is presented this cycle |
| `x`, `y` | in | 32 | operands (`tfp_num_t`) |
| `sub` | in | 1 | 1 computes `x - y`, 0 computes `x + y` |
| `m` | in | 5 | precision of this operation. Codes below 4 act as 4, and codes above 24 act as 24 |
| `e_w` | in | 4 | exponent width of this operation. Codes below 5 act as 5, and codes above 8 act as 8 |
| `out_valid` | out | 1 | `z` holds a new result |
| `z` | out | 32 | result |
| `z_subn`, `z_infty` | out | 1 | the result was flushed to zero / became infinity |

**Timing.** The adder has two pipeline stages, and a new operation can start
every cycle.

* An operation sampled at clock edge *k* enters the stage register.
* Its result is registered at edge *k+1*, so `out_valid` follows `in_valid`
  by two cycles.
* `m` and `e_w` may change from one operation to the next, with no bubble.

## Datapath

The adder uses the classic double-path scheme. Two specialised datapaths
compute the significand in parallel, and the exponent difference selects
one of them.

```
 Ex,Ey ─ exp diff ─ D, sign(D), CLS, Emax ───────────────┐
 Mx,My ─┬─ CLOSE path (|D|<=1, subtraction) ─┐            │
        └─ FAR path   (all other cases)   ───┴─ masked 2:1 mux (CLS)
 m ── decoder ── RW, MASK (stage 1) / registered copy (stage 2)
                                                    │
                         exponent update ── condition detect (e_w) ── z
```

* `tfp_exp_diff` computes `D = Ex - Ey`, picks the larger exponent and sets
  `CLS = EOP and |D| <= 1`. `EOP` is the effective operation: 1 when the
  signs of `x` and `±y` differ. An operation with a zero operand always
  counts as an addition.
* `tfp_close_path` handles effective subtractions of operands at most one
  binade apart.
* `tfp_far_path` handles everything else.
* `tfp_decoder` turns `m` into `RW` and `MASK`. It keeps registered copies for
  stage 2, and reloads them only when `m` changes, so they can be
  clock-gated while the precision stays constant.
* The **masked 2:1 mux** in `tfp_add` selects the path result and clears
  every bit below the `m`-th.
* `tfp_exp_update` corrects the larger exponent by the path's normalisation:
  `-SHAMT` for CLOSE, `+OVF` or `-SH1L` for FAR.
* `tfp_cond_det` flushes results that are below the `e_w` range or have no
  integer bit. It turns results above the range into infinity.

### CLOSE path

This path covers effective subtractions with `|D| <= 1`. Massive
cancellation can happen here, but alignment is at most one position.

**Stage 1.**

* Two 2:1 muxes shift the smaller operand right by one when `|D| = 1`.
* `My` is always the operand that gets complemented.
* A one's-complement adder with end-around carry, followed by conditional
  bit inversion (`tfp_ca_adder`), gives `S = |X - Y|` and the flag `NEG`.
  This avoids comparing the significands before subtracting. `NEG` flips the
  result sign.

**Stage 2.** Two cases never occur together, so they use parallel hardware.

* **Normalised result with `|D| = 1`.** In this case `RND = MSB(S) and
  (|D|=1)` is 1. The result needs rounding, but only one bit lies below `L`.
  The design extracts `L` and `G` with `RW`, sets `U = L·G`, and adds `U·RW`
  at the guard position. When `G = 1`, that addition carries into `L`.
* **Any other case.** The result is exact for `m`-bit operands. A
  leading-one detector (`tfp_lod`) gives `SHAMT`, and a left shift
  normalises.

### FAR path

**Stage 1.**

1. **Swap** the operands so that `Y` has the smaller exponent.
2. **Right-shift** `Y` by `|D|` into a 50-bit frame: 26 bits down to `R`,
   plus 24 more. The shift saturates at 26.
3. **Sticky bit** `T`: the OR of every aligned `Y` bit of weight
   `2^-(m+2)` or less. The window is `~MASK` wired two places down, plus the
   24 low bits.
4. **Bit invert** the upper 26 bits of `Y` when `EOP = 1`, giving a one's
   complement.
5. **Mask** both operands: `Fx = X & MASK`, `Fy = Y & MASK`.
6. **Extract** the bits `L*`, `L`, `G`, `R` with AND-OR networks steered by
   `RW`, and compute `C`:
   * `L` and `L*` are the bits of `Fx + Fy`: `L = Lx ^ Ly` and
     `L* = L*x ^ L*y ^ Lx·Ly`;
   * `C = ~EOP | G | R·~T` is the bit to inject into the guard position.

**Stage 2.**

1. **Append bits.** `C` goes into the guard position of `Fx`. A 1 goes into
   the guard position of `Fy`, for the second sum only.
2. **Compound adder.** This gives `S0 = Fx + Fy + C·g` and
   `S1 = Fx + Fy + (C+1)·g`, where `g` is one unit in the guard position.
3. **Rounding control** (`tfp_far_round_ctrl`) picks one sum.
4. **Shift by one** place: right on overflow (`OVF`), left when a subtraction
   drops below 1 (`SH1L`).

## Rounding at a variable position

The key observation: the adder never needs to know where the rounding bits
are in absolute terms. It needs four things:

* the values of `L*`, `L`, `G`, `R` and `T`, which AND-OR networks extract
  with `RW` and shifted copies of it;
* an increment that lands at the right position: a 1 ORed into the guard
  bit with `RW`, which carries into `L` when the guard bit already holds 1;
* truncation at the right position: the `MASK` AND at the inputs and at the
  result mux;
* a window for the sticky bit, derived from `MASK`.

All of these depend only on `m`. They are built in stage 1, in parallel with
the exponent subtraction, so the critical path does not grow.

The FAR-path sums carry an extra half-unit trick. For an addition `C = 1`, so:

* `S1 = Fx + Fy + 1 ulp` rounds at `L`;
* after an overflow the same `S1`, shifted right by one place, rounds at
  `L*`. The rounding condition there requires `L = 1`, so the ulp carries
  into `L*`.

For a subtraction, the complemented `Y` needs a +1 at its very end, but only
when nothing was shifted out. `C` and the choice between `S0` and `S1` fold
that +1 and the rounding increment together. The right result is then
available both without a shift and after a one-bit left shift.

Table 1 gives the round-up conditions. `G` and `R` are those of `Y` after
complementing when `EOP = 1`, and `T` is always taken before complementing.

| | addition | subtraction |
|---|---|---|
| no shift: `MUXC(0)` | `G (R | T | L)` | `G | L ~G R ~T` |
| one-bit shift: `MUXC(1)` | `L (L* | G | R | T)` (overflow) | `G (R | ~T) | R T` (left shift) |

Table 2 gives the shift decision and the sum selection, using the sum bits of
weight 2 (index 1), 1 (index 0) and 1/2 (index -1):

| signal | definition |
|---|---|
| `OVF` | `~EOP · (S1_1 S0_1 | S1_1 MUXC(1) MUXC(0))` |
| `SH1L` | `EOP · (~S1_0 S1_-1 | ~S0_0 S0_-1 ~MUXC(1) MUXC(0))` |
| `MUXR` | `(OVF | SH1L) ? MUXC(1) : MUXC(0)`: select `S1` when 1 |

The CLOSE path never rounds a shifted result. Its only rounding case is the
normalised `|D| = 1` result, with round-up `U = L·G`.

## Departures and design choices

Choices this RTL makes where the published design is silent or draws less:

* **Sign logic.**
  * The FAR path takes the sign of the larger-exponent operand.
  * The CLOSE path takes the sign of `x` flipped by `NEG`.
  * Exact cancellation gives +0. A sum of zeros is -0 only when both
    operands are negative.
* **The `sub` input** negates `y`. An operation with a zero operand is made
  an effective addition, so that adding zero always takes the FAR path,
  which rounds in every case.
* **Alignment frame.** The frame is 50 bits wide with the shift saturated at
  26, instead of a 48-bit shifter output. No bit of an operand shifted past
  `R` is lost to the sticky bit.
* **Sticky window.** The window covers every position below `R`. It is not a
  window of only `m` positions taken from a shifted copy of `MASK`: such a
  window misses an operand aligned more than `2m+1` places away. The wider
  window needs no second shifter, so the MASK shifter of the original is a
  fixed wiring here.
* **Bits of `X` below `L`** are ORed into `G`, `R` and `T`. This is exact
  when `X` has at most `m` bits, and for conversion, where `Y = 0`.
* **Output register.** An output register follows stage 2, giving a latency
  of two cycles.
* **Decoder registers.** They reload on a changed `m`, modelled as a load
  enable rather than a gated clock. `m` outside 4..24 is clamped.
* **Exponent width.** The narrower exponent ranges are only range checks at
  the output. Exponents stay in the 8-bit field with bias 127 throughout,
  and `e_w` travels with the operation like `m`.

Not built:

* **Round-to-zero and plain round-to-nearest.** The TFP format also defines
  these modes, but the adder is specified for ties-to-even only.
* **Special inputs.** Infinity and NaN inputs get no special treatment; they
  are handled as large finite numbers, and no NaN is produced.
* **Wide operands.** When both operands are non-zero and carry more than `m`
  significant bits, rounding is not guaranteed. `X` is truncated by the
  mask.
* **The companion TFP multiplier**, which is a separate design. A
  behavioural model of it appears only inside the matrix and network
  testbenches.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=F` line.

| testbench | what it checks |
|---|---|
| `tb_tfp_add` | 300,000 random operations through the whole adder against an exact integer reference (`tfp_tb_pkg`), plus the 2-cycle latency. Covers the CLOSE and FAR scenarios, underflow and overflow, zeros and conversions, and a new `m` on most operations. Half of the operations use a random exponent width. Fails if any mechanism never fired: CLOSE round-up and shift, cancellation, OVF, SH1L, FAR round-up, sticky bit, flush, infinity, a result outside a narrow exponent range, precision change, conversion. Runs at the default configuration. |
| `tb_tfp_matmul` | 10×10 matrix products at `m` ∈ {24, 20, 16, 14, 11, 8, 6}. Every dot-product partial sum is checked, and the mean relative error is printed. |
| `tb_tfp_nn` | forward passes of a network with one input, two hidden layers of four neurons and one output. Covers per-layer precisions (`m0`, `m1`, `m2`) ∈ {16, 8}³ and the pairs (`m`, `e`) from 24/8 down to 5/5. Weights are quantised by adding zero, and precision and range switch between layers. Every addition is checked, and the output's deviation from the 24-bit network is printed. A rectifier stands in for the activation. |
| `tb_tfp_close_path`, `tb_tfp_far_path` | each path alone against exact arithmetic |
| `tb_tfp_far_round_ctrl` | all 4096 input combinations against an independent case table |
| `tb_tfp_decoder`, `tb_tfp_exp_diff`, `tb_tfp_ca_adder`, `tb_tfp_lod`, `tb_tfp_exp_update`, `tb_tfp_cond_det` | the small blocks, exhaustively or with random inputs |

For scale, the matrix test gives a mean relative error of the products of
about 6e-8 at `m = 24`, falling to about 1e-2 at `m = 6`. In the network
test, the output at (16, 16, 16) lies about 3e-4 from the 24-bit output, and
at `m = 11`, `e = 5` about 8e-3. Both depend on the random data.

To run any testbench, for example the end-to-end test, from the top folder:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/tfp_pkg.sv tb/tfp_tb_pkg.sv tb/tb_tfp_add.sv --top-module tb_tfp_add
./obj_dir/Vtb_tfp_add
```

The reference model works on 128-bit integers, independently of the adder's
structure:

1. Align the operands with 64 guard bits, plus a sticky bit for anything
   beyond.
2. Form the signed sum.
3. Round to `m` bits, ties to even.
4. Apply flush-to-zero and overflow to infinity at the limits of the
   `e`-bit range.

To change the design, note that the widths live in `rtl/tfp_pkg.sv`:
`MW = 24`, `EW = 8`, `M_MIN = 4`, `PW = 5`, `E_MIN = 5`, `QW = 4`. The bit
frames of `RW`, `MASK` and the FAR sums are documented at the top of that
file.

## Files

| file | content |
|---|---|
| `rtl/tfp_pkg.sv` | widths, the number struct, frame conventions |
| `rtl/tfp_add.sv` | top level: input flush, sign, stage register, masked mux, output register |
| `rtl/tfp_decoder.sv` | `m` → `RW`, `MASK`, and their stage-2 registers |
| `rtl/tfp_exp_diff.sv` | exponent difference, larger exponent, path select |
| `rtl/tfp_close_path.sv`, `rtl/tfp_ca_adder.sv`, `rtl/tfp_lod.sv` | CLOSE path and its carry-around adder and leading-one detector |
| `rtl/tfp_far_path.sv`, `rtl/tfp_far_round_ctrl.sv` | FAR path and its rounding control |
| `rtl/tfp_exp_update.sv`, `rtl/tfp_cond_det.sv` | exponent correction, flush to zero and infinity at the limits of the exponent range |
| `tb/tfp_tb_pkg.sv` | reference arithmetic and operand generators |
