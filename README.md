# Low-power MAC with a hybrid-encoded multiplier

This design is a multiply-accumulate (MAC) unit for kernel operations on
images, such as a 3×3 window times a constant. It cuts switching activity in
two ways, and both depend on what real pixel data looks like:

* **It skips whole operations when the pixel stream allows it.** Neighbouring
  pixels often have the same value, and dark frames hold many zeros. A pixel
  equal to the previous one reuses the stored product. A pixel of 0 touches
  neither the multiplier nor the adder. A pixel of 1 bypasses the multiplier.
* **It builds products from as few partial products as the multiplier's bit
  pattern allows.** A multiplier with at most three 1s needs only one partial
  product: a short shift-and-add chain. Only a half-word that is dense with
  1s falls back to radix-4 Booth recoding. Rows that are zero are bypassed in
  the compressor. Adder columns above the operands' effective width are frozen.

All arithmetic is built from one full-adder cell. At the gate level that cell
is a plain full adder. Its low-power transistor circuit is not part of this RTL.

## Datapath and timing

```
 pixel, coef ──┬──────────────► mac_detection_logic ──► mac_asserting_circuit
               │                                         │ latch1_en  │ latch2_en, sel │ acc_op
               ▼                                         ▼            ▼                ▼
         Latch 1 (pixel, coef) ──► hertat_multiplier ──► Latch 2 (product) ──► lp_adder ⟲ acc ──► out_acc
               coef ──► bypass register (pixel == 1) ───────┘
```

| cycle | what happens to a pixel presented in cycle t |
|-------|----------------------------------------------|
| t     | classified; Latch 1 or the bypass register loads at the end of t |
| t+1   | multiplier works on Latch 1; Latch 2 loads (multiply / one only) |
| t+2   | adder works on Latch 2; the accumulator updates at the end of t+2 |
| t+3   | `out_acc` holds the sum; `out_valid` is high if this was a window's last pixel |

The unit takes one pixel per clock and never stalls. A window is framed by
`in_first` and `in_last` on its first and last pixel. Idle cycles
(`in_valid` low) may occur anywhere. Every register uses an asynchronous,
active-low `rst_n`.

### Pixel classes (`mac_detection_logic`, `mac_asserting_circuit`)

Each pixel is classified before it is registered. The checks run in this
priority order:

| class       | condition | multiplier | Latch 2 | adder |
|-------------|-----------|------------|---------|-------|
| `PIX_ZERO`  | pixel = 0 | idle | kept | frozen (hold); at a window start the accumulator is cleared |
| `PIX_ONE`   | pixel = 1 | idle | loads the constant | adds |
| `PIX_REUSE` | pixel and constant equal the pair that last loaded Latch 2 | idle | kept | adds |
| `PIX_MUL`   | otherwise | multiplies | loads the product | adds |

The first pixel of a window loads the accumulator instead of adding to it. A
reused product is always the right one: the detection logic updates its
reference pair in the same order in which Latch 2 is loaded, and a zero pixel
changes neither.

With the 3×3 example window 65 66 70 / 66 34 68 / 0 64 64 and one constant:

* **Zig-zag scan** (65, 66, 66, 0, 34, 70, 68, 64, 64): the repeated 66s and
  64s arrive back to back. The window costs 6 multiplications, 2 reuses, 1
  skipped zero, and 1 load plus 7 additions.
* **Raster scan:** only the two 64s are adjacent, so the window needs 7
  multiplications.

## The hybrid-encoded multiplier (`hertat_multiplier`)

The multiplier is unsigned N×N → 2N bits. The pixel is the multiplier `q` and
the constant is the multiplicand `M`. It is purely combinational and has three
parts.

### Encoding (`hybrid_encoder`)

The encoder counts the 1s in `q`.

* **At most three 1s:** the whole word becomes one category. `p0 < p1 < p2`
  are the 0-based positions of its 1s.
* **More than three 1s:** `q` is split into two N/2-bit halves. Each half is
  encoded the same way. A half with more than three 1s is marked for Booth
  recoding; for N = 8 that only happens for the half 1111.

| category | 1s in the segment | partial product |
|----------|-------------------|-----------------|
| A | bit 0 only | `M` |
| B | one, at p0 > 0 | `M << p0` |
| C | bit 0 and p1 | `(M << p1) + M` |
| D | p0 > 0 and p1 | `((M << (p1-p0)) + M) << p0` |
| E | bit 0, p1, p2 | `(((M << (p2-p1)) + M) << (p1-p0)) + M` |
| F | p0 > 0, p1, p2 | same as E, then `<< p0` |

Example: 41H × 22H. The multiplier 22H has 1s in bits 1 and 5, so it is
category D: `((41H << 4) + 41H) << 1 = 8A2H`. That takes one partial product,
where radix-4 Booth needs four rows (+1 −2 +1 −2).

### Multiplication (`pp_generator`, `sign_extension`, `pp_compression`, `final_adder`)

**Partial-product rows.** `pp_generator` produces `NROWS = 2·(N/4+1)` rows.
Each row has a 2N-bit magnitude and a negate flag. Row `s·R+t` belongs to
segment `s` and digit `t`. A category segment uses only its digit-0 row. A
Booth segment uses one radix-4 digit per row, with a virtual 0 below the half
and 0s above it.

**Negative Booth rows.** Negation costs no extra adder, in three steps:

* Magnitudes are zero-extended to 2N bits, so inverting every bit yields the
  one's complement with the sign already extended. `sign_extension` does this
  for rows that the glue circuit selects.
* `glue_circuit` counts the k negated active rows. It supplies their k missing
  +1s: one as the final adder's carry-in, and k−1 as a small extra row for the
  compressor.
* All sums are taken modulo 2^(2N). Carries out of the top column are dropped.

**Row bypassing.** `pp_compression` is a chain of 3:2 carry-save rows made of
full-adder cells, so no carry propagates inside it. A row whose enable is low
has its adder inputs forced to zero, and a multiplexer routes the incoming sum
and carry vectors around it.

**Column bypassing.** `final_adder` is a ripple-carry adder. Its columns at
and above `m_len + q_len`, the sum of the operands' effective widths, get zero
inputs and output 0. A product can have no 1 there, and lower columns never
depend on higher ones, so the result stays exact.

### Controlling (`mult_detection_logic`, `mult_asserting_circuit`)

The detection logic finds each operand's effective width (its highest 1, plus
one) and whether it is zero. The asserting circuit turns this into the row
enables (a row is enabled if it is non-zero and both operands are non-zero)
and the column enables.

## Where this design departs from its source or fills gaps

* **Pixel = 1.** The source rule says to skip the multiplier and "increment
  the accumulator by 1". This design skips the multiplier and adds the
  constant. That equals 1 × constant, and it matches the source rule when the
  constant is 1.
* **Category F.** The source's table says the final shift for F is by the
  1-based position i of the lowest 1. Category E uses i−1 (0-based `p0`). This
  design uses `p0` for F too, because shifting by i doubles the product.
* **Reuse also compares the constant.** The source states the repeat
  condition on pixel values only, which suits a kernel with one constant. This
  design also compares the constant, so the result stays exact when the
  constant changes.
* **Window size and counts.** The source reports, for the 3×3 example, six
  multiplications and seven additions with repeat detection. That matches
  this design in zig-zag order, where the repeated values are adjacent. The
  source's baseline figure of "eight multiplications" for nine pixels does not
  correspond to anything here: without skipping, the window takes nine.
* **Choices the source leaves open:**
  * splitting into equal halves
  * the order of rows
  * the linear compressor chain (rather than a tree)
  * which columns are bypassed
  * how the +1 corrections are distributed
  * pipeline depth, window framing, reset
  * the 20-bit accumulator
  * registering the constant with the pixel
* **Not modelled:** the transistor-level adder cell in 0.13 µm CMOS (input
  inverters and a pull-down nMOS on the carry output), and all power and delay
  figures. "Freezing" is modelled as forcing adder inputs to zero. It is not
  latch-based operand isolation.
* **Baselines excluded.** The conventional array and pure-Booth multipliers,
  and the other full-adder styles the source compares against, are not
  included.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `hertat_mac` | `N` | 8 | pixel and constant width |
| `hertat_mac` | `ACC_W` | 20 | accumulator width; 9 × 255 × 255 fits, and so do up to 16 full-scale products |
| `hertat_multiplier` and below | `N` | 8 | operand width; must be a multiple of 4 |

The shared enums (`cat_e`, `acc_op_e`, `pix_class_e`) live in `rtl/mac_pkg.sv`.

## Files

The RTL is in `rtl/`: one module per file, plus `mac_pkg.sv`. `hertat_mac` is
the top level. Every module has a self-checking testbench `tb/<module>_tb.sv`.
Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. Highlights:

* `hertat_multiplier_tb` checks all 65,536 operand pairs and the 41H × 22H
  example.
* `hertat_mac_tb` runs the example window in both scan orders, checking the
  operation counts above. It then runs 400 random windows with idle cycles and
  checks every window sum and its latency. It also fails if any mechanism never
  occurs: multiply, reuse, zero skip, one bypass, load, clear, split, Booth,
  idle cycles, and a reuse blocked by a changed constant.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mac_pkg.sv tb/hertat_mac_tb.sv --top-module hertat_mac_tb
./obj_dir/Vhertat_mac_tb
```

Replace `hertat_mac_tb` with any other testbench name. Verilator finds the
modules through `-Irtl`. For linting, use
`verilator --lint-only -Wall -Irtl rtl/mac_pkg.sv rtl/hertat_mac.sv`.
