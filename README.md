# VHBCSE constant multiplier and reconfigurable symmetric FIR filter

An FIR filter multiplies each input sample by every one of its coefficients:
one variable times many constants (multiple constant multiplication, MCM).
When the coefficients are fixed, a synthesis tool can turn each product into a
hand-picked network of shifts and adds. When they must change at run time, as
in a software-defined radio, the multiplier has to accept any coefficient, and
it is sized for the worst one (all ones).

This design is such a reconfigurable shift-and-add multiplier. It cuts the work
in two directions, which is where the name comes from: **vertical-horizontal
binary common sub-expression elimination (VHBCSE)**.

* **Vertically, across coefficients.** The coefficient is read two bits at a
  time. A 2-bit pattern can only be `00`, `01`, `10` or `11`, and its partial
  products are 0, X/2, X and X + X/2. Only the last one needs an adder. The
  sample is the same for every coefficient of the filter, so one
  *partial product generator* (PPG) with a single adder serves all the
  multipliers.
* **Horizontally, inside a coefficient.** Each multiplier sums its eight
  partial products in a tree. Before adding, it checks whether two 4-bit
  nibbles of the coefficient are equal, or its two bytes are. If a lower nibble
  or byte repeats a higher one, its partial sum is just the higher sum shifted
  right, so the adder for it has nothing to do. That adder is held quiet, which
  saves switching power.

The RTL here holds the multiplier, the MCM block that shares one PPG among
several multipliers, and an 8-tap symmetric FIR filter built around it. The
filter has a run-time writable coefficient table.

## Number format

| quantity | width | format |
|---|---|---|
| sample X | 16 | two's complement integer |
| coefficient H | 17 | two's complement fraction, value H / 2^16 (range -1 to 1 - 2^-16) |
| product Y | 16 | two's complement integer, about floor(X · H / 2^16) |
| filter output | 19 | two's complement, sum of 8 products, no rounding or saturation |

Magnitude bit `Hm[15]` weighs 1/2 and `Hm[0]` weighs 1/65536. So the
all-ones coefficient `16'hFFFF` is the sum X/2 + X/4 + … + X/65536, which is
the worst case the hardware is sized for.

## From sign to magnitude: the 1's complement trick

The adder tree works on unsigned magnitudes only. `vh_sign_conv` makes them
cheaply. If the word is negative, the bits below the sign are inverted, which
gives |value| − 1. Otherwise they pass unchanged. No incrementer is needed.
A small negative coefficient such as −0.0001 is all ones in two's complement
but nearly all zeros after inversion. That keeps the multiplexers selecting
zero and the adders idle.

Both the coefficient (17 → 16-bit magnitude `Hm`) and the sample (16 → 15-bit
magnitude) go through this conversion. At the output, `vh_cm` inverts the
16-bit magnitude result when exactly one of the two operands was negative.
Inverting gives −m − 1. This absorbs the −1 offsets well enough that Y stays
within a few LSBs of floor(X · H / 2^16). Over 60,000 random products, the
largest difference seen was 4 LSB. One consequence: a negative sample times a
zero coefficient gives −1, not 0.

## The adder tree, layer by layer

```
 X ──sign conv──► Xm ──PPG (A0)──► {X/2, X, X+X/2}  (shared by all coefficients)
                                        │
 H ──sign conv──► Hm ──┬─ control generator ─► c1..c7
                       └─ 8 × 4:1 mux ─► P8..P1           layer 1 (vertical 2-bit BCSE)
                                          │
             AS1..AS4 = pair sums, nibble reuse (c1..c6)   layer 2 (horizontal 4-bit)
             AS5 = AS1+AS2, AS6 = AS3+AS4 or AS5>>8 (c7)   layer 3 (horizontal 8-bit)
             S = AS5 + AS6,  Ym = S >> 1                   layer 4
             Y = sign ? ~Ym : Ym
```

**Layer 1 (`vh_ppg`, `vh_mux_unit`).** Bit pair k of Hm (k = 8 for
`Hm[15:14]` down to k = 1 for `Hm[1:0]`) drives a 4:1 multiplexer. The
multiplexer picks 0, X/2, X or X + X/2, shifted right by 2·(8 − k) bits. The
shifted-out bits are dropped, so the multiplexers get narrower going down:

| partial product | P8 | P7 | P6 | P5 | P4 | P3 | P2 | P1 |
|---|---|---|---|---|---|---|---|---|
| coefficient bits | 15:14 | 13:12 | 11:10 | 9:8 | 7:6 | 5:4 | 3:2 | 1:0 |
| right shift | 0 | 2 | 4 | 6 | 8 | 10 | 12 | 14 |
| width (bits) | 17 | 15 | 13 | 11 | 9 | 7 | 5 | 3 |

All values are in units of half a sample LSB, because the top pair's pattern
`10` selects X but stands for X/2. The final sum is therefore halved.

**Layer 2 (`vh_layer2`).** The partial products are summed per nibble:

| sum | nibble | adder | width |
|---|---|---|---|
| AS1 = P8 + P7 | N3 = Hm[15:12] | A1 | 17 |
| AS2 = P6 + P5 | N2 = Hm[11:8] | A2 | 13 |
| AS3 = P4 + P3 | N1 = Hm[7:4] | A3 | 9 |
| AS4 = P2 + P1 | N0 = Hm[3:0] | A4 | 5 |

If a nibble equals a higher one, it contributes the same pattern 4 bits (or 8,
or 12) further down. Its sum is then the higher sum shifted right by that much.
The control generator (`vh_ctrl_gen`) compares all six nibble pairs:

| control | c1 | c2 | c3 | c4 | c5 | c6 | c7 |
|---|---|---|---|---|---|---|---|
| equality | N3=N2 | N3=N1 | N3=N0 | N2=N1 | N2=N0 | N1=N0 | Hm[15:8]=Hm[7:0], i.e. c2 & c5 |

The multiplexers behind the adders choose, earliest source first:

```
AS2 = c1 ? AS1>>4  :                          A2
AS3 = c2 ? AS1>>8  : c4 ? AS2>>4 :            A3
AS4 = c3 ? AS1>>12 : c5 ? AS2>>8 : c6 ? AS3>>4 : A4
```

A reused value can itself be a reused value; for example, AS3 taken from
AS2 >> 4 when AS2 was taken from AS1. The longest path is therefore
A1 followed by up to three multiplexers. An adder whose result is not selected
gets zero operands (operand isolation), so it does not toggle.

**Layer 3 (`vh_layer3`).** AS5 = AS1 + AS2 is the upper byte's sum (A5,
17 bits). The lower byte is AS6 = AS3 + AS4 (A6, 9 bits), unless the two
bytes are equal (c7). In that case AS6 = AS5 >> 8 and A6 is isolated.

**Layer 4 (`vh_layer4`).** S = AS5 + AS6 (A7, 17 bits), and the magnitude is
Ym = S >> 1.

### Truncation, and what reuse does to it

Each partial product is truncated on its own, so the sum is not bit-exact
with X · Hm. When a nibble's sum is reused, it is the *higher* sum truncated
once more, (a + b/4) >> 4. The direct sum would be a/16 + b/64, truncated
twice. The two can differ by one LSB. So a VHBCSE product can differ slightly
from the product of a plain 2-bit BCSE tree that adds all eight partial
products. This happens in about a fifth of the test products, which are
deliberately rich in repeated nibbles. The design keeps the reuse as the
architecture defines it. The testbench reference (`tb/vh_ref_pkg.sv`) models
exactly these truncations, and separately bounds the result against the exact
product.

## The MCM block and the filter

`vh_mcm` converts the sample's sign once, runs one PPG, and feeds the PPG
outputs and the sample sign to `NCOEF` copies of `vh_cm`. Those copies are
the per-coefficient part: coefficient sign conversion, controls, multiplexers,
layers 2–4 and sign restore.

`vhbcse_fir` is an `NTAP`-tap filter with symmetric coefficients,
h[k] = h[NTAP−1−k]. Only `NCOEF = NTAP/2` multipliers are needed. It is built
in transposed direct form, so that one sample meets all coefficients at once:

```
coef LUT (NCOEF × 17) ──► vh_mcm ◄── x_q ◄── x_in (input register)
                            │ p[k] = h[k]·x_q  (p[k] = p[NTAP-1-k])
 z[NTAP-1] <= p[NTAP-1];  z[k] <= p[k] + z[k+1];  y_out <= p[0] + z[1]
```

The chain advances only when a valid sample sits in `x_q`.

### Ports and timing of `vhbcse_fir`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset clears LUT, registers and output |
| `coef_we`, `coef_addr`, `coef_wdata` | in | 1, 2, 17 | write coefficient `coef_addr` (H0..H3) |
| `in_valid`, `x_in` | in | 1, 16 | sample input |
| `out_valid`, `y_out` | out | 1, 19 | filter output |
| `ctrl` | out | 4 × 7 | c1..c7 of each multiplier, for observation |

* A sample presented with `in_valid` at clock edge t appears as an output
  with `out_valid` after edge t + 2. The filter accepts one sample per clock.
  There is no backpressure.
* A coefficient written at edge t is used by the sample that is in the
  input register after edge t. This is the sample accepted at the same edge
  or later. Samples already multiplied keep their old products in the chain.
  So a rewrite mid-stream produces no glitch and no stall; the filter passes
  smoothly from one response to the other over NTAP samples.
* The multipliers are combinational between two register stages. The
  critical path is the input register, then PPG adder A0, the multiplexers,
  A1, up to three reuse multiplexers, A5, A7, the sign inverter, and one
  chain adder.
* The assertion `a_coef_addr` flags a write to a coefficient index that does
  not exist (possible only when NCOEF is not a power of two).

## Files

| file | contents |
|---|---|
| `rtl/vh_pkg.sv` | widths, `ppg_t`, `pp_set_t`, `ctrl_t`, 2-bit pattern enum |
| `rtl/vh_sign_conv.sv` | sign conversion (1's complement + 2:1 mux), parameter `W` |
| `rtl/vh_ppg.sv` | partial product generator, adder A0 |
| `rtl/vh_ctrl_gen.sv` | control generator c1..c7 |
| `rtl/vh_mux_unit.sv` | eight 4:1 multiplexers, P8..P1 |
| `rtl/vh_layer2.sv`, `vh_layer3.sv`, `vh_layer4.sv` | controlled and final additions |
| `rtl/vh_cm.sv` | one constant multiplier (per coefficient) |
| `rtl/vh_mcm.sv` | shared PPG + `NCOEF` multipliers (default 4) |
| `rtl/vhbcse_fir.sv` | top: symmetric FIR filter, `NTAP` (default 8) |
| `tb/vh_ref_pkg.sv` | integer reference of the multiplier, plain 2-bit BCSE sum, exact product |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog that counts a failure if the run hangs. With Verilator 5:

```sh
verilator --binary -j 0 -Wno-fatal -y rtl -y tb \
    rtl/vh_pkg.sv tb/vh_ref_pkg.sv tb/tb_vhbcse_fir.sv --top-module tb_vhbcse_fir
./obj_dir/Vtb_vhbcse_fir
```

Replace `tb_vhbcse_fir` with any other `tb_<module>` to test that module.
Each run takes well under a second.

What the testbenches establish:

* `tb_vh_sign_conv`, `tb_vh_ppg`, `tb_vh_ctrl_gen`: exhaustive over their
  16-bit inputs (random for the 17-bit coefficient width).
* `tb_vh_mux_unit`, `tb_vh_layer2`, `tb_vh_layer3`, `tb_vh_layer4`: random
  operands within the ranges the tree can produce. `tb_vh_layer2` drives the
  controls both at random and as the true nibble equalities. It fails if any
  of the seven selection paths is never taken.
* `tb_vh_cm`: 60,000 products, half with coefficients built from repeated
  nibbles. Each product is checked bit for bit against the reference, and
  within 8 LSB of the exact product. The test fails unless every control
  c1..c7, negative coefficients and negative samples all occur.
* `tb_vh_mcm`: four coefficients at once, including equal ones.
* `tb_vhbcse_fir`: the filter at its default size. It sends 3,000 input
  cycles with random gaps, about 190 coefficient rewrites while samples are in
  flight, and negative samples and coefficients. Each output is checked
  against a direct-form convolution and against the two-cycle latency. The
  test fails if any reuse control, rewrite, gap or back-to-back sample never
  happens.

## Design choices beyond the published architecture

The data path from layer 1 to layer 4 follows the published architecture:
the partial products and their widths, the seven controls with c7 built from
two nibble equalities, the reuse by shifting, and the adder widths. The
following points are this implementation's own:

* **Fractional coefficient and output scaling**: reading H as H/2^16, and
  taking the 16-bit product as S >> 1.
* **Sign handling**: converting the sample as well as the coefficient, and
  restoring the output sign by 1's complement.
* **Control numbering and priority**: the nibble pairs assigned to c1..c6,
  and the order in which the reuse multiplexers prefer their sources.
* **Controlled addition as operand isolation**: an idle adder is fed zeros.
  Clock gating or a shared adder would be alternatives.
* **The filter wrapper**: the transposed direct form, the valid handshake, the
  register-file coefficient table and its write timing, the reset, and the
  19-bit full-precision output.
* **No pipelining** inside the multiplier.
* **Adder widths**: the published adder count for a coefficient with no
  repeats is one 17-bit, two 16-bit, one 13-bit, two 9-bit and one 5-bit
  adder. Here A2 = 13, A3 = A6 = 9 and A4 = 5 bits match that count, but A1,
  A5 and A7 are all 17 bits. The sum is kept in half-LSB units, and it needs
  17 bits for an all-ones coefficient and a full-scale sample.

The hardware cost differs from a per-coefficient adder count. A fixed
coefficient set could drop the adders its reuse makes redundant. A
reconfigurable multiplier must keep all of them: A1–A7 are 87 adder bits per
coefficient, plus the 17-bit A0 shared by the filter. The savings are in
switching activity, not in area. Published power and area comparisons against
a plain 2-bit BCSE multiplier come from a vendor FPGA flow and are not
reproduced here.
