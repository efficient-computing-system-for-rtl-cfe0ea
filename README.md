# Radix-8 approximate Booth multiplier with an image-sharpening engine

A radix-8 Booth multiplier needs the "hard multiple" 3A. An exact design
builds 3A with a carry-propagate adder, and that adder dominates the
multiplier's delay and area. This design does not build 3A. Each bit of a
partial-product row is selected directly from three neighbouring bits of the
multiplicand. For the digits +3 and -3, the bit is `a[p] OR a[p-1]`: a half
adder whose carry is thrown away. The product is exact whenever no Booth
digit of the multiplier is +-3. When such a digit occurs, that row is
`+-(A | 2A)` in place of `+-3A`, and the product can be off.

The multiplier is called R8ANBM here, for radix-8 approximate novel Booth
multiplier. Its encoder is called ANBE. The multiplier is then used in a
streaming 5x5 image-sharpening filter, which is the top of the design. That
filter shows the effect of the approximation on real image processing.

## Booth digits and the approximate encoder (`anbe`)

The multiplier B is an N-bit two's-complement number. Extend it with
`b(-1) = 0` below and copies of the sign bit above. Then cut it into
overlapping 4-bit groups `{b(3q+2), b(3q+1), b(3q), b(3q-1)}`, with
`q = 0 .. ceil(N/3)-1`. Each group stands for one digit:

    B_q = -4*b(3q+2) + 2*b(3q+1) + b(3q) + b(3q-1)      in {-4 .. +4}

so that `B = sum B_q * 8^q`. For each group, `anbe` decodes three select
signals and a sign:

| group (b3q+2 .. b3q-1) | digit | row bit p before the sign |
|---|---|---|
| 0000, 1111 | 0 | 0 |
| 0001, 0010 / 1101, 1110 | +1 / -1 | a[p] |
| 0011, 0100 / 1011, 1100 | +2 / -2 | a[p-1] |
| 0101, 0110 / 1001, 1010 | +3 / -3 | **a[p] OR a[p-1]** (approximate) |
| 0111 / 1000 | +4 / -4 | a[p-2] |

    one  = b(3q) ^ b(3q-1)
    two  = b(3q+1) ^ maj(b(3q+2), b(3q), b(3q-1))
    four = ~b(3q+2)&b(3q+1)&b(3q)&b(3q-1) | b(3q+2)&~b(3q+1)&~b(3q)&~b(3q-1)
    pp[p] = (one&a[p] | two&a[p-1] | four&a[p-2]) ^ b(3q+2)

A is sign-extended above bit N-1 and zero below bit 0. Each row is N+3 bits
wide, so that `-4 * (-2^(N-1))` fits. When the digit is negative, the row is
the one's complement. The missing +1 comes out on the `neg` output.

Four of the 16 group values are approximate. The row error is
`3A - (A|2A) = A & 2A`, the carries that the OR drops. It is zero whenever A
has no two adjacent ones.

## Putting the rows together (`r8anbm`)

The rows would normally need long sign extensions. Instead, the multiplier
inverts each row's sign bit and adds one constant row. That row holds, modulo
2^(2N), the sum over all rows of `-2^(N+2) * 8^q`. This is the same as the
"inverted sign bit plus constant ones" in a Booth dot diagram, but folded into
a single row that is fixed when the design is built. A second row collects the
`neg` bits, each at position 3q.

For the default N = 16 this gives 6 Booth rows plus 2 more, 8 rows of 32 bits
in all. `pp_reduction` reduces them to two rows. A Brent-Kung adder
(`bk_adder`) adds those two rows. All of the arithmetic is modulo 2^(2N).
The exact product always fits in 2N bits, so the approximate digits are the
only source of error.

The multiplier is purely combinational: `p` is valid in the same cycle as
`a` and `b`.

### Reduction tree (`pp_reduction`, `compressor42`, `full_adder`)

The tree is built one stage at a time, at the word level:

- Each group of four rows goes through a row of 4:2 compressors. Each
  compressor is two full adders. A compressor's `cout` feeds the `cin` of the
  next column to the left, and `cout` does not depend on `cin`, so the row has
  no ripple chain.
- A leftover group of three rows goes through a row of full adders.
- One or two leftover rows pass through unchanged.

Stages repeat until two rows remain. The helper functions in `r8anbm_pkg` work
out the number of rows at each stage. For N = 16, two stages of 4:2
compressors turn 8 rows into 2. For N = 8, the 5 rows go through a 4:2 stage
and then a full-adder stage.

### Final adder (`bk_adder`, `half_adder`)

The adder first uses half adders to form, for each bit, generate `x&y` and
propagate `x^y`. Then comes a Brent-Kung prefix tree: log2(W) up-sweep levels
and log2(W)-1 down-sweep levels. Any width W >= 2 works, because the tree is
built for the next power of two.

## Accuracy

`tb_r8anbm` tries all 65,536 operand pairs at N = 8 and measures the
following:

| metric | value at N = 8 |
|---|---|
| exact products | 62.06 % |
| mean ED / max ED (NMED as mean of ED/maxED) | 9.11e-2 |
| mean of ED/\|exact\| over non-zero products (MRED) | 7.69e-2 |
| largest error distance | 2304 |

These figures come from this RTL. The published evaluation of this
multiplier reports 67.15 % exact outputs, an NMED of 3.11e-3 and an MRED of
0.923e-2. That evaluation does not give the operand width or the exact
normalisation it used, so the two sets of numbers cannot be compared directly.
They do not contradict the encoder's truth table, which fixes the RTL's
behaviour completely.

## Image-sharpening engine (`image_sharpen`, top)

The engine takes a raster stream of 8-bit grey pixels, one per cycle in which
`pix_valid` is high. Idle cycles between pixels are allowed. For every pixel
whose 5x5 neighbourhood lies inside the image, it outputs:

    S = clamp(2*I - (1/273) * sum G*I, 0, 255)
    G = [1 4 7 4 1; 4 16 26 16 4; 7 26 41 26 7; 4 16 26 16 4; 1 4 7 4 1]

- **Multipliers.** 25 `r8anbm` instances form the products G*I. The weight is
  the multiplicand and the pixel is the Booth-encoded operand, so the error
  depends on the image content.
- **Division by 273.** This is done exactly, as a multiplication by 3841
  followed by a right shift by 20.
- **Line buffers.** Four `line_buffer` instances, 225 x 8 bits each, hold the
  previous four image lines. Each one is read before it is written at the same
  column, so chained buffers give the same column of the four lines above.
- **Window.** A 5x5 register window shifts one column for each accepted pixel.
- **Pipeline.** The stages are window, then products, then result. A pixel
  accepted at clock edge k completes a window. The result for that window is
  registered at edge k+2, and `out_valid` is high for one cycle. The result
  belongs to the pixel two lines up and two columns to the left.
- **Output.** Each frame gives (W-4) x (H-4) results in raster order. There is
  no back-pressure.
- **Frames.** The position counters wrap after `IMG_W*IMG_H` pixels.
  `frame_done` pulses when the last pixel of a frame is accepted.
- **Reset.** `rst_n` is active low and synchronous. It clears the counters
  and the valid flags.

The default size is 225 x 225 pixels, which needs 7,200 bits of line buffer.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `r8anbm`, `anbe` | `N` | 16 | operand width (both operands signed) |
| `pp_reduction` | `W`, `K` | 32, 8 | row width, number of rows |
| `bk_adder` | `W` | 32 | adder width |
| `image_sharpen` | `IMG_W`, `IMG_H`, `N` | 225, 225, 16 | image size, multiplier width |
| `line_buffer` | `DEPTH`, `DW` | 225, 8 | entries, data width |

## Simulating

Every testbench checks its own results and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Run any of them like this, from the folder
that holds `rtl/` and `tb/`:

    verilator --binary --timing -y rtl -y tb -Irtl -Itb --top-module tb_image_sharpen \
        rtl/r8anbm_pkg.sv tb/r8anbm_ref_pkg.sv tb/tb_image_sharpen.sv
    ./obj_dir/Vtb_image_sharpen

| testbench | what it checks |
|---|---|
| `tb_image_sharpen` | Two 225 x 225 frames at the default parameters, with random idle cycles. Checks every output value and its cycle against an integer model. Counts the +-3 digits, clamping at 0 and at 255, idle cycles, line wraps and frame ends, and fails if any of them never happened. Prints the PSNR of the approximate result against the same filter with exact products (about 33 dB on the generated image). |
| `tb_r8anbm` | All pairs at N = 8 with the error metrics, plus 20,000 random and corner pairs at N = 16. |
| `tb_anbe` | Every group with every multiplicand at N = 8 and random multiplicands at N = 16. Also compares the selects with the truth table above. |
| `tb_pp_reduction` | K = 8, 5 and 3, which covers all three stage shapes. |
| `tb_bk_adder` | Widths 32, 16 and 13. |
| `tb_compressor42`, `tb_full_adder`, `tb_half_adder` | Every input combination. |

`tb/r8anbm_ref_pkg.sv` holds the reference model the testbenches use. It works
on whole integers: each digit adds `A*B_q`, or `+-(A|2A)` for a +-3 digit. It
does not follow the gate structure of the RTL.

## How far to trust it, and where it goes its own way

- **Encoder.** The encoder matches its truth table for all 16 group values,
  and the tests cover every multiplicand at N = 8. The printed sum-of-products
  form of the a[p-1] select disagrees with the truth table, so the RTL uses
  `b(3q+1) ^ maj(b(3q+2), b(3q), b(3q-1))`, which agrees with the table in
  every row. The published encoder uses 31 gates. This RTL does not try to
  match that gate count.
- **Operand width.** The operand width is not fixed by the source design.
  N = 16 is this design's default.
- **Structural details.** The sign-extension constant, the layout of the
  reduction tree and the placement of the half adders are this design's
  choices.
- **Sharpening filter.** The algorithm (kernel, scale, clamping, borders) is
  this design's choice. The published evaluation uses 225 x 225 test images
  (Lena and Barbara) and reports PSNRs of 37.8 dB and 42.3 dB. Those images
  are not included here. The testbench generates its own image, so its PSNR is
  not comparable.
- **Area, delay and energy.** The published evaluation reports these from an
  FPGA flow and a 45 nm library. This RTL reproduces none of them.
