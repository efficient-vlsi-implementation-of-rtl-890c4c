# Parallel linear convolution with Baugh-Wooley multipliers and Kogge-Stone adders

This is a purely combinational circuit. It convolves two short sequences of small signed
integers in one pass. For two 4-element sequences A = (A0..A3) and B = (B0..B3) of 4-bit two's-complement
numbers, it produces all seven samples of the linear convolution at once:

    Y0 = A0B0
    Y1 = A1B0 + A0B1
    Y2 = A2B0 + A1B1 + A0B2
    Y3 = A3B0 + A2B1 + A1B2 + A0B3
    Y4 = A3B1 + A2B2 + A1B3
    Y5 = A3B2 + A2B3
    Y6 = A3B3

The main idea is "cross multiplication". Write A down the side and B across the top of a 4 x 4 table, and put
the product Ai·Bj in each cell. Each Yk is then the sum of one diagonal of the table. The circuit
builds that table literally, with 16 multipliers working in parallel. It then adds each diagonal with its own
small adder tree. No carry ever passes from one output sample to the next. Each Yk keeps
its full width, and the seven results sit side by side in one 64-bit word.

The speed comes from the choice of the two arithmetic parts:

* **Baugh-Wooley multipliers** for the signed 4 x 4-bit products (`bw_mult`);
* **Kogge-Stone adders** for the diagonal sums, 8 and 9 bits wide (`ks_adder`).

The same parts also build a 4-point **circular** convolution unit (`circ_conv`). It sits next to
the linear one in the top level.

## Data format

| port | width | contents |
|---|---|---|
| `a` | 16 | A_i in `a[4i+3:4i]` (A0 in `a[3:0]`), two's complement, -8..7 |
| `b` | 16 | B_j in `b[4j+3:4j]` |
| `lin_p` | 64 | Y0..Y6, each a signed field of its own width (table below) |
| `circ_y` | 40 | circular Y0..Y3, 10-bit signed fields, Yk in `circ_y[10k+9:10k]` |

Each linear output sums m products of 8 bits, so it is 8 + clog2(m) bits wide:

| sample | products | bits of `lin_p` | width | range reached |
|---|---|---|---|---|
| Y0 | 1 | 7:0 | 8 | -56..64 |
| Y1 | 2 | 16:8 | 9 | -112..128 |
| Y2 | 3 | 26:17 | 10 | -168..192 |
| Y3 | 4 | 36:27 | 10 | -224..256 |
| Y4 | 3 | 46:37 | 10 | -168..192 |
| Y5 | 2 | 55:47 | 9 | -112..128 |
| Y6 | 1 | 63:56 | 8 | -56..64 |

To read a sample, take its field and sign-extend it. The fields are not one long binary number.
You cannot shift-and-add them together. Y2 and Y4 would fit in 9 bits, but their fields are 10 bits wide. The widths
come from the adder structure, which adds one bit per level, not from the value range.

Example: (7,7,7,7) * (7,7,7,7) gives (49, 98, 147, 196, 147, 98, 49). With all elements at -8,
you get (64, 128, 192, 256, 192, 128, 64), and Y3 = 256 needs all 10 bits of its field.

The elements are signed. A 4-bit field holding 15 therefore means -1, and (15,15,15,15) convolved with itself
gives (1, 2, 3, 4, 3, 2, 1), not (225, 450, ...). An unsigned convolution needs a different
multiplier. Baugh-Wooley is a signed method.

## The Baugh-Wooley multiplier (`bw_mult`)

A signed product normally needs its partial-product rows to be sign-extended or negated.
Baugh-Wooley avoids both. For W-bit operands:

* form every bit product a_i·b_j at weight 2^(i+j);
* complement the products that pair exactly one sign bit with one non-sign bit
  (i = W-1 or j = W-1, but not both); the product of the two sign bits stays uncomplemented;
* add a constant 1 at weight 2^W and another at weight 2^(2W-1);
* add everything modulo 2^(2W).

The result is the two's-complement product, and every row is a plain positive number. In
`bw_mult` the W shifted rows and the two constants are summed by ordinary addition. This
describes the array but does not fix its adder cells; synthesis is free to pick a carry-save or
other structure. `W` is a parameter (default 4), and the testbench also checks W = 6.

## The Kogge-Stone adder (`ks_adder`)

This is a parallel-prefix adder. Each bit forms generate g = a&b and propagate p = a^b. Then
log2(WIDTH) levels merge each (G, P) pair with the pair 1, 2, 4, ... bits below it. After
the last level, G[i] is the carry out of bit i. The sum is p[i] ^ G[i-1]. Every level has a full row of
merge cells, which keeps the depth at log2(WIDTH). The price is a lot of wiring.

The result has WIDTH+1 bits. The extra bit is the **sign of the exact signed sum**,
a[msb] ^ b[msb] ^ carry-out, not the bare carry-out. This lets signed sums chain through
wider adders without overflow. The last-level group propagate is computed but not used. Lint
reports it, and it is left in so that every level is built the same way.

## The diagonal adder trees (`diag_sum`)

`diag_sum` adds NT signed terms of IW bits. It works level by level. At level l the values are IW + l
bits wide. Neighbours (0,1), (2,3), ... are added by one (IW+l)-bit `ks_adder` each. A value left over
at an odd count is sign-extended and passed on to the next level. For the 4 x 4 design this gives exactly:

* 2 products: one 8-bit KSA (9-bit sum);
* 3 products: an 8-bit KSA for the first two, then a 9-bit KSA that adds the third, which is
  sign-extended to 9 bits (10-bit sum);
* 4 products: two 8-bit KSAs, then a 9-bit KSA (10-bit sum);
* 1 product: no adder.

The whole linear unit has 16 multipliers, six 8-bit and three 9-bit Kogge-Stone adders. Its
critical path is one multiplier plus two adder levels.

## Circular convolution (`circ_conv`)

Circular convolution is the N-point version, Yk = Σi Ai·B((k-i) mod N). Here every diagonal wraps around the table and
holds N products. Each output therefore uses a 4-term `diag_sum` and is 10 bits wide. Again no
carry passes between outputs. The unit has its own 16 multipliers. They compute the same
products as the linear unit's, and a synthesis tool may merge them.

## Sizes and parameters

`lin_conv`, `circ_conv` and `conv_top` take `N` (sequence length, default 4) and `W` (element
width, default 4). The package `conv_pkg` computes the field widths and offsets (`lin_width`,
`lin_offset`, `lin_total`, `circ_width`). At N = 5, W = 4 the linear output has 9 samples of
8, 9, 10, 10, 11, 10, 10, 9, 8 bits (85 bits), and each circular output is 11 bits. The 4 x 4-bit
case follows the reference design. Other sizes are a straightforward generalisation and are
tested only at N = 5, W = 4 (and W = 6 for the bare multiplier).

The design has no clock, no registers and no reset. For a clocked system, register `a`/`b` and
`lin_p`/`circ_y` around it. Pipelining is left to the user.

## Where this RTL departs from, or goes beyond, the reference design

* The reference describes the same network twice. One version uses Vedic (Urdhva Tiryagbhyam)
  multipliers and "CBL" adders. The proposed version uses Baugh-Wooley multipliers and
  Kogge-Stone adders. Only the Baugh-Wooley / Kogge-Stone version is implemented. The
  array-multiplier and ripple-adder baselines it was compared against are not implemented either.
* The output ranges of the reference drawing give Y5 and Y6 together as bits 63:47. They are split here
  as Y5 = 55:47 and Y6 = 63:56.
* The drawing of the reference network has some operand labels that disagree with the output
  equations. The equations were followed.
* The reference gives the unsigned (15,15,15,15) example for its Vedic version. This design is signed throughout.
* The reference gives the circular convolution only as equations, with Vedic multipliers and CBL
  adders. Here it reuses the Baugh-Wooley / Kogge-Stone parts, at W = 4. Putting it beside the
  linear unit, on shared inputs, is this design's choice.
* The internal structure of the multiplier and adder (row accumulation, radix-2 Kogge-Stone
  without carry-in) and the signed extra sum bit are standard choices. The reference does not specify them.
* The reference reports FPGA results (slices, LUTs, combinational delay) for its Xilinx
  Spartan-3 implementation. No timing or area figures are claimed for this RTL.

## Files

| file | contents |
|---|---|
| `rtl/conv_pkg.sv` | size functions shared by the units |
| `rtl/bw_mult.sv` | Baugh-Wooley signed multiplier |
| `rtl/ks_adder.sv` | Kogge-Stone adder with signed (WIDTH+1)-bit sum |
| `rtl/diag_sum.sv` | Kogge-Stone adder tree for one diagonal |
| `rtl/lin_conv.sv` | linear convolution unit (16 multipliers, 9 adders at default) |
| `rtl/circ_conv.sv` | circular convolution unit |
| `rtl/conv_top.sv` | top level: both units on shared inputs |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `conv_n5_tb` |

## Simulation

Each testbench checks its module against values it computes directly from the definition
(integer products and sums). At the end it prints `TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Irtl rtl/conv_pkg.sv tb/conv_top_tb.sv \
        -y rtl --top conv_top_tb
    ./obj_dir/Vconv_top_tb

Replace the testbench and `--top` name to run any of the others. Lint with
`verilator --lint-only -Wall rtl/conv_pkg.sv rtl/conv_top.sv -y rtl`.

The testbenches cover:

* `bw_mult_tb`: all 256 operand pairs at W = 4, plus random pairs at W = 6.
* `ks_adder_tb`: all 65,536 pairs at 8 bits, plus corners and random pairs at 9 bits.
* `diag_sum_tb`: 1 to 5 terms, with all-minimum and all-maximum vectors and random vectors.
* `lin_conv_tb` and `circ_conv_tb`: the worked example, extremes and 3,000 random sequence pairs each.
* `conv_top_tb`: the whole design at its default size, on 5,000 random pairs and extremes.
  It also counts how often the design's corner behaviour is exercised. It fails if any of these
  never occurs: negative results, results that need the full field width, 4-term sums that need
  the second adder level, and circular samples that differ from the linear ones.
* `conv_n5_tb`: the top rebuilt for 5-element sequences (9 linear outputs).

Each testbench has been shown to fail when its module is deliberately broken. The broken variants include
a dropped Baugh-Wooley correction constant, zero-extension in place of sign-extension, and a wrong
diagonal index.
