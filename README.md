# Reconfigurable radix-4 / Brent-Kung hybrid adder

Image filters, recognition and other signal-processing work can accept a
slightly wrong sum if the adder is cheaper and faster in return. This adder
lets the user choose at run time. One input, `sapp`, switches it between an
exact mode and an approximate mode. In approximate mode, part of the carry
logic is switched off (in silicon it would be power gated), so the low bits
cost less energy and the result can be a little low.

The adder is a hybrid of two designs:

* the **least significant part (LSP)** is built from 2-bit radix-4 elements.
  These are accuracy-configurable elements: the only place where the
  approximation happens;
* the **most significant part (MSP)** is a Brent-Kung parallel prefix adder.
  It is always exact and keeps the carry path short.

The default width is 8 bits: one 2-bit element below a 6-bit Brent-Kung adder.
A 3x3 image-smoothing unit built from the same adder shows how it is used.
Everything is combinational. There is no clock, no reset and no latency in
cycles.

```
        a[7:2] b[7:2]                 a[1:0] b[1:0]  cin
             |   |                         |   |      |
        +----v---v-----+     c2      +-----v---v------v--+
        |  Brent-Kung  |<---[gate]---|  2-bit ACRA element|<-- sapp
        |   6-bit MSP  |      ^  c1  |      (LSP)         |
        +------+-------+      |      +---------+----------+
               |            sapp               |
      cout, sum[7:2]                       sum[1:0]
```

## The 2-bit radix-4 element

A radix-4 element adds two 2-bit digits and a carry-in in one flat level of
logic. Neither sum bit waits for the carry out of bit 0:

```
cout = a1 b1 + (a0 b0)(a1 + b1) + cin (a0 + b0)(a1 + b1)
sum1 = (a1 ^ b1) ^ (a0 b0 + cin a0 + cin b0)
sum0 = (a0 ^ b0) ^ cin
```

Each XOR of two operand bits reuses the AND and NOR that the carry terms
already need: `x ^ y = NOR(x AND y, x NOR y)`. `rtl/rd4a.sv` is this
conventional element.

## Approximate mode inside the element (`acra_cell`)

This is the part that takes the most care. The accuracy-configurable element
computes the same three equations, but it splits out every term that involves
the carry-in, plus the XOR of the bit-0 operands, as separate gates. In
approximate mode (`sapp = 1`):

| gates | normal job | in approximate mode |
|---|---|---|
| G1, G2 | `cin (a0+b0)(a1+b1)` term of `cout` | disabled by `sapp`; output 0 |
| G5, G6 | `cin a0`, `cin b0` terms of the bit-1 carry | supply cut; output held 0 |
| G7 | `a0 ^ b0` | supply cut; output held 0 |

This gives:

```
cout = a1 b1 + (a0 b0)(a1 + b1)      carry of a + b alone
sum1 = (a1 ^ b1) ^ (a0 b0)           bit 1 of a + b alone
sum0 = cin                           the modified partial sum
```

So in approximate mode the element adds its two digits without the
carry-in. It then puts the carry-in on bit 0 in place of `a0 ^ b0`.

Two points here are this design's own reading of the source description:

* **Which level the gated nodes are held at.** Holding them low (0) is this
  design's choice. It matches a published approximate-mode result of the
  element: `a = b = 11`, `cin = 0` gives `sum = 10`, `cout = 1`.
* **The power switches.** These are header transistors on virtual supply rails.
  They are not modelled. RTL cannot express the power saving; it can only
  express the held output level.

With `sapp = 0` the element is bit-for-bit the conventional element.

## The carry boundary between the two parts (`bk_acra_adder`)

`c1` is the carry out of the LSP and `c2` is the carry into the Brent-Kung
part:

* exact mode: `c2 = c1`, and the adder returns exactly `a + b + cin`;
* approximate mode: `c2 = 0`. The MSP adds only its own operand bits.

Cutting the carry in approximate mode follows a published 8-bit simulation:
`a = 00110011`, `b = 10001111`, `cin = 0`, `sapp = 1` gives
`sum = 10111110` with `c1 = 1`, `c2 = 0`. The exact sum is `11000010`. As a
result, approximate mode removes the carry dependency between the two parts
entirely.

Error of the default 8-bit adder in approximate mode, over all 2^17 inputs:

* the result is never high;
* it is low by 0, 1, 4 or 5;
* the mean error is -2 and 75 % of results differ from the exact sum.

Most of that error is the dropped `c2` (weight 4).

Parameters:

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 8 | operand width |
| `LSP_ELEMS` | 1 | number of 2-bit elements in the LSP (LSP is `2*LSP_ELEMS` bits) |
| `LSP_KIND` | `LSP_ACRA` | `LSP_RD4A` puts conventional elements in the LSP; the adder is then always exact and `sapp` is ignored |

With more than one element, the elements pass carries to each other. In
approximate mode each element then sees only the generate of the element
below it.

An immediate `assert final` in the module checks that exact mode really
returns `a + b + cin`.

## The Brent-Kung part (`bk_adder`)

This is a textbook parallel prefix adder in three stages:

1. **pre-processing**: per bit, `g = a & b` and `p = a ^ b`;
2. **carry graph**: the prefix tree is built from two kinds of cell:
   * black cells: `G = Gh | Ph Gl`, `P = Ph Pl`;
   * grey cells: `G` only. A cell is grey where its lower input already
     reaches down to the carry-in.

   The tree has the Brent-Kung shape. An up-sweep builds group terms over 2,
   4, 8, ... bits. A down-sweep then fills in the remaining carries. The depth
   is about `2 log2(WIDTH+1)`, and each cell drives few others;
3. **post-processing**: `sum[i] = p[i] ^ carry[i]`.

The carry-in enters the tree as an extra position 0 with `g = cin`, `p = 0`.
The cell functions are in `acra_pkg` (`black_cell`, `grey_cell`). `WIDTH` can
be any value from 1 up. The testbench checks widths 1, 6, 7, 8, 13 and 32.

## Image smoothing (`img_smoothing`)

This unit shows the adder at work. It takes a 3x3 tile of 8-bit pixels
`p[0..8]` (raster order) and one `sapp`. For each pixel it outputs a 16-bit
neighbourhood sum: the pixel plus its horizontal, vertical and diagonal
neighbours that lie inside the tile. That is 4 terms at a corner, 6 at an edge
and 9 in the centre.

Each sum is a chain of 16-bit hybrid adders:

* the chain starts from the pixel itself and adds the neighbours in raster
  order;
* the order matters because the approximate adder is not associative;
* the sums are not divided. The divisor (4, 6 or 9) is left to the consumer.
* with 8-bit pixels the largest sum is 2295, so the top four output bits
  stay 0.

Only the interface is taken from the source: nine pixel inputs, nine wider
outputs and one mode input. The source names image smoothing as the target
application but does not define the filter. The neighbourhood sum, the tile
boundary rule and the 16-bit output width are this design's choices.

## Top level (`bk_acra_top`)

The top places three independent units side by side, each with its own ports:

* the configurable 8-bit hybrid adder (`a, b, cin, sapp -> sum, cout`);
* the exact-only variant with an RD4A least significant part
  (`x_a, x_b, x_cin -> x_sum, x_cout`);
* the smoothing unit (`pix[9], smooth_sapp -> smooth[9]`).

## Files

| file | content |
|---|---|
| `rtl/acra_pkg.sv` | `pg_t`, `lsp_kind_e`, black and grey cell functions |
| `rtl/rd4a.sv` | conventional 2-bit radix-4 element |
| `rtl/acra_cell.sv` | accuracy-configurable 2-bit element |
| `rtl/bk_adder.sv` | Brent-Kung adder |
| `rtl/bk_acra_adder.sv` | hybrid adder |
| `rtl/img_smoothing.sv` | 3x3 smoothing unit |
| `rtl/bk_acra_top.sv` | top |
| `tb/acra_model_pkg.sv` | arithmetic reference model of the hybrid adder, used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

Every testbench ends by printing `TB_RESULT checks=N failures=M`:

* the element testbenches are exhaustive;
* `tb_bk_acra_adder` runs all 2^18 inputs of the 8-bit adder (both modes),
  plus a random 16-bit adder with two LSP elements;
* `tb_bk_acra_top` runs the top at its default sizes. It counts mode switches
  in both directions, carries passed and carries cut at the boundary,
  overflows, and smoothing tiles in each mode. It fails if any of these never
  happened.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/acra_pkg.sv tb/acra_model_pkg.sv rtl/*.sv tb/tb_bk_acra_top.sv \
    --top-module tb_bk_acra_top -o sim
./obj_dir/sim
```

Replace `tb_bk_acra_top` with any other `tb_*` module to run that test. All
tests finish in well under a second.

## Limits and departures

* **Power gating is modelled only as logic.** No power or delay figures can
  come from this RTL. The source reports FPGA synthesis results: an 8-bit
  hybrid at 16.3 ns and 74 mW, against 18.5 ns and 81 mW for an all-radix-4
  configurable adder. These are not reproduced here.
* **The approximate mode of the element is reconstructed.** It is built from
  the list of gates that are switched off, plus one published result. It was
  not taken from a full truth table.
* **The carry cut at the LSP/MSP boundary is inferred.** It comes from one
  published 8-bit simulation point. The general description of the hybrid
  only says that the LSP carry feeds the MSP. That holds here in exact mode.
* **The Brent-Kung diagram this design follows also shows extra parts.** It
  has carry-skip logic, a one-cycle/two-cycle prediction and an added
  modification level. The accompanying description never explains them, so
  they are not built.
* **The smoothing filter is this design's own choice** (see above).
