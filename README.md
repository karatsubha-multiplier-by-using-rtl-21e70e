# Karatsuba multiplier, 32 x 32 -> 64 bits

A 32-bit by 32-bit long multiplication needs four 16 x 16 products. The
Karatsuba trick gets by with three. This design uses it to build a purely
combinational unsigned multiplier: two 32-bit operands in, the exact
64-bit product out. It has no clock and no registers, and the result is
valid once the logic has settled.

## The three products

Split each operand into a high and a low 16-bit half:

    a = a_hi * 2^16 + a_lo        b = b_hi * 2^16 + b_lo

Then

    a*b = a_hi*b_hi * 2^32 + (a_hi*b_lo + a_lo*b_hi) * 2^16 + a_lo*b_lo

The cross term in the middle would normally cost two more products.
Karatsuba gets it from one product of sums instead:

    p0  = a_lo * b_lo
    p2  = a_hi * b_hi
    p1  = (a_hi + a_lo) * (b_hi + b_lo)
    mid = p1 - p2 - p0            (= a_hi*b_lo + a_lo*b_hi)
    q   = p2 * 2^32 + mid * 2^16 + p0

Three multipliers, two adders before them, two subtractors after them,
and one final adder replace the fourth multiplier. The same structure
applies with base 2 on two-bit operands:
`(a1 a0)(b1 b0) = a1b1*4 + (a1b0 + a0b1)*2 + a0b0`.

## Widths: where the carries go

The datapath looks as if it were all 16 bits wide, but it is not. Getting
the widths right is the one subtle part of the design.

| signal | width | why |
|---|---|---|
| `sa = a_hi + a_lo`, `sb` | 17 | the sum of two 16-bit values can carry into bit 16 |
| `p0`, `p2` | 32 | 16 x 16 products |
| `p1 = sa * sb` | 34 | 17 x 17 product |
| `mid` | 34 | at most 2*(2^16-1)^2 < 2^33, so 34 bits always hold it |
| `q` | 64 | full product |

If the pre-sums are cut to 16 bits, about three random operand pairs in
four give a wrong product: whenever either pre-sum carries, `p1` loses a
term. That is why the pre-adders keep their carry here.

`mid` is computed in unsigned 34-bit arithmetic. This is exact because
`p1 - p2 - p0` equals the sum of two non-negative products, so it is
never negative. The intermediate `p1 - p0` is not negative either.

`p0` fills bits 0 to 31 of the result exactly, and `p2` fills bits 32 to
63. The two are therefore concatenated, and only `mid << 16` goes through
an adder. That addition can carry into the bits of `p2`, and it often
does.

## Module structure

    karatsuba_multiplier          top: a, b -> q
    ├── kara_presum               two pre-adders -> sa, sb (17 bits)
    ├── kara_product   x3         leaf multipliers p0, p2 (16x16), p1 (17x17)
    ├── kara_middle               two subtractors -> mid
    └── kara_combine              {p2, p0} + (mid << 16) -> q
    kara_pkg                      width functions shared by all of the above

- `kara_pkg` derives every width from the operand width WIDTH. The low
  half has `WIDTH/2` bits and the high half the rest. A sum has one bit
  more than the high half, and the middle product is twice that.
- `kara_product` is a plain `*`. The synthesis tool maps it to its own
  multiplier, a DSP block or a LUT array on an FPGA.
- All modules are combinational (`always_comb`).

## Parameters of `karatsuba_multiplier`

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 32 | operand width; `q` is `2*WIDTH` bits |
| `LEVELS` | 1 | number of Karatsuba levels, at least 1 |

With `LEVELS = 1`, the three partial products are leaf multipliers. This
is the one-level structure of the reference design. With `LEVELS > 1`,
each partial product is itself a `karatsuba_multiplier` with one level
fewer, so the algorithm is applied recursively. Recursion stops at the
last level, or once a factor is narrower than `min_split_w()` (4 bits,
in `kara_pkg`). Odd widths split unevenly: 37 bits gives an 18-bit low
half and a 19-bit high half. Those cases are tested too. Each level makes
the logic deeper, because it adds a pre-adder in front of the products
and subtract/add stages behind them. Whether that pays off against a
native multiplier depends on the target. On FPGAs with DSP blocks, one
level is usually the right choice.

## What follows the reference design and what does not

Taken from the reference design:
- 32-bit operands and a 64-bit result;
- the signal names `a`, `b` and `q`;
- the one-level structure of two pre-adders, three multipliers and two
  subtractors, with no registers.

Choices made here:
- **Unsigned operands.** Signedness is not specified.
- **17-bit pre-sums and a 34-bit middle product.** The reference
  schematic is annotated with 16-bit widths at the adders. Taken
  literally, those widths would make many products wrong. The exact
  64-bit product is what the design is for, so the carries are kept.
- **An explicit recombination adder** (`kara_combine`). The reference
  schematic does not show how `q` is assembled. The weights come from
  the algorithm.
- **Which product is taken off first in `kara_middle`.** The order does
  not change the result.
- **The `LEVELS` parameter.** The algorithm is described as recursive, but
  no depth is given beyond the one-level structure.

Not reproduced: the source reports results for a "modified" Karatsuba
variant on Xilinx Spartan-3E and Virtex parts. These are percentage
savings in slices and delay against other Karatsuba designs. The variant
is described no further than those figures, so this RTL is the plain
one-level Karatsuba structure, and none of those numbers have been
measured for it.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`.

| testbench | what it checks |
|---|---|
| `tb_karatsuba_multiplier` | top at default parameters. It runs corner operands, a sweep of single-bit operands and 20,000 random pairs against a 64-bit reference product. Random pairs are biased so that pre-sum carries occur. The bench counts pre-sum carries on a, on b and on both, and carries of the cross term into the high product, and it fails if any of these never occurs. |
| `tb_karatsuba_recursive` | `WIDTH=64, LEVELS=2`, `WIDTH=37, LEVELS=3` and `WIDTH=32, LEVELS=3` against 128-bit reference products |
| `tb_kara_presum` | pre-sums at 32 and 37 bits, including the carry |
| `tb_kara_product` | leaf multiplier at 16 and 17 bits, including all-ones factors |
| `tb_kara_middle` | `mid` equals `a_hi*b_lo + a_lo*b_hi` for random halves |
| `tb_kara_combine` | `q = p2*2^32 + mid*2^16 + p0` over the full range of `mid` |

Each bench was also run against a copy of its module with one deliberate
bug, and each such run reports failures. The bugs were a pre-sum cut to
16 bits, a product truncated to WIDTH bits, a missing subtraction, a
cross term shifted one place too far, and `p0` swapped with `p2`.

Each testbench runs in well under a second. Since the design is
combinational, the benches apply inputs, wait 1 time unit and compare.
There is no latency to check.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Irtl rtl/kara_pkg.sv tb/tb_karatsuba_multiplier.sv \
        --top-module tb_karatsuba_multiplier
    ./obj_dir/Vtb_karatsuba_multiplier

To run another bench, replace the testbench file and the top module
name. `-Irtl` lets Verilator find each module in `rtl/<module>.sv`.
`kara_pkg.sv` must come first. To lint the RTL alone:

    verilator --lint-only -Wall -Irtl rtl/kara_pkg.sv rtl/karatsuba_multiplier.sv

## Using it

Instantiate `karatsuba_multiplier` with the default parameters for
32 x 32 bits, or set `WIDTH` and `LEVELS`. The block is combinational, so
put registers around it to run it at a clock rate that its depth allows.
Registers between the pre-adders, the products and the recombination
would pipeline it. The design leaves that to the user.
