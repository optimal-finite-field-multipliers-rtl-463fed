# Pipelined GF(16) multipliers for LUT-based FPGAs

Reed-Solomon encoders and decoders use many finite-field multipliers, so the
speed and area of one multiplier matter a great deal. Multipliers designed for
VLSI often do badly on an FPGA. Bit-serial designs need four clocks per 4-bit
product. Purely combinational designs have long unregistered paths. Designs
built from tiny processing elements waste most of each logic block.

The design here applies one recipe to the GF(16) product:

1. Write the product as its plain logic equations.
2. Split each product bit into *partial products*. Each partial is a function
   of at most four operand bits, so one 4-input lookup table computes it.
3. Register every partial.
4. XOR at most three registered partials into each product bit, and register
   the product bit.

The result is a two-stage pipeline. It accepts a new operand pair every clock
and returns each product two clocks later. Every path runs through a single
LUT between flip-flops. The recipe works in any basis. Three multipliers are
provided, one per element encoding:

| module | encoding of a | encoding of b | encoding of c | partials |
|---|---|---|---|---|
| `gf16_pipelined_comb_mult` | polynomial | polynomial | polynomial | 11 |
| `gf16_paar_rosner_ii_mult` | composite GF((2^2)^2) | composite | composite | 8 (four GF(4) products) |
| `gf16_morii_berlekamp_ii_mult` | dual | polynomial | dual | 10 |

`gf16_mult_top` places all three side by side. They share clock and reset
and are otherwise independent. Pick the one whose encoding suits the
surrounding datapath.

## The field

GF(16) has 16 elements, and each is a 4-bit vector. In the polynomial basis,
bit *i* is the coefficient of alpha^i, where alpha is a root of
x^4 + x + 1. So alpha^4 = alpha + 1 = `0011`, and the powers
alpha^0 .. alpha^14 are `1 2 4 8 3 6 C B 5 A 7 E F D 9` (hex). Addition is a
bitwise XOR. Multiplication is polynomial multiplication mod 2, reduced by
x^4 = x + 1:

```
c3 = a3b3 + a3b0 + a2b1 + a1b2 + a0b3
c2 = a3b3 + a3b2 + a2b3 + a2b0 + a1b1 + a0b2
c1 = a3b2 + a2b3 + a3b1 + a2b2 + a1b3 + a1b0 + a0b1
c0 = a3b1 + a2b2 + a1b3 + a0b0          (+ is XOR, juxtaposition is AND)
```

`gf16_pkg` holds the shared types: `gf16_t` (4 bits), `gf4_t` (2 bits) and
`gf16_composite_t` (`{h, l}`, two GF(4) digits). It also holds the constants
and `gf4_mul`.

## Polynomial-basis multiplier (`gf16_pipelined_comb_mult`)

The 22 AND terms above are grouped into eleven partials. Sharing operand
bits keeps each partial within four inputs:

| bit | partials (registered) |
|---|---|
| c0 | `a3b1^a1b3`, `a2b2^a0b0` |
| c1 | `a3(b1^b2)^a0b1`, `a2(b2^b3)`, `a1(b3^b0)` |
| c2 | `a3(b3^b2)`, `a2(b3^b0)`, `a1b1^a0b2` |
| c3 | `a3(b3^b0)`, `a2b1^a1b2`, `a0b3` |

The second stage XORs each row and registers the result. Two properties come
from the source design: there are eleven partials, and the latency is two
clocks with one product per clock. The grouping shown is this design's own.
The source gives the count of partials, not their terms.

## Composite-basis multiplier (`gf16_paar_rosner_ii_mult`)

This multiplier views an element as a = a_h·y + a_l. The digits a_h, a_l are
in GF(4) = GF(2)[x]/(x^2+x+1). y is a root of y^2 + y + ω over GF(4), where
ω = `10`. Bits 3:2 hold a_h and bits 1:0 hold a_l. The product is:

```
c_h = a_h b_h + a_h b_l + a_l b_h
c_l = ω·(a_h b_h) + a_l b_l
```

The first stage forms and registers the four GF(4) products
P = a_h b_h, Q = a_h b_l, R = a_l b_h and S = a_l b_l. Each of their eight
bits depends on four operand bits. The second stage forms c_h = P^Q^R and
c_l = ωP ^ S. Multiplying by ω is the fixed map {p1,p0} → {p1^p0, p1}.

A Karatsuba split would need only three GF(4) products. Its middle product
(a_h+a_l)(b_h+b_l) depends on all eight operand bits, though, so it would not
fit in one LUT. The GF(4) and extension polynomials are this design's
choice; the composite-field approach itself is not.

This encoding is a different 4-bit code for the same field. One isomorphism
from the polynomial basis maps alpha^i to β^i, where β is a root of
x^4 + x + 1 in the composite field. The testbenches build that map; the RTL
contains no converters.

## Dual-basis multiplier (`gf16_morii_berlekamp_ii_mult`)

Operand a and the product c use trace-dual coordinates
a_i = Tr(alpha^i·A), where Tr(x) = x + x^2 + x^4 + x^8 ∈ {0,1}. Operand b
uses the polynomial basis. With these encodings each product bit is an inner
product:

```
c_i = Σ_j b_j · a_(i+j),   a_(k+4) = a_(k+1) + a_k   (from x^4 = x + 1)
```

The serial Berlekamp form shifts a through a 4-bit LFSR and produces one bit
of c per clock. Here the three extra LFSR states (a4 = a0^a1, a5 = a1^a2,
a6 = a2^a3) are unrolled, and the four bits are computed at once from ten
partials:

```
c0 = [a0b0^a1b1] ^ [a2b2^a3b3]
c1 = [a1(b0^b3)^a0b3] ^ [a2b1^a3b2]
c2 = [a2(b0^b3)] ^ [a3b1^a0b2] ^ [a1(b2^b3)]
c3 = [a3(b0^b3)] ^ [a1(b1^b2)^a0b1] ^ [a2(b2^b3)]
```

Two choices here are this design's own: the trace-dual basis (the dual of
the polynomial basis with respect to Tr) and the grouping.

## Interface and timing (all three multipliers)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | synchronous, active low; clears the valid pipeline only |
| `in_valid` | in | 1 | `a`, `b` carry a pair this cycle |
| `a`, `b` | in | 4 | operands |
| `out_valid` | out | 1 | `c` is valid |
| `c` | out | 4 | product |

A pair presented with `in_valid` before clock edge *t* appears on `c` with
`out_valid` after edge *t+1*, which is two clocks later. There is no stall:
a pair can be presented every cycle, and bubbles in `in_valid` come out as
bubbles in `out_valid`. The data registers have no reset. Only the valid bits
are cleared, and a reset discards the products in flight. The valid bits and
the reset are additions of this design. The source gives only the data path.

In `gf16_mult_top` the ports carry a prefix: `pc_` (polynomial), `pr_`
(composite) or `mb_` (dual). For example, `pc_in_valid` and `pc_a`.

## Verification

Each testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. The reference arithmetic lives in
`tb/gf16_ref_pkg.sv` and is written independently of the RTL. It uses
shift-and-add multiplication with reduction, the table of powers of alpha, a
trace-based dual conversion, and schoolbook composite-field multiplication.

- `tb_gf16_pipelined_comb_mult`, `tb_gf16_paar_rosner_ii_mult` and
  `tb_gf16_morii_berlekamp_ii_mult` each stream all 256 pairs back to back,
  then 1000 random pairs with gaps. They check every product, the 2-cycle
  latency and the unbroken 256-cycle run of results. The composite testbench
  also checks each product against the polynomial-basis product through the
  isomorphism.
- `tb_gf16_mult_top` feeds one stream of field elements to all three
  multipliers, each in its own encoding. It converts the products back and
  requires all three to equal A·B. It also counts back-to-back products,
  output bubbles and products flushed by a mid-stream reset, and fails if any
  of them never happens. The top has no parameters, so this run is already
  at full size.

To simulate with Verilator, for example:

```
verilator --binary --timing -Irtl -Itb rtl/gf16_pkg.sv tb/gf16_ref_pkg.sv \
  rtl/gf16_pipelined_comb_mult.sv rtl/gf16_paar_rosner_ii_mult.sv \
  rtl/gf16_morii_berlekamp_ii_mult.sv rtl/gf16_mult_top.sv \
  tb/tb_gf16_mult_top.sv --top-module tb_gf16_mult_top
./obj_dir/Vtb_gf16_mult_top
```

## Where this departs from, or goes beyond, the source design

- The field size (GF(16)), the field polynomial x^4 + x + 1, the eleven
  partials of the polynomial-basis multiplier, the two-cycle latency and the
  one-product-per-clock rate come from the source.
- Several choices are this design's own:
  - the grouping of terms into partials in all three multipliers
  - the GF(4) and extension polynomials of the composite basis
  - the use of four GF(4) products there
  - the trace-dual basis
  - the valid bits and the reset
- The source measured its multipliers on a Xilinx XC4000-series part. The
  RTL is plain, technology-independent SystemVerilog. Whether each partial
  lands in exactly one LUT is up to the synthesis tool.
- No basis converters are included. The source does not describe any.
- The serial and unpipelined multipliers that the pipelined designs replace
  are not included. These are the LFSR, Massey-Omura (normal basis),
  Hasan-Bhargava systolic, Mastrovito, and the original Paar-Rosner and
  Morii-Berlekamp designs.
- The design is for GF(16) only. A GF(256) version (for RS(255,233)) would
  need new equations and partial groupings.
