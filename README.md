# Single-modulus QRNS complex multiplier

A complex product (x1 + i·y1)(x2 + i·y2) normally costs four real multiplications
and two additions. This design computes it modulo a Fermat number p = 2^N + 1
with only **two** modulo-p multiplications, and it needs no other arithmetic than
adders, negators and fixed bit shifts.

The trick is the *quadratic residue number system* (QRNS). For p = 2^N + 1 the
residue j = 2^(N/2) satisfies j² = 2^N = −1 (mod p). So "i" has a real
representative in Z_p, and a Gaussian integer x + i·y can be carried as two
independent residues:

    z  = x + j·y   (mod p)
    z* = x − j·y   (mod p)

In this form a complex product is just two component-wise products. The pair maps
back to real and imaginary parts with

    x = 2⁻¹ · (z + z*)        y = (2j)⁻¹ · (z − z*)        (mod p)

Because p is a Fermat number, every constant involved is a power of two or close to
one:

| constant | value mod p   | cost in hardware                    |
|----------|---------------|-------------------------------------|
| j        | 2^(N/2)       | shift, negate, one modulo-p add     |
| 2⁻¹      | 2^(N−1) + 1   | shift, conditional add of constant  |
| (2j)⁻¹   | 2^(−N/2−1)    | shift, negate, one modulo-p add     |
| −1       | 2^N           | the negator                         |

The RTL is SystemVerilog. It is purely combinational and parameterised by the word
length `N`. The default is `N = 8` (p = 257), the eight-bit configuration the
architecture was sized for. `N = 4`, `16` and `32` are tested too.

## Residue encoding

Every residue is plain unsigned binary in **N+1 bits** and lies in the range
0 … 2^N. The extra top bit is needed only for the value 2^N, which is −1. When bit
N is set, all lower bits are zero. Several circuits below rely on this:

* At most one operand of an adder can have bit N set. If it does, its low bits are
  zero, so the low N-bit adder cannot overflow at the same time.
* The multiplier treats bit N as a flag ("this operand is −1") rather than as a
  number.

Inputs must be valid residues (< p). Out-of-range inputs give unspecified results;
nothing checks for them.

`N` must be a power of two and at least 2. Elaboration fails otherwise
(`smq_pkg::valid_n`). For N = 2, 4, 8 and 16, p is prime. For N = 32, p = 2^32 + 1
is composite, but j = 2^16 is still a square root of −1, so the same datapath works.

## Datapath (`smq_alu`)

```
   x1     y1               x2     y2          all buses N+1 bits
   |      |                |      |
   |     JX  (·j)          |     JX
   |      |--> NEG         |      |--> NEG
   |      |     |          |      |     |
   AP(x1,jy1)  AP(x1,-jy1) AP(x2,jy2)  AP(x2,-jy2)
      z1          z1*          z2          z2*
       \___________\__________/___________/
        MUTT(z1,z2) = M1        MUTT(z1*,z2*) = M2
              |                        |---> NEG
        AP(M1, M2)               AP(M1, -M2)
              |                        |
           ITWO (·2⁻¹)             ITWOJ (·(2j)⁻¹)
              |                        |
              x3                       y3
```

The instance names in `smq_alu.sv` follow this picture: `u_jx1`, `u_neg1`,
`u_ap_z1`, `u_ap_c1`, `u_mp1`/`u_mp2`, `u_neg_m2`, `u_ap_re`/`u_ap_im`, `u_itwo`,
`u_itwoj`. The two multipliers are independent. That is the point of the number
system: they could run in parallel lanes, or share one unit in time. Here they are
two instances.

## Building blocks

### NEG — negation (`smq_neg`)

−x mod p is p − x, except that −0 = 0. Working in N+1-bit binary:

    p − x = (~x + 2 + 2^N) mod 2^(N+1)      for 1 ≤ x ≤ 2^N

So the negator complements the input, adds two, and flips bit N. An OR over all
input bits then gates the result to zero when x = 0. An adder with a constant
operand is a short incrementer, not a full adder.

### SUM — carry-lookahead adder (`smq_sum`)

An N-bit adder with carry in and overflow out. Every carry is computed directly
from the generate (a & b) and propagate (a ^ b) signals of all lower bits: a flat
lookahead, with no ripple through the sum bits.

### MDL — modulo-p mapping (`smq_mdl`)

The raw sum S of two residues lies in 0 … 2^(N+1) = 2p − 2, so at most one
subtraction of p is needed. S ≥ p exactly when:

* the 2^(N+1) bit (`mod`) is set, or
* bit N is set together with any lower bit.

S − p has a neat form for Fermat moduli. Subtracting p = 2^N + 1 means
subtracting 1 and then dropping bit N. Subtracting 1 from binary is the rule:

> from the LSB upward, complement every 0 up to and including the first 1;
> leave the higher bits alone.

Per bit, v_k = s_k XOR (s_0 … s_(k−1) all zero), and v_N = 0. A multiplexer picks
the mapped word or S unchanged. In the largest case, S = 2^(N+1), the low bits are
all zero. All of them flip to give 2^N − 1, which is the right answer.

### AP — modulo-p adder (`smq_ap`)

* SUM adds the low N bits.
* A one-bit adder cell adds the two top bits. Its carry is the 2^(N+1) bit.
* Its sum, ORed with SUM's overflow, is the 2^N bit. The OR is exact, as explained
  under "Residue encoding".
* MDL reduces the result.

### MUL — carry-save multiplier (`smq_mul`)

An unsigned N × N → 2N multiplier. The partial-product rows are accumulated one at
a time through rows of full adders that keep a separate sum vector and carry
vector (carry-save form), so no carry ripples within a row. A final ripple-carry
adder merges the two vectors.

### MUTT — modulo-p multiplier (`smq_mutt`)

This is the most involved block. Three cases are decoded from the operands'
top bits:

| a[N] | b[N] | meaning                 | result     |
|------|------|-------------------------|------------|
| 1    | 1    | (−1)·(−1)               | 1          |
| 1    | 0    | (−1)·b                  | −b         |
| 0    | 1    | a·(−1)                  | −a         |
| 0    | 0    | regular                 | see below  |

The regular path keeps the unsigned multiplier at N × N bits and folds the
double-width product back into a residue. It takes five steps:

1. **Operand folding.** If bit N−1 of an operand is set (value ≥ 2^(N−1)), the
   operand is replaced by its negation p − a. That value is at most
   2^(N−1) + 1, so it still fits in N bits. The XOR of the two bit-(N−1) values
   records whether the product's sign must be flipped back.
2. **Unsigned product.** P = |a|·|b| = PH·2^N + PL.
3. **Reduction.** Since 2^N ≡ −1, P ≡ PL − PH. The negator forms −PH, and AP
   adds it to PL.
4. **Sign.** If the flip flag is set, the result is negated once more.
5. **Output select.** A priority multiplexer on (a[N], b[N]) picks the regular
   result, the negated other operand, or the constant 1.

The negators that fold the operands in step 1 also supply −a and −b for the
exception rows, so the exceptions cost only a multiplexer.

### JX, ITWO, ITWOJ — constant scalers

Each scaler splits its input at a fixed bit position and recombines the fields
with a single AP:

* **JX** (`smq_jx`): split x = 2^(N/2)·xh + xl, with xl the low N/2 bits. Then
  j·x = 2^(N/2)·xl − xh.
* **ITWO** (`smq_itwo`): split x = 2·xh + x0. Then x/2 = xh + x0·(2^(N−1) + 1). A
  multiplexer on x0 supplies the constant or zero.
* **ITWOJ** (`smq_itwoj`): split x = 2^(N/2+1)·xh + xl, with xl the low N/2+1
  bits. Then x/(2j) = xh − 2^(N/2−1)·xl.

All shifts are wiring. The shifted fields stay below p, so they are valid
residues for the negator and adder.

## Timing

Nothing is registered: no clock, no reset, no pipeline. The original design was a
combinational gate-array netlist characterised by propagation delay. Its
reference figures (2 µm CMOS gate array) put the whole unit at roughly
0.9–1.1 µs for N = 8 and 1.2–1.4 µs for N = 16, with the multiplier as the
dominant term. That delay grows with 2N−2 full-adder carry times, while negation,
modulo-p addition and scaling are largely independent of word length. The
datapath does at most one modulo-p addition per output beyond the multiplier, so
pipeline registers can be added between the stages shown above without changing
any block.

## How this RTL relates to the published design

Taken from the published architecture:

* the number system and the datapath of `smq_alu`;
* the insides of NEG, AP, MDL (per-bit mapping rule and select), MUTT (exception
  handling, operand folding, PL − PH reduction, final sign) and the three scalers;
* the block names and the word lengths.

Choices made here:

* **Output bus of MUTT.** The original drives its result through three
  output-enabled buffers onto one bus. Here a priority multiplexer does the same
  job, since tri-state drivers are not synthesisable logic.
* **Negator and mapping tables.** The original implements them as PLA/lookup
  tables and NAND/NOR netlists. Here they are written as the equivalent
  expressions: add-two-and-flip for the negator, and the per-bit XOR rule for
  MDL. Synthesis produces its own gates.
* **Negator bit equations.** Some published per-bit equations for the negator do
  not match p − x. For example, for p = 17 and x = 1 the second bit comes out
  wrong. The arithmetic definition was followed.
* **MDL select.** The mapping is described as applying "when the sum exceeds p".
  The select here is S ≥ p, because S = p must also reduce, to 0.
* **Undescribed internals.** The structure of MUL (row-wise carry-save plus a
  ripple merge) and of SUM (flat lookahead) is only named in the original. The
  versions here are simple correct instances of those names.
* **AP top-bit cell.** The carry input of this cell is not shown in the original
  and is tied to zero.
* **No registers.** No register stages were added (see Timing).

Not built:

* the table-lookup variant (SRAM tables in place of gate logic), which the
  original only estimates;
* the conventional four-multiplier complex unit it is compared against.

## Verification

Each testbench is self-checking. It compares the design with wide-integer modular
arithmetic (`tb/smq_ref_pkg.sv`: only `+ − * %` and Euclid's inverse), never with
the design's own tricks. It ends by printing `TB_RESULT checks=… failures=…`.

| testbench                      | what it covers                                                        |
|--------------------------------|-----------------------------------------------------------------------|
| `tb_smq_neg`                   | every residue, N = 8 and 4                                            |
| `tb_smq_sum`                   | every operand pair and carry in, N = 8                                |
| `tb_smq_mdl`                   | every raw sum 0 … 2^(N+1); counts reducing cases                      |
| `tb_smq_ap`                    | every residue pair, N = 8 and 4                                       |
| `tb_smq_mul`                   | every 8-bit pair; random 16-bit pairs                                 |
| `tb_smq_mutt`                  | every residue pair at N = 8; random at N = 16; counts exception and sign-flip cases |
| `tb_smq_jx`, `_itwo`, `_itwoj` | every residue at N = 8 and 4; random at N = 16                        |
| `tb_smq_alu`                   | end to end at N = 4, 8, 16, 32; random and QRNS-directed operands; fails if any mechanism (both/one operand −1, sign flip, modulo reduction, 2^(N+1) carry, −0, odd input to ITWO) is never hit |
| `tb_smq_alu_exhaustive_n4`     | all 83 521 operand combinations at N = 4                              |
| `tb_smq_alu_full`              | default N = 8, no overrides: hand-worked products such as (1+2i)(3+4i) = 252+10i mod 257, then 20 000 random products |

Running one testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/smq_pkg.sv tb/smq_ref_pkg.sv tb/tb_smq_alu.sv \
    --top-module tb_smq_alu -o sim
./obj_dir/sim
```

Verilator finds the other modules from the include paths by file name. Every
testbench finishes in seconds.

## Files

```
rtl/smq_pkg.sv      default N and the word-length check
rtl/smq_neg.sv      NEG     negation mod p
rtl/smq_sum.sv      SUM     N-bit carry-lookahead adder
rtl/smq_mdl.sv      MDL     modulo-p mapping unit
rtl/smq_ap.sv       AP      modulo-p adder (SUM + top-bit cell + MDL)
rtl/smq_mul.sv      MUL     carry-save unsigned multiplier
rtl/smq_mutt.sv     MUTT    modulo-p multiplier
rtl/smq_jx.sv       JX      scale by j
rtl/smq_itwo.sv     ITWO    scale by 1/2
rtl/smq_itwoj.sv    ITWOJ   scale by 1/(2j)
rtl/smq_alu.sv      top: complex multiplier
tb/                 testbenches and the reference-arithmetic package
```

To change the word length, set `N` on `smq_alu`, or change `smq_pkg::DEFAULT_N`
to change it everywhere.
