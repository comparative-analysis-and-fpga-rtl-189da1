# Vedic multiplier, 16 × 16 bits, with ripple-carry or Kogge-Stone adders

This is an unsigned 16 × 16 → 32-bit combinational multiplier built on the
*Urdhva Tiryagbhyam* rule of Vedic arithmetic. The name means "vertically and
crosswise". Each output column is the sum of the digit products that sit
vertically or crosswise above it.

In hardware the rule becomes a recursion on halves. An N-bit multiplier is
four N/2-bit multipliers plus three adders. The recursion stops at a 2-bit
multiplier made of AND gates and half adders. There are two variants of the
whole tree, and they differ only in their adders:

* **RCA**: every adder is a ripple carry adder (a chain of full adders).
* **KSA**: every adder is a Kogge-Stone parallel-prefix adder.

Each variant can be built by itself with a parameter. The top module places
both 16-bit variants side by side on the same operands, so they can be
synthesised and compared in a single run.

## One level of the recursion

This is the part to understand. Take N-bit operands and let H = N/2. Split
each operand into halves: `a = aH·2^H + aL` and `b = bH·2^H + bL`. Then

    a·b = aH·bH·2^(2H) + (aH·bL + aL·bH)·2^H + aL·bL

The four products are the "vertical" terms (aH·bH and aL·bL) and the
"crosswise" terms (aH·bL and aL·bH). Each one is an N-bit output of a
sub-multiplier:

| signal | product | sub-multiplier inputs      |
|--------|---------|----------------------------|
| q0     | aL·bL   | `a[H-1:0]`, `b[H-1:0]`     |
| q1     | aH·bL   | `a[N-1:H]`, `b[H-1:0]`     |
| q2     | aL·bH   | `a[H-1:0]`, `b[N-1:H]`     |
| q3     | aH·bH   | `a[N-1:H]`, `b[N-1:H]`     |

The low H bits of q0 are already final: no other term reaches those columns.
The three adders then combine the rest, each at its own width:

| adder | width  | computes                                  |
|-------|--------|-------------------------------------------|
| 1     | N      | `q4 = q1 + {H'b0, q0[N-1:H]}`             |
| 2     | N + H  | `q5 = {H'b0, q2} + {q3, H'b0}`            |
| 3     | N + H  | `q6 = q5 + {H'b0, q4}`                    |

    mul = {q6, q0[H-1:0]}

Adder 1 folds the upper half of the low product into one crosswise term.
Adder 2 joins the other crosswise term with the high product, shifted by H.
Adder 3 adds the two. All of these sums are taken relative to column H, which
is why q6 fills bits 2N-1..H of the result.

None of the three adders can overflow. The largest possible result,
`(2^N−1)^2`, fits in 2N bits, so every intermediate value fits in its adder.
For this reason the adders' carry outs are left unused.

The adder widths at each level are:

| multiplier    | sub-multipliers   | adder widths |
|---------------|-------------------|--------------|
| `vedic_4bit`  | 4 × `vedic_2bit`  | 4, 6, 6      |
| `vedic_8bit`  | 4 × `vedic_4bit`  | 8, 12, 12    |
| `vedic_16bit` | 4 × `vedic_8bit`  | 16, 24, 24   |

The full 16-bit tree has 64 `vedic_2bit` leaves and 63 adders
(3 + 12 + 48).

### The 2-bit leaf

`vedic_2bit` is the rule applied to single bits. It needs four AND gates and
two half adders:

    mul[0]          = a0·b0
    {c1, mul[1]}    = a1·b0 + a0·b1       (half adder: crosswise)
    {mul[3], mul[2]} = a1·b1 + c1          (half adder: vertical, left column)

## The two adders

### Ripple carry adder (`rca`)

`rca` is WIDTH `full_adder_1bit` cells in a chain. The carry out of each cell
is the carry in of the next. Its delay grows linearly with WIDTH. It has a
carry input, which the multipliers tie to 0.

### Kogge-Stone adder (`ksa`)

`ksa` computes all carries in ceil(log2 WIDTH) levels:

1. **Pre-processing.** Each bit gets a propagate `p = a ^ b` and a generate
   `g = a & b`.
2. **Prefix network.** Level k pairs bit i with bit i − 2^k and merges their
   group terms:
   `G = G_i | (G_{i−2^k} & P_i)` and `P = P_i & P_{i−2^k}`.
   A bit with no partner at that distance (i < 2^k) passes its terms on
   unchanged. After the last level, `G[i]` is the carry out of bits i..0.
   For 16 bits the levels span 2, 4, 8 and 16 bits (groups such as 15:14,
   15:12, 15:8 and 15:0).
3. **Post-processing.** `sum[i] = p[i] ^ G[i−1]` and `sum[0] = p[0]`.

`cout` is `G[WIDTH−1]`. The adder has no carry input. The code builds the
generic network, so the widths 4, 6, 8, 12, 16 and 24 all come from one
module. Propagate terms that nothing reads (the topmost group terms) are left
for synthesis to remove.

The trade-off is the usual one. The Kogge-Stone adder has a shorter carry path
but more logic. In this tree, the gain is largest in the wide adders near the
root.

## Modules

| file                 | module            | role |
|----------------------|-------------------|------|
| `vedic_pkg.sv`       | package           | `adder_kind_e`: `ADDER_RCA`, `ADDER_KSA` |
| `vedic_mul_top.sv`   | `vedic_mul_top`   | top: both 16-bit variants on shared operands |
| `vedic_16bit.sv`     | `vedic_16bit`     | 16 × 16 → 32 |
| `vedic_8bit.sv`      | `vedic_8bit`      | 8 × 8 → 16 |
| `vedic_4bit.sv`      | `vedic_4bit`      | 4 × 4 → 8 |
| `vedic_2bit.sv`      | `vedic_2bit`      | 2 × 2 → 4 leaf |
| `vedic_adder.sv`     | `vedic_adder`     | picks `rca` or `ksa` by `KIND` |
| `rca.sv`             | `rca`             | ripple carry adder, `WIDTH` (default 4) |
| `ksa.sv`             | `ksa`             | Kogge-Stone adder, `WIDTH` (default 16) |
| `full_adder_1bit.sv` | `full_adder_1bit` | full adder cell |
| `half_adder.sv`      | `half_adder`      | half adder cell |

The multipliers `vedic_4bit`, `vedic_8bit` and `vedic_16bit` share one
parameter, `KIND` (type `adder_kind_e`, default `ADDER_KSA`). It is passed
down the whole tree.

### Interface and timing

`vedic_mul_top` has these ports:

* inputs `a[15:0]` and `b[15:0]`: the unsigned operands;
* outputs `mul_rca[31:0]` and `mul_ksa[31:0]`: the products of the two
  variants.

Everything is combinational. There is no clock, no reset and no handshake.
The products are valid one propagation delay after the operands settle. To
use one variant alone, instantiate `vedic_16bit #(.KIND(...))`. To pipeline
the multiplier, add registers around it.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench compares
against integer arithmetic and prints `TB_RESULT checks=N failures=M`.

| testbench            | stimulus |
|----------------------|----------|
| `tb_half_adder`, `tb_full_adder_1bit`, `tb_vedic_2bit` | exhaustive |
| `tb_rca`, `tb_ksa`   | widths 4, 6, 8, 12, 16 and 24 together; all 6-bit operand pairs (with both carry-in values for `rca`); longest carry chains; 20 000 random pairs |
| `tb_vedic_4bit`      | all 256 pairs, both variants |
| `tb_vedic_8bit`      | published reference vectors, then all 65 536 pairs, both variants |
| `tb_vedic_16bit`     | published reference vectors, all walking-one pairs, corners, 200 000 random pairs, both variants |
| `tb_vedic_mul_top`   | end to end through the top (see below) |

The "published reference vectors" are the operand/product pairs shown in the
original simulation waveforms of the 8-bit and 16-bit multipliers. Examples
are 245 × 255 = 62475 and 56657 × 65535 = 3713016495. The products are written
into the testbench as constants.

`tb_vedic_mul_top` runs both 16-bit variants. It covers the reference
vectors, corner values and 100 000 random pairs. It also counts four cases
and fails if any of them never occurs:

* a zero operand;
* a product with bit 31 set;
* a carry from the last 24-bit adder into the columns fed by aH·bH (checked
  on internal signals of both variants);
* the largest product, 65535 × 65535.

Each testbench runs in well under a second. To run one with Verilator 5:

    verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
        rtl/vedic_pkg.sv tb/tb_vedic_mul_top.sv --top-module tb_vedic_mul_top
    ./obj_dir/Vtb_vedic_mul_top

To run another testbench, replace `tb_vedic_mul_top` with its name.

## How closely this follows the original design

These parts follow the original design as it was described:

* the recursion 16 → 8 → 4 → 2;
* which operand halves feed each sub-multiplier;
* the zero-padding of each adder operand;
* the adder widths (4/6/6, 8/12/12, 16/24/24);
* the 2-bit leaf made of AND gates and half adders;
* the ripple carry adder structure;
* the Kogge-Stone pre-processing, merge rule and post-processing;
* the 16-bit network's level distances.

These are this implementation's own choices:

* **Zero-padding of the 4-bit low-product term.** It is not given explicitly
  for the 4-bit level. `{00, q0[3:2]}` is used, by analogy with the 8- and
  16-bit levels.
* **2-bit leaf wiring.** Only the parts were specified (four ANDs, two half
  adders). The wiring shown above is the standard one.
* **Kogge-Stone carry out and carry in.** The formula for the carry out was
  not given; `cout = G[WIDTH−1]` is used. The adder has no carry input, as in
  the original 16-bit network.
* **Full adder and half adder equations.** These are the textbook ones.
* **Unsigned operands.** All the original examples are unsigned. Signed
  (two's-complement) multiplication is not supported.
* **Parameterised adders.** One `rca` and one `ksa` module, each with a
  `WIDTH` parameter, replace separate fixed-width adders.
* **Default adder kind.** The default is Kogge-Stone, the variant the
  original comparison found faster for the 8- and 16-bit multipliers.
* **The top module.** It puts both variants side by side on shared operands.

For context, the original FPGA implementation on a Spartan-6 (xc6slx45, speed
grade −3) reported the following results:

| width  | RCA delay | RCA LUTs | KSA delay | KSA LUTs |
|--------|-----------|----------|-----------|----------|
| 4-bit  | 9.380 ns  | 22       | 9.813 ns  | 22       |
| 8-bit  | 17.318 ns | 112      | 15.713 ns | 130      |
| 16-bit | 29.051 ns | 505      | 27.499 ns | 647      |

Delay and LUT counts depend on the tool and on the device. These numbers were
not reproduced with this RTL.
