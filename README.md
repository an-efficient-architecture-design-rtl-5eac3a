# Low-complexity forward quantizer for H.264/AVC

The H.264/AVC encoder quantizes every coefficient of its 4x4 integer transform as

    |Z| = (|W| * MF + f) >> qbits        sign(Z) = sign(W)

Here W is the unscaled transform coefficient and MF is one of 18 multiplication factors.
MF is picked by `QP mod 6` and by where the coefficient sits in the block.
`qbits = 15 + floor(QP/6)`, and f is the rounding offset.
A direct implementation (absolute value, multiply, add, shift, negate) puts two carry chains around
a 13 x 15 multiplier.
The multiplier itself dominates area and delay.

This RTL takes cost out of that path in two places:

1. **No absolute value, no final negation.** W is multiplied as a signed number.
   The sign bit of W then selects which of two precomputed offsets is added to the product.
   An arithmetic right shift gives the signed level directly.
2. **A Booth multiplier with no correction row.** In a radix-4 modified Booth (MBE) multiplier,
   a negative digit is normally made by inverting the row and adding a '1' at its bottom.
   Those '1's add one more row to the adder array.
   Here each negative row is formed exactly by a *carry-free two's complement* unit, so the array
   has one row per Booth digit and nothing else.

The multiplication factors are the standard H.264/AVC values, unchanged.
The output is bit-exact with the reference quantizer for every input. This was checked
exhaustively over all 13-bit W, all QP codes, both rounding modes and all three position classes.

## Datapath and timing

```
 qp, intra ──► qp_decode ──► qp_mod6 ──► mf_table ◄── pos_i, pos_j
                  │  qbits, f_pos, f_neg       │ MF (15 b)
                  │                            ▼
 w (13 b, signed) ─┼──────────────────► booth_multiplier ──► W*MF (29 b exact, 27 b used)
                  │                                             │
                  └─ w[12] ? f_neg : f_pos ───────────────────► + ──► register (27 b) ──► >>> qbits ──► z (12 b)
```

- One coefficient per clock. `z` and `out_valid` appear one clock after the inputs are sampled.
- The multiply and the offset add are combinational ahead of a single 27-bit register.
  The shift by `qbits` is a 9-way selection after that register.
- `rst_n` is an asynchronous, active-low reset. It clears `out_valid` and the register.
- Widths: W 13 bits, MF 15 bits, sum 27 bits, Z 12 bits. With the standard factors,
  `|W|*MF <= 4096*13107 < 2^26`, so the 27-bit sum never overflows.
  `|Z| <= 1639` fits 12 bits. Two assertions in `h264_quantizer` check both facts in simulation.

### Top-level ports (`h264_quantizer`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | a coefficient is presented this cycle |
| `w` | in | 13 | signed transform coefficient |
| `qp` | in | 6 | quantization parameter 0..51 (larger codes act as 51) |
| `pos_i`, `pos_j` | in | 2 | row and column of the coefficient in the 4x4 block |
| `intra` | in | 1 | 1: intra offset `2^qbits/3`; 0: inter offset `2^qbits/6` |
| `out_valid` | out | 1 | `z` is valid |
| `z` | out | 12 | signed quantized level |

## Sign handling before the multiplication

Let `a = |W|*MF` and `q = qbits`.
The reference level of a negative W is `-floor((a + f) / 2^q)`.
The signed product is `W*MF = -a`.
Adding `2^q - 1 - f` and shifting right arithmetically gives

    floor((-a + 2^q - 1 - f) / 2^q) = ceil((-a - f) / 2^q) = -floor((a + f) / 2^q)

That is exactly the reference value.
So `qp_decode` provides both offsets: `f_pos = f` and `f_neg = 2^q - 1 - f`.
These are constant tables for the 9 values of `floor(QP/6)` and the two modes.
The quantizer chooses between them with `w[12]`.
The only sign-dependent hardware is a 27-bit 2:1 multiplexer on a constant.

## The Booth multiplier (`booth_multiplier`)

- **Which operand is encoded.** MF is the Booth-encoded operand.
  It is unsigned, so it is zero-extended to 16 bits and cut into 8 radix-4 digits.
  The top digit is never negative, because bit 15 is zero.
  A 15-bit unsigned multiplier therefore needs exactly n/2 = 8 rows.
- **`booth_encoder`** turns each overlapping group `{b[2k+1], b[2k], b[2k-1]}` into a digit.
  The digit has three controls: `neg`, `one` (|digit| = 1) and `two` (|digit| = 2).
  This is the usual MBE table. The group `111` gives `neg=1` with zero magnitude, and the row comes out as 0.
- **`booth_pp_row`** selects 0, W or 2W.
  It sign-extends the result to 15 bits, so that `-2 * -4096` fits.
  When `neg` is set, it passes the result through `twos_comp_fast`.
  The row then holds the exact value `digit * W`, with no pending '+1'.
- **`pp_adder_tree`** sign-extends row k and shifts it left by 2k.
  It then adds the rows pairwise in a balanced tree: 4, then 2, then 1 adders, 3 levels for 8 rows.
  A chain of 7 adders in series would do the same sum.
  Each node is a plain two-input adder.
  A synthesis tool is free to turn the tree into carry-save form.
  The RTL keeps the rows fully sign-extended and does not use the sign-extension-prevention trick.

## Carry-free two's complement (`twos_comp_fast`)

The two's complement of a word keeps every bit up to and including its rightmost '1' and inverts
every bit to the left of it. For example, `00101100 -> 11010100`.
Bit i is therefore inverted exactly when some lower bit is '1':

    c[i] = a[i-1] | ... | a[0]      s[i] = a[i] ^ c[i]      s[0] = a[0]

The "conversion signals" `c` are an exclusive prefix OR.
A binary tree computes them: first inside groups of 2 bits, then 4, then 8, and so on.
This is a Sklansky prefix network with depth `ceil(log2 WIDTH)`.
"Invert and add one" would need a carry that ripples through all the bits.
For the default `WIDTH = 4` this gives `S0 = A0`, `S1 = A1 ^ A0`, `S2 = A2 ^ (A1|A0)` and
`S3 = A3 ^ (A2|A1|A0)`.
Zero maps to zero, and the most negative value maps to itself.
Inside the multiplier the unit is 15 bits wide, which gives 4 levels.

## Factors and parameters

`mf_table` classifies the position:
- both indices even: (0,0) (0,2) (2,0) (2,2)
- both odd: (1,1) (1,3) (3,1) (3,3)
- mixed: the other eight

It then returns the standard factor:

| QP mod 6 | even/even | odd/odd | mixed |
|---|---|---|---|
| 0 | 13107 | 5243 | 8066 |
| 1 | 11916 | 4660 | 7490 |
| 2 | 10082 | 4194 | 6554 |
| 3 | 9362 | 3647 | 5825 |
| 4 | 8192 | 3355 | 5243 |
| 5 | 7282 | 2893 | 4559 |

`qp_decode` does three things:
- clamps QP to 51;
- finds `floor(QP/6)` by comparing QP with the multiples of 6;
- looks up the two offsets from tables computed at elaboration time by
  `f = floor(2^qbits/3)` (intra) or `floor(2^qbits/6)` (inter), with `f_neg = 2^qbits - 1 - f`.

Shared widths, the `pos_class_e` enum and the `booth_digit_t` struct are in `quant_pkg`.

## What follows the published architecture and what is this design's own

The following come from the published architecture:
- the 13/15/27/12-bit datapath;
- a combinational multiply and offset add in front of one register;
- the standard multiplication factors, left unchanged;
- handling the sign before the multiplication, so |W| is never formed;
- MBE with the extra negative row removed through the carry-free two's complement, with
  conversion signals found over 2-, 4- and 8-bit groups;
- partial products added in parallel pairs rather than in a chain.

The following are choices of this design:
- The exact sign-selected offset `2^qbits - 1 - f`.
- The values of qbits and f. These are the standard H.264 reference values.
- The rounding offsets carried at the full 27-bit sum width, since f reaches 22 bits at QP 51.
- The `intra` input.
- MF as the Booth-encoded operand.
- Plain adders in the tree.
- The shift by `qbits` placed after the register, selected per coefficient.
- The valid flag, the asynchronous reset and clamping of QP above 51.

Not covered:
- The 4x4 integer core transform that produces W. It is the standard H.264 one, and `w` is a port.
- The special DC quantization of Intra16x16 and chroma DC blocks, which uses `qbits + 1` and a
  different offset.
- Timing and power figures. No technology mapping is part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=N failures=M`:

| testbench | what it covers |
|---|---|
| `tb_twos_comp_fast` | all inputs at 4, 8 and 15 bits against `-a mod 2^W`, plus the worked example |
| `tb_booth_encoder` | all 8 groups against `-2*g2 + g1 + g0` |
| `tb_booth_pp_row` | all 8192 W values x 6 digit codes (including negative zero) |
| `tb_pp_adder_tree` | random and extreme rows; the 8-row tree and a 5-row (padded) tree |
| `tb_booth_multiplier` | every W with 10 corner factors, and 100 000 random pairs |
| `tb_mf_table` | every QP mod 6 code (6 and 7 read as 5) x 16 positions |
| `tb_qp_decode` | every 6-bit QP code x intra/inter |
| `tb_h264_quantizer` | end to end at default sizes (see below) |

`tb_h264_quantizer` streams about 3.1 million coefficients with random idle cycles: all W,
QP 0..63, both modes and all three position classes.
It checks each result one clock after its input against a reference model written from `|W|`.
It checks that reset clears `out_valid`, both at start-up and in the middle of traffic.
It also counts how often each mechanism occurred and fails if one never did:
- negative W (sign-selected offset)
- negative Booth digits
- every qbits value
- intra and inter
- each position class
- QP clamping
- idle cycles

The run takes a few seconds.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/quant_pkg.sv \
    rtl/twos_comp_fast.sv rtl/booth_encoder.sv rtl/booth_pp_row.sv rtl/pp_adder_tree.sv \
    rtl/booth_multiplier.sv rtl/mf_table.sv rtl/qp_decode.sv rtl/h264_quantizer.sv \
    tb/tb_h264_quantizer.sv --top-module tb_h264_quantizer
./obj_dir/Vtb_h264_quantizer
```

To run a block's testbench, swap in its `tb/tb_<block>.sv` and `--top-module`.

Changing the widths:
- `booth_multiplier`, `booth_pp_row`, `pp_adder_tree` and `twos_comp_fast` are parameterised.
- The quantizer's widths live in `quant_pkg`.
- If MF were widened beyond the standard factors, the 27-bit sum could overflow.
  The `a_prod_fits` assertion flags that.
