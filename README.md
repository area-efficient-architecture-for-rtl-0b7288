# Vedic-multiplication convolver: 3 × 3 linear convolution in three architectures

The linear convolution of two short sequences is the same arithmetic as multiplying two
numbers before any carries are propagated. Take a = (a3, a2, a1) and b = (b3, b2, b1):

    y1 = a1·b1
    y2 = a1·b2 + a2·b1
    y3 = a1·b3 + a2·b2 + a3·b1
    y4 = a2·b3 + a3·b2
    y5 = a3·b3

These five sums are exactly the "vertically and crosswise" columns of the
Urdhva-Tiryagbhyam method of Vedic mathematics. To multiply 234 by 316 with it, you form
the column sums 6, 11, 27, 22, 24. You keep the units digit of each and write its tens
one place to the left:

    R row:      6  1  7  2  4
    C row:   0  1  2  2  2  .
             ---------------
                7  3  9  4  4      = 73944

This RTL builds the convolver in hardware around that idea. Nine 4-bit multipliers form
the products. Four adders form the column sums y1..y5. Each column is split into a result
digit R and a carry C. A final adder adds the R row to the C row shifted one place left.
The result comes out twice:

* `y[0..4]`: the convolution itself, y1..y5, in binary.
* `rd[0..6]`: the place-value number Σ y_k · RADIX^(k-1) as seven digits RD0..RD6.

With RADIX = 10 (the default) and digits 0..9, `rd` is the decimal product of the two
3-digit numbers. With RADIX = 16, `rd` holds the hex digits of the product of the two
12-bit numbers {a3,a2,a1} × {b3,b2,b1}.

The same datapath is built in three ways, which trade area against throughput:

| Architecture | Multipliers | Registers | Latency | Throughput |
|---|---|---|---|---|
| Type I (`conv_type1`) | 9 | none | combinational | one result per evaluation |
| Type II (`conv_type2`) | 9 | 9 × 8-bit after the multipliers | 1 clock | one result per clock |
| Type III (`conv_type3`) | 1 | 9 × 8-bit product chain + 4-bit step counter | 9 clocks after start | one result per 9 clocks |

`vedic_conv_top` places all three side by side on shared `a`, `b`, `clk` and `rst_n`.
Each architecture brings out its own outputs and handshake, under the prefixes `t1_`, `t2_`
and `t3_`.

## Digits, columns and carries

All sizes live in `vedic_pkg`:

| Name | Value | Meaning |
|---|---|---|
| `NTAP` | 3 | digits per input sequence |
| `DIGIT_W` | 4 | bits per digit |
| `NPROD` | 9 | products |
| `NCOL` | 5 | convolution outputs |
| `NDIG` | 7 | output digits RD0..RD6 |
| `COL_W` | 10 | width of a column sum and of a carry |

Digit 1 has the lowest weight in every array: `a[0]` = a1, `y[0]` = y1 and `rd[0]` = RD0.
Each digit may take any 4-bit value, 0..15, not only 0..9.

**Column adders (`column_sum`).** Column 3 is built as (b3a1 + b2a2) + b1a3. That is two
adders: an 8-bit one, then a 9-bit one. Columns 2 and 4 each use one 8-bit adder. Columns 1
and 5 are a single product each. That makes four adders in all. The largest column sum is
3 × 15 × 15 = 675, so sums are carried in 10 bits.

**C|R split (`cr_split`).** This computes R = y mod RADIX and C = y div RADIX. In the pen
and paper method the carry is one digit, but here it is not limited to one. With 4-bit
digits, column 3 reaches 675, so C = 67. Even with decimal digits, 243 gives C = 24. The
carry is kept whole.

**Final adder (`cr_adder`).** This adds R1..R5 at digit positions 0..4 and C1..C5 at
positions 1..5. It is a ripple adder over digits. At each position it forms
t = R + C + carry_in, outputs t mod RADIX and passes t div RADIX on. Because C can exceed one
digit, the carry between positions can too. The largest decimal result,
15·111 × 15·111 = 2 772 225, fills all seven digits. RD6 is therefore needed, and `ovf`
never rises at RADIX = 10. `ovf` reports a result that does not fit in seven digits. That
is possible only with small radices.

**4-bit multiplier (`vedic_mult4`).** This applies the same vertically-and-crosswise rule
to bits. Column k is the sum of a[i] & b[k-i] plus the carry from column k-1. Bit k of the
product is the lowest bit of that total, and the rest is carried to column k+1.

## Type III: one multiplier and a product chain

This is the area-saving architecture and the least obvious one. It has three parts:

* `operand_gen`: a counter that steps through nine digit pairs after `start`.
* Two multiplexers that pick b_i and a_j from the inputs.
* One `vedic_mult4`.

Each clock cycle, the product enters a chain of nine 8-bit registers at the C1 end. Every
register passes its value one place toward the C5 end. The chain positions are wired to the
column adders, listed here from the C1 end to the C5 end:

    chain[0]    chain[1..2]   chain[3..5]          chain[6..7]   chain[8]
    b1a1        b2a1 b1a2     b1a3 b2a2 b3a1       b2a3 b3a2     b3a3
    column 1    column 2      column 3             column 4      column 5

The first product issued travels furthest. The pairs are therefore issued in the reverse of
this list: b3a3 first, b1a1 last. After nine shifts every product sits in front of its
adder. The list is `vedic_pkg::CHAIN_PAIRS`. Both the generator and the chain-to-adder
wiring use it, so changing the order in one place keeps them consistent.

Handshake and timing:

* `start` is a one-cycle pulse. It is ignored while `busy` is high.
* `busy` is high for exactly the nine cycles in which products are formed.
* `valid` rises on the ninth clock edge after the edge that samples `start`. It stays high,
  with `y`, `rd` and `ovf` stable, until the next `start`.
* `a` and `b` are read through the multiplexers with no input register. They must stay
  stable while `busy` is high, and an assertion in `conv_type3` checks this.
* While `busy` is high, `y` and `rd` show partial chain contents and are meaningless.

## Type II timing

Each of the nine products goes into a register at the rising edge. The adder network after
the registers is the same as in Type I. If `a`/`b` are sampled with `in_valid` at an edge,
their results appear on `y`/`rd` right after that edge, together with `out_valid`. A new
pair can be accepted every cycle.

## Reset

`rst_n` is synchronous and active low. It clears the Type II product registers, the Type
III chain, `busy` and the valid flags, so every output reads zero before the first
operation. Type I has no state.

## Departures and choices

These points go beyond, or differ from, the description this design was built from:

* **Pipeline stages.** The pipeline stages of Types II and III were described as latches.
  They are built as rising-edge registers.
* **Not specified in the description.** The following are this design's own choices:
  * the valid/start/busy handshakes
  * the reset
  * the direction the Type III chain shifts, and so the order in which pairs are issued
  * the gate-level form of the 4-bit multiplier
  * the form of the final adder
* **Radix.** The decimal place value (RADIX = 10) follows the decimal worked example above.
  The radix is a parameter (2..16) and is not fixed in hardware.
* **Sizes.** Only the 3 × 3 size with 4-bit digits is built. The sequence length is not a
  parameter. A longer convolution needs more multipliers, columns and output digits, and a
  longer Type III schedule.
* **Extra outputs.** The convolution sums `y` and the `ovf` flag are outputs of this
  design. The described circuit shows only the digit outputs.
* **Not built.** The conventional multiplier-and-adder baseline is not part of this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Every one compares against integer
arithmetic worked out inside the testbench and ends with a `TB_RESULT checks=… failures=…`
line.

| Testbench | What it checks |
|---|---|
| `tb_vedic_mult4` | all 256 operand pairs |
| `tb_column_sum` | random products into the column grouping |
| `tb_cr_split` | every value 0..1023 in radix 10 and 16 |
| `tb_cr_adder` | the 234 × 316 rows, and random digits with carries up to 67 |
| `tb_conv_type1` | 234 × 316 = 73944, the all-15 corner, random digits; a RADIX = 16 instance must equal the 12-bit binary product |
| `tb_conv_type2` | a pair streamed every cycle with random gaps, 1-cycle latency, reset state |
| `tb_operand_gen` | nine-cycle busy, `last`, the issue order, start-while-busy ignored |
| `tb_conv_type3` | 9-cycle latency, busy, result holding, the worked example, random digits |
| `tb_vedic_conv_top` | see below |

`tb_vedic_conv_top` runs all three architectures at the default parameters on the same
operands. It checks each one against the model and counts how often each mechanism
occurred:

* column carries of two digits or more
* a carry rippling through the final adder
* a non-zero RD6
* back-to-back and gapped Type II input
* completed Type III operations
* an ignored `start`

It fails if any of these never occurred.

To run one with plain Verilator:

    verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/vedic_pkg.sv \
        tb/tb_vedic_conv_top.sv --top-module tb_vedic_conv_top -o sim
    ./obj_dir/sim

Each testbench finishes in well under a second. The RTL is plain synthesizable
SystemVerilog. The only non-synthesizable constructs are the operand-stability assertion in
`conv_type3` and the elaboration-time radix range check in `cr_split`.
