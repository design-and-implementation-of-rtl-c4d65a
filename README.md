# 8×8 Vedic binary multiplier (Urdhva-Tiryakbhyam)

This is a combinational, unsigned 8-bit × 8-bit multiplier with a 16-bit
product. It uses the *Urdhva-Tiryakbhyam* ("vertically and crosswise") rule
of Vedic arithmetic. Product bit *k* is the sum of every partial product
`a[i]·b[j]` with `i + j = k`, plus the carries from column *k − 1*. All
columns are formed in parallel. Summing each column with a short adder tree,
instead of shifting and adding whole rows, gives a short critical path.

The same rule is used at two levels:

* **4×4 level.** The 16 single-bit partial products are summed column by
  column (`vedic_mul4`).
* **8×8 level.** The operands are split into nibbles and the four 4×4
  products are combined as three "columns" of nibble weight (`vedic_mul8`).

There is no clock, no register and no handshake. `Q` follows `A` and `B`
after the combinational delay.

## Interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `A`  | in  | 8  | multiplicand, unsigned |
| `B`  | in  | 8  | multiplier, unsigned |
| `Q`  | out | 16 | `A * B` |

That is 32 I/O bits in all. The top module has no parameters.

## The 4×4 column tree (`vedic_mul4`)

The seven "steps" of the method are the seven columns of a 4×4 product. The
vertical product `A0B0` comes first and `A3B3` last, with the crosswise
products in between. Each column is reduced by its own small adder tree, and
every carry goes one column up:

| column | partial products | cells | result |
|---|---|---|---|
| 0 | A0B0 | — | r[0] |
| 1 | A0B1, A1B0 | HA | r[1] |
| 2 | A0B2, A1B1, A2B0 | FA, then HA with col-1 carry | r[2] |
| 3 | A0B3, A1B2, A2B1, A3B0 | **special adder** → S, C0, C1; FA(S, two col-2 carries) | r[3] |
| 4 | A1B3, A2B2, A3B1 | FA, then FA with C0 and col-3 carry | r[4] |
| 5 | A2B3, A3B2 | FA with the carry of col-4's first FA, then FA with C1 and col-4 carry | r[5] |
| 6 | A3B3 | FA with both col-5 carries | r[6], carry = r[7] |

The cell count is 2 half adders, 7 full adders and 1 special adder.

Column 3 is the widest, with four partial products. It is the reason for the
**special adder** (`special_adder`). This cell adds four equal-weight bits and
returns their count 0…4 as three bits: `S` of weight 1, `C0` of weight 2 and
`C1` of weight 4. `C0` therefore enters column 4 and `C1` enters column 5.
`C1` is set only when all four inputs are 1, that is when both nibbles are
`1111`. Here the cell is written as a flat two-level function:

* `S` is the parity of the four inputs.
* `C0` is set when exactly two or three inputs are set.
* `C1` is set when all four are.

## Combining the four nibble products (`vedic_mul8`)

Write `A = {Ah, Al}` and `B = {Bh, Bl}`. Then

    A·B = (Ah·Bh) << 8  +  (Al·Bh + Ah·Bl) << 4  +  Al·Bl

Four `vedic_mul4` instances form the four nibble products at once. Three
ripple-carry adders (`ripple_adder`, 8 bits) combine them:

* **ADDER-1** adds the two cross products, which overlap exactly:
  `m = Al·Bh + Ah·Bl`. Its carry `c1` has weight 2¹².
* **ADDER-2** adds the upper nibble of the low product: `n = m[7:0] + (Al·Bl)[7:4]`.
  This gives `Q[7:4] = n[3:0]`. Its carry `c2` also has weight 2¹².
* **ADDER-3** forms `Q[15:8] = Ah·Bh + {c2, n[7:4]} + (c1 << 4)`. ADDER-1's
  carry is added at the fifth bit position. ADDER-3 is built as two 8-bit
  ripple adders in series.
* `Q[3:0]` is simply the low nibble of `Al·Bl`.

**ADDER-2's carry-out matters, and it is easy to lose.** The original block
diagram passes only 8 bits from ADDER-2 to ADDER-3. But `m[7:0] + (Al·Bl)[7:4]`
reaches 269, so it overflows for 524 of the 65536 operand pairs, for example
`0x2F × 0xFB`. Without that carry the product is 16 too small in
`Q[15:8]`. Here the carry is kept as bit 4 of ADDER-3's upper field. The
testbench checks this path, and the deliberately broken variant used to
validate that testbench is exactly the 8-bit path.

An exhaustive sweep also shows that `c1` and `c2` are never set together.
ADDER-3 does not rely on this. The carry-outs of ADDER-3 can never be set,
since the product fits 16 bits; they are left unconnected. This accounts for
the two unused-signal lint warnings.

## What is faithful and what is chosen here

Taken from the original design:

* The whole architecture: the four 4×4 blocks on the nibble pairs, and the
  roles of ADDER-1/2/3.
* The 4×4 cell inventory: 2 HA, 7 FA and a 4-input/3-output adder with
  outputs S, C0 and C1.
* Which partial products go into which cell.
* The port names `A`, `B` and `Q`.

Chosen in this implementation:

* **Carry routing in the 4×4 second row.** The order in which carries enter
  the second-row adders is this design's own reading. It is the only one in
  which each carry moves exactly one column up.
* **Special adder gates.** Its gate-level form is this design's own; only its
  function was specified.
* **Adder circuits.** The adders were described as ripple-carry adders "with
  modified logic levels", without detail. Plain full-adder ripple chains are
  used here. A faster adder can be swapped into `ripple_adder` without
  touching anything else.
* **ADDER-2 carry.** ADDER-2's carry is passed on to ADDER-3, for
  correctness (see above).
* **Signedness.** The operands are taken as unsigned. Signed operands are not
  supported.

The original was reported as small FPGA logic: 161 four-input LUTs and 91
slices in a Spartan-3E, with 32 I/Os. This RTL has the same 32 I/O bits. Its
LUT count depends on the FPGA flow and has not been compared.

## Files

| file | contents |
|---|---|
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | one-bit adder cells |
| `rtl/special_adder.sv` | 4-input, 3-output counter of column 3 |
| `rtl/ripple_adder.sv` | `WIDTH`-bit ripple-carry adder (default 8) with carry in/out |
| `rtl/vedic_mul4.sv` | 4×4 column-tree multiplier |
| `rtl/vedic_mul8.sv` | top: 8×8 multiplier |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

* **Cells, special adder and `vedic_mul4`.** These are checked exhaustively.
  `tb_vedic_mul4` also confirms that the case that sets `C1` is exercised.
* **`ripple_adder`.** This is checked exhaustively at 8 bits, with carry-in:
  131072 cases, including full-length carry ripples.
* **`vedic_mul8`.** `tb_vedic_mul8` first applies the operand/product pairs
  legible in the original test-bench waveform: `DF×DB = BEC5`,
  `89×DF = 7757`, `AB×C5 = 8397`. It then applies all 65536 operand pairs.
  From the operands it counts how often each carry path is taken: ADDER-1
  carry 2994 times, ADDER-2 carry 524 times, and special-adder `C1` in some
  4×4 block 961 times. It fails if any of these paths is never exercised.

For each module, a copy with one deliberate fault was confirmed to make its
testbench fail.

## Simulating

With Verilator 5:

    verilator --binary --timing -Irtl tb/tb_vedic_mul8.sv --top-module tb_vedic_mul8 -o sim
    ./obj_dir/sim

Replace `vedic_mul8` with any other module name to run its testbench. Each
finishes in well under a second.
