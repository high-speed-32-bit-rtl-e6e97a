# 32x32 Vedic multiplier (Urdhva-Tiryakbhyam) with Kogge-Stone or ripple carry partial-product adders

This is a combinational 32x32-bit unsigned multiplier. It is organised the
way the "vertically and crosswise" (Urdhva-Tiryakbhyam) rule of Vedic
arithmetic multiplies numbers. The operands are split in halves. The four
half-by-half products (low·low, low·high, high·low, high·high) are formed in
parallel. Three adders then merge them into the double-width product. Each
half-size product is built the same way, so the multiplier recurses
32 → 16 → 8 → 4 → 2. A 2x2 cell of four AND gates and two half adders ends
the recursion.

Two variants are provided, and they differ only in the adder that merges
partial products:

| variant      | partial-product adder                  | carry depth per adder |
|--------------|----------------------------------------|-----------------------|
| multiplier-1 | Kogge-Stone parallel-prefix adder      | log2(W) prefix rows   |
| multiplier-2 | ripple carry adder (chain of full adders) | W full-adder stages |

The top level, `vedic_mul32_top`, instantiates both on the same operands.

## The 2x2 cell (`vedic_mul2`)

For A = A1A0 and B = B1B0:

```
S0     = A0·B0                 vertical, right column
C1 S1  = A1·B0 + A0·B1         crosswise, half adder 1
C2 S2  = C1 + A1·B1            vertical, left column, half adder 2
S      = {C2, S2, S1, S0}
```

Each `·` is a single AND gate. The largest product, 3·3 = 9, is the only
case where C1 is 1.

## Combining four half-size products (`vedic_mul`)

This is the core of the design. For an NxN multiply with H = N/2:

```
A = {AH, AL}, B = {BH, BL}          (H bits each)
PLL = AL·BL   PLH = AL·BH   PHL = AH·BL   PHH = AH·BH   (N bits each, four HxH Vedic multipliers)

adder 1:  X = PLH + PHL                       -> carry ca1
adder 2:  Y = X + {0, PLL[N-1:H]}             -> carry ca2
adder 3:  S[2N-1:N] = PHH + {0, ca1|ca2, Y[N-1:H]}

S[N-1:H] = Y[H-1:0]
S[H-1:0] = PLL[H-1:0]
```

All three adders are N bits wide. At the 32-bit level these are the three
32-bit adders placed around four 16x16 multipliers.

**The second carry.** The original 32x32 drawing carries only ca1 from the
middle additions into adder 3. Adder 2 can also overflow, though. With
A = FFFFFFFF and B = 0002FFFF, X is exactly 2^32 − 1 (so ca1 = 0), and adding
PLL[31:16] = FFFE wraps it around. Without ca2 that product comes out 2^48
too small. This design feeds ca2 to adder 3 as well.

The two carries can never be 1 at the same time. The reason is that
PLH + PHL + PLL[N-1:H] ≤ 2(2^H−1)² + 2^H − 1 < 2^(N+1). So one OR gate merges
them into the single carry bit that adder 3 takes at position H.

The carry out of adder 3 is always 0, because the product fits in 2N bits.
Immediate assertions in `vedic_mul` check both facts during simulation.

The recursion uses a generate `if` on N. `vedic_mul #(N)` instantiates four
`vedic_mul #(N/2)`, and N = 2 instantiates the 2x2 cell instead. N must be a
power of two, at least 2, and an elaboration-time `$error` rejects any other
value. Every level uses the adder chosen by the `ADDER` parameter.

Verilator's lint, when it takes `vedic_mul` alone as the top level, does not
follow the self-instantiation. It then wrongly reports the four sub-products
as undriven. Under any parent module the recursion elaborates normally.

## Kogge-Stone adder (`ksa_adder`)

The adder is W bits wide with a carry out and has three stages:

1. **Pre-processing.** G_i = a_i·b_i and P_i = a_i ⊕ b_i.
2. **Prefix network.** There are ceil(log2 W) rows. In row l (span d = 2^l),
   each bit i ≥ d has a cell that combines its group with the group of bit i−d:
   G' = G_i + P_i·G_{i−d} and P' = P_i·P_{i−d}. Bits below d pass straight
   down. After the last row, G_i is the carry out of bit i. For W = 8 the rows
   hold 7, 6 and 4 cells. Every cell computes both G' and P', so there is no
   separate "gray" cell.
3. **Post-processing.** sum_i = P_i ⊕ G_{i−1}, with G_{−1} = 0, and
   cout = G_{W−1}.

There is no carry in, because none of the multiplier's adders needs one.
W need not be a power of two.

## Ripple carry adder (`rca_adder`, `full_adder`)

This is a chain of W full adders with the carry into stage 0 tied to 0. It
has the same ports as `ksa_adder`, so `vedic_mul` can swap the two through a
generate `if`.

## Interface and timing

`vedic_mul32_top #(parameter int unsigned N = 32)`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`  | in  | N     | unsigned multiplicand |
| `b`  | in  | N     | unsigned multiplier |
| `c1` | out | 2N    | a·b from multiplier-1 (Kogge-Stone) |
| `c2` | out | 2N    | a·b from multiplier-2 (ripple carry) |

There is no clock, no reset and no handshake. Both products are pure
combinational functions of `a` and `b`, valid one propagation delay after the
inputs change. In a 45 nm standard-cell implementation the original reports
0.95 ns for multiplier-1 and 1.43 ns for multiplier-2. This RTL has no timing
model, so those figures cannot be reproduced from it. In a system you would
register `a`, `b` and the chosen product around it, or add pipeline registers
between recursion levels.

To use one variant alone, instantiate
`vedic_mul #(.N(32), .ADDER(vedic_pkg::ADDER_KSA))` (or `ADDER_RCA`). Other
power-of-two widths work the same way.

Coarse synthesis (word-level cells, where one adder counts as one cell) gives
about 9,500 cells for one 32x32 multiplier and 14,700 for the pair. The
Kogge-Stone variant is the larger of the two.

## Where this design goes beyond the source description

- **Adder-2 carry fed to adder 3.** This is needed for correct products; see
  above.
- **Recursion below 32 bits.** The source gives the 32-from-16 step and the
  2x2 cell. It states that the same principle applies at other widths. The
  16, 8 and 4-bit levels here are built that way, and each uses the same adder
  type as the 32-bit level.
- **No carry in on either adder, and carry out of the Kogge-Stone adder taken
  as the final group generate.**
- **Unsigned operands.** Signed multiplication is not covered.
- **Gate forms of the half and full adders.** These are the textbook ones.
- **Both variants in one top.** The top brings out both products, as `c1` and
  `c2`.

The 45 nm layout of the original has no RTL counterpart here.

## Files

| file | contents |
|------|----------|
| `rtl/vedic_pkg.sv` | `adder_e`: `ADDER_KSA` / `ADDER_RCA` |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | one-bit adders |
| `rtl/vedic_mul2.sv` | 2x2 cell |
| `rtl/ksa_adder.sv`, `rtl/rca_adder.sv` | W-bit adders with carry out |
| `rtl/vedic_mul.sv` | recursive NxN multiplier |
| `rtl/vedic_mul32_top.sv` | both 32x32 variants side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench compares the design with integer arithmetic done in the
testbench. It prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
A watchdog ends the run with a failure if it hangs.

```
verilator --binary --timing --assert -Irtl rtl/vedic_pkg.sv tb/tb_vedic_mul32_top.sv \
          --top-module tb_vedic_mul32_top -o sim && ./obj_dir/sim
```

Replace the testbench name to run another one. The two multiplier testbenches
take one to three minutes to compile with Verilator, because the design
flattens into thousands of gates. Once compiled, they run in about two seconds.

- `tb_half_adder`, `tb_full_adder`, `tb_vedic_mul2`: exhaustive.
- `tb_ksa_adder`, `tb_rca_adder`: exhaustive at W = 8. At W = 32, corner cases
  (including FFFFFFFF + 1) and 20,000 random pairs.
- `tb_vedic_mul`: both variants. Exhaustive at N = 4 and N = 8. Corner and
  random pairs at N = 16 and N = 32, including the pair that needs the adder-2
  carry.
- `tb_vedic_mul32_top`: the default 32-bit top with 100,000 random pairs, half
  of them biased towards long runs of ones. It also applies the reference
  example 0000000F · 0000000F = 00000000_000000E1 and the corner cases. It
  counts how often the adder-1 carry, the adder-2 carry and near-full-width
  products occur, and fails if any never does.
