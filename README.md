# 4x4 Vedic multiplier with Chinese abacus adders, in reversible gates

This is a 4-bit by 4-bit unsigned multiplier built the Vedic way. The
*Urdhva Tiryakbhyam* ("vertically and crosswise") rule splits each operand
into 2-bit halves. It forms all four 2x2 partial products at the same time
and then adds them with three small adders. Those adders follow the
Chinese abacus: each 4-bit column is a set of beads, and beads are added by
sliding them together, not by passing a carry from bit to bit.

The multiplier comes in two forms, which sit side by side in the top level:

* **Reversible form** (`vedic4x4_rev`). This is the main design. It is built
  only from reversible gates: Peres and Feynman gates for the 2x2
  multipliers, and NFT and Feynman-double (F2G) gates for the adders. A
  reversible gate has as many outputs as inputs and maps them one to one.
  Such gates are a route to very low-power (adiabatic) logic.
* **Ordinary form** (`vedic4x4`). This is the same arrangement in AND/XOR
  logic. Its adders are the radix-4 abacus adder with the three phases
  B/A, P/A and T/B. It is the comparison point for the reversible form.

Everything is combinational: there is no clock, no reset and no state. A
product is valid one propagation delay after the operands settle.

## Vertically and crosswise: how the four products are combined

Write `a = {aH, aL}` and `b = {bH, bL}`, with 2-bit halves. The four 2x2
products are:

| product | operands  | weight |
|---------|-----------|--------|
| HH      | aH x bH   | 16     |
| HL      | aH x bL   | 4      |
| LH      | aL x bH   | 4      |
| LL      | aL x bL   | 1      |

So `p = HH<<4 + (HL + LH)<<2 + LL`. Three 4-bit adders carry this out:

```
 adder 1:  HL + LH                        -> m[3:0],  carry ca1
 adder 2:  m  + {0, 0, LL[3:2]}           -> t[3:0],  carry ca2
 adder 3:  HH + {0, ca1 (+) ca2, t[3:2]}  -> p[7:4],  carry ca3

 p[1:0] = LL[1:0]      p[3:2] = t[1:0]
```

The subtle point is adder 3's second operand. `ca1` and `ca2` both have
weight 64, which is bit 2 of adder 3. They can never both be 1:

* `ca1 = 1` needs `HL + LH >= 16`. That happens only for 3x3 + 3x3 = 18.
* Then `m = 2`, and `m + LL[3:2] <= 4`, so `ca2` is 0.

One signal can therefore carry both. The reversible form merges them with a
Feynman gate (`ca1 ^ ca2`); the ordinary form uses an OR. `ca3` is 0 for
every pair of 4-bit operands, because 15 x 15 < 256. It is still brought
out, because the original block diagram shows it as an output.

Over all 256 operand pairs, `ca1` is set once (15 x 15) and `ca2` four
times. The testbenches check that both happen and that they never coincide.

## The reversible gates

| module       | gate           | outputs                                        | quantum cost |
|--------------|----------------|------------------------------------------------|--------------|
| `gate_fg`    | Feynman (CNOT) | p = a, q = a ^ b                               | 1            |
| `gate_peres` | Peres          | p = a, q = a ^ b, r = ab ^ c                   | 4            |
| `gate_nft`   | NFT            | p = a ^ b, q = ac' ^ b'c, r = ac' ^ bc         | 5            |
| `gate_f2g`   | Feynman double | p = a, q = a ^ b, r = a ^ c                    | 2            |

Each gate is a one-to-one map of its inputs to its outputs. Outputs that
the circuit does not need are "garbage" outputs. Inputs tied to 0 are
"constant inputs". Both are kept as internal nets, as they would be in a
real reversible circuit. These unused nets are the only lint warnings
(UNUSEDSIGNAL).

The Fredkin and HNG gates belong to the same family, but neither form of
the multiplier uses them, so they are not included.

## Reversible 2x2 multiplier (`ut2x2_rev`)

The multiplier has five Peres gates and one Feynman gate:

1. Three Peres gates with `c = 0` form the partial products a0b0, a1b1 and
   a1b0.
2. A fourth Peres gate XORs a0b1 into a1b0. This gives the crosswise bit
   `q1`.
3. A fifth Peres gate takes a0b0 and a1b1. Its pass-through output is
   `q0`, and its AND output a0a1b0b1 is `q3`.
4. A Feynman gate XORs `q3` into a1b1. This gives `q2`.

That makes quantum cost 21, 9 garbage outputs and 4 constant inputs. The
signal a1b1 drives two gates. This is a fan-out that a strictly reversible
circuit would make with a Feynman copy, and the original circuit has it too.

The ordinary 2x2 multiplier (`ut2x2`) has the same four equations in
AND/XOR:

```
q0 = a0b0
q1 = a1b0 ^ a0b1
q2 = a0a1b0b1 ^ a1b1
q3 = a0a1b0b1
```

## Reversible adder (`rev_abacus_adder`, `nft_f2g_adder4`, `snfa`)

The reversible adder is a chain of 4-bit NFT/F2G adders. Each 4-bit unit is
four single-NFT full adders (SNFA) in ripple. The parameter `NIBBLES` sets
the number of 4-bit columns:

* The default is 4 (a 16-bit adder), the chain length of the original
  drawing.
* The multiplier uses `NIBBLES = 1` for each of its three adders.

An SNFA is one NFT gate and three F2G gates:

```
F2G(a, b, 0)         -> a, a^b, (garbage)
F2G(cin, 0, 0)       -> cin, cin, (garbage)       copies, since no fan-out
F2G(a^b, cin, 0)     -> a^b, SUM, (garbage)
NFT(a, cin, a^b)     -> (garbage), (garbage), CARRY
```

The carry comes from the NFT gate's `r` output. That output is a
multiplexer steered by `c = a^b`:

* when `a == b`, it gives `a`, which equals the carry;
* otherwise it gives `cin`.

The gate mix, and so the quantum cost of 11, is that of the original
design. The wiring shown above is this implementation's own. It leaves 5
garbage outputs, where the original figure is 3.

This adder computes the same sum as the abacus adder below, but it does so
by ripple: no bead code appears in the gate-level form.

## The abacus adder (`abacus_adder4`, `abacus_b2a`, `abacus_pa`, `abacus_t2b`)

Each 4-bit column is an abacus column with two rods:

* an upper rod of three beads, each worth 4;
* a lower rod of three beads, each worth 1.

Together they show 0..15. A rod is held as a 3-bit thermometer code, where
bit `i` means "at least `i+1` beads pushed to the bar". For example, 9 is
two upper beads and one lower bead: `h = 3'b011`, `l = 3'b001`. The types
are in `abacus_pkg` (`therm3_t`, `therm6_t`, `nibble_t`, `product_t`).

The addition runs in three phases:

1. **B/A (binary to abacus)**, `abacus_b2a`. `d[3:2]` becomes the upper
   beads and `d[1:0]` the lower beads.
2. **P/A (parallel addition)**, `abacus_pa`. The upper beads of both
   operands are merged onto one six-bead rod `K5..K0`, and likewise the
   lower beads. Bit `k[i]` is set when "x has at least j beads and y has at
   least i+1-j beads" for some `j`. Every bit is formed at once, so no carry
   runs between bead positions.
3. **T/B (thermometer to binary)**, `abacus_t2b`. It takes the bead count
   plus a carry in, `n = count + cin`, and outputs the digit `n mod 4` and
   the carry `n >= 4`. The lower rod's carry feeds the upper rod. The upper
   rod's carry is the column's `cout`.

A 4-bit addition thus has only two ripple carries: one from the lower rod to
the upper rod, and one out of the column. The three phases and their
connection are the original design's. The AND-OR logic inside P/A and T/B is
this implementation's own: it is the simplest logic that does the job.

## Module hierarchy

```
vedic_abacus_top
|-- vedic4x4_rev          reversible form
|   |-- ut2x2_rev x4      -> gate_peres x5, gate_fg
|   |-- rev_abacus_adder x3 (NIBBLES=1) -> nft_f2g_adder4 -> snfa x4 -> gate_nft, gate_f2g x3
|   `-- gate_fg           ca1/ca2 merge
`-- vedic4x4              ordinary form
    |-- ut2x2 x4
    `-- abacus_adder4 x3  -> abacus_b2a x2, abacus_pa x2, abacus_t2b x2
```

Ports of the top level:

| port                  | dir | width | meaning                                  |
|-----------------------|-----|-------|------------------------------------------|
| `a_rev`, `b_rev`      | in  | 4     | operands of the reversible multiplier    |
| `p_rev`               | out | 8     | product                                  |
| `ca3_rev`             | out | 1     | carry out of the last adder (always 0)   |
| `a_conv`, `b_conv`    | in  | 4     | operands of the ordinary multiplier      |
| `p_conv`, `ca3_conv`  | out | 8, 1  | same for the ordinary multiplier         |

## How far to trust it, and where it departs from the original

* Both multipliers are checked against integer multiplication for all 256
  operand pairs. Every adder is checked exhaustively, except the 16-bit
  chain, which gets corner cases and 3000 random vectors. Every gate is
  checked exhaustively, including that its mapping is one to one.
* **The order of the additions follows the block diagram.** The diagram
  uses three 4-bit adders, and so does this design. One passage of the
  original prose describes a different order: two 4-bit adders with 5-bit
  results, then a 5-bit adder. Read literally, that order does not weight
  the partial products correctly, so it was not followed.
* **The ca1/ca2 merge is not in the original.** The block diagram does not
  show how the two carries enter adder 3. The merge gate (Feynman or OR) is
  this design's choice, and it is exact, for the reason given above.
* **Gate totals differ.** The original quotes 36 gates, quantum cost 162,
  62 garbage outputs and 29 constant inputs for the whole reversible
  multiplier. Those totals do not add up from its own parts. This build has
  73 gates: 4 x 6 in the 2x2 multipliers, 3 x 16 in the adders, and 1
  merge gate.
* **The SNFA wiring is this design's own.** It has 5 garbage outputs
  against the original's 3.
* **The adder choice in the ordinary form is assumed.** It is not stated
  which adder the non-reversible multiplier used. The three-phase abacus
  adder is used here.
* **FPGA results are not reproduced.** The original results were measured
  on a Spartan-3E: 28 against 36 slices, and 15.8 ns against 20.7 ns. This
  RTL makes no claim about those numbers.

## Simulating

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and stops with `$finish`. A watchdog ends
the run with a failure if it hangs. Everything is in plain SystemVerilog and
needs no data files. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/abacus_pkg.sv tb/tb_vedic_abacus_top.sv --top-module tb_vedic_abacus_top
./obj_dir/Vtb_vedic_abacus_top
```

Swap in any other `tb_<module>.sv` to test one block.

`tb_vedic_abacus_top` runs the whole design at its default parameters. It
drives all 256 operand pairs into both multipliers, with a different pair
order for each. It counts the mechanisms it must see:

* carries out of adders 1 and 2 in both forms;
* the abacus carry from the lower rod to the upper rod;
* a carry that ripples into the top bit of a reversible 4-bit adder.

If any of these never happens, the test fails.
