# 32-bit multiply, 64-bit accumulate unit

A multiply-accumulate unit (MAC) that computes `C <- A * B + C` in one clock:
`A` and `B` are 32-bit two's complement numbers and `C` is a 64-bit accumulator.
The main idea is that there is no separate accumulate adder. The accumulator
goes into the multiplier's partial-product tree as one more row. The tree
reduces the radix-4 Booth partial products and the accumulator together to a
sum/carry pair, and one 64-bit carry-select adder turns that pair into the next
accumulator value. Two test features are built in:

- a pair of pipeline registers between the tree and the final adder, which can
  be switched into the path to make the unit a two-stage pipeline;
- one scan chain through every register.

The architecture comes from a MAC designed for a complementary GaAs
process, whose datapath gates were dynamic dual-rail (DCVSL) domino circuits.
This RTL describes the logic and register structure. The circuit style shows
up in only one place: a timed behavioural model of the DCVSL XOR cell.

## Block diagram

```
 arg_b ──► BRegister ─┐   arg_a ──► ARegister ─┐        CRegister ◄──────────────┐
                      │                        │            │   │                │
                      ▼ BTree                  ▼ ATree      │   └─► c_output_select ─► c_output[15:0]
                   ┌──────────────────────────────────┐     │        (field by c_field)
                   │ multiplier_tree                  │◄────┘ CTree (gated by accumulate)
                   │  16 Booth partial products       │
                   │  + negation row + accumulator    │
                   │  4 levels of 4:2 compressors     │
                   └──────────────────────────────────┘
                     TreeCarry │            │ TreeSum
              ┌────────────────┤            ├─────────────────┐
              ▼                │            │                 ▼
        CarryRegister          │            │            SumRegister
              │ CarryMux       │            │ SumMux          │
              ▼                ▼            ▼                 ▼
         tree_bypass (carry) ◄─ latch_tree ─► tree_bypass (sum)
              │ CarryAdder                       │ SumAdder
              └──────────► final_adder ◄─────────┘
                           (64-bit carry select)
                                 │ AdderC
                                 └──────────────────────► CRegister

 scan chain:  scan_in → CRegister → ARegister → BRegister → CarryRegister → SumRegister → scan_out
```

## The partial-product tree (`multiplier_tree`)

The tree is the largest part of the unit and the hardest to follow.

**Booth recoding.** `B` is recoded into 16 radix-4 digits. Digit `i` is
formed from bits `{b[2i+1], b[2i], b[2i-1]}` (with `b[-1] = 0`) and is
`d = -2*b[2i+1] + b[2i] + b[2i-1]`, which lies in {-2, -1, 0, +1, +2}.
`booth_encoder` holds the digit in sign/magnitude form (`neg`, `one`, `two`),
selects 0, `A` or `2A` as a 33-bit value, and inverts it when the digit is
negative. The `+1` that completes the two's complement negation is not added
there. It comes out as the `neg` bit and is added in the tree. So
`partial_product_i = (neg ? ~mag : mag) + neg = d * A`. The triple `111`
(the digit -0) is treated as +0, so it adds no stray `+1`.

**Rows.** There are 32 row slots, each 64 bits wide:

| slot  | content |
|-------|---------|
| 0..15 | partial product `i`, sign-extended to 64 bits and shifted left by `2i` |
| 16    | the negation bits: bit `2i` is `neg` of digit `i` |
| 17    | the accumulator `C`, or zero when `accumulate = 0` |
| 18..31 | zero |

**Reduction.** Four levels of 4:2 compressors take the rows 32 → 16 → 8 → 4 → 2.
Without Booth recoding there would be twice as many partial products and
one more level. A 4:2 compressor (`compressor_4_2`) adds four bits of one
weight plus a lateral carry-in from the next lower bit. It gives a `sum` (weight 1)
and two weight-2 bits: `carry`, which goes to the next row pair, and `cout`,
which goes sideways to bit `j+1`. `cout` does not depend on the carry-in,
so lateral carries never ripple. Each compressor is two full adders.
Everything is computed modulo 2^64, so carries out of bit 63 are dropped.

The result is `tree_sum + tree_carry = A*B + C (mod 2^64)`.

The design is specified only as folding the accumulator into compressor inputs
that the multiplier leaves unused. Here the accumulator occupies a whole free
row slot, and the unused slots are constant zero, which synthesis removes.
A denser arrangement would put the negation bits into the free low bits of the
next partial product and use a sign-extension constant instead of full sign
extension. That would give the same sums with fewer compressors.

## The final adder (`final_adder`, `cla16`, `cla4`)

The 64-bit adder is split into four 16-bit segments and built from seven
16-bit adders:

- one adder for bits 0-15;
- two adders for each higher segment, one computing with carry-in 0 and one
  with carry-in 1.

A multiplexer keeps the result whose assumed carry matches the real carry from
the segment below, and the selected carry moves on to the next multiplexer.
Each 16-bit adder (`cla16`) is four 4-bit carry-lookahead groups (`cla4`)
linked by their group carries.

## Clocking modes and timing

| `latch_tree` | mode | operand → accumulator latency | throughput |
|---|---|---|---|
| 0 | one-cycle: tree and adder in one clock | 2 edges (operand register, then CRegister) | 1 op / clock |
| 1 | two-stage: CarryRegister/SumRegister in the path | 3 edges | 1 op / clock |

CarryRegister and SumRegister load the tree outputs on every clock in both
modes. `latch_tree` only selects what the final adder reads.

**Caution with pipelined accumulation.** In the two-stage mode, the
accumulator that enters the tree does not yet include the product still in
flight in the pipeline registers. Back-to-back accumulates therefore build two
interleaved sums, one over the even and one over the odd operations. This
follows from the structure itself. The original design gives pipelined mode as
a test and speed option and does not discuss accumulation in it.

To keep a single running sum in this mode, issue an accumulating operation
only every other clock. In the clocks between, give zero operands with
`accumulate = 0`. CRegister then alternates between the running sum and
the zero product of those in-between operations. The sum that includes
operation k is there three clocks after operation k's operands were
presented. The one-cycle mode has no such restriction.

`accumulate = 0` gives a plain multiply: the tree sees zero instead of `C`,
and `C` is overwritten with `A*B`. `accumulate` is latched together with
`arg_a` and `arg_b`, so it belongs to the operands presented in the same
clock. Its flip-flop holds during scan and is not in the scan chain.

The reference design was characterised at a 13.7 ns critical path, that is
73 MHz in one-cycle mode and about 140 MHz in pipelined mode, with 60,904
transistors and 239 mW for the core. These are properties of that circuit
implementation. Nothing in this RTL reproduces them.

## Scan chain and test access

With `scan_en = 1` all five registers shift one bit per clock instead of
loading. Together they form a 256-bit chain:

```
scan_in → CRegister[0..63] → ARegister[0..31] → BRegister[0..31]
        → CarryRegister[0..63] → SumRegister[0..63] → scan_out
```

Each register takes the new bit in at bit 0 and passes on its top bit. Viewed
as one vector `{Sum, Carry, B, A, C}`, the chain shifts left, and `scan_out`
is `Sum[63]`. Shift a 256-bit pattern in MSB first and it lands in
the registers exactly. What comes out is the previous content, MSB first.

Two uses follow from this:

- **Tree debug.** CarryRegister and SumRegister always hold the last tree
  result, so a scan-out shows the redundant sum/carry pair for any operands.
- **Adder test.** Scan chosen values into CarryRegister and SumRegister, then
  clock once with `latch_tree = 1`. CRegister then receives exactly
  `Carry + Sum` from the final adder.

## Accumulator readout

`c_output` shows one 16-bit field of CRegister, chosen by `c_field`:
0 gives bits 15..0, 1 gives 31..16, 2 gives 47..32 and 3 gives 63..48. The
extra `c_value` port shows all 64 bits.

## The DCVSL XOR cell (`dcvsl_xor`)

This is a behavioural model, not synthesizable logic. It models one dynamic
dual-rail gate of the kind the datapath was built from. It has dual-rail
inputs (`A`/`AB`, `B`/`BB`) and dual-rail outputs (`OUT` = A xor B, `OUTB`).

- While `CLK` is low, both dynamic nodes precharge and both outputs are 0.
- When `CLK` rises, exactly one node discharges 428 ps later, and its output
  rises.
- Keepers hold the result for as long as `CLK` stays high.

Inputs must only rise during evaluation (the domino rule), and the evaluate
phase must be longer than 428 ps. `mac_top` brings the cell out on its own
`xor_*` ports. It is not part of the arithmetic path: the RTL datapath is
ordinary static logic.

## Top-level ports (`mac_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of every register |
| `arg_a`, `arg_b` | in | 32 | operands (two's complement); `arg_b` is Booth-recoded |
| `accumulate` | in | 1 | 1: add C into the tree; 0: plain multiply (latched with the operands) |
| `latch_tree` | in | 1 | 0: one-cycle mode; 1: two-stage mode |
| `scan_en`, `scan_in` | in | 1 | scan shift enable and serial input |
| `scan_out` | out | 1 | serial output (SumRegister bit 63) |
| `c_field` | in | 2 | field select for `c_output` |
| `c_output` | out | 16 | selected accumulator field |
| `c_value` | out | 64 | whole accumulator |
| `xor_clk`, `xor_a`, `xor_ab`, `xor_b`, `xor_bb` | in | 1 | DCVSL XOR cell inputs |
| `xor_out`, `xor_outb` | out | 1 | DCVSL XOR cell outputs |

`accumulate`, `scan_en` and `scan_in` are sampled at the rising clock edge.
`latch_tree` and `c_field` act within the cycle. `latch_tree` chooses
which values the final adder adds, and so what CRegister loads at the next
edge. `c_field` steers `c_output` combinationally.

## Files

`rtl/`, one design unit per file:

- `mac_pkg.sv`: widths, the Booth digit type and the recoding function
- `mac_top.sv`: top level: registers, scan chain, datapath wiring
- `multiplier_tree.sv`, `booth_encoder.sv`, `compressor_4_2.sv`: partial products and tree
- `final_adder.sv`, `cla16.sv`, `cla4.sv`: carry-select adder
- `scan_register.sv`, `tree_bypass.sv`, `c_output_select.sv`: registers and multiplexers
- `dcvsl_xor.sv`: behavioural model of the dynamic XOR cell

`tb/` holds one self-checking testbench per block, `tb_<module>.sv`.
Each one ends by printing `TB_RESULT checks=N failures=M`.

- Leaf testbenches check against arithmetic computed in the testbench.
  The compressor and the Booth digits are tested exhaustively; the tree
  and the adders with extreme and random operands.
- `tb_mac_top` runs the full-size unit end to end against a register-level
  model. It covers:
  - latency;
  - about 3000 random cycles mixing multiply-accumulate, plain multiply and
    pipelined mode, with mode switches;
  - a full scan-out compared with the model;
  - a scan-in followed by an adder-only cycle;
  - a single running sum kept in pipelined mode by issuing every other clock;
  - all four readout fields;
  - the XOR cell.

  It counts each of these mechanisms and fails if one never happened.

## Simulating

With Verilator 5 (`--timing` is needed because of the XOR cell model):

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -y rtl +libext+.sv rtl/mac_pkg.sv tb/tb_mac_top.sv --top-module tb_mac_top
./obj_dir/Vtb_mac_top
```

Use the same command with another `tb_<module>.sv` to test a single block.
Lint with `verilator --lint-only -Wall --timing -Irtl -y rtl +libext+.sv rtl/mac_pkg.sv rtl/mac_top.sv`.
The remaining lint warnings are unused package constants and the carry bits
dropped above bit 63.

## Where this RTL departs from, or goes beyond, the original design

- **Registers.** The original used latches. Here they are rising-edge
  flip-flops, because its latch clocking is not given.
- **Circuit style.** The original datapath was dynamic DCVSL domino logic,
  precharged and evaluated each cycle. Here it is static combinational
  logic. The circuit style is kept only in the XOR cell model.
- **Own control choices.** The original gives no scan enable, reset,
  `accumulate` control, `latch_tree` polarity or `c_field` encoding. These
  are this design's choices.
- **Exact tree layout.** The original does not specify it: which compressor
  inputs the accumulator uses, the partial-product sign handling, or how the
  negation bits are placed. This design's layout gives the same arithmetic
  result, but the gate count differs from the original.
- **Accumulate flip-flop.** The original puts all registers in the scan chain.
  The one-bit `accumulate` flip-flop is this design's addition, and it is
  not in the chain.
- **Scan order.** The order between registers is the original's. The bit
  order inside each register is this design's own choice.
- **Not modelled.** Nothing here models physical and circuit-level aspects:
  the process devices, the custom standard-cell library, the pad frame,
  clock buffering, power and timing.
