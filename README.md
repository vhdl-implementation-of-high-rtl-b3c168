# Self-testing 4-bit Vedic multiplier

A 4x4 unsigned multiplier built the "Vedic" way (Urdhva-Tiryagbhyam,
"vertically and crosswise") and wrapped in built-in self-test (BIST) logic.
The wrapper has two jobs. It computes products, and it acts as a reference
for checking a second multiplier, the *circuit under test* (CUT), which sits
outside the wrapper. Both multipliers get the same operands. A comparator
reports whether their products agree.

The operands come from one of two sources:

- **user mode** (`sel = 1`): the `multiplier` and `multiplicand` input ports;
- **self-test mode** (`sel = 0`): two tiny on-chip test pattern generators
  (TPGs). Each one makes a 4-bit pattern from only three flip-flops.

```
                 +-------------+
 multiplier ---->|             |--- cut_a ----------> external CUT
 multiplicand -->|  operand    |--- cut_b ---------->     |
                 |  select     |                          | cut_product
 clock,reset --->| TPG-1,TPG-2 |    +------------+        v
 enable          |  (sel)      |--->| Vedic 4x4  |--> product --> compare --> cut_result
                 +-------------+    +------------+                  ^ (1 = pass)
                                                                    |
                                              cut_product ----------+
```

The only state in the whole design is the six flip-flops of the two TPGs.
Everything from the operands to `product` and `cut_result` is combinational.

## The Vedic multiplier

### 2x2 block (`vedic_mult_2x2`)

Write the operands as `a1 a0` and `b1 b0`:

| bit | formed as |
|-----|-----------|
| q0  | `a0 & b0` (vertical) |
| q1  | sum of a half adder on the crosswise terms `a1&b0`, `a0&b1` |
| q2  | sum of a half adder on that carry and `a1&b1` (vertical) |
| q3  | carry of the second half adder |

The block uses four AND gates and two half adders. It has no full adder,
because a 2x2 product never needs one.

### 4x4 from four 2x2 blocks (`vedic_mult_4x4`)

Split each operand into a high half and a low half. This gives four partial
products, each 4 bits wide:

```
q3 = a[3:2]*b[3:2]   weight 16
q2 = a[1:0]*b[3:2]   weight 4
q1 = a[3:2]*b[1:0]   weight 4
q0 = a[1:0]*b[1:0]   weight 1
```

Three ripple-carry adders (`rca_adder`) combine them:

```
hi  = {q3, 00} + {00, q2}              6-bit adder
lo  =  q1      + {00, q0[3:2]}         4-bit adder
out =  hi      + {00, lo}              6-bit adder
q   = {out, q0[1:0]}
```

The low two bits of `q0` go straight to the product. None of the adders can
overflow: the largest product is 15 x 15 = 225. An immediate assertion
checks that every carry out stays 0. The adders are built from gate-level
half and full adders (`half_adder`, `full_adder`). The design's description
calls them "4-bit parallel adders". The arrangement of operands needs 6 bits
for the first and last adder, so `rca_adder` takes its width as a parameter
`W`, with a default of 4.

## The test pattern generator (`tpg`)

This is the part with the most behaviour to understand. There are three D
flip-flops in a chain, `W1 -> W2 -> W3`. The first flip-flop loads
`en XOR W3`. The four outputs are:

```
T3 = W3   T2 = W2   T1 = W1   T0 = XOR of two state bits (parameter T0_TAP)
```

With `en` high, the state runs through six values and then repeats:

| clock | W1 W2 W3 | TPG-1 T3..T0 (T0 = W1^W2) | TPG-2 T3..T0 (T0 = W2^W3) |
|-------|----------|---------------------------|---------------------------|
| reset | 000      | 0000 (0)                  | 0000 (0)                  |
| 1     | 100      | 0011 (3)                  | 0010 (2)                  |
| 2     | 110      | 0110 (6)                  | 0111 (7)                  |
| 3     | 111      | 1110 (14)                 | 1110 (14)                 |
| 4     | 011      | 1101 (13)                 | 1100 (12)                 |
| 5     | 001      | 1000 (8)                  | 1001 (9)                  |
| 6     | 000      | back to 0000              | back to 0000              |

So three registers give four output bits, one new pattern per clock, with a
period of six. Both generators share `clock`, `reset` and `enable`, so they
step together (`bist_pattern_gen`). In self-test mode the operand pairs are
(0,0) (3,2) (6,7) (14,14) (13,12) (8,9). Their products, 0, 6, 42, 196, 156
and 72, are what a healthy CUT must return.

Points to know:

- **Enable low.** The first flip-flop then reloads `W3`, so the register
  rotates. From the reset state it stays at 000, and the output holds 0000.
  If `enable` falls in the middle of a sequence, the three bits keep rotating
  through a 3-cycle loop. The exception is state 111, which holds. The
  generator does not return to zero.
- **Reset** is active-high and asynchronous. It clears all three flip-flops.
- **TPG-2's tap is inferred.** Only the first generator is drawn in the
  design (T0 = W1 XOR W2). The second generator's operand stream (0, 2, 7,
  14, 12, 9) is known only from a reference simulation. The same register
  with T0 = W2 XOR W3 reproduces that stream exactly, so this is the
  structure used here.

### What self-test can and cannot detect

Self-test uses only six operand pairs, and in each pair at least one operand
is even. So every expected product has bit 0 equal to 0. Take the 16
single stuck-at faults on the CUT's product outputs. One self-test period
catches 15 of them, but not "bit 0 stuck at 0". The user-mode path can apply
all 256 operand pairs, which catches all 16. The end-to-end testbench checks
both of these numbers.

## Operand selection and verdict

`operand_select` turns `sel` into a 4-bit selection vector, using a 2:1 mux
of the constants 1 and 0. It then forms each operand bit as
`(selection & user) | (~selection & tpg)`. That is one AND, one
AND-with-inverted-input and one OR per bit. User operand A (`multiplier`)
pairs with TPG-1, and operand B (`multiplicand`) pairs with TPG-2. Because
multiplication is commutative, the pairing does not change any product.

`product_compare` drives 1 when the two 8-bit products are equal, meaning
the CUT passes. It drives 0 for any difference, meaning the CUT is
defective. The verdict is per operand pair and is not latched. To test the
CUT over a whole self-test run, watch `cut_result` across the six cycles.

## Top-level interface (`bist_vedic_multiplier`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clock` | in | 1 | TPG clock (rising edge) |
| `reset` | in | 1 | active-high asynchronous TPG reset |
| `enable` | in | 1 | TPG enable |
| `sel` | in | 1 | 1 = user operands, 0 = self-test patterns |
| `multiplier`, `multiplicand` | in | 4 each | user operands |
| `cut_a`, `cut_b` | out | 4 each | selected operands, to the external CUT |
| `cut_product` | in | 8 | the CUT's product |
| `product` | out | 8 | Vedic product of `cut_a * cut_b` |
| `cut_result` | out | 1 | 1 when `cut_product == product` |

Timing: in self-test mode, new operands appear just after each rising clock
edge. `product` follows through the combinational multiplier. `cut_result`
is valid once the external CUT has answered within the same cycle. There is
no pipelining and no latency beyond that single combinational path.

The design has no size parameters. It is a 4-bit design throughout
(`bist_pkg::OPW = 4`, product width `PW = 8`). `tpg` has the single
parameter `T0_TAP`.

## Departures and choices

The following are choices of this implementation, not taken from the
design's description:

- The CUT is outside the top module. One schematic of the original work
  draws a CUT multiplier inside the wrapper. The block diagram marks the CUT
  as an external circuit and gives its product as a port; this RTL follows
  the block diagram. No CUT design is supplied. The testbench uses a
  behavioural multiplier with an injectable stuck-at fault
  (`tb/cut_multiplier_model.sv`).
- TPG-2's T0 tap (W2 XOR W3) is inferred from its operand stream. It is not
  drawn in the design.
- The TPG reset is asynchronous and active-high. Neither is specified.
- The "enable low gives 0000" behaviour holds only from the reset state.
  This follows the drawn feedback, with no extra output gating.
- The first and last adders of the 4x4 multiplier are 6 bits wide, not 4.
- The half adder, full adder, ripple-carry adder and equality compare have
  no internal structure given; each is the plain textbook circuit.
- The original work reports FPGA power and timing for three Xilinx devices.
  These are properties of a vendor tool flow and are not reproduced here.

## Files

| file | content |
|------|---------|
| `rtl/bist_pkg.sv` | widths, operand and product types, TPG tap enum |
| `rtl/half_adder.sv`, `rtl/full_adder.sv`, `rtl/rca_adder.sv` | gate-level adders |
| `rtl/vedic_mult_2x2.sv`, `rtl/vedic_mult_4x4.sv` | the Vedic multiplier |
| `rtl/tpg.sv`, `rtl/bist_pattern_gen.sv` | test pattern generators |
| `rtl/operand_select.sv`, `rtl/product_compare.sv` | input selection, response analyser |
| `rtl/bist_vedic_multiplier.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/cut_multiplier_model.sv` | behavioural CUT with fault injection (simulation only) |

## Simulating

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog that stops a hung run.
For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    --top-module tb_bist_vedic_multiplier \
    rtl/bist_pkg.sv tb/tb_bist_vedic_multiplier.sv
./obj_dir/Vtb_bist_vedic_multiplier
```

Replace the top-module name to run another testbench. `bist_pkg.sv` must
come first on the command line because the other files import it.

`tb_bist_vedic_multiplier` runs the top at its only configuration. It covers:

- all 256 user operand pairs;
- the enable-low hold;
- three full self-test periods, checking the operands, the products and the
  six-cycle period;
- all 16 stuck-at faults on the CUT product, in both modes;
- switching between modes while the generators run;
- an asynchronous reset.

It counts each of these and fails if any never happened. `tb_vedic_mult_4x4`
checks the multiplier on five reference operand pairs (10x5, 3x5, 3x12,
11x12, 11x13) and then exhaustively.
