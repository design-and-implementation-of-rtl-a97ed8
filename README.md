# Reversible-logic combinational circuits: decoders, encoder, adder, multiplexers

A reversible gate has as many outputs as inputs and maps each input pattern
to a distinct output pattern, so no information is thrown away while it
computes. Landauer's argument ties the minimum heat of a computation to the
bits it erases, which is why reversible logic is pursued for low-power,
quantum and optical computing. Two rules follow for circuits made of such
gates: a signal may not fan out (a copy has to be made explicitly, with a
Feynman gate), and there is no feedback.

This library builds ordinary combinational functions from reversible gates
only. The central piece is a **reversible binary decoder** grown stage by
stage (2x4, then 3x8, then 4x16). Once all minterms of the inputs are
available as one-hot lines, any function is an OR of some of them. On that
basis the library builds a full adder, a full subtractor, a 1-bit comparator
and 4x1 and 8x1 multiplexers. A reversible 16x4 encoder (also 4x2 and 8x3)
goes the other way.

Everything is combinational SystemVerilog with no clock and no reset. Each
gate is its own module, so the elaborated hierarchy is the reversible
netlist. Synthesis to an FPGA or a standard-cell library flattens it into
ordinary logic, of course. The RTL keeps the gate structure so that the
netlist, its gate counts and its quantum cost can be inspected and
simulated.

## Cost metrics

Reversible circuits are compared by:

- **Quantum cost**: the number of 1x1 and 2x2 primitive operations a gate
  needs.
- **Garbage outputs**: gate outputs no one uses. They exist only to keep
  each gate reversible.
- **Constant inputs**: gate inputs tied to 0 or 1.

The gate costs used here are NOT 0, Feynman 1, Peres 4, TR 4 and Fredkin 5
(`rtl/rev_pkg.sv`). Every composite module declares a `QUANTUM_COST`
localparam, summed from its gates, and the testbenches check it. Garbage
lines are kept as named internal signals, `g_*`. That is why lint reports
unused signals: they are unused by design.

## The gates

| Module       | Gate              | Outputs (inputs A, B, C)                   | Cost |
|--------------|-------------------|--------------------------------------------|------|
| `rg_not`     | NOT               | P = A'                                     | 0    |
| `rg_feynman` | Feynman / CNOT    | P = A, Q = A ^ B                           | 1    |
| `rg_peres`   | Peres             | P = A, Q = A ^ B, R = AB ^ C               | 4    |
| `rg_tr`      | TR                | P = A, Q = A ^ B, R = AB' ^ C              | 4    |
| `rg_fredkin` | Fredkin (c-swap)  | P = A, Q = A'B ^ AC, R = A'C ^ AB          | 5    |
| `rg_and`     | Fredkin, C = 0    | y = R = AB (P and Q are garbage)           | 5    |
| `rg_or`      | Fredkin, C = 1    | y = Q = A + B (P and R are garbage)        | 5    |

The Peres and TR functions are the standard ones. The testbenches check
every gate against its full truth table, not against equations. The Toffoli and double-Feynman gates are well known too, but no
circuit here uses them, so they are not included.

## The decoder cascade (`rdec2x4`, `rdec3x8`, `rdec4x16`)

This is the least obvious part of the design.

**2x4 stage (cost 11).** Let A = `in[1]` and B = `in[0]`. Six gates
produce the four minterms, and apart from the two primary inputs no gate
output drives more than one place:

```
Peres(A, B, 0) -> Q = A^B, R = AB
TR   (A, B, 0) -> Q = A^B, R = AB'
CNOT(AB', A^B)   -> P = AB'            = out[2]
                    Q = A^B ^ AB' = A'B = out[1]
CNOT(AB, 0)      -> P = AB             = out[3], Q = copy of AB
NOT (A^B)        -> A'B' + AB
CNOT(AB copy, A'B' + AB) -> Q = A'B'   = out[0]
```

This uses one Peres, one TR, one NOT and three CNOT gates, as published.
OUT[3] and OUT[0] come from the Peres branch and OUT[2] and OUT[1] from the
TR branch. Feeding the Peres gate's A xor B output into the NOT gate is
this design's reading of the published schematic.

**Doubling stages (Fredkin splitters).** Each further input bit doubles the
number of lines. One Fredkin gate per existing line k is wired as
A = new bit, B = 0, C = line k:

```
Q = A'·0 ^ A·line_k = new_bit  & line_k   -> out[2k+1]
R = A'·line_k ^ A·0 = ~new_bit & line_k   -> out[2k]
P = new_bit                               (garbage)
```

So the bit added last becomes the **least significant** bit of the output
index: `rdec3x8` decodes `in[2:1]` with a 2x4 stage and splits by `in[0]`,
and `rdec4x16` decodes `in[3:1]` with a 3x8 stage and splits by `in[0]`. The
4x16 decoder has 18 gates: 12 Fredkin, 1 Peres, 1 TR, 1 NOT and 3 CNOT. Its
cost is 11 + 4·5 + 8·5 = 71. In general
cost(n) = 11 + 5·(2^2 + … + 2^(n-1)), computed by `rev_pkg::qc_decoder`.
An n-bit decoder is the (n-1)-bit one plus 2^(n-1) Fredkin gates.

All decoders give `out[i] = 1` exactly when `in == i`.

## Encoder (`renc`, parameter `OUT_W`, default 4 = 16x4)

For a one-hot input `in[i]`, `out = i`. Output bit k is the XOR of all
inputs whose index has bit k set. With exactly one input high this equals
the OR a conventional encoder uses, and XOR is what a CNOT computes without
loss. Each output bit is a chain of 2^(OUT_W-1) - 1 Feynman gates. The
running parity rides on the target line and each input enters on the
control line. The cost is OUT_W·(2^(OUT_W-1) - 1): 28 for 16x4. `OUT_W` = 2
and 3 give the 4x2 and 8x3 encoders.

Departure: the published 16x4 encoder mixes Feynman and Fredkin gates for a
quantum cost of 48. This Feynman-only structure is this design's own. It
computes the same function on one-hot inputs. For inputs that are not
one-hot, `out` is the XOR of the active inputs' indices; no priority is
applied.

## Decoder-based circuits

| Module             | Ports                              | Built as                                                      | Cost here | Published |
|--------------------|------------------------------------|---------------------------------------------------------------|-----------|-----------|
| `rfull_adder`      | `in={a,b,cin}`, `sum={carry,sum}`  | 3x8 decoder; sum = m1+m2+m4+m7, carry = m3+m5+m6+m7; 6 `rg_or` | 61        | 61        |
| `rfull_subtractor` | `in={a,b,bin}`, `diff={borrow,d}`  | 3x8 decoder; d = m1+m2+m4+m7, borrow = m1+m2+m3+m7; 6 `rg_or`  | 61        | 63        |
| `rcomparator`      | `a`, `b` -> `lt`, `eq`, `gt`       | 2x4 decoder: lt = m1, gt = m2, eq = m0+m3 (one `rg_or`)       | 16        | 16        |
| `rmux4x1`          | `in[3:0]`, `sel[1:0]` -> `y`       | 2x4 decoder, 4 `rg_and`, 3 `rg_or` tree                        | 46        | 46        |
| `rmux8x1`          | `in[7:0]`, `sel[2:0]` -> `y`       | 3x8 decoder, 8 `rg_and`, 7 `rg_or` tree                        | 106       | 75        |

The adder follows the published cell list: one 3x8 decoder and six OR cells
in two 2-level trees. The assignment of minterms to cells is the standard
full-adder one. Minterm 7 feeds both trees directly, without a Feynman copy,
as in the published 7-cell implementation.

The subtractor and comparator were published only by name and cost. Their
structures here are this design's own. The comparator is 1 bit wide because
a 2x4 decoder plus one Fredkin gate gives exactly the published cost of 16.

The 8x1 multiplexer's 16 cells match the published implementation's cell
count. A decoder/AND/OR structure of that size cannot reach the published
cost of 75.

## Top level (`rev_comb_top`)

The circuits are independent. `rev_comb_top` places the 4x16 decoder, the
16x4 encoder, the adder, the subtractor, the comparator and both
multiplexers side by side, with each circuit's ports brought out under a
prefix (`dec_`, `enc_`, `fa_`, `fs_`, `cmp_`, `mux4_`, `mux8_`): 74 pins in
all. The published work implemented each circuit on its own; each would
fit an xc7a100t part in isolation, the largest (decoder or encoder) needing
20 I/O pins.

## How far to trust it

- Every gate is checked exhaustively against its truth table.
- Every decoder, the encoder (at all three sizes), the adder, subtractor,
  comparator and both multiplexers are checked exhaustively or, for the
  encoder's invalid inputs, with 200 random words against a reference
  model.
- The quantum costs of the 2x4, 3x8 and 4x16 decoders, the adder, the
  comparator and the 4x1 multiplexer are checked against the published
  values (11, 31, 71, 61, 16, 46).
- `tb_rev_comb_top` drives all circuits together for 2000 random steps. It
  checks every output against behavioural references, and fails unless
  every decoder line, every encoder index, carry and borrow in both states,
  every comparator outcome and every multiplexer select occurred.
- Each testbench has been shown to fail on a deliberately broken copy of
  its module.

Published garbage-output counts are not modelled. The structures here have
more garbage lines than the published counts, because every Fredkin gate
used as AND, OR or splitter leaves its unused outputs dangling.

## Simulating

Each testbench in `tb/` is self-checking. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog that fails the run if it
hangs. To build and run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rev_pkg.sv \
          tb/tb_rev_comb_top.sv --top-module tb_rev_comb_top
./obj_dir/Vtb_rev_comb_top
```

Replace the testbench name for any other block: `tb_<module>` for module
`<module>`. The package must come first on the command line; the other
modules are found through `-Irtl`.

## Files

- `rtl/rev_pkg.sv`: the gate costs and the decoder cost function.
- `rtl/rg_*.sv`: the gates (NOT, Feynman, Fredkin, Peres, TR, Fredkin AND
  and OR).
- `rtl/rdec*.sv`: the decoders.
- `rtl/renc.sv`: the encoder.
- `rtl/rfull_adder.sv`, `rtl/rfull_subtractor.sv`, `rtl/rcomparator.sv`,
  `rtl/rmux4x1.sv`, `rtl/rmux8x1.sv`: the decoder-based circuits.
- `rtl/rev_comb_top.sv`: all circuits side by side.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
