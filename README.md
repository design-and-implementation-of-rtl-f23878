# Square-root carry select adder with reduced-area XOR, and a 16-bit ALU built on it

A carry select adder speeds up addition by preparing each block's result for both
possible carries in and choosing one when the real carry arrives. The classic version
pays for that with two ripple adders per block. This design avoids the duplication in
two ways:

1. **Carries are selected, not sums.** Each adder group computes the bitwise half sum
   and half carry once, then two *carry words*: one assuming a carry in of 0, one
   assuming 1. The real carry in picks a carry word with one AND-OR gate per bit, and
   only then are the sum bits formed by XOR. So the sum XORs are not duplicated, and
   the path from a group's carry in to its carry out is a single AND-OR gate.
2. **Every XOR is a four-gate XOR.** `y = (a | b) & ~(a & b)` needs one AND, one
   inverter, one OR and one AND. An AND-OR-NOT XOR needs five. The AND inside that XOR
   is also the half adder's carry, so a half adder costs four gates. A full adder
   (two half adders plus one OR) costs nine.

Groups of increasing width are chained into a square-root carry select adder (SQRT
CSLA). Its 16-bit form is the arithmetic core of a 16-bit ALU. The ALU has twelve
operations, including an 8x8 multiply, and a 4-bit opcode picks the result.

Everything is combinational. There are no clocks, registers or reset.

## One adder group (`csla_block`)

```
 a,b ──► hsg_unit ──s0,c0──► cg0_unit ──c10──┐
                      │                      ├─► cs_unit ──c──► fsg_unit ──► sum
                      └────► cg1_unit ──c11──┘      ▲    │          ▲
 cin ───────────────────────────────────────────────┴────┼──────────┘
                                                         └─ c[N-1] ──► cout
```

| unit | what it computes (bit i, 0 ≤ i < N) |
|---|---|
| `hsg_unit` (half-sum generator) | `s0[i] = a[i]^b[i]`, `c0[i] = a[i]&b[i]`, one reduced-area half adder per bit |
| `cg0_unit` (carry generator, cin = 0) | `c10[0] = c0[0]`; `c10[i] = c0[i] \| s0[i]&c10[i-1]` |
| `cg1_unit` (carry generator, cin = 1) | `c11[0] = c0[0] \| s0[0]`; `c11[i] = c0[i] \| s0[i]&c11[i-1]` |
| `cs_unit` (carry select) | `c[i] = c10[i] \| cin&c11[i]` |
| `fsg_unit` (final-sum generator) | `sum[0] = s0[0]^cin`; `sum[i] = s0[i]^c[i-1]`, with four-gate XORs |

The carry select unit is the subtle part. A general 2-to-1 multiplexer is not needed,
because `c10[i] = 1` always implies `c11[i] = 1`: a carry that happens with a carry in
of 0 also happens with a carry in of 1. Of the four input cases, only
(`c10`, `c11`) = (0, 1) depends on `cin`. That leaves `c10 | cin & c11`.

`cs_unit` relies on that implication. If you reuse it with carry words that do not obey
it, you must use a real multiplexer instead. Its testbench only drives pairs that obey
the rule.

The two carry generators are AND-OR ripple chains, with the fixed carry in folded into
bit 0. CG0 never reads `s0[0]`, so its `s0` port carries only bits N-1..1. Other
simplifications of these chains are possible. The chain is the simplest circuit with
the required function.

## The square-root chain (`sqrt_csla`)

`sqrt_csla #(N, NGROUPS)` splits the operands into `NGROUPS` `csla_block` groups. Each
group's carry in is the previous group's carry out. A group computes its carry words
while the carry from below is still on its way, so later groups can be wider. The
group widths are 2, 2, 3, 4, 5, … and the last group takes the remaining bits. They
are computed by `csla_pkg::group_width`.

| N | NGROUPS | group widths (LSB first) |
|---|---|---|
| 16 (default) | 5 | 2, 2, 3, 4, 5 |
| 32 | 7 | 2, 2, 3, 4, 5, 6, 10 |
| 64 | 10 | 2, 2, 3, 4, 5, 6, 7, 8, 9, 18 |

The group counts match the number of inter-group carries in the reference simulations
of the 16-, 32- and 64-bit adders. The widths themselves are a choice made here, not
taken from elsewhere. Every group, including the first, is a full `csla_block`. An
elaboration-time assertion rejects an `N` too small for `NGROUPS`.

## The ALU (`alu`)

All units compute in parallel, and `alu_mux` (a 16:1 multiplexer) picks one result by
`sel`:

| `sel` | operation | unit |
|---|---|---|
| 0001 | SUM: `a + b + cin` | `sqrt_csla` |
| 0010 | Multiply: `a[7:0] * b[7:0]`, 16-bit product | `array_multiplier` |
| 0011 | Subtract: `a - b` | `subtractor`: `a + ~b + 1` on `sqrt_csla` |
| 0100 / 0101 / 0110 / 0111 / 1000 | AND / OR / NAND / NOR / XOR | `logic_unit` (XOR is the four-gate cell) |
| 1001 | Increment: `a + 1` | `incrementer`: `sqrt_csla` with `b = 1` |
| 1010 | Decrement: `a - 1` | `decrementer`: `subtractor` with `b = 1` |
| 1011 | NOT: `~a` | `logic_unit` |
| 1100 | Two's complement: `-a` | `twos_complement`: inverters then `incrementer` |
| 0000, 1101, 1110, 1111 | result 0 | — |

Ports:

- inputs: `a[15:0]`, `b[15:0]`, `cin` and `sel` (type `csla_pkg::alu_op_e`);
- output `z[15:0]`, the selected result;
- `carry_out`, the SUM adder's carry, valid whatever the opcode;
- `borrow_out`, the subtractor's borrow (`b > a`, unsigned), valid whatever the opcode.

The parameters are `N = 16`, `MW = 8` (multiplier width) and `NGROUPS = 5`.

The multiplier is an unsigned carry-save array. Row *i* adds partial-product row *i* to
the previous row's sums (shifted by one) and carries, and a ripple row finishes the
top half. Every cell is a reduced-area half or full adder, so its XORs are the
four-gate cells too.

## Where this implementation makes its own choices

The source this RTL was built from fixes the following: the unit structure of a group;
the four-gate XOR, half adder and nine-gate full adder; the AND-OR carry select; the
opcode table; the 16-bit width; and the 8-bit multiply. The following were chosen here:

- The SQRT group widths (above).
- The carry-generator circuits. Only their function is given.
- The full adder combines its two half-adder carries with an **OR**. A description
  calling this gate an AND would not give a full adder. The gate count (9) is the same
  either way.
- The subtractor's inverter-plus-adder form and its borrow output.
- The array organisation of the multiplier, and unsigned operands. An unsigned product
  matches the reference results.
- `cin` affects only SUM.
- The free opcodes return 0.
- `carry_out` and `borrow_out` are ports.
- The ALU has no output register. It is described as finishing each operation in one
  cycle, which holds for any clock slower than its combinational delay.

## Gate structure, timing and synthesis

The RTL writes each cell at gate level: the four-gate XOR, the half adder that reuses
its AND, and the nine-gate full adder. It can therefore be read against the gate
counts above. A synthesis tool is free to map these expressions onto its own XOR cells
or LUTs, so the reduced-area structure is only kept if the flow preserves hierarchy or
the cells are marked to be kept. The RTL models no delays. The carry-path argument
still holds: one AND-OR per group between carry in and carry out, with the groups'
carry words computed in parallel. But the actual delay depends on the technology it is
mapped to.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each compares
against values computed independently with plain SystemVerilog arithmetic, and ends
with a line `TB_RESULT checks=<n> failures=<n>`.

- The small cells, one group at widths 4 and 5, and the carry generators and final-sum
  generator at width 4 are tested exhaustively.
- The incrementer, decrementer, two's complement and the 8x8 multiplier are tested
  exhaustively (65,536 cases each).
- `tb_sqrt_csla` runs the 16-, 32- and 64-bit adders side by side. It drives corner
  cases, carries rippling to every bit position, and 20,000 random operand pairs.
- `tb_alu` runs the full-size ALU at default parameters. It first drives the reference
  operand pair `a = 0xA736`, `b = 0x9D3B` through every opcode, checking against the
  recorded per-unit results, then runs 40,000 random operations. It counts each opcode,
  carry outs, borrows and a `cin` that changes the sum, and fails if any count is zero.

Each testbench also failed against a deliberately broken copy of its module, so each
one can detect a real fault.

To simulate with Verilator, for example the ALU:

```
verilator --binary --timing -y rtl -y tb +libext+.sv rtl/csla_pkg.sv tb/tb_alu.sv --top-module tb_alu
./obj_dir/Vtb_alu
```

Replace `tb_alu` by any other testbench name. `csla_pkg.sv` must come first, because
`alu`, `alu_mux`, `sqrt_csla` and their testbenches import it.

## Files

- `rtl/csla_pkg.sv`: opcode enum; group-width functions.
- Cells: `rtl/ra_xor.sv`, `rtl/ra_half_adder.sv`, `rtl/ra_full_adder.sv`.
- Adder group: `rtl/hsg_unit.sv`, `rtl/cg0_unit.sv`, `rtl/cg1_unit.sv`,
  `rtl/cs_unit.sv`, `rtl/fsg_unit.sv`, `rtl/csla_block.sv`.
- Adder: `rtl/sqrt_csla.sv`.
- ALU units: `rtl/subtractor.sv`, `rtl/incrementer.sv`, `rtl/decrementer.sv`,
  `rtl/twos_complement.sv`, `rtl/array_multiplier.sv`, `rtl/logic_unit.sv`,
  `rtl/alu_mux.sv`.
- Top: `rtl/alu.sv`.
