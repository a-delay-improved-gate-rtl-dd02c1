# XOAC full adder and a 32-bit ripple-carry adder/subtractor

In a ripple-carry adder the carry has to pass through every stage, so the speed
of the whole word depends on how the carry is formed in one full-adder cell.
The XOAC full adder (XOR, OR, AND and complex gates) computes the majority
carry so that carry-in meets only one AND-OR term per stage, and so that the
first stage needs no XOR of its operands before its carry can form. This RTL
gives that full adder and the design it was evaluated in: an on-demand
adder/subtractor (ASM) of 32 bits built as a ripple chain of XOAC full adders.

The design is gate-level, combinational logic: no clock, no reset, no state.

## The full adder cell (`rtl/xoac_fa.sv`)

```
sum  = a ^ b ^ cin                   three-input XOR
cout = a·b + (a + b)·cin             OR2(a,b), AND2(a,b), then one AND-OR term
```

`cout` is the majority of the three inputs, written in a form where the two
operand terms, `a|b` and `a&b`, depend on `a` and `b` only. In a ripple chain
the operands are stable early, so when the carry arrives each stage adds only
the delay of the final AND-OR term.

Two other ways of writing the same cell show why this form was chosen:

| cell                | carry expression            | carry path per stage           | carry out of stage 0 waits for |
|---------------------|-----------------------------|--------------------------------|--------------------------------|
| minimum gates       | a·b + b·cin + a·cin         | a three-way AND-OR (AO222)     | one gate                       |
| XAC                 | a·b + (a ⊕ b)·cin           | a two-term AND-OR              | an XOR2, then the AND-OR       |
| **XOAC (this one)** | a·b + (a + b)·cin           | a two-term AND-OR              | an OR2, then the AND-OR        |

`(a ⊕ b)` and `(a + b)` give the same carry. They differ only when `a = b = 1`,
and then `a·b` is already 1. The XOAC form swaps the slow XOR for an OR. In
exchange the sum cannot share the XOR, so it gets its own three-input XOR and
the cell is larger than the XAC cell. Only the XOAC cell is implemented here.
The other two are described for comparison only.

The gates are written as logic operators, not as instances of a particular
standard-cell library. A synthesis tool is free to restructure them. To keep
the gate structure in a netlist, map each operator onto a cell by hand, or
mark the cell so the tool keeps its hierarchy.

## The adder/subtractor (`rtl/asm_ripple.sv`, top)

```
            select ──┬──────────────────────────────────────────────┐ carry into bit 0
                     ├─ buf2 copy ─► XOR on b[0] .. b[14]           │
                     └─ buf1 copy ─► XOR on b[15] .. b[31]          │
                                                                   ▼
 cout ◄─ FA[31] ◄─ … ◄─ FA[15] ◄─ FA[14] ◄─ … ◄─ FA[1] ◄─ FA[0] ◄─┘
          │                │         │               │       │
        result[31]      result[15] result[14]     result[1] result[0]
```

- `select = 0`: every XOR passes `b` and the carry into bit 0 is 0, so the
  result is `a + b`.
- `select = 1`: every XOR inverts `b` and the carry into bit 0 is 1, so the
  result is `a + ~b + 1 = a − b` in two's complement.

**Select fan-out.** `select` has to drive one XOR gate per bit. It is split
over two buffered copies. The copy named after buffer `buf2` drives the XORs
of the 15 low bits (parameter `BUF2_BITS`). The copy named after `buf1` drives
the 17 high bits. A buffer has no logic function, so in the RTL both copies are
plain copies of `select`, on nets named `sel_buf2` and `sel_buf1`. They are
kept apart so that a physical implementation can place the two buffers where
the split is. The carry into bit 0 comes from `select` before the buffers.

**The `cout` output.** `cout` is the raw carry out of bit 31:

- Addition: it is the unsigned carry out, i.e. the sum did not fit in 32 bits.
- Subtraction: it is 1 when `a ≥ b` (unsigned). A borrow is therefore `~cout`.

No signed-overflow flag is produced.

**Critical path.** The longest path runs from `select` (or `b[0]`) through
bit 0's XOR and its operand OR. From there it passes through the AND-OR carry
term of all 32 stages to `cout` and `result[31]`.

### Ports and parameters

| port     | dir | width   | meaning                                       |
|----------|-----|---------|-----------------------------------------------|
| `a`      | in  | `WIDTH` | first operand (minuend)                       |
| `b`      | in  | `WIDTH` | second operand (addend or subtrahend)         |
| `select` | in  | 1       | 0 = add, 1 = subtract (`asm_pkg::asm_op_e`)   |
| `result` | out | `WIDTH` | sum or difference                             |
| `cout`   | out | 1       | carry out of the top stage (see above)        |

| parameter   | default | meaning                                              |
|-------------|---------|------------------------------------------------------|
| `WIDTH`     | 32      | word length, number of full-adder stages             |
| `BUF2_BITS` | 15      | low-order XOR gates on the `buf2` copy of `select`  |

The defaults come from `asm_pkg` (`rtl/asm_pkg.sv`). The package also defines
the enum `asm_op_e` (`OP_ADD`, `OP_SUB`) for the two values of `select`.

## Files

| file                        | contents                                             |
|-----------------------------|------------------------------------------------------|
| `rtl/asm_pkg.sv`            | shared widths and the add/subtract enum              |
| `rtl/xoac_fa.sv`            | one-bit XOAC full adder                              |
| `rtl/xor_complementer.sv`   | row of XOR gates that passes or inverts `b`, per bit |
| `rtl/asm_ripple.sv`         | top: select fan-out, XOR row, chain of 32 full adders |
| `tb/tb_xoac_fa.sv`          | exhaustive truth-table test of the full adder        |
| `tb/tb_xor_complementer.sv` | pass, invert and random per-bit control test         |
| `tb/tb_asm_ripple.sv`       | end-to-end test of the 32-bit adder/subtractor       |

## Verification

Each testbench checks its block against values it works out itself. Each ends
by printing `TB_RESULT checks=N failures=M`, and each has a watchdog.

- `tb_xoac_fa` applies all eight input combinations twice, in two orders. It
  compares `sum` and `cout` with the full-adder truth table.
- `tb_xor_complementer` checks all-pass, all-invert and random per-bit
  controls on corner and random operands.
- `tb_asm_ripple` runs the top at its default 32 bits. It applies directed
  corners, a one-hot `b` on every bit in both modes, and 20,000 random
  vectors. About a quarter of the random vectors use nearly equal operands, so
  both subtraction outcomes are frequent. The reference is integer arithmetic:
  `(a ± b) mod 2^32`, with `cout` equal to the carry in addition and to
  `a ≥ b` in subtraction. The testbench also counts how often each behaviour
  occurred, and counts a failure for any behaviour that never did:
  - both modes
  - a mode switch with the operands held
  - a carry out of an addition
  - a subtraction with a borrow, and one without
  - a carry that ripples through all 32 stages, in each mode

  The 32-stage ripple in addition comes from one directed vector, `FFFFFFFF + 1`.

All three pass. Each testbench was also run against a broken copy of its
block, and each of those runs failed:

| testbench             | change to the block                                      | checks failed |
|-----------------------|----------------------------------------------------------|---------------|
| `tb_xoac_fa`          | the operand OR replaced by an AND                        | 4 of 32       |
| `tb_xor_complementer` | bit 0 never inverted                                     | 774 of 1,506  |
| `tb_asm_ripple`       | the 17 upper XOR gates left without the `buf1` copy of `select` | 15,934 of 42,722 |

To simulate with Verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wall -Wno-fatal -Irtl \
    rtl/asm_pkg.sv rtl/xoac_fa.sv rtl/xor_complementer.sv rtl/asm_ripple.sv \
    tb/tb_asm_ripple.sv --top-module tb_asm_ripple
./obj_dir/Vtb_asm_ripple
```

The other two testbenches build the same way, with their own top module.
`asm_pkg.sv` must come first. To try another word length, override `WIDTH`
(and, if you wish, `BUF2_BITS`) on `asm_ripple`. `tb_asm_ripple` takes its
width from `asm_pkg::ASM_WIDTH`, and its reference model uses 64-bit
arithmetic, so it works up to 63 bits.

## Reported results, and what this RTL does not cover

The design was evaluated as a 32-bit ASM mapped onto the standard cells of a
65 nm bulk CMOS process. It was analysed with static timing analysis at the
fastest process corner (1.35 V, −40 °C), for subtraction. Reported results:

- Critical path: 1.71 ns, about 585 MHz.
- Speed gain over the same ASM built with XNM, XNAIMC and XAC full adders:
  18.7 %, 9.4 % and 2.9 %.
- Speed gain over the ASM built with the cell library's own full adder:
  about 35 %.
- Cell area: 686.40 µm², 1.57 times that of the ASM with the library full adder.

This RTL cannot reproduce any of these figures. It has no cell library and no
delays, and a synthesis tool may restructure its gates. The RTL fixes the
logic function and the intended gate structure. Timing and area depend on how
the operators are mapped onto cells.

Points that are this implementation's own choice:

- Per-bit control on the XOR row, so that the two `select` copies can be
  wired to their bits.
- `cout` left as the raw carry, with no separate borrow output.
- No signed-overflow flag.
- Gates written as operators, not as library cell instances.
