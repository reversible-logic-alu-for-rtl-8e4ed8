# A 16-bit ALU built from reversible gates

A reversible gate has as many outputs as inputs, and each input pattern maps
to a different output pattern, so no information is lost inside the gate.
This ALU is assembled entirely around such gates: a Double Peres gate does all
the Boolean work, a DKG gate does all the arithmetic, and Fredkin gates act as
multiplexers. Sixteen one-bit slices are chained through their carries to make
a 16-bit ALU with sixteen operation codes. The whole design is combinational:
there is no clock, no register and no reset.

The RTL models the gates' logic functions in ordinary CMOS-style
SystemVerilog. It can be simulated and synthesised like any other design. It
does not model the physics of reversible computation.

## Operations

The select word `s = {s3,s2,s1,s0}` chooses the operation. `s3` picks the half
of the slice that produces the result.

| s    | operation  | out        | s    | operation      | out            | co                       |
|------|------------|------------|------|----------------|----------------|--------------------------|
| 0000 | AND        | a & b      | 1000 | ADD            | a + b          | carry                    |
| 0001 | NAND       | ~(a & b)   | 1001 | INCREMENT      | a + 1          | carry (a = FFFF)         |
| 0010 | OR         | a \| b     | 1010 | 2's COMPLEMENT | -a             | carry of ~a + 1 (a = 0)  |
| 0011 | NOR        | ~(a \| b)  | 1011 | SET            | FFFF           | 0                        |
| 0100 | BUFFER A   | a          | 1100 | SUBTRACT       | a - b          | borrow (a < b)           |
| 0101 | XOR        | a ^ b      | 1101 | DECREMENT      | a - 1          | carry of a + FFFF (a ≠ 0) |
| 0110 | BUFFER B   | b          | 1110 | NOT            | ~a             | 0                        |
| 0111 | XNOR       | ~(a ^ b)   | 1111 | CLEAR          | 0000           | 0                        |

`co` is 0 for all eight logic codes. The codes are in `rev_alu_pkg::alu_op_e`.

Reference vectors: with `a = 16'hCCCC` and `b = 16'hAAAA` the sixteen codes
give 8888, 7777, EEEE, 1111, CCCC, 6666, AAAA, 9999, 7776 (co = 1), CCCD,
3334, FFFF, 2222 (co = 0), CCCB (co = 1), 3333 (co = 0) and 0000 (co = 0).
These are the published simulation results of the design, and the top-level
testbench checks every one of them.

## The gates

| module              | size | outputs                                                   |
|---------------------|------|-----------------------------------------------------------|
| `not_gate`          | 1x1  | P = ~A                                                    |
| `feynman_gate`      | 2x2  | P = A, Q = A ^ B                                          |
| `toffoli_gate`      | 3x3  | P = A, Q = B, R = AB ^ C                                  |
| `fredkin_gate`      | 3x3  | P = A, Q = ~A B ^ A C, R = ~A C ^ A B (swap B, C when A)  |
| `double_peres_gate` | 4x4  | P = A, Q = A^B, R = A^B^C, S = ((A^B)C) ^ (AB ^ D)        |
| `dkg_gate`          | 4x4  | P = A, Q = ~A C ^ A ~D, R = ((A^B)(C^D)) ^ CD, S = B^C^D  |
| `fredkin_mux2`      | 3x3  | one Fredkin gate used as a 2:1 mux: y = sel ? d1 : d0     |

The quantum costs usually quoted are 0 (NOT), 1 (Feynman), 5 (Toffoli),
5 (Fredkin) and 6 (Double Peres).

Two properties are worth knowing:

* **Double Peres S is a majority function.** `(A^B)C ^ AB` equals
  `majority(A,B,C)`. With `C = 0` the majority is `A & B`, and with `C = 1` it
  is `A | B`. D then optionally inverts the result. So feeding the gate with
  `C = s1` and `D = s0` yields AND, NAND, OR and NOR for `s1 s0` = 00, 01, 10
  and 11, which are exactly the first four codes. R is `A ^ B ^ s1`, which is
  XOR or XNOR.
* **The DKG gate as specified is not one to one.** With A = 0 its outputs are
  C, majority(B,C,D) and parity(B,C,D). If B ≠ D, swapping B and D changes
  none of them, so inputs 0001 and 0100 both give 0001. This is despite the
  gate being presented as reversible. The RTL keeps the equations as given,
  because the ALU relies only on R and S. R and S are a correct full adder
  (A = 0: S = sum, R = carry) and a correct full subtractor (A = 1: S = B - C - D,
  R = borrow). `tb_dkg_gate` therefore checks the function but not that the
  mapping is one to one.

## One bit slice (`alu1_next`)

Each slice takes `s`, one bit each of `a` and `b`, and the carry or borrow
`ci` from the slice below. It produces `out` and `co`.

**Logic half (s3 = 0).**
`double_peres_gate(A=a, B=b, C=s1, D=s0)` provides AND/NAND/OR/NOR on S and
XOR/XNOR on R. Three Fredkin muxes finish the job:

```
buf  = s1 ? b : a              // buffer A / buffer B
xbuf = s0 ? R : buf            // buffer or XOR/XNOR
logic = s2 ? xbuf : S          // first or second group of four
```

**Arithmetic half (s3 = 1).**
All eight arithmetic codes go through one `dkg_gate(A=ctrl, B=x, C=y, D=ci)`.
The operands are steered from `a` and `b`:

```
x = a ^ x_inv                          (Feynman gate)
y = (b & y_b) ^ (a & y_a) ^ y_one      (two Toffoli gates and a Feynman gate)
```

The controls come from `rev_alu_pkg::arith_decode(s[2:0])`:

| code | op      | ctrl | x  | y  | bit-0 carry in | per-bit result  |
|------|---------|------|----|----|----------------|-----------------|
| 1000 | ADD     | add  | a  | b  | 0              | a + b           |
| 1001 | INC     | add  | a  | 0  | 1              | a + 0 (+1)      |
| 1010 | 2's     | add  | ~a | 0  | 1              | ~a + 0 (+1)     |
| 1011 | SET     | add  | a  | ~a | 0              | a + ~a = 1      |
| 1100 | SUB     | sub  | a  | b  | 0              | a - b           |
| 1101 | DEC     | add  | a  | 1  | 0              | a + 1...1       |
| 1110 | NOT     | add  | ~a | 0  | 0              | ~a              |
| 1111 | CLEAR   | sub  | a  | a  | 0              | a - a = 0       |

SET and CLEAR are computed by the adder itself, and they produce no carry, so
the chain stays at zero for them.

**Output.**
A Fredkin mux on `s3` selects the logic bit or the DKG sum. A Toffoli gate
forms `co = s3 & R_dkg`, so logic codes never leave a stray carry in the chain.

The select decoding (`arith_decode`) is ordinary combinational logic that
every slice repeats. Signal fan-out is by plain wires, not Feynman copy gates.
The gates' garbage outputs are left unconnected. A strictly reversible
netlist would copy signals with Feynman gates and bring the garbage lines out.

## Bit 0 (`alu1_first`) and the cascade (`rev_alu16`)

Increment and 2's complement need a +1 at the least significant bit only.
`alu1_first` is an `alu1_next` slice whose carry input is made from the
select word, `cin0 = ~s2 & (s1 ^ s0)`, using a NOT, a Feynman and a Toffoli
gate. That value is 1 for codes x001 and x010. For logic codes it does not
matter, because the DKG output is not selected.

`rev_alu16` (parameter `WIDTH`, default 16) places `alu1_first` at bit 0 and
`alu1_next` at bits 1 to WIDTH-1. Each slice's `co` is wired to the next
slice's `ci`, and `co` of the top slice is the ALU's `co`. The critical path
is the ripple through all WIDTH DKG carries. There is no latency in cycles.

## Where this RTL departs from, or fills in, the original description

* **How the select lines drive the gates.** The original names the Double
  Peres gate as the base of the logic half and the DKG gate as the base of the
  arithmetic half. It does not give the wiring. The operand steering, the mux
  tree and the `arith_decode` table above are this design's own.
* **Decrement.** The description says bit 0 is "subtracted" for decrement.
  That would make `co` a borrow, which is 0 for a = CCCC. The published
  results, however, show `co = 1` for that decrement, and `co = 0` (no borrow)
  for CCCC - AAAA. This RTL follows the published results: it computes
  decrement as `a + FFFF` in adder mode, and bit 0 needs no special handling
  for it.
* **SET and CLEAR at bit 0.** The description mentions a small difference
  between the bit-0 slice and the other slices for SET and CLEAR, without
  saying what it is. Here SET and CLEAR are the same in every slice.
* **Carry-out of SET and of logic codes.** No value is given for either. Here
  both are 0.
* **Operation count.** The design is described as having 15 operations, but
  its operation table lists 16 codes. All 16 are implemented.
* **No external carry-in.** Bit 0 makes its own carry-in from the select
  lines. The 16-bit ALU has no `ci` port.

## Files

`rtl/`:
* `rev_alu_pkg.sv`: the operation enum, the steering-control struct and
  `arith_decode`.
* The gate modules, `fredkin_mux2`, `alu1_next`, `alu1_first`.
* `rev_alu16` (top).

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops.

* The gate testbenches run each gate's full truth table, and also check that
  the outputs are one to one (except for DKG, see above).
* The slice testbenches run all select codes against every input pattern.
* `tb_rev_alu16` does three things. It checks the published CCCC/AAAA
  results, runs corner operands and 2000 random pairs per code against an
  integer model, and counts the design's mechanisms. These are every code, an
  ADD carry, a SUB borrow, a carry rippling through all 16 slices, the bit-0
  injection, and decrement with and without carry. If any mechanism never
  occurs, the testbench reports a failure.

Running one, for example the top:

```
verilator --binary --timing -Irtl -y rtl rtl/rev_alu_pkg.sv tb/tb_rev_alu16.sv --top-module tb_rev_alu16
./obj_dir/Vtb_rev_alu16
```

For a gate testbench, list the gate's file (and `fredkin_gate.sv` for the
mux) the same way, or rely on `-y rtl` to find it.

To change the width, override `WIDTH` on `rev_alu16`. The testbench's
reference model and published vectors assume 16 bits.
