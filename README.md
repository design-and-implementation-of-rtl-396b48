# Delay-controlled reconfigurable ALU (DCR-ALU)

This is an N-bit ALU. It adds, subtracts, multiplies and does five bitwise
operations. All of its arithmetic comes from one ripple-carry adder family,
and that adder is built from three multiplexer-based full-adder cells instead
of the usual XOR/AND/OR full adder:

* **MFA**, a modified full adder (ten transistors in the original circuit);
* **COPFA**, a carry-output-predictable full adder. Besides its normal carry
  it gives a second, *predicted* carry;
* **CISFA**, a carry-input-selectable full adder. It takes two carries in
  and picks one of them with a multiplexer.

A COPFA followed by a CISFA forms a two-bit *reconfiguration block*. The
COPFA passes two carries to the CISFA. The regular one travels the
regular-speed carry path (RSCP). The predicted one travels the high-speed
carry path (HSCP). An N-bit adder is an MFA, then (N-2)/2 reconfiguration
blocks, then another MFA. The subtractor, the adder/subtractor and the array
multiplier are all built around that adder. The ALU runs the
adder/subtractor, the multiplier and a logic unit in parallel and selects one
result with a 3-bit code.

The design was proposed as a transistor-level circuit in 7 nm FinFET and
22 nm graphene-nanoribbon FET technology. Its claimed benefits are lower
power, delay and transistor count. This RTL reproduces the gate-level
structure and the logic function. It does not model any electrical
behaviour. In RTL the two carry paths compute the same value, so their
speed difference does not show up.

Everything is combinational. There are no clocks, registers or resets.

## The three cells

Each cell starts from the XOR of its operand bits `a ^ b`, with an inverter
to make `a XNOR b`. The rest is 2:1 multiplexers.

| cell | sum multiplexer | carry multiplexer | extra |
|---|---|---|---|
| MFA (`mfa`) | select `cin`: `a^b` or `a XNOR b` | select `a XNOR b`: `cin` when a != b, `b` when a == b | none |
| COPFA (`copfa`) | as MFA | as MFA (`cout`) | predicted carry `cout_p` |
| CISFA (`cisfa`) | select `OUT_A` | select `a XNOR b`: `OUT_A` or `b` | MUX21-A: `OUT_A = (a^b) ? cin_s : cin` |

The carry multiplexer works because of a simple fact. When the two operand
bits are equal, that common bit is the carry out. When they differ, the
carry in passes through. In the CISFA, the selected carry `OUT_A` takes the
place of the MFA's carry in.

### The predicted carry (read this before changing `copfa`)

This is the least obvious part of the design. It is also where this RTL
departs from a literal reading of the published circuit.

The published COPFA replaces the MFA's XOR with an "XOR-AND" module, whose
AND output `a & b` is called the temporary carry. Its schematic drives the
predicted carry from that AND alone. The CISFA then uses the predicted carry
whenever its own operand bits differ. Wired that way, the 4-bit adder gives
wrong sums. Take 7 + 1:

* Bit 0 generates a carry.
* Bit 1 has a != b, so the real carry into bit 2 is 1, but `a1 & b1` is 0.
* Bit 2 has a != b, so the CISFA picks the predicted 0.
* The result is 4.

The same source describes the predicted carry as the signal that is 1 when
"two or more ones" are present at the cell's inputs. It also requires the
adder/subtractor to produce exactly A+B and A-B. This RTL follows that
description:

    cout_p = (a & b) | (cin & (a ^ b))

The formula is built from the temporary carry and the XOR output. As a
result `cout_p` always equals `cout`. Whichever input the CISFA's MUX21-A
selects is correct, so every adder in the design is exact.
`tb_dcrha` checks every 4-bit and 8-bit sum. The broken variant (`cout_p = a & b`) fails that testbench on 7 + 1 and on
many other cases.

A second inconsistency affects the CISFA selection rule. One description
says "cin_s when a == b". The cell's equation and its transistor schematic
say "cin when a == b, cin_s when a != b". The RTL uses the equation. With the
predicted carry above, the choice no longer changes any result. It only
decides which path the carry takes.

## Hybrid adder chain (`dcrha`)

```
 bit:   N-1        N-2 .. 1 (pairs)                     0
       [MFA] <- [CISFA <=2 carries= COPFA] ... <- [MFA] <- cin
        |          ^ reconfiguration block m ^
      cout
```

* Bit 0 is an MFA.
* Block `m` (m = 0 .. M-1, with M = (N-2)/2) covers bits 2m+1 (COPFA) and
  2m+2 (CISFA).
* Bit N-1 is an MFA.
* Blocks pass an ordinary ripple carry from one to the next.
* N must be even and at least 2. An odd N stops elaboration with an error.
* N = 4 is the 4-bit DCHA: one block, 44 transistors in the original
  circuit. The general count is 20 + 24·M. `dcr_pkg::adder_transistors`
  records this formula for reference.

## Subtraction and the carry/borrow bit

* **`dcrhs`** (DCHS/DCRHS) inverts `b` and adds with carry in 1. The result
  is `d = a - b mod 2^N`.
* **`dcrhas`** (DCHAS/DCRHAS) XORs every bit of `b` with the mode pin
  `m_sel` and feeds `m_sel` in as the carry. `m_sel = 0` gives `a + b` and
  `m_sel = 1` gives `a - b`.

The source calls the output bit of a subtraction "borrow out". It is wired
as the carry out of `a + ~b + 1`. That means **1 means no borrow**
(a >= b, unsigned), and 0 means a < b. The RTL keeps this polarity and the
testbenches check it.

## Array multiplier (`dcram`)

The multiplier is an unsigned N x N array. AND gates form the partial
products, with row n equal to `a & {N{b[n]}}`. N-1 cascaded N-bit hybrid
adders reduce them:

| stage | addend 1 | addend 2 | product bit emitted |
|---|---|---|---|
| 0 | `{0, row0[N-1:1]}` | row1 | p[1] (p[0] = row0[0]) |
| k | `{carry_k-1, sum_k-1[N-1:1]}` | row k+1 | p[k+1] |
| N-2 (last) | same pattern | row N-1 | p[N-1]; then `{carry, sum[N-1:1]}` = p[2N-1:N] |

Every stage has carry in 0. For N = 4 there are three 4-bit adders, and the
last carry is p[7].

## ALU (`dcr_alu`) and select codes

`out` is 2N bits wide.

| `sel` | operation | `out` |
|---|---|---|
| 000 | add | `{0.., carry, a+b}` (carry at bit N) |
| 001 | subtract | `{0.., no-borrow, a-b}` |
| 010 | multiply | `a*b` (2N bits) |
| 011 | AND | `a & b`, zero-extended |
| 100 | buffer | `a`, zero-extended |
| 101 | XOR | `a ^ b` |
| 110 | XNOR | `~(a ^ b)` (N bits) |
| 111 | OR | `a \| b` |

`sel[0]` is also the add/subtract mode of the adder/subtractor. The codes
are `dcr_pkg::alu_sel_e`.

The published operation table gives no operation for 011 and lists 110
twice, once for XNOR and once for AND. This design puts AND on 011.

The 2N-bit output and the place of the carry bit are this design's own
choices. The source gives only a single "OUT".

## Top level (`dcr_top`)

The top holds two independent units:

* the ALU, on ports `a`, `b`, `sel` and `out`;
* the stand-alone hybrid subtractor, on ports `sub_a`, `sub_b`, `sub_d` and
  `sub_br_out`.

The source designs and characterizes the subtractor on its own, but its ALU
uses the adder/subtractor instead. So the subtractor stands next to the ALU
rather than inside it.

## Parameters

Every module with a width has `parameter int unsigned N = 4`. Four bits is
the size of every concrete block in the source: the 4-bit DCHA, DCHS, DCHAS
and DCAM. The source gives no fixed width for the ALU; 4 is used there too.
Any even N works. The testbenches also run N = 2, 6, 8, 10, 16 and 32.

## Where this RTL departs from the source, and how far to trust it

* The predicted carry uses the "two or more ones" form (see above), not the
  bare AND that the schematic shows.
* The CISFA selection rule follows the cell equation, not the contradicting
  prose.
* An "extra OR gate" is mentioned for the CISFA, but no figure shows it and
  nothing needs it. It is not built.
* The 4-bit subtractor's first carry in is described once as "-1" and
  elsewhere drawn as 1. The RTL uses 1.
* The partial-product formula is printed as `AND(a_m, b_m)`. The surrounding
  text and wiring make it `a_m AND b_n`, and that is what is built.
* AND is on code 011. `out` is 2N bits wide.
* Odd widths are not supported, because the chain needs bit pairs.
* Transistor sizing, the FinFET/GnrFET device parameters, and all power,
  delay and noise-margin results are outside RTL and are not represented.

The logic is small and fully checked. Adders, subtractors and multipliers are
tested exhaustively up to 8 bits and randomly at larger widths. The ALU and
the top are tested exhaustively at N = 4 under every select code.

## Files and simulation

`rtl/`:

* `dcr_pkg.sv`: select codes and the block-count helpers.
* The cells: `mfa.sv`, `copfa.sv`, `cisfa.sv`, `recon_block.sv`.
* The arithmetic units: `dcrha.sv`, `dcrhs.sv`, `dcrhas.sv`, `dcram.sv`.
* The ALU parts: `logic_unit.sv`, `alu_out_mux.sv`, `dcr_alu.sv`.
* The top: `dcr_top.sv`.

`tb/tb_<module>.sv` holds one self-checking testbench per module. Each
prints `TB_RESULT checks=N failures=M`. `tb_dcr_top` is the end-to-end test
at default size. It also counts that each mechanism happened at least once:

* every select code;
* an addition with carry out;
* a subtraction with borrow and one without;
* a product that reaches the upper half of `out`;
* a carry that the CISFA took over the predicted path.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dcr_pkg.sv tb/tb_dcr_top.sv --top-module tb_dcr_top -o sim
./obj_dir/sim
```

To lint a single module:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/dcr_pkg.sv rtl/dcr_alu.sv
```
