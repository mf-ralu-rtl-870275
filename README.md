# MF-RALU: a 30-operation ALU built from reversible gates, with a small RISC processor

The MF-RALU is a 32-bit arithmetic and logic unit whose every datapath element
is expressed as a network of *reversible* logic gates: Feynman, Peres,
Fredkin, modified Fredkin and a few others, each of which maps its inputs
one-to-one onto its outputs. The unit offers 30 operations chosen by a 5-bit
code. They are the sixteen classic arithmetic and logic operations of a
bit-sliced ALU, complements, barrel shifts, a word multiplexer, five different
adder architectures and three different multipliers. A minimal single-cycle
RISC processor (fetch, decode, data memory, MF-RALU) drives it, and a 1-bit
reversible ALU is provided on its own.

The SystemVerilog here describes each unit at the level of those gates: every
gate is a function in `rev_gates_pkg`, and the units call those functions or
instantiate the reversible half and full adder/subtractor cells. The code is
ordinary synthesizable logic. On an FPGA or in a standard-cell flow the gates
become ordinary logic and the "garbage" outputs are optimised away. The gate
structure is kept so the design can be read, counted and changed at that
level. It is not meant to be physically reversible.

## Operation codes

`alu_in[4:3]` chooses one of four groups, `alu_in[2:0]` the operation within it.
A and B are 32 bits. The result is 64 bits, zero-extended where narrower.

| code | unit | result | code | unit | result |
|---|---|---|---|---|---|
| 0 | RAU | B | 16 | ROC | ~A |
| 1 | RAU | B + 1 | 17 | RTC | ~A + 1 |
| 2 | RAU | A + B | 18 | RRBS | A >> B[4:0] |
| 3 | RAU | A + B + 1 | 19 | RLBS | A << B[4:0] |
| 4 | RAU | ~A + B | 20 | RMUX | c ? A : B |
| 5 | RAU | ~A + B + 1 (= B − A) | 21 | RRCA | A + B (32 bits) |
| 6 | RAU | B − 1 | 22 | RRCS | A − B (32 bits) |
| 7 | RAU | B | 23 | RCLA | A + B + c (32 bits) |
| 8 | RLU | A \| B | 24 | RCSKA | A + B + c (33 bits) |
| 9 | RLU | ~(A \| B) | 25 | RCSA | A + B + c (33 bits) |
| 10 | RLU | A | 26 | RKSA | A + B + c (33 bits) |
| 11 | RLU | A & B | 27 | RAM | A × B unsigned |
| 12 | RLU | ~A | 28 | RMBM | A × B, signed if c = 1 |
| 13 | RLU | A ^ B | 29 | RWM | A × B unsigned |
| 14 | RLU | ~(A ^ B) | 30, 31 | — | 0 |
| 15 | RLU | ~(A & B) | | | |

`c` is a single extra input. It is the carry in of the four carry-in adders,
the select of RMUX and the signed/unsigned switch of the Booth multiplier.
Codes 16–23 pass through a 32-bit multiplexer, so RRCA, RRCS and RCLA lose
their carry out. Codes 24–26 keep it as bit 32.

Example, taken from a run of the processor: code 25 on 3072 and 2112 gives
5184, and code 27 on 170 and 7 gives 1190.

## The arithmetic unit: one adder, eight operations

This is the least obvious part of the design. One bit of the RAU (`rau_1b`) is
three gates:

* An **MFR gate** fed `(a, s[1], s[2])`. Its third output is
  `x = a'·s[2] ⊕ a·s[1]`. That selects the adder's first operand:
  `s[2:1]` = 00 → 0, 01 → a, 10 → a', 11 → 1.
* A **Peres gate** fed `(b, s[0], 0)`. It gives `b ⊕ s[0]` and `b·s[0]`.
* A second **Peres gate** fed `(x, b⊕s[0], b·s[0])`. It completes a full
  adder: `fo = x ⊕ b ⊕ s[0]`, `co = majority(x, b, s[0])`.

So `s[0]` is the carry in. In the n-bit RAU (`rau`) only bit 0 receives the
external `s[0]`. Every other bit receives the carry out of the bit below in
that position. The eight results of the table follow from that:
x ∈ {0, A, ~A, all-ones} plus B plus the carry. Code 6 is B + all-ones = B − 1.

The 1-bit logic unit (`rlu_1b`) computes all eight logic functions at once.
An FG fans out b, a PG gives a⊕b and a·b, a UG gives a+b, and four FGs with a
constant 1 invert. A three-level tree of seven COG gates, each used as a 2:1
multiplexer, then picks one function by `s[2:0]`. `ralu` puts an n-bit RAU
and RLU side by side behind an MFG multiplexer on `s[3]`. Its default width
of 1 is the standalone 1-bit RALU, and width 32 is the 32-bit RALU.

## Adders

All adders are made of the reversible full adder/subtractor, FAS (`rev_fas`).
One FAS is an FG, two PGs and an FG. Its `as_i` input turns it into a
subtractor (a − b − borrow). The half version, HAS (`rev_has`), is one PG
between two FGs.

* **RRCA/RRCS** (`rrcs`): a HAS at bit 0 and 31 FAS in a ripple. It has no
  carry input, and `as_i` selects add or subtract.
* **RCLA** (`rcla`): generate `a·b` (MCF-AND gates) and propagate `a+b`
  (MCF-OR gates). Carries come from `c[i+1] = g[i] + p[i]·c[i]`, and one FAS
  per bit forms the sum.
* **RCSKA** (`rcska`): eight 4-bit FAS ripples, each with a skip unit that
  computes `cs = (Π(a+b))·skip_in + ca`. The first skip unit's skip input is
  0. Later blocks take the previous `cs` on both the FAS and the skip unit.
* **RCSA** (`rcsa`, block `rcsa8`): four 8-bit blocks chained. Inside a block
  each nibble is added twice, with carry 0 and with carry 1, and MFG
  multiplexers pick the sum and carry.
* **RKSA** (`rksa`): Kogge–Stone. A "square box" forms p = a⊕b and g = a·b,
  and five prefix levels of "big circles" follow. The carry into bit i is the
  final group generate of bit i−1, and the "triangles" form `s = p ⊕ c`. The
  carry in enters as part of g[0].

## Multipliers

* **RAM** (`ram_mult`): recursive. The 2×2 case is four MCF-AND gates and two
  HAS. An N×N stage multiplies the four half-word pairs with N/2 multipliers
  and adds LH + HL in an N-bit FAS ripple. A 3N/2-bit FAS ripple then adds
  that sum to `{HH, LL[N-1:N/2]}`.
* **RMBM** (`rmbm`): radix-4 Booth. B gets two extension bits, zero or sign
  depending on `sign`, and gives 17 digits in {−2 … 2}. Each partial product
  (0, A or 2A) is chosen by MFG multiplexers and inverted by FGs when the
  digit is negative. The +1s of those negations go into a separate row. A
  carry-save tree of FAS rows (`csa_tree`) reduces the 18 rows to two, and a
  64-bit FAS ripple adds them.
* **RWM** (`rwm`, block `rwm8`): sixteen 8×8 Wallace multipliers make all
  byte products. Each `rwm8` is eight MCF-AND rows, a carry-save FAS tree and
  a 16-bit FAS ripple. Fifteen 64-bit FAS ripples add the shifted byte
  products one after another.

`csa_tree` is a generic 3:2 carry-save reducer. It instantiates itself on the
smaller row count until two rows are left.

## Output multiplexers

`mf_ralu` computes every unit in parallel. Three MFG multiplexer trees
(`rmux_tree`) select the result:

* MUX1, 32 bits, 8:1 on `alu_in[2:0]`: ROC, RTC, RRBS, RLBS, RMUX, RRCA,
  RRCS, RCLA.
* MUX2, 64 bits, 8:1 on `alu_in[2:0]`: RCSKA, RCSA, RKSA, RAM, RMBM, RWM,
  0, 0.
* MUX3, 64 bits, 4:1 on `alu_in[4:3]`: RAU, RLU, MUX1, MUX2.

## The processor

`risc_processor` is a single-cycle pipeline: fetch → decode → data memory → MF-RALU.

* `fetch_unit`: an 8-bit PC and a 256 × 16-bit read-only instruction memory.
  While `rst` is high the PC loads `pro_in`, the start address. Afterwards it
  counts up by one per clock and wraps at 255.
* `decode_unit`: instruction `{c[15], alu_in[14:10], rdx[9:5], rdy[4:0]}`.
* `data_memory`: 32 × 32-bit read-only data, read at `rdx` and `rdy` to give
  Rx and Ry.
* `mf_ralu`: computes `alu_out` = f(Rx, Ry).

There is no register between the PC and `alu_out`. The result for the
instruction at `pc` is on `alu_out` in the same cycle, and one instruction
completes per clock. Reset is active high. Hold `rst` low to run.

Both memories are parameters (`IM_INIT`, `DM_INIT`). Their defaults come from
`mfralu_pkg::default_im()` and `default_dm()`. The default data holds
0, 1, 2, 3, 6, 7, 170, 2112 and 3072 in words 0–8, and
`(0x9E3779B9·(i+1)) ^ (i << 7)` (mod 2^32) in word i elsewhere. The default program starts with six instructions, codes 24–29 on
those values, whose results are 9, 5184, 1, 1190, 4224 and 0. From address 6
on, the word at address k has code k mod 32, `rdx = 7k+3`,
`rdy = 13k+5` (mod 32) and `c = bit 5 of k`. That covers every code with both
values of `c`.

`mfralu_top` holds the processor and, beside it on separate ports, the 1-bit
RALU (`ralu_a`, `ralu_b`, `ralu_s[3:0]` → `ralu_fo`, `ralu_co`).

## Where this RTL makes its own choices

The structure of the units follows the design they come from. These points
were not specified there and are choices of this RTL:

* The operation numbering: RCSKA is 24 and RCSA 25. The Buffer operation (10)
  passes A.
* B[4:0] is the shift amount, and one bit `c` serves as carry in, RMUX select
  and Booth sign.
* The instruction format, the PC loading `pro_in` at reset, the contents of
  both memories, and the combinational read paths.
* RAM uses one 3N/2-bit adder per level where two are named. How they would
  connect was not given.
* RKSA is a textbook five-level Kogge–Stone tree. The cell counts given for it
  do not form a complete tree.
* WM8 reduces row-wise with 3:2 layers, so its count of half and full adders
  differs from the 16 HAS and 47 FAS named for it.
* RWM adds its sixteen byte products in a single chain.
* Only the HAS/FAS cells bring their garbage outputs out. Elsewhere unused
  gate outputs are simply dropped.
* No gate-count, quantum-cost, FPGA area, delay or power figures are
  reproduced or measured here.

## Files

* `rtl/rev_gates_pkg.sv`: reversible gate functions.
* `rtl/mfralu_pkg.sv`: operation enum, instruction struct, default memory
  contents.
* Cells: `rev_has`, `rev_fas`, `rfas_chain` (n-bit FAS ripple), `rau_1b`,
  `rlu_1b`.
* Units: `rau`, `rlu`, `ralu`, `roc`, `rtc`, `rrbs`, `rlbs`, `rmux`,
  `rmux_tree`, `rrcs`, `rcla`, `rcska`, `rcsa8`, `rcsa`, `rksa`, `ram_mult`,
  `csa_tree`, `rmbm`, `rwm8`, `rwm`, `mf_ralu`.
* Processor: `fetch_unit`, `decode_unit`, `data_memory`, `risc_processor`,
  `mfralu_top`.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
  `tb/mfralu_ref_pkg.sv` is a behavioural reference of all operations, used by
  the ALU, processor and top testbenches.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. A watchdog
counts a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/rev_gates_pkg.sv rtl/mfralu_pkg.sv tb/mfralu_ref_pkg.sv tb/tb_mfralu_top.sv \
  --top-module tb_mfralu_top -o sim && ./obj_dir/sim
```

Replace `tb_mfralu_top` with any other testbench. `tb_mfralu_top` runs the
complete design at its default parameters. It checks:

* the six-instruction example (codes 24–29, with the operand and result values
  above);
* every one of the 256 instructions, and the PC wrap;
* a restart at `pro_in = 200`;
* all 16 operations of the 1-bit RALU.

It counts a failure if any operation code, `c = 1` on an adder, RMUX or the
signed multiplier, the PC wrap or the restart never occurred. Other
testbenches cover their units exhaustively (1-bit cells, the 8×8 multiplier)
or with a few thousand random and corner-case operands.

Synthesis of `mfralu_top` gives about 23,500 word-level cells, 8 flip-flops
(the PC) and two ROMs. The critical path runs through the ripple adders of the
multipliers, so expect a long single-cycle path. Pipelining `mf_ralu` is the
place to start if speed matters.
