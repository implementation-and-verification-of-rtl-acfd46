# A 16-bit RISC processor with a 16-operation ALU

This is a small, FPGA-sized RISC processor. Each clock it fetches one
16-bit instruction from a 16-word ROM and uses two 4-bit fields to read two
16-bit operands, Rx and Ry, from a 16-word data register file. It then
applies one of sixteen arithmetic or logic operations and shows the 32-bit
result one clock later. It has no branches, no stores and no write-back.
The program counter steps through the ROM and wraps, so the machine is a
pipelined ALU driven by a stored list of operations. It is meant to be
watched from outside: the opcode, both operands and the result are all
output ports, where an on-chip logic analyzer can probe them.

Everything is written in synthesizable SystemVerilog. The block structure,
the instruction fields, the opcode table, the widths and sizes, the port list
and the one-cycle ALU latency are those of the published design. The program
and data contents, the reset details and a few corner-case results are this
implementation's own choices, listed under "Choices and departures" below.

## Block structure

```
            pc_in
              |
   +----------v---------+      instr      +-----------+  rdx, rdy  +-----------------+
   | risc_fetch         |---------------->|risc_decode|----------->| risc_dmem       |
   |  8-bit PC -------> |                 |           |            |  a[0..15] x 16b |
   |  risc_imem (ROM    |                 | alu_in reg|            |  Rx, Ry regs    |
   |  16 x 16 bit)      |                 +-----+-----+            +--------+--------+
   +--------------------+                       | alu_in                    | rx, ry
                                                v                           v
                                            +---------------------------------+
                                            | risc_alu  16 ops -> alu_out reg |
                                            +----------------+----------------+
                                                             v
                                       outputs: alu_in, rx, ry, alu_out
```

| Module        | Role |
|---------------|------|
| `risc_pkg`    | Widths, the `alu_op_e` opcode enum, the `instr_t` instruction struct, default memory images |
| `risc_imem`   | Instruction ROM, 16 words x 16 bits, combinational read |
| `risc_fetch`  | 8-bit program counter, loads `pc_in` in reset, +1 per clock; addresses the ROM with its low 4 bits |
| `risc_decode` | Splits the instruction into opcode and two register addresses; registers the opcode |
| `risc_dmem`   | Data register file `a`, 16 words x 16 bits, two read ports, registered outputs Rx and Ry |
| `risc_alu`    | Sixteen operations on zero-extended operands, registered 32-bit result |
| `risc_top`    | Wires the four units together |

## Instruction format

```
 15      12 11       8 7        4 3        0
+----------+----------+----------+----------+
|  opcode  |  unused  |   Rdx    |   Rdy    |
+----------+----------+----------+----------+
```

The opcode goes to the ALU unchanged. Rdx and Rdy select the words of the
data register file that become Rx and Ry. There is one special rule: for
opcode `0000` (ADD) the decoder forces both addresses to 0, whatever the
fields hold. So every ADD computes `a[0] + a[0]`. The one-operand
operations (INC, DEC, NOT) still read both addresses and ignore Ry.

## Operations

| Opcode | Name | Result (32 bits) | | Opcode | Name | Result (32 bits) |
|--------|------|------------------|-|--------|------|------------------|
| 0000 | ADD | Rx + Ry   | | 1000 | OR   | Rx \| Ry |
| 0001 | SUB | Rx - Ry   | | 1001 | NOT  | ~Rx |
| 0010 | MUL | Rx * Ry   | | 1010 | XOR  | Rx ^ Ry |
| 0011 | DIV | Rx / Ry   | | 1011 | XNOR | ~(Rx ^ Ry) |
| 0100 | MOD | Rx % Ry   | | 1100 | NAND | ~(Rx & Ry) |
| 0101 | INC | Rx + 1    | | 1101 | NOR  | ~(Rx \| Ry) |
| 0110 | DEC | Rx - 1    | | 1110 | SHR  | Rx >> Ry (logical) |
| 0111 | AND | Rx & Ry   | | 1111 | SHL  | Rx << Ry (logical) |

Before any operation, both operands are zero-extended to 32 bits. Three
things follow from that and are easy to miss:

- The inverting operations (NOT, XNOR, NAND, NOR) set the upper 16 bits.
  For example, `~000F = FFFFFFF0`.
- SUB and DEC wrap modulo 2^32, so `0 - 1 = FFFFFFFF`.
- MUL returns the full 32-bit product, and SHL keeps bits shifted past
  bit 15, so `0005 << 7 = 00000280`.

DIV and MOD are unsigned. The shift distance is all 16 bits of Ry, and a
distance of 32 or more gives 0. Division by zero gives `0000FFFF` for DIV
and Rx for MOD.

## Timing

The pipeline has two register stages. The fetch/decode stage ends in the
`alu_in`, `rx` and `ry` registers. The execute stage ends in `alu_out`.

- Reset (`rst`) is synchronous and active high. While it is high, the
  program counter loads `pc_in` and all four outputs read zero.
- On the first rising edge after `rst` falls, the instruction at `pc_in`
  appears on `alu_in`, `rx` and `ry`. `alu_out` still reads 0.
- On the next edge its result appears on `alu_out`, while the next
  instruction appears on `alu_in`, `rx` and `ry`.
- From then on, one instruction completes per clock. At any moment,
  `alu_out` is the result of the `alu_in`/`rx`/`ry` shown one cycle
  earlier. When reading a waveform, pair each result with the operands one
  column to the left.

The program counter is 8 bits wide, but only its low 4 bits address the ROM.
The 16-instruction program therefore repeats every 16 clocks, and the
counter itself rolls over from FF to 00 without any effect.

## Default program and data

The default ROM image (`risc_pkg::IM_DEFAULT`) runs each of the sixteen
operations once, in opcode order. The default data image
(`risc_pkg::DM_DEFAULT`) supplies the operands. Started with `pc_in = 00`,
the processor produces this sequence:

| clock | alu_in | Rx   | Ry   | alu_out (previous row's result) |
|-------|--------|------|------|-----------|
| 1  | 0 ADD  | 000F | 000F | 00000000 (reset value) |
| 2  | 1 SUB  | 000F | 000F | 0000001E |
| 3  | 2 MUL  | 000F | 0007 | 00000000 |
| 4  | 3 DIV  | 000F | 0005 | 00000069 |
| 5  | 4 MOD  | 000F | 0005 | 00000003 |
| 6  | 5 INC  | 0008 | 0008 | 00000000 |
| 7  | 6 DEC  | 0008 | 0008 | 00000009 |
| 8  | 7 AND  | 0007 | 0080 | 00000007 |
| 9  | 8 OR   | 0010 | 000F | 00000000 |
| 10 | 9 NOT  | 000F | 0005 | 0000001F |
| 11 | A XOR  | 000F | 0000 | FFFFFFF0 |
| 12 | B XNOR | 0005 | 0010 | 0000000F |
| 13 | C NAND | 0005 | 0005 | FFFFFFEA |
| 14 | D NOR  | 0005 | 0007 | FFFFFFFA |
| 15 | E SHR  | 0005 | 000F | FFFFFFF8 |
| 16 | F SHL  | 0005 | 0007 | 00000000 |
| 17 | 0 ADD  | 000F | 000F | 00000280 |

This sequence is the published simulation trace of the design. The memory
images were chosen to reproduce it. Word 0 of the program is `0034`, an ADD
with non-zero register fields, so the run also shows the opcode-0000
address rule at work. Data words 7 to 15 are not used by the default
program.

To run your own program, override `IM_INIT` and `DM_INIT` on `risc_top`.
Both are packed arrays of 16 words, with word 0 in the rightmost position.

## Choices and departures

Choices this implementation made where the published design is silent:

- **`pc_in`.** `pc_in` is the program counter's reset value. The published
  design only says that it is an 8-bit input set to zero in its simulation.
- **Data register file.** The file is read-only at run time, with its
  contents set by a parameter. No instruction writes memory and there is no
  write-back path, so nothing would ever write it.
- **ROM read.** The instruction ROM is read combinationally. There is no
  instruction register. This matches the published trace, where the first
  instruction appears in the first clock after reset.
- **Corner cases.** These results are this implementation's choice:
  division by zero, shift distances of 32 or more, and the unsigned
  interpretation of DIV and MOD.
- **Opcode `0001` example.** The published hardware capture describes
  `alu_in = 0001`, `Rx = Ry = 000F` with result `0000001E`. That looks like
  an addition, yet the opcode table makes `0001` a subtraction. This
  implementation follows the opcode table. In the published trace, `1E`
  appears while `alu_in` shows `0001` only because it is the result of the
  ADD one cycle earlier. The timing above explains the capture the same way.
- **Pipeline depth.** Only two pipeline register stages are built. A
  five-stage pipeline (IF, ID, EX, MA, WB) is described only as general
  background. This processor has no memory-access or write-back work to do.
- **Register count.** There are 76 flip-flops: 8 in the PC, 4 in `alu_in`,
  32 in Rx and Ry, and 32 in `alu_out`. The published FPGA result reports
  90 slice registers, and what the other 14 hold is not known. The 78 I/O
  pins match the published count exactly.
- **Debug cores.** The vendor debug cores used to observe and drive the
  hardware are not part of this RTL: a JTAG controller, a logic analyzer
  and a virtual I/O core. The logic analyzer's probes are the top's output
  ports. The virtual I/O core drove the ALU's own inputs, which
  `tb_risc_alu` drives in simulation.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|-----------|----------------|
| `tb_risc_imem`   | Every ROM address, for the default image and for an image built from a formula |
| `tb_risc_fetch`  | `pc_in` load, +1 per clock, ROM word at the PC, the 16-word wrap, the 8-bit roll-over |
| `tb_risc_decode` | Field extraction, the opcode-0000 rule, one-clock `alu_in` register, reset |
| `tb_risc_dmem`   | Both read ports, including Rdx = Rdy, one clock to Rx/Ry, reset |
| `tb_risc_alu`    | The sixteen published trace results, corner cases, 4000 random operations against a 64-bit integer model (`risc_ref_pkg`), one-cycle latency, reset |
| `tb_risc_top`    | Whole processor at default parameters (details below) |
| `tb_risc_top_random` | Three processor instances, each loaded with a program and data generated by a fixed-seed xorshift formula, run from four start addresses and compared every clock with the cycle-level model |

`tb_risc_top` covers:

- outputs at zero in reset;
- the published trace, value for value, with the first result two clocks
  after reset;
- runs from several start addresses, one of which rolls the counter past FF, compared
  every clock with a cycle-level model;
- a reset in the middle of a run.

It also counts how often each mechanism happens: reset, each of the 16
operations, the opcode-0000 rule, the program wrap, the PC roll-over and a
non-zero start. A mechanism that never happens counts as a failure.

To simulate with Verilator, list the package files first:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/risc_pkg.sv tb/risc_ref_pkg.sv rtl/risc_imem.sv rtl/risc_fetch.sv \
  rtl/risc_decode.sv rtl/risc_dmem.sv rtl/risc_alu.sv rtl/risc_top.sv \
  tb/tb_risc_top.sv --top-module tb_risc_top
./obj_dir/Vtb_risc_top
```

For a single block, swap in that block's files and testbench. Every
testbench finishes in well under a second.
