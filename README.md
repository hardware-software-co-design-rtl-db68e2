# A small RISC core with iDCT instructions for a reconfigurable set-top box

Decoding MPEG-2 video is dominated by the inverse DCT (iDCT) of 8 x 8
blocks. A hard-wired decoder chip cannot follow the move to a newer
standard, and a plain processor fast enough to do it in software is
expensive. The idea behind this processor is a middle road. A simple
32-bit RISC core lives in an FPGA inside the set-top box. It gets a
handful of instructions tailored to the iDCT, and it can be replaced in
the field when the video standard changes.

This RTL is a SystemVerilog version of that processor. It has:

* a DLX-style integer core with 32 registers and a 4-stage base pipeline;
* a bank of 16 constant registers holding the iDCT cosines in Q15;
* packed two-lane **multiply-accumulate** instructions (MAC, MACL, MACK,
  MACKL), which work on two 16-bit samples per 32-bit register;
* packed **half-word adds** (HADD, HADDAC, HADDF, HADDFAC);
* an **IDCT** instruction that runs a complete 1-D 8-point transform
  (AAN algorithm, built from adders only) on four registers in place;
* instruction and data memories with a port for the host system.

The software iDCT with MAC/HADD targets standard-definition TV. In
that budget one 8 x 8 block gets 1.736 µs. About 232 instructions per
block then need a clock of roughly 134 MHz. The IDCT instruction targets
HDTV: a full 8 x 8 block is 16 IDCT instructions, 8 for the rows and 8
for the columns.

## Instruction format

All instructions are 32 bits wide. Bit 31 is the most significant bit.

| format | [31:28] | [27:23] | [22:18] | [17:13] | [12:0] |
|---|---|---|---|---|---|
| R | opcode 0 or 1 | rs1 / Rj | rs2 / Rk / Kk | rd / Ri | func |
| I | opcode | rt | rs | – | [15:0] imm16 |
| J | opcode | offset [27:0] | | | |

The R-type layout and the codes below marked † come from instruction
words of the original core's simulation trace. For example, `00886001`
is `ADD r3, r1, r2` and `41000001` is `LHI r2, 1`. All other codes are
this design's own.

| opcode | meaning |
|---|---|
| 0 | integer R-type, func: 1 ADD†, 2 SUB†, 3 ADDU†, 4 SUBU†, 5 AND†, 6 OR†, 7 SRA†, 8 SRL, 9 SLL, 10 XOR, 11 SLT, 12 SEQ, 13 SNE (0 = NOP) |
| 1 | media R-type, func: 1 MAC, 2 MACL, 3 MACK, 4 MACKL, 5 HADD, 6 HADDAC, 7 HADDF, 8 HADDFAC, 9 IDCT |
| 2, 3, 5, 6, 7 | ADDI (sign-extended), ANDI, ORI, XORI (zero-extended), SLLI: `rt = rs op imm` |
| 4† | LHI: `rt = imm16 << 16` |
| 8 / 9 | LW `rt = M[rs+imm]` / SW `M[rs+imm] = rt` (words only) |
| A / B | BEQZ / BNEZ on rt, target `pc+4+imm16` |
| C / D | J / JAL, target `pc+4+offset`, JAL writes `pc+8` to R31 |
| E / F | JR / JALR to the address in rt, JALR writes `pc+8` to R31 |

`risc_pkg.sv` holds these codes as enums, plus the helpers `encode_r`,
`encode_i` and `encode_j`. ADD and ADDU give the same sum, and so do SUB
and SUBU. Overflow does not trap.

### The multimedia instructions

Registers hold two signed 16-bit samples, `.h` in bits [31:16] and `.l`
in bits [15:0]. Ri is both the destination and, where noted, the
accumulator.

| instruction | per lane x ∈ {h, l} | execute stages |
|---|---|---|
| `MAC Ri,Rj,Rk` | `Ri.x += (Rj.x * Rk.x) >>> 15` | 8 |
| `MACL Ri,Rj,Rk` | `Ri.x = (Rj.x * Rk.x) >>> 15` | 8 |
| `MACK Ri,Rj,Kk` / `MACKL` | as MAC / MACL, with constant Kk | 8 |
| `HADD Ri,Rj,Rk` | `Ri.x = Rj.x + Rk.x` | 3 |
| `HADDAC Ri,Rj,Rk` | `Ri.x += Rj.x + Rk.x` | 5 |
| `HADDF Ri,Rj,Rk` | `Ri = (Rj.h+Rk.h) + (Rj.l+Rk.l)`, 32-bit | 5 |
| `HADDFAC Ri,Rj,Rk` | `Ri += (Rj.h+Rk.h) + (Rj.l+Rk.l)`, 32-bit | 5 |
| `IDCT Ri` | `R[i..i+3] = idct8(R[i..i+3])` | 6 |

The constants are `K[k] = round(cos(kπ/16)·2^15)` for k = 0..15, with
K0 limited to 32767. Each constant holds the same value in both halves.
The index of Kk is the low four bits of field [22:18]. Products are
scaled back by `>>> 15` (truncation), and lane sums wrap at 16 bits. A
direct-form 8-point transform needs `cos(mπ/16)` with m from 0 to 31.
Because `cos(mπ/16) = cos((32−m)π/16)`, every such value is one of
K0..K15.

## The pipeline and the programming contract

This is the part to read before writing code for the core. The core has
**no interlocks and no stall logic**. This is deliberate. The original
designers tried a controller that resolves write-back clashes between
instructions of different depths. It became the critical path, so they
dropped it and left the ordering to the compiler. This RTL keeps that
decision.

```
IF ─ ID ─ EX1 … EXn ─ WB
          n = 3  ALU, loads, HADD            (IF→WB 6 cycles)
          n = 5  HADDAC, HADDF, HADDFAC
          n = 6  IDCT
          n = 8  MAC family                  (IF→WB 11 cycles)
```

* **IF** presents `pc` to the instruction memory (combinational read) and
  latches the word.
* **ID** decodes, reads three register ports (A, B and the accumulator
  C) plus the constant bank, and resolves branches.
* **EX** hands the instruction to its unit. Each unit is a pipeline of its
  own depth.
* **WB** is the cycle in which a unit's last register holds the result.
  The result is written to the register bank at the end of that cycle.

Rules a program must follow, where an instruction in slot *i* has depth
*n*:

1. **Data dependences.** An instruction in slot *i+n* or later may use
   the result as an R-type or memory operand. At exactly *i+n* the
   result arrives through the **bypass**: the word being written back is
   forwarded to the operands entering EX1. Later slots read it from the
   register bank, which is write-through. For a 3-stage ALU this means
   two independent instructions (or NOPs) between a producer and its
   consumer.
2. **Decode-time readers.** BEQZ, BNEZ, JR and JALR, and the four-register
   read of IDCT, read the bank in ID without the bypass. They need slot
   *i+n+1*. A register written by IDCT goes through the quad write port,
   not the bypass, so every reader needs slot *i+7*.
3. **One write-back per cycle.** Two instructions whose results reach WB
   in the same cycle collide. An example is a MAC in slot *i* and an ADD
   in slot *i+5*. The single write port keeps one result by fixed
   priority: IDCT, MAC, long HADD, HADD, load, ALU. The other result is
   lost. `wb_conflict` pulses, and a simulation assertion warns.
4. **Branches** have one delay slot. The instruction after a branch or
   jump always executes.
5. **Memory.** A store writes at the end of EX1. A later load sees it.
   A load returns its data with the ALU's depth.

The testbench package `tb/tb_prog_pkg.sv` contains a small scheduler
that follows these rules. It inserts NOPs before an instruction until
its sources are ready and its write-back slot is free. Use it as a
template for generating programs.

The status outputs are `pc`, `flag_zero` and `flag_negative` (from the
last ALU result written back), `wb_conflict`, `bypass_hit` (per operand)
and `branch_taken`.

## The IDCT datapath (`idct_core`)

This is the largest block. It implements the Arai–Agui–Nakajima flow
graph for one 8-point inverse transform. There are butterflies of
additions, and five multiplications by the constants √2, 1.847759,
1.082392 and 2.613126. There are no multipliers. Each constant is an
8-bit fraction (362, 473, 277 and 669 over 256). The product is built
as a sum of shifted copies of the input, one adder input per set bit of
the constant.

Internal values are 24 bits wide with 3 fraction bits. Outputs are
rounded and saturated to 16 bits. The six pipeline registers sit after:

1. the input butterflies;
2. the constant products;
3. the even-part correction and the odd terms;
4. the even outputs;
5. the next odd-part term;
6. the output butterflies.

The unit accepts one transform per cycle.

Register *Ri+j* carries elements 2j (high half) and 2j+1 (low half).
Like every AAN implementation, the unit expects **pre-scaled** inputs.
Input k is the coefficient F(k) times √2·cos(kπ/16), or F(0) itself for
k = 0. This factor is normally folded into dequantisation. With it, the
output is

    x(n) = F(0) + √2 · Σ_{k=1..7} F(k) · cos((2n+1)kπ/16)

This is √8 times the orthonormal 1-D iDCT. A row pass followed by a
column pass therefore gives 8 times the orthonormal 2-D transform. The
tests measure at most 1 unit of difference from real arithmetic per pass.

A 2-D block needs a transpose between the two passes. The instruction
set has no half-word move, so software builds the transpose from AND
with `0xFFFF0000`, shifts by 16 and OR. The end-to-end test shows how.

## Other blocks

* `regfile`: 32 x 32-bit registers. It has three combinational
  write-through read ports and a quad read port for R[q..q+3]. It has a
  single write port and a quad write port. R0 reads zero. Reset clears
  every register.
* `alu`: the integer operations, STAGES = 3 deep. It computes in the
  first stage and delays the result; synthesis can retime the registers.
* `simd_adder`: the HADD family, with a 3-stage output (HADD) and a
  5-stage output (the rest).
* `mac_unit`: an operand register, two 16 x 16 products, then
  shift-and-accumulate, then delay registers up to 8 stages.
* `const_bank`: the 16-entry Q15 cosine table.
* `word_ram`: a memory of DEPTH words (default 1024 x 32) addressed by
  byte address. It has two ports, both with combinational read and
  synchronous write. The top uses one as the instruction memory and one
  as the data memory. Port 2 of each goes to the host interface
  (`host_sel` 0 = instruction memory, 1 = data memory).
* `stb_risc_top`: the core plus both memories. The host loads a program
  and data while `rst_n` is low, releases reset, and reads results back.

## Where this design departs from, or fills in, the original

* **Clocking.** The original core used a two-phase non-overlapping clock.
  This RTL uses one rising edge and an active-low asynchronous reset.
* **Encoding.** Only the R-type layout, seven func codes and the LHI
  opcode are known from the original. All other encodings, the branch
  set, the delay slot and the branch timing are this design's own,
  modelled on DLX.
* **Accumulator width.** The original text mentions "32-bit
  accumulation", but its instruction definitions accumulate into 16-bit
  halves. The definitions are followed. The Q15 scaling of the products
  is this design's choice.
* **HADD low word.** One description of HADD stores the low sum in the
  high word. This is read as a slip: the low word is used, as in every
  sibling instruction.
* **Depths.** HADDF and HADDFAC have no stated depth; they use the
  5-stage path. The 3/3/5/8/6 depths of ADD, HADD, HADDAC, MAC and IDCT
  are the original's.
* **Memories.** Sizes, combinational reads and the host port are this
  design's own.
* **Bus enables.** The original core's operand buses were tri-state
  buses with enable vectors. They are modelled as plain multiplexers.
* **Speed.** The original's timing figures (FPGA clock rates, 93 000
  gates) are not reproduced. Only the cycle behaviour is.

## Simulating

Every file has one module or package. The shared package comes first:

```sh
# unit test, e.g. the IDCT core (-y rtl finds the other modules)
verilator --binary --timing --assert -y rtl rtl/risc_pkg.sv \
    tb/tb_idct_core.sv --top-module tb_idct_core -Mdir obj && ./obj/Vtb_idct_core

# whole processor, default parameters
verilator --binary --timing --assert -y rtl rtl/risc_pkg.sv tb/tb_prog_pkg.sv \
    tb/tb_stb_risc_top.sv --top-module tb_stb_risc_top -Mdir obj && ./obj/Vtb_stb_risc_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
They compute expected values independently, using integer or real
arithmetic:

* `tb_alu`, `tb_simd_adder`, `tb_mac_unit`, `tb_idct_core`: random
  operations every cycle, with exact latency checks (3 / 3 and 5 / 8 / 6).
* `tb_regfile`, `tb_word_ram`, `tb_const_bank`: reference arrays and
  the cosine formula.
* `tb_risc_core`: a generated program that covers every instruction. It
  includes the original trace sequence (`SUB` gives `FFFF0000`, `OR`
  gives `00030000`), a loop with a delay slot, JAL/JR and a deliberate
  collision. The program is checked register by register and memory
  word by memory word against a sequential reference model, and the
  fetch-to-write latencies of 6 (ALU) and 11 (MAC) cycles are checked.
* `tb_risc_core_trace`: the original basic core's trace, word for word
  and back to back, on a core with `ALU_STAGES = 1` (one result per
  cycle, IF to WB in 4 cycles). Each instruction uses the result of the
  one before, so the bypass must fire exactly where the trace shows it.
  That is operand B for ADD and SUB, and operand A for SUBU.
* `tb_stb_risc_top`: the full processor at default sizes, loaded through
  the host port. It runs a two-lane software 8-point iDCT (MACKL, MACK,
  HADD), then a complete 8 x 8 2-D iDCT (16 IDCT instructions with a
  software transpose). It counts bypass, branch, load, store, MAC, HADD,
  IDCT and collision events; each must happen at least once. The 2-D
  block takes about 450 cycles in this program. Most of that is
  loads, stores and the transpose, not the 16 IDCT issue slots.
* `tb_sdtv_block`: the standard-definition workload. It runs one
  complete 8 x 8 iDCT in software with MAC and HADD, at default sizes.
  The program is two loops of four two-lane 1-D passes in direct form
  (64 MACK/MACKL and 8 HADD per pass) with a software transpose between
  them. Every result word is checked exactly against the sequential
  model, and against real arithmetic within 56. The block takes 1122
  cycles, so the 1.736 µs budget would need about 650 MHz. The 134 MHz
  estimate above assumes a hand-scheduled AAN program of about 232
  instructions; that program is not part of this RTL.

To change a unit's depth, set `ALU_STAGES`, `HADD_STAGES`,
`HADDAC_STAGES` or `MAC_STAGES` on `stb_risc_top` or `risc_core`. The
scheduler's latencies in `tb_prog_pkg` (`LAT_*`) must follow. The IDCT
depth is fixed at 6 by the structure of `idct_core`.
