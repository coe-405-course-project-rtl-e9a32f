# risc16 — a 16-bit MIPS-like processor, single-cycle

This is a small load/store processor in the spirit of MIPS, cut down to
16 bits. It has:

- seven 16-bit general registers, R1–R7, with R0 fixed at zero;
- a 12-bit program counter;
- 16-bit instructions in three formats;
- separate instruction and data memories of 4096 words each, addressed by
  word.

Thirty instructions cover arithmetic, logic, shifts and rotates,
compare-and-set, loads and stores, six conditional branches, jumps, and
a call/return pair (JAL/JR). So ordinary procedures work, with the stack
kept in software at the top of data memory.

The implementation is a single-cycle datapath. Each clock edge retires one
instruction: fetch, register read, ALU or memory, and write-back all happen
within the cycle.

## Instruction formats

```
R-type   | op(4) | rs(3) | rt(3) | rd(3) | funct(3) |   op = 0 or 1
I-type   | op(4) | rs(3) | rt(3) |     imm6         |   op = 2..12
J-type   | op(4) |          imm12                   |   op = 13..15
bit       15  12  11   9   8   6   5   3   2      0
```

| op | funct | instr | effect |
|----|-------|-------|--------|
| 0 | 0–7 | ADD SUB AND OR NOR XOR SLT SLTU | Rd ← Rs op Rt (SLT signed, SLTU unsigned; result 1/0) |
| 1 | 0–4 | SLL SRL SRA ROL ROR | Rd ← Rs shifted/rotated by Rt[3:0] |
| 1 | 5 | LW | Rt ← Mem[Rs] |
| 1 | 6 | SW | Mem[Rs] ← Rt |
| 1 | 7 | JR | PC ← Rs[11:0] |
| 2–6 | – | ADDI ANDI ORI SLTI SLTIU | Rt ← Rs op sext(imm6) |
| 7–12 | – | BEQ BNE BLTZ BLEZ BGTZ BGEZ | if cond: PC ← PC + sext(imm6) |
| 13 | – | J | PC ← imm12 |
| 14 | – | JAL | R7 ← PC+1; PC ← imm12 |
| 15 | – | LUI | R1 ← imm12 << 4 |

To load a full 16-bit constant, use LUI followed by ORI or ADDI on R1. A
program ends by branching to itself (`BEQ R0,R0,0`).

### How the ambiguous corners are decided

The instruction set as originally specified leaves some points open or
states them in two ways. This RTL decides them as follows. Change
`control_unit.sv` and `next_pc.sv` if your software expects otherwise.

- **Branch offsets count from the branch itself.** The target is
  `PC + sext(imm6)`, not `PC + 1 + sext(imm6)`. So offset 0 is a
  self-loop, which is how programs halt. The reach is −32…+31 words.
- **Every immediate is sign-extended**, including those of ANDI, ORI and
  SLTIU. So `ANDI Rt,Rs,-1` keeps all 16 bits, and `SLTIU` compares against
  the sign-extended value taken as unsigned. A zero-extending variant would
  change one line in `datapath.sv`, but it would then also apply to ADDI and
  SLTI. Such a variant needs a per-instruction select in the control word.
- **LW writes Rt**, following its meaning `Rt ← Mem[Rs]`. The Rd field of
  an LW is ignored.
- **ROL and ROR write Rd**, exactly like the three shifts.
- **SLTI and SLTIU write Rt.** I-type has no Rd field.
- **The branch tests against zero read only Rs.** BLTZ, BLEZ, BGTZ and
  BGEZ treat Rs as signed and ignore the Rt field.
- **Memory addressing has no offset.** LW and SW use `Rs[11:0]` as the
  word address.
- **JAL's link value is zero-extended.** JAL writes `{4'b0, PC+1}` to R7.
- **Addresses wrap.** PC arithmetic is modulo 4096.

## Datapath

```
            +-----------+   instr   +--------------+  ctrl_t
  PC ------>|   imem    |---------->| control_unit |---------+
  ^         +-----------+  op,funct +--------------+         |
  |                |  rs rt rd imm6 imm12                    v
  |          +-----v-----+ rs_val  +-----+  alu_y  +-----+  wb mux: ALU / Mem /
  |          |  regfile  |-------->| alu |-------->|dmem |  PC+1 / imm12<<4
  |          |  R0..R7   |-rt_val->|     |         |     |----> regfile write
  |          +-----------+  (or    +-----+  Rs=addr+-----+
  |                |       sext imm6)        Rt=wdata
  |          +-----v-----+
  +----------|  next_pc  |  PC+1 | PC+sext(imm6) if cond | imm12 | Rs[11:0]
             +-----------+
```

- **`regfile`**: two combinational read ports (Rs, Rt) and one write port
  clocked at the rising edge. Writes to R0 are dropped, and R0 reads as 0.
- **`alu`**: a combinational unit with thirteen operations. Shifts and
  rotates use only `B[3:0]` as the amount. Operand B is Reg(Rt) for R-type
  and the sign-extended immediate for I-type.
- **`next_pc`**: forms PC+1, the branch target, the jump target and the JR
  target. It also evaluates the branch condition itself, from Rs and Rt.
  That is why the ALU needs no zero or sign flags. `taken` is brought out
  for observation.
- **`imem` / `dmem`**: word arrays with combinational read and synchronous
  write. They synthesise as memory cells. On an FPGA with only
  synchronous-read block RAM, a single-cycle design needs either
  distributed RAM or a clock phase split. No such split is built here.
- **Destination**: Rd (R-type), Rt (I-type, LW), R1 (LUI) or R7 (JAL).

With combinational memories, the critical path of one cycle runs:
PC → instruction memory → register read → ALU (or address) → data memory
→ write-back mux → register-file setup.

## Control word

`control_unit` decodes `op` and `funct` into `risc16_pkg::ctrl_t`, with one
word per instruction:

| field | meaning |
|-------|---------|
| `reg_write` | write the register file |
| `dst_sel` | `DST_RD`, `DST_RT`, `DST_R1`, `DST_R7` |
| `alu_src_imm` | ALU B operand is sext(imm6) |
| `alu_op` | one of 13 ALU operations |
| `wb_sel` | `WB_ALU`, `WB_MEM`, `WB_PC1`, `WB_LUI` |
| `mem_write` | store Rt at Mem[Rs] |
| `pc_sel` | `PC_SEQ`, `PC_BRANCH`, `PC_JUMP`, `PC_JR` |
| `br_cond` | `EQ NE LTZ LEZ GTZ GEZ` |

All 16 opcodes and all 8 function codes under opcodes 0 and 1 are defined.
So every 16-bit word is a legal instruction. There is no illegal-instruction
trap.

## Using the processor (`risc16_cpu`)

1. Hold `rst` high. Reset is synchronous and active high. It sets PC to 0
   and clears R1–R7. Memory contents are not reset.
2. Write the program, one word per clock, through
   `imem_load_we/addr/data`. Write the data segment through
   `dmem_host_we/addr/wdata`.
3. Drop `rst`. Execution starts at address 0, one instruction per cycle.
4. When the program reaches its self-loop, raise `rst` again and read the
   results through `dmem_host_addr` → `dmem_host_rdata`. This read is
   combinational.

The outputs `pc`, `instr`, `wb_en/wb_reg/wb_data`,
`mem_we/mem_addr/mem_wdata` and `br_taken` describe the instruction of the
current cycle. That instruction takes effect at the next rising edge. They
exist for tracing and lockstep checking.

The memory sizes are parameters: `IMEM_AW` and `DMEM_AW`, both 12 by
default. Making them larger than 12 gains nothing, since PC and Rs-based
addresses are 12 bits.

### Not included

The intended demonstration system is a calculator quiz. It shows two random
two-digit numbers and + or − on an LCD, reads the user's answer from a
keypad, and reports "Correct" or "Incorrect". No LCD controller or keypad
scanner is included, and the processor has no I/O port for them. How they
would attach (memory-mapped addresses, a port, or a handshake) is left
open. A natural extension is to decode a few high data-memory addresses as
device registers in `datapath.sv`.

## Files

| file | contents |
|------|----------|
| `rtl/risc16_pkg.sv` | widths, opcodes, function codes, ALU ops, `ctrl_t` |
| `rtl/alu.sv` | ALU |
| `rtl/regfile.sv` | register file |
| `rtl/next_pc.sv` | next-PC and branch-condition logic |
| `rtl/imem.sv`, `rtl/dmem.sv` | instruction and data memories |
| `rtl/control_unit.sv` | decoder |
| `rtl/datapath.sv` | PC register and wiring of the units above |
| `rtl/risc16_cpu.sv` | top: control unit + datapath |
| `tb/risc16_asm_pkg.sv` | instruction encoders, reference decoder and reference instruction model for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Each also has a watchdog that counts a failure if the test hangs.

- **`tb_alu`**: corner cases plus 4000 random operations against a
  bit-by-bit reference for shifts and rotates.
- **`tb_regfile`**: reset, R0 behaviour, write enable, and random traffic
  against a shadow copy.
- **`tb_next_pc`**: every PC source and branch condition with random
  operands, plus wrap-around.
- **`tb_imem`, `tb_dmem`**: all 4096 words, the scrambled read order, and
  the port collision rule.
- **`tb_control_unit`**: all 128 op/funct pairs against a reference decoder
  written separately from the RTL.
- **`tb_datapath`**: the datapath alone, driven by the reference decoder.
  Memory is filled with random words and the datapath runs in lockstep
  with a reference instruction model. PC, register writes and memory
  writes are compared every cycle.
- **`tb_risc16_cpu`**: the whole processor at its default size. It runs
  two parts:
  - **Selection sort.** A main loop calls a Max procedure by JAL/JR and
    swaps the largest of `A[0..i]` into `A[i]`, sorting an 8-word signed
    array at data address 0. It runs on one fixed array and three random
    ones. The result is compared with a reference sort. The cycle count
    to reach the halt loop must equal the number of instructions the
    reference executed, which is about 250.
  - **Random programs.** Eight random-program runs of 2000 cycles each,
    in lockstep with the reference model.
  - **Coverage.** The test counts every instruction, each branch both taken
    and not taken, writes aimed at R0, and JAL→JR returns. It fails if any
    of these never occurs.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/risc16_pkg.sv tb/risc16_asm_pkg.sv tb/tb_risc16_cpu.sv \
    --top-module tb_risc16_cpu -o sim
./obj_dir/sim
```

Verilator lint (`--lint-only -Wall`) reports only unused-parameter
warnings. They come from package constants that a given module does not
use.
