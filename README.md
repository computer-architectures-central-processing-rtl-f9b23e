# A single-cycle RISC-V CPU and two classic control units

The main design here is the textbook single-cycle processor: a RISC-V core
that executes a small subset of RV32I, in which every instruction is fetched,
decoded, executed and written back within one clock period. There is no
pipeline, no stall and no hazard logic. The cost of this simplicity is the
clock period, which must cover the slowest instruction (`lw`). Its control unit
is a purely combinational table. Next to the core are two control units of
the older, sequential kind, written as separate designs: a hardwired unit with
one flip-flop per state, and a horizontal microprogrammed unit. A small
combinational block decodes the RISC-V instruction-length rule.

The design follows the CPU lecture of the Computer Architectures course
(CTU Prague, after Patterson and Hennessy). The lecture draws the datapath,
lists the instructions, gives the instruction formats and names the control
signals. Encodings, widths, sizes and the datapath for `lui`, `auipc`, `jal`
and `jalr` are this design's own, and the section on departures below lists
them.

## Instruction subset

| instruction           | effect                                              |
|-----------------------|-----------------------------------------------------|
| `lw rd, imm(rs1)`     | rd ← Mem[rs1 + imm]                                 |
| `sw rs2, imm(rs1)`    | Mem[rs1 + imm] ← rs2                                |
| `add/sub/and/or/slt`  | rd ← rs1 op rs2 (`slt` is signed)                   |
| `addi/andi/ori`       | rd ← rs1 op imm                                     |
| `lui rd, imm20`       | rd ← imm20 << 12                                    |
| `auipc rd, imm20`     | rd ← PC + (imm20 << 12)                             |
| `beq rs1, rs2, off`   | if rs1 == rs2 then PC ← PC + off                    |
| `jal rd, off`         | rd ← PC + 4; PC ← PC + off                          |
| `jalr rd, rs1, imm`   | rd ← PC + 4; PC ← (rs1 + imm) with bit 0 cleared    |

The encodings are the standard RV32I ones, so code from a RISC-V assembler
runs as long as it stays inside the subset. All immediates are sign-extended.
Any other encoding asserts `illegal` and is executed as a no-op: nothing is
written and the PC advances by 4. No trap is taken. Shifts and `bne` are not
in the subset, so programs must be written without them. `ebreak` is not in
the subset either; the testbenches use it as an end-of-program marker that
shows up on `illegal`.

## Datapath: one instruction per clock

```
            +-----+   Instr   +--------------+ RD1  SrcA  +-----+ AluOut  +-----------+
 PC' -----> | PC  |--+------> | Reg. file    |----[mux]-->|     |----+--->| Data mem  |-- ReadData
            +-----+  |  imem  | A1=[19:15]   |  PC / 0    | ALU |    |    | A, WD=RD2 |
                     |        | A2=[24:20]   | RD2        |     |    |    +-----------+
                     |        | A3=[11:7]    |----[mux]-->|     |    |
                     |        +--------------+  SignImm   +-----+    +--> Result mux:
                     |        Imm decode --> SignImm                      AluOut / ReadData / PC+4
                     +--> PC+4,  PC+SignImm (PCBranch)
```

All state changes happen at the same rising edge: the PC takes PC', the
register file writes `Result` into `rd` when RegWrite = 1, and the data
memory stores RD2 when MemWrite = 1. Everything between two edges is
combinational.

- **Fetch.** The PC addresses the instruction memory and returns the word
  at once (a combinational read). PC + 4 is always computed.
- **Decode.** The register numbers are fixed bit fields of the instruction:
  rs1 is [19:15], rs2 is [24:20] and rd is [11:7]. The register file reads
  rs1 and rs2 combinationally. `imm_decode` assembles the I, S, B, U or J
  immediate. It takes the sign from bit 31 in every format. The control unit
  decodes `opcode`, `funct3` and `funct7` into the control word.
- **Execute.** ALU operand A is rs1, or the PC for `auipc`, or zero for
  `lui`. Operand B is rs2, or SignImm when ALUSrc = 1. The ALU adds,
  subtracts, ands, ors or compares (signed). Its Zero output is used only by
  `beq`, which subtracts the two registers.
- **Memory.** AluOut is the data address. Memory accesses are whole,
  aligned 32-bit words.
- **Write-back.** The Result multiplexer selects one of three values:
  AluOut, ReadData (`lw`) or PC + 4 (`jal`, `jalr`).
- **Next PC.** The next PC is one of:
  - PC + 4 by default;
  - PC + SignImm for `jal`, and for `beq` when Zero is set;
  - AluOut with bit 0 cleared for `jalr`.

The longest path belongs to `lw`: PC register → instruction memory → register
read → ALU → data memory → result multiplexer → register setup. With the
example delays of the lecture (30 + 300 + 150 + 200 + 300 + 20 + 20 ns =
1020 ns) this allows about 980 kHz. The RTL does not model delays.

### Control table

`control_unit` is a combinational table that covers one instruction per
clock. Its output is `rv_pkg::ctrl_t`:

| instr  | ALUSrc | SrcA | ALUControl | Imm | MemWrite | MemToReg | PC4ToReg | RegWrite | Beq | Jal | Jalr |
|--------|:-:|:----:|:---:|:-:|:-:|:-:|:-:|:-:|:-:|:-:|:-:|
| lw     | 1 | rs1  | add | I | 0 | 1 | 0 | 1 | 0 | 0 | 0 |
| sw     | 1 | rs1  | add | S | 1 | 0 | 0 | 0 | 0 | 0 | 0 |
| add    | 0 | rs1  | add | – | 0 | 0 | 0 | 1 | 0 | 0 | 0 |
| sub    | 0 | rs1  | sub | – | 0 | 0 | 0 | 1 | 0 | 0 | 0 |
| slt    | 0 | rs1  | slt | – | 0 | 0 | 0 | 1 | 0 | 0 | 0 |
| or/and | 0 | rs1  | or/and | – | 0 | 0 | 0 | 1 | 0 | 0 | 0 |
| addi/ori/andi | 1 | rs1 | add/or/and | I | 0 | 0 | 0 | 1 | 0 | 0 | 0 |
| beq    | 0 | rs1  | sub | B | 0 | 0 | 0 | 0 | 1 | 0 | 0 |
| jal    | – | –    | –   | J | 0 | 0 | 1 | 1 | 0 | 1 | 0 |
| jalr   | 1 | rs1  | add | I | 0 | 0 | 1 | 1 | 0 | 0 | 1 |
| lui    | 1 | zero | add | U | 0 | 0 | 0 | 1 | 0 | 0 | 0 |
| auipc  | 1 | PC   | add | U | 0 | 0 | 0 | 1 | 0 | 0 | 0 |

### Memories and program loading

Instructions and data are kept in separate memories (a Harvard
organisation). Each holds 1024 words (4 KiB) by default and is indexed by
address bits [11:2]; the higher address bits are ignored, so addresses wrap.
Reads are combinational. The data memory is written at the rising edge when
WE = 1.

From the CPU's side, the instruction memory is read-only. To place a program
in it, hold `rst_n` low and write the words through the load port
(`imem_load_we`, `imem_load_addr`, `imem_load_data`). Release `rst_n` when
loading is done. Reset has three effects:
- the PC is set to `RESET_PC` (0x200);
- x1 to x31 are cleared;
- stores are blocked, so whatever instruction sits at the PC cannot write
  memory while a program is loaded.

The data memory has no reset. x0 always reads as zero, and writes to it are
dropped.

## The one-flip-flop-per-state control unit (`onehot_fetch_cu`)

A hardwired control unit can give each step of its sequence its own
flip-flop. A single 1 (the token) moves along the chain, and each control
line is the OR of the states that assert it. The unit built here is the
instruction-fetch part of such a chain:

| state | asserts           | next                                          |
|-------|-------------------|-----------------------------------------------|
| M1    | PCA               | M2                                            |
| M2    | PCA, MR, WIR1     | M2 while WAIT = 1, otherwise M3               |
| M3    | PC INC            | leaves on `exit_i1b` (I1B) or `exit_n_i1b`    |

`start` puts the token into M1. A fetch takes 3 clocks plus one for every
clock that WAIT is high. The inputs `pca_ext`, `mr_ext` and `pc_inc_ext` are
the remaining states of a full control unit; they drive the same lines.
Reset removes the token. The signal names are those of the source example;
reading them as "PC to address bus", "memory read", "write instruction
register byte 1" and "one-byte instruction" is an interpretation. The states
that follow the two exits are not specified, so only this fragment exists.

## The horizontal microprogrammed control unit (`microprog_cu`)

This unit is a small computer inside the CPU. CMIAR, the micro-PC, addresses
a microcode memory, and the addressed microinstruction drives the control
lines directly. A microinstruction has these fields, most significant first:

```
| internal CPU control (16) | system bus control (4) | jump condition (3) | next address (8) |
```

The next CMIAR is chosen by the jump-condition field:

| code | condition    | next CMIAR                                        |
|------|--------------|---------------------------------------------------|
| 0    | step         | CMIAR + 1                                         |
| 1    | unconditional| address field                                     |
| 2    | Zero         | address field if `flag_zero`, else CMIAR + 1      |
| 3    | Overflow     | address field if `flag_ovf`, else CMIAR + 1       |
| 4    | Indirect bit | address field if `flag_ind`, else CMIAR + 1       |
| 5    | dispatch     | `opcode_in * 4`; `opcode_in` is also stored in the operation code register |
| 6, 7 | (unused)     | CMIAR + 1                                         |

The microcode memory is writable: it is loaded through `ucode_we`,
`ucode_addr` and `ucode_data` while the unit is held in reset. Reset sets
CMIAR to 0, which is therefore where the fetch routine starts. The outputs
follow CMIAR combinationally, and CMIAR changes at the rising edge. Codes 0
and 5, all field widths and the ×4 dispatch mapping are choices of this
design.

## Instruction length decoder (`insn_length_decoder`)

RISC-V makes the length of an instruction readable from its first 16-bit
parcel, so that a fetch unit can find instruction boundaries before it
decodes anything else. The block takes that parcel and returns the length in
bits:

| low bits of the parcel          | length               |
|---------------------------------|----------------------|
| `aa` with `aa` != `11`          | 16                   |
| `bbb11` with `bbb` != `111`     | 32                   |
| `011111`                        | 48                   |
| `0111111`                       | 64                   |
| `nnn` in bits 14:12, `1111111`  | 80 + 16·nnn (nnn != 111) |
| `111` in bits 14:12, `1111111`  | reserved (192 bits or more) |

For the reserved space `len_bits` is 0 and `reserved` is 1. The CPU above
executes only 32-bit instructions, so the decoder is not in its fetch path.
It is a separate, purely combinational block.

## Top level

`cpu_lecture_top` places the four designs side by side. They share only
`clk`. Their ports are prefixed `cpu_`, `ohc_`, `upc_` and `ild_`. Each
clocked design has its own reset, so that the CPU and the microprogrammed
unit can be held in reset while they are loaded.

## Departures from the source and choices made here

- **`lui` opcode.** The lecture's opcode table gives `0000111` for `lui`.
  That value is not the RISC-V `lui` opcode. The standard `0110111` is used,
  and `auipc` uses the standard `0010111`.
- **`add` encoding.** The encoding line printed for `add` has the wrong
  funct3 and opcode. The standard encoding, which matches its example word
  `0x00310233`, is used.
- **Datapath for `lui`, `auipc`, `jal` and `jalr`.** The lecture lists
  these instructions but does not draw their datapath. This design adds:
  - an operand-A multiplexer (rs1 / PC / zero);
  - a PC + 4 input on the result multiplexer;
  - a `jalr` target taken from the ALU sum.
- **`jalr` target.** Bit 0 of the `jalr` target is cleared, as the RISC-V
  specification requires.
- **Immediate operations.** Only `addi`, `andi` and `ori` are decoded.
  Other ALU-immediate encodings are illegal.
- **Control encodings.** The ALUControl encoding and the other select
  encodings are this design's own, defined in `rv_pkg`.
- **Unsupported instructions.** They are executed as no-ops that raise
  `illegal`. There is no exception or interrupt mechanism.
- **Reset, sizes and program loading.** The reset value 0x200, the
  memory sizes, the program-load port and the synchronous active-low resets
  are this design's choices.
- **Not built.** Three control-unit examples from the source are not
  built:
  - the counter-based control unit, which is given only as a concept;
  - the multicycle MIPS control logic, which is given only as a PLA drawing
    for another datapath;
  - vertical microinstructions, whose field codes are not given.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.
Two assertions in the RTL are checked during every simulation:
- the one-flip-flop-per-state unit never holds more than one token;
- an illegal instruction never writes a register or memory.

- `tb_alu`, `tb_imm_decode`, `tb_control_unit`: directed and random vectors
  against independent reference code. The known instruction words are
  `lw x2,0x400(x0)` = `0x40002103`, `sw x2,0x404(x5)` = `0x4022a223` and
  `add x4,x2,x3` = `0x00310233`.
- `tb_reg_file`, `tb_pc_reg`, `tb_instr_mem`, `tb_data_mem`: random
  accesses against models. These also check that writes take effect only at
  the clock edge and only when enabled, and that x0 stays zero.
- `tb_riscv_single_cycle`: programs run in lockstep with an
  instruction-level model (`tb/rv_ref.svh`). After every clock the PC and
  all registers must match, which proves one instruction per clock. Three
  programs run:
  - a directed program that uses every instruction and both outcomes of
    `beq`;
  - floor(log2(157)) = 7, which takes 47 instructions in 47 clocks. This is
    the lecture's example loop, rewritten without `srli` and `bne`: it
    doubles p until p > n;
  - the compiler's machine code for the original shift loop. Its `srli`
    and `bne` are outside the subset, so they must raise `illegal` and
    change nothing.
- `tb_onehot_fetch_cu`: random WAIT lengths and I1B values, with each state
  and each output checked every clock.
- `tb_microprog_cu`: random microcode and flags against a reference
  sequencer.
- `tb_insn_length_decoder`: all 65536 parcels against a reference written
  from the bit patterns.
- `tb_cpu_lecture_top`: runs all four designs at their default parameters.
  The length decoder gets the first parcel of every CPU program word, which
  must decode as 32-bit, and random parcels. The testbench counts every
  mechanism and fails if any never happens: `beq` taken and not taken,
  `jal`, `jalr`, `lw`, `sw`, an illegal instruction, a WAIT stall, both
  fetch exits, each jump condition both ways, dispatch, and every
  instruction length including the reserved one.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rv_pkg.sv tb/tb_cpu_lecture_top.sv --top-module tb_cpu_lecture_top
./obj_dir/Vtb_cpu_lecture_top
```

Replace the name to run another testbench. `tb/rv_asm.svh` encodes
instructions, so new test programs can be written as lists of calls such as
`addi(1, 0, 157)` (see `tb/rv_programs.svh`).
