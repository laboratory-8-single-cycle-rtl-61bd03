# A 16-bit single-cycle MIPS processor, stepped by hand on an FPGA board

This is a small MIPS-style processor with 16-bit words and 16-bit
instructions. It completes every instruction in a single clock cycle: fetch,
decode and register read, ALU, data memory access and register write-back
all happen between two rising clock edges. It is meant for a teaching board
(Digilent Basys 3 pin-out). A push button advances the processor by one
instruction. Switches choose which internal datapath value appears on the
four-digit seven-segment display. The LEDs show the control signals of the
current instruction. A program can then be traced one instruction at a
time, checking every control signal and every data value.

The datapath is the classic single-cycle MIPS one, narrowed to 16 bits:

```
            +-----------------------------------------------(Jump mux)--+
            |                          +--(PCSrc mux)<-- branch target   |
            v                          |                                 |
   PC --> instruction --> main control (RegDst ExtOp ALUSrc Branch Jump  |
   |      memory      |                 MemWrite MemtoReg RegWrite ALUOp)|
   +--> PC+1          +--> register file (rs, rt) --> RD1 ----> ALU --+--> data memory --> WB mux --+
                      |     ^ write reg = RegDst ? rd : rt   RD2 -+-> ^   |   (addr = ALURes,      |
                      +--> immediate extension (ExtOp) ----> ALUSrc mux   |    wdata = RD2)        |
                            ^                                             +-------> ALURes ------->+
                            +---------------- write data WD <--------------------------------------+
```

## Instruction set

Three 16-bit formats. Fields are shown MSB first.

| format | [15:13] | [12:10] | [9:7] | [6:4] | [3] | [2:0]    |
|--------|---------|---------|-------|-------|-----|----------|
| R      | opcode  | rs      | rt    | rd    | sa  | function |
| I      | opcode  | rs      | rt    | immediate [6:0] (7 bits) ||
| J      | opcode  | target [12:0] (13 bits) |||||

There are eight registers, $0 to $7, and $0 always reads as zero. The opcode
and function numbers below are this design's own choice. Any other
assignment only needs `mips16_pkg.sv` and `main_control.sv` changed.

| opcode | instruction        | effect                                         |
|--------|--------------------|------------------------------------------------|
| 000    | R-type             | operation given by the function field          |
| 001    | addi rt, rs, imm   | rt = rs + sext(imm)                            |
| 010    | lw rt, imm(rs)     | rt = M[rs + sext(imm)]                         |
| 011    | sw rt, imm(rs)     | M[rs + sext(imm)] = rt                         |
| 100    | beq rs, rt, imm    | if rs == rt then PC = PC + 1 + sext(imm)       |
| 101    | andi rt, rs, imm   | rt = rs & zext(imm)                            |
| 110    | ori rt, rs, imm    | rt = rs \| zext(imm)                           |
| 111    | j target           | PC = {(PC+1)[15:13], target}                   |

| function | 000 | 001 | 010          | 011                | 100 | 101 | 110 | 111                 |
|----------|-----|-----|--------------|--------------------|-----|-----|-----|---------------------|
| R-type   | add | sub | sll rd=rt<<sa | srl rd=rt>>sa (logical) | and | or  | xor | sra rd=rt>>>sa (arithmetic) |

The shift amount `sa` is one bit, so a shift moves by 0 or 1 position.

### Word addressing

Both memories are addressed in 16-bit words, not bytes. This is the main
difference from the familiar 32-bit single-cycle datapath:

* the next sequential PC is **PC + 1**, not PC + 4;
* the branch target is **PC + 1 + sext(imm)**. The offset is not shifted left
  by 2;
* the jump address is **(PC+1)[15:13] concatenated with target[12:0]**. The
  16-bit form keeps the top 3 bits of PC + 1 and has no trailing `00`.

## Control

`main_control` decodes only the opcode. ALUOp (3 bits) tells the ALU control
inside `ex_unit` whether to use the function field (R-type) or a fixed
operation.

| instr | RegDst | ExtOp | ALUSrc | Branch | Jump | MemWrite | MemtoReg | RegWrite | ALUOp       |
|-------|:------:|:-----:|:------:|:------:|:----:|:--------:|:--------:|:--------:|-------------|
| R     | 1      | 0     | 0      | 0      | 0    | 0        | 0        | 1        | 000 R-type  |
| addi  | 0      | 1     | 1      | 0      | 0    | 0        | 0        | 1        | 001 add     |
| lw    | 0      | 1     | 1      | 0      | 0    | 0        | 1        | 1        | 001 add     |
| sw    | 0      | 1     | 1      | 0      | 0    | 1        | 0        | 0        | 001 add     |
| beq   | 0      | 1     | 0      | 1      | 0    | 0        | 0        | 0        | 010 sub     |
| andi  | 0      | 0     | 1      | 0      | 0    | 0        | 0        | 1        | 011 and     |
| ori   | 0      | 0     | 1      | 0      | 0    | 0        | 0        | 1        | 100 or      |
| j     | 0      | 0     | 0      | 0      | 1    | 0        | 0        | 0        | 001 (unused)|

For beq the ALU subtracts, so Zero means RF[rs] == RF[rt]. The branch is
taken when **PCSrc = Branch AND Zero**. The next PC goes through two
multiplexers in series. PCSrc first chooses between PC + 1 and the branch
target, then Jump chooses between that result and the jump address. Jump
therefore wins.

## Timing: one instruction per enabled clock

Everything between the PC and the write ports is combinational. The
instruction memory, register file reads and data memory read are all
asynchronous. Three things change state on a rising clock edge:

* the PC;
* the register file write (RegWrite);
* the data memory write (MemWrite).

All three are qualified by a single step enable `en`. With `en` tied high
the processor runs one instruction per clock. On the board, `en` comes from
a mono pulse generator (`mpg`) on button 0, so each press executes exactly
one instruction. That includes its register or memory write. Nothing
changes between presses, so the display shows a stable picture of the
instruction about to execute:

* its fields and operands;
* the ALU result;
* the data memory word at the ALU address;
* the write-back value.

A pulse from button 1, through a second `mpg`, synchronously resets the PC
to 0 and clears the registers. The data memory is not reset. It starts at
all zeros when the FPGA is configured.

## Board interface (`test_env`, the top)

| port       | use |
|------------|-----|
| `btn[0]`   | step one instruction (debounced, one pulse per press) |
| `btn[1]`   | reset PC and registers |
| `sw[7:5]`  | display: 000 instruction, 001 PC+1, 010 RD1, 011 RD2, 100 Ext_Imm, 101 ALURes, 110 MemData, 111 WD |
| `sw[0]`    | LEDs: 0 shows `led[7:0]` = RegDst, ExtOp, ALUSrc, Branch, Jump, MemWrite, MemtoReg, RegWrite (bit 7 first); 1 shows ALUOp on `led[2:0]` |
| `an[3:0]`  | digit anodes, active low; `an[0]` is the rightmost digit (bits 3:0) |
| `cat[6:0]` | segments a..g, active low |
| others     | `btn[4:2]`, `sw[15:8]`, `sw[4:1]` unused; `led[15:8]` always 0 |

The mono pulse generator samples the button once every 2^`MPG_CNT_W`
clocks, which rejects contact bounce shorter than that. It emits a single
one-clock pulse, two samples after the button is first seen pressed. The
display driver lights one digit at a time, each for 2^(`SSD_CNT_W`-2)
clocks. At 100 MHz with the default 16-bit counters, that is a 0.66 ms
debounce sample period and a 1.5 kHz refresh per digit.

### Parameters

| parameter   | default | meaning |
|-------------|---------|---------|
| `MPG_CNT_W` | 16      | debounce sampling counter width |
| `SSD_CNT_W` | 16      | display refresh counter width |
| `IMEM_AW`   | 8       | instruction memory: 2^8 = 256 words. The PC's upper bits are ignored, so addresses wrap. |
| `DMEM_AW`   | 8       | data memory: 2^8 = 256 words, addressed by ALURes[7:0]. Upper address bits are ignored. |

Register count (8) and word width (16) follow from the instruction formats
and are fixed.

## The built-in program

`mips16_program_pkg.sv` holds the program, which uses every instruction.
The instruction memory is built from it at elaboration. The program:

1. writes the first eight Fibonacci numbers to data words 0..7. This uses a
   loop with sw, add, or and addi. Its exit beq is not taken seven times and
   then taken once, and it closes with `j`.
2. reads the eight words back with lw and adds them up.
3. stores the sum, 33, at word 10 with a non-zero offset, then loads it
   again.
4. runs sub, sll, srl, sra, xor, and, andi (zero-extended 0x7F), ori and
   addi -1 (sign-extended).
5. parks in `beq $0,$0,-1` at word 29.

Its final state is:

* mem[0..7] = 0,1,1,2,3,5,8,13 and mem[10] = 33;
* $1 = 0x007F, $2 = 0x0055, $3 = $4 = $5 = 0xFFFF, $6 = 0x8000, $7 = 0x0021.

It reaches the halt loop at its 116th instruction.

To run a different program, edit `prog_word()` in that package. The helpers
`enc_r`, `enc_i` and `enc_j` assemble the words.

## Source files

RTL (`rtl/`), bottom-up:

| file | contents |
|------|----------|
| `mips16_pkg.sv` | word type, opcode/function/ALUOp enums, control struct `ctrl_t`, debug struct `dbg_t`, field extractors |
| `mips16_program_pkg.sv` | the program and the instruction encoders |
| `instr_mem.sv` | ROM, asynchronous read |
| `ifetch.sv` | PC, PC + 1, PCSrc and Jump multiplexers, instruction memory |
| `reg_file.sv` | 8 x 16 registers, two asynchronous read ports, one synchronous write port, $0 = 0 |
| `ext_unit.sv` | 7-to-16-bit immediate extension, sign or zero by ExtOp |
| `idecode.sv` | field split, register file, RegDst multiplexer, extension unit |
| `main_control.sv` | opcode to control signals |
| `alu_control.sv` | ALUOp and function field to ALU operation |
| `alu.sv` | add, sub, and, or, xor, sll, srl, sra; Zero flag |
| `ex_unit.sv` | ALU control, ALUSrc multiplexer, ALU, branch adder |
| `mem_unit.sv` | data memory (asynchronous read, synchronous write), ALURes passed on |
| `wb_unit.sv` | MemtoReg multiplexer |
| `pc_control.sv` | PCSrc = Branch AND Zero, jump address |
| `mips16_cpu.sv` | the processor: all of the above wired together, with a step enable |
| `mpg.sv` | button debouncer / mono pulse generator |
| `ssd.sv` | four-digit hexadecimal display driver |
| `debug_mux.sv` | switch-selected display value and LED pattern |
| `test_env.sv` | top level for the board |

The processor core (`mips16_cpu`) has no board dependencies. It can be used
on its own with `en` tied high. Its `dbg` output carries every datapath
value shown on the board, plus the branch and jump targets, PCSrc and Zero.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb/mips16_ref_pkg.sv` is an instruction-level reference model. It decodes
the bits directly and shares no RTL. The two system-level tests compare
against it:

* `tb_mips16_cpu` runs the program with the enable mostly high. Every
  seventh cycle it is low, to check that state holds. The test compares all
  datapath values and control signals before each step. It also checks:
  * one instruction per enabled cycle (the halt is the 116th instruction);
  * the final memory and registers;
  * that every opcode, every function and both branch outcomes occurred.
* `tb_test_env` (4-bit counters, about 2 s) and `tb_test_env_full` (default
  parameters, about a minute) drive only the board pins. Both run the
  instructions one button press at a time. Before each press, they read all
  eight display selections back from the multiplexed segment and anode
  waveforms and check both LED modes. After the program halts, they reset
  in mid-run and execute twelve more instructions. They also count each
  mechanism: steps, resets, every instruction, taken and untaken branches,
  every display and LED selection. A mechanism that never happened counts
  as a failure. Both share `test_env_harness.sv`.

Simulate with Verilator, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/mips16_pkg.sv rtl/mips16_program_pkg.sv tb/mips16_ref_pkg.sv \
  tb/tb_test_env.sv --top-module tb_test_env -o sim && obj_dir/sim
```

Use the same command for any other testbench: pass the packages first,
then the testbench file, and name its module as the top.

## What follows the reference datapath, and what is this design's own

These follow the standard single-cycle MIPS datapath that this design is
based on:

* the unit partition: IF, ID, main control, EX, MEM, WB;
* the set and meaning of the control signals;
* the 16-bit instruction formats;
* the data memory behaviour: asynchronous read, synchronous write, writes
  validated by the step pulse;
* the write-back multiplexer;
* PCSrc = Branch AND Zero;
* the jump-address construction;
* the eight display selections and the two LED modes.

These are this design's own choices, where no reference was available:

* the opcode and function encodings, and the 3-bit ALUOp coding;
* the ALU's behaviour for j, whose result is unused;
* the memory sizes (256 words each);
* $0 reading as zero;
* the reset button and the synchronous register reset;
* the LED order of the control signals;
* the construction of the debouncer and of the display driver;
* the test program.

The reference datapath is drawn for 32-bit byte-addressed MIPS. The
word-addressed forms of the branch target and jump address used here are
the natural 16-bit reduction of it, not a transcription.

Known limitations:

* Memory addresses use only the low 8 bits. A larger address wraps, and
  does not fault.
* The 13-bit jump target can name 8192 words, but only 256 exist by
  default.
* The button inputs are not synchronised to the clock beyond the
  debouncer's sampling flop.
