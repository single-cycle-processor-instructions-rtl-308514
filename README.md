# An 8-bit single-cycle load/store processor

This is a small teaching-style processor that completes one instruction in
every clock cycle. It has separate instruction and data memories (a Harvard
organisation), four 8-bit data registers A, B, C and D, and a 16-bit
instruction word. Only `ld` and `st` touch data memory; all arithmetic works
register to register. Instructions come from a constant ROM. A sequencer
runs a chosen stretch of that ROM: give it a start address and an
instruction count, and it steps through those instructions one per clock.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). It passes lint in
Verilator 5 (`-Wall`) and elaborates in the slang front end of Yosys.

## Instruction set

Every instruction is one 16-bit word with five fixed fields:

| bits    | 15:12  | 11:10 | 9:8   | 7:6   | 5:0       |
|---------|--------|-------|-------|-------|-----------|
| field   | opcode | Reg 1 | Reg 2 | W Reg | immediate |

Register codes: `00` = A, `01` = B, `10` = C, `11` = D.

| opcode | mnemonic | effect                            |
|--------|----------|-----------------------------------|
| 0000   | or       | W ← Reg1 \| Reg2                  |
| 0001   | and      | W ← Reg1 & Reg2                   |
| 0010   | nor      | W ← ~(Reg1 \| Reg2)               |
| 0011   | nand     | W ← ~(Reg1 & Reg2)                |
| 0100   | add      | W ← Reg1 + Reg2 (mod 256)         |
| 0101   | sub      | W ← Reg1 − Reg2 (mod 256)         |
| 0110   | slt      | W ← 1 if Reg1 < Reg2, else 0      |
| 1000   | ld       | W ← MEM[Reg1]                     |
| 1001   | st       | MEM[Reg1] ← Reg2                  |
| 1100   | ldi      | W ← immediate                     |
| 1111   | nop      | nothing                           |

The assembler writes zeros into any field an instruction does not use, and
the hardware ignores those fields. Examples:

* `sub RA, RB, RC`: `0101 00 01 10 000000`, so C ← A − B.
* `st RB, RC`: `1001 01 10 00 000000`, so MEM[B] ← C.
* `ldi RD, imm`: `1100 00 00 11 iiiiii`.

Points to know when writing programs:

* **The immediate is 6-bit two's complement.** Its range is −32 to 31, and
  it is sign-extended to 8 bits. So a field of `100100` loads 0xE4, not
  0x24. If you want zero extension, set the decoder parameter
  `IMM_SIGNED = 0`. To load any byte, build it in steps, for example
  `ldi r,k; add r,r,r; add r,r,r; ldi s,j; add r,s,r` gives 4k + j.
* **`slt` is a signed comparison.** It uses two's complement, so
  0xE0 (−32) < 0x12. It writes 1 or 0 into W Reg, like the other arithmetic
  instructions.
* **Unassigned opcodes execute as `nop`.** These are 0111, 1010, 1011, 1101
  and 1110.
* **No flags.** The processor produces no carry or zero flag, and it has no
  branch or jump instruction. Control flow comes only from the sequencer.

## How one cycle works

```
 start, st_addr, inst_cnt
          |
   +-------------+ fetch_addr  +-----------+ instr  +---------+
   |  sequencer  |------------>| ROM 256x16|------->| decoder |--- ctrl
   | (+2 adder)  |             +-----------+        +---------+
   +-------------+                                  | reg1 reg2 wreg imm
          | run                                     v
          +------> write enables         +--------------------+
                                         | register file 4x8  |
                                         +--------------------+
                                    rd1 |            | rd2
                         +--------------+--+      +--+---------------+
                         | ALU  (a=rd1, b=rd2) |   | data mem 256x8   |
                         +--------------------+   | addr=rd1 wdata=rd2|
                                   |  alu_y       +------------------+
                                   |               | rdata
                       write-back mux: ALU / memory / immediate -> W Reg
```

Everything between the sequencer's address register and the register file
is combinational:

* The ROM read is asynchronous.
* The register file read ports are asynchronous.
* The ALU is combinational.
* The data memory read is asynchronous.

So within one clock period the current instruction is fetched, decoded,
read, computed and, for `ld`, read from memory. At the rising edge three
things happen:

* W Reg takes the write-back value.
* A `st` writes its byte.
* The sequencer moves to the next instruction.

There is no pipeline, so no hazards, stalls or bypasses exist. An
instruction that reads and writes the same register reads the old value and
writes the new one. The critical path runs:

ROM → decoder → register read → ALU adder → write-back mux → register setup.

For `ld` the path goes through the data memory read instead of the ALU.

## Fetch sequencer

Instruction memory is byte addressed, and each instruction is two bytes. So
the fetch address steps by 2, and the ROM uses address bits [8:1] to pick a
word. The sequencer is a two-state FSM (IDLE, RUN):

* In IDLE, a `start` pulse with a non-zero `inst_cnt` loads `st_addr` as the
  fetch address and moves to RUN.
* In RUN, `run` is high. The instruction at `fetch_addr` executes during
  that cycle, and at the clock edge the address advances by 2.
* After `inst_cnt` instructions the FSM returns to IDLE. `done` is high for
  one cycle, in the cycle after the last instruction.

Timing rules:

* A run of N instructions takes exactly N clock cycles.
* The first instruction executes in the cycle after `start` is sampled.
* A `start` during a run is ignored.
* The address wraps from 0x1FE to 0x000.

Register-file and data-memory writes are gated by `run`, so an idle
processor keeps its state. Two assertions check the handshake: `done` never
coincides with `run`, and a run never has a zero count.

This sequencer takes the place of a free-running program counter. The
address register inside it is still such a counter: `scp_pc`, a register
plus a "+2" adder (`scp_adder`). The FSM drives it through a load port
(start address) and an increment enable.

## Memories

* **Instruction ROM (`scp_imem`).** 4 Kb, organised as 256 × 16 bits. Its
  contents are a 4096-bit constant parameter (word *i* in bits
  `[16*i +: 16]`), so synthesis keeps them as ROM logic.
  * By default it holds the demonstration program built in
    `scp_program_pkg::default_program()` with the encoder functions of
    `scp_pkg`.
  * To run your own code, pass another image to `scp_top`'s `PROGRAM`
    parameter. `tb/tb_scp_examples.sv` shows how to build one in a constant
    function.
* **Data memory (`scp_dmem`).** 256 bytes, addressed by the 8-bit value of
  Reg 1. Reads are asynchronous and writes are clocked. In simulation it
  starts at all zeros. Real hardware makes no such promise.

## Files

| file | contents |
|---|---|
| `rtl/scp_pkg.sv` | widths, opcode/register enums, instruction struct, control struct, instruction encoders |
| `rtl/scp_program_pkg.sv` | default ROM image (demonstration program) |
| `rtl/scp_adder.sv` | N-bit adder with carry in/out (fetch +2, ALU add/sub/slt) |
| `rtl/scp_pc.sv` | program counter: address register with load and +2 increment |
| `rtl/scp_sequencer.sv` | fetch sequencer FSM around `scp_pc` |
| `rtl/scp_imem.sv` | instruction ROM |
| `rtl/scp_decoder.sv` | field split, immediate extension, control |
| `rtl/scp_regfile.sv` | registers A–D, 2 read / 1 write ports |
| `rtl/scp_alu.sv` | or, and, nor, nand, add, sub, slt |
| `rtl/scp_dmem.sv` | data memory |
| `rtl/scp_top.sv` | the processor |

The top-level ports are:

* `clk`
* `rst_n`: synchronous reset, active low. It clears the registers and puts
  the sequencer in IDLE.
* `start`, `st_addr[8:0]` and `inst_cnt[8:0]`: start a run.
* `run` and `done`: run status.
* `fetch_addr` and `instr`: the current instruction, for observation.
* `regs[4]`: registers A–D, for observation.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_scp_adder` | corner values and random operands, 8 and 9 bits |
| `tb_scp_alu` | every operation against an integer model; signed `slt` edge cases (0x7F vs 0x80) |
| `tb_scp_pc` | load, increment, hold, load priority, wrap, reset |
| `tb_scp_sequencer` | address sequence, exact run length, `done` pulse, ignored `start`, zero count, wrap |
| `tb_scp_imem` | every word at even and odd addresses; default program words |
| `tb_scp_decoder` | the printed encodings of sub/ld/st/ldi/nop, all 16 opcodes, immediate extension |
| `tb_scp_regfile` | reset, writes visible only after the edge, write enable |
| `tb_scp_dmem` | example memory contents, full sweep, random access |
| `tb_scp_top` | end-to-end run at default parameters (see below) |
| `tb_scp_examples` | worked examples as register and memory tables (see below) |

`tb_scp_top` runs the whole processor at its default parameters against an
instruction-set model inside the testbench. It compares all four registers
after every instruction and the whole data memory after every run. It checks
that every run takes one cycle per instruction. It also counts the
behaviours it exercised:

* every opcode, including an unassigned one
* both `slt` outcomes
* positive and negative immediates
* `done` pulses
* ignored `start`s
* address wrap-around

A behaviour that never occurs counts as a failure.

`tb_scp_examples` replays the worked examples as register and memory
tables. Starting from A=12, B=23, D=F5, it runs `add RA,RB,RC`,
`or RB,RD,RB` and `sub RC,RA,RD`, then `ld RA,RC` and `st RD,RB` with
memory 00=C3, 01=85, 02=44, FF=2B. It also runs `ldi`.

To simulate with plain Verilator from the project root:

```
verilator --binary --timing --assert -Wall -Wno-fatal -Irtl -y rtl -y tb \
  rtl/scp_pkg.sv rtl/scp_program_pkg.sv tb/tb_scp_top.sv --top-module tb_scp_top
./obj_dir/Vtb_scp_top
```

Replace `tb_scp_top` with any other testbench name. Every run here finishes
in seconds.

## What is specified and what is chosen here

These parts come from the instruction-set definition:

* the instruction set, its encodings and field layout
* the 4 × 8-bit registers
* the Harvard split
* the 256 × 16 ROM with asynchronous read
* byte addressing with a step of 2
* a sequencer with start, start-address and instruction-count inputs

These are this design's own choices:

* **Sequencer behaviour:** the FSM states and the `run`/`done` handshake;
  ignoring `start` while running; wrap-around; gating writes with `run`.
* **Reset:** synchronous and active low; it clears the registers but not
  the data memory.
* **Data memory:** the depth (256 bytes) and the asynchronous read.
* **ALU semantics:** signed `slt`; no flags.
* **Decoding:** unassigned opcodes act as `nop`.
* **Adder:** written as a plain `+`, with the architecture left to
  synthesis, not as a hand-optimised adder.
* **ROM contents:** the demonstration program.

Two choices may differ from what a user expects:

* **Immediate extension.** An immediate field of `100100` is described with
  the value 0x24, but the immediate range is −32 to 31. This design follows
  the signed range and loads 0xE4. Setting `IMM_SIGNED = 0` in `scp_decoder`
  gives the other reading.
* **`slt` with two operands.** When `slt` is written with only two registers,
  the W Reg field still selects a destination, as it does for every
  arithmetic instruction.
