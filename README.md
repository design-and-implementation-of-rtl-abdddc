# An 8-bit non-pipelined RISC processor for teaching

This is a small Harvard-architecture processor built to show, one clock cycle
at a time, what "non-pipelined" means. Each instruction is fetched, decoded and
executed, and only then is the next one fetched. Nothing overlaps, so there are
no hazards and no forwarding, and every instruction's effect can be seen in a
waveform. The machine has 8-bit data, 16-bit instructions, sixteen registers, a
256-word instruction memory and a 256-byte data memory. It runs 16
instructions: load and store, move-immediate, five ALU operations, two
rotates, five branches and NOP.

The RTL follows the design in *Design and Implementation of Non-Pipelined RISC
Processor for Educational Purpose* (Lau, Ab. Rahman, Uttraphan; UTHM). That
paper gives the instruction set, the block diagram and sample-program
waveforms. This RTL was written from them and is not the authors' code. Where
the paper leaves something open, the choice made here is listed in
[Choices and departures](#choices-and-departures).

## Instruction set

Every instruction is 16 bits wide. Bits 15:12 are always the opcode.

| format | 15:12 | 11:8 | 7:4 | 3:0 | instructions |
|---|---|---|---|---|---|
| R | opcode | Ra | Rb | Rc | ADD SUB AND OR XOR ROL ROR |
| I | opcode | Ra | d / i (7:0) | | LD ST MOV |
| J | opcode | d (11:0) | | | BRA BRZ BRNZ BRGT BRLT |

| op | mnemonic | effect | cycles |
|---|---|---|---|
| 0 | `LD Ra, d` | Ra ← DM[d] | 3 |
| 1 | `ST d, Ra` | DM[d] ← Ra | 3 |
| 2 | `MOV Ra, #i` | Ra ← i | 3 |
| 3 | `ADD Ra, Rb, Rc` | Ra ← Rb + Rc, flags updated | 3 |
| 4 | `SUB Ra, Rb, Rc` | Ra ← Rb − Rc, flags updated | 3 |
| 5 | `BRA d` | PC ← d | 3 |
| 6 | `BRZ d` | if Z = 1: PC ← d | 3, or 4 if taken |
| 7 | `BRNZ d` | if Z = 0: PC ← d | 3, or 4 if taken |
| 8 | `BRGT d` | if N = 0: PC ← d | 3, or 4 if taken |
| 9 | `BRLT d` | if N = 1: PC ← d | 3, or 4 if taken |
| A | `ROL Ra, Rb` | Ra ← Rb rotated left by one bit | 3 |
| B | `ROR Ra, Rb` | Ra ← Rb rotated right by one bit | 3 |
| C | `AND Ra, Rb, Rc` | Ra ← Rb & Rc | 3 |
| D | `OR Ra, Rb, Rc` | Ra ← Rb \| Rc | 3 |
| E | `XOR Ra, Rb, Rc` | Ra ← Rb ^ Rc | 3 |
| F | `NOP` | nothing; PC ← PC + 1 | 3 |

The program counter has 8 bits. Branches therefore use only d[7:0], and a
J-type word's bits 11:8 are ignored. Data-memory addresses are the 8-bit d
field of LD and ST.

### Flags

The status register holds four flags. In bit order 3 down to 0 they are
`{N, Z, V, C}`. Only ADD and SUB write them; the logic and rotate
instructions leave them unchanged. So a conditional branch tests the result
of the last ADD or SUB.

* N is bit 7 of the result, and Z is set when the result is zero. BRZ and
  BRNZ test Z; BRGT and BRLT test N.
* C is the adder's carry out. SUB computes `Rb + ~Rc + 1`, so after a SUB,
  C = 1 means "no borrow" (Rb ≥ Rc, unsigned).
* V is the signed overflow of ADD. SUB always clears V.

## How an instruction runs

The control unit (`control_unit`) is a four-state machine. Each cycle it
produces one 12-bit control word, `ctrl_t`. The fields, from bit 11 down to
bit 0, are `{LdSR, RFwEn, IMwEn, DMwEn, LdIR, LdPC, PC_mux, RF_mux[1:0],
F[2:0]}`. The three write enables are active low. The field order was chosen
so that each control word's hex value equals the control-vector value in the
original design's waveforms, which makes the two easy to compare in a trace.

| state | what happens at the end of the cycle | control word |
|---|---|---|
| FETCH | IR ← IM[PC] | `780` |
| DECODE | nothing is written; IR's fields drive the register file and the ALU | `700` |
| EXEC | the instruction's write, and PC ← PC + 1 (or ← d for BRA) | see below |
| BRANCH | only for a taken conditional branch: PC ← d | `760` |

EXEC control words:

| instruction | word | meaning |
|---|---|---|
| LD | `340` | RF write, RF_mux = memory |
| MOV | `350` | RF write, RF_mux = immediate |
| ST | `640` | DM write |
| ADD / SUB | `B48` / `B49` | RF write from the ALU, load SR |
| AND OR XOR ROL ROR | `34A` `34B` `34C` `34D` `34E` | RF write from the ALU |
| BRA | `760` | PC ← IR[7:0] |
| BRZ BRNZ BRGT BRLT, NOP | `740` | PC ← PC + 1 |

A conditional branch always takes the increment step first. When its
condition holds, one more cycle (BRANCH) loads the target: the PC goes, for
example, 03 → 04 → 06. So an instruction takes 3 cycles, and a taken
conditional branch takes 4. The controller makes this decision from the
status register, which was written no later than the previous instruction's
EXEC cycle, so no hazard can occur.

### Sample programs and CPI

The original design was measured with five sample programs at a 20 ns clock.
`tb/tb_risc_top.sv` runs all five. It also checks the register values shown in
the original waveforms.

| program | words in program | instructions executed | cycles here | cycles reported originally |
|---|---|---|---|---|
| 1: LD, MOV, ADD, SUB, ST | 10 | 10 | 30 | 31 |
| 2: MOV, AND, OR, XOR | 5 | 5 | 15 | 15 |
| 3: LD, ROR, ROL | 4 | 4 | 12 | 12 |
| 4: SUB, BRA over one word | 7 | 6 | 18 | 18 |
| 5: ADD, taken BRNZ | 8 | 6 | 19 | 19 |

The original CPI figures divide these cycles by the number of words in the
program, not by the number of instructions executed. For program 1, the
waveform shows ten 3-cycle instructions, 30 cycles. The extra cycle in the
reported 31 matches the placement of the measuring cursor, not an extra
instruction.

## Data path

`datapath` wires the blocks together. Bus names follow the original block
diagram:

* **PC, `+`, PC mux** (`pc_reg`, `pc_incr`, `pc_mux`). The PC loads on
  LdPC. Its input is either PC + 1 (select 0) or IR[7:0] (select 1).
* **IM** (`instr_mem`), 256 × 16, read asynchronously at the PC.
* **IR** (`instr_reg`), which loads IM[PC] in FETCH. IR[15:12] goes to the
  controller as the opcode. IR[11:8], IR[7:4] and IR[3:0] address the
  register file's ports A, B and C. IR[7:0] is the memory address, the
  immediate and the branch target.
* **RF** (`reg_file`), 16 × 8, with three asynchronous read ports. ABus
  (Ra) is the data that ST writes to memory. BBus (Rb) and CBus (Rc) are the
  ALU operands A and B. The single write port writes DBus into Ra while
  RFwEn is low. All registers reset to `FF`.
* **ALU** (`alu`): operation F on BBus and CBus, giving ALUBus and four
  flags.
* **SR** (`status_reg`), which loads the flags on LdSR.
* **DM** (`data_mem`), 256 × 8, addressed by IR[7:0]. It reads
  asynchronously onto MBus and writes ABus while DMwEn is low. Bytes 0–3
  start as `85 94 51 FC`, the data the sample programs use; the rest start
  at 0.
* **RF mux** (`rf_mux`), which chooses DBus: 00 gives MBus, 01 gives ALUBus,
  10 gives IR[7:0], and 11 gives zero.
* **Board outputs** (`io_display`). `out_port` is a register that copies R15
  every clock. `hex0` and `hex1` show its low and high hex digit on
  active-low seven-segment displays. The segment order is `{g,f,e,d,c,b,a}`.

`risc_top` joins `control_unit` and `datapath`. Its ports are `clk`, `rst`
(asynchronous, active high), `inst_in[15:0]`, `flags[3:0]`,
`out_port[7:0]`, `hex0[6:0]` and `hex1[6:0]`.

### Loading a program

The controller never writes the instruction memory: IMwEn stays high in every
state. Put the program in before releasing reset, in one of two ways:

* with `instr_mem`'s `INIT_FILE` parameter (a `$readmemh` file of 16-bit
  words), or
* by writing `u_dp.u_im.mem[]` from a testbench, as the benches here do.

Unwritten words read `FFFF`, which is NOP. `data_mem` has an `INIT_FILE`
parameter as well.

## Choices and departures

These points are not fixed by the original description. They were settled as
follows:

* **Timing.** The original text calls the machine "5-stage". Its waveforms
  and cycle counts, however, show 3 cycles per instruction and 4 for a taken
  conditional branch. The RTL follows the waveforms and the cycle counts.
* **DECODE control word.** The original waveforms do not show a value for
  this cycle. Here every enable is off (`700`).
* **NOP.** In the original simulations, fetching `FFFF` left the controller
  undefined and the PC stopped. Here NOP is a real no-operation that
  advances the PC.
* **Bit positions in the control word.** Only the hex values of the control
  word were published. The bit positions come from matching those values
  against which unit must act in each cycle.
* **Flags.** Only Z and N are named in the original, for the branches. N in
  bit 3 and C in bit 0 (with the no-borrow convention) come from the flag
  values in the waveforms, for example `85+FC → 1001` and `85−FF → 1000`.
  Z in bit 2 and V in bit 1 are this design's choice. V is cleared by SUB
  because `85−51`, a signed overflow, shows `0001`.
* **Register write enable.** One register write enable (RFwEn) was used,
  as in the top-level view. The block diagram shows three, RFwEnA/B/C.
* **Reset.** Reset is asynchronous and active high. It clears PC, IR and SR
  and sets the registers to `FF`, as the waveforms show at time 0.
* **What drives the board outputs.** The original does not say. It only
  shows a binary counter on two digits and a blinking LED. Here the outputs
  show R15. The programs for those board demos were not published and are
  not included; `tb_risc_top` runs a counter loop of its own.
* **MOV.** MOV stores the immediate unchanged. The instruction table speaks
  of a "complement", but every MOV in the waveforms writes `i` itself
  (`20FC` gives R0 = `FC`).

## Simulation

Each block has a self-checking bench in `tb/`. Each bench ends by printing
`TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/risc_pkg.sv \
          tb/tb_risc_top.sv --top-module tb_risc_top
./obj_dir/Vtb_risc_top
```

The benches work as follows:

* **`tb_risc_top`** is the end-to-end test, at the default (and only)
  configuration. It runs the five sample programs, a program that takes every
  conditional branch both ways, a counter loop shown on `out_port`, and 30
  random programs. A behavioural instruction-level model inside the bench
  predicts registers, data memory, flags, PC and the cycle count, and the
  bench compares all of them. It also counts each opcode, taken and
  not-taken branches, flag loads, stores and output changes, and fails if any
  never occurs.
* **`tb_control_unit`** checks the control word in every cycle for all 16
  opcodes under all 16 flag values.
* **`tb_datapath`** plays the controller from a table of control words and
  runs the sample programs on the bare data path.
* The remaining benches check one unit each against a simple model.

## Files

* `rtl/risc_pkg.sv`: opcodes, ALU codes, the flag and control-word structs
* `rtl/risc_top.sv`, `rtl/control_unit.sv`, `rtl/datapath.sv`
* `rtl/pc_reg.sv`, `rtl/pc_incr.sv`, `rtl/pc_mux.sv`, `rtl/instr_mem.sv`,
  `rtl/instr_reg.sv`, `rtl/reg_file.sv`, `rtl/alu.sv`, `rtl/status_reg.sv`,
  `rtl/data_mem.sv`, `rtl/rf_mux.sv`, `rtl/io_display.sv`
* `tb/tb_<module>.sv`: one bench per module
