# Single-cycle and multi-cycle RISC-V processors, side by side

A processor's speed is its clock frequency times the instructions it retires
per cycle (IPC). A single-cycle processor retires one instruction every
clock, but its clock period has to cover the whole path from the program
counter, through instruction memory, register file, adder and data memory,
back to the register file. A multi-cycle processor cuts that path with
registers into steps (IF: fetch, ID: decode and read registers, EX: execute,
MEM: data-memory access, WB: write back), runs one step per clock, and so
gets a shorter clock period at the cost of several cycles per instruction.

This repository holds six small RV32I-subset processors that make this trade
visible, written in SystemVerilog, plus the memories, register file,
immediate generator and ALU they are built from:

| module         | organisation                                         | instructions                              | cycles / instruction |
|----------------|------------------------------------------------------|-------------------------------------------|----------------------|
| `m_proc05`     | single cycle, asynchronous-read memories             | add, addi, lw, sw                         | 1                    |
| `m_proc07`     | single cycle, with ALU and branches (the baseline)   | add, addi, sll, srl, lw, sw, beq, bne     | 1                    |
| `m_proc08`     | two states: IF+ID+EX, then MEM+WB                    | add, addi, lw, sw                         | 2                    |
| `m_proc09`     | five states, a register after every step             | add, addi, lw, sw                         | 5                    |
| `m_proc10`     | five states on block-RAM style (registered) memories | add, addi, lw, sw                         | 5                    |
| `m_proc10_opt` | `m_proc10` with the optimized state machine          | add, addi, lw, sw, beq, bne               | 3 to 5 (see below)   |

`m_top` instantiates all six on one clock, reset and clock enable. They
share no hardware; each has its own memories and brings out its own LED
register.

The designs follow lecture 10 of the course *Computer Logic Design*
("Design and Implementation of a Multi-cycle Processor"). For reference,
the lecture reports that on an Artix-7 FPGA (Arty A7-35T board) the
single-cycle `m_proc05` met timing at up to 60 MHz (60 × 1.0 = 60 million
instructions per second) and the two-state `m_proc08` at up to 110 MHz
(110 × 0.5 = 55). Cutting the path in two did not quite double the clock, so
the simple two-state split lost slightly. Those are place-and-route results
and are not reproduced here.

## Instruction subset and decoding

All processors decode the five upper opcode bits `op5 = ir[6:2]`
(`proc_pkg`):

| op5     | format | instructions     | immediate (`m_immgen`)                          |
|---------|--------|------------------|-------------------------------------------------|
| `01100` | R      | add, sll, srl    | none                                            |
| `00100` | I      | addi             | `ir[31:20]`, sign-extended                      |
| `00000` | I      | lw               | `ir[31:20]`                                     |
| `01000` | S      | sw               | `{ir[31:25], ir[11:7]}`                         |
| `11000` | B      | beq, bne         | `{ir[31], ir[7], ir[30:25], ir[11:8], 0}`       |

Only `m_proc07` distinguishes add, sll and srl (funct3 `000`, `001`, `101`).
The others treat every R-type instruction as add. The register file is
written by R-type, addi and lw instructions. Register x0 reads as zero.
Every write to x30 is also copied into the LED register `r_led`
(output `w_led`), which is how the programs show their result.

## The common datapath

Every processor has the same parts (signal names are shared across the
modules):

* `r_pc` addresses the instruction memory with word address
  `r_pc[ADDR_W+1:2]` (`ADDR_W = 12`: 4096 words of 32 bits).
* `m_immgen` builds `w_imm`. `m_regfile` (32 × 32 bits, two combinational
  read ports, one write port) gives `w_rrs1` and `w_rrs2`.
* A mux selects the adder's second operand `w_ain`: rs2 for R-type, the
  immediate otherwise. The adder (`m_alu` in `m_proc07`) produces `w_rslt`.
  That is the result of add/addi, or the address of lw/sw.
* The data memory is addressed by the result and written with rs2 on sw.
* The write-back mux `w_rslt2` selects the loaded word for lw and the
  result otherwise.

`m_proc07` adds the branch hardware: `w_tpc = r_pc + w_imm`, an
equal/not-equal comparator on rs1 and rs2 producing `w_taken`, and a mux that
makes the next PC `w_npc = w_taken ? w_tpc : r_pc + 4`.

The processors without branches (`m_proc05`, `08`, `09`, `10`) stop by
holding the PC at `HALT_PC` (default 24). The instruction there is executed
over and over, so it must be one that can safely repeat. The processors with
branches end a program with `L: beq x0, x0, L`.

## Where the registers go

* **`m_proc08`** captures the adder output in `r_rslt` and rs2 in `r_rrs2` at
  the end of state 0. In state 1 the data memory uses those registers. The
  register file, PC and LED are updated at the end of state 1. The
  instruction does not need a register of its own: the PC, and with it the
  combinational instruction-memory output, is unchanged until the end of
  state 1.
* **`m_proc09`** has a register after every step. These are `r_ir` after
  IF; `r_rrs1`, `r_ain` and `r_rrs2` after ID; `r_rslt` after EX; and `r_ldd`
  after MEM. A state machine goes IF → ID → EX → MEM → WB → IF, and each
  register loads only at the end of its own state.
* **`m_proc10`** is the same five-step machine on memories with a registered
  read (`m_memory`). This is the form an FPGA maps to block RAM; the
  asynchronous-read `m_amemory` maps to LUT RAM. The memories' own output
  registers replace two of `m_proc09`'s registers:
  * The instruction memory's output register is the instruction register.
    It loads at the end of IF. Because `r_pc` only changes at the end of WB,
    the memory re-reads the same word every cycle, so its output stays
    valid through WB.
  * The data memory's output register holds the loaded word at the end of
    MEM, ready for WB.

## The optimized state machine (`m_proc10_opt`)

The five-step machine spends five cycles on every instruction, even when a
step has nothing to do. An add has no memory access, a store writes no
register, and a branch is decided by the end of EX. The optimized machine
lets each instruction visit only the steps it needs:

```
IF -> ID -> EX --(beq, bne)------------------> IF      3 cycles
               \--(add, addi)------> WB -----> IF      4 cycles
               \--(lw, sw)--> MEM --(sw)-----> IF      4 cycles
                                  \--(lw)-> WB -> IF   5 cycles
```

The next state is computed combinationally (`w_next`) from the current state
and the opcode of the instruction in the instruction-memory output register.
An instruction's last step is the one whose successor is IF (`w_last`). At the
end of that step `r_pc` is updated:

* a branch writes `w_npc`, the target if taken or `r_pc + 4`;
* every other instruction writes `r_pc + 4`.

Keeping the PC still until then is what keeps the instruction word valid in
the memory's output register throughout the instruction.

The branch is resolved in EX. `w_taken` compares the ID/EX registers `r_rrs1`
and `r_rrs2`, and `w_tpc = r_pc + w_imm` uses the still-valid PC and
instruction. The new PC is therefore ready at the end of EX, and no
extra register is needed.

With an instruction mix of 10 % branches, 10 % loads and 80 % other
instructions, the average is 0.1 × 3 + 0.1 × 5 + 0.8 × 4 = 4.0 cycles per
instruction, against 5.0 for `m_proc10`, with the same clock period. That is
25 % more throughput.

Opcodes outside the supported six are treated as no-ops: they leave EX for IF
and advance the PC by 4.

## Cycle counts of the demonstration program

`rtl/program.hex` holds the demonstration program, which the memories load at
start-up:

```
0:  add  x0, x0, x0      nop
4:  addi x4, x0, 55
8:  sw   x4, 16(x0)
12: lw   x7, 16(x0)
16: addi x2, x0, 9
20: add  x3, x7, x2      x3 = 64
24: add  x30, x0, x3     LED = 64   (HALT_PC of the branch-less processors)
28: beq  x0, x0, 0       end loop   (processors with branches)
```

Clock cycles from reset until the PC reaches its final instruction:

| m_proc05 | m_proc07 | m_proc08 | m_proc09 | m_proc10 | m_proc10_opt |
|----------|----------|----------|----------|----------|--------------|
| 6        | 7        | 12       | 30       | 30       | 29 (4+4+4+5+4+4+4) |

## Interface and timing

Every processor has the same ports:

| port    | dir | width | meaning                                           |
|---------|-----|-------|---------------------------------------------------|
| `w_clk` | in  | 1     | clock; everything changes on the rising edge      |
| `w_rst` | in  | 1     | synchronous, active high: PC, state and LED to 0  |
| `w_ce`  | in  | 1     | clock enable; while low no state changes          |
| `w_led` | out | 32    | last value written to x30                         |

Parameters: `ADDR_W` (word-address width of each memory, default 12 = 4096
words), `INIT_FILE` (hex image loaded into both the instruction and the data
memory, default `rtl/program.hex`, path relative to the directory the
simulator runs in; `""` leaves the memories zeroed), and `HALT_PC` on
`m_proc05/08/09/10`.

The register file and the memories start with zeros (then the image) through
`initial` blocks, as an FPGA configures them. The registered read port of
`m_memory` has no defined value until its first clock edge. Nothing reads it
before then.

## Where this design departs from, or goes beyond, the lecture

* **Reset.** The lecture's processors rely on initial values only. A
  synchronous reset `w_rst` has been added.
* **Clock enable.** The lecture gates the PC, state and register writes with
  `w_ce`, but not the data-memory write. Here every write is gated, so a low
  `w_ce` freezes the machine completely.
* **Delays.** The `#n` delays of the lecture's code only illustrate path
  lengths in simulation. They are not part of this RTL.
* **Missing listings.** The source of `m_proc07` and `m_proc10` is not
  given in the lecture. These two are reconstructed from its block diagrams.
  * `m_proc07`'s comparator receives rs2 through the `w_ain` mux, which
    therefore selects rs2 for branches as well as R-type.
  * sll and srl are only the register forms.
* **Optimized state machine.** The lecture gives the machine as a state
  diagram with the per-instruction paths above and the CPI example. Three
  choices here are this design's own:
  * the datapath it runs on: `m_proc10`'s, plus `m_proc07`'s branch hardware;
  * resolving beq/bne at the end of EX;
  * including bne on the branch path. The diagram only names BEQ; the branch
    hardware handles both.

  The diagram also draws an unlabelled ID → IF arrow, which is not
  implemented. A block-RAM variant of the lecture's datapath with branch
  hardware shows `r_tpc`/`r_taken` registers after EX; they are unnecessary
  when the branch finishes in EX and are left out.
* **Not built.** The lecture also shows the single-cycle `m_proc05` with its
  memories simply swapped for the registered-read kind. It does so only to
  compare how the FPGA tools map them. That change breaks single-cycle
  operation, so it is not provided as a processor; `m_proc10` is the
  working design on such memories.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `rv_model_pkg` holds instruction encoders and an instruction-level
  reference model. The model counts branches, loads, stores and ALU
  instructions, and the processor testbenches derive the expected cycle
  counts from those counts.
* `tb_m_proc*`:
  * Each runs the demonstration program at default parameters. It checks
    the LED value and the cycle count.
  * It also runs a random program, with a counted loop and forward branches
    where the processor has branches. All registers, the LED and the data
    memory are compared with the model. The cycle count must equal
    instructions × CPI, or, for `m_proc10_opt`, the per-class sum
    3·branches + 4·(add, addi, sw) + 5·lw.
  * The program then runs again with a random clock enable.
* `tb_m_proc10_opt` also counts every transition of the state machine and
  checks each count against the model. For example, EX → IF must happen
  once per branch and MEM → IF once per store.
* `tb_m_top` runs all six processors at full size (4096-word memories) on the
  demonstration program. It checks every LED and cycle count, and that
  nothing moves while `w_ce` is low. It also counts that every mechanism
  happened at least once: store, load, PC held at `HALT_PC`, taken branch,
  clock-enable stall, and every optimized-machine transition.
* `tb_m_regfile`, `tb_m_immgen`, `tb_m_alu`, `tb_m_amemory` and
  `tb_m_memory` check the building blocks against values computed in the
  testbench. Two properties are covered explicitly: x0 stays zero, and a
  read of the word being written returns the old word in the registered
  memory.

To run one with Verilator 5, from the repository root (the default
`INIT_FILE` path is relative to it):

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/proc_pkg.sv tb/rv_model_pkg.sv rtl/m_*.sv tb/tb_m_top.sv \
  --top-module tb_m_top -Mdir obj_tb_m_top
./obj_tb_m_top/Vtb_m_top
```

Replace `tb_m_top` with any other testbench name. All testbenches finish in
well under a second.

## Changing it

* **Run another program.** Put one hex word per line in a file and pass it
  as `INIT_FILE`. Words beyond the file stay zero. A zero word decodes as
  `lw x0, 0(x0)`, which changes nothing, but the PC would run on through
  them, so end the program with its halt instruction or its branch loop.
* **Add an instruction.**
  * Extend `proc_pkg` and, for the optimized machine, the `w_next` logic.
  * Add the instruction to the model in `rv_model_pkg` so that the random
    tests cover it.
