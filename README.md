# Pipelined Y86-64 processors with forwarding and hazard control

When a processor is pipelined, an instruction reads its source registers in
decode while the instructions ahead of it have computed, but not yet written
back, the values it needs. The register file then hands out a stale value.
Often the correct value already exists somewhere further down the pipeline:
the ALU output of the instruction one ahead, or the writeback value of one
two ahead. *Forwarding* puts a multiplexer in front of each decode operand
and picks that newer value instead of the register-file output. What
forwarding cannot fix gets a stall, a squash or a prediction.

This library holds three processors built around that idea, all for the
Y86-64 instruction set (a simplified x86-64 with 15 64-bit registers):

* **`y86_addq_pipe`**: a four-stage pipeline (fetch, decode, execute,
  writeback) that runs only `addq rA, rB`. It is the smallest machine that
  shows forwarding. It never stalls.
* **`y86_addq_pipe6`**: the same addq machine with execute split over two
  stages (F/D/E1/E2/M/W). The sum now arrives one stage later. A
  back-to-back dependency therefore costs one stall cycle.
* **`y86_pipe`**: a five-stage pipeline (fetch, decode, execute, memory,
  writeback) for the Y86-64 instruction set. It forwards from three stages,
  stalls one cycle on a load/use pair, predicts jumps taken and squashes on
  a misprediction, and stalls fetch behind `ret`.

`y86_top` puts the three side by side. They share only clock and reset.

## The four-stage addq pipeline

```
        xF          fD              dE                  eW
  PC --> [pc] -> fetch -> [icode,rA,rB] -> decode -> [icode,valA,valB,dstE] -> execute -> [icode,valE,dstE] -> writeback
          ^  pc+2                             ^   ^                    |                      |
          +--------                           |   +---- e_valE --------+                      |
                                              +-------- W.valE -------------------------------+
```

* **Fetch / PC update.** Each instruction is treated as a two-byte `addq`.
  rA is bits [15:12] and rB bits [11:8] of the fetched window, and the next
  PC is `pc + 2`. Nothing checks the opcode. Any two bytes run as an add;
  only the retire flag looks at icode.
* **Decode.** Reads `R[rA]` and `R[rB]` and sets `dstE = rB`. Carrying
  `dstE` down the pipeline is redundant with rB, but it gives the forwarding
  compares one field to look at.
* **Execute.** `valE = valA + valB`.
* **Writeback.** Writes `valE` to `R[dstE]` on the clock edge that ends the
  cycle.

**Forwarding.** Each decode operand has a two-level multiplexer:

| condition (checked in order)           | operand gets          | covers                          |
|----------------------------------------|-----------------------|---------------------------------|
| source == dstE of the instruction in execute | `e_valE` (adder output) | the instruction one ahead |
| source == dstE of the instruction in writeback | `W.valE`             | the instruction two ahead |
| otherwise                               | register file         | older instructions              |

The writeback path is needed because the register file is written on the
clock edge at the end of the writeback cycle. It does not pass a new value
through to a read in the same cycle. Without this path, `addq %r10,%r8;
addq %r11,%r12; addq %r12,%r8` gets the right `%r12` but a stale `%r8`.
The youngest producer wins, so three `addq` in a row into `%r8` see every
intermediate sum. Both compares ignore register 15 (`REG_NONE`), the value
the pipeline registers hold after reset.

Throughput is one instruction per cycle from the start. Instruction *k*
(counting from 0 after reset) is in writeback after clock edge *k*+3.

`addq` cannot create a non-zero value from an all-zero register file. So
this pipeline has a register-file loader port (`rf_ld_*`) for setting
starting values. Program bytes go in through `ld_*`. The pair `0x60 0xFF`
(`addq %r15,%r15`) reads and writes no register, so it serves as a no-op.

## The six-stage addq pipeline: when forwarding is too late

`y86_addq_pipe6` shows what happens when a result is produced later in the
pipeline. E1 adds the low 32 bits of the operands and keeps the carry. E2
adds the high halves and the carry. M only passes `valE` on, and W writes
it. The full sum exists only at the end of E2.

Decode forwards from the E2 adder output, then from M, then from W. That
covers every producer except the one directly ahead, which is still in E1.
When decode reads the destination of the instruction in E1, fetch and
decode hold for one cycle and a bubble enters E1. In the next cycle the
producer is in E2, and its result is forwarded:

    cycle              0  1  2  3  4  5  6  7  8
    addq %rcx,%r9      F  D  E1 E2 M  W
    addq %r9,%rbx         F  D  D  E1 E2 M  W
    addq %rax,%r9            F  F  D  E1 E2 M  W

Instruction *k* is in writeback after clock edge *k*+5 plus the number of
stalls before it. A stall happens exactly when an instruction reads the
destination of the one just before it. The testbench checks this count.
Splitting the adder into 32-bit halves is this design's way of spreading
the addition over two stages.

## The five-stage Y86-64 pipeline

Pipeline registers F (predicted PC), D, E, M and W are packed structs from
`y86_pkg`. The datapath is the usual one for Y86-64. The parts below are
the hard ones.

### Forwarding (`y86_fwd`)

Each decode operand takes the newest of these values, checked from youngest
to oldest:

1. `e_valE`: the ALU output of the instruction in execute;
2. `m_valM`: the value being loaded by the instruction in memory;
3. `M.valE`: the ALU result held in the memory stage;
4. `W.valM`, then `W.valE`: the values being written back;
5. otherwise the register file.

For `call` and `jXX`, operand A carries `valP` (the fall-through address)
instead. Memory uses that address to push the return address or to recover
from a misprediction. Forwarding alone runs most dependent code, for
example `addq %r8,%r9; subq %r9,%r11; mrmovq 4(%r11),%r10; rmmovq
%r9,8(%r11); xorq %r10,%r9`, at one instruction per cycle with no stall.

### What still stalls (`y86_hazard`)

| hazard | detected when | action | cost |
|---|---|---|---|
| load/use | `mrmovq`/`popq` in execute writes a register that decode reads | hold F and D, bubble into E | 1 cycle |
| mispredicted `jXX` | `jXX` in execute finds its condition false | bubble into D and E; fetch from M.valA next | 2 cycles |
| `ret` | `ret` in decode, execute or memory | hold F, bubble into D; fetch from W.valM once `ret` reaches writeback | 3 cycles |
| exception | HLT/ADR/INS status in memory or writeback | bubble into M, hold W | machine stops |

A load/use pair cannot be forwarded in time. The loaded value only exists
at the end of the memory stage, one cycle after the dependent instruction
has left decode. Jumps are predicted taken. `call` and unconditional jumps
therefore cost nothing. A wrong guess is found in execute, after two wrong
instructions have been fetched. Condition codes are not updated after an
exception has reached memory or writeback.

For a program that runs *N* instructions (halt included), halt reaches
writeback after

    N + 3 + 1·(load/use stalls) + 2·(mispredicted jumps) + 3·(rets)

clock edges after reset is released. The testbenches check exactly this
count.

### Status

`stat` shows the last instruction to reach writeback: `S_AOK` while
running, then `S_HLT`, `S_ADR` (bad instruction or data address) or
`S_INS` (bad opcode). After that nothing more changes state.

## Modules

| file | what it is |
|---|---|
| `rtl/y86_pkg.sv` | opcodes, register numbers, status codes, pipeline-register structs, condition evaluation |
| `rtl/y86_regfile.sv` | 15 × 64-bit registers: 2 read ports, 2 write ports (dstE, dstM), loader and debug ports |
| `rtl/y86_mem.sv` | byte memory: 10-byte instruction window, 8-byte data port, byte loader, debug read |
| `rtl/y86_alu.sv` | add/sub/and/xor with ZF/SF/OF |
| `rtl/y86_fwd.sv` | decode forwarding multiplexers of the five-stage pipeline |
| `rtl/y86_hazard.sv` | stall/bubble control of the five-stage pipeline |
| `rtl/y86_addq_pipe.sv` | four-stage addq pipeline |
| `rtl/y86_addq_pipe6.sv` | six-stage split-execute addq pipeline |
| `rtl/y86_pipe.sv` | five-stage Y86-64 pipeline |
| `rtl/y86_top.sv` | all three pipelines, ports prefixed `p4_`, `p6_` and `p5_` |

All state changes on the rising edge. `rst` is synchronous and active high.
It sets the PC to 0 and fills the pipeline registers with bubbles
(`icode = nop`, registers `REG_NONE`). It clears the register file but not
memory. Load programs with `ld_we/ld_addr/ld_data` (one byte per clock)
while `rst` is high. Memory is little-endian. Instruction and data share one
array in the five-stage pipeline. Both memories default to 4096 bytes
(`MEM_BYTES`).

## Departures and choices

These points are design decisions, not fixed by the pipeline's definition:

* Memory size, the loader and debug ports, the register-file reset to zero,
  and giving the dstM write port priority over dstE.
* In the four-stage pipeline, the forwarding path from writeback and the
  `REG_NONE` guard on the compares. Reset leaves `dstE = REG_NONE`, not 0,
  so a bubble cannot look like a write to `%rax`.
* In the five-stage pipeline, the prediction scheme (always taken), the full
  forwarding priority list, the `valP`-into-`valA` merge, and exception
  handling. All follow the standard Y86-64 pipeline. The instruction
  encodings are those of the Y86-64 architecture.
* Not provided: two further ways to split the Y86-64 pipeline into four
  stages (F/D/EM/W, with execute and memory merged, and F/DE/M/W).

## Simulation

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. `tb/y86_asm_pkg.sv` is a small assembler
(one function per instruction) that the testbenches use to build programs.
To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/y86_pkg.sv tb/y86_asm_pkg.sv -y rtl -y tb +libext+.sv \
        tb/tb_y86_pipe.sv --top-module tb_y86_pipe -o sim
    ./obj_dir/sim

| testbench | checks |
|---|---|
| `tb_y86_pipe` | 8 programs (forwarding chain, load/use, mispredicted `jne`, call/ret, push/pop/cmov/taken jump, a dependency example, address and opcode faults): final registers and memory, exact cycle counts, hazard counts |
| `tb_y86_addq_pipe` | 200+ random back-to-back dependent `addq` against a sequential model; one retire per cycle; both forwarding paths used |
| `tb_y86_addq_pipe6` | 200+ random `addq` against a sequential model; stall count equal to the number of back-to-back dependencies in the program; exact retire timing |
| `tb_y86_top` | all three pipelines at default sizes, end to end; every mechanism (forwarding paths, split-execute stall, load/use, misprediction, ret stall) must occur |
| `tb_y86_regfile`, `tb_y86_mem`, `tb_y86_alu`, `tb_y86_fwd`, `tb_y86_hazard` | unit tests against reference models |

Each testbench was also run against a copy of its module with one
deliberate bug (a wrong forwarding priority, a missing load/use compare, a
wrong recovery PC, and so on). Every such run reported failures.
