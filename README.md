# Pipelining by example: times three and an addq-only Y86-64 processor

Pipelining raises throughput by cutting a long combinational path into stages
separated by registers. Several items are then in flight at once, one per
stage. Each item takes longer from start to finish, because every stage lasts
a whole clock cycle and every register adds its own delay. But a new item can
start every cycle, and the cycle only has to cover the slowest stage.

This RTL builds that idea on two examples. Each example comes in an
unpipelined form and a pipelined form:

1. **Times three.** `times3_comb` computes `3 × A` as `(A + A) + A` with two
   adders in series. `times3_pipe` puts a register after each adder.
   `times3_deep` splits each adder in two as well, to show how far deeper
   pipelining can go.
2. **An addq-only Y86-64 processor.** These processors execute one
   instruction, `addq rA, rB` (`R[rB] ← R[rA] + R[rB]`). `addq_seq` does all
   the work of an instruction in one clock cycle. `addq_pipe` spreads it over
   four pipeline stages.

A fourth piece, **`mem_stage`**, shows how a pipelined processor makes its
memory read/write decision. The decision uses the instruction code that
travels down the pipeline with each instruction.

These are separate examples. `pipelining_top` places them side by side. They
share only `clk` and `rst`, and each has its own ports:

| prefix | example |
|--------|---------|
| `cpu_` | `addq_pipe` |
| `seq_` | `addq_seq` |
| `t3c_` | `times3_comb` |
| `t3_`  | `times3_pipe` |
| `t3d_` | `times3_deep` |
| `mem_` | `mem_stage` |

## Timing conventions

The conventions are the same in every module:

- Registers load on the rising edge of `clk`.
- `rst` is synchronous and active high.
- Register-file and memory **writes** take effect at the end of the cycle.
  A value written in cycle *n* can be read from cycle *n+1* on.
- **Reads** are combinational. A read behaves like a combinational block
  whose output follows its address.

## Times three

```
 a_in ─►[A]─┬─► ADD(A+A) ─►[2A]──► ADD(2A+A) ─►[3A]─► y
            └────────────►[A ]──┘
```

`times3_pipe` has three register levels. At any moment, the first level
holds the operand of item *t+2*. The middle level holds `A` and `2A` of item
*t+1*. The output holds `3A` of item *t*.

- **Latency:** a result appears three clock edges after its operand is
  presented.
- **Throughput:** one result per cycle.

The copy of `A` in the middle level is essential. Without it, the second
adder would add the *next* item's `A` to this item's `2A`. `in_valid` ripples
through the stages with the data and comes out as `out_valid`.

Why pipeline at all? Take 50 ps per adder and 10 ps per register.
Unpipelined (`times3_comb`), a result takes 100 ps, plus a register delay if
the operand and result are held in registers. The next operand has to wait
until it is done. Pipelined, a cycle needs only 50 + 10 = 60 ps, giving about
16 G results/s.

`times3_deep` splits each 64-bit addition at bit `SPLIT`, which defaults to
`WIDTH/2`:

1. One stage adds the low halves and registers the carry.
2. The next stage adds the high halves plus that carry.

With the input register this gives five register levels.

- **Latency:** five edges.
- **Throughput:** still one result per cycle.

Halving the adder delay does not halve the cycle, because each register's
delay is paid in full at every stage. With 25 ps half-adders the cycle is
35 ps, not 30 ps. Because of this, each further split gains less. Splitting
an adder into pieces with exactly equal delay is not generally possible.
`SPLIT` is therefore a parameter, so an uneven split can be built and
measured.

## The addq processors

### Single cycle

In `addq_seq`, one clock cycle covers the whole instruction:

1. The PC addresses the instruction memory.
2. `instr_split` extracts `rA` and `rB`.
3. The register file reads `R[rA]` and `R[rB]`.
4. The adder forms the sum.
5. At the closing clock edge, the sum is written into `R[rB]` and the PC
   advances by 2.

Every instruction sees all earlier results. The clock period must cover the
whole path, from the PC through memory, register read and add to register
write. `addq_pipe` cuts exactly this path into stages.

### Pipelined stages

```
  fetch / PC update          decode                   execute          writeback
 ┌──────────────────┐  fD  ┌──────────────────┐  dE  ┌─────────┐  eW  ┌───────────┐
 │ PC ─► instr mem  │─[ ]─►│ reg file read    │─[ ]─►│ ADD     │─[ ]─►│ reg file  │
 │ split, PC += 2   │      │ R[rA], R[rB]     │      │ valA+   │      │ write     │
 │ (register pP)    │      │ dstE = rB        │      │  valB   │      │ R[dstE]   │
 └──────────────────┘      └──────────────────┘      └─────────┘      └───────────┘
```

**Fetch / PC update.** The PC register (`pP`) addresses the instruction
memory, and `instr_split` cuts the first two bytes into fields:

| field   | bits  |
|---------|-------|
| `ifun`  | 3:0   |
| `icode` | 7:4   |
| `rB`    | 11:8  |
| `rA`    | 15:12 |

Every addq is two bytes long, so the next PC is simply `PC + 2`. A new
instruction is fetched every cycle.

**Decode.** The register file reads `R[D_rA]` and `R[D_rB]`. The destination
is `D_rB`.

**Execute.** `adder` forms `valE = valA + valB`.

**Writeback.** At the end of the cycle, the register file writes `W_valE`
into `W_dstE`.

### Pipeline registers

Each pipeline register is a `pipe_reg` with a packed-struct type from
`y86_pkg`. The names follow one convention: a stage *sends* lower-case values
(`f_rA`, `d_valA`) and the next stage *receives* upper-case ones (`D_rA`,
`E_valA`).

| register | fields                            | after reset                         |
|----------|-----------------------------------|-------------------------------------|
| pP       | `pc`                              | 0                                   |
| fD       | `icode`, `rA`, `rB`               | NOP, 0xF, 0xF                       |
| dE       | `icode`, `valA`, `valB`, `dstE`   | NOP, 0, 0, 0xF                      |
| eW       | `icode`, `valE`, `dstE`           | NOP, 0, 0xF                         |

Register number 0xF means "no register". Reading it gives 0 and writing it
does nothing. A pipeline full of reset values is therefore a pipeline full of
NOPs.

### Cycle by cycle

The processor runs this program. Initially `%rN = 100·N`:

```
addq %r8, %r9      # 60 89
addq %r10, %r11    # 60 AB
addq %r12, %r13    # 60 CD
addq %r9, %r8      # 60 98
```

The table shows the pipeline over seven cycles. Cycle 0 is the first cycle
after reset.

| cycle | PC  | fD rA,rB | dE valA, valB, dstE | eW valE, dstE |
|-------|-----|----------|---------------------|---------------|
| 0     | 0x0 |          |                     |               |
| 1     | 0x2 | 8, 9     |                     |               |
| 2     | 0x4 | 10, 11   | 800, 900, 9         |               |
| 3     | 0x6 | 12, 13   | 1000, 1100, 11      | 1700, 9       |
| 4     |     | 9, 8     | 1200, 1300, 13      | 2100, 11      |
| 5     |     |          | 1700, 800, 8        | 2500, 13      |
| 6     |     |          |                     | 2500, 8       |

- **Latency:** instruction *k* is fetched in cycle *k* and written at the end
  of cycle *k+3*. That is four cycles.
- **Throughput:** one instruction completes every cycle once the pipeline is
  full.

The last instruction reads `%r9` in cycle 4. It gets 1700, because the first
instruction wrote `%r9` at the end of cycle 3.

### Hazards are not handled

This is where `addq_pipe` differs in behaviour from `addq_seq`. There is no
forwarding and no stalling. An instruction reads the register
file one cycle after it is fetched, and a result is written three cycles after
its instruction is fetched. Suppose an addq reads a register that one of the
**two instructions just before it** will write. It then reads the **old**
value.

The test benches model exactly this. Their reference lets instruction *k* see
the results of instructions up to *k−3* only. They also count how often such
a read occurs. A compiler or programmer targeting this core must place two
unrelated instructions (or NOP bytes, `0x10`) between an addq and a use of its
result.

### Other encodings and halting

Only `60 rA:rB` (icode 6, ifun 0) is executed. `instr_split` turns any other
first byte into a NOP that reads and writes nothing. There is no `halt`: the
PC advances by 2 forever. Bytes beyond the end of the instruction memory read
as 0, which is a NOP here.

### Loading programs and registers

The processor has two load paths:

- **Program:** `imem_we`/`imem_waddr`/`imem_wdata` store one byte per clock
  edge into the instruction memory.
- **Registers:** the register file has a second write port, M (`dstM`,
  `valM`). In this processor nothing else uses it. It is brought out as
  `load_dst`/`load_val`, which set initial register values. Keep `load_dst`
  at 0xF when not loading. The register file has no reset of its own.

Both paths work while `rst` is high. The usual sequence is:

1. Hold `rst` high.
2. Write the program and the registers.
3. Release `rst`.

The cycle after the last reset edge is cycle 0. `dbg_src`/`dbg_val` is an
extra read port for looking at registers.

### Where the cycle time goes

Here are representative delays:

| part                  | delay  |
|-----------------------|--------|
| instruction memory    | 200 ps |
| register-file read    | 125 ps |
| add                   | 100 ps |
| register-file write   | 125 ps |
| PC + 2                | 80 ps  |

**Unpipelined,** the critical path runs through everything except the PC
adder: 550 ps per instruction.

**Pipelined,** the cycle is set by the slowest stage, instruction fetch:
200 ps plus the pipeline-register delay. That is almost three times the
throughput. Latency grows to four cycles, 800 ps plus four register delays.

Only one clock period can be chosen, so the slowest path through any stage
decides the period for every instruction.

## Memory stage

`mem_stage` contains the following, in order:

1. The execute/memory register `eM`, holding `icode`, address `valE` and
   store data `valA`. `icode` resets to NOP.
2. `mem_rw_ctrl`, which decides **is read?** and **is write?** from
   `M_icode`.
3. `data_mem`, a 1 KiB byte-addressed memory with one 8-byte little-endian
   port.

The decision must come from the icode held in the memory stage's own
pipeline register. It must not come from the instruction being fetched. In a
pipeline, fetch is working on a different instruction.

| action | instructions                                       |
|--------|----------------------------------------------------|
| read   | `mrmovq` (5), `ret` (9), `popq` (B)                |
| write  | `rmmovq` (4), `call` (8), `pushq` (A)              |

These lists are the Y86-64 instruction set's. A load's value appears on
`m_valM` in the same cycle. A store is written at the end of the cycle.
`m_valM` is 0 when nothing is read. The rest of a full pipelined processor
(other stages, stack instructions, jumps, hazards) is not part of this RTL.

## Files

| file                | contents |
|---------------------|----------|
| `rtl/y86_pkg.sv`     | instruction codes, `REG_NONE`, pipeline-register structs and reset values |
| `rtl/adder.sv`       | the ADD box (`WIDTH`, default 64) |
| `rtl/pipe_reg.sv`    | pipeline register with a type parameter and a reset value |
| `rtl/pc_update.sv`   | PC register pP and its +2 adder |
| `rtl/instr_mem.sv`   | instruction memory, 10-byte fetch window, byte load port (`BYTES` = 1024) |
| `rtl/instr_split.sv` | field split; non-addq becomes NOP |
| `rtl/regfile.sv`     | 15 × 64-bit register file, 2 read + 2 write ports + debug read |
| `rtl/addq_seq.sv`    | the single-cycle addq processor |
| `rtl/addq_pipe.sv`   | the pipelined addq processor |
| `rtl/times3_comb.sv` | unpipelined times three |
| `rtl/times3_pipe.sv` | pipelined times three |
| `rtl/times3_deep.sv` | times three with split adders |
| `rtl/mem_rw_ctrl.sv` | is read? / is write? |
| `rtl/data_mem.sv`    | data memory (`BYTES` = 1024) |
| `rtl/mem_stage.sv`   | eM register + read/write decision + data memory |
| `rtl/pipelining_top.sv` | all examples side by side |

Each `tb/tb_<module>.sv` is a self-checking test bench for one module.
`tb/tb_pipelining_top.sv` runs the whole top level at its default sizes:

- the example program above and 300 random instructions on both processors;
- 400 operands through all three times-three circuits;
- 400 instructions through the memory stage.

It checks each result against a model written in the bench and checks cycle
counts. It also checks that each mechanism actually occurred:

- a full pipeline;
- NOP conversion;
- a stale register read, which makes the two processors finish with
  different registers;
- back-to-back results;
- loads and stores.

## Simulating

Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl \
    rtl/y86_pkg.sv tb/tb_pipelining_top.sv --top-module tb_pipelining_top -o sim
./obj_dir/sim
```

Substitute any other bench for `tb_pipelining_top`. Each bench prints one
line, `TB_RESULT checks=N failures=M`. Each bench also has a cycle-count
watchdog. Every bench finishes in well under a second of simulation time.
Memories and the register file are not reset, so initialise what you read.

## Choices made here

These points are not fixed by the design as published. They are choices made
for this RTL:

- **Widths:** the times-three datapaths are 64 bits wide.
- **Memory sizes:** both memories are 1 KiB.
- **Reset:** synchronous, active high.
- **Valid bits:** the times-three pipelines carry a valid bit.
- **`icode` in the pipeline:** it travels with every processor instruction
  and resets to NOP.
- **Non-addq encodings** become NOPs.
- **No halt:** the PC advances forever.
- **Reset in `addq_seq`:** no register is written while `rst` is high.
- **Load port:** the register file's M port serves as the register load port.
- **Write-port priority:** M wins over E when both name the same register.
- **Memory format:** data memory is little-endian and reads 0 when idle.
  Addresses past the end read 0 and are not written.
- **Adder split in `times3_deep`:** a low/high split with a registered
  carry. Other ways to split an adder exist.
- **Read/write lists in `mem_rw_ctrl`:** the published logic names only
  `mrmovq`. The remaining entries come from the Y86-64 instruction set.

The delays in picoseconds above describe a technology, not logic. The RTL
does not model them.
