# Data Prefetching Processor: a DLX-style pipeline that serves dependent operands from a result table

In a five-stage pipeline, an instruction that reads a register written by one
of the previous few instructions would otherwise see a stale value in the
register file. The usual fixes are to stall the reader, or to build a
forwarding network that compares the reader's sources with every later
pipeline stage. This design takes a third route. It records recent results
in a small associative **Data Prefetching Table (DPT)** keyed by target
register. A **History Table (HT)** in the decode stage recognises which
operands depend on a recent instruction. When the HT flags an operand, the
ALU takes that operand from the DPT instead of from the register file.

The result is a pipeline that runs dependent code at one instruction per
clock, including a load followed directly by its user, with no interlock.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, and checked with
Verilator (lint and simulation) and with the slang front end of Yosys.

## The pipeline at a glance

```
 IF            ID                       EXE                       MEM                     WB
 PC, +4 ->  decoder, register file  ->  ALU operand select   ->  data memory         ->  register file
 instr mem  HT compare (src1, src2)     DPT lookup (2 ports)     DPT write                write
            HT push (target)            ALU, Zero, branch         (ALU result or load)
```

| Stage | What happens |
|-------|--------------|
| IF  | `pc_unit` holds the PC. `instr_mem` is read combinationally. |
| ID  | `decoder` produces the control word. `regfile` is read. `history_table` compares both source fields with the targets of the last 16 instructions, and then records this instruction's target. |
| EXE | Each source flagged by the HT is looked up in `dpt`. On a hit, the DPT value replaces the register-file value. The `alu` computes the result. Branches and jumps resolve here. |
| MEM | `data_mem` is accessed. Every result-producing instruction writes its result into the DPT: the ALU result from the EXE/MEM register, or the loaded word. |
| WB  | The result is written into the register file. |

## Why the DPT is always right

This is the part worth understanding before changing anything.

**Write in MEM, read in EXE, with write-through.** A producer writes its
result into the DPT during its MEM cycle. In that same cycle, the next
instruction is in EXE looking the register up. The DPT returns the data being
written when the lookup address equals the write address. So:

- a producer 1 instruction ahead is served by the write-through path;
- a producer 2 ahead was written into the DPT one cycle earlier;
- a producer 3 ahead was written two cycles earlier, while the reader was
  still reading the old register-file value in ID.

All three cases, which a classic design covers with forwarding muxes, are one
associative lookup here. Loads are covered too. The data memory is read
combinationally, so the loaded word is written into the DPT in the load's
own MEM cycle.

**One valid entry per register.** A write to a register that already has a
valid entry overwrites that entry. A lookup therefore matches at most one
entry. That entry always holds the newest value, and the read mux is a plain
OR of the matching entries.

**Expiry is harmless.** An entry that has not been written or reused for
64 clocks becomes invalid. The HT only flags producers at most 16
instructions back, and the pipeline never stalls, so a flagged operand's
entry is always still valid. The top level asserts this (`a_reuse_hits`).
If a lookup ever missed, the register-file value would be used, and by then
it is correct.

**Capacity.** With 5-bit register addresses, at most 31 registers can hold
valid entries at once. The 64-entry table therefore never has to displace a
valid entry at the default size. The round-robin victim pointer exists for
smaller tables, and `tb_dpt` exercises it with 4 entries.

## History Table (`history_table`)

- 16 entries used as a FIFO: a circular buffer whose oldest slot is
  overwritten on every push.
- Each entry holds a valid bit, a 4-bit age counter and a 5-bit target
  register address. The debug port shows this as a 16-bit word: reserved
  15..10, valid 9, counter 8..5, target 4..0.
- Every instruction leaving ID is pushed, so the window counts
  instructions. An instruction that writes no register, or writes r0, is
  pushed with valid = 0. Discarded instructions are pushed the same way.
- Two comparator banks test bits 25..21 and bits 20..16 of the instruction in
  ID against all valid entries. `reuse1`/`reuse2` report a match.
  `dist1`/`dist2` give the age of the youngest match: 0 means the previous
  instruction.
- The top level keeps a match only for a source the instruction really reads.
  For example, bits 20..16 of an ADDI are its target, not a source.

## Data Prefetching Table (`dpt`)

Each of the 64 entries is 32 bits. The debug port shows them in this layout:

| Bits | Field | Meaning |
|------|-------|---------|
| 31..29 | reserved | zero |
| 28 | busy | the value has been reused since it was written |
| 27 | valid | the counter has not run out |
| 26..21 | counter | clocks since the last write or reuse |
| 20..16 | target address | destination register |
| 15..0 | target value | the result |

Per clock and per entry, the first of these rules that applies wins:

1. **Write.** The entry chosen for the write gets the address and value;
   counter = 0, valid = 1, busy = 0. Busy is 1 instead if a lookup reads the
   value through write-through in the same cycle.
2. **Reuse.** The entry hit by a flagged lookup gets counter = 0 and busy = 1.
3. **Age.** Otherwise a valid entry counts up. When the counter is 63, the
   entry instead becomes invalid.

Write-slot choice: the valid entry with the same address; otherwise the
lowest-numbered invalid entry; otherwise the round-robin victim.

The write data comes from one of two sources, picked by `wr_from_mem`: the
pipeline data register (an ALU result) or the data memory (a load).

Event outputs pulse once per occurrence: `ev_expire`, `ev_realloc` (an entry
used before is taken again after expiring), `ev_update` and `ev_evict`.

## Instruction set and encodings

Instructions are 32 bits. The opcode is in bits 31..26. R-type instructions
have source 1 in 25..21, source 2 in 20..16 and the target in 15..11.
I-type instructions have the target in 20..16 and a 16-bit immediate.

The encodings are the standard DLX ones; see `dpp_pkg`.

| Class | Instructions |
|-------|--------------|
| R-type (opcode 0) | ADD, SUB, AND, OR, XOR, SLL, SRL, SRA, SLT |
| ALU immediate | ADDI, SUBI, ANDI, ORI, XORI, SLTI |
| Memory | LW, SW |
| Control | BEQZ, BNEZ, J, TRAP (halt) |

Any other encoding executes as a no-op.

Semantics of this implementation:

- The datapath is **16 bits wide**, the width of the table's value field.
  Register values, the ALU and data-memory words are all 16 bits.
  Immediates are sign-extended.
- Shifts use the low 4 bits of operand B. SLT and SLTI compare signed values.
- Load/store addresses are word addresses: `rs1 + imm`, wrapping at the data
  memory depth.
- Branch and jump targets are PC + 4 + offset, where the offset is in bytes.
  Branches and jumps resolve in EXE and discard the two younger
  instructions, so a taken branch costs 2 cycles.
- TRAP stops fetching when it is decoded. `halted` rises when it retires.

## Interface of `dpp_top`

| Port | Use |
|------|-----|
| `clk`, `rst_n` | clock; synchronous active-low reset |
| `imem_load_en/addr/data` | write program words while `rst_n` is low |
| `halted`, `retire` | TRAP has retired; an instruction completed WB this cycle |
| `dbg_reg_addr/data`, `dbg_mem_addr/data` | combinational read of a register or a data word |
| `ev_reuse[1:0]`, `ev_reuse_dist` | HT flags of the instruction in EXE, and its producer's age |
| `ev_dpt_hit[1:0]` | the DPT supplied operand A / B |
| `ev_dpt_write`, `ev_dpt_load`, `ev_dpt_update`, `ev_dpt_expire`, `ev_dpt_realloc`, `ev_dpt_evict` | DPT activity |
| `ev_flush` | branch or jump taken |

Parameters: `IMEM_DEPTH` = 1024, `DMEM_DEPTH` = 1024, `HT_DEPTH` = 16 and
`DPT_ENTRIES` = 64. The table widths (5-bit address, 16-bit value, 6-bit and
4-bit counters) are fixed by the entry layouts.

Start-up: the register file, the HT and the DPT are cleared by reset. The
two memories are not. Load the program before releasing reset. The
processor then fetches from address 0.

## Files

| File | Contents |
|------|----------|
| `rtl/dpp_pkg.sv` | widths, opcodes, control word, entry layouts |
| `rtl/dpp_top.sv` | the pipeline |
| `rtl/history_table.sv`, `rtl/dpt.sv` | the two tables |
| `rtl/decoder.sv`, `rtl/alu.sv`, `rtl/regfile.sv`, `rtl/pc_unit.sv`, `rtl/instr_mem.sv`, `rtl/data_mem.sv` | the rest of the pipeline |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_rtype_stream.sv` | dependent R-type streams with utilisation figures |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends itself. For
example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
  rtl/dpp_pkg.sv tb/tb_dpp_top.sv --top-module tb_dpp_top -o sim
./obj_dir/sim
```

Replace `tb_dpp_top` with any other testbench name. Add `-y tb` if you write
a testbench that uses helpers in `tb/`.

What the testbenches establish:

- **`tb_dpp_top`** runs at the default parameters. It executes 12 generated
  programs and compares every register and 64 data words with an
  instruction-level reference model in the testbench. The programs mix ALU,
  load/store, branch and jump instructions with dense dependences, plus a
  long idle stretch for some registers.
  - It checks the exact cycle count: instructions + 4 + 2 per taken
    branch, which means no data stall ever occurs.
  - It requires every mechanism to occur: reuse on each source, DPT hits at
    producer distances 1, 2 and 3, DPT writes from memory, update in place,
    expiry, reallocation of an expired entry, and flushes.
- **`tb_rtype_stream`** runs ten dependent R-type streams. It checks, against
  counts computed from the program text, that every operand with a producer
  in the last 16 instructions raises the reusing signal and is served by the
  DPT, and that throughput is one instruction per clock. It also prints HT,
  DPT and ALU utilisation, and an upper bound on the stalls a pipeline with
  neither forwarding nor the tables would need.
- **`tb_dpt`** and **`tb_history_table`** check the tables against
  behavioural models: hit exactly within 64 clocks of the last write or
  reuse, newest value, write-through, busy and counter updates, the entry
  layout, the 16-instruction window and the youngest-match distance.
- The remaining testbenches cover the decoder, ALU, register file, PC,
  and the two memories.

## Where this design departs from, or fills in, the scheme it implements

The scheme fixes the tables' sizes, the entry layouts, the HT in ID and the
DPT in EXE, and the reusing signal from HT to DPT. It also fixes the busy,
valid and counter behaviour, and the two DPT data sources. This
implementation chose the following itself:

- **Datapath width of 16 bits.** A 32-bit DLX datapath would produce values
  that do not fit the 16-bit value field. Widening it means widening
  `tval`, `XLEN` and the entry layout together.
- **Loads put the loaded value into the DPT.** One reading of the scheme
  stores the load's immediate instead. That would hand a wrong value to a
  later reader.
- **What the HT records.** The HT records each instruction's decoded target
  as it leaves ID. Taking it from the DPT after execution would be too late
  for the next instruction.
- **The 16-instruction window.** The HT covers the previous 16 instructions.
  The scheme also speaks of the previous 15.
- **Update-in-place and the write-through path.** These are what make the
  table a complete replacement for forwarding.
- **Branch handling.** Branches resolve in EXE with predict-not-taken and a
  2-cycle penalty.
- **One ALU and one data-memory port.** Some drawings of the scheme suggest
  several parallel ALU lanes, but its datapath is described as a single DLX
  pipeline, so one lane is built.
- **No caches.** The instruction and data caches, and the 512 KB L1 data
  cache, are not modelled. Flat single-cycle memories of 1024 words stand in
  for them.
- **Additions for use and test.** The instruction subset, TRAP as a halt, the
  program-load port and the debug/event ports are additions.
- **No comparison baseline.** There is no model of a conventional pipeline.
  `tb_rtype_stream` only estimates that pipeline's stalls from the program
  text.
