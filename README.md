# Metal: a RISC pipeline whose instruction set is extended in software

Metal gives system software the kind of power that processor vendors keep
for themselves in microcode. Instead of hiding new features behind an
undocumented microcode ROM, the processor offers a privileged *Metal mode*
and a small RAM, the MRAM, that sits right next to the instruction fetch
unit. Software loads that RAM at boot with up to 64 *mroutines*, short
routines written in the processor's own instruction set plus a handful of
Metal instructions. A program calls mroutine *n* with `menter n`; the
mroutine can touch state that normal code cannot (Metal registers, the TLB,
physical memory, control registers) and returns with `mexit`. Because the
mroutines are fetched from on-chip RAM and the mode switch is folded into
the pipeline, a call costs about as much as a microcoded instruction.
System calls with user-defined privilege levels, software-refilled TLBs with
custom page tables, transactional memory by intercepting loads and stores,
and user-level interrupts all become software.

This repository holds a synthesizable SystemVerilog model of such a
processor: a classic 5-stage pipeline executing a 64-bit RISC-V style
integer instruction set, with the Metal extension built in.

## Block map

```
            +------+     +-------+     +-----+     +--------+     +-----------+
  MRAM ---->| Fetch|---->|Decode |---->| ALU |---->| Memory |---->| Writeback |
 (code,     |  +   |     | RegF  |     | MReg|     |  TLB   |     |           |
  data)     |predec|     | subst.|     | CRs |     | MRAM   |     |           |
            +------+     +-------+     +-----+     | data   |     +-----------+
               ^  intercept_table                  +--------+
```

| file | block |
|---|---|
| `rtl/metal_pkg.sv` | shared types, instruction encodings, control register map, TLB entry layout |
| `rtl/metal_cpu.sv` | the processor (top): pipeline, hazards, Metal mode control, exception delivery |
| `rtl/mram.sv` | Metal RAM: code segment (64 slots of 32 instructions) and data segment (512 x 64 bit) |
| `rtl/mreg.sv` | Metal register file m0-m31 |
| `rtl/intercept_table.sv` | instruction interception, one entry per opcode class |
| `rtl/tlb.sv` | 16-entry data TLB with address space IDs and page keys |
| `rtl/decoder.sv` | instruction decoder |
| `rtl/regfile.sv` | 32 general purpose registers |
| `rtl/alu.sv` | integer ALU |

## The Metal instructions

All Metal instructions use the custom-0 major opcode `0001011`; `funct3`
selects the operation. Only `menter` is legal in normal mode.

| funct3 | instruction | effect |
|---|---|---|
| 000 | `menter n` | enter Metal mode at mroutine `n = imm[5:0]`; m31 = pc + 4 |
| 001 | `mexit` | leave Metal mode, continue at m31 |
| 010 | `rmr rd, m` | rd = m[imm[4:0]] |
| 011 | `wmr m, rs1` | m[imm[4:0]] = rs1 |
| 100 | `mld rd, imm(rs1)` | rd = MRAM data word at byte address rs1 + imm |
| 101 | `mst rs2, imm(rs1)` | MRAM data word at rs1 + imm = rs2 (S-type immediate) |
| 110 | `mcr cr, rs1` | control register `imm[11:0]` = rs1 |
| 111 | `tlbw rs1, rs2` | write a TLB entry: rs1 = tag, rs2 = data (below) |

The first six are the Metal architecture's instruction set; `mcr` and
`tlbw` are this design's way of exposing the control registers and the
TLB, which the architecture says a processor should expose but does not
encode. The features could as well be memory-mapped registers visible
only in Metal mode. Instructions were chosen here so that a Metal-mode load
or store always reaches physical memory.

Control registers: `0x000` ASID (8 bits), `0x001` page key rights
(two bits per key: bit 2k access-disable, bit 2k+1 write-disable, 16 keys),
`0x020 + c` interception entry of opcode class `c = instr[6:2]`
(value bit 6 = enable, bits 5:0 = mroutine, bits 15:8 = funct3 skip mask:
an instruction whose `funct3` bit is set is not intercepted, so `sd` can
be caught without `sb`, `sh` and `sw`).

`tlbw` operands: rs1 = {index[63:56], asid[39:32], vpn[26:0]},
rs2 = {valid[63], W[41], R[40], key[35:32], ppn[27:0]}. Virtual addresses
are 39 bits with 4 KiB pages, physical addresses 40 bits.

## Entering and leaving Metal mode in the pipeline

This is the part of the design that needs the most care.

**menter costs no cycle.** The fetch stage has a predecoder. When it sees
`menter n` (in normal mode) it sends `menter` on to decode but points the
next fetch at the *second* instruction of mroutine `n`, in Metal mode, so
fetch now reads the MRAM. In decode, `menter` is then replaced by the
mroutine's *first* instruction, read through a second MRAM read port
addressed by `n`. The replacing instruction carries a *link*: when it
executes, m31 is written with the address after `menter`. In the cycle
trace the instruction before `menter` and the first mroutine instruction
follow each other with no gap.

**mexit costs one cycle.** When the predecoder sees `mexit` it holds the
fetch address. In the next cycle, while `mexit` is in decode, the fetch
port reads main memory at the address in m31, in normal mode, and that
instruction goes through the ordinary predecoder (so it can itself be a
`menter` or an intercepted instruction). `mexit` turns into one bubble.
m31 is taken from a `wmr m31` or a link in the execute stage if one is
there, so `wmr m31, x ; mexit` needs no stall.

**Metal state is read and written in one stage.** `rmr`, `wmr`, `mcr`,
`tlbw` and the link all act in the execute stage, in program order, so
Metal instructions never need hazard checks among themselves. The
interception table forwards a write to a lookup made in the same cycle:
the instruction fetched while `mcr` executes (the one at the `mexit`
target) already sees the new setting.

**Interception.** If the opcode class of a normal-mode instruction is
enabled in the interception table, and its `funct3` is not in the entry's
skip mask, the predecoder treats it like
`menter`: the instruction is replaced by the mroutine's first instruction,
m31 gets the address after it and m30 the instruction word, so the
mroutine can emulate it. Metal-mode code is never intercepted.

**Exceptions and interrupts are mroutines.** They are taken in the memory
stage, so they are precise: the instruction there has not changed any
state, and younger ones are flushed. m31 gets its pc (the handler returns
to it to retry it, or adds 4 to skip it) and m30 extra information.

| entry | cause | m30 |
|---|---|---|
| 61 | unknown instruction, or Metal-only instruction in normal mode | instruction word |
| 62 | TLB miss, or read/write/page-key permission fault | virtual address |
| 63 | interrupt (`irq` high) | 0 |

mroutines are never interrupted and never raise exceptions: interrupts wait
until the instruction in the memory stage runs in normal mode, and an
illegal instruction in Metal mode does nothing.

**Memory in Metal mode.** Loads and stores in Metal mode bypass the TLB:
the address is physical. This is what lets a page-fault mroutine walk a page
table of any shape and fill the TLB with `tlbw`. Instruction fetch in normal
mode is not translated in this model.

## Rest of the pipeline

Branches and jumps resolve in execute and flush fetch and decode (two-cycle
penalty, no prediction). Results are forwarded from the memory and writeback
stages into execute; a load or `mld` followed by an instruction that uses its
result stalls decode for one cycle. The register file writes through, so a
writeback and a decode read in the same cycle need no extra path.

## Interfaces and timing

* Instruction memory: `imem_addr` (byte address) out, `imem_rdata` (32 bits)
  back in the same cycle.
* Data memory: `dmem_req`, `dmem_we`, `dmem_be` (8 byte enables),
  `dmem_addr` (physical byte address), `dmem_wdata` (lane aligned),
  `dmem_rdata` (the 64-bit word containing the address) in the same cycle;
  stores are written at the clock edge. Accesses must be naturally aligned.
* `irq` is a level request; `irq_ack` pulses for the cycle in which it is
  taken; the device should then drop it.
* `mram_load_*` write MRAM code (32-bit words) and data (64-bit words). Load
  them while `rst_n` is low; MRAM contents are not reset.
* `rst_n` is an asynchronous active-low reset; execution starts at
  `RESET_PC` (0) in normal mode.
* `retire` / `retire_metal` mark a completed instruction.

Parameters of `metal_cpu`: `SLOT_WORDS` (32 instructions per mroutine slot),
`DATA_WORDS` (512 words of MRAM data), `TLB_ENTRIES` (16), `RESET_PC`.
The 64 mroutine entries, the 32 Metal registers and the 64-bit width are in
`metal_pkg`. The entry point of mroutine `n` is MRAM byte address
`n * SLOT_WORDS * 4`; an mroutine longer than its slot jumps into a spare
slot.

## What follows the architecture and what is this design's choice

Taken from the Metal architecture: the Metal mode and its six instructions,
64 mroutines in an MRAM beside fetch with separate code and data segments,
32 Metal registers with the return address in m31, replacing `menter` in
decode and stalling fetch for `mexit`, physical memory access in Metal mode,
a TLB with address space IDs and page keys written by an instruction,
delivery of every exception and interrupt to mroutines, interception of
instructions, and non-interruptible mroutines.

One difference from the architecture's reference pipeline: it puts the
Metal register file beside the general register file in decode. Here the
Metal registers are read and written in execute, together with the control
registers and the TLB, so Metal instructions need no hazard checks among
themselves. The cost is that `mexit` gets m31 forwarded from execute.

Chosen here, because the architecture leaves them open: the RISC-V style
base instruction set (RV64I without the 32-bit word operations, fences and
CSRs) and every encoding; the slot layout of the code segment and the sizes
of MRAM data, TLB, ASID and page keys; the `mcr` and `tlbw` instructions and
the control register map; entry numbers 61-63 and the use of m30;
interception by opcode class and funct3; the single-cycle memory interfaces; the
forwarding and stall structure. Instruction fetch translation, misaligned
accesses, multiply/divide and nested Metal (mroutines that are themselves
intercepted) are not modelled. The architecture reports its cost as about
14 % more cells and 16 % more wires than the same pipeline without Metal;
no baseline pipeline is included here to compare with.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/metal_asm_pkg.sv` holds instruction
encoders used to write programs.

```
verilator --binary --timing --assert -Irtl \
  rtl/metal_pkg.sv tb/metal_asm_pkg.sv rtl/alu.sv rtl/regfile.sv rtl/mreg.sv \
  rtl/mram.sv rtl/tlb.sv rtl/intercept_table.sv rtl/decoder.sv rtl/metal_cpu.sv \
  tb/tb_metal_cpu.sv --top-module tb_metal_cpu -o sim && ./obj_dir/sim
```

`tb_metal_cpu` runs the processor at its default parameters with a
behavioural 64 KiB memory. It loads system call entry and exit mroutines
(privilege level kept in m0, a jump table in memory), a page-fault mroutine
that refills the TLB from a per-ASID page table and treats a repeated fault
as a protection violation, mroutines that switch the ASID, write-disable a
page key and turn load interception on and off (with `lw` in the skip
mask, so only `ld` is caught), an interception handler, an
illegal-instruction handler and an interrupt handler. The user program
exercises all of them; the testbench checks registers, memory and MRAM data,
checks that `menter` costs zero cycles and `mexit` one, and checks that
every pipeline mechanism (substitution, interception, m31 forwarding,
load-use stall, both forwarding paths, taken branches, each exception kind,
TLB hits, physical accesses, `mld`/`mst`, `tlbw`, `mcr`) occurred. The whole
run takes about 360 cycles.

Four more testbenches run whole workloads on the processor at its default
parameters, with the same memory model. They are built like `tb_metal_cpu`,
replacing the last file and the top module name. Each mroutine is written
as a short instruction stream in the testbench, and forward branches are
patched once their targets are known.

* `tb_workload_priv`: privilege levels defined in software. m0 holds the
  level: user, kernel, or an isolated domain inside a user process. Some
  mroutines check the level: setting the address space ID needs the kernel,
  and leaving the domain needs the domain. A gate mroutine enters the domain
  and enables the page key of the domain's secret page. Violations are passed
  to a kernel handler in normal mode. This covers a refused call, a refused
  page key on a TLB miss, and a refused page key on a TLB hit.
* `tb_workload_radix`: custom page tables. The page-fault mroutine walks a
  three-level radix table (9 index bits per level) in physical memory and
  fills the TLB with `tlbw`. Some faults go to an operating system handler
  in normal mode, with the address in a0 and the pc in a1. These are a page
  that is not present, and an access the leaf entry does not allow. To tell
  a load from a store, the walker reads the faulting instruction.
* `tb_workload_tm`: software transactional memory. `tstart` turns on
  interception of `ld` and `sd`. The intercepted accesses are emulated from
  the instruction word in m30, using tables that move a value to or from any
  register. Writes are buffered in the MRAM data segment and reads are logged.
  `tcommit` checks the logged reads against memory, then writes the buffer
  back. If a read value changed, the transaction aborts and resumes at the
  address passed to `tstart`. The testbench changes a word behind one
  transaction's back to force a retry.
* `tb_workload_uintr`: user-level interrupts. The kernel decides which
  privilege levels may take interrupts. A process at an allowed level
  registers a handler. An interrupt arriving while that process runs is passed to the handler in
  normal mode without a privilege change. After a process switch, the next
  interrupt takes the kernel path.
