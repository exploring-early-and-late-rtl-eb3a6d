# Dual-ALU single-issue in-order pipeline

Simple in-order pipelines lose cycles to data dependencies. Where the ALU sits
decides which dependencies cost cycles:

* With the ALU in the **execute stage**, next to address generation, a load's
  data arrives two stages after the ALU needs it. A dependent ALU operation
  must wait: this is the *load-use* interlock.
* With the ALU **at the end of the data-cache stages**, load data reaches it in
  time. But an address that depends on an ALU result now waits for the ALU:
  this is the *address-generation* interlock. Branches are also resolved later,
  so a misprediction costs more.

This design uses **two identical ALUs**. The *early* ALU sits in EXE and the
*late* ALU sits in DC-2. An ALU operation normally uses the early ALU. It is
*diverted* to the late ALU only when one of its operands will not be ready in
time for EXE. Load-use stalls disappear. Address-generation stalls and late
branch resolution remain, but only for the rare operations that were diverted.

The RTL is a complete 32-bit MIPS-like core: fetch, branch prediction, decode,
both ALUs, address generation, a 3-stage multiplier, register file, and
instruction and data memories. It is written in synthesizable SystemVerilog
(IEEE 1800-2017).

## Pipeline

Seven stages. The back end (EXE to WB) never stalls.

| stage | work |
|-------|------|
| IF-1  | fetch PC; bimodal predictor and BTB lookup choose the next PC |
| IF-2  | instruction array read (data is in the ID register one edge later) |
| ID    | decode, register read (write-through from WB), **ALU steering**, issue interlock |
| EXE   | **early ALU**, address generation (AGU), mult-1; branches on the early ALU resolve here |
| DC-1  | data address phase, mult-2 |
| DC-2  | data array read/write, **late ALU**, mult-3; branches on the late ALU resolve here |
| WB    | register write; load data selected |

When each result can be forwarded:

| producer | result exists from the end of | usable by EXE of an instruction that many positions behind |
|----------|-------------------------------|----------------------------------------------|
| early-ALU operation | EXE  | 1 or more |
| load, multiply, late-ALU operation ("late result") | DC-2 | 3 or more |

Every late result is written at the end of DC-2. The next instruction reaches
DC-2 one cycle later, so the late ALU and the store-data path can use any
result, even from the instruction immediately ahead, without waiting.

## Steering between the early and the late ALU (`alu_steer`)

This is the heart of the design. `alu_steer` runs in ID. It looks at the two
instructions ahead: the one in EXE (distance 1) and the one in DC-1
(distance 2). For each source register it finds the *nearest* of those two that
writes the register, and asks whether that writer produces a late result.

* **ALU operations**, including conditional branches and `jr`/`jalr`:
  * if any source comes from a late producer at distance 1 or 2, the
    operation is diverted to the late ALU;
  * otherwise it runs in the early ALU.

  A diverted operation is itself a late producer, so operations that depend
  on it directly are diverted too. This is a chain. The chain ends once an
  operation has no late producer within two positions.
* **Loads and stores**: the address is always generated in EXE. If the base
  register has a late producer at distance 1 or 2, issue stalls. The stall
  lasts 2 cycles at distance 1 and 1 cycle at distance 2. A store's data
  operand is only needed in DC-2 and never stalls.
* **Multiplies**: mult-1 runs in EXE, so a late operand stalls issue the same
  way.

Each instruction executes in exactly one ALU. The early ALU and the late ALU can
work on different instructions in the same cycle.

Example: the loop below runs with no stall cycles. The ALU used by each
operation is noted next to it.

```
op1:  addu $3,$2,$1      early
op2:  lw   $5,100($3)    (address from op1, early: no stall)
op3:  subu $7,$5,$10     late   (load right before)
op4:  srav $12,$7,$3     late   (chain)
op5:  bne  $12,$8,...    late   (chain; a misprediction costs 2 more cycles)
op6:  lw   $3,100($29)
op7:  addu $8,$3,$5      late   (load right before)
op8:  sw   $8,200($29)   (store data needed only in DC-2: no stall)
op9:  sra  $10,$10,1     early  (both ALUs busy this cycle: op7 is in DC-2)
op10: bne  $10,$0,op1    early
```

## Operand forwarding (`fwd_mux`)

Each instruction reads its operands in ID and carries them down the pipeline.
In EXE, DC-1 and DC-2 it refreshes them from the instructions ahead of it,
which sit in the DC-1, DC-2 and WB pipeline registers. The rule:

* take the value of the **nearest** instruction that writes the register;
* if that instruction has not produced its result yet, keep the current value
  and pick the result up at a later stage.

The steering rules guarantee that every operand is final at the stage that uses
it:

* EXE, for the early ALU, the AGU and the multiplier;
* DC-2, for the late ALU and store data.

Assertions in `dual_alu_cpu` check both points in simulation.

## Branches

The predictor has 128 two-bit counters (bimodal) and a 128-entry direct-mapped
BTB. Both are looked up with the IF-1 PC.

* A BTB hit on an unconditional transfer, or on a conditional branch whose
  counter says taken, redirects fetch to the stored target.
* There is no branch delay slot.
* Every instruction carries its predicted next PC. The ALU that executes an
  instruction computes the real next PC. A mismatch flushes all younger
  instructions and restarts fetch.

| resolved in | instructions flushed |
|-------------|----------------------|
| EXE (early ALU) | 3 (IF-1, IF-2, ID) |
| DC-2 (late ALU) | 5 (IF-1 to DC-1) |

A branch pays the 2 extra cycles only if it was diverted. When both ALUs find a
misprediction in the same cycle, the older instruction (in DC-2) wins. The
predictor is trained by whichever ALU resolves the branch. Counters train on
conditional branches; the BTB is written on every taken transfer.

## Memories

The instruction and data memories are single-port synchronous arrays
(`sram_sp`), 16 KiB each, and always hit. The address is formed one stage
before the array access (IF-1 / DC-1) and the array is accessed at the end of
the second stage (IF-2 / DC-2), giving a 2-cycle access.

* Stores write in DC-2, with byte enables for `sb`/`sh`. Byte and halfword
  loads are extracted and extended in WB. A younger load reaches DC-2 at least one cycle later
  and sees the new data.
* The address spaces are separate (Harvard), both starting at 0. Addresses wrap
  modulo the array size.
* While the core is in reset, a host loads both arrays through the
  `*_ld_*` ports.

There are no caches. The source sizes its L1 caches at 16 KiB, 4-way, 32-byte
lines with a 2-cycle hit, and uses a 128 KiB L2. Here only the L1 size and hit
latency are kept, as always-hit arrays.

### Single-way instruction fetches (`ic_seq_detect`)

In a 4-way instruction cache, most fetches could read just one data way: the
way already found for the current line. `ic_seq_detect` makes that decision in
IF-2. It remembers the line (32 bytes) of the last instruction-array access. A
fetch is flagged *single-way* when both of these hold:

* its PC is PC+4 of the previous fetch;
* it lies in the remembered line.

Every other fetch is *conventional*. That covers a PC taken from the BTB, a
redirect after a misprediction, a new line, and the first fetch after reset.
Because the PC source alone decides, the check adds nothing to the
predictor's path. The array here always hits, so the flag does not change what
is read. It is exported as an event (`ic_single_way`, next to `ic_access`) so
that fetch energy can be estimated.

## Instruction set

MIPS encodings:

* ALU: `addu/add subu/sub and or xor nor slt sltu sll srl sra sllv srlv srav`
* immediates: `addiu/addi slti sltiu andi ori xori lui`
* memory: `lb lbu lh lhu lw sb sh sw` (little-endian; misaligned low address bits are ignored)
* multiply: `mul` (MIPS32, low 32 bits)
* branches and jumps: `beq bne blez bgtz bltz bgez j jal jr jalr`
* `break`

Limits:

* `add`/`addi` do not trap on overflow.
* There are no exceptions. An unknown encoding executes as a no-op.
* `break` stops fetch. Once every older instruction has retired, `halted`
  rises and stays high until reset.

## Interface of the top module `dual_alu_cpu`

| port | meaning |
|------|---------|
| `clk`, `rst_n` | clock; asynchronous active-low reset (PC = `RESET_PC`) |
| `imem_ld_we/addr/data`, `dmem_ld_we/addr/data` | host word writes into the arrays |
| `halted` | `break` reached and pipeline drained |
| `retire` (`retire_t`) | per retiring instruction: PC, register write, store address/data, and whether it used the late ALU |
| `ev` (`perf_ev_t`) | one-cycle pulses: early ALU use, late ALU use, both ALUs busy, AG stall, early/late misprediction, multiply, load, store, instruction-array access, single-way fetch |

| parameter | default | note |
|-----------|---------|------|
| `IMEM_WORDS`, `DMEM_WORDS` | 4096 | 16 KiB each |
| `BTB_ENTRIES`, `BIMOD_ENTRIES` | 128 | |
| `RESET_PC` | 0 | |

## Files

* `rtl/dcpu_pkg.sv`: encodings, `ctrl_t`, `retire_t`, `perf_ev_t`
* `rtl/dual_alu_cpu.sv`: pipeline and top
* `rtl/alu.sv`, `agu.sv`, `mul3.sv`, `regfile.sv`, `decoder.sv`, `bpred.sv`,
  `alu_steer.sv`, `fwd_mux.sv`, `lsu_align.sv`, `sram_sp.sv`,
  `ic_seq_detect.sv`: the units
* `tb/tb_<unit>.sv`: one self-checking testbench per unit

## Verification

`tb_dual_alu_cpu` runs the core at its default size. Programs are assembled
inside the testbench. A reference instruction-set model checks every retiring
instruction: its PC, register write, and store address and data. It runs:

1. The example loop above. It checks which ALU each operation used and that
   there are no stall cycles. It also checks that both ALUs are busy in the
   same cycle once per iteration.
2. Timing pairs, each compared against a baseline program:

   | case | expected extra cycles |
   |------|-----------------------|
   | load followed by a dependent ALU operation | 0 |
   | address needs a late result at distance 1 | 2 |
   | address needs a late result at distance 2 | 1 |
   | address needs a late result at distance 3 | 0 |
   | multiply on a load at distance 1 | 2 |
   | late-resolved vs early-resolved misprediction | 2 |

3. Forty random looping programs. They mix ALU operations, shifts, loads,
   stores of all sizes (some with computed bases), multiplies, forward
   branches, and calls whose return address depends on a load.
4. Two small kernels in the style of embedded benchmarks. Each result is
   compared with a golden value computed in the testbench:
   * a table-driven CRC-32 over 256 bytes. Per byte, four operations go to
     the late ALU, and the table load stalls 2 cycles for the late `sll`
     that forms its address. CPI is about 1.23.
   * a bit count that clears the lowest set bit in a loop, over 64 words.
     Only the `beq` right after each load goes late, and nothing stalls.
   The test checks these counts exactly.

The test also counts each mechanism (early ALU, late ALU, both ALUs in one
cycle, AG stall, early and late misprediction, multiply, load, store,
single-way and conventional fetch) and fails if any of them never occurs. On
the straight-line baseline program it checks that exactly one fetch per line is
conventional. Each unit testbench compares its unit with a model
written independently in the testbench.

Simulating with Verilator:

```
verilator --binary --timing -Wno-fatal --top-module tb_dual_alu_cpu \
    -y rtl -y tb +libext+.sv rtl/dcpu_pkg.sv tb/tb_dual_alu_cpu.sv
./obj_dir/Vtb_dual_alu_cpu
```

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

## Departures from the source and open points

* **Which configuration this is.** Only the dual-ALU configuration is built.
  The single-ALU configurations (ALU in EXE, in DC-1, or in DC-2) appear in the
  source only as points of comparison.
* **Choices of this design**, all absent from the source:
  * the instruction subset;
  * no delay slot;
  * the forwarding network;
  * store data being needed only in DC-2;
  * treating multiply results like load results for steering;
  * handling `jr`/`jalr` like branches;
  * the halt mechanism.
* **Branch penalty.** The source's simulator configuration quotes a 6-cycle
  branch penalty. This pipeline flushes 3 instructions (early ALU) or 5 (late
  ALU), which keeps the stated 2-cycle difference between early and late
  resolution.
* **Not built:**
  * caches and main memory (see *Memories*). Of the instruction cache, only
    the single-way fetch decision exists, as an event;
  * energy figures, which come from a 65 nm implementation.
* **Workloads.** The benchmark programs the source evaluates (MiBench,
  SPEC CPU2000 integer, EEMBC) need more memory, divides, HI/LO multiplies
  and system calls. None of these is provided here.
