# Application-specific soft multiprocessor

A stream application (a radio receiver, a filter bank, a sort network) is
split into filters, and each group of filters runs on its own small 32-bit
processor. The processors share nothing: no bus, no common memory. Each one
has local instruction and data memory, and it talks to the others only
through one-way FIFOs. The FIFOs are ordinary load and store addresses to
the program. A read from an empty FIFO, or a write to a full one, stalls
the processor until it can complete. This blocking access is the only
synchronisation in the system.

Everything around the processors is chosen per application:

- **how many processors** there are;
- **which FIFOs exist**: a regular mesh, where data for a distant processor is
  relayed hop by hop by the programs in between, or point-to-point links
  straight from every producer to every consumer;
- **the pipeline depth** of each processor: 3, 4 or 5 stages;
- **the FIFO depth**;
- **the instruction subset** of each processor: instructions its program
  never uses are removed from its decoder.

This RTL is a parameterised version of such a system. The top level,
`soft_mp`, takes the topology as a table of links, so one module covers both
the mesh and the point-to-point case.

The organisation follows a published study of soft multiprocessors built on
FPGAs. That study generated its processors with an existing soft-processor
generator and gave little of their internals. The processor here is
therefore a new design that meets the same outward description: a MIPS
subset, 3/4/5-stage in-order pipelines, interlocks, static not-taken branch
prediction, local memories, and single-cycle memory-mapped FIFOs with retry.
The section "Where this RTL departs from or adds to the original" lists every
point that is this design's own choice.

## System structure

```
            host in                                   host out
               |                                          ^
               v                                          |
   +--------+ FIFO +--------+       +--------+  FIFO  +--------+
   | cpu 0  |----->| cpu 1  |  ...  | cpu k  |------->| cpu 15 |
   | IMEM   |<-----| IMEM   |       | IMEM   |        | IMEM   |
   | DMEM   |      | DMEM   |       | DMEM   |        | DMEM   |
   +--------+      +--------+       +--------+        +--------+
         every arrow is one `fifo`, placed by the link table
```

| module      | role |
|-------------|------|
| `soft_mp`   | Top level. It holds `NPROC` processors, one `fifo` per entry of the link table, the host streams and the memory load port. |
| `soft_cpu`  | One processor: its pipeline, its local memories and its FIFO port unit. |
| `fifo`      | A circular buffer of `DEPTH` words. Its head word and its full/empty flags are visible in the same cycle. |
| `fifo_io`   | Maps the FIFO address window onto ports. It raises pop/push, or raises stall when the access has to be repeated. |
| `decoder`   | The MIPS decoder. The `ISA_EN` mask removes instructions from it. |
| `alu`, `mul_unit`, `regfile`, `local_ram` | The processor's datapath pieces: ALU, multiplier with HI/LO, register file and memories. |
| `smp_pkg`   | Shared types, the link descriptor, the mesh-table builder and MIPS instruction encoders. |

## Talking through FIFOs

A processor reaches its FIFOs with `LW` and `SW` to addresses that have
bit 31 set:

| address                          | `LW` (load)                         | `SW` (store)                        |
|----------------------------------|-------------------------------------|-------------------------------------|
| `0x8000_0000 + 4*k`, k = 0..15   | pop input port *k*                  | push output port *k*                |
| anything with bit 31 clear       | data memory                         | data memory                         |

The access is resolved in the memory stage. In that same cycle `fifo_io`
looks at the selected FIFO's empty or full flag.

- **If the access can complete**, the pop or push happens at the next clock
  edge. A FIFO access therefore costs one cycle, like any other load or
  store.
- **If it cannot complete**, the memory stage and everything before it hold,
  and a bubble goes to write-back. The same access is tried again next
  cycle, and this repeats until it succeeds.

A word pushed in cycle *t* can be popped in cycle *t+1*.

A processor is never told whether a port exists. A port that no link uses
behaves as follows:

- reading it waits forever, because it reads as empty;
- writing it drops the word, because it never reads as full.

A typical filter loop looks like this:

```
        lui   r1, 0x8000          # r1 = FIFO window
loop:   lw    r2, 12(r1)          # pop input port 3
        ...compute r3...
        j     loop
        sw    r3, 20(r1)          # delay slot: push output port 5
```

## Topologies: the link table

`soft_mp` builds its FIFOs from `LINKS`, an array of `link_t` entries, of
which the first `NLINK` are used. Each entry looks like this:

```
link_t = '{src, sport, dst, dport}   // output port sport of processor src
                                     //   -> input port dport of processor dst
```

The processor number `EXT` (`8'hFF`) stands for the host. A link from `EXT`
is fed by `ext_in_*[sport]`, and a link to `EXT` drains into
`ext_out_*[dport]`. Both host streams use valid/ready handshakes.

**Mesh.** `mesh_table(X, Y, in_proc, out_proc)` builds the mesh table,
which is the default.

- Processor *p* sits at column `p % X` and row `p / X`, with row 0 at the top.
  With X = 3, processors 0 1 2 lie above 3 4 5.
- Each pair of neighbours is joined by two FIFOs, one in each direction.
  A processor therefore has at most eight: four in and four out.
- The port numbers are N = 0, S = 1, E = 2 and W = 3. What leaves through N
  arrives at the neighbour's S, and so on.
- Port 4 is the host port of `in_proc` and of `out_proc`.
- Data for a non-neighbour must be relayed in software: the processors in
  between pop it and push it on.

**Point-to-point.** There is one FIFO per producer/consumer pair, so a
splitter may have many output ports and a joiner many input ports. The
natural way to number the ports is by peer:

- input port *k* carries data from processor *k*;
- output port *k* carries data to processor *k*;
- a processor's host port is its own number, since it never links to itself.

This is the table of the six-processor example in `tb/tb_soft_mp.sv`. There,
3 reads the host and feeds 0 and 4, and both of those feed 5:

```
t[0] = mk_link(EXT, 0, 3, 3);  t[1] = mk_link(3, 0, 0, 3);
t[2] = mk_link(3, 4, 4, 3);    t[3] = mk_link(0, 5, 5, 0);
t[4] = mk_link(4, 5, 5, 4);    t[5] = mk_link(5, 5, EXT, 0);
```

The same computation on the mesh needs two extra processors (1 and 2) that
only relay data. In the testbench, point-to-point cuts the latency of the
first result from 25 to 19 cycles (4 stages). Throughput is unchanged,
because here the slowest filter sets the rate. Relaying costs throughput
only when the relaying processors also have computation of their own to do.

## The processor pipeline

| `STAGES` | stages                         | branch cost (taken)         | data-hazard waits |
|----------|--------------------------------|-----------------------------|-------------------|
| 3        | IF/D → EX/M → WB               | 0: the delay slot covers it | none              |
| 4        | IF → D → EX/M → WB             | 1 squashed fetch            | none              |
| 5        | IF → D → EX → M → WB           | 1 squashed fetch            | 1 cycle: load result used by the next instruction |

- **Fetch.** The instruction memory is a synchronous block RAM addressed
  with the *next* PC. This way the word for the current PC is already there
  while it is in fetch.
- **Decode.** Decoding and register read happen here. The register file
  writes through, so a result written back in this cycle is seen.
- **Execute.** This stage holds the ALU, the single-cycle 32×32 multiplier
  (MULT/MULTU into HI/LO) and branch/jump resolution.
- **Memory.** Data memory and FIFO accesses happen here. With 3 or 4 stages,
  execute and memory form one stage.
- **Write-back.** Load data comes either from the data-memory read port or
  from the FIFO word captured in the memory stage.

**Bypassing.** Execute-stage operands are bypassed from write-back. With 5
stages, non-load results are also bypassed from the memory stage. With 3 or
4 stages this covers every dependence, loads included, so the only
interlock is the FIFO wait. With 5 stages, an instruction that uses a load
result in the very next slot waits one cycle. The check compares rs and rt
whether or not the instruction reads them, so it is conservative. While
execute is held, its operand registers keep taking in the bypassed values,
so a result that drains out of write-back during a stall is not lost.

**Branches.** Branches use the MIPS delay slot. Branches and jumps resolve
in execute, and fetch keeps going sequentially (static not-taken
prediction). With 4 or 5 stages, the word fetched after the delay slot is
squashed when the branch is taken.

**Measured cost.** A 17-instruction loop that reads a FIFO, multiplies,
stores and loads memory and writes two FIFO words takes 17, 18 and 20 cycles
per iteration at 3, 4 and 5 stages. That is 0, 1 and 3 extra cycles, as the
table above predicts. Deeper pipelines cost cycles, but each stage does less
logic.

**Instruction set.** The processor implements the MIPS-I integer subset:

- `ADDU SUBU AND OR XOR NOR SLT SLTU` (`ADD/SUB` behave like the unsigned
  forms, since there are no exceptions);
- `SLL SRL SRA SLLV SRLV SRAV`;
- `ADDIU SLTI SLTIU ANDI ORI XORI LUI`;
- `MULT MULTU MFHI MFLO`;
- `LW SW`;
- `BEQ BNE BLEZ BGTZ BLTZ BGEZ`;
- `J JAL JR JALR`.

It does not implement byte/halfword accesses, divide, exceptions,
interrupts, caches or floating point.

**Instruction subsetting.** Each processor gets an `isa_mask_t`
(`ISA_MASKS[p]` on the top). Bit *i* of the mask enables `op_e'(i)`. An
instruction whose bit is clear decodes as having no effect, so synthesis can
remove its control and datapath. In the end-to-end test, the two relaying
processors of the mesh run with only `LUI LW SW J` enabled.

## Loading and running

1. Hold `rst` high.
2. Write each word with `ld_we = 1`, `ld_proc` = the processor, `ld_imem`
   = 1 for instruction memory or 0 for data memory, `ld_addr` = the word
   address and `ld_data` = the word. Each word takes one clock.
3. Release `rst`. All processors start at address 0 in the same cycle.

Outputs appear on `ext_out_*`. The status buses report, per processor:

- `cpu_retire`: an instruction completed;
- `cpu_stall`: a FIFO wait or a load-use wait;
- `cpu_taken`: a taken branch or jump.

`smp_pkg` has encoder functions (`i_addu`, `i_lw`, `i_fifo_rd`, `i_bne`, …)
for building programs inside a testbench. Branch offsets count instructions
from the delay slot.

## Parameters

| parameter (`soft_mp`) | default | where it comes from |
|-----------------------|---------|---------------------|
| `NPROC`               | 16      | the largest system of the original study (6, 9 and 16 were evaluated) |
| `STAGES`              | 4       | the depth that performed best there; 3 and 5 are also built |
| `FIFO_DEPTH`          | 4 words | the original FIFO cost of 128 memory bits, i.e. 4 × 32 bits; 2 to 64 words were evaluated |
| `NPORT`               | 16      | this design's choice; the largest point-to-point processor reported needed 11 ports |
| `IMEM_WORDS`, `DMEM_WORDS` | 2048 each | this design's choice (8 KiB each) |
| `MESH_X`, `MESH_Y`    | 4, 4    | this design's choice |
| `NLINK`, `LINKS`      | 50, `mesh_table(4,4,0,15)` | 48 mesh FIFOs plus host in/out; at most `MAX_LINKS` = 64 |
| `N_EXT_IN`, `N_EXT_OUT` | 1, 1  | this design's choice |
| `ISA_MASKS`           | all instructions | set per program |
| `CPU_STAGES`          | `STAGES` for every processor | depth per processor, if the processors should differ |

## Simulating

Every testbench checks itself. Each prints
`TB_RESULT checks=N failures=M` and ends. Build one with plain Verilator,
for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
          --top-module tb_soft_mp rtl/smp_pkg.sv tb/tb_soft_mp.sv -o sim
./obj_dir/sim
```

| testbench          | what it shows |
|--------------------|---------------|
| `tb_soft_mp`       | The six-processor example runs on mesh and point-to-point, at 3, 4 and 5 stages, and with a different depth on each processor. Every result is checked. Point-to-point has the lower latency, and cycles per output grow with depth (6, 7 and 8). The test forces FIFO-empty and FIFO-full stalls, host backpressure, hop relaying, load-use waits and a reduced instruction set, and fails if any of them never happens. |
| `tb_soft_mp_full`  | The default 16-processor 4×4 mesh, with no parameter overrides. A 13-processor pipeline snakes through the grid, each processor multiplying and adding. It sustains 7 cycles per output. |
| `tb_soft_mp_fmradio` | The split-join structure of the FM-radio benchmark on 12 of 16 processors, with point-to-point links (see below). |
| `tb_soft_cpu`      | One program run on all three pipeline depths: dependencies, multiply, memory, delay slot, JAL/JR, exact cycles per iteration, and random FIFO stalls. |
| `tb_fifo`, `tb_fifo_io`, `tb_decoder`, `tb_alu`, `tb_mul_unit`, `tb_regfile`, `tb_local_ram` | Each unit against a reference model. |

The simulator used for these runs has only two logic states, and the
testbenches do not depend on X propagation. Registers that are read are
reset, and memories are written before they are read.

## Where this RTL departs from or adds to the original

- **The processor internals are this design's own.** This covers:
  - where branches resolve;
  - the full bypass network, which leaves FIFO waits, and in the 5-stage
    version the load-use wait, as the only interlocks;
  - how the fifth stage splits execute from memory.

  The original processors interlocked on data hazards. The cycle counts
  here will not match its tables.
- **Memory sizes**, the FIFO address window, port numbering, the host
  streams and the load port are not in the original description and were
  chosen here. The original system generated its test data on chip; here a
  host streams it in and out.
- **Relaying.** In the original, FIFO data was tied into the processor's
  bypass paths. Here a popped word reaches the next instruction through the
  ordinary write-back bypass, with the same effect: no extra cycle.
- **Not included:** the software flow that produced the programs and the
  link tables (stream compiler, partitioner, mapper, profiler, system
  generator). In this RTL those results are parameters: `LINKS` and
  `ISA_MASKS` are what that flow would emit. The benchmark programs
  themselves were not available, so the benchmarks of the original study are
  not run. The testbenches use hand-written programs with the same
  structure.
- **Pipeline depth.** The original experiments used one depth for the whole
  system, which is what `STAGES` sets. `CPU_STAGES` can also give each
  processor its own depth. Processors of different depths need no glue
  between them, because they meet only at FIFOs.
