# BERI: a 64-bit MIPS soft processor and its system-on-chip, in SystemVerilog

BERI is an in-order, six-stage, 64-bit MIPS (R4000-style, MIPS64 integer
subset) processor built to run an unmodified multi-user operating system on
an FPGA. It has a memory management unit (TLB), the coprocessor-0 system
registers, interrupts, and two levels of cache. In the system it sits as a
single Avalon memory-mapped master in front of DDR2 memory and a bridge of
peripherals, with a programmable interrupt controller (PIC) between the
device interrupt lines and the processor.

This RTL has the processor, the cache hierarchy, the TLB, the debug unit, the
Avalon master adapter and the PIC. The rest of the tablet system is vendor IP
and is reached through the Avalon port: the memory controller, UARTs,
Ethernet, SD card, USB, display and flash, and the bus fabric.

Three ideas shape the design. They are the hardest parts to follow in the
code:

* **Stage tokens and epochs.** Every instruction travels as one control
  token (`ctoken_t`). Fetch gives the token an *epoch* number. Nothing is
  ever flushed out of the middle of the pipeline. Instead, whenever fetch is
  redirected (a wrong prediction, an exception or ERET), the epoch is
  incremented, and writeback silently drops every token that still carries
  an old epoch.
* **Prediction two instructions ahead.** The predictor uses the MIPS branch
  delay slot. The scheduler pre-decodes instruction *i* and tells the
  predictor its branch type. By then instruction *i+1* (the delay slot) has
  already been fetched, so the predictor names the PC of *i+2*. Every
  committed instruction reports its true next PC back, and a mismatch
  restarts fetch.
* **A TLB that is mostly direct-mapped.** There are 16 fully associative
  entries, the MIPS programming model. Behind them are 128 direct-mapped
  entries that software never sees by index. "Write random" places an entry
  in the direct-mapped part at a hash of its virtual page number. The entry
  it displaces moves into the associative entries above WIRED, which act as
  a victim buffer. Because the operating system always probes before it
  modifies an entry, it never notices that the hardware moved entries. Each
  client of the TLB (instruction fetch, data access) keeps a 4-entry cache
  of recent translations.

## Pipeline

```
 fetch ─► scheduler ─► decode ─► execute ─► memory access ─► writeback
   ▲          │ putTarget            │  ▲         │                │
   │          ▼                      │  └ result table (4 slots)   │
 branch predictor ◄──────────────────┴──────── pcWriteback ────────┘
```

Stages are joined by one-entry FIFOs with valid/ready handshakes
(`beri_fifo1`). Enqueue and dequeue can happen in the same cycle, so a stage
passes one instruction per cycle when nothing stalls.

| Stage | Module | What it does |
|---|---|---|
| fetch | `beri_mips_top` | Takes the next PC and epoch from the predictor and asks the debug unit whether the PC is a breakpoint. Translates the PC through its TLB port cache and reads the instruction cache. |
| scheduler | `beri_scheduler` | Pre-decodes the instruction, reads two sources from the register file and renames the destination to a result-table slot (see below). Sends the branch type to the predictor. |
| decode | `beri_decode` | Sets every control flag, so no later stage looks at the instruction word. SYSCALL, BREAK and unimplemented opcodes become exceptions here. |
| execute | `beri_execute` | Runs the ALU, resolves branches and holds the result table. Computes memory addresses on a separate adder. Starts multiply or divide in `beri_muldiv`. |
| memory access | `beri_memaccess` | Sends loads and stores to the data cache. A 2-token buffer lets ALU instructions keep moving during a data-cache miss. |
| writeback | `beri_writeback` | Commits an instruction or drops it. Details follow the table. |

Writeback handles each instruction in one of these ways:

* It drops a token from an old epoch.
* It takes an exception or an interrupt. CP0 (`beri_cp0`) supplies the
  vector, and fetch restarts there in a new epoch.
* It commits: writes the register, extracting and extending load data from
  the big-endian doubleword, performs the CP0 operation, and reports the next
  PC to the predictor.

**Result table and forwarding.** Instruction number *n* (the fetch id) owns
slot `n mod 4` of a four-entry result table in execute. The scheduler
remembers which in-flight slot last targets each register. A later reader of
that register is marked to take its operand from the table instead of the
register file.

Forwarding uses a slot only if it was filled in the reader's own epoch. An
instruction of an older epoch is on a cancelled path, even though it still
executes and writes its slot. Every instruction older than the restart that
began the reader's epoch has already written the register file, because
restarts are decided at writeback. So in every other case the register file
holds the right value.

At most four instructions are in flight between the scheduler and the end of
writeback, so a slot cannot be reused while a reader still needs it. Load
results are written into the table at writeback. A reader that needs a load
still in flight waits in the scheduler. So does an instruction touching CP0
while a CP0 update is in flight, because CP0 registers are never forwarded.

**Multiply and divide** run beside the pipeline (`beri_muldiv`), as MIPS
allows. Multiply takes 2 cycles after it starts. Divide retires 2 quotient
bits per cycle: 32 steps for 64 bits. While the remaining dividend starts
with 8 zero bits, it skips them in one cycle, so small dividends finish
early. Measured:

* 64-bit worst case: 34 cycles, including a start cycle and a sign-fix cycle.
* Dividend of 200: 13 cycles.

MFHI and MFLO wait while a result is pending.

**Prediction policy** (`beri_branch`). Jumps are predicted taken, and so are
backward conditional branches. Register jumps and forward branches are
predicted not taken. After a restart at address X, the predictor issues X
and X+4 at once; predictions follow from there. The design can take any
other policy that keeps the three interfaces (getPc, putTarget and
pcWriteback).

## Memory system

```
 I-TLB port cache ─┐                     ┌─ D-TLB port cache
 L1 I-cache 16 KB ─┤── merge ── L2 64 KB ── memory request ── Avalon master
 L1 D-cache 16 KB ─┘
```

* **All caches** are direct-mapped, with 32-byte lines and write-through.
  Store misses do not allocate.
* **L1 caches** (`beri_l1cache`) are virtually indexed and physically tagged.
  The TLB lookup runs in parallel with the cache read. A hit answers one
  cycle after the request is accepted.
  The data array of the instruction cache is 8 bytes wide, so a line fill
  writes four words over four cycles before the fetch is answered. The data
  cache's array is a full 32-byte line wide, so its fill is one write. The
  `WORD_B` parameter selects the width.
* **Merge unit** (`beri_merge`): its register stage adds one cycle each way,
  and the data side wins arbitration.
* **L2 cache** (`beri_l2cache`): a hit takes one cycle. So an L1 miss that
  hits in L2 has its line back 3 cycles after the L1 request leaves.
* **Uncached accesses** go straight to memory. These are kseg1, xkphys with
  an uncached attribute, and everything at physical address 0x4000_0000 or
  above.
* **Line transfers** are 256 bits wide, matching a DDR2 interface that moves
  256 bits per processor cycle.
* **Byte order.** The processor is big-endian: byte offset *i* of a line is
  `data[255-8i -: 8]`, and byte-enable bit *j* covers `data[8j +: 8]`. The
  Avalon master (`beri_avalon_master`) swaps bytes and byte enables for the
  little-endian bus.

**TLB** (`beri_tlb`, `beri_tlb_port_cache`). Pages are 4 KB, and each entry
maps an even/odd pair. The direct-mapped index is
`VPN2[6:0] ^ VPN2[13:7]`. Write-indexed to an index of 16 or above writes
the hashed slot, so the entry is found there later.

* A lookup answers 2 cycles after it is accepted.
* A port-cache hit answers in the next cycle.
* A port-cache miss costs 3 more cycles.
* Every TLB write clears all port caches.
* TLB refills for both fetch and data use the 64-bit refill vector.
  BadVAddr, Context, XContext and EntryHi are loaded from the faulting
  address.

## CP0, interrupts and the PIC

CP0 (`beri_cp0`) has these registers: Index, Random, EntryLo0/1, Context,
PageMask, Wired, BadVAddr, Count, EntryHi, Compare, Status, Cause, EPC, PRId,
Config0/1 and XContext.

* **Identity.** PRId reads 0x400 (revision 0.4) and Config1 reads
  0xCEE07040.
* **Reset.** Status resets with BEV set, so early exceptions vector into the
  boot region (base 0xFFFFFFFF_BFC00200). Otherwise the vectors are
  0xFFFFFFFF_80000080 for TLB refill and 0xFFFFFFFF_80000180 for everything
  else.
* **Timer.** Count increments every cycle. Count equal to Compare sets IP7.
* **PIC** (`beri_pic`, at physical 0x7f804000). Each of 32 device sources
  has a configuration word: enable in bit 31, target line in bits 2:0. A
  source can be raised or cleared by software. Enabled, pending sources
  drive CP0 lines IP2–IP6, and disabled sources are suppressed. This
  register layout is this design's own.

## Debug unit

`beri_debug` takes single-byte commands on a valid/ready byte stream and
answers on another:

| Command | Action |
|---|---|
| `P` | pause |
| `R` | resume |
| `B` + 8 address bytes | set a breakpoint |
| `C` | clear the breakpoint |
| `S` | return one status byte: paused, breakpoint set, stopped at breakpoint |
| `Q` | return the last committed PC |

A breakpoint hit works like this:

1. The instruction is marked dead.
2. At writeback, fetch restarts at the same PC and the unit pauses.
3. After resume, that PC passes the check once, so execution continues past
   it.

Instruction insertion and execution trace are not built.

## Top level

* `beri_soc_top` is the system component. Its ports:
  * the Avalon-MM master `avm_*`: 32-bit byte address, 256-bit data, 32 byte
    enables, waitrequest and readdatavalid;
  * 32 interrupt inputs;
  * the debug command and reply byte streams;
  * a bundle of event counters (`stats`).
* The processor's reset PC is 0x9000_0000_7f01_0000. That is the boot ROM on
  the peripheral bridge, reached through an uncached 64-bit address window.
  The ROM itself is outside the design.
* `beri_mips_top` is the processor alone, with a plain line-request memory
  port.

Parameters keep the sizes listed above by default:

* `L1_KB` = 16 and `L2_KB` = 64;
* TLB `N_ASSOC` = 16 and `N_DM` = 128, with port caches of 4 entries;
* `PIC_BASE`;
* `RESET_VECTOR`.

## Where this design departs from the original, or fills gaps

Own choices:

* the prediction policy;
* the TLB hash;
* the victim slot, chosen round-robin;
* the debug command set;
* the PIC register layout;
* the memory-access buffer depth;
* load-use stalls instead of forwarding from memory;
* taking interrupts only on non-memory instructions outside delay slots.

The following MIPS64 features are left out. Their instructions raise
a reserved-instruction exception:

* floating point and coprocessor 2;
* LL/SC;
* unaligned loads and stores (LWL/LWR and friends);
* branch-likely.

Other limits:

* CP0 registers are read in the execute stage rather than requested by the
  scheduler. The value is the same, because an instruction that reads CP0
  waits until no CP0 update is in flight.
* Variable page sizes are not supported; PageMask always reads as zero.
* Stores are written to the data cache from the memory-access stage, before
  writeback. Their address exceptions and TLB exceptions are detected before
  the write, so no store has to be undone.

## Testbenches

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Several also check cycle counts:

* one-cycle L1 hits;
* 3 cycles for an L1 miss that hits L2;
* multiply and divide latencies;
* the TLB port-cache hit and miss delays.

`tb_asm_pkg` holds small MIPS instruction encoders.

`tb_beri_soc_top` runs the whole system at default sizes against an Avalon
memory model with wait states. The program in memory does the following:

* boots;
* runs ALU loops with forwarding;
* performs loads and stores of every size;
* multiplies and divides;
* takes a SYSCALL;
* fills the TLB, including a victim move;
* takes a TLB refill through a handler;
* receives a device interrupt routed through the PIC;
* stops at a debug breakpoint.

The test then checks registers, memory and event counters. Each mechanism,
such as forwarding, stalls, mispredictions, dropped tokens, cache and TLB
misses, victim moves and divider skips, must have happened at least once.

`tb_beri_mips_top` runs the processor alone, with 1 KB L1 and 2 KB L2
caches so that misses are frequent. It bubble-sorts 16 random signed
doublewords in memory and compares the result with its own sort. The loop
mixes load-use dependencies, a forward branch that is often mispredicted and
a store in the wrong path after each mispredict, so it exercises the way
renaming interacts with squashed instructions.

To run a testbench with Verilator:

```
verilator --binary --timing -Irtl rtl/beri_pkg.sv tb/tb_asm_pkg.sv \
  $(ls rtl/*.sv | grep -v pkg) tb/tb_beri_soc_top.sv --top-module tb_beri_soc_top
./obj_dir/Vtb_beri_soc_top
```
