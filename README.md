# DAISY tree-VLIW processor in SystemVerilog

This is a processor that issues one very long instruction word every clock cycle.
Each word is a *tree*: up to three condition bits are tested at the same time,
and they pick one of up to four paths through the tree. Each path has its own
successor word. An operation in the word takes effect only if its path is the
one chosen, so one word can hold the work of several branches of a program.
The machine also branches once on every cycle at no cost. This works because
all four possible successors of a word sit together in one 128-byte
instruction-cache line. That line is fetched while the word executes, and the
winning successor is picked in the same cycle.

The instruction set is meant to be the target of a binary translator. Such a
translator turns code for a conventional processor into tree words and
schedules it aggressively. The hardware supports that kind of scheduling in
three ways:
- each register carries extender bits (carry, overflow and a deferred
  exception), so loads can be speculative;
- a `COMMIT` operation raises a deferred exception when the speculated value
  is finally used;
- a *load verify* operation checks loads that were moved above stores.

The design contains:
- the 8-slot core;
- a 64 KB L1 instruction cache;
- a 32 KB L1 data cache;
- a 256 KB L2 cache;
- the on-chip controller for a 16 MB off-chip L3 cache;
- an interface to a 60x-style system bus.

It does not contain address translation (TLB). The off-chip SRAM and the
memory system behind the bus are modelled in the testbenches.

## Tree words

A word is 320 bits: a 64-bit header plus eight 32-bit operations, one for each
issue slot (`daisy_pkg.sv`).

| Header field | Bits | Meaning |
|---|---|---|
| `next_line` | 25 | Instruction line (byte address / 128) that holds every successor |
| `tree_id` | 4 | Shape of the tree (see below) |
| `cc[0..2]` | 3 × 6 | The tested bits A, B, C. Each is a condition register (4 bits) and a bit within it: 0 LT, 1 GT, 2 EQ, 3 SO |
| `tgt[0..3]` | 4 × 2 | For each path, the bank (0–3) of `next_line` that holds its successor |
| spare | 9 | Unused |

| Operation field | Bits | Meaning |
|---|---|---|
| `path` | 4 | Mask of the paths on which the operation commits |
| `opc` | 6 | Opcode (`opc_e`) |
| `rt` | 6 | Target register |
| `ra` | 6 | Source A |
| `imm` | 10 | Immediate. For register-register forms, `imm[9:4]` is source B. Stores, conditional moves and load verify read `rt` as their second source |

Paths are numbered from left to right. At every test the false outcome is the
left branch. The tree shapes are:

| id | Tests | Paths |
|---|---|---|
| 0 | none | 1 |
| 1 | A | 2 |
| 2 | A, then B on A=T | 3 |
| 3 | A, then B on A=F | 3 |
| 4 | A, then B on A=F and C on A=T | 4 |
| 5 | A, then B on A=T, then C on B=F | 4 |
| 6 | A, then B on A=T, then C on B=T | 4 |
| 7 | A, then B on A=F, then C on B=F | 4 |
| 8 | A, then B on A=F, then C on B=T | 4 |

Shape 5 is the classic example:

    if A = F            -> path 0
    else if B = T       -> path 3
    else if C = F       -> path 1
    else                -> path 2

The word's address is `{line, bank, 5'b0}`. Bank `b` of a line holds the word
whose operations occupy bytes `32b..32b+31` of the line. Its header travels in
a 256-bit side band that accompanies every instruction line through L2, L3 and
the bus. A line is therefore 1024 + 256 = 1280 bits wide everywhere.

### Operations and slot rules

These operation classes work in any slot:
- add/sub (with carry and overflow extender bits): `ADD ADDI SUB`
- logic: `AND OR XOR ANDI ORI XORI`
- shifts: `SLW SRW SRAW` and their immediate forms
- compares, which write a condition register `{SO,EQ,GT,LT}`: `CMP CMPI CMPL CMPLI`
- conditional moves on a condition bit: `CMOVT CMOVF`
- load immediate and sign extension: `LI LIS EXTSB EXTSH`
- indirect branch: `BRI`
- `COMMIT`

Odd slots (1, 3, 5, 7) alone may hold:
- loads and stores: `LWZ LHZ LHA LBZ`, the speculative `LWZS`, and `STW STH STB`
- `LVIA` (load the address of a word: own address + offset × 32)
- load verify: `LVER`
- the extender operations: `ADDE MFEXT MTEXT`

Even slots alone may hold address generation (`AGEN`).

An operation in a slot where it is not allowed raises an *illegal* exception.
These rules allow at most four memory operations per word, and memory port `k`
belongs to slot `2k+1`. There is no multiply, divide or floating point.

## One cycle of the core

`daisy_core` has three stages.

- **IF.** It reads the line named by the `next_line` of the word in EX. The
  line arrives in four partitions; each partition holds two slots' operations
  plus all four headers.
- **EX.**
  - Each slot reads its operands from its own copy of the register file,
    through the bypass multiplexer.
  - Each slot executes its operation and presents up to four data-cache
    accesses.
  - At the same time the branch unit takes the three condition bits, the tree
    shape and the path targets. It picks the taken path, and with it the bank
    of the line that IF is reading. That bank's operations enter EX in the next
    cycle, and its header gives the next line to fetch.
- **WB.** Results of operations on the taken path are written to all eight
  register-file copies and the condition registers. Loads are shifted and
  extended here (`load_align`). The stores held in the data cache's write
  buffers are then committed.

Because the next word is already in the fetched line, a branch costs nothing.
The only penalties are cache misses, exceptions and indirect branches. An
indirect branch (`BRI`) redirects fetch to an address taken from a register,
and it costs one bubble.

### Register file copies and bypass

Each slot has a private copy of the 64 × 35-bit register file (`gpr_copy`),
with 8 write ports and 2 read ports. Every copy is written with all eight
results, so the copies stay identical and reads stay local to a slot. Two
write decoders (`write_dec`) turn the eight target numbers into per-register
write enables and port selects:
- decoder 0 drives copies 0, 1, 4 and 5;
- decoder 1 drives copies 2, 3, 6 and 7.

If two slots write the same register in one word, the higher-numbered slot
wins.

The word in WB has not yet been written when the next word reads its
operands. `reg_bypass` therefore compares each source with the eight ALU
targets and four load targets in WB. A 4:1 multiplexer then picks one of
four sources:
- the register copy;
- the ALU result;
- the load result;
- the immediate.

### Stalls and exceptions: roll back, then replay

Nothing is stopped in the cycle where a problem happens. A data-cache miss, an
exception or an indirect branch of the word in EX in cycle *n* is registered
and acted on in cycle *n+1*. By then the faulty word's results are in the
EX/WB registers and the next word is in EX. In cycle *n+1* the core:
- blocks the WB writes and the buffered stores of word *n*;
- discards the EX work of word *n+1*;
- restores the pipeline registers from copies of their state in cycle *n*.

Each event then continues in its own way:
- **Data miss:** word *n* is reloaded into EX and its line is fetched again.
  After the data cache has refilled, the word runs again as if nothing had
  happened.
- **Instruction miss** on the fetch of cycle *n*: the word that would have
  entered EX is dropped. After the refill, the same fetch is repeated with the
  same bank choice.
- **Exception:** `epc` records the address of the faulting word and `cause`
  records the reason. Fetch continues at line `EXC_LINE` (0x200, byte 0x10000).
  The handler returns by computing an address with `LVIA` and jumping to it
  with `BRI`.

There are four exception causes:
- `ILLEGAL`: an operation in a slot where it is not allowed;
- `ALIGN`: a misaligned non-speculative access;
- `COMMIT`: a commit of a register whose deferred-exception bit is set;
- `VERIFY`: a load verify that found a different value in memory.

A faulting word leaves no trace. This scheme keeps every stall decision off
the critical path of the cycle in which it arises.

A speculative load (`LWZS`) that would fault sets the exception extender bit of
its target instead. That bit passes through later arithmetic. `MFEXT` reads it,
and `COMMIT` raises the exception.

## Memory hierarchy

| Level | Size | Line | Organisation in this RTL |
|---|---|---|---|
| I1 (`icache`) | 64 KB | 128 B | Direct mapped; 4 partitions (`icache_partition`) × 4 banks; each bank holds one successor word's 2 operations + header for its 2 slots |
| D1 (`dcache`) | 32 KB | 32 B | Direct mapped; two identical copies, ports 0–1 read copy 0 and ports 2–3 read copy 1; stores go to per-port write buffers and retire one cycle later when `commit` is set; loads forward from the buffers; write-back, write-allocate |
| L2 (`l2cache`) | 256 KB | 128 B | Direct mapped, unified, write-back; I1 reads whole lines, D1 reads/writes 32-byte blocks; I1 and D1 are served alternately when both wait |
| L3 (`l3_ctrl`) | 16 MB | 128 B | Off-chip synchronous SRAM; each access is 1 directory word + 4 data words (a 320-bit word = one word's header and operations); read latency `SRAM_LAT`=3, issue interval `SRAM_CYC`=2 cycles (8 ns and 5 ns at 350 MHz) |
| bus (`bus60x_if`) | – | – | A line is 5 bursts of 4 × 64-bit beats: four data quarters and one header burst (`tt_hdr`); address tenure `ts`/`aack`, each beat acknowledged by `ta` |

Every level below L1 is a blocking request/acknowledge engine: hold `req`, and
the data arrives with a one-cycle `ack`. The core sees only the L1 caches,
through `busy` and the hit/miss signals.

## Where this design departs from the reference description or fills gaps

The numbers above come from the reference description. These are the design's
own choices and simplifications:
- **All encodings.** This covers the header and operation formats, the opcode
  numbers, tree shapes 0–4 and 6–8, the exception causes, the
  reset line (0x100) and the exception line (0x200).
- **Extender semantics.** These are own choices: the exact operation list
  within each class, how extender bits propagate, what `LVER` does on a
  mismatch, and the `BRI` operation.
- **Data width.** Data is 32 bits and bytes are little-endian.
- **Data cache banking.** Each D1 copy is one two-read-port array instead of
  eight single-ported banks. There is one write buffer per store port (4)
  instead of one per port and bank (16). The core sees the same behaviour.
- **Multiple data misses.** A word that misses in D1 on several lines retries
  once per line. A word whose memory operations need two different lines of
  the same D1 set can never complete, because the direct-mapped cache cannot
  hold both. Code for this core must avoid that.
- **No TLB.** Addresses are physical.
- **Cache policies.** The write-back and write-allocate policies of D1, L2 and
  L3, the L3 directory format, and the bus burst order are own choices.
- **Branch units.** There are four branch units, one per instruction-cache
  partition, as in the reference. Unit 0 steers fetch; the other three compute
  the same result and are left for cross-checking.

## Files

`rtl/` contains one module or package per file:

| Module | Role |
|---|---|
| `daisy_pkg` | Constants, word/operation/header types, opcodes |
| `daisy_chip` | Top: core + I1 + D1 + L2 + L3 controller + bus interface |
| `daisy_core` | Pipeline, rollback control, 8 slots, 4 branch units, counters |
| `alu_slot` | One issue slot |
| `reg_bypass` | Operand bypass multiplexer |
| `gpr_copy` | One register-file copy |
| `write_dec` | Register write decoder |
| `cr_file` | 16 condition registers |
| `load_align` | Load shift, select and extension |
| `branch_unit` | Tree decode, path select, next-line select |
| `icache` | I1 cache |
| `icache_partition` | One I1 partition |
| `dcache` | D1 cache |
| `l2cache` | L2 cache |
| `l3_ctrl` | L3 controller |
| `bus60x_if` | 60x-style bus interface |

`tb/` contains a self-checking testbench `tb_<module>` for each module. It also
holds the support files:
- `tb_prog_pkg`: the assembler helpers and the test program;
- `l3_sram_model`: a pipelined SRAM;
- `bus60x_mem`: memory behind the bus.

`daisy_core` reports counters for:
- cycles;
- retired words;
- data and instruction stalls;
- exceptions;
- indirect branches;
- bypass uses;
- multi-way branches.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Each one
has a watchdog. Compile and run with plain Verilator, for example for the
whole chip:

    verilator --binary --timing -Wno-fatal rtl/daisy_pkg.sv rtl/*.sv \
      tb/tb_prog_pkg.sv tb/bus60x_mem.sv tb/l3_sram_model.sv \
      tb/tb_daisy_chip.sv --top-module tb_daisy_chip -Mdir obj -o sim
    obj/sim

`rtl/daisy_pkg.sv` must come first. Verilator warns that it is listed twice,
which is harmless.

For a unit, give the package, the module and any modules it instantiates,
then its testbench. For example:

    verilator --binary --timing rtl/daisy_pkg.sv rtl/icache_partition.sv rtl/icache.sv tb/tb_icache.sv --top-module tb_icache

`tb_daisy_core` also needs `rtl/icache*.sv`, `rtl/dcache.sv` and the rest of the
core's modules, plus `tb/tb_prog_pkg.sv`.

### What the tests establish

- **`tb_daisy_chip`** runs the chip at its full default size from cold caches.
  Every instruction line comes over the bus through L3, L2 and I1. The program
  exercises each mechanism: instruction misses, data misses with rollback and
  replay, bypasses, four memory operations in one word, the four-way example
  tree, a counted loop, `LVIA` and `BRI`, a speculative load whose deferred
  exception a `COMMIT` raises, the handler and its return, a passing load
  verify, and a dirty D1 eviction. Three more loads conflict in D1, L2 and L3.
  They push the dirty data down into L3 and then out onto the bus, where the
  test finds it in memory. The test counts the pipeline and memory events
  (stalls, bypasses, multi-way branches, indirect branches, exceptions,
  write-backs at each level, bus bursts, SRAM accesses). It fails if any of
  them never happened. The remaining mechanisms are checked through the
  results they leave: every register in all eight copies, the condition
  registers, `epc` and `cause`. A run takes about 1550 cycles and a few seconds
  of simulation.
- **`tb_daisy_core`** runs three small programs from reset. They raise the
  illegal-slot, misalignment and load-verify exceptions. Each checks the cause
  and the address, that the faulting word left nothing behind, and that a
  double write to one register resolves to the higher slot.
- **The cache and bus tests** compare random traffic against reference models.
  They use conflicting addresses so that misses, write-backs and rollbacks are
  frequent. The L3 test also checks that a hit costs one directory access plus
  four data accesses, and that no two SRAM accesses are closer than
  `SRAM_CYC`. The bus test checks five bursts per line.
- **The datapath units** (`alu_slot`, `reg_bypass`, `load_align`,
  `branch_unit`, the register files) are checked against independent models.
  Each uses thousands of random cases.

Timing is cycle-accurate only in the sense of this RTL. Cache and SRAM timing
is as parameterised, but no gate-level or 350 MHz timing has been established.
