# A non-associative FIFO cache with self-linking instructions

A conventional cache finds an item by comparing address tags. That takes either
associative hardware or a restricted mapping that depends on spatial locality.
This design does neither. Items go into the cache in plain FIFO order, and each
instruction, once encached, is extended with two *cache* addresses:

* **CAD**: where its datum (or branch destination) sits in the cache;
* **CANI**: where the next sequential instruction sits in the cache.

The execution unit (EU) then runs the program by following these pointers. It
never forms a main memory address. It only has to check that a pointer is still
current, and that check compares two bits. Address arithmetic happens only on a
miss, in a separate cache management unit (CMU).

The RTL is a small but complete computer built around this cache: EU, cache,
inventory, CMU and main memory. An accumulator instruction set is defined so
that real programs can run on it.

## The storage

| Store | Size | Contents |
|---|---|---|
| cache | 2^C lines × (P + 2C + 3) bits | item (P bits), CAD (C+1), CANI (C+1), wraparound bit (1) |
| inventory | 2^C entries × M bits | main memory address of the item held in the same-numbered line |
| main memory | 2^M words × P bits | program and data as loaded; a pointer in place of each encached word |
| DA register | C+1 bits | decache address: the next line to be replaced |

Only one copy of any item exists at any time. When an item is encached, its main
memory word is overwritten with the value of DA at that moment: a pointer to the
line. When the item is later decached, it goes back to the address recorded in
the inventory.

Packed line layout, MSB first: `{wrap, CANI[C:0], CAD[C:0], item[P-1:0]}`.

## Logical addresses and the two-bit miss test

DA counts modulo 2^(C+1). Its C low bits are the physical line. Its MSB is the
wraparound bit, which flips each time the FIFO goes round the cache once. Think
of the cache as the top of an unbounded stack: an item encached when DA = *k*
has logical address *k*, and only logical addresses DA−2^C … DA−1 are still in
the cache.

When a line is written, it stores the current MSB of DA as its `wrap` bit. CAD
and CANI hold full (C+1)-bit logical addresses. A pointer hits if and only if
its MSB equals the `wrap` bit of the line it selects (`nmc_miss_detect`).

Why one bit is enough: a pointer is written while the instruction holding it is
in the cache. Each time the instruction is used again, it is still in the cache.
So the instruction has been replaced fewer than 2^C encaches ago, and the pointed
line can have been rewritten at most once in that interval. The pointed line's
logical address can therefore have moved by 0 or by 2^C. That difference is
exactly what the wraparound bit shows. If the instruction itself is replaced,
its new copy starts with invalid pointers.

**Invalid pointers.** A freshly encached line gets `{~DA[C], DA[C-1:0]}` in
both CAD and CANI. This is the line's own address with the wrong wraparound
bit, which is the logical address that was just decached. It fails the test for
as long as the item stays in the line. (This encoding is a choice made in this
design.)

## Running a program (`nmc_eu`)

The EU holds only CACI (the physical line of the current instruction) and an
accumulator. In one cycle it reads three lines: the instruction at CACI, the
line at CAD and the line at CANI. It tests only the pointers the instruction
actually needs:

* LOAD/ADD/SUB/STORE and taken branches need CAD;
* everything else that completes, and a branch that is not taken, needs CANI.

When every needed pointer hits, the instruction completes in that cycle and CACI
moves to CAD (taken branch) or CANI. A loop whose code and data fit in the cache
therefore runs at one instruction per cycle from its second pass on, with no
main memory access.

A CAD miss is raised before the instruction has any effect. A CANI miss is
raised after the instruction has completed, and the EU then waits in a state
that only follows CANI, so no instruction is executed twice. On a miss the EU
holds `miss_req` with CACI and the failed field (`MISS_CAD`/`MISS_CANI`). When
`miss_done` arrives it continues at `resume_caci`.

Instruction set (defined by this design, in `nmc_pkg`): one P-bit word holding
`{opcode[3:0], MAD[M-1:0]}`.

| opcode | name | action |
|---|---|---|
| 0 | HALT | stop |
| 1 | LOAD | acc = datum |
| 2 | ADD | acc += datum |
| 3 | SUB | acc −= datum |
| 4 | STORE | datum = acc (written into the cache line) |
| 5/6 | BZ/BNZ | go to MAD if acc ==0 / != 0 |
| 7 | JMP | go to MAD |
| 8, others | NOP | next instruction |

A branch destination is handled exactly like a datum: it is linked through CAD.

## Resolving a miss (`nmc_cmu`)

1. **GETA:** read the line and the inventory entry at CACI. The wanted main
   memory address is MAD (the operand) for a CAD miss, or MANI = MACI + 1 for a
   CANI miss.
2. **TEST:** read that word. Take its C low bits as a line number CA and look up
   the inventory at CA (`nmc_pointer_check`). If the entry equals the address,
   the word is a pointer: the item is already encached, and its logical address
   is the word's C+1 low bits. Go to LINK. Otherwise the word is the item itself.
   This test replaces a per-word "in main memory" tag bit.
3. **DC:** write the item in line DA back to the address in the inventory at DA.
4. **EN:** write the new item into line DA, with both pointers invalid and
   `wrap = DA[C]`. Write DA into the item's main memory word and the item's
   address into the inventory. Increment DA.
5. **LINK:** write the logical address into CAD or CANI of the line at CACI,
   then pulse `miss_done`.

Latency with a one-cycle main memory: 3 cycles when the item is found through a
pointer, 5 when it is encached, 7 when the instruction has to be relocated (see
below).

**When DA lands on the current instruction.** Encaching would then throw out
the very instruction whose pointer is being fixed. The CMU has already read the
operand, MACI and the instruction in GETA. It encaches the wanted item, then
encaches the instruction again at the next DA. The link goes into that new
copy, and `resume_caci` points the EU to it. Older pointers to the old copy
simply miss later and are repaired through main memory as usual. The published description
only says this case must be allowed for; this way of handling it is this
design's choice.

**Start-up.** The pointer test requires every inventory entry to name a word
that really is encached. After reset, therefore, the CMU fills the cache with
main memory words 0 … 2^C−1 in FIFO order. This takes 2 cycles per line. After
the fill DA = `{1, 0…0}` and `ready` rises. The EU then starts at line 0, which
holds word 0. The fill procedure is a choice made in this design.

## Modules

| file | block |
|---|---|
| `rtl/nmc_pkg.sv` | default sizes, opcodes, miss kind, line field-enable struct |
| `rtl/nmc_top.sv` | the whole system, plus a program-load port and event outputs |
| `rtl/nmc_eu.sv` | execution unit |
| `rtl/nmc_cmu.sv` | cache management unit (instantiates the next two) |
| `rtl/nmc_da_register.sv` | DA counter |
| `rtl/nmc_pointer_check.sv` | pointer-or-item test on a main memory word |
| `rtl/nmc_miss_detect.sv` | the two-bit hit test |
| `rtl/nmc_cache_store.sv` | cache lines: asynchronous read ports, write ports with per-field enables |
| `rtl/nmc_inventory.sv` | inventory |
| `rtl/nmc_main_memory.sv` | single-port main memory with synchronous read |

Parameters (all three are choices made in this design; nothing fixes them
numerically): `P = 16` (word width), `C = 8` (256 lines), `M = 12` (4096 words).
The instruction format needs `P >= 4 + M` and `M >= C`.

**Using the top.** Hold `load_en` high and write the program through
`load_we/load_addr/load_wdata`. `load_rdata` returns the addressed word one
cycle later. While `load_en` is high the EU and CMU are held in reset. Drop
`load_en`; `ready` rises after the fill, and `halted` rises at HALT.

Any main memory word may hold a pointer at that point. To read a variable, apply
the pointer test yourself: if `inventory[word[C-1:0]] == address`, the value is
the item in that cache line. The testbenches do this through hierarchical
references.

## Verification

Every testbench is self-checking and ends with a `TB_RESULT` line.

* `tb_nmc_top`: 8-line cache. It runs six random programs without spatial
  locality: code chunks scattered through memory and joined by jumps, shared
  scattered data, forward branches and a counted outer loop. Each program is
  checked against a flat-memory reference model (`tb/nmc_tb_pkg.sv`) for the
  accumulator, the retired-instruction count and the whole memory image. It
  also runs a 7-item loop and checks that from its second pass on the loop has
  no misses and runs at one instruction per cycle. It counts CAD misses, CANI misses,
  encaches, pointer links, relocations, DA wraparounds, stores and taken
  branches, and requires each to occur.
* `tb_nmc_full`: default sizes, with a program larger than the cache. Runs in a
  few seconds.
* Unit benches:
  * `tb_nmc_cmu` checks cache, inventory, memory and DA contents after each kind
    of miss, and the miss latencies. It also checks that an instruction whose
    datum and successor are encached right after it ends up with
    CAD = CACI + 1 and CANI = CACI + 2.
  * `tb_nmc_eu` has the testbench play the CMU; it checks CAD and CANI misses,
    relocation, one-cycle hits, and that a branch not taken ignores its CAD.
  * The storage, DA, miss-test and pointer-test blocks are each checked against
    a model.

Simulate, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/nmc_pkg.sv tb/nmc_tb_pkg.sv tb/tb_nmc_top.sv --top-module tb_nmc_top -o sim
./obj_dir/sim
```

## Limits and departures

* The instruction set, the EU's three-read-port organisation, the EU/CMU
  handshake, the memory timing, the start-up fill, the invalid-pointer encoding
  and the relocation procedure are all choices made in this design. The cache
  organisation, the eight-step decache/encache order, the pointer test and the
  two-bit miss test follow the method as published.
* Only fixed-length, one-word items are supported. This is the simple model the
  method is explained with.
* Not built:
  * the variant that adds an extra tag bit to each main memory word instead of
    the inventory-based pointer test;
  * a separate cache for arrays, which is mentioned as a possibility but not
    specified;
  * any multiprocessor extension.
* Main memory addresses wrap: MANI of word 2^M−1 is word 0.
* `nmc_top` asserts that the EU and CMU never write the cache in the same
  cycle, and that the EU raises a miss only after the fill.
