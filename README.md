# CHERI-64 capability coprocessor

Small embedded processors usually protect memory with an MPU: a handful of
region registers, set up by the kernel, searched associatively on every
access. That gives few regions, makes per-task protection expensive, and costs
many comparators per cycle. The CHERI approach replaces the region table with
*capabilities*: pointers that carry their own bounds and permissions, are
protected by a hidden tag bit, and can only be narrowed, never widened. Code
runs inside a program-counter capability (PCC), plain loads and stores go
through a default data capability (DDC), and any other memory is reachable only
through a capability the task was given. Each access is checked against exactly
one capability, so there is no associative search, and the number of protected
regions is limited only by memory.

This repository holds synthesizable SystemVerilog for the hardware half of
such a system: the CHERI-64 capability coprocessor that sits beside a 32-bit
address MIPS pipeline. It follows the CHERI-64/CheriRTOS design (64-bit
compressed capabilities in a flat 32-bit space, eight capability registers,
PCC/DDC confinement, sealing with per-task object types, and the exception-free
`CCallFast` domain crossing). The main pipeline, the memory system and the
real-time kernel that uses these mechanisms are not part of it (see
[What is not here](#what-is-not-here)).

## The 64-bit capability word

A capability is 64 bits plus a tag. The register file and memory both hold the
compressed form; a decoder expands it wherever bounds are needed.

| bits    | field              | notes                                         |
|---------|--------------------|-----------------------------------------------|
| 63:52   | permissions (12)   | bit numbers in `cheri_pkg`                    |
| 51      | sealed             |                                               |
| 50      | reserved           | written 0                                     |
| 49:32   | compressed bounds (18) | layout depends on `sealed`, below         |
| 31:0    | address            | the pointer itself                            |
| (tag)   | validity           | held beside the word, 1 bit                   |

The 12 / 18 / 32 split is the published CHERI-64 layout. The bounds encoding
inside the 18 bits is this design's own, chosen to be simple to decode.

**Unsealed bounds** are `{E[4:0], B[6:0], L[5:0]}`: an exponent, a base
mantissa and a length mantissa. Bounds are measured in units of `2^E` bytes:

* `base = {address bits above E+6 (corrected), B, E zero bits}`
* `top  = base + (L << E)` (at most `2^32`)

Only the base's middle bits are stored. Its upper bits come from the address.
The address may sit anywhere in a window of 128 units. That window starts 16
units below the base (at `R = B - 16`). When the address and the base lie on
opposite sides of a `2^(E+7)` boundary, the upper bits are corrected by ±1.
The exponent is clamped to 27. So `E = 27, B = 0, L = 32` spans all 4 GiB: it
is `ROOT_CAP`, the reset value of PCC, DDC and KCC.

Consequences worth knowing:

* Regions up to 63 bytes are exact at any alignment. Larger regions are exact
  only when aligned to `2^E`. `CSetBounds` rounds outward to the smallest
  exponent that fits. It traps if the rounded region would leave the parent
  capability, so rights never grow. The coprocessor raises `bounds_rounded`
  when rounding happened.
* Moving the address (`CIncOffset`, `CSetOffset`) out of the 128-unit window
  would change the decoded bounds. The result then loses its tag instead of
  trapping.

**Sealed bounds** are `{E, B[6:3], L[5:3], otype[5:0]}`. Sealing keeps the
high mantissa bits and stores a 6-bit object type in the freed bits. A
capability can therefore be sealed only if its `B[2:0]` and `L[2:0]` are zero
(cause `EXC_REPRESENT` otherwise). In practice that means bounds aligned to
`8·2^E`. There are 64 object types, one per sealing domain.

Permissions (bit: name): 0 global, 1 execute, 2 load, 3 store, 4 load-cap,
5 store-cap, 6 store-local-cap, 7 seal, 8 ccall, 9 unseal,
10 access-system-registers, 11 spare.

## Registers and domains

`cap_regfile` holds:

* C0–C7, the eight general capability registers;
* PCC and DDC;
* three kernel-only registers: KR1C, KCC and EPCC.

KR1C points at the running task's trusted stack. KCC is installed as PCC on
an exception. EPCC receives the interrupted PCC.

A task's domain is its PCC/DDC pair. A context switch saves and restores these
registers with `CSC`/`CLC` like any other data, so there is no limit on the
number of tasks. Reading or writing KR1C, KCC or EPCC, and `ERET`, need the
access-system-registers permission in the current PCC (cause `EXC_SYSREGS`).

## Every access names its capability

Two instances of `cap_check` do all the checking, each a single bounds and
permission check:

* **fetch**: `fetch_addr = PCC.base + fetch_pc`, checked for execute
  permission and 4 bytes in bounds. The result is on `fetch_fault` /
  `fetch_cause`, combinationally.
* **data**: one of three address forms.
  * Legacy `OP_LOAD`/`OP_STORE` use `DDC.base + rt + imm`. A task's code
    therefore uses addresses relative to its own data region, so it can be
    loaded anywhere without position-independent code.
  * `OP_CLOAD`/`OP_CSTORE` use an explicit register: `cb.address + rt + imm`.
  * `OP_CLC`/`OP_CSC` use the same address as explicit loads and stores. They
    move 8-byte-aligned capabilities.

A check fails on the first of these rules: untagged (`EXC_TAG`), sealed
(`EXC_SEAL`), missing permission, outside the bounds (`EXC_LENGTH`).
Misalignment traps as `EXC_ALIGN`. A faulting access never reaches memory.

Tags keep capabilities unforgeable in memory. `CSC` writes the register's tag.
Every data store writes tag 0, so overwriting any byte of a stored capability
destroys it. `CLC` returns the memory tag, or clears it when the authorising
capability lacks load-cap permission. `CSC` of a tagged capability needs
store-cap permission. A non-global capability also needs store-local-cap.

## Crossing domains

A callee domain hands out its code and data capabilities *sealed* with its own
object type. A sealed capability can be copied but not changed or
dereferenced. Holding the pair therefore gives the right to call the callee
and nothing else.

**`CCallFast cb, ct`** (`ccall_fast`) checks that:

* both capabilities are tagged and sealed;
* their object types match;
* both have the ccall permission;
* the code capability is executable and the data capability is not.

Then, in one clock edge, it unseals both and installs them as PCC and DDC.
The response redirects fetch to the code capability's address, the callee's
only entry point. No exception, no kernel, no pipeline flush from the
coprocessor's side.

**`CCall`** is the slower path: it always traps with `EXC_CALL`, leaving all
state alone. A kernel handler then checks and unseals in software.

**Returning safely.** The caller's PCC and DDC must not be reachable by the
callee. The intended software (a kernel CCall helper between caller and
callee) pushes them, with a time stamp, on a small per-task trusted stack.
That stack is addressed by KR1C, which user code cannot read. On return, the
helper pops them with `CLC`, restores DDC with `CWriteHwr` and jumps back with
`CJR`. The push and pop are software. The hardware provides KR1C,
`CGetPCC`/`CSC`/`CLC`/`CJR` and exception entry. The end-to-end testbench
performs exactly this sequence.

**Sealing keys.** `CSeal cd, cb, ct` takes the object type from the address of
the key `ct`. The key needs seal permission and must be in bounds. `CUnseal`
needs a key whose address equals the sealed type and which has unseal
permission. Unsealing ANDs the global bit with the key's.

## Instruction interface and timing

The pipeline presents a decoded `cop_req_t` (operation, register numbers
`cd/cb/ct`, special register, GPR operand `rt`, immediate, size, store data,
PCC-relative `pc`) while `req_ready` is high. It receives a one-cycle
`cop_resp_t`: exception cause and register, GPR result, jump redirect.

| instruction kind                           | `resp` after acceptance     |
|--------------------------------------------|-----------------------------|
| register-only (get/set fields, seal, CCallFast, jumps, hardware registers) | 1 cycle |
| store (data or `CSC`), passes its checks   | 1 cycle, posted             |
| load (data or `CLC`), passes its checks    | 2 + memory latency cycles; a run of loads answers one per cycle after the first |
| memory access that fails a check           | 1 cycle, no memory request  |

A passing memory access sends `mem_req`, valid for one cycle, in the cycle
after acceptance. The memory never back-pressures.

* **Stores are posted.** The coprocessor answers at once and takes the next
  instruction in the following cycle. Saving a task's capability registers
  therefore costs one cycle per register (the testbench checks eight `CSC` in
  eight cycles).
* **Loads are pipelined.** Up to `MAX_LOADS` (4) loads can be in flight. A
  further load is accepted in the next cycle if it passes its checks and its
  base register is not the target of a `CLC` still in flight. The memory
  answers only reads, in order, with `mem_rvalid`. Each load's `resp` comes
  one cycle after its `mem_rvalid`.
* **Responses stay in program order.** Any other instruction, or a load that
  would fault, waits with `req_ready` low until every load has answered. So
  `req_ready` depends on the instruction offered, like a hazard stall.

With a 2-cycle memory, eight `CLC`s through one base register finish 11 cycles
after the first is accepted, instead of 32.

`exc_enter` is honoured only when no load is in flight. It copies PCC into
EPCC, with the address set to `PCC.base + exc_pc`, and installs KCC. Register
writes land at the same edge that sets `resp`. Faults on the implicit
capabilities (DDC, PCC, EPCC) report register 0.

Operations (`cop_op_t`): `CGetBase/Len/Offset/Perm/Type/Tag/Sealed/Addr`,
`CMove`, `CIncOffset`, `CSetOffset`, `CSetBounds`, `CAndPerm`, `CClearTag`,
`CSeal`, `CUnseal`, `CGetPCC`, `CReadHwr`, `CWriteHwr`, `CJR`, `CJALR` (link
= PC + 8), `CCallFast`, `CCall`, `ERET`, `Load`, `Store`, `CLoad`, `CStore`,
`CLC`, `CSC`. Loads zero-extend.

## Files

| file | content |
|------|---------|
| `rtl/cheri_pkg.sv` | field widths, permission bits, structs, opcodes, causes, seal/unseal helpers |
| `rtl/cap_decompress.sv` | bounds decoder |
| `rtl/cap_compress.sv` | bounds encoder for `CSetBounds` |
| `rtl/cap_check.sv` | one access check |
| `rtl/cap_regfile.sv` | C0–C7, PCC, DDC, KR1C, KCC, EPCC |
| `rtl/cap_alu.sv` | capability manipulation, seal, unseal |
| `rtl/ccall_fast.sv` | CCallFast pair check and unseal |
| `rtl/cheri_cop.sv` | top: sequencing, memory port, fetch check, jumps, exceptions |
| `tb/cheri_tb_pkg.sv` | reference bounds decoder (different formula) and helpers |
| `tb/tagged_mem_model.sv` | behavioural tagged memory (simulation only) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_heap_alloc.sv` | shared-heap allocator with sealed chunk headers on the whole design |
| `tb/tb_timer_guard.sv` | deadline checks on the trusted stack and forced return |
| `tb/tb_ccalltest.sv` | 128-crossing buffer-passing workload on the whole design |

Synthesized with generic cells, the coprocessor has about 1,100 word-level
cells and 1,061 flip-flop bits, almost all of them in the register file (13
capability registers of 65 bits).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own or
by a watchdog. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/cheri_pkg.sv tb/cheri_tb_pkg.sv tb/tb_cheri_cop.sv \
  --top-module tb_cheri_cop -Mdir obj_cop
./obj_cop/Vtb_cheri_cop
```

Swap in any other `tb/tb_<module>.sv` and its top name. Linting the design:

```sh
verilator --lint-only -Wall -y rtl +libext+.sv rtl/cheri_pkg.sv rtl/cheri_cop.sv --top-module cheri_cop
```

The simulations run in well under a second:

* `tb_cap_decompress`, `tb_cap_compress` and `tb_cap_check` compare thousands
  of random encodings with the reference decoder.
* `tb_cap_compress` also checks that the chosen exponent is minimal.
* `tb_ccall_fast` checks each pair rule by hand, then 3000 random sealable
  pairs against the rules applied in order.
* `tb_cap_alu` covers every operation and its traps, and randomly checks that
  `CSetBounds` never widens rights.
* `tb_cheri_cop` runs the whole design at its defaults. It:
  * builds a callee domain from the root and seals its pair;
  * stores and reloads the pair through tagged memory;
  * sets up a trusted stack;
  * enters the callee with `CCallFast` and checks its fetch and data bounds;
  * takes and returns from exceptions;
  * returns to the caller through the trusted stack.

  It counts 21 mechanisms (CCallFast, its faults, trapping CCall, bounds and
  fetch faults, kernel-register protection, exception entry, ERET, trusted
  stack push/pop, tag clearing, seal/unseal, sealed-operand faults, stalls,
  rounding, unrepresentable offsets, CJALR, misalignment, back-to-back posted
  stores, overlapped loads). It fails if any of them never happened. It also
  checks the 1-cycle and 2 + latency timings. It reloads eight registers with
  back-to-back `CLC`s, and checks that the loads overlap and answer in order.
  It also checks that a load whose base register is still being loaded
  waits.
* `tb_ccalltest` streams 1 MiB through a callee domain in 8 KiB pieces, which
  takes 128 round trips. Each trip derives an exact 8 KiB buffer capability
  and pushes the caller on the trusted stack. It then enters the callee, which
  writes the first and last word of the buffer. The callee is stopped when it
  tries to read one byte past the buffer or reach KR1C. The trip returns
  through the kernel helper. The stream is sent twice: once with `CCallFast`,
  and once with the trapping `CCall`. In the trapping case the kernel compares
  the object types, unseals the pair with a key cut from the root and jumps
  in. With a 2-cycle memory the coprocessor's share of a trip is 46 cycles
  for `CCallFast` and 62 for the trapping path. The CPU's pipeline flushes,
  which dominate the trapping path on real hardware, are not counted. The test
  checks that every trip of a path takes exactly the same time, since
  crossings must be deterministic.
* `tb_timer_guard` keeps a deadline with each trusted-stack entry (caller
  PCC, caller DDC, deadline; 24 bytes, at most 4 entries). KR1C's address
  marks the top of the stack. At call depths 1 to 4, a timer interrupt checks
  the deadlines in two ways. The random check loads one entry and costs the
  same 9 cycles at every depth. The full traversal loads every entry back to
  back; it costs 7 to 10 cycles, one more per entry, because the loads
  overlap. The kernel then forces the expired callee to return: it cuts KR1C
  back to that entry, restores the entry's DDC and jumps to the saved PCC.
* `tb_heap_alloc` plays a bucket allocator and its user. Free chunks are
  linked by capabilities stored in their headers. An allocated chunk's header
  holds its bucket number in a capability sealed with the allocator's object
  type. The user gets a capability bounded to the chunk and builds and walks a
  20-node linked list of such capabilities. The test checks that the user
  cannot write past a chunk or into its header. It also checks that `free`
  refuses a header forged from plain data, one sealed with another object
  type, and a chunk that is already free.

## Design choices and departures

Beyond the published design, the following are this implementation's own
decisions, and the first place to look when matching other CHERI-64 RTL or
tools:

* **Bounds encoding.** The exponent/mantissa split, the window edge
  `R = B - 16`, the sealed layout with a 6-bit object type, and outward
  rounding that traps if it leaves the parent. Real CHERI-64 encodings differ,
  so capabilities in memory are not bit-compatible with other CHERI
  implementations.
* **Explicit-capability addresses.** These use the capability's current
  address (base + offset) plus the register and immediate offsets. For a
  capability whose offset is zero this is the same as "relative to the base".
* **Context-switch cost.** The source reports about 22 extra cycles per
  context switch for 8 general and 3 kernel capability registers. That figure
  includes exception entry and exit on its CPU. Here, with a 2-cycle memory,
  the coprocessor's part takes about 34 cycles:
  * saving: 8 posted `CSC`s, plus 3 `CReadHwr` + `CSC` pairs, is 14 cycles;
  * restoring the kernel registers: 3 overlapped `CLC`s, then 3 `CWriteHwr`,
    is about 9 cycles;
  * restoring the general registers: 8 overlapped `CLC`s is 11 cycles.

  The excess over the source's figure comes from `CWriteHwr` waiting for
  loads to drain, and from the first load's latency.
* **Registers.** PCC and DDC are kept in addition to the eight general
  registers. The three kernel registers are KR1C, KCC and EPCC.
* **Defined here, not taken from the source:** the permission bit numbers and
  exception cause codes, the request/response interface, the memory handshake,
  and the reset values.
* **No trusted-stack hardware.** Push, pop and time-stamp checks are software,
  as in the design this follows.
* **Field copies in `ccall_fast`.** Unsealing rewrites only the flag and the
  bounds field. Most of `ccall_fast`'s output bits are therefore copies of its
  inputs.

## What is not here

* **The main pipeline.** This is the BERI 64-bit MIPS core: fetch, decode,
  GPRs, branch handling, CP0 with its count/compare timer. The coprocessor's
  request, response, fetch and exception ports are where it connects.
* **The memory system and caches.** `tb/tagged_mem_model.sv` stands in for a
  tagged memory in simulation.
* **The real-time kernel and its software.** This covers the scheduler,
  message queues, timer-driven expiry of calls, the kernel CCall helper,
  dynamic task loading, and the heap allocator. The allocator's headers of
  freed chunks point to the next free chunk. Headers of allocated chunks hold
  a sealed capability carrying the bucket ID. The workload testbenches replay the
  coprocessor instructions these routines issue (helper push and pop,
  allocator, deadline check), with the scalar parts done in the testbench.
* **The 8-entry RISC-V PMP** used as the comparison baseline.

The published round-trip figures (about 100 cycles for a fast call, about 1300
for a kernel message queue) are software figures on the full processor. They
cannot be reproduced with the coprocessor alone. The same goes for the
benchmark overheads (below 5%) and the FPGA area and clock comparison.
