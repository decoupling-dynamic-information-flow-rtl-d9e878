# A decoupled DIFT coprocessor

Dynamic information flow tracking (DIFT) attaches a few tag bits to every
register and memory word, propagates them as instructions move data around,
and raises a security exception when tagged ("tainted") data is used in a
forbidden way: as a jump target, as a pointer, or as code. Building this into
a processor pipeline means widening its registers, buses and caches.

This design keeps the main core unchanged and moves all DIFT state and logic
into a small coprocessor next to it. The core commits its instructions as
usual and passes one *instruction tuple* per committed instruction (PC,
instruction word, physical memory address) to the coprocessor through a short
queue. The coprocessor replays the instruction stream on 4-bit tags only. The
two synchronise only at system calls, traps and interrupts: an attacked
program can do no harm outside its own address space without a system call,
so it is enough to be sure that every check up to that point has run. A
failed check interrupts the core asynchronously.

The RTL targets a SPARC V8 main core (tuple decoding, register windows), with
the prototype configuration as defaults: 4 policies, a 6-entry decoupling
queue, and a 512-byte, 2-way tag cache with 32-byte lines.

## Block structure

```
            core_valid/core_tuple        tuples            tuples
 main  ───────────────────────▶ sync_ctrl ─────▶ decoupling_queue ─────▶ dift_coprocessor
 core  ◀─── core_stall, sync_done,                 (6 entries)              │   ▲
       ◀─── irq_grant                                                       │   │ tag lines
       ◀──────────────────────────── sec_exc, exc_pc, exc_bits ─────────────┘   ▼
                                                                          (L2 cache / memory)
```

| file | block |
|---|---|
| `rtl/dift_pkg.sv` | shared types: tuple, tags, operation classes, policy register layout, coprocessor opcodes, register window mapping |
| `rtl/dift_system.sv` | top level: the three blocks above |
| `rtl/sync_ctrl.sv` | core-side interface: queue-full stall, system call and interrupt synchronisation |
| `rtl/decoupling_queue.sv` | tuple FIFO, `DEPTH` entries (0 = no decoupling) |
| `rtl/dift_coprocessor.sv` | the four-stage tag pipeline |
| `rtl/security_decode.sv` | SPARC V8 decode into primitive operations, rule selection |
| `rtl/policy_regs.sv` | four propagation/check register pairs |
| `rtl/tag_reg_file.sv` | register tags, windowed like the SPARC register file |
| `rtl/tag_alu.sv` | 4-bit OR/AND/XOR tag ALU |
| `rtl/tag_check.sv` | check logic |
| `rtl/tag_cache.sv` | unified memory-tag cache |
| `rtl/l0_tag_buffer.sv` | one-line instruction-tag buffer |

The main core, the L2 cache and memory, and the security monitor software are
not part of the RTL; their signals are ports of `dift_system`.

## The tag pipeline

A tuple goes through an input register and four stages; one tuple can enter
per cycle.

* **Decode (D).** `security_decode` turns the instruction into one of eight
  primitive operation classes (ARITH, LOGIC, MOVE, LOAD, STORE, JUMP, BRANCH,
  OTHER), the registers it reads and writes, and its effect on the window
  pointer. The four policies' rules for that class are picked from the
  policy registers. The tags of rs1, rs2 and (for stores) rd are read. The
  window pointer follows SAVE/RESTORE/Ticc/RETT; a policy register write takes
  effect here, so the next instruction already sees it.
* **Propagate (P).** Operands are forwarded from the two later stages. The
  tag ALU combines two source tags per tag bit with OR, AND or XOR, or clears
  the bit. Operand choice: ALU classes use rs1 and rs2 (an immediate counts as
  clean); a load uses the memory tag, optionally merged with the address
  register tags; a store propagates the data register's tag, optionally
  merged with the address tags, into memory; other classes produce a clean
  result. A store writes its memory tag only if its instruction tag is zero.
* **Check (C).** A security exception fires if any policy asks to check a
  group of operands whose tag bit for that policy is set. The groups are the
  source operands, the registers forming a memory or jump address (pointer
  dereference), and the instruction word's own tag (code injection).
* **Writeback (W).** The destination register's tag is written.

Forwarding covers every dependency: a tag produced in P is in C one cycle
later, where the next instruction's P stage can pick it up. A chain of
dependent instructions therefore runs at one per cycle, and N instructions
keep the pipeline busy for N + 3 cycles.

### Instruction tags, the L0 buffer and the one structural stall

Every instruction needs the tag of its own memory word (for code-injection
checks), and a load or store also needs a data tag. A unified tag cache with
a single port serves both. A one-line L0 buffer holds the tags of 64
consecutive instruction words. In P:

* L0 hit: the instruction tag comes from L0, and the cache port is free for
  the data tag.
* L0 miss, not a load or store: the port fetches the instruction tag (and
  refills L0) at no cost.
* L0 miss on a load or store: the port is needed twice, so P takes one extra
  cycle. This is the only stall that is not a cache miss.

Any tag cache write to the line that L0 holds invalidates L0, so newly
written code tags are never missed.

### Tag cache and the tag memory area

`tag_cache` is physically indexed and tagged, since the core sends physical
addresses. It needs no TLB and no flush on context switches. It is 2-way, write-back and
write-allocate, with one LRU bit per set. A 32-byte line holds 64 nibbles, the
tags of 64 words (256 bytes), so the 512-byte default covers 4 KB of data.
A miss blocks P (and, behind it, the queue): a dirty victim is written back,
then the line is fetched. The memory port moves one whole line per request:
`mem_req` is held until a one-cycle `mem_ack`, and read data comes with the
ack. The tags of data address `A` live at `TAG_BASE + A/8`, so the tag line is
at `TAG_BASE + (A >> 8) * 32`, and nibble `(A >> 2) mod 64` of that line is
word `A`'s tag.

## Synchronisation with the core

`sync_ctrl` sits on the core's side.

* Each cycle the core may present a tuple (`core_valid`, `core_tuple`). The
  tuple is taken when `core_stall` is low.
* `core_stall` is high while the queue is full. This is the only stall in
  normal operation.
* When a Ticc (system call or software trap) tuple has been taken,
  `core_stall` stays high until the queue is empty and the coprocessor is
  idle. `sync_done` then pulses and the core may commit the trap. If an
  earlier instruction failed a check, `sec_exc` is already high by then.
* External interrupts work the same way. While `ext_irq_req` is high no
  tuple is taken, and `irq_grant` rises once everything in flight has been
  checked.

* With `SYNC_FENCES` set, a memory barrier (STBAR) or an atomic (LDSTUB,
  SWAP and their alternate-space forms) synchronises like a system call. In
  a multiprocessor with weak memory ordering, this makes every older tag
  update visible before the fence commits.

Exceptions are imprecise: a few more instructions may commit after the one
that failed, but none past the next system call.

## Programming it: policies and coprocessor instructions

Software (a trusted security monitor) controls the coprocessor with SPARC
CPop1 instructions (`op=2, op3=0x36`), which the core treats as no-ops but
passes on like any other tuple. Operation in `instr[13:9]`, 4-bit immediate
in `instr[8:5]`, 32-bit operand in the tuple's address field:

| op | name | effect |
|---|---|---|
| 1 | `CP_WR_TPR` | TPR[rd & 3] ← operand |
| 2 | `CP_WR_TCR` | TCR[rd & 3] ← operand |
| 3 | `CP_SET_RTAG` | tag(rd) ← imm |
| 4 | `CP_RD_RTAG` | readback ← tag(rs1) |
| 5 | `CP_SET_MTAG` | memory tag(operand) ← imm |
| 6 | `CP_RD_MTAG` | readback ← memory tag(operand) |
| 7 | `CP_RD_EXC` | readback ← PC of the failing instruction |
| 8 | `CP_CLR_EXC` | clear the pending exception |
| 9 | `CP_WR_CWP` | window pointer ← operand[2:0] |

Readback values appear on `rb_data` with a one-cycle `rb_valid`, in program
order. Read them after a synchronisation so they are current.

Policy register layout (one TPR and one TCR per policy `p`, i.e. tag bit `p`;
class numbers as in `dift_pkg::op_class_e`):

* TPR bits `[2c+1:2c]`: propagation mode of class `c`: 0 clear, 1 OR,
  2 AND, 3 XOR.
* TPR bit 16: loads merge the address register tags. Bit 17: stores do.
* TCR bit `3c`: check the source operands of class `c`. Bit `3c+1`: check
  its address operands. Bit `3c+2`: check its instruction tag.

Reset clears every policy register: no propagation and no checks. All
register tags start clean.

## Where this departs from, or goes beyond, the source design

The source design fixes the structure used here: the tuple contents, the
queue and its stall, system-call synchronisation, the four stages and their
work, the OR/AND/XOR tag ALU, forwarding, four 4-bit policies, the unified
512-byte 2-way cache with 32-byte lines, the one-line L0 buffer and its stall
rule, and the store condition on the instruction tag. The following are
this implementation's own choices:

* The policy register encoding, the eight operation classes and the SPARC
  instruction-to-class table. The source design bases its encoding on an
  earlier DIFT architecture without giving it.
* The instruction-tag lookup (L0, with the cache port as fallback) is done
  in P, not D. This keeps all tag cache traffic in one stage, and the stall
  rule comes out exactly as intended.
* The coprocessor instruction set, the readback port, the exception register
  (first failure kept until cleared) and the event outputs.
* Checks are per tag bit. A pointer-injection rule that fails only when one
  bit is set and another is clear cannot be configured.
* The tag cache's write-back and LRU policies, its line-wide memory port and
  `TAG_BASE`.
* SPARC register windows are mirrored in the tag register file (8 windows).
  Hardware traps that change the window outside the tuple stream must be
  followed by `CP_WR_CWP`. LDD/STD are treated as single-word accesses, and
  floating-point registers carry no tags.
* Storage (queue, tag cache) is written as flip-flop arrays. An FPGA build
  would map them to block RAM.
* One clock domain. Running the coprocessor at a different clock from the
  core would need a dual-clock queue, which is not provided.
* Synchronisation on memory fences, which only multiprocessors need, is a
  parameter (`SYNC_FENCES`) and off by default. The choice of SPARC
  instructions that count as fences is this design's own.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

* `tb/dift_ref_pkg.sv` holds instruction encoders, a random instruction
  stream generator and a sequential reference model of the tag semantics.
  The model has its own decode and no pipeline or caches. `tb/tag_mem_model.sv`
  models the tag memory with random latency.
* `tb_dift_coprocessor` checks policy writes and the timing: 40 dependent
  instructions take 43 busy cycles with 39 forwards, and an L0 miss on a
  load costs one cycle. It then runs 4000 random tuples and compares every
  readback, every register tag, every memory tag written and the exception
  state with the model.
* `tb_dift_system` runs the top at its default parameters. A main-core model
  commits 6000 random instructions, with system calls and interrupts. At each
  synchronisation point it checks that the coprocessor is idle and that its
  exception state matches the model. It counts queue-full stalls, system-call
  and interrupt synchronisations, forwarding, L0 stalls, tag cache misses,
  write-backs and security exceptions, and fails if any of them never
  happened.
* `tb_queue_sweep` runs a tag-initialisation microbenchmark with queue depths
  0, 1, 2, 4 and 6 and a 16-byte tag cache (2 ways, 4-byte lines). The core
  model commits four instructions every five cycles. The coprocessor's extra
  stall cycles fall from about 4% without a queue to about 0.5% with six
  entries. With a core that commits every cycle, no queue depth helps: the
  coprocessor's peak rate is also one per cycle, so a backlog never drains.
* `tb_miss_stress` runs back-to-back loads and stores at the default
  configuration, with a core model that pays 8 cycles for each new data line
  and a tag memory with 1 to 6 cycles of latency. Sequential loads miss in the
  tag cache once per 64 words, and strided loads (256 bytes apart) miss every
  time; in both cases the core's own misses hide the tag misses completely.
  Strided stores are the real worst case: each one evicts a dirty tag line,
  so it costs a write-back and a fill, and the core is stalled about 22% of
  the time. Memory bus contention between the core and the tag cache is not
  modelled.
* `tb_attacks` shows three attacks being caught: a tainted return address,
  code injection and a tainted pointer.
* Unit testbenches: the ALU exhaustively; the check logic, policy registers
  and register file against random shadow models; the decoder on a table of
  instructions; the L0 buffer; the cache for LRU order, write-back and 6000
  random accesses; the queue at depths 6 and 0; the sync controller, with
  and without fence synchronisation, on directed sequences.

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/dift_pkg.sv tb/dift_ref_pkg.sv tb/tb_dift_system.sv --top-module tb_dift_system -o sim
./obj_dir/sim
```

The testbenches read parts of the design hierarchically (`dut.u_cp.u_rf.mem`)
for the final register-tag comparison. Renaming instances means updating
them.
