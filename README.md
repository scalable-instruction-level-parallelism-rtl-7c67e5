# A microthreaded chip multiprocessor

Out-of-order issue finds parallelism in hardware, and its cost grows quickly with
issue width: the issue logic at least with the square of the width, and the
register file faster still. This design moves that work to the compiler and the
instruction set. A loop is compiled into a *family* of short threads
(*microthreads*), one per iteration. The threads are spread over several simple
in-order processors. Their instructions are interleaved without any schedule
fixed in advance: a thread runs until its next instruction may need a value that
is not there yet, then it gives way to another thread.

Synchronisation happens in the registers. Every register is an *i-structure*: it
is empty, full, or holds the continuation of a thread that tried to read it while
it was empty. Writing the register wakes that thread. A value passed from one
iteration to the next goes through a pair of registers that may sit in
different processors' register files. The consumer's read fetches the value over
a switch, and the consumer waits only until it arrives. Each processor has its
own register file, and the number of ports on it does not grow with the number
of processors. Only the switches between processors do.

The RTL follows the organisation described in C. Jesshope, *Scalable
Instruction-level Parallelism*. That source gives the programming model, the
register partitioning, the block diagram and the behaviour of each block, but
no encodings, sizes or internal structure. Everything of that kind here is this
design's own. The section *Departures and choices* lists each such choice.

## Programming model

### Register windows

Threads use a 5-bit register specifier, split into two halves:

| specifier | thread code | main thread |
|---|---|---|
| 0–15  | `$G0..$G15`: global registers, the same in all threads | `$G0..$G15` |
| 16–31 | the thread's own window: `$L0..$L(L-1)`, then `$S0..$S(S-1)`, then `$D0..$D(S-1)` | `$G16..$G31` |

* **$G (global)** registers are readable by every thread. Every processor holds
  a copy of all 32. A write goes into the local copy at once, and the global
  write bus broadcasts it to the other copies.
* **$L (local)** registers are private to one thread. On creation, `$L0` holds
  the thread's loop index.
* **$S (shared)** registers are written by a thread for the thread that depends
  on it.
* **$D (dependent)** registers are read by a thread. `$Dk` of thread *i* stands
  for `$Sk` of thread *i−d*, where *d* is the family's dependency distance.
  Physically, `$D` is a separate set of registers in the consumer's window. They
  are filled from the producer on the first read.

Each created thread gets a window of L+2S consecutive registers (L+2S ≤ 16). A
thread's state holds its window base, its producer's window base and the
producer's processor number. The main thread has no window and treats all 32
specifiers as `$G`. The first *d* threads of a family read their `$D` values
from the main thread: thread *c* (*c* < *d*) reads `$G(16+c·S)` onward, so
the main thread places d·S starting values there before `cre`.

### Instructions

32-bit words, `op[31:26] rd[25:21] ra[20:16] rb[15:11]`, with `imm[15:0]`
overlapping `rb`. Immediates are sign-extended. Memory is word addressed.

| op | mnemonic | effect |
|---|---|---|
| 0 | `nop` | |
| 1 | `add rd, ra, rb` | rd = ra + rb |
| 2 | `sub rd, ra, rb` | rd = ra − rb |
| 3 | `mul rd, ra, rb` | rd = ra × rb (low 32 bits) |
| 4 | `mv rd, ra` | rd = ra |
| 5 | `addi rd, ra, imm` | rd = ra + imm |
| 6 | `lw rd, imm(ra)` | rd = mem[ra+imm]. rd becomes empty and is filled when memory answers |
| 7 | `sw rd, imm(ra)` | mem[ra+imm] = rd |
| 8 | `cre imm(ra)` | create the family described by the control block at ra+imm |
| 9 | `swch` | context switch: fetch continues with another thread |
| 10 | `kill` | terminate this thread |
| 11 | `bsync` | wait until every thread of the family has terminated |
| 12 | `brk` | terminate the other threads. **Executes as a no-op here** |
| 13 | `finish` | the main thread stops; `halted` rises |

A *create control block* is eight words in memory: start index, last index,
step, dependency distance *d*, L, S, code address, and code address for the last
thread (0 = same code).

The compiler has three rules to keep:

* Put `swch` after an instruction whose operands may be empty.
* Never let two threads wait on the same register at once. An i-structure holds
  one continuation.
* Store a carried value to memory only in the last thread.

The dot product `Q = Σ Z(k)·X(k)` for k = 1..m becomes:

```
main:  mv    $G16, $G0        # Q = 0 in the main thread's $S0
       cre   ccb              # ccb: 1, m, 1, 1, 3, 1, body, last
       bsync
       finish
body:  lw    $L1, Z($L0)
       lw    $L2, X($L0)
       mul   $L1, $L1, $L2    # may find $L1/$L2 empty: suspends here
       swch
       add   $S0, $D0, $L1    # $D0 = previous thread's $S0
       kill
last:  ... same, then swch; sw $S0, Q($G0); kill
```

## How a thread waits for a value

The register file (`lrf`) is the heart of the design. Each register has a
two-bit state:

| state | data field holds | entered when |
|---|---|---|
| EMPTY | – | a window is allocated; a load is issued to the register |
| FULL | the value | any write |
| WAIT-local | `{slot, pc}` of the suspended thread | a local read found it empty |
| WAIT-remote | (side field) requesting processor and register | a remote read found it empty |

**Local wait.** An instruction in the register-read stage finds an operand that
is not full. The instruction is dropped, and its thread's slot number and pc go
into that register. The LCQ marks the thread WAITING. The pipeline goes on with
whatever the fetch stage has already taken from another thread. When memory, the
ALU, the data switch or the global bus later writes the register, the register
file returns `{slot, pc}` on a `wake` port. The LCQ makes the thread ready, and
it restarts at the instruction that failed.

**Remote read of `$D`.** Say the empty register is a `$D` register: its offset in
the window is at least L+S. The suspension then also records the producer's
address. That address is *producer base + offset − S*, which is the matching
`$S` register in the producer's window. A read request goes out on the
read-request switch. At the producer's processor there are two cases:

* The `$S` register is full. The value goes straight back on the data switch.
* The `$S` register is empty. The request is parked in it (WAIT-remote), and the
  reply leaves when the producer writes it.

The reply writes the consumer's `$D` register, which wakes the consumer. Later
reads of that `$D` are local. A register that is written in the same cycle as a
thread suspends on it wakes the thread at once (`wake[4]`), so no wake-up is
lost. The loop above shows every case. `mul` waits for loads, `add` waits for
`$D0`, and the request for `$D0` usually reaches the producer before its `add`
has written `$S0`.

**Keeping the producer's window alive.** A producer may terminate before its
consumer has read `$S`. A terminated thread's slot therefore stays as a
*zombie*, and its window is not released yet. When the consumer terminates, it
sends a release notice over the read-request switch to the producer's
processor. The producer's window is freed once both have happened. Threads with
no consumer are freed at once: the last *d* threads, and all threads when
*d* = 0. The source does not describe this protocol. Without it a reused window
could be read by mistake.

## Creating threads: GCQ, create bus, RAU, LCQ

* **`create_bus`.** A processor executing `cre` asks for the single create bus
  (round robin) and stalls until it gets it. The GCQ accepts a new family only
  when no other family is running. It also waits until the global write bus is
  empty, so new threads see the creator's latest `$G` values.
* **`gcq`.** Reads the control block (one memory round trip per word). It then
  creates thread *c* = 0, 1, … with index start + c·step on processor
  *c* mod NPROC, so each processor gets at most ⌈m/NPROC⌉ threads. When the
  target has no free slot or no window of L+2S registers, iteration waits. The
  GCQ keeps the processor and window base of the last 8 threads. These give each
  new thread its producer (thread *c−d*, or the creating thread for *c* < *d*).
  It counts terminations, and when all created threads are gone it raises
  `family_idle`, which releases `bsync`.
* **`rau`.** Keeps a free bitmap of the 96 pool registers and offers the lowest
  base with L+2S free registers in a row (first fit, combinational). `fit` goes
  to the GCQ in the same cycle.
* **`lcq`.** Holds 8 thread slots per processor. A slot is in one of these
  states: FREE, READY, RUNNING, WAITING, SYNC (bsync), or ZOMBIE. Ready threads
  are offered to the pipeline in round-robin order. A create fills a slot, and
  the register file empties the new window and writes the index to `$L0`, all
  on the same clock edge.

## The pipeline

`mt_pipeline` has three stages.

1. **Fetch.** Runs the current thread. When there is none, it takes the LCQ's
   offer in the same cycle, so a switch costs no bubble. After it fetches
   `swch`, `kill`, `bsync` or `finish`, it drops the thread, and the next fetch
   comes from another one.
2. **Register read.** Maps specifiers to physical registers and reads two
   operands. The value being written back by the execute stage is forwarded. If
   an operand is not full, the thread suspends as described above. A load still
   in execute counts as "not full" for its destination. A younger instruction
   of the same thread may already be in fetch (normally the `swch`); it is
   dropped.
3. **Execute / write-back.** Runs the ALU and writes back. A write to a `$G`
   register also goes into the global-write buffer. Loads and stores go to the
   data port, and a load empties its destination. `cre` goes to the create bus.
   `swch`, `kill`, `bsync` and `finish` go to the LCQ, which saves the pc to
   resume at.

A busy data port, a full global-write buffer or an ungranted `cre` freezes all
three stages.

## Global structures

* **`gwbus`.** One 4-entry buffer per processor and round-robin arbitration. One
  write per cycle is broadcast, and every processor except the writer puts it
  in its copy of `$G`.
* **`xbar`** (used twice: the read-request switch and the data switch). A
  crossbar with a round-robin arbiter and an output register per destination.
  Messages are taken with valid/ready and delivered one cycle later. The
  receiving register file accepts one message per cycle on each switch. A
  processor may send to itself: a local producer is reached the same way.

## Top level: `mt_top`

| parameter | default | meaning |
|---|---|---|
| `NPROC` | 4 | processors (2–16) |
| `NREG` | 128 | registers per processor: 32 `$G` plus the pool (≤ 256) |
| `NSLOT` | 8 | thread slots per processor (≤ 16) |
| `GW_DEPTH` | 4 | global-write buffer entries per processor |
| `DMAX` | 8 | largest dependency distance (power of two) |

The top level has these ports. The caches are outside the RTL.

* **Instruction ports, per processor.** `imem_addr` out; `imem_rdata` must
  answer in the same cycle.
* **Data ports, per processor.** A request is `dm_req_valid/we/addr/wdata/tag`,
  taken when `dm_req_ready` is high. Stores need no reply. A load reply is
  `dm_resp_valid/tag/data`, where the tag is the destination register returned
  unchanged. It may come any number of cycles later, and replies may come back
  in any order.
* **GCQ control-block port.** `gcq_mem_req_valid/addr/ready` with a reply
  `gcq_mem_resp_valid/data`; one read is outstanding at a time.
* **Status.** Processor 0 starts the main thread at address 0 after `rst_n`
  rises. `halted` rises on `finish`, and `family_idle` is high when no family is
  running.

Shared types, the instruction encoding and message formats are in
`rtl/mt_pkg.sv`. The other files are `rr_arbiter` and `sync_fifo` (helpers),
`xbar`, `gwbus`, `create_bus`, `gcq`, `rau`, `lrf`, `lcq`, `mt_pipeline`,
`mt_proc` (one processor: pipeline, LCQ, RAU, LRF) and `mt_top`.

## Departures and choices

These follow the source:

* the four register classes and their mapping onto the 5-bit specifier
* the window of L+2S ≤ 16 per thread, and a 32-register `$G` window for the
  main thread
* i-structure registers with the continuation stored in the empty register, and
  wake on write
* the `$D` read through the producer's `$S` at offset −S
* the control block, and round-robin placement with at most ⌈m/n⌉ threads per
  processor
* allocation by the RAU with registers set empty and the index in `$L0`
* the single create bus, the arbitrated global write bus with local buffers,
  and the two n×n switches
* context switching at fetch

These are this design's own:

* **Sizes.** All numbers: processor count, register count, slots, buffer depth,
  word width 32, pc width 16.
* **Clocking.** The source describes global communication as asynchronous,
  between separately clocked zones. Here the whole chip runs on one clock, and
  the global structures are decoupled only by handshakes and registers.
* **`brk`.** Decoded but does nothing; its mechanism is not described.
* **Families.** One at a time. A new `cre` waits for the previous family to end
  and for the global write bus to drain.
* **Placement.** The GCQ waits only for the target processor, not for all of
  them.
* **Pipeline details.** The encoding, the three stages with forwarding, and the
  extra instructions `sub`, `addi`, `finish` and `nop`.
* **Window release.** The release protocol, which delays freeing a producer's
  window until its consumer has terminated.
* **Reset and loads into `$G`.** `$G` registers reset to full and zero. A load
  into a `$G` register fills the local copy only.
* **Register-file queueing.** Requests and replies leave the register file one
  per cycle each, lowest register number first.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_mt_top` | The whole chip at default size runs three families of 64 threads each. First the dot-product loop above (dependency distance 1). Then an independent family Y(k) = Z(k)+X(k). Then the dot-product body with distance 2, which forms two chains seeded from `$G16` and `$G17`. Memory answers loads after random 1–12 cycles and sometimes refuses. Both sums and all Y(k) are checked. It also requires every mechanism to occur: context switches, suspensions, wakes, remote `$D` reads, reads parked at the producer, global broadcasts, GCQ waits for resources (64 threads, 32 slots), release notices, bsync waits and memory back-pressure. About 900 cycles. |
| `tb_mt_pipeline` | One processor: forwarding, all ALU ops, load-use suspension, store, stall on `cre`, bsync, two created threads using their windows, window return. |
| `tb_lrf` | Every register-state transition, including the same-cycle cases. |
| `tb_lcq` | Slot life cycle, round robin, release protocol, bsync. |
| `tb_gcq` | Control-block read, placement, producer binding for d = 2, waiting, family end. |
| `tb_rau` | Random allocate/free against a reference first-fit model, down to exhaustion. |
| `tb_create_bus`, `tb_gwbus`, `tb_xbar` | Arbitration, ordering, delivery, back-pressure. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mt_pkg.sv \
          $(ls rtl/*.sv | grep -v mt_pkg) tb/tb_mt_top.sv --top-module tb_mt_top -o sim
./obj_dir/sim
```

(The package `rtl/mt_pkg.sv` must come first.)

## Known limits

* `brk` is not implemented. Neither is killing the other threads of a family
  on a function call or return. Both would need a way to abandon threads
  whose continuations sit in registers and whose loads are still in flight.
* There are no caches. The instruction port must answer in the same cycle. The
  rule "schedule a thread only when its code is in the I-cache" is therefore
  met trivially and not modelled.
* Idle processors are not power-gated; nothing in the RTL models power.
* Compiler rules are checked only by an assertion: a second continuation on one
  register is an error.
* The source evaluates nothing quantitatively, so no performance is claimed.
  The tests only show that the mechanisms work and that results are correct.
