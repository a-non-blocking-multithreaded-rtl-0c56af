# SDF node with thread-level speculation

This is synthesizable SystemVerilog for one processing node of a Scheduled
Dataflow (SDF) multithreaded processor, extended with hardware for
thread-level speculation (TLS).

The processor rests on two ideas:

* **Non-blocking, dataflow-enabled threads.** A thread starts only once every
  input it needs has been written into its *frame*. After that it runs to
  completion and never waits on memory.
* **Memory access decoupled from computation.** Each thread passes through
  three phases:
  1. A *Synchronization Processor* (SP) **preloads** the thread's inputs from
     memory into a register set.
  2. An *Execution Processor* (EP) computes on those registers only. It
     touches no memory.
  3. An SP **post-stores** the results, either to memory or into the frames
     of other threads.

  The pipelines stay simple and in-order. While one thread computes on an EP,
  the memory work of other threads overlaps it on the SPs.

Speculation lets a compiler run loop iterations in parallel when it cannot
prove that they are independent. Each speculative thread carries an **epoch
number** that gives its place in program order. The node then does four
things:

* It records every address such a thread reads speculatively.
* It flags the thread when an earlier thread, or another node, later writes
  one of those addresses.
* It lets threads write results (post-store) strictly in epoch order.
* It sends a flagged thread back to re-read its data and redo its work. The
  retried thread runs as a normal, non-speculative thread.

A speculative thread never writes memory, so nothing has to be undone.

## Contents

1. [Continuations and the life of a thread](#continuations-and-the-life-of-a-thread)
2. [How speculation is checked](#how-speculation-is-checked)
3. [Cache line states](#cache-line-states)
4. [Block map](#block-map)
5. [Instruction set](#instruction-set)
6. [Timing](#timing)
7. [Parameters](#parameters)
8. [Interfaces of the top, `sdf_node`](#interfaces-of-the-top-sdf_node)
9. [What follows the architecture and what is this implementation's own](#what-follows-the-architecture-and-what-is-this-implementations-own)
10. [Performance of this model](#performance-of-this-model)
11. [Simulating](#simulating)

## Continuations and the life of a thread

A thread is represented by a *continuation* (`cont_t` in `sdf_pkg`):

| field | meaning |
|---|---|
| FP  | frame pointer: where the thread's inputs are written |
| IP  | instruction pointer of the code to run next |
| RS  | register set allocated to the thread |
| SC  | synchronization count: inputs still missing |
| EPN | epoch number; 0 means non-speculative |
| RIP | retry instruction pointer, used after a failed speculation |
| ABI | address-buffer ID: which address-buffer set records this thread's speculative reads |

A thread goes through these steps:

1. **Spawn.** An EP executes `FALLOC` or `SPFALLOC`. The thread schedule unit
   (`sdf_tsu`) allocates a frame and returns its FP. For `SPFALLOC` it also
   gives the thread the next epoch number (1, 2, 3, … in spawn order), a free
   ABI and the RIP the program supplied, and it clears that address-buffer
   set.
2. **Synchronize.** Producers write the thread's inputs into its frame with
   `STORE`, during their own post-store. Each such store sends a SYNC message
   to the TSU, which decrements SC.
3. **Enable.** When SC reaches zero and a register set is free, the TSU puts
   the continuation, now carrying that RS, into the **preload queue**.
4. **Preload.** An idle SP takes it and runs `LOAD`, `IFETCH` and `SPREAD`.
   `FORKEP` then hands the thread to the TSU, which puts it in the
   **execution queue**.
5. **Execute.** An idle EP takes it and computes. It ends with one of:
   * `FORKSP`: the thread goes to the **post-store queue**.
   * `COMMIT`: a speculative thread goes to the **speculative commit queue**.
     A non-speculative thread goes straight to the post-store queue.
6. **Post-store.** An SP writes the results. Its final `STOP` ends the
   thread, and the TSU frees the frame and the register set.

A `STOP` that follows a fork only frees the processor. The thread lives on
elsewhere.

## How speculation is checked

**Address buffer (`sdf_addr_buffer`).** This is organised like a
set-associative cache:

* There is one set per speculative thread, indexed by its ABI.
* Each set has `NWAYS` entries. This is the most speculative reads one thread
  may make.
* Each SP has an insert port that writes the address of a speculative read
  into the reading thread's set.
* Each SP has an invalidate port that carries the address of every write that
  SP completes.
* One more invalidate port carries bus write misses snooped from other nodes.

Every invalidate address is compared with every entry in the same cycle. One
write therefore flags every thread that read that address. A matching entry
is cleared and its set's `violated` flag is set. A read that finds its set
full also sets `violated`, so a thread can never commit with an unrecorded
read.

**Commit control (`sdf_commit_ctrl`).** This holds the speculative commit
queue and the number `next_epn` of the epoch allowed to commit, starting
at 1. When the queued thread with that epoch is found, the commit control
looks up `violated[ABI]`:

* **Clean:** the thread is sent directly to an SP for post-store. It becomes
  non-speculative (EPN = RIP = ABI = 0) so that it may write.
* **Violated:** IP is set to RIP, the thread becomes non-speculative, and it
  goes back to the preload queue. Its register set is kept, so the retry code
  only has to re-read the speculatively read data. It then runs the body again
  and post-stores normally.

Either way the ABI is released. `next_epn` advances only when that thread's
final `STOP` is reported. Until then no later epoch is examined. This ensures
that the post-store writes of every earlier thread have reached the address
buffer before a later thread is judged.

Threads are non-blocking, so a violated thread is not aborted. It finishes
its body and is sent back only when its turn to commit comes.

## Cache line states

The SPs share one data cache (`sdf_spec_cache`). Each line carries three
bits:

| state | SpRead | Valid | Dirty |
|---|---|---|---|
| I | x | 0 | x |
| E/M | 0 | 1 | 1 |
| S | 0 | 1 | 0 |
| SpR-Ex | 1 | 1 | 1 |
| SpR-Sh | 1 | 1 | 0 |

Requests from this node's SPs:

| request | hit | miss |
|---|---|---|
| read | state kept | read miss on bus → S |
| speculative read | E → SpR-Ex, S → SpR-Sh, SpR-* kept | read miss on bus → SpR-Sh |
| write | E or SpR-Ex → E; S or SpR-Sh → write miss (invalidate) on bus → E | write miss on bus → E |

A miss that replaces a dirty line (E or SpR-Ex) first writes that line back.

Requests snooped from the bus:

| snooped request | effect |
|---|---|
| read miss | E → S, SpR-Ex → SpR-Sh (dirty data supplied and written back); S and SpR-Sh kept |
| write miss | any line → I (dirty data written back). If the line was speculatively read, the address goes to the address buffer. The address also goes there when the line is absent, because a speculatively read line may have been evicted. |

Cache organisation: direct mapped, one 32-bit word per line, write-back,
write-allocate.

The cache takes a snoop when it is idle, before any new SP request. It also
takes one while it waits for its own bus transaction (a write-back, a miss or
an upgrade). Two nodes that each wait for the bus therefore cannot block each
other. If a snoop invalidates a line whose upgrade is pending, the upgrade
still completes. It acts as a write miss, which is correct because a line
holds one word and the write replaces all of it.

## Block map

```
            +------------------- sdf_tsu (frame table, SC, RS/ABI/EPN allocation) <------+
            |        |                 |                     |                           |
            v        v                 v                     v                        messages
      preload q  post-store q    execution q     speculative commit q                    |
      (sdf_fifo) (sdf_fifo)      (sdf_fifo)      + commit control (sdf_commit_ctrl)      |
            |        |                 |              | commit        | retry            |
            |        |                 v              |               +--> preload q     |
            +--------+-----> SPs (sdf_sp) <-----------+                                  |
                              |    |                        EPs (sdf_ep) ----------------+
                              |    +--> sdf_spec_cache --> bus (memory, other nodes)
                              +-------> sdf_addr_buffer <-- bus write misses
     sdf_regfile (register sets) and sdf_imem (code): one port set per SP and EP
```

Files:

| file | block |
|---|---|
| `rtl/sdf_pkg.sv` | types, instruction encoding, priority-choice helpers |
| `rtl/sdf_node.sv` | top: wiring and dispatch of queued threads to idle SPs and EPs |
| `rtl/sdf_tsu.sv` | thread schedule unit |
| `rtl/sdf_commit_ctrl.sv` | speculative commit queue and commit control |
| `rtl/sdf_addr_buffer.sv` | address buffer |
| `rtl/sdf_spec_cache.sv` | data cache with speculative line states |
| `rtl/sdf_sp.sv` | Synchronization Processor |
| `rtl/sdf_ep.sv` | Execution Processor |
| `rtl/sdf_fifo.sv` | preload, post-store and execution queues |
| `rtl/sdf_regfile.sv` | register sets |
| `rtl/sdf_imem.sv` | code memory |

An idle SP takes work in this order: a thread just committed, then the head of
the post-store queue, then the head of the preload queue. Lower-numbered
processors are served first. TSU messages and cache requests use round-robin
choice.

## Instruction set

Each instruction is 32 bits wide:

| bits | field |
|---|---|
| [31:27] | opcode |
| [26:22] | rd |
| [21:17] | ra |
| [16:12] | rb |
| [11:0] | imm |

R0 reads as zero. `imm` is sign-extended for `ADDI` and taken as unsigned
otherwise.

| op | unit | effect |
|---|---|---|
| `LOAD rd, imm` | SP | rd ← mem[FP+imm] |
| `STORE rd, ra, imm` | SP | mem[R[ra]+imm] ← R[rd]; one input delivered to the frame at R[ra] |
| `IFETCH rd, ra, rb` | SP | rd ← mem[R[ra]+R[rb]] |
| `ISTORE rd, ra, rb` | SP | mem[R[ra]+R[rb]] ← R[rd] |
| `SPREAD rd, ra, rb` | SP | speculative read of mem[R[ra]+R[rb]]; a plain read for a non-speculative thread |
| `FORKEP imm` | SP | continue on an EP at imm |
| `ADDI rd, ra, imm`, `ADD rd, ra, rb` | SP, EP | integer add |
| `SUB`, `MUL` | EP | integer subtract, multiply (low 32 bits) |
| `FALLOC rd, ra, imm` | EP | spawn a thread at imm needing R[ra] inputs; rd ← its FP |
| `SPFALLOC rd, ra, rb, imm` | EP | as FALLOC, speculative, with RIP = R[rb] |
| `FORKSP imm` | EP | continue on an SP (post-store) at imm |
| `COMMIT imm` | EP | post-store at imm after the commit check |
| `STOP` | both | end of this code portion; ends the thread if it was not forked |

A speculative thread's `STORE` and `ISTORE` are dropped. The SP reports each
one on `spec_wr_blocked`.

## Timing

* The SP and EP run one instruction at a time. A register instruction takes
  one cycle.
* A memory instruction waits for the cache. A cache hit takes 2 cycles:
  request taken, then lookup and answer. A miss adds the bus time, and a
  dirty line to evict adds a write-back first.
* `FORKEP`, `FORKSP` and `COMMIT` occupy the processor for 4 cycles before
  the continuation is offered to the TSU.
* The TSU serves one message per cycle. In parallel it enables one thread per
  cycle.
* A continuation pushed into a queue can be dispatched in the next cycle.
* The address buffer updates at the clock edge after an insert or
  invalidation. The commit decision is combinational from its flags.

## Parameters

Defaults of `sdf_node`:

| parameter | default | origin |
|---|---|---|
| `NSP`, `NEP` | 4, 4 | the 4-SP, 4-EP configuration of the architecture; 2, 6 and 8 are also studied |
| `NSETS` × `NWAYS` | 64 × 4 | the architecture's example: 64 speculative threads, 4 speculative reads each |
| `NRS` | 16 | own choice |
| `NFRAMES` | 64 | own choice; also the depth of each queue, so no queue can overflow |
| `NLINES` | 256 | own choice |
| `IMEM_DEPTH` | 1024 | own choice |
| `FRAME_WORDS`, `FRAME_BASE` | 16, `0x10000` | own choice; frames are word-addressed in data memory |

Field widths are set in `sdf_pkg`: EPN 16 bits, SC 8 bits, IP 12 bits, data
and addresses 32 bits.

## Interfaces of the top, `sdf_node`

| ports | purpose |
|---|---|
| `imem_we/waddr/wdata` | load code before starting |
| `boot_valid/boot_ip` → `boot_ready/boot_fp` | start a thread that needs no inputs. Its frame is `boot_fp`. |
| `bus_valid/cmd/addr/wdata` ← `bus_ready/rdata` | the node's bus requests (read miss, write miss, write-back); memory answers with `bus_ready` and, for a read miss, `bus_rdata` |
| `snp_valid/cmd/addr` → `snp_ready/snp_wb/snp_wb_data` | requests of other nodes. A snoop is taken when the cache is idle. Dirty data appears on `snp_wb_data` in the same cycle. |
| `ev_*`, `next_epn`, `quiet` | one-cycle activity pulses (commit, retry, speculative read, external invalidation, thread done, blocked speculative write), the next epoch to commit, and an all-idle flag |

## What follows the architecture and what is this implementation's own

These parts follow the architecture:

* the continuation format, and the rule that EPN = 0 means non-speculative;
* the split into SP and EP, with only the SPs touching memory;
* the preload, execution, post-store and speculative commit queues;
* the commit rule (epoch order; a violation sends the thread back to preload
  at RIP as a non-speculative thread);
* the address buffer organised as sets per thread and ways per read, with
  parallel invalidation from every SP and from the bus;
* the five line states and their bit encoding;
* the 4-cycle fork.

These parts are this implementation's own:

* **Instruction encoding and processors.** The encoding and operand format
  are new. The SP and EP run one instruction at a time and do only integer
  arithmetic. Floating point is not modelled.
* **I-structures.** `IFETCH` and `ISTORE` are plain base + index accesses.
  There are no presence bits or deferred reads.
* **Caches.** A single data cache stands in for the separate frame and
  I-structure caches.
* **Cache organisation and transitions.** The organisation, the bus
  handshake and the exact state transitions follow ordinary MESI practice.
  For example, a read miss always fills in S.
* **Commit queue search.** The commit queue is searched by epoch, so threads
  may finish in any order.
* **Advancing `next_epn`.** It waits for the committed thread's post-store to
  finish.
* **Full address-buffer set.** A read that finds the set full flags the
  thread.
* **Sizes.** Resource counts and queue depths are this implementation's
  choice.

This RTL models one node. Several nodes sharing memory connect through the
`bus_*` and `snp_*` ports. The bus, its arbiter and the memory are not part of
the design.

A bus for several nodes must do two things:

* serialise transactions;
* show each read miss or write miss to every other node's snoop port, and
  take any dirty data they return, before memory answers the requester.

`tb_sdf_two_nodes` contains such a bus as a behavioural model.

## Performance of this model

All SPs share one data cache. The cache serves one request at a time and
keeps at most one bus transaction outstanding. Memory traffic, which is most
of the SP work, is therefore serialised. In `tb_sdf_synthetic` a 16-iteration
loop takes about the same number of cycles on 2, 4 or 8 SPs and EPs. With more
units, more iterations run ahead speculatively, so a chain of dependences
causes more retries.

Gaining from additional SPs needs more cache bandwidth. Two ways to provide
it are a banked or multi-ported cache, or separate frame and I-structure
caches. The `sdf_spec_cache` interface already takes one request per SP and
would stay as it is.

## Simulating

Every testbench in `tb/` checks its own results and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_sdf_node` | end to end, at default parameters. A control thread spawns 8 speculative iterations of `x[idx[i]] += a[i]*b[i]; c[i] = x[idx[i]]`. Some iterations share an `idx` entry, which creates true dependences. While the last iteration waits to commit, the testbench (acting as another node) writes its `x` entry over the bus. The testbench is memory and other node, and reads the results back through snooped read misses. It compares them with a sequential execution and checks that commits, retries, speculative reads, external invalidations, blocked speculative writes, write-backs and write misses all happened. |
| `tb_sdf_synthetic` (with `tb_synth_harness`) | the synthetic speculative loop on nodes with 2, 4 and 8 SPs and EPs. It uses SP-heavy, balanced and EP-heavy instruction mixes. It runs three dependence patterns: no dependences, every fourth iteration sharing a location, and a chain through one location. Every run must match a sequential execution. Without dependences nothing may be retried; with the chain, violations must be caught. Cycle counts are printed. |
| `tb_sdf_two_nodes` | two default-size nodes on one snooping bus. The bus is a behavioural model: it serialises transactions and shows each miss to the other node before memory answers. Node 0 runs the speculative loop. Node 1 writes one of the words node 0 has read speculatively. The write must reach node 0's address buffer. The results must match one of the two legal orderings of that write. |
| `tb_sdf_tsu` | directed test of allocation, synchronization counts, enabling, routing, resource exhaustion and boot |
| `tb_sdf_commit_ctrl` | epoch order with scrambled arrival, violated and clean threads, waiting for done |
| `tb_sdf_addr_buffer` | random inserts, invalidations and clears against a reference model |
| `tb_sdf_spec_cache` | random traffic and snoops, some arriving while a miss is pending, against a reference model of states and memory; hit latency |
| `tb_sdf_sp`, `tb_sdf_ep` | instruction semantics, messages, 4-cycle forks; random arithmetic bodies on the EP against a reference |
| `tb_sdf_fifo`, `tb_sdf_regfile`, `tb_sdf_imem` | storage blocks |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module tb_sdf_node \
    rtl/sdf_pkg.sv rtl/sdf_*.sv tb/tb_sdf_node.sv
./obj_dir/Vtb_sdf_node
```

For `tb_sdf_synthetic`, add `tb/tb_synth_harness.sv` to the file list.

List `rtl/sdf_pkg.sv` first. It is allowed to appear twice through the
wildcard. Alternatively, list the files explicitly with the package first.

The end-to-end test builds in a few seconds and runs in well under a second.
