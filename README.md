# Hardware thread manager for a polymorphic array processor PE

A processing element (PE) in a polymorphic SIMD/MIMD array stalls whenever an
instruction runs in *blocking mode* and one of its operands has not yet arrived.
The data might be coming from a neighbouring PE's shared memory, or as a reply
routed from a remote PE or from cluster memory. This block is a hardware thread
manager that lets one PE hold up to **eight MIMD threads** and switch between them,
so a blocked thread gives the PE to another thread instead of stalling it. It also
gives every thread a time quantum, restores the thread whose data has arrived with
top priority, and hands the whole PE to the SIMD controller on request.

All of it is synthesizable SystemVerilog (IEEE 1800-2017). At the default size
(8 threads) it comes to roughly 900 word-level cells and 860 flip-flops.

## How a thread moves through the manager

Every thread has two table entries, held in `regfile`:

| configuration entry (58 bits) | quant | I-base | I-size | M-base | M-size |
|---|---|---|---|---|---|
| bits | 10 | 14 | 10 | 14 | 10 |

| status entry (38 bits) | PC | state | avail | mask | rank | stamp |
|---|---|---|---|---|---|---|
| bits | 10 | 2 | 6 | 6 | 4 | 10 |

Each entry is packed in the order shown, with the first field in the most
significant bits (`tm_pkg::cfg_entry_t`, `tm_pkg::st_entry_t`). PCs are relative to
the thread's I-base. `quant` and `stamp` count clock cycles.

Each thread has a four-state machine (`state_ctrl`):

```
idle  --thread_valid-->        ready   (thread loaded by the array controllers)
ready --thread_hit-->          run     (selected and dispatched)
run   --thread_over-->         idle    (PC reached I-size)
run   --thread_block-->        wait    (blocking instruction without its data)
run   --thread_timeout | thread_stop--> ready  (quantum used up / preempted / SIMD)
wait  --thread_data_arrive-->  ready
```

## Scheduling: the rank sequence

`rank_ctrl` holds the whole scheduling policy, so the policy can be changed in one
place. The ranks of all eight thread slots form one ordered sequence, with 0 the
highest priority. After reset, thread *t* has rank *t*. The sequence changes in two
ways:

* **Move to last**: the thread used up its quantum, blocked on near-neighbour data,
  or finished. Every thread behind it moves up one place.
* **Move to first**: a waiting thread's data arrived. It takes rank 0, and every
  thread that was ahead of it moves down one place. The thread that was running
  therefore gets its rank plus one.

A thread that blocks on the **router** keeps its rank. Idle and waiting threads
keep their places in the sequence too. The thread dispatched next is the
**lowest-ranked thread in the ready state**. Example with threads 0, 1, 2 and 6
loaded (both testbenches check it):

```
0 1 2 6  --thread 0 blocks-->        1 2 6 0
         --thread 1 quantum over-->  2 6 0 1
         --thread 0 data arrives-->  0 2 6 1   (thread 2 is preempted)
```

When two rank operations come in the same cycle (a move to last at the end of a
switch and a wake-up), move-to-last is applied first. At most one thread wakes per
cycle, lowest thread number first.

## The controller and the PE handshake (`tm_ctrl`)

`tm_ctrl` owns the PE and has four states:

* **C_IDLE**: no thread on the PE, and `pe_stop` is high. If `simd_mode_request` is
  high, go to C_SIMD. Otherwise, if a thread is ready, dispatch it in one cycle:
  `thread_hit`, a `set_pc_valid` pulse with `pe_set_pc` (the saved PC),
  `pe_i_mem_base` and `pe_d_mem_base`, and a stamp restart. Dispatch waits one cycle
  if a thread wakes in the same cycle, so the woken rank-0 thread is chosen.
* **C_RUN**: the stamp counts the running cycles. The first event that occurs, in
  this priority order, starts a switch:
  1. finish: `pe_current_pc == I-size`;
  2. block: `pe_block`, with `pe_block_mode` telling a near-neighbour block from a
     router block. The operand mask (`pe_decode_mask`) and availability
     (`pe_de_dcahe_avail`) are captured;
  3. timeout: the stamp reaches quant, so a slot lasts exactly `quant` cycles
     (quant = 0 means no limit);
  4. preemption: another thread woke up;
  5. SIMD request.
* **C_DRAIN**: `pe_stop` stays high until `pe_line_empty`. In that cycle the PE must
  show the resume PC (for a block, the PC of the blocked instruction) on
  `pe_current_pc`, and it is saved. The thread's state machine then receives the
  event, and `rank_ctrl` applies the rank rule.
* **C_SIMD**: `simd_mode_respond` and `pe_simd_mode` stay high until
  `simd_mode_finish`.

A switch takes the PE's drain time plus two cycles: one to leave C_DRAIN and one to
dispatch. The PE must show the newly loaded PC on `pe_current_pc` from the cycle
after `set_pc_valid`.

### Waking up

* **Near-neighbour block**: the shared memories report newly available operands
  with `sm_avail_valid` / `sm_avail_tid` / `sm_avail_bits`. These bits are ORed into
  the thread's `avail` field. The thread wakes when `(avail & mask) == mask`.
* **Router block** (MOVEF, CALLR, MVT, MVF on `pe_rublock_code`): the router shows
  `ru_request` with `ru_thread_id` and `ru_transport_code`. `ru_respond` answers in
  the same cycle only if that thread is already waiting for exactly that kind of
  reply: RETR for CALLR, ACK for MVT, DATA for MOVEF and MVF. Otherwise the router
  keeps the request up and retries. After the router delivers the reply, it pulses
  `ru_finish` with the same `ru_thread_id`, and the thread wakes in the next cycle.
  MOVET does not block and does not involve the manager.

Assertions in `tm_ctrl` check that at most one thread is running, that
`ru_respond` is only given to a request, and that SIMD mode never overlaps a
running thread.

## Files

| file | content |
|---|---|
| `rtl/tm_pkg.sv` | field widths, entry structs, state and code enums |
| `rtl/thread_manager.sv` | top: one PE's thread manager |
| `rtl/tm_ctrl.sv` | controller, arbitration, PE / router / SIMD handshakes |
| `rtl/regfile.sv` | configuration and status tables |
| `rtl/rank_ctrl.sv` | rank sequence and selection |
| `rtl/stamp_ctrl.sv` | stamps and timeout |
| `rtl/state_ctrl.sv` | the eight thread state machines |
| `tb/*_tb.sv` | one self-checking testbench per module; `thread_manager_tb` is end to end |

`state_ctrl`, `rank_ctrl` and `stamp_ctrl` are purely combinational next-value
logic. Their fields live in `regfile`, which registers them every cycle.
`tm_ctrl` and `regfile` use an asynchronous active-low reset.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module thread_manager_tb \
  rtl/tm_pkg.sv rtl/tm_ctrl.sv rtl/regfile.sv rtl/stamp_ctrl.sv rtl/rank_ctrl.sv \
  rtl/state_ctrl.sv rtl/thread_manager.sv tb/thread_manager_tb.sv
./obj_dir/Vthread_manager_tb
```

For a unit testbench, compile `rtl/tm_pkg.sv`, the module and its `tb/<module>_tb.sv`.

`thread_manager_tb` runs the top at its default size. Around it sits a behavioural
environment:

* a PE that executes one instruction per cycle and needs two cycles to drain;
* eight synthetic programs of 40 to 82 instructions, mixing ALU, near-neighbour and
  router instructions;
* neighbour memories that deliver data 24 cycles after a block, and a router that
  replies after 1 to 10 cycles;
* one SIMD period.

The testbench checks the following:

* the rank example above;
* every thread resumes at the PC it left and executes each instruction exactly once,
  in order;
* no slot runs past its quantum;
* all threads end idle;
* each mechanism happens at least once: dispatch, timeout, near-neighbour block and
  wake-up, router block, refused and accepted replies, preemption, SIMD hand-over,
  completion and multi-cycle drain.

It also prints the total cycle count against the cycles one PE would need running
the same programs back to back and stalling on every block. In a typical run this
is about 1130 against 1700.

`perf_workload_tb` is a workload run modelled on the reference design's performance
test. It loads program *k* into thread *k*, releases all eight threads together and
runs them to completion with no SIMD period. It then reports the saving as
(cycles without manager - cycles with manager) / cycles without manager. With the
synthetic programs and latencies above, this is about 35%. The reference design
reports 16.9% (3127 against 3762 clocks) for its own, unpublished programs.

## Departures and own choices

The block structure, the table layouts, the four-state thread machine, the rank
rules and the names of the PE, router and SIMD signals follow the reference design.
The following points are this implementation's own:

* the controller states, the drain handshake and the event priority;
* thread completion detected as the PC reaching I-size;
* MOVEF treated as blocking until its data arrives;
* the router request/respond/finish sequence and its 2-bit codes;
* SIMD mode modelled as a hand-over of the whole PE;
* the `sm_avail_*` report port for shared-memory data arrival (the reference only
  says the manager monitors the shared memories);
* `thread_valid` used as a per-thread load pulse;
* reset values, the bit order inside table entries, and the one-cycle latency of the
  status read port;
* quant = 0 meaning no limit, and the stamp saturating instead of wrapping;
* a thread whose quantum runs out goes back to ready, as the thread state machine
  prescribes, not to wait (one description of the reference design puts it on wait);
* the meaning of the six avail/mask bits, which is not specified beyond "two source
  operands and a destination operand". Here they are six operand flags.

Not included: the PE datapath, its memories, the shared memories, the router, the
SIMD controller and the row/column/cluster controllers. These are the surroundings
of the manager, not part of it, and they meet it only at the ports above. The
eight-program performance comparison of the reference design depends on programs
that are not available, so it is not reproduced cycle for cycle.
